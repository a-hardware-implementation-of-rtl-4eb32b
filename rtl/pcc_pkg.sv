// pcc_pkg: types and constants shared by the punctured convolutional codec.
//
// Rate selection.  The codec supports the basic rate 1/2 and ten punctured
// rates (2/3 ... 16/17) derived from it, plus a user-programmed pattern.
// A puncturing pattern of period P covers P consecutive (U0,U1) pairs, i.e.
// 2P channel-symbol positions, taken in transmit order U0(0), U1(0), U0(1),
// U1(1), ...  Bit i of `keep` is 1 when position i is transmitted.  A pattern
// for rate P/(P+1) keeps P+1 of its 2P positions.
//
// The ten rates and the 1/2 base rate follow the requirement list of the
// design; the patterns themselves are this design's choice.  For 2/3 ... 7/8
// they are the widely used patterns of the K=7 (171,133) code, written
// time-reversed because this encoder numbers its stages the other way round;
// they give free distances 6, 5, 4, 4, 3, 3.  For 11/12, 12/13, 15/16 and
// 16/17 the patterns were found by a computer search over patterns that keep
// both symbols of the first pair and one symbol of every other pair, keeping
// a non-catastrophic pattern of largest free distance (3 for all four).
//
// Soft symbols are 3-bit offset-binary values: 000 is a confident '0',
// 111 a confident '1', 011/100 the two weakest values.
package pcc_pkg;

  // Maximum pattern period (pairs) and symbol-position count.
  localparam int unsigned MAX_PERIOD = 16;
  localparam int unsigned MAX_POS    = 2 * MAX_PERIOD;  // 32

  localparam int unsigned SOFT_W = 3;
  typedef logic [SOFT_W-1:0] soft_t;

  typedef enum logic [3:0] {
    RATE_1_2   = 4'd0,
    RATE_2_3   = 4'd1,
    RATE_3_4   = 4'd2,
    RATE_4_5   = 4'd3,
    RATE_5_6   = 4'd4,
    RATE_6_7   = 4'd5,
    RATE_7_8   = 4'd6,
    RATE_11_12 = 4'd7,
    RATE_12_13 = 4'd8,
    RATE_15_16 = 4'd9,
    RATE_16_17 = 4'd10,
    RATE_USER  = 4'd15
  } rate_t;

  // A puncturing pattern: period P in pairs (1..16) and the keep mask over
  // the 2P symbol positions (bits above 2P-1 are ignored).
  typedef struct packed {
    logic [4:0]         period;
    logic [MAX_POS-1:0] keep;
  } pattern_t;

  // Build a pattern from its two rows written as strings of P bits, left to
  // right in time (row0 = U0 / "X", row1 = U1 / "Y").  Bit k of each row value
  // is time step P-1-k, so the value reads like the printed row.
  function automatic pattern_t make_pattern(int unsigned p, logic [15:0] row0,
                                            logic [15:0] row1);
    pattern_t r;
    r.period = 5'(p);
    r.keep   = '0;
    for (int unsigned t = 0; t < MAX_PERIOD; t++) begin
      if (t < p) begin
        r.keep[2*t]   = row0[p-1-t];
        r.keep[2*t+1] = row1[p-1-t];
      end
    end
    return r;
  endfunction

  // Built-in pattern table, selected by the rate code.  RATE_USER and the
  // unused codes return rate 1/2 (the caller substitutes the user pattern).
  function automatic pattern_t rate_pattern(rate_t r);
    case (r)
      RATE_2_3:   return make_pattern(2,  16'b10,               16'b11);
      RATE_3_4:   return make_pattern(3,  16'b101,              16'b011);
      RATE_4_5:   return make_pattern(4,  16'b1000,             16'b1111);
      RATE_5_6:   return make_pattern(5,  16'b10101,            16'b01011);
      RATE_6_7:   return make_pattern(6,  16'b101001,           16'b010111);
      RATE_7_8:   return make_pattern(7,  16'b1010001,          16'b0101111);
      RATE_11_12: return make_pattern(11, 16'b11101011111,      16'b10010100000);
      RATE_12_13: return make_pattern(12, 16'b100010101011,     16'b111101010100);
      RATE_15_16: return make_pattern(15, 16'b110100101001111,  16'b101011010110000);
      RATE_16_17: return make_pattern(16, 16'b1011001110100100, 16'b1100110001011011);
      default:    return make_pattern(1,  16'b1,       16'b1);
    endcase
  endfunction

  // Pattern actually used: the table entry, or the user pattern for RATE_USER.
  function automatic pattern_t select_pattern(rate_t r, pattern_t user);
    return (r == RATE_USER) ? user : rate_pattern(r);
  endfunction

endpackage
