// symbol_inserter: depuncturing ahead of a rate-1/2 Viterbi decoder.
//
// Receives the punctured stream as QPSK soft-decision pairs (I, Q) and
// rebuilds the rate-1/2 symbol pairs (C1, C2) by putting a dummy, weak soft
// value at every position the transmitter deleted.  It is the inverse of
// punct_encoder and is built the same way:
//   * a memory of 32 soft symbols, written with I then Q at the address of
//     a counter that advances once per received pair (rate clock tick);
//   * a control unit holding the puncturing pattern, loaded on `start`
//     from the built-in table (`rate`) or from `pattern` (RATE_USER), which
//     also presets the counters;
//   * a pattern counter walking the 2P positions of the period, one per
//     clock; at a kept position the MUX passes the next stored symbol, at a
//     deleted position it passes the dummy symbol from the insertion unit.
//
// Timing: single clock with enables.  `in_valid` marks a received pair;
// I is the earlier symbol (Symbol_1 of the encoder), Q the later one.  One
// symbol position is produced per clock, so a (C1, C2) pair is emitted at
// most every second clock, as a one-cycle `out_valid` pulse (the decoder
// must accept it).  Dummies are produced only after the first pair has been
// received.  If the memory would overrun, the received pair is dropped and
// the sticky `overflow` flag is set.
//
// Soft symbols are 3 bits.  The dummy value DUMMY defaults to 3'b100, one of
// the weak values; which weak value is used is this design's choice.
module symbol_inserter
  import pcc_pkg::*;
#(
  parameter int unsigned DEPTH = 32,      // soft-symbol memory entries
  parameter soft_t       DUMMY = 3'b100   // soft value inserted for a deleted symbol
) (
  input  logic     clk,
  input  logic     rst_n,
  // control
  input  logic     start,
  input  rate_t    rate,
  input  pattern_t pattern,
  // received punctured pairs
  input  logic     in_valid,
  input  soft_t    sym_i,
  input  soft_t    sym_q,
  // depunctured rate-1/2 pairs to the Viterbi decoder
  output logic     out_valid,
  output soft_t    c1,
  output soft_t    c2,
  output logic     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  pattern_t      pat_q;
  logic [4:0]    pos_q;
  logic [4:0]    last_pos;
  soft_t         mem_q [DEPTH];
  logic [AW-1:0] wr_q, rd_q;
  logic [AW:0]   fill_q;
  logic          seen_q;      // a pair has been received since start
  soft_t         first_q;     // C1 of the pair being assembled

  logic  keep, step, accept;
  soft_t sym;

  assign last_pos = 5'((32'(pat_q.period) << 1) - 1);
  assign keep     = pat_q.keep[pos_q];
  assign step     = keep ? (fill_q != '0) : seen_q;
  assign sym      = keep ? mem_q[rd_q] : DUMMY;
  assign accept   = in_valid && (fill_q <= (AW+1)'(DEPTH - 2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pat_q     <= rate_pattern(RATE_1_2);
      pos_q     <= '0;
      wr_q      <= '0;
      rd_q      <= '0;
      fill_q    <= '0;
      seen_q    <= 1'b0;
      first_q   <= '0;
      out_valid <= 1'b0;
      c1        <= '0;
      c2        <= '0;
      overflow  <= 1'b0;
    end else if (start) begin
      pat_q     <= select_pattern(rate, pattern);
      pos_q     <= '0;
      wr_q      <= '0;
      rd_q      <= '0;
      fill_q    <= '0;
      seen_q    <= 1'b0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (accept) begin
        wr_q   <= AW'(wr_q + 2'd2);
        seen_q <= 1'b1;
      end
      if (in_valid && !accept) overflow <= 1'b1;

      out_valid <= 1'b0;
      if (step) begin
        pos_q <= (pos_q == last_pos) ? 5'd0 : 5'(pos_q + 1'b1);
        if (keep) rd_q <= AW'(rd_q + 1'b1);
        if (!pos_q[0]) begin
          first_q <= sym;
        end else begin
          c1        <= first_q;
          c2        <= sym;
          out_valid <= 1'b1;
        end
      end

      fill_q <= fill_q + (accept ? (AW+1)'(2) : '0) - ((step && keep) ? (AW+1)'(1) : '0);
    end
  end

  // memory write port
  always_ff @(posedge clk) begin
    if (rst_n && !start && accept) begin
      mem_q[wr_q]              <= sym_i;
      mem_q[AW'(wr_q + 1'b1)]  <= sym_q;
    end
  end

  // A pattern must have a period of 1..16 and keep at least one position.
  a_period_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (pat_q.period >= 5'd1) && (pat_q.period <= 5'(MAX_PERIOD)));
  a_keeps_some: assert property (@(posedge clk) disable iff (!rst_n)
    (pat_q.keep & MAX_POS'((64'(1) << (32'(pat_q.period) << 1)) - 1)) != '0);
endmodule
