// punct_encoder: punctured convolutional encoder (PCE).
//
// Turns the rate-1/2 symbol pairs (U0,U1) of the convolutional encoder into
// a punctured stream of rate P/(P+1) by deleting the symbol positions whose
// pattern bit is 0, and regroups the surviving symbols into output pairs
// (Symbol_1, Symbol_2) for a QPSK modulator.
//
// Structure (after the reference block diagram):
//   * a 32-bit symbol memory, written with U0 and U1 at the address given by
//     a write counter that advances once per input data clock tick;
//   * a pattern memory holding the active puncturing pattern, addressed by a
//     pattern counter that walks the 2P positions of the period;
//   * a MUX/selector that examines one stored symbol per clock (read
//     counter), keeps it or deletes it according to the pattern bit, and
//     collects kept symbols into the output pair;
//   * a control unit that, on `write`, loads the pattern memory either from
//     the built-in table selected by `rate` or, for RATE_USER, from the bits
//     on `pattern`, and presets ("sets") all counters.
//
// Timing: a single clock.  The input data clock and the rate clock are
// represented by enables: `in_valid` marks an input pair; an output pair is
// offered with `sym_valid` and taken when the downstream rate-clock enable
// `sym_ready` is high.  The selector handles one symbol per clock, so on
// average `in_valid` may be high at most every second clock.  The output
// pair rate is (P+1)/(2P) of the input pair rate, e.g. 2/3 for rate 3/4.
// Symbol_1 carries the earlier kept symbol.  If the memory would overrun, the
// input pair is dropped and the sticky `overflow` flag is set (cleared by
// reset or `write`).
//
// What follows the reference design: memory size, the two counters, pattern
// memory, rate pins and pattern pin, one symbol punctured per clock.  This
// design's choices: the single-clock enable scheme, the valid/ready output,
// the overflow flag, and the built-in patterns (see pcc_pkg).
module punct_encoder
  import pcc_pkg::*;
#(
  parameter int unsigned DEPTH = 32   // symbol memory size in bits
) (
  input  logic     clk,
  input  logic     rst_n,
  // control
  input  logic     write,
  input  rate_t    rate,
  input  pattern_t pattern,
  // rate-1/2 input, one pair per input data clock tick
  input  logic     in_valid,
  input  logic     u0,
  input  logic     u1,
  // punctured output, one pair per rate clock tick
  output logic     sym_valid,
  input  logic     sym_ready,
  output logic     symbol_1,
  output logic     symbol_2,
  output logic     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  // pattern memory and control
  pattern_t         pat_q;
  logic [4:0]       pos_q;                 // pattern counter, 0 .. 2P-1
  logic [4:0]       last_pos;

  // symbol memory and its counters
  logic [DEPTH-1:0] mem_q;
  logic [AW-1:0]    wr_q, rd_q;
  logic [AW:0]      fill_q;

  // output pair assembly
  logic [1:0]       hold_q;
  logic [1:0]       nhold_q;

  logic take, step, keep, accept;
  logic [1:0] base;

  assign last_pos  = 5'((32'(pat_q.period) << 1) - 1);
  assign sym_valid = (nhold_q == 2'd2);
  assign symbol_1  = hold_q[0];
  assign symbol_2  = hold_q[1];

  assign take   = sym_valid && sym_ready;
  assign step   = (fill_q != '0) && (!sym_valid || take);
  assign keep   = pat_q.keep[pos_q];
  assign accept = in_valid && (fill_q <= (AW+1)'(DEPTH - 2));
  assign base   = take ? 2'd0 : nhold_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pat_q    <= rate_pattern(RATE_1_2);
      pos_q    <= '0;
      mem_q    <= '0;
      wr_q     <= '0;
      rd_q     <= '0;
      fill_q   <= '0;
      hold_q   <= '0;
      nhold_q  <= '0;
      overflow <= 1'b0;
    end else if (write) begin
      pat_q    <= select_pattern(rate, pattern);
      pos_q    <= '0;
      wr_q     <= '0;
      rd_q     <= '0;
      fill_q   <= '0;
      nhold_q  <= '0;
      overflow <= 1'b0;
    end else begin
      // write side: store U0, U1 at the write counter
      if (accept) begin
        mem_q[wr_q]              <= u0;
        mem_q[AW'(wr_q + 1'b1)]  <= u1;
        wr_q                     <= AW'(wr_q + 2'd2);
      end
      if (in_valid && !accept) overflow <= 1'b1;

      // read side: one symbol per clock through the selector
      nhold_q <= base;
      if (step) begin
        rd_q  <= AW'(rd_q + 1'b1);
        pos_q <= (pos_q == last_pos) ? 5'd0 : 5'(pos_q + 1'b1);
        if (keep) begin
          hold_q[base[0]] <= mem_q[rd_q];
          nhold_q         <= base + 2'd1;
        end
      end

      fill_q <= fill_q + (accept ? (AW+1)'(2) : '0) - (step ? (AW+1)'(1) : '0);
    end
  end

  // A pattern must have a period of 1..16 and keep at least one position.
  a_period_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (pat_q.period >= 5'd1) && (pat_q.period <= 5'(MAX_PERIOD)));
  a_keeps_some: assert property (@(posedge clk) disable iff (!rst_n)
    (pat_q.keep & MAX_POS'((64'(1) << (32'(pat_q.period) << 1)) - 1)) != '0);
endmodule
