// pcc_encoder: complete transmit-side channel encoder.
//
// Data bits pass through three stages in series:
//   differential encoder -> rate-1/2 K=7 convolutional encoder ->
//   punctured convolutional encoder (PCE)
// giving a punctured code of rate 1/2 or P/(P+1) (2/3 ... 16/17, or a user
// pattern), delivered as symbol pairs for a QPSK modulator.
//
// Interface: `data_valid`/`data_in` carry one data bit per input data clock
// tick (at most one every second clock on average, see punct_encoder).
// `write` with `rate`/`pattern` selects the puncturing pattern and restarts
// the PCE.  Output pairs are offered on `sym_valid`/`symbol_1`/`symbol_2`
// and taken with `sym_ready` (the rate clock enable).
// Latency: the differential encoder is combinational, the convolutional
// encoder adds one clock, the PCE at least two more.
module pcc_encoder
  import pcc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     write,
  input  rate_t    rate,
  input  pattern_t pattern,
  input  logic     data_valid,
  input  logic     data_in,
  output logic     sym_valid,
  input  logic     sym_ready,
  output logic     symbol_1,
  output logic     symbol_2,
  output logic     overflow
);
  logic diff_bit;
  logic cv_valid, cv_u0, cv_u1;

  diff_encoder u_diff (
    .clk, .rst_n,
    .in_valid (data_valid),
    .din      (data_in),
    .dout     (diff_bit)
  );

  conv_encoder u_conv (
    .clk, .rst_n,
    .in_valid  (data_valid),
    .din       (diff_bit),
    .out_valid (cv_valid),
    .u0        (cv_u0),
    .u1        (cv_u1)
  );

  punct_encoder u_pce (
    .clk, .rst_n,
    .write, .rate, .pattern,
    .in_valid  (cv_valid),
    .u0        (cv_u0),
    .u1        (cv_u1),
    .sym_valid, .sym_ready, .symbol_1, .symbol_2, .overflow
  );
endmodule
