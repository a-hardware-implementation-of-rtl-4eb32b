// pcc_top: punctured convolutional codec, transmit and receive paths.
//
// Transmit path (pcc_encoder): data -> differential encoder -> K=7 rate-1/2
// convolutional encoder -> puncturing, producing symbol pairs for a QPSK
// modulator.
//
// Receive path: soft-decision (I, Q) pairs from a QPSK demodulator ->
// symbol_inserter (depuncturing) -> rate-1/2 Viterbi decoder -> differential
// decoder -> data.  The Viterbi decoder is an external core: its input
// (depunctured pairs `vit_valid`/`vit_c1`/`vit_c2`) and its output (decoded
// bits `vit_bit_valid`/`vit_bit`) are ports of this module, and the decoded
// bits re-enter here for differential decoding.
//
// Both paths share one clock and reset; each has its own pattern control
// (`enc_write` for the transmitter, `dec_start` for the receiver), which
// must select the same pattern on both ends of a link.
module pcc_top
  import pcc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // transmitter control and data
  input  logic     enc_write,
  input  rate_t    enc_rate,
  input  pattern_t enc_pattern,
  input  logic     data_valid,
  input  logic     data_in,
  output logic     tx_valid,
  input  logic     tx_ready,
  output logic     tx_sym1,
  output logic     tx_sym2,
  output logic     enc_overflow,
  // receiver control and soft-decision input
  input  logic     dec_start,
  input  rate_t    dec_rate,
  input  pattern_t dec_pattern,
  input  logic     rx_valid,
  input  soft_t    rx_i,
  input  soft_t    rx_q,
  output logic     dec_overflow,
  // to / from the external Viterbi decoder core
  output logic     vit_valid,
  output soft_t    vit_c1,
  output soft_t    vit_c2,
  input  logic     vit_bit_valid,
  input  logic     vit_bit,
  // decoded data
  output logic     dec_valid,
  output logic     dec_data
);
  pcc_encoder u_enc (
    .clk, .rst_n,
    .write      (enc_write),
    .rate       (enc_rate),
    .pattern    (enc_pattern),
    .data_valid, .data_in,
    .sym_valid  (tx_valid),
    .sym_ready  (tx_ready),
    .symbol_1   (tx_sym1),
    .symbol_2   (tx_sym2),
    .overflow   (enc_overflow)
  );

  symbol_inserter u_ins (
    .clk, .rst_n,
    .start     (dec_start),
    .rate      (dec_rate),
    .pattern   (dec_pattern),
    .in_valid  (rx_valid),
    .sym_i     (rx_i),
    .sym_q     (rx_q),
    .out_valid (vit_valid),
    .c1        (vit_c1),
    .c2        (vit_c2),
    .overflow  (dec_overflow)
  );

  diff_decoder u_ddec (
    .clk, .rst_n,
    .in_valid  (vit_bit_valid),
    .din       (vit_bit),
    .out_valid (dec_valid),
    .dout      (dec_data)
  );
endmodule
