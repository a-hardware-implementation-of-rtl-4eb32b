// conv_encoder: rate-1/2, constraint length K=7 convolutional encoder.
//
// The input bit is clocked into a 7-stage shift register; two modulo-2
// adders form the channel symbols from the stages selected by the generator
// polynomials.  Stage 1 holds the newest bit and corresponds to the most
// significant bit of each octal generator.  Defaults: G0 = 117 (octal)
// feeding U0 from stages 1,4,5,6,7 and G1 = 155 (octal) feeding U1 from
// stages 1,2,4,5,7, matching the tap structure of the reference encoder
// (this is the common K=7 (171,133) code with the stage order reversed).
//
// Interface: `in_valid` marks an input bit.  At that clock edge the bit
// enters stage 1 and the encoder registers U0/U1 from the new register
// contents; `out_valid`, `u0`, `u1` follow one clock after the input.
// Synchronous reset clears the register (all-zero starting state).
module conv_encoder #(
  parameter int unsigned K  = 7,
  parameter logic [K-1:0] G0 = 7'o117,
  parameter logic [K-1:0] G1 = 7'o155
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic din,
  output logic out_valid,
  output logic u0,
  output logic u1
);
  // sr_next[K-1] is stage 1 (the bit being clocked in) and sr_next[0] is
  // stage K, so bit positions line up with the generator bits.  Only stages
  // 1..K-1 need to be kept for the next step (sr_q).
  logic [K-2:0] sr_q;
  logic [K-1:0] sr_next;

  assign sr_next = {din, sr_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr_q      <= '0;
      out_valid <= 1'b0;
      u0        <= 1'b0;
      u1        <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sr_q <= sr_next[K-1:1];
        u0   <= ^(sr_next & G0);
        u1   <= ^(sr_next & G1);
      end
    end
  end
endmodule
