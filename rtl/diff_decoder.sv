// diff_decoder: differential decoder, a_k = b_k xor b_(k-1).
//
// Inverse of diff_encoder: the output is '1' wherever the coded input
// changes level.  One modulo-2 adder and a one-bit delay holding the
// previous coded input.  An inverted coded stream decodes to the same data
// (apart from the first bit), which removes the receiver's phase ambiguity.
//
// Interface: `in_valid` marks an input bit.  The output is registered:
// `out_valid`/`dout` appear one clock after the input.  Synchronous reset clears the
// stored previous input to 0 (this design's choice).
module diff_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic din,
  output logic out_valid,
  output logic dout
);
  logic prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_q    <= 1'b0;
      out_valid <= 1'b0;
      dout      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dout   <= din ^ prev_q;
        prev_q <= din;
      end
    end
  end
endmodule
