// diff_encoder: differential encoder, b_k = a_k xor b_(k-1).
//
// A '1' at the input toggles the output level and a '0' keeps it, so the
// information sits in transitions and survives the 180-degree phase
// ambiguity of a PSK receiver.  As in the classic structure, it is one
// modulo-2 adder and a one-bit delay that holds the previous output.
//
// Interface: `in_valid` marks an input bit (one tick of the input data
// clock).  `dout` is combinational, dout = din xor state, valid in the same
// cycle as `in_valid`; the state register takes `dout` at that clock edge.
// Synchronous reset clears the stored previous output to 0 (this design's choice).
module diff_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic din,
  output logic dout
);
  logic prev_q;

  assign dout = din ^ prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n)        prev_q <= 1'b0;
    else if (in_valid) prev_q <= dout;
  end
endmodule
