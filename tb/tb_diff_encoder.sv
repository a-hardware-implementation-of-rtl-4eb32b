// tb_diff_encoder: checks b_k = a_k xor b_(k-1) on the textbook waveform
// (input 1 0 1 1 0 0 0 1 1 0 1 gives output 1 1 0 1 1 1 1 0 1 1 0) and on
// random data with random gaps between input bits.
module tb_diff_encoder;
  logic clk = 0, rst_n = 0, in_valid = 0, din = 0, dout;
  int checks = 0, failures = 0;
  bit prev;

  diff_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bit a, bit exp);
    @(negedge clk);
    in_valid = 1; din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%0b out=%0b exp=%0b", a, dout, exp);
    end
    @(negedge clk);
    in_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    bit fin [11]  = '{1,0,1,1,0,0,0,1,1,0,1};
    bit fout [11] = '{1,1,0,1,1,1,1,0,1,1,0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (fin[i]) send(fin[i], fout[i]);
    // random data, independent model
    prev = fout[10];
    for (int i = 0; i < 2000; i++) begin
      bit a = 1'($urandom);
      prev = prev ^ a;
      send(a, prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
