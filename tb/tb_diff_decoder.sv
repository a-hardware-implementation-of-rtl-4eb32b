// tb_diff_decoder: decodes the textbook differential waveform back to its
// data (1 0 1 1 0 0 0 1 1 0 1), then random streams, including a stream and
// its complement (phase-inverted), which must decode to the same data after
// the first bit.  Output comes one clock after each input bit.
module tb_diff_decoder;
  logic clk = 0, rst_n = 0, in_valid = 0, din = 0, out_valid, dout;
  int checks = 0, failures = 0;

  diff_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bit b, bit exp, bit check);
    @(negedge clk);
    in_valid = 1; din = b;
    @(negedge clk);
    in_valid = 0;
    if (check) begin
      checks++;
      if (!out_valid || dout !== exp) begin
        failures++;
        $display("FAIL in=%0b valid=%0b out=%0b exp=%0b", b, out_valid, dout, exp);
      end
    end
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid without input");
      end
    end
  endtask

  initial begin
    bit enc [11] = '{1,1,0,1,1,1,1,0,1,1,0};
    bit dat [11] = '{1,0,1,1,0,0,0,1,1,0,1};
    bit b [$];
    bit a [$];
    bit p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (enc[i]) send(enc[i], dat[i], 1);
    // random coded stream; model keeps its own previous bit
    p = enc[10];
    for (int i = 0; i < 1000; i++) begin
      bit x = 1'($urandom);
      send(x, x ^ p, 1);
      p = x;
    end
    // phase ambiguity: a complemented coded stream decodes to the same data
    for (int i = 0; i < 500; i++) a.push_back(1'($urandom));
    p = 0;
    foreach (a[i]) begin p = p ^ a[i]; b.push_back(p); end
    rst_n = 0; @(negedge clk); rst_n = 1;
    foreach (b[i]) send(~b[i], a[i], i > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
