// tb_conv_encoder: impulse response of both generators (U0 taps at stages
// 1,4,5,6,7 -> 1 0 0 1 1 1 1; U1 taps at stages 1,2,4,5,7 -> 1 1 0 1 1 0 1),
// then random data against the tap-list model.  Outputs must follow each
// input bit by exactly one clock.
module tb_conv_encoder;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, din = 0, out_valid, u0, u1;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit d[$], bit e0[$], bit e1[$]);
    foreach (d[i]) begin
      @(negedge clk);
      in_valid = 1; din = d[i];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || u0 !== e0[i] || u1 !== e1[i]) begin
        failures++;
        $display("FAIL bit %0d: valid=%0b u0=%0b u1=%0b exp %0b %0b", i, out_valid, u0, u1, e0[i], e1[i]);
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL spurious out_valid"); end
      end
    end
  endtask

  initial begin
    bit d [$], e0 [$], e1 [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    d  = '{1,0,0,0,0,0,0,0};
    e0 = '{1,0,0,1,1,1,1,0};
    e1 = '{1,1,0,1,1,0,1,0};
    run(d, e0, e1);
    d.delete();
    for (int i = 0; i < 3000; i++) d.push_back(1'($urandom));
    // the register still holds zeros after the impulse has left it
    conv_ref(d, e0, e1);
    run(d, e0, e1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
