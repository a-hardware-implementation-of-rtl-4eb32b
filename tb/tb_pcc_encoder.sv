// tb_pcc_encoder: the transmit chain against reference models of its three
// stages (differential encoding, tap-list K=7 encoder, puncturing) for every
// table rate and one user pattern, with data bits arriving at the full input
// rate (one every second clock) and, for half of the runs, with gaps and
// output back-pressure.
module tb_pcc_encoder;
  import pcc_pkg::*;
  import tb_ref_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     write = 0;
  rate_t    rate = RATE_1_2;
  pattern_t pattern = '0;
  logic     data_valid = 0, data_in = 0;
  logic     sym_valid, sym_ready = 1, symbol_1, symbol_2, overflow;

  int checks = 0, failures = 0;
  bit got [$];
  int ready_pct = 100;

  pcc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (sym_valid && sym_ready) begin
      got.push_back(symbol_1);
      got.push_back(symbol_2);
    end

  always @(negedge clk) sym_ready <= ($urandom_range(1, 100) <= ready_pct);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run(int code, string x, string y, int nbits, bit gaps);
    bit d [$], b [$], e0 [$], e1 [$], k [$], exp [$];
    int p = x.len();
    // the reset returns the differential and convolutional state to zero
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    write = 1; rate = rate_t'(code); pattern = pattern_t'(pack_pattern(x, y));
    @(negedge clk); write = 0;
    got.delete();
    ready_pct = gaps ? 70 : 100;
    for (int i = 0; i < nbits; i++) d.push_back(1'($urandom));
    diff_ref(d, b);
    conv_ref(b, e0, e1);
    keep_list(x, y, k);
    foreach (e0[n]) begin
      if (k[(2*n) % (2*p)])   exp.push_back(e0[n]);
      if (k[(2*n+1) % (2*p)]) exp.push_back(e1[n]);
    end
    foreach (d[i]) begin
      @(negedge clk); data_valid = 1; data_in = d[i];
      @(negedge clk); data_valid = 0;
      if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    check(!overflow, $sformatf("rate %0d: overflow", code));
    check(got.size() == exp.size(), $sformatf("rate %0d: %0d symbols, expected %0d",
                                              code, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("rate %0d: symbol %0d mismatch", code, i));
  endtask

  initial begin
    string x, y;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_RATES; c++) begin
      rows(RATE_CODE[c], x, y);
      run(RATE_CODE[c], x, y, 2 * x.len() * 10, 0);
      run(RATE_CODE[c], x, y, 2 * x.len() * 6, 1);
    end
    run(USER_CODE, "110", "011", 120, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
