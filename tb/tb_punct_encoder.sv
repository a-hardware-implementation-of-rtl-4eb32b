// tb_punct_encoder: puncturing for rate 1/2, all ten punctured rates and a
// user-programmed pattern.  For each, random (U0,U1) pairs are fed and the
// output pairs are compared with the kept symbols of the reference pattern,
// in order.  Checked as well:
//   * output pair count = input pairs * (P+1)/(2P) (e.g. 2/3 for rate 3/4);
//   * full input rate (a pair every second clock, one symbol per clock
//     through the selector) runs without overflow;
//   * back-pressure on sym_ready loses nothing;
//   * a stalled output eventually raises `overflow`, and `write` clears it.
module tb_punct_encoder;
  import pcc_pkg::*;
  import tb_ref_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     write = 0;
  rate_t    rate = RATE_1_2;
  pattern_t pattern = '0;
  logic     in_valid = 0, u0 = 0, u1 = 0;
  logic     sym_valid, sym_ready = 1, symbol_1, symbol_2, overflow;

  int checks = 0, failures = 0;
  bit got [$];
  int ready_pct = 100;

  punct_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (sym_valid && sym_ready) begin
      got.push_back(symbol_1);
      got.push_back(symbol_2);
    end
  end

  always @(negedge clk) sym_ready <= ($urandom_range(1, 100) <= ready_pct);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic configure(int code, pattern_t user);
    @(negedge clk);
    write = 1; rate = rate_t'(code); pattern = user;
    @(negedge clk);
    write = 0;
    got.delete();
  endtask

  // Run one pattern: npairs random pairs with the given spacing.
  task automatic run(int code, string x, string y, int npairs, bit full_rate);
    bit k [$], exp [$];
    int p = x.len();
    int kept = 0;
    configure(code, pattern_t'(pack_pattern(x, y)));
    keep_list(x, y, k);
    foreach (k[i]) kept += k[i];
    for (int n = 0; n < npairs; n++) begin
      bit a = 1'($urandom), b = 1'($urandom);
      if (k[(2*n) % (2*p)])     exp.push_back(a);
      if (k[(2*n+1) % (2*p)])   exp.push_back(b);
      @(negedge clk);
      in_valid = 1; u0 = a; u1 = b;
      @(negedge clk);
      in_valid = 0;
      if (!full_rate) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    check(!overflow, $sformatf("rate %0d: unexpected overflow", code));
    // the count follows from the rate: npairs * (P+1) / (2P) output pairs
    check(got.size() == 2 * (npairs * kept / (2 * p)),
          $sformatf("rate %0d: %0d symbols out, expected %0d", code, got.size(),
                    2 * (npairs * kept / (2 * p))));
    check(kept == p + 1 || code == USER_CODE,
          $sformatf("rate %0d: pattern keeps %0d of %0d", code, kept, 2 * p));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("rate %0d: symbol %0d is %0b, expected %0b",
                                        code, i, got[i], exp[i]));
  endtask

  initial begin
    string x, y;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // every table rate at full input rate, then with gaps and back-pressure
    for (int c = 0; c < NUM_RATES; c++) begin
      rows(RATE_CODE[c], x, y);
      ready_pct = 100;
      run(RATE_CODE[c], x, y, 2 * x.len() * 8, 1);
      ready_pct = 60;
      run(RATE_CODE[c], x, y, 2 * x.len() * 6, 0);
    end
    // a user pattern (period 5, keeps 7 of 10: rate 5/7)
    ready_pct = 100;
    run(USER_CODE, "11010", "10111", 40, 1);
    ready_pct = 70;
    run(USER_CODE, "11010", "10111", 60, 0);

    // overflow: output stalled, memory of 32 symbols fills up
    configure(RATE_1_2, '0);
    ready_pct = 0;
    repeat (20) begin
      @(negedge clk); in_valid = 1; u0 = 1; u1 = 0;
      @(negedge clk); in_valid = 0;
    end
    check(overflow, "overflow not flagged with stalled output");
    configure(RATE_3_4, '0);
    check(!overflow, "write did not clear overflow");
    ready_pct = 100;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
