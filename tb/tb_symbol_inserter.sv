// tb_symbol_inserter: depuncturing for rate 1/2, all ten punctured rates and
// a user pattern.  A random rate-1/2 soft-symbol stream is punctured by the
// reference pattern, sent as (I,Q) pairs, and the output (C1,C2) pairs must
// equal the original stream with the dummy value (3'b100) at every deleted
// position.  Also checked: exactly P output pairs per pattern period;
// output pairs never closer than two clocks (one symbol per
// clock); overflow when the input outruns the memory, cleared by `start`.
module tb_symbol_inserter;
  import pcc_pkg::*;
  import tb_ref_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     start = 0;
  rate_t    rate = RATE_1_2;
  pattern_t pattern = '0;
  logic     in_valid = 0;
  soft_t    sym_i = '0, sym_q = '0;
  logic     out_valid;
  soft_t    c1, c2;
  logic     overflow;

  int checks = 0, failures = 0;
  int got [$];
  int last_out = -10, cyc = 0;

  symbol_inserter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      got.push_back(int'(c1));
      got.push_back(int'(c2));
      check(cyc - last_out >= 2, "output pairs closer than two clocks");
      last_out = cyc;
    end
  end

  task automatic configure(int code, pattern_t user);
    @(negedge clk);
    start = 1; rate = rate_t'(code); pattern = user;
    @(negedge clk);
    start = 0;
    got.delete();
  endtask

  task automatic run(int code, string x, string y, int periods, int gap);
    bit k [$];
    int full [$], sent [$];
    int p = x.len();
    configure(code, pattern_t'(pack_pattern(x, y)));
    keep_list(x, y, k);
    for (int n = 0; n < periods * 2 * p; n++) begin
      int v = $urandom_range(0, 7);
      if (k[n % (2 * p)]) begin
        sent.push_back(v);
        full.push_back(v);
      end else begin
        full.push_back(4);   // dummy: 3'b100
      end
    end
    for (int i = 0; i + 1 < sent.size(); i += 2) begin
      @(negedge clk);
      in_valid = 1; sym_i = soft_t'(sent[i]); sym_q = soft_t'(sent[i+1]);
      @(negedge clk);
      in_valid = 0;
      repeat (gap + $urandom_range(0, 2)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    check(!overflow, $sformatf("rate %0d: unexpected overflow", code));
    check(got.size() == full.size(),
          $sformatf("rate %0d: %0d symbols out, expected %0d", code, got.size(), full.size()));
    for (int i = 0; i < full.size() && i < got.size(); i++)
      check(got[i] == full[i], $sformatf("rate %0d: symbol %0d is %0d, expected %0d",
                                         code, i, got[i], full[i]));
  endtask

  initial begin
    string x, y;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_RATES; c++) begin
      rows(RATE_CODE[c], x, y);
      // an even number of periods keeps the received symbol count even;
      // a gap of 3 clocks lets 4 positions be produced per received pair
      run(RATE_CODE[c], x, y, 6, 3);
    end
    run(USER_CODE, "11010", "10111", 8, 3);
    run(USER_CODE, "01", "11", 10, 3);

    // overflow: pairs every clock into a 32-entry memory at rate 1/2
    configure(RATE_1_2, '0);
    repeat (40) begin
      @(negedge clk); in_valid = 1; sym_i = 3'd7; sym_q = 3'd0;
    end
    @(negedge clk); in_valid = 0;
    check(overflow, "overflow not flagged");
    configure(RATE_2_3, '0);
    check(!overflow, "start did not clear overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
