// tb_pcc_top: end-to-end test of the codec at its default sizes.
//
// Each run mirrors a link: source data (the repeating AAh byte or
// pseudo-random bits) -> transmitter -> QPSK soft-decision mapping with an
// optional channel (weakened or flipped symbols, or a 180-degree phase
// rotation that inverts every symbol) -> receiver depuncturing -> a
// reference software Viterbi decoder standing in for the external core ->
// differential decoder -> comparison with the source data.
//
// Runs: every rate noise-free with AAh data and with random data; a user
// pattern (the 7/8 table pattern, loaded through the pattern port);
// rates 1/2, 2/3, 3/4, 4/5 with sparse channel errors; rates 2/3, 3/4, 4/5
// on a Gaussian channel at Eb/N0 = 6 dB (decoded errors must be well below
// the channel's hard-decision errors); a phase-inverted link.
// Mechanisms counted, each must occur: symbols deleted, dummies inserted,
// user pattern used, channel errors corrected, phase inversion resolved,
// coding gain on the Gaussian channel.
// The last 48 bits of a run are not compared (no tail bits are sent, so the
// decoder's final decisions are not settled).
module tb_pcc_top;
  import pcc_pkg::*;
  import tb_ref_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     enc_write = 0, dec_start = 0;
  rate_t    enc_rate = RATE_1_2, dec_rate = RATE_1_2;
  pattern_t enc_pattern = '0, dec_pattern = '0;
  logic     data_valid = 0, data_in = 0;
  logic     tx_valid, tx_ready, tx_sym1, tx_sym2, enc_overflow;
  logic     rx_valid = 0;
  soft_t    rx_i = '0, rx_q = '0;
  logic     dec_overflow;
  logic     vit_valid;
  soft_t    vit_c1, vit_c2;
  logic     vit_bit_valid = 0, vit_bit = 0;
  logic     dec_valid, dec_data;

  int checks = 0, failures = 0;
  int n_deleted = 0, n_dummies = 0, n_user = 0, n_corrected = 0, n_inverted = 0, n_gain = 0;

  bit tx [$];
  int v0 [$], v1 [$];
  bit dq [$];

  assign tx_ready = 1'b1;

  pcc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin tx.push_back(tx_sym1); tx.push_back(tx_sym2); end
    if (vit_valid) begin v0.push_back(int'(vit_c1)); v1.push_back(int'(vit_c2)); end
    if (dec_valid) dq.push_back(dec_data);
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Gaussian sample (Box-Muller) from two uniform draws.
  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    real u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // noise: 0 none; n > 0 about one symbol in n is moved to the wrong side
  // (weakly); n < 0 additive white Gaussian noise at Eb/N0 = -n/10 dB, BPSK
  // amplitude +-1 per symbol, quantised to 3 bits with steps of 0.5.
  task automatic link(int code, string x, string y, bit aah, int nbits, int noise,
                      bit invert);
    bit d [$], dec [$], k [$];
    int rx [$];
    int chan_err = 0, bit_err = 0, p = x.len(), kept = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    enc_write = 1; dec_start = 1;
    enc_rate = rate_t'(code); dec_rate = rate_t'(code);
    enc_pattern = pattern_t'(pack_pattern(x, y)); dec_pattern = enc_pattern;
    @(negedge clk); enc_write = 0; dec_start = 0;
    tx.delete(); v0.delete(); v1.delete(); dq.delete();
    keep_list(x, y, k);
    foreach (k[i]) kept += k[i];

    for (int i = 0; i < nbits; i++) d.push_back(aah ? ((i % 2) == 0) : 1'($urandom));
    // transmitter, one data bit every second clock
    foreach (d[i]) begin
      @(negedge clk); data_valid = 1; data_in = d[i];
      @(negedge clk); data_valid = 0;
    end
    repeat (40) @(negedge clk);
    check(tx.size() == nbits * kept / p, $sformatf("rate %0d: %0d channel symbols, expected %0d",
                                                    code, tx.size(), nbits * kept / p));
    if (tx.size() < 2 * nbits) n_deleted++;

    // modulator, channel, soft-decision demodulator
    foreach (tx[i]) begin
      int s = tx[i] ? 7 : 0;
      if (noise < 0) begin
        real ebn0 = 10.0 ** (real'(-noise) / 100.0);
        real rate = real'(nbits) / real'(tx.size());
        real sigma = $sqrt(1.0 / (2.0 * rate * ebn0));
        real r = (tx[i] ? 1.0 : -1.0) + sigma * gauss();
        int q = $floor(r / 0.5) + 4;
        s = (q < 0) ? 0 : (q > 7) ? 7 : q;
        if ((s >= 4) != tx[i]) chan_err++;
      end else if (noise != 0 && $urandom_range(1, noise) == 1) begin
        s = tx[i] ? $urandom_range(1, 3) : $urandom_range(4, 6);   // wrong side, weak
        chan_err++;
      end
      if (invert) s = 7 - s;
      rx.push_back(s);
    end
    // receiver, one received pair every fourth clock
    for (int i = 0; i + 1 < rx.size(); i += 2) begin
      @(negedge clk); rx_valid = 1; rx_i = soft_t'(rx[i]); rx_q = soft_t'(rx[i+1]);
      @(negedge clk); rx_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(!enc_overflow && !dec_overflow, $sformatf("rate %0d: overflow", code));
    check(v0.size() == nbits, $sformatf("rate %0d: %0d depunctured pairs, expected %0d",
                                        code, v0.size(), nbits));
    foreach (v0[i])
      if ((!k[(2 * i) % (2 * p)] && v0[i] == 4) || (!k[(2 * i + 1) % (2 * p)] && v1[i] == 4)) begin
        n_dummies++;
        break;
      end

    // external Viterbi core (reference model), then the differential decoder
    viterbi_ref(v0, v1, dec);
    foreach (dec[i]) begin
      @(negedge clk); vit_bit_valid = 1; vit_bit = dec[i];
      @(negedge clk); vit_bit_valid = 0;
    end
    repeat (4) @(negedge clk);
    check(dq.size() == nbits, $sformatf("rate %0d: %0d decoded bits", code, dq.size()));
    for (int i = 1; i < nbits - 48 && i < dq.size(); i++) if (dq[i] != d[i]) bit_err++;
    if (noise >= 0)
      check(bit_err == 0, $sformatf("rate %0d aah=%0b noise=%0d inv=%0b: %0d bit errors",
                                    code, aah, noise, invert, bit_err));
    else begin
      // coding gain: fewer decoded bit errors than hard channel errors
      check(bit_err * 4 < chan_err, $sformatf("rate %0d at %0d.%0d dB: %0d bit errors, %0d channel errors",
                                              code, -noise / 10, -noise % 10, bit_err, chan_err));
      if (chan_err > 0 && bit_err * 4 < chan_err) n_gain++;
    end
    if (bit_err == 0 && chan_err > 0) n_corrected++;
    if (bit_err == 0 && invert) n_inverted++;
    if (code == USER_CODE && bit_err == 0) n_user++;
    $display("rate code %0d aah=%0b noise=%0d inv=%0b: %0d bits, %0d channel symbols, %0d channel errors, %0d bit errors",
             code, aah, noise, invert, nbits, tx.size(), chan_err, bit_err);
  endtask

  initial begin
    string x, y;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NUM_RATES; c++) begin
      rows(RATE_CODE[c], x, y);
      link(RATE_CODE[c], x, y, 1, 2 * x.len() * 12, 0, 0);
      link(RATE_CODE[c], x, y, 0, 2 * x.len() * 12, 0, 0);
    end
    // user-programmed pattern: the 7/8 pattern entered through the pattern port
    link(USER_CODE, "1010001", "0101111", 0, 14 * 20, 0, 0);
    // channel errors, rates 1/2 .. 4/5
    for (int c = 0; c < 4; c++) begin
      rows(RATE_CODE[c], x, y);
      link(RATE_CODE[c], x, y, 0, 2 * x.len() * 60, 40, 0);
    end
    // Gaussian channel at Eb/N0 = 6 dB, rates 2/3, 3/4, 4/5
    for (int c = 1; c < 4; c++) begin
      rows(RATE_CODE[c], x, y);
      link(RATE_CODE[c], x, y, 0, 2 * x.len() * 1000, -60, 0);
    end
    // 180-degree phase rotation of the whole link
    rows(RATE_CODE[2], x, y);
    link(RATE_CODE[2], x, y, 0, 240, 0, 1);

    check(n_deleted > 0,   "no run deleted symbols");
    check(n_dummies > 0,   "no run inserted dummy symbols");
    check(n_user > 0,      "user pattern never decoded");
    check(n_corrected > 0, "no channel error was corrected");
    check(n_inverted > 0,  "phase inversion never resolved");
    check(n_gain > 0,      "no coding gain seen on the Gaussian channel");
    $display("mechanisms: deleted=%0d dummies=%0d user=%0d corrected=%0d inverted=%0d gain=%0d",
             n_deleted, n_dummies, n_user, n_corrected, n_inverted, n_gain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
