// tb_ref_pkg: reference models used by the testbenches.
//
// They are written independently of the RTL: puncturing patterns are kept
// as the printed row strings, the convolutional code as explicit tap lists,
// and a plain software Viterbi decoder stands in for the external decoder
// core in the end-to-end test.
package tb_ref_pkg;

  // Rate codes (same numbering as the RTL rate_t).
  localparam int NUM_RATES = 11;
  localparam int RATE_CODE [NUM_RATES] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10};
  localparam int USER_CODE = 15;

  // Pattern rows for each rate, left to right in time: X feeds U0, Y feeds U1.
  function automatic void rows(int code, output string x, output string y);
    case (code)
      0:  begin x = "1";       y = "1";       end
      1:  begin x = "10";      y = "11";      end
      2:  begin x = "101";     y = "011";     end
      3:  begin x = "1000";    y = "1111";    end
      4:  begin x = "10101";   y = "01011";   end
      5:  begin x = "101001";  y = "010111";  end
      6:  begin x = "1010001"; y = "0101111"; end
      7:  begin x = "11101011111";      y = "10010100000";      end
      8:  begin x = "100010101011";     y = "111101010100";     end
      9:  begin x = "110100101001111";  y = "101011010110000";  end
      default: begin x = "1011001110100100"; y = "1100110001011011"; end
    endcase
  endfunction

  // Keep flags over the 2P symbol positions of one period, transmit order.
  function automatic void keep_list(string x, string y, ref bit k[$]);
    k.delete();
    for (int t = 0; t < x.len(); t++) begin
      k.push_back(x[t] == "1");
      k.push_back(y[t] == "1");
    end
  endfunction

  // Packed keep mask (bit i = position i) and period, as the RTL pattern port.
  function automatic logic [36:0] pack_pattern(string x, string y);
    logic [31:0] m = '0;
    for (int t = 0; t < x.len(); t++) begin
      m[2*t]   = (x[t] == "1");
      m[2*t+1] = (y[t] == "1");
    end
    return {5'(x.len()), m};
  endfunction

  // K=7 encoder from tap lists (stage 1 = newest bit).
  // U0 taps: stages 1,4,5,6,7.   U1 taps: stages 1,2,4,5,7.
  function automatic void conv_ref(bit d[$], ref bit u0[$], ref bit u1[$]);
    bit h[7];
    u0.delete(); u1.delete();
    foreach (h[i]) h[i] = 0;
    foreach (d[n]) begin
      for (int i = 6; i > 0; i--) h[i] = h[i-1];
      h[0] = d[n];
      u0.push_back(h[0] ^ h[3] ^ h[4] ^ h[5] ^ h[6]);
      u1.push_back(h[0] ^ h[1] ^ h[3] ^ h[4] ^ h[6]);
    end
  endfunction

  // b_k = a_k xor b_(k-1), starting from 0.
  function automatic void diff_ref(bit a[$], ref bit b[$]);
    bit p = 0;
    b.delete();
    foreach (a[n]) begin
      p = a[n] ^ p;
      b.push_back(p);
    end
  endfunction

  // Branch metric of soft value s (0..7) against expected bit b.  The two
  // weakest values 3 and 4 carry no information (cost 3 either way), so a
  // dummy inserted by the depuncturer does not bias the decision.
  function automatic int unsigned bm(int s, bit b);
    int lvl = (s >= 4) ? s - 4 : s - 3;     // -3 .. 0, 0 .. 3
    return b ? 32'(3 - lvl) : 32'(3 + lvl);
  endfunction

  // Soft-decision Viterbi decoder for the code above, full-length traceback,
  // any starting state.  Soft symbols are 0 (strong '0') .. 7
  // (strong '1').
  function automatic void viterbi_ref(int s0[$], int s1[$], ref bit out[$]);
    int unsigned pm [64];
    int unsigned npm [64];
    bit [63:0] surv [$];
    bit [63:0] sv;
    int n = s0.size();
    int best;
    out.delete();
    foreach (pm[s]) pm[s] = 0;   // starting state unknown (e.g. inverted link)
    for (int k = 0; k < n; k++) begin
      foreach (npm[s]) npm[s] = 32'hFFFF_FFFF;
      sv = '0;
      for (int s = 0; s < 64; s++) begin
        for (int d = 0; d < 2; d++) begin
          // state bit 5 = newest previous bit (stage 2) ... bit 0 = stage 7
          bit st2 = s[5], st3 = s[4], st4 = s[3], st5 = s[2], st6 = s[1], st7 = s[0];
          bit e0 = d[0] ^ st4 ^ st5 ^ st6 ^ st7;
          bit e1 = d[0] ^ st2 ^ st4 ^ st5 ^ st7;
          int ns = (d << 5) | (s >> 1);
          int unsigned m = pm[s] + bm(s0[k], e0) + bm(s1[k], e1);
          if (m < npm[ns]) begin
            npm[ns] = m;
            sv[ns]  = s[0];
          end
        end
      end
      pm = npm;
      surv.push_back(sv);
    end
    best = 0;
    for (int s = 1; s < 64; s++) if (pm[s] < pm[best]) best = s;
    for (int k = n - 1; k >= 0; k--) begin
      out.push_front(best[5]);
      best = ((best << 1) & 63) | int'(surv[k][best]);
    end
  endfunction

endpackage
