// tb_upconv_top -- end-to-end test of the modulator at its default sizes.
//
// 1. Random QAM-16 symbols (12 Mbit/s: one 4-bit symbol per 36 master
//    cycles). Every dac_data sample is compared with a reference chain built
//    the direct way: Gray mapping, zero-stuff by 4 and RRC filter, zero-stuff
//    by 3 and filter with the 3/9-rotated prototype, zero-stuff by 3 and
//    filter with the 4/9-rotated prototype keeping the real part, then the
//    x/sin(x) filter, each followed by the same rounding and clipping. The
//    expected latency is 26 master cycles from the symbol edge.
// 2. Over the random section, the output spectrum: the power in the signal
//    band around 16 f_sym = 4/9 f_s must exceed the power in the alias bands
//    around 4, 8 and 12 f_sym by at least 40 dB.
// 3. A run of one constant symbol: the output must settle to a carrier at
//    4/9 f_s of the expected amplitude, 30 dB above any other bin.
// 4. Equivalence with the conventional mixer: the second-stage output is
//    compared with a floating-point model that interpolates the pulse shaper
//    output ninefold with G(z) = H(z) H(z^3) and then multiplies by the
//    carrier exp(j 2 pi 4 n / 9) and keeps the real part. Coefficient
//    rotation must give the same signal up to 10-bit rounding.
// 5. Mechanisms counted, each must occur: symbol hand-over at 1/36 of the
//    clock, every commutator position of every interpolator, the carrier
//    test, and the single-rate test bypass (all sections clocked every cycle).
module tb_upconv_top;
  import upconv_pkg::*;
  import upconv_ref_pkg::*;

  localparam int NS   = 320;              // symbols
  localparam int NCYC = 36 * NS;          // master cycles compared
  localparam int LAT  = 26;
  localparam int NCONST = 40;             // trailing constant symbols

  logic clk = 1'b0, rst_n = 1'b0, test_bypass = 1'b0;
  logic [3:0] sym_in = '0;
  logic       sym_take, sat_any;
  sample_t    dac_data;

  upconv_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int syms [NS];
  int li [NS], lq [NS];
  int ps_i [4 * NS], ps_q [4 * NS];
  int h1_r [12 * NS], h1_i [12 * NS];
  int h2 [36 * NS];
  int sc [36 * NS];
  int got [NCYC];
  int got_h2 [NCYC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gray_lvl(input int b);
    int g;
    g = 2 * ((b >> 1) & 1) + (((b >> 1) ^ b) & 1);
    return 2 * g - 3;
  endfunction

  // ----------------------------------------------------------- reference
  task automatic build_reference();
    for (int n = 0; n < NS; n++) begin
      li[n] = gray_lvl(syms[n] >> 2);
      lq[n] = gray_lvl(syms[n] & 3);
    end
    for (int t = 0; t < 4 * NS; t++) begin
      longint ai, aq;
      ai = 0; aq = 0;
      for (int k = 0; k < 36; k++)
        if (t - k >= 0 && (t - k) % 4 == 0) begin
          ai += longint'(c_ps(k)) * li[(t - k) / 4];
          aq += longint'(c_ps(k)) * lq[(t - k) / 4];
        end
      ps_i[t] = q10(ai, 3);
      ps_q[t] = q10(aq, 3);
    end
    for (int t = 0; t < 12 * NS; t++) begin
      longint ar, ai;
      ar = 0; ai = 0;
      for (int k = 0; k < 12; k++)
        if (t - k >= 0 && (t - k) % 3 == 0) begin
          ar += longint'(g_re(3, k)) * ps_i[(t - k) / 3] - longint'(g_im(3, k)) * ps_q[(t - k) / 3];
          ai += longint'(g_im(3, k)) * ps_i[(t - k) / 3] + longint'(g_re(3, k)) * ps_q[(t - k) / 3];
        end
      h1_r[t] = q10(ar, 9);
      h1_i[t] = q10(ai, 9);
    end
    for (int t = 0; t < 36 * NS; t++) begin
      longint a;
      a = 0;
      for (int k = 0; k < 12; k++)
        if (t - k >= 0 && (t - k) % 3 == 0)
          a += longint'(g_re(4, k)) * h1_r[(t - k) / 3] - longint'(g_im(4, k)) * h1_i[(t - k) / 3];
      h2[t] = q10(a, 9);
    end
    for (int t = 0; t < 36 * NS; t++)
      sc[t] = q10(longint'(-9 * h2[t] + 6 * (t >= 1 ? h2[t - 1] : 0) - 9 * (t >= 2 ? h2[t - 2] : 0)), 4);
  endtask

  // power of samples [n0, n0+len) in bins f = (k/len) f_s for f in [flo, fhi] (units of f_sym)
  function automatic real band_power(input int n0, input int len, input real flo, input real fhi);
    real p;
    p = 0.0;
    for (int k = 0; k < len / 2; k++) begin
      real f, re, im;
      f = 36.0 * real'(k) / real'(len);
      if (f >= flo && f <= fhi) begin
        re = 0.0; im = 0.0;
        for (int n = 0; n < len; n++) begin
          re += real'(got[n0 + n]) * $cos(2.0 * M_PI * real'(k) * real'(n) / real'(len));
          im += real'(got[n0 + n]) * $sin(2.0 * M_PI * real'(k) * real'(n) / real'(len));
        end
        p += re * re + im * im;
      end
    end
    return p;
  endfunction

  // ----------------------------------------------------------- mechanisms
  int n_take = 0, last_take = -1, n_bypass = 0, n_clip = 0, n_carrier = 0, n_mixeq = 0;
  int ph_ps [4], ph_h1 [3], ph_h2 [3];
  int cyc = -1;
  always @(posedge clk) if (rst_n && !test_bypass) begin
    cyc++;
    if (sym_take) begin
      n_take++;
      if (last_take >= 0) check(cyc - last_take == 36, "symbol period 36 cycles");
      last_take = cyc;
    end
    if (dut.ce_8fn)  ph_ps[dut.u_ps_i.ph]++;
    if (dut.ce_24fn) ph_h1[dut.u_h1.ph]++;
    ph_h2[dut.u_h2.ph]++;
    n_clip += int'(sat_any);
  end

  initial begin
    for (int n = 0; n < NS; n++) syms[n] = (n < NS - NCONST) ? int'($urandom_range(15)) : 4'b1010;
    build_reference();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      if (c % 36 == 0) sym_in = 4'(syms[c / 36]);
      @(negedge clk);
      got[c] = int'(dac_data);
      got_h2[c] = int'(dut.h2_out);
      // output after edge c holds sample c - LAT of the reference chain
      check(got[c] == ((c >= LAT) ? sc[c - LAT] : 0),
            $sformatf("dac_data after cycle %0d: %0d expected %0d", c, got[c],
                      (c >= LAT) ? sc[c - LAT] : 0));
    end

    // 2. alias suppression over the random section
    begin
      real ps, pa4, pa8, pa12;
      int n0, len;
      n0 = 36 * 20; len = 36 * 216;
      ps   = band_power(n0, len, 15.5, 16.5);
      pa4  = band_power(n0, len,  3.5,  4.5);
      pa8  = band_power(n0, len,  7.5,  8.5);
      pa12 = band_power(n0, len, 11.5, 12.5);
      $display("signal band vs alias bands at 4, 8, 12 f_sym: %.1f %.1f %.1f dB",
               10.0 * $log10(ps / pa4), 10.0 * $log10(ps / pa8), 10.0 * $log10(ps / pa12));
      check(ps > 1.0e4 * pa4 && ps > 1.0e4 * pa8 && ps > 1.0e4 * pa12, "alias suppression >= 40 dB");
    end

    // 3. constant symbol 1010 -> I = Q = +3: a carrier at 4/9 f_s. The four
    //    RRC branches have DC gains 1 % apart, so the settled output repeats
    //    exactly every 36 samples; bin 16 of that period must dominate.
    begin
      int c0, amp;
      real pk [19];
      c0 = 36 * (NS - NCONST) + LAT + 36 * 12;
      amp = 0;
      for (int c = c0; c < NCYC - 36; c++) begin
        check(got[c + 36] == got[c], "settled carrier repeats every 36 samples");
        if (got[c] > amp) amp = got[c];
      end
      for (int k = 0; k <= 18; k++) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < 36; n++) begin
          re += real'(got[c0 + n]) * $cos(2.0 * M_PI * real'(k * n) / 36.0);
          im += real'(got[c0 + n]) * $sin(2.0 * M_PI * real'(k * n) / 36.0);
        end
        pk[k] = re * re + im * im;
      end
      for (int k = 0; k <= 18; k++)
        if (k != 16) check(pk[16] > 1000.0 * pk[k], $sformatf("carrier bin 16 over bin %0d by 30 dB", k));
      // PS DC gain 3*~470/8 = 176 per branch, |1+j| = 1.414, x/sin(x) 1.43 at 4/9 f_s
      $display("carrier amplitude %0d", amp);
      check(amp > 330 && amp < 380, "carrier amplitude");
      n_carrier++;
    end

    // 4. rotated-coefficient filters against interpolate-then-mix
    begin
      real g [45];
      real err, sq, emax;
      int  n;
      for (int k = 0; k < 45; k++) begin
        g[k] = 0.0;
        for (int j = 0; j < 12; j++)
          if (k - 3 * j >= 0 && k - 3 * j < 12) g[k] += 9.0 * proto(j) * proto(k - 3 * j);
      end
      sq = 0.0; emax = 0.0; n = 0;
      for (int t = 36 * 4; t < 36 * (NS - NCONST); t++) begin
        real br, bi, y;
        br = 0.0; bi = 0.0;
        for (int k = 0; k < 45; k++)
          if ((t - k) % 9 == 0) begin
            br += g[k] * real'(ps_i[(t - k) / 9]);
            bi += g[k] * real'(ps_q[(t - k) / 9]);
          end
        y = br * $cos(2.0 * M_PI * 4.0 * real'(t) / 9.0) - bi * $sin(2.0 * M_PI * 4.0 * real'(t) / 9.0);
        // second-stage output after edge c holds sample c - 25
        err = real'(got_h2[t + 25]) - y;
        sq += err * err;
        if (err > emax) emax = err;
        if (-err > emax) emax = -err;
        n++;
      end
      $display("rotation vs mixer: rms error %.2f LSB, max %.2f LSB over %0d samples",
               $sqrt(sq / real'(n)), emax, n);
      check($sqrt(sq / real'(n)) < 2.0 && emax < 8.0, "coefficient rotation equals interpolate-then-mix");
      n_mixeq++;
    end

    // 5. single-rate test bypass
    test_bypass = 1'b1;
    begin
      int n_chg, prev;
      n_chg = 0; prev = int'(dac_data);
      for (int c = 0; c < 200; c++) begin
        sym_in = 4'($urandom_range(15));
        @(negedge clk);
        check(sym_take && dut.ce_8fn && dut.ce_24fn, "bypass clocks every section each cycle");
        n_chg += int'(int'(dac_data) != prev);
        prev = int'(dac_data);
        n_bypass++;
      end
      check(n_chg > 100, "data moves through every section at the master rate in bypass");
    end
    test_bypass = 1'b0;

    // mechanism counts
    $display("symbols taken %0d, clipped samples %0d, bypass cycles %0d", n_take, n_clip, n_bypass);
    $display("commutator use: PS %0d %0d %0d %0d, H1 %0d %0d %0d, H2 %0d %0d %0d",
             ph_ps[0], ph_ps[1], ph_ps[2], ph_ps[3], ph_h1[0], ph_h1[1], ph_h1[2],
             ph_h2[0], ph_h2[1], ph_h2[2]);
    check(n_take == NS, "one symbol taken per 36 cycles");
    for (int p = 0; p < 4; p++) check(ph_ps[p] >= NS - 1 && ph_ps[p] <= NS + 1, "pulse shaper phase used once per symbol");
    for (int p = 0; p < 3; p++) check(ph_h1[p] >= 4 * NS - 1 && ph_h1[p] <= 4 * NS + 1, "H1 phase used once per 8f_N sample");
    for (int p = 0; p < 3; p++) check(ph_h2[p] >= 12 * NS - 1 && ph_h2[p] <= 12 * NS + 1, "H2 phase used once per 24f_N sample");
    check(n_carrier > 0, "carrier test ran");
    check(n_mixeq > 0, "mixer equivalence test ran");
    check(n_bypass > 0, "bypass exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
