// tb_h2_interp -- second interpolation/rotation stage with real output.
// Part 1: random complex samples, one every 3 output cycles, compared sample
// by sample with a direct-form model (zero-stuff by 3, convolve with
// 3*h(i)*exp(j 2 pi 4 i / 9), keep the real part, round, clip); this also
// fixes the latency of one output period. Part 2: the input is the kind of
// signal the first stage delivers for a constant baseband value, a complex
// tone turning 1/3 per input sample; the output must then be the real carrier
// 200*cos(2 pi 4 t / 9), i.e. sit at 4/9 of the output rate and repeat every
// 9 samples.
module tb_h2_interp;
  import upconv_pkg::*;
  import upconv_ref_pkg::*;

  localparam int NIN = 600;

  logic clk = 1'b0, rst_n = 1'b0, ce_in = 1'b0, ce_out = 1'b0;
  cplx_t   x_in = '0;
  sample_t y_out;
  logic    sat;
  int checks = 0, failures = 0, n_sat = 0;
  int xr [NIN], xi [NIN];

  h2_interp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) n_sat += int'(sat);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xu(input int u, input bit im);
    if (u < 0 || u % 3 != 0 || u / 3 >= NIN) return 0;
    return im ? xi[u / 3] : xr[u / 3];
  endfunction

  function automatic int yref(input int t);
    longint acc;
    acc = 0;
    for (int k = 0; k < 12; k++)
      acc += longint'(g_re(4, k)) * xu(t - k, 0) - longint'(g_im(4, k)) * xu(t - k, 1);
    return q10(acc, 9);
  endfunction

  initial begin
    for (int n = 0; n < NIN; n++) begin
      if (n < 300) begin
        xr[n] = $urandom_range(600) - 300;
        xi[n] = $urandom_range(600) - 300;
      end else if (n < 400) begin  // full scale: exercises clipping
        xr[n] = $urandom_range(1023) - 512;
        xi[n] = $urandom_range(1023) - 512;
      end else begin               // tone at 1/3 of the input rate
        xr[n] = rnd(200.0 * $cos(2.0 * M_PI * real'(n) / 3.0));
        xi[n] = rnd(200.0 * $sin(2.0 * M_PI * real'(n) / 3.0));
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NIN * 3 + 12; s++) begin
      @(negedge clk);
      if (s >= 2) begin
        checks++;
        if (int'(y_out) != yref(s - 2)) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: got %0d expected %0d", s - 2, y_out, yref(s - 2));
        end
        if (s - 2 >= 3 * 405 && s - 2 < 3 * NIN) begin
          real e;
          e = 200.0 * $cos(2.0 * M_PI * 4.0 * real'(s - 2) / 9.0);
          checks++;
          if ((real'(y_out) - e) ** 2 > 36.0) begin
            failures++;
            $display("FAIL carrier %0d: got %0d expected %.1f", s - 2, y_out, e);
          end
        end
      end
      ce_out = 1'b1;
      ce_in  = (s % 3 == 0);
      x_in.re = 10'(xu(s, 0));
      x_in.im = 10'(xu(s, 1));
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL clipping never exercised");
    end
    $display("clipped samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
