// tb_h1_interp -- first interpolation/rotation stage.
// Part 1: random complex samples, one every 3 output cycles, compared sample
// by sample with a direct-form model (zero-stuff by 3, convolve with
// 3*h(i)*exp(j 2 pi 3 i / 9), round, clip), which also fixes the latency of
// one output period. Part 2: a constant (DC) input must come out as a
// complex tone rotating by 1/3 turn per output sample, i.e. the stage shifts
// the spectrum by a third of its output rate.
module tb_h1_interp;
  import upconv_pkg::*;
  import upconv_ref_pkg::*;

  localparam int NIN = 600;

  logic clk = 1'b0, rst_n = 1'b0, ce_in = 1'b0, ce_out = 1'b0;
  cplx_t x_in = '0, y_out;
  logic  sat;
  int checks = 0, failures = 0, n_sat = 0;
  int xr [NIN], xi [NIN];

  h1_interp dut (.*);

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

  function automatic int yref(input int t, input bit im);
    longint acc;
    acc = 0;
    for (int k = 0; k < 12; k++)
      if (!im) acc += longint'(g_re(3, k)) * xu(t - k, 0) - longint'(g_im(3, k)) * xu(t - k, 1);
      else     acc += longint'(g_im(3, k)) * xu(t - k, 0) + longint'(g_re(3, k)) * xu(t - k, 1);
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
      end else begin               // constant input
        xr[n] = 200;
        xi[n] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NIN * 3 + 12; s++) begin
      @(negedge clk);
      if (s >= 2) begin
        checks += 2;
        if (int'(y_out.re) != yref(s - 2, 0) || int'(y_out.im) != yref(s - 2, 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL out %0d: got %0d,%0d expected %0d,%0d", s - 2,
                     y_out.re, y_out.im, yref(s - 2, 0), yref(s - 2, 1));
        end
        // DC in -> 200 * exp(j 2 pi t / 3) out (within the branch gain spread)
        if (s - 2 >= 3 * 405 && s - 2 < 3 * NIN) begin
          real er, ei;
          er = 200.0 * $cos(2.0 * M_PI * real'(s - 2) / 3.0);
          ei = 200.0 * $sin(2.0 * M_PI * real'(s - 2) / 3.0);
          checks++;
          if ((real'(y_out.re) - er) ** 2 + (real'(y_out.im) - ei) ** 2 > 36.0) begin
            failures++;
            $display("FAIL tone %0d: got %0d,%0d expected %.1f,%.1f", s - 2, y_out.re, y_out.im, er, ei);
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
