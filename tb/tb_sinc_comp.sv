// tb_sinc_comp -- x/sin(x) correction filter.
// Part 1: random samples every cycle compared with
// y(n) = clip(round((-9 x(n) + 6 x(n-1) - 9 x(n-2)) / 16)), output one cycle
// after the input. Part 2: a carrier at 4/9 of the sample rate must come out
// amplified by 6/16 - 18/16 cos(8 pi / 9) = 1.432, within 1 % of the inverse
// sample-and-hold droop 1/sinc(4/9) = 1.418.
module tb_sinc_comp;
  import upconv_pkg::*;
  import upconv_ref_pkg::*;

  localparam int N = 2000;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sample_t x_in = '0, y_out;
  logic    sat;
  int checks = 0, failures = 0, n_sat = 0;
  int x [N];

  sinc_comp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) n_sat += int'(sat);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xs(input int n);
    return (n < 0 || n >= N) ? 0 : x[n];
  endfunction

  function automatic int yref(input int n);
    return q10(longint'(-9 * xs(n) + 6 * xs(n - 1) - 9 * xs(n - 2)), 4);
  endfunction

  initial begin
    real peak;
    peak = 0.0;
    for (int n = 0; n < N; n++) begin
      if (n < 1000)      x[n] = $urandom_range(1023) - 512;
      else               x[n] = rnd(300.0 * $cos(2.0 * M_PI * 4.0 * real'(n) / 9.0));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N + 3; s++) begin
      @(negedge clk);
      if (s >= 1) begin
        checks++;
        if (int'(y_out) != yref(s - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: got %0d expected %0d", s - 1, y_out, yref(s - 1));
        end
        if (s - 1 >= 1010 && s - 1 < N && real'(y_out) > peak) peak = real'(y_out);
      end
      ce   = 1'b1;
      x_in = 10'(xs(s));
    end
    checks++;
    if (peak < 0.99 * 1.418 * 300.0 || peak > 1.01 * 1.432 * 300.0 + 2.0) begin
      failures++;
      $display("FAIL carrier gain %.3f", peak / 300.0);
    end
    $display("carrier gain %.3f, clipped samples %0d", peak / 300.0, n_sat);
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
