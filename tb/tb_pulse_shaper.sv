// tb_pulse_shaper -- drives random QAM-16 levels into one pulse shaper,
// one symbol every 4 output cycles, and compares every output sample with a
// direct-form model: zero-stuff by 4, convolve with the 33-tap root raised
// cosine, divide by 8 with rounding, clip. Checks the 4-samples-per-symbol
// rate and the one-output-period latency through the sample alignment.
module tb_pulse_shaper;
  import upconv_pkg::*;
  import upconv_ref_pkg::*;

  localparam int NSYM = 400;
  localparam int L    = 4;

  logic clk = 1'b0, rst_n = 1'b0, ce_in = 1'b0, ce_out = 1'b0;
  logic signed [2:0] x_in = '0;
  sample_t y_out;
  logic sat;
  int checks = 0, failures = 0;
  int x [NSYM];

  pulse_shaper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xup(input int u);
    if (u < 0 || u % L != 0 || u / L >= NSYM) return 0;
    return x[u / L];
  endfunction

  function automatic int yref(input int t);
    longint acc;
    acc = 0;
    for (int k = 0; k < 36; k++) acc += longint'(c_ps(k)) * xup(t - k);
    return q10(acc, 3);
  endfunction

  initial begin
    int lv [4];
    int n_out;
    lv = '{-3, -1, 1, 3};
    // an isolated +3 symbol first (impulse response), then random symbols
    for (int n = 0; n < NSYM; n++) x[n] = (n == 0) ? 3 : (n < 10 ? 0 : lv[$urandom_range(3)]);
    n_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSYM * L + 40; s++) begin
      @(negedge clk);
      if (s >= 2) begin
        checks++;
        if (int'(y_out) != yref(s - 2)) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: got %0d expected %0d", s - 2, y_out, yref(s - 2));
        end
      end
      ce_out = 1'b1;
      n_out++;
      ce_in  = (s % L == 0);
      x_in   = 3'(xup(s));
    end
    // pulse peak: output sample 16 is the centre tap of the +3 pulse, 3*511/8
    checks++;
    if (yref(16) != 192) begin
      failures++;
      $display("FAIL reference peak %0d", yref(16));
    end
    checks++;
    if (n_out != (NSYM * L + 40)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
