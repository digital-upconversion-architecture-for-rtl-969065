// tb_rate_gen -- checks the rate enables: ce_24fn every 3rd, ce_8fn every
// 9th and ce_sym every 36th master cycle, all high together on the symbol
// cycle, all held high in bypass (single-rate) mode, and the multirate
// pattern resuming after bypass.
module tb_rate_gen;
  logic clk = 1'b0, rst_n = 1'b0, bypass = 1'b0;
  logic ce_sym, ce_8fn, ce_24fn;
  int checks = 0, failures = 0;

  rate_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sym, n_8, n_24, last_sym, n_low;
    n_sym = 0; n_8 = 0; n_24 = 0; last_sym = -1; n_low = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;   // cycle 0: counter at 0
    for (int c = 0; c < 36 * 10; c++) begin
      if (c > 0) @(negedge clk);
      check(ce_24fn == (c % 3 == 0), "ce_24fn pattern");
      check(ce_8fn  == (c % 9 == 0), "ce_8fn pattern");
      check(ce_sym  == (c % 36 == 0), "ce_sym pattern");
      if (ce_sym) begin
        check(ce_8fn && ce_24fn, "ce_sym aligned with slower enables");
        if (last_sym >= 0) check(c - last_sym == 36, "symbol period 36");
        last_sym = c;
      end
      n_sym += int'(ce_sym); n_8 += int'(ce_8fn); n_24 += int'(ce_24fn);
    end
    check(n_sym == 10 && n_8 == 40 && n_24 == 120, "enable counts 10/40/120 in 360 cycles");
    // single-rate test mode
    bypass = 1'b1;
    for (int c = 0; c < 50; c++) begin
      @(negedge clk);
      check(ce_sym && ce_8fn && ce_24fn, "bypass holds all enables high");
    end
    bypass = 1'b0;
    repeat (9) begin
      @(negedge clk);
      n_low += int'(!ce_24fn);
    end
    check(n_low == 6, "multirate enables resume after bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
