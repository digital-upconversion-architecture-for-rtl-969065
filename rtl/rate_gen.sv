// rate_gen -- clock generation for the multirate modulator.
//
// The whole circuit runs from one master clock at f_s = 72 f_N = 108 MHz.
// Instead of separate divided clocks, this block issues one-cycle clock
// enables for the slower sections: ce_24fn every 3rd cycle (second
// interpolation stage input rate), ce_8fn every 9th cycle (pulse shaper
// output and first interpolation stage input rate) and ce_sym every 36th
// cycle (symbol rate 2 f_N). A modulo-SYM_DIV counter is the only state; all
// three enables are high together in the cycle where the counter is 0, so the
// slower rates are always aligned with the faster ones.
//
// bypass = 1 is the test mode in which the multirate circuit is clocked single
// rate: every enable is held high, so every register in every section is
// clocked at the master rate (for scan observation). Dividing the rates by
// enables rather than by gated clocks is a choice of this implementation.
//
// Timing: enables are registered outputs; after reset the first ce_* pulse
// comes in the first cycle after rst_n is released.
module rate_gen #(
  parameter int SYM_DIV = upconv_pkg::SYM_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bypass,
  output logic ce_sym,
  output logic ce_8fn,
  output logic ce_24fn
);
  localparam int CNT_W = $clog2(SYM_DIV);
  localparam int D8    = SYM_DIV / 4;     // 8 f_N = 4 f_sym
  localparam int D24   = SYM_DIV / 12;    // 24 f_N = 12 f_sym

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CNT_W'(SYM_DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  always_comb begin
    ce_sym  = bypass || (cnt == '0);
    ce_8fn  = bypass || (int'(cnt) % D8 == 0);
    ce_24fn = bypass || (int'(cnt) % D24 == 0);
  end

  initial begin
    assert (SYM_DIV % 12 == 0) else $error("SYM_DIV must be a multiple of 12");
  end
endmodule
