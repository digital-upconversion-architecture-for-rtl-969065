// upconv_top -- digital QAM-16 modulator with combined interpolation and
// upconversion to a 48 MHz IF, clocked at f_s = 108 MHz.
//
// Data path (one branch per line, rates in units of f_N = 1.5 MHz):
//
//   sym_in -> qam16_mapper -> pulse_shaper (I) --\            2 f_N -> 8 f_N
//                          -> pulse_shaper (Q) --+-> h1_interp  8 f_N -> 24 f_N, complex
//                                                    -> h2_interp 24 f_N -> 72 f_N, real
//                                                    -> sinc_comp 72 f_N -> dac_data
//
// The two interpolation stages each raise the rate threefold with the same
// 12-tap prototype, but their coefficients are rotated (by 3/9 and 4/9 of a
// turn per tap). Since the carrier 4/9 f_s is a whole multiple of the
// baseband sample rate f_s/9, the rotation moves the interpolated spectrum
// from DC to 4/9 f_s and no separate oscillator or mixer is needed; the
// second stage keeps only the real part. The x/sin(x) filter is the only
// section working on every master cycle.
//
// Clocking: one master clock; rate_gen issues enables at f_sym, 8 f_N and
// 24 f_N. test_bypass = 1 clocks every section at the master rate (scan-test
// mode); the sample stream is then not a valid modulation.
//
// Interface: sym_in is taken on every cycle where sym_take is 1 (one in 36);
// dac_data is a new two's complement sample on every cycle. Latency: a
// symbol taken at cycle 0 first affects dac_data after the edge of cycle 26
// (1 output period in each of pulse shaper, H1 and H2, the hand-over
// registers between sections, and the x/sin(x) register).
// sat_any reports clipping in any section (one cycle pulse).
module upconv_top
  import upconv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test_bypass,
  input  logic [3:0] sym_in,
  output logic       sym_take,
  output sample_t    dac_data,
  output logic       sat_any
);
  logic ce_sym, ce_8fn, ce_24fn;
  logic signed [LVL_W-1:0] i_lvl, q_lvl;
  cplx_t   ps_out, h1_out;
  sample_t h2_out;
  logic    sat_psi, sat_psq, sat_h1, sat_h2, sat_sc;

  rate_gen u_rate (
    .clk, .rst_n, .bypass(test_bypass),
    .ce_sym, .ce_8fn, .ce_24fn
  );

  assign sym_take = ce_sym;

  qam16_mapper u_map (.sym(sym_in), .i_lvl, .q_lvl);

  pulse_shaper u_ps_i (
    .clk, .rst_n, .ce_in(ce_sym), .ce_out(ce_8fn),
    .x_in(i_lvl), .y_out(ps_out.re), .sat(sat_psi)
  );

  pulse_shaper u_ps_q (
    .clk, .rst_n, .ce_in(ce_sym), .ce_out(ce_8fn),
    .x_in(q_lvl), .y_out(ps_out.im), .sat(sat_psq)
  );

  h1_interp u_h1 (
    .clk, .rst_n, .ce_in(ce_8fn), .ce_out(ce_24fn),
    .x_in(ps_out), .y_out(h1_out), .sat(sat_h1)
  );

  h2_interp u_h2 (
    .clk, .rst_n, .ce_in(ce_24fn), .ce_out(1'b1),
    .x_in(h1_out), .y_out(h2_out), .sat(sat_h2)
  );

  sinc_comp u_sinc (
    .clk, .rst_n, .ce(1'b1),
    .x_in(h2_out), .y_out(dac_data), .sat(sat_sc)
  );

  assign sat_any = sat_psi | sat_psq | sat_h1 | sat_h2 | sat_sc;
endmodule
