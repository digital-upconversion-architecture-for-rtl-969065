// sinc_comp -- x/sin(x) correction FIR at the full rate f_s.
//
// The D/A converter holds each sample for one period, which weights the
// output spectrum with sin(pi f/f_s)/(pi f/f_s); at the 4/9 f_s carrier this
// droop is about 3 dB. This filter boosts the signal band 15/36..17/36 f_s by
// the inverse of that droop. Only its function is given by the design; the
// filter itself is the simplest that does it: a 3-tap symmetric FIR
// y(n) = (-9 x(n) + 6 x(n-1) - 9 x(n-2)) / 16, whose gain 6/16 - 18/16 cos(2 pi f/f_s)
// rises from 1.349 to 1.483 across the band (ideal 1.355..1.489). Being
// symmetric it is linear phase.
//
// Interface/timing: on every ce cycle x_in is taken and y_out, registered,
// becomes the filtered sample that includes that x_in (latency one cycle).
// Output rounded and saturated to DW bits; sat flags a clipped sample.
module sinc_comp
  import upconv_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ce,
  input  sample_t x_in,
  output sample_t y_out,
  output logic    sat
);
  sample_t dl [SINC_NTAP-1];   // x(n-1), x(n-2)
  acc_t    acc;
  sample_t y_next;
  logic    sat_next;

  always_comb begin
    acc = acc_t'(SINC_C[0]) * acc_t'(x_in);
    for (int k = 1; k < SINC_NTAP; k++)
      acc += acc_t'(SINC_C[k]) * acc_t'(dl[k-1]);
    y_next = round_sat(acc, SINC_FRAC, sat_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SINC_NTAP - 1; k++) dl[k] <= '0;
      y_out <= '0;
      sat   <= 1'b0;
    end else begin
      sat <= 1'b0;
      if (ce) begin
        dl[0] <= x_in;
        for (int k = 1; k < SINC_NTAP - 1; k++) dl[k] <= dl[k-1];
        y_out <= y_next;
        sat   <= sat_next;
      end
    end
  end
endmodule
