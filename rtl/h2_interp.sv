// h2_interp -- second stage of the combined interpolation/upconversion filter,
// Re{H2(z)} with H2(z) = H(z e^{j2pi 4/9}), running at 24 f_N in and
// 72 f_N = f_s out.
//
// Function: the complex stream from the first stage is zero-stuffed by 3 and
// filtered by the 12-tap prototype h(i) with coefficients rotated by
// exp(j*2*pi*4*i/9). Because the carrier 4/9 f_s times the 9-fold total
// interpolation is a whole number of turns, the rotated filters alone perform
// the mixing: the real part of the result is the modulated carrier at
// 4/9 f_s = 48 MHz. Only that real part is formed, so each tap needs two real
// constant multiplications (gr*xr - gi*xi), 24 in all.
//
// Structure: three 4-tap polyphase FIRs on the 24 f_N samples (branch p uses
// taps p, p+3, p+6, p+9), fed by x_in and three stored samples, with their
// rounded results registered on ce_in; the multiplier/adder paths thus have
// a whole 24 f_N period (3 master cycles). One commutator reads the branch
// registers out at f_s.
//
// Word lengths and scaling as in the first stage (10-bit data, 10-bit
// coefficients with 9 fraction bits and a gain of 3, round and saturate).
//
// Interface/timing: ce_in takes x_in (stable during the input period before
// it, as the upstream register guarantees); every ce_in cycle must also be a ce_out
// cycle (ce_out is normally high in every cycle). y_out is registered; after
// the ce_in edge that takes sample n, the next three ce_out edges present
// output samples 3n, 3n+1, 3n+2.
module h2_interp
  import upconv_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ce_in,
  input  logic    ce_out,
  input  cplx_t   x_in,
  output sample_t y_out,
  output logic    sat
);
  localparam coef12_t G_RE = rot_coefs_re(H2_ROT);
  localparam coef12_t G_IM = rot_coefs_im(H2_ROT);

  cplx_t   tap [TPP];       // x(n), x(n-1), x(n-2), x(n-3)
  cplx_t   dl  [TPP-1];     // stored x(n-1) .. x(n-3)
  sample_t br_q [NPH];      // branch results of the current input sample
  logic    br_sat [NPH];
  logic [1:0] ph;
  acc_t    acc [NPH];
  sample_t br_d [NPH];
  logic    sat_d [NPH];

  always_comb begin
    tap[0] = x_in;
    for (int m = 1; m < TPP; m++) tap[m] = dl[m-1];
  end

  // three 4-tap polyphase FIRs, real part of (gr + j gi)(xr + j xi) only,
  // each rounded and saturated
  always_comb begin
    for (int p = 0; p < NPH; p++) begin
      acc[p] = 0;
      for (int m = 0; m < TPP; m++)
        acc[p] += acc_t'(G_RE[NPH * m + p]) * acc_t'(tap[m].re)
                - acc_t'(G_IM[NPH * m + p]) * acc_t'(tap[m].im);
      br_d[p] = round_sat(acc[p], COEF_FRAC, sat_d[p]);
    end
  end

  // input-rate registers: delay line and branch results
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < TPP - 1; m++) dl[m] <= '0;
      for (int p = 0; p < NPH; p++) begin
        br_q[p]   <= '0;
        br_sat[p] <= 1'b0;
      end
    end else if (ce_in) begin
      for (int m = 0; m < TPP - 1; m++) dl[m] <= tap[m];
      for (int p = 0; p < NPH; p++) begin
        br_q[p]   <= br_d[p];
        br_sat[p] <= sat_d[p];
      end
    end
  end

  // output-rate commutator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out <= '0;
      ph    <= '0;
      sat   <= 1'b0;
    end else begin
      sat <= 1'b0;
      if (ce_out) begin
        y_out <= br_q[ph];
        sat   <= br_sat[ph];
        ph    <= (ce_in || ph == 2'(NPH - 1)) ? '0 : ph + 1'b1;
      end
    end
  end

  a_in_on_out: assert property (@(posedge clk) disable iff (!rst_n) ce_in |-> ce_out)
    else $error("h2_interp: input enable without output enable");
endmodule
