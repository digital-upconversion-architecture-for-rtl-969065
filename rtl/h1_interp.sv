// h1_interp -- first stage of the combined interpolation/upconversion filter,
// H1(z) = H(z^3 e^{j2pi 4/3}), running at 8 f_N in and 24 f_N out.
//
// Function: the complex baseband stream x = i + jq is zero-stuffed by 3 and
// filtered by the 12-tap prototype h(i) whose coefficients are rotated by
// exp(j*2*pi*3*i/9). Rotating the coefficients shifts the filter (and so the
// signal it passes) in frequency; together with the rotation of the second
// stage this moves the modulation from DC to the carrier 4/9 f_s without any
// mixer or oscillator. Both branches are processed, so input and output are
// complex.
//
// Structure, as in the multirate expansion of the design: three 4-tap complex
// FIRs (branch p uses taps p, p+3, p+6, p+9) run on the 8 f_N samples; each
// tap is a full complex product (4 real constant multiplications, 48 in all).
// The FIRs see the incoming sample x_in and three stored ones, and their
// rounded results are registered on ce_in, so the multiplier/adder paths have
// a whole 8 f_N period (9 master cycles) to settle. Two commutators, one for
// the real and one for the imaginary results, read the three branch registers
// out in turn at 24 f_N.
//
// Word lengths: 10-bit data in and out; 10-bit coefficients with 9 fraction
// bits carrying a gain of 3 that undoes the zero-stuffing loss (a choice of
// this implementation); full-precision accumulation, then round and saturate.
//
// Interface/timing: ce_in takes x_in (which must be stable for the input
// period before it, as the upstream register guarantees); every ce_in cycle
// must also be a ce_out cycle. y_out is registered; after the ce_in edge that
// takes sample n, the next three ce_out edges present output samples 3n,
// 3n+1, 3n+2 (latency one output period).
module h1_interp
  import upconv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce_in,
  input  logic  ce_out,
  input  cplx_t x_in,
  output cplx_t y_out,
  output logic  sat
);
  localparam coef12_t G_RE = rot_coefs_re(H1_ROT);
  localparam coef12_t G_IM = rot_coefs_im(H1_ROT);

  cplx_t  tap [TPP];        // x(n), x(n-1), x(n-2), x(n-3)
  cplx_t  dl  [TPP-1];      // stored x(n-1) .. x(n-3)
  cplx_t  br_q [NPH];       // branch results of the current input sample
  logic   br_sat [NPH];
  logic [1:0] ph;
  acc_t   acc_re [NPH];
  acc_t   acc_im [NPH];

  always_comb begin
    tap[0] = x_in;
    for (int m = 1; m < TPP; m++) tap[m] = dl[m-1];
  end

  // three 4-tap complex polyphase FIRs: (gr + j gi)(xr + j xi)
  always_comb begin
    for (int p = 0; p < NPH; p++) begin
      acc_re[p] = 0;
      acc_im[p] = 0;
      for (int m = 0; m < TPP; m++) begin
        acc_re[p] += acc_t'(G_RE[NPH * m + p]) * acc_t'(tap[m].re)
                   - acc_t'(G_IM[NPH * m + p]) * acc_t'(tap[m].im);
        acc_im[p] += acc_t'(G_IM[NPH * m + p]) * acc_t'(tap[m].re)
                   + acc_t'(G_RE[NPH * m + p]) * acc_t'(tap[m].im);
      end
    end
  end

  // round and saturate each branch
  cplx_t br_d [NPH];
  logic  sat_re [NPH], sat_im [NPH];
  always_comb begin
    for (int p = 0; p < NPH; p++) begin
      br_d[p].re = round_sat(acc_re[p], COEF_FRAC, sat_re[p]);
      br_d[p].im = round_sat(acc_im[p], COEF_FRAC, sat_im[p]);
    end
  end

  // input-rate registers: delay line and rounded branch results
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
        br_sat[p] <= sat_re[p] | sat_im[p];
      end
    end
  end

  // output-rate commutators
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
    else $error("h1_interp: input enable without output enable");
endmodule
