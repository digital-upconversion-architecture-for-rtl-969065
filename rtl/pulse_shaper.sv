// pulse_shaper -- root-raised-cosine pulse shaping with fourfold interpolation
// for one branch (I or Q) of the QAM modulator.
//
// Function: the symbol-rate level stream is zero-stuffed by L = 4 and filtered
// by an RRC FIR, giving 4 samples per symbol at 8 f_N. The 4-fold rate
// increase and the RRC shape at 4 samples per symbol follow the design; the
// rolloff (1/3, from the 2 MHz input bandwidth at f_N = 1.5 MHz), the span
// (33 taps = 8 symbols) and the scaling are choices of this implementation
// (see upconv_pkg).
//
// Structure: polyphase. The incoming level and TAPS_PH-1 stored ones feed L
// branches; branch p (p = 0..L-1) forms sum_m c[L*m + p] * x(n-m), which is
// output sample L*n + p. The rounded branch results are registered on ce_in
// (so the arithmetic works at the symbol rate) and a commutator register
// walks through them on ce_out.
//
// Interface/timing (single clock, clock enables):
//   ce_in  - symbol rate; x_in is taken into the delay line and branches.
//   ce_out - output rate; every ce_in cycle must also be a ce_out cycle.
//   y_out  - registered; after the ce_in edge that takes symbol n, the next
//            L ce_out edges present branches 0..L-1 of symbol n (latency one
//            output period). Output = round(sum / 2^PS_SHIFT), saturated.
module pulse_shaper
  import upconv_pkg::*;
#(
  parameter int L   = PS_L,
  parameter int TAPS_PH = PS_TPP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_in,
  input  logic                    ce_out,
  input  logic signed [LVL_W-1:0] x_in,
  output sample_t                 y_out,
  output logic                    sat      // clipping happened this cycle
);
  localparam int PH_W = (L > 1) ? $clog2(L) : 1;

  typedef int coef_arr_t [L * TAPS_PH];
  function automatic coef_arr_t mk_coefs();
    coef_arr_t c;
    for (int k = 0; k < L * TAPS_PH; k++) c[k] = ps_coef(k);
    return c;
  endfunction
  localparam coef_arr_t C = mk_coefs();

  logic signed [LVL_W-1:0] tap [TAPS_PH];     // x(n) .. x(n-TAPS_PH+1)
  logic signed [LVL_W-1:0] dl  [TAPS_PH-1];   // stored x(n-1) ..
  sample_t                 br_q [L];          // branch results of the current symbol
  logic                    br_sat [L];
  logic [PH_W-1:0]         ph;
  acc_t                    acc [L];
  sample_t                 br_d [L];
  logic                    sat_d [L];

  always_comb begin
    tap[0] = x_in;
    for (int m = 1; m < TAPS_PH; m++) tap[m] = dl[m-1];
  end

  // the L polyphase branches, each rounded and saturated
  always_comb begin
    for (int p = 0; p < L; p++) begin
      acc[p] = 0;
      for (int m = 0; m < TAPS_PH; m++)
        acc[p] += acc_t'(C[L * m + p]) * acc_t'(tap[m]);
      br_d[p] = round_sat(acc[p], PS_SHIFT, sat_d[p]);
    end
  end

  // symbol-rate registers: delay line and branch results
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < TAPS_PH - 1; m++) dl[m] <= '0;
      for (int p = 0; p < L; p++) begin
        br_q[p]   <= '0;
        br_sat[p] <= 1'b0;
      end
    end else if (ce_in) begin
      for (int m = 0; m < TAPS_PH - 1; m++) dl[m] <= tap[m];
      for (int p = 0; p < L; p++) begin
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
        ph    <= (ce_in || ph == PH_W'(L - 1)) ? '0 : ph + 1'b1;
      end
    end
  end

  a_in_on_out: assert property (@(posedge clk) disable iff (!rst_n) ce_in |-> ce_out)
    else $error("pulse_shaper: input enable without output enable");
endmodule
