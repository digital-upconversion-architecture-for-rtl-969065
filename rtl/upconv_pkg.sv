// upconv_pkg -- shared types, word lengths and filter coefficients of the
// QAM-16 modulator with combined interpolation and upconversion.
//
// Number plan: the master clock is f_s = 72 f_N = 108 MHz (f_N = 1.5 MHz,
// symbol rate f_sym = 2 f_N = 3 MHz). Samples move between sections at
// f_sym, 8 f_N, 24 f_N and 72 f_N. The carrier sits at 4/9 f_s = 48 MHz.
//
// All coefficient tables are computed here at elaboration time from their
// formulas, so no number table is stored:
//   * H_PROTO: the 12-tap linear-phase lowpass prototype h(i) used by both
//     interpolation stages (the printed design values).
//   * Rotated coefficients g(i) = 3 * h(i) * exp(j*2*pi*R*i/9), R = 3 for the
//     first stage H1 and R = 4 for the second stage H2, quantised to CW bits
//     with COEF_FRAC fraction bits. The factor 3 restores the gain lost by
//     zero-stuffing threefold, so each stage has unity passband gain; this
//     factor is a choice of this implementation.
//   * A root-raised-cosine pulse with rolloff 1/3 at 4 samples per symbol,
//     33 taps centred on tap 16, peak scaled to 511.
//   * A 3-tap x/sin(x) correction [-9, 6, -9]/16, which has a gain of
//     1.349..1.483 over 15/36..17/36 f_s against the ideal 1.355..1.489.
package upconv_pkg;

  // ---------------------------------------------------------------- words
  localparam int DW        = 10;   // internal data word (10-bit accuracy)
  localparam int CW        = 10;   // coefficient word
  localparam int COEF_FRAC = 9;    // fraction bits of the rotated coefficients
  localparam int LVL_W     = 3;    // signed QAM-16 level -3..+3

  typedef logic signed [DW-1:0] sample_t;

  // accumulator of the filters: wide enough for any sum of products here
  localparam int ACC_W = 32;
  typedef logic signed [ACC_W-1:0] acc_t;

  // complex sample i + jq
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // ---------------------------------------------------------------- rates
  localparam int SYM_DIV = 36;  // f_s / f_sym

  // ---------------------------------------------- interpolation prototype
  localparam int NTAP = 12;
  localparam int NPH  = 3;            // interpolation factor of each stage
  localparam int TPP  = NTAP / NPH;   // taps per polyphase branch (4)

  // symmetric prototype: h(0)=h(11), h(1)=h(10), ... h(5)=h(6)
  function automatic real h_proto(input int i);
    int k;
    k = (i < NTAP/2) ? i : NTAP - 1 - i;
    case (k)
      0: return -0.01333;
      1: return -0.02573;
      2: return -0.007119;
      3: return  0.07181;
      4: return  0.1915;
      default: return 0.2848;
    endcase
  endfunction

  function automatic int round_real(input real v);
    return int'($floor(v + 0.5));
  endfunction

  // real / imaginary part of 3*h(i)*exp(j*2*pi*rot*i/9), quantised
  function automatic int rot_coef_re(input int rot, input int i);
    real PI;
    PI = 3.14159265358979323846;
    return round_real(3.0 * h_proto(i) * $cos(2.0 * PI * rot * i / 9.0)
                      * (2.0 ** COEF_FRAC));
  endfunction

  function automatic int rot_coef_im(input int rot, input int i);
    real PI;
    PI = 3.14159265358979323846;
    return round_real(3.0 * h_proto(i) * $sin(2.0 * PI * rot * i / 9.0)
                      * (2.0 ** COEF_FRAC));
  endfunction

  typedef int coef12_t [NTAP];

  // the whole rotated coefficient set of one stage, as a constant array
  function automatic coef12_t rot_coefs_re(input int rot);
    coef12_t c;
    for (int i = 0; i < NTAP; i++) c[i] = rot_coef_re(rot, i);
    return c;
  endfunction

  function automatic coef12_t rot_coefs_im(input int rot);
    coef12_t c;
    for (int i = 0; i < NTAP; i++) c[i] = rot_coef_im(rot, i);
    return c;
  endfunction

  localparam int H1_ROT = 3;   // H1(z) = H(z^3 e^{j2pi 4/3}): rotation 3/9 per tap
  localparam int H2_ROT = 4;   // H2(z) = H(z e^{j2pi 4/9}):   rotation 4/9 per tap

  // ------------------------------------------------------ pulse shaping
  localparam int  PS_L     = 4;      // samples per symbol
  localparam int  PS_TPP   = 9;      // taps per polyphase branch
  localparam int  PS_NTAP  = PS_L * PS_TPP;
  localparam int  PS_SPAN  = 33;     // non-zero taps, centred on tap 16
  localparam int  RRC_BETA_INV = 3;  // rolloff 1/3
  localparam int  PS_PEAK  = 511;    // coefficient at the pulse centre
  localparam int  PS_SHIFT = 3;      // output scaling: sum / 8

  // root-raised-cosine impulse response, t in symbol periods
  function automatic real rrc(input real t);
    real PI, b, x;
    PI = 3.14159265358979323846;
    b = 1.0 / real'(RRC_BETA_INV);
    if (t > -1.0e-9 && t < 1.0e-9)
      return 1.0 - b + 4.0 * b / PI;
    x = 4.0 * b * t;
    if ((x * x - 1.0) > -1.0e-9 && (x * x - 1.0) < 1.0e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b))
                             + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + x * $cos(PI * t * (1.0 + b)))
           / (PI * t * (1.0 - x * x));
  endfunction

  function automatic int ps_coef(input int k);
    real t;
    if (k >= PS_SPAN) return 0;
    t = real'(k - PS_SPAN / 2) / real'(PS_L);
    return round_real(rrc(t) * real'(PS_PEAK) / rrc(0.0));
  endfunction

  // ------------------------------------------------ x/sin(x) correction
  localparam int SINC_NTAP = 3;
  localparam int SINC_FRAC = 4;
  localparam int SINC_C [SINC_NTAP] = '{-9, 6, -9};

  // -------------------------------------------------------- arithmetic
  // Round half up by FRAC bits and saturate to a DW-bit signed word.
  // Returns 1 in 'sat' when the value had to be clipped.
  function automatic sample_t round_sat(input acc_t acc, input int frac,
                                        output logic sat);
    acc_t r;
    r = (acc + (acc_t'(1) <<< (frac - 1))) >>> frac;
    sat = 1'b0;
    if (r > acc_t'(2 ** (DW - 1) - 1)) begin
      r = acc_t'(2 ** (DW - 1) - 1);
      sat = 1'b1;
    end else if (r < -acc_t'(2 ** (DW - 1))) begin
      r = -acc_t'(2 ** (DW - 1));
      sat = 1'b1;
    end
    return sample_t'(r);
  endfunction

endpackage
