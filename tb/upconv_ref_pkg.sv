// upconv_ref_pkg -- reference arithmetic for the testbenches.
//
// Recomputes every coefficient from its defining formula and models each
// filter the plain way: zero-stuff the input stream, convolve with the full
// impulse response, then round half up and clip to 10 bits. The RTL instead
// uses polyphase branches and commutators, so agreement checks the
// polyphase decomposition, the commutator order and the latencies.
package upconv_ref_pkg;
  localparam real M_PI = 3.14159265358979323846;

  // printed 12-tap prototype, listed in full
  function automatic real proto(input int i);
    real h [12];
    h = '{-0.01333, -0.02573, -0.007119, 0.07181, 0.1915, 0.2848,
           0.2848, 0.1915, 0.07181, -0.007119, -0.02573, -0.01333};
    return h[i];
  endfunction

  function automatic int rnd(input real v);
    return int'($floor(v + 0.5));
  endfunction

  // 3*h(i)*exp(j 2 pi r i / 9) with 9 fraction bits
  function automatic int g_re(input int r, input int i);
    return rnd(1536.0 * proto(i) * $cos(2.0 * M_PI * real'(r * i) / 9.0));
  endfunction
  function automatic int g_im(input int r, input int i);
    return rnd(1536.0 * proto(i) * $sin(2.0 * M_PI * real'(r * i) / 9.0));
  endfunction

  // root raised cosine, rolloff 1/3, 4 samples per symbol, 33 taps
  function automatic real rrc_t(input real t);
    real b;
    b = 1.0 / 3.0;
    if (t == 0.0) return 1.0 - b + 4.0 * b / M_PI;
    if ((t > 0.749999 && t < 0.750001) || (t < -0.749999 && t > -0.750001))
      return b / $sqrt(2.0) * ((1.0 + 2.0 / M_PI) * $sin(M_PI * 0.75)
                             + (1.0 - 2.0 / M_PI) * $cos(M_PI * 0.75));
    return ($sin(M_PI * t * (1.0 - b)) + 4.0 * b * t * $cos(M_PI * t * (1.0 + b)))
           / (M_PI * t * (1.0 - 16.0 * b * b * t * t));
  endfunction
  function automatic int c_ps(input int k);
    if (k < 0 || k > 32) return 0;
    return rnd(511.0 * rrc_t(real'(k - 16) / 4.0) / rrc_t(0.0));
  endfunction

  // round half up by 'frac' bits, clip to [-512, 511]
  function automatic int q10(input longint acc, input int frac);
    longint r;
    r = acc + (longint'(1) <<< (frac - 1));
    r = r >>> frac;
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return int'(r);
  endfunction
endpackage
