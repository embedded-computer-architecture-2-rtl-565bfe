// Shared constants and helpers for the FIR/IIR filter collection.
//
// The six-tap coefficient sets are the ones used by the small 8-bit filters
// (h0..h5 = 2,4,3,2,7,6 for the plain FIR, h0..h2 = 2,4,3 for the symmetric
// ones). tri_coef() produces the taps of the 100-tap filters: the original
// coefficient values are not known, so a triangular (Bartlett) low-pass
// window with unity DC gain is used instead, a choice of this design:
//     h[k] = round(2^frac * min(k+1, n-k) / S),  S = sum_k min(k+1, n-k).
// The IIR coefficient constants are a third-order Butterworth low-pass
// (bilinear transform, K = tan(pi*fc/fs) = 0.57), also a choice of this
// design, given here as real numbers and quantised by iir3 itself.
package filt_pkg;

  // Sum of the triangular window of length n.
  function automatic int tri_sum(input int n);
    int s = 0;
    for (int k = 0; k < n; k++) s += ((k + 1) < (n - k)) ? (k + 1) : (n - k);
    return s;
  endfunction

  // Tap k of an n-tap triangular window scaled to 2^frac, rounded to nearest.
  function automatic int tri_coef(input int k, input int n, input int frac);
    int  w;
    longint num;
    w   = ((k + 1) < (n - k)) ? (k + 1) : (n - k);
    num = (longint'(w) << frac);
    return int'((2 * num + longint'(tri_sum(n))) / (2 * longint'(tri_sum(n))));
  endfunction

  // Third-order Butterworth low-pass, direct form: b0..b3 and a1..a3
  // (a0 = 1), y = b*x - a*y.
  localparam real IIR_B0 = 0.06225;
  localparam real IIR_B1 = 0.18675;
  localparam real IIR_B2 = 0.18675;
  localparam real IIR_B3 = 0.06225;
  localparam real IIR_A1 = -0.98643;
  localparam real IIR_A2 = 0.59354;
  localparam real IIR_A3 = -0.10911;

  // Quantise a real coefficient to a signed fixed-point integer with frac
  // fractional bits (round to nearest).
  function automatic int to_fxp(input real v, input int frac);
    real s;
    s = v * (2.0 ** frac);
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

endpackage
