// window_pkg -- constants and the coefficient formula shared by the FFT input window.
//
// The window sits in front of a 1024-point FFT that takes complex 14-bit samples at
// 100 MSPS. These defaults (1024 coefficients of 10 bits, 14-bit data) are the sizes the
// design was specified with. The coefficient formula reproduces a Bartlett (triangular)
// window scaled so that its peak is the largest positive value of a WIN_W-bit signed
// number, 2**(WIN_W-1)-1, with the sign bit always 0 so that the signed multipliers
// treat it as positive:
//
//   k(a)    = a              for a <  WIN_LEN/2
//           = WIN_LEN-1-a    for a >= WIN_LEN/2
//   coef(a) = round(k(a) * (2**(WIN_W-1)-1) / (WIN_LEN/2-1))
//
// For WIN_LEN = 1024 and WIN_W = 10 this is exactly 0, 1, ..., 511, 511, 510, ..., 0.
package window_pkg;

  parameter int unsigned DATA_W_DEF  = 14;    // width of real and imaginary samples
  parameter int unsigned WIN_LEN_DEF = 1024;  // window length = FFT length
  parameter int unsigned WIN_W_DEF   = 10;    // window coefficient width, sign bit included

  // Bartlett coefficient at address a, rounded to nearest (ties away from zero).
  function automatic int unsigned bartlett_coef(int unsigned a, int unsigned len,
                                                int unsigned w);
    longint unsigned k, peak, half, al, ll;
    al   = 64'(a);
    ll   = 64'(len);
    half = ll / 2 - 1;
    peak = (64'd1 << (w - 1)) - 1;
    k    = (al < ll / 2) ? al : ll - 1 - al;
    if (half == 0) return int'(peak);
    return int'((2 * k * peak + half) / (2 * half));
  endfunction

endpackage
