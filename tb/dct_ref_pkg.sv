// dct_ref_pkg: reference model for the stochastic DCT testbenches.
// dct_scaled() computes, in floating point, the value each output stream of
// the stochastic DCT core should carry for bipolar inputs x[0..7]: the
// unnormalised 8-point DCT X(k) = sum_n x(n) cos(k*pi*(2n+1)/16) for k >= 1,
// X(0) = C4 * sum_n x(n), divided by the scaled adders' factor, 8 for
// k = 0, 2..6 and 16 for k = 1, 7. It uses the direct sum, not the
// butterfly, so it checks the butterfly and the odd-part rewrite too.
package dct_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real dct_scaled(input real x [8], input int k);
    real acc;
    acc = 0.0;
    for (int n = 0; n < 8; n++)
      acc += x[n] * ((k == 0) ? $cos(PI / 4.0) : $cos(k * PI * (2 * n + 1) / 16.0));
    return acc / (((k == 1) || (k == 7)) ? 16.0 : 8.0);
  endfunction
endpackage
