// tb_amt_ref_pkg: reference model for the AMT testbenches.
//
// Coefficients are recomputed here from the closed-form definitions of the
// five orthonormal 4-point kernels, scaled by 512 and rounded to the nearest
// integer, so the checks do not rely on the table in the design's package:
//   DCT-II   w(k) sqrt(2/N)      cos(pi k (2j+1) / 2N)
//   DCT-V    w(k) w(j) sqrt(4/(2N-1)) cos(2 pi k j / (2N-1))
//   DCT-VIII sqrt(4/(2N+1))      cos(pi (2k+1)(2j+1) / (4N+2))
//   DST-I    sqrt(2/(N+1))       sin(pi (k+1)(j+1) / (N+1))
//   DST-VII  sqrt(4/(2N+1))      sin(pi (2k+1)(j+1) / (2N+1))
// with w(0) = sqrt(1/2) and w(i>0) = 1. Identifiers outside 0..4 behave as
// DCT-II. The 2-D model applies the same (t + 512) >>> 10 rounding between the
// passes as the hardware.
package tb_amt_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int ref_coef(int tr, int k, int j);
    real n, v, wk, wj;
    n  = 4.0;
    wk = (k == 0) ? $sqrt(0.5) : 1.0;
    wj = (j == 0) ? $sqrt(0.5) : 1.0;
    case (tr)
      1: v = wk * wj * $sqrt(4.0 / (2.0*n - 1.0)) * $cos(2.0*PI*k*j / (2.0*n - 1.0));
      2: v = $sqrt(4.0 / (2.0*n + 1.0)) * $cos(PI*(2*k+1)*(2*j+1) / (4.0*n + 2.0));
      3: v = $sqrt(2.0 / (n + 1.0)) * $sin(PI*(k+1)*(j+1) / (n + 1.0));
      4: v = $sqrt(4.0 / (2.0*n + 1.0)) * $sin(PI*(2*k+1)*(j+1) / (2.0*n + 1.0));
      default: v = wk * $sqrt(2.0 / n) * $cos(PI*k*(2*j+1) / (2.0*n));
    endcase
    v = v * 512.0;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // First pass of one column, rounded back to the sample width.
  function automatic longint ref_t(int tr, int k, int s0, int s1, int s2, int s3);
    return longint'(ref_coef(tr, k, 0)) * s0 + longint'(ref_coef(tr, k, 1)) * s1 +
           longint'(ref_coef(tr, k, 2)) * s2 + longint'(ref_coef(tr, k, 3)) * s3;
  endfunction

  function automatic longint ref_round(longint t);
    return (t + 512) >>> 10;
  endfunction

  function automatic int rand_sample();
    return int'($urandom_range(1023)) - 512;
  endfunction

endpackage
