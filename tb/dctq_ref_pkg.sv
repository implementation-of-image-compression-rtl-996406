// dctq_ref_pkg -- reference models for the DCTQ processor testbenches.
//
// ref_block() computes, with plain integer arithmetic, what the processor
// must produce for one 8x8 block: for each (u,v) the row sums
// S_i = floor(sum_j floor(I[i][j] C[v][j] / 16) / 16), clamped to 11 bits,
// the coefficient D = floor(sum_i floor(S_i C[u][i] / 32) / 8), clamped to
// 12 bits, and the quantised value floor(D IQ[u][v] / 1024), clamped to 9
// bits, rounded towards zero.  The cosine terms are computed here in floating point and the
// inverse quantisation values from a separate copy of the JPEG luminance
// table, so nothing is taken from the design's own tables.
// float_dct() is the exact orthonormal 2-D DCT, used to bound the
// fixed-point error, and float_idct() rebuilds pixels from quantised
// coefficients to measure reconstruction quality.
package dctq_ref_pkg;

  typedef int blk_t [8][8];

  localparam real PI = 3.14159265358979;

  localparam int Q_REF [8][8] = '{
    '{16, 11, 10, 16,  24,  40,  51,  61},
    '{12, 12, 14, 19,  26,  58,  60,  55},
    '{14, 13, 16, 24,  40,  57,  69,  56},
    '{14, 17, 22, 29,  51,  87,  80,  62},
    '{18, 22, 37, 56,  68, 109, 103,  77},
    '{24, 35, 55, 64,  81, 104, 113,  92},
    '{49, 64, 78, 87, 103, 121, 120, 101},
    '{72, 92, 95, 98, 112, 100, 103,  99}};

  function automatic real alpha(input int u);
    return (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
  endfunction

  function automatic real basis(input int u, input int x);
    return alpha(u) * $cos((2.0 * x + 1.0) * u * PI / 16.0);
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // row 0 (90.5 after scaling) is rounded down, the rest to nearest
  function automatic int c8(input int u, input int x);
    if (u == 0) return int'($floor(256.0 * basis(u, x)));
    return rnd(256.0 * basis(u, x));
  endfunction

  function automatic int iq8(input int u, input int v);
    return rnd(1024.0 / Q_REF[u][v]);
  endfunction

  // floor division by a power of two
  function automatic int fdiv(input int a, input int d);
    return int'($floor(real'(a) / real'(d)));
  endfunction

  // division rounded towards zero
  function automatic int tdiv(input int a, input int d);
    return (a < 0) ? -fdiv(-a, d) : fdiv(a, d);
  endfunction

  function automatic int clamp(input int a, input int bits);
    int hi, lo;
    hi = (1 << (bits - 1)) - 1;
    lo = -(1 << (bits - 1));
    return (a > hi) ? hi : (a < lo) ? lo : a;
  endfunction

  // bit-exact model: dct[u][v] and dctq[u][v]
  function automatic void ref_block(input blk_t pix, output blk_t dct, output blk_t dctq);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        int acc;
        acc = 0;
        for (int i = 0; i < 8; i++) begin
          int s;
          s = 0;
          for (int j = 0; j < 8; j++) s += fdiv(pix[i][j] * c8(v, j), 16);
          s = clamp(fdiv(s, 16), 11);
          acc += fdiv(s * c8(u, i), 32);
        end
        dct[u][v]  = clamp(fdiv(acc, 8), 12);
        dctq[u][v] = clamp(tdiv(dct[u][v] * iq8(u, v), 1024), 9);
      end
  endfunction

  function automatic real float_dct(input blk_t pix, input int u, input int v);
    real s;
    s = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) s += pix[i][j] * basis(u, i) * basis(v, j);
    return s;
  endfunction

  // reconstruct pixel (i,j) from quantised coefficients.  The quantiser
  // rounds towards zero, so a nonzero coefficient q stands for the interval
  // from |q|*Q to (|q|+1)*Q (with q's sign) and is rebuilt at its centre;
  // 0 is rebuilt as 0.
  function automatic real float_idct(input blk_t q, input int i, input int j);
    real s;
    s = 0.0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++)
        if (q[u][v] != 0)
          s += (q[u][v] + ((q[u][v] > 0) ? 0.5 : -0.5)) * Q_REF[u][v] * basis(u, i) * basis(v, j);
    return s;
  endfunction

  // Bound used to sanity-check the fixed-point DCT against the exact one.
  // Row 0 of the cosine matrix is 90/256 instead of 90.51/256, so the DC
  // term runs about 1.1 % low (24 for a white block); rounding the other
  // cosines to 1/256 and the four cuts add up to about 20 in the worst case.
  localparam int DCT_TOL = 32;

endpackage
