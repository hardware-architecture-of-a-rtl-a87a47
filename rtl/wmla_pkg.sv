// wmla_pkg - shared sizes, number formats and the 9/7 wavelet arithmetic of the
// wavelet based multiple line addressing (MLA) display driver.
//
// The driver turns one level-1 2-D wavelet transformed frame B (96 rows x 110
// columns, coefficients ordered [low band | high band] in each row) into the
// column voltage matrix G = c * B * (F_n^T)^-1, and plays out the row matrix F_m
// for the row drivers. Both matrices depend only on the bi-orthogonal 9/7
// wavelet, so they live in ROMs. This package holds the constants and the
// elaboration-time functions that fill those ROMs:
//   * fwd97 : one level of the forward 9/7 lifting transform (analysis, F)
//   * inv97 : its exact inverse (synthesis, F^-1)
// Column j of F is fwd97(e_j); column k of F^-1 is inv97(e_k), so entry (k,j)
// of (F^T)^-1 = (F^-1)^T is element j of inv97(e_k).
//
// Display size 96 x 110 and the 220-word line memory follow the document. The
// lifting form, its boundary handling (whole-sample symmetric extension), the
// scaling constant and every bit width here are this design's own choices.
package wmla_pkg;

  // Display geometry (document: 96 x 110 pixels)
  localparam int unsigned N_COLS = 110;  // columns, = coefficients per line (n)
  localparam int unsigned M_ROWS = 96;   // rows (m)

  // Number formats (own choice)
  localparam int unsigned DATA_W    = 12;  // compressed data, signed integer
  localparam int unsigned COEF_W    = 16;  // (F_n^T)^-1 entries, signed
  localparam int unsigned COEF_FRAC = 14;  //   fractional bits
  localparam int unsigned ROW_W     = 8;   // row-matrix entries, signed
  localparam int unsigned ROW_FRAC  = 6;   //   fractional bits
  localparam int unsigned COL_W     = 8;   // column output, signed
  localparam int unsigned COL_SHIFT = 18;  // c = 2^-(COL_SHIFT-COEF_FRAC) = 1/16

  // Largest transform length the lifting helpers handle
  localparam int unsigned MAXN = 256;

  // CDF 9/7 lifting constants
  localparam real LIFT_A = -1.586134342;
  localparam real LIFT_B = -0.05298011854;
  localparam real LIFT_G = 0.8829110762;
  localparam real LIFT_D = 0.4435068522;
  localparam real LIFT_K = 1.149604398;

  typedef real rvec_t[MAXN];

  // Whole-sample symmetric extension at the right edge: x[n] -> x[2n-2-i]
  function automatic int unsigned mirror_hi(int unsigned i, int unsigned n);
    return (i < n) ? i : 2 * n - 2 - i;
  endfunction

  // Left neighbour of an even sample: x[-1] -> x[1]
  function automatic int unsigned mirror_lo(int unsigned i);
    return (i == 0) ? 1 : i - 1;
  endfunction

  // One level forward 9/7 transform of x[0..n-1] (n even).
  // Result: y[0..n/2-1] low band, y[n/2..n-1] high band.
  function automatic rvec_t fwd97(rvec_t xin, int unsigned n);
    rvec_t x, y;
    int unsigned h;
    x = xin;
    h = n / 2;
    for (int unsigned i = 0; i < h; i++) x[2*i+1] += LIFT_A * (x[2*i] + x[mirror_hi(2*i+2, n)]);
    for (int unsigned i = 0; i < h; i++) x[2*i]   += LIFT_B * (x[2*i+1] + x[mirror_lo(2*i)]);
    for (int unsigned i = 0; i < h; i++) x[2*i+1] += LIFT_G * (x[2*i] + x[mirror_hi(2*i+2, n)]);
    for (int unsigned i = 0; i < h; i++) x[2*i]   += LIFT_D * (x[2*i+1] + x[mirror_lo(2*i)]);
    for (int unsigned i = 0; i < MAXN; i++) y[i] = 0.0;
    for (int unsigned i = 0; i < h; i++) begin
      y[i]     = x[2*i] / LIFT_K;
      y[h + i] = x[2*i+1] * LIFT_K;
    end
    return y;
  endfunction

  // Exact inverse of fwd97.
  function automatic rvec_t inv97(rvec_t y, int unsigned n);
    rvec_t x;
    int unsigned h;
    h = n / 2;
    for (int unsigned i = 0; i < MAXN; i++) x[i] = 0.0;
    for (int unsigned i = 0; i < h; i++) begin
      x[2*i]   = y[i] * LIFT_K;
      x[2*i+1] = y[h + i] / LIFT_K;
    end
    for (int unsigned i = 0; i < h; i++) x[2*i]   -= LIFT_D * (x[2*i+1] + x[mirror_lo(2*i)]);
    for (int unsigned i = 0; i < h; i++) x[2*i+1] -= LIFT_G * (x[2*i] + x[mirror_hi(2*i+2, n)]);
    for (int unsigned i = 0; i < h; i++) x[2*i]   -= LIFT_B * (x[2*i+1] + x[mirror_lo(2*i)]);
    for (int unsigned i = 0; i < h; i++) x[2*i+1] -= LIFT_A * (x[2*i] + x[mirror_hi(2*i+2, n)]);
    return x;
  endfunction

  // Unit vector e_k of length MAXN
  function automatic rvec_t unit_vec(int unsigned k);
    rvec_t e;
    for (int unsigned i = 0; i < MAXN; i++) e[i] = (i == k) ? 1.0 : 0.0;
    return e;
  endfunction

  // Round v * 2^frac to the nearest integer and saturate to a signed width.
  function automatic longint quantize(real v, int unsigned frac, int unsigned width);
    real    s;
    longint q, lim;
    s   = v * (2.0 ** frac);
    q   = (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
    lim = (longint'(1) << (width - 1)) - 1;
    if (q > lim) q = lim;
    if (q < -lim - 1) q = -lim - 1;
    return q;
  endfunction

endpackage
