// iqit_ref_pkg: reference model for the IQ/IT testbenches.
//
// Works directly from the definitions, not from the hardware's structure:
// de-quantisation by the formula with IQstep = {40,45,51,57,64,72}[QP%6],
// and every transform as a full N x N matrix product (no even-odd
// decomposition, no shift-add constants). The DCT matrix entry T_N[j][k] takes
// its sign from cos(j*(2k+1)*pi/(2N)) evaluated in floating point and its
// magnitude from the HEVC constant list, indexed by the folded angle; the
// 4-point DST matrix is written out. Intermediate values are clipped to 16
// bits after the column pass, as in HEVC.
package iqit_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // HEVC magnitudes for angles t*pi/64, t = 0..32 (t = 0 used only as DC 64).
  function automatic int mag(int t);
    int tab [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73,
                     70, 67, 64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22,
                     18, 13, 9, 4, 0};
    return tab[t];
  endfunction

  function automatic int dct_entry(int n, int j, int k);
    real ang, c;
    int  t;
    if (j == 0) return 64;
    ang = real'(j * (2*k + 1)) * PI / real'(2*n);
    c   = $cos(ang);
    // folded angle in units of pi/64
    t   = int'($acos(c < 0.0 ? -c : c) * 64.0 / PI);   // int'() rounds
    return (c < 0.0) ? -mag(t) : mag(t);
  endfunction

  function automatic int dst_entry(int j, int k);
    int m [4][4] = '{'{29, 55, 74, 84}, '{74, 74, 0, -74},
                     '{84, -29, -74, 55}, '{55, -84, 74, -29}};
    return m[j][k];
  endfunction

  function automatic int clip16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int dequant(int level, int qp, int log2n, int bitdepth);
    int     steps [6] = '{40, 45, 51, 57, 64, 72};
    int     sh;
    longint v;
    sh = log2n - 1 + (bitdepth - 8);
    v  = (longint'(level) * steps[qp % 6]) <<< (qp / 6);
    v  = (v + (longint'(1) <<< (sh - 1))) >>> sh;
    return clip16(v);
  endfunction

  // One 1D inverse transform: y[k] = sum_j M[j][k] * x[j], rounded, clipped.
  function automatic void inv1d(input int n, input bit dst, input int shift,
                                input int x [32], output int y [32]);
    longint acc;
    for (int k = 0; k < 32; k++) begin
      y[k] = 0;
      if (k < n) begin
        acc = 0;
        for (int j = 0; j < n; j++)
          acc += longint'(dst ? dst_entry(j, k) : dct_entry(n, j, k)) * x[j];
        y[k] = clip16((acc + (longint'(1) <<< (shift - 1))) >>> shift);
      end
    end
  endfunction

  // 2D inverse transform of blk[row][col]; res[row][col].
  function automatic void inv2d(input int n, input bit dst, input int bitdepth,
                                input int blk [32][32], output int res [32][32]);
    int col [32], out [32];
    int mid [32][32];
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < 32; r++) col[r] = (r < n) ? blk[r][c] : 0;
      inv1d(n, dst, 7, col, out);
      for (int r = 0; r < 32; r++) mid[r][c] = out[r];
    end
    for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++) res[r][c] = 0;
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < 32; c++) col[c] = (c < n) ? mid[r][c] : 0;
      inv1d(n, dst, 20 - bitdepth, col, out);
      for (int c = 0; c < n; c++) res[r][c] = out[c];
    end
  endfunction

endpackage
