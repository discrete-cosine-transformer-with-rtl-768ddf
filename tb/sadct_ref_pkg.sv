// sadct_ref_pkg - reference model of the shape-adaptive DCT/IDCT for testbenches.
//
// Computes the expected results straight from the transform definition, in
// direct (unfolded) matrix form: every output is the full sum over all N
// samples of a rounded basis value times the sample, rounded to nearest (ties
// up) with 12 fractional bits and saturated to 16 bits. The basis values are
// derived here from cos() independently of the design. The 2D functions apply
// the shape-adaptive procedure: pack each column to the top, N-point DCT, pack
// each row to the left, M-point DCT; the inverse undoes those steps.
package sadct_ref_pkg;

  localparam int FRAC = 12;
  typedef int     mat_t [8][8];    // [row][col]
  typedef int     vec_t [8];
  typedef logic [7:0] cols_t [8];  // shape by column: [col] bit row

  function automatic int ref_coef(int npt, int u, int n);
    real c, s;
    s = (u == 0) ? $sqrt(1.0 / npt) : $sqrt(2.0 / npt);
    c = $cos(3.141592653589793 * real'(u) * real'(2 * n + 1) / real'(2 * npt));
    return int'($floor(s * c * 4096.0 + 0.5));
  endfunction

  function automatic int rnd_sat(longint acc);
    longint t;
    t = (acc + 64'sd2048) >>> FRAC;
    if (t > 32767)  t = 32767;
    if (t < -32768) t = -32768;
    return int'(t);
  endfunction

  // N-point forward (inv = 0) or inverse (inv = 1) transform of v[0..N-1]
  function automatic vec_t xform(vec_t v, int npt, bit inv);
    vec_t r;
    for (int a = 0; a < 8; a++) begin
      longint acc = 0;
      if (a < npt)
        for (int b = 0; b < npt; b++)
          acc += inv ? longint'(ref_coef(npt, b, a)) * v[b]
                     : longint'(ref_coef(npt, a, b)) * v[b];
      r[a] = (a < npt) ? rnd_sat(acc) : 0;
    end
    return r;
  endfunction

  function automatic int popc(logic [7:0] m);
    int c = 0;
    for (int i = 0; i < 8; i++) c += m[i];
    return c;
  endfunction

  // Forward SA-DCT. Coefficient c of row i lands in out[i][c].
  function automatic mat_t sa_dct(mat_t px, cols_t shp);
    mat_t tmp, out;
    int   ncol [8];
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin tmp[i][j] = 0; out[i][j] = 0; end
    for (int j = 0; j < 8; j++) begin
      vec_t v, z;
      int m = 0;
      for (int r = 0; r < 8; r++) v[r] = 0;
      for (int r = 0; r < 8; r++) if (shp[j][r]) begin v[m] = px[r][j]; m++; end
      ncol[j] = m;
      z = xform(v, m, 0);
      for (int r = 0; r < m; r++) tmp[r][j] = z[r];
    end
    for (int i = 0; i < 8; i++) begin
      vec_t v, z;
      int m = 0;
      for (int c = 0; c < 8; c++) v[c] = 0;
      for (int j = 0; j < 8; j++) if (ncol[j] > i) begin v[m] = tmp[i][j]; m++; end
      z = xform(v, m, 0);
      for (int c = 0; c < m; c++) out[i][c] = z[c];
    end
    return out;
  endfunction

  // Number of coefficients in row i of an SA-DCT block.
  function automatic int row_len(cols_t shp, int i);
    int m = 0;
    for (int j = 0; j < 8; j++) if (popc(shp[j]) > i) m++;
    return m;
  endfunction

  // Inverse SA-DCT. Pixel (r, j) of the object lands in out[r][j].
  function automatic mat_t sa_idct(mat_t cf, cols_t shp);
    mat_t tmp, out;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin tmp[i][j] = 0; out[i][j] = 0; end
    for (int i = 0; i < 8; i++) begin
      vec_t v, b;
      int m = row_len(shp, i), c = 0;
      for (int q = 0; q < 8; q++) v[q] = (q < m) ? cf[i][q] : 0;
      b = xform(v, m, 1);
      for (int j = 0; j < 8; j++) if (popc(shp[j]) > i) begin tmp[i][j] = b[c]; c++; end
    end
    for (int j = 0; j < 8; j++) begin
      vec_t v, x;
      int n = popc(shp[j]), q = 0;
      for (int r = 0; r < 8; r++) v[r] = (r < n) ? tmp[r][j] : 0;
      x = xform(v, n, 1);
      for (int r = 0; r < 8; r++) if (shp[j][r]) begin out[r][j] = x[q]; q++; end
    end
    return out;
  endfunction

endpackage
