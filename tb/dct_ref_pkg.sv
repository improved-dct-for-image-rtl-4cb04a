// dct_ref_pkg: reference model for the testbenches.
//
// Holds the 8-point approximate DCT matrix T_p written out entry by entry and
// computes transforms by plain matrix products, independently of the
// butterfly factorization the RTL uses.
package dct_ref_pkg;

  typedef int vec8_t [8];
  typedef int blk8_t [8][8];

  localparam int T [8][8] = '{
    '{ 1,  1,  1,  1,  1,  1,  1,  1},
    '{ 0,  1,  0,  0,  0,  0, -1,  0},
    '{ 1,  0,  0, -1, -1,  0,  0,  1},
    '{ 1,  0,  0,  0,  0,  0,  0, -1},
    '{ 1, -1, -1,  1,  1, -1, -1,  1},
    '{ 0,  0,  0,  1, -1,  0,  0,  0},
    '{ 0, -1,  1,  0,  0,  1, -1,  0},
    '{ 0,  0,  1,  0,  0, -1,  0,  0}
  };

  // X = T * x
  function automatic vec8_t dct8(input vec8_t x);
    vec8_t y;
    for (int k = 0; k < 8; k++) begin
      y[k] = 0;
      for (int n = 0; n < 8; n++) y[k] += T[k][n] * x[n];
    end
    return y;
  endfunction

  // Y = T * X * T^T
  function automatic blk8_t dct8x8(input blk8_t x);
    blk8_t z, y;
    for (int r = 0; r < 8; r++)
      for (int u = 0; u < 8; u++) begin
        z[r][u] = 0;
        for (int c = 0; c < 8; c++) z[r][u] += T[u][c] * x[r][c];
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        y[v][u] = 0;
        for (int r = 0; r < 8; r++) y[v][u] += T[v][r] * z[r][u];
      end
    return y;
  endfunction

endpackage
