// dct_ref_pkg: reference model of the fixed-point 2D DCT, for testbenches.
//
// It works on whole matrices with plain integer arithmetic, written from the
// algorithm rather than from the RTL: row pass R = round((2 * H x^T) / 64)
// row by row (the factor 2 is the zero bit appended to the DA word), column
// pass Z = round(sum_i H[k][i] * floor((R[i][p] +/- R[7-i][p]) / 2) / 64),
// with round(v / 64) = floor((v + 32) / 64) and H the 8x8 integer cosine
// matrix written out below. ortho_dct gives the real-valued orthonormal 2D
// DCT for a sanity bound on the fixed-point result.
package dct_ref_pkg;

  typedef int mat_t [8][8];

  localparam int H [8][8] = '{
    '{64,  64,  64,  64,  64,  64,  64,  64},
    '{89,  75,  50,  18, -18, -50, -75, -89},
    '{83,  36, -36, -83, -83, -36,  36,  83},
    '{75, -18, -89, -50,  50,  89,  18, -75},
    '{64, -64, -64,  64,  64, -64, -64,  64},
    '{50, -89,  18,  75, -75, -18,  89, -50},
    '{36, -83,  83, -36, -36,  83, -83,  36},
    '{18, -50,  75, -89,  89, -75,  50, -18}
  };

  function automatic int rnd6(int v);
    return (v + 32) >>> 6;
  endfunction

  // One row pass on a vector of samples (result of the row DCT, 12 bits).
  function automatic void row_pass(input int x [8], output int y [8]);
    for (int k = 0; k < 8; k++) begin
      int acc = 0;
      for (int n = 0; n < 8; n++) acc += H[k][n] * x[n];
      y[k] = rnd6(2 * acc);
    end
  endfunction

  // One column pass (butterfly halved to keep 12 bits, result 14 bits).
  function automatic void col_pass(input int u [8], output int y [8]);
    for (int k = 0; k < 8; k++) begin
      int acc = 0;
      for (int i = 0; i < 4; i++) begin
        int b = (k % 2 == 0) ? (u[i] + u[7-i]) : (u[i] - u[7-i]);
        acc += H[k][i] * (b >>> 1);
      end
      y[k] = rnd6(acc);
    end
  endfunction

  // z[k][p]: coefficient k of column p (the order the core emits them).
  function automatic void dct2d(input mat_t x, output mat_t z);
    mat_t r;
    for (int row = 0; row < 8; row++) begin
      int v [8], y [8];
      for (int n = 0; n < 8; n++) v[n] = x[row][n];
      row_pass(v, y);
      for (int k = 0; k < 8; k++) r[row][k] = y[k];
    end
    for (int p = 0; p < 8; p++) begin
      int u [8], y [8];
      for (int n = 0; n < 8; n++) u[n] = r[n][p];
      col_pass(u, y);
      for (int k = 0; k < 8; k++) z[k][p] = y[k];
    end
  endfunction

  // Orthonormal 2D DCT, element [k][p]: vertical frequency k, horizontal p.
  function automatic real ortho_dct(mat_t x, int k, int p);
    real s = 0.0;
    real pi = 3.14159265358979;
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++)
        s += x[m][n] * $cos((2*m+1)*k*pi/16.0) * $cos((2*n+1)*p*pi/16.0);
    s = s * ((k == 0) ? $sqrt(0.125) : 0.5) * ((p == 0) ? $sqrt(0.125) : 0.5);
    return s;
  endfunction

endpackage
