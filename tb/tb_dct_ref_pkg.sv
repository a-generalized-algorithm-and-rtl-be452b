// tb_dct_ref_pkg: reference model of the recursive approximate DCT, for the
// testbenches.
//
// Works entry by entry on the transform matrix instead of on the adder
// network. The N-point kernel C_N follows from the 8-point kernel T8 by
//   C_N[2k][j]   =  C_(N/2)[k][j]          j <  N/2
//   C_N[2k][j]   =  C_(N/2)[k][N-1-j]      j >= N/2
//   C_N[2k+1][j] =  C_(N/2)[k][j]          j <  N/2
//   C_N[2k+1][j] = -C_(N/2)[k][N-1-j]     j >= N/2
// i.e. butterfly, two half-size transforms, even/odd interleave. kern()
// unrolls that recursion iteratively.
package tb_dct_ref_pkg;

  localparam int T8 [8][8] = '{
    '{ 1,  1,  1,  1,  1,  1,  1,  1},
    '{ 1,  1,  1,  0,  0, -1, -1, -1},
    '{ 1,  0,  0, -1, -1,  0,  0,  1},
    '{ 1,  0, -1, -1,  1,  1,  0, -1},
    '{ 1, -1, -1,  1,  1, -1, -1,  1},
    '{ 1, -1,  0,  1, -1,  0,  1, -1},
    '{ 0, -1,  1,  0,  0,  1, -1,  0},
    '{ 0, -1,  1, -1,  1, -1,  1,  0}
  };

  // Entry (k, j) of the n-point kernel, n = 8, 16, 32, ...
  function automatic int kern(int n, int k, int j);
    int sgn;
    int nn;
    int kk;
    int jj;
    sgn = 1;
    nn  = n;
    kk  = k;
    jj  = j;
    while (nn > 8) begin
      if (jj >= nn/2) begin
        jj = nn - 1 - jj;
        if (kk % 2 == 1) sgn = -sgn;
      end
      kk = kk / 2;
      nn = nn / 2;
    end
    return sgn * T8[kk][jj];
  endfunction

  // Coefficient k of the n-point transform of x[base .. base+n-1].
  function automatic int coef(int n, int k, const ref int x[32], input int base);
    int s;
    s = 0;
    for (int j = 0; j < n; j++) s += kern(n, k, j) * x[base + j];
    return s;
  endfunction

  // Signed random value of the given width.
  function automatic int rnd(int w);
    int v;
    v = int'($urandom_range((1 << w) - 1, 0));
    if (v >= (1 << (w - 1))) v -= (1 << w);
    return v;
  endfunction

endpackage
