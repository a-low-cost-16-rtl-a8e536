// tb_ref_pkg - reference model for the DCT testbenches, written from the transform's
// definition rather than from the hardware's structure.
//
// coef(n, i, j) is element (i, j) of the n-point HEVC core transform: row i of T_n equals row
// i*32/n of T_32 on its first n columns, and T_32[i][j] = c(i*(2j+1) mod 128) where c(a)
// follows the cosine's symmetries (c(128-a) = c(a), c(64-a) = -c(a)) from the 33 integer
// magnitudes of the standard listed in MAG.  ref_dct computes a plain matrix-vector product;
// rshift is the HEVC rounding shift.
package tb_ref_pkg;
  typedef longint vec_t [32];

  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                              64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};

  function automatic int coef(int n, int i, int j);
    int a;
    a = ((i * (32 / n)) * (2 * j + 1)) % 128;
    if (a > 64) a = 128 - a;
    if (a > 32) return -MAG[64 - a];
    return MAG[a];
  endfunction

  // odd-part matrix O_{n/2}: odd rows, first n/2 columns
  function automatic int ocoef(int n, int k, int j);
    return coef(n, 2 * k + 1, j);
  endfunction

  function automatic vec_t ref_dct(int n, vec_t x);
    vec_t y;
    for (int i = 0; i < 32; i++) begin
      y[i] = 0;
      if (i < n)
        for (int j = 0; j < n; j++) y[i] += longint'(coef(n, i, j)) * x[j];
    end
    return y;
  endfunction

  function automatic longint rshift(longint v, int s);
    if (s == 0) return v;
    return (v + (longint'(1) << (s - 1))) >>> s;
  endfunction

  // uniform random integer in [-m, m]
  function automatic longint rnd(longint m);
    return longint'($urandom_range(32'(2 * m))) - m;
  endfunction
endpackage
