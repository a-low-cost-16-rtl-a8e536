// dct_pkg - constants and elaboration-time helpers shared by the HEVC 16/32-point DCT.
//
// hevc_coef(N, i, j) gives element (i, j) of the N-point HEVC integer transform matrix
// (N = 4, 8, 16, 32).  Every element of every size is +/- one of 33 integers indexed by the
// angle i*(2j+1)*(32/N) in units of pi/64; HEVC_BASE[k] is the standard's integer
// approximation of 64*sqrt(2)*cos(k*pi/64) (with HEVC_BASE[0] = 64 for the DC row).
//
// Odd-block schedules.  The odd part of an N-point DCT is the (N/2)x(N/2) matrix O formed by
// the odd rows of T_N restricted to its first N/2 columns.  Every row of O is a signed
// permutation of the same N/2 magnitudes, so M = N/2 configurable multipliers, each holding
// two constants, can serve every row if the multiplier inputs are permuted by muxes:
//   * the constant pair of multiplier i is (|O[r][j]|, |O[r'][j]|) for a fixed column j and
//     two rows r, r' whose column pairs form the same multiset; C2 picks the member;
//   * rows are grouped into such pairs (r, r'); row r uses C2 = 0, row r' uses C2 = 1, and
//     both use the same input permutation, numbered by C1;
//   * O<M>_MUXIN[i][p] is the butterfly output b_j fed to multiplier i under permutation p;
//   * O<M>_NEG[k] bit i is set when the coefficient multiplier i realises in row k is
//     negative.
// For M = 8 the constant pairs and their order follow the published 16-point odd block
// (pairs 90/80, 70/87, 57/25, 9/43, 87/9, 80/70, 43/57, 25/90, muxes 0..3 fed from
// b0,b3,b4,b7 and muxes 4..7 from b1,b2,b5,b6).  For M = 16 the same rule was applied with
// rows 0 and 2 as the reference pair; this gives 16 two-constant multipliers behind 8:1 muxes.
// The tables were derived from hevc_coef by that rule and are checked exhaustively by the
// odd_ctrl and odd_block testbenches.
//
// csd_* give the canonical signed digit (CSD) recoding of a positive constant, term t counted
// from the most significant non-zero digit; mux_mcm builds its shift-add network from them.
package dct_pkg;

  localparam int unsigned HEVC_BASE [33] = '{
    64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
    64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4, 0};

  function automatic int hevc_coef(int n, int i, int j);
    int a;
    a = (i * (2 * j + 1) * (32 / n)) % 128;
    if (a > 64) a = 128 - a;
    if (a > 32) return -int'(HEVC_BASE[64 - a]);
    return int'(HEVC_BASE[a]);
  endfunction

  function automatic int unsigned hevc_abs(int n, int i, int j);
    int c;
    c = hevc_coef(n, i, j);
    return (c < 0) ? int'(-c) : c;
  endfunction

  // ---------------- 16-point DCT: 8-point odd block (O8) ----------------
  localparam int unsigned O8_PAIR  [8][2] = '{'{90, 80}, '{70, 87}, '{57, 25}, '{9, 43},
                                              '{87, 9}, '{80, 70}, '{43, 57}, '{25, 90}};
  localparam int unsigned O8_MUXIN [8][4] = '{'{0, 4, 7, 3}, '{3, 0, 4, 7}, '{4, 7, 3, 0},
                                              '{7, 3, 0, 4}, '{1, 2, 6, 5}, '{2, 6, 5, 1},
                                              '{5, 1, 2, 6}, '{6, 5, 1, 2}};
  localparam int unsigned O8_C1    [8] = '{0, 1, 0, 1, 3, 2, 3, 2};
  localparam int unsigned O8_C2    [8] = '{0, 1, 1, 0, 0, 1, 1, 0};
  localparam int unsigned O8_NEG   [8] = '{0, 173, 38, 116, 184, 131, 97, 165};

  // ---------------- 32-point DCT: 16-point odd block (O16) ----------------
  localparam int unsigned O16_PAIR [16][2] = '{
    '{90, 88}, '{90, 67}, '{88, 31}, '{85, 13}, '{82, 54}, '{78, 82}, '{73, 90}, '{67, 78},
    '{61, 46}, '{54, 4}, '{46, 38}, '{38, 73}, '{31, 90}, '{22, 85}, '{13, 61}, '{4, 22}};
  localparam int unsigned O16_MUXIN [16][8] = '{
    '{0, 11, 8, 3, 15, 4, 7, 12}, '{1, 2, 6, 10, 14, 13, 9, 5}, '{2, 6, 10, 14, 13, 9, 5, 1},
    '{3, 15, 4, 7, 12, 0, 11, 8}, '{4, 7, 12, 0, 11, 8, 3, 15}, '{5, 1, 2, 6, 10, 14, 13, 9},
    '{6, 10, 14, 13, 9, 5, 1, 2}, '{7, 12, 0, 11, 8, 3, 15, 4}, '{8, 3, 15, 4, 7, 12, 0, 11},
    '{9, 5, 1, 2, 6, 10, 14, 13}, '{10, 14, 13, 9, 5, 1, 2, 6}, '{11, 8, 3, 15, 4, 7, 12, 0},
    '{12, 0, 11, 8, 3, 15, 4, 7}, '{13, 9, 5, 1, 2, 6, 10, 14}, '{14, 13, 9, 5, 1, 2, 6, 10},
    '{15, 4, 7, 12, 0, 11, 8, 3}};
  localparam int unsigned O16_C1   [16] = '{0, 1, 0, 5, 3, 2, 7, 2, 6, 3, 6, 7, 1, 4, 5, 4};
  localparam int unsigned O16_C2   [16] = '{0, 1, 1, 0, 0, 1, 1, 0, 0, 1, 1, 0, 0, 1, 1, 0};
  localparam int unsigned O16_NEG  [16] = '{0, 28381, 1016, 61923, 1923, 53089, 38733, 13158,
                                            52326, 64388, 12385, 38069, 27941, 22189, 3556,
                                            21845};

  // Number of input permutations (mux inputs) of the M-point odd block.
  function automatic int odd_npat(int m);
    return (m == 8) ? 4 : 8;
  endfunction

  function automatic int unsigned odd_pair(int m, int i, int c);
    if (m == 8) return O8_PAIR[i][c];
    return O16_PAIR[i][c];
  endfunction

  function automatic int unsigned odd_muxin(int m, int i, int p);
    if (m == 8) return O8_MUXIN[i][p];
    return O16_MUXIN[i][p];
  endfunction

  function automatic int unsigned odd_c1(int m, int k);
    if (m == 8) return O8_C1[k];
    return O16_C1[k];
  endfunction

  function automatic int unsigned odd_c2(int m, int k);
    if (m == 8) return O8_C2[k];
    return O16_C2[k];
  endfunction

  function automatic bit odd_neg(int m, int k, int i);
    int unsigned v;
    v = (m == 8) ? O8_NEG[k] : O16_NEG[k];
    return bit'((v >> i) & 1);
  endfunction

  // ---------------- CSD recoding ----------------
  // Non-zero digits of the CSD form of c, least significant first, as (position, negative).
  // Returns position (what = 0), sign (what = 1) of term t counted from the MSB, or the digit
  // count (what = 2).  Position is -1 for a term beyond the digit count.
  function automatic int csd_info(int unsigned c, int t, int what);
    int pos [16];
    int neg [16];
    int n;
    int p;
    longint v;
    n = 0;
    p = 0;
    v = longint'(c);
    for (int s = 0; s < 20; s++) begin
      if (v != 0) begin
        if (v % 2 != 0) begin
          pos[n] = p;
          if (v % 4 == 1) begin
            neg[n] = 0;
            v = v - 1;
          end else begin
            neg[n] = 1;
            v = v + 1;
          end
          n = n + 1;
        end
        v = v / 2;
        p = p + 1;
      end
    end
    if (what == 2) return n;
    if (t >= n) return (what == 0) ? -1 : 0;
    return (what == 0) ? pos[n - 1 - t] : neg[n - 1 - t];
  endfunction

  function automatic int csd_count(int unsigned c);
    return csd_info(c, 0, 2);
  endfunction

  function automatic int csd_pos(int unsigned c, int t);
    return csd_info(c, t, 0);
  endfunction

  function automatic bit csd_neg(int unsigned c, int t);
    return csd_info(c, t, 1) != 0;
  endfunction

endpackage
