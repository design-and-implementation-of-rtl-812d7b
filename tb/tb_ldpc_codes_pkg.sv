// tb_ldpc_codes_pkg: base matrices in natural (unscheduled) order and a behavioural encoder,
// used by the testbenches as an independent reference. Entry -1 is a zero block; an entry p >= 0
// is the identity cyclically shifted right by p(i,j,Zf): floor(p*Zf/96) for the 802.16e code and
// p mod Zf for the 802.11n code. Row r of such a block has its one in column (r + p) mod Zf.
package tb_ldpc_codes_pkg;
  localparam int H16E_R12 [12][24] = '{
    '{-1, 94, 73, -1, -1, -1, -1, -1, 55, 83, -1, -1, 7, 0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, 27, -1, -1, -1, 22, 79, 9, -1, -1, -1, 12, -1, 0, 0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, 24, 22, 81, -1, 33, -1, -1, -1, 0, -1, -1, 0, 0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{61, -1, 47, -1, -1, -1, -1, -1, 65, 25, -1, -1, -1, -1, -1, 0, 0, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, 39, -1, -1, -1, 84, -1, -1, 41, 72, -1, -1, -1, -1, -1, 0, 0, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, 46, 40, -1, 82, -1, -1, -1, 79, 0, -1, -1, -1, -1, 0, 0, -1, -1, -1, -1, -1},
    '{-1, -1, 95, 53, -1, -1, -1, -1, -1, 14, 18, -1, -1, -1, -1, -1, -1, -1, 0, 0, -1, -1, -1, -1},
    '{-1, 11, 73, -1, -1, -1, 2, -1, -1, 47, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 0, -1, -1, -1},
    '{12, -1, -1, -1, 83, 24, -1, 43, -1, -1, -1, 51, -1, -1, -1, -1, -1, -1, -1, -1, 0, 0, -1, -1},
    '{-1, -1, -1, -1, -1, 94, -1, 59, -1, -1, 70, 72, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 0, -1},
    '{-1, -1, 7, 65, -1, -1, -1, -1, 39, 49, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 0},
    '{43, -1, -1, -1, -1, 66, -1, 41, -1, -1, -1, 26, 7, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0}};
  localparam int H11N_R56 [4][24] = '{
    '{48, 29, 37, 52, 2, 16, 6, 14, 53, 31, 34, 5, 18, 42, 53, 31, 45, -1, 46, 52, 1, 0, -1, -1},
    '{17, 4, 30, 7, 43, 11, 24, 6, 14, 21, 6, 39, 17, 40, 47, 7, 15, 41, 19, -1, -1, 0, 0, -1},
    '{7, 2, 51, 31, 46, 23, 16, 11, 53, 40, 10, 7, 46, 53, 33, 35, -1, 25, 35, 38, 0, -1, 0, 0},
    '{19, 48, 41, 1, 10, 7, 36, 47, 5, 29, 52, 52, 31, 10, 26, 6, 3, 2, -1, 51, 1, -1, -1, 0}};

  localparam int LN = 96;
  typedef logic [LN-1:0] col_t;
  typedef logic [23:0][LN-1:0] cw_t;

  function automatic int nrows(input bit code);
    return code ? 4 : 12;
  endfunction

  function automatic int hval(input bit code, input int i, input int j);
    return code ? H11N_R56[i][j] : H16E_R12[i][j];
  endfunction

  function automatic int shift_of(input bit code, input int i, input int j, input int z);
    int p;
    p = hval(code, i, j);
    if (p <= 0) return p;
    return code ? (p % z) : (p * z) / 96;
  endfunction

  // (P_s * v)[r] = v[(r+s) mod z]
  function automatic col_t rot(input col_t v, input int s, input int z);
    col_t o;
    o = '0;
    for (int r = 0; r < z; r++) o[r] = v[(r + s) % z];
    return o;
  endfunction

  // Encoder of section 2.2: p1 = sum of all block rows of A*x, then the dual diagonal.
  function automatic void encode(input bit code, input int z, inout cw_t cw);
    int mb, kb;
    col_t lam [12];
    col_t p1, acc;
    mb = nrows(code);
    kb = 24 - mb;
    for (int i = 0; i < mb; i++) begin
      lam[i] = '0;
      for (int j = 0; j < kb; j++)
        if (hval(code, i, j) >= 0) lam[i] ^= rot(cw[j], shift_of(code, i, j, z), z);
    end
    p1 = '0;
    for (int i = 0; i < mb; i++) p1 ^= lam[i];
    cw[kb] = p1;
    acc = '0;
    for (int i = 0; i < mb - 1; i++) begin
      acc ^= lam[i];
      if (hval(code, i, kb) >= 0) acc ^= rot(p1, shift_of(code, i, kb, z), z);
      cw[kb + 1 + i] = acc;
    end
  endfunction

  // Number of unsatisfied parity checks of H * cw^T.
  function automatic int syndrome_weight(input bit code, input int z, input cw_t cw);
    int w;
    col_t s;
    w = 0;
    for (int i = 0; i < nrows(code); i++) begin
      s = '0;
      for (int j = 0; j < 24; j++)
        if (hval(code, i, j) >= 0) s ^= rot(cw[j], shift_of(code, i, j, z), z);
      for (int r = 0; r < z; r++) w += int'(s[r]);
    end
    return w;
  endfunction
endpackage
