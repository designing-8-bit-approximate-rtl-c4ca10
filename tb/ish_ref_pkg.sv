// ish_ref_pkg: reference models used by the testbenches of the ISH multiplier
// family. They are written from the behaviour tables of the 2x2 multipliers
// (a 4 x 4 lookup per kind) and the recursive weighting formulas, not from the
// gate equations of the RTL, so that a wrong gate or a wrong weight in the RTL
// shows up as a mismatch.
package ish_ref_pkg;

  // Behaviour tables of the 2x2 multipliers, index [kind-1][a][b].
  localparam int M2_TABLE [5][4][4] = '{
    // M1: 3x3 -> 7
    '{'{0, 0, 0, 0}, '{0, 1, 2, 3}, '{0, 2, 4, 6}, '{0, 3, 6, 7}},
    // M2: 1x1 -> 0, 1x3 and 3x1 -> 2
    '{'{0, 0, 0, 0}, '{0, 0, 2, 2}, '{0, 2, 4, 6}, '{0, 2, 6, 9}},
    // M3: 3x3 -> 11
    '{'{0, 0, 0, 0}, '{0, 1, 2, 3}, '{0, 2, 4, 6}, '{0, 3, 6, 11}},
    // M4: 3x3 -> 5
    '{'{0, 0, 0, 0}, '{0, 1, 2, 3}, '{0, 2, 4, 6}, '{0, 3, 6, 5}},
    // M5: exact
    '{'{0, 0, 0, 0}, '{0, 1, 2, 3}, '{0, 2, 4, 6}, '{0, 3, 6, 9}}
  };

  function automatic int m2_ref(int kind, int a, int b);
    return M2_TABLE[kind-1][a][b];
  endfunction

  // Recursive 4x4 R_abcd: kinds given as the four digits, MSM first.
  function automatic int r4_ref(int hh, int hl, int lh, int ll, int a, int b);
    int ah, al, bh, bl;
    ah = a / 4; al = a % 4; bh = b / 4; bl = b % 4;
    return 16 * m2_ref(hh, ah, bh) + 4 * m2_ref(hl, ah, bl)
         + 4 * m2_ref(lh, al, bh) + m2_ref(ll, al, bl);
  endfunction

  // A 4x4 multiplier named by a four-digit code such as 4335; code 0 is exact.
  function automatic int m4_ref(int code, int a, int b);
    if (code == 0) return a * b;
    return r4_ref(code / 1000, (code / 100) % 10, (code / 10) % 10, code % 10, a, b);
  endfunction

  // 8x8 from four 4x4 sub-products.
  function automatic int m8_combine(int phh, int phl, int plh, int pll);
    return 256 * phh + 16 * phl + 16 * plh + pll;
  endfunction

  // 8x8 with all slots given by code (see m4_ref).
  function automatic int m8_ref(int c_hh, int c_hl, int c_lh, int c_ll, int a, int b);
    return m8_combine(m4_ref(c_hh, a / 16, b / 16), m4_ref(c_hl, a / 16, b % 16),
                      m4_ref(c_lh, a % 16, b / 16), m4_ref(c_ll, a % 16, b % 16));
  endfunction

endpackage
