// ish_pkg: types and named configurations shared by the Internal Self-Healing
// (ISH) multiplier family.
//
// An 8x8 ISH multiplier is built from four 4x4 multipliers, and a recursive 4x4
// multiplier R_abcd is built from four 2x2 multipliers Ma, Mb, Mc, Md. The
// letters are listed from the most significant sub-product (high x high) to the
// least significant one (low x low); the two middle letters are, in this order,
// high(A) x low(B) and low(A) x high(B). Which 2x2 kinds exist (M1..M5) and
// their truth tables follow the document; the slot ordering of the two middle
// sub-products is this design's reading of it.
//
// A 4x4 slot of the 8x8 multiplier can hold a recursive R_abcd, the exact
// SMApproxLib-style 4x4 (SMA4_4b), or a multiplier supplied from outside the
// design (the SMApproxLib Approx2/Approx3 cells, whose logic is not part of
// this RTL); in the last case the slot's product arrives on a port.
package ish_pkg;

  // 2x2 multiplier kinds. M1..M4 are approximate, M5 is exact.
  typedef enum logic [2:0] {
    M1 = 3'd1,  // 3x3 = 7
    M2 = 3'd2,  // 1x1 = 0, 1x3 = 3x1 = 2
    M3 = 3'd3,  // 3x3 = 11
    M4 = 3'd4,  // 3x3 = 5
    M5 = 3'd5   // exact
  } m2_kind_e;

  // What fills a 4x4 slot of the 8x8 multiplier.
  typedef enum logic [1:0] {
    SLOT_RECURSIVE = 2'd0,  // R_abcd from four 2x2 multipliers
    SLOT_ACCURATE  = 2'd1,  // exact 4x4 (SMA4_4b)
    SLOT_EXTERNAL  = 2'd2   // product supplied on a port
  } slot_kind_e;

  // Configuration of one 4x4 slot. The 2x2 kinds are used only when kind is
  // SLOT_RECURSIVE.
  typedef struct packed {
    slot_kind_e kind;
    m2_kind_e   hh;  // most significant 2x2 multiplier (A_H x B_H)
    m2_kind_e   hl;  // A_H x B_L
    m2_kind_e   lh;  // A_L x B_H
    m2_kind_e   ll;  // least significant 2x2 multiplier (A_L x B_L)
  } mult4_cfg_t;

  // Sub-product index inside a 2n x 2n recursive multiplier.
  localparam int unsigned SUB_HH = 0;
  localparam int unsigned SUB_HL = 1;
  localparam int unsigned SUB_LH = 2;
  localparam int unsigned SUB_LL = 3;

  // 4x4 multipliers of the reduced design space (Tables I, II, III).
  localparam mult4_cfg_t R1311 = '{kind: SLOT_RECURSIVE, hh: M1, hl: M3, lh: M1, ll: M1};
  localparam mult4_cfg_t R1315 = '{kind: SLOT_RECURSIVE, hh: M1, hl: M3, lh: M1, ll: M5};
  localparam mult4_cfg_t R4335 = '{kind: SLOT_RECURSIVE, hh: M4, hl: M3, lh: M3, ll: M5};
  localparam mult4_cfg_t R1555 = '{kind: SLOT_RECURSIVE, hh: M1, hl: M5, lh: M5, ll: M5};
  localparam mult4_cfg_t R5421 = '{kind: SLOT_RECURSIVE, hh: M5, hl: M4, lh: M2, ll: M1};
  localparam mult4_cfg_t R3511 = '{kind: SLOT_RECURSIVE, hh: M3, hl: M5, lh: M1, ll: M1};
  localparam mult4_cfg_t R3311 = '{kind: SLOT_RECURSIVE, hh: M3, hl: M3, lh: M1, ll: M1};
  localparam mult4_cfg_t R5155 = '{kind: SLOT_RECURSIVE, hh: M5, hl: M1, lh: M5, ll: M5};
  localparam mult4_cfg_t SMA4  = '{kind: SLOT_ACCURATE,  hh: M5, hl: M5, lh: M5, ll: M5};
  // Approx2 / Approx3 cells are supplied from outside (see header).
  localparam mult4_cfg_t SMA2  = '{kind: SLOT_EXTERNAL,  hh: M5, hl: M5, lh: M5, ll: M5};
  localparam mult4_cfg_t SMA3  = '{kind: SLOT_EXTERNAL,  hh: M5, hl: M5, lh: M5, ll: M5};

  // Number of designs of each Pareto front held by the top.
  localparam int unsigned N_POWER = 5;
  localparam int unsigned N_AREA  = 5;

endpackage
