// ish_mult8_top: the proposed 8-bit Internal Self-Healing multipliers, side by
// side on one pair of operands.
//
// Two Pareto fronts are held:
//   p_power[0..4]  the power-optimized designs (4 x 4 slots HH, HL, LH, LL):
//                  R1311 R1311 R1311 R1311,  R1315 R1311 R1311 R1311,
//                  R4335 R1315 R1311 R1311,  R4335 R1315 R1315 R1311,
//                  R4335 R1315 R1315 R1315   (least to most accurate).
//   p_area[0..4]   the area-optimized designs:
//                  SMA2 SMA2 SMA2 SMA2,  SMA4 SMA2 SMA2 SMA2,
//                  SMA4 SMA2 SMA4 SMA3,  SMA4 SMA4 SMA4 SMA3,
//                  SMA4 SMA4 R3311 SMA3.
// Every design is an mult8_ish; the choice of 4 x 4 multiplier per slot follows
// the document's two Pareto tables. SMA4 is the exact 4 x 4 multiplier built
// here. SMA2 and SMA3 (SMApproxLib Approx2 and Approx3) are library cells whose
// logic this design does not contain: each such slot takes its product from
// ext_p_area[design][slot], where the caller connects an Approx2/Approx3 4 x 4
// multiplier fed with the slot's operand nibbles (HH: a[7:4] x b[7:4],
// HL: a[7:4] x b[3:0], LH: a[3:0] x b[7:4], LL: a[3:0] x b[3:0]). Entries of
// ext_p_area for slots built here are unused.
//
// Products are 17 bits wide (see mult8_ish). Bit 16 is always 0 for the power
// designs, and for the area designs whenever the external cells return at
// most 225, the largest exact 4 x 4 product.
// Timing: purely combinational, no clock or reset; each design is evaluated
// in full every time a or b change.
module ish_mult8_top
  import ish_pkg::*;
(
  input  logic [7:0]                   a,
  input  logic [7:0]                   b,
  input  logic [N_AREA-1:0][3:0][7:0]  ext_p_area,
  output logic [N_POWER-1:0][16:0]     p_power,
  output logic [N_AREA-1:0][16:0]      p_area
);

  // Slot configurations of design d, slot s (SUB_HH, SUB_HL, SUB_LH, SUB_LL).
  function automatic mult4_cfg_t power_cfg(int unsigned d, int unsigned s);
    mult4_cfg_t row [4];
    case (d)
      0:       row = '{R1311, R1311, R1311, R1311};
      1:       row = '{R1315, R1311, R1311, R1311};
      2:       row = '{R4335, R1315, R1311, R1311};
      3:       row = '{R4335, R1315, R1315, R1311};
      default: row = '{R4335, R1315, R1315, R1315};
    endcase
    return row[s];
  endfunction

  function automatic mult4_cfg_t area_cfg(int unsigned d, int unsigned s);
    mult4_cfg_t row [4];
    case (d)
      0:       row = '{SMA2, SMA2, SMA2,  SMA2};
      1:       row = '{SMA4, SMA2, SMA2,  SMA2};
      2:       row = '{SMA4, SMA2, SMA4,  SMA3};
      3:       row = '{SMA4, SMA4, SMA4,  SMA3};
      default: row = '{SMA4, SMA4, R3311, SMA3};
    endcase
    return row[s];
  endfunction

  for (genvar d = 0; d < N_POWER; d++) begin : g_power
    mult8_ish #(
      .CFG_HH(power_cfg(d, SUB_HH)),
      .CFG_HL(power_cfg(d, SUB_HL)),
      .CFG_LH(power_cfg(d, SUB_LH)),
      .CFG_LL(power_cfg(d, SUB_LL))
    ) u_mult (
      .a    (a),
      .b    (b),
      .ext_p('0),  // power designs have no external slots
      .p    (p_power[d])
    );
  end

  for (genvar d = 0; d < N_AREA; d++) begin : g_area
    mult8_ish #(
      .CFG_HH(area_cfg(d, SUB_HH)),
      .CFG_HL(area_cfg(d, SUB_HL)),
      .CFG_LH(area_cfg(d, SUB_LH)),
      .CFG_LL(area_cfg(d, SUB_LL))
    ) u_mult (
      .a    (a),
      .b    (b),
      .ext_p(ext_p_area[d]),
      .p    (p_area[d])
    );
  end

endmodule
