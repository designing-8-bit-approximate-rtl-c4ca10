// mult8_ish: 8-bit x 8-bit approximate multiplier built with the Internal
// Self-Healing (ISH) method from four 4 x 4 multipliers.
//
// Each operand is split into a high and a low nibble. Four 4 x 4 slots compute
// A_H x B_H, A_H x B_L, A_L x B_H and A_L x B_L, and the results are summed as
//     p = 256*(A_H x B_H) + 16*(A_H x B_L) + 16*(A_L x B_H) + (A_L x B_L).
// Because every slot may be a different approximate multiplier, positive
// errors of one slot can cancel negative errors of another; the designs in
// the document are chosen so that the mean error over the expected input
// distribution is small. The recursive construction and the weights follow the
// document; the slot ordering of the two middle products is this design's
// reading of its MSM -> LSM notation.
//
// Parameters: CFG_HH, CFG_HL, CFG_LH, CFG_LL choose the 4 x 4 multiplier of each
// slot (see ish_pkg). Defaults give R_4335, R_1315, R_1315, R_1315, the most
// accurate power-optimized design of the document.
// Interface: a, b unsigned 8-bit operands; ext_p[SUB_*] the products of
// external 4 x 4 multipliers for slots configured SLOT_EXTERNAL (ignored
// otherwise); p the product, 17 bits wide because approximate slots may return
// more than 255 (for the power-optimized configurations of the document bit 16
// stays 0).
// Timing: purely combinational.
module mult8_ish
  import ish_pkg::*;
#(
  parameter mult4_cfg_t CFG_HH = R4335,
  parameter mult4_cfg_t CFG_HL = R1315,
  parameter mult4_cfg_t CFG_LH = R1315,
  parameter mult4_cfg_t CFG_LL = R1315
) (
  input  logic [7:0]       a,
  input  logic [7:0]       b,
  input  logic [3:0][7:0]  ext_p,
  output logic [16:0]      p
);

  logic [8:0] p_hh, p_hl, p_lh, p_ll;

  mult4_slot #(.CFG(CFG_HH)) u_hh (.a(a[7:4]), .b(b[7:4]), .ext_p(ext_p[SUB_HH]), .p(p_hh));
  mult4_slot #(.CFG(CFG_HL)) u_hl (.a(a[7:4]), .b(b[3:0]), .ext_p(ext_p[SUB_HL]), .p(p_hl));
  mult4_slot #(.CFG(CFG_LH)) u_lh (.a(a[3:0]), .b(b[7:4]), .ext_p(ext_p[SUB_LH]), .p(p_lh));
  mult4_slot #(.CFG(CFG_LL)) u_ll (.a(a[3:0]), .b(b[3:0]), .ext_p(ext_p[SUB_LL]), .p(p_ll));

  always_comb begin
    p = {p_hh, 8'h00}
      + {4'h0, p_hl, 4'h0}
      + {4'h0, p_lh, 4'h0}
      + {8'h00, p_ll};
  end

endmodule
