// mult4_slot: one 4 x 4 position of an 8 x 8 ISH multiplier. The packed
// configuration CFG (see ish_pkg) chooses what fills it:
//   SLOT_RECURSIVE  a recursive R_abcd (mult4_recursive) with the 2x2 kinds
//                   given in CFG,
//   SLOT_ACCURATE   the exact 4 x 4 multiplier (mult4_accurate, SMA4_4b),
//   SLOT_EXTERNAL   no logic here: the product of a 4 x 4 multiplier outside
//                   this design (SMApproxLib Approx2/Approx3) arrives on ext_p.
// The choice is made at elaboration, so only the selected hardware exists.
//
// Interface: a, b the 4-bit operand halves; ext_p the external product (used
// only by SLOT_EXTERNAL); p the 9-bit slot product (9 bits because an
// approximate R_abcd may exceed 255, see mult4_recursive).
// Timing: purely combinational.
module mult4_slot
  import ish_pkg::*;
#(
  parameter mult4_cfg_t CFG = R4335
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [7:0] ext_p,
  output logic [8:0] p
);

  if (CFG.kind == SLOT_RECURSIVE) begin : g_rec
    mult4_recursive #(.HH(CFG.hh), .HL(CFG.hl), .LH(CFG.lh), .LL(CFG.ll))
      u_rec (.a(a), .b(b), .p(p));
  end else if (CFG.kind == SLOT_ACCURATE) begin : g_acc
    logic [7:0] p_acc;
    mult4_accurate u_acc (.a(a), .b(b), .p(p_acc));
    assign p = {1'b0, p_acc};
  end else begin : g_ext
    assign p = {1'b0, ext_p};
  end

endmodule
