// mult4_recursive: 4-bit x 4-bit recursive multiplier R_abcd, built from four
// 2x2 multipliers (mult2_approx) whose kinds are set by parameters.
//
// Each operand is split into its high and low 2-bit halves. The four 2x2
// products are weighted and added as
//     p = 16*(A_H x B_H) + 4*(A_H x B_L) + 4*(A_L x B_H) + (A_L x B_L)
// which is the document's recursive construction. Errors of one approximate
// sub-multiplier can be partly cancelled by those of another (internal
// self-healing), as long as the sum stays an unsigned value; the largest
// possible sum (all four 2x2 multipliers of kind M3, which returns 11 for 3x3)
// is 16*11 + 4*11 + 4*11 + 11 = 275, so the 4x4 product is kept 9 bits wide
// rather than wrapping at 256. For the eight R_abcd of the design space the
// top bit is always 0.
//
// Parameters name the 2x2 kinds from the most significant sub-product to the
// least: HH = A_H x B_H, HL = A_H x B_L, LH = A_L x B_H, LL = A_L x B_L. That
// the first middle letter of R_abcd is A_H x B_L is this design's reading of
// the naming. Defaults give R_4335, the most significant slot of the better
// power-optimized 8-bit designs.
//
// Timing: purely combinational.
module mult4_recursive
  import ish_pkg::*;
#(
  parameter m2_kind_e HH = M4,
  parameter m2_kind_e HL = M3,
  parameter m2_kind_e LH = M3,
  parameter m2_kind_e LL = M5
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [8:0] p
);

  logic [3:0] p_hh, p_hl, p_lh, p_ll;

  mult2_approx #(.KIND(HH)) u_hh (.a(a[3:2]), .b(b[3:2]), .p(p_hh));
  mult2_approx #(.KIND(HL)) u_hl (.a(a[3:2]), .b(b[1:0]), .p(p_hl));
  mult2_approx #(.KIND(LH)) u_lh (.a(a[1:0]), .b(b[3:2]), .p(p_lh));
  mult2_approx #(.KIND(LL)) u_ll (.a(a[1:0]), .b(b[1:0]), .p(p_ll));

  always_comb begin
    p = {1'b0, p_hh, 4'b0000}
      + {3'b000, p_hl, 2'b00}
      + {3'b000, p_lh, 2'b00}
      + {5'b00000, p_ll};
  end

endmodule
