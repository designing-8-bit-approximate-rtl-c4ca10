// mult2_approx: 2-bit x 2-bit multiplier, exact (M5) or one of the four
// approximate kinds M1..M4, selected by the parameter KIND.
//
// The approximate kinds differ from the exact product only in a few input
// pairs:
//   M1: 3 x 3 = 7 (exact 9); the carry into bit 3 is dropped and bit 1 becomes
//       an OR.
//   M2: 1 x 1 = 0, 1 x 3 = 3 x 1 = 2; bit 0 is set only for 3 x 3.
//   M3: 3 x 3 = 11; bit 2 is cleared and bit 1 is an OR.
//   M4: 3 x 3 = 5; bit 3 is dropped and bit 2 is a plain AND.
// These truth tables follow the document. The gate equations below were
// derived from the tables for this design; each kind is a handful of 2- to
// 4-input AND/OR/XOR terms and maps onto a single 4-input LUT per output bit.
//
// Interface: a, b unsigned 2-bit operands; p is the 4-bit product.
// Timing: purely combinational, no clock or reset.
module mult2_approx
  import ish_pkg::*;
#(
  parameter m2_kind_e KIND = M5
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp01, pp10, pp11;  // partial products a[i] & b[j] as ppij
  logic all4;                    // a == 3 && b == 3

  assign pp00 = a[0] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp10 = a[1] & b[0];
  assign pp11 = a[1] & b[1];
  assign all4 = pp00 & pp11;

  always_comb begin
    unique case (KIND)
      M1: p = {1'b0, pp11, pp10 | pp01, pp00};
      M2: p = {all4, pp11 & ~pp00, pp10 ^ pp01, all4};
      M3: p = {all4, pp11 & ~pp00, pp10 | pp01, pp00};
      M4: p = {1'b0, pp11, pp10 ^ pp01, pp00};
      default: p = {all4, pp11 & ~pp00, pp10 ^ pp01, pp00};  // M5, exact
    endcase
  end

endmodule
