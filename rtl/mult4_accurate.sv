// mult4_accurate: exact 4-bit x 4-bit unsigned multiplier, the SMA4_4b slot of
// the 8-bit designs (the accurate multiplier of the SMApproxLib library).
//
// The library builds an n x n multiplier from 4 x 2 blocks whose two partial
// product rows are merged in LUTs and summed on a carry chain. This design keeps
// that organisation in portable RTL: each pair of multiplier bits (b[1:0],
// b[3:2]) forms one 4 x 2 row sum, and the two row sums are added with a
// weight of 4 between them. Mapping onto specific LUT primitives is left to
// synthesis, which is this design's choice.
//
// Interface: a, b unsigned 4-bit operands; p the 8-bit product.
// Timing: purely combinational.
module mult4_accurate (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [5:0] row_lo;  // a * b[1:0]
  logic [5:0] row_hi;  // a * b[3:2]

  always_comb begin
    row_lo = ({2'b00, a & {4{b[0]}}}) + ({1'b0, a & {4{b[1]}}, 1'b0});
    row_hi = ({2'b00, a & {4{b[2]}}}) + ({1'b0, a & {4{b[3]}}, 1'b0});
    p      = {2'b00, row_lo} + {row_hi, 2'b00};
  end

endmodule
