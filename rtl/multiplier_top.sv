// multiplier_top: the two 4x4 unsigned multipliers side by side.
//
// p1_* is the LUT based multiplier (lut_mul4x4: four 2x2 multiplexer/LUT
// multipliers and a half/full adder network). p2_* is the partial product
// multiplier (pp_mul at N = 4: three stages that add the next partial product
// or bypass the adder when it is zero). Both compute the same function, an
// 8-bit product of two 4-bit operands; they are alternative realisations and
// each has its own operand and product ports so that they can be compared or
// used independently. There is no clock or reset: both are combinational,
// and the product follows the operands after the logic delay.
module multiplier_top (
  input  logic [3:0] p1_a,
  input  logic [3:0] p1_b,
  output logic [7:0] p1_o,
  input  logic [3:0] p2_a,
  input  logic [3:0] p2_b,
  output logic [7:0] p2_c
);
  lut_mul4x4 u_lut_mul (.a(p1_a), .b(p1_b), .o(p1_o));
  pp_mul #(.N(4)) u_pp_mul (.a(p2_a), .b(p2_b), .c(p2_c));
endmodule
