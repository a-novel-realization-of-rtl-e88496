// lut_mul4x4: 4x4 unsigned multiplier made of four 2x2 LUT multipliers
// ("proposed-1").
//
// Each operand is split into a low and a high 2-bit half, AL/AH and BL/BH.
// Four lut_mul2x2 instances form the cross products
//   p0 = AL*BL (weight 1)   p1 = AH*BL (weight 4)
//   p2 = AL*BH (weight 4)   p3 = AH*BH (weight 16)
// and an adder network of half and full adders sums them:
//   o[1:0] = p0[1:0]
//   s[4:0] = p1 + p2                    4-bit ripple: HA + 3 FA
//   o[7:2] = {p3, p0[3:2]} + s          6-bit ripple: HA + 4 FA + sum bit
// The split into four 2x2 products feeding one adder block follows the
// multiplier design; the order of the additions and the use of ripple-carry
// chains are this design's own choice, as only "full adders and half adders"
// are specified. The top bit needs only the sum half of a half adder: its
// carry would be product bit 8, which is always 0 (15*15 = 225 fits in 8
// bits); an immediate assertion checks this in simulation.
// Interface: a[3:0], b[3:0] in, o[7:0] = a*b out. Purely combinational.
module lut_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] o
);
  logic [3:0] p0, p1, p2, p3;

  lut_mul2x2 u_mul_ll (.a(a[1:0]), .b(b[1:0]), .o(p0));
  lut_mul2x2 u_mul_hl (.a(a[3:2]), .b(b[1:0]), .o(p1));
  lut_mul2x2 u_mul_lh (.a(a[1:0]), .b(b[3:2]), .o(p2));
  lut_mul2x2 u_mul_hh (.a(a[3:2]), .b(b[3:2]), .o(p3));

  // First row: s = p1 + p2 (both of weight 4).
  logic [4:0] s;
  logic [3:0] c1;
  half_adder u_r1_ha0 (.x(p1[0]), .y(p2[0]),             .s(s[0]), .cout(c1[0]));
  full_adder u_r1_fa1 (.x(p1[1]), .y(p2[1]), .cin(c1[0]), .s(s[1]), .cout(c1[1]));
  full_adder u_r1_fa2 (.x(p1[2]), .y(p2[2]), .cin(c1[1]), .s(s[2]), .cout(c1[2]));
  full_adder u_r1_fa3 (.x(p1[3]), .y(p2[3]), .cin(c1[2]), .s(s[3]), .cout(c1[3]));
  assign s[4] = c1[3];

  // Second row: {p3, p0[3:2]} + s, all of weight 4.
  logic [5:0] x;
  logic [4:0] c2;
  assign x = {p3, p0[3:2]};
  half_adder u_r2_ha0 (.x(x[0]), .y(s[0]),             .s(o[2]), .cout(c2[0]));
  full_adder u_r2_fa1 (.x(x[1]), .y(s[1]), .cin(c2[0]), .s(o[3]), .cout(c2[1]));
  full_adder u_r2_fa2 (.x(x[2]), .y(s[2]), .cin(c2[1]), .s(o[4]), .cout(c2[2]));
  full_adder u_r2_fa3 (.x(x[3]), .y(s[3]), .cin(c2[2]), .s(o[5]), .cout(c2[3]));
  full_adder u_r2_fa4 (.x(x[4]), .y(s[4]), .cin(c2[3]), .s(o[6]), .cout(c2[4]));
  // Top bit: the sum half of a half adder; its carry would be product bit 8,
  // which is always 0.
  assign o[7] = x[5] ^ c2[4];

  // The dropped carry can never be set for 4-bit operands.
  always_comb begin
    assert (!(x[5] & c2[4])) else $error("lut_mul4x4: product overflowed 8 bits");
  end

  assign o[1:0] = p0[1:0];
endmodule
