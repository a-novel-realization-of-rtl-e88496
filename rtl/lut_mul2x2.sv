// lut_mul2x2: 2x2 unsigned multiplier built from a 4-to-1 multiplexer.
//
// Operand a drives the select of a 4x1 multiplexer whose four data inputs are
// the four possible products a*b:
//   a = 00 -> 0000
//   a = 01 -> 00bb   (b itself)
//   a = 10 -> 0bb0   (b shifted left by one)
//   a = 11 -> TRIPLE[b], a small lookup table of 3*b = 0, 3, 6, 9
// No adder is needed: the only product that is not a shift of b (3*b) is
// read from the table, which is addressed by b. The structure, the input
// ordering and the table contents follow the 2x2 LUT multiplier design this
// RTL implements; the table is a constant array, computed as 3*i.
// Interface: a[1:0], b[1:0] in, o[3:0] = a*b out. Purely combinational, one
// multiplexer level plus the table read.
module lut_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] o
);
  // Lookup table of 3*b, indexed by b.
  localparam logic [3:0] TRIPLE [4] = '{4'd0, 4'd3, 4'd6, 4'd9};

  always_comb begin
    unique case (a)
      2'b00: o = 4'b0000;
      2'b01: o = {2'b00, b};
      2'b10: o = {1'b0, b, 1'b0};
      2'b11: o = TRIPLE[b];
    endcase
  end
endmodule
