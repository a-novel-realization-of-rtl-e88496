// half_adder: one-bit half adder.
//
// Adds two bits and returns their sum and carry (s = x ^ y, cout = x & y).
// It is one of the adder cells of the LUT based 4x4 multiplier, which sums
// the products of its four 2x2 multipliers with half and full adders; the
// gate form used here is the textbook one, as no other is specified.
// Interface: inputs x, y; outputs s, cout. Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = x ^ y;
    cout = x & y;
  end
endmodule
