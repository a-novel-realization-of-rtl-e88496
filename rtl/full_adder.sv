// full_adder: one-bit full adder.
//
// Adds two bits and a carry in: s = x ^ y ^ cin, cout is the majority of the
// three inputs. Together with half_adder it makes up the adder network that
// combines the four 2x2 products of the LUT based 4x4 multiplier; the gate
// form is the textbook one, as no other is specified.
// Interface: inputs x, y, cin; outputs s, cout. Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end
endmodule
