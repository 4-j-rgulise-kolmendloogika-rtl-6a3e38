// tern_full_sub: balanced ternary full subtractor.
//
// The full adder with its x1 operand negated by an inverter, as in the
// thesis' listing: o and cout satisfy x2 - x1 + cin = 3*cout + o. (The
// thesis' schematic appears to draw the inverter on x2 instead; the listing
// is followed.) Combinational.
module tern_full_sub
  import ternary_pkg::*;
(
  input  trit_t x1,
  input  trit_t x2,
  input  trit_t cin,
  output trit_t o,
  output trit_t cout
);

  trit_t x1_neg;

  tern_inv        u_inv   (.a(x1), .y(x1_neg));
  tern_full_adder u_adder (.x1(x1_neg), .x2(x2), .cin(cin), .s(o), .cout(cout));

endmodule
