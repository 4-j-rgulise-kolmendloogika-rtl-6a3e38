// tern_sel_inv: inverter with a select input.
//
// Combinational. With sub = 0 the trit passes unchanged, with sub = 1 it is
// negated. This is the thesis' way of turning the adder into a subtractor:
// the switch operand goes through this block before the full adder. The
// unused code 11 leaves as 0 in both modes, as in the original description.
module tern_sel_inv
  import ternary_pkg::*;
(
  input  logic  sub,
  input  trit_t a,
  output trit_t y
);

  always_comb begin
    if (sub) y = trit_neg(a);
    else     y = trit_norm(a);
  end

endmodule
