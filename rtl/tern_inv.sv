// tern_inv: ternary inverter (negation).
//
// Combinational: + becomes -, - becomes +, 0 stays 0 (as does the unused
// code 11). Input and output are ternary_pkg::trit_t. The function is the
// thesis' inverter; it is used on its own in the full subtractor.
module tern_inv
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);

  assign y = trit_neg(a);

endmodule
