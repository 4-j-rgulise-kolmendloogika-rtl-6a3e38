// tern_min: minimum of two trits (ternary AND).
//
// Purely combinational two-input ternary gate. Inputs and output are
// ternary_pkg::trit_t (00 = 0, 01 = +, 10 = -); the unused code 11 on an
// input is treated as 0. No clock, no latency.
// The table is the one in the thesis; the gate is not used by the adder-subtractor.
module tern_min
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);

  trit_t an, bn;
  assign an = trit_norm(a);
  assign bn = trit_norm(b);

  always_comb begin
    // Order - < 0 < +.
    if (an == T_MINUS || bn == T_MINUS)    y = T_MINUS;
    else if (an == T_ZERO || bn == T_ZERO) y = T_ZERO;
    else                                   y = T_PLUS;
  end

endmodule
