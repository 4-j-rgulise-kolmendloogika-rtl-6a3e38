// tern_any: accept-anything (gullibility) of two trits.
//
// Purely combinational two-input ternary gate. Inputs and output are
// ternary_pkg::trit_t (00 = 0, 01 = +, 10 = -); the unused code 11 on an
// input is treated as 0. No clock, no latency.
// Opposite inputs give 0, as in the thesis listing (its printed table says + there; the listing is what the full adder needs).
module tern_any
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
    // The sign of a+b: a non-zero input wins over 0, opposite inputs cancel.
    if (an == T_ZERO)      y = bn;
    else if (bn == T_ZERO) y = an;
    else if (an == bn)     y = an;
    else                   y = T_ZERO;
  end

endmodule
