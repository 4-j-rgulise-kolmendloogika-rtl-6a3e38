// tern_cons: consensus of two trits.
//
// Purely combinational two-input ternary gate. Inputs and output are
// ternary_pkg::trit_t (00 = 0, 01 = +, 10 = -); the unused code 11 on an
// input is treated as 0. No clock, no latency.
// The table is the one in the thesis; it is the carry of a two-trit sum.
module tern_cons
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
    // Equal inputs pass through, any disagreement gives 0. This is the carry
    // of a two-trit sum: only ++ and -- overflow.
    y = (an == bn) ? an : T_ZERO;
  end

endmodule
