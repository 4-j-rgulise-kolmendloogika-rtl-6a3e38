// tern_cmp: equality comparator of two trits.
//
// Purely combinational two-input ternary gate. Inputs and output are
// ternary_pkg::trit_t (00 = 0, 01 = +, 10 = -); the unused code 11 on an
// input is treated as 0. No clock, no latency.
// The table is the one in the thesis; the gate is not used by the adder-subtractor.
module tern_cmp
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
    // + when the inputs are equal, - otherwise (never 0).
    y = (an == bn) ? T_PLUS : T_MINUS;
  end

endmodule
