// tern_mod3: sum of two trits modulo 3, in balanced form.
//
// Purely combinational two-input ternary gate. Inputs and output are
// ternary_pkg::trit_t (00 = 0, 01 = +, 10 = -); the unused code 11 on an
// input is treated as 0. No clock, no latency.
// The table is the one in the thesis (- + - gives +, + + + gives -).
module tern_mod3
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
    // Truth table written out: the result is a+b wrapped into -1..+1.
    unique case ({an, bn})
      {T_ZERO,  T_ZERO}, {T_PLUS, T_MINUS}, {T_MINUS, T_PLUS}: y = T_ZERO;
      {T_ZERO,  T_PLUS}, {T_PLUS, T_ZERO},  {T_MINUS, T_MINUS}: y = T_PLUS;
      default:                                                  y = T_MINUS;
    endcase
  end

endmodule
