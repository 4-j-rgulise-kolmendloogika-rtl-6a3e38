// ternary_pkg: shared type for balanced ternary (trit values -1, 0, +1).
//
// A trit is carried on two wires. The code follows the thesis package:
// 2'b00 = 0, 2'b01 = +1, 2'b10 = -1. The fourth code, 2'b11, never leaves a
// block of this design; every gate reads it as 0, as the original
// descriptions fall back to zero for any other value.
package ternary_pkg;

  typedef enum logic [1:0] {
    T_ZERO  = 2'b00,
    T_PLUS  = 2'b01,
    T_MINUS = 2'b10
  } trit_t;

  // Normalise a raw two-wire code: the unused code 2'b11 becomes T_ZERO.
  function automatic trit_t trit_norm(logic [1:0] raw);
    unique case (raw)
      2'b01:   return T_PLUS;
      2'b10:   return T_MINUS;
      default: return T_ZERO;
    endcase
  endfunction

  // Negation: swaps the plus and minus codes.
  function automatic trit_t trit_neg(trit_t a);
    trit_t an;
    an = trit_norm(a);
    unique case (an)
      T_PLUS:  return T_MINUS;
      T_MINUS: return T_PLUS;
      default: return T_ZERO;
    endcase
  endfunction

endpackage
