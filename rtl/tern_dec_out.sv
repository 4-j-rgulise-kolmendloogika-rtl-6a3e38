// tern_dec_out: output decoder, one trit to two LED lines.
//
// m is lit for -, p is lit for +, both are dark for 0 (and for the unused
// code 11). Combinational. The thesis' listings disagree on which of the two
// outputs is the plus line; this block follows the version that names them
// xm and xp, so the names here carry the meaning.
module tern_dec_out
  import ternary_pkg::*;
(
  input  trit_t a,
  output logic  m,
  output logic  p
);

  trit_t an;
  assign an = trit_norm(a);
  assign m  = (an == T_MINUS);
  assign p  = (an == T_PLUS);

endmodule
