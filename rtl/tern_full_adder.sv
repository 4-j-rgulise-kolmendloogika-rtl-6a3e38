// tern_full_adder: balanced ternary full adder.
//
// Adds three trits x1 + x2 + cin (range -3..+3) and returns the sum trit s and
// the carry trit cout, so that x1 + x2 + cin = 3*cout + s. It is built from
// five gates, as in the thesis:
//   m1   = mod3(x1, x2)          partial sum
//   c1   = consensus(x1, x2)     carry of the first sum
//   s    = mod3(cin, m1)
//   c2   = consensus(m1, cin)    carry of the second sum
//   cout = accept_anything(c1, c2)
// c1 and c2 are never of opposite sign, so accept-anything just merges them.
// Combinational, no clock.
module tern_full_adder
  import ternary_pkg::*;
(
  input  trit_t x1,
  input  trit_t x2,
  input  trit_t cin,
  output trit_t s,
  output trit_t cout
);

  trit_t m1, c1, c2;

  tern_mod3 u_mod3_1 (.a(x1),  .b(x2),  .y(m1));
  tern_cons u_cons_1 (.a(x1),  .b(x2),  .y(c1));
  tern_mod3 u_mod3_2 (.a(cin), .b(m1),  .y(s));
  tern_cons u_cons_2 (.a(m1),  .b(cin), .y(c2));
  tern_any  u_any    (.a(c1),  .b(c2),  .y(cout));

endmodule
