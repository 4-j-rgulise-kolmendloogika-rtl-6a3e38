// tb_ternary_pkg: reference arithmetic for the ternary testbenches.
//
// Converts between trit codes and integers -1/0/+1 and computes the expected
// results of the ternary gates with ordinary integer arithmetic, so that the
// testbenches never reuse the case tables of the blocks they check.
package tb_ternary_pkg;
  import ternary_pkg::*;

  function automatic int t2i(logic [1:0] t);
    if (t == 2'b01) return 1;
    if (t == 2'b10) return -1;
    return 0;
  endfunction

  function automatic trit_t i2t(int v);
    if (v > 0) return T_PLUS;
    if (v < 0) return T_MINUS;
    return T_ZERO;
  endfunction

  // v wrapped into -1..+1 modulo 3
  function automatic int bal_mod3(int v);
    int r;
    r = ((v % 3) + 3) % 3;
    return (r == 2) ? -1 : r;
  endfunction

  // carry of v = 3*carry + bal_mod3(v)
  function automatic int bal_carry(int v);
    return (v - bal_mod3(v)) / 3;
  endfunction

  function automatic int sgn(int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  // Value of a plus/minus line pair: p alone +1, m alone -1, else 0.
  function automatic int pm(logic p, logic m);
    if (p && !m) return 1;
    if (m && !p) return -1;
    return 0;
  endfunction

  // All four two-wire codes, including the unused 2'b11 (reads as 0).
  function automatic logic [1:0] code(int k);
    return 2'(k);
  endfunction
endpackage
