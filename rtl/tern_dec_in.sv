// tern_dec_in: input decoder, two switch bits to one trit.
//
// Each trit is entered on two switches, a plus line p and a minus line m.
// p alone gives +, m alone gives -, neither gives 0, and both together also
// give 0, exactly as the thesis' decoder table. Combinational.
module tern_dec_in
  import ternary_pkg::*;
(
  input  logic  p,
  input  logic  m,
  output trit_t y
);

  always_comb begin
    unique case ({p, m})
      2'b10:   y = T_PLUS;
      2'b01:   y = T_MINUS;
      default: y = T_ZERO;
    endcase
  end

endmodule
