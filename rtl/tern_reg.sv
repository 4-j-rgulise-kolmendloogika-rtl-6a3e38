// tern_reg: one-trit register loaded on the falling edge of bclk.
//
// bclk is a push button on the board, not a free-running clock: the trit on
// d is captured when the button is released (falling edge), as in the
// thesis. The asynchronous active-high reset, which clears the stored trit
// to 0, is this design's addition; the original register has none.
module tern_reg
  import ternary_pkg::*;
(
  input  logic  rst,
  input  logic  bclk,
  input  trit_t d,
  output trit_t q
);

  always_ff @(negedge bclk or posedge rst) begin
    if (rst) q <= T_ZERO;
    else     q <= trit_norm(d);
  end

endmodule
