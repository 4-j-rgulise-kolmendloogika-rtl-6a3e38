// ternary_addsub_top: board-level top of the balanced ternary circuits.
//
// The main part is the 4-trit adder-subtractor (ternary_addsub) with the
// board signals of the original Nexys-3 build: eight slide switches give
// four trits (sw_p[i] / sw_m[i] = S<i>p / S<i>m), buttons give the store
// clock bclk, the subtract select sub and the carry-in pair cin_p / cin_m,
// and eight LEDs show the four result trits (led_m[i] / led_p[i] =
// l<i>m / l<i>p) with the carry-out on cout_m / cout_p.
//
// Beside it, on their own ports, stand the other circuits of the same
// family that the adder-subtractor does not use: a full subtractor
// (fs_*: fs_x2 - fs_x1 + fs_cin = 3*fs_cout + fs_o) and four two-input
// gates on a shared operand pair g_a, g_b: XOR, minimum, maximum and the
// equality comparator. All of these are combinational.
//
// The reset input rst is this design's addition; it clears the operand
// register of the adder-subtractor.
module ternary_addsub_top
  import ternary_pkg::*;
#(
  parameter int unsigned TRITS = 4
) (
  input  logic             rst,
  input  logic             bclk,
  input  logic             sub,
  input  logic [TRITS-1:0] sw_p,
  input  logic [TRITS-1:0] sw_m,
  input  logic             cin_p,
  input  logic             cin_m,
  output logic [TRITS-1:0] led_m,
  output logic [TRITS-1:0] led_p,
  output logic             cout_m,
  output logic             cout_p,

  input  trit_t            fs_x1,
  input  trit_t            fs_x2,
  input  trit_t            fs_cin,
  output trit_t            fs_o,
  output trit_t            fs_cout,

  input  trit_t            g_a,
  input  trit_t            g_b,
  output trit_t            g_xor,
  output trit_t            g_min,
  output trit_t            g_max,
  output trit_t            g_cmp
);

  ternary_addsub #(.TRITS(TRITS)) u_addsub (
    .rst   (rst),
    .bclk  (bclk),
    .sub   (sub),
    .in_p  (sw_p),
    .in_m  (sw_m),
    .cin_p (cin_p),
    .cin_m (cin_m),
    .out_m (led_m),
    .out_p (led_p),
    .cout_m(cout_m),
    .cout_p(cout_p)
  );

  tern_full_sub u_full_sub (.x1(fs_x1), .x2(fs_x2), .cin(fs_cin), .o(fs_o), .cout(fs_cout));

  tern_xor u_xor (.a(g_a), .b(g_b), .y(g_xor));
  tern_min u_min (.a(g_a), .b(g_b), .y(g_min));
  tern_max u_max (.a(g_a), .b(g_b), .y(g_max));
  tern_cmp u_cmp (.a(g_a), .b(g_b), .y(g_cmp));

endmodule
