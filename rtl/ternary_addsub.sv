// ternary_addsub: TRITS-trit balanced ternary adder-subtractor with an
// operand register.
//
// Operands are entered on switch pairs (in_p[i], in_m[i]) per trit, trit 0
// being the least significant. Each pair is decoded to a trit (tern_dec_in).
// The decoded switch value goes two ways:
//   * into a TRITS-trit register (tern_reg) that loads on the falling edge of
//     bclk, the "store" button;
//   * through a selectable inverter (tern_sel_inv) that negates it when sub=1.
// A ripple chain of tern_full_adder cells forms
//     result = register + (sub ? -switches : switches) + carry-in
// where the carry-in trit is entered on its own pair (cin_p, cin_m). Each
// result trit and the final carry are shown on an LED pair (tern_dec_out):
// out_m[i] lit for -, out_p[i] lit for +. With TRITS = 4 a value spans
// -40..+40 and the carry-out extends the result by one trit of weight 81.
//
// Timing: everything except the register is combinational; the outputs
// follow the switches, sub and carry-in at once and the register value from
// the falling edge of bclk. Right after a store the register equals the
// switches, so the display shows the switch value added to itself until the
// switches change.
//
// This structure is the thesis' 4-trit design. The width parameter, the
// reset input rst (asynchronous, clears the register to 0) and the port
// names are this design's choices.
module ternary_addsub
  import ternary_pkg::*;
#(
  parameter int unsigned TRITS = 4
) (
  input  logic             rst,
  input  logic             bclk,
  input  logic             sub,
  input  logic [TRITS-1:0] in_p,
  input  logic [TRITS-1:0] in_m,
  input  logic             cin_p,
  input  logic             cin_m,
  output logic [TRITS-1:0] out_m,
  output logic [TRITS-1:0] out_p,
  output logic             cout_m,
  output logic             cout_p
);

  trit_t de    [TRITS];   // decoded switch trits
  trit_t de_n  [TRITS];   // after the selectable inverter
  trit_t r     [TRITS];   // registered operand
  trit_t s     [TRITS];   // result trits
  trit_t carry [TRITS+1]; // carry[0] = carry-in, carry[TRITS] = carry-out

  tern_dec_in u_dec_cin (.p(cin_p), .m(cin_m), .y(carry[0]));

  for (genvar i = 0; i < TRITS; i++) begin : g_trit
    tern_dec_in     u_dec_in  (.p(in_p[i]), .m(in_m[i]), .y(de[i]));
    tern_sel_inv    u_inv     (.sub(sub), .a(de[i]), .y(de_n[i]));
    tern_reg        u_reg     (.rst(rst), .bclk(bclk), .d(de[i]), .q(r[i]));
    tern_full_adder u_add     (.x1(r[i]), .x2(de_n[i]), .cin(carry[i]),
                               .s(s[i]), .cout(carry[i+1]));
    tern_dec_out    u_dec_out (.a(s[i]), .m(out_m[i]), .p(out_p[i]));
  end

  tern_dec_out u_dec_cout (.a(carry[TRITS]), .m(cout_m), .p(cout_p));

  // A trit is never shown as + and - at once.
  always_comb begin
    assert ((out_m & out_p) == '0 && !(cout_m && cout_p))
      else $error("ternary_addsub: LED pair lit for + and - together");
  end

endmodule
