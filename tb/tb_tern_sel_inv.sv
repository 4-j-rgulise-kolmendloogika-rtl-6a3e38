// tb_tern_sel_inv: exhaustive self-checking testbench for tern_sel_inv.
//
// All four input codes with sub = 0 (output equals input) and sub = 1
// (output is the negated input).
module tb_tern_sel_inv;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  logic  sub;
  trit_t a, y;
  int checks = 0, failures = 0;

  tern_sel_inv dut (.sub(sub), .a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int s = 0; s < 2; s++) begin
      for (int k = 0; k < 4; k++) begin
        sub = 1'(s);
        a   = trit_t'(code(k));
        #1;
        exp_v = s ? -t2i(a) : t2i(a);
        checks++;
        if (y !== i2t(exp_v)) begin
          failures++;
          $display("FAIL sub=%0d a=%0d got %b", s, t2i(a), y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
