// tb_tern_min: exhaustive self-checking testbench for tern_min.
//
// Applies all 16 pairs of two-wire input codes (including the unused code
// 11, which must act as 0) and compares the output with the smaller value computed
// from integer values of the inputs.
module tb_tern_min;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  trit_t a, b, y;
  int checks = 0, failures = 0;

  tern_min dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, bi, exp_v;
    for (int ka = 0; ka < 4; ka++) begin
      for (int kb = 0; kb < 4; kb++) begin
        a = trit_t'(code(ka));
        b = trit_t'(code(kb));
        #1;
        ai = t2i(a);
        bi = t2i(b);
        exp_v = (ai < bi) ? ai : bi;
        checks++;
        if (y !== i2t(exp_v)) begin
          failures++;
          $display("FAIL a=%0d b=%0d: got %b expected %0d", ai, bi, y, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
