// tb_tern_inv: exhaustive self-checking testbench for tern_inv.
//
// All four input codes; the output must be the integer negation of the input.
module tb_tern_inv;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  trit_t a, y;
  int checks = 0, failures = 0;

  tern_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      a = trit_t'(code(k));
      #1;
      checks++;
      if (y !== i2t(-t2i(a))) begin
        failures++;
        $display("FAIL a=%0d got %b", t2i(a), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
