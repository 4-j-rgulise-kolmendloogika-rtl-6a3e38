// tb_tern_dec_out: exhaustive self-checking testbench for tern_dec_out.
//
// For each input code the minus LED must be lit exactly for -1 and the plus
// LED exactly for +1.
module tb_tern_dec_out;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  trit_t a;
  logic  m, p;
  int checks = 0, failures = 0;

  tern_dec_out dut (.a(a), .m(m), .p(p));

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
      if (m !== (t2i(a) == -1) || p !== (t2i(a) == 1)) begin
        failures++;
        $display("FAIL a=%0d got m=%0b p=%0b", t2i(a), m, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
