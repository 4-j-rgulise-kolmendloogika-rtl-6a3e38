// tb_tern_full_adder: exhaustive self-checking testbench for tern_full_adder.
//
// All 27 combinations of x1, x2, cin (and the unused code on each input,
// which must act as 0). Expected: x1 + x2 + cin = 3*cout + s.
module tb_tern_full_adder;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  trit_t x1, x2, cin, s, cout;
  int checks = 0, failures = 0;

  tern_full_adder dut (.x1(x1), .x2(x2), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int k1 = 0; k1 < 4; k1++)
      for (int k2 = 0; k2 < 4; k2++)
        for (int kc = 0; kc < 4; kc++) begin
          x1  = trit_t'(code(k1));
          x2  = trit_t'(code(k2));
          cin = trit_t'(code(kc));
          #1;
          total = t2i(x1) + t2i(x2) + t2i(cin);
          checks++;
          if (s !== i2t(bal_mod3(total)) || cout !== i2t(bal_carry(total))) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got s=%b cout=%b", t2i(x1), t2i(x2), t2i(cin), s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
