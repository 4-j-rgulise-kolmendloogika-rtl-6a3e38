// tb_tern_dec_in: exhaustive self-checking testbench for tern_dec_in.
//
// Switch pairs (p, m): the value is p - m, so 11 gives 0 like 00.
module tb_tern_dec_in;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  logic  p, m;
  trit_t y;
  int checks = 0, failures = 0;

  tern_dec_in dut (.p(p), .m(m), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {p, m} = 2'(k);
      #1;
      checks++;
      if (y !== i2t(int'(p) - int'(m))) begin
        failures++;
        $display("FAIL p=%0b m=%0b got %b", p, m, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
