// tb_tern_reg: self-checking testbench for tern_reg.
//
// Checks the reset value, that the register loads only on the falling edge
// of bclk (a rising edge and a change of d while bclk is steady must not
// change it), and a random sequence of stores against a model.
module tb_tern_reg;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  logic  rst, bclk;
  trit_t d, q;
  trit_t model;
  int checks = 0, failures = 0;

  tern_reg dut (.rst(rst), .bclk(bclk), .d(d), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, q, model);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bclk = 1'b0;
    d    = T_PLUS;
    rst  = 1'b0;
    #1 rst = 1'b1;
    #5;
    model = T_ZERO;
    check("reset");
    rst = 1'b0;
    #5;
    bclk = 1'b1;            // rising edge: no load
    #5;
    check("rising edge");
    d = T_MINUS;            // bclk steady high: no load
    #5;
    check("steady clock");
    bclk = 1'b0;            // falling edge: load
    model = T_MINUS;
    #1;
    check("falling edge");
    for (int i = 0; i < 200; i++) begin
      d = trit_t'(code(int'($urandom_range(0, 3))));
      #4 bclk = 1'b1;
      #5 check("hold");
      bclk = 1'b0;
      model = i2t(t2i(d));
      #1 check("random store");
    end
    rst = 1'b1;
    model = T_ZERO;
    #1 check("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
