// tb_ternary_addsub: self-checking testbench for ternary_addsub.
//
// Two instances are checked:
//   * dut4, the default 4-trit adder-subtractor, with a random sequence of
//     switch settings (including the 11 switch code, which means 0), stores
//     on the falling edge of bclk, add and subtract, and all carry-in values;
//   * dut1, the 1-trit configuration (the single-trit adder-subtractor),
//     exhaustively over register value, switch code, carry-in code and sub.
// The expected result is register + (sub ? -switches : switches) + carry-in,
// computed with integers and split into balanced trits and a carry of weight
// 3^TRITS. A register model follows every falling edge of bclk. The design
// is combinational apart from the register, so each check is made 1 time
// unit after the inputs change.
module tb_ternary_addsub;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  localparam int N = 4;

  logic         rst, bclk, sub, cin_p, cin_m;
  logic [N-1:0] in_p, in_m, out_m, out_p;
  logic         cout_m, cout_p;

  logic         b1, sub1, cin1_p, cin1_m;
  logic [0:0]   in1_p, in1_m, out1_m, out1_p;
  logic         cout1_m, cout1_p;

  int checks = 0, failures = 0;
  int reg4, reg1;        // register models, as integers
  int n_add = 0, n_sub = 0, n_store = 0, n_ovf_p = 0, n_ovf_m = 0;

  ternary_addsub dut4 (
    .rst(rst), .bclk(bclk), .sub(sub), .in_p(in_p), .in_m(in_m),
    .cin_p(cin_p), .cin_m(cin_m), .out_m(out_m), .out_p(out_p),
    .cout_m(cout_m), .cout_p(cout_p));

  ternary_addsub #(.TRITS(1)) dut1 (
    .rst(rst), .bclk(b1), .sub(sub1), .in_p(in1_p), .in_m(in1_m),
    .cin_p(cin1_p), .cin_m(cin1_m), .out_m(out1_m), .out_p(out1_p),
    .cout_m(cout1_m), .cout_p(cout1_p));

  // integer value of a set of switch/LED pairs (p - m per trit)
  function automatic int pairs_value(logic [N-1:0] p, logic [N-1:0] m, int n);
    int v = 0, w = 1;
    for (int i = 0; i < n; i++) begin
      v += w * pm(p[i], m[i]);
      w *= 3;
    end
    return v;
  endfunction

  function automatic int pow3(int n);
    int w = 1;
    for (int i = 0; i < n; i++) w *= 3;
    return w;
  endfunction

  // Compare LEDs with the expected total for an n-trit adder.
  task automatic check_result(int total, int n, logic [N-1:0] lm, logic [N-1:0] lp,
                              logic cm, logic cp, string what);
    int low, carry, got_low, got_carry, rest;
    bit bad;
    // split total into n balanced trits and a carry
    low = 0;
    rest = total;
    for (int i = 0; i < n; i++) begin
      low  += bal_mod3(rest) * pow3(i);
      rest  = bal_carry(rest);
    end
    carry = rest;
    got_low   = pairs_value(lp, lm, n);
    got_carry = int'(cp) - int'(cm);
    bad = (got_low != low) || (got_carry != carry) || (cm && cp);
    for (int i = 0; i < n; i++) if (lm[i] && lp[i]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s: total %0d expected low=%0d carry=%0d, got low=%0d carry=%0d",
               what, total, low, carry, got_low, got_carry);
    end
    if (n == N) begin
      if (carry > 0) n_ovf_p++;
      if (carry < 0) n_ovf_m++;
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sw, cv;
    // reset
    rst = 1'b0; bclk = 1'b0; b1 = 1'b0;
    sub = 1'b0; in_p = '0; in_m = '0; cin_p = 1'b0; cin_m = 1'b0;
    sub1 = 1'b0; in1_p = '0; in1_m = '0; cin1_p = 1'b0; cin1_m = 1'b0;
    #1 rst = 1'b1;
    #2;
    rst = 1'b0;
    reg4 = 0;
    reg1 = 0;
    #1;
    check_result(0, N, out_m, out_p, cout_m, cout_p, "after reset");

    // ---- 4-trit instance: random operation sequence ----
    for (int it = 0; it < 3000; it++) begin
      in_p  = N'($urandom);
      in_m  = N'($urandom);
      sub   = 1'($urandom);
      {cin_p, cin_m} = 2'($urandom);
      sw = pairs_value(in_p, in_m, N);
      cv = pm(cin_p, cin_m);
      #1;
      check_result(reg4 + (sub ? -sw : sw) + cv, N, out_m, out_p, cout_m, cout_p, "4-trit op");
      if (sub) n_sub++; else n_add++;
      if ($urandom_range(0, 3) == 0) begin
        bclk = 1'b1;           // press: nothing changes
        #1;
        check_result(reg4 + (sub ? -sw : sw) + cv, N, out_m, out_p, cout_m, cout_p, "bclk high");
        bclk = 1'b0;           // release: store the switches
        reg4 = sw;
        n_store++;
        #1;
        check_result(reg4 + (sub ? -sw : sw) + cv, N, out_m, out_p, cout_m, cout_p, "after store");
      end
    end

    // ---- 1-trit instance: exhaustive ----
    for (int r = -1; r <= 1; r++) begin
      // store r into the 1-trit register
      {in1_p, in1_m} = (r > 0) ? 2'b10 : (r < 0) ? 2'b01 : 2'b00;
      #1 b1 = 1'b1;
      #1 b1 = 1'b0;
      #1;
      reg1 = r;
      for (int k = 0; k < 4; k++)
        for (int kc = 0; kc < 4; kc++)
          for (int s = 0; s < 2; s++) begin
            {in1_p, in1_m}   = 2'(k);
            {cin1_p, cin1_m} = 2'(kc);
            sub1 = 1'(s);
            sw = pm(in1_p[0], in1_m[0]);
            cv = pm(cin1_p, cin1_m);
            #1;
            check_result(reg1 + (s ? -sw : sw) + cv, 1, N'(out1_m), N'(out1_p),
                         cout1_m, cout1_p, "1-trit op");
          end
    end

    $display("4-trit: adds=%0d subtracts=%0d stores=%0d carry+=%0d carry-=%0d",
             n_add, n_sub, n_store, n_ovf_p, n_ovf_m);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_store == 0 || n_ovf_p == 0 || n_ovf_m == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
