// tb_ternary_addsub_top: end-to-end testbench of ternary_addsub_top at its
// default size (4 trits), driven only through the board-level ports.
//
// Part 1 replays the board test sequence of the original design: store
// 0-0+ (digits S3..S0 = +,0,-,0, value 24) with carry-in +, then set all
// switches to + (40) with carry-in -, then the same two settings while
// subtracting. Part 2 is a random sequence of switch settings, stores,
// add/subtract and carry-in values. Part 3 checks the stand-alone full
// subtractor and the XOR/min/max/comparator gates exhaustively.
// Every LED reading is compared with integer arithmetic:
//   LEDs + 81*carry = register + (sub ? -switches : switches) + carry-in.
// Counted mechanisms (each must occur): store, add, subtract, carry-in +,
// carry-in -, carry-out +, carry-out -, switch pair 11 read as 0.
module tb_ternary_addsub_top;
  import ternary_pkg::*;
  import tb_ternary_pkg::*;

  localparam int N = 4;

  logic         rst, bclk, sub, cin_p, cin_m;
  logic [N-1:0] sw_p, sw_m, led_m, led_p;
  logic         cout_m, cout_p;
  trit_t        fs_x1, fs_x2, fs_cin, fs_o, fs_cout;
  trit_t        g_a, g_b, g_xor, g_min, g_max, g_cmp;

  int checks = 0, failures = 0;
  int reg_v;
  int n_store = 0, n_add = 0, n_sub = 0, n_cin_p = 0, n_cin_m = 0;
  int n_cout_p = 0, n_cout_m = 0, n_code11 = 0;

  ternary_addsub_top dut (
    .rst(rst), .bclk(bclk), .sub(sub), .sw_p(sw_p), .sw_m(sw_m),
    .cin_p(cin_p), .cin_m(cin_m), .led_m(led_m), .led_p(led_p),
    .cout_m(cout_m), .cout_p(cout_p),
    .fs_x1(fs_x1), .fs_x2(fs_x2), .fs_cin(fs_cin), .fs_o(fs_o), .fs_cout(fs_cout),
    .g_a(g_a), .g_b(g_b), .g_xor(g_xor), .g_min(g_min), .g_max(g_max), .g_cmp(g_cmp));

  function automatic int sw_value(logic [N-1:0] p, logic [N-1:0] m);
    int v = 0, w = 1;
    for (int i = 0; i < N; i++) begin
      v += w * pm(p[i], m[i]);
      w *= 3;
    end
    return v;
  endfunction

  function automatic int cin_value();
    return pm(cin_p, cin_m);
  endfunction

  // Set switches from an integer -40..40 (balanced digits).
  task automatic set_switches(int v);
    int rest = v;
    for (int i = 0; i < N; i++) begin
      sw_p[i] = (bal_mod3(rest) > 0);
      sw_m[i] = (bal_mod3(rest) < 0);
      rest = bal_carry(rest);
    end
  endtask

  task automatic check_leds(string what);
    int total, sw, exp_low, exp_carry, got_low, got_carry;
    sw    = sw_value(sw_p, sw_m);
    total = reg_v + (sub ? -sw : sw) + cin_value();
    exp_low   = bal_mod3(total) + 3 * bal_mod3(bal_carry(total))
              + 9 * bal_mod3(bal_carry(bal_carry(total)))
              + 27 * bal_mod3(bal_carry(bal_carry(bal_carry(total))));
    exp_carry = (total - exp_low) / 81;
    got_low   = sw_value(led_p, led_m);
    got_carry = int'(cout_p) - int'(cout_m);
    checks++;
    if (got_low != exp_low || got_carry != exp_carry || (led_p & led_m) != '0 ||
        (cout_p && cout_m)) begin
      failures++;
      $display("FAIL %s: reg=%0d sw=%0d sub=%0b cin=%0d: expected %0d + 81*(%0d), got %0d + 81*(%0d)",
               what, reg_v, sw, sub, cin_value(), exp_low, exp_carry, got_low, got_carry);
    end
    if (exp_carry > 0) n_cout_p++;
    if (exp_carry < 0) n_cout_m++;
    if (sub) n_sub++; else n_add++;
    if (cin_value() > 0) n_cin_p++;
    if (cin_value() < 0) n_cin_m++;
    if ((sw_p & sw_m) != '0 || (cin_p && cin_m)) n_code11++;
  endtask

  task automatic press_store();
    bclk = 1'b1;
    #1 check_leds("button held");
    bclk = 1'b0;
    reg_v = sw_value(sw_p, sw_m);
    n_store++;
    #1 check_leds("after store");
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; bclk = 1'b0; sub = 1'b0;
    sw_p = '0; sw_m = '0; cin_p = 1'b0; cin_m = 1'b0;
    fs_x1 = T_ZERO; fs_x2 = T_ZERO; fs_cin = T_ZERO; g_a = T_ZERO; g_b = T_ZERO;
    #1 rst = 1'b1;
    #2 rst = 1'b0;
    reg_v = 0;
    #1 check_leds("after reset");

    // ---- Part 1: the board test sequence ----
    for (int s = 0; s < 2; s++) begin
      sub = 1'(s);
      set_switches(24); cin_p = 1'b1; cin_m = 1'b0;
      #1 check_leds("sequence, 24 with carry +");
      press_store();
      set_switches(40); cin_p = 1'b0; cin_m = 1'b1;
      #1 check_leds("sequence, 40 with carry -");
      press_store();
    end

    // ---- Part 2: random operation sequence ----
    for (int it = 0; it < 20000; it++) begin
      sw_p = N'($urandom);
      sw_m = N'($urandom);
      sub  = 1'($urandom);
      {cin_p, cin_m} = 2'($urandom);
      #1 check_leds("random op");
      if ($urandom_range(0, 4) == 0) press_store();
    end

    // ---- Part 3: stand-alone full subtractor and gates ----
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++) begin
        g_a = i2t(a);
        g_b = i2t(b);
        for (int c = -1; c <= 1; c++) begin
          fs_x1 = i2t(a); fs_x2 = i2t(b); fs_cin = i2t(c);
          #1;
          checks++;
          if (t2i(fs_o) + 3 * t2i(fs_cout) != b - a + c) begin
            failures++;
            $display("FAIL full subtractor %0d - %0d + (%0d): o=%0d cout=%0d", b, a, c,
                     t2i(fs_o), t2i(fs_cout));
          end
        end
        checks++;
        if (t2i(g_xor) != -(a * b) || t2i(g_min) != ((a < b) ? a : b) ||
            t2i(g_max) != ((a > b) ? a : b) || t2i(g_cmp) != ((a == b) ? 1 : -1)) begin
          failures++;
          $display("FAIL gates a=%0d b=%0d", a, b);
        end
      end

    $display("mechanisms: store=%0d add=%0d sub=%0d cin+=%0d cin-=%0d cout+=%0d cout-=%0d code11=%0d",
             n_store, n_add, n_sub, n_cin_p, n_cin_m, n_cout_p, n_cout_m, n_code11);
    checks++;
    if (n_store == 0 || n_add == 0 || n_sub == 0 || n_cin_p == 0 || n_cin_m == 0 ||
        n_cout_p == 0 || n_cout_m == 0 || n_code11 == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
