// tb_rcu_reconfig_counter: request sequences whose outcomes were worked out
// by hand from the rules (CLK_IN 50 MHz, D = 4, so M = 10 is 125 MHz).
// Instance A starts at uB0 100 MHz (M=8), uB1 75 MHz (M=6) and exercises the
// three-consecutive-raises rule, slowing the faster processor and the limit
// of four reconfigurations per DCM. Instance B starts uB0 at 112.5 MHz and
// exercises the 125 MHz ceiling.
module tb_rcu_reconfig_counter;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a_rv, a_rs, a_cv, a_cd, a_take;
  clk_dir_e a_dir;
  logic [5:0] a_m, a_d, a_mc [2], a_dc [2];
  logic [2:0] a_nr [2], a_nc [2];
  rcu_reconfig_counter #(.INIT_M0(8), .INIT_D0(4), .INIT_M1(6), .INIT_D1(4)) dut_a (
    .clk, .rst_n, .req_valid(a_rv), .req_sel(a_rs), .cmd_valid(a_cv), .cmd_dcm(a_cd),
    .cmd_dir(a_dir), .cmd_m(a_m), .cmd_d(a_d), .take(a_take),
    .m_cur(a_mc), .d_cur(a_dc), .n_reconf(a_nr), .n_consec(a_nc));

  logic b_rv, b_rs, b_cv, b_cd, b_take;
  clk_dir_e b_dir;
  logic [5:0] b_m, b_d, b_mc [2], b_dc [2];
  logic [2:0] b_nr [2], b_nc [2];
  rcu_reconfig_counter #(.INIT_M0(9), .INIT_D0(4), .INIT_M1(8), .INIT_D1(4)) dut_b (
    .clk, .rst_n, .req_valid(b_rv), .req_sel(b_rs), .cmd_valid(b_cv), .cmd_dcm(b_cd),
    .cmd_dir(b_dir), .cmd_m(b_m), .cmd_d(b_d), .take(b_take),
    .m_cur(b_mc), .d_cur(b_dc), .n_reconf(b_nr), .n_consec(b_nc));

  // one request on A: expect (valid, dcm, dir, new M)
  task automatic req_a(bit sel, bit ev, bit edcm, clk_dir_e edir, int em);
    @(negedge clk);
    a_rv = 1; a_rs = sel;
    #1;
    check(a_cv == ev, $sformatf("A valid (sel %0d)", sel));
    if (ev) begin
      check(a_cd == edcm && a_dir == edir && a_m == 6'(em) && a_d == 6'd4,
            $sformatf("A decision dcm=%0d dir=%0d m=%0d", a_cd, a_dir, a_m));
      a_take = 1;
    end
    @(negedge clk);
    a_take = 0; a_rv = 0;
    #1 check(!a_cv, "A no command without request");
  endtask

  task automatic req_b(bit sel, bit ev, bit edcm, clk_dir_e edir, int em);
    @(negedge clk);
    b_rv = 1; b_rs = sel;
    #1;
    check(b_cv == ev, "B valid");
    if (ev) begin
      check(b_cd == edcm && b_dir == edir && b_m == 6'(em), "B decision");
      b_take = 1;
    end
    @(negedge clk);
    b_take = 0; b_rv = 0;
  endtask

  initial begin
    a_rv = 0; a_rs = 0; a_take = 0; b_rv = 0; b_rs = 0; b_take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A: uB1 too slow three times: raised 75 -> 87.5 -> 100 -> 112.5 MHz
    req_a(1, 1, 1, CLK_UP, 7);
    req_a(1, 1, 1, CLK_UP, 8);
    req_a(1, 1, 1, CLK_UP, 9);
    check(a_nc[1] == 3 && a_nr[1] == 3, "A three consecutive raises of uB1");
    // fourth request: no more raises, uB0 slowed 100 -> 87.5 MHz
    req_a(1, 1, 0, CLK_DOWN, 7);
    // uB0 too slow: raised 87.5 -> 100 -> 112.5 -> 125 MHz, uB1's run cleared
    req_a(0, 1, 0, CLK_UP, 8);
    check(a_nc[1] == 0, "A raise of uB0 clears uB1's consecutive count");
    req_a(0, 1, 0, CLK_UP, 9);
    req_a(0, 1, 0, CLK_UP, 10);
    check(a_nr[0] == 4 && a_mc[0] == 10, "A DCM0 reconfigured four times, at 125 MHz");
    // uB0 still too slow: slow uB1 112.5 -> 100 MHz (its 4th reconfiguration)
    req_a(0, 1, 1, CLK_DOWN, 8);
    check(a_nr[1] == 4, "A DCM1 reconfigured four times");
    // both DCMs used up: requests ignored
    req_a(0, 0, 0, CLK_UP, 0);
    req_a(1, 0, 0, CLK_UP, 0);
    check(a_mc[0] == 10 && a_mc[1] == 8, "A final multipliers");
    // B: uB0 at 112.5 MHz, one raise to 125 MHz, then the ceiling applies
    req_b(0, 1, 0, CLK_UP, 10);
    req_b(0, 1, 1, CLK_DOWN, 7);
    check(b_mc[0] == 10 && b_nc[0] == 1, "B stopped at 125 MHz after one raise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
