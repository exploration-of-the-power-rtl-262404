// tb_reconf_clock_unit: the complete clock unit with CLK_IN = 50 MHz and both
// processors starting at 100 MHz (M=8, D=4), reset hold shortened to 300
// cycles. Measures the processor clock periods: 20 ns (CLK_IN) right after
// reset, 10 ns once locked, 20 ns again for uB0 while its DCM is being
// reconfigured (uB1 untouched at 10 ns), and 8.889 ns (112.5 MHz) for uB0
// afterwards. No clock phase may be shorter than 4 ns (half of 125 MHz).
module tb_reconf_clock_unit;
  import mpsoc_pkg::*;
  logic clk_in = 0, rst_n = 0, reconf_req0 = 0, reconf_req1 = 0;
  logic clk0, clk1, locked, busy, reconf_done, reconf_dcm;
  logic [1:0] mux_sel;
  clk_dir_e reconf_dir;
  logic [5:0] m_cur [2], d_cur [2];
  logic [2:0] n_reconf [2], n_consec [2];
  int checks = 0, failures = 0;
  realtime lr0 = 0, lf0 = 0;

  reconf_clock_unit #(.HOLD_CYCLES(300), .LOCK_CYCLES(10)) dut (.*);

  always #10 clk_in = ~clk_in;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk0) begin
    if (lf0 > 0 && $realtime - lf0 < 3.99) begin failures++; $display("FAIL runt low on clk0"); end
    lr0 = $realtime;
  end
  always @(negedge clk0) begin
    if (lr0 > 0 && $realtime - lr0 < 3.99) begin failures++; $display("FAIL runt high on clk0"); end
    lf0 = $realtime;
  end

  function automatic bit near(real a, real b);
    return a > b - 0.01 && a < b + 0.01;
  endfunction

  task automatic period(input bit which, output real p);
    realtime t0;
    if (which) begin @(posedge clk1); t0 = $realtime; repeat (8) @(posedge clk1); end
    else       begin @(posedge clk0); t0 = $realtime; repeat (8) @(posedge clk0); end
    p = ($realtime - t0) / 8.0;
  endtask

  initial begin
    real p;
    #5 rst_n = 0;
    #100 rst_n = 1;
    period(0, p); check(near(p, 20.0), $sformatf("clk0 on CLK_IN after reset (%f)", p));
    wait (locked);
    #50;
    period(0, p); check(near(p, 10.0), $sformatf("clk0 100 MHz (%f)", p));
    period(1, p); check(near(p, 10.0), $sformatf("clk1 100 MHz (%f)", p));
    reconf_req0 = 1;
    wait (dut.dcm_rst[0]);
    reconf_req0 = 0;
    #100;
    period(0, p); check(near(p, 20.0), $sformatf("clk0 on CLK_IN during reconfiguration (%f)", p));
    period(1, p); check(near(p, 10.0), $sformatf("clk1 unaffected (%f)", p));
    wait (reconf_done);
    #100;
    period(0, p); check(near(p, 80.0 / 9.0), $sformatf("clk0 112.5 MHz (%f)", p));
    check(locked && m_cur[0] == 9 && n_reconf[0] == 1, "status after reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
