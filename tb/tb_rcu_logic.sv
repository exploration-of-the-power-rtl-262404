// tb_rcu_logic: the logic component driving two DCM models. CLK_IN 50 MHz,
// uB0 starts at 75 MHz (M=6), uB1 at 100 MHz (M=8), reset hold shortened to
// 50 cycles. Sequence: both requests at once (must be ignored), then uB1 too
// slow for a long time. Expected from the rules: uB1 raised 100 -> 112.5 ->
// 125 MHz (ceiling), then uB0 slowed 75 -> 62.5 -> 50 -> 37.5 MHz (the
// 32 MHz floor stops it), then nothing. Each reconfiguration is checked: the
// processor is moved to CLK_IN before its DCM is reset, the reset lasts the
// hold time, the DCM receives the new M and D, and the processor goes back
// to the DCM only once it has locked.
module tb_rcu_logic;
  import mpsoc_pkg::*;
  localparam int HOLD = 50;
  logic clk = 0, rst_n = 0, reconf0 = 0, reconf1 = 0;
  logic [1:0] dcm_rst, den, dwe, drdy, locked, mux_sel, clkfx;
  logic [6:0] daddr;
  logic [15:0] di;
  logic busy, reconf_done, reconf_dcm;
  clk_dir_e reconf_dir;
  logic [5:0] m_cur [2], d_cur [2];
  logic [2:0] n_reconf [2], n_consec [2];
  int checks = 0, failures = 0;
  int n_done = 0;
  int hold_len [2];
  bit started = 0;
  int seq_dcm [$], seq_m [$];

  rcu_logic #(.HOLD_CYCLES(HOLD), .INIT_M0(6), .INIT_M1(8)) dut (.*);

  for (genvar i = 0; i < 2; i++) begin : g_dcm
    dcm_model #(.CLKFX_MULTIPLY(i == 0 ? 6 : 8), .CLKFX_DIVIDE(4), .LOCK_CYCLES(10)) u_dcm (
      .CLKIN(clk), .CLKFB(1'b0), .RST(dcm_rst[i]), .DCLK(clk), .DEN(den[i]), .DWE(dwe[i]),
      .DADDR(daddr), .DI(di), .DO(), .DRDY(drdy[i]), .CLK0(), .CLKFX(clkfx[i]), .LOCKED(locked[i]));
  end

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle rules
  always @(negedge clk) if (started) begin
    for (int i = 0; i < 2; i++) begin
      if (dcm_rst[i]) begin
        hold_len[i]++;
        if (mux_sel[i]) begin failures++; $display("FAIL processor %0d on a DCM in reset", i); end
      end else if (hold_len[i] != 0) begin
        checks++;
        if (hold_len[i] != HOLD) begin failures++; $display("FAIL hold %0d cycles", hold_len[i]); end
        hold_len[i] = 0;
      end
      if (den[i] && dwe[i]) begin
        seq_dcm.push_back(i);
        seq_m.push_back(int'(di[15:8]) + 1);
        checks++;
        if (di[7:0] != 8'd3) begin failures++; $display("FAIL divider changed"); end
      end
    end
    if (reconf_done) n_done++;
  end

  initial begin
    int exp_dcm [5] = '{1, 1, 0, 0, 0};
    int exp_m   [5] = '{9, 10, 5, 4, 3};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (mux_sel == 2'b11);
    hold_len[0] = 0; hold_len[1] = 0;
    started = 1;
    check(locked == 2'b11, "both DCMs locked before the processors use them");
    // both too slow at once: the XOR block drops it
    @(negedge clk); reconf0 = 1; reconf1 = 1;
    repeat (300) @(posedge clk);
    check(n_done == 0 && !busy, "simultaneous requests ignored");
    @(negedge clk); reconf0 = 0;
    repeat (3000) @(posedge clk);
    @(negedge clk); reconf1 = 0;
    repeat (20) @(posedge clk);
    check(n_done == 5, $sformatf("five reconfigurations (saw %0d)", n_done));
    check(seq_dcm.size() == 5, "five DRP writes");
    for (int k = 0; k < 5 && k < seq_dcm.size(); k++)
      check(seq_dcm[k] == exp_dcm[k] && seq_m[k] == exp_m[k],
            $sformatf("step %0d: DCM %0d M %0d", k, seq_dcm[k], seq_m[k]));
    check(m_cur[0] == 3 && m_cur[1] == 10, "final multipliers");
    check(mux_sel == 2'b11 && locked == 2'b11 && !busy, "both processors back on their DCMs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
