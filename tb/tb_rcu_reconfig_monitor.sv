// tb_rcu_reconfig_monitor: the testbench answers the dynamic reconfiguration
// port like a DCM (DRDY a few cycles after DEN) and drives LOCKED itself.
// Checked: address 0x50 and data {M-1, D-1} written to the selected DCM only,
// with one-cycle DEN/DWE; drp_done after DRDY; lock_done only after the reset
// release and LOCKED, including a release that comes before the DRP answer.
module tb_rcu_reconfig_monitor;
  logic clk = 0, rst_n = 0, start = 0, sel = 0, released = 0, busy, drp_done, lock_done;
  logic [5:0] m = 0, d = 0;
  logic [1:0] den, dwe, drdy = 0, locked = 2'b11;
  logic [6:0] daddr;
  logic [15:0] di;
  int checks = 0, failures = 0;

  rcu_reconfig_monitor dut (.*);

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

  task automatic one(bit s, int mm, int dd, bit early_release);
    int n_den = 0;
    @(negedge clk);
    start = 1; sel = s; m = 6'(mm); d = 6'(dd);
    locked[s] = 0;
    @(negedge clk); start = 0;
    // wait for the DRP strobe
    while (den == 2'b00) begin @(negedge clk); check(!drp_done && !lock_done, "nothing done before write"); end
    check(den == (s ? 2'b10 : 2'b01) && dwe == den, "strobe to selected DCM only");
    check(daddr == 7'h50, "DFS register address");
    check(di == {8'(mm - 1), 8'(dd - 1)}, $sformatf("data %h", di));
    @(negedge clk);
    check(den == 2'b00, "one-cycle strobe");
    if (early_release) begin released = 1; @(negedge clk); released = 0; end
    repeat (2) @(negedge clk);
    drdy[s] = 1;
    @(negedge clk); drdy[s] = 0;
    check(drp_done, "drp_done after DRDY");
    repeat (3) @(negedge clk);
    check(!lock_done && busy, "waiting");
    if (!early_release) begin released = 1; @(negedge clk); released = 0; end
    repeat (5) @(negedge clk);
    check(!lock_done && busy, "no lock_done before LOCKED");
    locked[s] = 1;
    @(negedge clk);
    check(lock_done, "lock_done after LOCKED");
    @(negedge clk);
    check(!lock_done && !busy, "back to idle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 9, 4, 0);
    one(1, 7, 4, 1);
    one(1, 19, 10, 0);
    one(0, 2, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
