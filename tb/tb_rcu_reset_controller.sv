// tb_rcu_reset_controller: power-up reset of both DCMs for INIT_CYCLES, then
// reset periods for DCM 0 and DCM 1; checks that only the selected DCM is
// reset, for exactly HOLD_CYCLES clocks, and that released pulses once at
// the end.
module tb_rcu_reset_controller;
  localparam int HOLD = 37, INIT = 5;
  logic clk = 0, rst_n = 0, start = 0, sel = 0, busy, released, init_done;
  logic [1:0] dcm_rst;
  int checks = 0, failures = 0;

  rcu_reset_controller #(.HOLD_CYCLES(HOLD), .INIT_CYCLES(INIT), .CNT_W(8)) dut (.*);

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

  initial begin
    int n;
    repeat (2) @(posedge clk);
    #1 check(dcm_rst == 2'b11, "both DCMs in reset during unit reset");
    rst_n = 1;
    n = 0;
    while (!init_done) begin @(posedge clk); #1; n++; end
    check(n == INIT, $sformatf("power-up reset length %0d", n));
    check(dcm_rst == 2'b00, "power-up reset released");
    for (int k = 0; k < 4; k++) begin
      repeat (3) @(posedge clk);
      @(negedge clk); start = 1; sel = k[0];
      @(negedge clk); start = 0;
      n = 0;
      while (dcm_rst[k[0]]) begin
        check(dcm_rst[!k[0]] == 1'b0, "other DCM untouched");
        check(busy, "busy while holding");
        check(!released, "no release while holding");
        @(negedge clk); n++;
      end
      check(n == HOLD, $sformatf("hold length %0d", n));
      check(released, "released pulse");
      @(negedge clk);
      check(!released && !busy, "single pulse, idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
