// tb_dcm_model: 50 MHz input. Checks lock after LOCK_CYCLES input cycles,
// CLKFX period = 20 ns * D / M for the initial setting, that a DRP write
// outside reset is ignored, that a write during reset takes effect after
// relock, DRDY one DCLK after DEN, and DRP read-back.
module tb_dcm_model;
  logic CLKIN = 0, CLKFB = 0, RST = 1, DEN = 0, DWE = 0;
  logic [6:0] DADDR = 0;
  logic [15:0] DI = 0, DO;
  logic DRDY, CLK0, CLKFX, LOCKED;
  int checks = 0, failures = 0;

  dcm_model #(.CLKFX_MULTIPLY(8), .CLKFX_DIVIDE(4), .LOCK_CYCLES(20)) dut (.DCLK(CLKIN), .*);

  always #10 CLKIN = ~CLKIN;

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

  task automatic measure(real exp_ns, string what);
    realtime t0, t1;
    @(posedge CLKFX); t0 = $realtime;
    repeat (100) @(posedge CLKFX);
    t1 = $realtime;
    check((t1 - t0) / 100.0 > exp_ns - 0.01 && (t1 - t0) / 100.0 < exp_ns + 0.01,
          $sformatf("%s: period %f ns, expected %f", what, (t1 - t0) / 100.0, exp_ns));
  endtask

  task automatic drp_write(logic [15:0] v);
    @(negedge CLKIN); DEN = 1; DWE = 1; DADDR = 7'h50; DI = v;
    @(negedge CLKIN); DEN = 0; DWE = 0;
    check(!DRDY, "DRDY not yet");
    @(negedge CLKIN);
    check(DRDY, "DRDY one DCLK after the strobe");
  endtask

  initial begin
    int n;
    repeat (5) @(posedge CLKIN);
    check(!LOCKED && !CLKFX, "held in reset");
    @(negedge CLKIN); RST = 0;
    n = 0;
    while (!LOCKED) begin @(posedge CLKIN); n++; end
    check(n >= 20 && n <= 22, $sformatf("lock time %0d input cycles", n));
    measure(10.0, "M=8 D=4 (100 MHz)");
    // write outside reset: ignored
    drp_write({8'd9, 8'd3});
    repeat (3) @(posedge CLKIN);
    measure(10.0, "write outside reset ignored");
    // write during reset: M=10, D=4 -> 125 MHz
    @(negedge CLKIN); RST = 1;
    drp_write({8'd9, 8'd3});
    @(negedge CLKIN); DEN = 1; DWE = 0; DADDR = 7'h50;
    @(negedge CLKIN); DEN = 0;
    @(negedge CLKIN);
    check(DO == {8'd9, 8'd3}, "read back");
    repeat (5) @(posedge CLKIN);
    check(!LOCKED, "unlocked in reset");
    @(negedge CLKIN); RST = 0;
    wait (LOCKED);
    measure(8.0, "M=10 D=4 (125 MHz)");
    // 87.5 MHz: M=7, D=4
    @(negedge CLKIN); RST = 1;
    drp_write({8'd6, 8'd3});
    @(negedge CLKIN); RST = 0;
    wait (LOCKED);
    measure(80.0 / 7.0, "M=7 D=4 (87.5 MHz)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
