// tb_bufgmux_model: two unrelated clocks (50 MHz and about 71 MHz), the select
// toggled at random times. Every high and low phase of the output must be at
// least as long as the shorter input half period (no runt pulses), and after
// a switch the output must run at the selected input's period.
module tb_bufgmux_model;
  logic I0 = 0, I1 = 0, S = 0, O;
  int checks = 0, failures = 0;
  realtime last_r = 0, last_f = 0;
  int n_sw = 0;

  bufgmux_model dut (.*);

  always #10 I0 = ~I0;
  always #7  I1 = ~I1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse width monitor
  always @(posedge O) begin
    if (last_f > 0) check($realtime - last_f >= 6.99, "low phase not shorter than an input half period");
    last_r = $realtime;
  end
  always @(negedge O) begin
    if (last_r > 0) check($realtime - last_r >= 6.99, "high phase not shorter than an input half period");
    last_f = $realtime;
  end

  task automatic period_is(real p);
    realtime t0;
    @(posedge O); t0 = $realtime;
    repeat (10) @(posedge O);
    check(($realtime - t0) / 10.0 > p - 0.01 && ($realtime - t0) / 10.0 < p + 0.01,
          $sformatf("output period %f, expected %f", ($realtime - t0) / 10.0, p));
  endtask

  initial begin
    #100;
    period_is(20.0);
    for (int i = 0; i < 60; i++) begin
      #($urandom % 97 + 3);
      S = ~S;
      n_sw++;
      #200;
      period_is(S ? 14.0 : 20.0);
    end
    $display("switches=%0d", n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
