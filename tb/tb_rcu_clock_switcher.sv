// tb_rcu_clock_switcher: commands with different masks; checks the select
// lines change only where the mask says, that ack comes SETTLE_CYCLES clocks
// after the command, and that both processors start on CLK_IN after reset.
module tb_rcu_clock_switcher;
  localparam int SETTLE = 6;
  logic clk = 0, rst_n = 0, cmd = 0, ack;
  logic [1:0] cmd_mask = 0, cmd_val = 0, mux_sel, model;
  int checks = 0, failures = 0;

  rcu_clock_switcher #(.SETTLE_CYCLES(SETTLE)) dut (.*);

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
    rst_n = 1;
    @(negedge clk);
    check(mux_sel == 2'b00, "start on CLK_IN");
    model = 2'b00;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      cmd = 1; cmd_mask = 2'($urandom); cmd_val = 2'($urandom);
      model = (model & ~cmd_mask) | (cmd_val & cmd_mask);
      @(negedge clk);
      cmd = 0;
      check(mux_sel == model, "select lines follow mask and value");
      n = 1;
      while (!ack) begin @(negedge clk); n++; end
      check(n - 1 == SETTLE, $sformatf("ack SETTLE clocks after the command edge (%0d)", n - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
