// tb_rcu_xor_block: applies all combinations of the two request levels and
// checks req_valid = req0 XOR req1 and req_sel = req1, three clocks after a
// change (two synchroniser stages and the output register).
module tb_rcu_xor_block;
  logic clk = 0, rst_n = 0, req0 = 0, req1 = 0, req_valid, req_sel;
  int checks = 0, failures = 0;

  rcu_xor_block dut (.*);

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
    logic [1:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      v = (i < 4) ? 2'(i) : 2'($urandom);
      @(negedge clk);
      req0 = v[0]; req1 = v[1];
      // two edges later the output has not moved yet if the value changed
      repeat (2) @(posedge clk);
      #1;
      // third edge: registered result
      @(posedge clk);
      #1;
      check(req_valid == (v[0] ^ v[1]), "valid = req0 xor req1");
      if (req_valid) check(req_sel == v[1], "sel names the slow processor");
    end
    // latency: change and count edges until seen
    @(negedge clk); req0 = 1; req1 = 0;
    repeat (4) @(posedge clk);
    @(negedge clk); req0 = 0; req1 = 1;
    begin
      int n = 0;
      while (!(req_valid && req_sel)) begin @(posedge clk); #1; n++; end
      check(n == 3, $sformatf("latency 3 clocks (saw %0d)", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
