// tb_sync_fifo: random pushes and pops against a queue reference; checks
// data order, level, full/empty flags and one-cycle write-to-read latency.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic [15:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  int n_full = 0, n_empty = 0;
  bit push, pop;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      // drive on negedge, sample on posedge
      @(negedge clk);
      check(level == q.size(), "level");
      check(in_ready == (q.size() < DEPTH), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) check(out_data == q[0], "out_data");
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      in_valid  = ($urandom % 100) < ((i / 500) % 2 ? 30 : 70);
      out_ready = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      in_data   = 16'($urandom);
      #1;
      pop  = out_valid && out_ready;
      push = in_valid && in_ready;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
