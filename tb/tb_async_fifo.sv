// tb_async_fifo: writer and reader on unrelated clocks, random traffic in
// phases (fast writer, fast reader). Checks order and integrity of all words,
// that the FIFO fills (wr_full) and drains (rd_empty), that the read-side
// level never exceeds the true occupancy, and the write-to-read latency.
module tb_async_fifo;
  localparam int DEPTH = 16;
  localparam int N = 3000;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic [31:0] wr_data, rd_data;
  logic wr_en, wr_full, rd_en, rd_empty;
  logic [$clog2(DEPTH):0] wr_level, rd_level;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int n_wr = 0, n_rd = 0, n_full = 0, n_empty = 0, n_lvl_hi = 0;
  bit wphase_fast = 1;

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #7 wr_clk = ~wr_clk;
  always #11 rd_clk = ~rd_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wr_en = 0; wr_data = 0;
    #50 wr_rst_n = 1; rd_rst_n = 1;
    while (n_wr < N) begin
      @(negedge wr_clk);
      wr_en   = ($urandom % 100) < (n_wr < N/2 ? 90 : 20);
      wr_data = $urandom;
      #1;
      if (wr_en && !wr_full) begin
        q.push_back(wr_data);
        n_wr++;
      end
      if (wr_full) n_full++;
    end
    @(negedge wr_clk) wr_en = 0;
  end

  // reader
  initial begin
    rd_en = 0;
    #50;
    while (n_rd < N) begin
      @(negedge rd_clk);
      rd_en = ($urandom % 100) < (n_rd < N/2 ? 25 : 95);
      #1;
      check(int'(rd_level) <= q.size(), "rd_level conservative");
      if (rd_level >= 12) n_lvl_hi++;
      if (rd_empty) n_empty++;
      if (rd_en && !rd_empty) begin
        check(rd_data == q[0], "data order");
        void'(q.pop_front());
        n_rd++;
      end
    end
    check(n_full > 0, "FIFO filled");
    check(n_empty > 0, "FIFO drained");
    check(n_lvl_hi > 0, "read level reached 75 percent");
    // latency: one word into an empty FIFO is visible after 2-3 read edges
    @(negedge wr_clk); wr_data = 32'hCAFE_F00D; wr_en = 1;
    @(negedge wr_clk); wr_en = 0;
    begin
      int edges = 0;
      while (rd_empty) begin @(posedge rd_clk); #1; edges++; end
      check(edges >= 2 && edges <= 4, "write-to-read latency");
      check(rd_data == 32'hCAFE_F00D, "latency word");
    end
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
