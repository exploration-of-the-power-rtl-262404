// tb_bridge: uB0 and uB1 stand-ins on unrelated clocks exchange numbered word
// streams through the bridge in both directions. Each reader is slow in some
// phases and fast in others. Checked: every word arrives once and in order in
// both directions; a sender is held off (m_full) when its FIFO is full; each
// reconfiguration request follows its reader-side fill level (>= 12 of 16
// words, 75 %) one reader clock later, and each request is raised at least
// once and only for the slow reader.
module tb_bridge;
  import mpsoc_pkg::*;
  localparam int N = 1500;
  logic clk0 = 0, clk1 = 0, rst0_n = 0, rst1_n = 0;
  word_t ub0_m_data, ub0_s_data, ub1_m_data, ub1_s_data;
  logic ub0_m_write, ub0_m_full, ub0_s_exists, ub0_s_read;
  logic ub1_m_write, ub1_m_full, ub1_s_exists, ub1_s_read;
  logic reconf_req0, reconf_req1;
  logic [4:0] level_01, level_10;
  int checks = 0, failures = 0;
  int s0 = 0, s1 = 0, r0 = 0, r1 = 0, full0 = 0, full1 = 0, req0 = 0, req1 = 0;
  bit slow0 = 0, slow1 = 1;   // uB1 slow first, then uB0

  bridge #(.DEPTH(16), .FILL_PCT(75)) dut (.*);

  always #4 clk0 = ~clk0;
  always #7 clk1 = ~clk1;

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

  // uB0: sends 0.., reads uB1's words
  initial begin
    bit hi;
    ub0_m_write = 0; ub0_s_read = 0; ub0_m_data = 0;
    #30 rst0_n = 1; rst1_n = 1;
    hi = 0;
    while (r0 < N || s0 < N) begin
      @(negedge clk0);
      ub0_m_write = (s0 < N);
      ub0_m_data  = word_t'(s0);
      ub0_s_read  = ub0_s_exists && (($urandom % 100) < (slow0 ? 8 : 95));
      #1;
      check(reconf_req0 == hi, "reconf_req0 follows level_10");
      hi = (level_10 >= 12);
      if (reconf_req0) begin req0++; check(slow0, "request 0 only while uB0 is slow"); end
      if (ub0_m_write && ub0_m_full) full0++;
      if (ub0_m_write && !ub0_m_full) s0++;
      if (ub0_s_read) begin check(ub0_s_data == word_t'(32'h8000_0000 + r0), "word to uB0"); r0++; end
    end
  end

  // uB1: sends 0x80000000.., reads uB0's words
  initial begin
    bit hi;
    ub1_m_write = 0; ub1_s_read = 0; ub1_m_data = 0;
    #30;
    hi = 0;
    while (r1 < N || s1 < N) begin
      @(negedge clk1);
      ub1_m_write = (s1 < N) && !slow1;
      ub1_m_data  = word_t'(32'h8000_0000 + s1);
      ub1_s_read  = ub1_s_exists && (($urandom % 100) < (slow1 ? 8 : 95));
      #1;
      check(reconf_req1 == hi, "reconf_req1 follows level_01");
      hi = (level_01 >= 12);
      if (reconf_req1) begin req1++; check(slow1 || r1 > N / 2 - 20, "request 1 only while uB1 is slow"); end
      if (ub1_m_write && ub1_m_full) full1++;
      if (ub1_m_write && !ub1_m_full) s1++;
      if (ub1_s_read) begin check(ub1_s_data == word_t'(r1), "word to uB1"); r1++; end
      if (r1 == N / 2 && slow1) begin slow1 = 0; slow0 = 1; end
    end
  end

  initial begin
    #100;
    wait (r0 == N && r1 == N && s0 == N && s1 == N);
    #200;
    check(full0 > 0 && full1 > 0, "senders held off by a full FIFO");
    check(req0 > 0 && req1 > 0, "both reconfiguration requests raised");
    $display("full0=%0d full1=%0d req0=%0d req1=%0d", full0, full1, req0, req1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
