// tb_bridge_fsm: one bridge side in isolation. The receive FIFO is a queue
// in the testbench; the transmit FIFO's full flag is random. Checked: words
// offered to the processor in order with exists/read handshake, transmit
// writes only when not full, and reconf_req = (receive level >= 12 of 16)
// one clock later (75 % threshold).
module tb_bridge_fsm;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t ub_m_data, ub_s_data, tx_data, rx_data;
  logic ub_m_write, ub_m_full, ub_s_exists, ub_s_read, tx_en, tx_full, rx_empty, rx_en, reconf_req;
  logic [4:0] rx_level;
  int checks = 0, failures = 0;
  word_t q[$];
  int nxt = 0, got = 0, n_req = 0, n_tx = 0;
  bit prev_hi = 0;

  bridge_fsm #(.DEPTH(16), .FILL_PCT(75)) dut (.*);

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

  assign rx_data  = (q.size() > 0) ? q[0] : '0;
  assign rx_empty = (q.size() == 0);
  assign rx_level = 5'(q.size());

  initial begin
    bit pop;
    ub_m_write = 0; ub_s_read = 0; tx_full = 0; ub_m_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // reader speed alternates so the level sweeps across the threshold
      ub_s_read  = ub_s_exists && (($urandom % 100) < (((i / 400) % 2) ? 90 : 20));
      ub_m_write = ($urandom % 2);
      ub_m_data  = $urandom;
      tx_full    = ($urandom % 100) < 30;
      #1;
      check(reconf_req == prev_hi, "reconf_req follows level >= 12");
      check(tx_en == (ub_m_write && !tx_full) && ub_m_full == tx_full, "transmit write");
      if (tx_en) begin check(tx_data == ub_m_data, "transmit data"); n_tx++; end
      if (ub_s_read) begin
        check(ub_s_data == word_t'(got), "received word order");
        got++;
      end
      if (reconf_req) n_req++;
      pop = rx_en;
      check(!(rx_en && rx_empty), "no read of empty FIFO");
      prev_hi = (q.size() >= 12);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      // the other side pushes words into the receive FIFO
      if (q.size() < 16 && ($urandom % 100) < 60) begin q.push_back(word_t'(nxt)); nxt++; end
    end
    check(n_req > 0, "threshold reached at least once");
    check(got > 100, "words received");
    $display("received=%0d reconf cycles=%0d tx=%0d", got, n_req, n_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
