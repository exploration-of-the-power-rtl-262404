// ub_qs_model: behavioural stand-in for one soft processor running its half
// of the two-processor Quicksort partition (uB0 at 80 MHz and uB1 at 50 MHz in
// the reference setup):
//   ROLE 0 (uB0): read N words from the host link, send the second half to
//     uB1 over the bridge, sort the first half, send it to uB1.
//   ROLE 1 (uB1): read the second half from the bridge, sort it, read uB0's
//     sorted half, merge both and send the N sorted words to the host link.
// Computation time is modelled as a number of its own clock cycles per word
// (SORT_CYCLES) and per received bridge word (READ_CYCLES), so a faster clock
// finishes sooner. After the job, both processors can flood each other with
// EXCH words while not reading for PAUSE cycles (a data exchange phase, started
// by exch_go), and then read them back. START_DELAY makes uB1 busy for that
// many cycles before it first reads the bridge. All link outputs change on the falling clock edge.
module ub_qs_model
  import mpsoc_pkg::*;
#(
  parameter int ROLE        = 0,
  parameter int N           = 64,
  parameter int SORT_CYCLES = 4,
  parameter int READ_CYCLES = 0,
  parameter int EXCH        = 0,
  parameter int PAUSE       = 0,
  parameter int START_DELAY = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  // host link in (read side of a link FIFO)
  input  word_t  hin_data,
  input  logic   hin_empty,
  output logic   hin_rd,
  // host link out (write side of a link FIFO)
  output word_t  hout_data,
  output logic   hout_wr,
  input  logic   hout_full,
  // bridge: to the other processor
  output word_t  bm_data,
  output logic   bm_write,
  input  logic   bm_full,
  // bridge: from the other processor
  input  word_t  bs_data,
  input  logic   bs_exists,
  output logic   bs_read,
  input  logic   exch_go,
  output logic   job_done,
  output logic   exch_done,
  output int     exch_errors
);
  word_t buf_a [$], buf_b [$], res [$];

  task automatic send_bridge(word_t w);
    @(negedge clk);
    bm_data = w; bm_write = 1;
    #0.1;
    while (bm_full) begin @(negedge clk); #0.1; end
    @(negedge clk);
    bm_write = 0;
  endtask

  task automatic recv_bridge(output word_t w);
    repeat (READ_CYCLES) @(negedge clk);
    @(negedge clk);
    while (!bs_exists) @(negedge clk);
    w = bs_data; bs_read = 1;
    @(negedge clk);
    bs_read = 0;
  endtask

  task automatic recv_host(output word_t w);
    @(negedge clk);
    while (hin_empty) @(negedge clk);
    w = hin_data; hin_rd = 1;
    @(negedge clk);
    hin_rd = 0;
  endtask

  task automatic send_host(word_t w);
    @(negedge clk);
    hout_data = w; hout_wr = 1;
    #0.1;
    while (hout_full) begin @(negedge clk); #0.1; end
    @(negedge clk);
    hout_wr = 0;
  endtask

  task automatic compute(int words);
    repeat (words * SORT_CYCLES) @(posedge clk);
  endtask

  initial begin
    word_t w;
    hin_rd = 0; hout_wr = 0; hout_data = '0; bm_data = '0; bm_write = 0; bs_read = 0;
    job_done = 0; exch_done = 0; exch_errors = 0;
    @(posedge rst_n);
    repeat (4) @(posedge clk);
    if (ROLE == 0) begin
      for (int i = 0; i < N; i++) begin recv_host(w); buf_a.push_back(w); end
      for (int i = N / 2; i < N; i++) send_bridge(buf_a[i]);
      buf_a = buf_a[0:N/2-1];
      buf_a.sort();
      compute(N / 2);
      foreach (buf_a[i]) send_bridge(buf_a[i]);
    end else begin
      repeat (START_DELAY) @(posedge clk);
      for (int i = 0; i < N / 2; i++) begin recv_bridge(w); buf_b.push_back(w); end
      buf_b.sort();
      compute(N / 2);
      for (int i = 0; i < N / 2; i++) begin recv_bridge(w); buf_a.push_back(w); end
      // merge the two sorted halves
      while (buf_a.size() > 0 || buf_b.size() > 0) begin
        if (buf_b.size() == 0 || (buf_a.size() > 0 && buf_a[0] <= buf_b[0])) res.push_back(buf_a.pop_front());
        else res.push_back(buf_b.pop_front());
      end
      foreach (res[i]) send_host(res[i]);
    end
    job_done = 1;
    if (EXCH > 0) begin
      while (!exch_go) @(posedge clk);
      // flood the other processor without reading, then drain
      fork
        for (int i = 0; i < EXCH; i++) send_bridge(word_t'(32'hE000_0000 + ROLE * 32'h100 + i));
        repeat (PAUSE) @(posedge clk);
      join
      for (int i = 0; i < EXCH; i++) begin
        recv_bridge(w);
        if (w != word_t'(32'hE000_0000 + (1 - ROLE) * 32'h100 + i)) exch_errors++;
      end
      exch_done = 1;
    end
  end
endmodule
