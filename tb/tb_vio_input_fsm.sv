// tb_vio_input_fsm: two instances, mode 3 (N_IN0=3, N_COMMON=4, N_IN1=2) and
// mode 5 (N_COMMON=5). A numbered word stream is offered with random gaps
// while both links are randomly full. The expected destination of every word
// is derived from the mode's pattern in the testbench; checked: the words
// each link receives and their order, common words written to both links in
// the same cycle, no write into a full link, job_done once per job, and one
// word per clock when nothing stalls.
module tb_vio_input_fsm;
  import mpsoc_pkg::*;
  localparam int NW = 9 * 40;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

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

  // ---------------- instance A: mode 3 ----------------
  word_t a_in, a_d0, a_d1;
  logic a_v, a_r, a_w0, a_w1, a_f0, a_f1, a_done;
  vio_dst_e a_dst;
  vio_input_fsm #(.MODE(VIO_3), .N_IN0(3), .N_IN1(2), .N_COMMON(4)) dut_a (
    .clk, .rst_n, .in_data(a_in), .in_valid(a_v), .in_ready(a_r),
    .fsl0_m_data(a_d0), .fsl0_m_write(a_w0), .fsl0_m_full(a_f0),
    .fsl1_m_data(a_d1), .fsl1_m_write(a_w1), .fsl1_m_full(a_f1),
    .cur_dst(a_dst), .job_done(a_done));

  // ---------------- instance B: mode 5 ----------------
  word_t b_in, b_d0, b_d1;
  logic b_v, b_r, b_w0, b_w1, b_f0, b_f1, b_done;
  vio_dst_e b_dst;
  vio_input_fsm #(.MODE(VIO_5), .N_IN0(7), .N_IN1(7), .N_COMMON(5)) dut_b (
    .clk, .rst_n, .in_data(b_in), .in_valid(b_v), .in_ready(b_r),
    .fsl0_m_data(b_d0), .fsl0_m_write(b_w0), .fsl0_m_full(b_f0),
    .fsl1_m_data(b_d1), .fsl1_m_write(b_w1), .fsl1_m_full(b_f1),
    .cur_dst(b_dst), .job_done(b_done));

  word_t exp_a0[$], exp_a1[$], exp_b0[$], exp_b1[$];
  int ka = 0, kb = 0, jobs_a = 0, jobs_b = 0;
  bit nostall = 0;

  initial begin
    // expected routing, from the mode patterns
    for (int k = 0; k < NW; k++) begin
      automatic int p = k % 9;
      if (p < 3)      exp_a0.push_back(word_t'(1000 + k));
      else if (p < 7) begin exp_a0.push_back(word_t'(1000 + k)); exp_a1.push_back(word_t'(1000 + k)); end
      else            exp_a1.push_back(word_t'(1000 + k));
      exp_b0.push_back(word_t'(5000 + k));
      exp_b1.push_back(word_t'(5000 + k));
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    if (a_done) jobs_a <= jobs_a + 1;
    if (b_done) jobs_b <= jobs_b + 1;
  end

  // stimulus and monitors (drive after the edge, sample before the next)
  initial begin
    int t0;
    a_v = 0; b_v = 0; a_f0 = 0; a_f1 = 0; b_f0 = 0; b_f1 = 0; a_in = 0; b_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (ka < NW || kb < NW) begin
      @(negedge clk);
      if (ka == NW - 18 && !nostall) begin nostall = 1; t0 = 0; end
      a_in = word_t'(1000 + ka); b_in = word_t'(5000 + kb);
      a_v = (ka < NW) && (nostall || ($urandom % 100) < 80);
      b_v = (kb < NW) && (nostall || ($urandom % 100) < 80);
      a_f0 = !nostall && ($urandom % 100) < 30; a_f1 = !nostall && ($urandom % 100) < 30;
      b_f0 = !nostall && ($urandom % 100) < 30; b_f1 = !nostall && ($urandom % 100) < 30;
      #1;
      if (nostall && ka < NW) t0++;
      check(!(a_w0 && a_f0) && !(a_w1 && a_f1) && !(b_w0 && b_f0) && !(b_w1 && b_f1), "no write when full");
      if (a_w0) begin check(exp_a0.size() > 0 && a_d0 == exp_a0[0], "A link0 word"); void'(exp_a0.pop_front()); end
      if (a_w1) begin check(exp_a1.size() > 0 && a_d1 == exp_a1[0], "A link1 word"); void'(exp_a1.pop_front()); end
      if (b_w0) begin check(exp_b0.size() > 0 && b_d0 == exp_b0[0], "B link0 word"); void'(exp_b0.pop_front()); end
      if (b_w1) begin check(exp_b1.size() > 0 && b_d1 == exp_b1[0], "B link1 word"); void'(exp_b1.pop_front()); end
      check(b_w0 == b_w1, "B common word to both links at once");
      if (a_w0 && a_w1) check(a_dst == DST_BOTH, "A both only in common segment");
      if (a_v && a_r) ka++;
      if (b_v && b_r) kb++;
    end
    repeat (2) @(posedge clk);
    #1;
    check(exp_a0.size() == 0 && exp_a1.size() == 0, "A all words delivered");
    check(exp_b0.size() == 0 && exp_b1.size() == 0, "B all words delivered");
    check(jobs_a == NW / 9, "A job count");
    check(jobs_b == NW / 5, "B job count");
    check(t0 == 18, "one word per clock without stalls");
    $display("jobs a=%0d b=%0d t0=%0d", jobs_a, jobs_b, t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
