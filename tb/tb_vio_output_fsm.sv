// tb_vio_output_fsm: two instances, mode 1 (3 words from uB0 then 2 from
// uB1 per job) and mode 2 (4 words from uB1 only). Each processor link
// offers a numbered stream with random gaps; the output FIFO side is randomly
// not ready. The expected output order is built from the mode's pattern in
// the testbench. Checked: every output word and its order, that a link is
// only read when it has data, that mode 2 never reads uB0, job_done count
// and one word per clock without stalls.
module tb_vio_output_fsm;
  import mpsoc_pkg::*;
  localparam int JOBS = 60;
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

  // instance A: mode 1
  word_t a_s0, a_s1, a_out;
  logic a_e0, a_e1, a_r0, a_r1, a_v, a_rdy, a_done;
  vio_output_fsm #(.MODE(VIO_1), .N_OUT0(3), .N_OUT1(2)) dut_a (
    .clk, .rst_n, .fsl0_s_data(a_s0), .fsl0_s_exists(a_e0), .fsl0_s_read(a_r0),
    .fsl1_s_data(a_s1), .fsl1_s_exists(a_e1), .fsl1_s_read(a_r1),
    .out_data(a_out), .out_valid(a_v), .out_ready(a_rdy), .cur_src(), .job_done(a_done));

  // instance B: mode 2
  word_t b_s0, b_s1, b_out;
  logic b_e0, b_e1, b_r0, b_r1, b_v, b_rdy, b_done;
  vio_output_fsm #(.MODE(VIO_2), .N_OUT0(3), .N_OUT1(4)) dut_b (
    .clk, .rst_n, .fsl0_s_data(b_s0), .fsl0_s_exists(b_e0), .fsl0_s_read(b_r0),
    .fsl1_s_data(b_s1), .fsl1_s_exists(b_e1), .fsl1_s_read(b_r1),
    .out_data(b_out), .out_valid(b_v), .out_ready(b_rdy), .cur_src(), .job_done(b_done));

  word_t exp_a[$], exp_b[$];
  int ia0 = 0, ia1 = 0, ib0 = 0, ib1 = 0, na = 0, nb = 0, jobs_a = 0, jobs_b = 0;
  int t_free = 0;
  bit nostall = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (a_done) jobs_a <= jobs_a + 1;
    if (b_done) jobs_b <= jobs_b + 1;
  end

  initial begin
    for (int j = 0; j < JOBS; j++) begin
      for (int k = 0; k < 3; k++) exp_a.push_back(word_t'(32'h100000 + j * 3 + k));
      for (int k = 0; k < 2; k++) exp_a.push_back(word_t'(32'h200000 + j * 2 + k));
      for (int k = 0; k < 4; k++) exp_b.push_back(word_t'(32'h300000 + j * 4 + k));
    end
  end

  initial begin
    a_e0 = 0; a_e1 = 0; b_e0 = 0; b_e1 = 0; a_rdy = 0; b_rdy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (na < JOBS * 5 || nb < JOBS * 4) begin
      @(negedge clk);
      if (na == JOBS * 5 - 10 && !nostall) nostall = 1;
      a_s0 = word_t'(32'h100000 + ia0); a_s1 = word_t'(32'h200000 + ia1);
      b_s0 = word_t'(32'h900000 + ib0); b_s1 = word_t'(32'h300000 + ib1);
      a_e0 = nostall || ($urandom % 100) < 60; a_e1 = nostall || ($urandom % 100) < 60;
      b_e0 = ($urandom % 100) < 60;            b_e1 = (ib1 < JOBS * 4) && ($urandom % 100) < 60;
      a_rdy = nostall || ($urandom % 100) < 70; b_rdy = ($urandom % 100) < 70;
      #1;
      if (nostall && na < JOBS * 5) t_free++;
      check(!(a_r0 && !a_e0) && !(a_r1 && !a_e1) && !(b_r1 && !b_e1), "read only with data");
      check(!b_r0, "mode 2 never reads uB0");
      if (a_v && a_rdy) begin
        check(exp_a.size() > 0 && a_out == exp_a[0], "A output word");
        void'(exp_a.pop_front()); na++;
      end
      if (b_v && b_rdy) begin
        check(exp_b.size() > 0 && b_out == exp_b[0], "B output word");
        void'(exp_b.pop_front()); nb++;
      end
      if (a_r0) ia0++;
      if (a_r1) ia1++;
      if (b_r1) ib1++;
    end
    repeat (2) @(posedge clk);
    #1;
    check(jobs_a == JOBS && jobs_b == JOBS, "job counts");
    check(t_free == 10, "one word per clock without stalls");
    $display("jobs a=%0d b=%0d t_free=%0d", jobs_a, jobs_b, t_free);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
