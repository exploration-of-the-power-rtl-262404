// mpsoc_top_env.svh: system environment shared by the two top-level
// testbenches. It is included inside a testbench module after these
// localparams: N (words per job), READ1 / START1 / SORTC (processor model
// timing), EXCH / PAUSE (exchange phase, 0 to skip), P_M0, P_D0, P_M1, P_D1,
// P_FMAX, P_FMIN, P_CLKIN, P_MAXR, P_MAXC (the top's clock parameters, for the
// reference model), FULL_COVER (1: every mechanism must be seen) and WD_NS
// (watchdog). The including module then instantiates mpsoc_top as `dut`.
//
// Around the top it builds the rest of the system: the host (sends N random
// words through the virtual-IO, takes the results with random back-pressure
// and compares them with its own sorted copy), four dual-clock link FIFOs
// between the virtual-IO (vio_clk) and the processors (clk0 / clk1), and two
// processor models running the two-processor Quicksort partition. A reference
// model of the frequency-decision rules predicts every reconfiguration and
// the clock period of each DCM output is measured after it. The mechanisms
// of the design are counted and each one that never happens is a failure.

  int checks = 0, failures = 0;

  logic clk_in = 0, vio_clk = 0, rst_n = 1;
  initial #0.5 rst_n = 0;             // an edge, so that every asynchronous reset acts
  always #10.0 clk_in  = ~clk_in;     // 50 MHz
  always #7.5  vio_clk = ~vio_clk;    // 66.7 MHz host bus

  word_t host_in_data, host_out_data;
  logic  host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  word_t vio_fsl0_m_data, vio_fsl1_m_data, vio_fsl0_s_data, vio_fsl1_s_data;
  logic  vio_fsl0_m_write, vio_fsl0_m_full, vio_fsl1_m_write, vio_fsl1_m_full;
  logic  vio_fsl0_s_exists, vio_fsl0_s_read, vio_fsl1_s_exists, vio_fsl1_s_read;
  logic  clk0, clk1, rst0_n, rst1_n;
  word_t br_ub0_m_data, br_ub0_s_data, br_ub1_m_data, br_ub1_s_data;
  logic  br_ub0_m_write, br_ub0_m_full, br_ub0_s_exists, br_ub0_s_read;
  logic  br_ub1_m_write, br_ub1_m_full, br_ub1_s_exists, br_ub1_s_read;
  logic  vio_in_job_done, vio_out_job_done, reconf_req0, reconf_req1;
  logic  clk_locked, reconf_busy, reconf_done, reconf_dcm;
  logic [1:0] clk_mux_sel;
  clk_dir_e   reconf_dir;
  logic [5:0] clk_m [2], clk_d [2];
  logic [2:0] clk_n_reconf [2], clk_n_consec [2];

  // ---------------- processor-side link FIFOs ----------------
  word_t l0_rd_data, l1_rd_data, o0_wr_data, o1_wr_data;
  logic  l0_rd_empty, l0_rd_en, l1_rd_empty, l1_rd_en;
  logic  o0_wr_en, o0_wr_full, o1_wr_en, o1_wr_full, o0_empty, o1_empty;

  async_fifo #(.WIDTH(32), .DEPTH(16)) u_l0 (
    .wr_clk(vio_clk), .wr_rst_n(rst_n), .wr_data(vio_fsl0_m_data), .wr_en(vio_fsl0_m_write),
    .wr_full(vio_fsl0_m_full), .wr_level(),
    .rd_clk(clk0), .rd_rst_n(rst_n), .rd_data(l0_rd_data), .rd_en(l0_rd_en),
    .rd_empty(l0_rd_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_l1 (
    .wr_clk(vio_clk), .wr_rst_n(rst_n), .wr_data(vio_fsl1_m_data), .wr_en(vio_fsl1_m_write),
    .wr_full(vio_fsl1_m_full), .wr_level(),
    .rd_clk(clk1), .rd_rst_n(rst_n), .rd_data(l1_rd_data), .rd_en(l1_rd_en),
    .rd_empty(l1_rd_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_o0 (
    .wr_clk(clk0), .wr_rst_n(rst_n), .wr_data(o0_wr_data), .wr_en(o0_wr_en),
    .wr_full(o0_wr_full), .wr_level(),
    .rd_clk(vio_clk), .rd_rst_n(rst_n), .rd_data(vio_fsl0_s_data), .rd_en(vio_fsl0_s_read),
    .rd_empty(o0_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_o1 (
    .wr_clk(clk1), .wr_rst_n(rst_n), .wr_data(o1_wr_data), .wr_en(o1_wr_en),
    .wr_full(o1_wr_full), .wr_level(),
    .rd_clk(vio_clk), .rd_rst_n(rst_n), .rd_data(vio_fsl1_s_data), .rd_en(vio_fsl1_s_read),
    .rd_empty(o1_empty), .rd_level());
  assign vio_fsl0_s_exists = !o0_empty;
  assign vio_fsl1_s_exists = !o1_empty;

  // ---------------- processor models ----------------
  logic exch_go = 0;
  logic job0, job1, xd0, xd1;
  int   xerr0, xerr1;

  ub_qs_model #(.ROLE(0), .N(N), .SORT_CYCLES(SORTC), .READ_CYCLES(READ1),
                .EXCH(EXCH), .PAUSE(PAUSE)) u_ub0 (
    .clk(clk0), .rst_n(rst0_n),
    .hin_data(l0_rd_data), .hin_empty(l0_rd_empty), .hin_rd(l0_rd_en),
    .hout_data(o0_wr_data), .hout_wr(o0_wr_en), .hout_full(o0_wr_full),
    .bm_data(br_ub0_m_data), .bm_write(br_ub0_m_write), .bm_full(br_ub0_m_full),
    .bs_data(br_ub0_s_data), .bs_exists(br_ub0_s_exists), .bs_read(br_ub0_s_read),
    .exch_go, .job_done(job0), .exch_done(xd0), .exch_errors(xerr0));
  ub_qs_model #(.ROLE(1), .N(N), .SORT_CYCLES(SORTC), .READ_CYCLES(READ1),
                .EXCH(EXCH), .PAUSE(PAUSE), .START_DELAY(START1)) u_ub1 (
    .clk(clk1), .rst_n(rst1_n),
    .hin_data(l1_rd_data), .hin_empty(l1_rd_empty), .hin_rd(l1_rd_en),
    .hout_data(o1_wr_data), .hout_wr(o1_wr_en), .hout_full(o1_wr_full),
    .bm_data(br_ub1_m_data), .bm_write(br_ub1_m_write), .bm_full(br_ub1_m_full),
    .bs_data(br_ub1_s_data), .bs_exists(br_ub1_s_exists), .bs_read(br_ub1_s_read),
    .exch_go, .job_done(job1), .exch_done(xd1), .exch_errors(xerr1));

  // ---------------- mechanism counters ----------------
  int n_host_in_stall = 0, n_host_out_stall = 0, n_link_full = 0, n_bridge_full = 0;
  int n_req = 0, n_up = 0, n_down = 0, n_bypass = 0, n_xor_mask = 0, n_limit = 0;
  int n_ceiling = 0, n_consec_lim = 0, n_reconf_lim = 0;
  logic started = 0;
  logic req1_q = 0, req0_q = 0;
  int   both_run = 0;

  int n_in_jobs = 0, n_out_jobs = 0;
  always @(posedge vio_clk) if (rst_n) begin
    if (vio_in_job_done)  n_in_jobs++;
    if (vio_out_job_done) n_out_jobs++;
    if (host_in_valid && !host_in_ready) n_host_in_stall++;
    if (host_out_valid && !host_out_ready) n_host_out_stall++;
    if (vio_fsl0_m_full) n_link_full++;
  end
  always @(posedge clk0) if (rst0_n && br_ub0_m_write && br_ub0_m_full) n_bridge_full++;
  always @(posedge clk_in) if (rst_n) begin
    if (reconf_req1 && !req1_q) n_req++;
    if (reconf_req0 && !req0_q) n_req++;
    req1_q <= reconf_req1; req0_q <= reconf_req0;
    if (started && reconf_busy && clk_mux_sel != 2'b11) n_bypass++;
    // both requests held: the exclusive-or must not produce a request
    both_run = (reconf_req0 && reconf_req1) ? both_run + 1 : 0;
    if (both_run > 4) begin
      checks++;
      if (dut.u_clk.u_logic.req_valid) begin
        failures++; $display("FAIL: simultaneous requests were not masked");
      end else n_xor_mask++;
    end
    // a request that the rules refuse
    if (started && !reconf_busy && dut.u_clk.u_logic.req_valid && !dut.u_clk.u_logic.cmd_valid) n_limit++;
  end

  // ---------------- reference model of the frequency decisions ----------------
  int rm [2], rd [2], rn [2], rc [2];
  initial begin
    rm[0] = P_M0; rd[0] = P_D0; rm[1] = P_M1; rd[1] = P_D1;
    rn[0] = 0; rn[1] = 0; rc[0] = 0; rc[1] = 0;
  end

  // the DCM outputs themselves: the processor clock may already be back on
  // CLK_IN for the next reconfiguration while the period is being measured
  wire clkfx0 = dut.u_clk.clkfx[0];
  wire clkfx1 = dut.u_clk.clkfx[1];

  task automatic measure(input int k, input real exp_ns);
    realtime t0, t1;
    if (k == 0) begin @(posedge clkfx0); @(posedge clkfx0); t0 = $realtime; repeat (8) @(posedge clkfx0); end
    else        begin @(posedge clkfx1); @(posedge clkfx1); t0 = $realtime; repeat (8) @(posedge clkfx1); end
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 8.0 > exp_ns + 0.05 || (t1 - t0) / 8.0 < exp_ns - 0.05) begin
      failures++;
      $display("FAIL: clk%0d period %f ns, expected %f", k, (t1 - t0) / 8.0, exp_ns);
    end
  endtask

  // which processor requested: the one whose request is held alone
  int last_p = 1;
  always @(posedge clk_in) if (reconf_req0 ^ reconf_req1) last_p <= reconf_req1 ? 1 : 0;

  always @(posedge clk_in) if (rst_n && reconf_done) begin
    automatic int p = last_p, q = 1 - last_p;
    automatic bit up_ok = rc[p] < P_MAXC && rn[p] < P_MAXR && (rm[p] + 1) * P_CLKIN <= P_FMAX * rd[p];
    automatic int edcm = up_ok ? p : q;
    automatic clk_dir_e edir = up_ok ? CLK_UP : CLK_DOWN;
    checks++;
    if (reconf_dcm != 1'(edcm) || reconf_dir != edir) begin
      failures++;
      $display("FAIL: reconfiguration dcm%0d %s, expected dcm%0d %s", reconf_dcm, reconf_dir.name(), edcm, edir.name());
    end
    if (edir == CLK_UP) begin
      rm[edcm]++; rn[edcm]++; rc[edcm]++; rc[q] = 0; n_up++;
      if ((rm[edcm] + 1) * P_CLKIN > P_FMAX * rd[edcm]) n_ceiling++;
      if (rc[edcm] == P_MAXC) n_consec_lim++;
    end else begin
      rm[edcm]--; rn[edcm]++; n_down++;
    end
    if (rn[edcm] == P_MAXR) n_reconf_lim++;
    checks++;
    if (clk_m[edcm] != 6'(rm[edcm]) || clk_d[edcm] != 6'(rd[edcm])) begin
      failures++; $display("FAIL: dcm%0d M/D %0d/%0d, expected %0d/%0d", edcm, clk_m[edcm], clk_d[edcm], rm[edcm], rd[edcm]);
    end
    $display("[%0t] reconfiguration %0d: dcm%0d %s to %0d/%0d = %f MHz", $time, n_up + n_down, edcm,
             edir.name(), rm[edcm], rd[edcm], real'(P_CLKIN) * rm[edcm] / rd[edcm]);
    fork
      measure(edcm, 1000.0 * rd[edcm] / (real'(P_CLKIN) * rm[edcm]));
    join_none
  end

  // ---------------- host ----------------
  word_t sent [$], got [$];
  initial begin
    host_in_valid = 0; host_in_data = '0; host_out_ready = 0;
    repeat (5) @(posedge clk_in);
    rst_n = 1;
    wait (clk_locked);
    started = 1;
    // initial clocks
    measure(0, 1000.0 * P_D0 / (real'(P_CLKIN) * P_M0));
    measure(1, 1000.0 * P_D1 / (real'(P_CLKIN) * P_M1));
    // one word per vio_clk cycle while the virtual-IO accepts; ready is
    // sampled between the edges, where it is stable
    @(negedge vio_clk);
    host_in_data = $urandom; host_in_valid = 1;
    while (sent.size() < N) begin
      automatic logic r;
      #0.1 r = host_in_ready;
      @(posedge vio_clk);
      if (r) sent.push_back(host_in_data);
      @(negedge vio_clk);
      if (r) begin
        host_in_data  = $urandom;
        host_in_valid = (sent.size() < N);
      end
    end
  end
  always @(negedge vio_clk) host_out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge vio_clk) if (rst_n && host_out_valid && host_out_ready) got.push_back(host_out_data);

  // ---------------- end of the run ----------------
  initial begin
    wait (started);
    wait (got.size() == N);
    repeat (20) @(posedge vio_clk);
    checks++;
    if (n_in_jobs != 1 || n_out_jobs != 1) begin
      failures++; $display("FAIL: job-done pulses in %0d out %0d", n_in_jobs, n_out_jobs);
    end
    sent.sort();
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL: %0d results", got.size()); end
    else foreach (got[i]) begin
      checks++;
      if (got[i] != sent[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: result %0d = %h, expected %h", i, got[i], sent[i]);
      end
    end
    if (EXCH > 0) begin
      wait (job0 && job1);
      while (reconf_busy) @(posedge clk_in);
      exch_go = 1;
      wait (xd0 && xd1);
      checks++;
      if (xerr0 != 0 || xerr1 != 0) begin failures++; $display("FAIL: exchange data errors %0d %0d", xerr0, xerr1); end
    end
    while (reconf_busy) @(posedge clk_in);
    repeat (50) @(posedge clk_in);
    $display("mechanisms: host-in stall %0d, host-out stall %0d, link full %0d, bridge full %0d",
             n_host_in_stall, n_host_out_stall, n_link_full, n_bridge_full);
    $display("            75%% requests %0d, raises %0d, lowerings %0d, CLK_IN bypass cycles %0d",
             n_req, n_up, n_down, n_bypass);
    $display("            125 MHz ceiling %0d, three-in-a-row %0d, four-per-DCM %0d, refused %0d, XOR-masked %0d",
             n_ceiling, n_consec_lim, n_reconf_lim, n_limit, n_xor_mask);
    checks += 5;
    if (n_bridge_full == 0) begin failures++; $display("FAIL: bridge never full"); end
    if (n_req == 0)         begin failures++; $display("FAIL: no 75%% request"); end
    if (n_up == 0)          begin failures++; $display("FAIL: no raise"); end
    if (n_bypass == 0)      begin failures++; $display("FAIL: no CLK_IN bypass"); end
    if (n_host_out_stall == 0) begin failures++; $display("FAIL: no host-out stall"); end
    if (FULL_COVER) begin
      checks += 8;
      if (n_host_in_stall == 0) begin failures++; $display("FAIL: no host-in stall"); end
      if (n_link_full == 0)     begin failures++; $display("FAIL: no link back-pressure"); end
      if (n_down == 0)          begin failures++; $display("FAIL: no lowering"); end
      if (n_ceiling == 0)       begin failures++; $display("FAIL: 125 MHz ceiling never reached"); end
      if (n_consec_lim == 0)    begin failures++; $display("FAIL: three-in-a-row limit never reached"); end
      if (n_reconf_lim == 0)    begin failures++; $display("FAIL: four-per-DCM limit never reached"); end
      if (n_limit == 0)         begin failures++; $display("FAIL: no request refused"); end
      if (n_xor_mask == 0)      begin failures++; $display("FAIL: simultaneous requests never seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WD_NS);
    failures++;
    $display("FAIL: watchdog, %0d of %0d results, jobs %b%b, exchange %b%b, busy %b", got.size(), N,
             job0, job1, xd0, xd1, reconf_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
