// wl_system: one configuration of the dual-processor system under test, used
// by tb_mpsoc_workloads. It instantiates mpsoc_top in virtual-IO mode MODE
// with initial clock settings M0/D0 and M1/D1 (CLK_IN 50 MHz), the four
// dual-clock links and two ub_wl_model processors. After the clocks lock it
// measures both processor clock periods against 1000 * D / (50 * M) ns, then
// sends one job of host words and compares the results with a model of the
// pattern in ub_wl_model. The DCM reset hold is shortened to 200 cycles.
// done rises when the job has been checked; checks and failures count the
// comparisons.
module wl_system
  import mpsoc_pkg::*;
#(
  parameter int MODE = 1,
  parameter int N    = 16,
  parameter int M0   = 8,
  parameter int D0   = 4,
  parameter int M1   = 8,
  parameter int D1   = 4
) (
  input  logic clk_in,
  input  logic vio_clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  // word counts per mode
  localparam int NI0 = (MODE == 1 || MODE == 3 || MODE == 4) ? N : 0;
  localparam int NI1 = (MODE == 1 || MODE == 3) ? N : 0;
  localparam int NC  = (MODE == 3) ? N / 2 : (MODE == 5 || MODE == 6) ? N : 0;
  localparam int NO0 = (MODE == 1 || MODE == 4) ? N : (MODE == 3) ? N + N / 2 : (MODE == 5) ? 2 * N : 0;
  localparam int NO1 = (MODE == 1) ? N : (MODE == 3) ? N + N / 2 : (MODE == 6) ? N : 0;
  localparam int NIN = NI0 + NI1 + NC;
  localparam int RX0 = NI0 + ((MODE == 3 || MODE == 5 || MODE == 6) ? NC : 0);
  localparam int RX1 = NI1 + ((MODE == 3 || MODE == 5 || MODE == 6) ? NC : 0);

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

  mpsoc_top #(
    .MODE(vio_mode_e'(MODE)), .N_IN0(NI0), .N_IN1(NI1), .N_COMMON(NC), .N_OUT0(NO0), .N_OUT1(NO1),
    .HOLD_CYCLES(200), .LOCK_CYCLES(20),
    .INIT_M0(M0), .INIT_D0(D0), .INIT_M1(M1), .INIT_D1(D1)
  ) dut (.*);

  word_t l0_rd_data, l1_rd_data, o0_wr_data, o1_wr_data;
  logic  l0_rd_empty, l0_rd_en, l1_rd_empty, l1_rd_en;
  logic  o0_wr_en, o0_wr_full, o1_wr_en, o1_wr_full, o0_empty, o1_empty;

  async_fifo #(.WIDTH(32), .DEPTH(16)) u_l0 (
    .wr_clk(vio_clk), .wr_rst_n(rst_n), .wr_data(vio_fsl0_m_data), .wr_en(vio_fsl0_m_write),
    .wr_full(vio_fsl0_m_full), .wr_level(),
    .rd_clk(clk0), .rd_rst_n(rst_n), .rd_data(l0_rd_data), .rd_en(l0_rd_en), .rd_empty(l0_rd_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_l1 (
    .wr_clk(vio_clk), .wr_rst_n(rst_n), .wr_data(vio_fsl1_m_data), .wr_en(vio_fsl1_m_write),
    .wr_full(vio_fsl1_m_full), .wr_level(),
    .rd_clk(clk1), .rd_rst_n(rst_n), .rd_data(l1_rd_data), .rd_en(l1_rd_en), .rd_empty(l1_rd_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_o0 (
    .wr_clk(clk0), .wr_rst_n(rst_n), .wr_data(o0_wr_data), .wr_en(o0_wr_en), .wr_full(o0_wr_full), .wr_level(),
    .rd_clk(vio_clk), .rd_rst_n(rst_n), .rd_data(vio_fsl0_s_data), .rd_en(vio_fsl0_s_read), .rd_empty(o0_empty), .rd_level());
  async_fifo #(.WIDTH(32), .DEPTH(16)) u_o1 (
    .wr_clk(clk1), .wr_rst_n(rst_n), .wr_data(o1_wr_data), .wr_en(o1_wr_en), .wr_full(o1_wr_full), .wr_level(),
    .rd_clk(vio_clk), .rd_rst_n(rst_n), .rd_data(vio_fsl1_s_data), .rd_en(vio_fsl1_s_read), .rd_empty(o1_empty), .rd_level());
  assign vio_fsl0_s_exists = !o0_empty;
  assign vio_fsl1_s_exists = !o1_empty;

  ub_wl_model #(.ROLE(0), .MODE(MODE), .NRX(RX0)) u_ub0 (
    .clk(clk0), .rst_n(rst0_n),
    .hin_data(l0_rd_data), .hin_empty(l0_rd_empty), .hin_rd(l0_rd_en),
    .hout_data(o0_wr_data), .hout_wr(o0_wr_en), .hout_full(o0_wr_full),
    .bm_data(br_ub0_m_data), .bm_write(br_ub0_m_write), .bm_full(br_ub0_m_full),
    .bs_data(br_ub0_s_data), .bs_exists(br_ub0_s_exists), .bs_read(br_ub0_s_read));
  ub_wl_model #(.ROLE(1), .MODE(MODE), .NRX(RX1)) u_ub1 (
    .clk(clk1), .rst_n(rst1_n),
    .hin_data(l1_rd_data), .hin_empty(l1_rd_empty), .hin_rd(l1_rd_en),
    .hout_data(o1_wr_data), .hout_wr(o1_wr_en), .hout_full(o1_wr_full),
    .bm_data(br_ub1_m_data), .bm_write(br_ub1_m_write), .bm_full(br_ub1_m_full),
    .bs_data(br_ub1_s_data), .bs_exists(br_ub1_s_exists), .bs_read(br_ub1_s_read));

  task automatic measure(input int k, input real exp_ns);
    realtime t0, t1;
    if (k == 0) begin @(posedge clk0); t0 = $realtime; repeat (8) @(posedge clk0); end
    else        begin @(posedge clk1); t0 = $realtime; repeat (8) @(posedge clk1); end
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 8.0 > exp_ns + 0.05 || (t1 - t0) / 8.0 < exp_ns - 0.05) begin
      failures++;
      $display("FAIL mode %0d: clk%0d period %f ns, expected %f", MODE, k, (t1 - t0) / 8.0, exp_ns);
    end
  endtask

  word_t sent [$], got [$], expq [$];
  always @(negedge vio_clk) host_out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge vio_clk) if (rst_n && host_out_valid && host_out_ready) got.push_back(host_out_data);

  initial begin
    checks = 0; failures = 0; done = 0;
    host_in_valid = 0; host_in_data = '0;
    wait (rst_n);
    wait (clk_locked);
    measure(0, 1000.0 * D0 / (50.0 * M0));
    measure(1, 1000.0 * D1 / (50.0 * M1));
    for (int i = 0; i < NIN; i++) begin
      @(negedge vio_clk);
      host_in_data = $urandom; host_in_valid = 1;
      #0.1;
      while (!host_in_ready) begin @(negedge vio_clk); #0.1; end
      @(posedge vio_clk);
      sent.push_back(host_in_data);
      @(negedge vio_clk);
      host_in_valid = 0;
    end
    // expected results
    unique case (MODE)
      1: begin
        for (int i = 0; i < N; i++) expq.push_back(sent[i] + 1);
        for (int i = 0; i < N; i++) expq.push_back(sent[N + i] + 2);
      end
      3: begin
        for (int i = 0; i < N + NC; i++) expq.push_back(sent[i] + 1);
        for (int i = N; i < 2 * N + NC; i++) expq.push_back(sent[i] + 2);
      end
      4: for (int i = 0; i < N; i++) expq.push_back(sent[i] + 1);
      5: for (int i = 0; i < N; i++) begin expq.push_back(sent[i] + 1); expq.push_back(sent[i] + 2); end
      6: for (int i = 0; i < N; i++) expq.push_back(2 * sent[i] + 3);
      default: ;
    endcase
    wait (got.size() == expq.size());
    foreach (expq[i]) begin
      checks++;
      if (got[i] !== expq[i]) begin
        failures++;
        $display("FAIL mode %0d: result %0d = %h, expected %h", MODE, i, got[i], expq[i]);
      end
    end
    $display("mode %0d, clocks %0d/%0d and %0d/%0d: %0d results checked", MODE, M0, D0, M1, D1, expq.size());
    done = 1;
  end
endmodule
