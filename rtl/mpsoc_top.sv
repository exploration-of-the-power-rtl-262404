// mpsoc_top: dual-processor system with runtime clock-frequency scaling.
//
// Two soft processors (uB0, uB1, outside this module) share an application.
// The virtual-IO distributes the host's input data to one or both of them and
// gathers their results for the host in one of six fixed patterns (MODE).
// The processors talk to each other through the bridge, a pair of
// asynchronous FIFOs. When the FIFO a processor reads from fills to 75 %, that
// processor is too slow for its partner, and the bridge asks the
// reconfigurable clock unit to raise its clock; if that is no longer allowed
// (125 MHz, three raises in a row, four reconfigurations of a DCM), the
// partner is slowed down instead. The processors' clocks clk0 and clk1 come
// from the clock unit; while a DCM is being reconfigured its processor runs
// on clk_in.
//
// Boundaries: the processors, their simplex links to the virtual-IO and the
// host bus controller are vendor parts and not included. The virtual-IO's
// link ports (vio_*) are therefore brought out in the vio_clk domain; a
// processor connects to them through dual-clock link FIFOs. The bridge link
// ports (br_ub0_*, br_ub1_*) are in the clk0 / clk1 domains. rst0_n and
// rst1_n are reset outputs synchronised to clk0 and clk1 for the processors.
// Default parameters: CLK_IN 50 MHz, both processors at 100 MHz (M=8, D=4),
// 200 ms DCM reset hold, bridge FIFOs of 16 words, virtual-IO mode 2 with
// 256 words in to uB0 and 256 words out of uB1. The structure follows the
// document; sizes and counts it does not give are this implementation's.
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter vio_mode_e   MODE          = VIO_2,
  parameter int unsigned N_IN0         = 256,
  parameter int unsigned N_IN1         = 0,
  parameter int unsigned N_COMMON      = 0,
  parameter int unsigned N_OUT0        = 0,
  parameter int unsigned N_OUT1        = 256,
  parameter int unsigned VIO_DEPTH     = 512,
  parameter int unsigned BRIDGE_DEPTH  = 16,
  parameter int unsigned FILL_PCT      = 75,
  parameter int unsigned CLKIN_MHZ     = 50,
  parameter int unsigned FMAX_MHZ      = 125,
  parameter int unsigned FMIN_MHZ      = 32,
  parameter int unsigned MAX_RECONF    = 4,
  parameter int unsigned MAX_CONSEC    = 3,
  parameter int unsigned HOLD_CYCLES   = 10_000_000,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned LOCK_CYCLES   = 64,
  parameter int unsigned INIT_M0       = 8,
  parameter int unsigned INIT_D0       = 4,
  parameter int unsigned INIT_M1       = 8,
  parameter int unsigned INIT_D1       = 4
) (
  input  logic        clk_in,          // CLK_IN of the clock unit
  input  logic        vio_clk,         // host interface clock
  input  logic        rst_n,
  // host side of the virtual-IO
  input  word_t       host_in_data,
  input  logic        host_in_valid,
  output logic        host_in_ready,
  output word_t       host_out_data,
  output logic        host_out_valid,
  input  logic        host_out_ready,
  // virtual-IO links (vio_clk domain)
  output word_t       vio_fsl0_m_data,
  output logic        vio_fsl0_m_write,
  input  logic        vio_fsl0_m_full,
  output word_t       vio_fsl1_m_data,
  output logic        vio_fsl1_m_write,
  input  logic        vio_fsl1_m_full,
  input  word_t       vio_fsl0_s_data,
  input  logic        vio_fsl0_s_exists,
  output logic        vio_fsl0_s_read,
  input  word_t       vio_fsl1_s_data,
  input  logic        vio_fsl1_s_exists,
  output logic        vio_fsl1_s_read,
  // processor clocks and resets
  output logic        clk0,
  output logic        clk1,
  output logic        rst0_n,
  output logic        rst1_n,
  // bridge links of uB0 (clk0 domain)
  input  word_t       br_ub0_m_data,
  input  logic        br_ub0_m_write,
  output logic        br_ub0_m_full,
  output word_t       br_ub0_s_data,
  output logic        br_ub0_s_exists,
  input  logic        br_ub0_s_read,
  // bridge links of uB1 (clk1 domain)
  input  word_t       br_ub1_m_data,
  input  logic        br_ub1_m_write,
  output logic        br_ub1_m_full,
  output word_t       br_ub1_s_data,
  output logic        br_ub1_s_exists,
  input  logic        br_ub1_s_read,
  // status
  output logic        vio_in_job_done,
  output logic        vio_out_job_done,
  output logic        reconf_req0,
  output logic        reconf_req1,
  output logic        clk_locked,
  output logic [1:0]  clk_mux_sel,
  output logic        reconf_busy,
  output logic        reconf_done,
  output logic        reconf_dcm,
  output clk_dir_e    reconf_dir,
  output logic [5:0]  clk_m [2],
  output logic [5:0]  clk_d [2],
  output logic [2:0]  clk_n_reconf [2],
  output logic [2:0]  clk_n_consec [2]
);
  logic vio_rst_n, cu_rst_n;

  rst_sync u_rs_vio (.clk(vio_clk), .rst_in_n(rst_n), .rst_out_n(vio_rst_n));
  rst_sync u_rs_cu  (.clk(clk_in),  .rst_in_n(rst_n), .rst_out_n(cu_rst_n));
  rst_sync u_rs_0   (.clk(clk0),    .rst_in_n(rst_n), .rst_out_n(rst0_n));
  rst_sync u_rs_1   (.clk(clk1),    .rst_in_n(rst_n), .rst_out_n(rst1_n));

  virtual_io #(
    .MODE(MODE), .N_IN0(N_IN0), .N_IN1(N_IN1), .N_COMMON(N_COMMON),
    .N_OUT0(N_OUT0), .N_OUT1(N_OUT1), .IN_DEPTH(VIO_DEPTH), .OUT_DEPTH(VIO_DEPTH)
  ) u_vio (
    .clk(vio_clk), .rst_n(vio_rst_n),
    .host_in_data, .host_in_valid, .host_in_ready,
    .host_out_data, .host_out_valid, .host_out_ready,
    .fsl0_m_data(vio_fsl0_m_data), .fsl0_m_write(vio_fsl0_m_write), .fsl0_m_full(vio_fsl0_m_full),
    .fsl1_m_data(vio_fsl1_m_data), .fsl1_m_write(vio_fsl1_m_write), .fsl1_m_full(vio_fsl1_m_full),
    .fsl0_s_data(vio_fsl0_s_data), .fsl0_s_exists(vio_fsl0_s_exists), .fsl0_s_read(vio_fsl0_s_read),
    .fsl1_s_data(vio_fsl1_s_data), .fsl1_s_exists(vio_fsl1_s_exists), .fsl1_s_read(vio_fsl1_s_read),
    .in_dst(), .out_src(),
    .in_job_done(vio_in_job_done), .out_job_done(vio_out_job_done),
    .in_level(), .out_level()
  );

  bridge #(.DEPTH(BRIDGE_DEPTH), .FILL_PCT(FILL_PCT)) u_bridge (
    .clk0, .rst0_n, .clk1, .rst1_n,
    .ub0_m_data(br_ub0_m_data), .ub0_m_write(br_ub0_m_write), .ub0_m_full(br_ub0_m_full),
    .ub0_s_data(br_ub0_s_data), .ub0_s_exists(br_ub0_s_exists), .ub0_s_read(br_ub0_s_read),
    .ub1_m_data(br_ub1_m_data), .ub1_m_write(br_ub1_m_write), .ub1_m_full(br_ub1_m_full),
    .ub1_s_data(br_ub1_s_data), .ub1_s_exists(br_ub1_s_exists), .ub1_s_read(br_ub1_s_read),
    .reconf_req0, .reconf_req1,
    .level_01(), .level_10()
  );

  reconf_clock_unit #(
    .CLKIN_MHZ(CLKIN_MHZ), .FMAX_MHZ(FMAX_MHZ), .FMIN_MHZ(FMIN_MHZ),
    .MAX_RECONF(MAX_RECONF), .MAX_CONSEC(MAX_CONSEC), .HOLD_CYCLES(HOLD_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES), .LOCK_CYCLES(LOCK_CYCLES),
    .INIT_M0(INIT_M0), .INIT_D0(INIT_D0), .INIT_M1(INIT_M1), .INIT_D1(INIT_D1)
  ) u_clk (
    .clk_in, .rst_n(cu_rst_n), .reconf_req0, .reconf_req1,
    .clk0, .clk1, .locked(clk_locked), .mux_sel(clk_mux_sel),
    .busy(reconf_busy), .reconf_done, .reconf_dcm, .reconf_dir,
    .m_cur(clk_m), .d_cur(clk_d), .n_reconf(clk_n_reconf), .n_consec(clk_n_consec)
  );
endmodule
