// virtual_io: host interface of the dual-processor system.
//
// Data from the host PC arrives as 32-bit words, is buffered in the input
// FIFO and distributed by the input FSM to processor uB0, uB1 or both over
// their simplex links (FSL). Results come back over the links from uB0
// and/or uB1, are put in order by the output FSM and buffered in the output
// FIFO for the host. Which processor gets which data and which one returns
// results is fixed per instance by MODE (modes 1-6), with the word counts per
// processor and the number of common words as further parameters, as in the
// document's component. The PCI bus controller is not part of this module:
// the host side is a plain valid/ready word stream (host_in_*, host_out_*)
// that a PCI or any other host interface can drive. The FIFO depths are a
// choice of this implementation.
//
// Timing: everything runs on clk (the host interface clock). The FSL ports
// are in the same clock; a link that crosses into a processor clock domain
// is an asynchronous FIFO outside this module. A word written at host_in
// reaches an FSL two clocks later at the earliest.
module virtual_io
  import mpsoc_pkg::*;
#(
  parameter vio_mode_e   MODE      = VIO_2,
  parameter int unsigned N_IN0     = 256,
  parameter int unsigned N_IN1     = 0,
  parameter int unsigned N_COMMON  = 0,
  parameter int unsigned N_OUT0    = 0,
  parameter int unsigned N_OUT1    = 256,
  parameter int unsigned IN_DEPTH  = 512,
  parameter int unsigned OUT_DEPTH = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  // host -> virtual-IO
  input  word_t    host_in_data,
  input  logic     host_in_valid,
  output logic     host_in_ready,
  // virtual-IO -> host
  output word_t    host_out_data,
  output logic     host_out_valid,
  input  logic     host_out_ready,
  // FSL master to uB0 / uB1
  output word_t    fsl0_m_data,
  output logic     fsl0_m_write,
  input  logic     fsl0_m_full,
  output word_t    fsl1_m_data,
  output logic     fsl1_m_write,
  input  logic     fsl1_m_full,
  // FSL slave from uB0 / uB1
  input  word_t    fsl0_s_data,
  input  logic     fsl0_s_exists,
  output logic     fsl0_s_read,
  input  word_t    fsl1_s_data,
  input  logic     fsl1_s_exists,
  output logic     fsl1_s_read,
  // status
  output vio_dst_e in_dst,          // segment the input FSM is serving
  output vio_dst_e out_src,         // processor the output FSM is reading
  output logic     in_job_done,
  output logic     out_job_done,
  output logic [$clog2(IN_DEPTH):0]  in_level,
  output logic [$clog2(OUT_DEPTH):0] out_level
);
  word_t ififo_data, ofifo_data;
  logic  ififo_valid, ififo_ready, ofifo_valid, ofifo_ready;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_data (host_in_data), .in_valid (host_in_valid), .in_ready (host_in_ready),
    .out_data(ififo_data),   .out_valid(ififo_valid),   .out_ready(ififo_ready),
    .level   (in_level)
  );

  vio_input_fsm #(.MODE(MODE), .N_IN0(N_IN0), .N_IN1(N_IN1), .N_COMMON(N_COMMON)) u_in_fsm (
    .clk, .rst_n,
    .in_data (ififo_data), .in_valid(ififo_valid), .in_ready(ififo_ready),
    .fsl0_m_data, .fsl0_m_write, .fsl0_m_full,
    .fsl1_m_data, .fsl1_m_write, .fsl1_m_full,
    .cur_dst (in_dst), .job_done(in_job_done)
  );

  vio_output_fsm #(.MODE(MODE), .N_OUT0(N_OUT0), .N_OUT1(N_OUT1)) u_out_fsm (
    .clk, .rst_n,
    .fsl0_s_data, .fsl0_s_exists, .fsl0_s_read,
    .fsl1_s_data, .fsl1_s_exists, .fsl1_s_read,
    .out_data(ofifo_data), .out_valid(ofifo_valid), .out_ready(ofifo_ready),
    .cur_src (out_src), .job_done(out_job_done)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_data (ofifo_data),    .in_valid (ofifo_valid),    .in_ready (ofifo_ready),
    .out_data(host_out_data), .out_valid(host_out_valid), .out_ready(host_out_ready),
    .level   (out_level)
  );
endmodule
