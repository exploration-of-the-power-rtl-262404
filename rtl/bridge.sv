// bridge: inter-processor communication link with clock-speed monitoring.
//
// uB0 and uB1 run on separate, independently scaled clocks (clk0, clk1). The
// bridge carries words both ways through two asynchronous FIFOs: FIFO 0->1 is
// written in clk0 and read in clk1, FIFO 1->0 the other way round. Each
// processor has an FSM in its own clock domain that serves its two links. If
// the FIFO a processor reads from reaches 75 % of its depth, that processor
// is too slow, and the FSM on its side raises a reconfiguration request for
// its clock: reconf_req0 asks for a faster clk0, reconf_req1 for a faster
// clk1. This follows the document's bridge; the FIFO depth is a choice of
// this implementation.
//
// Interface: per processor an FSL slave (ubN_m_*: the processor writes) and
// an FSL master (ubN_s_*: the processor reads), both in that processor's
// clock. reconf_reqN is a level in clock domain N; the clock unit
// synchronises it.
module bridge
  import mpsoc_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned FILL_PCT = 75
) (
  input  logic   clk0,
  input  logic   rst0_n,
  input  logic   clk1,
  input  logic   rst1_n,
  // uB0
  input  word_t  ub0_m_data,
  input  logic   ub0_m_write,
  output logic   ub0_m_full,
  output word_t  ub0_s_data,
  output logic   ub0_s_exists,
  input  logic   ub0_s_read,
  // uB1
  input  word_t  ub1_m_data,
  input  logic   ub1_m_write,
  output logic   ub1_m_full,
  output word_t  ub1_s_data,
  output logic   ub1_s_exists,
  input  logic   ub1_s_read,
  // clock reconfiguration requests
  output logic   reconf_req0,
  output logic   reconf_req1,
  // fill levels for observation (read-domain view)
  output logic [$clog2(DEPTH):0] level_01,
  output logic [$clog2(DEPTH):0] level_10
);

  word_t          tx0_data, tx1_data, rx0_data, rx1_data;
  logic           tx0_en, tx1_en, tx0_full, tx1_full;
  logic           rx0_en, rx1_en, rx0_empty, rx1_empty;

  // FIFO 0 -> 1: written by uB0 side, read by uB1 side
  async_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_fifo_01 (
    .wr_clk(clk0), .wr_rst_n(rst0_n), .wr_data(tx0_data), .wr_en(tx0_en),
    .wr_full(tx0_full), .wr_level(),
    .rd_clk(clk1), .rd_rst_n(rst1_n), .rd_data(rx1_data), .rd_en(rx1_en),
    .rd_empty(rx1_empty), .rd_level(level_01)
  );

  // FIFO 1 -> 0: written by uB1 side, read by uB0 side
  async_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_fifo_10 (
    .wr_clk(clk1), .wr_rst_n(rst1_n), .wr_data(tx1_data), .wr_en(tx1_en),
    .wr_full(tx1_full), .wr_level(),
    .rd_clk(clk0), .rd_rst_n(rst0_n), .rd_data(rx0_data), .rd_en(rx0_en),
    .rd_empty(rx0_empty), .rd_level(level_10)
  );

  bridge_fsm #(.DEPTH(DEPTH), .FILL_PCT(FILL_PCT)) u_fsm0 (
    .clk(clk0), .rst_n(rst0_n),
    .ub_m_data(ub0_m_data), .ub_m_write(ub0_m_write), .ub_m_full(ub0_m_full),
    .ub_s_data(ub0_s_data), .ub_s_exists(ub0_s_exists), .ub_s_read(ub0_s_read),
    .tx_data(tx0_data), .tx_en(tx0_en), .tx_full(tx0_full),
    .rx_data(rx0_data), .rx_empty(rx0_empty), .rx_en(rx0_en), .rx_level(level_10),
    .reconf_req(reconf_req0)
  );

  bridge_fsm #(.DEPTH(DEPTH), .FILL_PCT(FILL_PCT)) u_fsm1 (
    .clk(clk1), .rst_n(rst1_n),
    .ub_m_data(ub1_m_data), .ub_m_write(ub1_m_write), .ub_m_full(ub1_m_full),
    .ub_s_data(ub1_s_data), .ub_s_exists(ub1_s_exists), .ub_s_read(ub1_s_read),
    .tx_data(tx1_data), .tx_en(tx1_en), .tx_full(tx1_full),
    .rx_data(rx1_data), .rx_empty(rx1_empty), .rx_en(rx1_en), .rx_level(level_01),
    .reconf_req(reconf_req1)
  );
endmodule
