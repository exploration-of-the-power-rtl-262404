// bridge_fsm: one processor's side of the inter-processor bridge.
//
// Runs in the clock domain of its processor. Words the processor sends on
// its outgoing simplex link are written into the transmit FIFO (towards the
// other processor); words arriving in the receive FIFO are fetched into an
// output register and offered to the processor on its incoming link. The
// FSM also watches the receive FIFO's fill level: at or above FILL_PCT
// percent (75 % in the document) of the FIFO depth, the processor reading
// this FIFO is taken to be too slow and reconf_req asks for a faster clock
// for it. The document only names these FSMs; the two-state receive
// register and the registered, level-type request are choices of this
// implementation.
//
// Interface: FSL slave from the processor (m_data/m_write/m_full seen from
// the processor), FSL master to the processor (s_data/s_exists/s_read).
// Timing: a received word is offered one clock after it is visible in the
// FIFO; reconf_req follows the fill level with one clock delay. The send
// direction (data, write, full) is wired straight through to the FIFO.
module bridge_fsm
  import mpsoc_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned FILL_PCT = 75
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // processor -> bridge
  input  word_t                   ub_m_data,
  input  logic                    ub_m_write,
  output logic                    ub_m_full,
  // bridge -> processor
  output word_t                   ub_s_data,
  output logic                    ub_s_exists,
  input  logic                    ub_s_read,
  // transmit FIFO (write side)
  output word_t                   tx_data,
  output logic                    tx_en,
  input  logic                    tx_full,
  // receive FIFO (read side)
  input  word_t                   rx_data,
  input  logic                    rx_empty,
  output logic                    rx_en,
  input  logic [$clog2(DEPTH):0]  rx_level,
  // clock reconfiguration request for this processor's clock
  output logic                    reconf_req
);
  localparam int unsigned THRESH = (DEPTH * FILL_PCT + 99) / 100;

  typedef enum logic {RX_EMPTY = 1'b0, RX_VALID = 1'b1} rx_state_e;
  rx_state_e rx_state;

  // transmit: the processor's link write goes straight into the FIFO
  assign tx_data   = ub_m_data;
  assign tx_en     = ub_m_write && !tx_full;
  assign ub_m_full = tx_full;

  // receive: fetch when the register is empty or being read this cycle
  assign rx_en       = !rx_empty && (rx_state == RX_EMPTY || ub_s_read);
  assign ub_s_exists = (rx_state == RX_VALID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state   <= RX_EMPTY;
      ub_s_data  <= '0;
      reconf_req <= 1'b0;
    end else begin
      reconf_req <= (rx_level >= ($clog2(DEPTH)+1)'(THRESH));
      if (rx_en) begin
        ub_s_data <= rx_data;
        rx_state  <= RX_VALID;
      end else if (ub_s_read) begin
        rx_state  <= RX_EMPTY;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ub_s_read |-> ub_s_exists);
endmodule
