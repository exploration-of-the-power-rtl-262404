// rcu_reconfig_monitor: writes new frequency settings into a DCM and
// watches for the end of its reconfiguration.
//
// On start the new multiplier M and divider D are written, as M-1 and D-1,
// to the frequency synthesiser register of the chosen DCM through the DCM's
// dynamic reconfiguration port (DEN/DWE for one cycle, then wait for DRDY).
// drp_done pulses when the DCM acknowledges. After the reset controller has
// released the DCM's reset (released), (at any time after start) the monitor waits for that DCM's
// LOCKED output and pulses lock_done: the reconfiguration is complete, as
// the document's reconfiguration monitor does with the DCMs' done signals.
// The register address and field layout are those of the vendor's DCM; the
// sequencing is this implementation's.
//
// Timing: all in CLK_IN, which is also the DRP clock (DCLK).
module rcu_reconfig_monitor
  import mpsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sel,
  input  logic [5:0]  m,
  input  logic [5:0]  d,
  input  logic        released,    // reset of the selected DCM released
  // DCM dynamic reconfiguration ports (address and data shared)
  output logic [1:0]  den,
  output logic [1:0]  dwe,
  output logic [6:0]  daddr,
  output logic [15:0] di,
  input  logic [1:0]  drdy,
  input  logic [1:0]  locked,
  // progress
  output logic        busy,
  output logic        drp_done,
  output logic        lock_done
);
  typedef enum logic [2:0] {M_IDLE, M_WRITE, M_WAIT_RDY, M_WAIT_REL, M_WAIT_LOCK} mstate_e;
  mstate_e state;
  logic    sel_q;
  logic    rel_q;      // reset release seen since start

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      sel_q     <= 1'b0;
      rel_q     <= 1'b0;
      den       <= '0;
      dwe       <= '0;
      daddr     <= '0;
      di        <= '0;
      drp_done  <= 1'b0;
      lock_done <= 1'b0;
    end else begin
      den       <= '0;
      dwe       <= '0;
      drp_done  <= 1'b0;
      lock_done <= 1'b0;
      if (released) rel_q <= 1'b1;
      unique case (state)
        M_IDLE: if (start) begin
          sel_q <= sel;
          rel_q <= 1'b0;
          daddr <= DCM_DRP_DFS_ADDR;
          di    <= {dcm_md_t'(m) - 8'd1, dcm_md_t'(d) - 8'd1};
          state <= M_WRITE;
        end
        M_WRITE: begin
          den[sel_q] <= 1'b1;
          dwe[sel_q] <= 1'b1;
          state      <= M_WAIT_RDY;
        end
        M_WAIT_RDY: if (drdy[sel_q]) begin
          drp_done <= 1'b1;
          state    <= M_WAIT_REL;
        end
        M_WAIT_REL: if (released || rel_q) state <= M_WAIT_LOCK;
        M_WAIT_LOCK: if (locked[sel_q]) begin
          lock_done <= 1'b1;
          state     <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(den[0] && den[1]));
endmodule
