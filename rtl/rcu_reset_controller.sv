// rcu_reset_controller: DCM reset timing for dynamic reconfiguration.
//
// A DCM whose frequency synthesiser is being rewritten must be held in reset
// for at least 200 ms (document). On start, the DCM chosen by sel is put into
// reset for HOLD_CYCLES cycles of CLK_IN (200 ms at 50 MHz = 10,000,000);
// then the reset is released and released pulses for one cycle. After the
// unit's own reset both DCMs are held in reset for INIT_CYCLES cycles so that
// they start and lock with their initial settings; init_done pulses at the
// end of that. The power-up reset and the exact cycle counts are choices of
// this implementation.
module rcu_reset_controller #(
  parameter int unsigned HOLD_CYCLES = 10_000_000,
  parameter int unsigned INIT_CYCLES = 16,
  parameter int unsigned CNT_W       = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,      // begin a reset period for DCM sel
  input  logic       sel,
  output logic [1:0] dcm_rst,    // reset to DCM 0 / DCM 1
  output logic       busy,
  output logic       released,   // one-cycle pulse: reset of sel just released
  output logic       init_done   // one-cycle pulse: power-up reset released
);
  typedef enum logic [1:0] {R_INIT, R_IDLE, R_HOLD} rstate_e;
  rstate_e          state;
  logic [CNT_W-1:0] cnt;
  logic             sel_q;

  assign busy = (state != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_INIT;
      cnt       <= '0;
      sel_q     <= 1'b0;
      dcm_rst   <= 2'b11;
      released  <= 1'b0;
      init_done <= 1'b0;
    end else begin
      released  <= 1'b0;
      init_done <= 1'b0;
      unique case (state)
        R_INIT: begin
          if (cnt == CNT_W'(INIT_CYCLES - 1)) begin
            cnt       <= '0;
            dcm_rst   <= 2'b00;
            init_done <= 1'b1;
            state     <= R_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        R_IDLE: begin
          if (start) begin
            sel_q        <= sel;
            dcm_rst[sel] <= 1'b1;
            cnt          <= '0;
            state        <= R_HOLD;
          end
        end
        R_HOLD: begin
          if (cnt == CNT_W'(HOLD_CYCLES - 1)) begin
            dcm_rst[sel_q] <= 1'b0;
            released       <= 1'b1;
            cnt            <= '0;
            state          <= R_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  initial assert (HOLD_CYCLES >= 1 && HOLD_CYCLES <= 2**CNT_W && INIT_CYCLES >= 1)
    else $error("rcu_reset_controller: cycle counts do not fit CNT_W");
endmodule
