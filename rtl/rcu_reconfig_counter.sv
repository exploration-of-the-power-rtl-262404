// rcu_reconfig_counter: frequency policy of the reconfigurable clock unit.
//
// Keeps, for each processor clock, the current DCM multiplier M and divider
// D (output frequency CLK_IN * M / D), the number of times its DCM has been
// reconfigured and the number of consecutive raises. A request says that
// processor P is too slow. The document's rules, in order:
//   - raise P's clock by one step (M+1), unless that exceeds 125 MHz, P has
//     already been raised three times in a row, or P's DCM has already been
//     reconfigured four times;
//   - otherwise slow down the other processor Q by one step (M-1), if Q's
//     DCM may still be reconfigured;
//   - otherwise ignore the request.
// A raise of P clears Q's consecutive-raise count. The step of one multiplier
// unit, the lowest allowed frequency and the divider staying fixed are
// choices of this implementation.
//
// Interface: req_valid/req_sel describe the request; cmd_* is the decision,
// combinational and valid while cmd_valid is high. take (one cycle, only
// while cmd_valid) commits it: the state is updated at that clock edge.
// The dividers never change (only M is stepped), so d_cur and cmd_d are
// constants after synthesis.
module rcu_reconfig_counter
  import mpsoc_pkg::*;
#(
  parameter int unsigned CLKIN_MHZ   = 50,
  parameter int unsigned FMAX_MHZ    = 125,
  parameter int unsigned FMIN_MHZ    = 32,
  parameter int unsigned MAX_RECONF  = 4,
  parameter int unsigned MAX_CONSEC  = 3,
  parameter int unsigned INIT_M0     = 8,
  parameter int unsigned INIT_D0     = 4,
  parameter int unsigned INIT_M1     = 8,
  parameter int unsigned INIT_D1     = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic            req_sel,     // processor that is too slow
  output logic            cmd_valid,
  output logic            cmd_dcm,     // DCM to reconfigure
  output clk_dir_e        cmd_dir,
  output logic [5:0]      cmd_m,       // new multiplier
  output logic [5:0]      cmd_d,       // divider (unchanged)
  input  logic            take,
  // state, for observation
  output logic [5:0]      m_cur  [2],
  output logic [5:0]      d_cur  [2],
  output logic [2:0]      n_reconf [2],
  output logic [2:0]      n_consec [2]
);
  localparam int unsigned M_MIN = 2;    // DCM frequency synthesiser minimum

  logic p, q;
  logic can_up, can_down;
  logic [11:0] up_prod, dn_prod, up_lim, dn_lim;

  assign p = req_sel;
  assign q = !req_sel;

  always_comb begin
    up_prod  = 12'((32'(m_cur[p]) + 1) * CLKIN_MHZ);
    up_lim   = 12'(FMAX_MHZ * 32'(d_cur[p]));
    dn_prod  = 12'((32'(m_cur[q]) - 1) * CLKIN_MHZ);
    dn_lim   = 12'(FMIN_MHZ * 32'(d_cur[q]));
    can_up   = (32'(n_consec[p]) < MAX_CONSEC) && (32'(n_reconf[p]) < MAX_RECONF)
               && (up_prod <= up_lim) && (m_cur[p] < 6'd32);
    can_down = (32'(n_reconf[q]) < MAX_RECONF) && (m_cur[q] > 6'(M_MIN))
               && (dn_prod >= dn_lim);
    cmd_valid = req_valid && (can_up || can_down);
    cmd_dcm   = can_up ? p : q;
    cmd_dir   = can_up ? CLK_UP : CLK_DOWN;
    cmd_m     = can_up ? m_cur[p] + 6'd1 : m_cur[q] - 6'd1;
    cmd_d     = can_up ? d_cur[p] : d_cur[q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_cur[0]    <= 6'(INIT_M0);
      d_cur[0]    <= 6'(INIT_D0);
      m_cur[1]    <= 6'(INIT_M1);
      d_cur[1]    <= 6'(INIT_D1);
      n_reconf[0] <= '0;
      n_reconf[1] <= '0;
      n_consec[0] <= '0;
      n_consec[1] <= '0;
    end else if (take && cmd_valid) begin
      m_cur[cmd_dcm]    <= cmd_m;
      n_reconf[cmd_dcm] <= n_reconf[cmd_dcm] + 3'd1;
      if (cmd_dir == CLK_UP) begin
        n_consec[p] <= n_consec[p] + 3'd1;
        n_consec[q] <= '0;
      end
    end
  end

  initial assert (INIT_M0 >= M_MIN && INIT_M0 <= 32 && INIT_D0 >= 1 && INIT_D0 <= 32 &&
                  INIT_M1 >= M_MIN && INIT_M1 <= 32 && INIT_D1 >= 1 && INIT_D1 <= 32 &&
                  MAX_RECONF < 8 && MAX_CONSEC < 8)
    else $error("rcu_reconfig_counter: initial M/D outside the DCM range");

  assert property (@(posedge clk) disable iff (!rst_n) take |-> cmd_valid);
endmodule
