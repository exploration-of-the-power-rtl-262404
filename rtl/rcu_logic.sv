// rcu_logic: logic component of the reconfigurable clock unit.
//
// Receives the two reconfiguration signals from the bridge and reconfigures
// one DCM at a time. Its parts follow the document's logic component: XOR
// block (request filter), reset controller (200 ms DCM reset), reconfiguration
// counter (which DCM, which frequency, limits), reconfiguration monitor
// (dynamic reconfiguration port writes, LOCKED watch) and clock switcher
// (multiplexer selects). The sequencer that ties them together is this
// implementation's:
//   INIT     power-up: both DCMs reset, wait until both lock
//   TO_DCM   switch both processors from CLK_IN to their DCMs
//   IDLE     wait for a request the counter accepts, commit it
//   BYPASS   switch the target processor to CLK_IN, wait until settled
//   RESET    hold the DCM in reset, write new M/D, release reset
//   LOCK     wait for the DCM to lock with the new frequency
//   RESTORE  switch the processor back to its DCM; reconf_done pulses
// Everything runs on CLK_IN. The dividers are fixed (only M is stepped), so
// d_cur and the fixed bits of the DCM address are constant outputs.
module rcu_logic
  import mpsoc_pkg::*;
#(
  parameter int unsigned CLKIN_MHZ     = 50,
  parameter int unsigned FMAX_MHZ      = 125,
  parameter int unsigned FMIN_MHZ      = 32,
  parameter int unsigned MAX_RECONF    = 4,
  parameter int unsigned MAX_CONSEC    = 3,
  parameter int unsigned HOLD_CYCLES   = 10_000_000,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned INIT_M0       = 8,
  parameter int unsigned INIT_D0       = 4,
  parameter int unsigned INIT_M1       = 8,
  parameter int unsigned INIT_D1       = 4
) (
  input  logic        clk,          // CLK_IN
  input  logic        rst_n,
  input  logic        reconf0,      // Reconfig. 1: uB0 too slow
  input  logic        reconf1,      // Reconfig. 2: uB1 too slow
  // to the DCMs
  output logic [1:0]  dcm_rst,
  output logic [1:0]  den,
  output logic [1:0]  dwe,
  output logic [6:0]  daddr,
  output logic [15:0] di,
  input  logic [1:0]  drdy,
  input  logic [1:0]  locked,
  // to the clock multiplexers
  output logic [1:0]  mux_sel,
  // status
  output logic        busy,
  output logic        reconf_done,  // one-cycle pulse per completed reconfiguration
  output logic        reconf_dcm,   // DCM of the current / last reconfiguration
  output clk_dir_e    reconf_dir,
  output logic [5:0]  m_cur [2],
  output logic [5:0]  d_cur [2],
  output logic [2:0]  n_reconf [2],
  output logic [2:0]  n_consec [2]
);
  typedef enum logic [2:0] {S_INIT, S_TO_DCM, S_IDLE, S_BYPASS, S_RESET, S_LOCK, S_RESTORE} lstate_e;
  lstate_e state;

  logic       req_valid, req_sel;
  logic       cmd_valid, cmd_dcm;
  clk_dir_e   cmd_dir;
  logic [5:0] cmd_m, cmd_d, m_q, d_q;
  logic       take;
  logic       rc_start, rc_released, rc_init_done;
  logic       mon_start, mon_drp_done, mon_lock_done;
  logic       sw_cmd, sw_ack;
  logic [1:0] sw_mask, sw_val;
  logic       init_seen, drp_seen, rel_seen, lock_seen;

  rcu_xor_block u_xor (
    .clk, .rst_n, .req0(reconf0), .req1(reconf1), .req_valid, .req_sel
  );

  rcu_reconfig_counter #(
    .CLKIN_MHZ(CLKIN_MHZ), .FMAX_MHZ(FMAX_MHZ), .FMIN_MHZ(FMIN_MHZ),
    .MAX_RECONF(MAX_RECONF), .MAX_CONSEC(MAX_CONSEC),
    .INIT_M0(INIT_M0), .INIT_D0(INIT_D0), .INIT_M1(INIT_M1), .INIT_D1(INIT_D1)
  ) u_counter (
    .clk, .rst_n, .req_valid, .req_sel,
    .cmd_valid, .cmd_dcm, .cmd_dir, .cmd_m, .cmd_d, .take,
    .m_cur, .d_cur, .n_reconf, .n_consec
  );

  rcu_reset_controller #(.HOLD_CYCLES(HOLD_CYCLES)) u_rstctl (
    .clk, .rst_n, .start(rc_start), .sel(reconf_dcm), .dcm_rst,
    .busy(), .released(rc_released), .init_done(rc_init_done)
  );

  rcu_reconfig_monitor u_monitor (
    .clk, .rst_n, .start(mon_start), .sel(reconf_dcm), .m(m_q), .d(d_q),
    .released(rc_released), .den, .dwe, .daddr, .di, .drdy, .locked,
    .busy(), .drp_done(mon_drp_done), .lock_done(mon_lock_done)
  );

  rcu_clock_switcher #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_switch (
    .clk, .rst_n, .cmd(sw_cmd), .cmd_mask(sw_mask), .cmd_val(sw_val), .mux_sel, .ack(sw_ack)
  );

  assign take = (state == S_IDLE) && cmd_valid;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      reconf_dcm  <= 1'b0;
      reconf_dir  <= CLK_UP;
      m_q         <= '0;
      d_q         <= '0;
      rc_start    <= 1'b0;
      mon_start   <= 1'b0;
      sw_cmd      <= 1'b0;
      sw_mask     <= '0;
      sw_val      <= '0;
      reconf_done <= 1'b0;
      init_seen   <= 1'b0;
      drp_seen    <= 1'b0;
      rel_seen    <= 1'b0;
      lock_seen   <= 1'b0;
    end else begin
      rc_start    <= 1'b0;
      mon_start   <= 1'b0;
      sw_cmd      <= 1'b0;
      reconf_done <= 1'b0;
      unique case (state)
        S_INIT: begin
          if (rc_init_done) init_seen <= 1'b1;
          if (init_seen && locked == 2'b11) begin
            sw_cmd  <= 1'b1;
            sw_mask <= 2'b11;
            sw_val  <= 2'b11;
            state   <= S_TO_DCM;
          end
        end
        S_TO_DCM: if (sw_ack) state <= S_IDLE;
        S_IDLE: if (take) begin
          reconf_dcm <= cmd_dcm;
          reconf_dir <= cmd_dir;
          m_q        <= cmd_m;
          d_q        <= cmd_d;
          sw_cmd     <= 1'b1;
          sw_mask    <= cmd_dcm ? 2'b10 : 2'b01;
          sw_val     <= 2'b00;
          state      <= S_BYPASS;
        end
        S_BYPASS: if (sw_ack) begin
          rc_start  <= 1'b1;
          mon_start <= 1'b1;
          drp_seen  <= 1'b0;
          rel_seen  <= 1'b0;
          lock_seen <= 1'b0;
          state     <= S_RESET;
        end
        S_RESET: begin
          if (mon_drp_done) drp_seen <= 1'b1;
          if (rc_released)  rel_seen <= 1'b1;
          if (mon_lock_done) lock_seen <= 1'b1;
          if (drp_seen && rel_seen) state <= S_LOCK;
        end
        S_LOCK: if (mon_lock_done || lock_seen) begin
          sw_cmd  <= 1'b1;
          sw_mask <= reconf_dcm ? 2'b10 : 2'b01;
          sw_val  <= 2'b11;
          state   <= S_RESTORE;
        end
        S_RESTORE: if (sw_ack) begin
          reconf_done <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the DCM must be in reset whenever its new settings are written
  assert property (@(posedge clk) disable iff (!rst_n) (den != 2'b00) |-> ((den & dcm_rst) == den));
  // a processor never runs from a DCM that is held in reset
  assert property (@(posedge clk) disable iff (!rst_n) (state != S_INIT) |-> ((mux_sel & dcm_rst) == 2'b00));
endmodule
