// reconf_clock_unit: runtime-adaptive clock generation for two processors.
//
// Each processor clock is produced by its own DCM from the common input
// clock CLK_IN and passed through a glitch-free clock multiplexer whose other
// input is CLK_IN itself. The logic component listens to the bridge's two
// reconfiguration signals and, one DCM at a time, rewrites a DCM's
// multiplier through its dynamic reconfiguration port. During the 200 ms the
// DCM must stay in reset the affected processor runs on CLK_IN instead of
// being stopped, and it returns to its DCM once that has locked again. This
// is the structure of the document's first clock unit (two DCMs, two
// multiplexers, logic). The DCMs and multiplexers are vendor primitives,
// represented here by behavioural models; with CLK_IN = 50 MHz and D = 4 one
// multiplier step is 12.5 MHz (100 MHz at the default M = 8).
//
// Interface: clk_in / rst_n; reconf_req0/1 (async levels: processor 0/1 too
// slow); clk0 / clk1 to the processors; locked (both DCMs locked and in use)
// and the logic's status outputs.
module reconf_clock_unit
  import mpsoc_pkg::*;
#(
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
  input  logic        clk_in,
  input  logic        rst_n,
  input  logic        reconf_req0,
  input  logic        reconf_req1,
  output logic        clk0,
  output logic        clk1,
  output logic        locked,
  output logic [1:0]  mux_sel,
  output logic        busy,
  output logic        reconf_done,
  output logic        reconf_dcm,
  output clk_dir_e    reconf_dir,
  output logic [5:0]  m_cur [2],
  output logic [5:0]  d_cur [2],
  output logic [2:0]  n_reconf [2],
  output logic [2:0]  n_consec [2]
);
  logic [1:0]  dcm_rst, den, dwe, drdy, dcm_locked, clkfx;
  logic [6:0]  daddr;
  logic [15:0] di;

  rcu_logic #(
    .CLKIN_MHZ(CLKIN_MHZ), .FMAX_MHZ(FMAX_MHZ), .FMIN_MHZ(FMIN_MHZ),
    .MAX_RECONF(MAX_RECONF), .MAX_CONSEC(MAX_CONSEC), .HOLD_CYCLES(HOLD_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES),
    .INIT_M0(INIT_M0), .INIT_D0(INIT_D0), .INIT_M1(INIT_M1), .INIT_D1(INIT_D1)
  ) u_logic (
    .clk(clk_in), .rst_n, .reconf0(reconf_req0), .reconf1(reconf_req1),
    .dcm_rst, .den, .dwe, .daddr, .di, .drdy, .locked(dcm_locked),
    .mux_sel, .busy, .reconf_done, .reconf_dcm, .reconf_dir,
    .m_cur, .d_cur, .n_reconf, .n_consec
  );

  dcm_model #(.CLKFX_MULTIPLY(INIT_M0), .CLKFX_DIVIDE(INIT_D0), .LOCK_CYCLES(LOCK_CYCLES)) u_dcm0 (
    .CLKIN(clk_in), .CLKFB(1'b0), .RST(dcm_rst[0]), .DCLK(clk_in), .DEN(den[0]), .DWE(dwe[0]),
    .DADDR(daddr), .DI(di), .DO(), .DRDY(drdy[0]), .CLK0(), .CLKFX(clkfx[0]), .LOCKED(dcm_locked[0])
  );

  dcm_model #(.CLKFX_MULTIPLY(INIT_M1), .CLKFX_DIVIDE(INIT_D1), .LOCK_CYCLES(LOCK_CYCLES)) u_dcm1 (
    .CLKIN(clk_in), .CLKFB(1'b0), .RST(dcm_rst[1]), .DCLK(clk_in), .DEN(den[1]), .DWE(dwe[1]),
    .DADDR(daddr), .DI(di), .DO(), .DRDY(drdy[1]), .CLK0(), .CLKFX(clkfx[1]), .LOCKED(dcm_locked[1])
  );

  bufgmux_model u_mux0 (.I0(clk_in), .I1(clkfx[0]), .S(mux_sel[0]), .O(clk0));
  bufgmux_model u_mux1 (.I0(clk_in), .I1(clkfx[1]), .S(mux_sel[1]), .O(clk1));

  assign locked = (dcm_locked == 2'b11) && (mux_sel == 2'b11);
endmodule
