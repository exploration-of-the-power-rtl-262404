// dcm_model: behavioural model of a Xilinx digital clock manager (DCM_ADV
// subset) with dynamic reconfiguration of its frequency synthesiser.
// Behavioural model, not synthesizable: on an FPGA the vendor primitive is
// used in its place, with the same port names.
//
// CLKFX = CLKIN * M / D. M and D start as CLKFX_MULTIPLY / CLKFX_DIVIDE and
// can be rewritten through the dynamic reconfiguration port (DRP): a write
// (DEN and DWE high for one DCLK cycle) to address 0x50 with M-1 in DI[15:8]
// and D-1 in DI[7:0]. As on the real part, such a write only takes effect
// while the DCM is held in reset (RST high); a write outside reset is
// acknowledged but ignored. DRDY answers every DEN one DCLK cycle later; a
// read of 0x50 returns the stored value. After RST falls, LOCKED rises after
// LOCK_CYCLES CLKIN cycles and CLKFX starts toggling with the new ratio;
// while not locked CLK0 and CLKFX are held low. The CLKIN period is measured
// from the input, so no period parameter is needed. CLKFB is accepted for
// port compatibility and not modelled. The lock time is a choice of this
// model; real lock times are longer.
module dcm_model
  import mpsoc_pkg::*;
#(
  parameter int unsigned CLKFX_MULTIPLY = 8,
  parameter int unsigned CLKFX_DIVIDE   = 4,
  parameter int unsigned LOCK_CYCLES    = 64
) (
  input  logic        CLKIN,
  input  logic        CLKFB,
  input  logic        RST,
  input  logic        DCLK,
  input  logic        DEN,
  input  logic        DWE,
  input  logic [6:0]  DADDR,
  input  logic [15:0] DI,
  output logic [15:0] DO,
  output logic        DRDY,
  output logic        CLK0,
  output logic        CLKFX,
  output logic        LOCKED
);
  logic [7:0] m_reg = 8'(CLKFX_MULTIPLY - 1);
  logic [7:0] d_reg = 8'(CLKFX_DIVIDE - 1);
  logic       drdy_pend = 1'b0;
  int unsigned lock_cnt = 0;
  realtime    last_t = 0;
  realtime    per = 0;

  initial begin
    DO     = '0;
    DRDY   = 1'b0;
    CLKFX  = 1'b0;
    LOCKED = 1'b0;
  end

  // dynamic reconfiguration port
  always @(posedge DCLK) begin
    DRDY      <= drdy_pend;
    drdy_pend <= DEN;
    if (DEN) begin
      if (DWE && DADDR == DCM_DRP_DFS_ADDR && RST) begin
        m_reg <= DI[15:8];
        d_reg <= DI[7:0];
      end
      DO <= (DADDR == DCM_DRP_DFS_ADDR) ? {m_reg, d_reg} : 16'h0000;
    end
  end

  // input period measurement
  always @(posedge CLKIN) begin
    if (last_t > 0) per = $realtime - last_t;
    last_t = $realtime;
  end

  // lock: held off by RST, then LOCK_CYCLES input cycles
  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      lock_cnt <= 0;
      LOCKED   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      LOCKED   <= 1'b1;
    end
  end

  assign CLK0 = LOCKED & CLKIN;

  // frequency synthesiser output
  always begin
    if (LOCKED && per > 0) begin
      CLKFX = 1'b1;
      #(per * (real'(d_reg) + 1.0) / (2.0 * (real'(m_reg) + 1.0)));
      CLKFX = 1'b0;
      #(per * (real'(d_reg) + 1.0) / (2.0 * (real'(m_reg) + 1.0)));
    end else begin
      CLKFX = 1'b0;
      @(posedge CLKIN);
    end
  end
endmodule
