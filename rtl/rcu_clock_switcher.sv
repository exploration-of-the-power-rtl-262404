// rcu_clock_switcher: select lines of the two processor clock multiplexers.
//
// Each processor clock comes from a glitch-free clock multiplexer with input
// 0 = CLK_IN (the unit's input clock) and input 1 = its DCM's output. While
// a DCM is in reset for reconfiguration its processor runs on CLK_IN instead
// of being stopped; once the DCM has locked again the processor goes back to
// the DCM clock (document). A command (cmd with mask and value) changes the
// selected select lines; ack pulses SETTLE_CYCLES clock cycles later, when
// the multiplexers are certain to have completed the switch, so that a DCM
// is only reset once nothing uses its output. After reset both processors
// run on CLK_IN. The settle wait is a choice of this implementation.
module rcu_clock_switcher #(
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd,
  input  logic [1:0] cmd_mask,   // which select lines to change
  input  logic [1:0] cmd_val,    // 1 = DCM output, 0 = CLK_IN
  output logic [1:0] mux_sel,
  output logic       ack
);
  logic [$clog2(SETTLE_CYCLES+1)-1:0] cnt;
  logic                               waiting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_sel <= 2'b00;
      cnt     <= '0;
      waiting <= 1'b0;
      ack     <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (waiting) begin
        if (cnt == '0) begin
          waiting <= 1'b0;
          ack     <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end else if (cmd) begin
        mux_sel <= (mux_sel & ~cmd_mask) | (cmd_val & cmd_mask);
        cnt     <= ($clog2(SETTLE_CYCLES+1))'(SETTLE_CYCLES - 1);
        waiting <= 1'b1;
      end
    end
  end
endmodule
