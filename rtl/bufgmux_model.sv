// bufgmux_model: behavioural model of a Xilinx global clock multiplexer
// (BUFGMUX). Behavioural model: on an FPGA the vendor primitive is used in
// its place, with the same port names.
//
// O follows I0 when S = 0 and I1 when S = 1, switching without glitches:
// after S changes, the current input is released at its next falling edge,
// the output stays low, and the new input is taken over at its own next
// falling edge. Both inputs must toggle for a switch to complete, as with the
// real part; the clock unit therefore only switches to a DCM output that is
// running. The model starts on I0.
module bufgmux_model (
  input  logic I0,
  input  logic I1,
  input  logic S,
  output logic O
);
  logic en0 = 1'b1;
  logic en1 = 1'b0;

  always @(negedge I0) en0 <= !S && !en1;
  always @(negedge I1) en1 <= S && !en0;

  assign O = (I0 && en0) || (I1 && en1);
endmodule
