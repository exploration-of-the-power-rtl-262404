// rcu_xor_block: request filter at the input of the clock unit's logic.
//
// The two reconfiguration signals come from the bridge's FIFOs, each in the
// clock domain of the processor that reads that FIFO. They are brought into
// the clock unit's own clock (CLK_IN) with two-flop synchronisers and
// combined with an exclusive OR, so that a request is passed on only while
// exactly one of them is active: reconfiguring both DCMs at once would make
// no sense, as the document's XOR block states. req_sel tells which
// processor is too slow (0: uB0, 1: uB1). The synchronisers and the output
// register are this implementation's additions.
//
// Timing: a change of req0/req1 shows at req_valid three CLK_IN edges later.
module rcu_xor_block (
  input  logic clk,
  input  logic rst_n,
  input  logic req0,        // uB0 too slow (async to clk)
  input  logic req1,        // uB1 too slow (async to clk)
  output logic req_valid,   // exactly one request active
  output logic req_sel      // which one: 0 = uB0, 1 = uB1
);
  logic [1:0] s0, s1;       // synchroniser stages

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0        <= '0;
      s1        <= '0;
      req_valid <= 1'b0;
      req_sel   <= 1'b0;
    end else begin
      s0        <= {s0[0], req0};
      s1        <= {s1[0], req1};
      req_valid <= s0[1] ^ s1[1];
      req_sel   <= s1[1];
    end
  end
endmodule
