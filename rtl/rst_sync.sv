// rst_sync: reset synchroniser. Asserts rst_out_n asynchronously with
// rst_in_n and releases it STAGES clock edges after rst_in_n rises, so that
// every clock domain of the system leaves reset in step with its own clock.
module rst_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) sr <= '0;
    else           sr <= {sr[STAGES-2:0], 1'b1};
  end

  assign rst_out_n = sr[STAGES-1];
endmodule
