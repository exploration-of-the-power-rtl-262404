// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the virtual-IO input FIFO (host -> processors) and output FIFO
// (processors -> host). The document names the two FIFOs but gives neither
// depth nor width; the default depth of 512 words is one 512x36 block RAM,
// a choice of this implementation.
//
// Interface: valid/ready on both sides. in_ready = not full; a word is
// written when in_valid && in_ready. out_valid = not empty and out_data is
// the oldest word, removed when out_valid && out_ready. Both can happen in
// the same cycle. Latency: a written word is visible at the output on the
// next clock edge. level is the number of stored words.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512          // power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [WIDTH-1:0]         in_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH):0]   level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign level     = wr_ptr - rd_ptr;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");

  // Never more than DEPTH words stored.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule
