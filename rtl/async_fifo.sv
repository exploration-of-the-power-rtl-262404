// async_fifo: dual-clock FIFO, one direction of the inter-processor bridge.
//
// The bridge needs one FIFO per direction between two processors that run on
// independently scaled clocks, so each FIFO has a write clock domain (the
// sending processor) and a read clock domain (the receiving processor). This
// is the usual gray-code design: binary pointers with one extra wrap bit,
// converted to gray code and carried across through two-flop synchronisers.
// Full is decided in the write domain, empty in the read domain; both are
// conservative (a pointer seen across is never ahead of the real one).
//
// The bridge watches the fill level in the read domain (rd_level) to decide
// that the reader is too slow; wr_level is the writer's view. The document
// gives no depth; 16 words (the default depth of a simplex link FIFO) is a
// choice of this implementation.
//
// Interface: write side wr_data/wr_en/wr_full, read side first-word-fall-
// through rd_data/rd_empty/rd_en. Latency: a word written is visible to the
// reader 2-3 read clock edges later (synchroniser).
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16           // power of two
) (
  input  logic                    wr_clk,
  input  logic                    wr_rst_n,
  input  logic [WIDTH-1:0]        wr_data,
  input  logic                    wr_en,
  output logic                    wr_full,
  output logic [$clog2(DEPTH):0]  wr_level,

  input  logic                    rd_clk,
  input  logic                    rd_rst_n,
  output logic [WIDTH-1:0]        rd_data,
  input  logic                    rd_en,
  output logic                    rd_empty,
  output logic [$clog2(DEPTH):0]  rd_level
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // Write domain
  ptr_t wr_bin, wr_gray, rd_gray_w1, rd_gray_w2, rd_bin_w;
  // Read domain
  ptr_t rd_bin, rd_gray, wr_gray_r1, wr_gray_r2, wr_bin_r;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !wr_full;
  assign do_rd = rd_en && !rd_empty;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (do_wr) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  assign rd_bin_w = gray2bin(rd_gray_w2);
  assign wr_level = wr_bin - rd_bin_w;
  assign wr_full  = (wr_level == ptr_t'(DEPTH));

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (do_rd) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  assign wr_bin_r = gray2bin(wr_gray_r2);
  assign rd_level = wr_bin_r - rd_bin;
  assign rd_empty = (rd_level == '0);
  assign rd_data  = mem[rd_bin[AW-1:0]];

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");

  assert property (@(posedge wr_clk) disable iff (!wr_rst_n) wr_level <= ptr_t'(DEPTH));
  assert property (@(posedge rd_clk) disable iff (!rd_rst_n) rd_level <= ptr_t'(DEPTH));
endmodule
