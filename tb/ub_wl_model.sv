// ub_wl_model: behavioural stand-in for one soft processor, running a small
// data-flow pattern for each virtual-IO mode so that every mode's routes are
// exercised with the processors in their own clock domains:
//   mode 1: each processor returns its own words, uB0 adds 1, uB1 adds 2
//   mode 3: the same, on own words plus the common words
//   mode 4: uB0 alone returns every word plus 1
//   mode 5: both get the same words; uB1 sends word+2 over the bridge, uB0
//           returns word+1 followed by uB1's word for each input word
//   mode 6: both get the same words; uB0 sends word+1 over the bridge, uB1
//           returns word+2 plus uB0's word
// NRX is the number of host words this processor receives. Link outputs
// change on the falling clock edge; one word per two clocks at most.
module ub_wl_model
  import mpsoc_pkg::*;
#(
  parameter int ROLE = 0,
  parameter int MODE = 1,
  parameter int NRX  = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  hin_data,
  input  logic   hin_empty,
  output logic   hin_rd,
  output word_t  hout_data,
  output logic   hout_wr,
  input  logic   hout_full,
  output word_t  bm_data,
  output logic   bm_write,
  input  logic   bm_full,
  input  word_t  bs_data,
  input  logic   bs_exists,
  output logic   bs_read
);
  task automatic send_link(input bit to_host, input word_t w);
    @(negedge clk);
    if (to_host) begin hout_data = w; hout_wr = 1; end
    else         begin bm_data = w;   bm_write = 1; end
    #0.1;
    while (to_host ? hout_full : bm_full) begin @(negedge clk); #0.1; end
    @(negedge clk);
    hout_wr = 0; bm_write = 0;
  endtask

  task automatic recv_host(output word_t w);
    @(negedge clk);
    while (hin_empty) @(negedge clk);
    w = hin_data; hin_rd = 1;
    @(negedge clk);
    hin_rd = 0;
  endtask

  task automatic recv_bridge(output word_t w);
    @(negedge clk);
    while (!bs_exists) @(negedge clk);
    w = bs_data; bs_read = 1;
    @(negedge clk);
    bs_read = 0;
  endtask

  initial begin
    word_t w, v;
    hin_rd = 0; hout_wr = 0; hout_data = '0; bm_data = '0; bm_write = 0; bs_read = 0;
    @(posedge rst_n);
    repeat (4) @(posedge clk);
    for (int i = 0; i < NRX; i++) begin
      recv_host(w);
      unique case (MODE)
        1, 3, 4: send_link(1'b1, w + word_t'(ROLE + 1));
        5: if (ROLE == 1) send_link(1'b0, w + 2);
           else begin
             send_link(1'b1, w + 1);
             recv_bridge(v);
             send_link(1'b1, v);
           end
        6: if (ROLE == 0) send_link(1'b0, w + 1);
           else begin
             recv_bridge(v);
             send_link(1'b1, w + 2 + v);
           end
        default: ;
      endcase
    end
  end
endmodule
