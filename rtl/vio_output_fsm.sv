// vio_output_fsm: output state machine of the virtual-IO component.
//
// Collects result words from the simplex links of the processors and writes
// them into the output FIFO towards the host, in the order the virtual-IO
// mode prescribes:
//   mode 1, 3: N_OUT0 words from uB0, then N_OUT1 words from uB1
//   mode 2, 6: N_OUT1 words from uB1 only
//   mode 4, 5: N_OUT0 words from uB0 only
// A source with a zero count is skipped; after the last segment the next job
// starts. The mode-to-source mapping is the component's; the counting scheme
// is a choice of this implementation.
//
// Interface: FSL slave side s_data/s_exists in, s_read out (a word is taken
// in the cycle s_read is high). FIFO side out_data/out_valid/out_ready.
// Throughput: one word per clock. In modes that use only one processor, the
// other link's read strobe is constant 0 and out_data is that link's data
// wired straight through.
module vio_output_fsm
  import mpsoc_pkg::*;
#(
  parameter vio_mode_e   MODE   = VIO_2,
  parameter int unsigned N_OUT0 = 0,
  parameter int unsigned N_OUT1 = 256,
  parameter int unsigned CNT_W  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // FSL slave from uB0
  input  word_t       fsl0_s_data,
  input  logic        fsl0_s_exists,
  output logic        fsl0_s_read,
  // FSL slave from uB1
  input  word_t       fsl1_s_data,
  input  logic        fsl1_s_exists,
  output logic        fsl1_s_read,
  // to output FIFO
  output word_t       out_data,
  output logic        out_valid,
  input  logic        out_ready,
  // status
  output vio_dst_e    cur_src,
  output logic        job_done
);
  typedef enum logic {SEG_R0 = 1'b0, SEG_R1 = 1'b1} seg_e;

  localparam bit USE0 = (MODE == VIO_1 || MODE == VIO_3 || MODE == VIO_4 || MODE == VIO_5)
                        && N_OUT0 != 0;
  localparam bit USE1 = (MODE == VIO_1 || MODE == VIO_2 || MODE == VIO_3 || MODE == VIO_6)
                        && N_OUT1 != 0;

  seg_e             seg;
  logic [CNT_W-1:0] cnt, len;
  logic             xfer, last;

  assign cur_src = (seg == SEG_R0) ? (USE0 ? DST_B0 : DST_NONE)
                                   : (USE1 ? DST_B1 : DST_NONE);
  assign len     = (seg == SEG_R0) ? CNT_W'(N_OUT0) : CNT_W'(N_OUT1);

  always_comb begin
    out_data  = (cur_src == DST_B1) ? fsl1_s_data : fsl0_s_data;
    unique case (cur_src)
      DST_B0:  out_valid = fsl0_s_exists;
      DST_B1:  out_valid = fsl1_s_exists;
      default: out_valid = 1'b0;
    endcase
  end

  assign xfer        = out_valid && out_ready;
  assign fsl0_s_read = xfer && (cur_src == DST_B0);
  assign fsl1_s_read = xfer && (cur_src == DST_B1);
  assign last        = (cnt == len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg      <= USE0 ? SEG_R0 : SEG_R1;
      cnt      <= '0;
      job_done <= 1'b0;
    end else begin
      job_done <= 1'b0;
      if (xfer) begin
        if (last) begin
          cnt <= '0;
          if (seg == SEG_R0 && USE1) begin
            seg <= SEG_R1;
          end else begin
            seg      <= USE0 ? SEG_R0 : SEG_R1;
            job_done <= 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (N_OUT0 < 2**CNT_W && N_OUT1 < 2**CNT_W)
    else $error("vio_output_fsm: word count does not fit CNT_W");

  assert property (@(posedge clk) disable iff (!rst_n) !(fsl0_s_read && !fsl0_s_exists));
  assert property (@(posedge clk) disable iff (!rst_n) !(fsl1_s_read && !fsl1_s_exists));
endmodule
