// vio_input_fsm: input state machine of the virtual-IO component.
//
// Takes host words from the input FIFO and hands them to the simplex link
// (FSL) of processor uB0, of uB1, or of both at once, in the order the
// selected virtual-IO mode prescribes:
//   mode 1: N_IN0 words to uB0, then N_IN1 words to uB1
//   mode 2: N_IN0 words to uB0 only
//   mode 3: N_IN0 words to uB0, N_COMMON words to both, N_IN1 words to uB1
//   mode 4: N_IN0 words to uB0 only (uniprocessor)
//   mode 5, 6: N_COMMON words to both processors
// One pass through the mode's segments is one job; the FSM then starts the
// next job. Segments whose count is zero are skipped. The modes and the three
// counts are the component's parameters; the segment sequencing and the rule
// that a common word leaves only when both links can take it are choices of
// this implementation.
//
// Interface: FIFO side valid/ready (in_ready is asserted only for a transfer
// that happens in this cycle). FSL master side: m_data, m_write (one word per
// cycle), m_full from the link. Throughput: one word per clock while the
// destination links are not full. The link data outputs are the FIFO's
// data wired straight through; only the write strobes are decided here.
module vio_input_fsm
  import mpsoc_pkg::*;
#(
  parameter vio_mode_e   MODE     = VIO_2,
  parameter int unsigned N_IN0    = 256,
  parameter int unsigned N_IN1    = 0,
  parameter int unsigned N_COMMON = 0,
  parameter int unsigned CNT_W    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // from input FIFO
  input  word_t       in_data,
  input  logic        in_valid,
  output logic        in_ready,
  // FSL master to uB0
  output word_t       fsl0_m_data,
  output logic        fsl0_m_write,
  input  logic        fsl0_m_full,
  // FSL master to uB1
  output word_t       fsl1_m_data,
  output logic        fsl1_m_write,
  input  logic        fsl1_m_full,
  // status
  output vio_dst_e    cur_dst,
  output logic        job_done       // one-cycle pulse after the last word of a job
);
  typedef enum logic [1:0] {SEG_0 = 2'd0, SEG_1 = 2'd1, SEG_2 = 2'd2} seg_e;

  function automatic vio_dst_e seg_dst(int unsigned p);
    unique case (MODE)
      VIO_1:        return (p == 0) ? DST_B0 : (p == 1) ? DST_B1 : DST_NONE;
      VIO_2, VIO_4: return (p == 0) ? DST_B0 : DST_NONE;
      VIO_3:        return (p == 0) ? DST_B0 : (p == 1) ? DST_BOTH : DST_B1;
      VIO_5, VIO_6: return (p == 0) ? DST_BOTH : DST_NONE;
      default:      return DST_NONE;
    endcase
  endfunction

  function automatic int unsigned seg_len(int unsigned p);
    vio_dst_e d;
    d = seg_dst(p);
    unique case (d)
      DST_B0:   return N_IN0;
      DST_B1:   return N_IN1;
      DST_BOTH: return N_COMMON;
      default:  return 0;
    endcase
  endfunction

  function automatic seg_e first_seg();
    for (int unsigned p = 0; p < 3; p++) if (seg_len(p) != 0) return seg_e'(p);
    return SEG_0;
  endfunction

  localparam bit ANY_WORK = (seg_len(0) + seg_len(1) + seg_len(2)) != 0;

  seg_e              seg, seg_nxt;
  logic              wrap;
  logic [CNT_W-1:0]  cnt;
  logic [CNT_W-1:0]  len;
  logic              dst_ok, xfer, last;

  assign cur_dst = ANY_WORK ? seg_dst(32'(seg)) : DST_NONE;
  assign len     = CNT_W'(seg_len(32'(seg)));

  // next non-empty segment after the current one, wrapping to the next job
  always_comb begin
    seg_nxt = seg;
    wrap    = 1'b1;
    for (int unsigned k = 3; k >= 1; k--) begin
      if (seg_len((int'(seg) + k) % 3) != 0) begin
        seg_nxt = seg_e'((int'(seg) + k) % 3);
        wrap    = (int'(seg) + k) >= 3;
      end
    end
  end

  always_comb begin
    unique case (cur_dst)
      DST_B0:   dst_ok = !fsl0_m_full;
      DST_B1:   dst_ok = !fsl1_m_full;
      DST_BOTH: dst_ok = !fsl0_m_full && !fsl1_m_full;
      default:  dst_ok = 1'b0;
    endcase
  end

  assign in_ready     = dst_ok;
  assign xfer         = in_valid && dst_ok;
  assign last         = (cnt == len - 1'b1);
  assign fsl0_m_data  = in_data;
  assign fsl1_m_data  = in_data;
  assign fsl0_m_write = xfer && (cur_dst == DST_B0 || cur_dst == DST_BOTH);
  assign fsl1_m_write = xfer && (cur_dst == DST_B1 || cur_dst == DST_BOTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg      <= first_seg();
      cnt      <= '0;
      job_done <= 1'b0;
    end else begin
      job_done <= 1'b0;
      if (xfer) begin
        if (last) begin
          cnt      <= '0;
          seg      <= seg_nxt;
          job_done <= wrap;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (N_IN0 < 2**CNT_W && N_IN1 < 2**CNT_W && N_COMMON < 2**CNT_W)
    else $error("vio_input_fsm: word count does not fit CNT_W");

  // A link is never written while it reports full.
  assert property (@(posedge clk) disable iff (!rst_n) !(fsl0_m_write && fsl0_m_full));
  assert property (@(posedge clk) disable iff (!rst_n) !(fsl1_m_write && fsl1_m_full));
endmodule
