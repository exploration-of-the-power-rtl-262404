// vio_mode_harness: drives one virtual_io instance in one mode with a host
// stream, two processor stand-ins (link consumers with random back-pressure
// and link producers of numbered results) and a host output sink, and checks
// every word against the mode's routing written out below. Used by
// tb_virtual_io, once per mode.
module vio_mode_harness
  import mpsoc_pkg::*;
#(
  parameter vio_mode_e MODE = VIO_1,
  parameter int        JOBS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   stalls
);
  // routing per job, written out from the mode table (0: uB0, 1: uB1, 2: both)
  function automatic void pattern(output int in_p[$], output int out_p[$]);
    in_p = {}; out_p = {};
    unique case (MODE)
      VIO_1: begin in_p = '{0,0,0,1,1};         out_p = '{0,0,1,1,1}; end
      VIO_2: begin in_p = '{0,0,0};             out_p = '{1,1,1};     end
      VIO_3: begin in_p = '{0,0,0,2,2,2,2,1,1}; out_p = '{0,0,1,1,1}; end
      VIO_4: begin in_p = '{0,0,0};             out_p = '{0,0};       end
      VIO_5: begin in_p = '{2,2,2,2};           out_p = '{0,0};       end
      VIO_6: begin in_p = '{2,2,2,2};           out_p = '{1,1,1};     end
      default: ;
    endcase
  endfunction

  word_t hin, hout, m0, m1, s0, s1;
  logic  hin_v, hin_r, hout_v, hout_r, w0, w1, f0, f1, e0, e1, r0, r1, ijd, ojd;

  virtual_io #(.MODE(MODE), .N_IN0(3), .N_IN1(2), .N_COMMON(4), .N_OUT0(2), .N_OUT1(3),
               .IN_DEPTH(8), .OUT_DEPTH(8)) dut (
    .clk, .rst_n,
    .host_in_data(hin), .host_in_valid(hin_v), .host_in_ready(hin_r),
    .host_out_data(hout), .host_out_valid(hout_v), .host_out_ready(hout_r),
    .fsl0_m_data(m0), .fsl0_m_write(w0), .fsl0_m_full(f0),
    .fsl1_m_data(m1), .fsl1_m_write(w1), .fsl1_m_full(f1),
    .fsl0_s_data(s0), .fsl0_s_exists(e0), .fsl0_s_read(r0),
    .fsl1_s_data(s1), .fsl1_s_exists(e1), .fsl1_s_read(r1),
    .in_dst(), .out_src(), .in_job_done(ijd), .out_job_done(ojd), .in_level(), .out_level());

  word_t exp0[$], exp1[$], expo[$];
  int n_in, n_out, n_p0, n_p1, i_h, i0, i1, io, jin, jout;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL mode %0d: %s at %0t", MODE, what, $time); end
  endtask

  initial begin
    int in_p[$], out_p[$];
    checks = 0; failures = 0; stalls = 0; finished = 0;
    i_h = 0; i0 = 0; i1 = 0; io = 0; n_p0 = 0; n_p1 = 0; jin = 0; jout = 0;
    pattern(in_p, out_p);
    n_in = JOBS * in_p.size();
    n_out = JOBS * out_p.size();
    for (int j = 0; j < JOBS; j++) begin
      int c0 = 0, c1 = 0;
      for (int k = 0; k < in_p.size(); k++) begin
        automatic word_t w = word_t'(32'h1000 * int'(MODE) + j * in_p.size() + k);
        if (in_p[k] != 1) exp0.push_back(w);
        if (in_p[k] != 0) exp1.push_back(w);
      end
      foreach (out_p[k]) begin
        if (out_p[k] == 0) begin expo.push_back(word_t'(32'hA0000 + n_p0)); n_p0++; end
        else               begin expo.push_back(word_t'(32'hB0000 + n_p1)); n_p1++; end
      end
    end
    hin_v = 0; hout_r = 0; f0 = 0; f1 = 0; e0 = 0; e1 = 0;
    @(posedge rst_n);
    while (i_h < n_in || io < n_out || exp0.size() > 0 || exp1.size() > 0) begin
      @(negedge clk);
      hin   = word_t'(32'h1000 * int'(MODE) + i_h);
      hin_v = (i_h < n_in) && ($urandom % 100) < 85;
      hout_r = ($urandom % 100) < 40;
      f0 = ($urandom % 100) < 40;
      f1 = ($urandom % 100) < 40;
      s0 = word_t'(32'hA0000 + i0);
      s1 = word_t'(32'hB0000 + i1);
      e0 = (i0 < n_p0) && ($urandom % 100) < 50;
      e1 = (i1 < n_p1) && ($urandom % 100) < 50;
      #1;
      if (hin_v && !hin_r) stalls++;
      check(!(w0 && f0) && !(w1 && f1), "link written while full");
      if (w0) begin check(exp0.size() > 0 && m0 == exp0[0], "word to uB0"); void'(exp0.pop_front()); end
      if (w1) begin check(exp1.size() > 0 && m1 == exp1[0], "word to uB1"); void'(exp1.pop_front()); end
      if (hout_v && hout_r) begin check(expo.size() > 0 && hout == expo[0], "word to host"); void'(expo.pop_front()); io++; end
      if (hin_v && hin_r) i_h++;
      if (r0) i0++;
      if (r1) i1++;
    end
    repeat (3) @(posedge clk);
    #1;
    check(exp0.size() == 0 && exp1.size() == 0, "all input words delivered");
    check(jin == JOBS && jout == JOBS, $sformatf("job counts %0d %0d", jin, jout));
    finished = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (ijd) jin++;
    if (ojd) jout++;
  end
endmodule
