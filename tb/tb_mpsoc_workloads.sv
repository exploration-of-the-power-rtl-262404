// tb_mpsoc_workloads: the system in the configurations its evaluation uses,
// one wl_system each, all running at once:
//   virtual-IO 5, both processors at 95 MHz (M/D 19/10)
//   virtual-IO 3, both at 54 MHz (27/25)
//   virtual-IO 2 is covered by tb_mpsoc_top; here mode 1 at 87.5 / 50 MHz
//   virtual-IO 6, both at 50 MHz (4/4)
//   virtual-IO 4, single processor at 100 MHz (8/4)
//   virtual-IO 4 at 40, 50, ... 100 MHz (M/5, M = 4..10): the clock sweep
// Each instance checks its clock periods and its results.
module tb_mpsoc_workloads;
  logic clk_in = 0, vio_clk = 0, rst_n = 1;
  always #10.0 clk_in  = ~clk_in;
  always #7.5  vio_clk = ~vio_clk;

  localparam int NS = 7;
  localparam int NW = 5 + NS;
  logic [NW-1:0] done;
  int ch [NW], fl [NW];

  wl_system #(.MODE(5), .N(24), .M0(19), .D0(10), .M1(19), .D1(10)) u_dual5 (.clk_in, .vio_clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  wl_system #(.MODE(3), .N(24), .M0(27), .D0(25), .M1(27), .D1(25)) u_dual3 (.clk_in, .vio_clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  wl_system #(.MODE(1), .N(24), .M0(7),  .D0(4),  .M1(4),  .D1(4))  u_dual1 (.clk_in, .vio_clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  wl_system #(.MODE(6), .N(24), .M0(4),  .D0(4),  .M1(4),  .D1(4))  u_dual6 (.clk_in, .vio_clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]));
  wl_system #(.MODE(4), .N(24), .M0(8),  .D0(4),  .M1(8),  .D1(4))  u_uni   (.clk_in, .vio_clk, .rst_n, .done(done[4]), .checks(ch[4]), .failures(fl[4]));
  for (genvar g = 0; g < NS; g++) begin : g_sweep
    wl_system #(.MODE(4), .N(16), .M0(4 + g), .D0(5), .M1(8), .D1(4)) u_sw (
      .clk_in, .vio_clk, .rst_n, .done(done[5 + g]), .checks(ch[5 + g]), .failures(fl[5 + g]));
  end

  int checks = 0, failures = 0;
  initial begin
    #0.5 rst_n = 0;
    #100 rst_n = 1;
    wait (&done);
    for (int i = 0; i < NW; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(200_000.0);
    for (int i = 0; i < NW; i++) begin checks += ch[i]; failures += fl[i]; end
    failures++;
    $display("FAIL: watchdog, done = %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
