// tb_mpsoc_top: end-to-end test of the dual-processor system at reduced
// reconfiguration times (200 CLK_IN cycles of DCM reset instead of 200 ms,
// 20-cycle lock). A 512-word list is sorted by the two-processor Quicksort
// partition in virtual-IO mode 2 with uB0 starting at 80 MHz (M/D 8/5) and
// uB1 at 87.5 MHz (7/4). uB1 reads the bridge slowly, so its input FIFO stays
// above 75 %: its clock is raised three times to 125 MHz, after which uB0 is
// slowed down until it has used its four reconfigurations and further
// requests are refused. A final exchange phase fills both bridge FIFOs at
// once, which the exclusive-or of the requests must ignore. The host
// interface FIFOs are 16 words deep so that the host sees back-pressure.
// Everything else (environment, checks, mechanism counts) is in
// mpsoc_top_env.svh.
module tb_mpsoc_top;
  import mpsoc_pkg::*;
  localparam int N = 512, READ1 = 16, START1 = 0, SORTC = 1, EXCH = 16, PAUSE = 600;
  localparam int P_M0 = 8, P_D0 = 5, P_M1 = 7, P_D1 = 4;
  localparam int P_FMAX = 125, P_FMIN = 32, P_CLKIN = 50, P_MAXR = 4, P_MAXC = 3;
  localparam bit FULL_COVER = 1;
  localparam real WD_NS = 2.0e6;

  `include "mpsoc_top_env.svh"

  mpsoc_top #(
    .N_IN0(N), .N_OUT1(N), .VIO_DEPTH(16), .HOLD_CYCLES(200), .LOCK_CYCLES(20),
    .INIT_M0(P_M0), .INIT_D0(P_D0), .INIT_M1(P_M1), .INIT_D1(P_D1)
  ) dut (.*);
endmodule
