// tb_mpsoc_top_full: one complete operation of the dual-processor system with
// every parameter of the top at its default: virtual-IO mode 2 with 256 words
// in and out, 16-word bridge FIFOs, CLK_IN 50 MHz, both processors at 100 MHz
// and the full 200 ms DCM reset hold. A 256-word list is sorted by the
// two-processor Quicksort partition. uB1 is busy for a while before it first
// reads the bridge, so uB0's words fill its FIFO past 75 % and uB1's clock is
// raised once to 112.5 MHz; the run ends after that reconfiguration (about
// 200 ms of simulated time). The environment and checks are in
// mpsoc_top_env.svh.
module tb_mpsoc_top_full;
  import mpsoc_pkg::*;
  localparam int N = 256, READ1 = 0, START1 = 2000, SORTC = 1, EXCH = 0, PAUSE = 0;
  localparam int P_M0 = 8, P_D0 = 4, P_M1 = 8, P_D1 = 4;
  localparam int P_FMAX = 125, P_FMIN = 32, P_CLKIN = 50, P_MAXR = 4, P_MAXC = 3;
  localparam bit FULL_COVER = 0;
  localparam real WD_NS = 4.0e8;

  `include "mpsoc_top_env.svh"

  mpsoc_top dut (.*);
endmodule
