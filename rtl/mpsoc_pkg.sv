// mpsoc_pkg: types and constants shared by the dual-processor system.
//
// The virtual-IO modes follow the six wrapper modules of the virtual-IO
// component (which processor receives host data and which one returns
// results). The word width is that of the 32-bit processors' simplex links.
// The dynamic reconfiguration port address and the split of the DFS
// multiply/divide field are those of the Virtex-4/5 DCM (vendor data, not
// part of the system description); they are collected here so that the
// controller and the DCM model agree.
package mpsoc_pkg;

  // Data word carried on every simplex link.
  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // Virtual-IO distribution modes (numbering as in the component's modes).
  typedef enum logic [2:0] {
    VIO_1 = 3'd1,  // in: uB0 then uB1;        out: uB0 then uB1
    VIO_2 = 3'd2,  // in: uB0 only;            out: uB1 only
    VIO_3 = 3'd3,  // in: uB0, both, then uB1; out: uB0 then uB1
    VIO_4 = 3'd4,  // in: uB0 only;            out: uB0 only (uniprocessor)
    VIO_5 = 3'd5,  // in: same data to both;   out: uB0 only
    VIO_6 = 3'd6   // in: same data to both;   out: uB1 only
  } vio_mode_e;

  // Destination of one input segment / source of one output segment.
  typedef enum logic [1:0] {
    DST_NONE = 2'd0,
    DST_B0   = 2'd1,
    DST_B1   = 2'd2,
    DST_BOTH = 2'd3
  } vio_dst_e;

  // DCM dynamic reconfiguration port: frequency synthesiser register.
  localparam logic [6:0] DCM_DRP_DFS_ADDR = 7'h50;
  localparam int unsigned DCM_MD_W = 8;   // multiply-1 in DI[15:8], divide-1 in DI[7:0]
  typedef logic [DCM_MD_W-1:0] dcm_md_t;

  // Direction of a clock change decided by the reconfiguration counter.
  typedef enum logic {
    CLK_UP   = 1'b0,
    CLK_DOWN = 1'b1
  } clk_dir_e;

endpackage
