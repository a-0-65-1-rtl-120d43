// adpll_pkg: types and constants shared by the all-digital PLL.
// The 2x4 TDC (four gated-ring channels, each converting a phase error
// twice), 11-bit signed conversions, 5-bit resolution weights and the 20-bit
// combined phase error follow the design description; the DCO ring count and
// control-word width are this design's choices.
`timescale 1ps/1fs
package adpll_pkg;
  localparam int TDC_CH     = 4;   // parallel TDC channels
  localparam int GRO_STAGES = 7;   // NAND stages per TDC ring
  localparam int CONV_W     = 11;  // signed conversion width
  localparam int RES_W      = 5;   // resolution weight width (ps/LSB)
  localparam int ERR_W      = 20;  // combined phase error width
  localparam int DCO_CELLS  = 7;   // delay cells per DCO ring (max)
  localparam int N_RINGS    = 16;  // DCO rings
  localparam int CTRL_W     = 10;  // DCO control word

  typedef logic signed [CONV_W-1:0] conv_t;
  typedef logic        [RES_W-1:0]  res_t;
  typedef logic signed [ERR_W-1:0]  err_t;
  typedef logic        [3:0]        fcw_t;

  // number of delay cells in each DCO ring, chosen by calibration
  typedef enum logic [1:0] {
    CELLS3 = 2'd1,
    CELLS5 = 2'd2,
    CELLS7 = 2'd3
  } cells_e;
endpackage
