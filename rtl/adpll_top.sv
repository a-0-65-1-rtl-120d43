// adpll_top: synthesizable all-digital fractional-N PLL, 0.65-1.35 GHz.
// The output clock comes from a DCO made of parallel standard-cell ring
// oscillators. A multi-modulus divider, steered by a MASH 1-1-1 sigma-delta
// modulator, divides it by NF = NI + F/256 on average to make FBCLK. The
// 2x4 MIMO TDC measures the REFCLK-to-FBCLK time difference each reference
// period; the type-2 digital loop filter turns that error into the DCO
// control word, which the decoder splits into ring enables (coarse) and
// per-cell fine codes. Before the loop closes, a calibration run against
// cal_clk picks 3, 5 or 7 delay cells per DCO ring for the process corner.
// The lock detector compares clock counts over 4096 reference cycles; the
// controller widens the loop (K3 = 4) until coarse lock and switches the TDC
// from SIMO to MIMO once locked.
// The block partition and the data flow follow the design description; the
// clocking of the digital back end by FBCLK and the control sequence are
// this design's choices. The DCO ring array, the TDC rings and the clone
// delay are behavioural models of analogue standard-cell circuits;
// DCO_SPEED and TDC_SCALE set their process corner for simulation.
// Synthesis reports logic loops through the behavioural rings and the phase
// detector's clear path: those loops are the oscillators and the PFD reset.
// Interface: refclk (80-110 MHz), cal_clk, rst_n, ni (8..12), frac (F),
// tdco_ps (nominal output period for the resolution estimator) ->
// dco_clk, fbclk, coarse_lock, lock, mimo, ctrl, err, cells.
`timescale 1ps/1fs
module adpll_top
  import adpll_pkg::*;
#(
  parameter real DCO_SPEED = 1.0,   // PVT corner of the DCO model
  parameter real TDC_SCALE = 1.0,   // PVT corner of the TDC rings (resolution factor)
  parameter int  KP        = 1591,
  parameter int  ALPHA_Q16 = 624,
  parameter int  K1_Q36    = 2577,
  parameter int  LOCK_WIN  = 12,
  parameter int  CAL_WIN   = 256
) (
  input  logic              refclk,
  input  logic              cal_clk,
  input  logic              rst_n,
  input  logic [3:0]        ni,
  input  logic [7:0]        frac,
  input  logic [10:0]       tdco_ps,
  output logic              dco_clk,
  output logic              fbclk,
  output logic              coarse_lock,
  output logic              lock,
  output logic              mimo,
  output logic              k3_boost,
  output logic [CTRL_W-1:0] ctrl,
  output err_t              err,
  output cells_e            cells,
  output logic              cal_done
);
  logic              cal_start, cal_busy, loop_en, est_en;
  logic signed [3:0] sdm;
  logic [N_RINGS-1:0] ring_en;
  fcw_t              fcw [DCO_CELLS];
  conv_t             n1 [TDC_CH];
  conv_t             n2 [TDC_CH];
  res_t              t1 [TDC_CH];
  res_t              t2 [TDC_CH];

  adpll_ctrl u_ctrl (
    .clk(fbclk), .rst_n, .cal_done, .coarse_lock, .lock,
    .cal_start, .loop_en, .k3_boost, .mimo, .est_en
  );

  dco_calibration #(.WIN(CAL_WIN)) u_cal (
    .cal_clk, .dco_clk, .rst_n, .start(cal_start), .cells, .busy(cal_busy), .done(cal_done)
  );

  mimo_tdc #(.NCH(TDC_CH), .RING_SCALE(TDC_SCALE)) u_tdc (
    .refclk, .fbclk, .rst_n, .mimo, .est_en, .sdm, .frac, .tdco_ps,
    .err, .n1, .n2, .t1, .t2
  );

  loop_filter #(.KP(KP), .ALPHA_Q16(ALPHA_Q16), .K1_Q36(K1_Q36), .CW(CTRL_W)) u_lf (
    .clk(fbclk), .rst_n, .en(loop_en), .k3_boost, .err, .ctrl
  );

  dco_ctrl_decoder #(.NR(N_RINGS), .CELLS(DCO_CELLS), .CW(CTRL_W)) u_dec (
    .ctrl, .ring_en, .fcw
  );

  dco_ring_array #(.NR(N_RINGS), .CELLS(DCO_CELLS), .SPEED(DCO_SPEED)) u_dco (
    .ring_en, .fcw, .cells, .clk_out(dco_clk)
  );

  frac_divider #(.NIW(4)) u_div (.dco_clk, .rst_n, .ni, .sdm, .fbclk);

  mash111_sdm #(.W(8)) u_sdm (.clk(fbclk), .rst_n, .frac, .y(sdm));

  lock_detector #(.WIN_LOG2(LOCK_WIN)) u_lock (.refclk, .fbclk, .rst_n, .coarse_lock, .lock);
endmodule
