// loop_filter: type-2, second-order digital loop filter of the ADPLL.
// Per comparison (one FBCLK cycle) with phase error e:
//   e3   = K3 * e                       K3 = 4 while k3_boost, else 1
//   acc  = acc + e3                     integral path, 1/(1 - z^-1)
//   x    = KP * e3 + acc                proportional + integral
//   y    = y + (1 - alpha) * (x - y)    first-order IIR, (1-a)/(1-a z^-1)
//   ctrl = CTRL_INIT + K1 * y           DCO control word, saturated
// This is H(z) = K1 (1-a)/(1-a z^-1) * (KP (1-z^-1) + 1)/(1-z^-1): a zero at
// 10 kHz from KP = 1591, a pole at 153 kHz from alpha = 0.990478, and an
// overall gain that gives about a 100 kHz loop at a 100 MHz reference.
// The constants are fixed point: (1 - alpha) = ALPHA_Q16 / 2^16 and
// K1 = K1_Q36 / 2^36. K1 folds in the scaling of the error input: the
// filter gain of the design description assumes a 12 ps TDC step, while err
// here is in 1/8 ps, so K1 = 3.6e-6 / 96.
// The structure, KP, alpha, K1 and K3 (4 during acquisition, 1 after coarse
// lock) follow the design description; the fixed-point formats, the
// saturation and the starting word are this design's choices.
// Interface: en closes the loop (while low the state is cleared and ctrl
// rests at CTRL_INIT); k3_boost; err -> ctrl.
// Timing: ctrl responds to err two clock edges later.
`timescale 1ps/1fs
module loop_filter
  import adpll_pkg::*;
#(
  parameter int KP        = 1591,
  parameter int ALPHA_Q16 = 624,
  parameter int K1_Q36    = 2577,
  parameter int CTRL_INIT = 512,
  parameter int CW        = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          k3_boost,
  input  err_t          err,
  output logic [CW-1:0] ctrl
);
  localparam int AW = 48;
  typedef logic signed [AW-1:0] acc_t;
  localparam acc_t ACC_MAX = acc_t'(1) <<< (AW - 4);

  acc_t acc, y, e3, acc_n, x;
  logic signed [63:0] iir_step, k1y, c;

  always_comb begin
    e3    = k3_boost ? acc_t'(err) <<< 2 : acc_t'(err);
    acc_n = acc + e3;
    if (acc_n >  ACC_MAX) acc_n =  ACC_MAX;
    if (acc_n < -ACC_MAX) acc_n = -ACC_MAX;
    x        = acc_t'(KP) * e3 + acc_n;
    iir_step = (64'(x) - 64'(y)) * 64'(ALPHA_Q16);
    k1y      = 64'(y) * 64'(K1_Q36);
    c        = 64'(CTRL_INIT) + (k1y >>> 36);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc  <= '0;
      y    <= '0;
      ctrl <= CW'(CTRL_INIT);
    end else if (!en) begin
      acc  <= '0;
      y    <= '0;
      ctrl <= CW'(CTRL_INIT);
    end else begin
      acc <= acc_n;
      y   <= y + acc_t'(iir_step >>> 16);
      if (c < 0)                      ctrl <= '0;
      else if (c > 64'((1 << CW) - 1)) ctrl <= '1;
      else                            ctrl <= c[CW-1:0];
    end
endmodule
