// dco_ctrl_decoder: maps the linear DCO control word to the ring array's
// coarse and fine controls.
// Coarse: the upper bits select how many rings drive the shared nodes,
// 1 + ctrl[CW-1:FW], as a thermometer code on ring_en.
// Fine: the lower FW bits, value f, are spread over the delay cells so the
// total fine delay steps by exactly one unit per code: cell c gets
//   FCW[c] = 1 + floor((f + c) / CELLS)
// (the sum over the cells is CELLS + f). Code 0000, which the cells cannot
// use, never occurs. Spreading the linear code over the cells one at a time
// keeps the tuning monotonic, as the design description requires; this
// particular mapping and the 4+6 bit split are this design's choices.
// Interface: ctrl -> ring_en, fcw. Timing: combinational.
`timescale 1ps/1fs
module dco_ctrl_decoder
  import adpll_pkg::*;
#(
  parameter int NR    = 16,
  parameter int CELLS = 7,
  parameter int CW    = 10,
  parameter int FW    = 6
) (
  input  logic [CW-1:0] ctrl,
  output logic [NR-1:0] ring_en,
  output fcw_t          fcw [CELLS]
);
  logic [CW-FW-1:0] coarse;
  logic [FW-1:0]    fine;
  assign coarse = ctrl[CW-1:FW];
  assign fine   = ctrl[FW-1:0];

  always_comb begin
    for (int r = 0; r < NR; r++) ring_en[r] = (r <= int'(coarse));
    for (int c = 0; c < CELLS; c++) fcw[c] = fcw_t'(1 + (int'(fine) + c) / CELLS);
  end
endmodule
