// dco_ring_array: behavioural model (not synthesizable logic) of the
// standard-cell DCO core: N_RINGS ring oscillators of 3, 5 or 7 programmable
// delay cells whose stage outputs are tied together, each ring driving those
// shared nodes through tristate buffers.
// Every extra driving ring lowers the effective resistance at the shared
// nodes while the capacitance stays the same, so it raises the frequency
// (coarse tuning); the 4-bit fine code of each delay cell trims the cell
// delay (fine tuning); fewer cells per ring make it faster.
// The real part's frequency is set by transistor physics; this model uses
//   f = SPEED * (5 / cells) * (F0_MHZ + STEP_MHZ*(active rings - 1)
//                              + FINE_MHZ * sum over cells of (FCW - 1))
// which gives about 1 MHz per control-word LSB and 1 GHz at the centre code
// with five cells and SPEED = 1. SPEED stands for the process/voltage/
// temperature corner. The formula and its constants are this model's, not
// measured data. With no ring driving, the output stops.
// Interface: ring_en, fcw per delay cell, cells (3/5/7) -> clk_out.
`timescale 1ps/1fs
module dco_ring_array
  import adpll_pkg::*;
#(
  parameter int  NR       = 16,
  parameter int  CELLS    = 7,
  parameter real SPEED    = 1.0,
  parameter real F0_MHZ   = 488.0,
  parameter real STEP_MHZ = 64.0,
  parameter real FINE_MHZ = 1.0
) (
  input  logic [NR-1:0] ring_en,
  input  fcw_t          fcw [CELLS],
  input  cells_e        cells,
  output logic          clk_out
);
  function automatic real freq_mhz();
    int  n;
    int  fine;
    real ncell;
    n    = $countones(ring_en);
    fine = 0;
    for (int c = 0; c < CELLS; c++) fine += int'(fcw[c]) - 1;
    ncell = (cells == CELLS3) ? 3.0 : (cells == CELLS7) ? 7.0 : 5.0;
    return SPEED * (5.0 / ncell) * (F0_MHZ + STEP_MHZ * (n - 1) + FINE_MHZ * fine);
  endfunction

  initial clk_out = 1'b0;
  always begin
    if (ring_en == '0) @(ring_en);
    else #(0.5e6 / freq_mhz()) clk_out = ~clk_out;
  end
endmodule
