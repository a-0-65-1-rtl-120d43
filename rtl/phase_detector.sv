// phase_detector: rising-edge phase/frequency detector for the TDC.
// A REFCLK rising edge sets UP, an FBCLK rising edge sets DN; when both are
// set the pair is cleared asynchronously. UP therefore lasts from the REFCLK
// edge to the FBCLK edge when the reference leads (positive phase error) and
// DN the other way round. Edge-to-edge detection and the sign convention
// follow the design description; the two-flop tri-state structure with an AND
// reset is this design's choice of the standard circuit.
// Interface: refclk, fbclk, rst_n (async, active low) -> up, dn.
// Timing: asynchronous; the pulse width equals the edge time difference.
// Synthesis reports a logic loop through each flop's clear input: that is
// the PFD's reset path (output -> AND -> clear) and is intended. If both
// flops power up set, the clear is already high and only takes effect at the
// next clock edge, so the first edge pair after power-up can be wrong.
`timescale 1ps/1fs
module phase_detector (
  input  logic refclk,
  input  logic fbclk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge refclk or posedge clr)
    if (clr)        up <= 1'b0;
    else            up <= 1'b1;

  always_ff @(posedge fbclk or posedge clr)
    if (clr)        dn <= 1'b0;
    else            dn <= 1'b1;
endmodule
