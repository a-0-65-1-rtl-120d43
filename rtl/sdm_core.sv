// sdm_core: first-order digital sigma-delta stage (accumulator with carry)
// used three times by the MASH 1-1-1 modulator.
// The stage adds its input to its residue, compares the sum less 2^W with
// zero, and on a non-negative result outputs 1 and keeps the difference; on
// a negative one it outputs 0 and keeps the sum. The mean of the 1-bit
// output is x / 2^W and the residue is the quantisation error passed to the
// next stage. Delay, compare-to-zero and add, as in the design description.
// Interface: x -> c (carry), e (new residue, combinational), registered on clk.
`timescale 1ps/1fs
module sdm_core #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  output logic         c,
  output logic [W-1:0] e
);
  logic [W-1:0] acc;
  logic [W+1:0] d;
  always_comb begin
    d = {2'b00, acc} + {2'b00, x} - (W+2)'(1 << W);
    c = ~d[W+1];                          // d >= 0
    e = c ? d[W-1:0] : acc + x;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= '0;
    else        acc <= e;
endmodule
