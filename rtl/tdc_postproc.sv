// tdc_postproc: weighted-gain combiner of the 2x4 TDC.
// Each conversion is multiplied by the estimated resolution (ps per count)
// of the channel and gear that produced it, which turns every conversion
// into an estimate of the same time interval; the estimates are averaged.
// MIMO: the eight products (two per channel) are summed. SIMO: only the four
// first-conversion products are used and their sum is doubled. Either way
// the 20-bit result is eight times the average, i.e. the averaged phase
// error in units of 1/8 ps. Positive means REFCLK led FBCLK.
// The products, their averaging, the mode rule and the 20-bit width follow
// the design description; keeping the average with three fractional bits is
// this design's reading of that width.
// Interface: n1/n2 conversions, t1/t2 weights, mimo -> err.
// Timing: one register stage on the rising edge of clk.
`timescale 1ps/1fs
module tdc_postproc
  import adpll_pkg::*;
#(
  parameter int NCH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mimo,
  input  conv_t n1 [NCH],
  input  conv_t n2 [NCH],
  input  res_t  t1 [NCH],
  input  res_t  t2 [NCH],
  output err_t  err
);
  err_t sum1, sum2;
  always_comb begin
    sum1 = '0;
    sum2 = '0;
    for (int i = 0; i < NCH; i++) begin
      sum1 += err_t'(n1[i]) * err_t'($signed({1'b0, t1[i]}));
      sum2 += err_t'(n2[i]) * err_t'($signed({1'b0, t2[i]}));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    err <= '0;
    else if (mimo) err <= sum1 + sum2;
    else           err <= sum1 <<< 1;
endmodule
