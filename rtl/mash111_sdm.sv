// mash111_sdm: third-order MASH 1-1-1 digital sigma-delta modulator for the
// fractional feedback divider.
// Three first-order stages are cascaded, each fed with the residue of the
// one before in the same cycle. Their carries are recombined as
//   v = c1 + (1 - z^-1) c2 + (1 - z^-1)^2 c3
// which has mean F / 256 and third-order shaped quantisation noise; v spans
// -3..4. The output y = v - 1 spans -4..3 as a 4-bit signed value, and the
// divider divides by NI + 1 + y, so the mean division ratio is NI + F/256.
// Stage structure, widths and the output range follow the design
// description; the -1 offset is this design's way of meeting that range.
// Interface: frac (F) -> y. Timing: y registered, one clock after the stages.
`timescale 1ps/1fs
module mash111_sdm #(
  parameter int W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      frac,
  output logic signed [3:0] y
);
  logic         c1, c2, c3;
  logic [W-1:0] e1, e2, e3;
  logic         c2_d, c3_d, c3_dd;

  sdm_core #(.W(W)) u_s1 (.clk, .rst_n, .x(frac), .c(c1), .e(e1));
  sdm_core #(.W(W)) u_s2 (.clk, .rst_n, .x(e1),   .c(c2), .e(e2));
  sdm_core #(.W(W)) u_s3 (.clk, .rst_n, .x(e2),   .c(c3), .e(e3));

  logic signed [3:0] v;
  always_comb
    v = 4'(c1) + 4'(c2) - 4'(c2_d) + 4'(c3) - 4'(2 * c3_d) + 4'(c3_dd);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {c2_d, c3_d, c3_dd} <= '0;
      y <= -4'sd1;
    end else begin
      c2_d  <= c2;
      c3_d  <= c3;
      c3_dd <= c3_d;
      y     <= v - 4'sd1;
    end
endmodule
