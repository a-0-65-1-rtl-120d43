// frac_divider: multi-modulus feedback divider.
// A down-counter in the DCO clock domain runs from M-1 to 0, where
// M = NI + 1 + y is reloaded at every terminal count from the integer part
// and the sigma-delta output; FBCLK rises on the reload edge and falls half
// way through the period, so each FBCLK period lasts exactly M DCO cycles.
// The modulator is clocked by FBCLK, so its new output is stable long before
// the next reload. Dividing by a sigma-delta-modulated integer to reach the
// fractional ratio NF = NI + F/256 follows the design description; the
// counter structure is this design's choice.
// Interface: dco_clk, ni (8..12), sdm (-4..3) -> fbclk.
// Timing: FBCLK is a register output clocked by the DCO.
`timescale 1ps/1fs
module frac_divider #(
  parameter int NIW = 4
) (
  input  logic              dco_clk,
  input  logic              rst_n,
  input  logic [NIW-1:0]    ni,
  input  logic signed [3:0] sdm,
  output logic              fbclk
);
  localparam int MW = NIW + 1;
  logic [MW-1:0] cnt, m_cur, m_next;

  assign m_next = MW'(ni) + MW'(1) + MW'(signed'(sdm));

  always_ff @(posedge dco_clk or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      m_cur <= MW'(2);
      fbclk <= 1'b0;
    end else if (cnt == '0) begin
      cnt   <= m_next - 1'b1;
      m_cur <= m_next;
      fbclk <= 1'b1;
    end else begin
      cnt   <= cnt - 1'b1;
      fbclk <= (cnt - 1'b1) >= (m_cur >> 1);
    end
endmodule
