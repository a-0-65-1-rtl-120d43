// lock_detector: frequency lock detection by clock counting.
// REFCLK counts windows of 2^WIN_LOG2 cycles. FBCLK drives a free-running
// Gray-coded counter that is synchronised into the REFCLK domain and
// converted back to binary; at the end of each window the number of FBCLK
// cycles seen in it is compared with the window length. A window passes
// when the two are within TOL (0.1 % of 4096 rounds to 4).
// coarse_lock: set by the first passing window and kept until reset.
// lock: high after two consecutive passing windows, dropped by a failing one.
// The 2^12 window and 0.1 % tolerance follow the design description; the
// coarse-lock rule, the two-window lock rule and the Gray-code crossing are
// this design's choices.
// Interface: refclk, fbclk, rst_n -> coarse_lock, lock.
// Timing: outputs update once per window, at its last REFCLK edge.
`timescale 1ps/1fs
module lock_detector #(
  parameter int WIN_LOG2 = 12,
  parameter int TOL      = 4,
  parameter int GW       = 16
) (
  input  logic refclk,
  input  logic fbclk,
  input  logic rst_n,
  output logic coarse_lock,
  output logic lock
);
  // FBCLK domain: binary and Gray counters
  logic [GW-1:0] fb_bin, fb_gray;
  always_ff @(posedge fbclk or negedge rst_n)
    if (!rst_n) begin
      fb_bin  <= '0;
      fb_gray <= '0;
    end else begin
      fb_bin  <= fb_bin + 1'b1;
      fb_gray <= (fb_bin + 1'b1) ^ ((fb_bin + 1'b1) >> 1);
    end

  // REFCLK domain
  logic [GW-1:0]       g_s1, g_s2, fb_now, fb_last, diff;
  logic [WIN_LOG2-1:0] rcnt;
  logic                pass, pass_prev;

  always_comb begin
    fb_now = '0;
    for (int i = GW - 1; i >= 0; i--)
      fb_now[i] = (i == GW - 1) ? g_s2[i] : (fb_now[i+1] ^ g_s2[i]);
    diff = fb_now - fb_last;
    pass = (diff >= GW'((1 << WIN_LOG2) - TOL)) && (diff <= GW'((1 << WIN_LOG2) + TOL));
  end

  always_ff @(posedge refclk or negedge rst_n)
    if (!rst_n) begin
      g_s1        <= '0;
      g_s2        <= '0;
      fb_last     <= '0;
      rcnt        <= '0;
      pass_prev   <= 1'b0;
      coarse_lock <= 1'b0;
      lock        <= 1'b0;
    end else begin
      g_s1 <= fb_gray;
      g_s2 <= g_s1;
      rcnt <= rcnt + 1'b1;
      if (rcnt == '1) begin
        fb_last   <= fb_now;
        pass_prev <= pass;
        if (pass) coarse_lock <= 1'b1;
        lock <= pass && pass_prev;
      end
    end
endmodule
