// adpll_ctrl: top-level sequencing of the ADPLL.
//   CAL    run the DCO ring-length calibration; loop open
//   ACQ    loop closed with K3 = 4 (wide bandwidth), TDC in SIMO mode
//   TRACK  after coarse lock: K3 = 1, still SIMO
//   LOCKED after lock: TDC in MIMO mode, resolution estimation running;
//          losing lock returns to TRACK (SIMO)
// SIMO during acquisition (long detector pulses), MIMO once locked, K3
// dropped at coarse lock: these follow the design description. The state
// machine itself is this design's choice. It runs on FBCLK, the clock of the
// loop filter and TDC read-out; cal_done, coarse_lock and lock come from other
// clock domains and pass two-flop synchronisers.
// Interface: -> cal_start, loop_en, k3_boost, mimo, est_en.
`timescale 1ps/1fs
module adpll_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic cal_done,
  input  logic coarse_lock,
  input  logic lock,
  output logic cal_start,
  output logic loop_en,
  output logic k3_boost,
  output logic mimo,
  output logic est_en
);
  typedef enum logic [1:0] {CAL, ACQ, TRACK, LOCKED} state_e;
  state_e state;
  logic [1:0] s_done, s_coarse, s_lock;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= CAL;
      s_done   <= '0;
      s_coarse <= '0;
      s_lock   <= '0;
    end else begin
      s_done   <= {s_done[0], cal_done};
      s_coarse <= {s_coarse[0], coarse_lock};
      s_lock   <= {s_lock[0], lock};
      case (state)
        CAL:    if (s_done[1])   state <= ACQ;
        ACQ:    if (s_coarse[1]) state <= TRACK;
        TRACK:  if (s_lock[1])   state <= LOCKED;
        LOCKED: if (!s_lock[1])  state <= TRACK;
      endcase
    end

  assign cal_start = (state == CAL);
  assign loop_en   = (state != CAL);
  assign k3_boost  = (state == ACQ);
  assign mimo      = (state == LOCKED);
  assign est_en    = (state == LOCKED);
endmodule
