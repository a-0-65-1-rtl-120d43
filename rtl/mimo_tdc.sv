// mimo_tdc: the 2x4 multiple-input multiple-output time-to-digital converter.
// One phase detector turns the REFCLK/FBCLK edge difference into an UP or DN
// pulse. Four gated-ring-oscillator channels, each a little faster or slower
// than the others, count during that pulse. In MIMO mode a delayed clone of
// the same pulse (made by clone_delay) is then fed to the same channels, now
// switched to a second speed by their gear input, so every channel sees the
// same time interval twice with two different quantisation grids: eight
// independent observations from four rings. The combiner weights every count
// with its estimated resolution and averages, which lowers the quantisation
// noise roughly by sqrt(2N) instead of sqrt(N) for plain parallel channels.
// SIMO mode (used while the loop acquires, when pulses can be long) does the
// first conversion only.
// Each channel input is a multiplexer: the detector pulse normally, the clone
// while that channel waits for its second conversion, so no new comparison
// is accepted before the reconversion ends.
// Channel i has resolutions RES1_PS + i*RES_STEP_PS (first conversion) and
// RES2_PS + i*RES_STEP_PS (second), i.e. <18.5,17>, <21.5,20>, <24.5,23>,
// <27.5,26> ps per count as in the design description. RING_SCALE moves
// the rings away from these typical values (a process corner) while the
// estimator still starts from them. The detector, delay,
// rings, counters and combiner follow the description; the multiplexer
// control, the equal clone delays and the FBCLK-clocked read-out are this
// design's choices.
// Interface: refclk, fbclk, rst_n, mimo mode, estimator controls -> err
// (20-bit, 1/8 ps, positive when REFCLK leads), t1/t2 weights.
// Timing: err is registered on the FBCLK rising edge and holds the
// comparison completed before that edge's predecessor (one FBCLK latency).
`timescale 1ps/1fs
module mimo_tdc
  import adpll_pkg::*;
#(
  parameter int      NCH         = 4,
  parameter real     RES1_PS     = 18.5,
  parameter real     RES2_PS     = 17.0,
  parameter real     RES_STEP_PS = 3.0,
  parameter real     CLONE_PS    = 5000.0,
  parameter real     RING_SCALE  = 1.0, // PVT corner: true/typical resolution
  parameter int      EST_LAG     = 2   // FBCLK cycles from modulator output to its conversion
) (
  input  logic               refclk,
  input  logic               fbclk,
  input  logic               rst_n,
  input  logic               mimo,
  input  logic               est_en,
  input  logic signed [3:0]  sdm,
  input  logic        [7:0]  frac,
  input  logic        [10:0] tdco_ps,
  output err_t               err,
  output conv_t              n1 [NCH],
  output conv_t              n2 [NCH],
  output res_t               t1 [NCH],
  output res_t               t2 [NCH]
);
  // typical resolutions handed to the estimator, in ps/256
  localparam int T1_Q8   = int'(RES1_PS * 256.0);
  localparam int T2_Q8   = int'(RES2_PS * 256.0);
  localparam int STEP_Q8 = int'(RES_STEP_PS * 256.0);

  logic up, dn, pulse, clone;

  phase_detector u_pd (.refclk, .fbclk, .rst_n, .up, .dn);
  assign pulse = up | dn;
  clone_delay #(.DELAY_PS(CLONE_PS)) u_clone (.a(pulse), .y(clone));

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic                  gear, en;
    logic [GRO_STAGES-1:0] node;
    assign en = gear ? clone : pulse;
    gro_ring #(
      .STAGES (GRO_STAGES),
      .RES1_PS(RING_SCALE * (RES1_PS + RES_STEP_PS * i)),
      .RES2_PS(RING_SCALE * (RES2_PS + RES_STEP_PS * i))
    ) u_ring (.en, .gear, .node);
    gro_counter_bank #(.STAGES(GRO_STAGES), .CW(8)) u_cnt (
      .rst_n, .node, .en, .sign_neg(dn), .mimo, .gear, .n1(n1[i]), .n2(n2[i])
    );
  end

  tdc_res_estimator #(
    .NCH(NCH), .T1_INIT(T1_Q8), .T2_INIT(T2_Q8), .T_STEP(STEP_Q8), .LAG(EST_LAG)
  ) u_est (
    .clk(fbclk), .rst_n, .en(est_en), .mimo, .sdm, .frac, .tdco_ps,
    .n1, .n2, .t1, .t2
  );

  tdc_postproc #(.NCH(NCH)) u_pp (.clk(fbclk), .rst_n, .mimo, .n1, .n2, .t1, .t2, .err);
endmodule
