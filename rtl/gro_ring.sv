// gro_ring: behavioural model (not synthesizable logic) of one TDC channel's
// seven-stage NAND gated ring oscillator.
// While `en` is high a single transition travels round the ring, one stage
// per stage delay, toggling node[k] and then node[k+1]; while `en` is low the
// ring stops and keeps its state, so no phase is lost between conversions.
// Dangling inverters give each channel its own speed; the tristate buffers
// across the stages (`gear` high) make it faster for the second conversion.
// Each node rises once every 14 stage delays, so the sum of the seven node
// counters advances once every two stage delays: the TDC resolution is twice
// the stage delay. RES1_PS (gear low) and RES2_PS (gear high) give that
// resolution in ps per count; defaults are channel 0 of the 2x4 TDC.
// Interface: en, gear -> node[6:0]. Timing: continuous-time model.
`timescale 1ps/1fs
module gro_ring #(
  parameter int      STAGES  = 7,
  parameter real     RES1_PS = 18.5,
  parameter real     RES2_PS = 17.0
) (
  input  logic              en,
  input  logic              gear,
  output logic [STAGES-1:0] node
);
  int k;
  initial begin
    // a consistent ring state: alternating levels, transition waiting at 0
    for (int i = 0; i < STAGES; i++) node[i] = i[0];
    k = 0;
  end

  always begin
    wait (en);
    #((gear ? RES2_PS : RES1_PS) / 2.0);
    if (en) begin
      node[k] = ~node[k];
      k = (k == STAGES - 1) ? 0 : k + 1;
    end
  end
endmodule
