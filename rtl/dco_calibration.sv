// dco_calibration: offline PVT calibration of the DCO ring length.
// Before the loop runs, the rings are set to five delay cells and the centre
// control word. A counter in the DCO clock domain counts DCO cycles while a
// gate, WIN cycles of the external calibration clock long, is open. The
// count is read back after the gate closes and the counter has settled:
// below CNT_SLOW the oscillator is slow, so three cells are used; above
// CNT_FAST it is fast, so seven; otherwise five. The gate crosses into the
// DCO domain through a two-flop synchroniser; the count is read only when
// it is static.
// The measurement against an external clock at five cells and the 3/5/7
// decision follow the design description; the window and thresholds
// (800 MHz and 1.25 GHz with a 100 MHz clock) are this design's choices.
// Interface: start (pulse or level, cal_clk domain) -> cells, busy, done.
// Timing: done rises WIN + 6 cal_clk cycles after the edge that samples start.
`timescale 1ps/1fs
module dco_calibration
  import adpll_pkg::*;
#(
  parameter int WIN      = 256,
  parameter int CNT_SLOW = 2048,
  parameter int CNT_FAST = 3200,
  parameter int CNTW     = 16
) (
  input  logic   cal_clk,
  input  logic   dco_clk,
  input  logic   rst_n,
  input  logic   start,
  output cells_e cells,
  output logic   busy,
  output logic   done
);
  typedef enum logic [1:0] {IDLE, GATE, SETTLE, DONE} state_e;
  state_e                      state;
  logic [$clog2(WIN+8)-1:0]    tcnt;
  logic                        gate;

  // DCO clock domain
  logic            g_s1, g_s2, clr_s1, clr_s2;
  logic [CNTW-1:0] dcnt;
  always_ff @(posedge dco_clk or negedge rst_n)
    if (!rst_n) begin
      {g_s1, g_s2, clr_s1, clr_s2} <= '0;
      dcnt <= '0;
    end else begin
      g_s1   <= gate;
      g_s2   <= g_s1;
      clr_s1 <= (state == IDLE);
      clr_s2 <= clr_s1;
      if (clr_s2)    dcnt <= '0;
      else if (g_s2) dcnt <= dcnt + 1'b1;
    end

  // calibration clock domain
  always_ff @(posedge cal_clk or negedge rst_n)
    if (!rst_n) begin
      state <= IDLE;
      tcnt  <= '0;
      gate  <= 1'b0;
      cells <= CELLS5;
    end else begin
      case (state)
        IDLE: if (start) begin
          state <= GATE;
          gate  <= 1'b1;
          tcnt  <= '0;
          cells <= CELLS5;
        end
        GATE: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == $bits(tcnt)'(WIN - 1)) begin
            gate  <= 1'b0;
            tcnt  <= '0;
            state <= SETTLE;
          end
        end
        SETTLE: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == $bits(tcnt)'(4)) begin
            if (dcnt < CNTW'(CNT_SLOW))      cells <= CELLS3;
            else if (dcnt > CNTW'(CNT_FAST)) cells <= CELLS7;
            else                             cells <= CELLS5;
            state <= DONE;
          end
        end
        default: ;   // DONE: hold the result until reset
      endcase
    end

  assign busy = (state == GATE) || (state == SETTLE);
  assign done = (state == DONE);
endmodule
