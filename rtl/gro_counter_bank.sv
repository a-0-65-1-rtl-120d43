// gro_counter_bank: the counters and conversion latches of one TDC channel.
// Each of the seven ring nodes clocks its own 8-bit asynchronous counter.
// The counters run freely; a conversion is the sum over the nodes of how far
// each counter advanced (mod 256) since the previous conversion ended: one
// count per two stage delays of oscillation inside the window. The magnitude saturates at 1023
// and takes the sign of the phase-detector pulse (DN = negative), giving an
// 11-bit two's complement result.
// SIMO: every falling edge of `en` ends a conversion and updates n1.
// MIMO: the first falling edge stores the count and raises `gear`, which
// switches the ring to its second speed and the channel input to the delayed
// clone; the clone's falling edge ends the second conversion, updates n1 and
// n2 together and clears `gear`.
// The counter widths, 11-bit format and falling-edge latching follow the
// design description; free-running counters with differencing and the
// saturation are this design's choices.
// Interface: node[6:0] ring taps, en conversion window, sign_neg (sampled on
// the rising edge of en), mimo mode -> gear, n1, n2.
// Timing: results change only on a falling edge of en.
`timescale 1ps/1fs
module gro_counter_bank
  import adpll_pkg::*;
#(
  parameter int STAGES = 7,
  parameter int CW     = 8
) (
  input  logic              rst_n,
  input  logic [STAGES-1:0] node,
  input  logic              en,
  input  logic              sign_neg,
  input  logic              mimo,
  output logic              gear,
  output conv_t             n1,
  output conv_t             n2
);
  localparam int SW = CW + $clog2(STAGES);
  localparam logic [SW-1:0] MAXMAG = SW'((1 << (CONV_W - 1)) - 1);

  logic [CW-1:0] cnt  [STAGES];
  logic [CW-1:0] prev [STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_cnt
    logic [CW-1:0] c;
    always_ff @(posedge node[s] or negedge rst_n)
      if (!rst_n) c <= '0;
      else        c <= c + 1'b1;
    assign cnt[s] = c;
  end

  // count accumulated since the last conversion
  logic [SW-1:0] mag;
  always_comb begin
    mag = '0;
    for (int s = 0; s < STAGES; s++) mag += SW'(CW'(cnt[s] - prev[s]));
  end

  logic  sign_q;
  conv_t conv;
  always_comb begin
    logic [CONV_W-2:0] m;
    m    = (mag > MAXMAG) ? MAXMAG[CONV_W-2:0] : mag[CONV_W-2:0];
    conv = sign_q ? -conv_t'({1'b0, m}) : conv_t'({1'b0, m});
  end

  always_ff @(posedge en or negedge rst_n)
    if (!rst_n)     sign_q <= 1'b0;
    else if (!gear) sign_q <= sign_neg;

  conv_t n1_hold;
  always_ff @(negedge en or negedge rst_n)
    if (!rst_n) begin
      gear    <= 1'b0;
      n1_hold <= '0;
      n1      <= '0;
      n2      <= '0;
      for (int s = 0; s < STAGES; s++) prev[s] <= '0;
    end else begin
      for (int s = 0; s < STAGES; s++) prev[s] <= cnt[s];
      if (gear) begin
        n1   <= n1_hold;
        n2   <= conv;
        gear <= 1'b0;
      end else if (mimo) begin
        n1_hold <= conv;
        gear    <= 1'b1;
      end else begin
        n1 <= conv;
        n2 <= '0;
      end
    end
endmodule
