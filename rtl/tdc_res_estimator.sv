// tdc_res_estimator: online estimation of the eight TDC resolutions.
// The fractional divider's sigma-delta sequence is known, so the phase step
// it causes between two comparisons is known too:
//   dS = ((1 + y) * 256 - F) / 256 * Tdco   (ps)
// with y the modulator output that set the period, F the fractional word and
// Tdco the nominal DCO period. Each channel's change of count dN over the
// same step, times the true resolution, equals dS plus noise, so a sign-data
// LMS filter
//   T <- T + 2^-MU_SHIFT * (dS - T * dN) * sign(dS)
// converges to the resolution; correlating with the known step alone makes
// the loop's own residual phase drop out on average. Estimates start from
// the typical values and are kept with FRAC fractional bits; the 5-bit
// weights are the rounded integer part.
// The use of the known modulator sequence, the start from typical values and
// the filtering of every sample follow the design description; the LMS form,
// the use of first differences and the step size are this design's choices.
// Interface: one sample per rising clk edge while `en`; sdm delayed by LAG
// cycles is the modulator value belonging to the conversions n1/n2. In the
// loop that is two FBCLK cycles: one from the modulator register to the
// divider reload that uses it, one from the end of the conversion to its
// read-out. With a wrong lag the known step is uncorrelated with the counts
// and the estimates drift to full scale.
// Second-gear estimates update only in MIMO mode.
`timescale 1ps/1fs
module tdc_res_estimator
  import adpll_pkg::*;
#(
  parameter int      NCH       = 4,
  parameter int      FRAC      = 8,
  parameter int      MU_SHIFT  = 10,
  // typical resolutions in ps/256: channel i starts at T1_INIT + i*T_STEP
  parameter int      T1_INIT   = 4736,  // 18.5 ps
  parameter int      T2_INIT   = 4352,  // 17.0 ps
  parameter int      T_STEP    = 768,   //  3.0 ps
  parameter int      LAG       = 2      // FBCLK cycles from sdm to its conversion
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               mimo,
  input  logic signed [3:0]  sdm,
  input  logic        [7:0]  frac,
  input  logic        [10:0] tdco_ps,
  input  conv_t              n1 [NCH],
  input  conv_t              n2 [NCH],
  output res_t               t1 [NCH],
  output res_t               t2 [NCH]
);
  localparam int TW = RES_W + FRAC;       // resolution register width
  localparam int EW = 28;                 // error arithmetic width
  typedef logic signed [EW-1:0] e_t;

  // align the modulator sequence with the conversions it caused
  logic signed [3:0] sdm_q [LAG+1];
  assign sdm_q[0] = sdm;
  for (genvar k = 0; k < LAG; k++) begin : g_lag
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sdm_q[k+1] <= -4'sd1;
      else        sdm_q[k+1] <= sdm_q[k];
  end

  // known phase step in ps, FRAC fractional bits
  logic signed [11:0] step_code;
  e_t               ds;
  always_comb begin
    step_code = (12'(signed'(sdm_q[LAG])) + 12'sd1) * 12'sd256 - $signed({4'b0, frac});
    ds        = (e_t'(step_code) * e_t'($signed({1'b0, tdco_ps}))) <<< (FRAC - 8);
  end

  logic [TW-1:0] est1 [NCH];
  logic [TW-1:0] est2 [NCH];
  conv_t         p1   [NCH];
  conv_t         p2   [NCH];
  logic          v1, v2;

  function automatic logic [TW-1:0] lms(input logic [TW-1:0] t, input conv_t n,
                                        input conv_t np, input e_t d);
    e_t dn, e, upd, nt;
    dn  = e_t'(n) - e_t'(np);
    e   = d - e_t'($signed({1'b0, t})) * dn;
    upd = e >>> MU_SHIFT;
    nt  = e_t'($signed({1'b0, t})) + (d[EW-1] ? -upd : upd);
    if (nt < e_t'(1 << FRAC))             nt = e_t'(1 << FRAC);
    if (nt > e_t'((1 << TW) - 1))         nt = e_t'((1 << TW) - 1);
    return nt[TW-1:0];
  endfunction

  function automatic logic [TW-1:0] init_val(input int base, input int ch);
    return TW'(((base + T_STEP * ch) << FRAC) >> 8);
  endfunction

  function automatic logic sat(input conv_t n);
    localparam int NMAX = (1 << (CONV_W - 1)) - 1;
    return (int'(n) >= NMAX) || (int'(n) <= -NMAX);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        est1[i] <= init_val(T1_INIT, i);
        est2[i] <= init_val(T2_INIT, i);
        p1[i]   <= '0;
        p2[i]   <= '0;
      end
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= en;
      v2 <= en && mimo;
      for (int i = 0; i < NCH; i++) begin
        p1[i] <= n1[i];
        p2[i] <= n2[i];
        if (en && v1 && ds != 0 && !sat(n1[i]) && !sat(p1[i]))
          est1[i] <= lms(est1[i], n1[i], p1[i], ds);
        if (en && mimo && v2 && ds != 0 && !sat(n2[i]) && !sat(p2[i]))
          est2[i] <= lms(est2[i], n2[i], p2[i], ds);
      end
    end

  // rounded 5-bit weights
  always_comb
    for (int i = 0; i < NCH; i++) begin
      logic [TW:0] r1, r2;
      r1 = {1'b0, est1[i]} + (TW+1)'(1 << (FRAC - 1));
      r2 = {1'b0, est2[i]} + (TW+1)'(1 << (FRAC - 1));
      t1[i] = r1[TW] ? '1 : r1[TW-1:FRAC];
      t2[i] = r2[TW] ? '1 : r2[TW-1:FRAC];
    end
endmodule
