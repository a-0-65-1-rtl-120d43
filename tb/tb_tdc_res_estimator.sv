// tb_tdc_res_estimator: drives the resolution estimator with a synthetic
// 2x4 TDC. A random modulator sequence y in -4..3 and F set the known phase
// steps; the phase S is accumulated (plus a slow random residual the
// estimator must ignore) and each channel's conversions are S divided by a
// "true" resolution that differs from the typical start value, rounded.
// After convergence the 5-bit weights must equal the rounded true values;
// second-gear weights must not move while MIMO is off.
`timescale 1ps/1fs
module tb_tdc_res_estimator;
  import adpll_pkg::*;
  localparam int LAG = 1;
  logic clk = 0, rst_n = 0, en = 0, mimo = 0;
  logic signed [3:0] sdm;
  logic [7:0] frac = 8'd77;
  logic [10:0] tdco_ps = 11'd971;
  conv_t n1 [4], n2 [4];
  res_t  t1 [4], t2 [4];
  int checks = 0, failures = 0;

  tdc_res_estimator #(.LAG(LAG)) dut (.clk, .rst_n, .en, .mimo, .sdm, .frac, .tdco_ps, .n1, .n2, .t1, .t2);

  always #5000 clk = ~clk;

  real tr1 [4] = '{19.6, 20.4, 25.3, 26.7};   // true resolutions, 1st gear
  real tr2 [4] = '{16.2, 21.3, 22.4, 27.4};   // 2nd gear
  real s, resid;
  int  r, yv;
  logic signed [3:0] hist [LAG+1];

  task automatic step();
    // modulator value for this cycle; its phase step shows LAG cycles later
    // random, but steered so that the phase stays within +-2 ns as in lock
    if (s > 1500.0)       hist[0] = -4'sd4 + 4'($urandom_range(2));
    else if (s < -1500.0) hist[0] = 4'($urandom_range(3));
    else                  hist[0] = 4'($urandom_range(7)) - 4'sd4;
    sdm = hist[0];
    yv = int'(hist[LAG]);
    if (yv > 7) yv -= 16;
    s = s + ((yv + 1) * 256.0 - frac) / 256.0 * tdco_ps;
    r = $urandom_range(200);
    resid = resid * 0.99 + (r - 100) * 0.05;
    for (int i = 0; i < 4; i++) begin
      n1[i] = conv_t'($rtoi((s + resid) / tr1[i] + ((s + resid) >= 0 ? 0.5 : -0.5)));
      n2[i] = conv_t'($rtoi((s + resid) / tr2[i] + ((s + resid) >= 0 ? 0.5 : -0.5)));
    end
    @(posedge clk);
    #1;
    for (int k = LAG; k > 0; k--) hist[k] = hist[k-1];
  endtask

  initial begin
    s = 0; resid = 0;
    for (int k = 0; k <= LAG; k++) hist[k] = -4'sd1;
    for (int i = 0; i < 4; i++) begin n1[i] = 0; n2[i] = 0; end
    sdm = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (t1[i] != res_t'(19 + 3 * i) || t2[i] != res_t'(17 + 3 * i)) begin
        failures++; $display("FAIL: start value ch%0d %0d %0d", i, t1[i], t2[i]);
      end
    end
    en = 1;
    repeat (3000) step();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (t1[i] != res_t'($rtoi(tr1[i] + 0.5))) begin failures++; $display("FAIL: t1[%0d]=%0d want %f", i, t1[i], tr1[i]); end
      checks++;
      if (t2[i] != res_t'(17 + 3 * i)) begin failures++; $display("FAIL: t2[%0d] moved in SIMO", i); end
    end
    mimo = 1;
    repeat (3000) step();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (t2[i] != res_t'($rtoi(tr2[i] + 0.5))) begin failures++; $display("FAIL: t2[%0d]=%0d want %f", i, t2[i], tr2[i]); end
      checks++;
      if (t1[i] != res_t'($rtoi(tr1[i] + 0.5))) begin failures++; $display("FAIL: t1[%0d]=%0d after MIMO", i, t1[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000 * 10000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
