// tb_adpll_top: end-to-end test of the ADPLL.
// A 100 MHz reference and a 100 MHz calibration clock drive the loop with
// NF = NI + F/256. The test follows the whole sequence: DCO calibration,
// acquisition with the wide bandwidth, coarse lock (K3 back to 1), lock and
// the switch of the TDC to MIMO mode. After lock it measures the average DCO
// frequency over many reference periods and compares it with NF * f_ref.
// Every mechanism (calibration, K3 boost, coarse lock, lock, MIMO mode,
// SIMO and MIMO conversions, sigma-delta dither both ways, estimation)
// is counted; one that never happened is a failure. Once locked, the online
// resolution estimates must stay within one LSB of the rings' true
// resolutions.
`timescale 1ps/1fs
module tb_adpll_top;
  import adpll_pkg::*;
  localparam realtime TREF = 10000.0;
  localparam int      NI_V = 10;
  localparam int      F_V  = 77;

  logic refclk = 0, cal_clk = 0, rst_n = 1;
  logic dco_clk, fbclk, coarse_lock, lock, mimo, k3_boost, cal_done;
  logic [CTRL_W-1:0] ctrl;
  err_t err;
  cells_e cells;
  int checks = 0, failures = 0;

  always #(TREF / 2) refclk = ~refclk;
  always #(TREF / 2) cal_clk = ~cal_clk;

  adpll_top dut (
    .refclk, .cal_clk, .rst_n, .ni(4'(NI_V)), .frac(8'(F_V)),
    .tdco_ps(11'(int'(TREF * 256.0 / (NI_V * 256 + F_V)))),
    .dco_clk, .fbclk, .coarse_lock, .lock, .mimo, .k3_boost, .ctrl, .err, .cells, .cal_done
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_boost = 0, n_simo = 0, n_mimo = 0, n_sdm_lo = 0, n_sdm_hi = 0, n_est = 0;
  int ref_cycles = 0;
  always @(posedge refclk) ref_cycles++;
  always @(posedge fbclk) begin
    if (k3_boost) n_boost++;
    if (dut.loop_en && !mimo) n_simo++;
    if (mimo) n_mimo++;
    if (dut.est_en) n_est++;
    if (dut.sdm < 0) n_sdm_lo++;
    if (dut.sdm > 0) n_sdm_hi++;
  end

  realtime t0;
  int      dco_n;
  bit      counting = 0;
  always @(posedge dco_clk) if (counting) dco_n++;

  initial begin
    int max_ref;
    real f_meas, f_exp;
    max_ref = 200000;
    #1 rst_n = 0;   // a falling edge, so every asynchronous reset fires
    repeat (3) @(posedge refclk);
    rst_n = 1;
    wait (cal_done);
    check(cells == CELLS5, "calibration picks five cells at the nominal corner");
    $display("calibrated at ref cycle %0d, cells=%0d", ref_cycles, cells);
    fork
      begin wait (coarse_lock); $display("coarse lock at ref cycle %0d ctrl=%0d", ref_cycles, ctrl); end
      begin repeat (max_ref) @(posedge refclk); end
    join_any
    disable fork;
    check(coarse_lock, "coarse lock reached");
    fork
      begin wait (mimo); $display("lock/MIMO at ref cycle %0d ctrl=%0d", ref_cycles, ctrl); end
      begin repeat (max_ref) @(posedge refclk); end
    join_any
    disable fork;
    check(lock && mimo, "lock reached and MIMO enabled");
    repeat (2000) @(posedge refclk);
    // average frequency over 2000 reference periods
    @(posedge refclk);
    t0 = $realtime; dco_n = 0; counting = 1;
    repeat (2000) @(posedge refclk);
    counting = 0;
    f_meas = dco_n / (($realtime - t0) * 1e-12);
    f_exp  = (NI_V + F_V / 256.0) / (TREF * 1e-12);
    $display("DCO %.6f MHz expected %.6f MHz, ctrl=%0d err=%0d", f_meas / 1e6, f_exp / 1e6, ctrl, err);
    check(f_meas > f_exp * 0.9995 && f_meas < f_exp * 1.0005, "locked frequency = NF * fref");
    check(lock, "still locked");
    check(k3_boost == 0, "K3 back to 1");
    check(n_boost > 0, "K3 boost used");
    check(n_simo > 0, "SIMO conversions");
    check(n_mimo > 0, "MIMO conversions");
    check(n_sdm_lo > 0 && n_sdm_hi > 0, "sigma-delta dithers both ways");
    check(n_est > 0, "resolution estimation ran");
    // the ring models run at their typical resolutions, so in the closed
    // loop the estimates must stay within one LSB of the typical values
    begin
      bit w_ok;
      w_ok = 1;
      for (int i = 0; i < TDC_CH; i++) begin
        int w1, w2;
        w1 = 19 + 3 * i;   // 18.5 + 3i rounded
        w2 = 17 + 3 * i;
        $display("channel %0d weights %0d/%0d ps (typical %0d/%0d)", i, dut.t1[i], dut.t2[i], w1, w2);
        if (int'(dut.t1[i]) < w1 - 1 || int'(dut.t1[i]) > w1 + 1) w_ok = 0;
        if (int'(dut.t2[i]) < w2 - 1 || int'(dut.t2[i]) > w2 + 1) w_ok = 0;
      end
      check(w_ok, "resolution estimates stay at the true values in the loop");
    end
    $display("mechanisms: boost=%0d simo=%0d mimo=%0d sdm-=%0d sdm+=%0d est=%0d", n_boost, n_simo, n_mimo, n_sdm_lo, n_sdm_hi, n_est);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress report every 20 us
  initial forever begin
    #(TREF * 2000);
    $display("t=%0.0f us ctrl=%0d err=%0d coarse=%0d lock=%0d mimo=%0d", $realtime / 1.0e6, ctrl, err, coarse_lock, lock, mimo);
  end

  initial begin
    #(TREF * 500000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
