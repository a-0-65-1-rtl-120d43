// tb_adpll_corner: the PLL at a slow process corner, with the DCO model 30 %
// slower than nominal (DCO_SPEED = 0.7) and the TDC rings 10 % slower than
// their typical resolutions (TDC_SCALE = 1.1). Calibration must shorten the
// DCO rings to three cells; the loop must then reach lock with the TDC in
// MIMO mode, and the averaged DCO frequency must equal NF * f_ref within
// 0.05 %. Starting from the typical values, the online resolution estimates
// must end within one LSB of the rings' true resolutions.
// Corner handling by ring length follows the design description; the
// corner's size is this testbench's choice.
`timescale 1ps/1fs
module tb_adpll_corner;
  import adpll_pkg::*;
  logic refclk = 0, cal_clk = 0, rst_n = 1;
  real  tref = 10000.0;
  logic [3:0] ni = 4'd10;
  logic [7:0] frac = 8'd0;
  logic [10:0] tdco = 11'd1000;
  logic dco_clk, fbclk, coarse_lock, lock, mimo, k3_boost, cal_done;
  logic [CTRL_W-1:0] ctrl;
  err_t err;
  cells_e cells;
  int checks = 0, failures = 0;

  always #(tref / 2) refclk = ~refclk;
  always #5000 cal_clk = ~cal_clk;

  adpll_top #(.DCO_SPEED(0.7), .TDC_SCALE(1.1)) dut (.refclk, .cal_clk, .rst_n, .ni, .frac, .tdco_ps(tdco),
    .dco_clk, .fbclk, .coarse_lock, .lock, .mimo, .k3_boost, .ctrl, .err, .cells, .cal_done);

  int  dco_n;
  bit  counting = 0;
  always @(posedge dco_clk) if (counting) dco_n++;

  // reset, wait for lock in MIMO mode, then average the DCO frequency over
  // 2000 reference periods
  task automatic run_case(input real f_ref_mhz, input int n_i, input int f);
    real nf, fm, fe, t0;
    bit  got;
    tref = 1.0e6 / f_ref_mhz;
    nf   = n_i + f / 256.0;
    ni = 4'(n_i); frac = 8'(f); tdco = 11'($rtoi(tref / nf));
    rst_n = 1; #1 rst_n = 0;
    repeat (4) @(posedge refclk);
    rst_n = 1;
    got = 0;
    for (int k = 0; k < 100000 && !got; k++) begin
      @(posedge refclk);
      got = lock && mimo;
      if (got) $display("locked after %0d reference cycles", k);
    end
    checks++;
    if (!got) begin failures++; $display("FAIL: no lock at %f MHz x %f", f_ref_mhz, nf); return; end
    repeat (1000) @(posedge refclk);
    t0 = $realtime; dco_n = 0; counting = 1;
    repeat (2000) @(posedge refclk);
    counting = 0;
    fm = dco_n / (($realtime - t0) * 1e-6);
    fe = nf * f_ref_mhz;
    $display("ref %0.1f MHz NF %f: DCO %f MHz (expected %f), cells code %0d", f_ref_mhz, nf, fm, fe, cells);
    checks++;
    if (fm < fe * 0.9995 || fm > fe * 1.0005) begin failures++; $display("FAIL: frequency"); end
    checks++;
    if (cells != CELLS3) begin failures++; $display("FAIL: calibration chose %0d", cells); end
  endtask

  initial begin
    run_case(100.0, 10, 77);    // 1030.08 MHz
    repeat (6000) @(posedge refclk);
    begin
      bit w_ok;
      w_ok = 1;
      for (int i = 0; i < TDC_CH; i++) begin
        real r1, r2;
        r1 = 1.1 * (18.5 + 3.0 * i);
        r2 = 1.1 * (17.0 + 3.0 * i);
        $display("channel %0d weights %0d/%0d ps (true %0.2f/%0.2f)", i, dut.t1[i], dut.t2[i], r1, r2);
        if (real'(dut.t1[i]) < r1 - 1.0 || real'(dut.t1[i]) > r1 + 1.0) w_ok = 0;
        if (real'(dut.t2[i]) < r2 - 1.0 || real'(dut.t2[i]) > r2 + 1.0) w_ok = 0;
      end
      checks++;
      if (!w_ok) begin failures++; $display("FAIL: resolution estimates"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(4.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
