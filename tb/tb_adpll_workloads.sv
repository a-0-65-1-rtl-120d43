// tb_adpll_workloads: runs the PLL across its specified operating range:
// reference 80-110 MHz, multiplication 8-12 (integer and fractional), from
// 800 MHz up to 1347.5 MHz. For every case the loop is reset, must reach lock
// with the TDC in MIMO mode, and the averaged DCO frequency must equal
// NF * f_ref within 0.05 %; calibration must keep five-cell rings at the
// nominal corner. The operating points are the specification's; the
// tolerance and the averaging length are this testbench's choices.
`timescale 1ps/1fs
module tb_adpll_workloads;
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

  adpll_top dut (.refclk, .cal_clk, .rst_n, .ni, .frac, .tdco_ps(tdco),
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
    if (cells != CELLS5) begin failures++; $display("FAIL: calibration chose %0d", cells); end
  endtask

  initial begin
    run_case(100.0, 8, 0);      // 800 MHz, the operating point of the power figure
    run_case(80.0, 12, 128);    // lowest reference, 12.5x: 1000 MHz
    run_case(110.0, 12, 64);    // highest reference, top of the range: 1347.5 MHz
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
