// tb_mimo_tdc: drives REFCLK at 100 MHz and FBCLK at the same rate with a
// chosen edge offset dt (positive: reference first), held for four periods
// per value, in SIMO and then MIMO mode. The combined error must equal
// 8*dt (1/8 ps units) within the weights' rounding (the start weights are
// the typical resolutions rounded to whole ps) plus a few counts. The RMS
// error over all values is reported for both modes and MIMO must not be
// worse than SIMO. The second conversion must happen only in MIMO.
`timescale 1ps/1fs
module tb_mimo_tdc;
  import adpll_pkg::*;
  logic refclk = 0, fbclk = 0, rst_n = 1, mimo = 0;
  err_t err;
  conv_t n1 [4], n2 [4];
  res_t t1 [4], t2 [4];
  int checks = 0, failures = 0, gears = 0;
  mimo_tdc dut (.refclk, .fbclk, .rst_n, .mimo, .est_en(1'b0), .sdm(4'sd0), .frac(8'd0),
                .tdco_ps(11'd1000), .err, .n1, .n2, .t1, .t2);
  always @(posedge dut.g_ch[0].gear) gears++;

  real dt, se_simo, se_mimo;
  // one reference period: edges at t0 and t0+dt
  task automatic period(input real d);
    if (d >= 0) begin
      refclk = 1; #(d) fbclk = 1; #(5000.0 - d) refclk = 0; fbclk = 0; #5000;
    end else begin
      fbclk = 1; #(-d) refclk = 1; #(5000.0 + d) refclk = 0; fbclk = 0; #5000;
    end
  endtask

  task automatic sweep(input int n, output real se);
    real e;
    se = 0;
    for (int k = 0; k < n; k++) begin
      dt = real'($urandom_range(3800)) - 1900.0 + real'($urandom_range(99)) / 100.0;
      repeat (4) period(dt);
      e = real'(int'(err)) / 8.0 - dt;
      se += e * e;
      checks++;
      if (e > 0.03 * (dt < 0 ? -dt : dt) + 40.0 || e < -0.03 * (dt < 0 ? -dt : dt) - 40.0) begin
        failures++; $display("FAIL: dt %f err %f ps (mimo=%0d)", dt, real'(int'(err)) / 8.0, mimo);
      end
    end
    se = $sqrt(se / n);
  endtask

  initial begin
    #1 rst_n = 0; #1000 rst_n = 1; #9000;
    repeat (4) period(100.0);
    sweep(60, se_simo);
    checks++;
    if (gears != 0) begin failures++; $display("FAIL: second conversion in SIMO"); end
    mimo = 1;
    repeat (4) period(100.0);
    sweep(60, se_mimo);
    checks++;
    if (gears < 200) begin failures++; $display("FAIL: only %0d second conversions", gears); end
    $display("rms error: SIMO %f ps, MIMO %f ps", se_simo, se_mimo);
    checks++;
    if (se_mimo > se_simo) begin failures++; $display("FAIL: MIMO worse than SIMO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
