// tb_lock_detector: FBCLK at exactly the REFCLK rate and at offsets of
// 0.05 %, 0.2 % and 5 %. Windows within 0.1 % must pass: coarse lock after
// the first, lock after the second; an offset window must drop lock while
// coarse lock stays set. A short window length keeps the run fast.
`timescale 1ps/1fs
module tb_lock_detector;
  logic refclk = 0, fbclk = 0, rst_n = 1, coarse, lock;
  real fb_half = 5000.0;
  int checks = 0, failures = 0;
  lock_detector #(.WIN_LOG2(12), .TOL(4)) dut (.refclk, .fbclk, .rst_n, .coarse_lock(coarse), .lock);
  always #5000 refclk = ~refclk;
  always #(fb_half) fbclk = ~fbclk;
  task automatic windows(input int n);
    repeat (n * 4096) @(posedge refclk);
    #1;
  endtask
  task automatic expect2(input bit c, input bit l, input string what);
    checks++;
    if (coarse != c || lock != l) begin failures++; $display("FAIL: %s coarse=%0d lock=%0d", what, coarse, lock); end
  endtask
  initial begin
    #1 rst_n = 0; #12000 rst_n = 1;
    fb_half = 5000.0 * 1.05;     // 5 % slow
    windows(2);  expect2(0, 0, "5% off");
    fb_half = 5000.0 * 1.002;    // 0.2 % slow
    windows(2);  expect2(0, 0, "0.2% off");
    fb_half = 5000.0 / 1.0005;   // 0.05 % fast: passes
    windows(2);
    checks++;
    if (!coarse) begin failures++; $display("FAIL: no coarse lock"); end
    windows(1);  expect2(1, 1, "passing windows");
    fb_half = 5000.0;
    windows(2);  expect2(1, 1, "exact");
    fb_half = 5000.0 * 0.98;
    windows(1);  windows(1); expect2(1, 0, "lost lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
