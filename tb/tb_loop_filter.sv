// tb_loop_filter: compares the filter with a floating-point model of
//   H(z) = K1 (1-a)/(1-a z^-1) * (KP (1-z^-1) + 1)/(1-z^-1)
// with KP = 1591, a = 0.990478, K1 = 3.6e-6/96, for random error sequences
// with and without the K3 = 4 boost (tolerance 1 LSB plus the model's
// rounding), then checks the open-loop reset value and saturation.
`timescale 1ps/1fs
module tb_loop_filter;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, k3 = 0;
  err_t err = 0;
  logic [9:0] ctrl;
  int checks = 0, failures = 0;
  loop_filter dut (.clk, .rst_n, .en, .k3_boost(k3), .err, .ctrl);
  always #5000 clk = ~clk;

  real acc, y, x, c, e;
  task automatic run(input int n, input bit boost, input int amp);
    int bad;
    bad = 0;
    k3 = boost;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      err = err_t'(int'($urandom_range(2 * amp)) - amp + amp / 3);
      e = real'(int'(err)) * (boost ? 4.0 : 1.0);
      acc = acc + e;
      x = 1591.0 * e + acc;
      y = y + (624.0 / 65536.0) * (x - y);
      c = 512.0 + y * 2577.0 / (2.0 ** 36);
      @(posedge clk); #1;
      if (c > 1.0 && c < 1022.0 && (ctrl < c - 1.5 || ctrl > c + 1.5)) begin
        bad++;
        if (bad < 4) $display("FAIL: ctrl %0d model %f", ctrl, c);
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  initial begin
    #1 rst_n = 0; #20000 rst_n = 1;
    @(negedge clk); err = 20'sd5000;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (ctrl != 10'd512) begin failures++; $display("FAIL: open loop ctrl %0d", ctrl); end
    @(negedge clk); en = 1;
    acc = 0; y = 0;
    run(3000, 1, 3000);
    run(3000, 0, 8000);
    // large constant error: must saturate at the top, not wrap
    @(negedge clk); k3 = 1; err = 20'sd500000;
    repeat (10000) @(posedge clk);
    #1 checks++;
    if (ctrl != 10'd1023) begin failures++; $display("FAIL: no saturation high %0d", ctrl); end
    @(negedge clk); err = -20'sd500000;
    repeat (20000) @(posedge clk);
    #1 checks++;
    if (ctrl != 10'd0) begin failures++; $display("FAIL: no saturation low %0d", ctrl); end
    @(negedge clk); en = 0;
    @(posedge clk); #1 checks++;
    if (ctrl != 10'd512) begin failures++; $display("FAIL: reopen ctrl %0d", ctrl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
