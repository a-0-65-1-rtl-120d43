// tb_dco_calibration: a clock of chosen frequency stands in for the DCO;
// the calibration must choose 3 cells below 800 MHz, 7 above 1.25 GHz and 5
// in between, and raise done WIN + 7 calibration-clock edges after start is applied.
`timescale 1ps/1fs
module tb_dco_calibration;
  import adpll_pkg::*;
  logic cal_clk = 0, dco_clk = 0, rst_n = 0, start = 0, busy, done;
  cells_e cells;
  realtime half = 500.0;
  int checks = 0, failures = 0;
  dco_calibration dut (.cal_clk, .dco_clk, .rst_n, .start, .cells, .busy, .done);
  always #5000 cal_clk = ~cal_clk;
  always #(half) dco_clk = ~dco_clk;
  task automatic cal(input real f_mhz, input cells_e want);
    int cyc;
    half = 0.5e6 / f_mhz;
    rst_n = 0; #20000 rst_n = 1;
    @(negedge cal_clk) start = 1;
    cyc = 0;
    while (!done) begin @(posedge cal_clk); cyc++; end
    start = 0;
    checks++;
    if (cells != want) begin failures++; $display("FAIL: %f MHz -> %0d", f_mhz, cells); end
    checks++;
    if (cyc != 256 + 7) begin failures++; $display("FAIL: took %0d cycles", cyc); end
  endtask
  initial begin
    cal(700.0, CELLS3); cal(790.0, CELLS3); cal(1000.0, CELLS5); cal(820.0, CELLS5);
    cal(1240.0, CELLS5); cal(1300.0, CELLS7); cal(1400.0, CELLS7);
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
