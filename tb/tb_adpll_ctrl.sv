// tb_adpll_ctrl: steps the controller through calibration, acquisition,
// coarse lock, lock and loss of lock, checking every output in each state
// and that each input takes effect through its two-flop synchroniser.
`timescale 1ps/1fs
module tb_adpll_ctrl;
  logic clk = 0, rst_n = 1, cal_done = 0, coarse = 0, lock = 0;
  logic cal_start, loop_en, k3, mimo, est_en;
  int checks = 0, failures = 0;
  adpll_ctrl dut (.clk, .rst_n, .cal_done, .coarse_lock(coarse), .lock, .cal_start, .loop_en, .k3_boost(k3), .mimo, .est_en);
  always #5000 clk = ~clk;
  task automatic expect5(input logic [4:0] v, input string what);
    checks++;
    if ({cal_start, loop_en, k3, mimo, est_en} != v) begin
      failures++; $display("FAIL: %s %b want %b", what, {cal_start, loop_en, k3, mimo, est_en}, v);
    end
  endtask
  initial begin
    #1 rst_n = 0; #20000 rst_n = 1;
    repeat (3) @(posedge clk); #1 expect5(5'b10000, "cal");
    @(negedge clk) cal_done = 1;
    @(posedge clk); @(posedge clk); #1 expect5(5'b10000, "still cal inside synchroniser");
    @(posedge clk); #1 expect5(5'b01100, "acquire");
    @(negedge clk) coarse = 1;
    repeat (3) @(posedge clk); #1 expect5(5'b01000, "track");
    @(negedge clk) lock = 1;
    repeat (3) @(posedge clk); #1 expect5(5'b01011, "locked");
    @(negedge clk) lock = 0;
    repeat (3) @(posedge clk); #1 expect5(5'b01000, "lost lock");
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
