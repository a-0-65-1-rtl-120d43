// tb_dco_ring_array: measures the model's output frequency for several
// ring counts, fine codes and cell counts and compares it with the model's
// law f = SPEED*(5/cells)*(488 + 64*(rings-1) + sum(FCW-1)) MHz; also checks
// that the output stops with no ring enabled.
`timescale 1ps/1fs
module tb_dco_ring_array;
  import adpll_pkg::*;
  logic [15:0] ring_en;
  fcw_t fcw [7];
  cells_e cells;
  logic clk;
  int checks = 0, failures = 0, n = 0;
  dco_ring_array dut (.ring_en, .fcw, .cells, .clk_out(clk));
  always @(posedge clk) n++;
  task automatic meas(input int rings, input int f, input cells_e c, input real ncell);
    real fexp, fm;
    ring_en = 16'((32'h1 << rings) - 1);
    for (int i = 0; i < 7; i++) fcw[i] = fcw_t'(1 + (f + i) / 7);
    cells = c;
    #5000; n = 0; #200000;
    fm = n / 200.0e-9 / 1.0e6;
    fexp = (5.0 / ncell) * (488.0 + 64.0 * (rings - 1) + f);
    checks++;
    if (fm < fexp - 6.0 || fm > fexp + 6.0) begin failures++; $display("FAIL: %0d rings f=%0d: %f MHz want %f", rings, f, fm, fexp); end
  endtask
  initial begin
    meas(1, 0, CELLS5, 5.0); meas(8, 0, CELLS5, 5.0); meas(9, 63, CELLS5, 5.0); meas(16, 63, CELLS5, 5.0);
    meas(8, 30, CELLS3, 3.0); meas(8, 30, CELLS7, 7.0);
    ring_en = '0; #5000; n = 0; #20000;
    checks++;
    if (n != 0) begin failures++; $display("FAIL: oscillates with no ring"); end
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
