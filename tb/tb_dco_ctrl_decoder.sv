// tb_dco_ctrl_decoder: sweeps every control word and checks the coarse
// thermometer (1 + upper bits rings), that no cell gets FCW 0000, and that
// the sum of the fine codes is exactly 7 + lower bits, so the tuning is
// linear and monotonic.
`timescale 1ps/1fs
module tb_dco_ctrl_decoder;
  import adpll_pkg::*;
  logic [9:0] ctrl;
  logic [15:0] ring_en;
  fcw_t fcw [7];
  int checks = 0, failures = 0;
  dco_ctrl_decoder dut (.ctrl, .ring_en, .fcw);
  initial begin
    for (int c = 0; c < 1024; c++) begin
      int sum, mx, mn;
      ctrl = 10'(c); #10;
      sum = 0; mx = 0; mn = 99;
      for (int i = 0; i < 7; i++) begin
        sum += fcw[i];
        if (fcw[i] > mx) mx = fcw[i];
        if (fcw[i] < mn) mn = fcw[i];
      end
      checks++;
      if (ring_en != 16'((32'h1 << ((c >> 6) + 1)) - 1)) begin failures++; $display("FAIL: ring_en %h at %0d", ring_en, c); end
      checks++;
      if (sum != 7 + (c & 63) || mn == 0 || mx - mn > 1) begin failures++; $display("FAIL: fcw at %0d sum %0d", c, sum); end
    end
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
