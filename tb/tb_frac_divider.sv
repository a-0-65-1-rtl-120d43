// tb_frac_divider: feeds a sequence of modulator values and checks that
// every FBCLK period lasts exactly NI + 1 + y DCO cycles and that the
// high phase is half the period (rounded up).
`timescale 1ps/1fs
module tb_frac_divider;
  logic dco = 0, rst_n = 1, fbclk;
  logic [3:0] ni = 4'd10;
  logic signed [3:0] sdm = 0;
  int checks = 0, failures = 0, cyc = 0, hi = 0;
  int m_used;
  frac_divider dut (.dco_clk(dco), .rst_n, .ni, .sdm, .fbclk);
  always #500 dco = ~dco;
  always @(posedge dco) begin cyc++; if (fbclk) hi++; end
  initial begin
    #1 rst_n = 0; #3000; rst_n = 1;
    @(posedge fbclk);
    for (int k = 0; k < 200; k++) begin
      int m;
      // new modulator value shortly after the edge, as the modulator does
      #10;
      ni  = 4'(8 + (k % 5));
      sdm = 4'($urandom_range(7)) - 4'sd4;
      m = int'(ni) + 1 + int'(sdm);
      @(posedge fbclk);      // period with the previous modulus ends
      cyc = 0; hi = 0;
      @(posedge fbclk);
      checks++;
      if (cyc != m) begin failures++; $display("FAIL: period %0d want %0d", cyc, m); end
      checks++;
      if (hi != (m + 1) / 2) begin failures++; $display("FAIL: high %0d of %0d", hi, m); end
    end
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
