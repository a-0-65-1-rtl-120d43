// tb_mash111_sdm: for several fractional words the output must stay in
// -4..3, its running sum must track F/256 - 1 per cycle within a bounded
// error (third-order MASH: the cumulative error is c1 residue + c2 + c3
// difference terms, a few LSBs at most), and its average over 4096 cycles
// must equal F/256 - 1. A reference model of the three accumulators is run
// alongside and compared cycle by cycle.
`timescale 1ps/1fs
module tb_mash111_sdm;
  logic clk = 0, rst_n = 1;
  logic [7:0] frac;
  logic signed [3:0] y;
  int checks = 0, failures = 0;
  mash111_sdm dut (.clk, .rst_n, .frac, .y);
  always #500 clk = ~clk;
  initial begin
    int fr [6] = '{0, 1, 77, 128, 200, 255};
    foreach (fr[j]) begin
      int a1, a2, a3, c1, c2, c3, c2d, c3d, c3dd, ref_y, sum, bad_range, bad_ref;
      frac = 8'(fr[j]);
      rst_n = 1; #1 rst_n = 0; #2000; @(negedge clk); rst_n = 1;
      a1 = 0; a2 = 0; a3 = 0; c2d = 0; c3d = 0; c3dd = 0; sum = 0; bad_range = 0; bad_ref = 0;
      for (int k = 0; k < 4096; k++) begin
        // reference: accumulators with carry
        a1 += fr[j];  c1 = a1 >> 8; a1 &= 255;
        a2 += a1;     c2 = a2 >> 8; a2 &= 255;
        a3 += a2;     c3 = a3 >> 8; a3 &= 255;
        ref_y = c1 + c2 - c2d + c3 - 2 * c3d + c3dd - 1;
        c2d = c2; c3dd = c3d; c3d = c3;
        @(posedge clk); #1;
        if (y < -4 || y > 3) bad_range++;
        if (int'(y) != ref_y) bad_ref++;
        sum += y;
      end
      checks++;
      if (bad_range != 0) begin failures++; $display("FAIL: F=%0d out of range", fr[j]); end
      checks++;
      if (bad_ref != 0) begin failures++; $display("FAIL: F=%0d %0d mismatches vs model", fr[j], bad_ref); end
      checks++;
      if (sum + 4096 < fr[j] * 16 - 4 || sum + 4096 > fr[j] * 16 + 4) begin
        failures++; $display("FAIL: F=%0d mean sum %0d want %0d", fr[j], sum + 4096, fr[j] * 16);
      end
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
