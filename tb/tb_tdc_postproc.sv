// tb_tdc_postproc: random conversions and weights; the expected combined
// error is computed here (8 products in MIMO, twice the 4 first products in
// SIMO) and compared one clock later.
`timescale 1ps/1fs
module tb_tdc_postproc;
  import adpll_pkg::*;
  logic clk = 0, rst_n = 0, mimo = 0;
  conv_t n1 [4], n2 [4];
  res_t  t1 [4], t2 [4];
  err_t  err;
  int checks = 0, failures = 0;
  tdc_postproc dut (.clk, .rst_n, .mimo, .n1, .n2, .t1, .t2, .err);
  always #5000 clk = ~clk;
  initial begin
    int e;
    for (int i = 0; i < 4; i++) begin n1[i] = 0; n2[i] = 0; t1[i] = 0; t2[i] = 0; end
    #12000 rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      mimo = it[0];
      e = 0;
      for (int i = 0; i < 4; i++) begin
        int a, b, c, d;
        a = int'($urandom_range(2046)) - 1023; b = int'($urandom_range(2046)) - 1023;
        c = $urandom_range(31); d = $urandom_range(31);
        if (it < 4) begin a = 1023; b = (it[1] ? -1023 : 1023); c = 31; d = 31; end
        n1[i] = conv_t'(a); n2[i] = conv_t'(b); t1[i] = res_t'(c); t2[i] = res_t'(d);
        e += a * c + (mimo ? b * d : a * c);
      end
      @(posedge clk); #1;
      checks++;
      if (err != err_t'(e)) begin failures++; $display("FAIL: err %0d want %0d", err, e); end
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
