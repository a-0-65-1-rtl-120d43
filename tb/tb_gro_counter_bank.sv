// tb_gro_counter_bank: the testbench plays the ring itself, toggling the
// seven nodes in ring order during each window and counting the rising
// edges it makes. Checks: SIMO results (count, sign from DN, saturation at
// 1023), the MIMO two-step sequence (gear raised after the first window,
// n1/n2 updated together after the second) and counter wrap-around.
`timescale 1ps/1fs
module tb_gro_counter_bank;
  import adpll_pkg::*;
  logic rst_n = 1, en = 0, sign_neg = 0, mimo = 0, gear;
  logic [6:0] node = 7'b1010100;
  conv_t n1, n2;
  int checks = 0, failures = 0, k = 0;
  gro_counter_bank dut (.rst_n, .node, .en, .sign_neg, .mimo, .gear, .n1, .n2);

  // toggle nodes until `rises` rising edges were made
  task automatic run(input int want, input bit neg);
    int r;
    r = 0;
    sign_neg = neg; #5; en = 1; #5;
    while (r < want) begin
      #3;
      if (!node[k]) r++;
      node[k] = ~node[k];
      k = (k == 6) ? 0 : k + 1;
    end
    #5 en = 0; #5 sign_neg = 0; #10;
  endtask

  task automatic expect_eq(input conv_t got, input int want, input string what);
    checks++;
    if (got != conv_t'(want)) begin failures++; $display("FAIL: %s = %0d want %0d", what, got, want); end
  endtask

  initial begin
    #1 rst_n = 0; #10 rst_n = 1; #10;
    run(37, 0);   expect_eq(n1, 37, "simo up");
    run(250, 1);  expect_eq(n1, -250, "simo dn");
    run(1500, 0); expect_eq(n1, 1023, "saturated");
    run(0, 0);    expect_eq(n1, 0, "empty");
    mimo = 1;
    run(55, 0);
    checks++; if (gear !== 1'b1) begin failures++; $display("FAIL: gear not raised"); end
    expect_eq(n1, 0, "n1 held during 2nd");
    run(61, 0);
    checks++; if (gear !== 1'b0) begin failures++; $display("FAIL: gear not cleared"); end
    expect_eq(n1, 55, "mimo n1"); expect_eq(n2, 61, "mimo n2");
    run(120, 1); run(133, 1);
    expect_eq(n1, -120, "mimo n1 dn"); expect_eq(n2, -133, "mimo n2 dn");
    for (int i = 0; i < 30; i++) begin
      int a, b;
      a = $urandom_range(1000); b = $urandom_range(1000);
      run(a, 0); run(b, 0);
      expect_eq(n1, a, "random n1"); expect_eq(n2, b, "random n2");
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
