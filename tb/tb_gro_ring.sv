// tb_gro_ring: enables the ring for known windows and counts the rising
// edges on all nodes: one per two stage delays, i.e. window / resolution,
// for both gears; with en low no node may change.
`timescale 1ps/1fs
module tb_gro_ring;
  logic en = 0, gear = 0;
  logic [6:0] node;
  int checks = 0, failures = 0, rises = 0, toggles = 0;
  gro_ring dut (.en, .gear, .node);
  for (genvar s = 0; s < 7; s++) begin : g
    always @(posedge node[s]) rises++;
    always @(node[s]) toggles++;
  end
  task automatic win(input realtime w, input bit g, input real res);
    int expect_n;
    gear = g; rises = 0; #10;
    en = 1; #(w) en = 0; #100;
    expect_n = $rtoi(w / res);
    checks++;
    if (rises < expect_n - 1 || rises > expect_n + 1) begin
      failures++; $display("FAIL: %t window gear %0d: %0d counts, want ~%0d", w, g, rises, expect_n);
    end
  endtask
  initial begin
    #100;
    win(1000.0, 0, 18.5); win(1000.0, 1, 17.0); win(2000.0, 0, 18.5); win(333.0, 1, 17.0);
    toggles = 0; #5000;
    checks++;
    if (toggles != 0) begin failures++; $display("FAIL: ring ran while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
