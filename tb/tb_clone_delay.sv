// tb_clone_delay: short pulses must reappear with the same width exactly
// DELAY_PS later, including pulses much shorter than the delay.
`timescale 1ps/1fs
module tb_clone_delay;
  logic a = 0, y;
  int checks = 0, failures = 0;
  realtime tr, tf;
  clone_delay dut (.a, .y);
  always @(posedge y) tr = $realtime;
  always @(negedge y) tf = $realtime;
  initial begin
    realtime t0, w;
    #100;
    for (int i = 0; i < 10; i++) begin
      w = 10.0 + 300.0 * i;
      t0 = $realtime;
      a = 1; #(w) a = 0;
      #(6000);
      checks++;
      if (tr != t0 + 5000.0 || tf != t0 + 5000.0 + w) begin
        failures++; $display("FAIL: pulse %t: rise %t fall %t", w, tr - t0, tf - t0);
      end
      #4000;
    end
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
