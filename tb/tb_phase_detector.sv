// tb_phase_detector: drives REFCLK and FBCLK edges with known offsets and
// checks that UP (reference first) or DN (feedback first) is high for exactly
// the time between the two rising edges, and that both are low afterwards.
`timescale 1ps/1fs
module tb_phase_detector;
  logic refclk = 0, fbclk = 0, rst_n = 1, up, dn;
  int checks = 0, failures = 0;
  realtime t_up, t_dn, w_up, w_dn;
  phase_detector dut (.refclk, .fbclk, .rst_n, .up, .dn);

  always @(posedge up) t_up = $realtime;
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic pair(input realtime dt);   // dt > 0: REFCLK first
    w_up = 0; w_dn = 0;
    if (dt >= 0) begin
      refclk = 1; #(dt) fbclk = 1;
    end else begin
      fbclk = 1; #(-dt) refclk = 1;
    end
    #100;
    checks++;
    if (up || dn) begin failures++; $display("FAIL: not cleared"); end
    checks++;
    if (dt > 0 && (w_up != dt || w_dn != 0)) begin failures++; $display("FAIL: up width %t for %t", w_up, dt); end
    if (dt < 0 && (w_dn != -dt || w_up != 0)) begin failures++; $display("FAIL: dn width %t for %t", w_dn, dt); end
    #2000 refclk = 0; fbclk = 0; #2000;
  endtask

  initial begin
    #1 rst_n = 0; #10 rst_n = 1; #10;
    // one unchecked pair in each direction flushes a power-up state with
    // both flops set (the clear is then level-high with no edge)
    refclk = 1; #10 fbclk = 1; #100 refclk = 0; fbclk = 0; #100;
    fbclk = 1; #10 refclk = 1; #100 refclk = 0; fbclk = 0; #100;
    pair(150.0); pair(-73.0); pair(1999.0); pair(-1234.5); pair(17.0);
    for (int i = 0; i < 20; i++) pair(real'($urandom_range(4000)) - 2000.0 + 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
