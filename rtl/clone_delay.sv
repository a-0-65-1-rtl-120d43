// clone_delay: behavioural model (not synthesizable logic) of the matched
// delay and inverter chain that makes the delayed clone of the phase-detector
// pulse for the second conversion of the MIMO TDC.
// Every edge of `a` reappears on `y` DELAY_PS later (transport delay, so a
// pulse much shorter than the delay passes unchanged). The design only needs
// the clone to fall in the detector's idle window, 4 ns to 8 ns after the
// pulse starts, in every corner; 5 ns is this model's default.
// Interface: a -> y. Timing: fixed delay DELAY_PS picoseconds.
`timescale 1ps/1fs
module clone_delay #(
  parameter real     DELAY_PS = 5000.0
) (
  input  logic a,
  output logic y
);
  initial y = 1'b0;
  // rising and falling edges are delayed by separate processes, which is
  // exact as long as edges of the same direction are more than DELAY_PS apart
  // (true here: one pulse per 10 ns reference period)
  always begin
    @(posedge a);
    #(DELAY_PS) y = 1'b1;
  end
  always begin
    @(negedge a);
    #(DELAY_PS) y = 1'b0;
  end
endmodule
