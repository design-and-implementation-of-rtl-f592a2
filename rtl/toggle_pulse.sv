// toggle_pulse: turns a dual-edge control signal into a positive pulse.
//
// The controller's control signals (active1, active2) carry an event on
// every transition, rising or falling, but memories and address counters
// want one positive clock pulse per event. The circuit XORs the signal with
// a delayed copy of itself: the output is high for the length of the delay
// after each transition. Here the delay element is one register stage of
// the controller clock, so 'pulse' is high for exactly one clock cycle,
// starting combinationally in the cycle in which 'level' has changed.
//
// Reset clears the delayed copy to 0, so the control signal must also be 0
// out of reset.
//
// The XOR-with-delayed-copy structure is the original one; using a
// register as the delay element is a choice of this design.
module toggle_pulse (
  input  logic clk,
  input  logic rst_n,
  input  logic level,
  output logic pulse
);

  logic level_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) level_d <= 1'b0;
    else        level_d <= level;

  assign pulse = level ^ level_d;

endmodule
