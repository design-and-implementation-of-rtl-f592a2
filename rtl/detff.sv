// detff: register between two pipeline stages that loads on both edges of
// its trigger.
//
// The stage completion signals c1, c2 carry one event per transition, so the
// stage registers must load on the rising and on the falling edge of their
// trigger. This register is built for a single-clock FPGA fabric: it keeps a
// copy of the trigger from the previous clock and loads 'd' on the clock
// edge after the trigger has changed, in either direction. 'd' is thus
// sampled one clock after the trigger transition; 'q' holds until the next
// transition. Reset clears both the data and the trigger copy (the trigger
// must be 0 out of reset).
//
// The original uses dual-edge triggered flip-flops clocked by c1/c2; the
// edge detection in the clock domain is a choice of this design.
module detff #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         trig,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic trig_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      trig_d <= 1'b0;
      q      <= '0;
    end else begin
      trig_d <= trig;
      if (trig ^ trig_d) q <= d;
    end

endmodule
