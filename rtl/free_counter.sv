// free_counter: the controller's free-running time base.
//
// A W-bit binary counter that advances by one on every clock and wraps
// from 2^W-1 to 0. With the default W = 6 it counts 0..63, one count per
// 4 ns clock. All stage end points are expressed in these counts, modulo
// 2^W. Reset sets it to 0.
//
// The 6-bit width and one count per 4 ns follow the original design; the
// reset value is a choice of this design.
module free_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;

endmodule
