// ripple_adder: W-bit carry ripple adder (combinational), the sum stage of
// the two-tap filter.
//
// A chain of W full adders; bit k of the sum is ready once the carry has
// rippled through the k lower cells, so small operands settle early. The
// carry out is brought out as the top bit of the (W+1)-bit sum, so the sum
// of two full-scale products never wraps. W defaults to the 16 bits of the
// filter's adder.
//
// The original filter uses a 16-bit ripple adder; bringing out the carry
// is a choice of this design.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum
);

  always_comb begin
    logic cy;
    cy = cin;
    for (int k = 0; k < W; k++) begin
      sum[k] = a[k] ^ b[k] ^ cy;
      cy     = (a[k] & b[k]) | (a[k] & cy) | (b[k] & cy);
    end
    sum[W] = cy;
  end

endmodule
