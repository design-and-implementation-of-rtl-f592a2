// magnitude_grader: grades a multiplication by the size of its result.
//
// The number of product bits an array multiplier has to settle is set by the
// position of the leading one in each operand: a product of an m-bit and an
// n-bit number has at most m+n bits. The grader finds both leading-one
// positions and grades the product LOW when it fits in LOW_BITS (8) bits,
// MEDIUM when it fits in MED_BITS (12) bits and HIGH otherwise (all 16 bits
// of an 8x8 product). A zero operand gives a zero product and grades LOW.
// Combinational.
//
// The 8/12/16-bit classes follow the original design; bounding the product
// width by the sum of the leading-one positions is a choice of this design.
module magnitude_grader
  import intasycon_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned LOW_BITS = 8,
  parameter int unsigned MED_BITS = 12
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output grade_t       grade
);

  function automatic int unsigned bit_len(logic [N-1:0] v);
    int unsigned n;
    n = 0;
    for (int k = 0; k < N; k++)
      if (v[k]) n = k + 1;
    return n;
  endfunction

  always_comb begin
    int unsigned la, lb, w;
    la = bit_len(a);
    lb = bit_len(b);
    w  = (la == 0 || lb == 0) ? 0 : la + lb;
    if (w <= LOW_BITS)      grade = GRADE_LOW;
    else if (w <= MED_BITS) grade = GRADE_MED;
    else                    grade = GRADE_HIGH;
  end

endmodule
