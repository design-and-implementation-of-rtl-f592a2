// intasycon1_endpoints: end-point arithmetic of the INTASYCON-I controller.
//
// Instead of looking the end points up, INTASYCON-I computes them when an
// operand enters. Adders form the uncorrected end points from the entry
// count:  b1reg = pcount + d,  b2reg = b1reg + d, where d is the stage delay
// of the operand's grade (both stages take the same delay). A comparator
// then holds stage 1 of the new operand until the previous operand has left
// stage 2: the stage-1 end is the later of b1reg and the previous operand's
// stage-2 end, and the stage-2 end follows it by d. Counts wrap at 2^CNT_W,
// so "later" is decided on the distance from pcount, which is below 2^CNT_W/2
// for every delay used. Combinational.
//
// Adders plus comparator follow the original INTASYCON-I; using the same
// 5/8/10-tick delay for both stages and the modulo comparison are choices
// of this design.
module intasycon1_endpoints
  import intasycon_pkg::*;
(
  input  grade_t     grade,
  input  count_t     pcount,
  input  logic       prev_busy,  // previous operand has not yet left stage 2
  input  count_t     prev_c2,    // its stage-2 end point
  output endpoints_t ep
);

  always_comb begin
    count_t d, b1reg, b2reg, b1;
    d     = count_t'(grade_delay(grade));
    b1reg = pcount + d;
    b2reg = b1reg + d;
    b1    = b1reg;
    if (prev_busy && count_t'(prev_c2 - pcount) > count_t'(b1reg - pcount))
      b1 = prev_c2;
    ep.c1 = b1;
    ep.c2 = (b1 == b1reg) ? b2reg : b1 + d;
  end

endmodule
