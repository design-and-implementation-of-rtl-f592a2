// tb_magnitude_grader: exhaustive check of the magnitude grader.
//
// For every operand pair the product width bound (leading-one position of a
// plus that of b, 0 if either is zero) is computed here, and the grade must
// be low up to 8 bits, medium up to 12 bits and high beyond. The rows of the
// published operand-size classes are spot-checked: 1*1 low, 0000_1xxx * 0000_1xxx low,
// 1xxx_xxxx * 1xxx_xxxx high.
module tb_magnitude_grader;
  import intasycon_pkg::*;
  logic [7:0] a, b;
  grade_t grade;
  int checks = 0, failures = 0;

  magnitude_grader dut (.a, .b, .grade);

  function automatic int unsigned blen(int unsigned v);
    int unsigned n = 0;
    for (int k = 0; k < 8; k++) if (v[k]) n = k + 1;
    return n;
  endfunction

  task automatic expect_grade(input int unsigned x, input int unsigned y, input grade_t g);
    a = 8'(x); b = 8'(y);
    #1;
    checks++;
    if (grade != g) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d, %0d graded %0d, expected %0d", x, y, grade, g);
    end
  endtask

  initial begin
    int unsigned w;
    expect_grade(1, 1, GRADE_LOW);
    expect_grade(11, 12, GRADE_LOW);
    expect_grade(63, 63, GRADE_MED);
    expect_grade(128, 255, GRADE_HIGH);
    expect_grade(0, 255, GRADE_LOW);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        w = (i == 0 || j == 0) ? 0 : blen(i) + blen(j);
        expect_grade(i, j, (w <= 8) ? GRADE_LOW : (w <= 12) ? GRADE_MED : GRADE_HIGH);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
