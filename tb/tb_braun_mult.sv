// tb_braun_mult: exhaustive check of the 8x8 Braun array multiplier.
//
// All 65536 operand pairs are applied and every product is compared with
// the integer product a*b. The extreme operand sizes of the grading scheme are
// included: 2*2 = 4 uses only the low product bits, 255*255 all sixteen.
module tb_braun_mult;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  braun_mult dut (.a, .b, .p);

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d", i, j, p);
        end
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
