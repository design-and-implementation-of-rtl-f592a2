// tb_ripple_adder: checks the 16-bit ripple-carry adder against integer
// addition on corner cases (all carries rippling, carry out) and on 20000
// random operand pairs with random carry in.
module tb_ripple_adder;
  logic [15:0] a, b;
  logic cin;
  logic [16:0] sum;
  int checks = 0, failures = 0;

  ripple_adder dut (.a, .b, .cin, .sum);

  task automatic apply(input int unsigned x, input int unsigned y, input bit c);
    a = 16'(x); b = 16'(y); cin = c;
    #1;
    checks++;
    if (sum != 17'(x + y + c)) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d + %0d + %0d = %0d", x, y, c, sum);
    end
  endtask

  initial begin
    apply('hFFFF, 'h0001, 1'b0);
    apply('hFFFF, 'hFFFF, 1'b1);
    apply(0, 0, 1'b1);
    apply('h8000, 'h8000, 1'b0);
    for (int k = 0; k < 20000; k++)
      apply($urandom_range(0, 65535), $urandom_range(0, 65535), 1'($urandom_range(0, 1)));
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
