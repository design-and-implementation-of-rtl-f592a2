// tb_detff: checks that the stage register loads on both trigger edges.
//
// The trigger is toggled at random intervals while the data input changes
// every clock. After each rising or falling trigger transition the
// register must hold the data present one clock after the transition;
// while the trigger is steady it must hold its value.
module tb_detff;
  logic clk = 1'b0, rst_n = 1'b0, trig = 1'b0;
  logic [15:0] d = '0, q;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0;

  detff dut (.clk, .rst_n, .trig, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] expq, hold;
    repeat (2) @(negedge clk);
    check(q == '0, "reset value");
    rst_n = 1'b1;
    expq = '0;
    for (int k = 0; k < 400; k++) begin
      bit tog;
      tog = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (tog) begin
        if (trig) n_fall++; else n_rise++;
        trig = ~trig;
      end
      d = 16'($urandom);
      hold = d;
      @(negedge clk);                 // the clock edge after the change loads d
      if (tog) expq = hold;
      check(q == expq, $sformatf("q=%h expected %h", q, expq));
      d = 16'($urandom);
    end
    check(n_rise > 0 && n_fall > 0, "both edges exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
