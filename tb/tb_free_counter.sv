// tb_free_counter: the 6-bit counter must start at 0 after reset, advance
// by one every clock and wrap from 63 to 0; 200 clocks (three wraps) are
// checked against a count kept here.
module tb_free_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] count;
  int checks = 0, failures = 0;
  int unsigned expc = 0, wraps = 0;

  free_counter dut (.clk, .rst_n, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      checks++;
      if (count != 6'(expc)) begin
        failures++;
        if (failures < 10) $display("FAIL: count %0d expected %0d", count, expc);
      end
      @(negedge clk);
      expc = (expc + 1) % 64;
      if (expc == 0) wraps++;
    end
    checks++;
    if (wraps < 3) failures++;
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
