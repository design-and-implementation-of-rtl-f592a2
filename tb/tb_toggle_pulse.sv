// tb_toggle_pulse: checks the dual-edge to single-pulse converter.
//
// The input level is toggled at random clock cycles. Every transition,
// rising or falling, must give a pulse exactly one clock long in the cycle
// of the change, and no pulse may appear while the level is steady.
module tb_toggle_pulse;
  logic clk = 1'b0, rst_n = 1'b0, level = 1'b0, pulse;
  int checks = 0, failures = 0;
  int n_pulse = 0, n_change = 0;

  toggle_pulse dut (.clk, .rst_n, .level, .pulse);

  always #5 clk = ~clk;

  initial begin
    logic prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev = 1'b0;
    for (int k = 0; k < 500; k++) begin
      @(posedge clk);
      #1;
      if ($urandom_range(0, 3) == 0) level = ~level;
      #1;
      checks++;
      if (pulse != (level != prev)) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d pulse=%0b level=%0b prev=%0b", k, pulse, level, prev);
      end
      if (level != prev) n_change++;
      if (pulse) n_pulse++;
      prev = level;
    end
    checks++;
    if (n_pulse != n_change || n_change == 0) failures++;
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
