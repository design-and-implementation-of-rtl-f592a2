// tb_sink_mem: stores a stream of random words with store pulses at random
// intervals and reads them back: every word must sit at the address of its
// position in the stream, 'count' must equal the number stored, and a
// rewind must restart the address counter at 0.
module tb_sink_mem;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0, rewind = 1'b0, store = 1'b0;
  logic [16:0] wdata = '0, rd_data;
  logic [7:0] rd_addr = '0;
  logic [8:0] count;
  int checks = 0, failures = 0;
  logic [16:0] words [DEPTH];

  sink_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(count == 0, "count after reset");
    for (int a = 0; a < DEPTH; a++) begin
      words[a] = 17'($urandom);
      @(negedge clk);
      store = 1'b1; wdata = words[a];
      @(negedge clk);
      store = 1'b0; wdata = 17'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(count == 9'(DEPTH), $sformatf("count %0d", count));
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = 8'(a);
      #1;
      check(rd_data == words[a], $sformatf("word %0d: %h expected %h", a, rd_data, words[a]));
    end
    @(negedge clk);
    rewind = 1'b1;
    @(negedge clk);
    rewind = 1'b0;
    check(count == 0, "rewind");
    store = 1'b1; wdata = 17'h1ABCD;
    @(negedge clk);
    store = 1'b0;
    rd_addr = 0;
    #1;
    check(rd_data == 17'h1ABCD && count == 1, "store after rewind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
