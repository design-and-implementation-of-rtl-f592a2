// tb_source_mem: loads random words into the source memory, then fetches
// them with pulses at random intervals. Each fetch must return the next
// word, in order, one clock later with 'valid'; the fetch after the last
// word must return nothing and raise 'exhausted'. A rewind then restarts
// from word 0.
module tb_source_mem;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en = 1'b0, rewind = 1'b0, fetch = 1'b0;
  logic [7:0] ld_addr = '0, ld_data = '0, data;
  logic [8:0] len = '0, addr;
  logic valid, exhausted;
  int checks = 0, failures = 0;
  logic [7:0] words [DEPTH];

  source_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic do_fetch(output logic [7:0] w, output logic v);
    @(negedge clk);
    fetch = 1'b1;
    @(negedge clk);
    fetch = 1'b0;
    w = data;
    v = valid;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    logic [7:0] w;
    logic v;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      words[a] = 8'($urandom);
      @(negedge clk);
      ld_en = 1'b1; ld_addr = 8'(a); ld_data = words[a];
    end
    @(negedge clk);
    ld_en = 1'b0;
    n = 200;
    len = 9'(n);
    for (int a = 0; a < n; a++) begin
      do_fetch(w, v);
      check(v && w == words[a], $sformatf("word %0d: %h/%0b expected %h", a, w, v, words[a]));
    end
    check(!exhausted, "exhausted too early");
    do_fetch(w, v);
    check(!v && exhausted, "fetch past the end");
    @(negedge clk);
    rewind = 1'b1;
    @(negedge clk);
    rewind = 1'b0;
    check(!exhausted && addr == 0, "rewind");
    do_fetch(w, v);
    check(v && w == words[0], "first word after rewind");
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
