// tb_intasycon2: self-checking test of the INTASYCON-II controller alone.
//
// The testbench drives the free-running count itself and models the source
// memory: a fetch pulse returns the next word one clock later, or raises
// 'exhausted' after the last one. The count is held at 50 until the first
// operand enters, so that operand (a low one) must finish stage 1 at count
// 55 and stage 2 at count 60. For every new operand the expected end-point
// memory is derived here from the grades of the previous and current
// operand, and c1 / c2 must toggle exactly when the count reaches
// pcount + d1 and pcount + d1 + d2. Repeats (REPEAT_WINDOW = 1: equal to the
// word before) must toggle no stage and still produce a store pulse; the
// number of store pulses must equal the number of words, and 'done' must
// rise at the end.
module tb_intasycon2;
  import intasycon_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  count_t count = 6'd50;
  logic [7:0] coef = 8'd64;          // grades: x<=1 low, x<=31 medium, else high
  logic fetch, src_valid = 1'b0, src_exhausted = 1'b0;
  logic [7:0] src_data = '0, data_out;
  logic c1, c2, store, done, issue_evt, repeat_evt, collide_evt;
  mem_sel_t mem_sel;
  grade_t grade;

  intasycon2 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int LEN = 14;
  int unsigned words [LEN] = '{1, 1, 200, 0, 100, 20, 0, 0, 7, 255, 20, 255, 255, 1};
  int idx = 0;
  bit counting = 0;

  // source memory model and counter
  always @(posedge clk) begin
    if (counting) count <= count + 1'b1;
    src_valid <= 1'b0;
    if (fetch && rst_n) begin
      if (idx < LEN) begin
        src_data  <= 8'(words[idx]);
        src_valid <= 1'b1;
        idx++;
      end else src_exhausted <= 1'b1;
    end
  end

  function automatic int unsigned g_of(int unsigned x);
    int unsigned n = 0;
    for (int k = 0; k < 8; k++) if (x[k]) n = k + 1;
    if (n == 0) return 0;
    n += 7;                           // coef = 64 has 7 bits
    return (n <= 8) ? 0 : (n <= 12) ? 1 : 2;
  endfunction
  int unsigned memtab [3][3] = '{'{0, 1, 2}, '{3, 1, 2}, '{3, 4, 2}};
  int unsigned d1_of [5] = '{5, 8, 10, 10, 10};
  int unsigned d2_of [5] = '{5, 8, 10, 5, 8};

  int unsigned exp_c1 [$], exp_c2 [$];
  int unsigned prev_g = 0, prev_word = 999;
  int n_issue = 0, n_rep = 0, n_store = 0, n_coll = 0;
  logic c1_q = 0, c2_q = 0;
  bit first = 1;

  always @(negedge clk) if (rst_n) begin
    int unsigned g, m, e;
    if (src_valid) begin
      if (int'(src_data) == prev_word) begin
        check(repeat_evt && !issue_evt, $sformatf("word %0d not seen as a repeat", src_data));
        n_rep++;
      end else begin
        check(issue_evt && !repeat_evt, $sformatf("word %0d not issued", src_data));
        g = g_of(int'(src_data));
        m = memtab[prev_g][g];
        check(int'(grade) == g, $sformatf("grade %0d, expected %0d", grade, g));
        check(int'(mem_sel) == m, $sformatf("memory %0d, expected %0d", mem_sel, m));
        check(collide_evt == (m >= 3), "collision flag");
        if (m >= 3) n_coll++;
        if (first) check(count == 6'd50, "first operand did not enter at count 50");
        exp_c1.push_back((int'(count) + d1_of[m] + 1) % 64);
        exp_c2.push_back((int'(count) + d1_of[m] + d2_of[m] + 1) % 64);
        if (first) begin
          check(d1_of[m] == 5 && d2_of[m] == 5, "first operand should use the LOW memory");
          counting = 1;
          first = 0;
        end
        prev_g = g;
        n_issue++;
      end
      prev_word = int'(src_data);
    end
    if (c2 != c2_q) begin
      e = exp_c2.pop_front();
      check(count == count_t'(e), $sformatf("c2 at count %0d, expected %0d", count, e));
    end
    if (c1 != c1_q) begin
      e = exp_c1.pop_front();
      check(count == count_t'(e), $sformatf("c1 at count %0d, expected %0d", count, e));
    end
    if (store) n_store++;
    c1_q <= c1;
    c2_q <= c2;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!fetch && !c1 && !c2, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!(done && src_exhausted)) @(negedge clk);
    repeat (3) @(negedge clk);
    check(n_store == LEN, $sformatf("%0d store pulses, expected %0d", n_store, LEN));
    check(n_issue == 11 && n_rep == 3, $sformatf("issued %0d repeats %0d", n_issue, n_rep));
    check(n_coll > 0, "no collision case exercised");
    check(exp_c1.size() == 0 && exp_c2.size() == 0, "stages left pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
