// tb_intasycon_fir: end-to-end test of the INTASYCON two-tap FIR system at its default
// parameters (end points from the five end-point memories).
//
// Loads the source memory with a 256-sample data set in which about one
// sample in five starts a run of repeated values, starts the controller and
// waits for 'done'. Every word of the sink memory is compared with
// y[n] = b0*x[n] + b1*x[n-1] (x[-1] = 0) worked out here.
//
// Timing is checked per new sample: the testbench grades the sample itself
// (product width bound = leading-one position of x plus that of the larger
// coefficient; <= 8 bits low, <= 12 medium, else high), picks the end-point
// memory from the previous and current grade, and checks that
// the controller chose that memory and that c1 and c2 toggle exactly d1
// and d1+d2 ticks after the sample entered.
// It also checks that no sample finishes stage 1 before its predecessor
// has finished stage 2, and counts each mechanism: new samples, skipped
// repeats, repeats queued behind a busy stage 2, stretched (collision)
// samples of both kinds, and every grade. One that never happens is a failure.
module tb_intasycon_fir;
  import intasycon_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned LEN   = 256;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] b0 = 8'd43, b1 = 8'd13;
  logic ld_en = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  logic [7:0] ld_data = '0;
  logic [AW:0] len = '0;
  logic [AW-1:0] rd_addr = '0;
  logic [16:0] rd_data;
  logic [AW:0] stored;
  logic done, c1, c2, issue_evt, repeat_evt, collide_evt;
  mem_sel_t mem_sel;
  grade_t grade;
  logic [AW:0] fetched;

  intasycon_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned xs [LEN];
  longint cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned blen(int unsigned v);
    int unsigned n = 0;
    for (int k = 0; k < 8; k++) if (v[k]) n = k + 1;
    return n;
  endfunction

  // 0 low, 1 medium, 2 high
  function automatic int unsigned ref_grade(int unsigned x, int unsigned coef);
    int unsigned w = (blen(x) == 0 || blen(coef) == 0) ? 0 : blen(x) + blen(coef);
    return (w <= 8) ? 0 : (w <= 12) ? 1 : 2;
  endfunction

  // memory per (previous, current) grade: 0 LOW 1 MED 2 HIGH 3 HIGH1 4 HIGH2
  function automatic int unsigned ref_mem(int unsigned pg, int unsigned cg);
    int unsigned t [3][3] = '{'{0, 1, 2}, '{3, 1, 2}, '{3, 4, 2}};
    return t[pg][cg];
  endfunction

  int unsigned d1_of [5] = '{5, 8, 10, 10, 10};
  int unsigned d2_of [5] = '{5, 8, 10, 5, 8};

  // -------------------------------------------------------------- monitor
  int n_issue = 0, n_repeat = 0, n_queued = 0, n_high1 = 0, n_high2 = 0;
  int n_grade [3] = '{0, 0, 0};
  int unsigned prev_g = 0;
  longint exp_c1 [$], exp_c2 [$];
  longint last_c2_cycle = -1;
  logic c1_q = 1'b0, c2_q = 1'b0;
  logic s2_busy_ref = 1'b0;
  longint s2_c2_ref = 0;

  always @(negedge clk) if (rst_n) begin
    int unsigned g, m;
    longint e;
    cyc++;
    if (issue_evt) begin
      g = ref_grade(int'(dut.u_ctrl.src_data), (b0 > b1) ? int'(b0) : int'(b1));
      m = ref_mem(prev_g, g);
      n_issue++;
      n_grade[g]++;
      if (m == 3) n_high1++;
      if (m == 4) n_high2++;
      check(m == int'(mem_sel), $sformatf("memory %0d chosen, expected %0d", mem_sel, m));
      exp_c1.push_back(cyc + longint'(d1_of[m]) + 1);
      exp_c2.push_back(cyc + longint'(d1_of[m]) + longint'(d2_of[m]) + 1);
      prev_g = g;
    end
    if (repeat_evt) begin
      n_repeat++;
      if (exp_c2.size() > 0) n_queued++;
    end
    if (c2 != c2_q) begin
      if (exp_c2.size() == 0) check(0, "c2 toggled with no sample in stage 2");
      else begin
        e = exp_c2.pop_front();
        if (e >= 0) check(cyc == e, $sformatf("c2 at cycle %0d, expected %0d", cyc, e));
      end
      last_c2_cycle = cyc;
    end
    if (c1 != c1_q) begin
      if (exp_c1.size() == 0) check(0, "c1 toggled with no sample in stage 1");
      else begin
        e = exp_c1.pop_front();
        if (e >= 0) check(cyc == e, $sformatf("c1 at cycle %0d, expected %0d", cyc, e));
      end
      // the predecessor must have completed stage 2 by now
      check(exp_c2.size() == 1, "sample left stage 1 while stage 2 was occupied");
    end
    c1_q <= c1;
    c2_q <= c2;
  end

  // -------------------------------------------------------------- stimulus
  initial begin
    int unsigned i, v, run;
    longint t0;
    // data set: mixed magnitudes, about 20% of samples start a repeat run
    i = 0;
    while (i < LEN) begin
      case ($urandom_range(0, 2))
        0: v = $urandom_range(0, 3);
        1: v = $urandom_range(4, 63);
        default: v = $urandom_range(64, 255);
      endcase
      xs[i] = v;
      i++;
      if ($urandom_range(0, 4) == 0) begin
        run = $urandom_range(1, 4);
        for (int r = 0; r < run && i < LEN; r++) begin
          xs[i] = v;
          i++;
        end
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < LEN; a++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_addr = AW'(a); ld_data = 8'(xs[a]);
    end
    @(negedge clk);
    ld_en = 1'b0;
    len   = (AW+1)'(LEN);
    repeat (2) @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    while (!done) @(negedge clk);
    $display("run of %0d samples took %0d cycles", LEN, cyc - t0);

    check(stored == (AW+1)'(LEN), $sformatf("stored %0d results, expected %0d", stored, LEN));
    for (int a = 0; a < LEN; a++) begin
      int unsigned xp, y;
      xp = (a == 0) ? 0 : xs[a-1];
      y  = b0 * xs[a] + b1 * xp;
      rd_addr = AW'(a);
      #1;
      check(rd_data == 17'(y), $sformatf("y[%0d] = %0d, expected %0d (x=%0d, x-1=%0d)",
                                          a, rd_data, y, xs[a], xp));
    end

    $display("events: new=%0d repeats=%0d queued=%0d high1=%0d high2=%0d low=%0d med=%0d high=%0d",
             n_issue, n_repeat, n_queued, n_high1, n_high2, n_grade[0], n_grade[1], n_grade[2]);
    check(n_issue  > 0, "no new sample");
    check(n_repeat > 0, "no repeat skipped");
    check(n_queued > 0, "no repeat queued behind stage 2");
    check(n_high1  > 0, "HIGH1 memory never used");
    check(n_high2  > 0, "HIGH2 memory never used");
    for (int g = 0; g < 3; g++) check(n_grade[g] > 0, $sformatf("grade %0d never seen", g));
    check(exp_c1.size() == 0 && exp_c2.size() == 0, "samples left in the pipeline");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
