// intasycon2: the INTASYCON controller for a two-stage asynchronous pipeline.
//
// The controller replaces handshakes between pipeline stages by timing: it
// knows how long each stage needs for a given operand, stamps every operand
// with the free-running count at which it enters, and toggles c1 / c2 when
// the count reaches the operand's stage-1 / stage-2 end point. Each
// transition of c1 or c2 loads the register behind that stage.
//
// Operation, per operand:
//  * Fetch. active1 = start_t ^ next ^ c1 changes on the first rising edge of
//    'start', on every repeat ('next' toggles) and on every stage-1
//    completion (c1 toggles). toggle_pulse turns each change into the one-
//    cycle 'fetch' pulse (temp1) that reads the source memory.
//  * Repeat check. The fetched word is compared with the REPEAT_WINDOW words
//    fetched before it. If all are equal its result equals the previous
//    result: the operand is not processed, 'next' toggles to fetch the
//    following word, and the previous result is stored into the sink again.
//  * New operand. It is driven on 'data_out' (stage 1 starts at once), its
//    product magnitude is graded against 'coef', and the end-point memory
//    chosen from the previous and current grade is read at address
//    pcount = count. ARCH = 1 computes the end points with adders and a
//    comparator instead (INTASYCON-I).
//  * Completion. When count equals the stage-1 end point, c1 toggles and the
//    operand moves to stage 2; when count equals the stage-2 end point, c2
//    toggles. The end-point choice guarantees that an operand never finishes
//    stage 1 before its predecessor has left stage 2.
//  * Store. active2 = rnext ^ c2d (c2d is c2 one clock later, when the stage-2
//    register has loaded) gives one 'store' pulse (temp2) per result. Repeats
//    seen while the operand they repeat is still in the pipeline are counted
//    and stored right after its result, so the sink keeps input order.
//
// Timing: one counter tick per clock. From a fetch pulse to the operand
// entering stage 1 takes 2 clocks; an operand with end points (c1, c2) enters
// stage 2 at c1 and its result is stored 2 clocks after c2. 'done' is high
// once the source is exhausted and every result is stored.
//
// Taken from the original INTASYCON description: the fetch/store XOR structure, the
// repeat skip, the low/medium/high grading and the five end-point memories.
// Choices of this design: the single clock and the register used as the
// delay element, the 2-clock fetch latency, the ordering of repeated
// results, REPEAT_WINDOW and the 'done' flag.
module intasycon2
  import intasycon_pkg::*;
#(
  parameter int unsigned N             = 8,   // operand width
  parameter int unsigned REPEAT_WINDOW = 1,   // earlier words a repeat must match
  parameter int unsigned ARCH          = 2    // 2: end-point memories, 1: adders
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  count_t       count,      // free-running counter
  input  logic [N-1:0] coef,       // other multiplier operand, for grading
  // source memory
  output logic         fetch,      // temp1
  input  logic [N-1:0] src_data,
  input  logic         src_valid,
  input  logic         src_exhausted,
  // pipeline
  output logic [N-1:0] data_out,
  output logic         c1,
  output logic         c2,
  // sink memory
  output logic         store,      // temp2
  // status and events
  output logic         done,
  output logic         issue_evt,  // a new operand entered stage 1
  output logic         repeat_evt, // a fetched word was a repeat
  output logic         collide_evt,// a new operand was given a stretched stage 1
  output mem_sel_t     mem_sel,    // end-point memory chosen for a new operand
  output grade_t       grade
);

  localparam int unsigned RW = (REPEAT_WINDOW < 1) ? 1 : REPEAT_WINDOW;
  localparam int unsigned RCW = 8;   // width of the repeat counters

  // ---------------------------------------------------------------- fetch
  logic start_d, start_t, next;
  logic active1;

  assign active1 = start_t ^ next ^ c1;

  toggle_pulse u_temp1 (.clk, .rst_n, .level(active1), .pulse(fetch));

  // ---------------------------------------------------------- repeat check
  logic [N-1:0] hist [RW];
  logic [$clog2(RW+1)-1:0] hist_cnt;
  logic         is_rep;

  always_comb begin
    is_rep = (hist_cnt == ($clog2(RW+1))'(RW));
    for (int k = 0; k < RW; k++)
      if (hist[k] != src_data) is_rep = 1'b0;
  end

  assign issue_evt  = src_valid && !is_rep;
  assign repeat_evt = src_valid &&  is_rep;

  // -------------------------------------------------- grading / end points
  grade_t     prev_grade;
  endpoints_t ep;

  magnitude_grader #(.N(N)) u_grade (.a(src_data), .b(coef), .grade(grade));

  assign mem_sel     = select_mem(prev_grade, grade);
  assign collide_evt = issue_evt && (mem_sel == MEM_HIGH1 || mem_sel == MEM_HIGH2);

  logic   s1_busy, s2_busy;
  count_t s1_c1, s1_c2, s2_c2;

  generate
    if (ARCH == 1) begin : g_arith
      intasycon1_endpoints u_ep (
        .grade, .pcount(count), .prev_busy(s2_busy), .prev_c2(s2_c2), .ep
      );
    end else begin : g_mem
      endpoint_rom u_ep (.sel(mem_sel), .pcount(count), .ep);
    end
  endgenerate

  // ----------------------------------------------------------- completion
  logic c1_evt, c2_evt;
  assign c1_evt = s1_busy && (count == s1_c1);
  assign c2_evt = s2_busy && (count == s2_c2);

  // ---------------------------------------------------------------- store
  logic c2d, rnext, active2, drain;
  logic [RCW-1:0] rep_old;   // repeats of the result now in the stage-2 register
  logic [RCW-1:0] rep_new;   // repeats of the operand still in stage 2

  assign active2 = rnext ^ c2d;
  toggle_pulse u_temp2 (.clk, .rst_n, .level(active2), .pulse(store));

  // a repeated result may be stored when the stage-2 register is not about
  // to change and no result store is due in the same cycle
  assign drain = (rep_old != '0) && !c2_evt && (c2 == c2d);

  // next values of the repeat counters
  logic [RCW-1:0] rep_old_n, rep_new_n;
  always_comb begin
    rep_old_n = rep_old;
    rep_new_n = rep_new;
    if (drain) rep_old_n = rep_old_n - 1'b1;
    if (c2_evt) begin
      rep_old_n = rep_new_n;
      rep_new_n = '0;
    end
    if (repeat_evt) begin
      if (s2_busy && !c2_evt) rep_new_n = rep_new_n + 1'b1;
      else                    rep_old_n = rep_old_n + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      start_d    <= 1'b0;
      start_t    <= 1'b0;
      next       <= 1'b0;
      c1         <= 1'b0;
      c2         <= 1'b0;
      c2d        <= 1'b0;
      rnext      <= 1'b0;
      hist_cnt   <= '0;
      for (int k = 0; k < RW; k++) hist[k] <= '0;
      data_out   <= '0;
      prev_grade <= GRADE_LOW;
      s1_busy    <= 1'b0;
      s2_busy    <= 1'b0;
      s1_c1      <= '0;
      s1_c2      <= '0;
      s2_c2      <= '0;
      rep_old    <= '0;
      rep_new    <= '0;
    end else begin
      start_d <= start;
      if (start && !start_d) start_t <= ~start_t;

      // fetched word
      if (src_valid) begin
        hist[0] <= src_data;
        for (int k = 1; k < RW; k++) hist[k] <= hist[k-1];
        if (hist_cnt != ($clog2(RW+1))'(RW)) hist_cnt <= hist_cnt + 1'b1;
      end
      if (repeat_evt) next <= ~next;
      if (issue_evt) begin
        data_out   <= src_data;
        prev_grade <= grade;
        s1_busy    <= 1'b1;
        s1_c1      <= ep.c1;
        s1_c2      <= ep.c2;
      end

      // stage completions
      if (c1_evt) begin
        c1      <= ~c1;
        s1_busy <= 1'b0;
        s2_busy <= 1'b1;
        s2_c2   <= s1_c2;
      end
      if (c2_evt) begin
        c2 <= ~c2;
        if (!c1_evt) s2_busy <= 1'b0;
      end
      c2d <= c2;

      // repeated results
      if (drain) rnext <= ~rnext;
      rep_old <= rep_old_n;
      rep_new <= rep_new_n;
    end

  assign done = src_exhausted && !s1_busy && !s2_busy && !fetch && !src_valid
                && (rep_old == '0) && (rep_new == '0) && (c2 == c2d) && !store;

  // ------------------------------------------------------------ assertions
  // an operand leaves stage 1 only when stage 2 is empty or emptying
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    c1_evt |-> (!s2_busy || c2_evt));
  // repeats are only fetched while stage 1 is empty
  a_rep_stage1_empty: assert property (@(posedge clk) disable iff (!rst_n)
    repeat_evt |-> !s1_busy);
  // all repeats of a result are stored before the next result replaces it
  a_rep_order: assert property (@(posedge clk) disable iff (!rst_n)
    c2_evt |-> (rep_old == '0));
  // a new operand enters only when stage 1 is empty
  a_issue_stage1_empty: assert property (@(posedge clk) disable iff (!rst_n)
    issue_evt |-> (!s1_busy || c1_evt));

endmodule
