// intasycon_fir: two-tap FIR filter y[n] = b0*x[n] + b1*x[n-1] run as a
// self-timed pipeline under the INTASYCON controller.
//
// Samples come from a source memory and results go to a sink memory. The
// controller fetches a sample, skips it if it repeats the preceding ones
// (storing the previous result again), grades the size of the products it
// will form and derives from the free-running counter when each stage is
// done. There are no handshakes between stages: stage registers load on the
// transitions of the controller's c1 and c2.
//
//   stage 1: x[n] * b0 (Braun array), with x[n-1] from the z^-1 register;
//            result and x[n-1] load into the c1 register.
//   stage 2: x[n-1] * b1 (Braun array) and the ripple-carry sum of both
//            products; the (2N+1)-bit sum loads into the c2 register, from
//            which the sink memory stores it.
//
// A sample is skipped only when it equals the two samples before it
// (REPEAT_WINDOW = 2): then both taps see the same values as for the
// previous output and the previous output is the right result.
//
// Interface: load the source memory through ld_*, set 'len', pulse 'start'
// high; 'done' rises when every result is in the sink memory, which is read
// through rd_addr/rd_data. Coefficients b0, b1 must be held during a run.
// The event outputs pulse once per new sample, per skipped repeat and per
// sample whose stage 1 was stretched to avoid overtaking its predecessor.
//
// Timing: one counter tick per clock; stage delays are 5, 8 or 10 ticks per
// stage depending on the product size (ARCH = 2, end points from memories)
// or computed by adders (ARCH = 1). The filter's three stages (x b0,
// x b1, sum) are mapped onto the controller's two completion signals: the
// adder is placed in the second stage, so c2 plays the part of the third
// completion signal. That mapping, the single clock, and REPEAT_WINDOW are
// choices of this design.
module intasycon_fir
  import intasycon_pkg::*;
#(
  parameter int unsigned N             = 8,
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned ARCH          = 2,
  parameter int unsigned REPEAT_WINDOW = 2,
  localparam int unsigned AW           = $clog2(DEPTH),
  localparam int unsigned RW_BITS      = 2*N+1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N-1:0]       b0,
  input  logic [N-1:0]       b1,
  // source memory load port
  input  logic               ld_en,
  input  logic [AW-1:0]      ld_addr,
  input  logic [N-1:0]       ld_data,
  input  logic [AW:0]        len,
  // sink memory read port
  input  logic [AW-1:0]      rd_addr,
  output logic [RW_BITS-1:0] rd_data,
  output logic [AW:0]        stored,
  // status
  output logic               done,
  output logic               c1,
  output logic               c2,
  output logic               issue_evt,
  output logic               repeat_evt,
  output logic               collide_evt,
  output mem_sel_t           mem_sel,
  output grade_t             grade,
  output logic [AW:0]        fetched       // source words read so far
);

  count_t       count;
  logic         fetch, src_valid, src_exhausted, store;
  logic [N-1:0] src_data, x, zreg;

  free_counter #(.W(CNT_W)) u_counter (.clk, .rst_n, .count);

  source_mem #(.DEPTH(DEPTH), .W(N)) u_src (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .len, .rewind(1'b0),
    .fetch, .data(src_data), .valid(src_valid), .exhausted(src_exhausted),
    .addr(fetched)
  );

  intasycon2 #(.N(N), .REPEAT_WINDOW(REPEAT_WINDOW), .ARCH(ARCH)) u_ctrl (
    .clk, .rst_n, .start, .count,
    .coef((b0 > b1) ? b0 : b1),
    .fetch, .src_data, .src_valid, .src_exhausted,
    .data_out(x), .c1, .c2, .store, .done,
    .issue_evt, .repeat_evt, .collide_evt, .mem_sel, .grade
  );

  // z^-1: the sample issued before the one now entering stage 1
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         zreg <= '0;
    else if (issue_evt) zreg <= x;

  // stage 1
  logic [2*N-1:0] m0, m0_q, m1;
  logic [N-1:0]   z_q;

  braun_mult #(.N(N)) u_mul0 (.a(x), .b(b0), .p(m0));

  detff #(.W(3*N)) u_reg1 (.clk, .rst_n, .trig(c1), .d({m0, zreg}), .q({m0_q, z_q}));

  // stage 2
  logic [RW_BITS-1:0] y, y_q;

  braun_mult #(.N(N)) u_mul1 (.a(z_q), .b(b1), .p(m1));
  ripple_adder #(.W(2*N)) u_add (.a(m0_q), .b(m1), .cin(1'b0), .sum(y));

  detff #(.W(RW_BITS)) u_reg2 (.clk, .rst_n, .trig(c2), .d(y), .q(y_q));

  sink_mem #(.DEPTH(DEPTH), .W(RW_BITS)) u_sink (
    .clk, .rst_n, .rewind(1'b0), .store, .wdata(y_q),
    .rd_addr, .rd_data, .count(stored)
  );

endmodule
