// intasycon_pkg: types and constants shared by the INTASYCON controller blocks.
//
// The controller grades every new operand as LOW, MEDIUM or HIGH magnitude
// and picks one of five end-point memories (LOW, MED, HIGH, HIGH1, HIGH2)
// from the grade of the current and of the previous operand. The stage
// delays are counts of the 6-bit free-running counter: 5, 8 and 10 counts
// for low, medium and high data (15, 24 and 30 ns). HIGH1 holds the end
// points for a high stage-1 delay followed by a low stage-2 delay, HIGH2
// for a high stage-1 delay followed by a medium stage-2 delay.
package intasycon_pkg;

  localparam int unsigned CNT_W = 6;            // width of the free-running counter
  typedef logic [CNT_W-1:0] count_t;

  // stage delays in counter ticks
  localparam int unsigned D_LOW  = 5;
  localparam int unsigned D_MED  = 8;
  localparam int unsigned D_HIGH = 10;

  typedef enum logic [1:0] {
    GRADE_LOW  = 2'd0,
    GRADE_MED  = 2'd1,
    GRADE_HIGH = 2'd2
  } grade_t;

  typedef enum logic [2:0] {
    MEM_LOW   = 3'd0,
    MEM_MED   = 3'd1,
    MEM_HIGH  = 3'd2,
    MEM_HIGH1 = 3'd3,
    MEM_HIGH2 = 3'd4
  } mem_sel_t;

  localparam int unsigned NUM_MEMS = 5;

  // One end-point word: stage-1 end (c1) and stage-2 end (c2), stored
  // side by side in one word.
  typedef struct packed {
    count_t c1;
    count_t c2;
  } endpoints_t;

  function automatic int unsigned grade_delay(grade_t g);
    case (g)
      GRADE_LOW: return D_LOW;
      GRADE_MED: return D_MED;
      default:   return D_HIGH;
    endcase
  endfunction

  // Stage-1 and stage-2 delays held by each end-point memory.
  function automatic int unsigned mem_d1(mem_sel_t m);
    case (m)
      MEM_LOW: return D_LOW;
      MEM_MED: return D_MED;
      default: return D_HIGH;
    endcase
  endfunction

  function automatic int unsigned mem_d2(mem_sel_t m);
    case (m)
      MEM_LOW:   return D_LOW;
      MEM_MED:   return D_MED;
      MEM_HIGH1: return D_LOW;
      MEM_HIGH2: return D_MED;
      default:   return D_HIGH;
    endcase
  endfunction

  // Memory selection from the grades of the previous and current operand.
  // A current operand smaller than the previous one would finish stage 1
  // before the previous operand leaves stage 2 (a collision); it then gets
  // a high stage-1 delay and keeps its own stage-2 delay.
  function automatic mem_sel_t select_mem(grade_t prev, grade_t cur);
    if (cur == GRADE_HIGH)                         return MEM_HIGH;
    if (cur == GRADE_MED)  return (prev == GRADE_HIGH) ? MEM_HIGH2 : MEM_MED;
    // current operand is low
    if (prev == GRADE_LOW)                         return MEM_LOW;
    return MEM_HIGH1;
  endfunction

endpackage
