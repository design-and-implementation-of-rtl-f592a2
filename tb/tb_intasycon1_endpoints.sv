// tb_intasycon1_endpoints: checks the INTASYCON-I end-point arithmetic.
//
// With no predecessor in stage 2 the end points must be pcount + d and
// pcount + 2d (d = 5, 8, 10 for low, medium, high). With a predecessor whose
// stage-2 end lies later than pcount + d, stage 1 must end with it and
// stage 2 d ticks after. All 64 entry counts are tried, including the wrap
// from 63 to 0, for every grade and a spread of predecessor end points.
module tb_intasycon1_endpoints;
  import intasycon_pkg::*;
  grade_t grade;
  count_t pcount, prev_c2;
  logic prev_busy;
  endpoints_t ep;
  int checks = 0, failures = 0;

  intasycon1_endpoints dut (.grade, .pcount, .prev_busy, .prev_c2, .ep);

  int unsigned d_of [3] = '{5, 8, 10};

  initial begin
    int unsigned d, rel, e1;
    for (int g = 0; g < 3; g++)
      for (int p = 0; p < 64; p++)
        for (int r = -1; r <= 20; r++) begin
          d = d_of[g];
          grade = grade_t'(g);
          pcount = count_t'(p);
          prev_busy = (r >= 0);
          rel = (r < 0) ? 0 : r;
          prev_c2 = count_t'((p + rel) % 64);
          #1;
          e1 = (r >= 0 && rel > d) ? rel : d;
          checks++;
          if (ep.c1 != count_t'((p + e1) % 64) || ep.c2 != count_t'((p + e1 + d) % 64)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: g=%0d p=%0d prev=%0d -> %0d/%0d", g, p, r, ep.c1, ep.c2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
