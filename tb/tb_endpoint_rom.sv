// tb_endpoint_rom: checks every word of the five end-point memories.
//
// Expected contents are the published end-point words for pcount 0..2, extended to
// all 64 counter values: c1 = pcount + d1 and c2 = pcount + d1 + d2 modulo
// 64, with (d1, d2) = (5,5), (8,8), (10,10), (10,5), (10,8) for LOW, MED,
// HIGH, HIGH1, HIGH2. The printed rows (pcount 0..2) and the worked example
// (LOW at pcount 50 gives 55 and 60) are checked explicitly first.
module tb_endpoint_rom;
  import intasycon_pkg::*;
  mem_sel_t sel;
  count_t pcount;
  endpoints_t ep;
  int checks = 0, failures = 0;

  endpoint_rom dut (.sel, .pcount, .ep);

  task automatic expect_ep(input mem_sel_t m, input int unsigned p,
                           input int unsigned e1, input int unsigned e2);
    sel = m; pcount = count_t'(p);
    #1;
    checks++;
    if (ep.c1 != count_t'(e1) || ep.c2 != count_t'(e2)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: mem %0d pcount %0d gives %0d/%0d, expected %0d/%0d",
                 m, p, ep.c1, ep.c2, e1, e2);
    end
  endtask

  int unsigned d1 [5] = '{5, 8, 10, 10, 10};
  int unsigned d2 [5] = '{5, 8, 10, 5, 8};

  initial begin
    // published words for pcount 0..2 and the worked example
    expect_ep(MEM_LOW, 0, 5, 10);    expect_ep(MEM_MED, 0, 8, 16);
    expect_ep(MEM_HIGH, 0, 10, 20);  expect_ep(MEM_HIGH1, 0, 10, 15);
    expect_ep(MEM_HIGH2, 0, 10, 18); expect_ep(MEM_LOW, 2, 7, 12);
    expect_ep(MEM_HIGH2, 2, 12, 20); expect_ep(MEM_MED, 1, 9, 17);
    expect_ep(MEM_LOW, 50, 55, 60);
    for (int m = 0; m < 5; m++)
      for (int p = 0; p < 64; p++)
        expect_ep(mem_sel_t'(m), p, (p + d1[m]) % 64, (p + d1[m] + d2[m]) % 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
