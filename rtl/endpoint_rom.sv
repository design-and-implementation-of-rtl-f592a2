// endpoint_rom: the five end-point memories of the INTASYCON-II controller.
//
// Each memory (LOW, MED, HIGH, HIGH1, HIGH2) has one word per counter value.
// The word at address pcount holds the counter values at which stage 1 and
// stage 2 finish for an operand that entered at pcount:
//   c1 = (pcount + d1) mod 2^CNT_W,  c2 = (pcount + d1 + d2) mod 2^CNT_W
// with (d1, d2) = (5,5) LOW, (8,8) MED, (10,10) HIGH, (10,5) HIGH1 and
// (10,8) HIGH2 counter ticks. The contents are computed from that formula
// at initialisation (the power-up contents of an FPGA
// memory) and are read-only.
//
// An input demultiplexer routes the address to the selected memory only and
// an output multiplexer returns that memory's word. The lookup is
// combinational: 'ep' is valid in the same cycle as 'pcount' and 'sel'.
//
// The five memories, their contents and the demux/mux follow the original
// design; filling them at initialisation is a choice of this design.
module endpoint_rom
  import intasycon_pkg::*;
(
  input  mem_sel_t   sel,
  input  count_t     pcount,
  output endpoints_t ep
);

  localparam int unsigned DEPTH = 2**CNT_W;

  endpoints_t rom [NUM_MEMS][DEPTH];

  // memory contents: c1 = pcount + d1, c2 = pcount + d1 + d2 (mod 2^CNT_W)
  initial
    for (int m = 0; m < NUM_MEMS; m++)
      for (int unsigned a = 0; a < DEPTH; a++) begin
        rom[m][a].c1 = count_t'((a + mem_d1(mem_sel_t'(m))) % DEPTH);
        rom[m][a].c2 = count_t'((a + mem_d1(mem_sel_t'(m)) + mem_d2(mem_sel_t'(m))) % DEPTH);
      end

  count_t     addr [NUM_MEMS];   // demultiplexed addresses
  endpoints_t word [NUM_MEMS];   // memory outputs

  // memory-in control: only the selected memory sees the address
  always_comb
    for (int m = 0; m < NUM_MEMS; m++)
      addr[m] = (sel == mem_sel_t'(m)) ? pcount : '0;

  always_comb
    for (int m = 0; m < NUM_MEMS; m++)
      word[m] = rom[m][addr[m]];

  // memory-out control
  always_comb begin
    ep = word[0];
    for (int m = 1; m < NUM_MEMS; m++)
      if (sel == mem_sel_t'(m)) ep = word[m];
  end

endmodule
