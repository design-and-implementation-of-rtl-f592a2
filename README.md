# INTASYCON: a timing-table controller for self-timed pipelines on FPGAs

An array multiplier or a ripple adder finishes early when its operands are
small: only the low result bits have to settle. A synchronous pipeline cannot
use this, because its clock is set by the worst case. A classic asynchronous
pipeline can, but it needs completion detection (dual-rail logic) or
matched delay lines (bundled data), and neither maps well onto an ordinary
FPGA.

INTASYCON (INTelligent ASynchronous CONTroller) takes a third route. It
**knows** how long each stage needs for a given operand. When an operand
enters the pipeline, the controller notes the value of a free-running
counter, grades the operand's magnitude, and from that works out the counter
values at which stage 1 and stage 2 will be done. When the counter reaches
those values it toggles the completion signals `c1` and `c2`, and the
registers between the stages load. There is no handshake between stages. Two
further tricks save work:

* A sample equal to the ones before it is not processed again. The previous
  result is stored once more, and the next sample is fetched at once.
* A small operand must not overtake a large one ahead of it. Its stage-1 end
  point is stretched until the operand ahead has left stage 2.

This repository holds synthesizable SystemVerilog for the controller and for
the system it was demonstrated on: a two-tap FIR filter
`y[n] = b0*x[n] + b1*x[n-1]` built from two 8x8 Braun array multipliers and a
ripple-carry adder. The filter reads from a source memory and writes to a
sink memory. Two versions of the end-point logic are included:

* INTASYCON-II (the default, `ARCH = 2`) reads the end points from five
  small memories.
* INTASYCON-I (`ARCH = 1`) computes them with adders and a comparator.

## The pipeline

```
            +-------------------- intasycon2 (controller) --------------------+
 start ---->| fetch (temp1)  repeat check  grading  end points  c1/c2  store |
            +---+-----------------+----------------------------+---+--------+-+
                |fetch            |data_out x[n]           c1 |   | c2     | store (temp2)
          +-----v-----+           |                            |   |        |
          | source    |--src_data-+-> x b0 (Braun) --+   +-----v-+ |   +----v----+
          | memory    |           |                  +-->| stage | |   | sink    |
          +-----------+           +-> z^-1 ----------+   | reg 1 | |   | memory  |
                                                         +---+---+ |   +----^----+
                                    m0 = b0*x[n] <-----------+     |        |
                                    x[n-1] -> x b1 (Braun) -> (+) -v--> stage reg 2
```

* **Stage 1** forms `b0*x[n]` in a Braun multiplier. The `z^-1` register
  supplies `x[n-1]` next to it. On `c1`, both are loaded into stage register 1.
* **Stage 2** forms `b1*x[n-1]` in the second multiplier and adds the two
  products in the ripple adder. On `c2`, the 17-bit sum is loaded into stage
  register 2, and the sink memory stores it.

The filter has three stages as published: multiply, multiply, add. Each
stage has its own completion signal. The controller, however, is described
with two completion signals, and its end-point memories hold only two end
points. No delay is given for the adder stage. In this implementation the
adder therefore shares stage 2, and `c2` also marks the end of the sum.

## How the controller times an operand

Everything is counted on the 6-bit free-running counter (`free_counter`). It
ticks once per clock and wraps at 64.

**Grading** (`magnitude_grader`). An m-bit number times an n-bit number has
at most m+n bits. The grader adds the leading-one positions of the sample and
of the larger coefficient, then grades the product:

| product width | grade  | stage delay |
|---------------|--------|-------------|
| <= 8 bits     | LOW    | 5 ticks     |
| <= 12 bits    | MEDIUM | 8 ticks     |
| up to 16 bits | HIGH   | 10 ticks    |

A zero operand grades LOW. The delays were set for an 8x8 Braun multiplier
whose worst-case path is about 28.4 ns: 15, 24 and 30 ns, which are 5, 8
and 10 ticks of a 3 ns counter.

**End points** (`endpoint_rom`). Let `pcount` be the counter value when an
operand enters. The operand uses one of five memories, each addressed by
`pcount`. Each word holds the two end points side by side:

| memory | stage-1 delay d1 | stage-2 delay d2 | word at pcount = 0 |
|--------|------------------|------------------|--------------------|
| LOW    | 5                | 5                | c1 = 5,  c2 = 10   |
| MED    | 8                | 8                | c1 = 8,  c2 = 16   |
| HIGH   | 10               | 10               | c1 = 10, c2 = 20   |
| HIGH1  | 10               | 5                | c1 = 10, c2 = 15   |
| HIGH2  | 10               | 8                | c1 = 10, c2 = 18   |

In general `c1 = pcount + d1` and `c2 = pcount + d1 + d2`, modulo 64. For
example, a LOW operand that enters at count 50 finishes stage 1 at 55 and
stage 2 at 60. The lookup is combinational.

**Avoiding overtaking.** The memory is chosen from the grades of the
previous and the current operand:

| previous \ current | LOW   | MEDIUM | HIGH |
|--------------------|-------|--------|------|
| LOW                | LOW   | MED    | HIGH |
| MEDIUM             | HIGH1 | MED    | HIGH |
| HIGH               | HIGH1 | HIGH2  | HIGH |

The rule behind the table works as follows. A new operand enters no earlier
than the previous operand's `c1`. The previous operand then still needs its
own stage-2 delay. If the new operand's stage-1 delay is shorter than that,
the new operand gets the HIGH stage-1 delay of 10 ticks, and keeps its own
stage-2 delay. That is what HIGH1 (high then low) and HIGH2 (high then
medium) hold. Every case where the new operand could finish stage 1 first is
covered this way: sometimes with margin (MEDIUM then LOW), never too short.
An assertion in `intasycon2` checks that an operand never leaves stage 1
while stage 2 is still occupied.

The published selection table gives the stage delays (high, low) for both
MEDIUM→LOW and HIGH→LOW. It gives (high, medium) for HIGH→MEDIUM. Its
memory-name column, however, swaps HIGH1 and HIGH2 for the last two cases,
against the published memory contents. This implementation follows the
delays and the contents.

**INTASYCON-I** (`intasycon1_endpoints`, `ARCH = 1`) computes the end points
directly instead of looking them up:

```
c1 = later of (pcount + d, stage-2 end of the operand ahead)
c2 = c1 + d
```

Here `d` is the delay of the operand's own grade. "Later" is measured as the
distance from `pcount`, modulo 64. This gives the exact minimum wait, where
the memories give a conservative one. The price is an addition and a
comparison for every operand.

## Events, toggles and the single clock

The original circuit is built from dual-edge signals. Every transition of
`c1`, `c2` or `next`, rising or falling, is an event. A signal and a delayed
copy of it feed an XOR gate, which makes one positive pulse per event. That
pulse steps the memories and their address counters. This RTL keeps that
structure but runs it on one clock, the counter clock:

* `toggle_pulse` is the XOR with a delayed copy. The delay is one register,
  so each transition gives a pulse exactly one clock long.
* `detff` is the stage register that loads on both edges of its trigger. It
  detects a transition of `c1` or `c2` and loads one clock later.
* **Fetch:** `active1 = start_t ^ next ^ c1`, and its pulse is `temp1`.
  `start_t` toggles on the rising edge of `start`; `next` toggles on every
  skipped repeat. A fetch happens at the start of a run, after every repeat,
  and whenever stage 1 becomes free. These events never coincide: after a
  new operand enters, the next fetch waits for that operand's `c1`.
* **Store:** `active2 = rnext ^ c2d`, and its pulse is `temp2`. `c2d` is `c2`
  one clock later, once stage register 2 has loaded.

**Repeats and result order.** A repeat is always found while the operand it
repeats is in stage 2, or after it has finished. Storing the old result at
once would put it in the sink ahead of that operand's own result. The
controller therefore counts such repeats. It stores them, one per clock,
through `rnext`, right after the result they repeat. An assertion checks
that all stores for one result are done before the next result replaces it.

In the filter, an output repeats only if both taps see the same values
again. The filter therefore sets `REPEAT_WINDOW = 2`: a sample is skipped
only when it equals the two samples fetched before it. The controller's own
default is 1, which is right for a single multiplier.

Latencies, counted in clock edges:
* from the start of a fetch pulse to operand entry: 2 (memory read, then
  compare). The entry edge ends the cycle whose count becomes `pcount`;
* from entry to the `c1` toggle: d1; from entry to the `c2` toggle: d1 + d2;
* from the `c2` toggle to the result in the sink: 2 (stage register 2
  loads, then the sink stores).

## Top-level interface (`intasycon_fir`)

| parameter       | default | meaning                                      |
|-----------------|---------|----------------------------------------------|
| `N`             | 8       | sample and coefficient width                 |
| `DEPTH`         | 256     | source and sink memory words                 |
| `ARCH`          | 2       | 2 = end-point memories, 1 = adder/comparator |
| `REPEAT_WINDOW` | 2       | equal predecessors needed to skip a sample   |

To use the filter:

1. Reset with `rst_n` low.
2. Write samples with `ld_en`/`ld_addr`/`ld_data`, and set `len` to the
   number of samples.
3. Hold `b0` and `b1` constant, and raise `start` once. A second rising
   edge during a run would fetch an extra word.
4. Wait until `done` is high. `stored` then equals `len`, and the results can
   be read through `rd_addr`/`rd_data`.

The memories' address counters are not rewound at the top level, so each
reset allows one run.

Status outputs: `c1`, `c2`, `grade`, `mem_sel`, `fetched`, and one-cycle
pulses `issue_evt` (new sample), `repeat_evt` (sample skipped) and
`collide_evt` (HIGH1 or HIGH2 used).

## Files

| file | contents |
|------|----------|
| `rtl/intasycon_pkg.sv` | grade and memory enums, delays, end-point word, memory selection |
| `rtl/intasycon_fir.sv` | the filter system (top) |
| `rtl/intasycon2.sv` | the controller (fetch, repeat check, timing, store) |
| `rtl/endpoint_rom.sv` | LOW/MED/HIGH/HIGH1/HIGH2 end-point memories with demux and mux |
| `rtl/intasycon1_endpoints.sv` | INTASYCON-I end-point adders and comparator |
| `rtl/magnitude_grader.sv` | product-size grading |
| `rtl/braun_mult.sv` | 8x8 Braun array multiplier |
| `rtl/ripple_adder.sv` | 16-bit ripple-carry adder with carry out |
| `rtl/detff.sv` | register loading on both edges of its trigger |
| `rtl/toggle_pulse.sv` | transition-to-pulse converter |
| `rtl/free_counter.sv` | 6-bit free-running counter |
| `rtl/source_mem.sv`, `rtl/sink_mem.sv` | memories with address counters |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_intasycon_fir_arch1.sv` | the filter run with `ARCH = 1` |
| `tb/tb_intasycon_fir_table4.sv`, `tb/tb_intasycon_fir_table4_arch1.sv` | the evaluation data set (below), both versions |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Run
from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/intasycon_pkg.sv tb/tb_intasycon_fir.sv --top-module tb_intasycon_fir
./obj_dir/Vtb_intasycon_fir
```

Any other testbench works the same way; replace the file and top name.

The filter testbenches run the design at its default size. They use a
256-sample data set of mixed magnitudes in which about one sample in five
starts a run of repeats. They check four things:

* every result against `b0*x[n] + b1*x[n-1]`;
* the memory chosen for each sample;
* the exact clock of every `c1` and `c2` toggle;
* that each mechanism occurs: all three grades, HIGH1 and HIGH2 stretching,
  skipped repeats, and repeats queued behind a busy stage 2.

With the data set and coefficients in the testbench (`b0 = 43`, `b1 = 13`),
one run takes:
* INTASYCON-II: 2169 clocks (6.5 µs at 3 ns per tick, 8.7 µs at 4 ns);
* INTASYCON-I: 2014 clocks.

Here version I is faster because its end points are exact.

The published evaluation used 256 samples of the numbers 0 to 255 with 20%
repeated data. Its exact sequence is not known. The `table4` testbenches
use a stand-in: a rising count from 0, with the previous value repeated at
50 of the 256 positions. Ten of those are double repeats, which are skipped.
Both versions take 2821 clocks on it: 8.5 µs at 3 ns per tick. On a rising
ramp no operand is ever smaller than the one before it, so the two versions
compute the same end points. The published times are 5.1 µs (II) and
5.3 µs (I), measured on a Cyclone II with the gate-delay implementation.
These simulations do not reproduce those times.

## Where this RTL departs from the published design

* **Single clock.** The original uses gate delays (chains of buffers) and
  true dual-edge flip-flops. This RTL is synchronous to the counter clock, so
  it has the same timing in simulation as on any FPGA. The cost is one to
  two extra clocks per handoff.
* **Three-stage filter, two completion signals.** As described above, the
  adder shares stage 2. The b0 product passes through stage register 1
  rather than going straight to the adder.
* **Repeat results are kept in order,** and the filter skips a sample only
  when the whole tap window repeats. The original stores the previous output
  again at once.
* **HIGH1/HIGH2 naming** follows the published memory contents (see above).
* **Counter tick.** Both 4 ns and 3 ns per tick appear in the published
  description; the 5/8/10-tick delays match 3 ns. The RTL only counts ticks,
  so the clock period is the user's choice.
* **Own additions:** the memory load and read ports, `len`, `done`, the event
  outputs, the reset values, and the contents of INTASYCON-I (same delay for
  both stages).

Not included:
* the earlier controller built on a NIOS soft-core processor (no program is
  given for it);
* the built-in self test, which is named but not described;
* the synchronous and bundled-data versions the original compares against.
