# Online test and repair of a TSV bus between two stacked dies

A 3D-IC stacks dies and joins them with through-silicon vias (TSVs). A TSV can
develop three latent defects in the field: a void inside the copper, a
delamination between the via and its landing pad (both act as a series
resistance), or a pinhole short to the substrate (a leakage path). Any of them
slows the via down, and a slow via breaks the signal that crosses it.

This RTL lets a die-to-die bus find such vias and work around them while the
chip is in service, with no processor involved. The bus is cut into **TSV
groups**. A group with grouping ratio **M:N** carries M signal lines over M
regular and N spare TSVs, so it can lose up to N TSVs. A run does two things
in about 2(M+N) clocks:

1. **Detection.** Each TSV gets a rising edge in turn. The far end is sampled
   one test clock later. A TSV that has not reached logic 1 by then is marked
   faulty.
2. **Recovery.** The list of faulty TSVs is replayed through a small counter
   circuit on each die. It works out, line by line, which TSV every signal
   line should use now. It then loads those selects into the routing
   multiplexers on both dies.

The default configuration (`tsv_ft_top`) is a 1000-line bus: 20 groups of
50:5, so 1100 TSVs. That ratio gives the lowest area at full repair
capability for a fault rate of 1 %. The blocks below the top default to the
4:2 group used in all the examples here.

## The TSV group

```
 die 1                                               die 2
 sig_in[0] --demux--> TSV0 TSV1 TSV2                 TSV0 TSV1 TSV2 --mux--> sig_out[0]
 sig_in[1] --demux-->      TSV1 TSV2 TSV3                 TSV1 TSV2 TSV3 --mux--> sig_out[1]
   ...                                                 ...
 sig_in[M-1]-demux-->         TSV(M-1) .. TSV(M-1+N)                  --mux--> sig_out[M-1]
```

Signal line `i` (numbered from 0) can reach TSVs `i .. i+N`. Its select
`sel[i]` is an offset from its default TSV, from 0 to N, and is
K = ceil(log2(N+1)) bits wide. Line `i` therefore uses TSV `i + sel[i]`.
With no faults, every select is 0 and line `i` uses TSV `i`; the N spare TSVs
are the last ones. The lines keep their order. Each faulty TSV pushes every
later line one TSV further along. This is why N faults anywhere in the group
can always be repaired.

Die 1 has a 1-to-(N+1) demultiplexer per line (`routing_demux`). Die 2 has an
(N+1)-to-1 multiplexer per line (`routing_mux`). Each die has its own
**recovery block**, which holds that die's copy of the selects. Both dies
compute the same selects from the same status word, so no select value ever
has to cross the die boundary.

## One run, clock by clock

`ft_sequencer` drives every group of the bus in lock step. A `start` pulse
during normal operation runs these phases:

| phase | clocks | what happens |
|---|---|---|
| INIT | `INIT_CYCLES` (4) | All lines are driven low, so every TSV discharges. SI is low, which sets every observation flop to 1 ("faulty"). The recovery counters are cleared. |
| TEST | M+N+1 | In clock c, TSV c gets a rising edge and its observation flop captures at the end of that clock. In the same clock, the result of TSV c-1 is shifted into both status registers. |
| RECOVER | M+N | Both status registers shift out, TSV1 first. Each recovery control rebuilds its latch chain. |

`busy` is high for all 2(M+N) + INIT_CYCLES + 1 clocks of a run. `done`
pulses once as normal operation resumes. The functional bus is interrupted
for the length of the run.

## Detection: the transition test

`test_input` (die 1) launches the rising edge through the routing
demultiplexers, so the test also exercises the driver the via normally uses.
TSV j < M is reached from line j with select 0. A spare TSV M-1+s is reached
from the last line with select s. Only the TSV under test is high, and the
TSV tested in the clock before falls back.

`test_observation` (die 2) has, for each TSV, a two-input NAND of `SI` and the
far end `t2`, feeding a capture flop:

* With SI = 1, `Test_result = NOT t2`. A fault-free TSV has risen by the
  capture edge and gives 0. A slow TSV is still low and gives 1, which is
  recorded as faulty.
* With SI = 0, every NAND gives 1. This is how INIT presets every flop to
  faulty.

Whether a defect is caught depends only on how its rising delay compares
with one test-clock period. The behavioural TSV model (`tsv_model`) uses
these 20 %-to-80 % delays of a 65 nm, 1.2 V driver:

| void / delamination R | 0 | 1k | 2k | 3k | 4k | 5k | 10k | 50k | 100k | ≥1M |
|---|---|---|---|---|---|---|---|---|---|---|
| rise (ps) | 242 | 311 | 419 | 541 | 667 | 805 | 1492 | 7085 | 14121 | never |

| short-to-substrate R | ≤900 | 1k | 2k | 3k | 4k | 5k | 10k | 100k | 1M |
|---|---|---|---|---|---|---|---|---|---|
| rise (ps) | stays below VDD/2 | 758 | 665 | 551 | 379 | 336 | 279 | 245 | 242 |

At a 1.5 GHz test clock (667 ps) a void is caught above about 4 kΩ and a
short below about 2 kΩ. A faster test clock catches smaller defects. The
resistances that escape are treated as harmless: the bus still works at that
clock.

## Recovery: turning the status word into selects

This is the least obvious part of the design. Each die's `recovery_block`
holds three things:

* the `tsv_status_register`: M+N bits, 1 = faulty, TSV1 in the MSB;
* a `recovery_control`, which contains:
  * the **faulty TSV accumulator**: an adder counting the 1s seen so far;
  * the **signal line counter**: counts the 0s seen while fewer than M lines
    are configured, and raises the latch-chain enable on each of them;
  * the **comparator**: compares the faulty count with the tolerance limit N;
* the **latch chain**: M selects of K bits, which is a shift register.

Each recovery clock does the following:

1. One status bit leaves the register, MSB first.
2. The accumulator output becomes "faults so far, including this bit".
3. If the bit is 0 (a good TSV) and lines remain, the chain shifts: the
   accumulator value enters at the bottom (line M) and every entry moves up
   one line.

After the M-th good TSV, the first value scanned in has reached line 1, so
line k holds the number of faulty TSVs before the k-th good TSV. That number
is exactly the offset it needs.

Worked example (4:2, TSV2 and TSV4 faulty, status `010100`):

| clock | bit out | line counter | enable | accumulator | chain S1,S2,S3,S4 |
|---|---|---|---|---|---|
| 1 | 0 | 1 | yes | 00 | 00 00 00 00 |
| 2 | 1 | 1 | no  | 01 | 00 00 00 00 |
| 3 | 0 | 2 | yes | 01 | 00 00 00 01 |
| 4 | 1 | 2 | no  | 10 | 00 00 00 01 |
| 5 | 0 | 3 | yes | 10 | 00 00 01 10 |
| 6 | 0 | 4 | yes | 10 | 00 01 10 10 |

So lines 1 to 4 use TSV1, TSV3, TSV5 and TSV6. `exceed` is raised when more
than N TSVs are faulty. The selects are then meaningless: the group cannot be
repaired.

## Getting the test results to die 1

The observation flops are on die 2, but die 1 needs the same status word. The
result bit is therefore sent down a **double-TSV link**: two TSVs in parallel
carrying the same bit. Die 1 ORs the two, so a link TSV that has failed low
does not stop a 1 from arriving. Both status registers shift in the same
clock. The bit crosses the link within that clock, combinationally from the
die-2 read-out multiplexer.

## Interfaces

`tsv_ft_top #(M=50, N=5, GROUPS=20, INIT_CYCLES=4)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | test/system clock, asynchronous active-low reset |
| `start` | in | 1 | start a test-and-repair run (ignored while busy) |
| `busy`, `done` | out | 1 | run in progress / end-of-run pulse |
| `sig_in`, `sig_out` | in/out | GROUPS·M | functional lines; bit g·M+i is line i of group g |
| `defect` | in | GROUPS·(M+N) × `tsv_defect_t` | fault injection into the signal TSV models |
| `link_defect` | in | GROUPS·2 × `tsv_defect_t` | fault injection into the link TSV models |
| `exceed_d1`, `exceed_d2` | out | GROUPS | group has more than N faulty TSVs (die 1 / die 2) |
| `status_d1`, `status_d2` | out | GROUPS·(M+N) | status registers, observable for debug |
| `sel_d1`, `sel_d2` | out | GROUPS·M·K | current selects of every line |

`tsv_defect_t` (in `tsv_ft_pkg`) is `{kind, r_ohm}`. `kind` is `DEF_NONE`,
`DEF_OPEN` (void or delamination, series resistance) or `DEF_SHORT` (short
to substrate).

After reset all selects are 0, so the bus works over the regular TSVs before
the first run. The status word is used up by recovery: after a run, both
status registers read 0. Sample them when the RECOVER phase begins, which is
INIT_CYCLES + M+N+1 clocks after `start` is taken.

## Module map

| module | role |
|---|---|
| `tsv_ft_pkg` | defect type, phase enum, width helpers |
| `tsv_ft_top` | GROUPS groups + one sequencer |
| `tsv_ft_group` | one group on both dies, with its TSVs |
| `ft_sequencer` | INIT / TEST / RECOVER schedule |
| `test_input` | die-1 test pattern unit in front of the demultiplexers |
| `test_observation` | die-2 NAND + capture flop per TSV, serial read-out |
| `tsv_status_register` | status shift register |
| `recovery_control` | accumulator, signal line counter, comparator |
| `latch_chain` | select storage |
| `recovery_block` | status register + control + latch chain |
| `routing_demux`, `routing_mux` | die-1 / die-2 routing blocks |
| `tsv_model` | behavioural TSV (delays, not synthesizable) |

Everything except `tsv_model` is synthesizable. `tsv_model` stands in for the
physical vias, so that the whole stack simulates end to end. A
synthesis-ready top would keep the die-1 and die-2 halves of `tsv_ft_group`
apart and connect their TSV pins to real vias.

## Cost per group

A group of ratio M:N uses the following flip-flops:

* 3(M+N) for the two status registers and the observation flops;
* 2·M·K for the two latch chains;
* two accumulators of ceil(log2(M+N+1)) bits and two line counters of
  ceil(log2(M+1)) bits.

The logic is M+N NAND gates, M demultiplexers, M multiplexers and two
comparators. For 4:2 this comes to 34 + 12 = 46 flip-flops, which is what
synthesis of `tsv_ft_group` reports. The sequencer adds a few flops once for
the whole bus. The cost grows with M·log2(N+1), and the run time with M+N.
This is why a few wide groups (such as 50:5) can beat many narrow ones
(such as 3:3) for the same repair capability.

## Where this design makes its own choices

* **Run length.** The core 2(M+N) clocks follow the method. This design adds
  INIT_CYCLES of discharge and one clock to move the last captured result:
  17 clocks in total for 4:2, 115 for 50:5.
* **Initialisation length is a real limit.** The test only checks a rising
  edge, and it assumes the via starts low. Suppose a via was carrying a 1
  when its void grew large, and its fall time is longer than INIT. Then it
  can still look high at the capture edge and escape detection. With 4 INIT
  clocks at 1.5 GHz, voids up to about 10 kΩ (1.44 ns fall) are covered.
  Raise `INIT_CYCLES`, or start the run from an idle bus, to cover larger
  ones. A fully open via (≥ 1 MΩ) that froze high escapes in the same way.
* **One enable for the whole latch chain**, which shifts all entries, rather
  than one load enable per line.
* **Flip-flops, not latches**, in the "latch chain".
* **Wide accumulator.** It counts up to M+N, so the comparator sees the true
  number of faults. The chain takes the low K bits.
* **Which line launches each test edge**, and driving unselected
  demultiplexer outputs low.
* **The double-TSV link is ORed** on die 1.
* **Recovery always follows the test**, even when no TSV is faulty. It then
  rebuilds the default mapping.
* **One sequencer for every group and both dies.** How a run is triggered in
  the field (`start`) is left to the system.
* **The TSV model** interpolates linearly between the characterised points.
  It gives shorts the defect-free falling delay.
* **No area figures.** The area and repair-capability figures of the method
  (for example about 56 000 µm² per die for 1000 lines at 50:5) need a 65 nm
  library and a yield model, and are not reproduced here.

## Simulating

Every testbench in `tb/` is self-checking. Each prints one line
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_tsv_ft_group \
  -y rtl -y tb +libext+.sv -Irtl rtl/tsv_ft_pkg.sv tb/tb_tsv_ft_group.sv
./obj_dir/Vtb_tsv_ft_group +verilator+rand+reset+2
```

| testbench | covers |
|---|---|
| `tb_tsv_ft_top` | Full default size, 20 × 50:5, with no overrides. Three runs: no defect; 0-6 faults per group, benign defects and dead link TSVs; in-field growth under traffic. Checks status, exceed, selects, run length and traffic on all 1000 lines. Counts each mechanism (void caught, short caught, benign passed, spare used, exceed, dead link tolerated, repaired traffic, repeated run). |
| `tb_tsv_ft_group` | 4:2 group: the worked example above, a benign void with a dead link TSV, a fault on a spare TSV, three faults. |
| `tb_recovery_block` | Status word to selects against a "k-th good TSV" model, for 4:2 and 50:5. |
| `tb_recovery_control`, `tb_latch_chain`, `tb_tsv_status_register` | The worked example clock by clock, plus random streams. |
| `tb_routing_demux`, `tb_routing_mux`, `tb_test_input`, `tb_test_observation`, `tb_ft_sequencer` | Each block against a model. The sequencer test checks the 17-clock run length. |
| `tb_table3_ratios` | The twelve grouping ratios of the area/repair trade-off (1:1 to 120:6). For each, three 1000-line buses are built from one group instance per ratio, with every TSV defective at a 1 % rate. Every trial is checked, and the testbench prints the unrepairable groups and the repaired buses per ratio. At 1 % almost every bus is repaired at every ratio, so this shows that the logic is correct at each size. It is not a yield estimate. |
| `tb_tsv_model` | Model delays against the characterisation tables, and the 1.5 GHz pass/fail boundaries. |

All time values are in picoseconds (`timeunit 1ps`). The testbenches use a
666 ps (about 1.5 GHz) clock. Building the full-size testbench takes about a
minute; it simulates in under a second.
