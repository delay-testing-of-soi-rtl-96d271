# Three-pattern scan elements for worst-case delay testing of PD-SOI logic

In partially-depleted silicon-on-insulator (PD-SOI) logic the transistor body
floats, so a gate's threshold voltage, and with it its delay, depends on how
the gate has been switching. A path that has rested at one level for a long
time (hundreds of clock cycles) and then sees a short pulse passes the first
edge of that pulse quickly and the return edge slowly: the pulse is stretched.
The slow return edge is the path's worst case, and neither at-speed functional
testing nor a conventional two-pattern delay test produces it.

The remedy is a three-pattern delay test:

| pattern | role in a two-pattern test | role in the three-pattern test |
|---------|----------------------------|--------------------------------|
| V1      | sets the initial value     | held long enough to precondition the path |
| V2      | launches the transition    | applied for at most one clock; sets the initial value |
| V3      | (none)                     | launches the timed transition; equal to V1 |

Because V3 equals V1, a scan cell needs to store only two distinct values to
apply the test. This repository is synthesizable SystemVerilog for two such
scan cells, following the article "Delay Testing of SOI Circuits: Challenges
with the History Effect". It also has the registers that mix them with
standard LSSD cells, and a top level that puts both schemes in front of a
circuit under test. A behavioural SOI timing model and testbenches show that a
tight capture window catches the stretched edge with three patterns and misses
it with two.

All storage is level-sensitive latches, clocked by non-overlapping pulses from
a tester, in the LSSD (level-sensitive scan design) style. There is no
free-running clock and no reset. Registers get their values by scanning.

## Files

| file | what it is |
|------|-----------|
| `rtl/tpt_scan_pkg.sv` | clock-bundle structs `se1_clk_t` (C1, C2, C3, ACLK, B1, B2) and `se2_clk_t` (C1, C2, C3, ACLK) |
| `rtl/lssd_scan_element.sv` | standard LSSD cell, used for capture and for cells that launch no tested path |
| `rtl/scan_element_1.sv` | three-latch cell with two scan paths |
| `rtl/scan_element_2.sv` | four-latch cell with one scan path that is twice as long |
| `rtl/se1_scan_register.sv`, `rtl/se2_scan_register.sv` | a row of cells; a parameter mask says which cells are enhanced |
| `rtl/soi_tpt_scan_top.sv` | both schemes side by side: launch cells, then capture cells |
| `tb/soi_path_model.sv` | behavioural PD-SOI path with history-dependent delay (testbench only) |
| `tb/tb_*.sv`, `tb/*.svh` | self-checking testbenches |

## The standard LSSD cell (baseline and capture latch)

Master L1 has two write ports: Data In on C1 and Scan In on ACLK. Slave L2
copies L1 while C2 is high, and it drives Data Out and the next cell's Scan In.
- System mode: C1 and C2 alternate, so the cell works as a flip-flop.
- Scan mode: ACLK and C2 alternate, one shift position per pair.

In this design LSSD cells are the capture latches at the end of tested paths.
They also fill every scan position whose output starts no tested path.

## Scan element 1: three latches, two scan paths

| latch | written by | from | holds during a test |
|-------|-----------|------|---------------------|
| L1 | C1 / ACLK / B1 CLK | Data In / Scan In A / Scan In B | V3 |
| L2 | C2 / C3 | L1 / L3 | V1, drives Data Out and Scan Out A |
| L3 | B2 CLK | L1 | V2, drives Scan Out B |

A test goes as follows:
1. **Scan path B** (B1, B2 alternating) shifts V2 into the L3 latches.
2. **Scan path A** (ACLK, C2 alternating) shifts V1/V3 into L1 and L2. L3 is
   not touched. The last C2 leaves the same value in L1 and L2.
3. **Precondition:** the tester waits while Data Out holds V1.
4. **C3** copies L3 into L2, so V2 reaches the path.
5. After at most one clock, **C2** copies L1 into L2. This launches V3, and
   the timed interval starts when C2 rises.
6. **C1** at the capture cells closes the interval when it falls.
7. A C2 pulse moves the captured values into the capture slaves. Scan path A
   then shifts them out.

The two paths share L1, so they must be scanned one after the other. This
doubles the scan-in time. The cell has the fewest latches of the two, but
needs two extra clocks (C3 and the B pair) and a second scan path.

## Scan element 2: four latches, one doubled scan path

| latch | written by | from | holds during a test |
|-------|-----------|------|---------------------|
| L1 | C1 / ACLK | Data In / Scan In | V3 |
| L2 | C2 / C3 | L1 / L4 | V1, drives Data Out |
| L3 | C1 | L2 | V2 (staging copy) |
| L4 | C3 | L3 | V2, drives Scan Out |

This cell is the least obvious part of the design. L1/L2 and L3/L4 are two
master/slave pairs in series, so the cell occupies **two scan positions**.
L3 and L4 borrow clocks the cell already has: C1, which writes L1, and C3,
which writes L2. So C3 is the only clock beyond those of a standard LSSD
cell, and there is no second scan path. Each shift step is
**C1, ACLK, C3, C2**:

- C1 copies L2 into L3. It also loads Data In into L1, which does no harm.
- ACLK loads Scan In into L1 and overwrites what C1 put there. Scan In is the
  previous cell's L4, which has not changed yet in this step.
- C3 copies L3 into L4. The same pulse also writes L4 back into L2, which
  leaves L2 unchanged because L3 was just copied from L2.
- C2 moves L1 into L2.

The order matters. ACLK must come before C3, or the next cell would read the
new L4 and a position would be skipped. C3 must come before C2, or it would
overwrite the bit that C2 just brought into L2.

Of the bits shifted into a cell, the last one stays in L1/L2 (V1/V3). The one
before it moves on to L3/L4 (V2). In the serial stream each enhanced cell
therefore takes its V2 first, then its V1. An LSSD cell in the same chain takes
one bit. The test then runs as for scheme 1: precondition, C3 (L4 into L2,
applying V2), C2 (L1 into L2, launching V3), and C1 at the capture cells.
Before scan-out, a C2 pulse moves the captured values from L1 into L2. The C1
of the next shift step would otherwise overwrite them.

L2 → L3 → L4 → L2 is a ring of transparent latches. Lint and synthesis report
it as a combinational loop. C1 opens the L2-to-L3 link. C3 opens both
L3-to-L4 and L4-to-L2, so while C3 is high L3 flows straight through to L2:
that is how V2 gets there. The ring conducts all the way round only if C1 and
C3 overlap. Assertions in the cell check that no two of its clocks overlap.

The L3/L4 clocking comes from the source's drawing of the cell, where the C1
and C3 lines run down to L3 and L4. It also fits the source's remark that the
clocks of L1 and L2 serve L3 and L4 in scan mode. The source gives no pulse
order for scanning this cell, so the four-pulse step above is this design's
own.

## Registers and selective replacement

Only the cells that launch paths chosen for delay testing need an enhanced
element. Everything else, capture latches included, stays standard LSSD. When
few paths are tested, the area and scan-length cost is small.
`se1_scan_register` and `se2_scan_register` follow this rule:

- `WIDTH` cells; cell 0 is nearest the scan input.
- Parameter `ENHANCED` (a `WIDTH`-bit mask) chooses the enhanced cells.
- Scheme 1: scan path A runs through every cell. Scan path B runs only through
  the enhanced cells, and an LSSD cell passes it straight on.
- Scheme 2: the single path is `WIDTH + popcount(ENHANCED)` positions long.

## Top level: `soi_tpt_scan_top`

Parameters:
- `N_IN` (default 233): number of launch cells.
- `N_OUT` (default 140): number of capture cells.
- `LAUNCH_ENHANCED` (default all ones): which launch cells are enhanced.

The defaults are the input and output counts of c2670, the largest of the
benchmark circuits whose critical paths the source characterises. Each scheme
has its own ports, prefixed `s1_` and `s2_`:

| port | direction | meaning |
|------|-----------|---------|
| `*_clk` | in | clock bundle of the scheme |
| `*_sys_in[N_IN]` | in | functional Data In of the launch cells |
| `*_launch_out[N_IN]` | out | launch cells' Data Out, the inputs of the circuit under test |
| `*_capture_in[N_OUT]` | in | outputs of the circuit under test |
| `*_capture_out[N_OUT]` | out | capture cells' Data Out |
| `s1_scan_in_a/_out_a`, `s1_scan_in_b/_out_b` | in/out | scheme-1 scan paths A and B |
| `s2_scan_in/_out` | in/out | scheme-2 scan path |

On each scan path the launch cells come first and the capture cells after
them. The circuit under test and the tester that makes the clock pulses are
outside this design.

## Clocking rules

- All clocks are active high, level-sensitive pulses.
- Two clocks that write the same latch, or two latches in series, must never
  be high together. Concurrent assertions in each cell check this on every
  rising clock edge.
- The interval being tested runs from the rising edge of the launching clock
  (C2 for a three-pattern test) to the falling edge of C1 at the capture cell.
  The testbenches make C2 a 0.2 ns pulse and raise C1 0.2 ns after it falls.
- V2 should be applied for no more than about one clock period. If it stays
  longer, the path's preconditioning fades.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_lssd_scan_element` | system, scan and capture against a reference model of the two latches |
| `tb_scan_element_1` | path B then path A scan-in; C3 shows V2 and C2 shows V3; system mode leaves L3 alone |
| `tb_scan_element_2` | two-step scan-in with random Data In; V2/V3 sequence; scan-through over two positions |
| `tb_se1_scan_register` | 6 mixed cells: scan lengths 6 (A) and 3 (B), test sequence, capture, scan-out on both paths |
| `tb_se2_scan_register` | 6 mixed cells, 9 scan positions: the same sequence |
| `tb_soi_tpt_scan_top` | end to end: 4 launch cells (one plain), 4 capture cells, SOI path models; counts every mechanism |
| `tb_soi_tpt_scan_top_full` | the same test plan at the default size (233 + 140 cells), about half a minute |
| `tb_table2_paths` | six benchmark critical paths with their own delays, both directions, both schemes |

`tb/soi_path_model.sv` stands in for the circuit under test:
- A non-inverting path whose return edge is slow (worst case) when the input
  goes back to a level it held for at least `PRECOND` after a pulse shorter
  than `PULSE_MAX`.
- Every other edge takes the fast delay.

The default delays are those of the c432 critical path (rising 1522/1404 ps
worst/fast, falling 1243/1148 ps). `PRECOND` (300 ns) and `PULSE_MAX` (20 ns)
are short stand-ins for "hundreds of cycles" and "one clock". The end-to-end
tests set the capture window between the fast and the worst delay. The
three-pattern test then captures the stale V2 value on every enhanced path,
which detects the slowdown. A two-pattern test from the same preconditioned
state captures the right value and misses it. A window longer than any delay
makes every path pass.

`tb_table2_paths` repeats this for six paths with these delays (ps):

| path | Tplh worst | Tplh fast | Tphl worst | Tphl fast |
|------|-----------:|----------:|-----------:|----------:|
| c432  | 1522 | 1404 | 1243 | 1148 |
| c499  | 1773 | 1614 | 1602 | 1479 |
| c1355 | 1683 | 1559 | 1985 | 1817 |
| c2670 | 3092 | 2820 | 2494 | 2207 |
| c3540 | 4231 | 3679 | 3410 | 3108 |
| c5315 | 3110 | 2848 | 3103 | 2812 |

The spread between worst and fast is 7.3 % to 13 % of the worst-case delay.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/tpt_scan_pkg.sv tb/tb_soi_tpt_scan_top.sv --top-module tb_soi_tpt_scan_top
./obj_dir/Vtb_soi_tpt_scan_top
```

Verilator warns about the scheme-2 latch ring (`UNOPTFLAT`) and about the
variable delays in the path model (`ZERODLY`). By default it stops on
warnings, which is why the command passes `-Wno-fatal`.

## How far to trust it, and where it departs from the source

Taken from the source:
- which latches each cell has, and what each latch holds;
- the clocks of L3 (C1) and L4 (C3) in scan element 2;
- the L2 write ports and the C3 function;
- the scan-path structure of both schemes;
- the test pulse orders;
- the rule that V3 equals V1 and that V2 lasts at most one clock;
- the use of LSSD cells for capture and for non-launching positions.

Choices made here:
- the scan shift step of scan element 2 (C1, ACLK, C3, C2);
- a priority order inside multi-port latches (the clocks must be exclusive
  anyway);
- path B skipping LSSD cells in a mixed scheme-1 register;
- the cell order on the scan path;
- the clock-bundle structs;
- all sizes;
- the timing model of the SOI path.

Simulation checks logic behaviour only. Real latch timing, clock skew and the
analogue body-voltage behaviour are outside what RTL can show. The path model
is a two-state caricature of that behaviour: it has no separate
switching-steady-state delay.

Not included:
- the two-pattern enhanced scan cell that the proposal is compared against;
- automatic test-pattern generation;
- the tester;
- the circuit under test itself.

Some PD-SOI processes show pulse shrinking instead of pulse stretching. In
those processes the first edge after preconditioning is the slow one, and a
two-pattern test with a long-held first vector is enough. These cells can
apply that test too: scan in, wait, launch with C3, as `tb_soi_tpt_scan_top`
does for its comparison.
