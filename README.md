# Virtual scan chain: a short scan chain in front of a long one

A core with full scan normally exposes one scan chain through three pins: scan
enable (SE), scan data in (SDI) and scan data out (SDO). Every test vector costs
as many shift cycles, and as many bits of tester memory, as there are
flip-flops in the chain. A *virtual scan chain* keeps exactly those three pins
and the same tester protocol (shift a vector, pulse one capture clock, shift
the next vector while the response comes out), but the chain the tester sees
is several times shorter than the real one. Inside the core, a little logic
expands each short *virtual vector* into a full vector for all real scan cells,
using LFSRs whose seeds are part of the virtual vector, and compacts the
response of all cells into the single SDO stream with a MISR.

The default build has 700 real scan cells behind a 199-bit virtual chain,
with 8 sub-chains. These sizes match the s13207 ISCAS 89 benchmark. All sizes
are parameters.

## Architecture

```
                 +-----------------------------------------------+
 SDI --+-------->| p-bit LFSR/Scan sub-chain: N_SUB segments       |---(p_so)----------+
       |         |  seg 0 | seg 1 | ... | seg N_SUB-1                |                   |
       |         +----+-------+---------------+-------------------+                    |
       |         lfsr_out[0] lfsr_out[1] ... lfsr_out[N_SUB-1]                           v
       |              |       |               |                                    +--------+
       +---> MUX0 <---+   MUX1 <---+  ...  MUXn-1 <---+                            |        |
       |      |               |                 |                                  |  MISR  |--> SDO
       |  q-bit sub-chain 0  q-bit sub-chain 1 ... q-bit sub-chain N_SUB-1 --q_so--->|        |
       |                                                                            +--------+
       +--> select register (log2 N_SUB bits) --> MUX selects
  SE ----> scan controller (shift-cycle counter) --> operation of every part
```

The real chain of `M = P + N_SUB*Q` cells is cut into:

* one **p-bit sub-chain** (`vsc_lfsr_scan_chain`), built from `N_SUB`
  **LFSR/Scan segments** (`vsc_lfsr_scan_seg`). It is loaded serially like
  ordinary scan cells. It can also be rewired into `N_SUB` independent LFSRs;
* `N_SUB` **q-bit sub-chains** (`vsc_q_subchain`), each with a 2:1 multiplexer
  at its input. The multiplexer takes either SDI or the output of "its" LFSR
  segment;
* a **select register** (`vsc_select_reg`) of `log2(N_SUB)` bits. It picks the one
  q-bit sub-chain that is loaded straight from SDI;
* a **scan controller** (`vsc_scan_controller`) that counts shift cycles;
* a **MISR** (`vsc_misr`) whose feedback bit is the SDO pin.

All scan cells are the core's own flip-flops. With SE low they capture the
core's next state (`cap_d`). Their outputs (`scan_q`) drive the core's logic.
The core logic itself is not part of this RTL.

## One virtual vector, cycle by cycle

A virtual vector is `VLEN = SEL_W + P + Q` bits long, with
`SEL_W = log2(N_SUB)`. Its fields are shifted in this order:

| cycles (SE = 1)              | field        | what happens inside |
|------------------------------|--------------|---------------------|
| 0 .. SEL_W-1                 | select       | SDI shifts into the select register; all cells hold; the MISR steps with zero inputs |
| SEL_W .. SEL_W+P-1           | LFSR seeds   | the p-bit sub-chain shifts SDI in as one serial chain; its old contents go out into MISR input 0 |
| SEL_W+P .. VLEN-1            | direct data  | the p-bit sub-chain runs as N_SUB autonomous LFSRs; every q-bit sub-chain shifts: the selected one takes SDI, sub-chain i takes the last cell of LFSR i; their old contents go into MISR inputs 1..N_SUB |

After cycle `VLEN-1` every one of the `M` cells holds its test value. One
clock with SE low captures the response into all cells and restarts the
cycle count. If SE stays high instead, the count wraps and the next vector
begins at once. This is how a dummy vector is shifted at the end of a test
set to push the last response out of the MISR.

For the default sizes: 3 + 124 + 72 = 199 shift cycles load 124 + 8×72 = 700
cells.

## What the tester has to compute

The hardware does no solving; test generation does. Everything inside is linear over
GF(2), so each cell's value is a known XOR of seed bits or a direct SDI bit:

* **p-bit cells** end as the seed of their segment after `Q` LFSR steps.
* **q-bit sub-chain i (not selected)**: cell `j` holds the LFSR output of
  step `Q-1-j`, where the output of step `t` is the last cell of segment `i`
  after `t` steps. Step 0 outputs the last seed bit itself. The first `L_i`
  outputs are the seed bits, last cell first. After that, each output is the
  XOR of earlier ones, as the feedback polynomial gives.
* **The selected q-bit sub-chain**: cell `j` holds direct-data bit `Q-1-j`,
  so the bit shifted in last lands in cell 0.
* **Select value** `s`: the first select bit shifted in is its most
  significant bit. Sub-chain `s` is the direct one.

To apply a test cube (a vector with don't-cares), the generator solves one
small linear system per segment for the seed bits. The sub-chain whose system
has no solution is made the direct one. The LFSRs stop being free as soon as
two systems have no solution. The sub-chain order, the split of the p cells into
segments and the polynomials below fix these equations completely. Both
testbenches of the top contain a reference expansion that can be used as a
model, and `tb_vsc_test_cubes` contains a complete seed solver.

Cell numbering in `scan_q`/`cap_d`: bits `[P-1:0]` are the p-bit sub-chain.
Segment `i` starts at `vsc_pkg::seg_off(P, N_SUB, i)`. Cell 0 is where SDI
enters. After these come q-bit sub-chain `i` at bits `P + i*Q +: Q`. In every
run, the lower index is nearer the serial input.

## LFSR segments

The `P` cells are split as evenly as possible: the first `P mod N_SUB` segments
are one cell longer. The default gives 16,16,16,16,15,15,15,15. Each segment is
a Fibonacci LFSR. In LFSR mode every cell moves one place on. Cell 0 takes the
XOR of the tapped cells (`vsc_pkg::lfsr_taps(L)`), and the output is cell `L-1`.
The package holds a primitive polynomial for every length from 2 to 80. That
covers every configuration in the table below (the longest segment is 79
cells). A segment length outside that range is an elaboration error.

A useful rule when sizing: segments of about a quarter of `Q` tend to give the
least total test data. Much shorter LFSRs fail on more test cubes, which costs
extra vectors. Longer ones lengthen every vector.

## Response compaction and SDO

The MISR has `MISR_W` stages (default `N_SUB + 1`) and internal XOR feedback,
using the primitive polynomial of degree `MISR_W` (x^9 + x^5 + 1 at the default).
Input 0 is the p-bit sub-chain's output, and input `1+i` is q-bit sub-chain `i`.
An input is gated to 0 in the cycles its sub-chain does not shift. So every
response bit enters the MISR exactly once. The MISR steps on every shift cycle,
holds during capture and is cleared by reset. SDO is its last stage.

What this means for the tester:

* The expected SDO stream is a simulation of this MISR, not a copy of the
  captured cells.
* Reset the core once before the first vector, so that the MISR starts from
  zero.
* Follow the last real vector with one dummy vector to flush the MISR.
* A wider MISR lowers the chance of aliasing. Raise `MISR_W` (at least
  `N_SUB + 1`).

## Parameters (`vsc_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `P`       | 124     | cells in the p-bit LFSR/Scan sub-chain (sum of the LFSR lengths) |
| `Q`       | 72      | cells in each q-bit sub-chain |
| `N_SUB`   | 8       | number of q-bit sub-chains and LFSRs; a power of two, `P >= 2*N_SUB` |
| `MISR_W`  | `N_SUB+1` | MISR stages, 9..80 are available |

Derived: `SEL_W = log2(N_SUB)`, `M = P + N_SUB*Q`, virtual length `SEL_W + P + Q`.

The published evaluation of this scheme used five ISCAS 89 circuits, each with
4, 8 and 16 sub-chains. Solving `M = P + N_SUB*Q` and
`VLEN = log2(N_SUB) + P + Q` for their real and virtual chain lengths gives
whole-number sizes in every case:

| circuit | real cells | n=4: P/Q (virtual) | n=8: P/Q (virtual) | n=16: P/Q (virtual) |
|---------|-----------:|--------------------|--------------------|---------------------|
| s9234   | 247  | 83/41 (126)   | 103/18 (124)  | 119/8 (131)  |
| s13207  | 700  | 116/146 (264) | 124/72 (199)  | 156/34 (194) |
| s15850  | 611  | 107/126 (235) | 147/58 (208)  | 179/27 (210) |
| s38417  | 1664 | 312/338 (652) | 384/160 (547) | 496/73 (573) |
| s38584  | 1464 | 316/287 (605) | 304/145 (452) | 264/75 (343) |

In those experiments the virtual chain cut the test data by 39% to 70%
compared with ordinary scan using the same test generator. The virtual chain
needs more vectors, but they are shorter.

## Design choices beyond the published scheme

The scheme fixes the vector format, the LFSR-per-sub-chain structure, the
direct loading of one selected sub-chain, and MISR compaction onto SDO. These
details were chosen here:

* select width `log2(N_SUB)`, first bit = MSB; select value `i` picks sub-chain `i`;
* segment `i` feeds sub-chain `i`; as-even-as-possible split of `P`;
* Fibonacci LFSRs and a Galois MISR, with polynomials from the package table;
* MISR width `N_SUB + 1`; MISR inputs gated by phase; MISR and select register
  cleared by an asynchronous active-low reset; scan cells without reset;
* the q-bit sub-chains hold (rather than shift) during the select and seed
  phases, so that each unloads exactly its `Q` response bits;
* SE held high past one vector starts the next vector (wrap-around).

An assertion in `vsc_top` checks that the select register changes only in the
select phase.
Verilator reports `SYNCASYNCNET` for `rst_n`, because the reset is used both
asynchronously and in that assertion's `disable iff`. This is expected.

## Files

`rtl/`: `vsc_pkg` (types, polynomial table, segment split), `vsc_scan_controller`,
`vsc_select_reg`, `vsc_lfsr_scan_seg`, `vsc_lfsr_scan_chain`, `vsc_q_subchain`,
`vsc_misr`, `vsc_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`). Each prints
`TB_RESULT checks=N failures=F` and stops at a watchdog if it hangs. Two
testbenches cover the whole chain:

* `tb_vsc_top` runs the default 700-cell build end to end. It checks all
  cells and SDO against a cycle model on every clock, and checks each loaded
  vector against the closed-form expansion. It covers every select value,
  captures, back-to-back vectors, a flush vector and a reset in mid-vector.
* `tb_vsc_table1` builds all fifteen configurations of the table above
  (through the helper `vsc_cfg_check`) and runs vectors through each.
* `tb_vsc_test_cubes` does the test generator's job on random test cubes
  for the default build. It solves each segment's GF(2) system by Gaussian
  elimination. It routes the one unsolvable sub-chain to SDI, or rejects the
  cube when two or more are unsolvable. It then shifts the resulting
  virtual vector in and checks every specified cell. It is a worked example
  of the equations in "What the tester has to compute".

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
          --top-module tb_vsc_top rtl/vsc_pkg.sv tb/tb_vsc_top.sv
./obj_dir/Vtb_vsc_top
```

Replace `tb_vsc_top` with any other testbench name. `tb_vsc_top` takes a few
seconds. `tb_vsc_table1` takes about half a minute, mostly compile time. The
testbenches use two-state semantics and initialise everything they read.

## Limits

* The core's combinational logic is outside this RTL. The testbenches drive
  `cap_d` with a fixed nonlinear function of `scan_q`.
* Seed solving, test generation and static compaction under the LFSR
  constraints are software, not hardware, and are not included.
* One virtual chain replaces one real chain. A core with several real chains
  would instantiate `vsc_top` once per chain.
