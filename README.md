# CMA-SOTB: a clock-free PE array with a data-management controller

This is synthesizable SystemVerilog for the CMA-SOTB accelerator, a member of the
Cool Mega Array (CMA) family of coarse-grained reconfigurable accelerators, as built
on a 65 nm silicon-on-thin-BOX (SOTB) test chip. The whole design is built around
one idea: spend energy only on computation.

* The **PE array** is 8x8 processing elements (PEs) of pure combinational logic.
  No register sits between PEs and no clock reaches them. A dataflow graph is mapped
  onto the array once, through static configuration registers, and then stays
  fixed. There is no cycle-by-cycle reconfiguration.
* Registers exist only at the edges of the array. A **launch register** (LR)
  presents a full input vector at once. A **gather register** (GR) samples the
  outputs after a programmed settling time.
* A small **controller** streams vectors from a 256-word **data memory** (DMEM)
  into the array and writes the results back. It fetches the next vector while
  the array is still working on the current one.

So a job runs at the speed of whichever side is slower: the array's combinational
delay, or the controller's memory traffic. On the chip the two sides sit in
separate body-bias wells. Each side's threshold voltage can therefore be tuned on
its own. The faster side is given reverse bias to save leakage, and the slower side
forward bias to gain speed. The bias is analog and is not in the RTL. What the RTL
keeps is the split into two cores and a controller whose timing exposes the
balance: every round lasts `max(memory words, array delay)`.

## Block structure

```
                 host port (DMEM / PE config / row constants / controller regs)
                   |                 |                                |
   +---------------v-----------------v------------+   +---------------v---------------+
   |  PE array core                               |   |  controller core               |
   |  cma_cfg_regs: 64 x pe_cfg_t, 8 constants    |   |  cma_uctrl: vector sequencer   |
   |  cma_pe_array: 8x8 cma_pe                    |   |  cma_dmem : 256 x 24 registers |
   |     cma_pe = SEL_A/SEL_B + cma_alu           |   |  cma_data_regs: FR, LR, GR     |
   |            + 2 x cma_se (channel A, B)       |   |                                |
   |   south edge <---------- LR (16 x 24) -------+---+                                |
   |   north edge ----------> GR (16 x 24) -------+---+                                |
   +----------------------------------------------+   +--------------------------------+
```

`cma_sotb_top` instantiates both cores. `cma_pkg` holds the sizes, the
configuration encodings and the controller register map.

## Data flow through one job (the part to understand first)

A job processes `COUNT` vectors. The controller works in **rounds**. Round `r`:

1. **Launch** (1 cycle). LR loads vector `r` from FR, all entries in the same
   edge. Entries marked in `FB_MASK` load from GR instead, which holds result
   `r-1`. These are the feedback lines, used for running sums and other
   recurrences.
2. **Run** (`max(fetch words, store words, DELAY, 1)` cycles). Three things happen
   at the same time:
   * the fetch engine reads vector `r+1` from DMEM into FR, one word per cycle;
   * the store engine writes result `r-1` from GR to DMEM, one word per cycle;
   * the array settles on vector `r` for at least `DELAY` cycles.

   At the end of the last run cycle GR samples the array outputs. That is result `r`.

A prologue of `max(fetch words, 1)` cycles fetches vector 0. A final round
`r = COUNT` only stores the last result. Total length from `start` to the cycle
before `done`:

```
max(nin,1) + sum_{r=0..COUNT} ( 1 + max( (r+1<COUNT ? nin : 0),
                                         (r>=1      ? nout: 0),
                                         (r<COUNT   ? DELAY: 0), 1 ) )
```

where `nin = popcount(IN_MASK)` and `nout = popcount(OUT_MASK)`. A round is
*memory-bound* when `nin` or `nout` exceeds `DELAY`, and *array-bound* otherwise.
This maps straight onto the chip's trade-off. In silicon, `DELAY` stands for the
array's real propagation time, in clock cycles, at the chosen bias. The array is a
multicycle path of `DELAY` cycles from LR to GR. A netlist must be constrained that
way.

### Address mapping

Entry `j` of FR is loaded, if `IN_MASK[j]` is set, from
`IN_BASE + r*IN_STRIDE + IN_OFF[j]`. Entry `j` of GR is stored, if `OUT_MASK[j]`
is set, to `OUT_BASE + r*OUT_STRIDE + OUT_OFF[j]`. Addresses wrap at 256. Entries
are served lowest first.

## The PE array

### Geometry and edges

Rows are numbered 0 (south) to 7, columns 0 (west) to 7. Two channels, A and B,
run through every PE.

* LR entry `2c` drives channel A and `2c+1` drives channel B, both into the south
  side of PE(0,c).
* The channels leaving the north side of PE(7,c) feed GR entries `2c` (A) and
  `2c+1` (B).
* Channels entering from beyond the west and east edges are zero.

Each PE's ALU result also goes over **direct links** to the PE east of it and the
PE north-east of it. Links that would leave the array are dropped.

### Inside a PE (`cma_pe`)

* **SEL_A / SEL_B** pick the two ALU operands from: zero, south A, south B,
  west A, west B, the direct link from the west PE, the direct link from the
  south-west PE, or the row constant.
* **ALU** (`cma_alu`): see the operation table below.
* **SE_A / SE_B** (`cma_se`), one per channel, route the channel onward:
  * north output: one of south, west, east, ALU;
  * east output: one of 0, south, west, ALU;
  * west output: one of 0, south, east, ALU.

### Why no configuration can create a loop

The array has no registers, so a loop would be a combinational ring. The operand
selectors only see signals that arrive from the south or the west. A horizontal
output can never take the input coming from the direction it is heading
(no U-turns). So the array is a directed acyclic graph for every configuration:

* rows are ordered south to north;
* inside a row, ALUs and eastbound channels are ordered west to east;
* westbound channels are ordered east to west.

`tb_cma_pe_array` uses this order to evaluate its reference model. As a result,
random configurations are always legal test cases.

### Configuration word (`pe_cfg_t`, 22 bits, written as `wdata[21:0]`)

| bits  | field    | meaning |
|-------|----------|---------|
| 21:18 | op       | ALU operation |
| 17:15 | sel_a    | operand A source |
| 14:12 | sel_b    | operand B source |
| 11:10 | se_a.n   | channel A north: 0 S, 1 W, 2 E, 3 ALU |
| 9:8   | se_a.e   | channel A east: 0 zero, 1 S, 2 W, 3 ALU |
| 7:6   | se_a.w   | channel A west: 0 zero, 1 S, 2 E, 3 ALU |
| 5:0   | se_b     | same three fields for channel B |

Operand sources: 0 zero, 1 south A, 2 south B, 3 west A, 4 west B,
5 direct-west, 6 direct-south-west, 7 row constant.

ALU operations: 0 pass A, 1 add, 2 sub, 3 and, 4 or, 5 xor, 6 shl, 7 shr
(logical), 8 sra, 9 unsigned a<b, 10 a==b, 11 unsigned min, 12 unsigned max,
13-15 give zero. Shift amounts come from `b[4:0]`. There is no multiplier.

An all-zero word makes a PE pass both south channels north. So after reset the
array copies LR to GR unchanged.

## Host interface (`cma_sotb_top`)

| port | use |
|------|-----|
| `host_we`, `host_space`, `host_addr`, `host_wdata` | one write per cycle. Space 0: DMEM word (refused while `busy`). Space 1: PE configuration, `addr = row*8 + col`. Space 2: row constant, `addr = row`. Space 3: controller register (refused while `busy`). |
| `host_raddr` / `host_rdata` | combinational DMEM read |
| `start`, `busy`, `done` | `start` while idle begins a job; `busy` stays high until it ends; `done` pulses one cycle after the last round; `COUNT = 0` pulses `done` at once |

Controller registers (word addresses): 0 `IN_BASE`, 1 `IN_STRIDE`, 2 `OUT_BASE`,
3 `OUT_STRIDE`, 4 `COUNT` (16 bit), 5 `DELAY` (8 bit, 0 counts as 1),
6 `IN_MASK`, 7 `OUT_MASK`, 8 `FB_MASK` (16 bit each), 16-31 `IN_OFF[0..15]`,
32-47 `OUT_OFF[0..15]`.

Reset is asynchronous and active low. It clears the configuration (all PEs then
pass data through), the constants, FR/LR/GR and the controller. It does not clear
DMEM.

## Example mappings (used by the end-to-end testbench)

* **alpha**: an 8-bit alpha blend with weight 3/4, `out = (3a + b) >> 2`. It takes
  4 PEs per pixel, stacked in one column:
  1. `a+b`
  2. `a<<1`
  3. `2a + (a+b)`
  4. `>>2`

  Four pixels per vector gives 16 PEs, 8 input words and 4 output words. With
  `DELAY=2`, memory traffic limits every round.
* **af**: the same blend on 24-bit words that each hold three 8-bit pixels,
  computed per byte without carries between bytes as
  `((a>>1)&7F7F7F) + ((a>>2)&3F3F3F) + ((b>>2)&3F3F3F)`. It takes 8 PEs per word,
  one full column, with row constants 2, 3F3F3F, 1, 7F7F7F, -, 1, 3F3F3F, -.
  Six words per vector gives 48 PEs. With `DELAY=16`, the array limits every
  round.
* **running sum**: `FB_MASK[0]` feeds the previous result back into LR entry 0.
  The sum is routed over a south-west direct link, then west and east along
  channel A, to two outputs.

The PE counts, 16 for alpha and 48 for af, match the workloads the chip was
measured with. The exact mappings and the blend weight are this design's own.

## What follows the chip and what is this design's choice

Taken from the chip:

* 8x8 combinational PEs;
* 24-bit words;
* a 256-word data memory built from flip-flops;
* registers only at the array's inputs and outputs;
* two-channel island-style routing with switching elements that forward data
  arriving from the south, west and east plus the ALU result;
* direct links to the east and north-east neighbours;
* launch, fetch and gather registers with feedback lines;
* per-row constant registers, and configuration loaded from outside;
* a controller that moves data with mapping registers and vector transfers,
  pipelined with the array;
* separate PE-array and controller cores.

This design's own choices:

* the ALU operation set and every encoding;
* the operand-source list;
* which array edges connect to LR and GR;
* one constant per row;
* FR used as a staging buffer, and the per-entry feedback rule;
* the host port;
* the DMEM ports (one write, two combinational reads).

The chip's controller is a small microcontroller whose instruction set is not
published. Here it is a fixed-function vector sequencer that does the same data
movement. Its round timing is defined here, not measured.

Not modelled:

* Body-bias generation and the well domains, VBNC/VBPC for the array and
  VBNM/VBPM for the controller. These are analog supplies from off chip.
* Wave pipelining, that is, launching a new vector before the previous one has
  left the array, and supply-voltage scaling of the array. Both are electrical
  techniques. Here the array delay is simply a programmable number of cycles,
  and a vector must be gathered before the next launch.
* The configuration and constant registers run on the main clock with a write
  enable. On the chip they sit in a clock domain that runs only at
  initialisation. The behaviour is the same as long as they are not written
  during a job.
* Pads and process.

## Files

| file | contents |
|------|----------|
| `rtl/cma_pkg.sv` | sizes, `pe_cfg_t`, ALU/route/source enums, register map |
| `rtl/cma_alu.sv`, `rtl/cma_se.sv`, `rtl/cma_pe.sv` | one PE |
| `rtl/cma_pe_array.sv` | 8x8 array and its wiring |
| `rtl/cma_cfg_regs.sv` | configuration and constant registers |
| `rtl/cma_data_regs.sv` | FR, LR, GR |
| `rtl/cma_dmem.sv` | 256 x 24 register memory |
| `rtl/cma_uctrl.sv` | data-management controller |
| `rtl/cma_sotb_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_cma_workloads.sv` | both image workloads streamed tile by tile |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cma_pkg.sv tb/tb_cma_sotb_top.sv --top-module tb_cma_sotb_top
./obj_dir/Vtb_cma_sotb_top
```

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/cma_pkg.sv rtl/<module>.sv`.

## Verification status

* **Unit tests.** Each module has a self-checking testbench against an
  independent reference model. The PE array model evaluates the array in the
  dataflow order described above, using random configurations. The controller
  test checks:
  * every memory address and entry index;
  * the pipelining order: fetch before launch, gather before store, gather
    before the next launch;
  * the minimum array delay;
  * the exact job length;
  * that both memory-bound and array-bound rounds occur.
* **End-to-end test.** `tb_cma_sotb_top` runs at the default size. It runs the
  three example jobs, checks every result word and every job length, and
  requires each of these to have happened at least once:
  * memory-bound rounds;
  * array-bound rounds;
  * fetches overlapped with computation;
  * feedback launches;
  * host memory writes refused while busy.
* **Workload test.** `tb_cma_workloads` streams whole images through the
  default-size design:
  * alpha: two 32x32 8-bit images, in 16 tiles of 64 pixels;
  * af: two images of 960 packed words, in 16 tiles of 60 words.

  It checks every result and every job length, and prints the cycles spent in
  jobs per image.
* **Fault tests.** For each module, a deliberately broken copy makes its
  testbench fail.
* **Tools.** All modules lint cleanly under Verilator and elaborate in Yosys with
  the slang front end. The remaining lint warnings are unused package constants
  and unused edge outputs of the array.
* **Not verified.** Timing, power and the electrical behaviour the chip was
  built to study.
