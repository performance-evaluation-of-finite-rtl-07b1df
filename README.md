# Systolic computational-memory array processor for FDTD

Difference-scheme computations update every grid point from a few of its
neighbours. The 2D FDTD (finite-difference time-domain) method is one: each
time step computes Ex, Ey and Hz. Every update has the same form:

    q_new(i,j) = c0 + c1*q(i,j) + c2*q(i+1,j) + c3*q(i-1,j) + c4*q(i,j+1) + c5*q(i,j-1)

That is a short sum of products. The grid points are independent within a
phase, and each one needs data only from its neighbours.

This design is a 2D systolic array of programmable processing elements
(PEs). It implements the systolic computational-memory array processor that
was published for a single Stratix II FPGA. The grid is cut into one block
per PE, and the PE keeps its whole block in its own local memory, so the
array never streams grid data from off-chip. Two more ideas:

- **Per-PE datapath.** Each PE has a single-precision multiply-accumulate
  (MAC) unit built to sum products.
- **Neighbour links.** Each PE has FIFOs to its four neighbours, which carry
  the values on the edges of its block.

Nine shared sequencers drive the PEs in SIMD fashion, one for each kind of
block: interior, four borders and four corners. Each kind can therefore run
its own boundary code.

Default configuration, as in the published prototype:

| item | value |
|---|---|
| PEs | 12 x 8 = 96 (columns x rows) |
| local memory per PE | 256 x 32-bit words (1 KByte) |
| FIFOs per PE | 4, each 32 entries of 32 bits |
| sequencers | 9, each with 8192 x 64-bit words (64 KByte) |
| pipeline | 8 stages: MS, MR, EX1-EX5, WB |
| peak rate | 2 flop/cycle/PE (at 106 MHz: 0.212 GFlop/s per PE, 20.4 GFlop/s total) |

## Hierarchy

```
array_processor            top: host bus in, idle out
├── array_controller       idle/computing mode, host address map, run counters
├── sequencer  x9          sequence memory, program counter, loop stack
└── systolic_array         12 x 8 mesh, group wiring, array-wide stall
    └── pe  x96            one processing element
        ├── comm_fifo x4   N-, S-, W-, E-FIFO
        ├── local_mem      256 x 32, 2 read + 1 write port
        └── fp_mac         5-stage floating-point MAC
sca_pkg                    shared types: microoperation, sequence word, groups
```

The top's host bus (`host_we`, `host_addr[21:0]`, `host_wdata`,
`host_rdata`) is what the board's PCI controller drives. That controller is
not part of this RTL.

## The PE pipeline: timing is the programmer's job

This part matters most. The PE has no instruction decoder, no hazard
detection and no flow control on its FIFOs. The microprogram must respect
the pipeline timing exactly.

| stage | what happens |
|---|---|
| MS | the sequencer presents the 41-bit microoperation; the PE captures it in MS/MR |
| MR | read `M[ra1]`, `M[ra2]`; pop a FIFO if selected; `a = asrc ? (vsrc ? S : N) : M[ra1]`, `b = bsrc ? (hsrc ? E : W) : M[ra2]` |
| EX1 | multiply mantissas, add exponents |
| EX2 | normalise the product; `v2 = acc_sel ? (result leaving EX5 now) : 0` |
| EX3 | apply `sign`, order the operands by magnitude, align |
| EX4 | add or subtract |
| EX5 | normalise and round |
| WB | write `M[waddr]` if `mem_w`; push the result to the neighbours selected by `nffw/sffw/wffw/effw` |

Timing rules that follow from the table:

- **Write-back.** An operation issued in cycle t writes its result at the
  end of cycle t+7. An operation that reads that word must be issued at
  t+7 or later. The same holds for a neighbour reading the FIFO entry.
- **Accumulation distance is three.** The EX5 result goes back to the EX2
  multiplexer in the same cycle, so with `acc_sel = 1` an operation adds its
  product to the result of the operation issued three cycles before it.
  - A sum of k products is a chain of k operations, three cycles apart.
  - Three independent chains interleaved keep the multiplier busy every
    cycle. The FDTD program below does this.
  - An operation with `acc_sel = 1` picks up whatever was issued three
    cycles earlier, including a nop. Nops placed before an accumulating
    operation should multiply two zero words (the test programs use
    `ra1 = ra2 = address of 0.0`).
- **FIFO reads.** A FIFO is read by naming it as an operand: `asrc=1` for
  the N/S-FIFO, `bsrc=1` for the W/E-FIFO. Reading an empty FIFO or pushing
  into a full one is a program error. An assertion fires in simulation and
  a sticky `fifo_err` is reported in the status word.
- **FIFO directions.** The N-FIFO holds data from the north neighbour
  (row + 1), and likewise for S, W and E. So `nffw` pushes into the
  **south** neighbour's N-FIFO, and `wffw` pushes into the **east**
  neighbour's W-FIFO. Pushes towards a missing neighbour at the array edge
  are dropped.

The MAC forms `v2 + a*b` if `sign = 1`, or `v2 - a*b` if `sign = 0`. The
instruction set maps onto these bits:

| instruction | sign | acc_sel | meaning |
|---|---|---|---|
| mulp | 1 | 0 | `0 + a*b` |
| mulm | 0 | 0 | `0 - a*b` |
| accp | 1 | 1 | `previous + a*b` (previous = three cycles back) |
| (subtracting accumulate) | 0 | 1 | `previous - a*b` |

## Microoperation and sequence word

`sca_pkg::uop_t` is 41 bits, MSB first:

| bits | field | meaning |
|---|---|---|
| 40:33 | ra1 | read address 1 (src1) |
| 32:25 | ra2 | read address 2 (src2) |
| 24 | vsrc | vertical FIFO: 0 N, 1 S |
| 23 | hsrc | horizontal FIFO: 0 W, 1 E |
| 22 | asrc | a: 0 `M[ra1]`, 1 vertical FIFO |
| 21 | bsrc | b: 0 `M[ra2]`, 1 horizontal FIFO |
| 20 / 19 | vchg / hchg | value loaded into the v-/h-active register |
| 18 / 17 | vdep / hdep | wait for the v-/h-active register |
| 16 / 15 | vprp / hprp | signal the north / east neighbour |
| 14 | sign | 1 add, 0 subtract the product |
| 13 | acc_sel | accumulate onto the forwarded result |
| 12 | mem_w | write the result to `M[waddr]` (dst2) |
| 11:4 | waddr | write address |
| 3:0 | nffw, sffw, wffw, effw | FIFO pushes (dst1) |

The all-zero word is a nop. A sequence-memory word (`seq_word_t`) is 64
bits:

| bits | field |
|---|---|
| 63:56 | unused |
| 55:54 | `ctl`: 0 none, 1 lset, 2 bne, 3 halt |
| 53:41 | `addr` |
| 40:0 | `uop` |

The control words work as follows:

- **lset Num, Addr** pushes a loop level with counter = Num and jump
  register = Addr. Num is bits 15:0 of the word. It issues a nop.
- **bne**: if the innermost counter is not zero, decrement it and jump to
  its jump register. Otherwise pop the level and fall through.
  - A body closed by bne runs Num+1 times.
  - A bne word with a non-nop `uop` is **accpbne**: the operation issues in
    the same cycle as the branch.
- **halt** stops the sequencer and issues a nop.

The loop stack is two levels deep (`LOOP_DEPTH`). A jump costs no cycle.

## Groups, active registers and the stall

Each PE takes its microoperation from the sequencer of its group, set by its
place in the array (`sca_pkg::group_of`). Group numbers are 0 upper, 1
lower, 2 left, 3 right, 4 upper-left, 5 upper-right, 6 lower-left,
7 lower-right, 8 internal. Row 0 is the lower (south) edge.

Each PE has a v-active and an h-active register:

- The v-active register loads `vchg` whenever the south neighbour asserts
  `vprp`.
- The h-active register loads `hchg` whenever the west neighbour asserts
  `hprp`.
- An operation in MS/MR with `vdep` (or `hdep`) set requests a stall while
  the matching register is clear.

The requests of all PEs are ORed. The result freezes every stage of every PE
and all nine sequencers. Freezing everything, with no bubbles, keeps
three-cycle accumulation chains intact across a stall. The original design
names these registers and signals but does not spell out the rule, so the
condition above is this implementation's reading.

## Host interface and modes

In **idle mode** all memories are in one word-addressed space:

| `host_addr[21:20]` | region | fields |
|---|---|---|
| 0 | local memory | `[14:8]` PE index y*12+x, `[7:0]` word |
| 1 | sequence memory | `[17:14]` group, `[13:1]` word, `[0]` 0 = low / 1 = high half |
| 2 | control | see below |

Control registers:

| offset | access | content |
|---|---|---|
| 0 | write | bit 0 = start |
| 0 | read | `{fifo_err, all halted, computing, idle}` |
| 1 | read | cycles of the last run |
| 2 | read | stall cycles |
| 3 | read | useful multiplications |
| 4 | read | accumulations |

Reads return data one cycle after the address. Memory writes are ignored
outside idle mode.

Writing start enters **computing mode**. When all nine sequencers have
halted, the controller waits 8 unstalled cycles for the pipelines to drain
and returns to idle.

## Floating point

The numbers are IEEE-754 single precision, with these simplifications:

- The product goes unrounded (48-bit mantissa) into the adder. Rounding
  happens once, in EX5, to nearest with ties away from zero.
- Denormal inputs and results are zero.
- Infinity and NaN get no special treatment; overflow gives infinity.
- Alignment drops the shifted-out bits (no sticky bit).

Results can therefore differ from a strict IEEE CPU in the last bit. The
original design also leaves out denormals and most rounding modes.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/sca_pkg.sv \
    tb/tb_array_processor.sv rtl/array_processor.sv --top-module tb_array_processor
./obj_dir/Vtb_array_processor
```

Substitute the testbench and its block for the others.

| testbench | what it shows |
|---|---|
| `tb_fp_mac` | random operands against a double-precision model; forwarding distance 3; 5-cycle latency; stall hold |
| `tb_local_mem`, `tb_comm_fifo` | the memory's two read ports and write port; the FIFO against a queue model, including full/empty |
| `tb_sequencer` | nested loops, accpbne and halt, with random stalls; the issued stream checked cycle by cycle (24 issue cycles) |
| `tb_pe` | mulp/mulm/accp with FIFO operands; 7-cycle issue-to-WB latency; an h- and a v-active stall of 5 cycles each |
| `tb_systolic_array` | 4 x 3 mesh: neighbour sum through the FIFOs with per-group programs; a one-cycle handshake stall |
| `tb_array_controller` | address decode, refused writes, start, drain and counters |
| `tb_array_processor` | full size, host bus only: a 5-point stencil in two nested loops on all 96 PEs. It checks the results, the exact cycle count, the stall and the utilisation counters, and counts each mechanism (mode switch, stall, inner/outer branch, accpbne, FIFO transfer, forwarding, halt) |
| `tb_fdtd` | the FDTD workload below; takes about 1.5 minutes |

### FDTD workload

`tb_fdtd` writes a real FDTD microprogram and runs it at full size. It runs
Ex/Ey/Hz on 72 x 72 and 48 x 48 grids for 1600 steps. The source is a
square wave on Hz with amplitude 1 and period 80 steps. The constants are
dx = 5 mm, dt = 1/(80 * 2.45 GHz), the vacuum eps and mu, and sigma = 0.

The grid edge uses Mur's first-order absorbing boundary on Hz:

    Hz(edge) = Hz_old(inner) + k*(Hz(inner) - Hz_old(edge)),   k = (v*dt - dx)/(v*dt + dx)

Here "inner" is the edge point's neighbour one step into the grid. The four
grid corners keep the plain update.

How the program is built:

- **Chains.** Each E update is a chain of three products and each H update
  a chain of five. Three chains are interleaved.
- **Block edges.** The last operation of an edge chain pushes its result to
  the neighbour. The neighbour reads the FIFO directly as an operand.
- **Borders.** Border groups read 0.0 where a neighbour is missing.
- **Source.** Only the lower-left group carries the source point.
- **Mur, split in two.** `Hz_old(inner) - k*Hz_old(edge)` is a two-product
  chain scheduled with the E phase. After the H phase a second chain adds
  `k*Hz(inner)`.
- **Edge points.** An edge point's regular H chain still runs, because it
  pops FIFO operands, but its result goes to a scratch word.
- **FIFO order.** An edge point's value is final only after the Mur step,
  so it must be the last one sent in its direction. To arrange that, the
  left column of PEs walks i downwards and the bottom row walks j downwards.
  Both ends of every link use the same order.
- **Equal steps.** All nine groups are padded to the same step length, so
  no PE reads a FIFO before its neighbour has written it.
- **Loops.** Two nested loops (20 periods x 2 x 40 steps) cover the 1600
  steps.

Results against a double-precision reference:

| grid | cycles / step | total cycles | multiplier use | adder use | RMS error / RMS field |
|---|---|---|---|---|---|
| 72 x 72 | 675 | 1 080 092 | 89.7 % | 64.9 % | about 2.3e-6 (E), 8e-7 (Hz) |
| 48 x 48 | 321 | 513 687 | 84.6 % | 61.0 % | about 2.5e-6 (E), 9e-7 (Hz) |

For comparison, the published prototype reports 594 cycles per step and
950 503 cycles for the 72 x 72 run, with 88.2 % multiplier and 70.4 % adder
use. Here the boundary groups set the step length: the lower-left corner
block has 13 edge points, about 67 extra cycles per step. The interior
block alone needs 608 cycles. A tighter schedule would overlap the Mur
chains with the H phase.

Grids above 72 x 72 do not fit: three fields of a 96 x 96 grid need 288
words per PE, against 256.

## Where this RTL departs from, or fills in, the original design

- **Field encodings.** The microoperation field order, the 64-bit sequence
  word, lset's Num field and the host address map are this
  implementation's.
  - The original gives 41 bits for the microoperation. Here those are two
    8-bit addresses, ten 1-bit controls and the 15 bits that travel down
    the pipeline.
- **Loop stack.** The loop stack is two levels deep and pops on fall
  through. The original uses two nested loops but does not give a depth.
- **Stall.** The active-register stall rule and the array-wide freeze are
  this implementation's reading (see above).
- **FIFO errors.** FIFOs do not stall on empty or full. Misuse is reported,
  not handled.
- **MAC stages.** The stage roles and the stage-5-to-stage-2 forwarding are
  the original's. The sign enters at EX3, where the operands are prepared.
  The addition or subtraction it selects happens in EX4. The internal
  widths and the normaliser are this implementation's.
- **Rounding.** The MAC rounds as described under Floating point; the
  original does not specify rounding.
- **Memories.** The local and sequence memories are plain arrays with
  asynchronous read. On the FPGA they were M4K and M-RAM blocks.
- **Outside this RTL.** The PCI controller, the board (DDR2, configuration
  FPGA, second FPGA) and the host computer.
- **FDTD schedule.** The FDTD program, its memory layout and its
  treatment of the four grid corners are this implementation's. At
  72 x 72 it takes 81 cycles per step (14 %) more than the published one.

Parameters with the published values as defaults: `sca_pkg::NX`, `NY`,
`MEM_WORDS`, `FIFO_DEPTH`, `SEQ_WORDS`, and the matching module parameters
(`NX_P`, `NY_P`, ...). The array and memory sizes can be changed for
simulation. The host map assumes at most 128 PEs and 256-word memories.
