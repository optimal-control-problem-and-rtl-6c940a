# PUMA: a mesh of programmable loop accelerators for medical imaging

Medical image reconstruction and processing (MRI reconstruction, CT segmentation,
Laplacian filtering, Gaussian convolution) spends nearly all its time in a handful of
floating-point loops with no dependences between iterations. GPUs run such loops fast
but spend most of their power on generality. PUMA takes the opposite approach. Each tile is built like an ASIC
for a modulo-scheduled loop: many function units (FUs), point-to-point operand paths,
and control that is just a counter. The tile is then made programmable in a few cheap
places:

- FUs do a few more operations than the loop strictly needs.
- Registers rotate.
- The schedule comes from a memory instead of a hard-wired state machine.
- Constants come from a register file.
- FUs talk over a ring.

Many such tiles sit on a mesh of routers that brings data in from outside.

This repository is synthesizable SystemVerilog for that system: the tile's loop
accelerator (PLA), the tile, the routers, the external interface, and the top level.
Every block has a self-checking testbench. The system tests run loops on all nine
tiles at once: two small kernels, and two image filters (a Laplacian and a Gaussian
smoothing filter) over images of several sizes.

## How a loop runs on one PLA

This is the heart of the design.

A loop is modulo scheduled offline:

- Every iteration follows the same schedule.
- A new iteration starts every **II** cycles (the initiation interval).
- The schedule is cut into **stages** of II cycles each.

In steady state, stage s of iteration k runs at the same time as stage s+1 of
iteration k-1, and so on. The II-cycle pattern that repeats is the **kernel**. Each
repetition of it is a *pass*. A loop of `trip` iterations with `S` stages takes
`trip + S - 1` passes, so it takes `(trip + S - 1) * II` cycles.

The hardware (`rtl/pla.sv`) executes exactly that:

1. **Control memory** (`ctrl_mem`). Row `s` holds the very long instruction word for
   kernel slot `s`. There is one 25-bit field per FU. The BR unit counts the slot
   modulo II and presents the row, so every FU gets its own field in the same cycle.
2. **Stage predication** (`fu_br`). Each field names the stage its operation belongs
   to. In pass `k`, an operation of stage `s` works on iteration `k - s`. It is
   enabled only if `0 <= k - s < trip`. The same kernel therefore also acts as the
   prologue (the first `S-1` passes, when later stages have nothing to do yet) and
   the epilogue (the last `S-1` passes). No separate code is needed for either.
3. **Rotating register files** (`rot_regfile`). Every FU writes only into its own
   8-entry RR. Register numbers are logical: `physical = logical + rrb (mod 8)`. The
   rotation base `rrb` is decremented at the end of every pass. A value written as
   `r` in stage `s` is read as `r + d` by an operation `d` stages later. Each
   iteration in flight thus has its own copy of every variable, with no moves and
   no fixed lifetimes.
4. **The ring** (`pla_ring`). There are six rings: two in opposite directions with a
   stop at every FU, two through the odd FUs and two through the even FUs. Together
   they let FU `i` read the RR of itself and of FUs `i±1` and `i±2`. A value moves
   one ring stop per cycle: the consumer reads it from the neighbour's RR and
   writes its result into its own. A value going farther is forwarded by `MOV`
   operations on the FUs in between. Any two FUs are at most `ceil(NUM_FU/4)` hops
   apart.

   Each operand can also come from one of three other sources:
   - the **CRF**, which holds live-in values such as base addresses and
     coefficients;
   - the **literal file**, which holds constants;
   - zero.

   After the two operand muxes, a **swap** bit can exchange A and B. This lets
   non-commutative operations take their operands from either mux.
5. **Latency.** Every FU takes one cycle. The result is in the FU's RR for the next
   cycle's reads. The local memory reads combinationally, so a load also takes one
   cycle.

### A worked kernel

The testbenches use `y[i] = a*x[i] - c` on the default ring `BR, FP, INT, FP, MEM,
FP, INT, FP` (FU0..FU7). The inputs are:

- the base of `x` in CRF[0];
- the base of `y` in CRF[1];
- `a` in CRF[2];
- `c` in literal file entry 0 (LIT[0]).

The single MEM unit must both load and store, so the loop runs at II = 2 in three
stages:

| time | stage/slot | FU | operation | operands (ring code, logical register) |
|---|---|---|---|---|
| t0 | 0/0 | FU0 BR  | ITER → i | – |
| t1 | 0/1 | FU2 INT | ADD → x address | i from FU0 (−2, r0), CRF[0] |
| t1 | 0/1 | FU6 INT | ADD → y address | i from FU0 (+2 around the ring, r0), CRF[1] |
| t2 | 1/0 | FU4 MEM | LD → x[i] | x address from FU2 (−2, r0+1: one stage later) |
| t3 | 1/1 | FU3 FP  | FMUL → a·x | x from FU4 (+1, r0), CRF[2] |
| t4 | 2/0 | FU5 FP  | FSUB, swapped → a·x − c | LIT[0], a·x from FU3 (−2, r0+1) |
| t5 | 2/1 | FU4 MEM | ST | y address from FU6 (+2, r0+2), result from FU5 (+1, r0) |

For 20 iterations this takes (20 + 3 − 1) · 2 = 44 cycles, which the tests check.
`tb/puma_prog_pkg.sv` holds this kernel and three more. The second, an integer kernel,
runs at II = 3 and carries a value one extra ring stop with a `MOV`. It also uses
the MEM unit as an adder in a slot where the unit does no memory access.
A third kernel is a 5-point Laplacian over an image stored row by row. It makes
five loads and one store per pixel, so it fills all six slots of the MEM unit at
II = 6. The neighbour offsets −1, +1, −W and +W come from the literal file, so one
program serves every image width. A fourth kernel smooths image rows with the
5-tap binomial filter (1, 4, 6, 4, 1)/16 on the same slot plan: five loads, a
store, three multiplies and four additions per pixel, also at II = 6.

### Control-word field (`puma_pkg::fu_ctrl_t`, 25 bits)

| bits | field | meaning |
|---|---|---|
| 24:21 | `op` | opcode (table below); `OP_NOP` = 0 |
| 20:18 | `stage` | schedule stage of this operation (0..7) |
| 17:15 | `dst` | logical RR register written |
| 14:12 | `a.sel` | 0 self, 1 FU i+1, 2 FU i−1, 3 FU i+2, 4 FU i−2, 5 CRF, 6 literal, 7 zero |
| 11:8 | `a.idx` | register index (RR uses the low 3 bits) |
| 7:5 / 4:1 | `b.sel` / `b.idx` | second operand, same coding |
| 0 | `swap` | exchange A and B after the muxes |

### Function units

| unit | operations | notes |
|---|---|---|
| BR (`fu_br`) | `ITER` (write iteration number k−s), `MOV` | also the loop controller: Start/Done, slot counter, pass counter, `rrb`, stage predicates |
| INT +/− (`fu_int`) | `ADD`, `SUB`, `ROTL`, `ROTR`, `MOV` | the adder is extended to add/subtract and the shifter to a left/right rotator; rotate amount is b[4:0] |
| FP */+/− (`fu_fp`) | `FMUL`, `FADD`, `FSUB`, `MOV` | IEEE single precision (`fp_mul`, `fp_add`) |
| MEM (`fu_mem`) | `LD` (mem[a+b]), `ST` (mem[a] ← b), `ADD`, `SUB`, `MOV` | its address adder doubles as an integer adder |

An FU ignores opcodes it does not implement: they write nothing.

Floating point is single precision with round to nearest, ties to even. Subnormal
inputs are read as zero and results too small to be normal are flushed to zero.
Overflow gives infinity. NaN inputs and invalid operations (inf − inf, 0 · inf)
give the quiet NaN `0x7FC00000`.

## Tiles, mesh and host port

A **tile** (`puma_tile`) is a PLA, a 1024-word local data memory (`local_mem`) and a
network interface (`tile_ni`). The memory has two ports: one for the MEM unit, and
one for data moving in and out over the network.

Everything reaches a tile as a single-flit packet (`puma_pkg::flit_t`, 64 bits):

| bits | 63:61 | 60:58 | 57:55 | 54:52 | 51:48 | 47:32 | 31:0 |
|---|---|---|---|---|---|---|---|
| field | dst_x | dst_y | src_x | src_y | cmd | addr | data |

| cmd | action at the tile |
|---|---|
| 0 `WR_CM` | control memory, `addr = {slot[15:8], fu[7:0]}`, data[24:0] = field |
| 1 `WR_CRF`, 2 `WR_LIT` | CRF / literal file entry `addr` |
| 3 `WR_LMEM` | local memory word `addr` |
| 4 `RD_LMEM` | answer `RSP_DATA` (7) with the word, sent to the packet's source |
| 5 `WR_CFG` | addr 0: II (1..16), 1: trip count, 2: number of stages (1..8) |
| 6 `START` | run the loop; at the end send `RSP_DONE` (8), with the loop's cycle count in `data`, to the packet's source |

While a loop runs, or while an answer waits to leave, the tile accepts no packets.
Packets for it wait in the mesh, so a program can never change under a running loop.

The **routers** (`mesh_router`) are simple:

- five ports (N, E, S, W, local);
- a 2-entry FIFO on each input;
- X-then-Y dimension-order routing, which cannot deadlock on a mesh (x grows east,
  y grows south);
- round-robin arbitration on each output;
- valid/ready flow control;
- one hop per cycle when nothing is blocked.

The **external interface** (`ext_if`) sits south of router (0, ROWS−1) and has
coordinate (0, ROWS). It does three things:

- It queues host requests and stamps them with its own coordinate as the source.
- It queues everything the tiles send back.
- It keeps `done_mask`, one bit per tile, with index `y*COLS + x`. A tile's bit is
  cleared when the host starts that tile and set when the tile reports done.

A host program is therefore a sequence of packets:

1. Write the kernel fields, the CRF and literal entries, and II, trip count and
   stage count into each tile.
2. Write the input data.
3. Send `START` to each tile.
4. Wait for `done_mask`.
5. Read the results.

`puma_top` (default 3 × 3 tiles) exposes exactly this: a request port, a response
port, `done_mask` and `tile_busy`.

## Parameters

| parameter | default | where it is set | origin |
|---|---|---|---|
| `ROWS`, `COLS` | 3, 3 | `puma_top` | 9 tiles: the size of the MRI.FH system, chosen so that the tiles together just use the assumed 142 GB/s of memory bandwidth (⌈142/16.2⌉ = 9). The 3 × 3 arrangement is this design's choice. |
| `NUM_FU`, `FU_TYPE` | 8, BR FP INT FP MEM FP INT FP | `puma_top`, `pla` | this design's choice; it needs exactly one BR and one MEM unit, and an even `NUM_FU` |
| `RR_DEPTH` | 8 | `puma_pkg` | this design's choice (a power of two) |
| CRF and literal-file depth | 16 | `puma_pkg` (`SRC_IDX_W`) | this design's choice |
| `CM_DEPTH` (largest II) | 16 | `puma_pkg` | this design's choice |
| `STAGE_W`, `TRIP_W` | 3, 16 | `puma_pkg` | this design's choice |
| `LMEM_DEPTH` | 1024 words | `puma_pkg`, `LMEM_DEPTH_P` | this design's choice |
| data width | 32 | `puma_pkg` | this design's choice: one single-precision operand |

## What follows the architecture and what does not

**Taken from the published architecture:**

- the tiled organisation, with one PLA and its memories per tile, on a router mesh
  with an external interface;
- the PLA template: control memory indexed by a modulo counter over II, CRF,
  literal file, FUs each writing a rotating register file, and a BR unit with
  Start/Done;
- the FU generalisations: add/subtract, left/right rotate, identity on every FU,
  and a load/store unit that doubles as an integer adder;
- operand swapping;
- the six-ring network, with reach ±1 and ±2 and one cycle per hop.

**Chosen here:**

- all sizes and encodings listed above;
- one-cycle latency for every unit;
- stage predication, used to run the prologue and epilogue from the kernel;
- the `ITER` operation;
- the floating-point corner-case behaviour;
- the packet protocol, the network interface, the router micro-architecture and the
  host port.

**Not included:**

- The host CPU, off-chip memory and disk. They are outside the chip, behind the
  host ports.
- The integer program that picks the FU order on the ring. It runs at design time;
  its result would be the `FU_TYPE` parameter.
- The loop compiler. The kernels in the tests are scheduled by hand.
- The single-operand bus of the earlier, non-ring PLA.
- Per-benchmark FU mixes.
- Special functions such as sine and cosine, which MRI reconstruction loops
  typically need. No FU computes them; a loop must expand them into additions and
  multiplications.

**How far it can be trusted:**

- Every block passes its own randomised or directed testbench.
- Each testbench has been shown to fail on a deliberately broken copy of its block.
- The system test checks results and exact cycle counts for nine concurrent loops.
- No timing, area or power work has been done. The purely combinational
  single-cycle floating-point units would not meet 450 MHz as written.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Verilator 5 is enough. From the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/puma_pkg.sv tb/fp_ref_pkg.sv tb/puma_prog_pkg.sv tb/tb_puma_top.sv \
    --top-module tb_puma_top
./obj_dir/Vtb_puma_top
```

Replace `tb_puma_top` with any other testbench:

| testbench | what it shows |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | FP results against double-precision reference arithmetic, rounded to single precision in the testbench (`tb/fp_ref_pkg.sv`) |
| `tb_rot_regfile`, `tb_pla_regfile`, `tb_ctrl_mem`, `tb_local_mem` | the storage blocks against models |
| `tb_fu_int`, `tb_fu_fp`, `tb_fu_mem` | the FUs |
| `tb_fu_br` | slot sequence, stage predicates, rotation and `(trip + S − 1)·II` timing for random loops |
| `tb_pla_ring` | ring reach, sources and swap |
| `tb_pla` | both kernels on one PLA, with results, cycle counts and no stray prologue or epilogue stores |
| `tb_tile_ni`, `tb_puma_tile`, `tb_mesh_router`, `tb_ext_if` | packets, flow control and routing |
| `tb_puma_top` | the full 3 × 3 system at its default parameters |
| `tb_puma_laplace` | the Laplacian filter on nine images of different sizes, one per tile, at the default parameters |
| `tb_puma_gauss` | the 5-tap smoothing filter, likewise on nine images of different sizes |

`tb_puma_top` also counts how often each mechanism occurred and fails if any never
did. The mechanisms are: ring transfers at distance 1 and 2, moves, swaps,
predicated-off slots, rotations, FP and rotate operations, loads, stores, router
contention, mesh stalls, host backpressure, done reports and reads.

To write a new kernel:

1. Schedule it by hand against the ring reach: a consumer at most two positions from
   its producer, otherwise a `MOV` in between.
2. Add `d` to a register index for each stage `d` between the write and the read.
3. Keep each FU to one operation per slot.
4. Load it with `WR_CM` packets, one per (slot, FU).
