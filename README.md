# A small instruction-set processor for adaptive motion estimation

Block-matching motion estimation is the most expensive part of an H.264/AVC
encoder. Fast adaptive searches keep the cost down: they test a few predicted
motion vectors, stop early when a match is good enough, and otherwise walk a
cheap search pattern. Such searches are full of data-dependent decisions, so a
fixed-function search engine handles them poorly. This design is instead a tiny
application-specific processor (ASIP). It has eight 16-bit instructions, sixteen
16-bit general registers and two dedicated units:

* an **SAD unit (SADU)** that adds up the absolute differences of 16 pixel pairs
  in one instruction, `SAD16`;
* an **address generation unit (AGU)** that copies the current macroblock (MB)
  and its search area from external memory into a small local memory with one
  instruction, `LD`. The copy runs in the background while the program goes on.

The search algorithm itself is software. A program for the whole adaptive
search fits in the 256-word program memory with room to spare (about 215
words). It is included in the end-to-end testbench.

## Block diagram

```
          IF                    ID                         EXE/MEM
  +-------------+      +--------------------+   flags   +-----+  16  +-------------+
  | instruction |<-----| instruction        |<----------| AGU |<---->| data memory |
  | fetch (PC)  | jump | decoder            |           +-----+      | MB + search |
  +------+------+      +---------+----------+             | 8 x LANES| area        |
         |                       |                     +-------+     +-------------+
  +------v------+    IR   +------v------+  32x16 ---->  | SADU  |----+
  | program     |-------->| register    |  16x16 ---->  +-------+    |  result
  | memory      |         | file        |        operand  | ALU |----+--> mux --> register file
  +-------------+         +-------------+        muxes    +-----+
```

| Stage | What happens |
|---|---|
| IF | The PC reads the program memory. The memory's output register is the instruction register. |
| ID | The hardwired decoder turns the instruction into control signals and evaluates `J`. The operand multiplexers pick registers from the register-file buses. A value that EXE writes in the same cycle is forwarded. |
| EXE/MEM | The ALU, SADU and AGU work. The result multiplexer picks the ALU, SADU or constant result. The register file and the flags are written at the end of the cycle. |

Most instructions issue one per cycle. A taken `J` costs one bubble: the word
fetched behind it is dropped. `SAD16` occupies EXE for 16/`LANES` cycles.
`LD` occupies EXE for one cycle and then runs in the AGU.

## Instruction set

All instructions are one 16-bit word with the opcode in bits [15:13].

| Instr. | 15..13 | 12 | 11..8 | 7..4 | 3..0 | Effect |
|---|---|---|---|---|---|---|
| `LD t` | 000 | t | - | - | - | Start loading the MB (t=0) or the search area (t=1) into local memory |
| `J cc,addr` | 001 | cc[12:10] | - (bits 9:8) | addr[7:0] | | If condition cc holds, PC = addr |
| `MOVR Rd,Rs` | 010 | Rd[12:8] | | - (7:5) | Rs[4:0] | Rd = Rs; 5-bit fields reach GPRs and SPRs |
| `MOVC t,Rd,k` | 011 | t | Rd | k[7:0] | | t=0: Rd = k (zero-extended). t=1: Rd[15:8] = k, low byte kept |
| `SAD16 Rd,Rs1,Rs2` | 100 | - | Rd | Rs1 | Rs2 | Rd += SAD of 16 pixels; Rs2 (line pointer) advanced |
| `DIV2 Rd,Rs` | 101 | - | Rd | Rs | - | Rd = Rs >>> 1 (arithmetic) |
| `ADD Rd,Rs1,Rs2` | 110 | - | Rd | Rs1 | Rs2 | Rd = Rs1 + Rs2 |
| `SUB Rd,Rs1,Rs2` | 111 | - | Rd | Rs1 | Rs2 | Rd = Rs1 - Rs2 |

`ADD`, `SUB` and `DIV2` set the flags:

* z: the result is zero.
* n: bit 15 of the result is set.
* c: carry out of `ADD`, borrow of `SUB` (Rs1 < Rs2 unsigned), or the bit that `DIV2` shifts out.

Jump conditions (cc):

| cc | Jump when | cc | Jump when |
|---|---|---|---|
| 0 | always | 4 | c clear (NC) |
| 1 | z set (Z) | 5 | n set (N) |
| 2 | z clear (NZ) | 6 | n clear (NN) |
| 3 | c set (C) | 7 | an `LD` is still running (LDBUSY) |

A `J` that directly follows a flag-setting instruction sees that instruction's
flags. This makes the usual "SUB, then J C" comparison of two costs work. A
program ends with an unconditional `J` to its own address, which raises the
`halted` output.

`asip_pkg.sv` has encoder functions (`enc_ld`, `enc_j`, `enc_movr`, `enc_movc`,
`enc_rrr`) for generating programs.

## Registers

| Number | Register | Use |
|---|---|---|
| 0..15 | GPR r0..r15 | General purpose |
| 16 | SPR0 `MB_BASE` | MB origin in external memory, in units of 16 pixels |
| 17 | SPR1 `SA_BASE` | Search-area origin, in units of 16 pixels |
| 18 | SPR2 `PITCH` | Line pitch of the frames, in units of 16 pixels |
| 19 | SPR3 `BLKW` | Block width for `SAD16`: 16, 8 or 4 (any other value means 16) |
| 20..23 | SPR4..SPR7 | Free, reachable with `MOVR` |

Only `MOVR` reaches the SPRs. To set an SPR, build the value in a GPR with
`MOVC` and then copy it.

## How SAD16 works

`SAD16` is the heart of the design and the least obvious instruction.

**Coordinates.** Coordinates are packed into one register as x in [15:8] and
y in [7:0]. Because of this packing, a plain 16-bit `ADD` of `dx*256 + dy` moves
a position by (dx, dy), with dx and dy of either sign, as long as y stays in
0..255. The search programs rely on this.

**Operands.**

* `Rs1` is the candidate block's top-left corner in search-area coordinates. In
  the default 48x48 area, (16,16) is the zero motion vector.
* `Rs2` is a pointer into the block, for example (0,0) at the start of a 16x16
  block, or (8,0) for its top-right 8x8 quarter.
* `Rd` is the accumulator.

**Which pixels.** One `SAD16` covers 16 pixels. How they are arranged depends on
the block width W in `BLKW`:

* W = 16: one line of 16 pixels.
* W = 8: two lines of 8 pixels.
* W = 4: four lines of 4 pixels, so a whole 4x4 block takes one instruction.

Pixel p (0..15) is at offset (p mod W, p div W) from the pointer. In the MB it
is at pointer + offset. In the search area it is at `Rs1` + pointer + offset.
Search-area pixels outside the 48x48 area read as 0.

**Two write-backs.** `SAD16` writes the register file twice through its single
write port:

* In its first cycle the ALU writes `Rs2 + 16/W` (y advances by the number of
  lines covered) back to `Rs2`.
* In its last cycle the SADU writes `Rd + SAD` to `Rd`.

Because of this, a block is a short loop. A 16x16 cost is:

```
      MOVC  r3, 0          ; accumulator
      MOVC  r2, 0          ; pointer (0,0)
      MOVC  r4, 16         ; 16 lines
loop: SAD16 r3, r1, r2     ; r1 = candidate
      SUB   r4, r4, r5     ; r5 = 1
      J     NZ, loop
```

An 8x16 or 16x8 partition takes 8 `SAD16`, an 8x8 takes 4 and a 4x4 takes 1.

**Timing.** The SADU handles `LANES` pixel pairs per cycle, so a `SAD16` takes
16/`LANES` cycles. With the default `LANES = 1` this is 16 cycles: the smallest
version of the unit, at the slow end of "up to sixteen cycles". `LANES` can be
1, 2, 4 or 8. Eight lanes (2 cycles) is the limit, because the two write-backs
need different cycles. The instruction after a `SAD16` waits in ID until the
`SAD16` finishes, and it receives the new `Rd` by forwarding.

## LD and the AGU

`LD` hands a transfer to the AGU and retires after one cycle:

* `LD 0` copies the 16x16 MB whose origin is in `MB_BASE`.
* `LD 1` copies the `SA_W` x `SA_H` search area whose origin is in `SA_BASE`.

The AGU reads the external memory in raster order, one 16-bit word (two
pixels, the even pixel in [7:0]) per granted request. It writes each word into
local memory as it returns.

Meanwhile the core keeps executing. Two rules keep programs safe:

* An `LD` or `SAD16` that reaches ID while a load is running waits there (an
  interlock).
* A program that has other work can poll the load with `J LDBUSY` instead of
  waiting.

So the usual order is to start both loads and then set up the constants. The
second `LD` waits for the first. The first `SAD16` waits for the second.

The AGU reads the SPRs at the moment the `LD` is in EXE, so an `MOVR` to an SPR
directly before the `LD` takes effect. Origins and pitch are in units of 16
pixels. A 16-bit SPR therefore reaches 2^20 pixels, several CIF frames. The
hardware does not clip at frame edges: software chooses origins that lie inside
the frame store, or pads the frames.

### External memory port

| Signal | Dir | Meaning |
|---|---|---|
| `ext_req`, `ext_addr` | out | Read request for a word address. It stays unchanged until granted. |
| `ext_gnt` | in | The request is accepted in this cycle. |
| `ext_rvalid`, `ext_rdata` | in | Read data, in request order, any latency. |

The AGU does not limit how many reads are outstanding. The memory controls the
rate through `ext_gnt`.

Loading the default 48x48 search area is 1152 words. The MB is 128 words.

## Local data memory

The local data memory holds 128 words for the MB and `SA_W*SA_H/2` words for the
search area. Each area is stored row by row, two pixels per word. The AGU has a
16-bit write port into it. For `SAD16` it has `LANES` asynchronous byte-read
ports into each area, so one pixel pair per lane is read every cycle with no
pipeline bubble.

## Top-level interface (`asip_top`)

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | Clock, asynchronous active-low reset (clears PC, registers and flags). |
| `run` | 1 = execute. 0 = freeze the core. Load the program while it is 0. |
| `pm_we`, `pm_waddr[7:0]`, `pm_wdata[15:0]` | Program memory write port. |
| `ext_*` | External memory port (above). |
| `dbg_addr[4:0]`, `dbg_data[15:0]` | Read any register. |
| `pc[7:0]`, `ld_busy`, `halted` | Status. |

Parameters, with the value used when none is given:

| Parameter | Default | Meaning |
|---|---|---|
| `SA_W`, `SA_H` | 48, 48 | Search-area size (a +/-16 pixel range around a 16x16 MB) |
| `LANES` | 1 | SAD lanes, 16/`LANES` cycles per `SAD16` |
| `EXT_AW` | 20 | External word-address width |
| `PM_DEPTH` | 256 | Program words (the `J` address field is 8 bits) |

## The adaptive search as a program

`tb/tb_asip_top.sv` generates and runs the search the processor was designed
for:

1. **Predictors.** Compute the cost of each predicted candidate: the
   neighbours' motion vectors, their median and zero. Keep the best.
2. **Early exit.** If the best cost is below the threshold, stop.
3. **Choose a pattern.** If the best cost is below the (higher) median-predictor
   threshold, use only the 3x3 square pattern.
4. **Adaptive cross.** Otherwise test the four points at +/-radius around the
   best point. The radius starts at the largest predictor coordinate. Move to
   the best point and shrink the radius by one per step until it is 2. Then
   switch to the square pattern.
5. **Square pattern.** Repeat the eight neighbours, re-centring on the best,
   until the centre is the best point or the cost falls below the threshold.

Every candidate is a 16x16 SAD loop as shown above, followed by
`SUB`/`J NC`/`MOVR` to keep the minimum.

The testbench runs the search in four cases that take all the exits: early
exit, square only, cross then square, and convergence to the planted motion
with zero cost. It compares the best cost and position with a model of the
instruction semantics. With `LANES = 1` a complete MB search took:

| Case | Cycles for one MB, including both loads |
|---|---|
| Early exit | 2 546 |
| Square only | 7 536 |
| Cross then square | 11 284 |
| Convergence to zero cost | 5 037 |

At 30 CIF frames per second (11 880 MBs per second), this range means roughly
30 to 134 MHz for a single reference frame and 16x16 blocks only.

`tb/tb_asip_workloads.sv` covers two more encoder configurations:

* **Several reference frames.** The program loops over three reference frames.
  For each frame it moves `SA_BASE` on, reloads the search area and runs the
  predictor and square search. It keeps the best frame, cost and position in
  SPR4..SPR6. In the test, one MB takes 39 457 cycles (1 808 `SAD16`), and the
  search finds the planted vector in the only frame that contains it.
* **All partition sizes.** For one candidate the program computes the costs of
  the 16x16 block, a 16x8 half, an 8x16 half, the four 8x8 blocks and the
  sixteen 4x4 blocks by switching `BLKW`. This is 56 `SAD16` and 2 498 cycles
  including both loads. Each cost is checked against a direct computation.

The search needs its predictors and thresholds to survive from one MB to the
next: about 15 bytes plus two bytes per MB column. The instruction set has no
instruction that moves data between registers and a data memory. In this design
the host therefore supplies predictors per MB, for example as constants in the
program, as the testbench does. The same gap explains why the drawn path from
the data memory into the result multiplexer is not built: no instruction would
use it.

## Design choices and departures

The following follow the source description:

* the three stages;
* the eight instructions, their opcodes and the fixed 16-bit format;
* 16 GPRs and 8 SPRs;
* the ALU operations;
* the SADU with up to 16 cycles per `SAD16` and its accumulation into a GPR;
* the coordinate update during `SAD16`;
* the block shapes one `SAD16` covers;
* the AGU loading MB and search area separately and in parallel with the core;
* the local memory for MB and search area;
* operand isolation of unused units.

The following are this design's own choices:

* **Instruction fields.** The width of the `J` condition field, the meaning of
  the `MOVC` t bit, the operand roles of `SAD16` and which value of the `LD`
  t bit selects the MB.
* **Condition codes, flag set and `DIV2`.** The condition codes, the flag set,
  and the rounding of `DIV2` (arithmetic shift).
* **Registers.** The SPR roles and units, and the coordinate packing.
* **Pipeline control.** Forwarding, the `LD`/`SAD16` interlock, the one-bubble
  jump, the halt convention and the host ports.
* **Memories.** The search-area size, the external memory protocol, the
  out-of-area rule and the local memory's read ports.
* **Reset.** What reset clears.

The following are not built:

* the frequency/energy management mentioned for the control unit;
* the external frame memory, which is a model in `tb/frame_memory_model.sv`;
* any storage for predictors across MBs (see above).

Operand isolation is implemented as EXE operand registers that load only for
instructions that use the ALU or SADU. No clock gating is inferred.

## Files and simulation

| File | Content |
|---|---|
| `rtl/asip_pkg.sv` | Opcodes, conditions, control word, SPR numbers, encoders |
| `rtl/asip_top.sv` | Core: pipeline registers, forwarding, stalls, result mux |
| `rtl/instruction_fetch.sv`, `rtl/program_memory.sv` | PC and instruction store (the output register is the IR) |
| `rtl/instruction_decoder.sv` | Hardwired decoder and jump condition |
| `rtl/register_file.sv`, `rtl/alu.sv` | Registers; ALU and flags |
| `rtl/sadu.sv`, `rtl/agu.sv`, `rtl/data_memory.sv` | SAD unit; loads and SAD16 addressing; local pixel memory |
| `tb/tb_*.sv` | One self-checking testbench per module; `tb_asip_top` runs the search end to end |
| `tb/frame_memory_model.sv` | External memory model with random grant stalls and fixed latency |

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_asip_top \
    rtl/asip_pkg.sv tb/tb_asip_top.sv
./obj_dir/Vtb_asip_top
```

Replace `tb_asip_top` with any other testbench name. The end-to-end testbench
runs the core at its default parameters and finishes in well under a second.
`tb_asip_top_lanes4` runs the same search with a four-lane SADU (4 cycles per
`SAD16`). With four lanes the cross-then-square search takes 5 342 cycles
instead of 11 284. `tb_asip_workloads` runs the multi-reference and partition
programs.

The testbenches check the following:

* The ALU, decoder and register file against independent models, on directed
  and random values.
* The SADU result and its cycle count, with 1 and 4 lanes.
* Every word an `LD` writes into local memory, against the address arithmetic,
  under random grant stalls. Also the `SAD16` pixel addressing for all block
  widths.
* The core end to end: search results against a software model. The testbench
  also counts each mechanism and fails if one never occurs:
  * interlock stalls;
  * work done while a load runs;
  * taken and untaken jumps;
  * forwarding;
  * exact `SAD16` length;
  * each search pattern and the radius decrement.
