# A 2-D array of 8×8-pixel neighborhood processors

An image is split into 8×8-pixel tiles. Each tile gets a small 8-bit
processor of its own, a **neighborhood processor (NP)**, which holds the
tile's pixels in its registers. All NPs run the same instruction stream in
lock step (SIMD), so an operation on the whole image takes as long as the
same operation on a single tile. The intended end use is a smart image
sensor, with each NP placed under its own 8×8 patch of photodiodes. This RTL
covers the digital part: the NP array and the global modules that feed it
instructions. Pixels are loaded through a host port that stands in for the
sensor.

Three ideas carry the design:

* **Tiles, not pixels.** One processor per 64 pixels keeps the logic small
  enough to sit beside the pixels. The 64 pixels are walked by a program
  loop that uses indirect addressing.
* **Shared corner registers.** An NP reaches its eight neighbours through
  four *Neighborhood Registers* (NRs) at its corners. Each NR is shared by
  the four NPs that meet at that corner. Moving a byte in any of the eight
  directions takes two instructions: NP → NR, then NR → NP.
* **Column buses for readout.** The NPs of one column share an 8-bit Data
  Out bus and a valid line. Results leave the chip one NP row at a time.
  Processing time does not depend on the array size, but readout time grows
  with the number of NP rows.

The default build is the 3×4 prototype: 12 NPs, a 24×32-pixel image and
four column buses. One global control unit can drive up to 16×16 NPs
(128×128 pixels). Larger sizes are set by the `ROWS` and `COLS` parameters.

## Block structure

```
processor_array_top
├── timing_control_unit   reset synchroniser, 3-phase strobe generator
├── program_memory        256 × 16-bit instructions, host write port
├── global_control_unit   program counter, start/jump/END handling
├── instruction_register  the one instruction all NPs see
└── np_array              ROWS × COLS grid, NR wiring, column buses
    └── neighborhood_processor  (one per tile)
        ├── np_control_unit     decode, status register, conditions
        ├── np_alu              8-bit ALU, flags
        ├── np_register_bank    64 × {A, B, C} pixel registers + Row Column Register
        └── nr_control          write arbitration of the NP's own NR
np_pkg                    shared types, opcodes, field positions, assembler helpers
```

Every module has its own file in `rtl/` with the same name. Each file opens
with a comment that covers the module's interface and timing.

## The neighborhood processor

Each NP contains:

* **Pixel registers.** There are three 8-bit registers per pixel: A, B and
  C, so 192 in all. Register C can instead be used as two 4-bit nibbles, CL
  and CH, which allows 12-bit values (8 bits in A or B plus 4 in a nibble).
* **Row Column Register.** Holds `{row[3:0], col[3:0]}` of the NP and is
  read-only. Programs compare against it to switch on one NP, one row or one
  column of NPs.
* **Accumulators.** Two 8-bit accumulators, ACCA and ACCB. Every ALU
  operation works on one of them. ACCB also serves as the pointer for
  indirect addressing.
* **ALU.** Performs ADD, ADC, SUB, SBB, AND, OR, XOR, LOAD and five
  single-bit shifts.
* **Status register (SR)** with the condition flags and two control bits (see
  below).
* **One NR.** The NP owns the NR at its top-left corner, together with that
  NR's write control.

Every instruction reads at most one operand and writes at most one
destination. There is no separate load/store path. `LOAD` brings an operand
into an accumulator, and `MOV` writes an accumulator to any addressable
register.

### Operand addressing (instruction bits 8:0)

| bits 8:0            | operand                                   |
|---------------------|-------------------------------------------|
| `1 dddddddd`        | immediate `dddddddd`                      |
| `0 00 ccc rrr`      | pixel register A, column `ccc`, row `rrr` |
| `0 01 ccc rrr`      | pixel register B                          |
| `0 10 ccc rrr`      | pixel register C (nibble CL in nibble mode) |
| `0 11 000 nnn`      | special register `nnn` (nibble CH in nibble mode) |

Special registers: 0 SR, 1 ACCA, 2 ACCB, 3 Row Column, 4 top-left NR (the
NP's own), 5 top-right NR, 6 bottom-left NR, 7 bottom-right NR. In nibble
mode the `11` bank code addresses CH, so special registers cannot be reached
until nibble mode is turned off. Writes to the Row Column Register are
ignored. Nibbles read as zero-extended values and are written from the low
four bits.

An indirect (Type IV) access uses ACCB's eight bits as the `{bank, col, row}`
part of this table. This means one pointer can walk all three pixel banks.

## Neighborhood Registers

NR(i,j) sits at the top-left corner of NP(i,j). NP(i,j) therefore sees:

```
      NR(i,j)  ────── NR(i,j+1)
   (TL, own)          (TR: owned by the right neighbour)
        │   NP(i,j)     │
      NR(i+1,j) ───── NR(i+1,j+1)
   (BL: owned by       (BR: owned by the
    the NP below)       lower-right neighbour)
```

Each NR can be written by four NPs. For NR(i,j) these are NP(i,j) as TL,
NP(i,j-1) as TR, NP(i-1,j) as BL and NP(i-1,j-1) as BR. Every NP can read
its four NRs as operands.

Because all NPs run the same instruction, a normal program has every NP
write the *same* corner. For example, "write TL, then read TR" moves every
NP's value one tile to the left. The rules for the other cases are:

* **Simultaneous writers.** When several NPs write one NR in the same
  instruction, the NR takes the value from its owner first, then the left
  neighbour, then the upper neighbour, then the upper-left neighbour. This
  fixed priority is this design's own choice. SIMD programs never depend on
  it.
* **Array edge.** NRs that would lie beyond the right or bottom edge of the
  array do not exist. They read as 0, and writes to them are dropped.

## Instruction set

Instructions are 16 bits wide:

```
 15 14 | 13 ........ 9 | 8 ................ 0
 cond  |    opcode     |  operand / function
```

`cond` applies to every type except jumps: `00` execute if Z is set, `01`
if C is set, `10` if N is set, `11` always. Each NP evaluates the condition
against its own flags. An NP whose condition fails does nothing for that
instruction.

| type | opcode            | meaning |
|------|-------------------|---------|
| I    | `b oooo`          | `op` on ACCA (`b`=0) or ACCB (`b`=1) with the bits-8:0 operand |
| II   | `0 0111` / `1 0111` | shift ACCA / ACCB; bits 8:5 = shift, bit 4 = update flags |
| III  | `1 1110`          | jump; bits 7:0 = target address |
| IV   | `0 1110`          | indirect: ACCA `op` [ACCB]; bits 8:5 = op, bit 4 = update flags, bit 3 = write |
| V    | `0 1111`          | special functions, bits 8:0 |

Type I operations (`oooo`): ADD `0000`, ADC `0001`, SUB `0010`, SBB `0011`,
AND `0100`, OR `0101`, XOR `0110`, LOAD `1100`, MOV `1101`.

Shifts (Type II and IV bits 8:5): ASR `0111`, SR `1000`, SRC `1001`,
SL `1010`, SLC `1011`. The bit shifted out goes to C. SRC and SLC shift the
old C in.

Type IV: when bit 3 is set, ACCA is written to the register that ACCB points
to (an indirect MOV). When bit 3 is clear, bits 8:5 choose the operation,
with the operand taken from that register.

Type III: the jump condition is the three bits `{15, 14, 8}`:

| `{15,14,8}` | jump if  |  | `{15,14,8}` | jump if |
|-------------|----------|--|-------------|---------|
| `000`       | Z        |  | `100`       | N       |
| `001`       | not Z    |  | `101`       | not N   |
| `010`       | C        |  | `110`       | O       |
| `011`       | not C    |  | `111`       | always  |

Type V functions come in four independent groups, so one instruction can
combine one function from each group:

| bits | code | function |
|------|------|----------|
| 8:6  | `100` | FOPN: switch all NPs on |
| 8:6  | `110` | RST: instruction-level reset of the NPs |
| 8:6  | `111` | SROUT: send the status register on the Data Out bus |
| 8:6  | `010` | NOP |
| 8:6  | `001` | END: end of program |
| 5:4  | `10` / `11` | OUTA / OUTB: send ACCA / ACCB on the Data Out bus |
| 3:2  | `10` / `11` | NBDS / NBEN: nibble mode off / on |
| 1:0  | `10` / `11` | CLRA / CLRB: clear ACCA / ACCB |

`np_pkg` has small assembler functions that build these words: `i_type1`,
`i_shift`, `i_jump`, `i_iram`, `i_spl`, `a_imm`, `a_pix` and `a_spr`. The
testbenches write all their programs with them.

## Status register and the global condition

```
  7     6      5    4   3   2   1   0
 Free  NP ON  SRU   U   Z   N   O   C       reset value 0x60
```

* **C.** Carry out of an addition, the borrow of a subtraction, or the bit
  shifted out by a shift.
* **O.** Set when two non-negative operands give a negative result.
* **U.** Set when two negative operands give a non-negative result. For
  subtraction, O and U treat the second operand as negated.
* **Z, N.** Set from the result.
* **Logic operations and LOAD.** These clear C, O and U.
* **SRU.** Flags change only when SRU is set, or when a Type II/IV
  instruction sets its own update bit. MOV and Type V instructions never
  change flags.
* **NP ON.** An NP with this bit clear ignores every instruction except RST
  and FOPN.
  * A program switches NPs off by writing the SR: for example, load the SR
    with `0x00` in every NP whose Row Column test failed.
  * FOPN sets NP ON again in every NP.
  * RST clears both accumulators, resets the SR to `0x60` and leaves nibble
    mode. The pixel registers keep their values.

**Jumps and END are decided globally.** There is one program counter, so
the NPs' condition results are OR-ed together: a conditional jump or END is
taken when *any* NP that is switched on finds its condition true. For a
counted loop all NPs should hold the same counter. For data-dependent
decisions the OR acts as "any NP needs another pass".

## Timing

The timing control unit splits each instruction into three clocks. It does
this with three one-clock enable strobes on a single clock, in this order:

1. **GCU phase.** The program counter picks the next word. A taken jump
   loads its target here.
2. **IR phase.** The instruction register loads the word from program
   memory.
3. **NP phase.** Every NP executes the instruction in the IR. Results are
   visible after this edge. That includes NR writes, so the next
   instruction can read them.

One instruction therefore takes **3 clocks**, whatever it is. `enable` low
freezes the strobes, which pauses the whole array. `reset` is asynchronous
at the input and passes through a two-flop synchroniser.

Running a program:

* Pulse `start` with `start_addr`. `busy` goes high.
* The GCU spends one phase settling, then fetches from `start_addr`.
* `done` pulses for one clock once END has executed.
* `instr_count` holds the number of instructions that ran, END included.

The program memory has 256 words, which matches the 8-bit jump target. It
is written through `pm_we`/`pm_waddr`/`pm_wdata` and can hold several
programs, each started by its own address.

A Data Out value appears on `col_dout[j]` with `col_dvalid[j]` high for the
clock after the NP phase of an OUTA, OUTB or SROUT. Programs must let only
one NP per column output at a time, which is normally done by switching the
other rows off. An assertion in `np_array` flags any violation.

### Top-level ports (`processor_array_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `enable`, `reset` | in | 1 | clock, run enable, asynchronous reset |
| `pm_we`, `pm_waddr`, `pm_wdata` | in | 1, 8, 16 | program memory write |
| `start`, `start_addr` | in | 1, 8 | start a program at an address |
| `busy`, `done` | out | 1 | program running / finished (pulse) |
| `instr_count` | out | 32 | instructions executed by the last run |
| `ld_we`, `ld_row`, `ld_col`, `ld_bank`, `ld_pix`, `ld_data` | in | 1, 4, 4, 2, 6, 8 | host write of one pixel register; `ld_pix = col*8 + row` |
| `col_dout[COLS]`, `col_dvalid[COLS]` | out | 8, 1 | column Data Out buses |

The host load port takes priority over an instruction writing the same
register in the same clock.

## Example programs and measured cost

The testbenches contain assembler programs for the image operations this
architecture was built to show. All of them are checked pixel by pixel
against a software model.

| program | what it does | instructions | clocks |
|---------|--------------|-------------:|-------:|
| readout | rows one by one: switch on one NP row, send 64 pixels, ACCB, SR | 268 per NP row + 1 | 807 (1×2), 2415 (3×4) |
| looped readout | the same stream, with a loop over the NP rows (24 words at any size) | 273 per NP row + 3 | 13113 (16×16) |
| invert  | `p ← 255 − p` over bank A, with an indirect loop | 322 | 966 |
| right shift | whole image moves one tile right, through the NRs | 388 | 1164 |
| top-right shift | whole image moves one tile up and right (diagonal) | 388 | 1164 |
| horizontal edges | `\|p(x,y) − p(x,y+1)\|`; the row below the tile comes from the NP below | 566 | 1698 |
| vertical edges | `\|p(x,y) − p(x+1,y)\|`; the column right of the tile comes from the right NP | 590 | 1770 |
| total edges | `min(255, \|p − right\| + \|p − below\| + \|p − below-right\|)` over the whole image | 3453 | 10359 |

These numbers show the array's scaling rules:

* **Processing time is independent of array size.** Invert and all three
  edge detections take the same number of instructions on 1×2, 3×4 and
  16×16 arrays.
* **Diagonal moves cost the same as straight ones.** The top-right shift
  takes as long as the right shift, because the corner registers connect
  diagonal neighbours directly.
* **Readout scales with the number of NP rows.** The 3×4 readout takes
  three times as long as the 1×2 readout (805 against 269 instructions).

The reference measurements for this architecture were 837 clocks for
invert, 4337 for total edge detection, and 731 / 2193 for readout on 1×2 /
3×4. They show the same pattern: equal processing times and a factor of
three for readout. The absolute numbers differ because the reference
programs were not published. The programs here were written independently,
so only the ratios are comparable.

The unrolled readout needs 16 program words per NP row. At 16 rows it
would need 257 words, one more than the program memory holds, so the
16×16 array uses the looped readout instead. That version keeps its row
counter in pixel register C(7,7).

Total edge detection has to reach the diagonal neighbour, which for the
last row and column of a tile lives in another NP. The program therefore
works in stages:

1. It builds shifted copies of the image in the spare banks. Bank C gets
   the image moved up by one pixel. Bank B gets it moved left by one
   pixel, then up by one pixel, so the diagonal value makes two NR hops.
2. Three local passes then add up the absolute differences. Each addition
   saturates: a carry loads FF.

The program is 191 words long. The way the three directions are combined
(a saturating sum) is this design's choice.

The edge programs run with SRU cleared. The only flag-setting instructions
are then the Type IV subtract (with its update bit set) and one shift with
update, which turns the pointer into the loop condition. The absolute value
is computed as "if borrow: XOR FF, ADD 1", using conditional execution
instead of branching.

## What comes from the architecture description, and what is this design's own

The following are taken from the description of the architecture:

* the array and tile size, the global modules and their roles
* NR placement and the two-step neighbour transfer
* the column buses
* the instruction word layout, every opcode and function code, the operand
  addressing table, nibble mode
* the status register layout and the flag meanings, the NP ON and SRU rules
* the 16×16-NP limit per control unit

The following are this design's own choices, where the description leaves
the point open:

* **Clocking.** The three timing clocks are phase enables of one clock, so
  an instruction takes exactly 3 clocks. The original waveform timing is
  not reproduced.
* **Jump decision.** A conditional jump or END is taken if any NP that is
  switched on meets the condition. The jump field is an absolute address.
* **Array edge.** Missing NRs read 0 and ignore writes.
* **NR write priority.** When several NPs write one NR at once, the order
  is owner, left, upper, upper-left.
* **Row Column Register.** Its value is `{row, col}`, 4 bits each.
* **Reset values.**
  * The SR resets to `0x60`, with SRU on.
  * Pixels, NRs and accumulators reset to 0.
  * RST keeps the pixels and leaves the program counter alone.
* **Flags.**
  * Flags for subtraction: C is the borrow, and O/U use the negated
    operand.
  * Logic operations and LOAD clear C, O and U.
  * Shifts put the outgoing bit in C.
* **Flag updates.** MOV and the special instructions never change flags.
* **Type V decoding.** The four groups (bits 8:6, 5:4, 3:2, 1:0) are
  decoded independently.
* **Type IV MOV.** LOAD and MOV share an operation code in Type IV. Bit 3
  tells them apart.
* **Nibble mode.** Its state is kept in a flip-flop of its own; the SR's
  free bit is left unused.
* **Column bus.** It is a valid-gated OR rather than a tri-state bus.
* **Image loading.** A host load port writes pixels, in place of the image
  sensor.
* **Program control.** `busy`, `done`, `instr_count` and `enable`-based
  pausing are added for control and measurement.

The following are not included:

* **Image sensor.** The photodiode front end is not built.
* **Test fixture.** The FPGA test fixture around the array (input and
  output image memories, VGA display) is not built. The testbenches load
  the image and capture the column buses instead.
* **More than 16×16 NPs.** Arrays larger than 16×16 NPs would need several
  global control units, and only one is built.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Give `np_pkg.sv` on the command line and let `-y` find the modules:

```sh
# one block
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/np_pkg.sv \
    tb/tb_np_alu.sv --top-module tb_np_alu -o sim && ./obj_dir/sim

# whole design, default 3x4 array, end to end
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/np_pkg.sv \
    tb/tb_processor_array_top.sv --top-module tb_processor_array_top -o sim && ./obj_dir/sim

# image workloads on 1x2 and 3x4 arrays side by side
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/np_pkg.sv \
    tb/np_programs_pkg.sv tb/tb_workloads.sv --top-module tb_workloads -o sim && ./obj_dir/sim
```

`-Wno-fatal` keeps width and unused-signal warnings (mostly from the
testbenches' reference models) from stopping the build. Each of these runs
takes well under a second, except the workloads, whose 16×16 array takes
a few minutes to compile and about ten seconds to run.

| testbench | what it checks |
|-----------|----------------|
| `tb_np_alu` | every operation and flag against a reference model, random and corner operands |
| `tb_np_register_bank` | random reads and writes in all banks, nibble mode, host-load priority |
| `tb_nr_control` | write priority among four requesters |
| `tb_np_control_unit` | decode, conditions, SRU/update bit, NP ON, RST/FOPN, Data Out valid |
| `tb_neighborhood_processor` | instruction sequences on one NP, including each NR direction |
| `tb_np_array` | all eight transfer directions on a 2×3 array, array edges, column buses |
| `tb_program_memory`, `tb_instruction_register`, `tb_timing_control_unit`, `tb_global_control_unit` | the global modules, phase order, jumps, END, pause |
| `tb_processor_array_top` | default 3×4 array end to end: readout, invert, right and top-right shift, a mixed program; checks results, instruction and clock counts, and that every mechanism (taken and untaken jumps, condition skips, NP off, nibble mode, all four NR directions, indirect addressing, FOPN, RST, SROUT, pause) occurs |
| `tb_workloads` | readout, invert, horizontal, vertical and total edge detection on 1×2, 3×4 and 16×16 arrays side by side; every result image against a model, equal processing times at all sizes, readout ratio of 3 between 3×4 and 1×2 |

To write a new program, build a `logic [15:0]` queue with the `np_pkg`
helpers, as `tb/np_programs_pkg.sv` does. Write it through the
program-memory port and pulse `start`.
