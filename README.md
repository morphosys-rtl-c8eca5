# MorphoSys in SystemVerilog

MorphoSys is a dynamically reconfigurable processor for image processing. A
small 32-bit RISC controller (Tiny RISC) runs the program. The heavy lifting
goes to an 8x8 array of Reconfigurable Cells (RCs). Each cell's "instruction"
is a 32-bit *context* word. Contexts sit in an on-chip context memory and are
broadcast into the array a whole row or column at a time. This happens while
the program runs, so the datapath can change its function from one cycle to
the next. That is what *dynamic* reconfiguration means here.

The pixel data reaches the array through a double-buffered frame buffer. A
DMA controller fills one half from main memory while the array works on the
other half.

This repository is a synthesizable RTL model of that architecture. It follows
the published description of the UCI MorphoSys project (the M1 chip). That
description leaves many things open: encodings, handshakes, the exact
instruction set. Those parts were designed here. The section
[Where this model departs from, or adds to, the original](#where-this-model-departs-from-or-adds-to-the-original)
lists them.

```
            instruction / data cache ports            main memory port (32-bit)
                      |                                         |
              +---------------+   DMA command   +------------------------------+
              |   Tiny RISC   |---------------->|        DMA controller        |
              | 4-stage, 32b  |<-- busy, set ---| packing reg, AGU, state ctrl |
              +---------------+                 +------------------------------+
                 | array cmds                        | 64-bit           | 32-bit
                 v                                   v                  v
  +----------------------------+  2 x 64-bit  +--------------+    +----------------+
  |       8x8 RC array         |<-------------| frame buffer |    | context memory |
  | (row/column SIMD, NSEW,    |--- 64-bit -->| 2 sets x     |    | 2 x 8 x 16     |
  |  quadrant, express lanes)  |   write-back | 2 banks x 64 |    | x 32-bit       |
  +----------------------------+              +--------------+    +----------------+
                 ^                                                        |
                 +------------------ 8 x 32-bit context bus --------------+
```

## The Reconfigurable Cell

Each cell (`rc.sv`) has two operand multiplexers, an ALU-multiplier, a
shifter, a 32-bit output register, a feedback register, a four-entry register
file and a context register. Bus data is 8 bits wide and is zero-extended.
Inside the cell the datapath is 16 bits wide and signed. A product is 32 bits
wide and fits the output register. Neighbours see the low 16 bits of the output
register. The write-back bus sees only its low 8 bits.

With `exec` high, a cell does the following in one cycle:

* It selects operand A with MUX A and operand B with MUX B. For constant
  operations, operand B is the context's sign-extended 12-bit constant.
* It computes the ALU result and shifts it left or right by `ALU_SFT` bits.
* At the clock edge it writes the result into the output register and its low
  16 bits into register-file entry `REG_PTR`. Operand A goes into the feedback
  register, so "FB" means "what MUX A chose last cycle".

### Context word (`rc_ctx_t` in `morphosys_pkg.sv`)

| bits    | field     | meaning |
|---------|-----------|---------|
| 31      | WR_BUS    | this cell's low byte is enabled onto the frame-buffer write bus |
| 30      | WR_EXP    | this cell drives its express lane |
| 29:28   | REG_PTR   | register-file entry that receives the result |
| 27      | RS_LS     | shift direction: 1 = arithmetic right, 0 = left |
| 26:23   | ALU_SFT   | shift amount, 0..15 |
| 22:19   | MUX_A     | operand A source (table below) |
| 18:16   | MUX_B     | operand B source (table below) |
| 15:12   | ALU_OP    | operation (table below) |
| 11:0    | constant  | operand B of the `*K` operations |

The field names and bit boundaries follow the original's format for
constant operations. The original also has a second format without a
constant. Here the two are merged: operations with a constant ignore MUX_B.

| MUX_A | source | | MUX_B | source |
|---|---|---|---|---|
| 0 | IA, frame-buffer bus A byte | | 0 | IB, frame-buffer bus B byte |
| 1 | LA, quadrant row, leftmost other cell | | 1 | U, north neighbour |
| 2 | M, quadrant row, remaining cell | | 2 | D, south neighbour |
| 3 | R, quadrant row, rightmost other cell | | 3 | LB, west neighbour |
| 4 | T, quadrant column, topmost other cell | | 4-7 | R0-R3 |
| 5 | C, quadrant column, remaining cell | | | |
| 6 | B, quadrant column, bottommost other cell | | | |
| 7 | XQ, cross-quadrant partner | | | |
| 8 | FB, feedback register | | | |
| 9-12 | R0-R3, register file | | | |
| 13 | E, express lane | | | |
| 14, 15 | zero | | | |

| ALU_OP | op | result (before the shifter) |
|---|---|---|
| 0 | PASSA | A |
| 1 / 10 | ADD / ADDK | A + B |
| 2 / 11 | SUB / SUBK | A - B |
| 3 / 12 | AND / ANDK | A & B |
| 4 | OR | A \| B |
| 5 / 13 | XOR / XORK | A ^ B |
| 6 | SEQ | 1 if A == B, else 0 |
| 7 | PASSB | B |
| 8 / 14 | MUL / MULK | A * B (32 bits) |
| 9 / 15 | MAC / MACK | output register + A * B |

## The array and its interconnect

`rc_array.sv` holds 64 cells. The array is split into four 4x4 quadrants.
Every cell executes in the same cycle. Each row (or column) holds one context
and runs it on eight different data items, so a row works as an 8-wide SIMD
machine. This part has the most detail:

* **Loading contexts.** The context memory delivers eight 32-bit words at
  once. In row mode, word *i* goes into every cell of row *i*. In column mode,
  word *j* goes into every cell of column *j*. A single cell can also be
  loaded on its own.
* **Data buses.** The frame buffer drives two 64-bit read buses. Byte *k* of
  each bus runs down column *k* in row mode and along row *k* in column mode.
  So the eight cells of a row see eight different pixels on IA and IB.
* **Nearest neighbours.** Port B receives Up (north), Down (south) and Left-B
  (west). East was left out of port B in the original for lack of context
  bits. At the array edge these inputs read 0.
* **Quadrant row and column.** Each cell is connected to every other cell in
  its quadrant row and quadrant column. Of the three other cells in the
  quadrant row, the leftmost is LA, the rightmost is R and the remaining one is
  M. So "left" can physically be to the right: for the leftmost cell of a
  quadrant, LA is its right-hand neighbour. T, C and B follow the same rule
  in the quadrant column. These inputs go to port A only.
* **XQ** is the cell at the same position in the horizontally adjacent
  quadrant, in the same row, at column *j* XOR 4.
* **Express lanes.** Each row has one lane in each direction between its left
  and right quadrant halves. Each column has the same between its top and
  bottom halves. A cell with `WR_EXP` set drives its lane. The original uses a
  tristate bus here. In this model the lowest-numbered enabled cell wins and a
  lane that nobody drives reads 0. All four cells of the same row (or column)
  in the other quadrant receive the lane on input E. E carries the row lane in
  row mode and the column lane in column mode.
* **Write-back.** The low bytes of the eight cells of one row (or column)
  form the 64-bit write bus. Each cell's `WR_BUS` bit is the byte enable.

All interconnect is combinational from the neighbours' output registers. A
value produced in one cycle can therefore be consumed anywhere in the array in
the next.

## Frame buffer and DMA controller

The frame buffer (`frame_buffer.sv`) has two sets. Each set holds two banks
of 64 words of 64 bits, 2 KiB per set.

* **DMA port.** The DMA controller reads or writes one bank at a time over a
  single 64-bit bus.
* **RC-array port.** The RC array reads both banks of one set at the same
  offset in one cycle: bank 0 onto bus A, bank 1 onto bus B. That gives the
  128 bits a row of eight cells needs for two operands each. Writes go to one
  bank, 64 bits at a time.
* **Read timing.** Reads are synchronous.
* **Sharing rules.** A set can belong to the DMA controller or to the array,
  never both at once. This is what lets the DMA controller refill one set
  while the array works on the other. The shared read/write bus means the
  array cannot read and write in the same cycle. Assertions in
  `frame_buffer.sv` check these rules. The Tiny RISC stall logic makes sure
  they hold.

The DMA controller (`dma_controller.sv`) has three parts:

* **State controller.** It sequences the transfer.
* **Address generator.** It keeps a main-memory address counter and a local
  address counter.
* **Data packing register.** It holds one 32-bit half of a 64-bit word.

Main memory is 32 bits wide. It is assumed to take one request per cycle and
to return read data the next cycle. Rates and latencies under that assumption
(count in words; the testbench checks these numbers):

| transfer | rate | cycles from `start` to `done` |
|---|---|---|
| memory to frame buffer | 2 cycles per 64-bit word | 2N + 2 |
| frame buffer to memory | 2 cycles per 64-bit word | 2N + 2 |
| memory to context memory | 1 cycle per 32-bit word | N + 2 |

For frame-buffer transfers the local address is {set, bank, offset}. The
{bank, offset} part counts up, so one transfer can fill a whole set.

The context memory (`context_memory.sv`) stores 256 words. It is organised as
2 blocks (rows, columns) x 8 rows or columns x 16 contexts, with word address
{block, rowcol[2:0], ctx[3:0]}.

## Tiny RISC

`tinyrisc.sv` is a four-stage pipeline:

1. **Fetch.** The first pipeline register loads only when the instruction
   cache pulls its acknowledge `i_ack_n` low. The PC counts in words.
2. **Decode.** The register file (`tinyrisc_regfile.sv`: sixteen 32-bit
   registers, read ports RS1, RS2 and DEST) and the special registers are
   read here. The first forwarding unit substitutes the value being written
   back in the same cycle. This serves the second instruction after a writer.
3. **Execute.** The second forwarding unit serves the instruction right after
   a writer. This stage also holds the ALU (`tinyrisc_alu.sv`) and the data
   memory request. The branch unit (`tinyrisc_branch.sv`) resolves branches
   here too. A taken branch flushes the two younger instructions.
4. **Writeback.** The ALU result or the load data is written back. Load data
   arrives in this stage, so with both forwarding paths no instruction ever
   waits for a register.

### Instruction format

```
 31     26 25   22 21   18 17   14 13                0
+---------+-------+-------+-------+-------------------+
| opcode  | DEST  |  RS1  |  RS2  |                   |   register form
+---------+-------+-------+-------+-------------------+
| opcode  | DEST  |  RS1  |  --   |   imm16 [15:0]    |   immediate form
+---------+-------+-------+-------+-------------------+
```

| opcode | mnemonic | effect |
|---|---|---|
| 0 | NOP | |
| 1-5 | ADD SUB AND OR XOR | DEST = RS1 op RS2 |
| 6, 7 | SLL SRL | DEST = RS1 shifted by RS2[4:0] |
| 8 | ADDI | DEST = RS1 + sext(imm) |
| 9 | LUI | DEST = imm << 16 |
| 10 | ORI | DEST = RS1 \| zext(imm) |
| 11 | LD | DEST = M[RS1 + sext(imm)] |
| 12 | ST | M[RS1 + sext(imm)] = DEST |
| 13 | JMP | PC = PC + sext(imm) |
| 14, 15, 16 | BEQ BGT BLT | if DEST ==, >, < RS1 (signed): PC = PC + sext(imm) |
| 17 | MTS | SREG[imm[2:0]] = RS1 |
| 18 | MFS | DEST = SREG[imm[2:0]] |
| 19 | RETI | PC = SREG4, SREG0 = SREG1 |
| 20 | JR | PC = RS1 |
| 32 | LDCTX | DMA: DEST words from memory address RS1 to context address imm[7:0] |
| 33 | LDFB | DMA: DEST 64-bit words from memory RS1 to frame buffer imm[7:0] = {set,bank,offset} |
| 34 | STFB | DMA: DEST 64-bit words from frame buffer imm[7:0] to memory RS1 |
| 35 | CBC | context broadcast: imm[4] = column mode (and block), imm[3:0] = context number |
| 36 | SBC | single-cell context load: imm[15:13] row, imm[12:10] column, imm[7:0] context address |
| 37 | RCEX | array step: set imm[7], imm[4] = column mode, offset RS1[5:0] |
| 38 | RCWB | write row/column imm[3:1] to set imm[7], bank imm[8], offset RS1[5:0]; imm[4] = column mode |

### Stalls

An instruction in Execute holds Fetch and Decode behind it in three cases:

* it is a DMA instruction (LDCTX, LDFB, STFB) and the DMA controller is busy.
  A zero-length DMA transfer is therefore a "wait for DMA" instruction;
* it is RCEX or RCWB on the frame-buffer set that a running DMA transfer
  holds;
* it is RCEX right after an RCWB. This costs one cycle of bus turnaround.

### Array instruction timing

Take cycle *t* as the cycle an instruction spends in Execute:

* **RCEX** reads both banks of the frame buffer at *t*. Every cell executes
  at *t+1*.
* **RCWB** writes at *t+1*. An RCWB right after an RCEX therefore writes that
  RCEX's results.
* **CBC and SBC** load the context registers at *t+1*. A CBC followed by an
  RCEX runs the new contexts.
* **DMA transfers** start at *t* and run in the background.

### Interrupts

There are five special registers (`tinyrisc_sregfile.sv`):

| register | contents |
|---|---|
| SREG0 | IMASK in bits 31:24, INUM (lowest pending unmasked request) in bits 2:0 |
| SREG1 | copy of SREG0 taken at interrupt entry |
| SREG2 | PC of the instruction that was executing |
| SREG3 | interrupt vector |
| SREG4 | resume PC: the next PC, or a taken branch's target |

When `irq & IMASK` is non-zero, the following happens:

1. The instruction in Execute completes and the two younger ones are
   flushed.
2. SREG1, SREG2 and SREG4 are saved and IMASK is cleared.
3. Execution continues at SREG3.

RETI returns to SREG4 and restores SREG0 from SREG1.

## Fitting the target applications

MorphoSys was aimed at DCT-based coding, motion estimation and automatic
target recognition. The sizes below are typical values from common practice,
not figures from the original description.

* **8x8 DCT.** A block is 64 bytes, which is 8 frame-buffer words (a bank
  holds 64). One 8-point pass needs 8 contexts per row or column (there are
  16). Only the low 8 bits of each result can be written back. Full-precision
  coefficients must therefore stay inside the cells, or leave the array in
  several shifted passes. `tb_dct_2d` below does both.
* **Full-search motion estimation.** A 16x16 macroblock is 32 words and a
  32x32 search window is 128 words. The window fills one set, and the
  macroblock fits in the other. The array has no absolute-difference
  operation, so the matching error is a sum of squares.
* **Target recognition.** Binary 8x8 templates are matched against
  bit-planes of the image. A 64-pixel bit-plane row is one frame-buffer
  word. There is no population-count operation, so counting the matching
  ones takes a shift-mask-add sequence. With it, one step takes 14 contexts,
  and clearing and read-out take the last two of a row's 16.

## Where this model departs from, or adds to, the original

These parts follow the original description:

* the block structure and every size: 8x8 array, 4x4 quadrants, 8/16/32-bit
  cell widths, a 4-entry register file, 32-bit contexts, 2x8x16 contexts,
  2x2x64x64-bit frame buffer, 64- and 32-bit DMA buses, 16 + 5 Tiny RISC
  registers;
* the names and sources of every cell input;
* the DMA's two-cycle packing of 64-bit words;
* the four Tiny RISC stages and both forwarding units.

These parts are this design's own:

* **Encodings.** ALU operation codes, multiplexer
  numbering and the whole Tiny RISC instruction encoding.
* **Instruction set.** The original has 44 Tiny RISC instructions and 12
  array instructions. Their list is not available, so this model implements
  21 core and 7 array instructions. Programs for the original chip will not
  run.
* **RC operations.** The cell has no absolute-difference operation. None is
  described in the source, so block matching here uses the sum of squared
  differences (see `tb_me_block_match` below). A sum of absolute
  differences would need one more operation code.
* **Arithmetic details.** Signed arithmetic, the shifter placed after the
  ALU, and a register-file write on every executed cycle.
* **Interconnect details.** The XQ partner, the express-lane arbitration and
  the mode-dependent E input, and zeros at the array edges.
* **Timing and control.** The synchronous frame-buffer and memory timing, the
  stall rules, the turnaround cycle, branch flushing (no delay slots) and the
  interrupt entry and exit sequence.
* **What is outside.** The caches, main memory and I/O are not modelled.
  Their ports are ports of `morphosys`.

## Simulating

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/morphosys_pkg.sv tb/tb_morphosys.sv --top-module tb_morphosys -Mdir obj
./obj/Vtb_morphosys
```

`tb_morphosys` runs the whole chip at its default sizes. Tiny RISC performs
these steps:

1. It DMA-loads 256 contexts and two pixel blocks. One block goes to set 0.
   The other goes to set 1 in the background.
2. It computes Y = C·X for an 8x8 pixel block X and an 8x8 matrix C of small
   coefficients, which is one 8-point transform pass. For each of the eight
   steps it broadcasts a new context per row and executes the array.
3. It writes the eight result rows to the frame buffer.
4. It switches to column mode for a pass-through check, with one cell
   reconfigured on its own to add 1.
5. It DMAs everything back out, with an interrupt arriving mid-computation.

The testbench checks every result byte against a reference it computes
itself. It also counts each mechanism: DMA-busy stalls, set-conflict stalls,
the turnaround stall, DMA running while the array executes, row and column
broadcasts, the single-cell load, both forwarding paths, taken branches and the interrupt. It fails
if any mechanism never happened. The run takes about 500 cycles.

`tb_me_block_match` runs a motion-estimation full search on the whole chip.
An 8x8 block is matched against all 64 positions (8 horizontal by 8
vertical) in a search window of 15 rows by 16 pixels. Main memory holds the
window once for each horizontal displacement, as 15 rows of 8 pixels,
because the DMA moves whole words. One array pass handles one horizontal
displacement, with one vertical displacement per array row:

* Window rows stream down the array. At each step row 0 takes a new window
  row from bank 0 (operand IA) and every other row copies the cell above it
  (operand U). After step s, row i holds window row s-i.
* From step 7 on, bank 1 delivers block row s-7 (operand IB). Every row then
  runs four more contexts: difference, square, accumulate into R3, and
  restore the window value on the output for the next shift. Row i thus
  compares block row r with window row r+7-i.
* The 16-bit accumulators leave the array in two passes, low byte and then
  high byte (shift right by 8). This is needed because only 8 bits per cell
  reach the write bus.

The eight passes alternate between the two frame-buffer sets. While the
array works on one set, the DMA controller stores the previous results and
loads the next window into the other set. Tiny RISC drives everything with
counted loops. The testbench copies the block out of the window at a random
position and checks all 512 partial sums. It also checks that the best
match is that position with error 0, and that array steps really overlapped
DMA transfers. Pixels are kept below 32 so that a sum of eight squares fits
in the 16-bit register file. The run takes about 2200 cycles.

`tb_dct_2d` runs a complete two-dimensional 8x8 DCT, Z = C·X·Cᵀ, with the
DCT-II matrix scaled by 8 and rounded to integers:

1. Row mode. Row i multiplies and accumulates with C[i][t] over the eight
   pixel rows, so cell (i,j) ends with Y[i][j].
2. Two more contexts scale Y to one byte: Y' = (Y >>> 6) + 128. This is
   needed because the next pass receives its operands over the 8-bit bus.
3. The array writes Y' back in column mode, so frame-buffer word j holds
   column j of Y'. This is the transposition, and it costs no extra steps.
4. Column mode. Word t now carries column t of Y', and column m
   multiplies and accumulates with C[m][t].
5. Z leaves the array row by row, low bytes first and then high bytes.

The testbench checks Y' and Z exactly against the same fixed-point steps. It
also checks that Z, minus the offset, lies within the truncation error of the
exact transform. The run takes about 460 cycles.

`tb_atr_template` matches an 8x8 binary template against a 15-row by
64-pixel binary image at 64 positions: 8 vertical offsets times 8 horizontal
offsets on byte boundaries. The data flow is the one of block matching.
Image rows stream down the array, and bank 1 carries template row r in all
eight bytes. Each cell ANDs its image byte with the template row and counts
the ones. It then adds the count to its score. The template is cut from the
image at a random position. The testbench checks all 64 scores and that
this position scores highest. The run takes about 560 cycles.

The other testbenches cover one block each. `tb_rc` compares random contexts
against a reference cell model. `tb_rc_array` checks every interconnect
input, the express lanes in both modes and both broadcast modes.
`tb_dma_controller` checks data and cycle counts for all three transfer
kinds. `tb_tinyrisc` runs a program covering forwarding, branches, shadow
flushing, MTS/MFS, an interrupt and the array-instruction stalls.
