# DIP: a bit-serial SIMD image processor with row-pipelined accumulation

Correlation and convolution dominate low-level image processing. Both
compute something locally at every pixel of a window and then sum the
results over the window. A plain SIMD array of 1-bit processors is good at
the first step and poor at the second: to add up a column it works one bit
at a time and one row at a time, and most processors sit idle while it does.

This design keeps the cheap 1-bit processors but lets **each row of the
array run the instruction stream on its own schedule**. Instructions enter
a chain of per-row delay registers. In pipelined mode row *r* executes an
instruction one cycle after row *r-1*, so a column sum ripples down the
array like a systolic adder: bit 0 of the partial sum leaves row 0 while
row 0 is already starting on bit 1. After one pass the bottom row holds the
column sum. A 16-bit RISC on the same chip then reads those column sums and
adds them up. This final sum cannot be done in parallel, and doing it on
the RISC removes the adder tree a SIMD array would otherwise need.

The chip (`dip_chip`) contains:

| block | module | what it is |
|---|---|---|
| PE array | `dip_pe_array`, `dip_pe` | 16 x 16 one-bit processing elements in a four-neighbour mesh; each PE has 2 x 80 bits of RAM |
| instruction delay chain | `dip_row_delay` | one register per row; pipelined or broadcast issue |
| array controller | `dip_array_ctrl` | array instruction memory (256 words) and a sequencer with one-word bit loops |
| input line buffers | `dip_ctlb_in` (x2) | corner-turn buffers for image buses A and B |
| output line buffers | `dip_ctlb_out` (x2) | corner-turn buffers for image bus C (out of the chip) and row bus D (to the RISC) |
| DMA channels | `dip_dma` (x3) | two input channels and one output channel to the off-chip image caches |
| RISC | `dip_risc` | 16-bit Harvard controller, 256-word instruction and data memories |
| synchronizer | `dip_sync` | two-flop synchronizer for the signals that cross between the two clocks |
| shared types | `dip_pkg` | micro-instruction and control-word formats, I/O port map |

```
 instruction bus ──► array_ctrl ──► delay chain ──┬─ row 0  ┐
                         ▲                        ├─ row 1  │  16 x 16 PE array
                         │ start/busy             ┆         │  (NEWS mesh, flag per PE)
 DMA0 ► CTLB A ─ bus A (row lines, column select) ┤         │
 DMA1 ► CTLB B ─ bus B (row lines, column select) ┤         │
 DMA2 ◄ CTLB C ◄ bus C (row lines, one column)    ┘─ row 15 ┘
                                   bus D (column lines, one row) ─► CTLB D ─► RISC
 RISC: I/O ports to everything above; 1-D word stream in/out
```

## The processing element

Each PE (`dip_pe`) has two banks. Each bank holds three bit-addressable
registers: A (16 bits), B (32 bits) and C (32 bits), or 160 bits over both
banks. By convention A holds the input image, C the result, and B
intermediate values and per-pixel control bits.

**Two banks, one computing.** The global `pingpong` bit selects the
*compute bank*, which the ALU reads and writes. The other bank is the
*I/O bank*: bus A writes its A, bus B writes its B, and buses C and D read
its C. Loading the next image and unloading the last result therefore
overlap the computation. Writing `pingpong` swaps the roles.

**ALU.** A one-bit full adder/subtractor. It takes three operand bits and
produces a sum/difference bit and a carry/borrow bit. The instruction
selects one of the two as *the* ALU output. That output can be written to
any bit of A, B or C of the compute bank, to the flag, and (`news_we`) to
the PE's neighbour register. The neighbour register is what the four
neighbours see. Operand sources:

| operand | choices |
|---|---|
| 0 | RAM A bit, north / south / east / west neighbour register, 0, 1 |
| 1 | RAM B bit, RAM A bit, 0 |
| 2 (carry/borrow in) | RAM C bit, 0, 1 |

With one output per instruction, an M-bit add takes two instructions per
bit: one writes the sum bit and one writes the carry back into a RAM bit
used as the carry (by convention C[31]). Logic functions come from the same
adder: with operand 2 = 0 the carry output is AND, with operand 2 = 1 it is
OR, and the sum output is XOR.

**Flag.** A PE whose flag is set reads 0 from all four neighbours. This
breaks the array into independent sub-arrays. Set the flags of row 8, and
a column accumulation restarts there, so rows 0-7 and rows 8-15 form two
separate 8-row pipelines. The flag is loaded from the ALU output, which is
usually a control bit that bus B placed in register B.

All ALU paths are combinational. RAM, the flag and the neighbour register
change on the rising edge of the array clock. The RAM is not reset. The flag and
neighbour register reset to 0.

## Row pipelining: how a column sum is computed

This is the part that differs most from a textbook SIMD array. Each row
receives its micro-instruction from its own stage of `dip_row_delay`:

* **broadcast mode** (`pipe_mode = 0`): every row executes stage 0, so the
  whole array runs the same instruction in the same cycle;
* **pipelined mode** (`pipe_mode = 1`): row *r* executes stage *r*, so it
  runs each instruction *r* cycles after row 0.

A column accumulation of 16-bit values in A into a 20-bit sum in C uses
one loop body, repeated for bit k = 0..19:

```
sum:   C[k]  <= N + A[k] + C[31]   (sum output,   also latched into the neighbour register)
carry: C[31] <= N + A[k] + C[31]   (carry output, neighbour register kept)
```

`N` is the north neighbour's register. In pipelined mode, when row *r*
executes `sum` for bit k, row *r-1* executed the same `sum` one cycle
earlier. So `N` holds row *r-1*'s partial-sum bit k. Row *r-1* has not yet
overwritten it, because only `sum` instructions update the neighbour
register. Row 0's north input is the array edge and reads 0. Row *r* thus
ends up with the sum of rows 0..*r*, and row 15 holds the column total. For
bits 16..19, operand 1 is 0 instead of A.

Timing: the loop issues 40 instructions. The last one reaches row 15
sixteen cycles later. A full 16 x 16 column accumulation of 20-bit results
takes 2 loop words + 40 + HALT + 16 drain = **59 array cycles** from the
first word to the end of the drain. The end-to-end test checks this number.
Seen from the RISC, busy also covers the synchronizer delays of the start
and done handshakes (a few cycles of each clock). In broadcast mode the
same loop would give wrong results, because every row would read its
neighbour's bit from the same cycle.

## Array programs

The array instruction memory (`dip_array_ctrl`, 256 words of `cword_t`) is
written over its own instruction bus. The RISC starts a program by writing
its start address to port `0x00`, then polls the same port until busy
clears. Busy stays high while the delay chain drains (16 cycles in
pipelined mode, 1 in broadcast mode). When busy is low, every row has
finished.

Control words (`dip_pkg::cword_t`):

| kind | meaning |
|---|---|
| `CW_MICRO` | issue `micro` (one `micro_t`) this cycle |
| `CW_LOOP` | repeat the next LEN words COUNT times; `micro[15:8]` = COUNT-1, `micro[7:0]` = LEN-1; takes one cycle |
| `CW_HALT` | end of program |

Inside a loop, each `CW_MICRO` word has four flags (`inc.a/b/c/d`). Each
set flag adds the iteration number to the matching RAM address (operand A,
B, C, destination). One LOOP word therefore describes a whole M-bit
operation, which is how bit-serial programs stay short. There is a single
loop level (no nesting). Micro-instruction fields are listed in `dip_pkg.sv`.

## Clocks

There are two clocks, as in the original chip, which ran the array at
40 MHz and the RISC and external interfaces at 20 MHz:

* `clk`, the array clock, drives the PE array, the delay chain, the array
  sequencer and the bit-plane side of the line buffers;
* `sys_clk`, the system clock, drives the RISC, the DMA channels, the word
  side of the line buffers, the array instruction bus and every pin.

The two may be unrelated. The corner-turn line buffers are where they
meet, so the external circuitry runs at its own speed. Every crossing is a
toggle handshake: one side flips a bit, the other sees it through a
two-flop synchronizer (`dip_sync`) and answers with a toggle of its own.
The data that goes with a toggle is held still until the answer comes
back. The array-program start and busy cross the same way. The pingpong
and pipelined-mode bits go through a synchronizer and must only be changed
while the array is idle. The loop counter (port `0x3F`) must likewise only
be read while the array is idle. The testbenches run `clk` at twice
`sys_clk`.

## Getting images in and out: corner turning

Outside the chip, a pixel is a 16-bit word. Inside the array, a PE holds
the pixel's bits at successive addresses of one register, and a bus carries
one *bit plane* at a time. The corner-turn line buffers convert between the
two.

* **Input (`dip_ctlb_in`, buses A and B).** The buffer takes 16 words, one
  per row (word *r* is the pixel for row *r*), for one image column. It then
  writes 16 bit planes, one per array cycle: plane k carries bit k of every row's
  pixel on the 16 row lines into address `base+k` of every column whose
  mask bit is set. A set mask with several bits broadcasts the line, for
  example a kernel. In auto mode the mask rotates one column left after
  each line, so mask `0x0001` loads a whole image column by column. The
  buffer is double buffered: with input always ready, 16 columns take 256
  system cycles, and the last line drains in 16 array cycles after that.
* **Output (`dip_ctlb_out`).** Bus C has one line per row and reads one
  selected column. Bus D has one line per column and reads one selected row.
  The buffer reads 16 planes (`base..base+15` of register C in the I/O bank),
  one per array cycle, then emits 16 words on the system clock. It is
  double buffered too: the next line is gathered into one half while the
  other half is sent, so with the array clock at twice the system clock a
  run of lines leaves at one word per system cycle. In auto mode the
  selected column/row steps by one after each line. The bus C buffer feeds DMA channel 2. The RISC reads the
  bus D buffer word by word (port `0x38` says a word is waiting, port `0x37`
  pops it). Choosing `base` picks which 16 bits of the 32-bit C register
  come out.

**DMA channels (`dip_dma`).** The RISC writes four descriptor words and a
word count, then GO. The channel first hands the four words, unchanged, to
the off-chip DMA controller (`desc_*` ports). That controller decides what
they mean: source and destination in the off-chip caches. The channel then
moves COUNT words between the off-chip stream and its line buffer. Every
stream on the chip uses a valid/ready handshake. A word moves in a cycle
where both are high.

## The RISC and its I/O ports

`dip_risc` is a single-cycle, 16-bit Harvard machine with 8 registers (r0
reads as 0). Its instruction memory is written over an external bus while
the core is halted. A cycle with `risc_run` high starts the core at
address 0. The instruction set (encoding in `dip_risc.sv`) is: ADD, SUB,
AND, OR, XOR, SHL, SHR, ADDI, LDI (9-bit), LHI (high byte), LW, SW, BEQZ,
BNEZ, IN, OUT, HALT. IN and OUT reach the rest of the chip through 8-bit
port numbers:

| port | write | read |
|---|---|---|
| 0x00 | start array program at address | array busy |
| 0x02 | bit 0 pingpong, bit 1 pipelined mode | same |
| 0x10 + 8n + 0..3 | DMA channel n descriptor words | |
| 0x10 + 8n + 4 | DMA channel n word count | |
| 0x10 + 8n + 5 | DMA channel n GO | channel busy |
| 0x28 / 0x2C | CTLB A / B: `{auto[5], base[4:0]}` | lines written into the array |
| 0x29 / 0x2D | CTLB A / B column mask | |
| 0x30 / 0x34 | CTLB C / D: `{auto[5], base[4:0]}` | |
| 0x31 / 0x35 | first column (C) / row (D) | |
| 0x32 / 0x36 | start, number of lines | busy |
| 0x37 | | pop next row-bus word |
| 0x38 | | 1 if a row-bus word is waiting |
| 0x3E | 1-D output stream | 1-D input stream |
| 0x3F | | LOOP words run since reset |

Channels 0 and 1 feed buses A and B. Channel 2 carries bus C out.

## How far this follows the original design, and where it departs

What comes from the original chip: the 16 x 16 array of 1-bit PEs with
add/subtract ALUs, four-way neighbour links, and a flag that cuts
communication. The two banks of A(16)/B(32)/C(32) bits with ping-pong
compute/I/O roles. The sum-or-carry output select. The per-row instruction
delay chain with pipelined and broadcast use. An array instruction memory
fed by its own bus. M-bit loops encoded as one instruction. Two 16-bit
input buses and one output bus through corner-turn line buffers with
column select. A separate row bus D through its own buffer to a 16-bit
RISC with separate instruction and data memories. Three DMA channels that
send four user-defined words to an off-chip DMA controller. An array
clock separate from the RISC and interface clock, with the line buffers
between them.

What is this design's own, because the original leaves it open:

* the micro-instruction format and operand choices, including the
  neighbour register and the rule that a set flag zeroes neighbour inputs;
* the control-word format, loop mechanism and memory depths (256 words
  each for the array program, RISC program and RISC data);
* the RISC instruction set and the I/O port map;
* double buffering inside the line buffers, auto-stepping columns,
  the DMA word count and every handshake, including the toggle handshakes
  and synchronizers between the two clocks.

Known departures:

* **Tri-state buses** are multiplexers.
* **Register A of the second bank is 16 bits**, so each PE holds 160 bits.
  One drawing of the original labels it 32 bits.
* The RISC is a minimal core, far smaller than the original standard-cell
  RISC, and has no interrupts.
* The off-chip parts of the system are not included: the 4K two-bank image
  caches, the I/O processor that serves the DMA descriptors, the frame
  store and the host bus.

## Throughput and capacity

* Column accumulation over the whole 16 x 16 array: 59 array cycles for
  20-bit sums (above), about 1.5 us at 40 MHz. Four 8 x 8 sub-arrays work at once when rows 8 (and, for
  horizontal moves, column 8) have their flags set.
* Image transfer: two input buses and one output bus, each at most one
  16-bit word per system cycle, so 48 bits per system cycle: 960 Mbit/s
  at a 20 MHz system clock. Streaming frame pairs in, differencing them
  and streaming the results out, all three overlapped through the two
  register banks, takes 305 system cycles per 3 x 256 words
  (`tb_dip_stream_rate`): 805 Mbit/s at 20 MHz. The other 49 cycles per
  step are the RISC arming three DMA channels and polling them. This is
  short of the 1.2 Gbit/s that H.261 coding needs; at the same step time
  a system clock of about 30 MHz would carry it. The clock rates reached
  depend on the implementation.
* Per PE: 16 input bits in A, 32 in B and 32 in C per bank. A 16-bit pixel
  pair plus a 17-bit difference fits, and so does a 20-bit column sum with
  its carry bit.

## Simulating

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/dip_asm_pkg.sv` holds small encoder
functions for RISC and array programs.

| testbench | what it shows |
|---|---|
| `tb_dip_pe` | bit-serial add and subtract (34 cycles for 16 bits), read back over buses C and D; neighbour inputs; flag |
| `tb_dip_pe_array` | bus A/B loading by column, mesh shifts north and east, flags on row and column 8, bus C/D read-out of all 256 PEs |
| `tb_dip_row_delay` | row *r* sees the instruction issued *r+1* cycles earlier (pipelined) or 1 cycle earlier (broadcast) |
| `tb_dip_array_ctrl` | loop expansion with stepped addresses, active time including drain, busy across the clock crossing |
| `tb_dip_ctlb_in` | corner turn, walking and broadcast column masks, back-to-back lines across the two clocks |
| `tb_dip_ctlb_out` | corner turn out with auto step under back-pressure; back-to-back lines from the double buffer |
| `tb_dip_dma` | descriptor words, exact word counts, no stray transfers |
| `tb_dip_risc` | every instruction, one cycle each |
| `tb_dip_chip` | full chip at default size: image in over DMA, flag load in broadcast mode, pipelined column accumulation split at row 8, half-column sums to the RISC, four 8 x 8 block sums and the total, whole result image out over bus C; counts each mechanism |
| `tb_dip_frame_diff` | full chip: two frames in, per-pixel difference in broadcast mode, image out |
| `tb_dip_stream_rate` | full chip: six steps of frame pairs in, difference, results out, with input, output and computation overlapped on the two banks; step time and rate |

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dip_chip \
    -y rtl -y tb +libext+.sv -Irtl rtl/dip_pkg.sv tb/tb_dip_chip.sv -o sim
./obj_dir/sim
```

Substitute any testbench name. `tb_dip_chip` reads a few signals inside
the chip (mode bits, controller state, line-buffer handshakes, two PE flags)
to count mechanisms, so it needs the real `dip_chip` hierarchy. All
testbenches finish in seconds.

## Changing the design

The array size (`ROWS`, `COLS`), register sizes (`A_BITS`, `B_BITS`,
`C_BITS`) and memory depths are parameters of `dip_chip`. A few things are
tied to the defaults:

* the 5-bit RAM address in `micro_t` (`ADDR_W`) covers registers of up to
  32 bits;
* the 16-bit word of the buses and line buffers assumes `ROWS` and `COLS`
  of 16 wherever a line of words meets a bit plane.

Add a new ALU function by extending the operand enums in `dip_pkg` and the
case statements in `dip_pe`. Add a new chip register by adding a port
constant in `dip_pkg` and a decode line in `dip_chip`.
