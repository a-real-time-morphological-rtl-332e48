# PAPRICA-3: a line-parallel morphological image processor

PAPRICA-3 is a SIMD image coprocessor for hard real-time vision, such as
lane keeping or obstacle detection in a car. It has one tiny 1-bit
processing element (PE) per image column. A camera feeds it directly, so a
whole image line is processed by every instruction: with Q = 128 PEs and a
10 ns clock, a binary operation on a 128-pixel line costs one clock. The
instruction set is built on mathematical morphology. Each instruction
matches every pixel's 5x5 neighbourhood against a ternary template
('1', '0' or don't care). It then combines the result with a second
bit-plane through a logical operator and stores it into a register.

This repository holds synthesizable SystemVerilog for the whole system.
That covers the PE array with its two global networks, the imager (camera)
interface, the image memory, the program memory with the writable control
store, the controller and a host interface. Each module has a self-checking
testbench, and an end-to-end test runs at the default size.

## System overview

```
 camera ──► cam_pix ─┐  (host pixels when selected)
                     ▼
            ┌──────────────────┐  bit-planes   ┌───────────────────────────┐
            │ imager_interface │◄────────────► │ processor_array (Q PEs)   │
            └──────────────────┘               │  pe x Q, fen, icn, wcs    │
  display/host ◄── disp_pix                    └───────────────────────────┘
                                                   ▲ instr      │ Q-bit lines
   host bus ──► host_interface ──► program_memory  │            ▼
                     │                 │     ┌────────────┐  ┌──────────────┐
                     └── start/status ─┴───► │ controller │─►│ image_memory │
                                             └────────────┘  └──────────────┘
```

`paprica3_top` wires these blocks together. The camera, the display and the
host are outside the design. The camera stream enters at
`cam_pix`/`cam_valid`. The processed stream leaves at
`disp_pix`/`disp_valid` and goes to both the display and the host. The host
drives a small register bus.

## How an image line travels

1. Camera pixels arrive one per clock, P = 16 bits each, one bit per
   bit-plane. The imager interface shifts them into a line register of 16
   bit-planes x Q pixels. The first pixel of a line ends up at PE 0.
2. When Q pixels are in, `line_ready` rises. The program's `ISYNC`
   instruction waits for it and then swaps the imager's two buffers in one
   clock:
   - the new camera line moves to the array side;
   - the line the array has just finished moves to the shift side.
3. The array reads camera bit-planes (`LDI`), computes, and writes its
   results into other bit-planes of the same line (`STI`). Meanwhile the
   next camera line is shifting in.
4. The finished line leaves towards the monitor one pixel per incoming
   camera pixel. Bit-planes the program did not overwrite carry the
   original camera bits.

So while camera line *y* streams in, the array works on line *y-1*, and the
output carries processed line *y-2*. The camera must not send more than Q
pixels of a line before the program swaps. The horizontal blanking of a
real camera gives the program that time. An assertion in
`imager_interface` reports a camera pixel that arrives too early.

## The processing element and the 5x5 neighbourhood

This is the least obvious part of the design.

A PE has two kinds of registers:

- **Morphological registers (MOR)**, 8 of them, registers 0-7. Each is a
  column of five 1-bit cells linked as a south-to-north shift register
  (`mor_reg`).
  - `cells[4]` (south) is the newest line and `cells[0]` (north) the
    oldest.
  - The centre pixel is `cells[2]`.
  - A direct store (`Rd = ...`), including a load from the imager or the
    memory, shifts the column north and puts the new bit in `cells[4]`.
  - `|=` and `&=` change `cells[4]` in place.
- **Logical registers (LOR)**, 8 of them, registers 8-15. Each is a single
  bit. Register 15 doubles as the `%EN` write-enable mask.

The 5x5 neighbourhood of PE *i* for source register Rs1 has:

- **rows** = the five cells of Rs1, north to south;
- **columns** = the same register in PEs *i-2 … i+2*, west to east.

PE numbers grow towards the east. Columns beyond the array edge read 0.
The neighbourhood bit index is `row*5 + col`, so the centre is bit 12. A
LOR used as a match source shows its bit in the centre row and 0 in the
other rows.

Loading a line into a MOR once per image line turns the register into a
5-line window. The window's centre is **two lines behind** the newest
line. Programs must allow for this delay: a match result computed while
line *y* is the newest belongs to image line *y-2*.

A morphological instruction is

```
Rd  = LOP( MOP(Rs1), Rs2 ) [%EN]
Rd |= LOP( MOP(Rs1), Rs2 ) [%EN]
Rd &= LOP( MOP(Rs1), Rs2 ) [%EN]
```

- **MOP** (`match_unit`): the 5x5 template match, coded as a 25-bit `care`
  mask and a 25-bit `value`. It outputs 1 when every cared position holds
  its value. With no positions cared it always outputs 1. The template
  `TPL_ID` cares only about the centre, with value 1; use it when no match
  is wanted.
- **LOP** (`lop_unit`): one of eight functions of the match output *m* and
  *b*, the centre pixel of Rs2.

| code | LOP       | result   |
|------|-----------|----------|
| 0    | LOP_M     | m        |
| 1    | LOP_NOTM  | ~m       |
| 2    | LOP_AND   | m & b    |
| 3    | LOP_OR    | m \| b   |
| 4    | LOP_XOR   | m ^ b    |
| 5    | LOP_ANDN  | m & ~b   |
| 6    | LOP_BANDN | b & ~m   |
| 7    | LOP_B     | b        |

For example, a contour is `L8 = LOP_BANDN(MOP_cross(R0), R0)`: the pixel
minus its erosion by a 4-neighbour cross.

With `%EN`, a PE writes only where its register 15 holds 1. Loads from
the image memory, from the imager and from the ICN go through the same
store, accumulate and mask path.

## Global networks

Each network uses two inputs per PE: the centre of Rs1 (the value) and the
centre of Rs2 (a control bit).

- **FEN, Flag Evaluation Network** (`fen`). Rs2 selects which PEs take
  part.
  - `SET` means every selected PE holds 1.
  - `RESET` means every selected PE holds 0.

  The flags are registered when an `FEN` instruction executes. Conditional
  jumps (`BR`) test them.
- **ICN, Interprocessor Communication Network** (`icn`). Each PE's Rs2 bit
  closes its switch, which joins it to its western neighbour. The closed
  switches cut the array into clusters. Each PE then receives the OR of
  the values put on the line by its cluster, so a single PE holding 1
  broadcasts to the whole cluster in one instruction. This serves seed
  propagation and pyramid-style processing. The network is combinational
  across the array.

## Memories, addressing and wait cycles

- **`image_memory`**: each address holds one Q-bit line. It is built from
  Q/32 modules of 32 bits (`im_module`) that share one address bus. By
  default it has 64K lines.
  - An access occupies `CYCLES` = 5 clocks, a 50 ns memory cycle over a
    10 ns array clock.
  - The handshake is `req`, then `ack` in the last clock of the access.
  - The controller waits out these clocks, so they appear as wait cycles.
- **Address mapping** (in the controller): an image is a stack of
  bit-planes of H lines each. Image descriptor *d* holds the absolute
  address of the image's first line. `LD` and `ST` address
  `base[d] + plane*H + line + offset`:
  - `line` is the controller's line counter;
  - `offset` is a signed 8-bit displacement, for example -1 to reach the
    previous line.
- **`program_memory`**: written by the host one instruction per clock.
  The controller reads it with a 3-clock request/acknowledge handshake.
- **`wcs`, Writable Control Store**: a 256-word store inside the array
  with a same-cycle read. `WLD` copies a block from the program memory
  into it. `WRUN` executes the block at one instruction per clock, and
  `WRET` returns to the program memory. Inner per-line loops belong in
  the WCS.

## Instruction set and controller

The 97-bit `instr_t` (in `paprica_pkg`) has these fields:

| field   | bits | use                                              |
|---------|------|--------------------------------------------------|
| `op`    | 5    | opcode                                           |
| `acc`   | 2    | store / OR / AND                                 |
| `en`    | 1    | `%EN`                                            |
| `lop`   | 3    | logical operator                                 |
| `rd`    | 4    | destination register, or descriptor / condition  |
| `rs1`   | 4    | MOP source                                       |
| `rs2`   | 4    | LOP operand                                      |
| `care`  | 25   | template care mask                               |
| `value` | 25   | template values                                  |
| `imm`   | 24   | immediate                                        |

Opcodes:

| op | meaning | clocks |
|----|---------|--------|
| MORPH | `Rd acc= LOP(MOP(Rs1),Rs2) [%EN]` | 1 |
| LD / ST | image memory line ↔ register; `imm = {desc[23:20], plane[15:8], offset[7:0]}` | 6 (issue + `CYCLES`) |
| LDI / STI | imager bit-plane `imm[3:0]` ↔ register | 1 |
| FEN | evaluate SET/RESET from Rs1, selection Rs2 | 1 |
| ICN | `Rd acc=` cluster broadcast of Rs1, switches Rs2 | 1 |
| SETB / SETH / SETL | descriptor `rd` base, lines per plane H, line counter | 1 |
| LOOP | `line++`, jump to `imm` while `line < H` | 1 |
| JMP / BR | jump; conditional on SET, RESET, !SET, !RESET (`rd` = 0..3) | 1 |
| WLD | copy `imm[23:12]` words from PM address `imm[11:0]` to WCS 0.. | 4 per word |
| WRUN / WRET | enter the WCS at `imm` / return to the program memory | 1 |
| ISYNC | wait for a full camera line, then swap the imager buffers | 1 + wait |
| HALT | stop; `done` rises | 1 |

The clock counts apply when executing from the WCS. From the program
memory, each instruction also pays 4 clocks of fetch. Nothing is
pipelined: PE instructions take effect on the clock edge at which they
issue, and FEN flags can be branched on by the next instruction.

## Host interface

The host sees a 32-bit register bus (`host_wr`, `host_addr`, `host_wdata`,
`host_rdata`):

| addr | register | access |
|------|----------|--------|
| 0 | program memory address | r/w |
| 1-4 | instruction staging words, bits 31:0 … 127:96 | w |
| 5 | commit the staged word at the address, then increment the address | w |
| 6 | bit 0: start pulse; bit 1: pixel source = host | r/w |
| 7 | send pixel `wdata[15:0]` into the imager | w |
| 8 | bit 0: busy; bit 1: done | r |

The pixel source bit is the debugging path. With it set, the host feeds
image lines in place of the camera.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `Q` | 128 | top, array, imager, memory | PEs = image width = memory word |
| `P` | 16 | top, imager | bit-planes per pixel in the imager interface |
| `AW` | 16 | top, memory, controller | image memory depth 2^AW lines |
| `IM_CYCLES` / `CYCLES` | 5 | top / memory | clocks per memory access |
| `PM_DEPTH`, `PM_CYCLES` | 4096, 3 | top | program memory size and read time |
| `WCS_DEPTH` | 256 | top, array | writable control store size |
| `NMOR`, `NLOR` | 8, 8 | `paprica_pkg` | registers per PE |

What comes from the published architecture:

- Q between 128 and 1024 (128 is the default);
- the 16-bit camera and monitor pixels;
- 64K to 1M memory lines, built from 32-bit modules;
- a 50 ns memory against a 10 ns clock.

The program memory size and timing, the WCS size and the register counts
are this design's own choices.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Build and run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/paprica_pkg.sv tb/paprica_asm_pkg.sv tb/tb_paprica3_top.sv \
    --top-module tb_paprica3_top
./obj_dir/Vtb_paprica3_top
```

`tb/paprica_asm_pkg.sv` holds the instruction builders (`i_morph`, `i_ld`,
`i_br`, …), which make test programs readable.

- `tb_paprica3_top` runs the full-size system. The host loads a program
  and 12 lines of 128 pixels pass through it. Each line gets an erosion,
  a memory round trip, a FEN-flag branch and an ICN broadcast. The last
  five lines come through the host pixel path.
  - Every output pixel is checked against a software model.
  - The test also checks that each mechanism occurred: program memory
    fetches, WCS copy and execution, memory wait cycles, imager waits,
    both branch directions, ICN and host pixels.
- `tb_table1_morph` runs contouring and 5x5 pattern matching. It confirms
  one array clock per line per operation.
- `tb_table1_skeleton` thins random blobs to their skeleton with eight
  hit-or-miss templates, one writable-control-store block each. It repeats
  the rounds until the flag network reports that nothing changed, then
  compares the result with a software model. One template pass costs 16
  clocks per line: two memory transfers, three array instructions and
  the loop.
- `tb_table1_average` computes 3x3 and 5x5 box sums of an 8-bit image,
  i.e. the averages before their division by 9 or 25. It uses separable
  bit-serial additions of shifted images. Each addition is its own block,
  loaded into the writable control store just before it runs. One 13-bit
  addition costs 327 clocks per line.
- `tb_table1_flow` runs an optical-flow search over 13 displacements of
  up to 8 pixels: the ±1 square plus four far ones. Each pixel gets the
  displacement with the smallest absolute 8-bit difference. There is one
  block per displacement, and the running minimum and best index are
  updated under the `%EN` write mask. Operands more than two columns away
  are reached by chaining two-column template shifts. The result is
  checked against a software search.
- `tb_table1_sum` adds two 8-bit images bit-serially through the image
  memory and checks every 9-bit sum. It also checks the clock count: 192
  clocks per line, of which 41 are array logic and the rest memory
  transfers.
- Each block has its own `tb_<module>`.

## Where this design departs from or goes beyond the source

- **Own choices.** The original architecture describes the blocks, the
  instruction form and the networks. It does not describe the instruction
  encoding, the register counts, the MOR shift rule, the `%EN` register,
  the full LOP table, the FEN/ICN control bits, the WCS size, the
  controller's sequencing, the imager double buffer or any handshake.
  Those were chosen here.
- **Flags.** The source mentions "three global flags" but describes only
  SET and RESET. Only those two exist.
- **Arithmetic.** The source quotes 8 clocks for an 8-bit addition, which
  implies about one instruction per bit. With two-input logical operators
  and no carry register, a bit-serial full adder here takes 5 instructions
  per bit: 41 array clocks per line for an 8-bit sum, against about 10 in
  the source's estimate. With operands fetched from and stored to the
  image memory, it takes 192 clocks per line. The 3x3 and 5x5 box sums
  need 1308 and 2616 clocks per line, about 30 times the source's average
  figures. Multi-bit arithmetic is therefore much slower than the source's
  estimates. Binary morphology (contouring, matching) reaches its
  one-instruction-per-line figure. Skeletonisation by iterated thinning
  lands near the source's range: 512-768 clocks per line on the test
  images, against 256-512.
- **Optical flow.** The source also estimates an 8-bit optical flow with a
  full search of ±8 pixels in each direction. The test searches 13 of the
  289 displacements, including ones 8 columns and 8 lines away. Blocks
  for all 289 would not fit the program memory at once. Each displacement
  costs 585 clocks per line, plus 8 clocks for each extra two-column
  shift. The full search would therefore need about 169,000 clocks per
  line, roughly 80 times the source's figure.
- **Pipelining and chips.** The source targets a pipelined array at
  100 MHz and a split into array chips that can be cascaded plus a
  controller chip. Here everything is one unpipelined synchronous design.
- **Size.** Lines wider than Q (PE virtualisation) are not supported. The
  large configuration, 40 colour images of 2048x1024, does not fit the
  default memory. The small one, 64 images of 64x64x8, does.
- **Not built.** The camera and output interfaces' video timing, the
  host's own hardware and the memory chips' electrical behaviour.
