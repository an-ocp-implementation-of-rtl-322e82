# 8x8 DCT-2D / IDCT-2D core with an OCP slave port

MPEG-2 and similar video coders transform every 8x8 block of pixels with a
two-dimensional discrete cosine transform (DCT). This core computes that
transform for a continuous stream of blocks at one pixel per clock. It uses
the separability of the DCT: it runs a 1-D 8-point DCT over the eight lines
of a block, then over the eight columns of the result. The same hardware
computes the inverse transform (IDCT) when a parameter swaps its coefficient
tables. The core is a slave on an Open Core Protocol (OCP) point-to-point
link. Pixels arrive in the address field of OCP commands, and coefficients
leave on the response data bus with a "first coefficient" flag.

The architecture follows the published design *An OCP Implementation of the
Direct and Inverse Discrete Cosine Transform for HDTV*. That covers the block
structure, the OCP signal set and word formats, and the 12-bit output. The
published text does not specify number formats, memory organisation, the
cycle schedule, output order or reset. Those details are choices made for
this RTL. They are listed in [Departures and own choices](#departures-and-own-choices).

## The transform

For a line f(0..7) the 1-D transform is

    F(u) = C(u) * sum_{i=0..7} f(i) * cos((2i+1) u pi / 16),   C(0) = 1/(2*sqrt 2),  C(u>0) = 1/2

This is an orthonormal matrix, A(u,i) = C(u) cos((2i+1)u pi/16). Its
entries take only seven magnitudes: 0.354, 0.490, 0.462, 0.416, 0.278, 0.191
and 0.098. The 2-D result is F = A f A^T. The inverse uses A^T in place of A.
This is the only difference between the two cores (parameter `INVERSE`).

## Dataflow: line pass, transposition in MEM INT, column pass

```
 MAddr/MCmd ──► CUB ──pixel──► LineUnit: LB0..LB7 (MACC + MEM INT) ◄── LCB
                 │                   │ fl[0..7]
                 │ control           ▼
                 │                   LM (8:1, registered) ── fl ──► ColUnit: CB0..CB7 (MACC) ◄── CCB
                 │                                                     │ F[0..7]
 SData/SResp ◄── CUB ◄── RU (round to 12 bits) ◄── SU (8 → 1 per clock) ◄┘
```

**Line pass (Line Unit).** All eight Line Blocks (LB) see the same pixel.
The Line Coefficient Block (LCB) gives LB k the coefficient A(k, col), where
col is the pixel's position in its line. Each LB's multiplier-accumulator
(MACC) sums eight products. After a line ends, LB k holds point k of that
line's 1-D transform. The sum is rounded to 3 fractional bits and written
into the LB's internal memory (MEM INT) at the line number. After the whole
block, LB k holds column k of the intermediate block in MEM INT words 0..7.
This is where the transposition happens: no separate transpose memory is
needed, because each LB stores one column.

**Column pass (LM, Column Unit).** Writing line 7 completes the block. A
64-cycle column pass then starts. In cycle c, the Line Multiplexer (LM)
selects LB c/8 and word c%8, so the eight values of one column stream out,
one per clock. All eight Column Blocks (CB) see this stream. The Column
Coefficient Block (CCB) gives CB k the coefficient A(k, row). After eight
values, CB k holds F(k, v) for the current column v.

**Overlap of blocks.** MEM INT has two banks of eight words. While the
column pass reads the bank of block n, the pixels of block n+1 fill the
other bank. A block cannot complete sooner than 64 cycles after the one
before it, and a column pass lasts exactly 64 cycles. So one pass never
overruns the next; an assertion in `cub` checks this.

**Output (SU, RU).** Each eight cycles the Column Unit finishes a column.
The Serialization Unit (SU) loads the eight results and shifts them out in
the next eight cycles. Back-to-back blocks therefore give a gap-free stream
of one coefficient per clock. The Round Unit (RU) rounds each result half up
to an integer and saturates it to 12 bits signed.

**Output order.** Results come column by column: F(0,v), F(1,v) ... F(7,v)
for v = 0..7. Here u is the frequency down the lines (vertical) and v along
them (horizontal). Feeding this stream into an IDCT core is the same as
giving it the transposed block, and the IDCT of a transposed block is the
transposed image. The IDCT core's column-by-column output is therefore the
original pixels in line order. A DCT core followed by an IDCT core
reproduces its input order with no reordering buffer
(`tb_dct_idct_roundtrip` does exactly this).

### Cycle schedule

Edge numbers count from the clock edge that accepts the last pixel of a
block (edge 0):

| edge | event |
|------|-------|
| 0 | CUB registers the pixel and its position |
| 1 | MACCs add the eighth product of line 7 |
| 2 | line 7 written to MEM INT; banks swap; column pass step 0 is addressed |
| 3 | LM registers column 0, line 0 |
| 4..11 | CB MACCs accumulate column 0 (done at 11) |
| 12 | SU loads column 0 |
| 13 | RU registers F(0,0) |
| 14 | F(0,0) on SData with SData[12] = 1 and SResp = 01 |
| 14..77 | the 64 coefficients of the block, one per clock |

Throughput is one pixel per clock and 64 clocks per block. At 75.5 MHz that
is 75.5 Mpixel/s, or 0.85 µs per block. That covers 1920x1080 luma at
30 frames/s (62.2 Mpixel/s). Luma plus 4:2:0 chroma (93.3 Mpixel/s) would
need a faster clock or two cores.

## Number formats and accuracy

| quantity | format (forward core) | parameter |
|---|---|---|
| pixel in | 8-bit unsigned, extended to 9-bit signed | `IN_W` = 8 |
| coefficients | signed, 12 fractional bits (14 bits wide) | `COEF_FRAC` = 12 |
| MEM INT word | signed, 3 fractional bits, `IN_W`+6 = 14 bits | `LINE_FRAC` = 3 |
| Column accumulator | 31 bits, 15 fractional bits | derived |
| result | 12-bit signed, rounded half up, saturated | `OUT_W` = 12 |

The coefficient table is built at elaboration (`dct_pkg::dct_coef`). It
starts from nine base values, round(65536 * 0.5 * cos(k pi/16)) for
k = 0..8. These are folded by the cosine's symmetries and rounded to
`COEF_FRAC` bits. With these formats every forward output seen in simulation is within ±1
of the exact DCT, and a DCT followed by an IDCT reconstructs 8-bit pixels
within ±1.
The DC coefficient of an 8-bit block is at most 2040, so it never saturates.

The inverse core takes 12-bit signed coefficients (`INVERSE = 1`, `IN_W = 12`,
so MAddr is 18 bits wide). Its MEM INT words grow to 18 bits. Its outputs
are 12-bit signed pixels, not clipped to 0..255. For arbitrary full-scale
coefficient blocks the error of an output is bounded by
0.75 + sum|F(u,v)| / 8192: 0.5 from the final rounding, 0.25 from the line
results, and the rest from the 12-bit coefficients. For such blocks it can
reach 2. Raise `COEF_FRAC` (at most 15) if that matters.

## OCP interface

| signal | width | dir | meaning |
|---|---|---|---|
| `Clock` | 1 | in | clock; everything is on the rising edge |
| `MReset_n` | 1 | in | synchronous active-low reset |
| `MAddr` | `ADDR_W+IN_W` (14) | in | [13:8] core address, [7:0] pixel |
| `MCmd` | 3 | in | 000 idle, 001 write, 010 read |
| `Control` | `ADDR_W` (6) | in | this core's address, set by the user |
| `SCmdAccept` | 1 | out | 1 once the core has been initialized |
| `SData` | 16 | out | [11:0] coefficient, [12] first coefficient of a block, [15:13] = 0 |
| `SResp` | 2 | out | 01 data valid, 00 no response |

**Initialization.** A write (001) whose address field equals `Control` is
accepted on that clock edge. It also clears the whole datapath: pixel
counter, bank pointers, column pass and output pipeline. Any block in
progress is discarded. `SCmdAccept` rises on the accepting edge and stays
high until reset. Reads before initialization, and any command to another
address, are ignored.

**Pixels.** After initialization, each read (010) to the core's address
delivers one pixel in `MAddr[7:0]`, in line order, 64 per block. Idle
cycles pause the input without harm. There is no back-pressure: the core
accepts a pixel on every clock.

**Results.** `SResp` = 01 marks each valid `SData` word. `SData` is zero in
every other cycle.

## Files

All files are SystemVerilog (IEEE 1800-2017), one module or package per
file.

| file | block |
|---|---|
| `rtl/dct_pkg.sv` | transform size, OCP command/response enums, coefficient function |
| `rtl/dct2d_ocp.sv` | top: the complete core |
| `rtl/cub.sv` | Control Unit Block: OCP port, counters, schedule, assertions |
| `rtl/line_unit.sv`, `rtl/lb.sv` | Line Unit and Line Block (MACC + two-bank MEM INT) |
| `rtl/lcb.sv`, `rtl/ccb.sv` | line and column coefficient ROMs |
| `rtl/macc.sv` | multiplier-accumulator |
| `rtl/lm.sv` | Line Multiplexer |
| `rtl/col_unit.sv`, `rtl/cb.sv` | Column Unit and Column Block |
| `rtl/su.sv` | Serialization Unit |
| `rtl/ru.sv` | Round Unit |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_dct_idct_roundtrip.sv` | forward core chained into an inverse core |
| `tb/tb_idct_direct.sv` | inverse core on its own, including saturation |

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dct_pkg.sv \
          tb/tb_dct2d_ocp.sv --top-module tb_dct2d_ocp
./obj_dir/Vtb_dct2d_ocp
```

Change the testbench name for any other test. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Every test finishes in
seconds.

- `tb_dct2d_ocp` runs the core at its default parameters. It sends the
  published 8x8 example block, random blocks, and flat, extreme and
  checkerboard blocks. Some are back to back; others have idle cycles and
  commands to other addresses between pixels. It also sends a block cut off
  by re-initialization. It checks every coefficient against a real-valued
  DCT (±1) and the example block against the published coefficients (±1).
  It checks the SData/SResp format, the 14-cycle latency and the gap-free
  output. It counts each mechanism it exercises and fails if one never
  occurred.
- `tb_dct_idct_roundtrip` chains a forward and an inverse core. It checks the
  reconstruction of the example block against the original and the
  published reconstruction (±1), and of 40 random blocks against the
  originals (±1).
- `tb_idct_direct` drives the inverse core with sparse random, single-term
  and full-scale coefficient blocks. It checks the results against a
  real-valued IDCT within the error bound above, and checks saturation.
- The module testbenches check each block against values computed in the
  testbench with real arithmetic or plain integer sums.

## Departures and own choices

Compared with the published description:

- **Reset.** The published interface has no reset pin; its initialization
  write "resets the circuit". `MReset_n` is added for power-up. The
  initialization write also clears the datapath.
- **Pixel command.** The published timing diagrams show pixels arriving with
  MCmd = 010 (read) after a 001 (write) that carries the address. This core
  follows the diagrams: write initializes, read carries a pixel.
- **SCmdAccept** is a level that means "initialized". It is not a per-command
  handshake. It rises after the initialization write and stays high, as in
  the published waveform.
- **MData**, which appears (constant zero) in the published waveforms but
  not in the signal table, is not a port.
- **Number formats** (`COEF_FRAC`, `LINE_FRAC`, word widths), **rounding**
  (half up, with saturation) and **output order** (column by column) are
  this design's.
- **MEM INT** is two banks of 8 words per Line Block: 8 x 16 x 14 = 1792
  bits in the forward core. The published FPGA results report about 2.6
  kbit of memory for the whole design, so its organisation may differ.
- **Inverse-core input** is 12 bits wide, not the 8-bit pixel field. The
  published coefficients (e.g. 597) do not fit in 8 bits.
- **Latency** (14 cycles to the first coefficient) comes from this design's
  pipeline registers. The published text gives only the rate, 0.84 µs per
  block at 75.53 MHz (64 clocks).
- Clock frequency and FPGA resource use are not reproduced here. Only the
  cycle behaviour is verified.
