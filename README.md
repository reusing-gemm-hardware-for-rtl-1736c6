# GED: depthwise convolution on a GEMM array

Depthwise convolution (DwC), the layer type that makes MobileNet-style
networks cheap, has little data reuse: every channel is filtered on its own,
with no sum across channels. A typical DNN accelerator runs Conv2D and fully
connected layers on a large 2D GEMM array and pushes DwC to a small vector
ALU, where it ends up dominating the run time even though it is only a few
percent of the multiply-accumulates.

This design runs DwC on the GEMM array instead. Each column of the J x K
processing-element (PE) array is given one channel. In front of each column
sits an **Im2Col unit** that turns the pixel stream of its channel into one
column of the im2col matrix (the KH x KW window around one output pixel)
every cycle. The column multiplies that window with the KH*KW weights of
its channel, so the K columns together perform K independent
matrix-vector products: one output pixel for K channels per cycle. The
weight and output datapaths are exactly those used for Conv2D; only the
ifmap path gains a multiplexer and the Im2Col units. A new instruction
opcode, DwC-GEMM, drives this mode with the same instruction word as an
ordinary GEMM.

The RTL is SystemVerilog. It defaults to a 32 x 32 array with 8-bit ifmaps
and weights, 32-bit psums, 32 kB ifmap buffer, 32 kB weight buffer,
128 kB output buffer and 3 x 3 kernels with 58-byte Im2Col lines.

## Block diagram

```
               insn (128 b)                     host ports (buffer load / read-back)
                   |                                        |
            +--------------+                                |
            |ged_controller|--- addresses per stage ---+    |
            +--------------+                           |    |
                   |                                   v    v
  micro-op buf  ifmap buf (J B/word)  weight buf (J*K B/word)  output buf (K x 32 b/word)
       |             |                         |                     |   ^
       |      byte k | whole word              |                     |   |
       |             v      \                  |                     |   |
       |   K x im2col units  \                 |                     |   |
       |   (2 line buffers +  \                |                     |   |
       |    3x3 window)        \               |                     |   |
       |             |          v              v                     v   |
       |             +----> ifmap_mux ---> gemm_core (K pe_columns) -+---+
       |                    (Conv2D/DwC)                alu_core ----+
```

| Module | Role |
|---|---|
| `ged_top` | the whole core: buffers, controller, Im2Col units, PE array, ALU core, pipeline registers, bypass |
| `ged_controller` | instruction decode and the affine loop nest that issues one slot per cycle |
| `im2col` | per-column Im2Col: `KH-1` `line_buffer`s and one `window_buffer`, fill/stride bookkeeping |
| `line_buffer` | one ifmap row held as a FIFO in a dual-port memory |
| `window_buffer` | `KH x KW` shift registers presenting the window as a vector |
| `ifmap_mux` | per column: shared ifmap vector (Conv2D) or own Im2Col column (DwC) |
| `gemm_core`, `pe_column` | J x K multiply array; each column reduces J products and adds the psum |
| `alu_core` | K ALUs: min, max, add, shift, multiply |
| `sram_buffer` | the buffers: one write port, two synchronous read ports |
| `ged_pkg` | opcodes, ALU operations, instruction and micro-op structs |

## How a DwC layer maps onto the array

Data layout is shared with Conv2D, so a DwC layer can consume the output
of a Conv2D layer without reordering:

* an **ifmap buffer word** is one pixel of J consecutive channels
  (byte j = channel j);
* a **weight buffer word** is a J x K matrix, byte `k*J + j` = row j of
  column k;
* an **output buffer word** is one pixel of K channels (32-bit word k =
  column k).

For DwC (K <= J), byte k of each ifmap word goes to the Im2Col unit of
column k. The KH*KW = 9 weights of channel k are stored in rows 0..8 of
column k of one weight word, in row-major window order (`kh*3 + kw`); the
remaining rows are don't-care because `ifmap_mux` drives zeros into them.
That one weight word is read every cycle of the layer tile (its index does
not move), which is the weight reuse of the matrix-vector product.

The software streams a **padded ifmap tile** of `IH_tile x IW_tile` pixels
in raster order, one pixel (J channels) per cycle. The Im2Col units see
the same positions in lock-step, so one output pixel for all K channels
is produced per cycle once the windows are complete.

## The Im2Col unit

`im2col` holds the previous two rows in two `line_buffer`s. A line buffer
is a FIFO of exactly `row_len` entries, built as a dual-port memory with
one write and one registered read per cycle; the read fetches, one cycle
ahead, the word the next push will overwrite, so its output is the pixel
of the same column one row earlier. Line 1 is fed from line 0, so the three
values `{line 1 out, line 0 out, incoming pixel}` are one column of the
3 x 3 window (top to bottom). `window_buffer` shifts that column in from
the right and presents the 9 pixels as a vector.

Timing, for a tile `IH x IW` (IW <= 58):

* **Fill stall.** The first window is complete when the pixel at row 2,
  column 2 arrives, i.e. after `2*IW + 2` pushes; nothing is written before
  it. The first two pushes of every later row also complete no window.
  For MobileNet-sized tiles this is a small fraction of the run time, so the
  stall is not hidden.
* **Steady state.** Every push at row >= 2 and column >= 2 completes a
  window; `win_valid` rises in the following cycle. A tile produces
  `(IH-2) x (IW-2)` outputs in `IH x IW` cycles.
* **Stride 2.** There is no separate stride-2 hardware. The stride-1 unit
  forms every window and only those at even offsets in both directions
  are flagged valid, so a stride-2 tile takes the same `IH x IW` cycles for
  a quarter of the outputs (about 4x slower per output). A dedicated
  stride-2 unit would need four times the ifmap bandwidth per column for a
  gain of only a few percent on MobileNet-v1, which is why this variant was
  chosen.
* `clear` (pulsed by the controller when an instruction starts) returns
  the line pointers and row/column counters to the tile origin. Line and
  window contents are not cleared; the valid flag masks them.

The tile is expected to carry its padding already; 58 bytes is one
56-pixel row plus two padding pixels. Wider layers are split into column
tiles by the software.

## Instructions

Instructions are 128-bit words, accepted with `insn_valid`/`insn_ready`
one at a time; `done` pulses when one retires. Field layout, LSB first:

| bits | field | GEMM / DwC-GEMM | ALU |
|---|---|---|---|
| 2:0 | opcode | 2 = GEMM, 5 = DwC-GEMM | 4 = ALU (3 = FINISH, 0/1 = LOAD/STORE retire as no-ops) |
| 6:3 | dependency flags | ignored | ignored |
| 7 | reset | write zero instead of accumulating | - |
| 20:8 | uop_begin | | |
| 34:21 | uop_end (exclusive) | | |
| 48:35 | L_out | | |
| 62:49 | L_in | | |
| 63 | stride2 | DwC stride 2 | - |
| 74:64 | f_dst,out | | |
| 85:75 | f_dst,in | | |
| 96:86 | f_src,out | | |
| 107:97 | f_src,in | | |
| 117:108 | f_wgt,out | | ALU: 110:108 op (0 min, 1 max, 2 add, 3 shr, 4 mul), 111 use_imm |
| 127:118 | f_wgt,in | | ALU: 127:112 signed immediate |

A micro-op (32 bits in the micro-op buffer) is `{wgt[9:0], src[10:0],
dst[10:0]}` (dst in the low bits). The controller runs

```
for o in 0..L_out-1, for i in 0..L_in-1, for u in uop_begin..uop_end-1:
    dst = uop[u].dst + o*f_dst,out + i*f_dst,in      (output buffer)
    src = uop[u].src + o*f_src,out + i*f_src,in      (ifmap buffer; output buffer for ALU)
    wgt = uop[u].wgt + o*f_wgt,out + i*f_wgt,in      (weight buffer)
```

one slot per cycle; indices wrap at the buffer depth.

* **GEMM (Conv2D/FC):** `out[dst][k] = reset ? 0 : out[dst][k] + sum_j
  ifmap[src][j] * weight[wgt][k][j]`.
* **DwC-GEMM:** the arguments are `uop range [u, u+1)`, `L_out = IH_tile`,
  `L_in = IW_tile`, `f_src = (IW_tile, 1)`, `f_wgt = (0, 0)`. Slot (o, i)
  pushes pixel `src` into the Im2Col units and, if that pixel completes a
  kept window, writes `out[dst][k] = reset ? 0 : out[dst][k] + (sum over
  the window of pixel*weight)` for channel k. To start from zero, a tile is
  first run with reset set; alternatively its outputs are preloaded, for
  example with the bias. The output factors are free:
  `f_dst = (IW_tile - 2, 1)` with `uop.dst = base - 2*(IW_tile-2) - 2`
  (mod 2048) packs a stride-1 tile densely; `f_dst = (IW_tile, 1)` keeps
  the input geometry.
* **ALU:** `out[dst][k] = op(out[dst][k], use_imm ? imm : out[src][k])`.
  SHR shifts arithmetically right, or left for a negative amount. ReLU is
  MAX with 0, bias addition is ADD with a bias word, clipping is MIN, and
  pooling is a sequence of MAX with vector operands.

## Pipeline and bypass

| stage | work |
|---|---|
| P0 | read micro-op |
| P1 | add loop offsets; read ifmap and weight buffers |
| P2 | read output buffer (port A = dst, port B = ALU source); push ifmap byte k into Im2Col k |
| P3 | `ifmap_mux` -> `gemm_core` or `alu_core`; write output buffer |

An instruction of N slots retires N + 5 cycles after it is accepted
(N + 4 cycles of pipeline, then `done`). Buffers read synchronously with
read-before-write, so a P2 read of the word that P3 writes in the same
cycle would see stale data. That case (for example several micro-ops
accumulating into one output word, as in Conv2D over several input-channel
blocks) is caught and the written value is forwarded, so back-to-back
accumulation is exact with no stall.

The host ports (`host_inp_*`, `host_wgt_*`, `host_uop_*`, `host_acc_*`)
write the buffers and read the output buffer (data one cycle after
`host_acc_re`). They are honoured only while `busy` is low and stand in for
the platform's load/store units and DRAM, which are not part of this RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `J`, `K` | 32, 32 | PE array rows (ifmap vector length) and columns; DwC needs `J >= 9` and `K <= J` |
| `INP_BYTES` | 32768 | ifmap buffer (depth `INP_BYTES/J`) |
| `WGT_BYTES` | 32768 | weight buffer (depth `WGT_BYTES/(J*K)`) |
| `ACC_BYTES` | 131072 | output buffer (depth `ACC_BYTES/(4K)`) |
| `UOP_DEPTH` | 1024 | micro-op entries |
| `LB_DEPTH` | 58 | Im2Col line length, the widest DwC tile |

Depths must come out as powers of two. The kernel is fixed at 3 x 3 in
`ged_top` (the `im2col` module itself is parameterised in `KH`, `KW`).
The 16 x 16 and 64 x 64 variants are obtained by setting `J`, `K` and the
buffer sizes.

## What fits

With the defaults, a 56 x 56 MobileNet-v1 DwC layer (padded to 58) runs as
tiles of 17 rows x 58 pixels per group of 32 channels: 986 of the 1024
ifmap words, 840 of the 1024 output words (dense stride-1 output), and a
single weight word. Layers at 28, 14 and 7 pixels fit in fewer tiles; the
112 x 112 layers must also be split into column tiles because a padded row
(114) is longer than a line buffer. Tiling, padding and the halo overlap
between tiles are the software's job.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ged_pkg.sv tb/tb_im2col.sv --top tb_im2col -o sim
./obj_dir/sim
```

`tb_ged_top` runs the core at its default size: it loads all buffers with
random data, runs Conv2D GEMMs (with micro-op accumulation that exercises
the bypass and a reset), DwC tiles at stride 1 and 2 (including a full
17 x 58 tile), every ALU operation and FINISH, checks the full output
buffer against a model after each instruction and checks every
instruction's cycle count. It also counts Conv2D slots, DwC windows,
Im2Col fill-stall pushes, stride-2 drops, bypasses, reset writes, mode
switches and ALU operations, and fails if any never occurs. Compiling it
takes a few minutes (the 32 x 32 array is large); the run itself takes
under a second.

`tb_mobilenet_dwc` runs two MobileNet-v1 depthwise layers on the default
core and compares them with a direct convolution of the unpadded feature
map: 14 x 14 x 64 at stride 1 (two 32-channel groups, dense output, then
bias, ReLU, shift by 4 and clip to 127 in the ALU core) and
28 x 28 x 32 at stride 2. The stride-1 layer takes 256 cycles per group
and tile (plus 5 per instruction), the stride-2 layer 900, as the Im2Col
timing predicts.

## Departures and choices

The published description of the architecture leaves these points open;
this RTL makes its own choices:

* Instruction field widths, the micro-op format and the loop semantics are
  those of the VTA instruction set; the DwC-GEMM opcode value (5), the
  stride-2 flag in the spare bit 63 and the ALU operand fields are this
  design's.
* Signed 8-bit operands, 32-bit wrap-around psums.
* Buffers are register arrays with read-before-write semantics. Each line
  buffer reads synchronously one cycle ahead (the word the next push will
  replace), so it maps onto a dual-port SRAM macro.
* The output buffer has a second read port for ALU instructions with a
  vector operand.
* DwC outputs are written at the loop index of the pixel that completes
  the window; the software chooses the output factors.
* The dependency flags of the instruction are ignored; there is no
  load/store unit, DMA or DRAM interface, only the host ports.
* There is no padding logic: tiles are streamed pre-padded.
* The valid flag of all K Im2Col units is the same; the write uses their
  AND.
* Buffer sizes follow the 32 x 32 performance configuration (32 kB ifmap,
  32 kB weight, 128 kB output). Smaller-buffer builds of the same array
  (for area) only need smaller `*_BYTES` values.
* The ALU-based execution of DwC used by conventional accelerators, and a
  dedicated stride-2 Im2Col with four times the ifmap bandwidth, are not
  built; stride 2 runs on the stride-1 Im2Col as described above.

## How far it is verified

Every module passes its own randomised testbench, and each testbench was
shown to fail on a deliberately broken copy of its module. The full core
passes `tb_ged_top` and `tb_mobilenet_dwc` at the default 32 x 32 size.
All files lint cleanly with Verilator (`-Wall`, warnings only for unused
bits and an unconnected second read port) and elaborate in Yosys through
its slang front end. Nothing has been taken through place and route or
timing analysis: the PE columns are purely combinational between the P2
and P3 registers, so a real implementation at speed would need the adder
trees pipelined.
