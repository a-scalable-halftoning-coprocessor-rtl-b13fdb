# On-the-fly halftoning coprocessor

Ordered dithering turns a grayscale image into a black-and-white bitmap.
Each output pixel is black when the gray level of its source pixel is below
the threshold of the matching cell of a dither tile, and the tile repeats
across the page. Small tiles can be handled with a precomputed bitmap for
every gray level. Exact-angle superscreens use tiles of about a million
thresholds, and then 256 precomputed patterns would need tens of
megabytes. The comparisons must therefore be made at print time, one per
output pixel, and that is slow in software (five to ten instructions per
pixel).

This RTL is a coprocessor that makes those comparisons in hardware. It
compares `LANES` gray/threshold pairs every clock and writes the result
bits to an 8-bit output FIFO. The default is two comparators. Three tasks
overlap in a pipeline: reading source pixels, reading thresholds, and
comparing and writing bits. A page also scales the source image up by a
rational factor d/s on the fly. At 20 MHz with two comparators an A4 page
at 300 dpi takes 0.24 s and at 1200 dpi 3.8 s (measured in simulation, see
*Throughput*). The architecture is the one published as "A Scalable
Halftoning Coprocessor Architecture". The register map, the memory word
formats, the host protocol and several internal details are this
implementation's own choices; they are listed under *Choices and
departures*.

## The subsystem

```
            host processor                              output device
   regs   source rows   tile load                      (imaging engine)
    |          |            |                                 ^
    v          v            v                                 |
 ctrl_regs  src_line_buffer threshold_sram                 out_fifo
    |       (2048 x 32,     (2^20 x 17,                  (1024 x 8,
    |        dual port)      single port)                full / half-full)
    v          |            |                                 ^
 sequencer ----+------------+----------------+                |
    |          v            v                v                |
    |     gray_feeder   threshold_fetch   comparator_array -> bit_packer
    |     (bres_stepper)                  (LANES lanes)
    +-- IRQ_A (host), IRQ_B (device), InputBufferRequest, OutputBufferFull
```

`halftone_system` is the top. It holds `halftone_coprocessor` (everything
in the lower half of the picture) and the three memories. The host
processor and the output device are outside; their buses are the top's
ports.

## Mapping output pixels onto source pixels

Output and source sizes form an irreducible fraction d/s with d >= s; let
r = d - s. A Bresenham-style error term decides, for each output pixel,
whether it still uses the current source pixel or moves to the next one:

```
eps(0)   = -(r >> 1)
eps(N+1) = eps(N) + s   if eps(N) <  0
eps(N+1) = eps(N) - r   if eps(N) >= 0
source(0) = 0,  source(N) = source(N-1) + (eps(N) >= 0)
```

For d = 19, s = 11 the error term runs -4, 7, -1, 10, 2, -6, 5, ... and the
source index runs 0, 1, 1, 2, 3, 3, 4, ... (`tb_bres_stepper` checks this
sequence). `bres_stepper` unrolls the recurrence over `LANES` pixels, so the
mapping of one whole group is known in one clock. The same recurrence, one
step per scanline, picks the source row of each output scanline, so one
factor scales both axes.

## The threshold array and how it is walked

This is the least obvious part of the design. The tile is stored in the
threshold SRAM as rows of words, and each word is one of two kinds:

```
 bit 8*LANES      bits 8*LANES-1 .. 0
   0              threshold of lane LANES-1 | ... | threshold of lane 0
   1              signed word displacement (low min(8*LANES, 20) bits)
```

Reading a scanline reads consecutive words. A *vector* word (flag set)
sends the next read to the vector's own address plus the displacement. A
vector after the last group of a tile row that points back to the row's
first group therefore makes the scan cycle through the tile indefinitely.
Vectors can point anywhere, forwards or backwards, and may be chained. Each
vector costs exactly one clock: the next address is formed combinationally
from the returning word.

Per scanline, `threshold_fetch` keeps the start position `(row, col)` of
the line in the tile. After the last group of a line it moves one tile row
down. Below the last row it goes back to row 0 and moves the column by
`tile_shift` groups, modulo `tile_cols`. This is Holladay's rectangle for a
slanted tile, expressed as:

```
line start address = thr_base + row * row_pitch + col      (row_pitch in words)
```

So each tile row must hold `tile_cols` consecutive groups starting at its
row address, followed by whatever vectors close the loop. Widths and shifts
are counted in groups of `LANES` cells. Thresholds are read one clock ahead
into a two-entry buffer, so groups flow at one per clock between vectors.
The walker never reads beyond the last group a line needs.

## Gray pipeline

`gray_feeder` is the two-level pipeline in front of the comparators. Level
one reads one 32-bit word (four pixels, pixel 0 in bits 7:0) per clock from
the current slot of the source buffer. Level two is a queue of four words.
A multiplexer picks the `LANES` source pixels that `bres_stepper` names for
the current group. A group is valid when all of its pixels are in the
queue. Taking it drops the words no later pixel needs. For d >= s, one word
per clock keeps two or four comparators busy at any scale. Eight
comparators need two words per clock when d = s and get one, so they run at
half speed there. This is the input-rate limit of the scaled architecture.

## Comparators and output bytes

`comparator_array` sets a lane to 1 (black) when gray < threshold; equal
stays white. `bit_packer` shifts the lane bits into an 8-bit shift
register, leftmost pixel first, so the first pixel of a byte is its MSB. A
full byte moves to an output register, which is written to the FIFO when it
is not full (OutputBufferFull). At the end of each scanline a partial byte
is padded with white bits, so every scanline starts on a byte boundary and
takes ceil(ImDstW / 8) bytes. When the width is not a multiple of `LANES`,
the last group of a line has lanes outside the line; the sequencer masks
them to white.

## Driving a page (host protocol)

Registers are 16 bits wide on a simple synchronous bus (`hwrite`, `haddr`,
`hwdata`; `hrdata` is combinational). Constants are ignored while a page
runs.

| addr | register | meaning |
|---|---|---|
| 0 | CTRL | write: bit0 START, bit1 LINE_READY, bit2 ABORT; read: bit0 busy, bit1 done, bit2 IRQ_A, bit3 IRQ_B, bit4 InputBufferRequest, bit5 OutputBufferFull |
| 1, 2 | DST_W, DST_H | output page size in pixels (ImDstW, ImDstH) |
| 3, 4 | SCALE_D, SCALE_S | irreducible fraction d/s, d >= s |
| 5 | SRC_H | number of source rows the host will supply |
| 6, 7 | THR_BASE_L/H | SRAM word address of tile row 0, column 0 |
| 8 | ROW_PITCH | SRAM words from one tile row to the next |
| 9, 10, 11 | TILE_ROWS, TILE_COLS, TILE_SHIFT | tile rectangle, in rows and groups |

1. While idle, load the tile through the top's `hthr_*` port and write the
   constants.
2. Write START.
3. The 2048-word source buffer is used as two slots of 1024 words (up to
   4096 pixels per source row). Source row j goes in slot j mod 2. IRQ_A is
   high while a slot is free and rows remain. The host answers it by writing
   the next row through the `hsrc_*` port, at word `(j mod 2) * 1024`, and
   then writing LINE_READY. A slot is freed as soon as the output scanlines
   move past its row.
4. The output device reads the FIFO (`dev_rd`, show-ahead `dev_data`). IRQ_B
   is high while the FIFO is at least half full, and after the end of the
   page while bytes remain.
5. `done` (status bit 1) is set when the last byte has left the
   coprocessor.

InputBufferRequest (`in_req`) is high whenever the page is held up waiting
for a source row. ABORT returns the coprocessor to idle.

## Throughput

Best case is one group (`LANES` pixels) per clock. Each vector adds one
clock, and each scanline adds about three clocks of pipeline start-up.
Measured in simulation with default parameters at 20 MHz:

| page | clocks | time at 20 MHz |
|---|---|---|
| A4, 300 dpi output from 150 dpi (2480 x 3508) | 4,732,607 | 0.237 s |
| A4, 600 dpi output from 150 dpi (4961 x 7016) | 18,906,096 | 0.945 s |
| A4, 800 dpi output from 200 dpi (6614 x 9354) | 33,575,039 | 1.68 s |
| A4, 1200 dpi output from 300 dpi (9921 x 14031) | 75,506,111 | 3.78 s |

These use a 24-cell tile with one vector per row. On a 192 x 16 page at
d/s = 4/1, two, four and eight comparators need 0.555, 0.305 and 0.180
clocks per pixel (best case 0.5, 0.25, 0.125). At d/s = 1/1, eight
comparators fall to 0.266 because the source buffer delivers only four
pixels per clock.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `LANES` | 2 | system, coprocessor and below | comparators; 1, 2, 4 or 8 (must divide 8) |
| `THR_DEPTH_AW` | 20 | halftone_system | threshold SRAM address bits |
| `FIFO_DEPTH` | 1024 | halftone_system | output FIFO bytes (power of two) |
| `ht_pkg` constants | | package | 8-bit gray, 32-bit source words, 11-bit source address, 16-bit sizes, 20-bit threshold address |

## Files

| file | contents |
|---|---|
| `rtl/ht_pkg.sv` | widths, register map, command/status bits, `cfg_t` |
| `rtl/halftone_system.sv` | top: coprocessor plus memories |
| `rtl/halftone_coprocessor.sv` | the coprocessor |
| `rtl/ctrl_regs.sv` | host registers and command strobes |
| `rtl/sequencer.sv` | page/scanline control, vertical mapping, slots, IRQ_A |
| `rtl/bres_stepper.sv` | unrolled error-term recurrence |
| `rtl/gray_feeder.sv` | two-level gray pipeline and multiplexer |
| `rtl/threshold_fetch.sv` | threshold buffer, vectors, tile walk |
| `rtl/comparator_array.sv` | comparators |
| `rtl/bit_packer.sv` | shift register and output register |
| `rtl/src_line_buffer.sv` | 2048 x 32 dual-port source buffer |
| `rtl/threshold_sram.sv` | threshold SRAM |
| `rtl/out_fifo.sv` | 8-bit output FIFO |

Each module has a testbench `tb/tb_<module>.sv` that checks its outputs
against values computed independently in the testbench. Three more
testbenches exercise larger scenarios:

- `tb_halftone_system` runs a 101 x 120 page end to end at default
  parameters, and counts each mechanism at least once: vectors, FIFO-full
  stalls, waits for source rows, IRQ_A/IRQ_B, tile wraps, reuse of source
  pixels and rows, and partial groups.
- `tb_a4_page` runs the four A4 pages above (about 90 seconds).
- `tb_scaling` compares two, four and eight comparators using the helper
  `tb/scaling_harness.sv`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ht_pkg.sv \
    tb/tb_halftone_system.sv --top-module tb_halftone_system -Mdir obj -o sim
./obj/sim
```

Use any other testbench name in place of `tb_halftone_system`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself. Verilator
finds submodules by file name through `-Irtl -Itb`. `--assert` turns on the
concurrent assertions in the RTL: the bit packer holds an offered byte until
the FIFO takes it, the threshold buffer and the gray word queue never
overflow, and the sequencer never compares more groups than a line holds.

## Choices and departures

What follows the published architecture:

- the two-comparator default and the 4/8 scaling
- the 2048 x 32 dual-port source buffer
- the 8-bit output FIFO with half-full signalling
- the error-term recurrence and eps(0) = -r/2
- displacement vectors costing one extra cycle
- the shift register and output register
- IRQ_A, IRQ_B, InputBufferRequest and OutputBufferFull
- the 8-bit control register and the host-loaded constants

Choices made here where the architecture leaves details open:

- **Register map and commands.** The 16-bit constant registers, the
  START/LINE_READY/ABORT commands and the status bit positions are this
  design's.
- **Source buffer.** It is split into two row slots, with a LINE_READY
  handshake. IRQ_A is a level, not a pulse. InputBufferRequest is a status
  output meaning "waiting for a row".
- **Vertical scaling.** The horizontal factor d/s also scales vertically.
- **Threshold word format.** Displacements are relative to the vector's own
  address. Tile rows hold whole groups, and a scanline starts on a group
  boundary.
- **Scanline start in the tile.** The walk moves one row down per line,
  with the Holladay shift at the wrap. A page starts at tile row 0,
  column 0.
- **Pixel and bit order.** Pixel 0 is in bits 7:0 of a source word. The
  first pixel of an output byte is its MSB, and 1 means black.
- **Line ends.** Partial bytes are padded white. A partial last group is
  masked white.
- **Memories.** All have one clock of read latency. The FIFO depth (1024)
  and the SRAM depth (2^20 words) are assumptions.
- **The memories sit inside the top.** In the published system they are
  external chips next to the coprocessor.
- **IRQ_B** also stays high after the end of a page while bytes remain.

Limits:

- d >= s, so the design only enlarges or keeps the size.
- A source row holds at most 4096 pixels.
- Sizes are at most 65535.
- The host must follow the slot order.
- There is no check against a badly formed tile description (for example a
  vector loop with no thresholds), which would hang the page.
