# Streaming Sobel edge detector: four concurrent kernels joined by channels

This is a Sobel edge detector for 8-bit grey-scale images held in an
accelerator's off-chip (global) memory. It produces two result images: an
edge map and a gradient-orientation map. It follows the structure of a
published OpenCL design for an Intel FPGA board. In that design the work is
split into four kernels that run at the same time:

* **Convx** computes the horizontal gradient Gx.
* **Convy** computes the vertical gradient Gy.
* **Magn** forms |Gx| + |Gy| and compares it with a threshold.
* **Dir** computes the orientation atan(|Gy| / |Gx|).

The kernels pass their results to one another over on-chip FIFO **channels**,
so no intermediate image goes back to global memory. Only one task reads
global memory. Every stage handles a vector of 8 pixels per clock.

The RTL here is a hand-written SystemVerilog version of that architecture. The
split into kernels, the channels, the single reader, the vector width, the
masks and the formulas come from the original design. The line-buffer
structure, the handshakes, the memory ports, the border rule, the
orientation arithmetic and all widths and depths were chosen for this RTL.
They are listed under "Departures and choices" below.

## Dataflow

```
 global memory
      |  read port (word = 8 pixels)
 sobel_mem_reader  -- FIFO, credit-limited requests
      |
 sobel_window_gen  -- two line buffers + shift registers -> 3x3 windows, 8 lanes
      |\
      | +--------------------+
 sobel_convx            sobel_convy          (same window, same clock)
   |      \               /      |
   |       \             /       |
  ch_xm    ch_xd     ch_yd     ch_ym         four sobel_channel FIFOs
   |          \       /          |
   |           \     /           |
 sobel_magn <---+---+--------> sobel_dir    (each joins one Gx and one Gy channel)
   |                             |
 sobel_mem_writer         sobel_mem_writer
   |  edge map                   |  orientation map
 global memory             global memory
```

`sobel_accel` is the top level and wires the blocks together. Every link uses
valid/ready. The links around the channels are instances of the interface
`sobel_stream_if`, which asserts the handshake rule: once offered, a word
stays valid and unchanged until it is taken. A stall anywhere propagates back to the reader, and no word is
ever dropped.

## Data formats

* **Pixels**: 8-bit unsigned grey levels.
* **Word**: 64 bits = 8 pixels. Lane `l` sits in bits `[8l+7:8l]` and holds
  pixel `x = 8*word + l`.
* **Rows**: each row is padded to a whole number of words, so a row takes
  `ww = ceil(width/8)` words. Image widths 426 and 3860 are not multiples of 8,
  so padding does occur. The reader ignores whatever the padding lanes hold,
  and the writers store 0 in them.
* **Images**: an image is `height * ww` consecutive words from its base word
  address.
* **Edge map**: one byte per pixel, 255 = edge, 0 = no edge.
* **Orientation map**: one byte per pixel, atan(|Gy|/|Gx|) in half-degree
  units. 0 means a horizontal gradient (a vertical edge) and 180 means a
  vertical gradient, i.e. 90 degrees. Flat areas (Gx = Gy = 0) give 0.
* **Masks**: the usual Sobel masks, applied as a correlation (each mask entry
  times the pixel under it):

  ```
  Gx = [-1 0 1; -2 0 2; -1 0 1]      Gy = [1 2 1; 0 0 0; -1 -2 -1]
  ```

  Gradients fit in 12-bit signed values (|G| <= 1020). The magnitude
  |Gx| + |Gy| fits in 12 bits unsigned.
* **Borders**: a pixel in the first or last row or column has no full 3x3
  neighbourhood. It gets Gx = Gy = 0, which means no edge and orientation 0.

## The window generator (the subtle part)

`sobel_window_gen` turns the row-major word stream into 3x3 neighbourhoods for
8 adjacent pixels at once. For each lane a window needs the word above, the
word itself and the word below. It also needs the last pixel of the word to
the left and the first pixel of the word to the right, in each of the three
rows. That makes 3 rows of 10 pixels (`win[row][k]`; `k = 0` is the left
neighbour of lane 0 and `k = 9` is the right neighbour of lane 7).

Think of the input as one flat stream of words `s[m]`.

* Line buffer `lb0` is a `ww`-entry RAM that is read before it is written at a
  rotating pointer. It returns `s[m-ww]`, the word one row up.
* Line buffer `lb1` is written with what `lb0` returned on the previous word,
  one slot behind the pointer. Read at the pointer, it returns `s[m-2ww]`.
  When a row is only one word long, that slot is the one being written, and
  the word is taken straight from the register instead.
* Each of the three taps feeds a short shift register, which gives the
  left/centre/right words.

After word `m` has been taken, the window is centred on word `m - ww - 1`, so
the first window appears after `ww + 1` input words. When the last input word
has arrived, the generator feeds itself `ww + 1` zero words (the *flush*) to
push out the last row. Taps that reach outside the image pick up stale data.
That data is harmless: every such lane is on the border or in the padding.
The generator marks such lanes with an `interior` bit, and the Conv kernels
force them to 0.

A frame therefore takes `height*ww + ww + 1` clocks at the window generator
when nothing stalls.

## Kernels and channels

* **`sobel_convx` / `sobel_convy`** each apply their mask to all 8 lanes in
  one register stage. Both take every window in the same clock. Each sends its
  result to two channels, one for Magn and one for Dir. A result is offered to
  one channel only when the other one can take it too, so both always receive
  the same words.
* **`sobel_channel`** is a valid/ready FIFO with a depth of 16 words. It moves
  one word per clock and has one clock of latency.
* **`sobel_magn`** takes one word from its Gx channel and one from its Gy
  channel together. It writes 255 where |Gx|+|Gy| > `threshold`.
* **`sobel_dir`** does the same join, then runs a 12-stage pipelined CORDIC in
  vectoring mode on (|Gx|, |Gy|). The data carries 14 fraction bits. The
  micro-rotation angles are constants in 1/32-degree units,
  `ATAN[i] = round(atan(2^-i) * 180/pi * 32)` = 1440, 850, 449, 228, 114, 57,
  29, 14, 7, 4, 2, 1. The sum is rounded to half degrees and clamped to
  0..180. In every test the result is within one half-degree unit of the
  exact value. Latency is 14 clocks, at one word per clock.
* **`sobel_mem_reader`** issues consecutive word reads. It buffers the
  responses in a 32-word FIFO and never has more requests in flight than that
  FIFO has free space. Memory must answer in order and cannot be
  back-pressured.
* **`sobel_mem_writer`** (two instances) writes results to consecutive
  addresses. It raises `done` when memory has accepted the word marked last.

## Top-level interface (`sobel_accel`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; synchronous active-low reset |
| `start` | pulse to launch a frame (ignored while `busy`) |
| `src_base`, `edge_base`, `dir_base` | 32-bit word addresses of the three images; hold them stable during the frame |
| `width`, `height` | image size in pixels. Width is 1..`MAX_WIDTH` (5760); height is 1..8191 |
| `threshold` | edge threshold on \|Gx\|+\|Gy\| (0..2040) |
| `busy`, `done` | `busy` is high during the frame; `done` pulses once at the end |
| `rd_req_*`, `rd_resp_*` | read port: request valid/ready/addr; response valid/data, in order |
| `we_*` | edge-map write port: valid/ready/addr/data |
| `wd_*` | orientation write port: valid/ready/addr/data |

Parameters: `VEC` (8), `MAX_WIDTH` (5760), `CH_DEPTH` (16), `RD_DEPTH` (32).
The shared widths are in `sobel_pkg`.

## Throughput against the published figures

With a memory that never stalls, the pipeline sustains 8 pixels per clock.
The full-size test measures 7.84 to 8.00 pixels per clock across the nine
image sizes, from 144x256 to 3480x5760 (rows x columns). For example, a
1080x1920 frame takes 259,467 clocks. At the original design's 265 MHz that
is about 0.98 ms. The original design measured about 5 pixels per clock on
large images (1.5 ms for 1080x1920), limited by its board's memory
bandwidth. That bandwidth is not modelled here. The original design's FPGA
resource counts come from an OpenCL compiler and cannot be compared with
this RTL.

## Departures and choices

* **Not built**: the host CPU, the PCIe link and the board DRAM with its
  controller. They are vendor or software parts. The top brings out plain
  memory ports in their place.
* **Window generator**: one window generator feeds both Convx and Convy. The
  original design only specifies that one task reads global memory and
  forwards the data over channels.
* **Vector width**: 8 lanes, after the original's eight-wide vector types.
  Its measured rate was about 5 pixels per clock.
* **Widths, encodings and depths**: chosen for this RTL, namely
  * 12-bit gradients;
  * a strict `>` threshold test;
  * 255/0 edge coding;
  * half-degree orientation units;
  * channel depth 16;
  * reader FIFO depth 32;
  * 32-bit word addresses.
* **Borders and padding**: the border rule and the row padding are this
  RTL's own choices.
* **Orientation arithmetic**: the original only gives the formula
  atan(|Gy|/|Gx|). The CORDIC and its precision are this RTL's own.

## Files

* `rtl/sobel_pkg.sv`: shared widths and types.
* `rtl/sobel_stream_if.sv`: the valid/ready link interface with its handshake assertion.
* `rtl/sobel_accel.sv`: the top level.
* `rtl/sobel_mem_reader.sv`, `rtl/sobel_window_gen.sv`,
  `rtl/sobel_convx.sv`, `rtl/sobel_convy.sv`, `rtl/sobel_channel.sv`,
  `rtl/sobel_magn.sv`, `rtl/sobel_dir.sv`, `rtl/sobel_mem_writer.sv`: one
  block each.
* `tb/tb_<module>.sv`: a self-checking test per block. Each compares against
  values computed independently and checks the rate or latency.
* `tb/sobel_ref_pkg.sv`: the reference model. It uses real-valued atan for
  the orientation, and it also generates the test picture.
* `tb/sobel_accel_harness.sv`: the end-to-end bench body, which plays host
  and global memory.
  * `tb/tb_sobel_accel.sv` runs small frames with random stalls on every
    memory port. It counts each mechanism (read/write stalls, credit
    hold-backs, full channels, window stalls, flush, padding, borders, edge
    and non-edge pixels, flat areas) and fails if one never occurs.
  * `tb/tb_sobel_accel_full.sv` runs all nine image sizes at default
    parameters and checks every pixel. It takes about 75 s.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

## Simulating

With Verilator 5 (no other tools needed), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sobel_accel \
  -y rtl -y tb +libext+.sv rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_accel.sv
./obj_dir/Vtb_sobel_accel
```

Replace `tb_sobel_accel` with any other `tb_*` module to run that test.
For lint, use `verilator --lint-only -Wall -y rtl +libext+.sv rtl/sobel_pkg.sv
rtl/<module>.sv`. Expect warnings only for the unused package constants, the
unused centre row in Convy and the channel fill levels the top does not use.

To change the vector width, set `VEC` on `sobel_accel`. The memory word
widens with it (`VEC*8` bits). Changing the CORDIC precision (`NIT`, at most 12, and `FRAC` on
`sobel_dir`) changes the accuracy that `tb_sobel_dir` checks.
