# Stripe memory cascade: multi-scale object detection on a video stream

This design detects objects (faces, licence plates, anything a boosted
soft-cascade classifier can be trained for) at every position and every scale
of a video frame, without storing the frame. It keeps only a 32-line
*stripe* of the input image in on-chip RAM. The smaller versions of the image
are built on the fly and placed in the same stripe. Two detection pipelines
evaluate windows directly out of the stripe while the lines stream past. When
one stripe is not wide enough, or not fast enough, for every scale, several
engines are chained. Each one hands the next smaller image to the next engine
as an ordinary video stream, and their detections are merged.

The classifier is a WaldBoost-style soft cascade. For a window, weak
classifier t:

1. reads a 6×6 pixel area at an offset inside the window;
2. turns it into 3×3 cells of 1×1, 2×1, 1×2 or 2×2 pixels;
3. computes an LRD (local rank difference) or LBP (local binary pattern)
   value from the cells;
4. adds the table entry `A[t][value]` to a running sum H.

The window is rejected as soon as H falls below the threshold `T[t]`. A window
that survives all T weak classifiers is reported together with H.

## Top level and interfaces

`sme_cascade` (default `N_INST = 2`, the two-engine HD configuration) has:

| port group | protocol | content |
|---|---|---|
| `s_vid_*` | AXI4-Stream video, 8-bit pixels | camera image; `tuser` marks the first pixel of a frame, `tlast` the last pixel of each line |
| `m_res_*` | AXI4-Stream, 64 bits | one detection: `[11:0]` x, `[23:12]` y (in the scale's own pixels), `[31:24]` global scale index, `[63:32]` response H (signed) |
| `m_vid_*` | AXI4-Stream video | smallest scale produced by the last engine, for attaching a further engine; tie `m_vid_tready` high if it is unused |
| `s_axil_*[k]` | AXI4-Lite, one port per engine | configuration and classifier loading |

Each engine is a `sme_detector`. It has one image input, one configuration
port, and two outputs: the downscaled image and the detections.

### Register map (per engine)

| address | content |
|---|---|
| `0x000000` | `[15:0]` window width, `[31:16]` window height (at most 27) |
| `0x000004` | classifier length T, 1..1024 |
| `0x000008` | `[7:0]` number of stored scales n; `[8]` produce output scale n on `m_vid` |
| `0x00000C` | global index of this engine's scale 0, added to reported scales |
| `0x000010` | status, read only: `[11:0]` lines finished, `[16]` frame idle |
| `0x000100 + 16j` | scale j: `+0` stripe column of its left edge, `+4` width, `+8` height. Slot n describes the output scale. |
| `0x010000 + 4t` | instruction t: `[7:0]` x, `[15:8]` y, `[16]` cell width − 1, `[17]` cell height − 1, `[21:18]` a, `[25:22]` b |
| `0x020000 + 4t` | threshold `T[t]`, 18-bit two's complement |
| `0x400000 + 4i` | alpha entry i, 9-bit two's complement; `i = 17t + (LRD + 8)` for LRD, `256t + code` for LBP |

A write needs AW and W together and is answered OKAY one cycle later. The
registers read back; the tables are write-only.

Scale sizes must follow `size(j+1) = ceil(5·size(j)/6)`. The scales placed in
one stripe must not overlap, and their widths must add up to at most 4096.
For a two-engine HD cascade:

- engine 0 holds 1280, 1067, 890 and 742 pixels (3979 columns) and streams
  the 619×348 scale;
- engine 1 stores scales 619 down to 42 (3536 columns).

The host software must program these positions; the hardware does not check
them.

## The stripe memory (`sme_stripe_mem`)

The stripe is 4096 × 32 pixels held in U × V = 4 × 8 RAM banks. Each bank
word holds B = 4 neighbouring pixels. Word column c of line r lives in bank
(r mod 8, c mod 4) at address (r div 8)·256 + c div 4.

Any block of 16 × 8 pixels whose left edge is a multiple of 4 touches every
bank exactly once. So both ports can read such a block in one clock, and the
output crossbar rotates the bank outputs back into picture order. Lines wrap
modulo 32, so a block may straddle the newest and the oldest line.

A feature needs at most 6×6 pixels. Wherever it starts, it lies inside the
aligned 16×8 block that begins at its left edge rounded down to 4. A
multiplexer then picks the 6×6 sub-block out of the 16×8 one. The scaler uses
the same trick for its 8×8 neighbourhoods.

Port A belongs to detection pipeline 0. Port B is shared by:

- pipeline 1;
- the image input, which writes masked words so a scale may begin at any
  column;
- the scaling unit, which both reads and writes.

## Two pipelines and the shared port

Each `detect_pipeline` is a ring of 14 registers, and every slot carries one
window. One trip round the ring executes one weak classifier:

| stage | work |
|---|---|
| 0 | instruction arrives |
| 1 | stripe block read |
| 2 | 6×6 select |
| 3–4 | `feature_extract` |
| 5 | alpha and threshold read |
| 6 | accumulate and compare |
| 13 | position control |

At stage 13, a rejected window leaves the ring and a finished window leaves
it as a detection. Any other window goes round again with t + 1. A free slot
takes the next position from `position_gen`, which hands out two positions
per clock, one to each pipeline.

Because a slot is never empty while positions are waiting, each pipeline
executes one weak classifier per clock. A 2-bit phase counter gives port B
away one cycle in four. In that cycle it alternates between the line writer
and the scaler. The token of pipeline 1 that meets that cycle passes without
executing and repeats its instruction on the next trip. The engine therefore
peaks at 1.75 weak classifiers per clock, which is 350 M/s at 200 MHz.

New windows enter a pipeline only while its result FIFO has room for all 14
slots, so results are never dropped. Detections from both pipelines go
through one `stream_merge`.

## Scaling on the fly (`scale_unit`, `lanczos_kernel`)

Scale j+1 is made from scale j in groups of six lines.

- Each 6×6 block becomes a 5×5 block, so the scale factor is 5/6, about four
  scales per octave.
- For every block, the unit reads the aligned 16×8 area holding the block's
  8×8 neighbourhood: one pixel more on the top and left, two more on the
  right and bottom.
- Where the neighbourhood leaves the scale, edge pixels are replicated.
- The separable integer Lanczos kernel (`lanczos_kernel`) computes the 5×5
  result. Its taps, in 1/64, are {−3,62,5,0}, {−5,52,19,−2}, {−4,36,36,−4},
  {−2,19,52,−5} and {0,4,63,−3}. The result is rounded with +2048 >> 12 and
  clamped to 0..255.
- Each 5-pixel run is written back as up to two masked 4-pixel words.

All of this uses only the lent port-B cycles. For the smallest scale of an
engine, the 5×5 blocks go instead into the five-line buffer of
`scale_out_stream`. That buffer replays them as a raster video stream for the
next engine.

## Scheduling: what runs when, and why nothing is overwritten (`line_scheduler`)

This is the least obvious part of the design. Every stored input line is an
*event*. For event e:

1. A *job* is queued for the row of windows whose bottom line is e.
   A job is one window row of one scale: scale, top line, first stripe
   column, window count.
2. For scales j = 0, 1, …, the scheduler runs each group of scale j that has
   become complete. A group is complete when line 6g+6 exists, or when the
   scale's last line exists. Each group adds up to five lines to scale j+1.
3. For every window row that those new lines complete, another job is
   queued.

Queued windows are counted per event parity. Each retiring window counts
down, and an event is finished when its scaling is done and its count is
zero.

The stripe holds only 32 lines, so each new line of a scale overwrites the
line 32 above it. Two rules make that safe:

- **Input gating.** Line n of the input is accepted only after event n−2 is
  finished. The windows still in flight then belong to events n−1 and n, so
  their top line is at least n − window height. That is below the
  overwritten line n − 32 for any window up to 27 lines.
- **Scaling guard.** The same holds for scaled lines while groups arrive at
  their normal pace. At the end of a frame, however, a deep scale can receive
  two groups in one event, and the second would overwrite lines a queued
  window still reads. The scaler compares the lines it is about to overwrite
  with the scale's line count at the start of the previous event. If they
  could collide, it waits until every queued window has retired.

Both rules need window height + 5 ≤ 32, which is where the 27-line limit on
the window comes from. A new frame starts only when the previous one is
completely finished.

## Where this design departs from the original architecture

- **Scheduler.** The original drives scaling and detection from a static
  schedule held in RAM, computed offline for the configured scale sizes and
  spread out to flatten the detection bursts after every sixth line. Here
  the same work order is computed by counters. A 64-entry job queue absorbs
  part of the bursts, and the image input is back-pressured when the
  pipelines fall behind. A camera that cannot be stalled therefore needs an
  input FIFO in front.
- **Pixels are 8 bits.** The original mentions up to 9 bits in one place;
  the scaler is defined for 8-bit images.
- **This design's own choices** (the original leaves them open):
  - instruction bit layout;
  - register map;
  - result word layout;
  - Lanczos tap values;
  - edge replication;
  - the rounding of scale sizes, chosen because it reproduces the published
    scale widths;
  - the placement of work in the 14 pipeline stages;
  - round-robin merging;
  - the alternation of the lent port-B cycle between the writer and the
    scaler.
- **Not built.** Non-maxima suppression and everything after it belong to
  the host software. The host CPU and the camera are outside the design.
- **Timing not checked.** The 200 MHz clock of the original was not checked;
  no FPGA timing analysis was done.

## Files

- `rtl/sme_pkg.sv`: shared sizes, instruction and result structs, the Lanczos
  weight table, size rounding.
- `rtl/sme_cascade.sv`: top level, N engines in a chain plus the result merge.
- `rtl/sme_detector.sv`: one engine. It wires the blocks below and holds the
  port-B arbitration, the job queue and the result FIFOs.
- Engine blocks:
  - `sme_stripe_mem`: the stripe;
  - `line_writer`: image input;
  - `scale_unit` and `lanczos_kernel`: scaling;
  - `scale_out_stream`: downscaled output;
  - `line_scheduler`: scheduling;
  - `position_gen`: window positions;
  - `detect_pipeline` and `feature_extract`: the pipelines;
  - `table_mem`: program, threshold and alpha RAMs;
  - `axil_config`: configuration port;
  - `stream_merge`: result merge;
  - `sync_fifo`: FIFO.

## Simulating

Every testbench is self-checking, stops itself with a watchdog, and prints
`TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/sme_pkg.sv rtl/*.sv tb/tb_sme_cascade.sv \
          tb/cascade_check.sv --top-module tb_sme_cascade -Mdir obj && obj/Vtb_sme_cascade
```

(Listing `rtl/sme_pkg.sv` first keeps the package ahead of its users.) For
any other testbench, replace the last two file names with `tb/<name>.sv`.

- **`tb_sme_cascade_full`** sends one complete 1280×720 frame through the
  default two-engine cascade. It uses the 4 + 16 scale split above, 24×24
  windows and a random 32-long LRD classifier. About 609 000 detections are
  compared one by one with a reference model written in the testbench, which
  independently rebuilds the pyramid and runs the classifier on every
  window. It takes about 11 M clock cycles and a little over a minute of
  simulation.
- **`tb_sme_cascade`** is the same check on a 48×36 image over two frames.
- Both count how often each mechanism happened, and fail if one never did:
  - rejection and acceptance;
  - port-B cycle lent away;
  - input line gating;
  - scaling into the stripe and into the output stream;
  - traffic over the cascade link;
  - result back-pressure;
  - both pipelines executing together.
- **`tb_sme_detector`** checks one engine on its own, including every pixel
  of its downscaled video output and the rate of at least 1.70 weak
  classifiers per clock while both rings are full.
- The remaining testbenches check one block each against models written
  inside the testbench. These include the one-pass-per-weak-classifier
  latency of the ring (14 cycles), the two-positions-per-clock position
  generator, the bank mapping of the stripe memory over all 32 lines, and
  the no-overwrite rule of the scheduler.
