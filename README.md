# Two-stage motion compensation unit for a scalable H.264 decoder

This is the inter-prediction (motion compensation) part of a macroblock-pipelined
H.264/AVC decoder with the scalable extension (SVC). It is sized for three spatial
layers decoded together at 60 pictures per second: 352x288 + 720x480 + 1920x1088.
That is 9906 macroblocks (MBs) per picture set, or 594,360 MBs per second. At a
135 MHz clock this leaves **227 cycles per MB** in each pipeline stage.

Motion compensation does too much in one stage to fit that budget: it reconstructs
the motion vectors, fetches the reference samples from external memory, and then
interpolates and reconstructs. The unit therefore splits it into two MB-pipeline
stages that work on consecutive MBs:

```
            MB n+1                                  MB n
   +----------------------------------+     +-------------------------+
   | MVG                              |     | INTERP                  |
   |  mv_gen --> part_fifo -->        |     |  2 x (luma + chroma     |
   |  (nb_mv_buffer) ref_pixel_access |     |       interpolator)     |
   |                 |  21x21 array   |     |  pixel_recon            |
   +-----------------|----------------+     +-----------^-------------+
                     | write half A                    | read half B
                  +--v---------------------------------+--+
                  |      ref_data_buffer (ping-pong)      |
                  +---------------------------------------+
```

* **MVG** (MV generation + reference pixel accessing) reconstructs the MVs of the MB.
  It sends each partition's reference area to memory as row requests. It stores the
  returned samples per 4x4 block in one half of the reference data buffer.
* **INTERP** reads the other half and interpolates every 4x4 block for L0 and L1 at
  the same time. It then adds the residual and outputs the reconstructed block.

The halves swap when both stages have finished their MB. INTERP then starts on the
MB that MVG has just fetched, and MVG takes the next MB.

The design follows the motion compensation architecture in P.-Y. Hsu, *Analysis of
H.264/AVC Scalable Extension Decoder and Its Motion Compensation Design* (NCTU). The
interfaces, the field widths and several internal choices are this implementation's
own. They are listed below.

## Block numbering and data formats

An MB is 16x16 luma with 8x8 Cb and 8x8 Cr (4:2:0). All work is done in 4x4 luma
blocks. Each carries 2x2 Cb and 2x2 Cr with it.

Blocks are numbered in **double-z order**. For block index `{b3,b2,b1,b0}` the 4x4
column is `{b2,b0}` and the row is `{b3,b1}` (`mc_pkg::blk_x/blk_y/blk_idx`). Each
list has indices 0..15; MV generation walks L0 and then L1, 32 steps in all.

MVs are in quarter luma samples: 14 bits horizontal and 12 bits vertical, two's
complement. The chroma MV is the same number read in eighths of a chroma sample.
Chroma fraction = `mv & 7`; luma fraction = `mv & 3`.

Struct fields in `mc_pkg` are declared unsigned. Code that needs the sign first
assigns the field to a signed variable.

## MV generation (`mv_gen`, `mvp_pe`, `nb_mv_buffer`)

`mv_gen` takes one `mb_info_t` per MB. It holds:

* the partition type;
* the sub-partition of each 8x8;
* the lists used per 8x8 (`pred_flag`, bit 0 = L0, bit 1 = L1);
* reference indices per 8x8;
* an mvd per 4x4 block index, used at the first block of each partition.

The MB walks its 32 block indices:

| block | cycles | action |
|---|---|---|
| list not used by its 8x8 | 1 | marked unused (`ref_idx = -1`) |
| first (top-left) block of a partition | 3 | `mvp_pe` forms the predictor from neighbours A, B, C (D replaces C when C is missing), adds the mvd, and sends the partition to the fetch side |
| any other block | 1 | copies the MV of its partition's first block |

`mvp_pe` applies these predictor rules:

* the median;
* the single-matching-reference rule;
* the 16x8 rule (upper partition uses B, lower uses A);
* the 8x16 rule (left partition uses A, right uses C);
* the "only A available" rule.

Neighbours outside the MB come from three places:

* **Above:** `nb_mv_buffer`, one entry per MB column (120 columns) with the bottom row
  of four blocks for both lists. It is read during a 3-cycle preload.
* **Above-right:** the next column's entry in `nb_mv_buffer`.
* **Left and above-left:** registers. The above-left entry has already been
  overwritten in the buffer by the time it is needed, so it is kept from the
  previous MB's preload.

After the walk, the bottom row is written back (1 cycle).

The worst case, sixteen bi-predicted 4x4 blocks, costs 3 + 96 + 1 cycles.
Availability assumes one slice per picture and MBs given in raster order, with every
MB present. Intra MBs are given with all `pred_flag` bits zero.

## Fetching reference samples (`data_request_gen`, `ref_pixel_access`, `part_fifo`)

Partitions reach the fetch side through a 32-entry queue. One MB has at most 32
partitions, so MV generation never waits for the memory.

For a partition of MxN luma samples, `data_request_gen` reduces the fetch in two
ways:

* **Block-size based request:** the whole partition area is fetched once. It is not
  fetched as one 9x9 window per 4x4 block. For 16x16, that is 441 samples instead of
  1296.
* **Precision based request:** the filter margin (2 samples before, 3 after) is only
  fetched in a direction whose MV fraction is non-zero.

| fraction (x, y) | luma area |
|---|---|
| integer, integer | M x N |
| fractional, integer | (M+5) x N |
| integer, fractional | M x (N+5) |
| fractional, fractional | (M+5) x (N+5) |

Chroma is always (2w+1) x (2h+1) per component, where w and h are the partition size
in 4x4 units.

`ref_pixel_access` sends one request per row, one per cycle, in groups. Group g holds
the rows that block row g of the partition still lacks: luma first, then Cb, then Cr.
A request names the first sample and the length of the part of the row that is inside
the picture. The memory answers each request, in order, with up to 21 samples (168
bits).

When a response arrives, it is written into a 21x21 luma register array, or into a
9x9 Cb or Cr array. Array cell `c` of the row takes sample `clamp(x0 + c) - first`.
This rebuilds the standard's edge extension for references that point outside the
picture, without fetching anything twice.

As soon as all rows of a block row have arrived (9 luma rows and 3 chroma rows per
component for its blocks), its 4x4 blocks are written to the reference data buffer,
one per cycle, left to right. Later rows keep arriving meanwhile. Over the partition
the writes are in raster order. Each write holds:

* the 9x9 luma window at array offset (4·by, 4·bx);
* the 3x3 Cb and Cr windows at (2·by, 2·bx);
* the chroma fraction.

Window cells that a block's fraction does not need are not refreshed. The
interpolators never read them.

Time per partition, with R = luma rows + 2·chroma rows: 1 accept cycle and R
request cycles. Block row g is written from the cycle after its last row arrives.
Without back-pressure, the partition ends at least w cycles after the last response.
The next partition is taken after the last write.

## Reference data buffer (`ref_data_buffer`)

The buffer is four memories: luma L0, luma L1, chroma L0 and chroma L1. Each has 16
rows per half, one row per block index, and two halves used ping-pong.

* A luma row is a 9x9 window, 648 bits.
* A chroma row is two 4-bit fractions plus 3x3 Cb plus 3x3 Cr, 152 bits.

In total, 2 x 2 x 16 x 800 bits = 6.25 KB. `swap` toggles the halves. Reads have
one cycle of latency.

## Interpolation and reconstruction (`interp_stage`, `luma_interp`, `chroma_interp`, `fir6`, `pixel_recon`)

`interp_stage` has two identical interpolation units, one per list, so a
bi-predicted block costs no extra interpolation time. It handles each block index
0..15 in turn:

1. read the block's rows from all four memories (the block-index change cycle);
2. run the luma and chroma interpolators of the lists the block uses;
3. run `pixel_recon`, which averages L0 and L1 with rounding if both are used, adds
   the residual and clips;
4. output the block on `rec_valid`.

**`fir6`** is the six-tap filter (1, -5, 20, 20, -5, 1) built from shifts and adds:
`t = 4(C+D) - (B+E)`, `out = clip((A+F + t + 4t + 16) >> 5)`.

**`luma_interp`** produces 4 samples per cycle from the 9x9 window. It has thirteen
six-tap filters and four bilinear averagers:

* **FIR 1-9** filter nine columns of the window for one output row (row mode). They
  give the vertical half samples of that row's neighbourhood.
* **FIR 10-13** filter either a window row directly (horizontal half samples b, s) or
  the registered FIR 1-9 results (the centre sample j).
* **Bilinear 1-4** form the quarter positions from two of: integer samples, first-pass
  results and second-pass results.

Latency depends on the position:

* **5 cycles:** positions that need one filter pass.
* **6 cycles:** j and its four neighbours that average with j.

For f and q (x half, y quarter), the unit switches to *column mode*. The nine
filters then run along rows, so b/s and j come out of the same pass. In that mode
one output column is produced per cycle.

> **j departs from the standard.** j is computed from first-pass values that are
> already clipped to 8 bits, instead of the standard's 15-bit intermediates. This
> simplification is known to cost about 0.01 dB. As a result, j (and the quarter
> samples averaged with it) can differ from a bit-exact decoder by one in rare
> cases. f and q use horizontal intermediates; every other position that uses j
> uses vertical ones.

**`chroma_interp`** computes one Cb and one Cr sample per cycle, in two registered
steps: horizontal weights (8-dx, dx), then vertical weights with +32 >> 6. It takes
5 cycles per block and gives exactly the standard's result.

**`pixel_recon`** takes 2 cycles for one list and 3 for bi-prediction.

Per block, INTERP takes:

> (5 or 6) + (2 or 3) + 1 cycles

That gives **130 to 162 cycles per inter MB**, counting 2 start-up cycles. An intra
MB (no list used) finishes in one cycle and produces no output.

## Top level (`svc_mc_top`)

| port group | signals | meaning |
|---|---|---|
| picture | `pic_w_mbs`, `pic_h_mbs` | size in MBs (up to 120 x 68 with the default buffer) |
| MB input | `mb_valid`, `mb_ready`, `mb` (`mb_info_t`) | one MB description per transfer, raster order, every MB given |
| memory | `mem_req_valid/ready`, `mem_req` (`mem_req_t`: plane, list, ref_idx, x, y, len) | row request, already clamped to the picture |
| | `mem_resp_valid`, `mem_resp_data` (21 samples) | responses in request order, sample 0 = first requested |
| residual | `res_blk` → `resid[24]` | INTERP names the block; the residual source drives 16 Y, 4 Cb, 4 Cr (9-bit signed) in the same cycle |
| output | `rec_valid`, `rec_mb_x/y`, `rec_blk`, `rec[24]` | one reconstructed 4x4 block per pulse, blocks in double-z order |
| status | `mb_done`, `mvg_done`, `cur_mv`, `idle` | INTERP finished an MB; MV generation finished; final MVs of the MB in MVG (for deblocking or inter-layer motion prediction); nothing in flight |

Parameters:

* `MB_COLS = 120`: neighbouring MV buffer columns, for 1920-sample pictures.
* `FIFO_DEPTH = 32`: size of the partition queue.

Pipeline control:

* MVG is finished when MV generation is done, the queue is empty and the fetch side
  is idle.
* The swap (and the start of INTERP) happens in the first cycle in which MVG is
  finished and INTERP is not busy.
* `mb_ready` is high while MVG is free.

Outside the unit: the external memory and its controller, entropy decoding,
inverse quantisation and transform, intra prediction, deblocking and the inter-layer
up-sampling of SVC. Their signals are ports.

## Timing summary

| item | cycles |
|---|---|
| MV prediction, per predicted block | 3 |
| MV generation, worst MB (16 bi-predicted 4x4) | 101 including start |
| luma interpolation per block | 5 (one pass) or 6 (two passes) |
| chroma interpolation per block | 5 |
| reconstruction per block | 2 (one list), 3 (bi) |
| INTERP per inter MB | 130 - 162 |
| fetch per partition | 1 + rows + latency + w (writes overlap later fetches) |
| measured average per MB (random MB mix, 4-cycle memory, back-to-back input) | 169.6 (budget 227) |

The measured average comes from a uniform random mix of MB types. That mix has more
small and bi-predicted partitions than typical video. A single MB made of sixteen
bi-predicted 4x4 blocks takes longer than 227 cycles in MVG. The budget is met on
average, as in the original design.

## Where this implementation departs from the original design

* **One partition at a time in the fetch.** The next partition's requests start
  after the last buffer write of the current one, because the register arrays are not
  double-buffered.
* **INTERP start-up.** INTERP needs 2 start-up cycles: 130-162 cycles per MB, against
  the original's 128-160.
* **Wider neighbouring MV buffer.** Entries are 29 bits (full 14/12-bit MV + 3-bit
  reference index), so the buffer is 3.4 KB instead of about 2.46 KB.
* **Chroma fraction fields are 4 bits** in the buffer, so the buffer totals exactly
  6.25 KB.
* **Not supported:**
  * P-skip and B-direct MV derivation (the mvd and reference indices must be given);
  * weighted prediction;
  * more than one slice per picture;
  * MBAFF and field pictures.
* **Interfaces are this implementation's own:** the memory request/response format,
  the MB input format and the residual interface.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against an
independent model and checks the cycle counts above. Each ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `fir6_tb` | random and extreme taps against the filter sum |
| `luma_interp_tb` | all 16 positions, random windows, values and 5/6-cycle latency |
| `chroma_interp_tb` | all 64 fraction pairs, 5-cycle latency |
| `pixel_recon_tb` | one list / bi, random residuals, 2/3-cycle latency |
| `interp_stage_tb` | whole MBs, every block's output and the per-MB cycle count |
| `ref_data_buffer_tb` | both lists, both halves, ping-pong isolation |
| `mvp_pe_tb` | predictor rules against a model of the standard |
| `nb_mv_buffer_tb` | all 120 columns, partial overwrite |
| `mv_gen_tb` | 5x3-MB pictures against a picture-wide model of neighbour availability; partition stream; cycle counts including the worst case |
| `ref_pixel_access_tb` | 600 random partitions, far-out MVs, request counts and lengths against the area table, window contents, busy time |
| `svc_mc_top_tb` | end to end, 4 pictures of 4x3 MBs |
| `svc_mc_top_full_tb` | end to end, one full 1920x1088 picture (8160 MBs) at default parameters; about 5 s |
| `svc_mc_workload_tb` | 960 back-to-back MBs of a 1920-wide picture against the 227-cycle budget |

The end-to-end tests check every reconstructed sample. The expected value comes from
the final MVs, the edge-clamped reference pictures, the standard filters, the
residual, and the bi-prediction average. The tests also count these mechanisms and
fail if any never occurs:

* every partition and sub-partition shape;
* bi-prediction and intra MBs;
* each fraction class;
* references across the picture edge;
* memory back-pressure;
* MVG running ahead;
* each stage waiting for the other;
* stage overlap.

The external memory is a behavioural model, `tb/ref_mem_model.sv`. Picture contents
are a fixed function of position (`tb/mc_tb_pkg.sv`), so no data files are needed.

To run a test with Verilator:

```
verilator --binary --timing --top-module svc_mc_top_tb \
    rtl/mc_pkg.sv tb/mc_tb_pkg.sv rtl/*.sv \
    tb/ref_mem_model.sv tb/mc_e2e_bench.sv tb/svc_mc_top_tb.sv
./obj_dir/Vsvc_mc_top_tb
```

Unit tests need only `rtl/mc_pkg.sv`, the module under test with the modules it
instantiates, and the testbench. For example, for `luma_interp`:
`rtl/mc_pkg.sv rtl/fir6.sv rtl/luma_interp.sv tb/luma_interp_tb.sv`.

## Files

| file | content |
|---|---|
| `rtl/mc_pkg.sv` | types, widths, double-z helpers |
| `rtl/svc_mc_top.sv` | top level and MB pipeline control |
| `rtl/mv_gen.sv`, `rtl/mvp_pe.sv`, `rtl/nb_mv_buffer.sv` | MV generation |
| `rtl/part_fifo.sv`, `rtl/data_request_gen.sv`, `rtl/ref_pixel_access.sv` | reference fetch |
| `rtl/ref_data_buffer.sv` | ping-pong reference data buffer |
| `rtl/interp_stage.sv`, `rtl/luma_interp.sv`, `rtl/fir6.sv`, `rtl/chroma_interp.sv`, `rtl/pixel_recon.sv` | INTERP stage |
| `tb/*` | testbenches, end-to-end bench, memory model, test helpers |
