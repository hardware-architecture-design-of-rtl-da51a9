# H.264/AVC baseline codec engines

An H.264 encoder has to run several very different algorithms on every macroblock (MB):
integer motion estimation (IME), fractional motion estimation (FME), intra prediction with
its reconstruction loop (IP), entropy coding (EC) and deblocking (DB). If all of them run in
one prediction stage, the stage is long and the hardware is poorly used. This design splits
the work into a **four-stage MB pipeline** (IME | FME | IP | EC+DB), so that four consecutive
MBs are in flight at once. Its centre is a **parallel full-search IME** that checks eight
candidate positions per cycle, gives the SADs of all 41 sub-blocks of the MB for each of them,
and reuses reference pixels at three levels so that external bandwidth stays low.

The decoder half uses **hybrid pipelining**. Parsing, inverse transform, intra prediction and
reconstruction move one 4x4 block at a time, so the buffers between them hold one block.
Inter prediction works on whole MB partitions, because then the reference pixels shared by
neighbouring 4x4 blocks can be read once. A **motion-compensation engine** reads exactly the
interpolation window each partition needs.

Everything is synthesizable SystemVerilog in `rtl/`, with one module per file. The
self-checking testbenches are in `tb/`.

## What is built and what is a port

| Part | Module | State |
|---|---|---|
| Codec top: encoder and decoder side by side | `h264_codec_top` | built |
| Encoder pipeline | `h264_enc_core`, `mb_pipe_ctrl` | IME and intra predictor inside; FME, EC, DB are handshake ports |
| Integer ME | `ime_engine` and `ime_sad_tree`, `ime_ref_array`, `ime_mv_cost`, `ime_cmp_tree`, `ime_sw_mem`, `ime_sw_loader` | built |
| Intra predictor generator | `intra_pred_gen` | built (I4, I16, chroma; all modes) |
| Decoder path | `h264_dec_core` | 4x4 block path and inter MB path; no CAVLD, no deblocking |
| Parser pieces | `expgolomb_dec`, `intra_mode_pred`, `mv_pred` | built |
| Residual | `iqit_engine`, `sum_clip` | built; no Hadamard DC path |
| Motion compensation | `mc_engine`, `mc_ip_unit` | built |
| Shared types | `h264_pkg` | pixel type, `mv_t`, 41-block index map, helper functions |

The stages and engines that have no design here appear as ports of the top, prefixed
`enc_` or `dec_`. These are FME, entropy coding, deblocking and CAVLD, plus the frame-memory
buses. In the encoder, the FME and EC/DB stages are each a start pulse with an MB number and a
done pulse back. The FME stage also receives the 41 integer MVs and costs. The decoder takes
already-decoded levels at its block port.

Conventions used everywhere:
- Pixels are 8-bit unsigned (`pixel_t`).
- A motion vector is `mv_t`, two signed 16-bit fields. Quarter-pixel units are used for
  predictors, for the MVs written back to the IME and for the decoder. The IME's own search
  results are in whole pixels.
- The 41 block sizes of an MB use one index map (`h264_pkg`):
  - 0..15: the 4x4 blocks, in raster order.
  - 16..23: 8x4; 24..31: 4x8; 32..35: 8x8.
  - 36, 37: 16x8; 38, 39: 8x16; 40: 16x16.
- Memory reads use the same handshake throughout. The engine raises a request with x/y pixel
  coordinates. A request is accepted in any cycle when `ready` is high. The pixel comes back
  one cycle after acceptance.
- Resets are asynchronous and active low. Memories built as arrays are not reset.

## Encoder: four-stage macroblock pipeline

`mb_pipe_ctrl` divides time into slots. In slot `t`, stage `s` works on MB `t-s`. At the
start of a slot, every stage that has an MB gets a start pulse. The slot ends only when all
of those stages have reported done, so the slowest stage sets the pace. `wait_cycles` counts
the cycles in which some stages were finished and waiting for the others. A frame of `N` MBs
takes `N+3` slots, including pipeline fill and drain. `frame_done` pulses after the last slot.

`h264_enc_core` gives the stages their work:
- **IME stage.** The stage reads the 16 rows of the current MB over the system bus
  (`sys_*`, one 16-pixel row per cycle). It then starts `ime_engine`, which reads reference
  pixels over the local bus (`loc_*`).
- **FME stage.** At its start, the stage latches the IME's 41 MVs and costs for its MB and
  presents them on `fme_imv` / `fme_icost`, together with a `fme_start` pulse.
- **IP stage.** `intra_pred_gen` produces the 16x16 luma prediction in the mode given on
  `ip_mode`, streamed out four pixels per cycle. At the end of the stage, the two bottom MVs
  of the MB (`ip_mv_left`, `ip_mv_right`) are written into the IME's upper-MV memory.
- **EC/DB stage.** The core only sends the start pulse and waits for done.

MBs go in raster order. The MVs that an MB in the next row needs are written back in the IP
stage, two slots after that MB's IME. This only works if the frame is at least 4 MBs wide.

## Integer motion estimation

This is the largest and least obvious part, so it gets the most room here.

### Search and cost

Full search covers the range `[-sr_h, sr_h-1] x [-sr_v, sr_v-1]` around the co-located
position. The maxima are `SRH = 64` and `SRV = 32`, which is H[-64,+63] V[-32,+31]. A
smaller range can be chosen per MB, for example 32/16 for reference frames other than the
first. Two simplifications cut the SAD hardware:
- Pixels are **truncated to 5 bits** (`PIX_BITS`).
- Only the pixels with `x+y` even are compared (**half subsampling** in a checkerboard,
  `SUBSAMPLE`).

The cost of a candidate is its SAD plus `lambda * (len(mvd_x) + len(mvd_y))`. Here `len` is
the length of the signed Exp-Golomb code, and `mvd` is the candidate MV minus the predictor,
both in quarter pixels.

The predictor is the **modified MVP**. It is the same for all 41 blocks: the component-wise
median of MV0, MV1 and MV2, the MVs of the upper-left, upper and upper-right MBs. The
standard predictor depends on the left neighbour, which is still being searched in the
pipeline. The modified MVP removes that dependency, so all 41 blocks can be decided in
parallel. The three MVs are read from a small upper-MV memory with one entry per MB column
(`MAX_MB_W = 80`). Each entry holds the bottom-left and bottom-right MVs of the MB above:
- MV0 is the right-hand MV of MB `x-1`.
- MV1 is the left-hand MV of MB `x`.
- MV2 is the left-hand MV of MB `x+1`.
- A neighbour outside the frame counts as zero.

### Three levels of reference-data reuse

1. **MB level: search-window memory** (`ime_sw_mem`, `ime_sw_loader`). The window is
   `(2*SRH+16)` columns by `(2*SRV+15)` rows: 144 x 79 at the defaults. Frame column `x` is
   kept at memory column `x mod 144`.
   - For the first MB of a row, the loader fetches the whole window except one column.
   - For every later MB, it fetches only the 16 new columns on the right. These overwrite
     the 16 columns that fell out on the left.
   - Coordinates outside the frame are clamped, which gives the standard edge padding
     without any off-chip work.
2. **Between candidates: reference register array** (`ime_ref_array`). Each cycle, one
   23-pixel row segment is read from the window memory. It enters the top of a 16 x 23
   register array while the other rows move down. The array always holds a 16 x 23 patch,
   and candidate `k` (0..7) is the 16 x 16 block starting at column `k`. Eight candidates
   therefore need `256 + 16*7` pixels rather than `8*256`, and moving down one position
   costs one new row.
3. **Within a candidate: 4x4 SADs reused** (`ime_sad_tree`). Each of the eight PE arrays
   forms the absolute differences of its candidate. Sixteen 2-D adder sub-trees sum them
   into 4x4 SADs. A VBS tree adds those up into the 8x4, 4x8, 8x8, 16x8, 8x16 and 16x16
   SADs. All 41 are ready in the same cycle, and no partial sums are stored.

### Scan order and timing

The horizontal range is cut into groups of eight candidate columns. For each group, the
engine pushes window rows from the bottom of the vertical range upwards. After 16 pushes,
the lowest vertical position is complete, and each further push completes the next one.
`ime_mv_cost` gives the eight rate terms, and the 41 eight-input comparator trees
(`ime_cmp_tree`) then update the 41 best costs and MVs.

Ties go to the earlier candidate: the lower column within a group first, then the earlier
cycle.

One search takes `(2*sr_h/8) * (2*sr_v + 15) + 6` cycles from the end of window loading to
`done`. At the default range that is `16 * 79 + 6 = 1270` cycles. Loading takes one cycle
per pixel plus bus stalls:
- `143 * 79 = 11297` pixels for the first MB of a row.
- `16 * 79 = 1264` pixels for every other MB.

`sr_h` must be a multiple of 8. At the end of the search, the 41 MVs are stored per
reference index (`int_mv`, four sets), and `best_mv` / `best_cost` hold the last search.

## Intra predictor generator

`intra_pred_gen` has four processing elements (PEs), each producing one predicted pixel per
cycle, so each cycle gives one row of four pixels. The same adders serve every prediction
mode in four configurations:

| Configuration | Modes | How |
|---|---|---|
| bypass | V/H of I4, I16 and chroma | the boundary pixel is passed through |
| accumulation (cascade) | DC of I4, I16 and chroma | each PE sums four boundary pixels into its register; the four sums are added and rounded |
| normal | I4 modes 3..8 | each PE picks four operands, repeating a pixel to weight it, and outputs `(o0+o1+o2+o3+2)>>2` |
| recursive | I16 and chroma plane | each register holds an unscaled plane value; every cycle it adds gradient `b` (next four columns) or `c` (next row) instead of multiplying |

Latency from `start` to the first row:
- 1 cycle for bypass and normal.
- 2 cycles for I4 or chroma DC, and for plane.
- 3 cycles for I16 DC.

Then one group of four pixels follows per cycle: 4 for a 4x4 block, 64 for 16x16 and 16 for
chroma. `out_y` and `out_xq` give the position. The plane parameters `a, b, c` are computed
in a set-up cycle.

## Decoder: hybrid pipelining

`h264_dec_core` has two paths:
- **4x4 block path.** A block arrives (`blk_valid` / `blk_ready`) with its 16 levels in
  zig-zag order, its QP and, if intra, its mode syntax and neighbour pixels.
  `intra_mode_pred` resolves the mode from the prev/rem syntax and the neighbours' modes.
  `iqit_engine` dequantises and inverse-transforms the levels in one cycle, while
  `intra_pred_gen` builds the prediction. `sum_clip` adds and clips the two.
  - For an inter block, the prediction is read from the Inter-Predicted MB Buffer (16x16).
  - An intra block takes 7 cycles (8 for DC); an inter block takes 4.
- **Inter MB path.** A partition arrives (`inter_start`) with its position, size, MV
  difference and the MVs and reference indices of neighbours A, B, C and D.
  - `mv_pred` gives the standard predictor: the median, the single-matching-reference rule,
    and the 16x8 / 8x16 direction rules.
  - The partition's MV is the predictor plus the difference.
  - `mc_engine` fills the partition's area of the MB buffer.
  - All partitions of an MB are predicted before its residual blocks are summed.

`expgolomb_dec` decodes one unsigned or signed Exp-Golomb code per cycle from a 32-bit
left-aligned window and returns the code length. It has its own ports.

### Motion compensation with window reuse and classification

Done naively, every 4x4 block reads a 9x9 integer window, because the 6-tap filter needs
2 pixels on one side and 3 on the other. `mc_engine` avoids this in two ways:
- **Window reuse.** The windows of the 4x4 blocks of one partition overlap. The engine reads
  the union window of the whole partition once into a 21x21 window buffer.
- **Window classification.** The control FSM sizes that window from the MV fraction: `X+5`
  columns only if the horizontal fraction is non-zero, `X` otherwise, and the same for rows.
  A 4x4 block with an integer horizontal MV therefore reads 4x9 pixels.

The 4x4 blocks then go one per cycle through `mc_ip_unit`. It computes the half-pel samples
with the `(1,-5,20,20,-5,1)` filter, the centre sample from the intermediate values, and the
quarter-pel samples as rounded averages, all exactly as the standard specifies.

A partition of `W x H` window pixels and `n` 4x4 blocks takes `W*H + n + 3` cycles without
bus stalls. In the MC testbench's random mix, the engine read 12270 pixels where
9x9-per-block reading would need 31185: 61 % less.

## Verification

Each block has a self-checking testbench, `tb/<module>_tb.sv`. Each one compares the block
with a model written independently in the testbench, prints
`TB_RESULT checks=N failures=M` and has a watchdog. The models live in the package
`tb/h264_tb_ref.sv`:
- a frame with clamped access;
- H.264 quarter-pel sampling;
- a 16x16 full search with the same cost rule and scan order;
- the I4 predictor equations;
- dequantisation and the inverse transform.

`tb/codec_tb_body.sv` is the end-to-end test of `h264_codec_top`. It encodes a 64x32 frame
(4x2 MBs) whose current picture is the reference shifted by (3,-2) plus noise:
- Bus models stall at random. The FME and EC/DB stage models finish after random times, so
  stages wait for each other.
- For every MB, the 16x16 MV and cost handed to the FME stage are compared with the
  reference full search.
- The MVP comes from the MVs the IP stage wrote back for the row above.
- Every 16x16 intra prediction is checked.

In parallel, it decodes:
- Exp-Golomb codes;
- an inter MB of four 8x8 partitions with fractional MVs, then its 16 residual blocks;
- 18 intra 4x4 blocks covering all nine modes.

It counts each mechanism and fails if one never happens: pipeline waits, whole and partial
window loads, bus stalls, MVPs from the row above, each intra mode, inter and intra blocks,
and fractional MVs.

It is run in two ways:
- `h264_codec_top_tb`: search range H[-16,+15] V[-8,+7], for speed.
- `h264_codec_top_full_tb`: every parameter of the top at its default (eight candidates,
  H[-64,+63] V[-32,+31]). It takes well under a minute.

To run one testbench with Verilator (add `tb/h264_tb_ref.sv` for the MC and codec tests):

```
verilator --binary --timing --assert -Wno-fatal rtl/h264_pkg.sv tb/h264_tb_ref.sv \
    tb/codec_tb_body.sv tb/h264_codec_top_full_tb.sv -y rtl \
    --top-module h264_codec_top_full_tb -o sim && ./obj_dir/sim
```

Block testbenches such as `ime_engine_tb` use reduced parameters, for example a search range
of +-16/+-8 on a 64x48 frame. `ime_engine_tb` also checks the cycle count of the search
against the formula above.

## Sizes against the target formats

| Format | Holds | Cycle budget |
|---|---|---|
| Encoder 1280x720, 30 fps, 1 reference frame | yes: 80 MB columns = `MAX_MB_W` | IME at 1270 cycles/MB x 108000 MB/s needs 137 MHz, more than the 108 MHz intended for this format |
| Encoder 720x480, 30 fps, 4 reference frames | width yes; the core searches one reference frame | four references would need about 2416 cycles/MB, 98 MHz against 81 MHz |
| Decoder 2048x1024, 30 fps | yes (12-bit coordinates) | MC of a 16x16 fractional partition: 460 cycles/MB, 113 MHz against 120 MHz; all-4x4 partitions (1360 cycles) do not fit |
| Decoder 176x144, 15 fps at 1.5 MHz | yes | 1010 cycles per MB are available; one 16x16 partition needs about 460 + 64 |

The IME's per-group overhead is 15 rows (79 pushes for 64 vertical positions). This is why
the search is slower than eight candidates per cycle would allow. A scan order that carries
the register array across groups would remove most of it.

## Departures and gaps

- **FME, EC, DB, CAVLD and decoder deblocking are not built.** They are ports.
- **The encoder core searches reference frame 0 only.** `ime_engine` can store four sets of
  41 MVs, but nothing sequences several reference frames.
- **The IP stage only generates the 16x16 luma prediction in a given mode.** Mode decision,
  forward transform and quantisation, the reconstruction loop and chroma MC are outside.
- **Adaptive search-range adjustment is not built.** The range is an input.
- **The Hadamard DC path is missing.** `iqit_engine` handles 4x4 residual blocks only; the DC
  path of I16 and chroma is absent, and the decoder's intra path only predicts 4x4 blocks.
- **The MC engine uses one window buffer.** It replaces a down-shift register array plus a
  horizontal reuse memory. The external reads are the same (each window pixel once per
  partition). Reuse across partitions is not exploited.
- **Some choices are this design's own.** These are the slot handshake of the MB pipeline,
  the IME scan order, the MV cost formula, the checkerboard phase of the subsampling, tie
  breaking and all bus handshakes. Every module's opening comment says which parts follow
  the architecture and which are its own.
- **The encoder needs frames at least 4 MBs wide and sizes that are multiples of 16.**
