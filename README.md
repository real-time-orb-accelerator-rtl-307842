# Streaming ORB feature extractor

This RTL finds ORB features (oriented FAST corners with rotated BRIEF
descriptors) in a live video stream. It takes one pixel per clock and uses no
frame buffer. Each pixel passes through a fixed chain of line buffers and
windows:

- a FAST-9 corner test with 3×3 non-maximum suppression;
- a 7×7 Gaussian smoothing filter;
- an orientation unit that assigns each corner one of N discrete angle sectors;
- a 256-bit steered BRIEF encoder.

A second pyramid level, built by 2:1 averaging, repeats the same chain at half
resolution. The features of both levels are written to a memory that a
processor reads over AXI4-Lite, together with a few control and status
registers.

Default configuration:

- 640×480 frames;
- 2 pyramid levels;
- 32 orientation sectors (16 and 64 are parameter options);
- up to 1024 features per frame.

At one pixel per clock, a 640×480 frame takes 307,200 cycles. That is 3.07 ms
at 100 MHz, which leaves ample margin for 60 frames/s. The last feature of a
frame is written before the frame's last pixel has arrived or shortly after.
In the full-size test, with 16 blanking cycles per line, it was written
315,094 cycles (3.15 ms at 100 MHz) after the first pixel.

## Block structure

```
vid RGB ─► rgb2bw ─┬─► orb_scale (level 0, 640x480) ─────┐
                   └─► image_scaler ─► orb_scale (level 1, 320x240) ─┤
                                                       feature_arbiter
                                                              │
                         AXI4-Lite ◄─► axi_regs ◄─► feature_memory
```

Each `orb_scale` contains the following:

```
grey ─► fast_corner (LB7, WB7, FAST-9, score, LB3, WB3, fast_nms) ─► feat_fifo ─┐
   └─► gaussian_smooth (LB7, WB7) ─► orientation (LB31, moments, sector) ─► coordinator ─► rbrief
                                            └──── 31-pixel columns ─────────────────────────┘
```

| file | role |
|---|---|
| `orb_pkg.sv` | Shared constants and the feature record type. Also holds the elaboration-time sine/tangent functions and the BRIEF pattern generator. |
| `rgb2bw.sv` | RGB to 8-bit grey conversion, using Y = (77R + 150G + 29B + 128) >> 8. Also counts the raster position of each pixel. |
| `line_buffer.sv`, `window_buffer.sv` | Line buffer that stores the previous lines and presents one column per pixel. The window buffer is a K×K register window fed by that column. |
| `image_scaler.sv` | 2×2 mean of the input, truncated. It emits one pixel per block, at odd x and odd y. |
| `fast_corner.sv`, `fast_nms.sv` | FAST-9 test and corner score, followed by 3×3 non-maximum suppression. |
| `gaussian_smooth.sv` | 7×7 integer Gaussian filter with σ = 2. |
| `orientation.sv` | 31×31 intensity moments, quadrant and sector. |
| `feat_fifo.sv` | Per-level queue of corners that are still waiting for their orientation. |
| `coordinator.sv` | Pairs each queued corner with the orientation stream and starts the encoder. |
| `rbrief.sv`, `brief_window_mem.sv` | Steered BRIEF encoder, which tests 3 pairs per cycle. |
| `orb_scale.sv` | One pyramid level. |
| `feature_arbiter.sv` | Round-robin merge of the levels into the memory write port. |
| `feature_memory.sv` | Per-frame feature store. |
| `axi_regs.sv` | AXI4-Lite slave. |
| `orb_top.sv` | Top level. |

Coordinates travel with every sample through all pipelines. No block relies on
a fixed latency relationship with another block.

## FAST-9 detection

Each pixel is compared with the 16 pixels of the radius-3 Bresenham circle
around it. A circle pixel counts as brighter if it is above c + t, and as
darker if it is below c − t. The threshold t is 8 bits wide and can be changed
at run time through a register.

To avoid a sequential search, both 16-bit masks are ANDed against the 16
rotations of a 9-ones bitmap. The pixel is a corner if any of these
comparisons matches.

The score is the sum of |p − c| over all 16 circle pixels, so it is 12 bits
wide. Non-corners get a score of zero.

### Non-maximum suppression

NMS keeps a corner only if it beats its 8 neighbours. Equal scores are broken
by raster order. A corner must be strictly greater than the 4 neighbours that
come before it, and at least equal to the 4 that come after it. As a result,
exactly one corner survives from a plateau.

### Border

Corners within 18 pixels of the image border are not reported. That margin is
the 15-pixel patch radius plus the 3-pixel smoothing radius. Every reported
corner therefore has a complete smoothed 31×31 patch.

## Smoothing

The 7×7 kernel is the outer product of w = [5 10 14 16 14 10 5]. The values of
w are round(16·exp(−d²/8)) for d = −3..3, and the 2-D sum of the kernel is 5476.

The weighted sum is normalised by multiplying it by 766 and shifting it right
by 22 bits, then clipped to 255. All multiplications are by constants.

The smoothed stream drives both the orientation unit and the descriptor
window. The corner test uses the raw pixels.

## Orientation without an arc tangent

The hardest part of the design to follow is the orientation unit, so this
section covers it in detail.

### Incremental moments

The orientation of a patch is the direction of its intensity centroid:

    m10 = Σ x·I,  m01 = Σ y·I,  over x, y ∈ [−15, 15]

Computing these sums over 961 pixels for every pixel position would cost too
much. Instead, a 31-line buffer delivers the 31 pixels of a new column on
every cycle, and only two column sums are computed:

- C = Σ I, the plain sum of the column;
- D = Σ y·I, the sum weighted by y.

The patch sum S and the two moments are then updated incrementally when
column C_in enters on the right and column C_out leaves on the left:

    m01' = m01 − D_out + D_in
    m10' = m10 − S + 16·C_out + 15·C_in
    S'   = S − C_out + C_in

The m10 update holds because moving the window one column to the right lowers
the x of every remaining column by 1. The 31 most recent (C, D) pairs are kept
in a shift register, so C_out and D_out are available without recomputation.
The unit has a 3-stage pipeline: column sums, moment update, and sector.

### Quadrant and sector

The signs of m10 and m01 give the quadrant q. Within the quadrant, u is the
moment component along the quadrant's first axis and v is the component across
it. In quadrants 1 and 3 the roles of u and v swap.

Each quadrant is divided into M = N/4 sectors. Their boundaries lie at
b_i = (i − ½)·90°/M, so the sector centres fall on multiples of 90°/M. This
makes 0°, 90°, 180° and 270° exact angles, for which the pattern rotation
needs no approximation.

A priority encoder finds the first boundary b_i for which u·tan(b_i) ≥ v·2¹²
holds, i.e. how many of the M boundaries the angle has passed. This count k is the sector index within the quadrant. The full
sector is (q·M + k) mod N. Because of the modulo, angles just below 360° wrap
around to sector 0, and k = M carries into the next quadrant.

The tangent table has 12 fraction bits and is computed at elaboration by an
integer Taylor series. Nothing in the unit needs floating point.

The outputs are o_q, the quadrant, and o_theta, the sector index k. Together
they make up the `sector` field that is stored with each feature.

## Steered BRIEF encoder

### Test pattern

The descriptor has 256 bits. Bit i is 1 when I(a_i) < I(b_i) on the smoothed
image. All pattern points lie inside a circle of radius 15, so rotating a
point never moves it out of the 31×31 patch.

The pattern is generated from an integer hash of the pair index (`orb_pkg`):

- x is uniform over [−15, 15];
- y is uniform over [−ymax, ymax], where ymax = ⌊√(225 − x²)⌋.

This is *not* the learned pattern that OpenCV's ORB uses. Descriptors from
this RTL can be matched against each other, but they are not bit-compatible
with software ORB. To change the pattern, replace `pattern_coord`.

### Pre-rotated pattern table

For each of the N sectors, all 256 pairs are rotated at elaboration into a
constant table, which the sector then indexes. Rotation by whole quarter turns
is exact. The remaining angle of k·90°/M is applied with the Q30 sine and
cosine, and the result is rounded to the nearest pixel.

### Window memory and timing

The encoder keeps the last DEPTH = 128 smoothed columns in three identical
circular memories (`brief_window_mem`). Each memory has:

- one 248-bit write port, for a 31-pixel column;
- two synchronous read ports.

This gives six pixels, or three pairs, per cycle. A descriptor therefore takes
⌈256/3⌉ = 86 read cycles. Each cycle's three result bits are merged into the
descriptor under a 3-bit mask that moves up by three positions per cycle.

`start` must be asserted in the same cycle in which the patch's newest column
is written. The timing from a start in cycle T is:

- reads occur in cycles T+1 to T+86;
- the encoder is ready again in cycle T+87;
- `o_valid` pulses in cycle T+88.

Because the memory is 128 columns deep, a patch stays intact for 97 further
column writes. That covers the 88 cycles at any input rate.

## Pairing corners with orientations; the busy-drop policy

A corner is found by the time its centre pixel has passed the 3-line NMS
window. Its smoothed 31×31 patch, however, is complete only 15 lines (plus the
smoothing delay) later. Corners therefore wait in `feat_fifo`, which holds
{x, y, score} and has a default depth of 64 per level.

The orientation unit produces a sector for every pixel position, in raster
order. The `coordinator` compares that stream with the head of the FIFO, and
acts in one of three ways:

- **Launch.** When the positions are equal and the encoder is ready, the
  corner is launched with its sector. This happens in the same cycle in which
  the patch's last column enters the window.
- **Busy drop.** When the positions are equal but the encoder is still working
  on an earlier corner, the corner is dropped and counted. There is a single
  encoder per level, so two corners less than 87 pixels apart in raster order
  cannot both be described. In dense texture this is the main loss of
  features, and it is visible in the BUSY_DROPS register. An alternative would
  be a larger window memory with a queue of pending starts. That design would
  then need a second encoder, or a guarantee that the corner rate stays below
  one corner per 87 pixels.
- **Stale.** A queued corner that the stream has already passed is discarded
  and counted in STALE. This cannot happen while the pipeline runs normally,
  so the counter serves as a health check.

Overflows of a full FIFO are counted in OVERFLOWS, as are those of the
arbiter's one-entry hold registers.

## Feature memory and register map

The memory uses a single buffer. At every start of frame:

- the count of the previous frame is latched into LAST_COUNT;
- the frame counter advances;
- writing restarts at entry 0.

The first 18 lines of a frame produce no features. Software therefore has
about 18 line times to read the previous frame before entries are overwritten.
For a larger margin, make the buffer double-buffered. Writes beyond MAX_FEAT
entries are counted in LOST.

AXI4-Lite map (32-bit words; unmapped addresses read as 0; all responses are
OKAY):

| address | name | content |
|---|---|---|
| 0x00 | CTRL | bit 0 enable (reset 1). While it is 0, pixels are ignored. |
| 0x04 | THRESH | [7:0] FAST threshold (reset 20). Read/write. |
| 0x08 | FRAME | [15:0] frames started |
| 0x0C | LAST_COUNT | features stored for the previous frame |
| 0x10 | COUNT | features stored so far in this frame |
| 0x14 | LOST | features discarded because the memory was full |
| 0x18 | BUSY_DROPS | corners dropped because an encoder was busy |
| 0x1C | OVERFLOWS | corners lost in a FIFO or in the arbiter |
| 0x20 | STALE | queued corners passed by the stream |
| 0x24 | LAUNCHED | descriptors started |
| 0x10000 + 64·i + 4·w | feature i, word w | see below |

Each feature occupies 16 words:

| word | content |
|---|---|
| 0–7 | descriptor bits [32w+31 : 32w] |
| 8 | {scale[1:0], 0, y[8:0], 10'b0, x[9:0]} |
| 9 | {14'b0, sector[5:0], score[11:0]} |
| 10–15 | zero |

Coordinates are given in the pixel grid of the feature's own pyramid level.
Multiply them by 2^scale to get full-resolution coordinates.

`frame_irq` pulses once per frame start, after LAST_COUNT has been updated.

## Where the design departs from, or goes beyond, its source description

The following points either fill gaps in the source description or differ
from it on purpose:

- **Column memory.** The window memory stores a full 248-bit column per word,
  which is read by two ports and replicated three times. The source describes
  four dual-port memories with 32-bit words. That arrangement cannot hold 31
  bytes per column, so the wider word was used instead.
- **Test pattern.** The BRIEF pattern is generated by this design (see above).
- **FAST threshold.** One run-time threshold t serves both tests (+t and −t).
  Separate brighter and darker thresholds would be a small change in
  `fast_corner`.
- **Sector layout.** Sectors span the full circle, N/4 per quadrant, and are
  centred on multiples of 90°/M.
- **Own choices.** The source does not specify the following, so they are
  choices made here:
  - grey conversion weights;
  - rounding in the scaler;
  - the Gaussian integer weights;
  - the NMS tie rule;
  - the 18-pixel border;
  - FIFO and memory sizes;
  - the busy-drop policy;
  - feature-memory layout;
  - the register map;
  - the enable bit and event counters.
- **Pixel input.** The video input is a bare valid / start-of-frame / RGB
  stream. The HDMI receiver, the processor, its interconnect, and the software
  that publishes the features are not part of this RTL.
- **Sector settings.** All three sector counts have been simulated end to end:
  16 and 64 with the two-level 160×120 test against the software model (change
  `N` in `tb_orb_top`), and 32 at full size. The 64-sector full-size run has
  not been simulated.
- **Clock rate.** No clock rate has been established for this RTL.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/orb_pkg.sv tb/orb_ref_pkg.sv tb/tb_orb_top.sv --top-module tb_orb_top
./obj_dir/Vtb_orb_top
```

Replace `tb_orb_top` with any other `tb_<block>` to test that block. The main
testbenches are:

- `tb_<block>`: block-level tests against values computed independently in the
  testbench. `tb_rbrief` also checks the 88-cycle latency and the 87-cycle
  restart.
- `tb_orb_scale`: one 128×96 pyramid level on a synthetic scene, compared
  feature by feature with a software model. The model, `tb/orb_ref_pkg.sv`,
  implements FAST, NMS, smoothing, moments and rotated BRIEF, using real
  arithmetic for the rotation.
- `tb_orb_top`: two levels at 160×120 with 16 sectors. It checks every stored
  feature against the model and every register over AXI. It also requires that
  each of the following happens at least once: corners, suppressed corners,
  busy drops, features from both levels, all four quadrants, a lower count
  after a threshold change, and disabling the input.
- `tb_orb_top_full`: the top at its default parameters (640×480, 2 levels,
  32 sectors). It processes two frames, with thresholds 20 and 40 set over AXI,
  and then disables the input. It also checks that the last feature is written
  within 320,000 cycles of the frame's first pixel. It takes a few seconds to simulate and about
  half a minute to build.

## Parameters

Top-level parameters of `orb_top`:

| parameter | default | meaning |
|---|---|---|
| W, H | 640, 480 | frame size. x is 10 bits and y is 9 bits wide, so the frame can be at most 1024×512. |
| NSC | 2 | pyramid levels, at most 4 |
| N_SECT | 32 | orientation sectors. Must be a power of two from 8 to 64. |
| MAX_FEAT | 1024 | feature memory entries |
| FIFO_DEPTH | 64 | corner queue per level |
| WIN_DEPTH | 128 | descriptor window columns. Must be at least 31 + 88. |
| ADDR_W | 17 | AXI address width |
