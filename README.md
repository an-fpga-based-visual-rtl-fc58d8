# Bloom-suppressing Bayer ISP for machine-vision cameras

Headlights, street lamps and low sun saturate a camera sensor. Lens
reflections then spread that light into a halo around the source. A
conventional image signal processor (ISP) demosaics first and corrects
later, so interpolation has already smeared the saturated energy into
the neighbouring colours. This design applies all gains in the Bayer
domain, before demosaicing. These are the black level, a frame-level
auto-exposure gain and a per-pixel halo-suppression gain, applied in a
single multiply. Demosaicing and one lookup per channel for white
balance and gamma follow.

The pipeline keeps only what a downstream detector or segmentation
network needs. It has no sharpening, denoising, colour matrix or
contrast enhancement. It runs at a fixed latency of about six video
lines.

The SystemVerilog here is synthesizable. By default it is sized for
1920x1080 RAW10 at four pixels per clock.

## Data path

```
 RAW10 x4 ─┬─► Stage 1 bloom_affine ──► Stage 2 demosaic_bilinear ──► bridge ──► Stage 3 awb_gamma_lut ──► RGB888 x4
 (40 bit)  │     9 register stages         5 register stages           1 reg      4 register stages        (96 bit)
           │        ▲ gain, bloom core (once per frame)
           └──► aec_side_channel (histogram during the frame, computation during vertical blanking)
```

| Stage | Module | What it does | Latency (gap-free lines) |
|---|---|---|---|
| 1 | `bloom_affine` | 11x11 box filter, halo detection, local gain 1.0x-0.5x, x global gain, minus black level | 5 lines + 2 beats + 9 cycles |
| 2 | `demosaic_bilinear` | 3x3 bilinear demosaic, adders and shifts only | 1 line + 1 beat + 5 cycles |
| – | bridge (in `isp_top`) | drops the pad byte, 128 → 96 bits | 1 cycle |
| 3 | `awb_gamma_lut` | three 256-entry tables, white balance and gamma 1.6 | 4 cycles |
| side | `aec_side_channel` | percentiles, gain decision, IIR + slew limit | ≈300 cycles after the frame's last beat |

The end-to-end latency is **6 lines + 3 beats + 19 cycles**. That is
2902 cycles at 1080p, or 16.2 µs at 178.6 MHz.

## Stream format

- Every beat carries four horizontally adjacent pixels. Pixel 0, the
  leftmost, sits in the lowest bits.
- Input beats are 4 x 10 bits. Output beats are 4 x 24 bits, each pixel
  `{R,G,B}`.
- `in_valid` marks a beat. The `frame_flags_t` struct `{sof, eol, eof}`
  marks the first beat of a frame, the last beat of a line and the last
  beat of a frame.
- There is no backpressure. Idle cycles may appear anywhere inside a
  frame. The output keeps the same flags.
- **Vertical blanking must last at least 5 lines + 2 beats** (2402 cycles
  at 1080p). The filter stages emit the last rows of a frame by feeding
  themselves dummy beats in the idle cycles after `eof`. They call this
  a flush. A frame that starts during a flush trips an assertion in
  `raster_tracker`.
- The AEC computation (about 300 cycles) also runs inside the blanking.
- `blc_offset[c]` is the black level of CFA channel `c`, in the order R,
  Gr, Gb, B.
- The `BAYER` parameter selects RGGB, GRBG, GBRG or BGGR.

## Stage 1: halo suppression in the Bayer domain

The idea is to compare each pixel with the mean brightness of its 11x11
neighbourhood:

- If the neighbourhood is much brighter than the pixel, the pixel lies
  in a halo and is attenuated.
- If it is not brighter, the pixel passes unchanged.
- A pixel that is itself brighter than the "bloom core" threshold is the
  light source. It is left alone, so the lamp stays visible.

The amount of attenuation scales with the excess. The scale comes from
the scene's 98th percentile, which the AEC supplies.

### Arithmetic

Gains are in Q2.6, so 64 is 1.0x.

```
bloom    = (vsum * 542 + 32768) >> 16          vsum = 11x11 sum of 8-bit luminance; 542/65536 ≈ 1/121
raw8     = raw10 >> 2
excess   = max(0, bloom - raw8)
t        = min(256, (excess * inv_core[core]) >> 8)     inv_core[k] = 65536/k (ROM), k = 0 → 0x1FFFF
g_local  = 64                       if raw8 > core      (light core)
         = 64 - ((32 * t) >> 8)     otherwise           (1.0x at t = 0 … 0.5x at excess ≥ core)
g_comb   = (g_global * g_local) >> 6
out      = clamp(((max(0, raw10 - blc[c])) * g_comb) >> 6, 0, 1023)
```

Each pixel therefore falls into one of four regions:

- **Dark region:** excess = 0, gain 1.0x.
- **Halo:** gain falls linearly from 1.0x to 0.5x.
- **Maximum suppression:** excess ≥ core, gain 0.5x.
- **Light core:** raw8 > core, gain 1.0x.

### Pipeline, four pixels per stage

| Stage | Work |
|---|---|
| S0 | Green fill. A red or blue site borrows the green value of its right neighbour in the same beat, or the left one for the last pixel of the beat. This gives a full-resolution luminance estimate on a side path. |
| S1 | 20-entry luminance shift register (five beats). |
| S2 | Horizontal 11-tap sums, clamped at the left and right edges. Line memory read. |
| S3 | Vertical sum of 11 rows of horizontal sums, clamped at the top and bottom edges. Line memory write. A 5-line delay of the RAW pixel. |
| S4A | bloom, excess. The gain and core for the frame are sampled here, on the frame's first output beat. |
| S4B | t, via the 256-entry `inv_core` ROM and one multiply. |
| S4C | g_local. |
| S5A | g_comb. |
| S5B | Black level and the affine output. |

The line memory holds 10 lines of 12-bit horizontal sums and 5 lines of
RAW pixels. The window is centred on the pixel. Output row r can only
be produced once input row r+5, beat column c+2, has arrived. That is
where the "5 lines + 2 beats" comes from.

The gain and core change only between frames. Every pixel of one frame
sees the same values, even though the AEC updates in the blanking while
Stage 1 is still flushing.

## AEC side channel

`aec_side_channel` taps the RAW input at the entry of the pipeline. It
adds nothing to the data path.

**During the frame:**
- The green pixels go into a 256-bin histogram of raw10>>2, held in four
  banks, one per pixel lane. This is `aec_histogram`: read-modify-write
  with forwarding, so any bin can be hit every cycle.
- All pixels are also counted as over-exposed (> 900) or under-exposed
  (< 64).

**In the vertical blanking:**

1. `S_SCAN` reads the four banks for 256 cycles and clears each bin as
   it goes. It builds the cumulative count and latches p02, p50 and
   p98. Each is the first bin whose cumulative count exceeds 2 %, 50 %
   or 98 % of the green pixels.
2. A 16-cycle restoring divider (`seq_divider`) computes
   `hl_safe = 200*64/p98` and `ue_lift = 32*64/p02`.
3. The decision is taken in priority order. "Effective" percentiles are
   the percentiles multiplied by the current gain (`p*g/64`).

| Decision | Condition | Action |
|---|---|---|
| OE_CUT (1) | over-exposed count > pixels/128 | gain − gain/4, immediately (no filtering) |
| BOTH (4) | clamp and lift conditions together | target = hl_safe (the clamp wins) |
| CLAMP (2) | effective p98 > 225 | target = hl_safe |
| LIFT (3) | effective p02 ≤ 16 | target = min(ue_lift, hl_safe) |
| IDLE (0) | otherwise | target = current gain |

4. The gain moves toward the target by `round((target − gain)/4)`. This
   is an IIR filter whose only state is the previous gain.
5. The step is limited to ±2 codes per frame (2.5 % of the range).
6. The gain is bounded to 16…96 (0.25x…1.5x).
7. The bloom core becomes `p98*200/256`.

All outputs change together, with a one-cycle `update` pulse. After
reset the gain is 1.0x, the core is 199, and the histogram is cleared by
a 256-cycle sweep.

## Stage 2: bilinear demosaic

Each site keeps its own colour and takes the two missing ones from
same-colour neighbours in a 3x3 window:

- At red and blue sites, G is the mean of the four edge neighbours and
  the other colour is the mean of the four diagonals.
- At green sites, the colour of the row comes from the left and right
  neighbours, and the colour of the column from the upper and lower
  neighbours.

Means are rounded, `(s+2)>>2` and `(s+1)>>1`, and the upper 8 of 10 bits
are kept. Borders mirror (index −1 reads index 1), which keeps the Bayer
phase. Two line buffers and a three-beat shift register form the window.
No multipliers are used.

## Stage 3: white balance and gamma in one lookup

Each channel has its own table:

```
LUT_c[x] = round(255 * (v/255)^(1/γ)),   v = min(255, (x * g_c + 32) >> 6)
```

The default gains are R 124/64 = 1.938, G 1.0 and B 100/64 = 1.563, with
γ = 8/5 = 1.6.

The tables are computed at elaboration time by integer constant
functions. Each entry is the largest `y` with
`(2y−1)^NUM ≤ 2^NUM · v^DEN · 255^(NUM−DEN)`, which is the exactly
rounded power law. The search is binary, in 128-bit arithmetic, so no
data file is needed. Changing the
`GAIN_*` or `GAMMA_NUM/GAMMA_DEN` parameters rebuilds them.

## Where this RTL departs from the original description, and why

- **Latency** is 6 lines + 3 beats + 19 cycles, against the stated
  6 lines + 15 cycles. The windows are centred, which costs the 2 + 1
  beats of look-ahead. The register stages are counted as 9 + 5 + 1 + 4.
  The description counts 5 for Stage 1 in its latency sum, although it
  also lists nine Stage 1 stages.
- **Shift register:** the description gives 24 entries. 20 suffice for
  an 11-tap window over 4-pixel beats. Outputs are unaffected.
- **White balance gains:** two values appear. The architecture drawing
  gives 1.938 and 1.563; the limitations discussion gives R 1.28x and
  B 1.48x. The drawing's values are used, because they are exact Q2.6
  codes. Set `AWB_GAIN_R = 82`, `AWB_GAIN_B = 95` on `isp_top` for
  the other pair.
- **BOTH decision:** one listing of the priorities places BOTH below
  CLAMP, where it could never fire. Here it is tested before CLAMP,
  takes the clamp action and is reported as its own code.
- **Slew limit:** ±2 codes is 2.5 % of the gain range, against the
  "about 3 %" described.
- **Left to this design:** the AEC thresholds 225/16, the targets
  200/32, the emergency cut of 25 %, the IIR weight of 1/4 and the
  percentile rule. The description does not give their values.
- **Unused statistic:** the under-exposure count is reported but not
  used by the decision, which follows the described policy table.
- **Frame-level infrastructure is not included.** This covers the MIPI
  CSI-2 receiver and PHY, frame DMA, video timing, AXI4-Stream/HDMI
  output, the ARM processor, clocking and the sensor. The design begins
  at a RAW pixel stream and ends at an RGB pixel stream.

## Verification

Every block has a self-checking testbench in `tb/`. Expected values come
from whole-frame reference models in `tb/isp_ref_pkg.sv`, written
independently of the pipelined RTL. The models are plain loops over the
formulas above, and the gamma is evaluated in floating point.

| Testbench | Size | Checks |
|---|---|---|
| `tb_bloom_affine` | 32x12, 4 frames | every pixel and flag. Latency 5 lines + 2 beats + 9. The dark, halo, maximum-suppression and light-core regions all occur. Idle gaps, black levels, core = 0. |
| `tb_demosaic_bilinear` | 16x8, RGGB and GBRG | every R/G/B, pad byte, flags, mirrored borders, latency 1 line + 1 beat + 5 |
| `tb_awb_gamma_lut` | all 256 codes, two parameter sets | every table entry against floating point, 4-cycle latency |
| `tb_aec_side_channel` | 32x8, 36 frames | percentiles, counters, decision, gain, core after each frame. All five decisions, slew limit, both bounds. Update within 330 cycles. |
| `tb_aec_histogram`, `tb_seq_divider` | – | back-to-back bin hits, scan/clear, reset sweep; quotients, divide-by-zero, 16-cycle timing |
| `tb_isp_top` | 32x16, 12 frames | the whole chain against chained models, with the AEC closing the loop frame to frame. Counts halo, maximum suppression, light core, AEC idle/lift/clamp/both/cut, gain changes, input gaps. Latency 6 lines + 3 beats + 19. |
| `tb_isp_top_full` | 1920x1080, default parameters, 2 frames | all 2,073,600 pixels per frame, AEC status. Latency 2902 cycles. 518,400 cycles per gap-free frame. |

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog. The full-size test takes about 15 s of simulation after
compilation.

To run one, for example the end-to-end test, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_isp_top \
  rtl/isp_pkg.sv tb/isp_ref_pkg.sv rtl/raster_tracker.sv rtl/seq_divider.sv \
  rtl/aec_histogram.sv rtl/aec_side_channel.sv rtl/bloom_affine.sv \
  rtl/demosaic_bilinear.sv rtl/awb_gamma_lut.sv rtl/isp_top.sv tb/tb_isp_top.sv
./obj_dir/Vtb_isp_top
```

## Files

| File | Contents |
|---|---|
| `rtl/isp_pkg.sv` | beat types, flags, Bayer pattern enum, CFA helper functions |
| `rtl/isp_top.sv` | the three stages, bridge and side channel |
| `rtl/bloom_affine.sv` | Stage 1 |
| `rtl/raster_tracker.sv` | row/column tracking and end-of-frame flush for the window stages |
| `rtl/demosaic_bilinear.sv` | Stage 2 |
| `rtl/awb_gamma_lut.sv` | Stage 3 |
| `rtl/aec_side_channel.sv`, `rtl/aec_histogram.sv`, `rtl/seq_divider.sv` | auto-exposure control |
| `tb/isp_ref_pkg.sv` | reference models |
| `tb/tb_*.sv` | testbenches |

## Size

Synthesis of the default 1080p configuration infers these memories:

- about 320 kbit for Stage 1's line memory (10 lines of sums and 5 lines
  of RAW, 480 words each);
- 38 kbit for Stage 2;
- 20 kbit for the histogram;
- 24 kbit for the four copies of each channel's table.

There are roughly 3000 flip-flops.
