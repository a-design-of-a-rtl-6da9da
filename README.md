# Multistandard digital video encoder (NTSC / PAL / PALplus)

This is a fully digital composite video encoder. Its input is component video: gamma-corrected
R'G'B' or Y'CbCr, 8 bits per component, at any of the usual pixel rates from 12.27 to 18 MHz.
Its outputs are S-video luma (Y) and chroma (C), plus the composite signal Y + C. All three are
10-bit codes at twice the pixel rate, ready for a video DAC.

Three ideas shape the architecture:

* **Everything is programmable.** Line timing, sync and blanking levels, and the ratio between
  subcarrier and pixel clock are held in registers. One piece of hardware therefore serves NTSC
  and PAL at any pixel rate.
* **Everything is pipelined.** Each block delivers one result per clock, so the sustained rate is
  one pixel per pixel clock. The multiplier-heavy blocks share hardware to save area. The colour
  matrix reuses three multipliers three times per pixel. Both FIR filters use their symmetric
  responses to halve the number of multipliers.
* **Wide-screen compatibility by letter-boxing.** For PALplus, a 16:9 picture is squeezed
  vertically by 4:3, so it fills three quarters of the lines of a 4:3 screen.

The design follows a published architecture for such an encoder. Where that source gives no
numbers, this implementation chose them. The choices include filter coefficients, register
layout, output scaling and pipeline alignment. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Signal flow

```
                 lb_clk (18 MHz, PALplus only)
 16:9 lines ──► letterbox ──► external frame memory ──► (read back as pixel input)

 pix0..2 ──► input reg ──► matrix ──┬─ Y ──► delay 2 ──► insert ──► interp ──► luma ─┐
 (R'G'B' or                         │                      ▲                          ├─► composite
  Y'CbCr)                           ├─ Cb-128 ► lpf ─┐     │ seg                      │
                                    └─ Cr-128 ► lpf ─┴─► quad_mod ──► interp ──► chroma┘
                                                           ▲  ▲
                            vgen ──► hgen ── seg / burst ──┘  │
                                      └── line_start ──► subgen (sin, cos)
                         enc_regs (timing, levels, p1/p2/p3, mode)
```

| module          | role |
|-----------------|------|
| `video_encoder` | top level; wiring, pipeline alignment, output adder |
| `clk_div`       | pixel-clock enable `ce` = xclk / 2 |
| `enc_regs`      | programmable registers, written while reset is low |
| `letterbox`     | PALplus 4:3 vertical decimation, frame memory write control |
| `line_delay`    | one-line (1H) delay used by `letterbox` |
| `matrix`        | R'G'B' → Y'CbCr with commutated coefficients, or bypass |
| `lpf`           | 5-tap symmetric chroma low-pass filter (two instances) |
| `subgen`        | subcarrier generator: p:q ratio counter, 512 × 7 quarter-wave ROMs |
| `quad_mod`      | quadrature modulator with burst insertion |
| `vgen`          | line counter and line-type decoder |
| `hgen`          | pixel counter and per-pixel segment generator |
| `insert`        | mixes luminance with sync / blank / black levels |
| `interp`        | 2× interpolator, 16-tap symmetric FIR (two instances) |
| `enc_pkg`       | shared types: line types, segments, configuration structs |

## Clocking

The chip is driven by one external clock, `xclk` (20–30 MHz; 27 MHz for 13.5 MHz pixel rates).
The pixel pipeline runs at half that rate. All registers are clocked by `xclk`. Pixel-rate
registers are additionally enabled by `ce` from `clk_div`. `ce` is high in every second `xclk`
cycle. The `xclk` rising edge that ends a `ce = 1` cycle is a **pixel edge**. The interpolators
and the output registers run on every `xclk` edge, which gives the doubled output rate.

The letter-box converter has its own clock, `lb_clk`: 18 MHz with 1152 pixels per line.

## The colour matrix: three multipliers, three passes per pixel

Nine multipliers would compute the 3 × 3 conversion in one step. `matrix` instead has one
multiplier per input component and switches their coefficients within a pixel period. A pixel
period spans four `xclk` half-periods, H0 to H3, counted from the pixel edge:

| half-period | `{ce, qn}` | coefficient row | sum captured on |
|-------------|-----------|-----------------|-----------------|
| H0 (xclk high) | 01 | V (Cr) | falling `xclk` edge |
| H1 (xclk low)  | 00 | U (Cb) | rising `xclk` edge |
| H2 (xclk high) | 10 | Y      | falling `xclk` edge |
| H3 (xclk low)  | 11 | idle   | Y, U, V registered on the next pixel edge |

`qn` is `ce` sampled on the falling edge of `xclk`. Together with `ce` it identifies the
half-period without using the clock as data. The module therefore contains flip-flops clocked on
both edges of `xclk`. A synthesis and timing flow must allow for the half-cycle paths from the
coefficient multiplexers through the multipliers.

The coefficients are CCIR-601 values scaled by 256:

* Y  = 16  + (66 R + 129 G + 25 B) / 256
* Cb = 128 + (−38 R − 74 G + 112 B) / 256
* Cr = 128 + (112 R − 94 G − 18 B) / 256

Each result is rounded and clamped to 0..255. The 75 % colour bars come out within one code of
the standard Y/Cb/Cr tables. With `rgb_in = 0` the matrix is bypassed, with the same one-pixel
latency.

## Letter-box conversion (PALplus)

Every group of four input lines becomes three output lines. Each output line is a weighted sum
of the arriving line (cur) and the line held in the 1H delay (prev):

| line in group | odd field (A B C D) | even field (E F G H) |
|---------------|---------------------|----------------------|
| 1 | A | — (nothing written) |
| 2 | — (nothing written) | (5E + F) / 6 |
| 3 | (2B + C) / 3 | (F + G) / 2 |
| 4 | (C + 2D) / 3 | (G + 5H) / 6 |

The two fields use different weights, so the decimated lines of an interlaced picture keep
their vertical positions. A progressive picture uses the odd-field weights on every line
(`lb_progressive`).

The arithmetic uses only adders and shifts, in three pipeline stages:

1. `s1 = m1 + m2`
2. `s2 = (s1 or 2·s1) + m3`
3. `s3 = s2 + m4`

Each operand `m1`..`m4` is selected from {0, prev, cur}. Every weight is written in this form
over 3 or 6; for example (5E + F)/6 = ((E + E)·2 + E + F)/6. The division by 3 is a
multiplication by 2731/8192, which is exact for every numerator up to 6·255. Dividing by 6 adds
a one-bit right shift.

Output pixels leave on the frame-memory write port. `fm_wr` is high for each written pixel, and
`fm_addr` advances only on writes. The address restarts at the first line of each field
(`lb_field_start`). The frame memory is external. Its read side supplies the encoder's normal
pixel input at the 4:3 pixel rate.

The rows above and below the picture carry a PALplus helper signal. That signal is luminance
only. Pixels marked with `helper_in` (PALplus mode only) skip the matrix and the chroma path, and
go straight to `insert`.

## Chroma path

### Low-pass filters

Cb − 128 and Cr − 128 each pass through `lpf`, a 5-tap filter with the symmetric response
h2 h1 h0 h1 h2 = 8 32 48 32 8 (/128). Samples that share a coefficient are added before the
multiply, so only three multipliers are needed. The output is truncated and saturated to 8 bits.
The latency is two pixel clocks. At 13.5 MHz the response is −0.2 dB at 0.5 MHz, −3.9 dB at
2 MHz and −23 dB at the PAL subcarrier.

### Subcarrier generator

The subcarrier phase is an 11-bit word, where 2048 counts = 360°. On every pixel clock it
advances by `p1 + p2 / (4·HCOUNT)`:

* A modulo-4·HCOUNT accumulator adds `p2`. Its registered carry enters the modulo-2048 phase
  register together with `p1`.
* In PAL mode, a modulo-625 accumulator adds 67 on every pixel. Its registered carry selects
  `p3 = p2 + 1` instead of `p2`. This adds the extra 67/625 count per pixel that PAL's
  fsc = (1135/4 + 1/625)·fH requires.

To program a pixel rate fs with HCOUNT pixels per line, compute inc = 2048·fsc/fs. Then:

* `p1` = integer part of inc
* `p2` = fractional part × 4·HCOUNT (exact for NTSC)
* for PAL, `p2` drops the 67/625 remainder and `p3` = `p2` + 1

Because 4·HCOUNT·inc = 2048·4·fsc/fH does not depend on the pixel rate, the whole
numerator is fixed. For NTSC it is 2048·910 = 1 863 680. For PAL it is
2048·1135 + 13 + 67/625. So p1 = numerator div 4·HCOUNT and p2 = numerator mod 4·HCOUNT;
for PAL, add 13 to p2, and p3 = p2 + 1. These are the values for the supported rates:

| standard | HCOUNT | pixel rate | p1 | p2 | p3 |
|----------|--------|------------|----|----|----|
| NTSC | 780  | 12.27 MHz | 597 | 1040 | 1040 |
| NTSC | 858  | 13.5 MHz  | 543 | 104  | 104  |
| NTSC | 910  | 14.32 MHz | 512 | 0    | 0    |
| NTSC | 1144 | 18 MHz    | 407 | 1248 | 1248 |
| PAL  | 864  | 13.5 MHz  | 672 | 2061 | 2062 |
| PAL  | 944  | 14.75 MHz | 615 | 2253 | 2254 |
| PAL  | 1135 | 17.73 MHz | 512 | 13   | 14   |
| PAL  | 1152 | 18 MHz    | 504 | 2061 | 2062 |

For NTSC 13.5 MHz, the phase returns exactly to its start after 4 lines.

Two offsets are added before the ROM lookup:

* **Active-video offset**, outside the burst only: 1024 for NTSC; for PAL 768 on switched
  lines and 1280 on the others.
* **Compensation value**, on every pixel: 512 on switched PAL lines, otherwise 0.

The active-video phase offset is therefore constant: 1024 for NTSC, 1280 for PAL. The burst
lands at 180° for NTSC, and at 135° / 225° for PAL, alternating line by line. On switched PAL
lines the cosine sign is also inverted, which is PAL's line-by-line V inversion. The PAL switch
toggles at every line start.

The upper two phase bits select the quadrant. The lower nine bits address a 512 × 7 magnitude
ROM; the address is complemented in the falling quadrants. The ROM holds
round(127·sin((a + 0.5)·90°/512)) and is computed at elaboration time.

### Quadrature modulator

`quad_mod` multiplies U by the sine and V by the cosine, and keeps bits [15:8] of each
product. It then weights the two slices separately:

    chroma = ((U·sin)[15:8]·U_GAIN + (V·cos)[15:8]·V_GAIN) / 16

The result is saturated to signed 11 bits.

Two gains are needed because Cb and Cr are not the U and V axes of a composite signal.
U is 0.492 (B′ − Y′) and V is 0.877 (R′ − Y′). Measured against the luma scale, this means Cb
must be weighted by 0.852 and Cr by 1.202. With one common gain, every hue is off by several
degrees; for example, red lands at 108° instead of 103°.

For a luma gain g (codes per Y step, `Y_GAIN`/64):

* U_GAIN = 27.5·g
* V_GAIN = 38.8·g

That gives 76 / 108 for the NTSC levels below and 66 / 93 for PAL.

During the burst, U is replaced by the programmable `BURST_AMP` value and V by 0. The burst then
also passes through U_GAIN. With the values below, the burst is 40 IRE peak-to-peak for NTSC
and 300 mV peak-to-peak for PAL. Outside the picture window and the burst, the top level forces
U and V to zero.

## Sync generation

`vgen` counts lines from 1 to 525 (NTSC) or 1 to 625 (PAL) and decodes each line number into a
line type:

| type | content |
|------|---------|
| VS | two broad (vertical sync) pulses |
| EE | two equalising pulses |
| VE / EV | half broad pulse, half equalising pulse (or the reverse) |
| EB | equalising pulse, then black |
| UBB | sync, burst, black picture |
| UVV | sync, burst, active picture |
| UVE | active first half, equalising second half |
| UBV | black first half, active second half |

The first line of each run of line types:

| standard | transitions |
|----------|-------------|
| NTSC | 1 EE, 4 VS, 7 EE, 10 UBB, 21 UVV, 263 UVE, 264 EE, 266 EV, 267 VS, 269 VE, 270 EE, 272 EB, 273 UBB, 283 UBV, 284 UVV |
| PAL | 1 VS, 3 VE, 4 EE, 6 UBB, 23 UBV, 24 UVV, 311 EE, 313 EV, 314 VS, 316 EE, 318 EB, 319 UBB, 336 UVV, 623 UVE, 624 EE |

`hgen` counts pixels from 0 to HCOUNT−1. For every pixel it produces a segment: blank, sync,
burst, black or active.

* **Normal line:** consecutive segments of lengths FP (blank), SY (sync), BR (blank), BU (burst),
  CBP (blank) and VA (picture), then blank to the end of the line.
* **Broad pulse:** sync from position SL to SH within each half line.
* **Equalising pulse:** sync from EL to EH within each half line.

The half line starts at HCOUNT/2.

`insert` maps the segment to a level. During the picture window of an active line it outputs
`BLACK_LVL + (Y − 16)·Y_GAIN/64`, clamped to 0..1023.

## Interpolation and outputs

Each `interp` instance doubles the sample rate. It inserts a zero after every input sample and
filters the result with a 16-tap symmetric FIR, so eight multipliers are enough. The target was
a 6.5 MHz pass band and a 9.8 MHz stop-band edge at 27 MHz output rate. The chosen taps droop
0.9 dB at 6.5 MHz, are 20.5 dB down at 9.8 MHz and 42 dB down at 11 MHz. The coefficients are

    h0..h7 = 1, 0, −3, 6, 5, −25, 14, 130   (mirrored for h8..h15, shift 7)

The even and the odd taps each sum to 128. A flat input therefore comes out exactly unchanged on
both output phases.

The outputs:

* `luma`: the interpolated luma, clamped to 0..1023
* `chroma`: offset binary, 512 = no colour; the modulator's U_GAIN and V_GAIN already put it
  on the luma scale
* `composite`: luma + chroma, clamped

## Registers

Registers are written through `prog_we` / `prog_addr` / `prog_data`, and only while `rst_n` is
low. They have no reset value: program all of them before releasing reset. Words 0 to 7 form the
horizontal generator's 8 × 24-bit timing and level file, with two 12-bit fields per word.

| addr | bits 23:12 | bits 11:0 |
|------|-----------|-----------|
| 0 | HCOUNT | FP |
| 1 | SY | BR |
| 2 | BU | CBP |
| 3 | VA | SL |
| 4 | SH | EL |
| 5 | EH | SYNC_LVL |
| 6 | BLANK_LVL | BLACK_LVL |
| 7 | Y_GAIN (8 bit) | BURST_AMP (signed, bits 7:0) |
| 8 | — | P1 (11 bit) |
| 9 | P2 (bits 15:0) | |
| 10 | P3 (bits 15:0) | |
| 11 | — | PHASE_ADJ (11 bit) |
| 12 | — | bit 0 PAL_OP, bit 1 RGB_IN, bit 2 PALPLUS |
| 13 | U_GAIN (bits 19:12) | V_GAIN (bits 7:0) |

Values used in the testbench:

| | HCOUNT | FP | SY | BR | BU | CBP | VA | SL | SH | EL | EH | sync | blank | black | gain | burst | U/V gain |
|-|-|-|-|-|-|-|-|-|-|-|-|-|-|-|-|-|-|
| NTSC 13.5 MHz  | 858 | 16 | 64 | 8 | 34 | 16 | 720 | 16 | 382 | 16 | 47 | 16 | 280 | 330 | 178 | 56 | 76 / 108 |
| NTSC 12.27 MHz | 780 | 18 | 58 | 7 | 31 | 20 | 640 | 18 | 351 | 18 | 47 | 16 | 280 | 330 | 178 | 56 | 76 / 108 |
| PAL 13.5 MHz   | 864 | 12 | 64 | 11 | 31 | 26 | 720 | 12 | 381 | 12 | 44 | 16 | 240 | 240 | 153 | 55 | 66 / 93 |
| PAL 14.75 MHz  | 944 | 24 | 69 | 13 | 33 | 38 | 752 | 24 | 427 | 24 | 59 | 16 | 240 | 240 | 153 | 55 | 66 / 93 |

On this scale, one IRE unit is (blank − sync)/40 codes for NTSC. For PAL it is
(blank − sync)/42.86 codes, since sync is 300 mV and 100 IRE is 700 mV.

## Latency and alignment

The pipeline is aligned so that luma and chroma leave `insert` and `quad_mod` on the same pixel
clock.

A picture source should present the pixel for horizontal position h when `hcnt` shows h − 3. The
top level brings out `pix_ce`, `hcnt`, `line_no`, `field` and `seg` for this purpose.

From the input pixel edge to the first interpolated sample takes 5 pixel clocks plus 3 `xclk`
cycles. The interpolators' symmetric filter adds a group delay of 7.5 output samples. Seen at
the outputs, horizontal position h appears at about `hcnt` = h + 8. After that initial
latency, every block delivers one result per clock.

## Departures and own choices

* **Filter coefficients** of both filters and the **colour matrix values** were chosen here. The
  published design derived its filters with a filter-design tool but did not list the
  coefficients.
* **Burst amplitude:** the published modulator feeds a unit value into the U multiplier during
  the burst. Here a programmable amplitude takes its place, because a unit value would vanish in
  the [15:8] product slice.
* **Chroma gains:** the U_GAIN and V_GAIN multipliers after the product slices are additions.
  Without them, the hues and amplitudes of the colour-bar tables cannot be reached from
  CCIR-601 Cb/Cr.
* **Register layout, level codes and luma gain** are this design's own. So is the reading of
  SL/SH and EL/EH as pulse edge positions.
* **Latency:** the published encoder reports 17 pixel clocks of initial latency and 29 pipeline
  stages. This pipeline is shorter, and its alignment is its own.
* **1H delay:** the published line delay is bit-serial. Here it is a word-wide circular buffer.
* **Letter-box selects:** the select-signal encoding of the decimator was replaced by an
  operand table with the same weights.
* **NTSC line numbers:** the NTSC line-type table is the standard 525-line sequence. Most, but
  not all, of its transition lines agree with the published decoder.
* **Out of scope:** the frame memory is not part of this RTL. The PALplus helper signal is only
  routed; its modulation is not generated.
* **Colour-bar tables:** the luminance and chrominance levels and the chrominance phases are
  checked against the EIA (NTSC) and EBU (PAL) 75 % colour-bar tables. The PAL table's
  chrominance row repeats the NTSC figures, which include the NTSC 7.5 IRE set-up. Without
  set-up, the same bars are 1/0.925 larger, so PAL is checked against those values.
* **Clocking:** a single clock with a pixel enable replaces the divided internal clock.
  The matrix uses both edges of `xclk`.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module against values
computed independently inside the testbench, and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_clk_div` | enable toggles every cycle from reset |
| `tb_enc_regs` | every field, writes ignored after reset |
| `tb_line_delay` | one-line delay with random gaps |
| `tb_letterbox` | every frame memory write against exact integer weights: odd, even and progressive fields |
| `tb_matrix` | random pixels against real-valued CCIR-601; colour bars against the standard table; bypass |
| `tb_lpf` | bit-exact FIR with two-clock latency |
| `tb_subgen` | all eight rates above: amplitude, phase against the ideal subcarrier over several lines, burst offsets, PAL switch |
| `tb_quad_mod` | bit-exact products, burst substitution |
| `tb_vgen` | line types of two NTSC and two PAL frames |
| `tb_hgen` | segment run lengths of all nine line types |
| `tb_insert` | level selection and luma mapping |
| `tb_interp` | bit-exact zero-stuffed FIR with saturation |
| `tb_video_encoder` | see below |

`tb_video_encoder` runs the top level at its default parameters:

* full NTSC and PAL frames of colour bars at 13.5 MHz
* a full NTSC frame at 12.27 MHz (780 pixels per line) and a full PAL frame at 14.75 MHz
  (944 pixels per line)
* Y'CbCr input with the matrix bypassed
* a PALplus section with helper lines and two fields through the letter-box converter

It checks:

* luma and chroma of every colour bar against the EIA / EBU tables: luminance IRE within 1.5,
  chrominance peak-to-peak IRE within 3, chrominance phase within 2.5°, on both PAL line phases
* sync and blanking levels, burst amplitude, broad pulses and frame lengths
* the PAL switch, composite = luma + chroma, and the decimated frame-memory data

It also fails if any of these mechanisms never occurs.

The top-level testbench also checks the subcarrier frequency at the outputs. It correlates
every burst with an ideal 3.579545 MHz (NTSC) or 4.43361875 MHz (PAL) sine that starts at
reset. The burst phase it measures must stay constant over the whole frame for NTSC. For PAL
it must take two values, 90° apart. A p2 error of 2 in 3432 already breaks this check.

To run a testbench with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl +libext+.sv -Irtl \
          rtl/enc_pkg.sv tb/tb_video_encoder.sv --top tb_video_encoder -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run any other. The top-level run takes about ten seconds.
