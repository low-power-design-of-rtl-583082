# Sobel edge detector on static segmented approximate multipliers

Edge detection tolerates small arithmetic errors: an edge that is 5 % too
bright looks the same. This design uses that tolerance to make the
multiplications cheap. It streams a grey image through a Sobel operator, and
every product goes through a **static segmented multiplier (SSM)**. The SSM
multiplies only an m-bit slice of each n-bit operand, and its m x m core
reduces its least significant partial-product columns with **approximate
compressors**. These are 4-input cells that keep one sum bit and drop the
carries.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It follows a
published low-power edge-detector design for the multiplier structure, the
compressors, the Sobel masks, the 256 x 256 image size and the size of the
MAC unit. Everything the source leaves open is this design's own choice; the
section *Choices and departures* lists those choices.

## Structure

```
pix_data ──► sobel_window ──win (3x3)──► sobel_engine ──► edge_data
 (raster,     2 line buffers               ├─ ssm_mac (Gx) ─┐
 valid/ready) + 3x3 registers              ├─ ssm_mac (Gy) ─┴─► edge_magnitude
                                           │     └─ ssm_mult
                                           │          ├─ appx_array_mult ── ucac_compressor
                                           │          └─ ssm_correction
                                           └─ tap sequencer (FSM)
```

| module | role |
|---|---|
| `sobel_edge_detector` | top: handshake, window → engine, output coordinates |
| `sobel_window` | two line buffers (memory arrays) and the 3x3 window |
| `sobel_engine` | feeds the nine taps to two MACs, one per cycle |
| `ssm_mac` | 8-bit pixel × signed 8-bit coefficient, 16-bit accumulator |
| `edge_magnitude` | min(\|Gx\| + \|Gy\|, 255) |
| `ssm_mult` | the segmented multiplier |
| `ssm_correction` | compensation term for the dropped operand bits |
| `appx_array_mult` | m x m multiplier with compressor-reduced low columns |
| `ucac_compressor` | the three approximate compressors |
| `sobel_pkg` | widths, types, the two Sobel masks |

## The segmented multiplier (`ssm_mult`)

The multiplier is unsigned, N x N → 2N bits. Defaults are N = 16 and M = 8.

1. **Segment choice.** For each operand, `alpha = |a[N-1:M]`. If any of the
   upper N-M bits is set, the high segment `a[N-1:N-M]` is used. The N-M low
   bits below that segment are then lost. Otherwise the operand fits in
   M bits, and the low segment `a[M-1:0]` carries it exactly.
2. **Core product.** The two M-bit segments go to `appx_array_mult`, which
   returns `P`.
3. **Correction.** `ssm_correction` adds a term that estimates what the
   dropped bits would have contributed.
4. **Placement.** The 2M-bit sum is shifted back by the output mux, which is
   selected by `sel = {alpha_a, alpha_b}`:

| sel | result | meaning |
|---|---|---|
| 00 | `P` | both operands exact |
| 01, 10 | `P << (N-M)` | one operand truncated |
| 11 | `P << 2(N-M)` | both truncated |

**Correction term**, in units of the LSB of `P`:

| sel | term | reasoning |
|---|---|---|
| 00 | 0 | nothing was dropped |
| 10 | `b[M-1] ? 3·2^(M-3) : 0` | missing part ≈ L_B/2, estimated from the MSB of B's low segment |
| 01 | `a[M-1] ? 3·2^(M-3) : 0` | symmetric |
| 11 | `(a[N-1:N-3] + b[N-1:N-3] + 1)·2^(M-4)` | missing part ≈ (H_A + H_B)/2, each H estimated from its top 3 bits |

The inputs (the top three bits of each operand and the MSB of each low
segment) are the ones the source feeds to its correction block. The formulas
are this design's own. The mixed-case term is zero when the low-segment MSB
is clear, so a zero operand always yields a zero product. The term is always
below 2^M, so `P + corr` cannot overflow 2M bits.

Accuracy at 16 x 16, measured by the testbench on random operands that are
both ≥ 1024: the mean relative error is 3.1 %. The worst case is close to
100 %. This happens when a high segment is very small (for example 4), because
the compressors can then drop its only partial-product bit in a column. The
classic SSM with M = N/2 shares this weakness for small high segments.

## Approximate compressors (`ucac_compressor`, `appx_array_mult`)

Each compressor takes four bits y1..y4 of one column and gives one bit of the
same weight. The carries are dropped, so the error (sum − ones) is 0 or
negative:

| VARIANT | sum | error range |
|---|---|---|
| 1 | `(y1&y2) \| (y3&y4) \| ((y1\|y2)&(y3\|y4))`, i.e. "at least two ones" | 0 … −3 |
| 2 | `(y1\|y2) & (y3\|y4)` | 0 … −3 |
| 3 | `y2 \| y4` | 0 … −3, exact for a single one on y2 or y4 |

Variant 1 is the default everywhere.

`appx_array_mult` builds all M² partial products `a[i]&b[j-i]` and handles
them column by column:

- **Columns j < APPROX_COLS** (default M/2, the lower quarter of the product):
  every full group of four bits, taken from the top of the column list, goes
  through a compressor. The bits that remain after the groups of four are
  added exactly.
- **All other columns** are summed exactly. The column sums are written as
  additions and mapped onto adders by synthesis.

The result is never above the exact product. At M = 8, the largest error of
any of the three variants is 24 over all 65536 operand pairs.

Approximating the whole lower half of the columns was rejected. A compressor
drops a lone 1, and with a coefficient of 1 that erased the MSB of a 4-bit
pixel segment.

## Edge detection

**Masks** (tap `t = 3·row + col`, row 0 is the oldest line):

```
Gy (horizontal edges)   Gx (vertical edges)
  -1 -2 -1                1  0 -1
   0  0  0                2  0 -2
   1  2  1                1  0 -1
```

**MAC.** `ssm_mac` takes an unsigned 8-bit pixel and a signed 8-bit
coefficient:

- The coefficient's magnitude goes to an 8 x 8 SSM (N = 8, M = 4), and the
  product is negated for negative coefficients. This is sign-magnitude around
  the unsigned multiplier.
- The accumulator is 16-bit two's complement and wraps on overflow. Sobel sums
  stay within ±1020.
- `clr` together with `en` loads the product instead of adding it.

**Consequences of the 8-bit SSM for the image:**

- A pixel ≥ 16 is reduced to its upper nibble. The lower nibble is lost, so
  each product is up to 15·|c| too small.
- Pixels below 16 are multiplied exactly.
- The coefficients (|c| ≤ 2) always stay in the low segment. Only the 10 and
  00 cases of the mux occur.
- The correction's mixed-case term keys on bit 3 of |c|, so it **never fires
  in the edge detector**. Its effect is visible only when the multiplier is
  used on its own.

On the test images, the mean difference between this detector's output and an
exact Sobel (|Gx| + |Gy|, clipped to 255) is 6–11 grey levels.

**The compressors are idle at the default parameters.** With SEG_W = 4 and
APPROX_COLS = 2, the two approximated columns of the 4 x 4 core hold only one
and two partial products, never a full group of four. Approximating the lower
four columns (`APPROX_COLS = 4`) lets them act. The Sobel coefficients leave
those columns sparse, though, so the compressors mostly drop lone ones. On a
24 x 16 test frame this raised the mean distance to an exact Sobel from 6.7
to 32 grey levels with variants 1 and 2, and to 25 with variant 3.

**Engine.** `sobel_engine` runs taps 0..8 through both MACs in 9 cycles. The
first tap clears the accumulators. `edge_magnitude` then forms the output.

## Interface and timing of `sobel_edge_detector`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | synchronous, active-low reset |
| `pix_valid`, `pix_ready`, `pix_data` | in/out/in | 1/1/8 | raster-order pixels; a pixel is taken when valid && ready |
| `edge_valid` | out | 1 | one-cycle pulse, no back-pressure |
| `edge_data` | out | 8 | min(\|Gx\| + \|Gy\|, 255) |
| `edge_row`, `edge_col` | out | $clog2(IMG_H), $clog2(IMG_W) | centre of the window |

- **Border pixels.** A pixel in the first two rows or columns of a frame is
  accepted every cycle and produces no output. A W x H frame gives
  (W−2) x (H−2) edge pixels, and the frame counters wrap, so frames can follow
  each other directly.
- **Interior pixels.** `pix_ready` drops for 11 cycles after an interior pixel
  is accepted: one cycle for the window to form, then 10 for the engine.
  `edge_valid` pulses 11 cycles after that pixel was accepted, and each
  interior pixel costs 12 cycles.
- **Full frame.** A 256 x 256 frame takes about 775 000 cycles.
- **Assertion.** The top asserts that a window is never flagged while the
  engine is busy.

Parameters: `IMG_W`, `IMG_H` (256), `SEG_W` (4), `APPROX_COLS` (2) and
`VARIANT` (1). After synthesis the top has 151 flip-flops and 4096 bits of
line-buffer memory.

## Choices and departures

What the source gives:

- The SSM structure: segment select by an OR of the upper bits, the two
  muxes, the core multiplier, the correction adder and the three-way output
  mux.
- N = 16 and the 8 x 8 core.
- The compressors' gates and truth tables.
- The Sobel masks and the 256 x 256 image.
- The MAC size: 16 flip-flops, and I/O that reads as 8 + 8 operand bits plus
  a 16-bit result.

This design's own choices:

- The correction formulas.
- Where the compressors sit in the array (APPROX_COLS = M/2, groups of four
  from the top of a column, leftover bits exact) and the default variant.
- Sign-magnitude handling of signed coefficients, with an SSM of M = N/2 = 4
  inside the 8-bit MAC.
- The sequential one-tap-per-cycle engine, the line-buffer window, the
  valid/ready handshake and the border policy.
- The L1 magnitude with saturation (no threshold), and synchronous active-low
  reset.

Not included:

- A segmentation scheme for signed operands. The source names one but does
  not describe it.
- The image loading, resizing, colour-to-grey conversion and file conversion
  around the detector. These are software steps.
- The exact baseline multipliers used for comparison.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. The reference models
in `tb/ssm_ref_pkg.sv` are plain integer arithmetic: the compressors come from
their truth tables.

| testbench | what it covers |
|---|---|
| `tb_ucac_compressor` | all 16 rows × 3 variants, sum and error |
| `tb_appx_array_mult` | exhaustive 8 x 8 (3 variants) and 4 x 4; exact when APPROX_COLS = 0 |
| `tb_ssm_correction` | exhaustive, M = 8 and M = 4 |
| `tb_ssm_mult` | 16 x 16: corners, zero operands, 200k random pairs over all four segment cases, mean error bound; 8 x 8 exhaustive |
| `tb_ssm_mac` | 50k random cycles: clear, sign, wrap, reset |
| `tb_edge_magnitude` | corners and random gradients |
| `tb_sobel_window` | two 8x6 frames with gaps: every window pixel and centre |
| `tb_sobel_engine` | 3000 windows: Gx, Gy, edge value, 10-cycle latency |
| `tb_sobel_edge_detector` | two 16x12 frames end to end: values, coordinates, 11-cycle latency, coverage of back-pressure, idle input, borders, both segment cases, saturation, frame wrap |
| `tb_sobel_variants` | one 24x16 frame through three detectors with APPROX_COLS = 4 and compressor variants 1, 2, 3; each checked against its own model |
| `tb_sobel_full` | one 256 x 256 frame at default parameters, all 64 516 outputs checked |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/sobel_pkg.sv tb/ssm_ref_pkg.sv tb/tb_sobel_full.sv \
  --top-module tb_sobel_full -o sim
./obj_dir/sim
```

Replace `tb_sobel_full` with any other testbench name. The full-frame test
runs in a few seconds.
