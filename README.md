# Pipelined ASWM impulse-noise filter

The adaptive switching weighted median (ASWM) filter removes impulse
("salt-and-pepper") noise from greyscale images while leaving clean pixels
untouched. For every 3x3 window it estimates a robust weighted mean by an
iterative loop, measures a weighted spread around it, and replaces the centre
pixel by the window median only if the pixel lies too far from that mean.

In software the loop is the problem: it runs an unknown number of times and
each iteration needs nine divisions. This RTL makes the filter a fixed-length
pipeline that accepts one pixel per clock:

* **The loop is unrolled** into a chain of `N_UNITS` identical *weight
  estimation units* (25 by default). A unit whose predecessor has already
  converged is *bypassed*: it forwards the state it receives unchanged. That
  reproduces the early exit of the loop without variable timing. If no unit
  converges, the last unit's result is used.
* **The nine divisions of each iteration are table look-ups.** The
  dividend is constant, and the divisor `|X - M_w|` is cut to its integer part
  (0..255). Each division is therefore a read from a 256 x 32-bit ROM.

At 100 MHz the pipeline filters 100 Mpixel/s, which is enough for
1920x1080 monochrome video at 48 frames/s.

## The algorithm as implemented

For a window `X_k` (k = 0..8, centre `X_4`):

1. Start with all weights equal to 1. The weighted mean `M_w` is then the
   plain mean.
2. Repeat: `w_k = 1 / (|X_k - M_w| + delta)`, then
   `M_w_new = sum(w_k X_k) / sum(w_k)`. Stop when `|M_w_new - M_w| < EPS`.
3. Weighted standard deviation:
   `sigma = sqrt( sum(w_k (X_k - M_w)^2) / sum(w_k) )`.
4. Output `median(X)` if `|X_4 - M_w| > alpha * sigma`. Otherwise output `X_4`.

Pixels far from the robust mean get tiny weights, so an impulse hardly pulls
`M_w`. Once `M_w` settles, the impulse stands out against `sigma` and is
replaced. A pixel in a textured but clean area has a large `sigma` and is
kept.

## Pipeline

```
 in_pix ─► window_gen ─► mean_unit ─► weight_est_unit ─► ... ─► weight_est_unit ─┬─► deviation_unit ─────────► noise_switch ─► out_pix
            (1 cycle)     (2)          (5)           N_UNITS times      (5)       │    (27)                      (1)
                                                                                  └─► median3x3 (3) ─► delay (24) ─┘
```

The latency from a complete window to the filtered pixel is **30 + 5·N_UNITS**
cycles: 80, 130, 155 and 180 for 10, 20, 25 and 30 units. This equals the
published pipeline lengths for those chain lengths. The stage split of the
fixed part (2 + 27 + 1) was chosen to meet that figure. Add one cycle for
forming the window. There are no stalls and no backpressure; a `valid` bit
travels with every datum, so gaps in the input stream are fine.

The state that moves along the chain is the packed struct `est_t` in
`aswm_pkg`: the window (9 x 8 bits), the current weights (9 x 32 bits), the
current mean `mw` (8.8 fixed point) and the `done` (converged) flag. That is
377 bits per stage.

## The weight estimation unit

This is the heart of the design (`rtl/weight_est_unit.sv`). One unit is one
loop iteration, in five register stages:

| cycle | work |
|---|---|
| 1 | `addr_k = floor(|X_k - M_w|)` for the nine pixels (8 bits each) |
| 2 | nine reads of a `recip_rom`, one ROM per pixel: `w_k = table[addr_k]` |
| 3 | `sum(w_k X_k)` (44 bits) and `sum(w_k)` (36 bits) |
| 4 | divider, quotient bits 15..8 of `256·sum(wX)/sum(w)` |
| 5 | divider, quotient bits 7..0 → `M_w_new` in 8.8 |

The divider's registered outputs then feed a comparator and a multiplexer:

* if the incoming `done` is set, the unit outputs the incoming state unchanged
  (bypass);
* otherwise it outputs the new weights and mean, with
  `done = |M_w_new - M_w| < EPS`.

The incoming state travels through cycles 1..5 beside the new values, so the
bypass costs no extra cycle. The recomputation still happens in a bypassed
unit; only its result is discarded. That keeps every unit identical and the
timing fixed.

The weighted-mean division is not replaced by a table: its divisor is the
weight sum, which has no small range. It is a restoring divider
(`rtl/pipe_div.sv`) split over two stages. It can never overflow, because a
weighted mean of pixels lies in 0..255.

## The division table

`rtl/recip_rom.sv` holds 256 words of 32 bits (8 Kbit):

```
table[d] = floor(2^31 / (8 d + 1)) = 2^28 / (d + 1/8)
```

The weight 1.0 is therefore 2^28, and `delta = 1/8`. `table[0] = 2^31` is the
largest word and `table[255] = 1,052,172` the smallest. The contents are
computed from this formula at elaboration, so there is no data file. The read
is synchronous, which maps to a block RAM.

Two approximations are made relative to exact arithmetic:

* The fractional part of `|X - M_w|` is dropped.
* The quotient is truncated to an integer.

Both are part of the method, not artefacts. Keeping the full 32-bit quotient
matters more to filter quality than keeping the divisor's fraction.

Each unit has nine tables, one per window pixel, which gives 73,728 ROM bits per
unit. The 25-unit default has 1,843,200 ROM bits plus 30,720 bits of line
buffer. That is in line with the roughly 1.9 Mbit reported for an FPGA
implementation of the same size. One table shared by several pixels would
need a multi-ported memory; this is left as a possible saving.

## Number formats

| quantity | format | where |
|---|---|---|
| pixel | 8-bit unsigned | everywhere |
| `M_w` | unsigned 8.8 (16 bits) | chain, switch |
| weight | 32-bit unsigned, 2^28 = 1.0 | chain, deviation |
| `(X - M_w)^2` | 16.8 (24 bits) | deviation |
| variance | 16.8 (24 bits) | deviation |
| `sigma` | 8.4 (12 bits) | deviation, switch |
| `alpha` | 4.4 (8 bits) | input port |

All sums are wide enough to be exact: 36 bits for `sum(w)`, 44 bits for
`sum(wX)` and 60 bits for `sum(w (X-M_w)^2)`. The square root
(`rtl/pipe_sqrt.sv`) is the digit-by-digit method, one bit per stage.

## Top level: `aswm_filter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears valid bits and counters only) |
| `in_valid`, `in_pix` | in | 1, 8 | raster pixel stream, `IMG_W` x `IMG_H` per frame |
| `alpha` | in | 8 | noise threshold, 4.4 (e.g. `8'h20` = 2.0) |
| `out_valid`, `out_pix` | out | 1, 8 | filtered pixels |
| `out_noisy` | out | 1 | this pixel was judged noisy and replaced by the median |
| `out_early` | out | 1 | the loop converged within the chain (otherwise the last unit's weights were used) |

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 1920, 1080 | frame size (line buffer length is `IMG_W`) |
| `N_UNITS` | 25 | number of weight estimation units |
| `EPS` | 26 (= 0.102 in 8.8) | convergence threshold |

Only pixels whose whole window lies inside the image are filtered. The
output for a frame is the `(IMG_W-2) x (IMG_H-2)` interior, in raster order.
The row and column counters start at zero after reset and wrap at the frame
size, so frames must be sent whole; there is no start-of-frame input. Change
`alpha` only while the pipeline is empty. Otherwise pixels already in flight
are judged with the new value.

## Choices not fixed by the original description

* `delta = 1/8`, `EPS ≈ 0.1`, and `alpha` as a run-time input: the filter
  leaves these as preset constants without values.
* The 25-unit default: this is the chain length named as needed for full
  filtering quality. Filtering quality barely changes from 100 down to 20
  units and falls clearly at 5 to 10 units. 30 units was reported to still fit
  in under 65,000 FPGA logic elements.
* Nine 8 Kbit tables per unit, one per divisor. A unit could be read as
  holding a single 8 Kbit table, but the reported memory totals (about
  78 Kbit per added unit) match nine.
* Border pixels are not produced, and the window line buffers are this
  design's own. The original description gives no window-forming logic.
* The restoring divider, digit-by-digit square root and row-sort median,
  and their stage splits.
* Until it converges, the loop returns to the weight step, not to the
  re-initialisation of the weights.

## Files

| file | content |
|---|---|
| `rtl/aswm_pkg.sv` | widths, types (`est_t`, `window_t`, …), table formula |
| `rtl/aswm_filter.sv` | top level |
| `rtl/window_gen.sv` | line buffers, 3x3 window |
| `rtl/mean_unit.sv` | initial mean (all weights 1) |
| `rtl/weight_est_unit.sv` | one loop iteration with bypass |
| `rtl/recip_rom.sv` | 256 x 32 division table |
| `rtl/deviation_unit.sv` | weighted standard deviation |
| `rtl/median3x3.sv` | window median |
| `rtl/noise_switch.sv` | replace-or-keep decision |
| `rtl/pipe_div.sv`, `rtl/pipe_sqrt.sv`, `rtl/delay_line.sv` | generic pipelined helpers |
| `tb/aswm_ref_pkg.sv` | reference model (plain 64-bit integer arithmetic) |
| `tb/tb_<module>.sv` | one self-checking testbench per block |
| `tb/tb_aswm_filter.sv` | end-to-end: three 24x16 frames, 10 units, random stream gaps, two alpha values |
| `tb/tb_aswm_noise_levels.sv` | 25 units, 64x40 frames at 5, 15, 30, 45, 60 and 75 % noise |
| `tb/tb_aswm_chain_length.sv` | filters with 5, 10, 20 and 40 units side by side, PSNR at 5 to 75 % noise |
| `tb/tb_aswm_filter_full.sv` | one 1920x1080 frame at the default parameters |

## Verification

Every testbench compares each output with the reference model in
`tb/aswm_ref_pkg.sv`, bit for bit. That model uses native 64-bit division and
a floating-point square root with integer correction, so it shares no code
with the RTL's pipelined divider or square root. Each testbench also checks
each block's latency and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

The end-to-end tests check the following:

* every filtered pixel, with its `out_noisy` and `out_early` flags;
* the exact latency of 1 + 30 + 5·N cycles;
* that every mechanism occurs: pixels replaced and kept, early exit with later
  units bypassed, chains exhausted without convergence (10-unit run), stream
  gaps, and an `alpha` change.

Results of the full-size run, one FullHD frame with 20 % impulse noise, 25
units and alpha = 2.0: all 2,067,604 pixels match. 761 windows (0.04 %) did
not converge within 25 units. It runs in under a minute of simulation.

In the noise-density run, the most units any window needed was 24 at 5 %
noise. At 15 % and above some windows used all 25. A few windows per frame
did not converge at 45 to 75 % noise.

The chain-length test runs 48x32 frames (alpha = 2.0) through filters with
5, 10, 20 and 40 units. It checks every pixel against the model and reports
PSNR against the clean image, in dB:

| noise | input | 5 units | 10 units | 20 units | 40 units |
|---|---|---|---|---|---|
| 5 % | 18.90 | 33.70 | 33.70 | 33.48 | 33.48 |
| 15 % | 14.22 | 26.74 | 28.07 | 28.09 | 28.09 |
| 30 % | 10.22 | 19.64 | 20.15 | 20.22 | 20.22 |
| 45 % | 8.67 | 16.12 | 16.34 | 16.35 | 16.35 |
| 60 % | 7.26 | 11.98 | 11.88 | 11.84 | 11.84 |
| 75 % | 6.33 | 8.49 | 8.34 | 8.29 | 8.29 |

Twenty units already give the result of forty. Short chains lose quality at
moderate noise. This agrees with the choice of a 20-to-25-unit chain. A single
fixed `alpha` is not tuned for very high noise densities.

To run a testbench with Verilator (package files first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/aswm_pkg.sv tb/aswm_ref_pkg.sv rtl/pipe_div.sv rtl/pipe_sqrt.sv rtl/delay_line.sv \
  rtl/recip_rom.sv rtl/window_gen.sv rtl/mean_unit.sv rtl/weight_est_unit.sv \
  rtl/deviation_unit.sv rtl/median3x3.sv rtl/noise_switch.sv rtl/aswm_filter.sv \
  tb/tb_aswm_filter.sv --top-module tb_aswm_filter -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` for the others. A block
testbench needs only the package files and the block's own modules.

## Limits

* Filtering quality is measured only as PSNR on small synthetic frames. No
  SSIM is computed, and `alpha` and `EPS` are not tuned.
* Timing closure at 100 MHz is not shown. Several stages are heavy: eight
  52-bit compare-subtract steps per divider stage, and nine 32x8 products
  summed in one cycle. They may need splitting on a given FPGA, which
  changes the latency figures above.
* A bypassed unit still toggles its arithmetic, so power is not saved by
  early exit.
