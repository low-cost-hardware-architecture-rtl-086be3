# Low-cost 3D warping engine (homographic DIBR with linear-interpolated matrices)

Free-viewpoint and multiview video need views that no camera captured. They
are synthesized by warping the pixels of a real view to the virtual viewpoint,
using each pixel's depth (depth-image-based rendering, DIBR). When the depth Z
is fixed, the mapping from a source pixel `(x1, y1)` to its target `(x2, y2)` is
a plane homography:

```
(x2', y2', w2') = H(Z) · (x1, y1, 1)        x2 = x2' / w2'     y2 = y2' / w2'

        | hxx  hxy  hxi |
H(Z) =  | hyx  hyy  hyi |        8 non-constant entries, bottom-right = 1
        | hix  hiy   1  |
```

Depth is an 8-bit value, so an exact engine needs 256 matrices. A lookup table
holding them is by far the largest part of a straightforward design. This
engine keeps only a few matrices. Along Z, every entry of H(Z) is very close to
a straight line, so the depth range is cut into `n` equal intervals (LIA-n,
*linear-interpolated approximation*). Each interval k stores a head matrix
`H_base,k` and an increment matrix `H_inc,k`. The engine then rebuilds H(Z) on
the fly:

```
L = 256 / n,   k = floor(Z / L),   z_loc = Z - k·L
H(Z) ≈ H_base,k + (z_loc / L) · H_inc,k
```

The default is LIA-2: 32 stored entries instead of 2048. The second saving is in
the arithmetic. Every entry uses only as many fraction bits as the warped
positions need. The entries fall into three precision groups:

| group | entries | fraction bits | why |
|---|---|---|---|
| A | hxx, hxy, hyx, hyy | 15 | multiplied by coordinates up to ~2^10, so their error is magnified |
| B | hxi, hyi | 5 | added directly: needs about 10 fraction bits fewer than group A |
| C | hix, hiy | 24 | tiny perspective terms in the denominator |

This RTL implements the architecture of *"Low-Cost Hardware Architecture Design
for 3D Warping Engine in Multiview Video Applications"*. The two-stage
structure, the LIA model (LIA-2 by default) and the fraction widths above come
from that design. Everything the description leaves open was decided here and
is listed under [Design decisions](#design-decisions-not-fixed-by-the-original-architecture).
That covers integer widths, output format, rounding, the divider, the
configuration port and pipelining.

## Data path

```
             cfg_* ──► lia_param_bank ── H_base,0..n-1 / H_inc,0..n-1 ──┐
                                                                         ▼
in_z ───────────────────────────────────────────────────────► lia_selector ── base, inc, z_loc
                                                                         │
                        H matrix rendering stage                         ▼
                                                          lia_interp  (8 × lia_lerp_entry)   1 clk
─────────────────────────────────────────────────────────────────────── │ H(Z) ────────────────
in_x1, in_y1 ── 1-clock delay ──────────────────────────────────────► ht_matvec  6 mul, 6 add  1 clk
                        vector transform stage                           │ x2', y2', w2'
                                                                         ▼
                                                          vector_division  2 × pipe_div    16 clk
                                                                         │
                                                      out_x2, out_y2, out_ovf, out_behind
```

Everything is fully pipelined. It takes one pixel per clock with no
back-pressure. A pixel's result leaves **18 clocks** after it enters
(`2 + OUT_W + 3` in general).

| file | role |
|---|---|
| `rtl/warp_pkg.sv` | default number formats, width functions, `entry_e`, default-width `hmat_t` / `hvec_t` |
| `rtl/warp_types.svh` | `hm_t` (the 8 entries) and `hv_t` (x2', y2', w2') for a module's own fraction widths |
| `rtl/lia_param_bank.sv` | flip-flop storage of `H_base,k` / `H_inc,k`, written one entry per clock |
| `rtl/lia_selector.sv` | picks interval k from the top log2(n) bits of Z, gives `z_loc` (combinational) |
| `rtl/lia_interp.sv`, `rtl/lia_lerp_entry.sv` | `H_base + floor(z_loc · H_inc / L)` per entry, registered |
| `rtl/ht_matvec.sv` | exact `H · (x1, y1, 1)`, registered |
| `rtl/vector_division.sv`, `rtl/pipe_div.sv` | perspective division, rounding, saturation |
| `rtl/warp_engine.sv` | top level |

## Fixed-point formats

All entries are signed two's complement. The integer widths below include the
sign bit and were chosen here for views up to 2048 pixels wide.

| quantity | format | range |
|---|---|---|
| group A entry | 4 int + 15 frac = 19 bits | [-8, 8) |
| group B entry | 13 int + 5 frac = 18 bits | [-4096, 4096) pixels |
| group C entry | 2 int + 24 frac = 26 bits | [-2, 2) |
| `x1`, `y1` | unsigned 11 bits | 0 … 2047 |
| `Z` | unsigned 8 bits | 0 … 255 |
| `x2'`, `y2'` | 33 bits, 15 frac | exact |
| `w2'` | 40 bits, 24 frac | exact |
| `x2`, `y2` | signed `OUT_W` = 13 bits, `OUT_FRAC` = 0 frac | ±4095 |

The fraction widths are parameters (`FRAC_A`, `FRAC_B`, `FRAC_C`) of every
module, defaulting to 15 / 5 / 24. Matrices and vectors therefore travel between
modules as flat packed vectors. Their widths come from `warp_pkg::hmat_w()` and
`hvec_w()`. Each module casts them to the struct types that
`rtl/warp_types.svh` declares for its own widths. At the default widths the
layout equals `warp_pkg::hmat_t` / `hvec_t`, so testbenches can use those types
directly. The widths must satisfy `FRAC_B ≤ FRAC_A ≤ FRAC_C + OUT_FRAC + 1`.
The integer widths and the coordinate width are package constants.

`H_inc,k` uses the same format as H. In `ht_matvec`, `hxi` and `hyi` are shifted
left by 10 to line up with the 15-fraction-bit products. The constant 1 in `w2'`
is `2^24`. The matrix–vector product drops no bits.

The interpolation truncates once per entry: `floor(z_loc · H_inc / 2^ZL_W)` is
taken on the full product, then added to `H_base`. The sum wraps at the entry
width. The loaded parameters must therefore keep H(Z) inside the ranges above.

## Computing and loading the LIA parameters

The engine stores whatever is written into it. For the intended behaviour,
compute from the exact homographies H(Z), normalised so that the bottom-right
entry is 1:

```
H_base,k = H(k·L)
H_inc,k  = L / (L - 1) · ( H(k·L + L - 1) - H(k·L) )
```

so that the last depth of each interval reproduces its tail matrix. Quantize each
entry to its group's format: `round(value · 2^frac)`. Then write it through the
configuration port, one entry per clock:

| signal | meaning |
|---|---|
| `cfg_we` | write strobe |
| `cfg_int` | interval k (`IDX_W` bits; writes to k ≥ `N_INT` are ignored) |
| `cfg_inc` | 0 = `H_base,k`, 1 = `H_inc,k` |
| `cfg_entry` | `E_XX, E_XY, E_XI, E_YX, E_YY, E_YI, E_IX, E_IY` (0…7) |
| `cfg_data` | value, right-aligned, 26 bits (the entry's low 19, 18 or 26 bits are used) |

A write takes effect at the clock edge that samples it. A pixel sampled at that
same edge still uses the old value. Pixels sampled afterwards use the new one.
The parameters can therefore be changed between frames, or while pixels stream,
without a pipeline flush. Reset clears every matrix to zero.

## Perspective division

`vector_division` handles x and y with two identical dividers that share the
divisor `w2'`:

1. **Input stage.** It takes the numerator magnitudes and scales them by
   `2^(24 - 15 + OUT_FRAC + 1)`. This aligns the 15- and 24-bit fractions and
   adds one rounding bit.
2. **`pipe_div`.** This is a radix-2 restoring divider that produces only
   `QB = OUT_W` quotient bits. The first stage tests whether
   `n ≥ d · 2^QB` (overflow). After that, each of the `QB` stages settles one
   quotient bit, most significant first. A full-width divider would need about
   40 stages. This one needs 14.
3. **Output stage.** It rounds to nearest (halves away from zero), restores the
   sign and saturates to ±(2^(OUT_W-1) − 1).

Two flags leave with each pixel:

* `out_ovf`: x2 or y2 did not fit the output and was saturated.
* `out_behind`: `w2' ≤ 0`. The point projects onto or behind the virtual
  camera's plane. x2 and y2 are then 0 and `out_ovf` is 0.

A renderer would normally discard pixels with either flag set.

## Top-level interface (`warp_engine`)

| parameter | default | meaning |
|---|---|---|
| `N_INT` | 2 | LIA-n interval count, a power of two from 1 to 128 |
| `OUT_W` | 13 | width of `out_x2` / `out_y2`, signed |
| `OUT_FRAC` | 0 | fraction bits of the output (e.g. 2 for quarter-pixel positions) |
| `IDX_W` | log2(N_INT), min 1 | width of `cfg_int` |
| `FRAC_A`, `FRAC_B`, `FRAC_C` | 15, 5, 24 | fraction bits of groups A, B, C |

The integer widths of the entries and the coordinate width are constants in
`warp_pkg`. Changing them changes every instance.

Ports:

* `clk`
* `rst_n`: asynchronous reset, active low.
* the `cfg_*` port described above.
* input: `in_valid`, `in_z[7:0]`, `in_x1[10:0]`, `in_y1[10:0]`.
* output: `out_valid`, `out_x2`, `out_y2`, `out_ovf`, `out_behind`.

Results come out in input order, 18 clocks after their input. `in_valid` gaps
propagate unchanged.

## Design decisions not fixed by the original architecture

* **Storage of H_base/H_inc.** The parameters are held in flip-flops, all
  visible to the selector at once: 2 × n × 8 entries, 32 for LIA-2. The
  configuration port is this design's own.
* **Integer widths, coordinate width, output format and rounding.** See the
  tables above.
* **Dividers.** The original was built from vendor pipelined divider and
  multiplier cells. Here the multipliers are plain `*` operators. The divider is
  the bounded-quotient restoring pipeline described above. Its latency (16
  clocks) follows from that choice.
* **Pipelining and throughput.** The original design was synthesized for
  200 MHz in a 90 nm process, but its pipelining is not described. Here there
  is one register after interpolation, one after the matrix–vector product,
  and 15 in the division. The throughput is one pixel per clock.
* **Overflow and w2' ≤ 0 handling** (saturation and the two flags) are
  additions.
* **Not built.** The full 256-matrix lookup table and the general
  matrix-based 3D projection are not part of this RTL. They are only the
  references the engine was designed to replace.
* **Not checked.** The gate counts and the 200 MHz timing of the original
  design (about 8.8 k gates for the LIA-2 rendering stage, 22 k for the
  vector transform stage) have not been reproduced. This RTL has not been
  through a standard-cell flow.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. The reference arithmetic (`tb/warp_ref_pkg.sv`)
is written separately from the RTL:

* interpolation floors are taken on real numbers;
* the division uses 64-bit integer `/`;
* rounding is `floor(q + 1/2)`.

| testbench | what it shows |
|---|---|
| `tb_lia_param_bank` | reset to zero, 400 random writes, every matrix against a model, write visible exactly one clock later |
| `tb_lia_selector` | every Z for LIA-2 and LIA-4: interval, matrices, offset |
| `tb_lia_interp` | 5000 random matrix/offset sets, full entry ranges, one-clock latency |
| `tb_ht_matvec` | 5000 random matrices and coordinates, exact product, one-clock latency |
| `tb_vector_division` | ordinary, exact-half, overflowing and w2' ≤ 0 vectors; back-to-back and gapped; latency 16 |
| `tb_warp_engine` | default-size top: a full 1024×768 frame at one pixel per clock, then parameter writes while pixels stream, then saturation and behind-camera cases |
| `tb_lia_models` | LIA-1/2/4/8 side by side on a camera-model scene |
| `tb_precision_fit` | eight LIA-2 engines with fraction widths from 10/0/19 to 17/7/26 on the same scene |

`tb_warp_engine` checks every pixel bit-exactly and checks the 18-clock latency.
It also checks that the frame takes `pixels + 17` clocks, and that both LIA
intervals, a mid-stream write, saturation and `w2' ≤ 0` all occur.

`tb_lia_models` and `tb_precision_fit` use exact per-depth homographies of a
two-camera rig (`tb/warp_scene_pkg.sv`):

* focal length 1900 px;
* a 2° pan;
* a baseline of 20 units;
* depth planes between 42 and 130 units, spaced uniformly in 1/depth.

`tb_lia_models` derives the LIA parameters by the formulas above. Four engines
(LIA-1, 2, 4 and 8, with sub-pixel output) then warp the same 1024×768 frame. Each engine is compared bit-exactly with the
reference, and against the exact warp. Measured average location errors:

| model | LIA-1 | LIA-2 | LIA-4 | LIA-8 |
|---|---|---|---|---|
| average error (pixels) | 0.531 | 0.106 | 0.043 | 0.035 |

The error falls quickly up to LIA-2 and then levels off at the fixed-point
floor. This supports LIA-2 as the default.

`tb_precision_fit` moves all three groups together, one bit per step. This is
the fitting axis of the original analysis: group B stays 10 bits below group A,
and group C 9 bits above it.

| fraction bits A/B/C | 10/0/19 | 11/1/20 | 12/2/21 | 13/3/22 | 14/4/23 | **15/5/24** | 16/6/25 | 17/7/26 |
|---|---|---|---|---|---|---|---|---|
| average error (pixels) | 1.077 | 0.323 | 0.258 | 0.124 | 0.104 | **0.106** | 0.110 | 0.111 |

Past 14–15 group-A bits the error stops improving and stays at the LIA-2
approximation error. Every extra bit only costs area. This is why 15/5/24 is the
default. The small rise after that, a few thousandths of a pixel, is within the
noise that rounding the LIA parameters adds.

Each block testbench also fails when its block is deliberately broken. Examples
are a 9-bit instead of 10-bit alignment of `hxi`, truncation instead of
rounding, or a mis-wired interval bit.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/warp_pkg.sv tb/warp_ref_pkg.sv tb/warp_scene_pkg.sv \
    tb/tb_warp_engine.sv --top-module tb_warp_engine
./obj_dir/Vtb_warp_engine
```

Replace `tb_warp_engine` with any other testbench name. The packages must be
listed ahead of the testbench as shown. The modules are found by file name
through `-Irtl`. Each testbench finishes in a few seconds. Lint a module with:

```
verilator --lint-only -Wall -Irtl rtl/warp_pkg.sv rtl/warp_engine.sv --top-module warp_engine
```

`-Wall` reports a few harmless notes:

* some package constants are unused in some modules;
* the high bits of the interpolation sum are dropped on purpose (wrap-around);
* `rst_n` is used synchronously by the divider lockstep assertion.
