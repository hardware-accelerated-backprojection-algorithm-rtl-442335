# Backprojection accelerator for SAR image formation

Synthetic aperture radar (SAR) forms an image from many radar echoes, called
pulses, recorded while the platform flies past the scene. Backprojection is
the most accurate way to do it, and also the most expensive. For every pixel
and every pulse it works out the distance from the antenna to the pixel. It
takes the echo sample at that distance from the range-compressed pulse. It
removes the carrier phase from the sample and adds the result to the pixel. For
N pulses and an N x N image that is O(N^3) work. The other common SAR
algorithms need O(N^2 log N).

This RTL is the fixed-point, pipelined accelerator for that inner loop. It is
meant to sit in the programmable logic of a Zynq UltraScale+ SoC-FPGA. The ARM
processor system feeds it data and reads the image back. Each clock cycle it
produces one pixel's update for `LANES` pulses at once. The pulses are
independent, so they can be computed in parallel.

Default configuration: 117 pulses, 4096 range bins per pulse, and a 501 x 501
image. The image is built in 12 blocks of 501 rows by 42 columns. The last
block has 39 columns.

## What is computed

For pulse `p` and pixel `(x, y)`:

```
dist  = (ant_x[p] - x_mat, ant_y[p] - y_mat, ant_z[p] - z)
dR    = |dist| - r0[p]                          differential range
k     = floor((dR - r_vec[0]) * interp_const)   range bin, interp_const = 1/bin spacing
t     = (dR - r_vec[k]) * interp_const          weight in [0,1)
s     = (1-t) * rc[p][k] + t * rc[p][k+1]       linear interpolation (0 if k is out of range)
ph    = frac(min_f[p] * dR)                     phase in turns
image += s * (cos 2*pi*ph + j sin 2*pi*ph)
```

- `r0[p]` is the range from the antenna to the scene centre.
- `r_vec` is the range axis of the range-compressed pulses `rc`.
- `min_f[p]` holds `2*f_min/c` in turns per metre. The phase is therefore
  relative to the scene centre.

## Organisation: blocks, passes and lanes

The accelerator only holds one image block. It does not hold the whole image.
For each block, the host:

1. loads the block's pixel coordinates (`x_mat`, `y_mat`);
2. runs one **pass** per group of `LANES` pulses. Before each pass it loads
   those pulses' range-compressed data, one pulse per lane;
3. reads the finished block back.

Each pass walks the whole block. The x loop (columns) is outside and the y
loop (rows) inside, one pixel per cycle. Every lane computes the contribution
of its own pulse to that pixel. The lane results are added together, and the
sum goes into the block's accumulator memory in one read-modify-write.

The first pass of a block is flagged `first_pass`. It overwrites the pixels
instead of adding to them, so the image memory never needs clearing. The last
pulse group may have fewer pulses than there are lanes (`lane_cnt`). The
unused lanes then contribute zero.

The following are loaded once, before any block:

- the per-pulse constants (`min_f`, `r0`, antenna position) of all pulses;
- the range axis `r_vec`;
- `z_mat`, the 1-bit height of every pixel of the whole image.

```
             load port                                 read-back
                 |                                         ^
   +-------------+-----------------+                       |
   v             v                 v                       |
pulse_param   pixel_mem         per lane:            image_accum
  _mem        x_mat,y_mat       rc_buffer, rvec_mem   (block memory,
 (117 x       (block) z_mat        |                   lane sum,
 constants)   (image)              v                   read-modify-write)
   |             |  pixel     +---------+                  ^
   +--> lane ----+----------->| bp_lane |--- contribution--+
       registers              +---------+  x LANES
                 ^
              bp_ctrl: parameter load -> pixel loop -> drain
```

## The lane pipeline

The lane is the heart of the design, and its timing is the part to understand
before changing anything. `bp_lane` is fully pipelined with no stalls. It has
a fixed latency of `LANE_LAT` = 48 cycles from pixel coordinates to
contribution. All latencies are constants in `bp_pkg`. The pixel's address
tag is delayed by the same amount (plus one cycle for the pixel memory), so
it meets the contribution at the accumulator.

| stage | cycles | what happens |
|---|---|---|
| `range_unit` | 38 | x/y/z differences (1), squares (1), sum (1), square root (34, one result bit per stage), minus r0 (1) |
| `bin_index` | 2 | `dR - r_vec[0]`, then multiply by `interp_const`, floor, range check |
| memories | 1 | `rc[k]`, `rc[k+1]` and `r_vec[k]` read together |
| `interp_unit` | 4 | weight from `dR - r_vec[k]`, clamp, `(rc[k+1]-rc[k])*t`, add `rc[k]` |
| phase + `sincos_unit` | 1 + 7 | runs in parallel with the three rows above, from `dR` |
| align | 1 | the interpolation branch (7 cycles) is delayed to match the phasor branch (8) |
| `cmult` | 2 | complex product |

Two details make one pixel per cycle possible:

- **Two neighbours in one cycle.** `rc_buffer` splits the pulse into an
  even bank and an odd bank, so `rc[k]` and `rc[k+1]` always sit in different
  banks. Real and imaginary parts are packed into one 64-bit word, so one
  access returns a complete complex sample.
- **No modulo 2*pi.** The phase is computed in turns, not radians. The
  integer part of `min_f * dR` is full turns, which do not matter. Dropping
  those bits is the whole reduction. The SIN/COS unit gets a 16-bit fraction
  of a turn. The top two bits pick the quadrant, and an odd polynomial for
  `sin(pi/2 * u)`, evaluated at `u` and `1-u`, gives the sine and cosine
  inside it.

The pulse constants sit in registers in each lane. The controller fills them
at the start of a pass, one lane per cycle, from `pulse_param_mem`. Each lane
has its own `rc_buffer` and its own copy of `r_vec`, so every lane can read a
different bin in the same cycle. The `r_vec` copies are all written by one
broadcast load.

## Number formats

The storage widths are those of the original design. The binary-point
positions are this design's own choice. They are all defined in `bp_pkg`.

| quantity | width | format |
|---|---|---|
| `ant_x/y/z` | 25 | signed metres, 12 fraction bits (+-4096 m) |
| `r0` | 25 | unsigned metres, 12 fraction bits (< 8192 m) |
| `x_mat`, `y_mat` | 32 | signed metres, 12 fraction bits |
| `z_mat` | 1 | height 0 m or 1 m |
| `r_vec`, `dR` | 33 | signed metres, 12 fraction bits |
| `min_f` | 35 | turns per metre, Q8.27 |
| `interp_const` | 32 | bins per metre, Q16.16 |
| `rc` | 32 + 32 | signed integers |
| weight `t` | 16 | Q0.16 |
| phase | 16 | turns |
| sin/cos | 18 | signed Q1.16 |
| interpolated sample | 33 | same scale as `rc` |
| contribution | 36 | same scale as `rc` |
| image | 46 + 46 | same scale as `rc` |

Rounding throughout is toward minus infinity (arithmetic shifts), and the
square root is floored.

Accuracy:

- The SIN/COS polynomial is within 2e-4 of the true values.
- A range step of one LSB (0.24 mm) moves an X-band phase (about 62 turns/m)
  by up to 0.09 rad. This, not the SIN/COS unit, limits the phase accuracy.
  More fraction bits on the distances would help, at the cost of coordinate
  range.
- On a synthetic point-target scene (`tb_bp_quality`), the magnitude image
  has a structural similarity (SSIM) of 0.9999 against a double-precision
  backprojection of the same data. The original design's wordlengths were
  chosen to keep SSIM at or above 0.99 against double precision.

## Host interface and timing (`bp_accel`)

The host interface is this design's own. It stands in for the
processor-to-accelerator link, which is not specified.

**Load port.** One 64-bit word per cycle: `ld_we`, `ld_sel`, `ld_addr`,
`ld_data`, and `ld_lane` for `LD_RC`. Load only while `busy` is low.

| `ld_sel` | memory | address |
|---|---|---|
| `LD_MINF`, `LD_R0`, `LD_ANTX`, `LD_ANTY`, `LD_ANTZ` | pulse constants | pulse index |
| `LD_RC` | rc buffer of lane `ld_lane`, data `{re, im}` | range bin |
| `LD_RVEC` | every lane's `r_vec` | range bin |
| `LD_XMAT`, `LD_YMAT` | block coordinates | `x*NY + y` in the block |
| `LD_ZMAT` | image heights (bit 0) | `col*NY + y` in the image |

**Pass.** Pulse `start` for one cycle while `busy` is low. Keep these stable
until `done`:

- `pulse_base`: the pulse handled by lane 0;
- `lane_cnt`: the number of lanes in use;
- `blk_cols` and `blk_col0`: the block's width and its first image column;
- `interp_const`.

`first_pass` is sampled at `start`. `done` pulses once when the last pixel has
been written.

A pass takes exactly `LANES + blk_cols*NY + LANE_LAT + 4` cycles from `start`
to `done`: 21 098 cycles for a full block at the defaults. The full image
needs 12 x 30 passes, about 7.6 million cycles, plus the time the host spends
loading data.

**Read-back.** `img_rd_re`/`img_rd_im` are valid one cycle after `img_rd_addr`
(`x*NY + y`), while `busy` is low.

## Where this RTL departs from, or goes beyond, the original design

- **Number of lanes.** The original sized its parallelism to the free FPGA
  resources and reports a total of 184 DSP slices, but it does not give a lane
  count. `LANES = 4` is a parameter.
- **Phase.** The phase uses `min_f * dR`, as the original's list of optimised
  variables suggests (min_f, dR, phCorr). It does not use `2 * ku * R`.
- **Choices of this design.** The original does not specify:
  - the square-root method;
  - the SIN/COS approximation;
  - the binary points;
  - the use of `r_vec[k]` for the weight;
  - zero output outside the range window;
  - the reading of `z_mat` as 0 m / 1 m;
  - the host protocol.
- **Not included.** The processor system, DDR memory and DMA/interconnect
  are not included. They are vendor parts.
- **No resource figures.** The original reports utilisation on the target
  FPGA. The SystemVerilog here has not been through the vendor tools, so
  there are no figures to compare.

## Files

`rtl/`:

- `bp_pkg.sv`: the shared package.
- `bp_accel.sv`: the top level.
- `bp_ctrl.sv`: the controller.
- `bp_lane.sv`: one lane, built from `range_unit.sv`, `isqrt_pipe.sv`,
  `bin_index.sv`, `rc_buffer.sv`, `rvec_mem.sv`, `interp_unit.sv`,
  `sincos_unit.sv` and `cmult.sv`.
- `pulse_param_mem.sv`, `pixel_mem.sv` and `image_accum.sv`: the memories.
- `delay_line.sv`: a helper.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`.
- `bp_ref_pkg.sv`: a real-valued reference model. It computes the square root
  exactly and uses `$cos`/`$sin`.
- `tb_bp_accel.sv`: end to end at reduced size (7 x 6 image, 6 pulses,
  64 bins, three blocks).
- `tb_bp_accel_full.sv`: the whole 501 x 501 image from 117 pulses at the
  default parameters (about 1.5 minutes of simulation).
- `tb_bp_quality.sv`: image quality on a synthetic scene of three point
  targets. It checks SSIM >= 0.99 against double precision and that each
  target is a local peak.

Each testbench prints `TB_RESULT checks=N failures=M`. The end-to-end
testbenches also check:

- the length of every pass;
- that each mechanism occurred: the overwriting first pass, accumulating
  passes, idle lanes, a narrow block, pixels outside a pulse's range window,
  and phases in all four quadrants.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bp_pkg.sv tb/bp_ref_pkg.sv tb/tb_bp_accel.sv --top-module tb_bp_accel
./obj_dir/Vtb_bp_accel
```

Give the top level's parameters (`N_PULSES`, `NFFT`, `NX`, `NY`, `BLK_W`,
`LANES`) when instantiating it. Widths and formats are changed in `bp_pkg`.
The lane latency there follows from them automatically.
