# Pyramidal Horn–Schunck optical flow in streaming RTL

This design estimates dense optical flow between two greyscale frames: for
every pixel it gives the motion (u, v), in pixels per frame, that carries frame
I1 onto frame I2. It uses the Horn and Schunck method, which iterates a
smoothness-regularised update of the flow field. The basic method only follows
motions of about one pixel. To reach larger motions (up to about ±7 pixels),
the method is wrapped in a three-level image pyramid:

1. Both frames are reduced twice by a factor of 2, giving 1024², 512² and 256² images.
2. Flow is first computed at the coarsest level.
3. At each finer level the coarser result is doubled and up-scaled. I2 is warped by it, so that only a small correction (du, dv) is left to find. Horn–Schunck finds that correction, and it is added to the up-scaled flow.

Every processing unit takes one pixel per clock in raster order. A level is
processed in one or more streaming passes over the frame. The number of
Horn–Schunck iterations per level (20, 10 and 5 for levels 2, 1 and 0) is set
against the number of hardware iteration cores (10 by default). When a level
needs more iterations than there are cores, the frame makes extra passes
through a RAM.

## Data path of one level

```
 pyramid I2 ──(lookahead stream)──┐
 pyramid I1 ──────────────────────┤
 flow of level L+1 ─► upscale ────┤ (u,v)init
                                  ▼
                              warp_core ─► hs_grad ─► hs_chain ──┬─► pass RAM ─┐
                          (I1, I2 warped)  (Ix,Iy,It)  n cores    │             │
                                                        ▲         │             │
                                                        └─────────┼─────────────┘
                                                                  ▼ last pass
                         flow of level L+1 ─► sum_upscale: 2·up(u,v) + (du,dv)
                                                                  ▼
                                     stored for level L-1, or sent out at level 0
```

* **upscale** reads the coarse flow at (x/2, y/2) and doubles it. The coarsest level starts from zero.
* **warp_core** samples I2 at (x+u, y+v). The sample is interpolated either bi-cubically (4×4 taps, Keys kernel with a = −½) or bi-linearly (2×2 taps). The `INTERP` parameter chooses which.
* **hs_grad** computes Ix, Iy and It with the 2×2×2 kernel. This is the classic Horn–Schunck estimate over the pixel, its right and lower neighbours, and the pixel diagonal to it, in both frames.
* **hs_core** performs one iteration:
  `(du', dv') = (ū, v̄) − (Ix, Iy) · (Ix·ū + Iy·v̄ + It) / (α² + Ix² + Iy²)`.
  Here (ū, v̄) is the mean of the four direct neighbours of the current increment. One core is one iteration, and a chain of n cores does n iterations in one pass.
* **sum_upscale** forms the level's final flow. It re-reads the coarse flow and adds the increment to it.

Before the levels are processed, **gauss_down** builds the pyramid. It uses a 5×5
binomial (Gaussian) filter, [1 4 6 4 1]ᵀ[1 4 6 4 1]/256, keeps every other pixel,
and writes the result to the coarse-level memory. Level 1 is filtered straight
from the input stream while the frames are being stored. Each deeper level is
built by reading back the level above it.

## Iteration modes and the pass controller

`hs_chain` holds `NCORES` cores in series. Its output can be taken after any
core (`n_active`). For each level, the controller in `hs_pyramid_top` does the following:

* Sets `n_active = min(NCORES, iterations left)`.
* If iterations remain after this pass, writes the chain output, the complete record {Ix, Iy, It, du, dv}, to the pass RAM (`pass_ram` = 1). The next pass streams the records from that RAM instead of from the front end.
* On the last pass, sends the output to `sum_upscale`.

This gives the usual modes:

| mode | meaning | how it arises |
|---|---|---|
| I (standard iterative) | one core, one pass per iteration | `NCORES = 1` |
| Pq (partial) | all cores, q passes | iterations > `NCORES` |
| F (fully pipelined) | all iterations in one pass | iterations ≤ `NCORES` |

With the defaults (10 cores; 20/10/5 iterations), level 2 runs P² and levels 1
and 0 run F.

**Not built: the parallel mode F_π.** In this mode, π chains each take part
of a frame, so a level runs at π pixels per clock. This design always runs at
one pixel per clock, so at its defaults level 0 takes twice as long as with F₂.

## Streaming conventions (read this before changing anything)

All window-based units (`stream_window`, and `hs_grad`, `hs_core`,
`gauss_down` built on it) follow the same rules:

* A frame is a gap-free run of `width × height` valid pixels in raster order.
* The pipeline shifts on **every** clock; `in_valid` is only a tag. After the last pixel, keep clocking until the outputs have drained. The controller does this by counting output pixels.
* Row buffers are circular arrays whose pointer wraps at the run-time `width`. A row buffer is therefore exactly one row of delay. Its contents never need initialising: until a row buffer has been clocked through once after reset or `clear`, its valid tags are masked.
* `clear` restarts the pointers and position counters. Pulse it before every pass, and always when the frame size changes (the levels share the hardware).
* Neighbours outside the frame are replaced by the nearest edge pixel (clamping).

**Warp lookahead.** The warp has to read rows *below* the current pixel.
So I2 enters it as a separate stream that runs ahead of the main stream
(I1 and the initial flow) by `(RANGE + 3) × width` clocks. I2 is written into a
circular buffer of `2·RANGE + 5` rows. Sample points more than `RANGE` rows away
are clamped to `RANGE`. The controller does this by reading I2 at address
`t` and I1 at address `t − lookahead`.

Latencies, input to output:

| unit | latency (clocks) |
|---|---|
| `stream_window` centre | `(K/2)·width + K/2 + 1` |
| `hs_grad` | `width + 3` |
| `hs_core` | `width + 43` (3×3 window, 2 arithmetic stages, a 38-stage divider, 1 update stage) |
| `gauss_down` | `2·width + 4` |
| `warp_core` | 3 |
| `sum_upscale` | 1 |
| `frame_mem` read | 1 |

## Number formats

All arithmetic is fixed point (`rtl/hs_pkg.sv`):

| quantity | format |
|---|---|
| input pixels | 8-bit unsigned |
| intensities after warping | 12 bits, 8.4 |
| gradients | 16-bit signed, 4 fraction bits |
| flow | 16-bit signed, 8.8 (±128 pixels, 1/256 resolution), saturating |

The Horn–Schunck quotient is computed once per pixel by a pipelined
restoring divider (`fx_div`), on magnitudes with 8 extra fraction bits. It is
then multiplied by Ix and Iy. α² is a parameter (`ALPHA2 = 64`, in squared
8-bit intensity steps).

## Top level: `hs_pyramid_top`

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 1024, 1024 | frame size |
| `NLEVELS` | 3 | pyramid levels |
| `ITERS` | `'{5, 10, 20}` | iterations, indexed by level |
| `NCORES` | 10 | cores in the chain |
| `RANGE` | 7 | warp row window (±rows) |
| `INTERP` | `INTERP_BICUBIC` | `INTERP_BILINEAR` for the 2×2 variant |
| `ALPHA2` | 64 | α² |

Sequence of one run:

1. After reset, the design is in the load phase (`in_ready` = 1). Give it `W·H` pixel pairs (`in_valid`, `in_i1`, `in_i2`).
2. It builds the rest of the pyramid (level 1 is already built during loading).
3. It processes the levels 2 → 1 → 0.
4. It streams the level-0 flow out (`out_valid`, `out_x`, `out_y`, `out_flow` = {u, v}, each 8.8) and pulses `done`.

Start the next frame pair with a reset. The status outputs `phase`, `level`,
`n_active` and `pass_ram` show the controller's progress.

Memories (`frame_mem`, registered reads) inside the top:

| memory | contents | size |
|---|---|---|
| level-0 stores | I1 and I2 as loaded | `W·H` bytes each |
| coarse stores | levels 1 and 2 of I1 and I2 | `W·H·(1/4 + 1/16)` bytes each |
| velocity store | flow of levels 1 and 2 | 32 bits per pixel |
| pass RAM | records between passes | `W·H` × 80 bits |

At the defaults this is about 13 MB. That suits simulation and large FPGAs; a
product would keep the frames and the pass RAM off chip.

### Throughput

At the defaults, one 1024×1024 frame pair takes about 2.79 M clocks in simulation:

* 1.05 M clocks to load the frames, with level 1 of the pyramid built on the fly;
* about 0.26 M clocks to build level 2;
* about 0.14 M clocks for level 2 (two passes);
* about 0.27 M clocks for level 1;
* about 1.07 M clocks for level 0.

That is about 100 frames/s at 281 MHz. Two changes that are not built here would raise it:

* Overlapping loading with the processing of the previous frame pair.
* Running level 0 on two parallel chains, which would halve that level's time.

## Where this departs from the Horn–Schunck FPGA design it follows

* **Arithmetic.** Fixed point replaces 16/32-bit floating point, and a hand-written divider replaces library floating-point operators.
* **Update equation.** The classic form is used: a minus sign, and the same ū/v̄ in both numerators.
* **Parallel mode and overlap.** The parallel mode F_π is not built. Loading and the level-2 pyramid pass are not overlapped with the level passes.
* **Storage.** All frame storage is on-chip arrays instead of external memory.
* **Choices made where no detail was available:**
  * the 4-neighbour average;
  * the binomial Gaussian;
  * the Keys cubic kernel;
  * nearest-neighbour up-scaling;
  * edge clamping;
  * α²;
  * the stream protocol;
  * lookahead warping of I2 rather than I1;
  * saturation in the sum.

## Files

| file | content |
|---|---|
| `rtl/hs_pkg.sv` | types, formats, level address helpers |
| `rtl/hs_pyramid_top.sv` | memories, pyramid build, pass controller |
| `rtl/hs_chain.sv`, `rtl/hs_core.sv`, `rtl/fx_div.sv` | iteration cores |
| `rtl/hs_grad.sv` | 2×2×2 gradients |
| `rtl/warp_core.sv` | bi-cubic / bi-linear warping with row window |
| `rtl/gauss_down.sv` | 5×5 Gaussian reduction |
| `rtl/sum_upscale.sv`, `rtl/upscale.sv` | up-scaling and sum |
| `rtl/stream_window.sv` | row buffers + K×K window |
| `rtl/frame_mem.sv` | 1W/nR memory |
| `tb/tb_*.sv` | self-checking testbenches |
| `tb/tb_ref_pkg.sv` | reference equations shared by the testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --top-module tb_hs_core -y rtl -y tb +libext+.sv \
    rtl/hs_pkg.sv tb/tb_ref_pkg.sv tb/tb_hs_core.sv
./obj_dir/Vtb_hs_core
```

| testbench | what it checks |
|---|---|
| `tb_stream_window` | every window element and the centre coordinates against the clamped neighbourhood; latency; a clear that cuts off a frame and a change of width |
| `tb_hs_grad`, `tb_gauss_down` | exact agreement with the kernels computed in the testbench; latency |
| `tb_hs_core`, `tb_hs_chain` | exact agreement with the update equation in 64-bit integers, for 1 to 3 chained iterations; latency |
| `tb_warp_core` | both interpolation modes against a floating-point model, within 1/8 intensity step, including clamped and out-of-range velocities |
| `tb_sum_upscale`, `tb_frame_mem` | up-scaled sum with saturation; multi-port reads and read-before-write |
| `tb_hs_pyramid_top` | 64×64, 5 cores (P⁴, P², F) |
| `tb_hs_pyramid_iter` | 64×64, 1 core (I mode), bi-linear |
| `tb_hs_pyramid_full` | the defaults, 1024×1024; about 1.5 minutes |

The three `tb_hs_pyramid_*` end-to-end tests each run two frame pairs:

* Identical frames must give exactly zero flow everywhere.
* A smooth pattern shifted by a known amount must give that mean flow in the interior, to within 0.3 pixel (0.5 pixel for the larger shift):
  * (1, 0) in `tb_hs_pyramid_top` and `tb_hs_pyramid_full`;
  * (3, −2) in `tb_hs_pyramid_iter`. This shift needs the pyramid.

Results measured: (0.99–1.00, 0.01–0.03) and (3.03, −1.97).

The end-to-end tests also check:

* raster order of the output;
* a cycle budget;
* that pyramid builds, RAM passes, fully pipelined passes and up-scaled levels each occurred.

**Accuracy limits.** The tests check that the mean flow is right on smooth
synthetic motion. They do not measure accuracy on real image sequences, and
the fixed-point widths have not been tuned for it.
