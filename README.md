# Pyramidal ring-scanned CMOS image sensor

A conventional CMOS imager reads its pixel array row by row, top to bottom,
exactly as a CRT draws a picture. This design reads the array by **concentric
square rings** instead. A 64 x 64 array becomes 32 rings, from the 2 x 2 ring at
the centre (ring 1) out to the border (ring 32). All pixels of a ring share one
reset line and one select line. The rings take the place of rows. Since a ring
is two-dimensional, the order in which rings are visited can be changed without
tilting the picture from one edge to the other.

This gives the design its main feature, **bouncing scanning**. The scan runs
inward from the border to the centre, turns, and runs outward again. Every ring
is then read twice per period, with two different integration times: short
near the turning ring and long far from it. Fusing the two readings widens the
dynamic range ring by ring. The gain is largest at the centre, somewhat like
the fovea of the eye.

The RTL holds the digital control of such a sensor: the scan sequencer, the ring
readout timing, the ring and column decoders, and an on-chip CDS and fusion
stage. It also holds behavioural models of the analog parts, the pixel array and
the sample-and-hold banks. With those models the whole chip can be simulated
from light to fused pixel codes.

## Geometry: rings, clusters and diagonal buses

The two diagonals and the two centre lines cut the array into **eight
clusters**, each one half of one side of every ring. In one cluster, ring `r`
holds `r` pixel positions, `k = 0 .. r-1`:

* `k = 0` is next to the centre line of the side, and `k = r-1` is the corner.
* All pixels at position `k`, in every ring of a cluster, share one **pyramid
  diagonal bus**. It plays the role of a column bus in a row-scanned imager.
* Each cluster ends in its own sample-and-hold segment. The eight segments feed
  eight output channels that work in parallel.

A square ring has `8r - 4` pixels, but the eight clusters offer `8r` slots. The
four corner pixels sit on a diagonal, and each one is read by both clusters that
meet there. `pyr_pkg::slot_x/slot_y` give the pixel coordinates of cluster `c`,
ring `r` and position `k`. Clusters are numbered clockwise, starting from the
right half of the top side.

## One ring visit

`readout_controller` times a visit of ring `r` in four phases:

| phase   | length   | lines active                  | what happens                              |
|---------|----------|-------------------------------|-------------------------------------------|
| PH_SIG  | `t_sig`  | ring select, `sh_sig`         | ring voltages go into the signal bank     |
| PH_RST  | `t_rst`  | ring reset                    | ring pixels go back to VDD                |
| PH_SRST | `t_srst` | ring select, `sh_rst`         | reset levels go into the reset bank (CDS) |
| PH_SCAN | `r * t_s`| column select, position 0..r-1 | 8 channels buffered out per step         |

The first three phases together make up the sampling time
`T_spl = t_sig + t_rst + t_srst`. A visit lasts exactly `T_ring = T_spl + r*T_s`
cycles. The next visit starts in the very next cycle. `pix_valid` is high in the
last cycle of each `T_s` step. The positions are buffered from the centre line
of each side towards the corner (`from_corner = 0`), or the other way round
(`from_corner = 1`). The choice is sampled once per visit. All four lengths are run-time inputs, counted in
clock cycles. The package defaults (`DEF_T_*`) assume a 10 MHz clock and use
`T_s = T_spl = 10 us`: 100 cycles each, with `T_spl` split 34/33/33.

## Scan patterns and integration times

`scan_sequencer` supports four patterns, shown here for 4 rings:

| `mode` {bounce, outward} | order per period    |
|--------------------------|---------------------|
| 0,0 conventional inward  | 4 3 2 1             |
| 1,0 bouncing inward      | 4 3 2 1 1 2 3 4     |
| 0,1 conventional outward | 1 2 3 4             |
| 1,1 bouncing outward     | 1 2 3 4 4 3 2 1     |

In bouncing scanning the turning ring is read twice in a row. That second
visit reads the charge gathered since the reset of the first visit, just one
scan step earlier.

The integration time of a ring is the time between its reset in one visit and
its sampling in the next. Count it as the gap from the end of one visit's `T_spl`
to the start of the next visit's `T_spl`. With `A` active rings, the gaps are:

* reading in an inward pass: `T_in(r) = 2*[sum_{i=r+1..A} i*T_s + (A-r)*T_spl] + r*T_s`
* reading in an outward pass: `T_out(r) = 2*[sum_{i=1..r-1} i*T_s + (r-1)*T_spl] + r*T_s`
* conventional scanning: one frame minus `T_spl`, the same for every ring

`T_in + T_out = A(A+1)*T_s + 2(A-1)*T_spl` does not depend on `r`. The sum of
the two readings therefore has the same total exposure in every ring. At the
default size and timing, the full-size testbench measures these gaps on the
running design:

| ring | T_in (us) | T_out (us) | gain 20 log10(long/short) |
|------|-----------|------------|---------------------------|
| 1    | 11170     | 10         | 60.96 dB                  |
| 9    | 10210     | 970        | 20.45 dB                  |
| 17   | 7970      | 3210       | 7.90 dB                   |
| 23   | 5450      | 5730       | 0.44 dB (minimum)         |
| 32   | 320       | 10860      | 30.61 dB                  |

In every ring the two times add up to 11180 us.

`active_rings` limits the scan to the `A` central rings. This is a foveated
mode, like an iris: less data per frame, and a higher frame rate. The ring
decoders never drive a line outside that set.

Mode and ring count are latched at a **period boundary**. A new value given
mid-period waits until the period ends. The first pass after a start or a change
is flagged `warmup`: its rings were not reset by the scan beforehand, so their
readings have no defined integration time.

## CDS and fusion

`image_fusion` takes the eight buffered signal/reset pairs at every
`pix_valid`. For each channel it forms `cds = reset - signal`, clamped at 0.

In a bouncing period it stores every CDS value of the first pass in a frame
memory. The memory holds 8 x 528 words of 12 bits, one word per cluster slot,
with `slot = r(r-1)/2 + k`. In the second pass it reads back the word for the
same slot and outputs the fused pixel. `fuse_mode` picks one of two forms:

* `FUSE_CONCAT`: `{inward value, outward value}`, 24 bits.
* `FUSE_ADD`: `inward + outward`. This equals one reading with the constant
  total exposure described above.

No fused value is given for readings taken during warm-up. In conventional
scanning only the CDS value is given.

## Blocks and files

| file | block |
|------|-------|
| `rtl/pyr_pkg.sv` | sizes, timing defaults, `scan_mode_t`, `ring_timing_t`, `phase_t`, `fuse_mode_t`, slot geometry |
| `rtl/pyramid_imager.sv` | top: wires all blocks |
| `rtl/scan_sequencer.sv` | ring order, passes, bounces, period-boundary latching |
| `rtl/readout_controller.sv` | phase timing of one ring visit |
| `rtl/line_decoder.sv` | one-hot decoder: used as ring reset, ring select and global column decoder |
| `rtl/pixel_array.sv` | behavioural model: pixels, ring lines, diagonal buses |
| `rtl/sample_hold_bank.sv` | behavioural model: 8 CDS sample-and-hold segments with output buffers |
| `rtl/image_fusion.sv` | CDS subtraction and dual-exposure fusion with frame memory |

The digital blocks are synthesizable SystemVerilog. The two models are for
simulation only and are not meant to become silicon; the pixel array model
computes its discharge in real arithmetic. In the models a pixel voltage
is a millivolt code, and a pixel discharges linearly from VDD = 1800 mV at a
rate set by its `light` input, `v = max(0, 1800 - (light * t) >> 10)`, where
`t` is in cycles since the ring's last reset. The pixel array model keeps one
reset time stamp per ring, since a ring shares its reset line.

### Top-level interface (`pyramid_imager`, parameter `N = 64`)

* Inputs:
  * `clk` and `rst_n` (asynchronous, active low).
  * `start` (one-cycle pulse).
  * `mode`, `active_rings` (1..32; 0 means all) and `timing`.
  * `fuse_mode`.
  * `from_corner`, the buffering order within a ring.
  * `light[y][x]`, the 16-bit illumination of each pixel.
* Observation outputs: `ring_reset_lines`, `ring_select_lines`,
  `col_select_lines` (32 each), `phase`, `running`, `visit_start`, `bounced`,
  `mode_in_use`, `pass_first` and `pass_last`.
* Pixel outputs at `pix_valid`:
  * the tags `pix_ring`, `pix_col` (both 0-based), `pix_inward` and `pix_warmup`;
  * `ch_sig[8]` and `ch_rst[8]`, the buffered analog samples.
* One cycle later:
  * `cds_valid` with `cds_ring`, `cds_col`, `cds_inward` and `cds[8]`;
  * `fused_valid` with `fused[8]`. The fused pixel shares the `cds_*` tags.

## Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N
failures=M`. Example with plain verilator, run from the project root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/pyr_pkg.sv tb/tb_pyramid_imager_full.sv --top-module tb_pyramid_imager_full
    ./obj_dir/Vtb_pyramid_imager_full

* `tb_pyramid_imager_full`: default size, 3 bouncing periods (336,000 cycles,
  a few seconds). Checks every visit, integration gap, CDS value and fused
  pixel, and the numbers in the table above.
* `tb_pyramid_imager`: 8 x 8 sensor, runs all four patterns, foveated scans
  and mid-run mode changes without stopping. Counts every mechanism and fails
  if one never happened.
* `tb_pyramid_imager_rolling`: default size, conventional inward scanning at
  `T_spl = 1 us`, `T_s = 0.1 us`, then a switch to the 8 central rings. Checks
  the constant per-ring integration time of rolling capture and the shorter
  foveated frame.
* `pyr_scoreboard`: the checker shared by the top-level tests. It recomputes the
  expected values from the light input and from the sample instants it sees on
  the ring and S&H lines.
* Each block has its own testbench: `tb_scan_sequencer`,
  `tb_readout_controller`, `tb_line_decoder`, `tb_pixel_array`,
  `tb_sample_hold_bank` and `tb_image_fusion`.

## Where this design makes its own choices

The published architecture fixes the ring structure, the eight clusters and
channels, the scan patterns, the three-phase sampling period and the timing
equations. The following points are not given there, and are choices of this
design:

* Clock. It is not specified: 10 MHz is assumed when turning microseconds
  into cycles, and all timing is programmable.
* Turning ring. One description of bouncing says the scan goes straight on to
  the next ring at a turn. The pattern tables, the timing diagrams and the
  integration-time equations all repeat the turning ring. This design repeats
  it.
* Corner pixels. They are read by two clusters. "Ring r of a cluster holds r
  pixels" then holds exactly, and the eight channels stay in lock step.
* Column select. One global decoder is used, not one decoder per segment. Both
  are allowed by the architecture.
* Fusion. It is done on chip, one of the two options (on chip or off chip).
  The ADC is not specified. The models give integer codes, which amounts to
  an ideal converter. The concatenation order, the frame-memory layout and the
  warm-up rule are this design's own.
* Analog models. The pixel discharge law, VDD, the code widths, the lossless
  sample-and-hold and the ideal current-to-voltage conversion are
  simplifications.
* Handshakes and reset. The start/advance handshake, the latching of the
  configuration at period boundaries and the asynchronous reset are this
  design's own.
* Not modelled: transistor-level effects such as noise, fixed-pattern noise,
  charge injection and nonlinearity, and the I/O pads.

`verilator -Wall` gives a `SYNCASYNCNET` note on `rst_n`. `rst_n` is the
asynchronous reset of the flip-flops, and the concurrent assertions also use it
in `disable iff`. That second use is not logic.
