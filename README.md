# Single-FPGA two-camera surveillance controller

A fixed, wide-angle **master camera** watches a scene. Every pixel of its
512 x 512 x 8-bit CCIR video is compared, as it arrives, with a stored
background image; pixels that differ by more than an adaptive threshold are
grouped into person-sized or car-sized objects, and a **slave camera** with
a long lens, carried on a pan/tilt robot arm, is pointed at the part of the
scene that holds each object. Everything between the video ADC and the arm
runs in one small FPGA at video rate, with no processor and no host
computer: one pixel per clock at 10 MHz, 25 frames per second.

This SystemVerilog is a reconstruction of that published system. The
algorithms (background differencing, adaptive threshold, temporal
background filter, run-length/row-count target test, sub-region pointing)
follow the published description; widths, handshakes, memory organisation
and several details of the target test had to be chosen here. Those
choices are listed in [Departures and interpretations](#departures-and-interpretations).

## Block diagram

```
 sync separator ──hsync/vsync──► frame_grabber_ctrl ──adc_en, dac_blank──► ADC / DAC
                                        │ pix_valid, col, row, frame_start/end
 flash ADC ──adc_data (Live)───────┬────┼──────────────┬──────────────────┐
                                   ▼    ▼              ▼                  ▼
                          threshold_select       bg_update          target_detect ──► target_list ◄── robot_arm_ctrl ──► robot arm
                                   │   ▲              │   ▲              ▲   ▲         (internal RAM)
                                   │   │ Live     new Bg  │ Bg           │   │
                                   │   └──────────────┼───┴──────────────┘   │
                                   └──Threshold───────┼──────────────────────┘
                                                      ▼
                                                memory_ctrl ◄──► 2 x 128K x 8 SRAM (background image)
```

| module | job |
|---|---|
| `vss_pkg` | shared constants (image and grid size, default limits), `bg_mode_e`, `obj_class_e`, `target_t` |
| `frame_grabber_ctrl` | follows the syncs, numbers pixels, marks the 512 x 512 window, ADC enable, DAC blank |
| `memory_ctrl` | reads the background pixel and writes the updated one, one of each per clock |
| `bg_update` | `Bg += (Live - Bg) / 8`, or hold, or capture the live frame |
| `threshold_select` | threshold = f x mean grey level of the previous frame |
| `target_detect` | `abs(Live - Bg) > Threshold`, then the object test in each of 100 sub-regions |
| `target_list` | double-buffered list of the targets of a frame |
| `robot_arm_ctrl` | visits the sub-regions holding targets, top-left first |
| `vss_top` | the FPGA: all of the above wired together |

External parts — the PLL that makes the 10 MHz clock from the line
frequency, the flash ADC and sync separator, the video DAC, the SRAM chips,
the cameras and the arm — are not logic of this design. Their signals are
ports of `vss_top`; `tb/sram_model.sv` models one SRAM chip for simulation.

## Video timing

CCIR lines come every 64 us. A 10 MHz clock therefore gives 640 clocks per
line, enough for 512 pixels at one pixel per clock. `frame_grabber_ctrl`
restarts a clock counter on each line-sync edge and a line counter on each
frame-sync edge. Pixels `H_START` .. `H_START+511` (default 112) of lines
`V_START` .. `V_START+511` (default 56) form the window. The two interlaced
fields are handled as one 625-line frame with one frame sync per 40 ms.

In the cycle in which `pix_valid`/`adc_en` is high, `col`/`row` name the
pixel and the ADC byte `adc_data` must be that pixel. All processing blocks
see the same pixel in the same cycle. There is no frame buffer for the live
image: it is consumed as it streams past.

## Background memory: one read and one write per clock

Each pixel needs its stored background read (for the difference and the
filter) and the filtered value written back, both at the pixel rate. An
asynchronous SRAM does one access per clock, so the 256 KB image is split
over the two 128K x 8 chips **by column parity**: even columns in chip 0,
odd columns in chip 1, address `{row, col[8:1]}`.

```
clock        t            t+1          t+2
chip 0       read  p0     write p0'    read  p2
chip 1       (idle)       read  p1     write p1'
```

`bg_update` registers the new value, so the write of pixel *p* happens one
clock after its read, while pixel *p+1* — the other parity — is read from
the other chip. An assertion in `memory_ctrl` checks that the two never
meet on one chip. Chip selects, output enables and write enables are
active low and decoded combinationally; the write takes effect at the end
of the clock. Each chip has its own address, control and data lines.

## Background filter and threshold

`bg_update` implements the temporal low-pass filter
`Bg(k+1) = Bg(k) + G (Live(k) - Bg(k))` with `G = 1/8`, an arithmetic shift
of the 9-bit signed difference (rounding down). A step change in the scene
is absorbed into the background in about 16-20 frames, so objects that stop
become background within a second, while an object moving across the
scene never stays long enough to be learned. `bg_mode` can instead hold
the background (`BG_HOLD`) or store the live frame as the new background
(`BG_CAPTURE`), which is how a stored single image is used as reference.

`threshold_select` makes the threshold follow the illumination:
`Threshold = f x mean(Live)`. The sum is kept in a 20-bit accumulator; to
stay within 20 bits it takes one pixel of every 8 x 8 block (4096 samples,
at most 4096 x 255 < 2^20) and divides by shifting right 12 bits. `f` is a
power of two, `f = 2^f_exp` for `f_exp` in -4..+3; `f = 1` uses the mean
itself. The threshold computed over one frame is applied throughout the
next; it is 128 until the first frame has ended.

## Target detection

This is the core of the design. A pixel is a *target pixel* when
`|Live - Bg| > Threshold`; the absolute value catches objects both
brighter and darker than the background. The field of view is divided into
a 10 x 10 grid of sub-regions (51 x 51 pixels, the last row and column of
the grid 53), and the test below runs independently in each sub-region.

**Width.** Along a row, the 4-bit counter `col_count` (saturating at 15)
counts consecutive target pixels. The run is judged at the first
background pixel after it:

- `col_count >= col_udtp2` (default 12): a run as wide as a car;
- else `col_count >= col_udtp1` (default 4): a run as wide as a person;
- else the run is discarded.

Any background pixel clears `col_count`, and so does entering a new
sub-region. A run that reaches the right edge of a sub-region is never
judged.

**Height.** Each class keeps, per sub-region, a 4-bit `row_count` and the
start column `save_col` and row `save_row` of the last accepted run. For a
run of that class ending at column `col` of row `row`, let
`start = col - col_udtp` (its start as seen by the limit):

| state | condition | action |
|---|---|---|
| `row_count == 0` | — | start an object: `save_col = start`, `save_row = row`, `row_count = 1` |
| `row_count > 0` | `save_row == row-1` and `abs(save_col - start) <= 1` | extend: update `save_col`, `save_row`, `row_count++` |
| `row_count > 0` | otherwise, if `save_row != row` | drop: clear this class's state |
| `row_count > 0` | otherwise (a second run in the object's last row) | ignore |

When an extension brings `row_count` to the height limit (`row_udtp2` for
cars, default 8; `row_udtp1` for people, default 6), the target is
reported with its sub-region number, class, `save_col` and `save_row`, and
the sub-region's state is cleared and marked done: **one target per
sub-region per frame**. Example: a person 5 pixels wide in columns 120-124
from row 60 down is reported at row 65 (its sixth row) with start column
125 - 4 = 121.

Consequences worth knowing: an object straddling a sub-region border may
be missed until it has moved far enough into one sub-region; a narrower
object to the left of a real one in the same row can drop the real one's
count (the drop rule); an object that shifts more than one column per row
(a steep diagonal) is never tracked.

**Storage.** Because the video is raster-scanned, one row of pixels passes
through ten sub-regions. `col_count` is a single register; the per-class
state is an array with one entry per sub-region *column* (10 entries),
cleared at the first row of each new row of sub-regions. `det_valid`
pulses one clock after the pixel that completed a target.

## Target list and camera pointing

`target_list` holds one entry per sub-region (class, column, row, valid).
It has two banks: the detector fills one during a frame while
`robot_arm_ctrl` reads the other, which holds the complete list of the
previous frame; `frame_start` swaps them and clears the bank about to be
filled. `count` tells how many targets the readable list holds.

`robot_arm_ctrl` walks the readable list in sub-region order 0..99
(top-left first, left to right, top to bottom), one entry every two
clocks, wrapping around. For a sub-region with a target that the camera
is not already viewing, it raises `arm_req` with `arm_x`/`arm_y` (grid
column and row) and waits for `arm_done`, then continues with the next
sub-region. A single target thus keeps the camera still while it moves
within a sub-region and moves it when the target crosses into the next;
several targets are visited in turn. `track_en` low stops the scan.

## Top-level interface (`vss_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 10 MHz clock; asynchronous active-low reset |
| `hsync`, `vsync` | in | 1 | line and frame sync, active high |
| `adc_data` | in | 8 | digitised pixel, valid while `adc_en` |
| `adc_en` | out | 1 | ADC enable (window pixels) |
| `dac_data`, `dac_blank` | out | 8, 1 | live video to the monitor, one clock after the ADC |
| `sram_addr[1:0]` | out | 2 x 17 | per-chip address |
| `sram_cs_n`, `sram_oe_n`, `sram_we_n` | out | 2 | per-chip controls, active low |
| `sram_dq_out`, `sram_dq_oe`, `sram_dq_in` | out/out/in | 2 x 8, 2, 2 x 8 | split bidirectional data bus |
| `arm_req`, `arm_x`, `arm_y`, `arm_done` | out/out/out/in | 1, 4, 4, 1 | arm handshake |
| `cam_region`, `cam_valid` | out | 7, 1 | sub-region the slave camera was last sent to |
| `bg_mode` | in | 2 | `BG_FILTER`, `BG_HOLD`, `BG_CAPTURE` |
| `f_exp` | in | 3 signed | threshold factor f = 2^f_exp |
| `col_udtp1`, `row_udtp1` | in | 4 | person width and height limits |
| `col_udtp2`, `row_udtp2` | in | 4 | car width and height limits |
| `track_en` | in | 1 | enable camera pointing |
| `threshold`, `mean` | out | 8 | current threshold; mean of the last frame |
| `target_found`, `target_count` | out | 1, 8 | pulse per target; targets in the last frame |

Parameters of `vss_top` (defaults are the full system): `ACT_W`, `ACT_H`
(512), `H_START` (112), `V_START` (56), `REG_PW`, `REG_PH` (51),
`SAMPLE_SHIFT` (3), `MEAN_SHIFT` (12). `MEAN_SHIFT` must equal
`log2(ACT_W*ACT_H) - 2*SAMPLE_SHIFT`.

## Departures and interpretations

Taken from the published description: 512 x 512 x 8-bit images, 10 MHz
clock from the 15.625 kHz line rate, the 2 x 128K x 8 SRAM, the
difference and threshold rules, `f`, `G = 1/8` by shifting, the 20-bit
accumulator, 4-bit `col_count` and `row_count`, the person limits 4 and 6,
two object classes tested car first, the +-1 column tolerance, one target
per sub-region, 100 sub-regions, the visiting order, and a list renewed
every frame.

Chosen here:

- **Coordinates saved by the tracker.** The published pseudocode saves
  `row - row_udtp` as the object's row yet compares the saved row with
  `row - 1`, and compares the saved start column with the run's end. Taken
  literally, no object could ever grow beyond one row. This design saves
  the row itself and compares start with start, which is what the prose
  description ("successive rows ... starting at about the same column")
  asks for.
- **Clearing `col_count`.** The pseudocode clears it only when a run is
  accepted; the prose says a too-short run clears it. Here every
  background pixel clears it.
- **Separate state for cars and people**, per sub-region.
- **Car limits** 12 x 8 (no value was published; both must fit 4 bits).
- **Sub-region grid** of 51-pixel pitch with the remainder in the last one.
- **Threshold sampling** of one pixel per 8 x 8 block: the published
  formula averages every pixel, which needs a 26-bit sum, while the
  published implementation uses a 20-bit adder.
- **f as a power of two**; threshold applied one frame late; 128 at reset.
- **Column-parity SRAM split** and one-clock write lag; separate buses per
  chip.
- **Window offsets**, sync polarity, interlace handled as one frame.
- **Arm handshake** (request/done) and skipping the sub-region in view.
- **Double-buffered target list** with valid bits.
- **Background modes** hold and capture as a user input.

Not used by the top: the thresholded pixel (`target_detect.binary`, for a
binary-image display) and the stored target coordinates (`target_list`
`rd_data`) — the arm is only told the sub-region. The 30 frames/s
(525-line) standard does not fit the default window: set `V_START` to 13
or less.

For size: the published implementation fitted in a 576-logic-cell FPGA
(about 466 cells for these modules). This RTL, synthesised generically, is
roughly 420 word-level cells and 860 flip-flops (plus 3800 bits of list
memory in `target_list`); the per-sub-region state and the list are the
bulk, and would map to embedded RAM blocks.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vss_pkg.sv tb/tb_vss_top.sv --top-module tb_vss_top
./obj_dir/Vtb_vss_top
```

Replace `tb_vss_top` with `tb_target_detect`, `tb_bg_update`,
`tb_threshold_select`, `tb_frame_grabber_ctrl`, `tb_memory_ctrl`,
`tb_target_list` or `tb_robot_arm_ctrl` for the unit tests.

`tb_vss_top` runs the whole FPGA at full size for seven frames (about 2.8
million clocks, a few seconds): a capture frame that stores the empty
scene, five filtering frames with a walking person, a parked car and
clutter, and a hold frame. It checks the stored background (pixel by
pixel after capture, and the filtered value under the car frame by frame),
every threshold, every reported target's class, sub-region and
coordinates, the list count, that every arm move goes to the next
listed sub-region in row-major order and that every listed sub-region is
viewed, and the DAC output, and it
fails if any of the mechanisms — the three background modes, both
classes, object start, extension and drop, short-run rejection, the
one-per-sub-region rule, list swaps, writes to both SRAM chips, arm moves
— never occurred. `tb_target_detect` places hand-worked objects (a
person, a second person in the same sub-region, a dark car, a drifting
person, a too-skewed staircase, a too-narrow streak, pixels exactly at
threshold) and checks the exact reports over four frames: the second
repeats the first (the one-per-sub-region rule restarts every frame), the
third raises the person width limit to 6 and the fourth raises the car
height limit to 11, each changing which objects are reported.
