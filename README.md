# Pipelined thinning core for finger-vein images

Finger-vein recognition turns a grey-level finger image into a binary vein map.
A matching stage then needs the veins as lines one pixel wide. That step is
called thinning, or skeletonisation. Thinning peels boundary pixels off every
object, again and again, until only a connected centre line is left. In software
this is slow: every pass visits every pixel and looks at its 3x3 neighbourhood,
and a thick vein needs many passes.

This core does the thinning in hardware on a 240 x 160 binary frame. It
streams the frame through a 3x3 window generator and a pipelined decision unit
at one pixel per clock. It repeats such passes until nothing changes, then
streams the skeleton out. The structure follows the thesis "Hardware Core of
Pipelined Thinning Algorithm":

- a control unit (CU) driven by a state machine;
- a datapath unit (DU);
- a mask register (MR) that builds the 3x3 window, serial in and parallel out;
- a pipelined pixel processing unit (PPU);
- a top level, `thinning_algo`.

The thesis names these units and fixes the frame size. The thinning rule, the
pipeline stages, the memory organisation, the ports and the control
sequence are this design's own choices. They are listed under
"Departures and assumptions" below.

## The thinning rule

Pixels are 1 for vein (object) and 0 for background. Pixels outside the frame
count as 0. The neighbours of the pixel under test P1 are named P2 (north),
then clockwise P3 (NE), P4 (E), P5 (SE), P6 (S), P7 (SW), P8 (W) and P9 (NW).

The core uses the two-sub-iteration parallel rule of Zhang and Suen. Take
B as the number of 1s among P2..P9, and A as the number of 0→1 steps in the
circular sequence P2, P3, ..., P9, P2. A pixel with value 1 is deleted when:

| condition | sub-iteration 1 | sub-iteration 2 |
|---|---|---|
| neighbour count | 2 ≤ B ≤ 6 | 2 ≤ B ≤ 6 |
| connectivity | A = 1 | A = 1 |
| direction | P2·P4·P6 = 0 and P4·P6·P8 = 0 | P2·P4·P8 = 0 and P2·P6·P8 = 0 |

Within a sub-iteration, every decision is based on the image as it was when
that sub-iteration began. This is what "parallel" means here. One iteration is
sub-iteration 1 followed by sub-iteration 2. The core stops after the first
iteration that deletes no pixel.

## How one pass works in place

This is the least obvious part of the design (`datapath_unit.sv`).

Each sub-iteration is one pass over the frame. All passes use a single
one-bit frame memory (`frame_ram`, 38 400 bits). The memory has one read port
and one write port. The pass proceeds as follows:

1. A read counter sweeps addresses 0 .. W·H−1 in raster order, one per clock.
   Reads take one clock. After the last address, it feeds W+1 zero pixels so
   that the last line of windows is flushed out.
2. The mask register is a shift register of 2·W+3 bits: two whole lines plus
   three pixels. After every shift, its taps hold the 3x3 window centred on
   the pixel W+1 places behind the newest one. The first W+1 shifts of a pass
   only fill the register. Each later shift yields the window for the next
   centre in raster order, with that centre's address.
3. The border is handled by masking, not padding. The mask register tracks
   the row and column of the centre and forces neighbours outside the frame
   to 0. Leftovers from the previous pass, or from the row before, never
   enter a window.
4. The PPU decides on the window in three clocks. The new centre value is
   then written back to the centre's address.

The write to address *q* happens five clocks after address *q+W+1*, the
last pixel of its window, was read. By then every pixel that any later window needs has already been read.
Pixels that were read but not yet rewritten are still held in the shift
register. So one memory is enough: every window sees the frame as it was at
the start of the pass, as the parallel rule requires. The datapath also ORs
the PPU's "deleted" flags into a `changed` bit for the pass.

Cycle counts (W·H = 38 400 at the default size):

- one pass, from `pass_start` to `pass_done`: W·H + W + 7 clocks;
- one pass, from start to start: W·H + W + 8 = 38 648 clocks;
- one iteration: 2·(W·H + W + 8) clocks;
- from the clock that takes the last input pixel to `done`:
  2·iterations·(W·H + W + 8) + W·H + 4 clocks.

For example, a test frame of thin veins alone needs 3 iterations:
270 292 clocks, or 2.7 ms at 100 MHz. A frame with large filled patches needs
21 iterations: 1 661 620 clocks, or 16.6 ms at 100 MHz.

## Pixel processing unit (`ppu.sv`)

The PPU takes one window per clock and has three register stages:

1. **Stage 1** registers B and A, each a 4-bit count of 8 single-bit terms,
   and the four three-input products.
2. **Stage 2** turns these into three condition bits. The direction bit uses
   the pair of products that belongs to the current sub-iteration.
3. **Stage 3** ANDs the conditions with the centre pixel. It registers the
   new pixel, a `deleted` flag and the pixel address, which travels along as
   a tag.

The latency is `PPU_LAT = 3` clocks. This constant is in `thin_pkg`.

## Control unit (`control_unit.sv`)

The control unit is a Moore state machine:

```
IDLE --start--> LOAD --load_done--> SUB1_GO -> SUB1_RUN --pass_done--> SUB2_GO -> SUB2_RUN
                                       ^                                            |
                                       +------- either pass deleted a pixel --------+
                                                                                    | nothing deleted
OUT_GO -> OUT_RUN --unload_done--> DONE -> IDLE  <----------------------------------+
```

Each `*_GO` state lasts one clock and issues one pulse (`pass_start` with
`sub`, or `unload_start`). The control unit remembers whether
sub-iteration 1 changed anything and counts the iterations. The count
includes the last iteration, the one that changed nothing.

The control signals and the status signals travel between the control unit
and the datapath in one SystemVerilog interface, `du_cu_if`. Its header
comment lists each signal and its timing.

## Top-level interface (`thinning_algo.sv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse in IDLE to begin a job |
| `pix_in`, `pix_in_valid` | in | 1 | frame pixels, raster order, row 0 first |
| `in_ready` | out | 1 | a pixel is taken in each clock where `pix_in_valid` and `in_ready` are both high |
| `pix_out`, `pix_out_valid` | out | 1 | skeleton, raster order, W·H consecutive clocks |
| `busy` | out | 1 | from `start` until `done` |
| `done` | out | 1 | one-clock pulse after the last output pixel |
| `iterations` | out | 8 | iterations used by the last job |

Parameters: `W = 240`, `H = 160` and `ITER_W = 8`. The types and defaults
shared by the modules are in `thin_pkg.sv`.

To use a different frame size, set `W` and `H` on `thinning_algo`. A smaller
image can also go through the default core if it is padded with zero pixels.
Its skeleton does not change.

## Files

| file | contents |
|---|---|
| `rtl/thin_pkg.sv` | frame size, PPU latency, `window_t`, `subiter_e` |
| `rtl/du_cu_if.sv` | control/status bundle between CU and DU |
| `rtl/frame_ram.sv` | 1-bit frame memory, 1 read + 1 write port |
| `rtl/mask_register.sv` | 3x3 window generator (MR) |
| `rtl/ppu.sv` | 3-stage thinning decision (PPU) |
| `rtl/datapath_unit.sv` | DU: load, in-place passes, unload |
| `rtl/control_unit.sv` | CU state machine |
| `rtl/thinning_algo.sv` | top level |
| `tb/thin_ref_pkg.sv` | reference thinning model and synthetic vein-image generator for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a full-size run |

## Verification

Every testbench checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_ppu` runs 20 000 random windows with gaps and both sub-iterations. It
  checks the decision, the tag and the exact 3-clock latency against a
  separately written form of the rule.
- `tb_mask_register` uses a 7x5 frame with random gaps between shifts. It
  checks every window, every border mask, the raster order, the window count
  per frame, and that a `clear` restarts the frame.
- `tb_frame_ram` runs random simultaneous reads and writes against a shadow
  copy.
- `tb_datapath_unit` drives the datapath by hand on a 12x9 frame. It checks
  each pass against the reference model, the pass length, `pass_changed`
  and the unload timing.
- `tb_control_unit` answers the control unit with scripted pass outcomes.
  It checks the order of operations, the alternation of sub-iterations, the
  stopping rule and the iteration count.
- `tb_thinning_algo` runs jobs end to end on 24x16 frames: empty, all ones,
  random veins and blobs, and an already thin skeleton. It checks the output,
  the iteration count and the exact clock count. It also counts how often
  each mechanism occurred: input stalls, deletions in each sub-iteration,
  single-iteration and multi-iteration jobs, and objects touching the border.
  A mechanism that never occurred is a failure.
- `tb_thinning_algo_full` runs three jobs back to back at the default
  240x160 size, on synthetic vein images of different density:
  - 7 992 object pixels, 21 iterations, 1 013 pixels kept;
  - 3 120 object pixels, 3 iterations, 725 pixels kept;
  - 11 836 object pixels, 19 iterations, 1 779 pixels kept.

  Each job compares all 38 400 output pixels with the reference model and
  checks the exact clock count.

The reference model in `tb/thin_ref_pkg.sv` is a direct, unpipelined
version of the rule above. It copies the image once per sub-iteration. It
checks that the hardware implements this rule correctly. It does not show
that this rule is the one the thesis used.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/thin_pkg.sv tb/thin_ref_pkg.sv tb/tb_thinning_algo.sv \
    --top-module tb_thinning_algo
./obj_dir/Vtb_thinning_algo
```

Use the same command for the other testbenches with their own top module.
The full-size run takes about a second.

## Departures and assumptions

The following follows the thesis:

- the frame size, 240 x 160 (read as 240 columns by 160 rows);
- a 3x3 window scanned over the whole image;
- one-pixel-wide binary output;
- the CU/DU split;
- a serial-in parallel-out mask register;
- a pipelined pixel processing unit.

The following are this design's choices:

- **Thinning rule.** Zhang–Suen two-sub-iteration parallel thinning. The
  thesis also mentions an enhancement of the algorithm for hardware. Apart
  from the pipelining, no such enhancement is built here.
- **Pipeline depth.** Three stages.
- **Memory.** One frame memory updated in place. No double buffering.
- **Ports.** A serial one-pixel-per-clock load with valid/ready, and a
  serial unload with valid.
- **Control.** The states and signals of the control unit and of `du_cu_if`.
- **Border.** Pixels outside the frame are 0.
- **Stopping rule.** Stop after an iteration with no deletions.
- **Reset.** Active-low asynchronous reset of all control state. The memory
  and data registers are not reset.

Results will differ from another thinning algorithm, for example a
different rule or a different order of sub-iterations. The modules are
split so that only `ppu.sv` needs to change to use another 3x3 rule. A rule
that needs a larger window would also need a longer mask register.

The core supports only one job at a time. There is no overlap between
unloading one frame and loading the next. The iteration counter wraps after
255 iterations, but the thinning itself still finishes correctly.
