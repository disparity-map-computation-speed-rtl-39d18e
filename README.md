# SAD block-matching disparity engine

This design computes a dense disparity map from a rectified stereo image
pair. For every pixel of the left image it searches the same line of the
right image for the best-matching 7x7 neighbourhood. "Best" means the
smallest sum of absolute differences (SAD). The winning horizontal offset,
the disparity, is stored in a disparity image. Nearer objects have larger
disparities, so the map is a depth map up to a scale factor.

The default configuration targets a small FPGA:

| quantity                  | default | parameter  |
|---------------------------|---------|------------|
| image size                | 128 x 128 | `IMG_W`, `IMG_H` |
| pixel depth               | 8 bit   | `PIX_W`    |
| matching window           | 7 x 7   | `WIN`      |
| disparity levels          | 16 (0..15) | `MAX_DISP` |
| parallel SAD blocks       | 8 (one image line each) | `NUM_SAD` |

One frame takes **65,760 clocks**. That is about 1,900 frames/s at 125 MHz and
about 380 frames/s at the 25.175 MHz VGA pixel clock.

The design works by brute force. It computes every absolute difference of
every candidate window, with no reuse of partial sums between neighbouring
windows. Its speed comes from doing all 49 differences of a window at once,
from summing them in a pipeline that delivers one SAD per clock, and from
running eight such engines on eight image lines side by side.

## What is computed

A reference pixel (x, y) of the left image is compared with the pixels
(x - d, y) of the right image, for d = 0 .. MAX_DISP-1. The 7x7 windows
around both pixels are compared pixel by pixel. Their absolute differences
are summed, and the d with the smallest sum wins. If several d give the same
smallest sum, the smallest d is chosen.

Only pixels whose windows lie fully inside both images are computed:

    XMIN = MAX_DISP + WIN/2 - 1 = 18      XMAX = IMG_W - WIN/2 - 1 = 124
    YMIN = WIN/2               = 3       YMAX = IMG_H - WIN/2 - 1 = 124

That is 107 x 122 pixels. The rest of the map forms a black frame and reads
back as disparity 0. The frame is wider on the left, because the search
looks to the left by up to 15 pixels.

## Matching one line: the SAD block (`sad_block`)

This is the core of the design, and its schedule is the least obvious part.

**FIFO sets.** One line y needs image rows y-3 .. y+3 of both images. Before
a line is computed, these 7 left rows and 7 right rows are copied into two
on-chip *FIFO sets* (`fifo_set`). Each set has 7 row buffers of IMG_W pixels.
A set delivers one *window column* per clock: the same column of all 7 rows.
It is read through a column pointer. Stepping the pointer gives FIFO order,
and setting it back re-reads the set without touching the image memory.

**Window registers.** Each set feeds a 7x7 shift register (`window_reg`). A
column shifted in on the right pushes the oldest column out on the left. All
49 pixels are visible at once. After 7 shifts the register holds a full
window. Each further shift moves the window one pixel to the right.

**Per-pixel schedule.** For reference pixel x (STEPS = WIN-1+MAX_DISP = 22
clocks):

| step s | right window register                        | left window register |
|--------|----------------------------------------------|----------------------|
| 0..5   | reload: shift in columns x-18 .. x-13         | first pixel only: load columns x-3.. |
| 6      | 7th column shifted in: window for d = 15     | shift in column x+3  |
| 7..21  | one column per clock: d = 14 .. 0            | hold                 |

So the right window sweeps from the largest disparity down to 0. It is then
*reloaded* from its FIFO set for the next pixel. During that reload the left
window moves one column to the right. For the first pixel of a line, the left
register is filled during the first 7 steps. From step 6 on, a valid window
pair is present every clock: 16 pairs per pixel, one per disparity.

**SAD pipeline.** Each window pair flows through three stages:

* `abs_diff_array` forms all 49 |L - R| in parallel (1 clock).
* `adder_tree` adds them in a binary tree with a register at each of its
  6 levels (6 clocks, one sum per clock).
* `min_select`, the minimum block, keeps the running minimum and its
  disparity. It reports the disparity after the 16th SAD of the pixel.

Each window pair carries a tag along the pipeline: x, d, first and last.
Because the d values arrive in falling order, `min_select` takes a new value
when it is *smaller or equal*. This makes the smallest disparity win a tie.

**Timing of one line.** The first result appears 30 clocks after the clock
edge that samples `start` (22 + 1 + 6 + 1). After that, one result comes
every 22 clocks. `done` follows the result for x = XMAX, which is
107 x 22 + 9 = 2,363 clocks after start.

## Running eight lines at once (`stereo_sad_top`)

The left and right images are each held in an `image_mem`. Each `image_mem`
has two read ports. The frame sequencer handles the 122 valid lines in 16
groups of 8. Block k of group g computes line 3 + 8g + k. The last group has
only 2 lines, so its other 6 blocks stay idle.

**Filling.** The 8 lines of a group need 14 distinct image rows. The
sequencer reads each of these rows once, one left/right pixel pair per clock,
and broadcasts it to all blocks. Each block stores the rows that fall inside
its own 7-row band. Up to 7 blocks take the same row in the same clock, so
the single memory read port does not become the bottleneck. The blocks hold
no image data outside their FIFO sets.

**Computing and storing.** Then all blocks of the group start together and
run in lockstep. Each block writes its results into its own `disp_ram` bank
at address (group, x). So all 8 results of one clock are stored without
arbitration. The next group's fill starts as soon as every active block has
signalled `done`. Filling and computing do not overlap.

**Clock count.** For a group of n lines the frame takes

    (n + WIN - 1) * IMG_W        fill (one pixel pair per clock)
  + (XMAX - XMIN + 1) * STEPS    107 pixels x 22 clocks
  + 12                           hand-over, start, pipeline latency

clocks. With 15 full groups (4,158 clocks each) and one group of 2 lines
(3,390 clocks), this gives 65,760 clocks. The top reports the count of the
last frame on `frame_cycles`. Filling takes about 40 % of the frame.

**Display side.** Port B of both image memories, and the read ports of all
disparity banks, serve the display. A display can therefore show the left
image, the right image and the growing disparity map while a frame is being
computed. The read port (`dsp_addr` in, pixel data one clock later) selects
the bank from the line number. It returns 0 outside the valid region. The
banks are never cleared, so the border is produced by this masking.

## Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control state |
| `ld_we`, `ld_addr`, `ld_left`, `ld_right` | in | 1, 14, 8, 8 | write one left/right pixel pair at address y*IMG_W+x; only while not busy (asserted) |
| `start` | in | 1 | begin a frame when idle |
| `busy` | out | 1 | frame in progress, high for exactly `frame_cycles` clocks |
| `done` | out | 1 | one-clock pulse at the end of a frame |
| `frame_cycles` | out | 32 | busy clocks of the last frame |
| `dsp_addr` | in | 14 | display read address y*IMG_W+x |
| `dsp_left`, `dsp_right`, `dsp_disp` | out | 8, 8, 4 | pixels at `dsp_addr`, one clock later; disparity 0 in the border |

Memories and datapath registers are not reset. Only valid bits and the
sequencers are. The display may read the disparity map of the previous frame
while lines of the new one are being written.

## Files

| file | contents |
|------|----------|
| `rtl/stereo_pkg.sv` | default sizes shared by all modules |
| `rtl/stereo_sad_top.sv` | frame sequencer, row broadcast, 8 SAD blocks, disparity banks, display read path |
| `rtl/sad_block.sv` | one line engine: sequencer, two FIFO sets, two window registers, SAD pipeline |
| `rtl/fifo_set.sv` | WIN row buffers with a column read port |
| `rtl/window_reg.sv` | WIN x WIN column shift register |
| `rtl/abs_diff_array.sv` | parallel absolute differences |
| `rtl/adder_tree.sv` | pipelined binary adder tree |
| `rtl/min_select.sv` | running minimum and disparity register |
| `rtl/image_mem.sv` | image memory: one write port, two read ports |
| `rtl/disp_ram.sv` | disparity memory: one write port, one read port |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog that ends the run with a failure if it hangs. For example, the
whole design at its default size:

    verilator --binary --timing -Wno-fatal --top-module tb_stereo_sad_top \
        -y rtl -y tb +libext+.sv rtl/stereo_pkg.sv tb/tb_stereo_sad_top.sv
    ./obj_dir/Vtb_stereo_sad_top

Substitute any other `tb_<module>` to test a single module. `verilator --lint-only -Wall`
with the same file arguments lints a module.

`tb_stereo_sad_top` builds a stereo pair whose right image is the left image
shifted by a disparity that varies over the image. The pair also has a flat
patch, which produces SAD ties, and some noise. The testbench runs two full
frames. It compares all 16,384 disparities with a direct SAD search done in
the testbench, and checks the image read-back. It checks that the frame takes
exactly the 65,760 clocks worked out above. It also counts the line groups,
the partial last group, shared rows, right-window reloads, display reads
while busy, border reads and ties, and fails if any of them never happened.
`tb_sad_block` checks every result of three lines, the first-result latency
(30 clocks), the result interval (22 clocks) and the line time (2,363
clocks). `tb_adder_tree` checks the 6-clock latency and the one-sum-per-clock
throughput.

## Changing the configuration

All sizes are parameters of `stereo_sad_top`, and their defaults come from
`stereo_pkg`. A larger window or disparity range changes STEPS, the SAD width
and the tree depth automatically. More SAD blocks mean larger groups and
fewer of them. The expected clock counts in the testbenches are written as
formulas of the same parameters. The testbenches themselves are written for
the default size.

## Where this design departs from, or goes beyond, its source

The overall structure follows a published FPGA architecture for SAD block
matching. That structure includes:

* the image and disparity memories with a second port for a display;
* FIFO sets feeding shift-register windows;
* a reload of the right window for every reference pixel;
* 49 parallel differences with a pipelined sum and a minimum block;
* eight such blocks on eight lines.

The following points are choices made here:

* **Disparity sweep direction.** The right window starts at the largest
  disparity and moves toward 0. The tie rule is set so that the result equals
  an upward scan that keeps only strictly smaller values.
* **How eight blocks share the image memory.** The source only names the
  memory bottleneck and suggests replicating memories. Here, each row is
  broadcast once to all blocks of a group instead. The line-to-block
  assignment, the group-by-group schedule without overlap of fill and
  compute, and the per-block disparity banks are also this design's own.
* **Memories.** The image memories are RAMs with a load port, where the
  offline original used ROMs. Every memory has a 1-clock synchronous read.
  The FIFO sets read combinationally.
* **Not included.** The VGA display controller and the camera interface are
  not part of the RTL; their ports are brought out. There is no minimum
  disparity: the search always starts at d = 0. No left-right consistency
  check or match-quality threshold is applied.
* **Not verified.** The FPGA resource figure quoted for the original
  (about 1,800 Spartan-3A slices per SAD block) and its clock rates have not
  been checked against this RTL. The frame rates above are simply the clock
  count divided by the clock frequency.

A 1280 x 480 image with a 19 x 19 window and up to 64 disparity levels is far
beyond the default configuration: 37 times the pixels, 7 times the window
area and 4 times the levels. The parameters can express such a size, but it
has not been simulated, and it would not fit in the on-chip memory of a small
FPGA.
