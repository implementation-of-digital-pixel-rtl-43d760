# Motion features for automatic braking from a digital pixel sensor

A vehicle that should brake by itself when a pedestrian or an animal steps onto
the road needs to notice *motion* in front of it, quickly and without a
processor in the loop. This design does that in hardware for a 100 x 100
digital pixel sensor (DPS), where every pixel digitises and stores its own
value. A frame is processed in two parallel styles:

* **row-parallel** edge filtering: 24 identical local-feature-extraction (LFE)
  circuits each own a band of rows and filter it with four 5 x 5 directional
  edge kernels at the same time;
* **pixel-parallel** motion extraction: the resulting binary edge map is
  combined with an edge map accumulated over earlier frames, for 96 pixels per
  clock, and the pixels that differ are the motion features. Their number
  decides whether to brake.

A whole frame takes 96 clocks of readout plus 2 clocks of pipeline, 98 clocks
from `start` to `frame_done`.

```
 pixel write port                 kernel programming port
        |                                  |
  +-------------+   4x8 block     +-----------------+
  | dps_frame_  |---- per group ->| row_parallel_   |  24 x lfe_circuit
  | mem 100x100 |  (25 groups)    | unit            |  (4 x edge_conv5x5 each)
  +-------------+                 +-----------------+
        ^ step                       | max gradient + direction, 96 per clock
  +-------------+                 +-----------------+
  | block_      |                 | gfe_sem_merge   |  threshold -> 4 edge maps -> OR
  | readout_ctrl|                 +-----------------+
  +-------------+                    | MSEM bits, 96 per clock
                                  +-----------------+      +------------+
                                  | mfe_pixel_      |----->| brake_ctrl |--> brake
                                  | parallel (maps) |      +------------+
                                  +-----------------+
                                     | map readout, one 96-bit row at a time
```

## Readout geometry: groups, blocks, windows, phases

This is the part that takes the most care to follow, because three different
tilings meet.

* **Groups.** The 100 pixel rows are split into 25 groups of four rows
  (group *g* = rows 4g .. 4g+3).
* **Blocks and column steps.** At column step *s* (0 .. 23) every group puts
  out a 4 x 8 block, columns 4s .. 4s+7, all 25 groups at once. Successive
  steps overlap by four columns.
* **Windows.** LFE circuit *g* (0 .. 23) joins the blocks of groups *g* and
  *g+1* into an 8 x 8 window, rows 4g .. 4g+7. So 25 groups feed 24 circuits
  and every group except the first and last is seen by two circuits.
* **Kernel positions and phases.** A 5 x 5 kernel fits in an 8 x 8 window at
  4 x 4 positions. Each step is held for four clocks (phase 0..3); in phase
  *p* a circuit evaluates the four positions of window row *p* in parallel.

Kernel position (p, q) of circuit g at step s is centred on image pixel
(4g+p+2, 4s+q+2) and is stored at map position **(4g+p, 4s+q)**. The maps are
therefore 96 x 96 and cover exactly the pixels at which a 5 x 5 kernel fits;
the two-pixel border of the image has no map entry. Per clock the design
produces 24 circuits x 4 positions = 96 results; 24 steps x 4 phases = 96
clocks fill the 9,216 map positions once.

| clock after start | readout (step, phase) | LFE result for | map update for |
|---|---|---|---|
| 0 | (0,0) | – | – |
| 1 | (0,1) | (0,0) | – |
| 2 | (0,2) | (0,1) | (0,0) |
| ... | ... | ... | ... |
| 95 | (23,3) | (23,2) | (23,1) |
| 96 | idle | (23,3) | (23,2) |
| 97 | idle | – | (23,3), `frame_done` high |

## Directional kernels

Coefficients are -1, 0 or +1, so a convolution is a sum of added and
subtracted pixels; no multiplier is used. The reset kernels (row 0 at the top,
`+` = +1, `-` = -1, `.` = 0) are:

```
horizontal   -45 degree   vertical     +45 degree
.....        .+...        .+.-.        ...+.
+++++        -.++.        .+.-.        .++.-
.....        .-.+.        .+.-.        .+.-.
-----        .--.+        .+.-.        +.--.
.....        ...-.        .+.-.        .-...
```

The +45 degree kernel is the left-right mirror of the -45 degree kernel. All
four are held in `kernel_prog_ctrl` and can be rewritten tap by tap at run time
(`kp_we`, `kp_dir`, `kp_row`, `kp_col`, `kp_coef`); writes of -2 or outside
the 5 x 5 grid are ignored. All 24 circuits always use the same kernels.

For each position `edge_conv5x5` takes the magnitude of each of the four sums
and keeps the largest, with its direction. On a tie the earlier direction in
the order horizontal, -45, vertical, +45 wins. With 8-bit pixels the largest
possible magnitude is 25 x 255 = 6,375, held in 13 bits.

## From gradients to one edge map

`gfe_sem_merge` compares each maximum gradient with the edge threshold
`edge_th`: a position is a significant edge of its direction when the gradient
is strictly greater than the threshold. That gives four significant edge maps,
one per direction, and their OR is the **merged significant edge map (MSEM)**.
Because each position has exactly one direction, the MSEM bit is simply
"gradient above threshold"; the four per-direction bits exist only inside the
clock that produces them.

The threshold is a plain input, constant over a frame. The published
architecture names an edge-detecting threshold step but not how the threshold
is found; an adaptive threshold (for instance from the gradient statistics of
the frame) would slot in here.

## Accumulated edge map and motion features

`mfe_pixel_parallel` keeps three 96 x 96 one-bit maps and updates the 96
positions of each clock at once:

```
AEM    <= aem_init ? MSEM : (AEM | MSEM)
motion <= MSEM xor AEM(new)
```

`aem_init`, sampled with `start`, marks the first frame of a sequence: its
MSEM becomes the accumulated edge map (AEM). Later frames OR their MSEM into
it. Note what the XOR with the *updated* AEM means: since the new AEM contains
the MSEM, the motion map equals `AEM(old) and not MSEM` – the edges that were
seen in earlier frames and have left their position in this one. On the first
frame of a sequence the motion map is empty. This is the rule as specified;
a variant that compares with the AEM *before* the update (giving also the
edges that newly appeared) would change only the `aem_new` line of
`mfe_pixel_parallel`.

The AEM only grows until the next `aem_init`; there is no decay. Start a new
sequence periodically, or the accumulated map fills up.

## Brake decision

`brake_ctrl` counts the motion pixels of the frame as they are produced (up
to 96 per clock). At `frame_done` the total goes to `motion_count` and
`brake` becomes `motion_count >= brake_th`; both hold until the next frame
ends. The counting rule and the threshold are choices of this design – the
architecture only states that extracted motion features activate the brakes.

## Using `motion_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `pix_we`, `pix_row`, `pix_col`, `pix_data` | in | 1, 7, 7, 8 | write one pixel value per clock |
| `kp_we`, `kp_dir`, `kp_row`, `kp_col`, `kp_coef` | in | 1, 2, 3, 3, 2 | write one kernel tap |
| `start` | in | 1 | start a frame (ignored while `busy`) |
| `aem_init` | in | 1 | sampled with `start`: begin a new accumulation |
| `edge_th` | in | 13 | edge threshold, must be stable during the frame |
| `brake_th` | in | 14 | motion-pixel count that brakes |
| `busy` | out | 1 | frame in progress |
| `frame_done` | out | 1 | one-clock pulse, 98 clocks after `start` |
| `motion_count`, `brake` | out | 14, 1 | result of the last frame, valid from the clock after `frame_done` |
| `map_rd_row` | in | 7 | map row to read |
| `msem_row`, `aem_row`, `motion_row` | out | 96 each | that row of the three maps, combinational |

Sequence: reset (loads the default kernels and clears all maps), write the
10,000 pixels, optionally rewrite kernel taps, pulse `start`, wait for
`frame_done`, read `brake`/`motion_count` and, if wanted, the maps. Do not
write pixels while `busy`; an assertion in `motion_top` flags it. Loading a
frame through the one-pixel port takes 10,000 clocks, much longer than the 98
clocks of processing – in a real DPS every pixel writes its own value at once.

Parameters: `IMG_ROWS` and `IMG_COLS` (default 100 each). Both should be
multiples of four; the number of LFE circuits is `IMG_ROWS/4 - 1` and the
number of column steps `IMG_COLS/4 - 1`. Shared widths and the default kernels
are in `dps_pkg`.

## Size and what it costs

Everything is held in flip-flops: 80,000 pixel bits, 3 x 9,216 map bits and
200 kernel bits, plus 96 parallel kernel positions of four 25-tap add/subtract
trees. That is far more than the small Spartan-3 part (1,920 slice registers,
3,840 LUTs) on which the architecture was originally reported to run; the
reported implementation must have kept frames and maps elsewhere. An FPGA port
would move the pixel array and the maps to block RAM and would likely
time-multiplex the LFE circuits.

## What is modelled and what is not

Not modelled: the photodiodes and in-pixel analog-to-digital converters of the
sensor (their output enters through the pixel write port), and the
soft-processor system with its serial link to a PC that loaded images and
displayed results in the original set-up (its place is taken by the pixel
write, kernel programming and map readout ports). The architecture is also
described as "self speed adaptive", but no mechanism for that is specified,
and none is built.

Taken from the architecture: the 100 x 100 array, grouping by four rows, 4 x 8
blocks joined into 8 x 8 windows, 24 LFE circuits, the four 5 x 5 kernels,
maximum gradient with direction, thresholding into four significant edge
maps, the OR merge, the AEM/XOR motion rule, and programmable kernels.

Choices of this design: 8-bit pixels; -1/0/+1 coefficients; magnitudes of the
convolution sums and the tie rule; four-column step stride and the four-phase
schedule; one-clock registered LFE stage; the threshold as an input and the
strict comparison; `aem_init` as a per-frame input; the motion-pixel count and
brake threshold; register arrays for all storage; all port protocols.

## Files

| file | content |
|---|---|
| `rtl/dps_pkg.sv` | widths, direction enum, result struct, default kernels |
| `rtl/dps_frame_mem.sv` | pixel array with row-parallel 4 x 8 block readout |
| `rtl/block_readout_ctrl.sv` | step/phase sequencer of a frame |
| `rtl/kernel_prog_ctrl.sv` | programmable kernel store |
| `rtl/edge_conv5x5.sv` | one kernel position: four convolutions, maximum, direction |
| `rtl/lfe_circuit.sv` | one LFE circuit (8 x 8 window, four positions per clock) |
| `rtl/row_parallel_unit.sv` | the 24 LFE circuits |
| `rtl/gfe_sem_merge.sv` | threshold, significant edge maps, merge |
| `rtl/mfe_pixel_parallel.sv` | MSEM, AEM and motion maps |
| `rtl/brake_ctrl.sv` | motion count and brake decision |
| `rtl/motion_top.sv` | the whole pipeline |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ref_pkg.sv` | reference model (kernels re-entered as text, convolution, maximum) |
| `tb/tb_motion_body.svh` | end-to-end test body shared by the two top-level testbenches |
| `tb/tb_motion_top.sv`, `tb/tb_motion_top_full.sv` | end-to-end at 24 x 24 and at the full 100 x 100 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; it has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_motion_top_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dps_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_motion_top_full.sv
./obj_dir/Vtb_motion_top_full
```

Replace the top module and the last file for another testbench
(`tb_edge_conv5x5`, `tb_lfe_circuit`, ...). The full-size run builds in about
half a minute and simulates five frames in a few seconds.

The end-to-end tests build frames of low-contrast noise with a moving bright
square and two bright triangles, so that all four directions produce
significant edges, and compare every map bit, the motion count, the brake
output and the 98-clock latency with an independent model. They cover a new
accumulation and accumulation over several frames, brake on and off, a
reprogrammed kernel, a `start` pulse while busy, and gradients under the
threshold, and count a failure if any of these never happens. Each module's
own testbench was also run against a deliberately broken copy of the module and
failed, as it should.
