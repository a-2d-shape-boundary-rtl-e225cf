# Data-flow shape boundary detector

This circuit finds the outline of objects in a grey-level image while the image
streams past, one pixel per clock. It does not store the frame. Its output is a binary image
in which the boundary of each object is a continuous line, ideally one pixel wide.
That is the input that vertex-extraction (polygonal modelling) algorithms need.

The central idea is the **pathfinder**. A border line crossing a 3x3
neighbourhood can only take a small number of shapes, if it has no sharp
corners. Each shape is valued by the average strength of its pixels. A pixel
is kept as a border pixel only if one of the strongest shapes passes through
it. The RTL is a straight implementation of the published algorithm, a chain of three
kinds of window operator. Where the published description leaves a detail
open, the choice made here is stated below.

```
 pix_i ──► gradient_stage ──► max_pf1_stage ──► pf2_stage ──(…NUM_PF2)──► border_o
 (W bits)   Roberts, 2x2       local max 5x5      pathfinder II 3x3          (1 bit)
                │              + pathfinder I 3x3       
                ▼                    ▼
             grad_o             border1_o
        (gradient image)   (first border image, grey)
```

With the defaults (512 x 512 pixels, 8 bits) the design holds 7 line memories
(28,672 bits). It takes one pixel per clock, so 30 frames/s needs a pixel
clock of at least 7.9 MHz.

## Stream format and timing

* Pixels enter in raster order, one per cycle with `valid_i = 1`. Lowering
  `valid_i` pauses the whole pipeline: every register, counter and line memory
  advances only on accepted pixels. There is no back-pressure.
* There are no frame or line sync signals. The first accepted pixel after reset
  (`rst_n` low, asynchronous) is pixel (0,0). Frames of `LINES` lines of `LINE`
  pixels then follow each other with no gap. To insert blanking, lower `valid_i`.
* Each stage outputs one pixel per accepted input pixel, with a valid strobe
  that is high for one cycle. Output pixels come out in the same raster order.
  Each stage delays the image by a fixed number of *pixels*:

  | stage            | window | line memories | delay in pixels       |
  |------------------|--------|---------------|-----------------------|
  | `gradient_stage` | 2x2    | 1             | 1                     |
  | `max_pf1_stage`  | 5x5    | 4             | 2 lines + 4           |
  | `pf2_stage`      | 3x3    | 2             | 1 line + 2            |

  "Delay *d*" means that the result for pixel *k* is registered at the edge that
  accepts pixel *k + d*. Its valid strobe is high in the following cycle. Each
  stage boundary adds one clock cycle, because the next stage sees that strobe
  one cycle later. With an uninterrupted stream, border pixel *k* therefore
  appears `1 + (2*LINE+4) + NUM_PF2*(LINE+2) + (2 + NUM_PF2)` cycles after
  pixel *k* was accepted.
* Because results are pushed out by later input, the last lines of a frame
  appear only while the next frame (or dummy pixels) is being fed in.

### Window forming and the image border

`window_gen` builds every window. It holds K-1 line memories (`line_buffer`, one word
per column, read-before-write) and a KxK shift array. This is (K-1) lines + K pixels of
storage, the minimum for a KxK window. It counts the row and column of the window's
reference pixel. Any window element outside the image reads as 0. This includes
pixels that wrapped in from the neighbouring line or the neighbouring frame.
The zero padding is a choice of this design; the published algorithm does not
say how the image border is treated. The gradient of pixels in the first row
and column is also forced to 0, because their 2x2 window is incomplete.

## Stage 1: Roberts gradient

`G(m,n) = |P(m-1,n-1) - P(m,n)| + |P(m-1,n) - P(m,n-1)|`.
The sum can reach twice full scale. It is **saturated** to W bits, so the
gradient image keeps the pixel width of the input, as the storage sizes of the
later stages assume. Saturating rather than halving is a choice of this design.

## Stage 2: local maximum and pathfinder I

Both criteria look at the gradient image. If both hold, the output is the centre's
gradient value; otherwise it is 0. The first border image therefore keeps its grey
levels.

**Local maximum (5x5, `local_max`).** The centre must exceed 10 % of full
scale: `centre*100 > (2^W-1)*10`, so at W = 8 it must be at least 26. It must also be among the 5 biggest values of the window. In hardware this is
24 comparators of the form "neighbour >= centre", a population count, and the test
`count < 5`. Ties count against the centre, so a flat area never passes.

**Pathfinder I (inner 3x3, `pathfinder1`).** Every path *p* of the path set
(next section) gets the value

    S_p = (12 / N_p) * (sum of its N_p pixels)        N_p in 1..4

The weights 12, 6, 4 and 3 make this an exact integer average scaled by 12. The
criterion holds when the centre lies on one of the **6** best paths. Let M be the
best value among the 12 paths through the centre. The 32 other paths are each
compared with M and the number that are strictly greater is counted. The criterion holds
when that count is below 6. Counting only strictly greater values as beating M
is a choice of this design.

## The path sets

A path is the set of window pixels covered by a border line crossing the 3x3
window. Shapes with a sharp (90 degree or tighter) turn are excluded, because
they would confuse later border tracking. All paths are rotations and
mirror images of nine primitives (r = row from the top, c = column from the
left, centre = (1,1)):

| N | primitive                          | through centre | variants |
|---|------------------------------------|:--------------:|:--------:|
| 1 | corner pixel (0,0)                 |                | 4        |
| 2 | (0,0)(1,0) - down an edge          |                | 8        |
| 2 | (1,0)(0,1) - cutting a corner      |                | 4        |
| 3 | (0,1)(1,1)(2,1) - straight         | yes            | 2        |
| 3 | (0,0)(1,1)(2,2) - diagonal         | yes            | 2        |
| 3 | (0,0)(1,1)(2,1) - knee             | yes            | 8        |
| 3 | (0,0)(1,0)(2,1) - knee on an edge  |                | 8        |
| 3 | (0,0)(1,0)(2,0) - edge line        |                | 4        |
| 4 | (0,0)(0,1)(1,2)(2,2) - corner arc  |                | 4        |

Altogether that is 44 paths, 12 of them through the centre. Pathfinder I uses all 44.
Pathfinder II uses only the 28 paths with three or more pixels: the 12 through
the centre and 16 around it. The corner arc is the only four-pixel shape. It
describes a line that bends around the window without touching the centre.

`bd_pkg` holds the 44 paths as 9-bit masks (bit 3r+c). They are ordered centre
paths (0-11), then the other paths of 3-4 pixels (12-27), then the short ones (28-43),
so both pathfinders select their subsets by index. The testbenches do not use
this table. They rebuild the path set from the primitives above by applying
the eight symmetries of the square and removing duplicates.

## Stage 3: pathfinder II

Let Mc be the best value among the 12 centre paths and Mo the best among the 16
others. The centre is a border pixel when **Mc > Mo**. When **Mc = Mo**,
a fixed rule chooses between two equally good parallel candidates, so that only one of them survives:
the pixel is kept if the upper-right corner triple (0,1)+(0,2)+(1,2) sums to
more than the lower-left triple (1,0)+(2,0)+(2,1). This keeps the line one pixel
wide. Mo is never formed in hardware. A comparison tree gives Mc. Sixteen
comparators test each non-centre path against Mc: a 16-input NOR of the
"greater" results says that Mc is unbeaten, and an OR of the "equal" results
detects the tie.

`pf2_stage` has two modes, set by `binary_i`:

* **binary** (`1`): the output is 1 for a border pixel and 0 otherwise. This
  gives the final border image.
* **pass-through** (`0`): a border pixel keeps its grey value and other pixels are
  cleared. Chaining a pass-through stage in front of a binary one
  (`NUM_PF2 = 2`) helps low-contrast images whose first border image is still
  too thick. The top level puts all stages but the last in pass-through mode.

## Top level: `boundary_detector`

| parameter    | default | meaning                                           |
|--------------|---------|---------------------------------------------------|
| `W`          | 8       | bits per pixel (all images)                        |
| `LINE`       | 512     | pixels per line                                    |
| `LINES`      | 512     | lines per frame                                    |
| `TOP_N`      | 5       | local maximum: centre must be among the TOP_N biggest |
| `THRESH_PCT` | 10      | local maximum: threshold, % of full scale          |
| `RANK`       | 6       | pathfinder I: number of best paths                 |
| `NUM_PF2`    | 1       | number of chained pathfinder II stages             |

Ports: `clk`, `rst_n`, `valid_i`, `pix_i[W-1:0]` in. Three images come out:
`grad_valid_o/grad_o`, `border1_valid_o/border1_o` and
`border_valid_o/border_o` (1 bit). The intermediate images are brought out
so they can be monitored.

Area grows roughly in proportion to `LINE * W`, because the line memories
dominate. The path arithmetic is combinational within one pixel clock. At the
intended 8 MHz pixel rate that is not critical. For a much faster clock, the
path sums would need more pipelining.

## Departures and open points

* **Tie handling.** Local maximum ties count against the centre. A pathfinder I path
  must be strictly better than M to beat it. The pathfinder II tie rule is
  applied whenever Mc = Mo, including when all values are 0; in that case the
  corner sums are equal too and the pixel is cleared.
* **Binary output in pathfinder II** can mark a pixel whose own value is 0, when
  a centre path through it is the strongest. This bridges one-pixel gaps in a
  line. It follows from the criterion as stated, which looks only at path values.
  On the synthetic tilted-bar image, this bridging also turns some shallow
  diagonal edges into stair-steps two pixels wide, or into two parallel lines
  where the first border image had many gaps. Straight and steep edges come
  out one pixel wide. How often the tie rule decides depends strongly on the
  image. On the synthetic images it decided 8 % of the border pixels of the
  arch-shaped block and 43 % of those of the noisy tilted bar. The published
  evaluation reports about 4 % on its photographs.
* **Image border, frame sync, reset, handshake, gradient saturation**: choices
  of this design, described above.
* **Line memories** are register arrays with an asynchronous read. A synchronous
  RAM macro would need the read address issued one pixel early.
* **Operator counts.** The published hardware estimate counts 136 adders for
  pathfinder I and 92 for pathfinder II. The RTL writes each path sum on its own
  and leaves sharing of common sub-sums to synthesis, so its adder count does not
  match those figures.
* The 4-bit and 5-bit test images of the evaluation (a 64 x 64 toy block and a
  220 x 128 screwdriver) need other values of `W`, `LINE` and `LINES`. Line
  length is fixed at elaboration.

## Verification

The stages carry two assertions. A stage's valid strobe may only follow an
accepted input pixel. The window counters must stay inside the frame.

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. The model in
`tb/bd_ref_pkg.sv` works on whole images held in arrays, written
independently of the RTL (its own path enumeration, its own windowing).

| testbench              | covers |
|------------------------|--------|
| `tb_line_buffer`       | read-before-write, write enable |
| `tb_window_gen`        | 2x2/3x3/5x5 windows over 3 frames with pauses: every element, zero padding, priming, coordinates |
| `tb_gradient_stage`    | gradient values, saturation, 1-pixel delay |
| `tb_local_max`         | threshold edge (25/26), exactly 4 vs 5 neighbours >=, flat patch, random windows |
| `tb_pathfinder1`       | random and line-shaped windows; checks the path set has 44 paths, 12 through the centre |
| `tb_pathfinder2`       | both modes, constructed ties decided both ways |
| `tb_max_pf1_stage`     | stage outputs and flags, 2 lines + 4 delay; frames that fail each criterion |
| `tb_pf2_stage`         | binary and pass-through instances, 1 line + 2 delay |
| `tb_boundary_detector` | end to end, 24 x 16 frames back to back, one and two pathfinder II stages; every image checked; exact cycle latency; counts each mechanism (pauses, saturation, threshold, rank and pathfinder I rejections, pathfinder II keep/clear, tie-break both ways, pass-through, frame wrap, border padding) and fails if one never occurs |
| `tb_full_size`         | one full 512 x 512 x 8 frame at the default parameters, every pixel of all three images and its latency |
| `tb_workloads`         | 64 x 64 x 4-bit arch-shaped block; 220 x 128 x 5-bit tilted bar with two pathfinder II stages; prints how many border pixels the tie rule decided |

The test images are synthetic: bright shapes on a dark background (the
arch without noise, the bar with a little noise), plus random frames. The output has not been compared with
photographs of real objects.

### Running

All files are SystemVerilog-2017. The package `rtl/bd_pkg.sv` must be read
first, and `tb/bd_ref_pkg.sv` before the testbenches. For example, with Verilator 5:

```
verilator --binary --timing --top-module tb_boundary_detector \
    -y rtl -y tb +libext+.sv rtl/bd_pkg.sv tb/bd_ref_pkg.sv tb/tb_boundary_detector.sv
./obj_dir/Vtb_boundary_detector
```

Replace the top module and the last file name to run another testbench. The
full-size test runs in a few seconds.

## Files

* `rtl/bd_pkg.sv`: path masks and weights
* `rtl/line_buffer.sv`, `rtl/window_gen.sv`: storage and window forming
* `rtl/gradient_stage.sv`, `rtl/local_max.sv`, `rtl/pathfinder1.sv`,
  `rtl/max_pf1_stage.sv`, `rtl/pathfinder2.sv`, `rtl/pf2_stage.sv`: operators and stages
* `rtl/boundary_detector.sv`: top level
* `tb/bd_ref_pkg.sv`: reference model and test-image generators
* `tb/wl_run.sv`: helper that runs one configuration on one image
* `tb/tb_*.sv`: testbenches
