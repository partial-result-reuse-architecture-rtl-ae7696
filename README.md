# Partial-result-reuse hardware for flat morphology

Flat dilation replaces every pixel with the maximum of its neighbourhood, and
flat erosion replaces it with the minimum. The neighbourhood is the
*structuring element*: a disk, a square, a line, or any other set of pixel
offsets. A direct implementation of an n-point element needs n-1 comparators
per output pixel. Neighbouring windows overlap heavily, though, and max and min
are associative, commutative and idempotent (max(x, x) = x). A window can
therefore be put together from partial results that were already computed for
earlier pixels, even when those pieces overlap.

This repository holds synthesizable SystemVerilog for that
*partial-result-reuse* (PRR) architecture, following the published
"Partial-Result-Reuse Architecture and Its Design Technique for Morphological
Operations With Flat Structuring Elements":

* the prototype chip's datapath: dilation with a diameter-5 disk, fully
  pipelined, with 6 comparators and about 4W delay elements for frame width W;
* the generic "duplicate-and-shift" chain for self-affine elements: lines,
  squares and diagonals, with 2·ceil(log2 n) comparators for an n×n square;
* the one-order PRR datapath for an arbitrary element (a worked example);
* a folded systolic array that processes 4 rows in parallel;
* two applications of the same structure: a moving-average filter and a
  pseudomedian filter.

All designs take a raster-scan pixel stream: one 8-bit pixel per accepted
cycle, row after row. A delay of W pixels moves a value one row down.

## The core trick: duplicate and shift

For a 1×8 line, the window max{I(x), …, I(x-7)} is built in three steps:

```
AB  = max(I(x), I(x-1))          2 pixels
ABC = max(AB(x), AB(x-2))        4 pixels   (AB of two pixels earlier)
out = max(ABC(x), ABC(x-4))      8 pixels
```

Each step combines a partial result with a copy of itself from *d* pixels
earlier, which is a delay line of length d. The window doubles at each step,
so 3 comparators and 7 delay elements do the work of 7 comparators. A 1×7 line
uses shifts 1, 2, 3: the last two copies overlap in one pixel, and that does no
harm because max is idempotent. In two dimensions a shift by W is one row, so
an 8×8 square uses shifts W, 1, 2W, 2, 4W, 4 (6 comparators, 7W+7 delays), and
an 8-point diagonal uses W+1, 2W+2, 4W+4. `prr_chain` implements this chain for
any list of shifts.

## The disk datapath (`prr_disk5`, `prr_pe`)

The 13-pixel disk of diameter 5 is not a doubled shape, but it is a union of
four 5-pixel crosses:

```
          .             cross ABCDE (centre one row above the newest pixel)
        . . .           F = ABCDE one row up and one column right  (shift W-1)
      . . . . .         G = ABCDEF one row up and one column left  (shift W+1)
        . . .
          .
```

The processing element (`prr_pe`) holds six comparator cells in a row. Four
of them fold the cross taps A…E into ABCDE. The fifth merges ABCDE with F, and
the sixth merges the result with G. The delay lines that make the taps sit
outside the PE (`prr_disk5`), so that in an embedded system they could live in
shared memory.

The subtle part is pipelining. Each comparator cell has its own 8-bit output
register, so the main path gains one cycle per cell. Every tap that joins
further down the chain is therefore taken one pixel later to compensate:

| tap | unpipelined (`PIPE=0`) | fully pipelined (`PIPE=1`, default) |
|-----|------------------------|-------------------------------------|
| B   | A delayed W-1          | A delayed W-1                       |
| C   | B delayed 1            | B delayed 2                         |
| D   | C delayed 1            | C delayed 2                         |
| E   | D delayed W-1          | D delayed W                         |
| F   | ABCDE delayed W-1      | ABCDE delayed W-1                   |
| G   | ABCDEF delayed W+1     | ABCDEF delayed W+1                  |

F and G need no correction, because both inputs of their cells come from the
same node.

**Timing.** With `PIPE=1`, the k-th valid output (counting from 0) is the
result for the disk whose lowest pixel is input pixel k-5. The disk's centre is
that pixel moved up two rows. Throughput is one pixel per clock, and `valid_i`
low freezes every register and delay line, which keeps row alignment across
gaps. With `PIPE=0` the output is combinational and belongs to the disk whose
lowest pixel is the current input.

**Borders.** The datapath has no border logic. A window near the left or right
edge wraps into the neighbouring row. The intended use is to pad each frame by
two pixels on every side (0 for dilation, 255 for erosion), stream the padded
frame, and cut the padding off the result. The prototype used 90-pixel-wide
tiles, which become 94 wide after padding. Hence the default `W = 94`: the
delay lines then stay short, and any frame width is handled by cutting the
frame into tiles with overlapping margins. The padding and tiling are done
outside this hardware.

Throughput at the default: a 720×480 frame becomes 8 padded tiles of 94×484,
which is 363,968 cycles. At 200 MHz that is about 550 frames/s.

## Arbitrary elements (`prr_se_arb10`)

An element without self-affinity is cut into segments, each of which can be
reused from the window of a pixel 1 or 2 positions earlier. The example built
here has ten pixels (one on top, two rows of four, and one at the bottom, which
is the newest pixel A). It needs five comparators:
max(B, C) → with its 1-pixel-old copy D → with the 2-pixel-old copy E of that
→ with F (C delayed W+2) → with A. The module header lists the covered raster
delays.

## Folded systolic array (`prr_sys_pe`, `prr_sys_array`)

The 8×8 square can also be laid out as a dependence graph with one node per
pixel. Node (i, j) uses six comparators and exchanges seven partial results
with the node above and seven with the node to the left. Projecting the graph
along the rows, with node (i, j) scheduled at time i + j, gives one PE per
image row. Each PE has 14 registers: 7 that loop the horizontal bus back into
the same PE, and 7 on the bus to the next PE. Folding this onto P = 4 PEs
gives a ring. PE k handles rows k, k+4, k+8, …. The bus leaving the last PE
returns to the first through a W-4 delay line, and a switch feeds zeros during
the first pass (the top border). A `first_i` marker zeroes the looped-back bus
at column 0 (the left border). Because of this, the systolic array computes
border pixels correctly without padding: pixels outside the frame count as 0.

Input format: in each pass, lane k carries row 4p+k, and lane k runs one
cycle behind lane k-1. Pixel (4p+k, j) therefore enters lane k at cycle
p·W + k + j after `sof_i`. The output of the same lane in the same cycle is the
8×8 maximum ending at that pixel. A frame has a multiple of 4 rows. Skew
buffers that would turn four aligned rows into this staggered format are not
part of the design. With `P = 1` the ring reduces to a plain raster-scan
datapath.

## Applications

**Moving average (`prr_moving_avg`).** This is the disk structure with adders
in place of comparators (unpipelined), followed by division by 13. Addition is
**not** idempotent, so the overlapping parts of the four crosses are counted
more than once. The module therefore computes a *weighted* sum: weight 4 at
the centre, 2 on the four diagonal neighbours, 1 on the other eight pixels,
and 20 in total. Divided by 13 as specified, the result can reach 392 for
8-bit input, so the output is 13 bits wide. Set `DIVISOR = 20` for a
normalised weighted mean. A true 13-pixel mean would need a decomposition
without overlap. The design as specified does not have one.

**Pseudomedian (`prr_pseudomedian`).** This is (opening + closing) / 2 with
the disk. An erosion datapath feeds a dilation datapath on one path, and a
dilation datapath feeds an erosion datapath on the other. The two results are
added and shifted right by one. The combinational default puts the result four
rows above the current pixel. With `PIPE=1` the latency is 10 accepted pixels
more. Frames need four pixels of padding.

## Where this RTL departs from, or adds to, the architecture

* Stream handshake: `valid_i` stalls the whole datapath, and `valid_o` marks
  results. The architecture only states raster-scan input.
* Reset: a synchronous active-low reset clears the pipeline registers. Delay
  lines are not reset, because no valid window ever reads their start-up
  contents.
* The delay lines are shift registers, as in the prototype. The RAM-based delay
  lines and the border handling by multiplexers, both mentioned as
  alternatives, are not built.
* The `MAX` cell also implements MIN and ADD (`prr_pkg::prr_op_e`), so one set
  of modules covers dilation, erosion and the running sum.
* The pseudomedian halves the sum. Its block drawing is labelled with a left
  shift, but the defining equation has factors of 1/2.
* The moving average keeps the weighting described above instead of a true
  mean.
* `prr_chain` takes its shifts as an 8-entry array (`MAX_N = 8`). Only the
  first N entries are used.
* The systolic array's `sof_i`, its column counter and the W = 94 default are
  this design's own choices.
* Padding, tiling and reassembly of frames are left to the system around the
  hardware.

## Files

| file | contents |
|------|----------|
| `rtl/prr_pkg.sv` | operator enum, pixel width, systolic bus structs |
| `rtl/prr_op_unit.sv` | MAX cell: MAX/MIN/ADD with optional register |
| `rtl/prr_delay_line.sv` | shift-register delay line with stall |
| `rtl/prr_pe.sv` | six-cell PE of the disk datapath |
| `rtl/prr_disk5.sv` | diameter-5 disk datapath (the chip's datapath) |
| `rtl/prr_chain.sv` | duplicate-and-shift chain (lines, squares, diagonals) |
| `rtl/prr_se_arb10.sv` | one-order PRR datapath for the ten-pixel example element |
| `rtl/prr_moving_avg.sv` | disk moving average |
| `rtl/prr_pseudomedian.sv` | disk pseudomedian |
| `rtl/prr_sys_pe.sv`, `rtl/prr_sys_array.sv` | systolic PE and folded ring |
| `rtl/prr_morph_top.sv` | all of the above side by side, each unit with its own ports |
| `tb/tb_prr_*.sv` | one self-checking testbench per module, plus `tb_prr_ccir601_frame` (a whole 720×480 frame) |

`prr_morph_top` (parameters `W = 94`, `SYS_P = 4`) contains the pipelined disk
dilation (`chip_*`), the moving average (`avg_*`), the pseudomedian
(`pmed_*`), the 1×8, 1×7, 8×8 and diagonal chains (`line8_*`, `line7_*`,
`sq8_*`, `diag8_*`), the arbitrary-element example (`se8_*`) and the systolic
ring (`sys_*`).

## Verification

Every testbench computes its expected results on a 2-D image in the
testbench itself, from the definition of the structuring element, not from
the tap structure. Each testbench drives random data with random stall cycles,
checks every window that lies inside the frame, checks that the number of
checked windows is right (this also checks latency and rate), and ends with a
`TB_RESULT checks=N failures=M` line.

`tb_prr_morph_top` runs the top at its default parameters. Two padded
94×247 tiles (90×243 pixels of image each) go back to back through every
unit. Every original pixel of the chip datapath is compared with the dilation
of its tile alone, which checks the padding scheme at all borders. Then a
94×24 frame goes through the systolic ring. The run counts stalls, border
windows, windows of the second tile and systolic border pixels, and fails if
any of them never happened. It runs in a few seconds.

`tb_prr_ccir601_frame` runs a whole 720×480 frame through `prr_disk5` at its
defaults, the way a host would. The frame is cut into eight 90-column tiles.
Each tile is padded with two pixels on every side. Padding pixels take frame
values where the frame has them and 0 outside it. The tiles are streamed
without a gap. The 345,600 result pixels that are cut back out are compared
with a dilation of the whole frame. The testbench also checks that the frame
is done after 8 × 94 × 484 = 363,968 pixels plus 3 cycles of latency, which is
the one-pixel-per-clock rate behind the 550 frames/s figure at 200 MHz.

To simulate, for example:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/prr_pkg.sv \
          tb/tb_prr_morph_top.sv --top-module tb_prr_morph_top
./obj_dir/Vtb_prr_morph_top
```

Not verified: clock frequency, area and power. The prototype figures
(200 MHz, 0.35 µm) belong to a full-custom layout and cannot be checked in RTL
simulation.
