# Rank-difference image processor

A small nonlinear image processor that looks at each pixel's 3x3 neighbourhood,
sorts the nine values, and turns the sorted set into an output. It computes
more than rank filters such as median, minimum and maximum. It also works
with the **rank differences**: the gaps between neighbouring sorted values,
plus the gap from the largest value up to the top of the range (255).
Any weighted sum of the sorted values or of these gaps is one output, chosen
by a control vector. One datapath therefore gives many window functions:

| control vector (weights)              | result                                     |
|---------------------------------------|--------------------------------------------|
| 1 on rank r of the sorted values      | rank filter (median, min, max, any rank)   |
| 0.5 on two ranks, 0.25 on four        | mean of chosen ranks (trimmed means)       |
| 1 on differences 0..r                 | 255 − rank r (complement of a rank)        |
| 1 on differences a+1..b               | rank a − rank b (local contrast, range)    |
| +1 / −1 mixtures, fractions           | weighted combinations of the above         |

The repository holds two sorting engines. One is a fully pipelined
**wave sorting network**, used by the image processor and by a
parallel-input preprocessor. The other is a compact **iterative sorting
node**: two layers of cells reused five times.

## Top level

`mip_top` puts three independent processors side by side. They share only
`clk` and the synchronous active-low reset `rst_n`.

* `u_mip` (`mip`) is the image processor. Pixels come in one at a time in
  raster order. For every window it issues four results: the chosen rank
  (`of_w9`), the chosen rank difference (`ofd_w10`), the weighted sum of
  ranks (`fs_am`) and the weighted sum of differences (`f_am`).
* `u_mrp` (`mrp`) is the relational preprocessor. It ranks ten signals with
  the iterative node and issues the rank chosen by a code.
* `u_brp` (`brp`) is the parallel-input preprocessor. All ten signals come
  in at once, on any clock. A wave sorting network ranks them and the same
  code-controlled multiplexer issues one rank. Its ranks appear 9 clocks
  and its output 10 clocks after a set is taken, counting the clock that
  takes it. It accepts a new set every clock.

```
pix_in ─► window_buffer ─► wave_sorter (10 in, 9 layers x 5 cells) ─┬─► rank_select ─► of_w9
           (3x3 window)        ▲ ab = 10th input                     ├─► rank_diff ─┬─► diff_select ─► ofd_w10
                                                                      │              └─► weighted_sum ─► f_am
                                                                      └─► weighted_sum ───────────────► fs_am

sig[0..8], aux ─► iter_sorter [ shd_bank ◄─► sort_node2 (2 layers x 5 cells) ] ─► rank_select ─► out

in[0..9] ─► wave_sorter (10 in, 9 layers x 5 cells) ─► rank_select ─► out
```

## The sorting network (`wave_sorter`, `cmp_swap`)

The basic cell, `cmp_swap`, takes two values and sends the larger to its
upper output and the smaller to its lower output. N lines run through N−1
identical layers of N/2 cells:

* **even layers** (0, 2, …) compare lines (0,1), (2,3), …, (N−2,N−1);
* **odd layers** compare (1,2), (3,4), …, (N−3,N−2). They also have one
  *ring-closing* cell on lines (0, N−1), which sends the larger value to
  line 0.

The ring cell gives every layer the same N/2 cells. It also lets the network
finish in N−1 layers: a plain odd-even transposition network needs N. For
N = 10 this is 9 layers and 45 cells. The full 0/1 input space (1024
patterns) is checked in the testbench, which by the zero-one principle
proves that any input gets sorted. With 8 layers some inputs are not
sorted. The output is in descending order: `out[0]` is the largest.

Each cell has an output register, so the network is a 9-stage pipeline. It
takes a new set of ten values on every clock. `in_valid` travels with the
data and comes out as `out_valid` nine clocks later. The cell and the network
take a width `W` and a size `N`. `REG=0` builds the same network without
registers (the testbench uses this for a 6-input example).

## Ten inputs for nine pixels: the boundary input `ab`

The sorter has ten inputs. Nine take the window and the tenth takes `ab`,
a constant at one end of the signal range. With `ab = 0` the nine pixels sort
into R_1 (largest) … R_9 (smallest), and R_0 = 0. With `ab = 255`, R_1 = 255
and the pixels fill R_2 … R_0. In both cases the ten ranked outputs are named
R_1, R_2, …, R_9, R_0, largest to smallest. `ranks[0..9]` carries them in that
order.

## Output functions

**`rank_select` (`of_w9`).** The 4-bit code `y` picks one rank: 1..9 give
R_1..R_9, and 0 gives R_0, the smallest. Codes 10..15 pick nothing, and the
output register keeps its previous value.

**`rank_diff`.** This block forms ten differences from the nine largest ranks
v0..v8 = R_1..R_9:

```
Dr0 = 255 − v0,   Dr_r = v(r−1) − v(r)  (r = 1..8),   Dr9 = v8
```

They are all non-negative and add up to 255. The sum of Dr(a+1) … Dr(b)
equals v(a) − v(b). R_0 is not used, so these differences are meaningful
with `ab = 0`.

**`diff_select` (`ofd_w10`).** The 10-bit mask `y2` has one enable bit per
difference. If several bits are set, the highest-numbered one wins. If none
is set, the output holds. For example, `y2 = 1<<2` gives R_2 − R_3.

**`weighted_sum` (`fs_am`, `f_am`).** This block computes
`F = Σ_r Y_r · x_r` over ten inputs. `fs_am` takes `x = ranks` with weights
`wr`, and `f_am` takes `x = Dr` with weights `wd`. Weights are signed 8-bit
numbers with 3 fraction bits (Q4.3), covering −16.0 … 15.875 in steps of
0.125. The sum is exact: the result is `W+1+WW+clog2(N)` = 21 bits, signed,
with 3 fraction bits, so divide by 8 to get the value.

On the worked window below, the ranks are 253 246 224 221 217 187 121 112
105 (with `ab = 0`, R_0 = 0). The differences are 2 7 22 3 4 30 66 9 7 105.

```
121 112 105
221 217 187
224 246 253
```

| weights | result |
|---|---|
| wr = 1 on rank index 6 | 121 |
| wr = 0.5 on indices 4, 5 | 202 |
| wr = 0.25 on indices 3..6 | 186.5 |
| wd = 1 on 0..4 | 38 (= 255 − 217) |
| wd = 1 on 2..6 | 125 (= 246 − 121) |
| wd = 1 on 1..8 | 148 (= 253 − 105) |
| wd = 0.125 on 1..4, 6..9 | 27.875 |

The testbenches check all of these.

## The register memory (`window_buffer`)

The pixels of an `IMG_W` x `IMG_H` image (default 64 x 64) shift through a
chain of 2·IMG_W + 3 registers. Nine taps, one line and two lines apart,
form the window `win[0..8]` = A1..A9 in row-major order. A1..A3 is the oldest
line and A9 is the pixel just accepted. Counters follow the scan position.
`sof` on a pixel marks it as (0,0) and restarts the scan. `win_valid` is set
only for windows lying wholly inside the image, so border pixels give no
result and a 64 x 64 frame gives 62 x 62 results. `tx`, `ty` give the centre
pixel's column and row. `pix_valid` may drop at any time, and an idle clock
changes nothing.

## Image processor timing (`mip`)

* Up to one pixel per clock.
* A window is formed on the clock edge that takes its last pixel. Its
  results appear with `out_valid` **10 clocks later**: 9 sorter stages and
  one output register.
* The controls `y`, `y2`, `wr`, `wd` are sampled by that output register.
  Hold them steady while a frame runs, or change them knowing they apply
  to whatever leaves the sorter on that clock.
* `amo` (the centre pixel), `tx` and `ty` are delayed to line up with the
  results.

## The iterative sorting node (`iter_sorter`, `shd_bank`, `sort_node2`)

This engine uses one pair of layers many times instead of building all nine
layers:

* `shd_bank` is a ten-channel sample-and-hold register bank. It loads either
  the external inputs or the fed-back node outputs.
* `sort_node2` is two layers of five combinational cells: an even layer, then
  an odd layer with its ring cell. One pass equals two layers of the wave
  network.
* A `start` pulse loads the inputs. On each of the next four clocks the node's
  output is written back into the bank. The fifth pass (ten layers in all,
  one more than needed) goes into the output register on the next clock.
  `valid` pulses **6 clocks after `start`**, and `busy` is high in between. A
  `start` while busy restarts with the new inputs.
* `inverse = 1` reads the result out smallest first.

`mrp` wraps this node. It takes nine signals plus the boundary value `aux`
and adds the same `rank_select` multiplexer. Its `out_valid` comes 7 clocks
after `start`.

The iterative node uses 10 cells where the pipelined network uses 45. It
delivers one sorted set every 6 clocks instead of one per clock.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `PIX_W` / `W` | 8 | `mip_pkg`, all | signal width |
| `N_SIG` / `N` | 10 | `mip_pkg`, sorters | signals ranked (9 pixels + boundary) |
| `IMG_SIDE`, `IMG_W`, `IMG_H` | 64 | `window_buffer`, `mip`, `mip_top` | image size |
| `WIN` / `K` | 3 | `window_buffer` | window side |
| `LAYERS` | N−1 | `wave_sorter` | network depth |
| `WGT_W`, `WGT_F` | 8, 3 | `weighted_sum` | weight width, fraction bits |
| `ITER` | N/2 | `iter_sorter`, `mrp` | passes of the iterative node |

`mip` and `mip_top` fix the signal count at ten: the rank code, the
difference mask and the output stages assume it. The window buffer and the
sorters are generic. `tb_window7` builds a 7x7 window (`K = 7`) and a
50-input sorter (49 pixels plus a zero boundary, 49 layers of 25 cells) and
checks the ranks of every window of a 14 x 12 image. The same test runs a
48-layer sorter alongside and reports how many windows it leaves unsorted.
One layer fewer is not enough, even with the boundary input fixed.

## How far to trust it, and where it departs

Every block has a self-checking testbench. Each one compares the block with
a model written independently in the testbench. `tb_mip_top` runs the whole
design at its default size. It streams five 64 x 64 frames with different
controls and checks every output of all 3844 windows per frame, plus the
latency. It also runs 200 sorts on the iterative preprocessor and about
2400 back-to-back sets on the parallel-input one. It counts each
mechanism: both boundary values, rank code 0, held codes, single, multiple and
empty difference masks, negative and fractional weights, skipped border
windows, idle clocks, an `sof` restart, the worked window, iterative sorts
and parallel sets. A mechanism that never happens counts as a failure.

Choices made here that the source design does not fix:

* The weight format, the exact-width sums and having two weighted-sum
  outputs at all. The hardware it is based on issues only the selected rank
  and the selected difference. The weighted sums implement the general
  weighing-selection formula.
* The window memory is built as line delays. Border windows are skipped and
  not padded. `pix_valid`/`sof`, all valid/busy flags and resets are this
  design's own.
* Rank code 0 selects R_0. Codes 10..15 hold the output.
* A register after every network layer, giving 9 + 1 clocks of latency.
  The source design states only a pipelined structure with a 25 ns
  processing cycle (40 MHz pixel rate). One pixel per clock meets that rate
  at a 40 MHz clock. Whether the logic closes timing at 25 ns on a given
  FPGA has not been checked.
* The registers after every layer cost flip-flops: generic synthesis of
  `mip_top` gives about 1800 flip-flop bits. No vendor fit was attempted,
  so whether it fits the small FPGAs the original was built on is open.
* In the parallel-input preprocessor the tenth input is an ordinary port.
  The original holds it at 0.
* The sample-and-hold bank and the cells of the iterative node were
  originally current-mode analog circuits. Here they are digital registers
  and comparators. `inverse` is this design's way of giving the "inverse
  sorting" the source mentions.
* The network needs nine layers for ten inputs. A claim that eight layers
  suffice when the tenth input is a boundary constant does not hold for this
  network, and the nine-layer version is used.

Not built: the analog current-mirror cells, the analog sample-and-hold, the
photodetector array and the converter that feeds it. One normalised output
function that appears in the examples without a definition is also not
built.

## Simulating

All testbenches are in `tb/`. They print `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_mip_top \
          rtl/mip_pkg.sv tb/tb_mip_top.sv -o sim
./obj_dir/sim
```

Replace `tb_mip_top` with any other testbench to run it: `tb_mip` (the
image processor on 10 x 8 frames), `tb_brp`, `tb_window7`, `tb_wave_sorter`,
`tb_window_buffer`, `tb_rank_select`, `tb_rank_diff`, `tb_diff_select`,
`tb_weighted_sum`, `tb_mrp`, `tb_iter_sorter`, `tb_shd_bank`, `tb_sort_node2`
or `tb_cmp_swap`. Each one simulates in well under a second. Building
`tb_window7`, with its two 50-input sorters, takes verilator about a minute.
