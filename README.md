# Bit-level systolic median filters: an extensible and a real-time filter

A median filter replaces each sample by the median of the samples in a window
around it. It removes impulse noise while keeping edges sharp. This RTL builds
a median filter unit from two filters. Both sort a window with an
**odd/even transposition network**: a row of compare-and-swap stages in which
odd stages compare line pairs (1,2),(3,4),… and even stages compare
(2,3),(4,5),…. After *n* such stages, *n* lines are sorted and the median is
on the middle line.

The two filters work at the level of bits:

* **Extensible filter** (`mf9ee`, grids of it in `mf9ee_array`). The words
  arrive *bit-serially*, most significant bit first. The word length is
  therefore free. Several chips can be wired into a grid for windows larger
  than 9. It produces one L-bit median every L clocks.
* **Real-time filter** (`mf9rt`). It handles 3×3 windows of 8-bit pixels and
  takes all bits of a word at once, one sorter block per bit position. Three
  new pixels (one window column) go in every clock, and one median comes out
  every clock.

Both are fully pipelined. Each compare-and-swap cell is one register stage, so
the clock period is set by the delay of a single cell.

## The compare-and-swap state: deciding order from the top bit down

Everything rests on one observation. If you read two words from their most
significant bit downwards, the first bit position where they differ decides
which word is larger. Every cell therefore carries a two-bit state {S, E}:

| state | S E | meaning |
|-------|-----|---------|
| equal | 0 1 | all bits so far were equal; the next differing pair decides |
| pass  | 0 0 | A > B was found; A stays on top |
| swap  | 1 0 | A < B was found; the two words are exchanged |

The next state is `S' = S + E·¬A·B` and `E' = E·(A ≡ B)`. The outputs are
`A_o = S'? B : A` and `B_o = S'? A : B`, so the larger word always leaves on the
upper output. The decision uses the *new* state, so the bit that decides is
already routed correctly.

The two filters keep this state in different places:

* **`csu1`** (extensible filter) keeps the state *in time*. It is a small
  FSM that sees one bit pair per clock and holds its state from bit to bit.
  The word-end mark `r_i` is high during the last bit of a word, and it
  returns the cell to *equal* on the next clock.
* **`csu2`** (real-time filter) keeps the state *in space*. It holds no
  state. The state comes from the cell at the same place in the block of the
  next more significant bit (`s_i/e_i`), is updated with this block's bit
  pair, and goes on to the block of the next less significant bit
  (`s_o/e_o`). The most significant block receives *equal*.

## Extensible filter (`mf9ee`)

### One chip

The chip has 9 lines and 9 stages. Each stage holds five `csu1` cells:

```
stage 1,3,5,7,9 : (1,2) (3,4) (5,6) (7,8) (9,y)
stage 2,4,6,8   : (x,1) (2,3) (4,5) (6,7) (8,9)
```

`x` and `y` are the upper and lower **extension** inputs. For a stand-alone
window of 9, tie every `x_i` to 1 and every `y_i` to 0. A word of all ones
never loses a comparison and a word of all zeros never wins one, so those
cells only delay their data line. The chip then sorts its 9 words. `s_o[0]`
carries the largest word and `median_o` (= `s_o[4]`) the median.

The word-end mark travels with the data, one stage per clock, so each stage
resets at the end of its own copy of the word. It leaves on `r_o`, aligned with
`s_o`, so chips can be chained.

**Timing.** A bit applied in clock *t* appears on `s_o` after clock *t+8*.
The first bit of the sorted words appears 9 clocks into a word, counting the
input clock. A whole L-bit median is complete within 9+L clocks. Words may
follow each other without gaps, which gives one median every L clocks. Word
lengths may differ from one group of words to the next.

### Grids of chips (`mf9ee_array`): the shared line

For windows larger than 9, chips are arranged in a grid of ROWS × COLS:

* **Along a row**, each chip's sorted lines and `r_o` feed the next chip's
  inputs and `r_i`. A row therefore has COLS × 9 stages.
* **Down a column**, chips are linked through their extension ports. The top
  row's `x_i` are tied to 1 and the bottom row's `y_i` to 0.

The vertical link works as follows. In stage *j* (odd), the `(9,y)` cell of
the upper chip sends its lower output on `y_o`. The chip below takes it as
`x_i` of stage *j+1*, compares it with its line 1, and returns the upper output
on `x_o`. That value comes back as `y_i` of stage *j+2*. The two chips thus
**share one extra line** between them, and each chip compares it in alternate
stages. With this link the grid is a single odd/even transposition network of
`NL = ROWS·10 − 1` lines. In a 3 × 3 grid there are 29 lines.

Port numbering follows from this. `x_i[k]/x_o[k]` belong to stage 2k+2, and
`y_i[k]/y_o[k]` belong to stage 2k+1. `y_i[0]` and `y_o[4]` are the two ends
of the shared line, and inside a row they connect to the chips on either side.

**Where the samples go, and why.** A 9-stage chip begins and ends with an
odd stage. Where two chips meet in a row, the same stage type therefore runs
twice, and the second run does nothing. A row of COLS chips has only
`8·COLS + 1` alternating stages, fewer than the NL lines, so the grid cannot
sort all its lines in every case. The grid works around this by placing the
NWIN samples on its middle lines:

* `PAD_TOP = (NL − NWIN)/2` lines above the samples are driven with ones;
* the lines below the samples are driven with zeros.

These constant words never move. The samples therefore see an NWIN-line
network with at least NWIN alternating stages, which sorts them completely.
For the default 3 × 3 grid with a 25-sample window, there are 2 lines of ones,
25 samples and 2 lines of zeros. `median_o` is line 14.

This was checked exhaustively over all 2^25 zero/one inputs, which by the 0-1
principle covers all inputs. The same check shows that feeding zeros only to
the unused lines at the bottom gets one zero/one pattern wrong. An assertion
limits NWIN to `8·COLS + 1` (and to NL): a 2 × 2 grid handles 17 samples but
not 18.

Windows smaller than a grid work the same way. A single chip with NWIN = 7
gets one line of ones and one line of zeros. This is how a variable-length
(adaptive) window is realised.

## Real-time filter (`mf9rt`)

* **Window.** Each clock, `x_i`, `y_i` and `z_i` bring one new column of the
  3 × 3 window, one pixel for each of three image rows. Two column registers
  keep the two previous columns. The host supplies the three rows, and the
  filter stores no image lines, so the image width is not limited.
* **Bit-slice blocks.** There are eight `rt_bitslice` blocks, one per bit
  position, MSB first. Each block is a 9-stage odd/even network of 4 `csu2`
  cells per stage. A one-bit delay register sits on the line that each stage
  leaves unpaired.
* **Skew.** Block *k* (bit 7−k) gets its bits *k* clocks late through a delay
  chain. Its cells therefore see the state that block *k−1* computed, one clock
  earlier, for the same words. After the network, the median bit of block *k*
  is delayed by 7−k clocks, so all eight bits leave together.
* **Latency.** The median of the window completed by the column sampled at
  clock edge *t* appears after edge *t + 16* (7 skew stages + 9 sort stages,
  `mf_pkg::RT_LATENCY`). Results follow at one per clock.
* **Test inputs.** `st_i/et_i` set the state fed into the most significant
  block. Normal operation uses `st_i=0, et_i=1`. With `0,0` every cell of
  every block stays in *pass* and the network becomes a delay line: the output
  is then the word on the middle window line (row 2, one column old). Other
  values let each block be tested on its own.

## The unit (`mf_unit`)

`mf_unit` places the two filters side by side. They share only the clock and
reset, and each has its own chip enable (`ext_ce`, `rt_ce`). By default the
extensible side is one chip (a 1 × 1 grid, window 9). Setting `EXT_ROWS`,
`EXT_COLS` and `EXT_NWIN` turns it into a grid.

## Files

| file | contents |
|------|----------|
| `rtl/mf_pkg.sv` | window size, word length, real-time latency, state encoding and next-state function |
| `rtl/csu1.sv` | bit-serial compare-and-swap FSM |
| `rtl/mf9ee.sv` | extensible filter chip |
| `rtl/mf9ee_array.sv` | grid of chips, sample placement and padding |
| `rtl/csu2.sv` | compare-and-swap cell with state passed between blocks |
| `rtl/rt_bitslice.sv` | one bit-position sorter block |
| `rtl/mf9rt.sv` | real-time filter: window columns, skew, 8 blocks, deskew |
| `rtl/mf_unit.sv` | top: both filters |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

Hierarchy: `mf_unit` → `mf9ee_array` → `mf9ee` → `csu1`, and `mf_unit` →
`mf9rt` → `rt_bitslice` → `csu2`.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mf_pkg.sv \
          tb/tb_mf_unit.sv --top-module tb_mf_unit -o sim
./obj_dir/sim
```

Replace `tb_mf_unit` with any other testbench. `rtl/mf_pkg.sv` must be read
first, because modules import it. `tb_adaptive_window` also needs `-y tb`,
for its helper `tb_grid_checker`.

What the testbenches check:

* `tb_csu1`: random word pairs of 1–10 bits, including ties.
* `tb_csu2`: all 16 state/bit combinations.
* `tb_mf9ee`: 150 groups of 9 words of 1–12 bits, sorted and median outputs,
  fixed latency, `r_o`, extension outputs and chip enable.
* `tb_mf9ee_array`: 200 windows of 25 samples on the 3 × 3 grid, checking the
  median, all sorted lines and the padding.
* `tb_rt_bitslice`: streaming single-bit sorting, plus random held states
  compared with a reference model of the network.
* `tb_mf9rt`: 1000 random columns checked at the 16-clock latency, the pass
  test mode and chip enable.
* `tb_mf_unit`: runs at the default parameters. It filters a 12 × 20 noisy
  image through both filters at the same time and compares every pixel with a
  software 3×3 median. It then runs 4- and 12-bit words on the extensible
  filter, the pass test mode, and each chip enable. Each mechanism is counted
  and must occur.

Three more testbenches run whole workloads:

* `tb_adaptive_window`: window sizes 3, 7 and 9 on one chip, 11 and 17 on a
  2 × 2 grid, 19 and 25 on a 3 × 3 grid, and 33 on a 4 × 4 grid.
* `tb_rt_frame`: a whole generated 1024 × 1024 frame with impulse noise
  through the real-time filter. All 1,044,484 medians are checked, at one per
  clock.
* `tb_ee_frame`: a 512 × 512 frame of 4-bit pixels through one extensible
  chip, windows back to back. This gives one median every 4 clocks, and the
  total clock count is checked.

Each runs in seconds.

All testbenches pass, and each fails when a single deliberate fault is put
into its module.

## How far this follows the original chips, and where it departs

These parts follow the original design:

* the odd/even transposition structure, with 9 stages of 5 cells (extensible)
  and 8 blocks (real-time);
* the cell equations and state codes;
* the most-significant-bit-first flow;
* the word-end mark moving one stage per clock;
* extension inputs tied to ones above and zeros below;
* the 3 × 3 grid for w = 25;
* three new samples per clock;
* input and output skew registers;
* the S/E test inputs;
* a chip enable on each filter.

These are this design's own choices:

* **Clocking.** The original cells use two-phase latches. Here each cell is
  one register on the rising edge. Every register also has an asynchronous
  active-low reset `rst_n`, which the original does not document. Before the
  first word, either pulse `rst_n` or send a word-end mark.
* **Chip enable.** A low enable forces that filter's outputs to 0. The
  pipeline keeps running.
* **Ports.** The extensible chip was packaged with 28 pins. Here every sorted
  line, the median and every extension pair of `mf9ee` is a port of its own.
  The real-time filter's ports (three 8-bit inputs, one 8-bit output, two
  test inputs) match its 40-pin package.
* **Extension port mapping and the shared line.** The cells' pairing and the
  ties follow the original. How the extension pins map to stages, and the
  shared-line reading of the vertical link, are reconstructions. As a result
  the chip has five lower extension pairs where four were drawn.
* **Sample placement in a grid.** Samples are centred, with padding of ones
  above and zeros below. Padding with zeros only does not give the exact
  median in every case (see above).
* **Real-time network.** The full 9-stage network is kept in every block and
  all sorted bits are formed. The drawing of the original appears to narrow
  the last stages towards the single median cell. Synthesis removes the
  cells that cannot reach the median, because only the median is used.
* **Real-time window.** The window columns are held word-wide before the bit
  skew, not as per-bit delay chains inside each block.

These parts of the original are **not included**:

* pads, the two-phase clock generation and the physical layout;
* the external parts suggested for other median filter types: a pipelined
  multiplier for weighted medians, and subtractor/comparator logic for
  selective medians. Their behaviour is not specified enough to build.

Windows above `8·COLS + 1` on a grid are rejected, because they are not
sorted exactly by chained 9-stage chips.
