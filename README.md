# Parallel Chambolle core

This RTL implements the Chambolle iteration, the inner loop and main cost of
TV-L1 optical-flow estimation, as a hardware array that updates 28 elements
per clock cycle. The iteration is hard to parallelise because every element
needs values its neighbours produced in the previous iteration. The
architecture deals with this in two ways. First, the frame is cut into
windows of 88 x 92 elements that are processed on their own. Second, each
window is swept by a skewed "ladder" of processing elements. The ladder makes
the neighbour values each element needs arrive in flip-flops just in time,
so most operands never come from memory.

The design follows a published FPGA architecture (Virtex-5, 221 MHz). That
architecture has two sliding windows, each updating both flow components, so
there are 4 PE arrays, 28 PE-Ts, 28 PE-Vs and 36 block RAMs. Where that
description gives no detail, this implementation makes its own choices; they
are listed in [Departures and own choices](#departures-and-own-choices).

## The computation

For one flow component (u1, and in the same way u2), with `v` fixed during
the run and the dual variables `px`, `py` starting at 0, every iteration does
the following for all elements:

```
div p  = (px - px_left) + (py - py_up)              backward differences
Term   = div p - v/theta
Term1  = Term_right - Term                           forward differences
Term2  = Term_down  - Term
|grad| = sqrt(Term1^2 + Term2^2)
px     = (px + tau/theta*Term1) / (1 + tau/theta*|grad|)
py     = (py + tau/theta*Term2) / (1 + tau/theta*|grad|)
u      = v - theta * div p
```

On the window border, a missing left or upper neighbour contributes 0 to the
backward differences. A missing right or lower neighbour makes the forward
difference 0. The constants are theta = 0.3 and tau = 0.25 (`chambolle_pkg`).

Two processing elements share the work. A **PE-T** (`pe_t`) computes `div p`,
`Term` and `u`. A **PE-V** (`pe_v`) computes the forward differences, the
gradient magnitude and the new `px`, `py`.

## Windows, regions and the ladder

This is the part that needs the most explanation.

A window is 88 rows x 92 columns. Its array of 7 PE-Ts and 7 PE-Vs works on
7 rows at a time; these 7 rows are a **region**. Region r covers rows
7r .. 7r+6, and 13 regions cover the window. The last region is only partly
inside the window, and PE-V rows that fall outside it are switched off. In
each region the array moves left to right in **steps**. At step s:

```
PE-T k (k = 1..7) works on row 7r+k-1, column s-(k-1)

 col:   s-6  s-5  s-4  s-3  s-2  s-1   s
 row 7r                                T1
 row 7r+1                         T2
 row 7r+2                    T3
  ...
 row 7r+6  T7
```

Each row lags the row above it by one column, so a region takes 92 + 6 = 98
steps to fill and empty the ladder. The skew is what makes operand reuse
possible:

* **PE-T operands.** `c_px` and `c_py` of its own element come from memory.
  `l_px` is the `c_px` the same PE-T read one step earlier, which is the
  element to its left. `a_py` for PE-T k > 1 is the `c_py` that PE-T k-1 read
  one step earlier, which is exactly the element above. Only PE-T 1 needs a
  memory value for `a_py`, from the row above the region. So the 7 PE-Ts read
  15 values per step instead of 28.
* **PE-V operands.** Take PE-T k-1 and PE-T k. When PE-T k-1 produces
  Term(i, c+1), PE-T k produces Term(i+1, c) in the same cycle, and Term(i, c)
  came out of PE-T k-1 one cycle before (`c_term`). These are the three Terms
  that PE-V k needs to update element (i, c). PE-V k (k = 2..7) therefore
  updates the row of PE-T k-1 and reads nothing from memory. The old px, py
  and v of that element come along with PE-T k-1's pipeline.
* **BRAM-Term.** The last row of a region (7r+6) needs Terms from the first
  row of the next region, which only exist one region later. PE-T 7 writes
  its Terms into a small block RAM (92 x 18 bit). In the next region, PE-V 1
  reads them back, one step ahead of use. With PE-T 1's Terms below, PE-V 1
  then updates that row. Its old px, py and v are the word PE-T 1 already
  reads for `a_py`.

PE-Vs only overwrite px/py after every PE-T of the same iteration that needs
the old values has read them. Between iterations the control unit waits for
the pipeline to drain. So each iteration sees exactly the previous
iteration's results, and the hardware computes the same numbers as a plain
two-pass loop over the matrix. The testbenches check this bit for bit.

## Memory and the vertical rotator

Each PE array (one component of one window, `component_engine`) holds its
window in 8 banks of 1012 x 32 bit (`bram_sdp`). Each bank word holds one
element:

```
[31:19] v (13 bit)   [18:10] px (9 bit)   [9:1] py (9 bit)   [0] unused
```

Row i is stored in bank i mod 8 at address (i div 8)*92 + column, so
88/8 x 92 = 1012 words per bank. The 8 rows a step needs (the region's 7 rows
plus the row above) are always 8 consecutive rows, so they always sit in 8
different banks. Going down one region shifts the row-to-bank assignment by
one (7 = -1 mod 8). The banks that wrap around move to the next block of
rows, which adds 92 to their address.

The `vertical_rotator` does this mapping. On the read side it forms the 8
bank addresses from the control unit's region and step. One cycle after the
banks answer, it presents the words re-ordered by ladder lane (lane 0 is the
row above, lanes 1..7 are the PE-T rows), with each lane's row, column and a
valid flag. On the write side it routes each PE-V result to bank `row mod 8`.
The 7 PE-V rows are consecutive, so they never collide.

## Processing elements and the square root

`pe_t` has two pipeline stages. The first computes both backward differences
in parallel and v/theta. The second computes Term and u. It also gives out
Term delayed by one cycle (`c_term`) and the element's v, px and py.

`pe_v` has 12 pipeline stages:

1. the forward differences;
2. the squared magnitude and the two numerators;
3. the square root;
4. the denominator;
5. a restoring divider on magnitudes, one quotient bit per stage, for px and
   py in parallel.

A quotient of 1.0 or more is saturated to 1.0, the bound |p| <= 1 of the
method.

`sqrt_lut` replaces the square root by one 256-entry table of 8-bit roots. The
squared magnitude is a 32-bit number with 8 fraction bits. The unit takes the
8-bit window of it that starts at the leading one, or at the zero just above
it, such that the window's least significant bit lies on an even position 2k.
The window value m then approximates the input as m * 4^k, so the root is
table[m] << k. The table holds round(16*sqrt(m)) and is computed at
elaboration. Dropping the bits below the window keeps the relative error
below 1% for the samples the testbench draws.

## Control and timing

`control_unit` issues one step per cycle:

* for each iteration: 13 regions x 98 steps;
* then an 18-cycle drain.

The latency from issuing a step to writing its px/py is 18 cycles:

* 1 cycle control register;
* 1 cycle bank read;
* 1 cycle rotator;
* 15 cycles PE array: 2 in the PE-T, 12 in the PE-V, 1 write register.

A run of N iterations takes N x 1292 cycles from the start edge to `done`.
200 iterations take 258,400 cycles, 1.17 ms at 221 MHz.

## Using the core

`chambolle_top` ports (types from `chambolle_pkg`):

| port | meaning |
|---|---|
| `start`, `n_iter[15:0]` | start a run of n_iter iterations (only while idle, n_iter > 0) |
| `busy`, `done` | run in progress; one-cycle pulse after the last write-back |
| `host_we`, `host_re`, `host_sel[1:0]`, `host_row`, `host_col`, `host_wdata` | word access to a window's memory while idle; `host_sel[1]` = window, `host_sel[0]` = component u1/u2 |
| `host_rvalid`, `host_rdata` | read data, one cycle after `host_re` |
| `u_out[4][7]` | during the last iteration: valid, row, col and u (16 bit, 5 fraction bits) per array and lane; array index = window*2 + component |

To use it:

1. Load every element's `{v, px, py}` word of the four arrays. px and py are
   0 at the start of a TV-L1 level, or the previous results.
2. Pulse `start`.
3. Collect u from `u_out`; every element appears exactly once.
4. Optionally read px/py back for the next level.

### Windows in a frame

A window does not know the elements beyond its edges. On a cut edge, one
that is not also the frame border, it treats the missing neighbours like the
frame border. The error this causes moves inward by at most one element per
iteration. After N iterations, the elements more than N elements from every
cut edge are exact. These are the window's profitable elements. Windows
therefore overlap so that their profitable areas tile the frame.
`tb_overlap_windows` shows this on the core: two windows overlapping by 8
columns, 3 iterations. The assembled result equals a whole-frame run bit for
bit, and elements near the cuts do differ. The margin grows with the
iteration count: 200 iterations need a margin far larger than an 88 x 92
window. So at that count, results near cuts are approximations, unless the
window is widened along the frame.

Choosing window positions in the frame (with overlap, so that the elements
kept are unaffected by the window edges) and updating v between TV-L1 levels
(the thresholding step) are left to the system around the core.

Number formats, all two's complement, with truncating shifts:

| value | bits | fraction bits |
|---|---|---|
| v | 13 | 5 |
| px, py | 9 | 7 |
| Term | 18 | 7 |
| u | 16 | 5 |
| constants | 16 | 12 |
| square-root input | 32 | 8 (24.8) |

## Departures and own choices

Taken from the original architecture:

* the ladder;
* the operand reuse;
* BRAM-Term;
* 8 row-interleaved banks of 1012 x 32 bit, and 36 block RAMs in all;
* the 13/9/9-bit word split;
* the 88 x 92 window;
* two windows x two components;
* the 18-cycle step latency;
* the single-table square root with an even-aligned window.

This implementation's own choices:

* **theta, tau and the fraction-bit positions.** The original gives only the
  bit widths.
* **Square-root table contents**: round(16*sqrt(m)).
* **The divider** (restoring, saturating at 1.0). The original does not say
  how the division is done.
* **The sign of the forward differences.** They are taken as
  neighbour - element, the usual gradient. A literal reading of the original
  wording would give the opposite sign.
* **Which PE-V updates which row.** The original is not fully consistent
  about this. Here PE-V 1 handles the previous region's last row through
  BRAM-Term, and PE-V k handles the row of PE-T k-1.
* **Border handling**: zero differences at the window edges.
* **The drain gap between iterations**: 18 cycles, 1.4% of an iteration.
* **The host port and the u output stream.** The original only says that
  windows are initialised through the FPGA pins.
* **Multipliers.** The original fits the design into 62 DSPs by mapping part
  of the multiplications onto LUTs. Here every product is written as a plain
  `*`, which leaves that mapping to synthesis.
* **Throughput.** At the default size this RTL needs 258,400 cycles per
  window pair and 200 iterations. That gives about 47 frames/s for
  512 x 512 and 16 frames/s for 1024 x 768 at 221 MHz, before window overlap
  and loading. The original reports 99.1 and 38.1 frames/s for these cases.
  The difference is not explained by the structure described here.

Not included: the frame memory and the window slide schedule, and the
thresholding step of TV-L1.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare with
`tb/chambolle_ref_pkg.sv`, a reference model written as plain whole-matrix
loops:

* the square-root entries use real arithmetic;
* the division uses an integer divide;
* the model shares no code with the ladder.

| testbench | what it checks |
|---|---|
| `tb_sqrt_lut` | all inputs below 2^16 plus random 32-bit inputs; accuracy within 1% |
| `tb_pe_t`, `tb_pe_v` | random operands every cycle; results and their 2 and 12 cycle latencies |
| `tb_bram_sdp` | random traffic; read-first behaviour |
| `tb_control_unit` | the exact step sequence, drain gaps, `last_iter` and `done` timing |
| `tb_vertical_rotator` | every lane of a full 88 x 92 sweep; write routing |
| `tb_pe_array` | the ladder fed by a behavioural memory; write-back timing (15 cycles); u and px/py after 3 iterations |
| `tb_component_engine`, `tb_sliding_window` | these levels with the control unit, small windows |
| `tb_chambolle_top` | the whole core, 24 x 20 windows, 6 iterations; cycle count; counts of region rotations, BRAM-Term rows, divider saturation and shifted roots |
| `tb_overlap_windows` | two overlapping windows of one frame; profitable areas equal a whole-frame run |
| `tb_chambolle_full` | the whole core at its default size, 200 iterations, all four arrays compared element by element (about 5 s) |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/chambolle_pkg.sv \
  tb/chambolle_ref_pkg.sv rtl/*.sv tb/tb_chambolle_full.sv \
  --top-module tb_chambolle_full -o sim && ./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

## Files

| file | contents |
|---|---|
| `rtl/chambolle_pkg.sv` | widths, formats, constants, word and lane types |
| `rtl/chambolle_top.sv` | control unit + two sliding windows |
| `rtl/control_unit.sv` | iteration / region / step sequencer |
| `rtl/sliding_window.sv` | u1 and u2 engines of one window |
| `rtl/component_engine.sv` | 8 banks + rotator + PE array + host access |
| `rtl/vertical_rotator.sv` | bank-to-lane rotation and addressing, write routing |
| `rtl/pe_array.sv` | 7 PE-T + 7 PE-V ladder, reuse registers, BRAM-Term |
| `rtl/pe_t.sv`, `rtl/pe_v.sv` | processing elements |
| `rtl/sqrt_lut.sv` | table square root |
| `rtl/bram_sdp.sv` | simple dual-port block RAM |
