# Fixed-width MLCP Booth multiplier and incremental-Hough-transform voting

This repository holds two independent pieces of DSP hardware in
synthesizable SystemVerilog:

1. **A fixed-width radix-4 Booth multiplier with conditional-probability
   error compensation.** It multiplies two L-bit two's-complement numbers and
   returns only the upper L bits of the product. Most of the lower half of
   the partial-product array is never built. The carry that the missing bits
   would have produced is estimated from the *nonzero codes* of the Booth
   digits, which the encoder already computes. This is the multilevel
   conditional probability (MLCP) idea: the estimate depends on how many of
   the low Booth digits are nonzero.
2. **The voting stage of a straight-line Hough transform.** It uses the
   *incremental Hough transform* (IHT): the line radius for the next angle is
   computed from the radii of the current angle, so no sine, cosine or
   multiplier is needed. A binary image streams in. Every pixel of value 1 (a
   feature point) casts 180 votes into a (rho, theta) accumulator memory.

The two share nothing but clock and reset. `mlcp_hough_top` places them side
by side.

## Part 1 — fixed-width Booth multiplier

### Booth digits and nonzero codes

The multiplier B is recoded into L/2 radix-4 digits. Digit *i* is taken from
bits (b<sub>2i+1</sub>, b<sub>2i</sub>, b<sub>2i-1</sub>), with b<sub>-1</sub> = 0
(`booth_encoder`):

| b<sub>2i+1</sub> b<sub>2i</sub> b<sub>2i-1</sub> | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| y<sub>i</sub> | 0 | +1 | +1 | +2 | −2 | −1 | −1 | 0 |
| z<sub>i</sub> (nonzero) | 0 | 1 | 1 | 1 | 1 | 1 | 1 | 0 |

Row *i* (`booth_pp_row`) is 0, A or 2A. For a negative digit it is inverted
and a separate +1 goes into column 2i. The zero codes 000 and 111 switch all
select lines off. A zero digit therefore puts no bits at all into the array,
and the error estimate below relies on that.

### What is kept and what is estimated

The exact product has 2L columns. The multiplier keeps every partial-product
bit in columns L−W … 2L−1: the L output columns plus W extra columns of
*column information*. It drops columns 0 … L−W−1, the **truncated part** TP.
Only the lowest NTR = ⌈(L−W)/2⌉ rows reach into TP.

```
 column:  2L-1 ............ L | L-1 .. L-W | L-W-1 ........ 0
          ---- output bits ---  kept (W)     truncated part TP (not built)
```

The kept bits, a compensation value C placed at column L−W, and the
negation +1s of the rows whose LSB lies in the kept region are summed. Bits
[2L−1 : L] of that sum are the product (`mlcp_booth_mult`). The aim is the
rounded exact product, round(A·B / 2<sup>L</sup>). A larger W keeps more
bits, so it costs more area and gives a smaller error.

### The compensation table (`mlcp_compensator`)

In hardware the compensator is small: a population count of
z<sub>0</sub> … z<sub>NTR−1</sub>, and a table of NTR+1 constants indexed by
that count. The constants are computed at elaboration time by a constant
function, so no table file is needed and they follow L and W automatically:

C<sub>k</sub> = ⌊ (E[TP | k nonzero digits] + 2<sup>L−1</sup>) / 2<sup>L−W</sup> ⌋

The 2<sup>L−1</sup> term is the rounding constant. A floor is used rather than
rounding to nearest because the kept sum is a multiple of 2<sup>L−W</sup>.
Taking its upper L bits therefore discards, on average,
(2<sup>L</sup> − 2<sup>L−W</sup>)/2 rather than 2<sup>L−1</sup>, and the
floor cancels that difference.

E[TP | k] assumes uniformly distributed operands. It is derived as follows:

* For a fixed digit y, each TP bit of that row has a known mean over A.
  * A selected or inverted multiplicand bit has mean 1/2.
  * The bit shifted in by 2A is 0, or 1 after inversion.
  * The negation +1 adds 1 at column 2i.

  So E[TP | all digits] is a sum of per-row terms g<sub>i</sub>(y<sub>i</sub>).
  With m = L−W−2i TP bits in row *i*, 2·g<sub>i</sub>/4<sup>i</sup> is
  2<sup>m</sup>−1, 2<sup>m</sup>+1, 2<sup>m</sup>−2 and 2<sup>m</sup>+2 for
  y = +1, −1, +2 and −2, and 0 for y = 0.
* Neighbouring digits share a multiplier bit, so the digits are not
  independent. The function runs a forward recursion over the digits. Its
  state is the shared bit and the running nonzero count. It accumulates the
  number of bit patterns and the sum of the g terms for each count.

For the default L = 16, W = 2 (NTR = 7) the table is:

| k (nonzero low digits) | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| E[TP \| k] / 2<sup>14</sup> | 0 | 0.52 | 0.99 | 1.50 | 2.00 | 2.50 | 3.00 | 3.50 |
| C<sub>k</sub> | 2 | 2 | 2 | 3 | 3 | 4 | 4 | 5 |

Each nonzero digit below the cut is worth about half a unit of column L−W.
This table is an exact conditional expectation computed here. The published
MLCP method reaches its estimate through its own closed-form expression,
which is not reproduced. The two agree in spirit: both condition on all the
nonzero codes of the truncated rows. They need not match entry for entry.

### Accuracy

Error of the L = 16, W = 2 multiplier against round(A·B/2<sup>16</sup>),
over 200 000 random operand pairs:

| | mean error | mean \|error\| | max \|error\| |
|---|---|---|---|
| with compensation | −0.063 | 0.136 | 1 |
| same array, no compensation (plain truncation) | — | 1.03 | — |

The remaining bias comes from C being an integer in units of
2<sup>L−W</sup>, which is a quarter of an output LSB at W = 2.

## Part 2 — incremental Hough transform voting

### The recurrence

For a feature point (x, y), the line through it whose normal has angle θ
lies at distance r(θ) = x cos θ + y sin θ from the origin. The angle axis
[0°, 180°) is split into K = 180 steps of ε = π/K. With cos ε ≈ 1 and
sin ε ≈ ε, the radius at angle n and the radius a quarter turn later
advance together:

```
r[n+1]       = r[n]       + ε · r[K/2+n]
r[K/2+n+1]   = r[K/2+n]   − ε · r[n]          r[0] = x,  r[K/2] = y,  0 ≤ n < K/2
```

`iht_engine` holds r[n] and r[K/2+n] in two registers. Each clock it
produces both radii, that is, votes for angle n and angle K/2+n, and updates
them through two adder/subtractor cells (`addsub`). The product ε·r is built
by shifting and adding r at the set bits of the fixed-point constant ε.
With 16 fraction bits ε = 1144/65536, and no multiplier is needed. One point
takes K/2 = 90 cycles. The next point is accepted in the last iteration, so
points stream without bubbles.

Three details matter when reading the vote memory:

* The radius is kept with 16 fraction bits and rounded half-up
  (⌊r + ½⌋) before indexing. The memory index is round(r) + 512. Radii
  below zero occur for θ > 90°, down to −351 for CIF.
* The small-angle step is a rotation by atan ε combined with a stretch by
  √(1+ε²). After 90 steps the radii are about 1.4 % too long, up to about
  6 pixels at the far corner of a CIF image. This error belongs to the IHT
  as formulated. It is kept, and no gain correction is applied. Angles 0
  and 90° are exact (r = x and r = y).
* The angle drift per step (atan ε against ε) is negligible, under 0.1
  pixel over the half turn.

### Pipeline

```
pixels ──> rle_encoder ──runs──> feature_scanner ──(x,y)──> iht_engine ──2 votes/cycle──> vote_accum
 (1/cycle)   value,len,eol        zero runs: 1 cycle          90 cycles/point              2 banks, RMW
```

* **`rle_encoder`** merges equal neighbouring pixels of a line into runs
  (value, length, end-of-line). It takes one pixel per cycle. It stalls only
  when its one-entry output register is blocked, or for one cycle when a
  line ends on a pixel that starts a new run.
* **`feature_scanner`** keeps the raster position. A zero run moves x by its
  whole length in one cycle, so background regions are skipped. A run of
  ones yields one (x, y) per cycle.
* **`iht_engine`**: see above. It has no output back-pressure.
* **`vote_accum`**: the vote memory is split into two banks, angles 0–89 and
  90–179, each 90 × 1024 counters of 17 bits. This lets both votes of a cycle
  be counted at once. Each vote is a read-modify-write: the cell is read in
  the cycle the vote arrives and written back, incremented, in the next
  cycle. A vote to the cell being written in that cycle takes the forwarded
  value. Counters saturate instead of wrapping. A sequencer clears all cells
  in 92 160 cycles. Votes accumulate until the next clear.

All internal links are valid/ready. Back-pressure from the IHT processor
propagates to the pixel input through `pix_ready`. `hough_voter` wires the
four together and raises `idle` once every accepted pixel's votes are in
memory. Peak detection is not included: read the memory through
`rd_en/rd_theta/rd_rho`, which returns the data one cycle later with
`rd_valid`.

### Throughput

A CIF frame (352 × 288) with about 10 % feature points (9 961 in the test)
takes 897 972 cycles, essentially 90 cycles per point. Pixel input overlaps
with IHT processing. At 30 frames/s this needs a clock of about 27–28 MHz.
Memory: 3 133 440 bits of vote counters.

## Top level (`mlcp_hough_top`)

| port group | signals | notes |
|---|---|---|
| multiplier | `mul_valid, mul_a[L], mul_b[L] → mul_out_valid, mul_p[L]` | operands and product registered; product 2 cycles after operands, one per cycle |
| pixel input | `pix_valid, pix_bit, pix_eol → pix_ready` | raster order; `pix_eol` on the last pixel of every line |
| control | `frame_start`, `clear_start → clearing` | `frame_start` resets the raster position; clear before the first frame |
| read-out | `rd_en, rd_theta[9], rd_rho[10] → rd_valid, rd_data[17]` | theta index 0–179 (θ = index·1°), rho index = round(r) + 512; only while idle |
| status | `idle`, `ev_zero_skip, ev_point, ev_point_done, ev_point_stall, ev_sat, ev_fwd` | one-cycle event pulses, handy for performance counters |

Reset is asynchronous and active low (`rst_n`).

### Parameters

| name | default | where | meaning |
|---|---|---|---|
| `L` | 16 | `mlcp_booth_mult`, top | operand and result width (even) |
| `W` | 2 | `mlcp_booth_mult`, top | extra kept lower columns (accuracy knob) |
| `K` | 180 | `hough_pkg` | angle steps over 180° |
| `FRAC`, `R_W` | 16, 28 | `hough_pkg` | radius fraction bits and total width |
| `RHO_W`, `RHO_OFF` | 10, 512 | `hough_pkg` | vote-memory radius index width and offset |
| `VOTE_W` | 17 | `hough_pkg` | counter width (holds every pixel of a CIF frame) |
| `X_W`, `Y_W`, `RUN_W` | 9, 9, 10 | `hough_pkg` | coordinate and run-length widths |

The block modules (`iht_engine`, `vote_accum`, `addsub`) take their sizes as
parameters that default to the package constants.

## What is taken from the method and what is chosen here

Taken from the method:

* the Booth recoding table;
* the fixed-width structure with column information W, and compensation from
  all nonzero codes of the truncated rows;
* the IHT recurrence with r[0] = x and r[K/2] = y;
* K = 180 and the CIF image size;
* shift-and-add arithmetic instead of multipliers;
* the add/subtract cell with carry-in for subtraction;
* voting into a memory addressed by (rho, theta);
* run-length coding so that zero regions are skipped.

Chosen here:

* L = 16 and W = 2;
* round(A·B/2<sup>L</sup>) as the multiplier's target;
* the way the compensation constants are derived (exact conditional
  expectation instead of the published closed form);
* all fixed-point formats and rounding;
* the radius offset;
* the two-bank memory with forwarding and saturation;
* runs along image lines (one-pixel-high blocks);
* every handshake and latency;
* registering the multiplier in the top level.

Not built:

* The block-based processing element. It divides the image into blocks,
  increments votes between and within blocks, uses two accumulators and a
  vote-offset step table, and merges identical votes. Its structure and
  sizes are not specified in enough detail.
* Pixel-level parallelism, that is, several IHT engines sharing one vote
  memory. There is one engine, which works on two angles at a time.
* The edge detector that produces the binary image, and peak detection in
  the vote memory.
* The redundant (carry-free) arithmetic variant of the add/subtract cell.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 8 codes against the recoding table |
| `tb_booth_pp_row` | row value = y·A for every 8-bit A and every digit |
| `tb_mlcp_compensator` | L = 8, W = 2 and W = 0: the table output for every z pattern against E[TP \| k] measured over all 65 536 operand pairs |
| `tb_mlcp_booth_mult` | L = 8 (W = 2, 0): all operand pairs bit-exact; L = 16: error statistics as in the table above |
| `tb_addsub` | random 28-bit and exhaustive 6-bit add and subtract |
| `tb_iht_engine` | every vote against an integer model of the recurrence, radii within 1.5 % + 1 of x cos θ + y sin θ, 90 cycles per point, no bubble between points |
| `tb_vote_accum` | small memory: clear time, forwarding and saturation, every cell against a software count |
| `tb_rle_encoder`, `tb_feature_scanner` | random lines with random stalls; runs and points reproduce the image; zero runs take one cycle |
| `tb_hough_voter` | 48 × 20 image: all 184 320 cells against the model; the strongest cell lies on the drawn line; events occur |
| `tb_mlcp_hough_top` | the full design at default sizes: a full CIF frame with 10 % noise and two lines, all cells checked, the strongest cell is the horizontal line at y = 100, frame cycle count, 5 000 multiplier products |

The Hough reference model (`tb/iht_ref_pkg.sv`) uses plain integer
arithmetic. The Booth reference (`tb/booth_ref_pkg.sv`) computes the
truncated part from the digit definition. The expected compensation comes
from exhaustive statistics, not from the recursion the RTL uses.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/booth_pkg.sv rtl/hough_pkg.sv tb/booth_ref_pkg.sv tb/iht_ref_pkg.sv \
    tb/tb_mlcp_hough_top.sv --top-module tb_mlcp_hough_top -o sim
./obj_dir/sim
```

Replace the last source file and `--top-module` for any other testbench.
The full-size top-level test runs in a few seconds.

Synthesis notes: the vote memory is written as two plain arrays with one
synchronous read port and one write port each, so FPGA tools map it to block
RAM. The multiplier is combinational, and the top level puts a register
stage on each side of it.
