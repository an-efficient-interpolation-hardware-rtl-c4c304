# Parallel HEVC luma/chroma interpolator

Motion-compensated prediction in HEVC reads reference-picture samples at
quarter-pel (luma) or eighth-pel (chroma) positions. Samples between integer
positions are produced by separable FIR filters: 7- or 8-tap for luma, 4-tap
for chroma. Filtering is applied horizontally, vertically, or in both
directions one after the other. One 4x4 luma block can need an 11x11 window of
reference samples, so a one-sample-per-clock filter is too slow for high
resolutions.

This RTL follows a published parallel architecture for that problem. It has
three ideas:

* **Multiplier-free shared-operation PEs.** Each processing element (PE)
  computes one filter sum with shifts and adds. The partial sums that two
  coefficient sets have in common are built once. The luma PE covers the
  quarter-pel and half-pel sets. The chroma PE covers four of the seven
  eighth-pel sets. The remaining sets are mirror images of these, so they are
  obtained by feeding the taps in reverse order.
* **A wide PE array.** An 11x4 array of luma PEs filters all 11 window rows of
  a 4x4 block at once. A 5x2 array of chroma PEs does the same for a 2x2
  chroma block in its 5x5 window.
* **Filter reuse.** When a position needs both directions, the horizontal
  results are stored and fed back through a multiplexer into the same array,
  which then filters vertically. No second filter bank is needed.

Timing: a 4x4 luma block takes **2 clocks** when it needs one direction, or
is at the integer position, and **4 clocks** when it needs both. A 2x2 chroma
block takes **1 or 2 clocks**.

## Positions, coefficient sets and tap order

Luma fractions are in quarters of a sample (0..3), chroma fractions in eighths
(0..7). The coefficient sets are:

| luma fraction | taps (x-3 .. x+4)              | PE type, order |
|---------------|--------------------------------|----------------|
| 1/4           | -1 4 -10 58 17 -5 1 (0)        | A, forward     |
| 2/4           | -1 4 -11 40 40 -11 4 -1        | B, forward     |
| 3/4           | (0) 1 -5 17 58 -10 4 -1        | A, reversed    |

| chroma fraction | taps (x-1 .. x+2) | PE type, order |
|-----------------|-------------------|----------------|
| 1/8 | -2 58 10 -2  | A, forward  |
| 2/8 | -4 54 16 -2  | B, forward  |
| 3/8 | -6 46 28 -4  | C, forward  |
| 4/8 | -4 36 36 -4  | D, forward  |
| 5/8 | -4 28 46 -6  | C, reversed |
| 6/8 | -2 16 54 -4  | B, reversed |
| 7/8 | -2 10 58 -2  | A, reversed |

`interp_pkg::luma_decode` and `interp_pkg::chroma_decode` map a fraction to
its (type, reversed) pair. The filter arrays route the window samples in the
order that pair requires.

Which passes run depends on the two fractions of the block:

| frac_x | frac_y | passes                                  | luma clocks | chroma clocks |
|--------|--------|-----------------------------------------|-------------|---------------|
| 0      | 0      | none: integer samples scaled by 64      | 2           | 1             |
| != 0   | 0      | horizontal                              | 2           | 1             |
| 0      | != 0   | vertical, on the reference window       | 2           | 1             |
| != 0   | != 0   | horizontal on all rows, then vertical   | 4           | 2             |

## The shift-and-add PEs

**Luma (`luma_pe`).** Write the taps as p0..p7. Both luma sets share

    SOP = -p0 + 4*p1 + 16*(p3+p4) - 10*(p2+p5)

and each set adds its own part:

    A = SOP + 42*p3 + (5*p5 + p4 + p6)          // 42*p3 = p3<<5 + p3<<3 + p3<<1
    B = SOP + 24*(p3+p4) - (p2+p5) + 4*p6 - p7  // 24*s  = s<<4 + s<<3

The first adder levels end in a register. After it come the final additions
and the A/B output multiplexer. So a PE result belongs to the inputs of the
previous clock in which `en` was high.

The published shared-operation PE builds the B part with `(p3+p4)<<5`. Added
to SOP's 16, that gives 48*(p3+p4) instead of the 40 of the half-pel filter.
This design uses `<<4 + <<3` (24) instead. That costs one more adder, and B
then matches the standard filter.

**Chroma (`chroma_pe`).** The chroma PE is combinational. It shares
`n03 = -(p0+p3)` and `s12 = p1+p2` across all four types:

    A = 2*n03 +  8*s12 + 2*s12 + 48*p1
    B = 2*n03 + 16*s12 + 36*p1 + 2*(p1-p0)
    C = 4*n03 + 32*s12 +  8*p1 + 4*(p1-p2) + 2*(p1-p0)
    D = 4*n03 + 32*s12 +  4*s12

## The luma array and filter reuse

`luma_filter` is an 11-row by 4-column array of luma PEs. Window element
(r, c) is the reference sample at row r-3, column c-3 from the block's
top-left integer sample.

* In a horizontal pass, PE (r, j) filters row r with taps `win[r][j .. j+7]`,
  or `win[r][j+7 .. j+1]` for reversed order. All 11 rows are produced.
* In a vertical pass, only the four PE rows r = 3..6 are used. PE (r, j)
  filters column j+3 with taps `win[r-3 .. r+4][j+3]`.

`luma_interp` wraps the array with a multiplexer at its input, an 11x4
register for the first-pass results, a 4x4 result register and a four-state
controller:

    clock   0          1                2                 3                4
    state   IDLE       PASS1            PASS2A            PASS2B           IDLE
            start,     PE outputs ->    mux selects the   PE outputs ->    out_valid,
            window     result reg, or   stored rows, PE   result reg       ready
            into PE    stored rows      registers load
            registers  (both-direction
                       blocks)

For a one-pass block, `out_valid` rises in clock 2 and `ready` is high again
in that same clock, so one-pass blocks can follow each other every 2 clocks.
In the feedback pass the stored column j is placed at window column j+3.
This lets one vertical routing serve both the vertical-only case and the
second pass.

`chroma_interp` is the same scheme with one register stage per pass. A
one-pass block is accepted, filtered and registered in a single clock, so
`ready` stays high and a block can start every clock. A two-pass block stores
its 5x2 horizontal results and runs the vertical pass in the next clock; it
holds `ready` low for that clock.

## Numbers and widths

The outputs are the 14-bit-precision HEVC prediction samples that weighted
prediction (or the bi-prediction average) consumes:

* first-pass sums are shifted right by `BIT_DEPTH-8` (0 for 8-bit video);
* second-pass sums are shifted right by 6, without a rounding offset;
* integer samples are shifted left by `14-BIT_DEPTH`.

Internal widths:

* PEs take 16-bit signed inputs and produce 24-bit sums.
* Fed-back samples are 16-bit signed (`INTER_W`). The 8-bit first-pass range
  is -6120..22440.
* `pred` is 17-bit signed (`PRED_W`). A worst-case two-pass result reaches
  33150, one bit beyond 16.

## Interface

`hevc_interp_top` places a luma unit and a chroma unit side by side. Each has
its own handshake, and the two can work in the same clock.

| port                               | dir | width          | meaning |
|------------------------------------|-----|----------------|---------|
| `clk`, `rst_n`                     | in  | 1              | clock; active-low synchronous reset of the control state |
| `l_start` / `l_ready`              | in/out | 1           | luma request; it is taken in a clock where both are high |
| `l_frac_x`, `l_frac_y`             | in  | 2 each         | quarter-pel fraction |
| `l_ref`                            | in  | 11x11 x 8      | reference window, (3,3) = first integer sample of the block |
| `l_valid`                          | out | 1              | one-clock pulse: `l_pred` holds a new block |
| `l_two_pass`                       | out | 1              | the block in flight uses filter reuse |
| `l_pred`                           | out | 4x4 x 17 signed| prediction samples, held until the next block |
| `c_start` ... `c_pred`             |     |                | the same for one chroma component: 3-bit fractions, 5x5 window with the first integer sample at (1,1), 2x2 output |

Request inputs are read only in the clock that accepts them. Cb and Cr are two
separate chroma requests. Bi-prediction is one request per reference picture.

Parameters: `BIT_DEPTH` (default 8), `LUMA_BLK` (4) and `CHROMA_BLK` (2). The
window sizes follow as `LUMA_BLK+7` and `CHROMA_BLK+3`. Only the defaults are
verified.

## Throughput

Target: real-time decoding of 2560x1600 video at 30 frames/s in 4:2:0.
That is 2560*1600*30*1.5 = 184.32 M samples/s.

The worst case is a bi-predicted block in which every position needs both
directions. Its 4x4 luma block takes 8 clocks, and its two 2x2 chroma blocks
(Cb and Cr) take another 8:

* If the luma and chroma work runs one after the other, that is 24 samples
  per 16 clocks. The unit then needs at least 123 MHz.
* Here the two units can overlap, so the same work takes 8 clocks, and about
  62 MHz would be enough.

In the best case (one-pass positions, bi-predicted) a 16x16 luma block takes
16 x 2 x 2 = 64 clocks. The end-to-end testbench checks both counts: 64 and
128 clocks per bi-predicted 16x16 unit.

The original design reached 200 MHz in a 0.18 um process. This RTL has not
been synthesised against a cell library.

## Departures and own choices

* **Luma B set.** The shared-operation B part uses 24*(p3+p4), not the
  published 32*(p3+p4); see above.
* **Corrected equation terms.** Some terms of the published shift-and-add
  equations were corrected. In each case the coefficient tables were taken as
  the reference:
  * luma A: the `p3<<5` term;
  * chroma A: `2*(p1+p2)`;
  * chroma B: `2*(p1-p0)`.
* **Not described in the original, chosen here:**
  * the handshake, reset, widths and bit depth;
  * the tap routing inside the arrays;
  * the feedback register;
  * integer-position handling;
  * the 17-bit output.
* **Concurrent units.** The published cycle budget counts the luma and chroma
  units one after the other. Here they are independent and may run at the
  same time.
* **Out of scope.** Reference-sample fetching, motion-vector handling and
  weighted or bi-predictive averaging are not part of this RTL. Windows and
  fractions are inputs.

## Verification

Every testbench compares against a reference model that evaluates the filters
as plain multiply-adds over coefficient tables (`tb/interp_ref_pkg.sv`). It
does not reuse the shift-and-add decomposition. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_luma_pe`         | both sets on random 8-bit and signed inputs; 1-clock latency; hold when `en` is low |
| `tb_chroma_pe`       | all four sets, unit impulses and random inputs |
| `tb_luma_filter`     | every PE output of both passes, all three fractions |
| `tb_chroma_filter`   | every PE output of both passes, all seven fractions |
| `tb_luma_interp`     | all 16 positions; random, back-to-back and refused starts; a checkerboard worst case; latency 2 or 4 |
| `tb_chroma_interp`   | all 64 positions; the same stimulus; latency 1 or 2 |
| `tb_hevc_interp_top` | end-to-end run at default parameters (below) |
| `tb_workload_realtime` | 16 worst-case units (all two-pass, bi-predicted); requires 128 clocks per unit and reports samples per clock (3.0) and the clock needed for 2560x1600 at 30 frame/s (61.4 MHz) |

The end-to-end run interpolates 24 bi-predicted 16x16 prediction units from
two random reference pictures. Luma and chroma are driven concurrently, and
the results are compared sample by sample with a direct evaluation of the
filters on the picture. It also counts that every position class, every
fraction, refused starts and concurrent luma/chroma activity each occurred.

Running a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_hevc_interp_top \
        rtl/interp_pkg.sv tb/interp_ref_pkg.sv tb/tb_hevc_interp_top.sv
    obj_dir/Vtb_hevc_interp_top

## Files

* `rtl/interp_pkg.sv`: widths, PE type enums, fraction decoders
* `rtl/luma_pe.sv`, `rtl/chroma_pe.sv`: shared-operation PEs
* `rtl/luma_filter.sv`, `rtl/chroma_filter.sv`: PE arrays with tap routing
* `rtl/luma_interp.sv`, `rtl/chroma_interp.sv`: filter reuse, control, registers
* `rtl/hevc_interp_top.sv`: both units together
* `tb/`: reference package and testbenches
