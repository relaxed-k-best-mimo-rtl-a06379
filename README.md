# Relaxed K-best soft-output MIMO detector (4x4, 64-QAM)

This is synthesizable SystemVerilog for a breadth-first tree-search MIMO
detector. It detects 4x4 spatially multiplexed 64-QAM and produces soft
outputs: an L-value for each of the 24 bits of a received vector, plus hard
decisions.

A plain K-best detector extends every survivor path with every
constellation point. It then sorts all extended paths and keeps the best K.
At 64-QAM both steps are too costly in hardware. This design makes two
changes to the algorithm.

* **Improved PSK enumeration.** The 64 points lie on 9 circles around the
  origin. For each survivor, a circle test first rules out the circles that
  cannot hold an admissible point. On each remaining circle the points are
  visited in a zigzag, starting from the one nearest the target. A circle
  is abandoned at its first point outside the radius.
* **Distributed, approximate sorting.** Each path-extension unit has its
  own small memory. The memory is split into segments by metric range:
  paths are binned, never sorted. The next depth's survivors are then
  simply read out, best bin first, until K have been taken.

The result is a detector core that examines a varying number of points per
survivor and needs no sorting network. Several independent cores run side
by side to reach the target throughput.

## Top level and interface

`rkb_detector` holds `NCORES` (13) identical `detector_core`s. Each core
works on its own received vector. A job is accepted on `in_valid &&
in_ready` and sent to the lowest-numbered idle core. `in_ready` is low only
while every core is busy. Finished results are collected round-robin and
held on `out_valid` until `out_ready`. Cores finish in a data-dependent
order, so results can leave out of order; `out_tag` returns the tag the job
came in with.

A job is the output of the channel preprocessing, which is **not** part of
this design:

| port | content |
|---|---|
| `in_l[i][j]` | Lower-triangular factor L with H\*H = L\*L, complex `{re, im}`, 15 bits each with 12 fraction bits. `l_ii` is real and positive (only `.re` is used); entries above the diagonal are ignored. |
| `in_shat[j]` | s-hat = (H\*H)^-1 H\* y, complex, 16 bits each with 11 fraction bits. The constellation grid is the odd integers -7..7. |
| `in_r2` | Radius r^2 as an 8-bit metric with 4 fraction bits (squared grid units). A natural choice is r^2 = 2·alpha·N_r·sigma^2 with alpha = 6. |
| `in_tag` | 8-bit job tag. |

The result ports are:

* `out_llr[b]`: signed 9-bit L-value of bit b. A positive value favours 1.
  The values are metric differences, not yet scaled by 1/N0.
* `out_hard[b]`: the bits of the best survivor.
* `out_empty`: set when no path survived to the last depth. All L-values
  are then 0.

Bit `6*a + k` belongs to antenna `a`. Bits `[6a+5 : 6a+3]` are the Gray
code of the I level index and bits `[6a+2 : 6a]` the Gray code of the Q
level index (index = (level+7)/2).

`evt` ORs seven one-clock event flags from the cores: segment hand-over,
reopen, drop, circle termination, simultaneous PS requests, stop at K, and
L-value fallback. `core_busy` shows which cores are working. Both are for
monitoring only.

## The tree and the metric

With L lower triangular, ||y - Hs||^2 splits into a sum over depths
i = 0..3 of |P_c - l_ii s_i|^2, where

    P_c = sum_{j<i} l_ij (shat_j - s_j) + l_ii shat_i

depends only on the symbols already fixed. All arithmetic up to the metric
is exact integer arithmetic. The metric increment is
`(|P_c - l_ii (s << 11)|^2) >> 42`, saturated, so one metric LSB is 1/16 of
a squared grid unit. A path metric is the 8-bit sum of its increments. Any
path whose metric exceeds r^2 is discarded.

## Inside a core (`detector_core`)

For each received vector the core runs four rounds, one per depth.

1. **Source of survivors.** At depth 0 the source is the single root path
   with metric 0. At later depths, `survivor_read_ctrl` reads up to K = 64
   paths from the sorters (see below).
2. **PC block** (`pc_block`, 3-stage pipeline, one survivor per clock). For
   each survivor it computes three things:
   * P_c;
   * the valid-circle mask;
   * on every circle, the zigzag start point and first direction.
3. **PC bus** (`pc_bus`). The results wait in an 8-entry queue. The queue
   head is driven on a bus shared by the 8 PS blocks. A PS block with no
   work holds `req`. One requester per clock, chosen round-robin, receives
   `ack` and latches the bus. The core throttles the read controller so
   that the PC pipeline plus the queue never hold more than 8 survivors.
4. **PS blocks** (`ps_block` = `mps` + `pe`, 8 of them). Each PS block
   extends one survivor at a time, one constellation point per clock. Paths
   that pass the radius check go to that block's own `approx_sorter`.
   Survivors near the transmitted vector have more admissible points than
   poor ones, so PS blocks finish at different times. This is why the link
   is request-driven.
5. **End of a depth.** A depth ends when all of these hold:
   * the source is exhausted;
   * the PC pipeline and queue are empty;
   * every PS block is idle.

   The sorters then swap banks and the next depth starts.

After the fourth depth, the read controller streams the final survivors
(again at most K) into the `output_gen` instead of the PC block.

A core's time per vector depends on how many points are admissible. On
the synthetic channels of the unit benches it ranges from about 100
clocks (low noise, tight radius) to about 560 clocks (a radius holding
thousands of leaves).

`tb_workload_kbest` uses flat Rayleigh channels at Eb/N0 of 17.7 to
16.2 dB, with the radius r^2 = 2·6·N_r·sigma^2. There the average is 154
to 230 clocks per vector at K = 64, over 60 vectors per point. A vector
carries 24 bits, so at the 270 MHz clock of the published implementation
one core gives 28 to 42 Mb/s.

In that run K = 64 and K = 48 always returned the ML bits. K = 32 missed
the ML leaf on some vectors at 16.7 dB (7 of 1440 bits differed). This
matches the published finding that K = 32 loses noticeably.

The published per-core averages are 7.7 to 8.6 Mb/s at the same SNRs.
That is about 750 clocks per vector. The lower published figure is
expected for two reasons:

* this design's pipelines run one point per clock with no stalls;
* the published numbers come from its own coded-system channel data.

## Improved PSK enumeration

**Valid circles** (`pc_block`, stage 3). Circle c has radius rho_c, with
rho_c^2 in {2, 10, 18, 26, 34, 50, 58, 74, 98}. Scaled into the P_c domain
its radius is R = l_ii·rho_c·2^11. The nearest any of its points can be to
P_c is |R - |P_c||. The metric budget left for this survivor is
D = (r^2 - Gamma + 1) << 42. Let

    X = R^2,   Y = |P_c|^2,   A = X + Y - D

The circle can hold an admissible point only if (R - |P_c|)^2 < D. Without
square roots or division, that is: A < 0, or A^2 < 4XY. The test needs
about 150-bit intermediate products, held in 160-bit variables. The
excluded circles form no gaps, since the valid ones are always contiguous.
An admissible point is never on an excluded circle; the testbench checks
this by brute force.

**Start point and direction** (`pc_block`, stage 2). l_ii is real and
positive, so the closest point of a circle is the one with the largest
projection onto P_c. Projections use the point coordinates (at most 7) as
constants. The first zigzag step goes towards the side of that point on
which P_c lies, which is the sign of the cross product.

**Point selection** (`mps`). The MPS holds three tables, loaded when a
survivor arrives:

* **VCT**: the set of valid circles;
* **NMPT**: the next point on each circle;
* **ZSDT**: the present zigzag direction on each circle.

Each clock it feeds the PE the next point of the circle under the valid
circle pointer, then moves the pointer on to the next valid circle. On each
circle the sequence is start, +1, -1, +2, -2, …: each step reverses the
stored direction and lengthens by one. A circle leaves the VCT after its
last point, or when the PE asks for termination.

Taking the circles in turn matters. The PE is 3 stages deep. If one circle
were fed back to back, the termination request would come back after two
more points of that circle had already entered the pipeline. Points already
in flight still go through the radius check, and any that pass are kept.

**Path extension** (`pe`) works in three stages:

1. d = P_c - l_ii·s;
2. |d|^2 is scaled and saturated;
3. Gamma' = Gamma + Lambda and the check Gamma' <= r^2.

Each point then either produces an extended path or a termination request.

## Approximate sorter (`approx_sorter`)

This is the least conventional part of the design.

**Banks and segments.** Each PS block has one sorter with two single-port
banks (`sp_ram`) of 128 paths. A path is 32 bits: four 6-bit symbols and
an 8-bit metric. One bank collects the current depth's extended paths while
the read controller reads the previous depth's survivors from the other.
Each bank has 16 segments of 8 entries. Segment S_j accepts the metric
range (u_{j-1}, u_j]. The u_j are registers, loaded with t_j = j·r^2/16 at
the start of every depth. Each segment has a write counter.

**Hand-over.** When S_j fills, u_j is overwritten with u_{j-1}. S_j's range
becomes empty, and S_{j+1} automatically takes over the range
(u_{j-1}, u_{j+1}].

**Reopen.** Suppose S_{j+1} had already filled (its range was empty). It
gets a non-empty range again and is *reopened*. Its write counter had
wrapped to 0, so new, better paths overwrite its entries from the start of
the segment.

**Drop.** A path above u_16 is dropped. In this integer implementation u_0
is -1, so that metric 0 is kept.

The segment for a metric is simply the first j with metric <= u_j. All 16
comparisons run in parallel, so one path is stored per clock. Paths are
never moved.

**Read-out** (`survivor_read_ctrl`). Survivors are read segment by segment:
entry 0 of S_1 from each of the 8 memories in turn, then entry 1, and so on
until S_1 is exhausted; then S_2, and so on. Reading stops once K paths
have been fetched. Memories whose segment is shorter are skipped, so every
clock either reads a path or advances.

## Soft output (`output_gen`)

The output generator keeps a metric table of 24 bits × 2 values, holding
the best metric seen with that bit value. It also tracks the best and the
worst survivor metric. All 48 cells are updated in parallel, one survivor
per clock.

At the end, L_b = Gamma_{b,0} - Gamma_{b,1}. If every survivor agrees on
bit b, one of the two cells is undefined. L_b then gets magnitude
Gamma_worst - Gamma_best and the sign of the agreed value.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NCORES` | 13 | Cores in the top. Chosen so that about 31 mm^2 of 2.38 mm^2 cores give above 100 Mb/s. |
| `BETA` | 8 | PS blocks, and therefore sorters, per core. |
| `NSEG` | 16 | Segments per sorter bank (l). |
| `MEM_DEPTH` | 128 | Paths per bank: 2 × 8 × 128 = 2048 paths per core. |
| `K` | 64 | Survivors kept per depth. |
| `QDEPTH` | 8 | PC-to-PS queue depth (core only). |
| `TAGW` | 8 | Job tag width. |

Fixed constants live in `rkb_pkg`:

* NT = 4 antennas, 6 bits per symbol;
* widths 15 (L), 16 (s-hat) and 8 (metric);
* the fraction bits `SF`, `LF` and `MF`, and the constellation table.

Values of `NSEG` and `MEM_DEPTH` should keep `MEM_DEPTH/NSEG` a power of
two.

## What follows the published design and what does not

The following follow the published design:

* the overall structure, with independent cores and one PC block, 8 PS
  blocks and 8 sorters per core;
* the Req/Ack link over a shared bus;
* the MPS tables and the alternation among circles;
* termination at the first failing point;
* segment thresholds i·r^2/l with hand-over and reopen;
* the two alternating single-port banks per sorter;
* the read-out order;
* the metric table with its best/worst fallback;
* the sizes beta = 8, l = 16, 128-entry banks, K = 64, and the 8/15/16-bit
  widths.

The following are this design's own choices:

* **Fraction bits and metric scaling.** The widths are published; the
  binary points are not.
* **Gray bit mapping.**
* **Exact circle test.** The published method scales P_c by a precomputed
  1/l_ii. This design compares squared quantities in the P_c domain
  instead. That is also division-free, needs no 1/l_ii input and is exact.
  It yields a per-circle mask rather than inner and outer circle indices.
* **Closest point by maximum projection.** The published method locates
  P_c in a partition of the plane by straight lines. Both select the same
  point.
* **u_0 = -1, and overwriting oldest-first in a reopened segment.**
* **PC queue and credit throttle, round-robin arbitration, and the
  pipeline depths** (3 stages each in the PC block and the PE).
* **Control sequencing of a core.** This covers the root path at depth 0,
  the end-of-depth condition, and the empty result when no path survives.
* **Job dispatch, tags and out-of-order results at the top.**
* **L-values without the 1/N0 factor.**

Memories are plain arrays with synchronous read. For an ASIC they would
map to single-port SRAM macros.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with the
line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_sp_ram` | Read/write against a shadow array, and the read latency. |
| `tb_approx_sorter` | Contents and counts of every segment against a behavioural model of thresholds, hand-over, reopen and drop. |
| `tb_pe` | Metrics and radius decisions against 128-bit reference arithmetic, and the 3-clock latency. |
| `tb_mps` | Zigzag order, circle alternation, termination and one point per clock. |
| `tb_pc_block` | P_c, valid circles (floating point), start points and directions (brute force), and that no admissible point is excluded. |
| `tb_pc_bus` | Queue order, one-hot acknowledge only to requesters, round-robin order and fill count. |
| `tb_ps_block` | Every emitted path is admissible, unique and correctly scored. The guaranteed zigzag prefix is complete. Rate is one point per clock. |
| `tb_survivor_read_ctrl` | Exact read-out order and the stop at K, under random throttling. |
| `tb_output_gen` | L-values, fallback, hard decisions and the empty case against a reference. |
| `tb_detector_core` | One core, default size: see the end-to-end checks below. |
| `tb_workload_kbest` | The evaluation workload: cores with K = 64, 48 and 32 on the same Rayleigh-channel vectors at Eb/N0 17.7, 17.2, 16.7 and 16.2 dB. Per vector it checks admissibility, that no hard decision beats the ML leaf, and L-value signs. It prints bit errors and clocks per vector for each point. The channel preprocessing (Cholesky factor, s-hat, radius) is done in floating point in the bench. |
| `tb_rkb_detector` | The whole detector at default size with 40 vectors back to back and output back-pressure. Also checks that every tag returns once, that the input stalls with all cores busy, and out-of-order completion. |

`tb/rkb_ref_pkg.sv` holds the shared reference model. It covers random
channels, the bit-exact metric and an exhaustive depth-first search for
the maximum-likelihood leaf within the radius.

The two end-to-end benches (`tb_detector_core` and `tb_rkb_detector`)
check that:

* low-noise vectors decode to the transmitted bits, which are also the ML
  bits;
* on every vector the hard decision is an admissible leaf no better than
  ML;
* L-value signs agree with the hard decisions;
* `out_empty` is set exactly when no leaf lies inside the radius.

They also fail if any internal mechanism (hand-over, reopen, drop,
termination, simultaneous requests, stop at K, fallback) never occurs.

The detector is not compared against a bit-exact model of the relaxed
algorithm with a real channel model. The published frame-error-rate curves
have not been reproduced.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rkb_detector \
        -y rtl -y tb +libext+.sv -Irtl rtl/rkb_pkg.sv tb/rkb_ref_pkg.sv \
        tb/tb_rkb_detector.sv -o sim
    ./obj_dir/sim

Replace the top module and file for the other benches. Only `tb_detector_core`,
`tb_rkb_detector` and `tb_workload_kbest` need `tb/rkb_ref_pkg.sv`. The full-size top-level bench
builds in about half a minute and runs in under a second.
