# Iterative Pippenger MSM accelerator for BLS12-381 G1

This repository holds synthesizable SystemVerilog for the OPTIMSM accelerator
("Optimized Processing Through Iterative Multi-Scalar Multiplication"): one
compute unit behind its memory interface. It also holds self-checking
testbenches for every block and for the whole accelerator.

## What it computes

A multi-scalar multiplication (MSM) is the sum `Q = k_1 P_1 + ... + k_N P_N`.
The `P_i` are points on the G1 group of the BLS12-381 curve
(`y^2 = x^3 + 4` over a 381-bit prime field). The `k_i` are 255-bit scalars.
MSM is the most expensive step of many zero-knowledge provers.

The unit uses the Pippenger (bucket) method, with these refinements:

* **GLV endomorphism.** Each scalar is split as `k = k1 + k2*lambda`.
  `lambda` is a 128-bit number with `lambda*(x, y) = (alpha*x, y)`, so
  `lambda*P` costs one field multiplication. `k1` has at most 130 bits and
  `k2` at most 128 bits.
* **Precomputed multiples.** Each half scalar is cut into 7 windows of 19
  bits. The host stores `P` together with `2^19 P, 2^38 P, ..., 2^114 P`.
  Every window of every point can then go into one shared set of buckets, so
  no per-window aggregation is needed.
* **Signed digits.** A window value above `2^18` is replaced by a negative
  digit plus a carry into the next window. Digit magnitudes therefore lie in
  `[0, 2^18]`. Negating a point only flips `y`.
* **Iterations.** `2^18` magnitudes would need `2^18` buckets. The unit keeps
  only `2^16` buckets on chip and makes four passes over the data. Pass `i`
  handles magnitudes `s` with `(s-1) >> 16 == i`, in bucket
  `(s-1) mod 2^16`. Each pass returns its own partial result, which already
  includes its offset `i * 2^16 * (sum of its buckets)`. The passes share no
  state, so four units could run them in parallel.
* **Distribution with offset.** The top window of a half scalar holds only 16
  or 17 useful bits, so its large digits would all fall into the early
  passes. The unit fixes this by writing a constant into the three top bits
  of every top window, so those digits spread evenly over the four passes:

  | half scalar | even point index | odd point index |
  |---|---|---|
  | `k1` | 2 | 3 |
  | `k2` | 0 | 1 |

  The constant is `o * 2^130` on a half scalar. The host must subtract the
  resulting fixed point:
  `(lambda + 3) * 2^130 * sum(P_odd) + 2 * 2^130 * sum(P_even)`.
* **Bucket segmentation.** The buckets are aggregated as `M = 64`
  independent segments. This keeps the 128-deep adder pipeline full during
  aggregation.
* **Collision-free accumulation.** An addition into a bucket may not start
  while an earlier addition into the same bucket is still in the pipeline. A
  collision detector with two input FIFOs picks, each cycle, a pair whose
  bucket is free.

## Data flow (`rtl/msm_accel.sv`, `rtl/msm_top.sv`)

```
off-chip memory -> mem_if (128-beat read bursts, iteration sequencing)
stream (4096 b) -> packet_conv -+-> point_fifo (7 FIFOs) -----+
                                +-> scalar_prep (GLV, digits) -+-> point_select
   -> queue_select (14 lane queues, almost-full first)
   -> collision_det (2 FIFOs, in-flight bucket check)
   -> point_prep (endomorphism, negation, Z = 1) + bucket read
   -> ec_add (128-cycle complete projective adder) -> bucket write
after the last record: bucket_agg (segmented aggregation) -> result point
   -> mem_if writes it back, then starts the next iteration
```

| file | block |
|---|---|
| `msm_accel.sv` | top level: `mem_if` plus one compute unit |
| `mem_if.sv` | memory interface: read bursts, result write-back, iteration sequencing |
| `msm_top.sv` | the compute unit (everything below) |
| `msm_pkg.sv` | constants (q, lambda, alpha, Barrett constants), point types, field add/sub |
| `fq_mul.sv` | 381-bit modular multiplier, Barrett reduction, 4 cycles |
| `ec_add.sv` | complete projective addition for `a = 0`, 12 multipliers, padded to 128 cycles |
| `packet_conv.sv` | gearbox from 4096-bit beats to records |
| `point_fifo.sv` | 7 FIFOs holding the points while the scalar is prepared |
| `scalar_prep.sv` | GLV split, offset bits, signed-digit recoding |
| `point_select.sv` | keeps the pairs of the current pass, computes bucket addresses |
| `queue_select.sv` | 14 lane queues; moves at most one pair into each of 2 FIFOs per cycle |
| `collision_det.sv` | 2 FIFOs, issues one pair per cycle whose bucket is not in flight |
| `point_prep.sv` | multiplies `x` by `alpha` and/or negates `y`, lifts the point to projective |
| `buckets.sv` | `2^16` projective buckets, one read and one write port |
| `bucket_agg.sv` | segmented aggregation and the per-pass offset |
| `sync_fifo.sv` | helper FIFO |

### Top-level interface and timing (`msm_accel`)

* The host writes the records (format below) to memory from byte address
  `rec_addr`. It then pulses `start` with `n_points`, `rec_addr` and
  `res_addr` valid. `busy` stays high until `done` pulses.
* The memory side is AXI4-like: read address/data channels (`ar*`, `r*`) and
  write address/data/response channels (`aw*`, `w*`, `b*`), all with
  valid/ready. Data is 4096 bits. Read bursts are 128 beats, and the last
  burst of a pass may be shorter. A 4096-bit beat is wider than AXI4 allows,
  so there are no size or burst-type fields. A 128-beat burst also crosses
  4 KB boundaries.
* After reset the compute unit spends `2^16` cycles writing the point at
  infinity into every bucket.
* For each pass `i = 0..3`, `mem_if`:
  * starts the compute unit;
  * streams all records to it;
  * waits for the pass result;
  * writes the result (`X`, `Y`, `Z` packed as `{X, Y, Z}` in the low 1143
    bits of one beat) to `res_addr + 512*i`.
* Aggregation clears the buckets as it reads them, so the next pass can start
  at once.
* The compute unit (`msm_top`) can also be used on its own. It takes a
  valid/ready record stream and returns one result per pass.

At full size, accumulation issues one addition per cycle. A pass over `N`
points therefore takes about `3.5 N` cycles plus about 142,000 cycles of
aggregation. For `N = 2^24` the four passes take about `2.35e8` cycles, which
is 0.90 s at 260 MHz. The paper reports 914 ms on one compute unit.

### Record format (the host's job)

One record per point, packed from bit 0 and placed back to back in the stream
(a record may straddle beats):

* point `w` (`w = 0..6`, the multiple `2^(19w) P`):
  * `x` at bits `[768w +: 381]`;
  * `y` at bits `[768w + 384 +: 381]`;
* scalar at bits `[5376 +: 255]`.

Coordinates are affine, not Montgomery form. A record is 5632 bits. The tail
of the last beat is padding. The memory interface reads the same records once
per pass. The host adds the four results (projective `X:Y:Z`) and subtracts
the offset point given above.

## Where this design departs from the paper

* **Modular reduction.** The paper uses a table-based (memory) reduction that
  needs no DSP blocks. Here `fq_mul` uses Barrett reduction, with the same
  result and a different cost.
* **Adder depth.** The paper's adder is 128 pipeline stages. This adder's
  logic is 13 stages deep, and a delay line pads it to 128. The collision
  window and the aggregation schedule therefore see the paper's latency, but
  the timing of a real 128-stage layout is not modelled.
* **Lane queues.** The paper assigns "the seven point-subscalar pairs" to
  their queues. Each point carries two subscalars (`k1` and `k2` digits), so
  this design has 14 lane queues, one per subscalar.
* **Chosen details.** The paper does not give these, so they are this
  design's own choices:
  * the record layout;
  * the queue depths (lanes 8, scheduler FIFOs 4, point FIFOs 8);
  * the almost-full threshold (depth - 2);
  * the fuller-FIFO-first order in the collision detector;
  * the Barrett form of the GLV split;
  * the order of the final combining additions in the aggregation.
* **Memory interface.** The paper states only what the memory interface
  does. `mem_if` is the simplest controller that does it. Its address map
  and its handshake with the host are this design's choices.
* **Not built.**
  * The DRAM itself. The testbenches model it.
  * The host software: precomputation, offset correction and the sum of the
    passes. The top-level testbenches play these parts.
* **One unit.** Only one compute unit is described here. The paper's
  four-unit configuration is four copies of this unit, each given a different
  `iter`, with the host adding the results.
* **Memory mapping.** The bucket memory is one array of `2^16 x 1143` bits
  (about 9.4 MB). It is not split into URAM/BRAM banks.

## Testbenches (`tb/`)

Every block has a self-checking testbench, `tb_<block>.sv`. Each one:

* compares against a reference model written in SystemVerilog. Field and
  curve arithmetic is in `tb_ec_pkg.sv`, computed with plain `%`.
* checks cycle counts where a latency or rate is fixed;
* has a watchdog;
* ends with a `TB_RESULT checks=.. failures=..` line.

The top-level testbenches (`tb_msm_top`, and `tb_msm_accel` and
`tb_msm_accel_full`, which share `msm_accel_tb_body.svh`) play the host. They:

* make random points and scalars;
* build the records;
* run all four passes;
* remove the offset;
* compare with `sum k_i P_i`.

* `tb_msm_top` uses a small instance: 64 buckets, 9-bit windows (15 per half scalar), a 16-cycle
  adder and 8 segments. With so few buckets every mechanism occurs, and the
  testbench counts and requires each one:
  * collision stalls;
  * picks from the second FIFO;
  * almost-full priority;
  * forwarding in the aggregation;
  * negative digits;
  * endomorphism pairs;
  * dropped out-of-pass pairs.
* `tb_mem_if` runs the memory interface against a memory model that stalls
  every channel at random, with a stand-in compute unit. It checks:
  * burst lengths and addresses;
  * the stream data;
  * the iteration order;
  * the result writes;
  * the full-rate cycle budget.
* `tb_msm_accel` runs the whole accelerator, memory interface included, at
  the same small size, with 4-beat bursts. It counts and requires the same
  mechanisms and checks the MSM result.
* `tb_msm_accel_full` runs the whole accelerator at its default, full size on
  256 points. It uses a memory model with random latency. It checks:
  * the MSM result;
  * the bursts and the result writes;
  * that each pass accumulates at one addition per cycle, plus stream and
    pipeline fill.

  It takes about three minutes with Verilator.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
  rtl/msm_pkg.sv tb/tb_ec_pkg.sv tb/tb_msm_top.sv --top-module tb_msm_top
./obj_dir/Vtb_msm_top
```
