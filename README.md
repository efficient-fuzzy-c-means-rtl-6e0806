# FCM-S: a pipelined fuzzy c-means image segmentation accelerator

Fuzzy c-means (FCM) assigns every pixel of an image a degree of membership
in each of c clusters. It then moves each cluster centre (centroid) to the
membership-weighted mean of the pixels, and repeats until the cost function J
stops falling. The spatially constrained variant FCM-S adds a penalty term
that pulls a pixel towards the cluster of its neighbours. This makes the
segmentation much more robust to pixel noise. The penalty term uses the mean
x̄ of the pixel's neighbours and a weight α.

A software FCM stores a c × t membership matrix (t pixels) and makes several
sweeps over it per iteration. This design needs neither. The memberships are
recomputed on the fly in a pipeline that accepts one pixel per clock. The
centroids and J are accumulated incrementally, so one streaming pass over the
image performs one complete FCM-S iteration. The only image-sized storage is
a two-line delay buffer, which forms the neighbourhood mean. The degree of
fuzziness m is not restricted to m = 2. It is any ratio m = a/b fixed at
elaboration. The fractional powers that a general m requires are built from
small tables and multipliers, so the pipeline stays fully pipelined.

The accelerator is a memory-mapped slave for a soft-processor system. A DMA
engine writes the pixels to it, and the processor reads J after each pass.
The processor repeats the passes until J converges and then reads the
centroids.

## The algorithm as the hardware computes it

For a pixel x_k with neighbourhood mean x̄_k and centroids v_1..v_c, the
generalised squared distance is

    D_ik = (x_k − v_i)² + α (x̄_k − v_i)²

and the weighted membership is u_ik^m with

    u_ik = 1 / Σ_j (D_ik / D_jk)^(1/(m−1)).

Write m = a/b and set n = a − b and r = b, so that 1/(m−1) = r/n. The
expression can then be regrouped into two steps that each need only integer
powers and n-th/r-th roots:

    P_k    = Σ_j D_jk^(−r/n)                      (one number per pixel)
    u_ik^m = ( D_ik^(1/n) · P_k^(1/r) )^(−(n+r))

The centroid and cost updates then become running sums over the pass:

    v_i ← Σ_k u_ik^m (x_k + α x̄_k) / ( (1 + α) Σ_k u_ik^m )
    J   = Σ_k Σ_i u_ik^m D_ik

α = 0 turns the penalty off and the same hardware computes the original FCM.

The default build is m = 1.5 = 3/2, so n = 1 and r = 2. The n-th root is
then a plain wire and u^m = (D · √P)^(−3). Other values of m are reached by
the parameters `M_A` and `M_B` (m = M_A/M_B). For example, m = 2 = 2/1 gives
n = r = 1, and the design then needs no roots or powers at all.

## Block structure

```
 DATA writes ──► mean_unit ──(x, x̄)──► fuzzy_clustering_unit
                 (3×3 mean)            ├─ precomp_unit      4c stages → P_k
                                       ├─ membership_unit   5 stages  → u_ik^m, D_ik
                                       ├─ centroid_module×c (accumulate, divide) → v_i
                                       └─ cost_unit         (accumulate) → J
```

| module | role |
|---|---|
| `fcms_top` | bus slave, register map, stalls, pass bookkeeping |
| `mean_unit` | raster stream → (x_k, x̄_k) with the mean of the 8 neighbours |
| `fuzzy_clustering_unit` | holds the centroids, runs one FCM-S iteration per pass |
| `precomp_unit` / `precomp_stage` | P_k, as a cascade of c four-stage sections |
| `membership_unit` / `membership_module` | u_ik^m for all i in parallel, five stages |
| `centroid_module` | two accumulators and a divider per cluster |
| `cost_unit` | c multipliers and one accumulator for J |
| `nth_root` | Y^(1/n) from two tables and two multipliers |
| `fp_inverse` | 1/Y from one table and one multiplier |
| `fp_power` | Y^p by a multiplier chain |
| `sq_dist_unit` | D from x, x̄, v, α, exact in fixed point |
| `fp_divider` | centroid quotient via the inverse unit |
| `fcm_pkg` | number formats, float multiply/add/conversion functions |

## Number representation

The quantities in the membership path span a huge range. D goes up to
(1 + α)·255², about 2^17. A single term D^(−r/n) of P_k can reach 2^40, and
a membership power can fall far below 2^−40. A fixed-point datapath would
need very wide words, so these values are carried in a small unsigned
floating-point format (`fcm_pkg::fp_t`):

    value = 1.f × 2^e,   f: 15 bits (2q = 16-bit mantissa, q = 8),
                         e: 8-bit signed, plus a separate zero flag.

The operations truncate. An exponent overflow saturates and an underflow
flushes to zero. Everything outside the membership path is fixed point:

- pixels: 8 bits;
- neighbourhood mean x̄: 8.3;
- centroids: 8.8;
- α: unsigned Q4.4, so 16 means α = 1.0;
- distance D: 20 fraction bits, computed exactly before conversion;
- centroid accumulators: 64 bits with 24 fraction bits;
- J: 64 bits with 16 fraction bits.

A distance of exactly zero is clamped to 2^−20, so that its negative powers
stay finite.

The mantissa width 2q = 16 is the one free parameter of the root and inverse
circuits. It sets their table sizes and their accuracy (see below).

## The n-th root and inverse circuits

These two are the heart of the design. They make the general m possible
without iterative (and hence unpipelinable) root or division algorithms.

**n-th root.** The 2q-bit mantissa Y = 1.y₁…y₂q₋₁ is split into a high part
Y_h (the leading one and the next q − 1 bits) and a low part Y_l (the
remaining q bits). Then Y = Y_h + Y_l with Y_l < 2^−(q−1). A first-order
Taylor expansion around Y_h gives

    Y^(1/n) ≈ Y_h^(1/n) (1 + Y_l/(n Y_h))
            = Y · (Y_h − (n−1)/n · Y_l) / Y_h^((2n−1)/n).

The last form can be checked by multiplying it out. Its relative error is
second order, about (n−1)(2n−1)/(2n²)·(Y_l/Y_h)². With q = 8, Y_l/Y_h is
below 2^−7, so the error is below 2.3·10^−5 for n = 2 and below 6·10^−5 for
any n.
The circuit therefore needs:

- table TL, indexed by Y_l (2^q entries), holding (n−1)/n · Y_l;
- one subtractor forming Y_h − TL[Y_l] (Y_h is just the upper bits of Y);
- multiplier 1, Y × (Y_h − TL);
- table TH, indexed by Y_h, holding 1 / Y_h^((2n−1)/n);
- multiplier 2, the product × TH.

The exponent needs its own treatment, which is easy to get wrong. Write
e = n·e′ + ρ with 0 ≤ ρ < n. The result exponent is e′, and the leftover
factor 2^(ρ/n) must multiply the mantissa. Instead of a third multiplier,
this design folds 2^(ρ/n) into TH. TH then has n · 2^(q−1) entries, indexed
by {ρ, Y_h}. After the two multiplications the product lies in roughly
[1, 2^(1 + 1/n)), and the renormalisation step picks one of three shifts.
For n = 1 the module is a wire. Both tables are computed during elaboration
from the formulas above by constant functions using `real` arithmetic, so a
change of q or n needs no regenerated data files. The entries have 18
fraction bits (FW + 3).

**Inverse.** With the same split, 1/Y ≈ (Y_h − Y_l) / Y_h². This takes one
table of 1/Y_h² (2^(q−1) entries), one subtractor and one multiplier, and the
exponent is negated. The product normally lies in (0.5, 1]. For mantissas
close to 2, the first-order series falls just short of 0.5, so the
renormaliser handles a third case.

**Power.** Y^p, for the r-th and (n+r)-th exponent units, is a chain of p − 1
float multipliers. p is a small constant (2 and 3 at the default m).

**Measured accuracy** (from the unit testbenches, against double precision):

- n-th root, n = 2 and 3 over random mantissas and exponents: worst relative
  error about 5·10^−5;
- inverse: within the series error (Y_l/Y_h)² < 6·10^−5 plus truncation,
  including the mantissas near 2;
- whole pass at 320 × 320: J within about 0.01 % of a double-precision pass,
  and centroids within 0.1 gray level of it.

## Pipelines and timing

All pipelines advance every clock. There is no stall inside the fuzzy
clustering unit, and each data point carries valid/first/last flags.

**Pre-computation unit (4c stages).** Each cluster j has a four-stage
section (`precomp_stage`):

1. D_jk (two squared-distance terms, the α multiplier, an adder);
2. D^(1/n);
3. D^(r/n);
4. D^(−r/n), added to the partial sum that arrived with the pixel.

c sections are cascaded, so the partial sum of clusters 1..j−1 travels with
the pixel. P_k leaves the 4c-th stage together with the pixel's x and x̄.

**Membership unit (5 stages, c modules in parallel).**

1. D_ik (recomputed from x, x̄ and v_i, which is cheaper than carrying c
   distances down the 4c pre-computation stages);
2. the n-th root of D and the r-th root of P in parallel;
3. their product;
4. the (n+r)-th power;
5. the inverse, giving u_ik^m.

D is delayed alongside the pipeline and leaves with u^m for the cost unit.

**Centroid and cost units.** Each centroid module multiplies u^m by
(x + α x̄) and accumulates this product and u^m. The first pixel of a pass
overwrites the accumulators instead of adding, so no clear cycle is needed.
The divider converts both sums to float, scales the denominator by (1 + α),
and multiplies the numerator by the reciprocal from the inverse unit. Its
result is registered, so v_i(t) appears two cycles after the last pixel
reaches the module. The cost unit adds Σ_i u^m·D to J in the cycle after the
pixel arrives.

**End of a pass.** The fuzzy clustering unit replaces its centroids with
v_i(t) in the cycle `pass_done` pulses, 4c + 7 cycles after the last pixel
entered. The centroids used by the pipelines never change in the middle of a
pass. A cluster that received no membership at all (denominator exactly zero)
keeps its old centroid.

**Mean computation unit.** Pixels arrive in raster order and shift into a
delay line of 2W + 3 entries, where W is the image width. When pixel p
arrives, its whole 3 × 3 neighbourhood centred on pixel p − (W + 1) is at
fixed positions in the line. At the image border, the row and column of each
missing neighbour are clamped, which replicates the edge pixels. Every pixel
then has exactly eight neighbours, and x̄ is the 11-bit sum read as 8.3 fixed
point, with no divider. After the last pixel the unit runs W + 1 flush beats
without input to emit the last row.

**Throughput.** A pass over a W × H image takes

    W·H + (W + 1) + 4c + 7 cycles.

At the defaults (320 × 320, c = 2) that is 102 736 cycles, 2.05 ms at 50 MHz.

## Bus interface and use

`fcms_top` is a slave with a 4-bit word address, 32-bit data, read and write
strobes and `waitrequest` (Avalon-MM style). Reads have no wait states.

| addr | name | access | content |
|---|---|---|---|
| 0 | DATA | W | pixel in bits 7:0 |
| 1 | STATUS | R/W | bit 0 pass done (write 1 to clear), bit 1 end of pass in progress |
| 2 | ALPHA | R/W | α, Q4.4; reset 16 (α = 1) |
| 3, 4 | J_LO, J_HI | R | J of the last finished pass, 64 bits, 16 fraction bits |
| 5 | PASSES | R | passes finished since reset |
| 8 + i | CENT_i | R/W | centroid i, 8.8 (writes ignored while a pass finishes) |

After reset the centroids are spread evenly over the gray range: for c = 2
they are 64 and 192. A typical driver loop:

1. Optionally write CENT_i and ALPHA.
2. Let the DMA write all W·H pixels to DATA.
3. Poll STATUS bit 0, read J, and clear the flag.
4. Repeat from step 2 until J changes by less than a chosen tolerance.
5. Read CENT_i. A pixel belongs to the cluster whose centroid gives the
   smallest D.

`waitrequest` holds a DATA write twice:

- while the mean unit flushes the last row;
- while the pipelines drain, until the pass has finished.

The next image can therefore be written straight after the previous one with
no software handshake. J is latched at the end of a pass, so it can be read
while the next image is already streaming.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `C` | 2 | number of clusters (2..8 with the register map) |
| `M_A`, `M_B` | 3, 2 | m = M_A / M_B; requires M_A > M_B |
| `IMG_W`, `IMG_H` | 320, 320 | image size |
| `fcm_pkg::Q` | 8 | mantissa width 2q of the float format |

Some reachable values of m:

| m | M_A, M_B | n, r |
|---|---|---|
| 1.75 | 7, 4 | 3, 4 |
| 2.0 | 2, 1 | 1, 1 |
| 2.25 | 9, 4 | 5, 4 |
| 2.5 | 5, 2 | 3, 2 |

The root tables grow with n: n·2^(q−1) + 2^q entries per root unit.

## Where this design departs from, or adds to, the architecture it implements

- **Number formats.** All widths, the float format, truncation rounding, the
  fixed-point formats and the zero-distance clamp are this design's choices.
- **Exponent handling of the root.** The residue 2^(ρ/n) is folded into the
  TH table. The table/subtractor/multiplier structure is as described for the
  root circuit.
- **Inverse and divider.** Only "tables, multipliers and adders" are
  specified. The first-order (Y_h − Y_l)/Y_h² form, and division by
  reciprocal-and-multiply, are this design's.
- **Neighbourhood.** x̄ is the mean of the 8 neighbours in a 3 × 3 window,
  with edge replication at the border.
- **Cost function.** The α term of J uses the neighbourhood mean x̄_n of
  the same pixel n as the first term.
- **Bus side.** The register map, one pixel per 32-bit write, the
  waitrequest stalls, the latched J, the pass counter and the centroid write
  port are this design's own. So are the initial centroids and the handling
  of an empty cluster.
- **Convergence.** The loop and its tolerance are left to software.
- **Data points are scalars (gray levels).** Colour pixels (3-vectors) would
  need vector squared-distance units and three accumulators per centroid.
  That is not built.
- **Speed.** At one pixel per clock, a pass over 320 × 320 pixels takes
  2.05 ms at 50 MHz. The reported hardware time of about 0.58 ms for a run at
  a 50 MHz system clock cannot be reached at that rate (it is fewer cycles
  than there are pixels). What that figure covers is not stated, so it is
  not matched here.
- **Resource figures** reported for an FPGA are not comparable with the
  generic cell counts of this RTL.
- **Not included.** The surrounding system is vendor IP and is not included:
  processor, DMA controller, interconnect, SDRAM, flash/SRAM bridge, Ethernet.
  The testbenches play the processor and the DMA.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. The expected values come from
double-precision models in `tb_fcm_ref_pkg` and `tb_fp_pkg`, never from the
RTL's own arithmetic. The pipeline testbenches also check the latencies
stated above: 4 cycles per pre-computation section, 4c in total, 5 for the
membership unit, 2 for the centroid output, 1 for the cost and 4c + 7 for the
end of a pass.

- `tb_fcms_top` runs the top at its default parameters. It uses a 320 × 320
  synthetic image: a bright disc on a dark background, uniform noise b = 40.
  It runs passes until J changes by less than 0.1 %, and checks every pass
  against a double-precision FCM-S pass. It checks the segmentation error
  rate, a chained second image with no software wait, and then FCM passes
  with α = 0. It counts every stall kind and mode it exercises. It takes
  about 10 s of simulation.
- `tb_fcms_workloads` repeats the evaluation experiments on synthetic
  320 × 320 images. The original photographs are not available, so absolute
  error rates differ from any published ones. It runs noise amplitudes
  b = 10, 20, 40, 60 and 80 with c = 2, FCM against FCM-S. It runs c = 3
  (three gray levels 60 apart) with FCM-S. It runs m = 2.0 and 2.5 at every
  b, and m = 1.75 and 2.25 at b = 40. It checks that FCM-S is never worse than FCM and that the hardware
  matches double precision on every pass. It takes about 2 minutes. A
  typical result (segmentation error rate):

  | b | FCM, c = 2 | FCM-S, c = 2 | FCM-S, c = 3 | FCM-S, m = 2.0 | FCM-S, m = 2.5 |
  |---|---|---|---|---|---|
  | 10 | 0.0000 | 0.0000 | 0.0010 | 0.0000 | 0.0000 |
  | 40 | 0.0000 | 0.0000 | 0.0040 | 0.0000 | 0.0000 |
  | 60 | 0.0215 | 0.0002 | 0.1062 | 0.0001 | 0.0002 |
  | 80 | 0.1572 | 0.0011 | 0.2273 | 0.0010 | 0.0013 |

  For c = 3 at b ≥ 60 the noise exceeds half the gap between the levels, so
  those error rates are a property of the test image.

Each testbench was also run against a copy of its module with one
deliberate bug. Every one of them reported failures.

## Simulating

With Verilator 5, list the packages first and let it find the modules:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/fcm_pkg.sv tb/tb_fp_pkg.sv tb/tb_fcm_ref_pkg.sv \
    tb/tb_fcms_top.sv --top-module tb_fcms_top -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace `tb_fcms_top` with its name.
Add `--assert` to enable the bus-protocol and pipeline-alignment assertions.
Most unit testbenches override the parameters (`N`, `R`, `C`, image size)
to cover several configurations in one run.
