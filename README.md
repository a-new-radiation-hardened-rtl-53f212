# Radiation-hardened holographic memory address calculation

An optically reconfigurable gate array stores its configuration contexts in a
holographic memory and reads them out with a laser array. The laser control
needs, for every pixel (α, β) of the hologram plane, the intensity

    H(α, β) = Σ_i cos( π/(λL) · ((α − x_i)² + (β − y_i)²) )

summed over the bright bits (x_i, y_i) of a context on the observation
(photodiode) plane, λ being the laser wavelength and L the gap between the two
planes. That arithmetic runs on an FPGA, and these systems are meant to work
where radiation flips FPGA bits: nuclear-disaster robots and satellites. This
RTL computes H and checks itself while doing so. When a check fails it raises a
reconfiguration request at once, with no wait for a configuration scrub.

The design rests on two ideas. Both follow the architecture published as *A new
radiation-hardened architecture for holographic memory address calculation*:

1. **Measure the distance with CORDIC, not with multipliers.** A CORDIC in
   vectoring mode returns the length of the vector (α − x, β − y). Two such
   CORDICs fed with the same operands must agree bit for bit. That makes them a
   duplicated (DMR) pair at no extra cost: the two wide squaring multipliers
   they replace could not be compared, because their results differ.
2. **Use a full-range sine/cosine CORDIC and check cos² + sin² = 1.** A CORDIC
   that accepts angles over the whole −π..π range needs no quadrant-folding
   logic around it. So the identity check covers the whole cosine function, and
   costs far less than duplicating it.

The defaults match the published configuration: B_N = 8 calculation units in
parallel, 40-bit datapath, λ = 532 nm, L = 10 mm. With 8 bright bits per
context, one H leaves per clock.

## Block structure

```
hma_top
├── coord_gen            hologram pixel scan (raster, centred coordinates)
├── address_sequencer    Address, Address+B_N, ...; "next coordinate"
├── bright_bit_table     bright-bit coordinates, B_N read ports (Address + k)
├── calc_unit_prot  ×B_N one protected term cos(...)
│   ├── distance_unit_prot
│   │   ├── 2 × [subtract → cordic_vectoring → const_scaler → squarer]
│   │   └── 2 × dmr_comparator         (DMR1 on scaled distances, DMR2 on squares)
│   └── cosine_unit_prot
│       ├── cordic_rotation            (x0 = K, y0 = 0, z0 = argument)
│       └── trig_identity_checker      (DMR3: cos² + sin² within 1 ± γ)
├── accumulator_tree     B_N−1 adder tree + accumulating final adder
├── delay_line  ×2       side information matched to the pipeline depth
└── sincos_generator_prot  stand-alone protected sine/cosine generator
    ├── phase_accumulator  z ← z + P every clock
    └── cosine_unit_prot   (same unit as above)
```

`hma_pkg` holds the shared sizes, the physical constants, the types
(`coord_t`, `bright_bit_t`, `unit_err_t`) and the constant functions: CORDIC
angle table, CORDIC gain, fixed-point conversion and pipeline latencies.

## Number formats: where the π and the "mod 2π" go

This is the least obvious part of the design. The words are two's complement,
40 bits (`DATA_W`).

| quantity | format | notes |
|---|---|---|
| pixel coordinates | 16-bit signed integers (`COORD_W`) | both planes use the same pixel pitch |
| coordinate difference into the vectoring CORDIC | 17-bit integer, 21 fraction bits (`VFRAC`), 2 bits of headroom | the CORDIC gain K ≈ 1.6468 times √2 stays below 4 |
| scaled distance d_s | 21 fraction bits | d_s = d · √(p²/(λL)), p = pixel pitch |
| argument (angle) | 40-bit binary angle in units of π | the word spans [−π, π) |
| cos, sin | 38 fraction bits (`TFRAC`) | range [−2, 2) |
| H | 46 bits (`ACC_W`), 38 fraction bits | exact sum of up to 64 terms |

- **The π.** The argument is carried in units of π, as a binary angle: the
  word's sign bit has weight π. The argument therefore becomes
  d_s² = d² · p²/(λL), and `const_scaler` multiplies by √(p²/(λL)), not by
  √(π/(λL)).
- **The CORDIC gain.** The vectoring CORDIC returns K·|v|. Its 1/K is folded
  into the same constant, so the constant is √(p²/(λL)) / K ≈ 0.08326.
- **Modulo 2π.** The argument grows with the square of the distance and spans
  many turns. `squarer` keeps only the bits of d_s² from weight 1 (π) down.
  Dropping the bits of weight 2 (2π) and above reduces the argument modulo 2π
  at no cost, and the result is always a valid angle for the rotation CORDIC.
- **Precision limit.** The phase is accurate to about 2·d_s·δ, where δ is the
  error of the scaled distance. The distance path keeps d_s within about
  4·10⁻⁶ (2·10⁻⁶ measured). The cosine error therefore grows linearly with the
  pixel distance. The testbenches bound each term by 2π·d_s·4·10⁻⁶. With the
  default 10 µm pitch, the worst error of H over a 256 × 256 frame with 8
  bright bits was 4·10⁻⁴.

## Distance unit: a natural duplicated pair (DMR1, DMR2)

Each of the two replicas subtracts the coordinates, runs a 38-stage vectoring
CORDIC and scales the magnitude. The CORDIC's first stage turns vectors with
negative x by π, so the whole plane is covered. The replicas' subtractors are
separate, so the comparison covers them too.

- **DMR1** compares the two scaled distances.
- The squaring multiplier stands in for the product of the two replicas'
  outputs. Fault-free, those outputs are equal, so the multiplier reduces to a
  squarer. Each replica squares its own value. If the replicas disagreed, DMR1
  has already fired.
- **DMR2** compares the two squares. Replica 1's square feeds the cosine unit.

Both flags are registered and gated by valid. DMR1 fires two cycles before the
argument leaves the unit; DMR2 fires with it.

## Cosine unit: full range and the identity check (DMR3)

`cordic_rotation` starts from (K, 0), K = 1/gain ≈ 0.60725, and rotates by the
argument, giving cos in x and sin in y. Its first stage rotates by π whenever
|z| ≥ π/2: it negates x and y and flips the angle's sign bit. The 38
micro-rotations then see a residual within ±π/2.

`trig_identity_checker` squares both outputs into registers, adds them and
raises **DMR3** if the sum leaves 1 ± γ. The tolerance γ covers the CORDIC's
own rounding. Simulation of the default CORDIC over sweeps and random angles
shows |cos² + sin² − 1| of up to 23·2⁻³⁸, so γ = 256·2⁻³⁸ (2⁻³⁰,
`GAMMA_LSB`). A wider γ tolerates more rounding noise; a narrower one detects
smaller upsets.

The cosine is delayed two cycles so that it leaves the unit together with its
DMR3 flag.

### The stand-alone generator

The same checked cosine unit also exists on its own as a sine/cosine
generator, `sincos_generator_prot`. Its angle comes from a phase accumulator,
not from a distance unit: each clock an adder and a register add the step P.
The register, read in units of π, is the angle, so the ×π in front of the
CORDIC costs nothing. The n-th enabled cycle yields cos(nPπ) and sin(nPπ),
checked by the same identity. This is the arrangement in which the cosine
unit is characterised for fault detection.

In `hma_top` the generator sits beside the address calculation, with its own
`gen_*` ports. Its flag also drives `reconfig_req`. It shares no logic with
the calculation units.

## Sequencing, accumulation and frame timing

- `coord_gen` scans HOLO_W × HOLO_H pixels in raster order, alpha fastest, with
  coordinates centred on the optical axis (column − HOLO_W/2, row − HOLO_H/2).
- `address_sequencer` holds Address. Each cycle it issues one pass: unit k
  takes table entry Address + k. Address then advances by B_N. The pass that
  reaches `num_bright` is the last one: Address returns to 0 and the next pixel
  is requested. `lane_en` masks the units whose entry lies past `num_bright`.
- `accumulator_tree` adds the enabled lanes in a pipelined tree (7 adders for 8
  lanes), then a feedback adder accumulates the passes of one pixel. The first
  pass loads the adder and the last releases H.

Throughput is ⌈num_bright / B_N⌉ cycles per pixel, so one pixel per cycle in
the 8-bright-bit configuration. There is no back-pressure. Latencies at the
defaults (ITER = 38):

| path | cycles |
|---|---|
| distance unit | ITER + 4 = 42 |
| cosine unit | ITER + 3 = 41 |
| calculation unit | 2·ITER + 7 = 83 |
| adder tree + accumulator | log2(B_N) + 1 = 4 |
| `start` to first H | 83 + 4 + ⌈num_bright/B_N⌉ + 1 |

## `hma_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| bb_we, bb_waddr, bb_wdata | in | 1, AW, 32 | load one bright bit {x, y} into the table |
| num_bright | in | AW | bright bits in the context (1..MAX_BRIGHT); hold it stable during a frame |
| start | in | 1 | begin a frame (ignored while busy) |
| busy | out | 1 | high until the frame's last H has left |
| h_valid, h_value | out | 1, ACC_W | H of one pixel, 38 fraction bits |
| h_alpha, h_beta | out | 16 each | pixel of h_value |
| frame_done | out | 1 | with the last H of the frame |
| unit_err[B_N] | out | 3 each | {dmr1, dmr2, dmr3} of each unit, one-cycle pulses |
| reconfig_req | out | 1 | registered OR of all flags, generator included: reconfigure the FPGA |
| gen_en, gen_step | in | 1, W | run the stand-alone generator; phase step P (binary angle) |
| gen_valid, gen_cos, gen_sin | out | 1, W, W | generator outputs, 38 fraction bits, 1 + 41 cycles after gen_en |
| gen_err | out | 1 | generator identity check failed |

Parameters: HOLO_W = HOLO_H = 256, MAX_BRIGHT = 64, ITER = 38,
GAMMA_LSB = 256, B_N = 8, W = 40. AW and ACC_W are derived.

To use it: write the table, set `num_bright`, pulse `start`, and collect H
values until `frame_done`. Act on `reconfig_req` by reconfiguring the device;
the design itself does not latch or clear it.

## What follows the published architecture and what is this design's own

These parts follow the published architecture: the two vectoring CORDICs with
constant scaling, the simplified multipliers and the DMR1/DMR2 comparators; the
full-range rotation CORDIC with the squared-sum window check; B_N parallel
units feeding an adder tree and an accumulating adder that steps Address by
B_N; the 40-bit precision, B_N = 8, λ and L.

The following are this design's own choices:

- **Not specified in the source:** pixel pitch (10 µm), coordinate width
  (16 bits), hologram size (256 × 256), CORDIC iteration count (38), γ (from
  simulation, as prescribed), the binary-angle encoding, folding the CORDIC
  gain into the constant, and the reset scheme. Valid and control state reset
  asynchronously; datapath registers are not reset.
- **Bright-bit storage and sequencing:** the table (64 entries, one write
  port), the first/last pass markers and the lane masks. The source only
  labels the unit inputs "Address + k" and shows the "next coordinate"
  feedback.
- **Accumulator width:** the source calls it a 40-bit accumulator. Here the
  38 fraction bits of the terms are kept and the sum is widened to 46 bits, so
  64 terms cannot overflow.
- **Stand-alone generator in the top:** the published architecture shows the
  protected sine/cosine generator and the full address calculation
  separately. Here both sit in one top, and the generator's flag is merged into
  the reconfiguration request.
- **Outside the RTL:** the laser array, the holographic memory, the optically
  programmed gate array, the reconfiguration/scrubbing mechanism and the
  configuration-memory fault-injection equipment.

**Coverage limits.** The output delay registers of the cosine unit, the adder
tree, the accumulator, the table and the sequencing logic are not covered by
any check, matching the published scope, which protects the calculation units.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
ends by printing `TB_RESULT checks=N failures=M`. The references are computed
independently, in floating point (`$cos`, `$atan2`, `$sqrt`) or with exact
integer arithmetic.

| testbench | what it establishes |
|---|---|
| tb_cordic_vectoring / tb_cordic_rotation | magnitude, angle, cos/sin against floating point in all quadrants and at ±π, ±π/2; latency ITER+1 |
| tb_const_scaler, tb_squarer | constant product; exact d² mod 2 |
| tb_dmr_comparator, tb_trig_identity_checker | flag behaviour, window edges just inside and outside 1 ± γ |
| tb_distance_unit_prot | argument within the distance-dependent bound; forced faults: DMR1 and DMR2 on a CORDIC fault, DMR2 alone on a squarer fault |
| tb_cosine_unit_prot | phase-accumulator sweep plus random angles; measured identity deviation; forced-fault detection |
| tb_calc_unit_prot | end-to-end term accuracy, latency, no false alarm, distance and cosine faults detected |
| tb_phase_accumulator, tb_sincos_generator_prot | running phase sum and wrap through π; generator outputs for two steps against floating point, latency, a forced fault flagged |
| tb_coord_gen, tb_address_sequencer, tb_bright_bit_table, tb_accumulator_tree | scan order and centring, pass stepping and masks for several context sizes, B_N-port reads, exact sums across passes |
| tb_hma_top | 6 × 4 frames: single-pass (8 bright bits) and 3-pass (21 bright bits) contexts, H accuracy, pixel order, throughput, latency; generator running throughout and checked; then faults forced into three units and the generator; counts and requires each mechanism (single pass, accumulation, masked lane, DMR1, DMR2, DMR3, generator alarm, reconfig_req, frame_done) |
| tb_hma_top_full | one full 256 × 256 frame at default parameters; every H checked; one pixel per cycle; generator checked in parallel; no false alarm |
| tb_fault_campaign | golden copy against faulty copy of a calculation unit, bit flips forced at 11 internal sites |

The fault campaign mirrors a configuration-memory injection setup: an input
stream, a golden model, a checker and a detection counter. Its faults are flips
of register-level words, not of FPGA configuration bits, so its ratios show
which parts the checks cover:

- every flip in either distance replica is flagged;
- CORDIC output flips are flagged except in bits below the γ window;
- the output register after the checker is the one path that escapes.

Simulate any testbench with plain Verilator, from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/hma_pkg.sv tb/tb_hma_top.sv --top-module tb_hma_top -o sim
./obj_dir/sim
```

At the defaults, the full-frame test (`tb_hma_top_full`) takes about 40 seconds
including the build.
