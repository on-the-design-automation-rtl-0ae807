# Memory-based FIR filter with a tunable speed/area trade-off

This is a parameterized FIR filter,

    y_k = sum_{i=0}^{N-1} a_i * x_{k-i}

that has no multipliers. The tap weights are fixed, so every product can come
from a table. The samples are cut into bits (distributed arithmetic):

    y_k = sum_b 2^b * (a^T x^b)

Here `x^b` is the vector of bit `b` of the last N samples. The inner product
`a^T x^b` is a ROM read, with those N bits as the address. Every bit position
uses the same table, so one ROM can serve all bit positions one after another,
or several copies can work in parallel. Three parameters trade area against
sample rate:

| parameter | meaning | default |
|-----------|---------|---------|
| `D` | slices working in parallel. Slice j handles bits j·M … j·M+M−1 of every sample, one bit per cycle, with M = Lx/D. A sample takes M cycles. | 2 |
| `K` | ROM partitions per slice. The N address lines are split over K ROMs of about N/K lines each, so there are K·2^(N/K) words instead of 2^N. The K words are added by K−2 carry-save adders. | 2 |
| `P` | pipeline cut-sets per slice. One cut is at the slice output. The other P−1 are retimed into the tapped delay line, so they add no latency. | 1 |
| `WPIPE` | pipeline stages of the weighted summation. The sizing rule is ceil(2·Lx·T_FA/Ts). | 1 |

The defaults are a worked example: a 15-tap filter with 8-bit samples, 8-bit
weights and an 18-bit output, aimed at a 60 ns sample period. Its chosen
configuration is D=2, K=2, P=1, so each slice has a 128-word ROM and a
256-word ROM. No tap weights were published for the example.
`mba_pkg::DEFAULT_COEF` is an illustrative symmetric low-pass set. Pass your
own weights through the `COEF` parameter.

## Datapath

```
x_in ─► serializer ─► slice D-1 ─┐
        (MSB invert,  slice ...  ├─► weighted summation ─► accumulator ─► output ─► carry-ripple ─► y
         D bit        slice 0   ─┘   (CSA series,          (2 CSAs,        switch     adder
         streams)                     <<M per slice)        x2 feedback,
                                                            preload)
```

* **Serializer** (`mba_digit_serializer`). It inverts the sample's MSB, which
  adds 2^(Lx−1) and makes the sample unsigned. It then sends D bits per cycle,
  one per slice, most significant first within each slice.
* **Slice** (`mba_slice`). It is built from three parts:
  * **Tapped delay line** (`mba_tap_line`). Bits of the same weight from
    successive samples arrive M cycles apart, so tap i is the input delayed
    by i·M cycles.
  * **K ROMs** (`mba_rom`). Word `w` of a ROM is the sum of the weights of the
    taps whose address bit is 1 in `w`. The table is computed from `COEF` at
    elaboration.
    * The partitions differ in size by at most one line. There are
      (K − N mod K) partitions of ⌊N/K⌋ lines, then (N mod K) of ⌈N/K⌉.
    * N=18, K=5 gives 3,3,4,4,4.
  * **Direct summation** (`mba_direct_sum`). It adds the K words with CSAs,
    starting at the oldest partition, and gives a sum vector and a carry
    vector.
* **Weighted summation** (`mba_weighted_sum`). It forms
  Σ_j 2^(j·M)·slice_j in Horner order. The running pair is shifted left by M
  (wiring only), then each slice's two vectors are added with two CSAs.
* **Accumulator** (`mba_accumulator`). Per cycle it computes A ← 2A + T in
  carry-save form with two CSAs. Its cycle time is two full-adder delays,
  whatever the wordlength.
* **Output switch and carry-ripple adder**. Once per sample the finished pair
  is copied into holding registers. A plain ripple adder (`mba_ripple_adder`)
  resolves it. The adder has M cycles to settle.
* **Controller** (`mba_controller`). It runs the sample slots, the preload,
  the capture and `y_valid`.

## The bit schedule, and why the pipeline cuts are free

This is the part that is hardest to see from the code.

Slice j sees bit `j·M + (M−1−t)` of the current sample in cycle t of the
sample slot. That is the most significant bit first.

* After the M cycles, the accumulator holds Σ_t T_t·2^(M−1−t).
* T_t is the weighted sum over the slices, and slice j carries weight
  2^(j·M).
* So the accumulator holds Σ_b 2^b·(a^T x^b), which is the filter output for
  the offset samples.

**Direct-summation cuts (contra-flow retiming).**

* The samples move along the tapped line from partition 0 towards partition
  K−1. The partial sums move the other way, towards the slice output at
  partition 0.
* Put a register between two partitions, and the older partitions' result
  arrives one cycle late. To compensate, those partitions read their taps one
  cycle early: across a cut, the delay between taps is M−1 cycles instead of
  M.
* Each tap delay therefore becomes `IN_DELAY + i·M − stage(partition(i))`,
  where `stage(k) = floor(k·P/K)` counts the cuts between partition k and the
  output.
* The cost of a cut is the register on the sum path, minus one bit of the
  delay line. No latency is added.
* One cut always sits at the slice output. That is why 1 ≤ P ≤ K.

**Weighted-summation stages.**

* The last of the WPIPE registers is at the output. The others are spread
  between slice joins, at `stage(j) = floor(j·WPIPE/D)`.
* A slice that joins behind fewer registers would be early. Instead of
  delaying its wide result, the design delays its 1-bit input by
  `WPIPE−1−stage(j)` cycles, through `IN_DELAY` of that slice's tapped line.
* Every contribution reaches the accumulator exactly WPIPE + 1 cycles after
  its bit left the serializer.

**Two's complement.**

* Inverting the MSB feeds the ROMs with x + 2^(Lx−1). That adds
  2^(Lx−1)·Σa_i to every output.
* On the first cycle of each sample, the accumulator's doubled feedback is
  replaced by the constant `PRELOAD = −2^(Lx−M)·Σa_i`. That constant is then
  doubled M−1 times, which removes the offset exactly.
* The preload also starts the new sample, so the accumulator needs no clear.
* All arithmetic is two's complement modulo 2^Ly.
* Setting `SIGNED_X = 0` gives the base form of the method instead. The
  samples are then unsigned, with no MSB inversion and no correction.

## Interface and timing

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst` | in | 1 | synchronous, active-high reset; all state clears |
| `x_in` | in | Lx | sample, two's complement (unsigned when `SIGNED_X = 0`) |
| `x_ready` | out | 1 | high one cycle in every M; `x_in` is taken at the end of that cycle |
| `y` | out | Ly | output, two's complement, modulo 2^Ly |
| `y_valid` | out | 1 | one-cycle pulse per output |

* **Fixed rate, no stall.** The filter takes one sample every M = Lx/D
  cycles, and the source must have it ready.
* **Latency.** y_k is flagged WPIPE + M + 3 cycles after x_k is taken. That
  is 8 cycles at the defaults. The count is:
  * 1 cycle in the serializer;
  * 1 cycle at the slice output cut;
  * WPIPE cycles in the weighted summation;
  * M cycles of accumulation;
  * 1 cycle in the output switch.
* **Output hold.** `y` holds its value for M cycles after each `y_valid`
  pulse.
* **Start-up.** After reset the delay lines hold zeros. Under the MSB-inverted
  coding, zeros read as the most negative sample. The outputs of the first
  N−1 samples are therefore not flagged.

Limits: D must divide Lx, 1 ≤ P ≤ K ≤ N, and 1 ≤ WPIPE ≤ D. Module
assertions catch violations at elaboration.

## Where this RTL goes beyond, or departs from, the published architecture

The published architecture fixes the structure: the slices, the partitioned
ROMs, CSA-only summation, contra-flow retiming, a two-CSA accumulator, MSB
inversion with an accumulator preload, and one ripple adder at the end. The
sizing and cost formulas are also published. The points below are this
design's own choices.

* **Cut placement.** Where the cuts and stage registers sit follows the
  floor(k·P/K) rule above. The slice-output cut, and the input-delay
  alignment of slices behind weighted-summation stages, are also this
  design's choices.
* **Count of P.** P counts register cuts per slice. The published cost
  formula agrees with that reading: it charges P·(2WL−1) delay elements per
  slice.
* **Slice wordlength.** The published cost model keeps every CSA at
  WL = min(Ly, La + log2 N) bits, which is 12 at the defaults.
  * This RTL keeps that width while K ≤ 2. In that case the two slice vectors
    are plain ROM words.
  * For K > 2 the vectors come out of CSAs. They are correct only as a pair,
    modulo 2^WL, so they cannot be sign-extended one at a time. The slices
    then run at the full Ly bits.
  * The weighted summation and the accumulator always run at Ly bits.
* **CSA count.** The weighted summation uses 2(D−1) CSAs. The published count
  is 2D.
* **Delay-line length.** Each tapped line has (N−1)·Lx/D stages, plus any
  alignment delay. One published cost formula counts Lx·(N−1) per slice. The
  block diagram shows Lx/D per tap, and the RTL follows the diagram.
* **Parts not specified elsewhere.** The published material does not specify
  the fixed-rate interface, the valid signalling, the start-up suppression,
  the reset, or the MSB-first bit order. The MSB-first order follows the
  ×2 accumulator feedback.
* **Output wordlength.** Outputs wrap modulo 2^Ly. There is no saturation and
  no rounding.
* **Not built.** The configuration-search tool, which picks (D, K, P) from
  technology figures, is software and is not part of this RTL. Timing against
  a real cell library is not checked, and neither are the cost or
  sample-period formulas.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with values computed independently, for example:

* the ROM against direct sums of the weights;
* the tapped line against the input history;
* the accumulator against an integer model.

The system tests are these:

* **`tb_mba_fir`** runs seven configurations side by side through
  `mba_fir_harness`. The configurations are the default, bit-serial
  D=1/K=1, fully parallel D=8/K=15/P=8/WPIPE=4, D=4/K=4/P=3/WPIPE=3, N=18 with
  K=5 and a wrapping 16-bit output, Lx=12/La=6/D=3, and unsigned samples
  with K=3/P=2/WPIPE=2.
  * Every valid output is checked against the direct-form sum.
  * Each output's cycle is checked against the latency above, and the
    outputs must be M cycles apart.
  * The test also counts accumulator preloads, output captures, and negative
    and positive inputs, and fails if any of these never happens.
* **`tb_mba_fir_full`** runs the default configuration with no parameter
  overrides for 400 samples, including −128 and 127.

All testbenches pass. Each block was also broken on purpose, for example by
dropping the MSB inversion, removing the preload, or not shortening the tap
delays at a cut. In every case its testbench reported failures.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mba_pkg.sv tb/tb_mba_fir_full.sv \
          --top-module tb_mba_fir_full -o sim && ./obj_dir/sim
```

Any testbench runs the same way; each prints
`TB_RESULT checks=<n> failures=<m>`. The test with seven configurations takes
about two minutes to build, mostly to compute the 32K-word ROM of the K=1
configuration. To change the filter, override `N`, `LX`, `LA`, `LY`, `D`,
`K`, `P`, `WPIPE`, `SIGNED_X` and `COEF` on `mba_fir`. `COEF` is a packed array of N
LA-bit words, and `COEF[i]` is a_i.

## Files

| file | contents |
|------|----------|
| `rtl/mba_pkg.sv` | default sizes, default weights, partition and pipeline-placement functions |
| `rtl/mba_fir.sv` | top level |
| `rtl/mba_controller.sv` | sample slots, preload, capture, valid |
| `rtl/mba_digit_serializer.sv` | MSB inversion and digit-serial feed |
| `rtl/mba_slice.sv`, `mba_tap_line.sv`, `mba_rom.sv`, `mba_direct_sum.sv` | one slice |
| `rtl/mba_weighted_sum.sv` | weighted CSA series |
| `rtl/mba_accumulator.sv` | carry-save accumulator and output switch |
| `rtl/mba_csa.sv`, `rtl/mba_ripple_adder.sv` | adder cells |
| `tb/` | testbenches; `mba_fir_harness.sv` is the reusable checker |
