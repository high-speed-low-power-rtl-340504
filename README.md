# Low-power Viterbi decoder with a pre-computed T-algorithm threshold

This is RTL for a Viterbi decoder for the rate-3/4, constraint-length-7 (64-state)
convolutional code used in 4-D 8PSK trellis-coded modulation. It saves power
with the **T-algorithm**. After every trellis step, each state whose path metric
is more than `T` above the best metric is *purged*. A purged state's
add-compare-select work, metric register and survivor-memory row sit idle in
the next step.

The T-algorithm has a cost. The best metric, `PM_opt(n)`, is normally found by
searching all 64 new metrics inside the ACS feedback loop. In a straightforward
design that search lengthens the critical path to about twice that of a
full-trellis decoder. This design computes `PM_opt(n)` **two steps ahead**
instead, from the metrics of step n-2 and the branch-metric minima of steps n-1
and n, in a two-stage pipeline outside the loop. The loop then holds only what
the T-algorithm cannot avoid: an adder, the 8-input compare of the ACS, and one
2-input compare against the threshold.

## The code and the trellis

The encoder (`conv_enc34`) is systematic with feedback. It has three input bits
x3 x2 x1 per step and four output bits: z3 = x3, z2 = x2, z1 = x1, and z0 = the
last of six delay elements. Going along the chain, the inputs are added
(mod 2) after the delay elements as follows:

| after delay element | 1st | 2nd | 3rd | 4th    | 5th               | 6th |
|---------------------|-----|-----|-----|--------|-------------------|-----|
| adds                | x3  | x2  | x3  | x1, x2 | x1, feedback (z0) | -> z0, and fed back to the 1st |

State bit 5 is the left-most delay element and bit 0 the right-most one. States
are numbered 0..63 in that order. `tcm_pkg::next_state` and
`tcm_pkg::pred_state` describe the trellis. Every state has exactly one
predecessor for each of the 8 input words. All 8 branches into state j carry
z0 = j[5], so they all use even branch metrics or all use odd ones.

The branch metrics are indexed by the coded word, m = {z3,z2,z1,z0}. The
threshold logic uses four BM groups by m mod 4: BMG0 holds the four BMs with
m mod 4 = 0, BMG1 those with 2, BMG2 those with 1 and BMG3 those with 3.

## How the threshold is pre-computed (tgu)

The states fall into four clusters by their number mod 4. Cluster 0 is mod 0,
cluster 1 is mod 2, cluster 2 is mod 1 and cluster 3 is mod 3. Take all states
of one cluster. For a given target parity, their branches into states of that
parity all fall into one BM group, and that group is the same for every state
in the cluster. Take the branches into even states, for example. They leave
clusters 0, 1, 2, 3 through groups BMG0, BMG1, BMG3, BMG2. Branches into odd
states use BMG1, BMG0, BMG2, BMG3. This gives

    PM_opt(n) = min( min_c[ min cluster_c(n-2) + min BMG_even(c)(n-1) ] + min even BMs(n),
                     min_c[ min cluster_c(n-2) + min BMG_odd(c)(n-1)  ] + min odd BMs(n) )

The hardware is built as follows:

* **Stage 1** runs in the cycle of step n-1. Four `min16` units take the minimum
  of each cluster's live metrics. Each `min16` is two levels of 4-input
  comparators. Eight adders then add the BMG minima of step n-1, and the results
  are registered.
* **Stage 2** runs in the cycle of step n. Two 4-input minima are taken. Each is
  added to `T + min even/odd BMs(n)`, and a final 2-input minimum gives the
  threshold `PM_opt(n) + T`.

In total, this costs 12 additions and one extra comparison compared with
searching inside the loop. The pairing table is not taken on trust: `tgu_tb`
checks the unit against a brute-force search over every live state and input
word.

**A departure from the ideal.** The value from two steps back ignores which
states were purged at step n-1. So it is a lower bound on the true minimum of
the surviving metrics, and is normally equal to it. With a very small T it can
fall below *every* surviving metric, and a plain purge would then kill the whole
trellis. The purge unit detects this and keeps every reached state for that step
instead. It reports the event on `keep_all`. With T = 0 and heavy noise this
happens on roughly one step in five. At practical T values it is rare or absent.

## Survivor memory and the priority encoder (smu_re, prio_enc64)

The survivor memory uses register exchange with a survival length of 42. Each
state has a row of 42 three-bit words. On a step, a live state copies its
survivor predecessor's row, shifted by one word, and writes its decision in
front. The decision is the surviving input word, so it is also the decoded data.
Rows of purged states are not written. The write enable is where a synthesis
flow inserts clock gating.

With purging, no fixed state is guaranteed to be alive, so the decoder cannot
always read from, say, state 0. The output is taken from the lowest-numbered
live state instead. A 64-to-6 priority encoder finds that state, built from
three 4-to-2 encoders (`pe4to2`):

1. The ORs of the four 16-flag groups give index[5:4].
2. A mux picks that group's four nibble-ORs, reusing the ORs from level 1. They
   give index[3:2].
3. A mux picks the four flags of that nibble, which give index[1:0].

The 4-to-2 encoder is `O[0] = !I0 & (I1 | I3 & !I2)` and
`O[1] = !I0 & !I1 & (I2 | I3)`.

## Decoder datapath and timing (vd_top)

| unit         | role |
|--------------|------|
| `bmu`        | 16 branch metrics, BMG and even/odd minima; registered |
| `acsu`       | 64 ACS units, 8 candidates each, purged predecessors ignored |
| `tgu`        | threshold `PM_opt + T`, two pipeline stages |
| `purge_unit` | flags = reached and `PM <= threshold`, with the keep-all fallback |
| `pmu`        | 64 metric and flag registers |
| `smu_re`     | register-exchange survivor memory and output selection |

The decoder takes one trellis step per clock. Present four soft values on `r`
with `in_valid` high. `in_valid` may drop in any cycle, and everything then
holds. The step enters the ACS loop in the next cycle. Its decoded word
`{x3,x2,x1}` comes out on `dec_bits`/`dec_valid` 42 steps later. No output is
produced for the first 42 steps after reset, so the i-th valid output is the
decoded input of the i-th step. To flush the last 42 words, feed 42 more steps
(any data). `live_states` counts the enabled states after each step, and
`dec_state` is the state whose row was read.

Reset (synchronous, active low) enables every state with metric 0, so decoding
may start in any encoder state. The encoder is instantiated beside the decoder
with its own `enc_*` ports, and the two are not connected.

## Number formats

* **Soft inputs:** 7 bits each, one per coded bit, offset binary (0 = surest
  '0', 127 = surest '1').
* **Branch metric:** the sum of the four bit distances, 9 bits. This per-bit
  metric stands in for a true 4-D 8PSK transition-metric unit, which is not part
  of this RTL. For a real TCM receiver, replace `bmu` with a unit that delivers
  16 subset metrics and the same minima.
* **Path metrics:** 12 bits, never normalised. They wrap modulo 4096 and are
  compared by the sign of the difference (`tcm_pkg::pm_lt`). This works because
  live metrics never spread by 2048 or more. Any two states are linked by at
  most three steps, and a branch metric is at most 508.
* **T:** the 10-bit input `t_off`, in path-metric LSBs. One LSB is one step of
  one soft value. `t_off = 1023` keeps practically all states, which is
  full-trellis behaviour. The scale of T relative to a channel's noise is left
  to the user, since it depends on the metric in use.

## What the simulations show

`vd_tsweep_tb` decodes the same 1133-step noisy stream at several thresholds.
The noise is Gaussian with sigma = 24 on the 0..127 scale.

| T (LSBs) | live states per step | word errors / 1133 |
|---------:|---------------------:|-------------------:|
| 1023     | 64.0 (100 %)         | 2 |
| 384      | 48.3 (75 %)          | 2 |
| 256      | 22.9 (36 %)          | 2 |
| 160      | 7.4 (12 %)           | 2 |
| 96       | 2.8 (4 %)            | 2 |

Activity falls by more than an order of magnitude with no loss of decoding
quality, which is the effect the design aims at. The exact figures depend on
the random seed. No power, area or clock-speed figures are claimed for this
RTL.

## Files and tests

`rtl/` holds one unit per file. `tcm_pkg.sv` must be compiled first. `min4` is
the shared 4-input comparator.

Every unit has a self-checking testbench in `tb/<unit>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. `tb/vd_ref_pkg.sv` is
an independent, step-by-step software model of the whole decoder.

`vd_top_tb` runs the decoder at full size against that model, in three phases:

* T = 1023 with low noise, continuous input. It checks one step per cycle and
  error-free decoding.
* T = 40 with random stalls, 1133 steps.
* T = 0 with heavy noise, to exercise purging and the keep-all fallback.

It also drives the top's encoder in step with the model's trellis and checks
its output. It fails if stalls, purges, keep-all steps, path-metric wrap-around
or outputs from a non-zero state never occur.

Run a testbench with plain Verilator:

    verilator --binary --timing --assert -y rtl -y tb --top-module vd_top_tb \
        rtl/tcm_pkg.sv tb/vd_ref_pkg.sv tb/vd_top_tb.sv
    ./obj_dir/Vvd_top_tb

`-y` lets Verilator find each module by its file name. For a unit test, name
that unit's testbench instead (`tb/vd_ref_pkg.sv` is needed only by `vd_top_tb`
and `vd_tsweep_tb`).

## Where this RTL goes beyond or departs from the source design

* The branch-metric unit uses a per-bit soft distance, not the 4-D 8PSK
  transition metric.
* The keep-all safeguard in the purge unit is an addition.
* Path metrics wrap around instead of being normalised. The source does not
  specify normalisation.
* The stage-1 register of the threshold generator sits after the BM-group
  adders. The reference drawing places the pipeline cut just before them, which
  gives the same function.
* The 8-input ACS comparison is a tree of 2-input compares, and ties go to the
  lower input word.
* Clock gating of purged survivor rows and metric registers is expressed as
  write enables. No gating cells are instantiated.
* The full-trellis and in-loop-search T-algorithm decoders, against which the
  design is usually compared, are not included.
