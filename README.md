# Latency and throughput of linear recursive filters, both at once

A recursive filter or linear controller is usually limited by its feedback
loop. A new state can only be formed once the previous one is known, and an
output usually needs a long sum over that state. Pipelining raises the sample
rate but makes latency worse. Plain unfolding (taking several samples per
state update) relaxes the loop but makes latency worse too, because early
samples of a block wait for late ones.

This design shows that a linear time-invariant (LTI) system can have **both**
minimum latency and a short sample period if three algebraic transformations
of its state-space equations are combined:

1. **Minimum latency transformation.** Add redundant states `C S`, `C A S`, ...
   so that every output is *one* state (with coefficient 1) plus a few input
   products. An output then costs one multiplication and one addition after
   its sample, whatever the order of the system.
2. **Unfolding.** Update the state once per block of `I+1` samples, so the
   feedback loop has `I+1` sample periods to finish its (longer) sum.
3. **On-arrival processing.** Nothing waits for a block to fill. Each sample
   is multiplied by every coefficient that needs it the moment it arrives,
   and ready terms are added pairwise straight away. The previous state is
   allowed to arrive a few cycles (`T_j`, the *state arrival skew*) after the
   block's first sample.

The RTL realises the fifth-order elliptic low-pass wave digital filter in
seven ways. There are three points of this optimum technique and four cheaper
*direct-form* realisations that reach nearly the same timing with far fewer
coefficients. All seven stand side by side in `lt_filter_top`:

| index (`lt_filter_pkg`) | module                      | realisation                                        | T_S | T_L |
|-------------------------|-----------------------------|----------------------------------------------------|-----|-----|
| `F_FAST`                | `onarrival_lti_filter`      | unfolded 4 times + min. latency + on-arrival, T_j=2 | 1   | 3   |
| `F_ONARRIVAL`           | `onarrival_unfolded_filter` | unfolded once + min. latency + on-arrival, T_j=1   | 2   | 2   |
| `F_MINLAT`              | `min_latency_filter`        | minimum latency transformation only                | 4   | 2   |
| `F_MDF2`                | `mdf2_filter`               | modified direct form II (heuristic #1)             | 3   | 2   |
| `F_MDF2U`               | `mdf2_unfolded_filter`      | #1 unfolded once, on-arrival, T_j=0 (heuristic #2) | 2   | 2   |
| `F_TDF2`                | `tdf2_filter`               | transposed direct form II (heuristic #3)           | 3   | 2   |
| `F_TDF2U`               | `tdf2_unfolded_filter`      | #3 unfolded once, on-arrival, T_j=0 (heuristic #4) | 2   | 2   |

T_S is the sample period and T_L the latency, both in clock cycles. The filter
as originally drawn, with no transformation, needs T_L = 7 and T_S = 9.

## Timing model

One clock cycle is one adder delay. A multiplication by a constant takes
`m = 1` cycle, and its product is registered. Every module keeps to this
model: each register stage holds at most one adder level or one multiplier.
The cycle counts above are therefore the counts of the underlying algorithm,
not of a particular technology. Latency is counted from the cycle in which a
sample is presented (`x_valid` high) to the cycle in which its output is
presented (`y_valid` high).

With these rules a P-input system can never do better than
`T_L = m + ceil(log2(1+P))`. For one input that is 2 cycles, because the
output needs at least a product and an addition. The two optimum points built
here are `T_L = m+1` at `T_S = 2`, and `T_L = m+2` at `T_S = 1`.

## The example filter

The state-space form used throughout is

```
S[n] = A S[n-1] + B X[n]          (R = 5 states)
Y[n] = C S[n-1] + D X[n]
```

All coefficients are short dyadic fractions, for example `D = 101/1024`.
`wdf5_coef_pkg` holds `A`, `B`, `C`, `D` and the matrices derived from them.
`tb/wdf5_ref_pkg.sv` has a floating-point model of the same equations, written
separately. Every realisation is checked against that model.

The direct-form realisations need the transfer function
`H(z) = (b0 + b1 z^-1 + ... + b5 z^-5) / (1 - a1 z^-1 - ... - a5 z^-5)`.
Its coefficients (`WDF5_DF_A`, `WDF5_DF_B`) were computed exactly from
`A, B, C, D` as `H(z) = C (zI - A)^-1 B + D`, with the characteristic
polynomial taken by the Faddeev–LeVerrier recursion. The numerator comes out
symmetric, as an elliptic low-pass should.

## Number format (`lti_pkg`)

- Samples and states are 32-bit signed integers.
- Coefficients have 40 fraction bits (44 bits in all), which holds every
  coefficient of the example exactly.
- `cmul` multiplies and then floors the product back to 32 bits. This is the
  only rounding in the design.
- Additions are exact (modulo 2^32). The order in which a schedule adds its
  terms therefore never changes the result.

The word lengths are this design's own choice; the original method treats
arithmetic as exact. With inputs of about ±2^20, the largest deviation from
the floating-point model was:

| realisation                         | largest deviation |
|-------------------------------------|-------------------|
| minimum latency                     | 6 LSB             |
| on-arrival filters                  | 8–14 LSB          |
| transposed DF II (and unfolded)     | 12–13 LSB         |
| modified DF II (and unfolded)       | about 75 LSB      |

The modified direct form scales by `b_k/b0`, which is not an exact binary
fraction and is large for this filter. That form is known to be numerically
poor.

## Minimum latency transformation (`min_latency_filter`)

One redundant state `S~ = C S` is added:

```
S~[n] = (C A) S[n-1] + (C B) X[n]
Y[n]  = S~[n-1] + D X[n]
```

The output is ready `m + 1 = 2` cycles after its sample. The state update is
still a sum of `R + 1` products. Here it is a pipelined, balanced adder tree,
so a new sample can come every `m + ceil(log2(R+1)) = 4` cycles. This module
is the starting point for the two on-arrival filters.

## Unfolding with on-arrival processing

This is the core of the design, and the part that is least obvious from the
code.

### The transformed equations

Take samples in blocks `X[n] .. X[n+I]` and keep the state
`S~ = [S; C S; C A S; ...; C A^I S]`, which has `R + I + 1` entries. One
update per block gives:

```
S part of S~[n+I]   = A^(I+1) S + sum_k A^(I-k) B X[n+k]
row "C A^q S"       = C A^(q+I+1) S + sum_k C A^(q+I-k) B X[n+k]
Y[n+k]              = (C A^k S)[n-1] + sum_(j<k) C A^(k-1-j) B X[n+j] + D X[n+k]
```

Every output again takes exactly one state with coefficient 1. Its other
terms are products of samples of the same block that have *already arrived*.
No output waits for a later sample, so latency does not grow with `I`. The
state update, on the other hand, has `(I+1) T_S + T_j` cycles to finish.
Unfolding buys the state loop time, and the minimum latency rows keep the
outputs fast.

### Feasibility and latency

A block's state must be complete by `(I+1) T_S + T_j` cycles after the
block's first sample. If it is, the system is *feasible*: the next block finds
its state on time, in every block, forever. The latency of output `k` is set
by the last of its terms to arrive:

- its own sample, at `k T_S`, plus `m`;
- the state, at `T_j`.

After these, the adds that remain take `ceil(log2(...))` more cycles. A small
`T_j` gives low latency. A larger `T_j`, or a larger `I`, makes the state
update feasible at a short `T_S`.

For the example filter:

- **`T_S = 2, T_L = 2`** (`onarrival_unfolded_filter`): `I = 1`, `T_j = 1`,
  7 states.
- **`T_S = 1, T_L = 3`** (`onarrival_lti_filter` defaults): `T_j = 2` is the
  only skew that both reaches `T_L = 3` (latency `m + ceil(log2(2^(T_j-m) + 1))`)
  and allows `T_S = 1` (`T_j >= m + 1`). The smallest unfolding that is then
  feasible is `I = 4`, given by
  `I = ceil(log2((2^m R 2^T_j (2^T_S - 1) - 2^m P) / (2^T_j (2^T_S - 1) - 2^m P)) / T_S) - 1`.
  This gives blocks of five samples and 10 states.

### `onarrival_unfolded_filter` (I = 1, hand-scheduled)

The pair `X[n]`, `X[n+1]` updates 7 states. Its coefficient matrices are
fixed in `wdf5_coef_pkg` (`WDF5_U_A`, `WDF5_U_B0`, `WDF5_U_B1`). With `X[n]`
presented in cycle `t`, and `X[n+1]` in a later cycle `t1`:

| cycle  | what happens                                                      |
|--------|-------------------------------------------------------------------|
| `t`    | products of `X[n]`                                                |
| `t+1`  | the state products are formed; `Y[n]` is added                    |
| `t+2`  | the first adder level runs (6 terms become 3)                     |
| `t1`   | products of `X[n+1]`                                              |
| `t1+1` | `Y[n+1]` is added; the partial sums are reduced again             |
| `t1+2` | the new state is written                                          |

So the state arrives one cycle after the next pair's first sample (`T_j = 1`).
The second sample of a pair may be late; the pipeline waits for it. The fixed
three-level adder tree limits this module to `R <= 5`.

### `onarrival_lti_filter` (any R, P, Q, T_S, T_L)

The general version computes everything at elaboration from `A, B, C, D` and
the two timing targets, `TS` and `TL`. It takes `P` inputs and gives `Q`
outputs (both 1 by default). `x` and `y` are arrays; all inputs of one time
step arrive together, and all outputs of one time step leave together.
`B`, `C` and `D` are passed flat, row by row. With several outputs, each
`C A^q S` entry of the transformed state is one entry per output.

- **Choosing `TJ` and `I`** (`lt_design_pkg`). Unfolding is expensive: the
  coefficient count grows with `I`. So the largest skew that still meets `TL`
  is taken (`2^TJ <= 2^TL - 2^m P`), and then the smallest `I` that is
  feasible with it. A request that no skew can meet is rejected. So is a
  skew too small to be feasible at `TS`: it must be at least
  `m + 1 + ceil(log2(P / 2^(TS-1)))`.
  The defaults `TS = 1, TL = 3` give `TJ = 2, I = 4`, and `TS = 2, TL = 2`
  gives `TJ = 1, I = 1`. With two inputs the same latency needs one cycle
  more. `TS = 1, TL = 4` gives `TJ = 3, I = 4`, and `TS = 2, TL = 3` gives
  `TJ = 2, I = 1`.

- **Coefficients.** Constant functions build the powers `A^p`, the products
  `C A^p B` and the full coefficient tables. They use the same 40-bit fraction
  format, flooring each matrix product.
- **Schedule.** For every row (each state entry and each output) the
  functions list which terms become ready at which cycle offset after the
  block's first sample:
  - sample `k`'s product at `k T_S + 1`;
  - the state products at `T_j + 1`;
  - for an output, the unit state term at `T_j`.
- **Pools.** Each row keeps one small register set of partial sums per cycle
  offset, its *pool*. In every cycle the pool and the newly ready terms are
  added in pairs, and an odd term is carried. Once no more terms will come and
  at most two remain, their sum goes to the state register or to `y`.
- **Elaboration checks.** The pool sizes, the offset at which each row
  finishes, and hence each output's latency, are elaboration-time constants.
  Elaboration fails if the state misses `(I+1) T_S + T_j`, if two outputs
  would leave in the same cycle, or if the latency reached exceeds `TL`.

A block's samples must come exactly `T_S` cycles apart, because the schedule
is fixed relative to the first sample. Idle cycles are allowed between blocks.
An assertion checks the spacing. At the defaults, every one of the five
outputs appears 3 cycles after its sample. The same module with `I = 1`,
`T_S = 2`, `T_j = 1` gives the 2-cycle point; the testbench runs both.

## Direct-form realisations (heuristic techniques)

The optimum technique uses many coefficients: unfolding multiplies matrix
sizes. Four cheaper realisations start from a standard direct form, which has
about `2N` coefficients for an order-`N` filter. Each applies one or two of
the same ideas. All reach `T_L = m + 1`.

In this design, `a_k` enters with a plus sign: `y[n] = sum b_k x[n-k] + sum a_k y[n-k]`.

- **`tdf2_filter`** uses the transposed direct form II, written as a
  companion state space:
  - the new state is `s_k = a_k s_1 + s_(k+1) + (b_k + a_k b0) X`;
  - the output is `Y = s_1 + b0 X`.
  
  The output is one addition after `b0 X`. Each state is two products plus a
  unit term, which takes two adder levels, so `T_S = m + 2 = 3`.
- **`mdf2_filter`** uses the direct form II with its input scaled by `b0`.
  The delays of the middle branch are retimed into two chains: `L_k` on the
  feedback side and `R_k` on the feed-forward side.
  - The output is `Y = L_1 + R_1 + b0 X`, and `L_1 + R_1` is added while the
    multiplier works.
  - This gives `2N` states, `T_S = 3`, `T_L = 2`.
  - The feed-forward coefficients become `b_k / b0`. These are rounded to the
    coefficient format, which is the source of this form's larger error.
  - A strictly causal filter (`b0 = 0`) has nothing to scale by. Its delays
    are retimed directly, and the output is the head of the feed-forward
    chain, `Y = R_1`. The module picks this variant at elaboration from `b0`.
    The unfolded version does the same. `tb_mdf2_causal` checks both with the
    example filter delayed by one sample.
- **`tdf2_unfolded_filter`** and **`mdf2_unfolded_filter`** are the two forms
  above unfolded once, with on-arrival processing and `T_j = 0`, giving
  `T_S = T_L = 2`.
  - The second output of a pair is `Y[n+1] = a_1 s_1 + s_2 + B_1 X[n] + b0 X[n+1]`
    (transposed form), or the analogue with both chains (modified form).
  - The state update uses `A^2` and `A B`. Thanks to the companion structure,
    each row of `A^2` has only three non-zero entries, one of them a unit.
  - No extra minimum latency states are added, which keeps the coefficient
    count near `4N` (transposed) and `8N` (modified).

## Interfaces (`lt_filter_top`)

- `x_valid[i]` and `x[i]` feed realisation `i`. Its outputs are `y_valid[i]`,
  `y[i]` and `y_pos[i]`.
- `y_pos[i]` is the position of the output in its block: 0..4 for `F_FAST`,
  0..1 for the other unfolded realisations, and 0 for the rest.
- Samples may come every `SAMPLE_PERIOD[i]` cycles or more rarely. For
  `F_FAST`, the five samples of a block come on consecutive cycles.
- Each output appears exactly `LATENCY[i]` cycles after its sample.
- `rst_n` is an asynchronous active-low reset. It clears every state, which
  gives zero initial conditions, and returns to block position 0.
- The realisations share only the clock and reset. They are alternatives for
  the same filter, not stages of one datapath.

Each module can also be used on its own with the same single-stream
interface: `clk`, `rst_n`, `x_valid`, `x`, `y_valid`, `y`, plus `y_pos` where
there are blocks. Assertions flag samples that come too early.

## Where this design departs from the original description

- **Word lengths, rounding, handshake and reset** are this design's own. The
  original method assumes exact arithmetic and a steady sample clock.
- **Stream timing.** The two-sample filters accept irregular streams. Only the
  general on-arrival filter insists on evenly spaced samples within a block.
- **Coefficients.** The general on-arrival filter computes its matrix powers
  in fixed point at elaboration, rather than using exact rational matrices.
  The error this causes is a few LSB at the defaults.
- **Sign of one coefficient.** One printed coefficient of the once-unfolded
  update, the first entry of row `C A^3`, is used with the sign that
  `C A^3` actually has: positive, 1221830987/2^31. The simulation agrees with
  the original state-space model only with that sign.
- **Choice of `T_j` at `T_S = 1, T_L = 3`.** The bound on `T_j` for a given
  latency is used in the form `2^T_j <= 2^T_L - 2^m P`, which gives
  `T_j = 2`. Another written form of the same bound would allow `T_j = 3`, but
  by the latency formula that skew would cost a fourth cycle.
- **Sign convention of the direct-form denominators.** These use `+a_k`, as
  in the companion matrix with `a_k` in its first column.
- **Zero coefficients** are multiplied and added like any other coefficient.
  The method's counts assume general, non-zero coefficients. A production
  version would prune them.
- **Not built:**
  - the area-saving use of the same transformations, i.e. scheduling a
    transformed filter for the original 7/9-cycle timing with less hardware;
  - the other benchmark filters and controllers, whose coefficients are not
    available. `onarrival_lti_filter`, `min_latency_filter` and the direct
    forms take any order through their parameters, and `onarrival_lti_filter`
    also takes any number of inputs and outputs. The other modules are
    single-input, single-output. Elaboration cost grows quickly with size: a
    trial with 14 states, 3 inputs and 3 outputs ran out of memory in
    Verilator.

## Simulating with Verilator

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself.

| testbench                                                            | what it checks                                                       |
|----------------------------------------------------------------------|----------------------------------------------------------------------|
| `tb_lt_filter_top`                                                   | whole design at default parameters                                   |
| `tb_onarrival_lti_filter` (uses `onarrival_lti_harness`)             | general filter at (T_S=1, T_L=3) and (T_S=2, T_L=2), including the `TJ` and `I` its design algorithm picks |
| `tb_onarrival_unfolded_filter`                                       | two-sample optimum filter, also bit-exact against a model of its equations |
| `tb_min_latency_filter`, `tb_tdf2_filter`, `tb_tdf2_unfolded_filter`, `tb_mdf2_filter`, `tb_mdf2_unfolded_filter` | one realisation each |
| `tb_mdf2_causal`                                                     | both modified direct forms with `b0 = 0` (the example filter delayed by one sample) |
| `tb_onarrival_mimo` (uses `onarrival_lti_harness`)                   | general filter with two inputs and two outputs at (T_S=1, T_L=4) and (T_S=2, T_L=3) |

Every testbench drives random noise and steps, both at the minimum sample
period and with idle gaps. It checks each output against the floating-point
model, and checks its exact latency and its block position. The top-level
test also resets halfway and restarts. It counts each mechanism (minimum
spacing, gaps, every block position, restart) and fails if one never occurred.

To build and run one, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lt_filter_top \
    -y rtl -y tb +libext+.sv \
    rtl/lti_pkg.sv rtl/lt_design_pkg.sv rtl/wdf5_coef_pkg.sv rtl/lt_filter_pkg.sv \
    tb/wdf5_ref_pkg.sv tb/tb_lt_filter_top.sv
./obj_dir/Vtb_lt_filter_top
```

For another testbench, replace both occurrences of its name. The packages
must come first on the command line. Each run takes seconds.

To use another filter, override `A`, `B`, `C`, `D` (and `R`) of
`onarrival_lti_filter`, or `A_DF`, `B_DF` (and `N`) of the direct forms. For
the general filter you also choose `TS` and `TL`. It then picks `TJ` and `I`
itself (see below), or you can override them. An infeasible choice is rejected
at elaboration with a message.
