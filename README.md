# Depth-2 fixed-delay tree-search detector built from Voronoi boundaries

This RTL is a receiver for binary data sent over a channel with intersymbol
interference (ISI). Examples are high-density magnetic recording and fast
serial links. The detector decides each symbol a fixed two samples late. It
uses a fixed-delay tree search with decision feedback (FDTS/DF), and it makes
the same decisions as a full nearest-neighbour search. It does not compute
the eight path metrics. It tests nine planes instead, each with a few adds,
and combines the results with AND and OR gates. For the example channel
the whole decision needs two real multipliers.

The configuration built here has a tree depth of τ = 2. The equalized channel
response is

    F(D) = 1.0 + 0.4 D − 0.1 D²

All parameters default to this configuration.

## The idea in three steps

**1. FDTS as a nearest-neighbour problem.** After equalization, the sample
at time k is

    r_k = x_k + f1·x_{k−1} + f2·x_{k−2} + noise

At time k the detector decides x_{k−2}. It looks at the last three samples.
x_{k−3} and older symbols are already decided, so their share of those
samples is known and is subtracted (see "Internal feedback loop" below).
What remains is a vector r' = (r'_k, r'_{k−1}, r'_{k−2}). Without noise, r'
can only be one of 2³ = 8 points, one for each choice of
(x_k, x_{k−1}, x_{k−2}):

| point | x_{k−2} x_{k−1} x_k | r'_k            | r'_{k−1}  | r'_{k−2} |
|-------|---------------------|-----------------|-----------|----------|
| 1     | + + +               | 1+f1+f2 = 1.3   | 1+f1      | 1        |
| 2     | + + −               | −1+f1+f2 = −0.7 | 1+f1      | 1        |
| 3     | + − +               | 1−f1+f2 = 0.5   | −1+f1     | 1        |
| 4     | + − −               | −1−f1+f2 = −1.5 | −1+f1     | 1        |
| 5–8   | − ...               | −(point 9−i)    |           |          |

Points 1–4 carry x_{k−2} = +1. Points 5–8 carry −1. The decision is +1 when
r' is nearer to one of points 1–4 than to any of points 5–8. This is the
choice of the best path in the depth-2 look-ahead tree.

**2. Cut space along only the boundaries that matter.** The region nearest
to point i is its Voronoi cell. That cell is bounded by planes halfway
between point i and each of its Delaunay neighbours (the points whose cells
share a face with it). For a binary decision, a boundary matters only when
it separates a +1 point from a −1 point. Even some of those can be dropped:
if the cell, built without one of its planes, still does not reach into the
−1 region, that plane is not needed. For this channel nine planes are left:

    +1  ⇔  r' ∈ (H15 ∧ H16) ∨ H26 ∨ (H35 ∧ H36 ∧ H37 ∧ H38) ∨ (H46 ∧ H48)

H_ij is the closed half-space on point i's side of the plane between
points i and j. The list of (i, j) pairs is found once, at design time.
The testbenches check that this rule gives the brute-force nearest-neighbour
answer on hundreds of thousands of random vectors.

**3. A plane test is a small FIR filter.** Point q lies in H_ij when

    h_ij(q) = ½(p_i − p_j)·q − ¼(p_i + p_j)·(p_i − p_j)  ≥ 0

This is a 3-tap FIR with constant taps, plus a constant threshold, plus a
slicer. Each +1 cell ANDs its slicer bits, and an OR gives the decision.
This general structure is `fdts_delaunay_detector`.

## The two-multiplier form (`fdts2_reduced_detector`)

Write the nine discriminants out, with f0 = 1. Only four different tap
vectors appear:

| sum | taps on (r'_k, r'_{k−1}, r'_{k−2})   | used by            |
|-----|---------------------------------------|--------------------|
| A   | (f2, f1, 1)                           | H15, H26, H37, H48 |
| B   | A + (1, 0, 0)                         | H16, H38           |
| C   | A − (f1, 1, 0)                        | H35, H46           |
| E   | B − (f1, 1, 0)                        | H36                |

Each plane adds its own threshold to one of these sums:

| plane | threshold      | plane | threshold       |
|-------|----------------|-------|-----------------|
| H15   | −(f1+f2+f1f2)  | H37   | +(f1−f2+f1f2)   |
| H16   | −(2f1+f1f2)    | H38   | +(2f1+f1f2)     |
| H26   | −(f1−f2+f1f2)  | H46   | −(f1−f2)        |
| H35   | +(f1−f2)       | H48   | +(f1+f2+f1f2)   |
| H36   | 0              |       |                 |

The only true products are f1·r'_k and f2·r'_k. The term f1·r'_{k−1} is the
f1·r'_k of the previous sample, held in a register.

One detail needs care. The internal feedback loop changes a sample as it
moves down the delay line:

    r'_{k−1}(now) = r'_k(previous) − f2·x̂_{k−2}

So the stored product would be off by f1·f2·x̂. The register is therefore
loaded with f1·r'_k − f1f2·x̂, using the decision made in the same cycle.
Since x̂ = ±1, this is a constant add or subtract, not a multiplier.

All thresholds are computed at elaboration from the parameters F1 and F2.
The result is 2 multipliers, 1 product register, 9 threshold adders (plus
the shared sums), 9 slicers, 3 AND gates and 1 OR gate.

## Internal feedback loop and ISI cancellation

Two feedback paths remove the effect of symbols that are already decided.

- **Feedback filter B(D)** (`dfe_feedback_filter`). It cancels postcursor
  terms beyond the tree depth, f3 … f_N, from past decisions. The example
  response has no such terms. The top therefore uses one tap of value 0 by
  default. Set `NB` and `B_COEF` to use a longer response.
- **Internal feedback delay line** (`fdts_feedback_taps`). It removes the
  f1 and f2 terms of symbols decided earlier from the two older vector
  elements:

      r'_{k−1} = r_{k−1} − f2·x̂_{k−3}
      r'_{k−2} = r_{k−2} − f1·x̂_{k−3} − f2·x̂_{k−4}

  With these terms gone, the eight noiseless points are constants. The
  delay line applies one correction per stage, always using the decision of
  the current cycle:

      stage_{l+1} ← stage_l − f_{τ−l}·x̂_{k−τ}

  Each stage is a constant add or subtract.

Both paths close within one clock cycle: sample, detector, decision, and
then the register update. This is the critical path of the design.

**Start-up.** The channel is assumed idle before the first symbol, so
symbols before it count as 0. The first τ = 2 samples produce no decision,
and they feed back 0.

## Top level: `fdts_df_receiver`

```
y_k ─► forward_filter C(D) ─► q_k ─►(−)─► r_k ─► fdts_feedback_taps ─► r'_k, r'_{k−1}, r'_{k−2}
                                     ▲                  ▲                    │
                                     │ B(D) cancel      │ x̂_{k−2}            ├─► fdts2_reduced_detector ─► x̂ ─► xhat
                              dfe_feedback_filter ◄─────┴────────────────────┘        (two multipliers)
                                                                             └─► fdts_delaunay_detector ─► xhat_direct
```

| port         | dir | width  | meaning                                          |
|--------------|-----|--------|--------------------------------------------------|
| `clk`        | in  | 1      | clock                                            |
| `rst_n`      | in  | 1      | asynchronous reset, active low                   |
| `in_valid`   | in  | 1      | a new sample is on `y_in`                        |
| `y_in`       | in  | 12     | equalizer input sample, Q4.8                     |
| `c_coef`     | in  | NC×10  | forward-filter taps, Q1.8                        |
| `xhat_valid` | out | 1      | a decision is on `xhat`                          |
| `xhat`       | out | 1      | decided symbol, 1 = +1, 0 = −1, in symbol order |
| `xhat_direct`| out | 1      | same decision from the direct-form detector      |

- **Throughput:** one sample per clock. When `in_valid` is low, every
  register holds its value.
- **Latency:** at full rate, the decision on x_j appears τ + 2 = 4 cycles
  after y_j was accepted. Two of those cycles are the two-sample decision
  delay. One is the forward-filter register. One is the output register.
- **Forward filter** (`forward_filter`): a 4-tap direct-form FIR with
  run-time taps, because its taps depend on the channel. It rounds half up
  and saturates.
- **Cross-check:** the direct-form detector runs on the same vector as the
  two-multiplier one. The assertion `a_forms_agree` requires their slicer
  bits, cell outputs and decisions to match on every sample. Synthesis
  ignores the assertion. The direct-form output is brought out as
  `xhat_direct`; leave it unconnected if you do not need it.

## Number formats (`fdts_pkg`)

| type       | bits | format | use                                          |
|------------|------|--------|----------------------------------------------|
| `sample_t` | 12   | Q4.8   | y_k, q_k                                     |
| `rp_t`     | 13   | Q5.8   | r_k, r'_{k−l}, B(D) output                   |
| `coef_t`   | 10   | Q1.8   | forward-filter taps                          |
| `acc_t`    | 28   | Q.16   | products, discriminants (exact, no rounding) |
| `sym_t`    | 2    | signed | fed-back symbol: −1, 0 (start-up), +1        |

The channel coefficients are rounded to 8 fractional bits: f0 = 256,
f1 = 102 (0.398), f2 = −26 (−0.102). Every discriminant is computed exactly
from these values. The detector is therefore an exact nearest-neighbour
detector for the rounded response.

Ties: a vector exactly on a plane counts as inside the closed half-space
(h ≥ 0).

## Modules

| file                         | what it is                                              |
|------------------------------|---------------------------------------------------------|
| `fdts_pkg.sv`                | types, widths, example response, the nine plane pairs   |
| `fdts_df_receiver.sv`        | top level, as above                                     |
| `forward_filter.sv`          | C(D), FIR with run-time taps                            |
| `dfe_feedback_filter.sv`     | B(D), cancels terms beyond depth τ                      |
| `fdts_feedback_taps.sv`      | internal feedback delay line, start-up control          |
| `fdts2_reduced_detector.sv`  | depth-2 detector, two multipliers                       |
| `fdts_delaunay_detector.sv`  | general depth-τ detector, one constant FIR per plane    |
| `hyperplane_slicer.sv`       | one plane: FIR + threshold + slicer                     |
| `fdts_and_or.sv`             | AND per +1 cell, OR, output convention                  |

### Using another channel

`fdts_delaunay_detector` computes its points, taps and thresholds from the
parameters `F` (response) and `PI_IDX`/`PJ_IDX` (plane pairs), for any depth
`D`. `fdts2_reduced_detector` computes its thresholds from `F1` and `F2`.

The pair list, however, belongs to the channel. Finding it is a
computational-geometry job done off line: Delaunay neighbours of the
2^(τ+1) points, keeping the pairs of opposite class, then dropping the
redundant ones. It is not done in hardware. If you change the response,
work out the new pair list, and keep the `a_forms_agree` assertion or the
nearest-neighbour testbenches running to confirm it. The nine pairs and the
AND grouping in the two-multiplier form are correct for responses close to
{1, 0.4, −0.1}.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each one compares against a model written
without reference to the RTL structure: direct sums, and brute-force
nearest-neighbour search over the eight points in exact integer arithmetic.

| testbench                      | what it shows                                                                 |
|--------------------------------|--------------------------------------------------------------------------------|
| `tb_hyperplane_slicer`         | discriminant equals ¼ of the difference of squared distances, exactly          |
| `tb_fdts_and_or`               | all 512 slicer-bit patterns against the written-out rule                       |
| `tb_fdts_delaunay_detector`    | 20 000 random vectors: slicer bits and decision against nearest neighbour      |
| `tb_fdts2_reduced_detector`    | the same, with its register fed a consistent vector stream and gaps in `en`    |
| `tb_fdts_feedback_taps`        | delay line against its defining sums, depths 2 and 3                           |
| `tb_dfe_feedback_filter`       | three-tap B(D) against a direct sum                                            |
| `tb_forward_filter`            | FIR with rounding and saturation, one-cycle latency                            |
| `tb_fdts_df_receiver`          | end to end at default parameters (details below)                               |
| `tb_fdts_df_receiver_longch`   | end to end with response {1, 0.4, −0.1, 0.05, −0.02} and an active B(D)        |
| `tb_fdts_ber`                  | bit-error rate of the detector against a plain DFE, 6–12 dB                    |

`tb_fdts_df_receiver` runs the top at its default parameters. It sends 6000
symbols through a model channel H(D) = 2F(D)/(1 + 0.5D), with the forward
filter set to C(D) = 0.5 + 0.25D. It checks:

- every decision, including through noise-induced errors
- the number of decisions
- the 4-cycle latency
- that stalls, decisions of both signs, all four AND cells and decision
  feedback each occur

`tb_fdts_ber` defines SNR as 10·log10(1/σ²), for unit symbols and noise at
the detector input. It uses 400 000 symbols per point. One run gave:

| SNR (dB) | FDTS τ=2 BER | DFE BER  |
|----------|--------------|----------|
| 6        | 2.0e-2       | 2.8e-2   |
| 8        | 4.0e-3       | 7.2e-3   |
| 10       | 3.1e-4       | 9.2e-4   |
| 11       | 5.3e-5       | 1.8e-4   |
| 12       | 5e-6         | 3.8e-5   |

At a BER of about 1e-4, the depth-2 detector is a little under 1 dB ahead of
the DFE. The numbers change slightly from seed to seed. The bench checks
only robust properties:

- the detector never makes more errors than the DFE where the DFE makes at
  least 100
- it makes fewer errors in total
- its error count falls as the SNR rises

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_fdts_df_receiver \
    -y rtl -y tb +libext+.sv -Irtl rtl/fdts_pkg.sv tb/tb_fdts_df_receiver.sv -o sim
./obj_dir/sim
```

Replace the top module and the file to run another bench. Each bench
finishes in a few seconds or less.

## Design choices and limits

Taken from the structure this design implements:

- tree depth 2
- the example response {1.0, 0.4, −0.1}
- the eight-point tree numbering
- the nine plane pairs and their AND/OR grouping
- the plane thresholds
- the two-multiplier arrangement with one product delay
- the internal feedback loop that makes the points constant
- the B(D) feedback for longer responses

Choices made in this RTL:

- all word lengths and the Q formats
- the valid-strobe interface and the asynchronous reset
- the idle-channel start-up rule
- rounding and saturation in the forward filter
- the forward-filter length (4) and its run-time taps
- the tie rule (h ≥ 0)
- the correction of the stored product
- the direct-form detector as a live cross-check
- the illustrative two-tap default of `dfe_feedback_filter` when used on its own

Limits:

- The two-multiplier detector is written for depth 2 and f0 = 1. The
  direct form is general, but it needs a pair list for each depth and
  channel.
- The design does not find the Delaunay pairs itself.
- The decision feedback closes within one clock cycle. The design has no
  pipelining beyond that.
- Verilator reports `rst_n` as used both asynchronously and synchronously.
  The synchronous use is only the `disable iff` of the cross-check
  assertion.
