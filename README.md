# 12-tap multiplierless FIR filter with shared CSD subexpressions

A fixed-coefficient FIR filter spends almost all of its area on the constant
multipliers. Each multiplier can be turned into shifts and adds, one adder per
nonzero digit beyond the first, and writing the coefficients in canonic signed
digit (CSD) form keeps the digit count low. Many digit patterns repeat, both
inside one coefficient and across neighbouring coefficients. Common
subexpression elimination (CSE) builds each repeated pattern once and shares it.

This RTL realises one small filter with that idea. It is a 12-tap linear-phase
low-pass filter with 12-digit CSD coefficients. Its constant multipliers
reduce to six shared patterns. The grouping of digits into patterns is done
ahead of time by a greedy CSE procedure that looks ahead. The procedure picks
between a horizontal pattern (within one coefficient) and a vertical pattern
(same digit in two neighbouring taps) by how many digits each choice leaves
ungrouped. That procedure is a design-time program, not hardware. Only its
result for this coefficient set is built here.

## The coefficient set

Digit position p (1..12) weighs 2^-p. The second half of the filter mirrors
the first: h(11-k) = h(k).

| tap | CSD digits, positions 1..12 | value × 2^12 |
|-----|-----------------------------|-------------:|
| h0  | 0 0 1 0 1 0 0 -1 0 1 0 1    | 629  |
| h1  | 0 0 1 0 1 0 1 0 0 -1 0 0    | 668  |
| h2  | 0 0 0 0 1 0 0 0 0 1 0 1     | 133  |
| h3  | 0 0 0 1 0 1 0 1 0 0 1 0     | 338  |
| h4  | 0 0 0 1 0 1 0 -1 0 0 1 0    | 306  |
| h5  | 0 1 0 0 1 0 1 0 0 1 0 0     | 1188 |

A plain shift-and-add realisation of h0..h5 needs 18 adders, one per nonzero
digit beyond the first in each row.

## The six shared patterns (`cse_subexpr`)

| name | pattern          | value       | built as     |
|------|------------------|-------------|--------------|
| x2   | [1 1], vertical  | x + x[-1]   | 1 adder      |
| x3   | [1 0 1]          | 5x          | 1 adder      |
| x5   | [1 0 0 1]        | 9x          | 1 adder      |
| x6   | [1 0 0 -1]       | 7x          | 1 adder      |
| x8   | [1 0 1 0 1]      | 21x         | 4·x3 + x     |
| x9   | [1 0 1 0 -1]     | 19x         | 4·x3 − x     |

x8 and x9 are *super-subexpressions*: a horizontal pattern plus one more digit
at a fixed distance. Each appears in only one tap of h0..h5. Because of the
mirror symmetry, each still occurs twice in the whole filter.

The vertical pattern x2 is the least obvious one. One digit position is
nonzero with the same sign in two neighbouring taps k and k+1. The sum
`x[n] + x[n-1]`, shifted to that position and fed into tap k, then supplies
both taps at once. So the filter needs the previous input sample, kept in one
register in the top level.

## Grouping into per-tap terms (`cse_tap_terms`)

The filter is built in transposed form. One product term T_d per tap is
computed from the current sample, and the chain adds T_d to the output d
samples later. `2^-p·v` below means pattern v with its last digit placed at
position p. In integers that is `v <<< (12 - p)`.

```
T0 = 2^-3 x2 + 2^-5 x6 + 2^-10 x3      T6  = T5
T1 = 2^-5 x2 + 2^-7 x6                 T7  = 2^-4 x9 + 2^-11 x2
T2 = 2^-10 x3                          T8  = 2^-4 x8
T3 = 2^-4 x8 + 2^-11 x2                T9  = 2^-5 x2 + 2^-10 x3
T4 = 2^-4 x9                           T10 = 2^-3 x2 + 2^-7 x6
T5 = 2^-2 x5 + 2^-7 x5                 T11 = 2^-5 x6 + 2^-10 x3
```

Because x2 spans two taps, T_d is **not** h_d·x. The x2 part of T_d also
provides one digit of tap d+1. For example, T0 gives all of h0 and digit 3 of
h1, and T1 gives the rest of h1 plus digit 5 of h2.

The mirrored half cannot simply reuse T0..T5 in reverse order. A vertical
pair at taps j, j+1 lands on taps 10-j, 11-j. So its x2 term moves one tap
away from the horizontal patterns it was grouped with. That is why T7, T9,
T10 and T11 each need their own adder, while T6 (= T5) and T8 do not.

Adder count:

| part | adders |
|------|-------:|
| pattern adders (`cse_subexpr`) | 6 |
| term adders for h0..h5 | 5 |
| term adders for the mirrored h6..h11 | 4 |
| structural adders in the chain | 11 |

The 6 + 5 = 11 adders that realise the six distinct coefficients compare with
the 18 of plain shift-and-add.

## Datapath, interface and timing (`fir12_cse`, `transposed_chain`)

```
x_in ──┬──────────────► cse_subexpr ──► cse_tap_terms ──► transposed_chain ──► y_out register
       └─► x_d1 reg ────────┘  (x2..x9)       (T0..T11)     (11 regs + adders)
```

| port        | dir | width      | meaning |
|-------------|-----|------------|---------|
| `clk`       | in  | 1          | clock |
| `rst_n`     | in  | 1          | asynchronous, active-low reset: all past samples become zero |
| `in_valid`  | in  | 1          | `x_in` carries a sample this clock |
| `x_in`      | in  | `DATA_W`   | signed two's-complement sample (default 16 bits) |
| `out_valid` | out | 1          | `y_out` was updated at the last edge |
| `y_out`     | out | `DATA_W+13`| full-precision output |

- **Latency and throughput.** The edge that takes a sample also loads
  `y_out` for that sample and raises `out_valid`. The latency is one clock.
  The filter accepts at most one sample per clock.
- **Idle cycles.** If `in_valid` is low, the x[-1] register and the chain
  hold their values, `y_out` keeps its last value and `out_valid` goes low.
  Samples can therefore arrive at any rate up to the clock rate.
- **Number format.** `y_out` is `sum h_d·x[n-d]` with the integer
  coefficients above, so it is 2^12 times the result with fractional
  coefficients. The magnitudes of all twelve coefficients add up to
  6524 < 2^13, so 13 extra bits hold every possible output and nothing can
  overflow. The output is neither rounded nor truncated.
- **Critical path.** The multiplier block is at most three adders deep.
  For T0, that is a pattern adder followed by two term adders. For T3 and T7,
  it is the two-deep x8/x9 followed by one term adder. One chain adder
  follows before the output register. The chain adds only one adder to the
  path, whatever the filter length.

Shared constants (coefficient word length 12, 12 taps, 13 growth bits) are in
`fir_cse_pkg`.

## Departures and choices

- **Delay-3 term.** The published output equation for this filter writes the
  delay-3 super-subexpression as x9. The coefficient table and the digit
  grouping both need x8 there: h3 has +1 at digit 8, and h4 has −1. The RTL
  uses x8 in T3 and x9 in T4. The testbenches confirm that this gives the
  tabulated coefficients.
- **Mirrored half.** The coefficient grouping is given for h0..h5 only. Taps
  h6..h11, and the four extra term adders they need, are derived here from
  the symmetry.
- **Unused pattern.** A fifth horizontal pattern, [1 0 -1], belongs to the
  method's pattern set but occurs nowhere in this coefficient set. It is not
  built.
- **This design's own choices.** The transposed-form chain, the x[-1]
  register, the input width, the integer scaling, the full-precision output,
  the `in_valid`/`out_valid` handshake and the asynchronous reset. The
  transposed form was picked because grouping by delay gives exactly the five
  term adders that the method counts for h0..h5.
- **Not built.** The method is also applied to larger filters whose
  coefficients are not available here. These are Parks–McClellan low-pass
  filters of 20 to 800 taps and a 610-tap channel filter for a D-AMPS
  channelizer, each with 12- to 24-bit coefficients. Their multiplier blocks
  would have to be produced by running the CSE procedure on their
  coefficients. This RTL holds only the 12-tap set above, so none of them
  runs on it.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

- `tb_cse_subexpr` compares the six patterns with integer multiples of the
  sample, for random and extreme inputs.
- `tb_cse_tap_terms` measures each term's weight on x and on x[-1]. It checks
  that the weights add up to every tap's coefficient, as computed from the
  CSD digit table, and that nothing spills past tap 11. It then checks
  linearity on random inputs.
- `tb_transposed_chain` compares the chain with a history-based reference
  model, with random idle cycles.
- `tb_fir12_cse` runs the complete filter at its default parameters against
  a plain convolution reference. It covers an impulse response, random
  samples with idle gaps, a long full-rate burst, full-scale positive and
  negative inputs that hit the extreme outputs exactly, and a reset in
  mid-stream. It checks the one-clock latency on every edge and counts each
  of these situations.

To simulate with Verilator 5 (for another testbench, change the top module
name and the file list):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fir12_cse \
  rtl/fir_cse_pkg.sv rtl/cse_subexpr.sv rtl/cse_tap_terms.sv \
  rtl/transposed_chain.sv rtl/fir12_cse.sv tb/tb_fir12_cse.sv
./obj_dir/Vtb_fir12_cse
```

## Changing it

- **Sample width.** `DATA_W` of `fir12_cse` sets the sample width. Every
  internal width follows from it. The end-to-end test also passes with
  `DATA_W` set to 8 and to 24.
- **Another coefficient set.** This needs a new grouping:
  - new patterns in `cse_subexpr`;
  - new T_d expressions in `cse_tap_terms`;
  - `NumTaps` and `OutGrowth` in `fir_cse_pkg`.

  `transposed_chain` is generic in width and length. The testbench's CSD
  digit table is the independent reference, so update it to match.
