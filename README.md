# Multiplier-less FIR filter by binary subexpression sharing

An FIR filter multiplies every input sample by a fixed set of constant
coefficients. Constant multiplications can be done with shifts and adders
alone. This design goes one step further and shares adders between
coefficients. First it computes a few small "symbol" products of the input,
such as `x*0b1001` and `x*0b111`. Then it builds every coefficient product
as a sum of shifted copies of those symbols. Carry-save adders do the
additions in both stages, and one carry look-ahead adder per result turns
the carry-save pair into a normal binary number. The products then feed a
transposed-form FIR tap chain.

The RTL is generic. Which symbols to build, and how each coefficient is split
into shifted symbols, is a *plan* passed in as parameters. Choosing a good
plan is a delay/area optimisation problem that is solved offline, before
elaboration. The default plan is a small optimised two-coefficient example
(coefficients 45 and 26).

## Symbols, fragments and matches

All coefficients are unsigned binary numbers.

* A **symbol** `S` is an odd number written without leading zeros, so both its
  first and last bits are 1. Examples: `1`, `11`, `101`, `111`, `1001`.
* A **fragment** `F(S, i)` is symbol `S` shifted left by `i` bits.
* A **match** for coefficient `C` is a set of fragments that adds up to `C`,
  where each 1 of `C` is covered by exactly one fragment bit. In other words,
  the fragments' non-zero bit counts add up to `NZB(C)`, the number of 1s in
  `C`.
* The **alphabet** is the set of symbols that all matches use.

Example: `C = 11010` (26) can be matched as `F(11,3) + F(1,1)`, as
`F(1001,1) + F(1,3)`, or as `F(1101,1)`. Each choice uses a different mix of
symbols. If another coefficient already needs `1001`, the second choice
costs only one extra adder, because `x*1001` is already available.

The hardware realises a plan in two stages:

```
            +--------------------+   x*S for     +----------------------+  x*C per
  x[n] ---->| alphabet_gen       |-------------->| fragment_sum         |------------+
            | one adder tree per |  each symbol  | one adder tree per   | coefficient|
            | symbol: sum of x<<b|               | coefficient: sum of  |            |
            | over the 1s of S   |               | (x*S)<<i per fragment|            v
            +--------------------+               +----------------------+   TAP_COEF selects,
                                                                            TAP_NEG negates
                         +---------------------- tap_chain -----------------------+
                         |  t0      t1      t2          t(N-1)                     |
   y[n] <--[reg]<-- (+)<-+-(+)<-[r]-(+)<-[r]- ... -[r]- (+) <- 0                  |
                         +--------------------------------------------------------+
```

`alphabet_gen` builds `x*S` by adding one copy of `x` for each 1 of `S`,
shifted to that bit's position. The symbol `1` is `x` itself and costs
nothing. `fragment_sum` shifts the symbol products by each fragment's `i` and
adds them. A coefficient with a single-fragment match needs no adder. Both
stages use the same `multi_operand_adder`.

## The adder trees and the cost model

`multi_operand_adder` adds K operands in two parts. First, `csa_tree`
reduces the K operands to two with a Wallace tree of 3:2 carry-save adders
(`csa`). Then one `cla_adder` adds the two. That takes K-2 CSAs, and the
longest path has `csa_levels(K)` CSA delays plus one CPA delay. For example,
nine operands go 9 → 6 → 4 → 3 → 2. That is four CSA levels built from seven
CSAs, followed by one CPA.

A CSA delay does not depend on the word width, while a carry-propagate adder
delay does. So the design uses exactly one CPA per symbol and one per
coefficient, and never chains CPAs inside a stage. The only exception is that
a symbol's CPA output feeds the fragment stage.

The cost model rates a plan in units. A CSA counts 1 for both area and delay.
A CPA counts `CPA_RATIO` for both. At synthesis, a 16-bit carry look-ahead
adder is about 4× a CSA, and a 12-bit one about 3×. The top computes two
estimates at elaboration:

* `EST_AREA` is the sum over symbols of `sum_area(NZB(S))`, plus the sum over
  coefficients of `sum_area(number of fragments)`. Here
  `sum_area(k) = k-2+CPA_RATIO` for k ≥ 2, and 0 for k = 1.
* `EST_DELAY` takes, for each coefficient, the slowest of its symbols, adds
  the delay of the coefficient's own tree, and keeps the worst result over
  all coefficients.

With `CPA_RATIO = 2`:

| plan | EST_AREA | EST_DELAY |
|---|---|---|
| default: 45 = F(1001,2)+F(1001,0), 26 = F(1001,1)+F(1,3) | 6 | 4 |
| path 11011101 = F(1,7)+F(101,4)+F(1,3)+F(101,0), fragment stage only | 4 | — |
| symbol 101101 | 4 | — |

The default plan is the optimum of its small example under a 4-unit timing
constraint.

These are estimates for comparing plans. They are not a timing report. The
real critical path of the filter also includes one structural adder of the
tap chain and the register setup.

## Describing a filter

All plan parameters are on `fir_bse`:

| parameter | meaning | default |
|---|---|---|
| `XW` | input sample width, two's complement | 16 |
| `CW` | coefficient width; products are `XW+CW` bits | 16 |
| `NCOEF`, `COEFS[NCOEF]` | distinct coefficient magnitudes | 2, `'{45, 26}` |
| `NSYM`, `ALPHABET[NSYM]` | symbols built by the alphabet stage | 2, `'{1, 9}` |
| `NFRAG`, `FRAGS[NFRAG]` | all fragments as `'{coef_index, symbol, shift}`, any order | see below |
| `NTAPS`, `TAP_COEF[NTAPS]` | coefficient used by each tap (symmetric taps share) | 2, `'{0, 1}` |
| `TAP_NEG[NTAPS]` | tap subtracts its product (negative coefficient) | all 0 |
| `CPA_RATIO` | CPA cost in CSA units, for the estimate only | 2 |

Default `FRAGS`: `'{'{0,9,2}, '{0,9,0}, '{1,9,1}, '{1,1,3}}`.

The filter computes `y[n] = Σ_i (TAP_NEG[i] ? -1 : 1) * COEFS[TAP_COEF[i]] * x[n-i]`.

`mcm_block` checks every match at elaboration. A match's fragments must add
up to the coefficient and use exactly `NZB(C)` non-zero bits. Every fragment
symbol must be in the alphabet, and every symbol must be odd. A plan that
breaks any of these rules fails to elaborate with a readable `$error`.
`tb/fir_wide_case.sv` shows how to compute a plan in SystemVerilog. It uses
a simple greedy rule: at each uncovered 1, from the MSB down, take the
longest symbol of `{1001, 111, 101, 11, 1}` that fits.

Coefficients are magnitudes. Signs are handled in the tap chain, whose
structural adder for a negative tap adds the inverted product with a
carry-in of 1. A coefficient of zero has no match: leave that tap out.

## Interface and timing

`fir_bse` ports:

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | |
| `rst_n` | in | 1 | asynchronous, active low; clears the tap registers and the output |
| `in_valid` | in | 1 | `x_in` holds a new sample this cycle |
| `x_in` | in | `XW` | signed sample |
| `out_valid` | out | 1 | high in the cycle after an accepted sample |
| `y_out` | out | `XW+CW+clog2(NTAPS)` | signed output, held between samples |

Samples may arrive in any cycle. On cycles with `in_valid` low the filter
state and `y_out` are frozen. Latency is one clock. The whole multiplier
block plus one tap adder lies between `x_in` and the registers; there is no
pipelining. The output width cannot overflow for any input.

## Modules

| module | role |
|---|---|
| `bse_pkg` | `frag_t`, `nzb`, `set_bit_pos`, `csa_levels` and the cost functions |
| `csa` | W-bit 3:2 carry-save adder |
| `cla_adder` | W-bit carry look-ahead adder: 4-bit groups, a flat second look-ahead level |
| `csa_tree` | Wallace reduction of K operands to two |
| `multi_operand_adder` | `csa_tree` + `cla_adder`; pass-through for K = 1 |
| `alphabet_gen` | symbol products `x*S` |
| `fragment_sum` | coefficient products from the matches |
| `mcm_block` | `alphabet_gen` + `fragment_sum`, plus the plan checks |
| `tap_chain` | transposed-form adders and delay registers |
| `fir_bse` | top: `mcm_block` + tap selection + `tap_chain`, and the estimates |

## What follows the method, and what is this design's own

The method defines these parts, and the RTL follows it: the two-stage
multiplier block, the symbol/fragment/match rules, the CSA-then-one-CPA adder
structure, the carry look-ahead CPA, the transposed filter form, the 16-bit
coefficient width, the unit cost model, and the default example with its
area 6 and delay 4.

This design made its own choices for the rest:

* the 16-bit sample width;
* the Wallace grouping of the CSAs;
* the 4-bit CLA groups;
* the flat fragment list as the way to pass a plan;
* the `in_valid`/`out_valid` handshake, the asynchronous reset and the
  output register;
* negative taps done by subtraction in the tap chain;
* carry look-ahead adders for the structural adders;
* the mapping of the example's two coefficients onto two taps.

The plan optimiser is not part of this RTL. It enumerates the possible
matches of every coefficient, prunes those that break a timing constraint,
and picks the alphabet and matches of minimum total area with an integer
linear program. Its output is exactly the `ALPHABET`/`FRAGS` parameters.

## Verification and how far to trust it

Each module has a self-checking testbench in `tb/` that compares against
values computed independently with ordinary `*` and `+`:

* `tb_csa`, `tb_cla_adder`: random operands and carry-chain corner cases,
  widths 5, 13 and 16.
* `tb_multi_operand_adder`: K = 1, 2, 3, 4, 5 and 9.
* `tb_alphabet_gen`: symbols with one to nine 1s, extreme inputs.
* `tb_fragment_sum`: random, unrelated symbol inputs, so each output must
  come from exactly the right inputs and shifts.
* `tb_mcm_block`: the default plan and a five-coefficient plan.
* `tb_tap_chain`: four taps, two subtracting, random idle cycles,
  mid-stream reset.
* `tb_fir_bse`: the five-coefficient plan (7730, 621, 221, 45, 26 over the
  alphabet `{1, 101, 111, 1001, 10001}`) on six taps. It covers CSA trees in
  both stages, subtracting taps, full-scale inputs, idle cycles, a reset,
  the one-clock latency and the cost estimate (23 units, 6 units delay).
* `tb_fir_bse_full`: the default filter with no parameter overrides:
  impulse, step and random input, and the estimate 6/4.
* `tb_fir_bse_wide`: 32-tap and 128-tap linear-phase filters with
  generated 16-bit coefficients and a greedy plan (69 and 273 fragments).

The testbenches have only checked logical function. No timing or area result
from synthesis has been compared with the cost model.

**Filter size limit.** The largest filter simulated has 128 taps.
Elaboration-time bookkeeping in `fragment_sum`, `mcm_block` and `fir_bse`
loops over the whole fragment list for every fragment and every coefficient,
and Verilator evaluates these constant functions slowly. Elaboration time
therefore grows much faster than the filter:

| taps | fragments | elaboration | total build | memory |
|---|---|---|---|---|
| 64 | 141 | 5 s | 50 s | 0.6 GB |
| 128 | 273 | 35 s | 2 min | 3.9 GB |

A 512-tap build did not finish within 15 minutes. Filters of several hundred
taps are valid SystemVerilog but impractical to simulate this way.

## Running a testbench

Each testbench ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bse_pkg.sv tb/tb_fir_bse.sv --top-module tb_fir_bse -Mdir obj_fir -o sim
./obj_fir/sim
```

Verilator finds the other modules through `-Irtl -Itb`. Replace the
testbench name to run another one. To build your own filter, override the
plan parameters of `fir_bse` as in `tb/tb_fir_bse.sv`.
