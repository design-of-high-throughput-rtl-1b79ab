# Fast, cheap filter structures for linear time-invariant systems

A linear time-invariant (LTI) filter built as a textbook Direct Form II is slow in two
ways. Its **latency** (input to output) and its **sample period** (the length of the
feedback loop) both grow with the filter order, because the products and sums form long
chains. This RTL builds four other structures for the same kind of system. In each of them
the input-to-output path and every state-update path stay a fixed number of operators deep,
whatever the order:

| structure | module | latency T_L | sample period T_S |
|---|---|---|---|
| modified Direct Form II | `mdf2_filter` | m + a | m + 2a |
| second companion form | `companion2_filter` | m + a | m + 2a |
| diagonal form | `diag_filter` | m + ceil(log2(R+1)) adders | m + a |
| Jordan form | `jordan_filter` | m + ceil(log2(R+1)) adders | m + 2a |

Here m is one constant multiplier, a is one adder and R is the number of delays.

The structures, their equations and these depths come from M. Potkonjak and M. B.
Srivastava, *Design of High Throughput, Low Latency, and Low Cost Structures for Linear
Systems*. The number format, the interface, the reset, the default constants and the
multiplier circuit are this design's own.

The structures are also cheap. Most of the constant products in them are products of
**one shared variable** by many constants. Each shared variable is therefore shifted only
once, and every product is built as a sum of selected shifted copies (`shift_add_mcm`).

## Files

```
rtl/lti_pkg.sv            number format, default constants (with the formulas behind them)
rtl/shift_add_mcm.sv      one variable times K constants, sharing one set of shifts
rtl/adder_tree.sv         balanced adder tree (output sum of diagonal/Jordan forms)
rtl/mdf2_filter.sv        modified Direct Form II
rtl/companion2_filter.sv  second companion form
rtl/diag_filter.sv        diagonal form
rtl/jordan_filter.sv      Jordan form
rtl/lti_top.sv            the four structures side by side
tb/...                    one self-checking testbench per module, plus the helpers below
```

## The modified Direct Form II

This is the least obvious of the four structures. The starting point is an order-N
Direct Form II:

    w[t] = x[t] + a1 w[t-1] + ... + aN w[t-N]
    y[t] = b0 w[t] + b1 w[t-1] + ... + bN w[t-N]

The feedback sum and the feed-forward sum are each turned into a column of delays and
adders. These are the left and right columns of the structure. The centre node w is then
scaled by b0. After that, the delays are moved forward past the adders. The result has
2N states, s1 ... s2N, and every update has the same shape:

    y   = CY*x + s1
    s1' = s4 + s3 + CS1*s2 + CX1*x
    s2' = s3 + CS2*s2 + CX2*x
    sk' = s(k+2) + CSk*s2 + CXk*x       for 3 <= k <= 2N-2
    sl' = CSl*s2 + CXl*x                for l = 2N-1, 2N

How to read these equations:

* **Left column (feedback).** State s2 is the top of the left column. The odd states
  s3, s5, ... are the rest of it.
* **Right column (feed-forward).** The even states s4, s6, ... form the right column.
* **Output state.** s1 holds the merged output.
* **Only two variables are multiplied.** Every product is a constant times s2 or a
  constant times x. So `mdf2_filter` uses two `shift_add_mcm` banks: one for s2 with 2N
  constants, and one for x with 2N+1 constants.
* **Depth of each update.** The two products of an update are formed side by side (m).
  They are added together (a), and the sum is added to the state terms (a). The s1 update
  adds s4 + s3 in parallel with the products, so it is no deeper. That gives T_S = m + 2a.
  The output needs one product and one addition, so T_L = m + a.

The constants come from the Direct Form II coefficients, with b0 ≠ 0 (j = 1 ... N-1):

| state | CS (times s2) | CX (times x) |
|---|---|---|
| s1 | a1 + b1/b0 | a1·b0 + b1 |
| s2 | a1 | a1·b0 |
| s(2j+1) | a(j+1) | a(j+1)·b0 |
| s(2j+2) | b(j+1)/b0 | b(j+1) |
| output | | CY = b0 |

To check the mapping, take s2 = b0·(left column top), s(2j+1) = b0·(left column j+1),
s(2j+2) = (right column j+1) and s1 = b0·(left top) + (right top). Substituting these
into the two columns gives the table above.

## The other three forms

**Second companion form** (`companion2_filter`). N delays sit in a chain between adders.
Each adder receives b_j·x, a_j·y and the next delay's content. The output is
y = b0·x + z1. Feeding y itself back would make the loop two multipliers deep. Instead,
a_j·y is expanded to a_j·b0·x + a_j·z1, and the two constants on x are merged:

    zj' = (bj + aj·b0)·x + aj·z1 + z(j+1)

All feedback products are of z1 and all input products are of x. So again two shared
multiplier banks suffice.

**Diagonal form** (`diag_filter`). When the system has distinct real poles p_i, it splits
into N first-order sections, z_i' = x + p_i·z_i. These updates are only m + a deep. The
output is y = d·x + Σ c_i·z_i, added in a balanced `adder_tree`. Each state's two products
(its pole and its output weight) share one shift bank.

**Jordan form** (`jordan_filter`). Repeated poles form chains. Each state also adds its
neighbour: z_i' = λ_i·z_i + B_i·x + SUPER[i]·z(i+1). This makes the update m + 2a deep.
The `SUPER` bits are the ones on the super-diagonal of the state matrix. `B` is a general
input vector.

Finding the diagonal or Jordan form of a system can be numerically unstable. Compute the
constants offline, and check the quantised result.

## Shared-shift constant multiplication

`shift_add_mcm` sign-extends its variable v and shifts it by 0 ... CW-1 bits, once. Each
of its K outputs adds the shifted copies selected by the bits of its constant. The copy for
the sign bit is subtracted, because a two's complement constant gives that bit a negative
weight. Half an output LSB is added, then the sum is shifted right arithmetically by FRAC
and cut to W bits. The result is the product rounded to nearest.

However many constants a variable meets, it needs only CW shifts. In hardware the shifts
are wiring. Synthesis removes the copies that no constant selects, and the adders are what
remain.

## Number format, interface and timing

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | data word, signed two's complement, wraps on overflow |
| `CW` | 16 | constant word, signed |
| `FRAC` | 14 | fractional bits of a constant (Q2.14, range [-2, 2)) |
| `N` | 8 | filter order (number of poles); `mdf2_filter` needs N ≥ 2 |
| constant arrays | from `lti_pkg` | `CY/CS/CX`, `CY/CA/CX`, `D/LAMBDA/C`, `D/LAMBDA/SUPER/B/C` |

Every filter has the same ports:

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears all states (zero initial state) and `out_valid` |
| `in_valid` | in | 1 | `x` is a sample; the states advance only on such cycles |
| `x` | in | W | input sample |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `y` | out | W | registered response to the sample accepted on the previous clock |

Each filter takes one sample per clock. The whole state update happens in one cycle, and
`y` follows `x` by exactly one clock. The latency and sample-period depths above are the
combinational depths: x to the `y` register, and state register to state register.
`lti_top` brings out all four filters with separate `mdf2_*`, `comp_*`, `diag_*` and
`jord_*` ports. The only shared signals are the clock and the reset.

A coarse synthesis of `lti_top` at the defaults gives 203 word-level cells and 679
flip-flop bits. Constants that are zero drop their states: with the default constants the
state s15 of `mdf2_filter` is always zero.

## Default constants

`lti_pkg` holds the defaults as integers round(value·2^14). It also documents the formulas
that produce them. Three of the filters realise the same 8th-order example system:

    H(z) = 0.5 + Σ r_i z^-1 / (1 - p_i z^-1)
    p = {0.75, -0.6, 0.5, -0.4, 0.3, -0.2, 0.1, -0.05}
    r = {0.25, 0.125, -0.125, 0.25, 0.0625, -0.0625, 0.125, 0.125}

With these constants, `mdf2_filter`, `companion2_filter` and `diag_filter` give the same
output up to rounding, which is a useful cross-check. The Jordan form's example has poles
0.5 (chain of 3), -0.25 (chain of 2), 0.7 (chain of 2) and -0.6.

To build your own system, do these steps offline:

1. Compute its Direct Form II coefficients, its poles and residues, or its Jordan
   decomposition.
2. Apply the tables above and quantise each constant to Q2.14.
3. Pass the arrays as parameters.

A system of lower order fits in the N = 8 structures if its unused constants are zero.
For more headroom, change `CW`/`FRAC`.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…` line. Each
also has a watchdog.

* `tb_shift_add_mcm`: six constants, including -2^15, 0 and 2^15-1, each against
  `(c·v + 2^13) >>> 14` on extreme and random values.
* `tb_adder_tree`: 9, 5 and 1 terms against a running sum.
* `tb_mdf2_filter`, `tb_companion2_filter`, `tb_diag_filter`, `tb_jordan_filter`: random
  samples with random gaps in `in_valid`, a reset mid-stream, and a stretch of full-scale
  samples that wrap. Each test checks three things:
  * `out_valid` follows `in_valid` by exactly one clock.
  * Every output matches a bit-exact model of the equations above, written with ordinary
    multiplication.
  * Outside the wrapping stretch, the output is within 16 LSB of a floating-point
    reference. For the first three filters the reference is a Direct Form II of the exact
    transfer function; for the Jordan filter it is its exact state-space model. The
    observed worst cases are 10, 8, 4 and 5 LSB.
* `tb_lti_top`: the whole design at its default parameters. It sends an impulse, a step
  with gaps, and 4000 random samples with a reset in between. The three equivalent
  filters are compared with the Direct Form II reference and with each other. The test
  also counts input gaps, resets and checked outputs, and each of them must be non-zero.
* `tb_mdf2_wordlength`: `mdf2_filter` at 8 bits and order 3, and at 32 bits and order 5.
  These match the sizes of the 3-state and 5-state controllers the method was evaluated
  on. The test uses example constants and the helper `mdf2_wl_check`.

Helpers: `tb/lti_tb_pkg.sv` holds the reference product `mulq` and the floating-point
Direct Form II class.

To run a testbench with Verilator, list the package first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lti_pkg.sv tb/lti_tb_pkg.sv \
    tb/tb_lti_top.sv --top-module tb_lti_top
./obj_dir/Vtb_lti_top
```

Replace the last file and the top module name to run another testbench. `tb_shift_add_mcm`
and `tb_adder_tree` need only `rtl/lti_pkg.sv`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/lti_pkg.sv rtl/<module>.sv`. The only warnings are
for package constants that a given module does not use.

## Where this RTL departs from the published description, and what it leaves out

* **Index range of the modified Direct Form II.** The published equations give the
  general update's range as 2 ≤ k ≤ 2N−2, and also give s2 an equation of its own. This
  RTL uses 3 ≤ k ≤ 2N−2, which fits the drawn structure: D3 feeds D2, and D4 feeds the
  adder before D1.
* **Second companion form.** The drawing feeds y back. The RTL expands that product as
  described above, which is how the published T_S = m + 2a is reached. The drawing's "y"
  label sits inside the chain; the RTL takes the output of the last adder.
* **Diagonal form output.** The output sum is drawn as a chain of adders. The RTL uses a
  tree, which is what the stated latency m + ceil(log2(R+1)) needs.
* **Jordan form.** It is only described in words. The input vector `B` and the chain
  layout are this design's own.
* **Diagonal and Jordan forms use real poles only.** Complex pole pairs would need complex
  arithmetic or 2×2 blocks.
* **Schedule.** The published results are given in control steps of a scheduled,
  resource-shared datapath: 3 steps per sample and 2 steps of latency. This RTL is fully
  parallel instead: one sample per clock, with every operator its own hardware. It does
  not reproduce the published area, power or control-step figures.
* **Multiplier and shift counts.** The published counts for the benchmark controllers
  (6–10 multiplications, and no more shifts than the word length) come from a
  transformation tool flow. This RTL has 4N+1 constant products in `mdf2_filter`, in two
  shift banks of CW shifts each. The published claim that "W shifts" suffice is met per
  shared variable, not for the whole filter.
* **Benchmarks.** The benchmark systems' coefficients (three- to five-state controllers,
  and 5th-, 7th- and 8th-order filters) are not available. All tests use the example
  systems above. At N = 8 and W = 16 each of those benchmark orders fits. The 32-bit
  variants need `W = 32`.
* **Not built.** The high-level-synthesis and symbolic-algebra tool flow that derives the
  constants is software. Here the constants are computed offline and passed as parameters.
