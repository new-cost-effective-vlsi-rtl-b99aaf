# Multiplierless 26th-order FIR lowpass filter with horizontal and vertical common-subexpression elimination

A fixed-coefficient FIR filter does not need multipliers. Each coefficient,
written in canonic signed digit (CSD) form (digits 1, 0 and -1, written `n`
for -1), is a short list of shifts. Each product `h*x` is then a few shifted
copies of `x` added or subtracted. Shifts are wires, so the cost of the filter
is its adders and its registers. The cost measure used throughout is

    C = A + 0.6 * D        (A adders/subtracters, D word registers)

where 0.6 is the assumed area of a register relative to an adder.

This RTL implements a 26th-order (27-tap) linear-phase lowpass filter built
that way. It is a transposed-form filter, bit-parallel, one sample per clock.
Its multiplier block shares work between coefficients in two ways:

* **Horizontal subexpressions.** A digit pattern that recurs *inside*
  coefficients is computed once and shifted where needed. An example is `10n`,
  which is `(x<<2) - x = 3x`.
* **Vertical subexpressions.** A pair of digits at the *same bit position* of
  two neighbouring taps, `h_t` and `h_(t+1)`, can be merged. In a transposed
  filter every tap multiplies the same sample, so the pair contributes
  `d_t*x[n-t] + d_(t+1)*x[n-t-1]`. That equals `z[n-t]` with
  `z[n] = d_t*x[n] + d_(t+1)*x[n-1]`, and `z` can be fed into tap `t` alone.
  The price is a register holding `x[n-1]`.

All vertical subexpressions here read the same `x[n-1]`, so the vertical step
adds exactly one register. This grouping costs one register plus one adder
per pattern. The alternative grouping shares patterns that span more than two
taps, and needs a register per extra tap. The single-register grouping always
has the lower cost, so it is the one used.

## Structure

```
            +--------------------- mcm_block ----------------------+
 x_in ----->| subexpr_gen: x[n], x[n-1] (1 reg), 3x,                |
 in_valid   |              x[n]-x[n-1], x[n]+x[n-1]                 |
            | 12 x cs_adder: product = sum of +/- (node << shift)   |--- prod[27]
            +--------------------------------------------------------+
                                                                         |
            +---------------- transposed_section ---------------------+
            | r[26] <= p26 ; r[t] <= p_t + r[t+1] ; y = p0 + r[1]      |--- y_out, out_valid
            +----------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/fir_cse_pkg.sv` | default coefficients and word lengths; `build_net`, the elaboration-time elimination that derives the adder network |
| `rtl/cs_adder.sv` | multi-operand adder: Wallace tree of 3:2 carry-save compressors, then one carry-propagate adder |
| `rtl/subexpr_gen.sv` | the shared subexpressions and the `x[n-1]` register |
| `rtl/mcm_block.sv` | multiplier block: one `cs_adder` per distinct tap product, fanned out to the taps that share it |
| `rtl/transposed_section.sv` | 26 delay registers, tap adders, output register |
| `rtl/fir_cse_top.sv` | the filter |

### Top-level interface (`fir_cse_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active low; clears every register (zero history) |
| `in_valid` | in | 1 | `x_in` is a sample; low stalls the whole filter |
| `x_in` | in | 8 | sample, two's complement |
| `out_valid` | out | 1 | `y_out` is new; equals `in_valid` delayed by one clock |
| `y_out` | out | 18 | `y[n] = sum_t COEFS[t]*x[n-t]`, exact, no rounding |

Parameters: `NTAPS` (27), `COEFS` (a packed array of 64 signed 18-bit
integers, tap 0 first; only the first `NTAPS` are used), `X_W` (8), and `Y_W`
(derived: `X_W + ceil(log2(sum |COEFS|)) + 1`). Every width in the table
above is the default.

Throughput is one sample per clock. Latency is one clock: the output for a
sample accepted at edge *k* is on `y_out` after edge *k*. The path from
`x_in` to the output register is subexpression adder, then product tree, then
tap adder. Nothing else is pipelined.

## How the adder network is derived

The network is not a stored table. `fir_cse_pkg::build_net(COEFS, NTAPS)`
computes it at elaboration from the integer coefficients. Each module
elaborates it again from the same parameters, so to build a different filter
you only pass another `COEFS`/`NTAPS` to `fir_cse_top`. The procedure works
on the CSD digits:

1. **Horizontal step.** The rows are the distinct coefficients: for a
   symmetric filter the first `ceil(N/2)` taps, otherwise all taps. Every
   pair of non-zero digits inside a row is a pattern: first sign, distance,
   second sign. Repeat:
   * Count each pattern's occurrences, scanning from the top digit down and
     never letting two occurrences in one row share a digit.
   * Take the most frequent pattern. On a tie, take the shortest, since a
     narrower adder is smaller; then prefer a positive first digit, then a
     positive second digit.
   * If it occurs at least twice, it becomes a shared adder and its digits
     are removed. Otherwise stop.

   `10n` and `n01` are different patterns, so a negated subexpression gets
   its own adder.
2. **Vertical step, on all taps.** Digits left over from step 1 at the same
   bit of taps `t` and `t+1` form `x[n] + x[n-1]` (equal signs) or
   `x[n] - x[n-1]` (opposite signs).
   * A pattern occurring at least twice becomes a shared adder. The more
     frequent pattern goes first; on a tie, the one met first.
   * Its pairs are taken greedily, from tap 0 and bit 0 upward.
   * The term lands on tap `t`, with the sign of tap `t`'s digit.
3. **Products.** A tap's product is the sum of its remaining terms, each
   `±node<<shift`. Taps with identical term lists share one product, and so
   one adder tree.

The resulting encoding:

* `node[0] = x[n]`, `node[1] = x[n-1]`.
* Later nodes are `±(node[a]<<sa) ± (node[b]<<sb)`.
* A product lists its terms, each `(node, shift, sign)`.
* `tap_prod[t]` names the product of tap `t`, or `NO_PROD` for a tap with no
  terms. Such a tap gets a delay register and no adder.

`build_net` clears `ok` when a set exceeds the limits: 64 taps, coefficient
magnitude below 2^17, 62 shared subexpressions, 12 terms per tap, 512 product
terms. `subexpr_gen` then reports an error when simulation starts. Elaboration takes
about a second per instance at 27 taps and a few seconds at 45 taps × 16 bits.

### The default filter

The coefficients form a Hamming-windowed lowpass with its cutoff at 0.35 of
Nyquist, scaled by 2^8 and rounded. That gives 8-bit coefficients with a DC
gain of 373/256:

    0 0 0 -2 -1 2 6 2 -8 -15 -4 31 71 89 71 31 -4 -15 -8 2 6 2 -1 -2 0 0 0

For it, `build_net` produces:

* **Horizontal:** one subexpression, `10n` = 3x. It is used in the products
  of the coefficients 6 and 89.
* **Vertical:** `x[n]-x[n-1]` and `x[n]+x[n-1]`, used at the centre taps
  12/13 (twice, bits 0 and 3) and 14/15.
* **Products:** 12 distinct products for the 23 non-zero taps.

| | adders | registers | C = A + 0.6 D |
|---|---|---|---|
| subexpressions | 3 | 1 (`x[n-1]`) | |
| products | 6 | | |
| transposed section | 20 | 26 | |
| **total** | **29** | **27** | **45.2** |

Adders are two-operand adders/subtracters; a k-operand sum counts k-1. The
last non-zero tap (23) adds into a register that always holds zero. It is
not counted, and synthesis removes it together with the three trailing delay
registers. The output register and the valid flop are not counted.

**A caveat worth knowing.** For this coefficient set, the vertical step
*costs* more than it saves. Without it the network needs 27 adders and 26
registers (C = 42.6). In a linear-phase transposed filter, mirror taps `t`
and `N-1-t` normally share one product. A vertical pattern moves a digit from
tap `t+1` into tap `t`, but the mirror half needs the mirrored move. So the
four centre taps involved stop sharing products, which costs more adders than
the vertical patterns save. The step is kept because it is the method being
implemented. On other coefficient sets, asymmetric ones in particular, the
balance can differ.

## Carry-save arithmetic

`cs_adder` reduces N operands with levels of 3:2 compressors. Each level
turns three vectors into a sum vector `a^b^c` and a carry vector
`maj(a,b,c)<<1`, so the vector count drops by about a factor of 1.5 per
level. That factor is where a `log1.5 N` adder-tree depth estimate comes
from. A single carry-propagate adder finishes the sum.

A subtracted operand enters bit-inverted. The count of subtracted operands
(the "+1" of each two's-complement negation) enters as one extra constant
operand. All arithmetic is modulo 2^W, so intermediate wrap-around is
harmless as long as the final result fits, which `Y_W` guarantees.

The multiplier block uses one `cs_adder` per product. The transposed section
uses a two-operand `cs_adder` per non-zero tap. Its delay registers hold
resolved words, not carry-save pairs, which keeps the register count at one
word per tap.

## What is this design's own choice

The following come from the method itself:

* the transposed structure
* CSD coefficients
* the horizontal-then-vertical elimination with its pattern and tie rules
* the single shared `x[n-1]` register
* carry-save adders in the multiplier block and the transposed section
* bit-parallel data
* 27 taps

The following are choices of this implementation:

* **The coefficient values and the 8-bit coefficient word length.** The
  original example filter's values are not reproduced here.
* **Word lengths:** the 8-bit input and the full-precision 18-bit output.
* **Control:** the sample-enable handshake, the asynchronous reset and the
  output register.
* **Running the elimination at elaboration, and its limits.**
* **Details of the elimination:**
  * occurrences are counted greedily from the most significant digit
  * the sign preferences among equally good patterns
  * the horizontal step runs on all taps when the filter is not symmetric
  * vertical patterns need at least two uses
  * vertical pairs are chosen greedily
  * sign-mirrored patterns (`10n` and `n01`) are treated as different
    subexpressions
* **The Wallace-tree shape and the inverted-operand subtraction.**

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cs_adder` | 1-, 2-, 5- and 9-operand adders with subtraction masks, random and extreme operands, against a plain sum |
| `tb_subexpr_gen` | every node against its meaning (x, x[n-1], 3x, x∓x[n-1]) with random stalls and a reset |
| `tb_mcm_block` | measures each tap's dependence on x[n] and x[n-1] and requires the resulting effective coefficients to equal `COEFS` exactly; then checks linearity over random and extreme samples |
| `tb_transposed_section` | random products with stalls and a mid-stream reset against a delay-line model; `out_valid` and the one-clock latency |
| `tb_fir_cse_sizes` | fifteen filters elaborated from random coefficient sets, sized from 8 taps × 8 bits to 59 × 11 and 45 × 16 bits (N × b = 64 … 720). They are symmetric, or antisymmetric for three of them. Each is checked against direct convolution with an impulse, random samples with stalls, and a full-scale input. It prints each network's subexpression, product, adder and register counts. |
| `tb_fir_cse_top` | the whole filter at its default configuration against direct convolution. Covers the impulse response, full-scale steps, both output extremes (+47,431 and -47,684), random samples with ~25% stall cycles, and a mid-stream reset. Counts stalls, horizontal and vertical subexpression activity and extreme outputs, and fails if any never occurred. |

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fir_cse_pkg.sv \
    tb/tb_fir_cse_top.sv --top-module tb_fir_cse_top
./obj_dir/Vtb_fir_cse_top
```

All six pass. `tb_fir_cse_sizes` spends a few minutes in Verilator elaboration, because every instance runs the elimination. Each testbench also fails when its module is given a typical
bug, which shows the checks can catch one:

* an unshifted carry vector (`cs_adder`)
* a register that ignores the enable (`subexpr_gen`)
* a dropped subtraction mask (`mcm_block`)
* a skipped delay (`transposed_section`)
* a stall that does not reach the multiplier block (`fir_cse_top`)

Not verified: timing and area on any technology. Generic synthesis of the
default filter gives 441 flip-flop bits. That is 23 × 18-bit delay registers,
the 18-bit output register, the 8-bit `x[n-1]` register and the valid flop.
The three delay registers behind the last non-zero tap only ever hold zero
and are optimised away.
