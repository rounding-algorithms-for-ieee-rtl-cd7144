# Rounding datapaths for an IEEE mantissa multiplier

When two normalized IEEE significands are multiplied, the 2n-bit product sits
in [1, 4) and has to be rounded back to n bits. Done naively, that costs two
carry-propagate additions in series: one to turn the multiplier's carry-save
output into a binary product, and a second to add the rounding constant, whose
position depends on whether the product overflowed past 2. This RTL implements
the family of rounding schemes from the paper *Rounding Algorithms for IEEE
Multipliers*. They fold the rounding constant into the single addition of the
carry-save product, so the two additions happen in parallel in one compound
adder, and the last scheme also takes the carry from the low product bits off
the critical path. On top of that it builds the three ways of computing the
sticky bit described there, and the small correction that turns
"round to nearest/up" into all IEEE rounding modes.

All four rounding algorithms are built side by side in one top module,
`ieee_mult_round_top`, on the same operands. They are interchangeable and
must agree bit for bit.

## Bit positions

Operands are n-bit significands `1.f` (n-1 fraction bits, MSB set). The
product `P = x*y` is read as `xx.` followed by 2n-2 fraction bits. The RTL
parameter `N` is n; its default is 24, the IEEE single-precision significand.
The paper keeps n symbolic.

Only the top n+2 columns matter for the rounded value, from V down to R:

| name | product bit | weight | role |
|------|-------------|--------|------|
| V    | 2n-1        | 2^1    | overflow: the product is 2 or more |
| L    | n-1         | 2^-(n-1) | LSB of a result that did not overflow |
| R    | n-2         | 2^-n   | round bit of a result that did not overflow |
| low  | n-3 .. 0    |        | only their carry into R (**Cin**) and their OR (**sticky**) matter |

In the RTL, the upper columns are passed as `ch`/`sh` (carry and sum vectors,
`[N+1:0]`, bit 0 = R, bit 1 = L, bit N+1 = V).

Round to nearest/up adds 1 at R when the product did not overflow (`Rin`).
If it overflowed, the result loses one more bit, so the constant must be
2^-(n-1): that is `Rin` plus a second 1 at R, the overflow rounding bit `Rv`.
Five bits can therefore meet at the R column: Rsum, Rcarry, Rin, Rv and Cin.
The whole problem is adding them without a second carry propagation, even
though Rv is only known after the addition.

## The multiplier array (`csa_array_mult`)

The partial products `x & y[i]` are reduced without any carry propagation.
There are two interleaved linear carry-save arrays, one for the even rows and
one for the odd rows. Row i only has adders in the columns its partial
product reaches. Two more carry-save rows merge the four vectors into the
2n-bit carry/sum pair. The low columns therefore really stay in carry-save
form, and Cin can be 1. (A single linear array would resolve the low columns
completely, so Cin would always be 0.) There is no Booth recoding, which the
carry-save sticky method needs.

The `inject` input adds 1 at column n-2 through the carry slot of the first
row, which would otherwise be empty. This is how Algorithm 2A gets Rin into
the product at no cost.

`lsb_carry` computes Cin from the low n-2 carry-save columns with a carry
chain and no sum outputs.

## The compound adder (`csadd`)

All the fast algorithms rely on an adder that delivers both `A+B` and
`A+B+1`. It shares the half-sum and generate terms and duplicates only the
carry chain. The select signal that picks one of the two results arrives
late, and it need not be a carry.

## Algorithm 1 (`round_alg1`): the reference scheme

1. Add the upper n+2 columns with Cin (the "CPAdd" step).
2. Add 2^-n, or 2^-(n-1) if V is set.
3. Shift right by one bit if the result is 2 or more.

The shift is needed after an overflow, and also when a product of 1.11...1
rounds up to exactly 2. The whole 2n-bit adder of a textbook design is
replaced by an n+2 bit adder with a carry input. This is correct but has two
additions in series.

## Algorithms 2A and 2B (`round_alg2a`, `round_alg2b`): parallel addition

`A+B` is the sum assuming Rv = 0, and `A+B+1` adds Rv, a 1 at R. The compound
adder produces both at once. The V bit of `A+B` is the overflow flag, because
it has not yet been disturbed by Rv:

* V = 0: take `A+B`, drop R, result bits n..1;
* V = 1: take `A+B+1`, drop R, shift right by one and raise the exponent by one.

The compound adder's carry-in is used up by Rv and the two vectors fill the
other inputs, so Rin and Cin need free slots at R:

* **2A** runs the carry-save vectors through a row of n+2 half adders. This
  shifts the carry vector left and leaves the carry slot at R empty, and Cin
  goes there. Rin was injected into the multiplier array.
* **2B** does not touch the array. The n upper columns get half adders. The L
  and R columns get full carry-save adders, whose third inputs take Rin + Cin
  split into two bits: `Rin xor Cin` at R and `Rin and Cin` at L. Adding 2 at R
  is the same as adding 1 at L. With Rin = 1 this is simply "not Cin" at R and
  "Cin" at L.

## Algorithm 3 (`round_alg3`): Cin off the critical path

This is the subtle one. Here the compound addition starts before Cin is known.
The trick is to look only at the three bits already known at R: Rsum, Rcarry
and Rin. Their sum Sigma3 bounds the carry that the full five-bit sum Sigma5
will send from R into L:

| Sigma3 | Sigma5 | possible R-to-L carry |
|--------|--------|-----------------------|
| 1      | 1-3    | 0 or 1 |
| 2      | 2-4    | 1 or 2 |
| 3      | 3-5    | 1 or 2 |

In every row the two possible carries differ by exactly 1, which is what `A+B`
versus `A+B+1` can cover. When the set is {1, 2}, the certain 1 must be added
up front. A row of half adders over the n+1 columns L..V frees the carry slot
at L. The slot receives `floor(Sigma3/2)`, which for Rin = 1 is simply
`Rcarry OR Rsum`. The R column itself is never added, because R is not part of
the result.

When Cin arrives, the output is chosen from the actual carry:

| Sigma3 | Sigma5 | R-to-L carry | output |
|--------|--------|--------------|--------|
| 1      | 1      | 0 | A+B |
| 1      | 2, 3   | 1 | A+B+1 |
| 2, 3   | 2, 3   | 1 | A+B (the 1 is already in the slot) |
| 2, 3   | 4, 5   | 2 | A+B+1 |

Rv is still unknown at that point. The V bit of `A+B` alone is not obviously
the right one, because the other bits may already force `A+B+1`. The RTL
therefore follows the paper's two-step rule:

1. make a preliminary choice with Rv = 0 and take V from the chosen output;
2. set Rv = V and Rin, and choose again with the complete Sigma5.

In the RTL, "choose `A+B+1`" is `floor(Sigma5/2) != slot`. An assertion checks
that the difference is never more than one.

The equations show something the paper does not spell out, and exhaustive
simulation confirms it: the preliminary choice never changes the final
output. Whenever it picks `A+B+1`, the final choice is `A+B+1` whatever Rv is.
Taking V straight from `A+B` would therefore give the same results. The
two-step logic is kept as described.

## Sticky bit: three methods

The sticky bit is the OR of the product bits right of R (bits n-3..0). All
three methods are built and brought out of the top.

* `sticky_cpa`: add the low carry-save columns, then OR the bits. It is the
  simplest, but needs a full-width addition first.
* `sticky_tz`: in binary, the product has exactly `tz(x) + tz(y)` trailing
  zeros, where tz counts trailing zeros. The sticky bit is 0 exactly when that
  sum is at least n-2. This runs in parallel with the multiplication.
* `sticky_cs`: OR the low carry and sum bits directly, with no addition.
  Without Booth recoding, the lowest carry-save column that holds a 1 holds
  exactly one, and nothing carries into it, so that 1 survives the final
  addition. This is only valid for a non-recoded array like the one here.
  With this array, the 1 always happens to be in the sum vector.

The IEEE correction uses `sticky_cs`. The other two are outputs for
comparison.

## IEEE modes (`ieee_round_adjust`)

The algorithms produce round to nearest/up when `rin = 1`, and a truncated
result when `rin = 0` (Rin and Rv both 0). `ieee_round_adjust` turns this
into the requested mode:

| `mode` (`rnd_pkg::rmode_e`) | algorithm runs | correction |
|---|---|---|
| `RM_RNE` = 0, nearest/even | nearest/up | on a tie, force the result LSB to 0 |
| `RM_RTZ` = 1, toward zero | truncate | none |
| `RM_RDN` = 2, toward -inf | truncate | +1 ulp if inexact and sign = 1 |
| `RM_RUP` = 3, toward +inf | truncate | +1 ulp if inexact and sign = 0 |
| `RM_RNU` = 4, nearest/up (ties away) | nearest/up | none |

Why the tie fix works: nearest/up only differs from nearest/even on an exact
tie with L = 0. In that case adding 1 at R turned L into 1 without carrying
any further, so clearing L gives the even result. When L was 1, the carry has
already cleared L, so forcing L to 0 changes nothing.

The tie and inexact tests are made at the final result position. The
unrounded L and R bits are rebuilt from the carry-save L and R columns plus
Cin with a 2-bit addition. If the exponent was raised, the old R bit belongs to
the discarded bits. If nearest/up rounding itself carried the result to 2.0,
the result is 1.00...0, whose LSB is already 0.

The directed modes use an n-bit incrementer after the algorithm. It
renormalizes 1.11...1 + 1 ulp to 1.0 and raises the exponent once more, so
`exp_adj` goes up to 2. The paper only states the rule "add 1 to the result"
for these modes; the separate incrementer is this design's choice.

## Top-level interface (`ieee_mult_round_top`)

| port | width | meaning |
|------|-------|---------|
| `x`, `y` | N | normalized significands, MSB = 1 |
| `sign` | 1 | sign of the product; only the directed modes use it |
| `mode` | `rmode_e` | rounding mode |
| `mant[i]` | N | rounded significand from algorithm i: 0 = Alg 1, 1 = 2A, 2 = 2B, 3 = 3 |
| `exp_adj[i]` | 2 | amount to add to the sum of the operand exponents |
| `sticky_cpa`, `sticky_tz`, `sticky_cs` | 1 | sticky bit from each method |

Everything is combinational, with no clock and no reset. Algorithm 2A reads
a second array instance with Rin injected. The other algorithms, Cin, the
L/R bits and the sticky bits come from the plain array. An assertion checks
that the four algorithms agree for normalized inputs.

## What this RTL does not cover

* Sign and exponent arithmetic, special values (zero, infinity, NaN),
  subnormals, and exponent overflow and underflow. Only the significand path
  and the exponent increment are built.
* Iterative multipliers, where Cin arrives cycles late and Algorithm 3 pays
  off most. The array here is combinational, and no pipeline registers are
  inserted.
* The variant of 2B that uses a full row of carry-save adders with unused
  inputs tied to 0. It is equivalent to the two CSAs built here.
* Carry chains are ripple chains. The paper leaves the adder structure open,
  and a faster structure would not change the function.

## Simulating

Every testbench is self-checking. Each compares against an exact-integer
reference in `tb/round_ref_pkg.sv`, which has no carry-save logic, and ends by
printing `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rnd_pkg.sv tb/round_ref_pkg.sv tb/tb_ieee_mult_round_top.sv \
    --top-module tb_ieee_mult_round_top
./obj_dir/Vtb_ieee_mult_round_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_ieee_mult_round_top` | whole design at N = 24: 20 000 operand pairs over all modes and both signs; counts every mechanism and fails if one never occurred |
| `tb_ieee_mult_round_top_n53` | the same at N = 53 (double precision) |
| `tb_round_alg1/2a/2b/3` | each algorithm exhaustively at N = 6 and randomly at N = 24, nearest/up and truncate, with random carry-save splits (via `alg_harness`) |
| `tb_ieee_round_adjust` | all modes exhaustively at N = 6, random at N = 24 |
| `tb_csa_array_mult`, `tb_lsb_carry`, `tb_csadd`, `tb_sticky_*` | the building blocks |

The mechanisms counted are:

* overflow
* rounding up to 2.0
* Cin = 0 and Cin = 1
* the tie fix
* a directed increment, and a directed increment that reaches 2.0
* Algorithm 2 selecting `A+B+1`
* the Algorithm 3 case-2 slot
* Algorithm 3 Rv = 1
* an exact product

The operand generator deliberately produces products with many trailing
zeros, products just below 2, all-ones operands and exact ties, which random
operands almost never hit.

To change the precision, set `N` on `ieee_mult_round_top`. The testbench
reference works for N up to 64.
