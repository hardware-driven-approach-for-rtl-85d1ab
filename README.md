# Factorial, permutation and combination operators in hardware

C has operators for addition and multiplication because processors have
adders and multipliers. This design adds three more operators of the same
kind, each backed by a small sequential unit and selected by its own
mnemonic (opcode):

| opcode    | result                 | hardware                                   |
|-----------|------------------------|--------------------------------------------|
| `OP_FACT` | n!                     | `factorial_unit`                           |
| `OP_PERM` | nPr = n! / (n-r)!      | `permutation_unit` (2 factorials + divider) |
| `OP_COMB` | nCr = nPr / r!         | `combination_unit` (permutation + factorial + divider) |

Nothing new is needed beyond an adder, a subtractor, shift registers and
counters: a factorial is a shift-and-add multiplier run over and over with
a shrinking multiplier, and the two other operators divide factorials with
a restoring divider. The operators are built on top of each other, so the
combination unit contains a permutation unit, which contains two factorial
units.

## The factorial engine

`factorial_unit` is the heart of the design and the part with the least
obvious control. Its registers carry the names of the 8-bit register pairs
of a small accumulator CPU:

| register | width | role |
|----------|-------|------|
| HL | W | multiplicand: n at first, then the previous product |
| BC | W | multiplier; during a pass the low half of the product shifts into it |
| DE | W | high half of the partial product |
| F  | 1 | carry of the DE + HL addition |
| SC | log2(W+1) | sequence counter: multiplier bits left in this pass |
| GC | W | global counter: passes left |

**One pass** is a textbook shift-and-add multiplication of HL by BC. SC is
set to W. In every step the low multiplier bit BC[0] is tested; if it is 1,
HL is added to DE with the carry going to F. Then the 2W+1-bit register
F,DE,BC shifts right by one, so the new partial-product bit enters the top
of BC while the used multiplier bit leaves at the bottom. After W steps the
product HL*BC sits in DE,BC, high half in DE.

**Passes are chained** by the global counter. At the start, HL = n and
GC = BC = n-1. After each pass GC is decremented. If it is still non-zero,
a multiplexer in front of HL selects the product (DE,BC) instead of the
operand and loads it into HL, BC takes the new GC, DE is cleared and SC is
reset, and the next pass starts. When GC reaches 0 the product in DE,BC is
n!. The multipliers are therefore n-1, n-2, ..., 1 (the last pass
multiplies by 1).

Worked through for n = 8 (W = 16): pass 1 computes 8*7 = 56
(`0111000`), pass 2 computes 56*6 = 336 (`101010000`), and after seven
passes DE,BC = 40320. The testbench checks these intermediate products.

In this implementation the add and the shift of one step share one clock,
so F is only the carry `sum[W]` inside that clock, not a flip-flop of its
own; the reload takes one more clock. A factorial of n >= 2 therefore
takes (n-1)(W+1) clocks. 0! and 1! return 1 with no pass.

**Overflow.** HL is W bits but a product is 2W bits. If DE is not zero at a
reload, the product does not fit HL and `overflow` is set; the result is
then meaningless. With the default W = 16 the largest correct factorial
is 8! = 40320 (9! = 362880 needs 19 bits). Widen W for more; everything
scales with it.

## Restoring divider

`restoring_divider` holds the dividend in Q, the divisor in B and the
partial remainder in A. A is one bit wider than B; that top bit is the
sign As. SC starts at W. Each step shifts A,Q left by one, forms A-B and
looks at As:

* As = 1: the divisor did not fit. The quotient bit shifted into Q is 0 and
  A is restored (A-B+B, which is simply the shifted A).
* As = 0: the quotient bit is 1 and A keeps A-B.

After W steps Q is the quotient and A the remainder. Subtraction, sign test
and restore of one step share one clock, so a division takes W clocks. An
assertion flags a zero divisor, which the operators never produce.

Example with 5-bit registers: 24 / 2 gives Q = `01100` (12) and A = 0.
That is 4P2 = 4!/2!.

## Permutation and combination

`permutation_unit` starts two factorial units on the same clock, one on n
and one on n-r. It waits until both have finished, then starts the divider
with n! as dividend and (n-r)! as divisor; the quotient is nPr.

`combination_unit` starts a permutation unit on (n, r) and a factorial unit
on r at the same time. When both have finished, its own divider computes
nPr / r!.

Both raise `err` and return 0 when r > n. `overflow` comes from any
factorial that did not fit.

## Operator front end

`math_op_unit` is the top. It latches `opcode`, `n` and `r` when `start`
is high and `busy` low, pulses the start of the selected operator's unit
in the next clock, waits for that unit's `done`, and registers its
result and flags. Each operator has its own hardware, so the three units
sit side by side. The unused opcode `OP_RSVD` returns `err`. The types and
the default width are in `math_op_pkg`.

## Interface and timing

All units share one handshake: `start` is taken only while `busy` is low
(a start while busy is ignored); `done` pulses for one clock; `result`,
`overflow` and `err` stay valid until the next start. Reset is synchronous
and active-low. Latencies, counted in clocks from the edge that takes
`start` to the edge after which `done` is high:

| unit | latency |
|------|---------|
| factorial, Tf(n) | (n-1)(W+1) for n >= 2, 0 for n <= 1 |
| divider | W |
| permutation, Tp | max(Tf(n), Tf(n-r)) + W + 3 |
| combination | Tp + W + 3 |
| `math_op_unit` | the selected unit's latency + 2 (1 for `OP_RSVD`) |
| `err` for r > n | 0 in the units |

At W = 16: 8! takes 7*17 + 2 = 121 clocks through the top, and 8C4 takes
119 + 19 + 19 + 2 = 159.

## What is this design's own

The register structure, the pass sequence controlled by GC, the
reload multiplexer, and the restoring-division step come from the original
description of these operators. The following were chosen here:

* the register width W = 16 (only illustrative widths of 3 to 9 bits were
  given, with a note that the register size limits the largest result);
* one clock per multiply step, per reload and per divide step;
* the start/busy/done handshake, synchronous reset, the `overflow` and
  `err` flags, and 0! = 1! = 1;
* the extra sign bit of A;
* two factorial units working at once in the permutation unit, rather
  than one unit used twice, and a separate divider in the combination unit;
* the opcode encoding and the front end.

## Simulating

Every file holds one module or package; `math_op_pkg.sv` must be read
first. Each unit has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/math_op_pkg.sv tb/tb_math_op_unit.sv --top-module tb_math_op_unit
./obj_dir/Vtb_math_op_unit
```

| testbench | what it covers |
|-----------|----------------|
| `tb_factorial_unit` | n = 0..12, pass-by-pass products of 8!, latency, overflow, start while busy |
| `tb_restoring_divider` | all 5-bit divisions, 3000 random 16-bit ones, latency |
| `tb_permutation_unit` | every nPr with n <= 8, 4P2 = 12, r > n, overflow, latency |
| `tb_combination_unit` | every nCr with n <= 8, r > n, overflow, latency |
| `tb_math_op_unit` | all three operators end to end at default parameters; counts each mechanism (add and skip steps, reloads, restoring and non-restoring divide steps, overflow, both errors, the n <= 1 case) and fails if one never occurs |

The simulation is two-state; all registers are reset.
