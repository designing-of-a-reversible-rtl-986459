# Reversible, fault-tolerant Booth multiplier

A combinational n x n two's-complement multiplier whose every gate is
*reversible* (each output pattern comes from exactly one input pattern) and
*parity-preserving* (the XOR of a gate's outputs always equals the XOR of its
inputs). Reversible logic loses no information, and so avoids the
kT·ln 2-per-bit energy floor of ordinary logic. Parity preservation means that
a single flipped wire anywhere in a gate shows up as a parity mismatch between
the inputs and the outputs. This is the "fault tolerant" property of the
design.

The arithmetic is a classic radix-2 Booth array. Each row of cells looks at
one pair of adjacent multiplier bits. It then adds the multiplicand, subtracts
it, or does nothing, at the weight of the row. The design uses only three
reversible gate types (MIG, LMH and F2G). They are composed into three cell
types (C, B and B').

The RTL describes that gate-level structure literally, one module per gate
and per cell. It simulates and synthesizes as ordinary CMOS logic. "Reversible"
describes the netlist's structure and its cost figures. It does not mean that
the simulation behaves differently from ordinary logic.

## The three gates

| gate | size | mapping | quantum cost |
|------|------|---------|--------------|
| MIG  | 4x4  | (A, B, C, D) → (A, A⊕B, AB⊕C, AB̄⊕D) | 7 |
| LMH  | 4x4  | (A, B, C, D) → (A, B⊕C, ĀC⊕AB, ĀC⊕AB⊕D) | 6 |
| F2G  | 3x3  | (A, B, C) → (A, A⊕B, A⊕C) | 2 |

LMH's third output is a 2:1 multiplexer: A ? B : C. F2G with B = C = 0 makes
two copies of A. In reversible logic, ordinary fan-out is not allowed, so this
is how a signal is copied. Every output that carries no wanted value is a
*garbage output*. The cells bring these out as `g` buses, so that no gate
output is left floating.

## The cells

**C cell (`c_cell`)**: the Booth recoder of one row. It is a single MIG fed
with (xᵢ, xᵢ₋₁, 0, 0), giving

    H = xᵢ ⊕ xᵢ₋₁        operate (1) or skip (0)
    D = xᵢ · x̄ᵢ₋₁        subtract (1) or add (0)

| xᵢ xᵢ₋₁ | H D | row operation |
|---------|-----|---------------|
| 0 0     | 0 0 | skip |
| 0 1     | 1 0 | add y |
| 1 0     | 1 1 | subtract y |
| 1 1     | 0 0 | skip |

**B cell (`b_cell`)**: one bit of a row. It takes the partial-product bit `a`
from the row above, a multiplicand bit `b`, and a carry or borrow `c`:

    Z    = a ⊕ H·(b ⊕ c)
    Cout = (a ⊕ D)·(b ⊕ c) ⊕ b·c

With HD = 10 this is a full adder. With HD = 11, Z is the difference bit of
a − b − c and Cout is the *borrow*. The same carry chain therefore serves both
operations, and no separate two's-complement negation of y is needed. With
H = 0, Z = a. Cout is then meaningless but harmless, because Z ignores c when
H = 0. The cell passes b, H and D on to its neighbours. It has five gates:

    MIG (b, c, 0, 0)          → (b_out, b⊕c, bc, g)
    F2G (a, 0, 0)             → (a, g, a)
    F2G (D, a, 0)             → (D_out, a⊕D, g)
    LMH (b⊕c, a⊕D, 0, bc)     → (b⊕c, g, g, Cout)
    LMH (H, b⊕c, 0, a)        → (H_out, g, g, Z)

It has 7 garbage outputs and a quantum cost of 23.

**B' cell (`b_prime_cell`)**: the last cell of each row. Only Z is needed
there, so it uses one F2G (b, c, D) to form b⊕c and one LMH (H, b⊕c, 0, a)
to form Z. D enters only to be absorbed by the F2G. It has 5 garbage outputs
and a quantum cost of 8.

## The array (`booth_multiplier`)

Rows i = 0 … N−1 and product columns j = 0 … 2N−2:

* **Multiplier fan-out.** N−1 F2G gates copy x₀ … x_{N−2}. Copy 1 goes to
  C cell i as xᵢ. Copy 3 goes to C cell i+1 as its xᵢ₋₁. C cell 0 gets
  x₋₁ = 0. x_{N−1} feeds the last C cell directly.
* **Row geometry.** Row i has 2N−1−i cells, covering columns i … 2N−2. All of
  them are B cells except the B' cell in column 2N−2. So the rows are
  staggered on the left and aligned on the right.
* **Partial product.** A cell's `a` comes from the cell in the same column
  one row up. Row 0 has a = 0. Row i's leftmost cell produces product bit Pᵢ,
  because no later row touches column i. The last row produces
  P_{N−1} … P_{2N−2}.
* **Multiplicand.** Row 0 takes yⱼ in column j for j < N. Columns N … 2N−2
  take y_{N−1}; this is the sign extension. Each B cell passes its b
  diagonally to the next row, one column further right. Row i therefore sees
  y·2ⁱ with no extra wiring. The sign-extension copies of y_{N−1} are plain
  fan-out, not F2G gates, and the cost figures below do not count them.
* **Carries.** Each row's carry/borrow chain starts at 0 in its first cell and
  ripples right. H and D ripple along the row through the B cells.

Summed over the rows, this computes Σ (xᵢ₋₁ − xᵢ)·y·2ⁱ = x·y for signed x and
y.

### Product width and the one wrapping case

The product has **2N−1 bits**, not 2N. The B' cell has no carry out, so every
row works modulo 2^(2N−1). The result is the exact product modulo 2^(2N−1).
Read as a signed number, it is correct for every operand pair except
x = y = −2^(N−1). Its true product, +2^(2N−2), reads back as −2^(2N−2). If
that case matters, zero-extend the result and treat it specially, or build
with N+1 and sign-extend the operands.

### Signed and unsigned operands

Both operands are two's complement. An unsigned value multiplies correctly
only if its top bit is 0. To multiply full N-bit unsigned numbers, use an
instance with N+1 bits and a 0 in the extra top bit.

## Cost figures

The package `booth_pkg` gives the cell counts of an N-bit array. An N-bit
array has 3N(N−1)/2 B cells, N B' cells, N C cells and N−1 fan-out F2G gates.
It derives from those counts:

| N  | gates (15N²−7N−2)/2 | garbage (21N²−5N−2)/2 | quantum cost (69N²−35N−4)/2 |
|----|-----|------|------|
| 2  | 22   | 36   | 101  |
| 4  | 105  | 157  | 480  |
| 8  | 451  | 651  | 2066 |
| 16 | 1863 | 2647 | 8550 |

The `garbage` port of `booth_multiplier` is exactly that wide (2647 bits at
N = 16). It is ordered as the N−1 fan-out F2G outputs, then the C cells
(2 each), then row by row the B cells (7 each) followed by the B' cell (5).

## Interface

```systemverilog
booth_multiplier #(.N(16)) u_mul (
  .x      (x),        // [N-1:0]   multiplier, signed
  .y      (y),        // [N-1:0]   multiplicand, signed
  .p      (p),        // [2N-2:0]  product modulo 2^(2N-1)
  .garbage(garbage),  // [(21N^2-5N-2)/2-1:0] reversible garbage outputs
  .y_out  (y_out)     // [N-2:0]   multiplicand bits leaving the last row (= y[N-2:0])
);
```

The design is purely combinational, with no clock or reset. The critical path
runs through N rows. In each row it goes through the recoder and then the
ripple chain of 2N−1−i cells. In an application, `garbage` and `y_out` are
normally left unconnected. Synthesis then removes the logic that only they
use. N must be at least 2, and the default is 16.

## Files

| file | contents |
|------|----------|
| `rtl/booth_pkg.sv` | cost constants and cell-count functions |
| `rtl/mig_gate.sv`, `rtl/lmh_gate.sv`, `rtl/f2g_gate.sv` | the three reversible gates |
| `rtl/c_cell.sv`, `rtl/b_cell.sv`, `rtl/b_prime_cell.sv` | the three cells |
| `rtl/booth_multiplier.sv` | the N x N array (top) |
| `tb/tb_*_gate.sv` | exhaustive gate tests: function, parity preservation, one-to-one mapping |
| `tb/tb_c_cell.sv`, `tb/tb_b_cell.sv`, `tb/tb_b_prime_cell.sv` | exhaustive cell tests against integer add/subtract, plus cell-level parity |
| `tb/tb_booth_multiplier.sv` | N = 16: the −3 × 2 example, all pairs of 8 corner values, 20 000 random pairs |
| `tb/tb_booth_sizes.sv` | N = 2, 3, 4, 8 exhaustive (8-bit: all 65 536 pairs), the 3-bit example 101 × 010 = 11010, and the cost table |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
The top-level test counts how often rows add, subtract and skip, negative
multiplicands, negative products and the wrapping pair. It counts a failure
if any of these never occurs.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl \
  rtl/booth_pkg.sv rtl/mig_gate.sv rtl/lmh_gate.sv rtl/f2g_gate.sv \
  rtl/c_cell.sv rtl/b_cell.sv rtl/b_prime_cell.sv rtl/booth_multiplier.sv \
  tb/tb_booth_multiplier.sv --top-module tb_booth_multiplier
./obj_dir/Vtb_booth_multiplier
```

To run another test, replace the last file and the top name, for example
`tb/tb_booth_sizes.sv` with `tb_booth_sizes`. Each test runs in well under a
second. For a lint run, use `verilator --lint-only -Wall` with the same RTL
files and `--top-module booth_multiplier`.

## What follows the source design and what does not

The following follow the published design:

* the gate mappings and their quantum costs;
* the netlists of the C, B and B' cells;
* the row/column structure of the array;
* the use of F2G gates to copy the multiplier bits;
* the cell counts and the three cost formulas;
* the 3-bit example (−3 × 2 → 11010).

The following are choices made here:

* **Default size N = 16**: the largest size for which costs are given.
* **Sign extension of y**: columns N … 2N−2 of row 0 take y_{N−1} by plain
  fan-out.
* **Which wire goes where**: which F2G copy feeds which gate, in the B cell
  and in the multiplier fan-out.
* **Extra ports**: the order of the garbage bus and the extra `y_out` port.
* **Gates as Boolean mappings**: each gate is written as its mapping, not
  decomposed into quantum primitives. Quantum cost and delay are bookkeeping
  in `booth_pkg`, not modelled behaviour.

Two behaviours follow from the structure but are easy to overlook: the
2N−1-bit product with its one wrapping case, and the restriction of unsigned
operands to N−1 bits.

With H = D = 1, the B cell acts as a full *subtractor* (difference and
borrow). The source text calls it a full adder in that mode. The cell
equations, which are implemented here, define a subtractor, and the tests
check it as one.

No parity checker is included. The parity property is checked by the
testbenches for every gate and every cell (XOR of all inputs, including the
constants, equals XOR of all outputs, including garbage). Building a checker
into hardware would mean comparing the input parity with the XOR of all
outputs. The whole array is not parity-preserving end to end, because of the
plain fan-out of y's sign bit.
