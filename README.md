# Reversible half and full adder/subtractor

A reversible gate maps its input vectors one-to-one onto its output vectors.
No information is lost, so in principle no energy has to be dissipated. This
is also the building block of quantum circuits. The constraints are strict:
every gate has as many outputs as inputs, a gate output may not fan out, and
there are no feedback paths. Extra constant inputs (*ancillas*) and extra
unused outputs (*garbage*) are added where a function needs them.

This RTL builds two small arithmetic cells out of such gates. Each cell adds
and subtracts at the same time, because the sum bit and the difference bit of
binary addition and subtraction are the same XOR:

| cell | gates | inputs | results | garbage |
|------|-------|--------|---------|---------|
| half adder/subtractor (`rev_half_addsub`) | Peres, TR | A, B, ancilla 0 | A^B, carry A&B, borrow ~A&B | 2 |
| full adder/subtractor (`rev_full_addsub`) | Double Peres, NOT, Fredkin | A, B, Cin, ancilla 0 | A^B^Cin, carry, borrow | 2 |

Everything is combinational. There is no clock and no reset. The gates are
written as ordinary Boolean logic, so the RTL simulates and synthesises like
any other logic. Reversibility belongs to each gate's truth table, and the
gate testbenches check it. A CMOS netlist made from this RTL is not itself
reversible.

## The gates

All gates pass their first input straight through (`p = a`). For the 3x3
gates the inputs are `(a, b, c)` and the outputs are `(p, q, r)`.

| module | q | r | s |
|--------|---|---|---|
| `not_gate` (1x1) | — (`p = ~a`) | | |
| `peres_gate` | a ^ b | (a & b) ^ c | |
| `tr_gate` | a ^ b | (a & ~b) ^ c | |
| `fredkin_gate` | a ? c : b | a ? b : c | |
| `dpg_gate` (4x4, inputs a, b, c, d) | a ^ b | a ^ b ^ d | ((a ^ b) & d) ^ (a & b) ^ c |

- **Peres gate.** With `c = 0` it is a half adder.
- **TR gate.** With `c = 0` it is a half subtractor. The operand on pin `a`
  is the one being subtracted.
- **Fredkin gate.** A swap of `b` and `c` controlled by `a`. Its `r` output
  works as a 2:1 multiplexer.
- **Double Peres Gate (DPG).** With `c = 0` and the carry-in on `d` it is a
  full adder: `r` is the sum and `s` is the carry.

Be careful with the DPG's `r` output: it is `a^b^d`. Written as `a^c^d`
it would neither add nor, together with the other three outputs, form a
bijection. The `dpg_gate` testbench catches that mistake.

## Half adder/subtractor

```
 A ──┐ Peres ├─ p1 = A ─────────┐
 B ──┤       ├─ sum = A^B        │     ┌──────┐
 c ──┘       └─ carry = A&B      B ───►│ a    ├─ p2 = B       (garbage)
                                 p1 ──►│ b TR ├─ sub = A^B    (garbage)
                                 c ───►│ c    ├─ borrow = ~A&B
                                       └──────┘
```

The Peres gate produces the sum and the carry. Its first output, a copy of A,
goes on to the TR gate. That is how A reaches the second gate without a
fan-out.

The order of the TR gate's inputs matters. B goes on pin `a` and the copy of
A goes on pin `b`, so that `(pin_a & ~pin_b) = B & ~A`. That is the borrow of
A − B. If you swap the two, you get the borrow of B − A instead; the fault
test for this cell does exactly that.

The TR gate computes the difference bit a second time, on `sub`. It stays as
garbage, because `sum` already carries it.

The ancilla port `c` feeds the third pin of both gates, so the cell has one
constant input. Tie it to 0. With `c = 1`, both carry and borrow come out
inverted.

## Full adder/subtractor

```
 A ─────┐     ├─ p1 = A ── NOT ── p1_bar = ~A ─────┐
 B ─────┤ DPG ├─ r  = A^B ──────────────────────┐  │
 d=0 ───┤ (c) ├─ sum_sub = A^B^Cin              │  │
 Cin ───┘ (d) └─ carry                         ┌▼──▼────────┐
                                               │ a  b       │ Fredkin
 Cin ─────────────────────────────────────────►│ c          ├─ g1, g2 (garbage)
                                               └────────────┴─ borrow
```

The DPG produces the sum/difference and the carry. Its constant `d` goes to
the gate's `c` pin, and the carry-in goes to its `d` pin.

The borrow is the part that needs the most thought. For A − B − Cin:

- If A ≠ B, Cin cannot change the outcome. The borrow is 1 exactly when
  A = 0 (the case 0 − 1). So borrow = ~A.
- If A = B, the two operand bits cancel, and the borrow equals Cin.

So borrow = (A^B) ? ~A : Cin. This is a multiplexer, and a Fredkin gate is a
reversible multiplexer. Its control pin gets `r = A^B` from the DPG's second
output. Its middle pin gets ~A, made by the NOT gate from the DPG's copy of
A. Its last pin gets Cin. The borrow is the Fredkin gate's third output.

The other two Fredkin outputs are the garbage: `g1 = A^B` and
`g2 = (A^B) ? Cin : ~A`.

Cin drives both the DPG and the Fredkin gate, as in the circuit this design
follows. A strictly fan-out-free version would first copy Cin with a Feynman
(CNOT) gate.

## Top level

`rev_addsub_top` places the two cells side by side, each with its own ports.
Each cell's main results come out as a `rev_pkg::addsub_out_t` struct:

```
typedef struct packed {
  logic       sum_sub;
  logic       carry;
  logic       borrow;
  logic [1:0] garbage;   // half: {p2, sub}   full: {g1, g2}
} addsub_out_t;
```

The inner wires `ha_p1`, `fa_p1`, `fa_p1_bar` and `fa_r` are separate ports.

Nothing joins the two cells inside the top. To build an n-bit ripple
adder/subtractor, use the half cell (or a full cell with Cin = 0) for bit 0.
Then chain full cells, with each stage's carry (for addition) or borrow (for
subtraction) as the next stage's Cin. `tb_rev_addsub_top` does this for 4-bit
operands.

## Cost figures

These are the usual figures of merit for reversible circuits:

| | gates | garbage outputs | constant inputs | quantum cost from per-gate costs |
|---|---|---|---|---|
| half | 2 | 2 | 1 (shared by both gates) | Peres 4 + TR (usually costed at 4) = 8 |
| full | 3 | 2 | 1 | DPG 6 + NOT 0 + Fredkin 5 = 11 |

The circuit these cells follow is published with quantum costs of 6 (half)
and 9 (full). The per-gate costs above do not add up to those totals.
Quantum cost is not modelled in the RTL.

## How this RTL departs from or interprets the source circuit

- **DPG sum output.** The DPG uses `r = a^b^d`, as explained under "The gates".
- **DPG pin assignment.** The constant goes on the DPG's `c` pin and the
  carry-in on its `d` pin. This is the only assignment that makes the DPG a
  full adder.
- **Full-cell borrow.** It is `~(A^B)&Cin | (A^B)&~A`. This is the standard
  full-subtractor borrow, and it matches the published waveform.
- **Half-cell ancilla.** One ancilla port feeds both gates of the half cell.
  This is this design's choice.
- **Top level.** The struct grouping of outputs at the top is this design's
  own.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and finishes. For example:

```
verilator --binary --timing --assert rtl/rev_pkg.sv rtl/*.sv \
    tb/tb_rev_addsub_top.sv --top-module tb_rev_addsub_top
./obj_dir/Vtb_rev_addsub_top
```

Compile `rev_pkg.sv` first, as shown. Simulation takes well under a second.

| testbench | what it checks |
|-----------|----------------|
| `tb_not_gate`, `tb_peres_gate`, `tb_tr_gate`, `tb_fredkin_gate` | every input vector against the truth table, and that no two inputs give the same output (reversibility) |
| `tb_dpg_gate` | all 16 vectors against integer addition, full-adder use, reversibility |
| `tb_rev_half_addsub` | all operand pairs against integer add/subtract, garbage outputs, `c = 1` behaviour, the vector A = B = 1 |
| `tb_rev_full_addsub` | all operand triples, inner wires, garbage, `d = 1` behaviour, the vector A = B = Cin = 1 |
| `tb_rev_addsub_top` | both cells across all 32 joint inputs; 4-bit ripple addition and subtraction of all 256 operand pairs; counts carry, borrow and neither outcomes in each cell and fails if any never occurs |

The top-level testbench runs the top at its default (and only)
configuration. The design has no parameters.
