# Low-depth reversible arithmetic with HNG, Peres and Fredkin gates

A reversible gate has as many outputs as inputs, and its output pattern
identifies its input. No information is erased, which is what quantum
arithmetic needs and what low-energy reversible CMOS aims for. Reversible
adders are usually built from Toffoli (controlled-controlled-NOT) and CNOT
gates. A Toffoli full adder needs several cascaded gates per bit, so the
logic depth grows by several gate levels per bit of operand.

This design uses fewer, denser gates:

| Job | Gate | Depth per use |
|---|---|---|
| full adder | HNG (4x4): sum and carry from one gate | 1 |
| half adder | Peres (3x3): XOR and AND from one gate | 1 |
| compare / conditional routing | Fredkin (3x3): controlled swap | 1 per routing step |

The RTL has two parts under one top level, `hybrid`:

* a **four-line gate unit**. A 2-bit `mode` applies one of the three gates
  (or the identity) to `data_in[3:0]`. The result is registered into
  `data_out[3:0]`, and a `parity` bit is computed from the registered result.
* an **arithmetic unit** for operands `A` and `B` (`WIDTH` bits, default 4).
  It has an HNG ripple adder (`A + B + Cin`) and a Fredkin comparator that
  gives `A > B` and `A == B` and swaps the operands into min/max order.

Both parts load their outputs on the enable from an adiabatic phase
controller.

Everything is synthesizable SystemVerilog. The gates are written as their
Boolean equations, not as transistor-level reversible or adiabatic circuits.
Synthesis therefore turns them into ordinary logic (LUTs on an FPGA). The
depth figures above count reversible gate levels, not synthesized logic
levels.

## The gates

All inputs and outputs are single bits. Each mapping is a bijection.

**HNG** (`hng_gate`), inputs A B C D:

    P = A      Q = B      R = A ^ B ^ C      S = ((A ^ B) & C) ^ (A & B) ^ D

With D = 0 and C as the carry-in, R is the sum and S the carry-out. P and Q
only copy the operands. In reversible terms they are "garbage" outputs: they
are needed for reversibility but carry no new result.

**Peres** (`peres_gate`), inputs X Y Z:

    G = X      P = X ^ Y      C = (X & Y) ^ Z

With Z = 0, P is the half-adder sum and C its carry. With Z as a running
carry, C merges a generate term into it.

**Fredkin** (`fredkin_gate`), inputs CTL I1 I2:

    CTL_O = CTL      O1 = CTL ? I2 : I1      O2 = CTL ? I1 : I2

It swaps I1 and I2 when CTL is 1. If one data input is a constant, O1 becomes
an AND gate or a 2:1 multiplexer. The comparator uses it in both of these
ways.

These are the standard definitions of the three gates.

## The HNG ripple adder (`rev_adder`)

Bit *i* is one HNG gate with inputs (A_i, B_i, carry_i, 0). Its outputs are
R = SUM_i and S = carry_(i+1), and carry_0 = `Cin`. So the adder costs one
gate level per bit, where a Toffoli full adder needs a cascade of several.
The carry still ripples, so depth remains linear in `WIDTH`, with a smaller
constant. Nothing here is a carry-lookahead or parallel-prefix adder.

## The Fredkin comparator (`fredkin_comparator`)

The comparator uses only Fredkin gates and inverters:

1. Per bit: `gt_i = A_i & ~B_i`, using Fredkin(ctl = B_i, A_i, 0).
2. Per bit: `eq_i = A_i XNOR B_i`, using Fredkin(ctl = A_i, ~B_i, B_i).
3. A chain from the least to the most significant bit. Fredkin gates act as
   multiplexers: `gt_upto_i = eq_i ? gt_upto_(i-1) : gt_i`, and
   `eq_upto_i = eq_i ? eq_upto_(i-1) : 0`. The most significant differing
   bit decides the result.
4. `Sel = gt_upto_(WIDTH-1)`, which means A > B. Sel controls one Fredkin gate
   per bit that swaps A_i and B_i. The swapped outputs are `X = min(A,B)` and
   `Y = max(A,B)`.

The swap step has depth one. The decision chain is linear in `WIDTH`, like the
adder's carry.

## The four-line gate unit (`hybrid_rev_gate_adiabatic`)

| `mode` | gate | line mapping (d = `data_in`) | output `{3,2,1,0}` |
|---|---|---|---|
| `00` | HNG | A=d0 B=d1 C=d2 D=d3 | `{S, R, Q, P}` |
| `01` | Peres | X=d0 Y=d1 Z=d2; d3 passes | `{d3, C, P, G}` |
| `10` | Fredkin | CTL=d0 I1=d1 I2=d2; d3 passes | `{d3, O2, O1, CTL}` |
| `11` | identity | | `d` |

With `d3 = 0` in HNG mode, line 2 is the full-adder sum of d0, d1 and d2, and
line 3 is its carry. With `d2 = 0` in Peres mode, line 1 is the half-adder
sum and line 2 the carry. The names `MODE_HNG`, `MODE_PERES`,
`MODE_FREDKIN` and `MODE_BYPASS` are defined in `rev_pkg`.

## Timing: the adiabatic phase controller

Adiabatic CMOS powers its gates from a ramped multi-phase supply, and recovers
charge on the falling ramp. `adiabatic_controller` steps through four phases,
one per clock:

    CHARGE -> EVALUATE -> HOLD -> RECOVER -> CHARGE ...

It produces three outputs:

* `phase`.
* the one-hot `phase_en`, which leaves the top as `enable_bus[3:0]` for an
  external power-clock generator.
* `capture`, which is high during EVALUATE.

All output registers of `hybrid` are flip-flops with a clock enable and an
asynchronous clear. They load on the clock edge that ends EVALUATE. As a
result:

* outputs change at most once every 4 cycles;
* an input that is stable for 4 cycles is visible after at most 4 rising
  edges. An input applied right after a load appears exactly on the 4th edge
  after it.
* `rst` (active high, asynchronous) clears all outputs and puts the controller
  in CHARGE. The first load after reset is on the 2nd rising edge after `rst`
  falls.
* `parity = ^data_out`. It is combinational from the registers, so it changes
  together with `data_out`.

The combinational blocks (gates, adder, comparator, gate unit) have no clock
and no latency of their own.

## Top-level ports (`hybrid`, parameter `WIDTH = 4`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset |
| `data_in` | in | 4 | gate-unit lines |
| `mode` | in | 2 | gate select (table above) |
| `data_out` | out | 4 | registered gate-unit result |
| `parity` | out | 1 | XOR of `data_out` |
| `enable_bus` | out | 4 | one-hot phase enables |
| `A`, `B` | in | WIDTH | operands |
| `Cin` | in | 1 | carry in |
| `SUM`, `Cout` | out | WIDTH, 1 | registered `A + B + Cin` |
| `X`, `Y` | out | WIDTH | registered min(A,B), max(A,B) |
| `Sel`, `Eq` | out | 1 | registered A > B, A == B |

The gate-unit ports (`clk`, `rst`, `data_in`, `mode`, `data_out`, `parity`)
make 13 I/O pins on their own.

## What is specified and what is chosen here

These are taken as given: the three gate types and their roles (HNG full
adder, Peres half adder, Fredkin comparator by conditional swap); a gate unit
named `hybrid_rev_gate_adiabatic` with a 4-bit data input and a 2-bit mode; an
`adiabatic_controller` driven by clock and reset that enables 4 output
registers with asynchronous clear; a parity output; and a 4-bit adder
interface `A, B, Cin, SUM, Cout` with internal `sum_int` and `carry`.

These are this design's own choices:

* the mode encoding and the fourth (identity) mode;
* which gate pin goes on which line;
* parity as the XOR of the four registered outputs;
* the four-phase sequence and capture in EVALUATE;
* registering the arithmetic outputs with the same enable;
* the comparator's bit-level structure, its `Eq` output, and X = min / Y = max;
* `WIDTH = 4` for the comparator.

Known departures and omissions:

* The adder uses HNG gates at every bit. Peres gates for early-stage carries
  or carry merging are not used inside the adder, because the adder has a
  carry-in and so bit 0 needs a full adder. The Peres half adder is available
  through the gate unit.
* Carry and compare decisions ripple. No scheme that shortens the carry path
  beyond one gate per bit is implemented.
* The per-bit `parity_bus` signal of the original simulation has no stated
  meaning and is not implemented.
* The adiabatic CMOS circuit itself (ramped supply, charge recovery) is a
  transistor-level technique. Only its phase sequencing is modelled.
* The Toffoli/CNOT ripple-carry adder used as the point of comparison is not
  included.

## Files

`rtl/` holds one unit per file:

* `rev_pkg.sv`: mode and phase enums, constants.
* `hng_gate.sv`, `peres_gate.sv`, `fredkin_gate.sv`: the three gates.
* `rev_adder.sv`, `fredkin_comparator.sv`: the arithmetic blocks.
* `hybrid_rev_gate_adiabatic.sv`: the gate unit.
* `adiabatic_controller.sv`: the phase controller.
* `hybrid.sv`: the top level.

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

* The gate, gate-unit, adder and comparator testbenches are exhaustive at 4
  bits. They compare against integer arithmetic and also check that each gate
  is a bijection.
* The adder and comparator testbenches also run 2000 random cases on a 32-bit
  instance.
* `tb_hybrid` runs the top level at its default parameters: 400 random
  operations plus a mid-run asynchronous reset. It checks the 4-cycle load
  timing and that outputs hold between loads. It also counts each mode, carry
  out, swap, equality, odd parity and reset, and fails if any of them never
  occurs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rev_pkg.sv tb/tb_hybrid.sv --top-module tb_hybrid -o sim
    ./obj_dir/sim

Replace `tb_hybrid` with any other testbench name. The package file must come
first on the command line.

To change the operand width, set `WIDTH` on `hybrid`, `rev_adder` or
`fredkin_comparator`. The gate unit is fixed at four lines, because the HNG
gate is 4x4.
