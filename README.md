# 8-bit dual-rail domino Ling adder (Naffziger style)

A fast adder spends most of its time waiting for the carry. This adder
shortens the wait with two tricks:

- **Ling's pseudo-carry.** The first carry-lookahead level computes a
  *pseudo-generate* H. H drops one propagate term from the usual group
  generate, so it has fewer terms and a smaller fan-in. The dropped term is
  carried by a *pseudo-propagate* I, which is shifted down by one bit.
- **Carry select on the pseudo-carry.** All internal carries are computed
  twice: once for an assumed incoming pseudo-carry of 0 and once for 1.
  Each sum bit then picks the right one with the real carry-in. The pick is
  folded into the XOR that forms the sum.

The gates are dual-rail domino. Every signal has a true rail (`_h`) and a
complement rail (`_l`). Both rails are low while the clock is low. While the
clock is high, exactly one rail rises. The bitwise generate/propagate/kill
signals use a 1-of-3-hot code instead of two separate dual-rail pairs.

The RTL models this circuit at the logic level. It keeps the precharge and
evaluate behaviour and the rail encoding. It has no transistors, sizes or
delays.

## Bit numbering and rail encoding

Operand bits are numbered **1 to 8**, with bit 1 least significant, and the
RTL keeps that numbering (`a[8:1]`). Bit 0 stands for the carry-in:
A0 = B0 = Cin.

| `_h` | `_l` | clock `phi` | meaning        |
|------|------|-------------|----------------|
| 0    | 0    | 0           | precharge      |
| 0    | 1    | 1           | evaluated 0    |
| 1    | 0    | 1           | evaluated 1    |
| 1    | 1    | any         | illegal        |

`naff_pkg` defines `dr_t` (a dual-rail bit `{h, l}`) and `gpk_t` (the
1-of-3 code `{g, p, k}`):

- G = A·B
- P = A xor B
- K = A'·B'

Exactly one of G, P, K is high during evaluate, and none during precharge.

## Signal flow

```
a, b, cin ──► dr_input_gen ──► rails (bit 0 = cin)
                 │
                 ├─► gpk_cell ×8 ─────────────────────────────┐ G/P/K per bit
                 ├─► g3h4_gate (bits 1-4) ─► G3:1, H4:1        │
                 ├─► g3h4_gate (bits 5-8) ─► G7:5, H8:5        │
                 ├─► i4_gate  (bits 0-3) ─► I4:1               │
                 └─► i4_gate  (bits 4-7) ─► I8:5               │
                                                               ▼
   for pseudo-carry c = 0 and c = 1:
     rc_gate #(PC=c)        ─► G^c_3:0, G^c_7:0
     manchester_chain (lo)  ─► G^c_0:0, G^c_1:0, G^c_2:0   (from constant c)
     manchester_chain (hi)  ─► G^c_4:0, G^c_5:0, G^c_6:0   (from G^c_3:0)
                                                               ▼
   sum_select ×8:  S_i = P_i xor (Cin ? G^1_{i-1:0} : G^0_{i-1:0})
   long_carry:     H8:0 = H8:5 + I8:5 (H4:1 + I4:1),  Cout = (A8+B8)·H8:0
```

## The Ling equations as built

This is the part that needs care. Two kinds of propagate appear. The wrong
one in the wrong place gives wrong sums.

**OR propagate in the G3, H4 and I4 gates.** These gates work directly on
the operand bits, with Gi = Ai·Bi and Pi = Ai + Bi:

- G3:1 = G3 + P3(G2 + P2·G1)
- H4:1 = G4 + G3:1
- I4:1 = P3·P2·P1·P0, with P0 = A0 + B0 = Cin
- G7:5, H8:5 and I8:5 = P7·P6·P5·P4 are the same for the upper group.

The pseudo-propagate covers the bits *below* the group's top bit. For the
low group those are bits 3 down to 0. That is why the carry-in appears
inside I4:1. The identity that holds the scheme together is
G_{i:j} = P_i·H_{i:j}. It needs G_i to imply P_i, which holds for OR
propagates but not for XOR propagates.

**Group carries for each pseudo-carry** (`rc_gate`):

- G^0_3:0 = G3:1
- G^1_3:0 = G3:1 + I4:1
- G^c_7:0 = G7:5 + I8:5·(G^c_3:0 + G4)

G^0 is the carry set for a carry-in of 0. Because I4:1 already contains the
carry-in, G^1 equals the true carry for either carry-in value. The sum gate
uses G^1 only when Cin = 1.

**XOR propagate in the Manchester chains.** Each chain stage computes:

- true rail: G_{i:0} = G_i + P_i·G_{i-1:0}
- complement rail: K_i + P_i·G_{i-1:0}_l

P here is the 1-of-3 XOR propagate. The one case where XOR and OR differ is
A = B = 1. There G_i is already 1, so the result does not change. One P
therefore serves both rails.

Bit 0's code is G0 = Cin_h, P0 = 0, K0 = Cin_l. With P0 = 0, the constant
pseudo-carry at the foot of the low chains has no effect. The low chains for
c = 0 and c = 1 therefore give the same result. Both are kept, matching the
four-chain organisation of the adder.

**Sum select** (`sum_select`):

- S_h = P·carry_l + (G + K)·carry_h
- S_l = P·carry_h + (G + K)·carry_l

Here carry = Cin_l·G^0 + Cin_h·G^1, on each rail. The complement of P is
taken as G + K, so no inverter is needed.

**Complement rails.** Every `_l` output is the exact dual of its `_h`
function, built from the `_l` input rails. In particular, the complement of
G4 is P4 + K4, not K4 alone. With legal inputs, every pair in the design is
always legal.

## Clocking and timing

There is one clock phase, `phi`:

- `phi = 0`: every gate output is 0 (precharge).
- `phi = 1`: the gates evaluate.

Each gate's output rails are monotone functions of its input rails, ANDed
with `phi`. The AND stands for the footed evaluate transistor and the
precharge device. As a result, precharge spreads through the whole network
and rails only rise during evaluate. `dr_input_gen` is the input
multiplexer: it holds both rails low while `phi` is low and drives x and its
inverse while `phi` is high.

The model has no storage and no delay. A result is valid during the same
evaluate phase in which its inputs are applied, and should be sampled before
`phi` falls. Operands must be stable while `phi` is high. There is no reset,
because there is no state.

`naffziger_adder8` checks the protocol with two concurrent assertions:

- just before `phi` falls, every output pair holds one legal value;
- just before `phi` rises, every output rail is 0.

The circuit this models was reported at under 5 ns per add and a 150 MHz
clock in a 1.5 µm process. A zero-delay model cannot confirm those figures.

## Top-level interface (`naffziger_adder8`)

| port              | dir | width | meaning                                     |
|-------------------|-----|-------|---------------------------------------------|
| `phi`             | in  | 1     | clock phase: 0 precharge, 1 evaluate        |
| `a`, `b`          | in  | [8:1] | operands, single rail                       |
| `cin`             | in  | 1     | carry-in                                    |
| `sum_h`, `sum_l`  | out | [8:1] | sum, true and complement rails              |
| `cout_h`, `cout_l`| out | 1     | carry out, true and complement rails        |

The width is fixed at 8 bits: two Ling groups of four, with no further
recursion level. A wider adder would need the recursive H/I combination
stage, which is not built.

## Departures and own choices

- **Carry out and `long_carry`.** The adder as designed produces S1..S8 and
  no carry out. H8:5 is computed but feeds nothing in the 8-bit sum path.
  `long_carry` combines H and I into the long pseudo-carry H8:0 and recovers
  Cout = (A8 + B8)·H8:0. It is an addition built from the same Ling
  recursion.
- **P0.** P0 = 0 is used in the Manchester chains, as the GPK definition for
  bit 0 gives. P0 = Cin (the OR of A0 and B0) is used inside I4:1. Using
  P0 = Cin in the chains would give the same sums. However, the unused
  carry-0 chain would then carry an illegal `11` pair when Cin = 1.
- **I4 indices.** The I4 gate takes bits 0..3 for I4:1 and 4..7 for I8:5.
  Only this shifted choice gives correct sums.
- **Structure.** The complement-rail equations are derived here. So is
  folding G^c_3:0 and G^c_7:0 into one gate with a `PC` parameter.
- **Not modelled.** Transistor sizing, charge sharing, keepers, buffering,
  pads and layout have no place in a logic model.

## Files

| file                     | contents                                           |
|--------------------------|----------------------------------------------------|
| `rtl/naff_pkg.sv`        | `dr_t`, `gpk_t`, rail helper functions             |
| `rtl/dr_input_gen.sv`    | clock-gated single- to dual-rail input mux         |
| `rtl/gpk_cell.sv`        | 1-of-3-hot G/P/K cell                              |
| `rtl/g3h4_gate.sv`       | G3 and H4 of a 4-bit group                         |
| `rtl/i4_gate.sv`         | I4 pseudo-propagate                                |
| `rtl/rc_gate.sv`         | G^c_3:0 and G^c_7:0 for one pseudo-carry           |
| `rtl/manchester_chain.sv`| length-3 dual-rail Manchester chain                |
| `rtl/sum_select.sv`      | carry-select mux merged with the sum XOR           |
| `rtl/long_carry.sv`      | H8:0 and carry out                                 |
| `rtl/naffziger_adder8.sv`| top level                                          |
| `tb/tb_<module>.sv`      | self-checking testbench for each module            |

## Verification

Each testbench computes its expected values with integer arithmetic, not
with the gate equations. Each checks both rails in evaluate and all-zero
rails in precharge.

- `tb_naffziger_adder8` runs all 2^17 combinations of A, B and Cin, one
  precharge/evaluate cycle each. That is 524,294 checks. It also counts that
  every mechanism was exercised: both pseudo-carry selections, a carry
  crossing from the low group into the high group, a carry propagated
  through all eight bits, a carry out, and a precharge.
- `tb_rc_gate` and `tb_long_carry` are exhaustive over A, B and Cin.
- `tb_g3h4_gate` and `tb_i4_gate` are exhaustive over their 8 input bits.
- `tb_manchester_chain` and `tb_sum_select` are exhaustive over their codes.
- `tb_dr_input_gen` uses random inputs.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Every testbench was also run against a deliberately broken copy of its
module and reported failures.

## Simulating

With Verilator 5 (the package is named first; `-y rtl` finds the modules):

```
verilator --binary --timing --assert -y rtl rtl/naff_pkg.sv \
          tb/tb_naffziger_adder8.sv --top-module tb_naffziger_adder8
./obj_dir/Vtb_naffziger_adder8
```

For a single block, name its testbench instead, for example
`tb/tb_manchester_chain.sv --top-module tb_manchester_chain`. The full adder test takes well under a
second of simulation time.

To read a result in your own bench:

1. Set `phi = 0` and apply the operands.
2. Raise `phi`.
3. Read `sum_h` and `cout_h` while `phi` is high. For each bit,
   `sum_l == ~sum_h` confirms completion.
