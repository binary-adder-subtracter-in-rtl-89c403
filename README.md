# 8-bit adder-subtracter from majority gates (QCA style)

Quantum-dot cellular automata (QCA) has two logic primitives: the
three-input majority gate M(a,b,c) = ab + bc + ca and the inverter.
AND and OR are majority gates with one input tied to 0 or 1. In QCA every gate
on a path costs delay, so an adder's speed depends on how many majority gates
the carry passes through.

This design is a two's-complement adder-subtracter built only from those two
primitives. Its core is a ripple adder made of 2-bit slices. Inside a slice
the carry crosses **two bit positions through a single majority gate**, so the
carry chain of an N-bit adder is N/2 gates deep instead of N. Subtraction
reuses the adder: operand `b` is XORed with the add/subtract control, and the
same control bit is the adder's carry-in. The default size is 8 bits, giving a
9-bit result whose MSB is the carry. A result appears 12 QCA clock phases
(3 clock cycles) after its operands.

The RTL is written at the gate level: every module below the top is a netlist
of `majority_gate` and `qca_inverter` instances. You can therefore count gates
and trace paths in the same terms as a QCA layout. It also synthesises to
ordinary CMOS logic.

## The 2-bit carry slice

This part matters most for understanding the design. For the bit pair
(i+1, i) with incoming carry c_i:

```
c_{i+1} = M(a_i, b_i, c_i)
c_{i+2} = M( M(a_{i+1}, b_{i+1}, a_i),  M(a_{i+1}, b_{i+1}, b_i),  c_i )
```

The two inner gates depend only on operand bits, so they settle before the
carry arrives. Only the outer gate lies on the carry path. The slice works
for each case of the upper bit pair:

| a_{i+1}, b_{i+1} | inner gates          | c_{i+2}                                   |
|------------------|----------------------|-------------------------------------------|
| both 1           | both 1               | 1 (generate)                              |
| both 0           | both 0               | 0 (kill)                                  |
| differ           | a_i and b_i          | M(a_i, b_i, c_i) = c_{i+1} (propagate)    |

`carry_module_2bit` is one slice. `carry_block` chains N/2 slices; the even
carry c_{2k+2} of one slice is the carry-in of the next. The odd carries come
from each slice's first gate and feed only the sum logic, so they are not on
the chain.

## Sum bits

`sum_block` uses the usual QCA full-adder sum, three majority gates and two
inverters per bit:

```
s_i = M( ~c_{i+1},  c_i,  M(a_i, b_i, ~c_i) )
```

This equals a_i ^ b_i ^ c_i only when c_{i+1} is the true carry out of bit i,
so the sum block is correct only when fed by the carry block. From a carry to a
sum bit the path is two majority gates and one inverter. `novel_ripple_adder`
is the carry block plus the sum block: `{cout, s} = a + b + cin`.

## Subtraction

`operand_xor` forms `b ^ op` bit by bit. QCA has no XOR gate, so each bit is
`M( M(b, ~op, 0), M(~b, op, 0), 1 )`, an OR of two ANDs. With `op = OP_SUB`
(1) the adder computes a + ~b + 1 = a − b. The result's MSB is then the carry
of that addition: 1 when a ≥ b (unsigned, no borrow) and 0 when a borrow
occurred. The lower N bits are a − b modulo 2^N, which is also the correct
two's-complement difference of signed operands. There is no overflow flag.

## Timing: the four-phase clock

A QCA circuit is split into clock zones. Four clocks, 90° apart, take each
zone through switch, hold, release and relax. A value moves one zone per
phase, and every zone is reloaded once per clock cycle. A QCA circuit is
therefore a pipeline that takes new inputs every cycle and whose latency is
the number of zones crossed. The published layout of this 8-bit
adder-subtracter needs 12 phases. Internally, the first carry is ready after
5 phases and the carry reaches the MSB after 7, but only the 12-phase total is
modelled.

`clock_zone_pipeline` reproduces that timing with a synchronous clock whose
period is **one QCA clock cycle** (four phases). It delays the result and a
valid flag by ceil(LATENCY_PHASES / 4) cycles, which is 3 cycles for 12 phases.
It accepts one operation per cycle. The gate-level adder in front of it is
combinational, so the phases are not assigned to individual gates.

## Top level: `qca_adder_subtracter`

| port        | dir | width | meaning                                              |
|-------------|-----|-------|------------------------------------------------------|
| `clk`       | in  | 1     | one QCA clock cycle per period                       |
| `rst_n`     | in  | 1     | active-low, synchronous; clears the valid flags      |
| `in_valid`  | in  | 1     | `a`, `b`, `op` hold an operation this cycle          |
| `op`        | in  | 1     | `qca_pkg::op_e`: `OP_ADD` = 0, `OP_SUB` = 1          |
| `a`, `b`    | in  | N     | operands; subtraction computes a − b                 |
| `out_valid` | out | 1     | `result` is valid                                    |
| `result`    | out | N+1   | `{carry, sum}`                                       |

Parameters: `N` is the operand width. The default is 8, and N must be even
and non-zero. `LATENCY_PHASES` defaults to 12. An operation sampled at a rising
edge shows up on `out_valid`/`result` three rising edges later. Nothing ever
stalls: QCA has no back-pressure, and the model has none either.

Module tree:

```
qca_adder_subtracter
├── operand_xor          (majority_gate, qca_inverter)
├── novel_ripple_adder
│   ├── carry_block      (N/2 x carry_module_2bit -> majority_gate)
│   └── sum_block        (majority_gate, qca_inverter)
└── clock_zone_pipeline
```

`qca_pkg` holds the `op_e` type, the width (8) and the four phases per cycle.

## Where this RTL follows the published design and where it chooses

The RTL follows the published design in:
- Building everything from majority gates and inverters.
- The adder: 2-bit slices where one gate carries across two bits, run in
  ripple fashion.
- Subtraction: one operand XORed with the add/subtract control, and the
  control fed in as carry-in.
- The 8-bit width, the 9-bit output with the carry as MSB, and the 12-phase
  latency.

This design's own choices:
- The exact gate equations of the carry slice and the sum bit. These are the
  standard formulation of this adder family and have the stated properties:
  one gate per two bits of carry, and two gates plus an inverter from a carry
  to its sum.
- Complementing `b` rather than `a`, and the control polarity (1 = subtract).
- The XOR built as an OR of two ANDs.
- The valid flags and reset.
- Modelling the clock zones as a cycle-level delay line rather than
  assigning phases to gates.
- Treating the adder's own 8-phase latency as part of the 12-phase total.

A QCA cell and the clock field that drives it are physical devices, so there
is no RTL for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic computed in the testbench, and each prints
`TB_RESULT checks=… failures=…`.

- `tb_majority_gate`, `tb_qca_inverter`, `tb_carry_module_2bit`,
  `tb_operand_xor`: exhaustive.
- `tb_carry_block`, `tb_sum_block`, `tb_novel_ripple_adder`: exhaustive at
  8 bits (all 2^17 input combinations). The carry block and adder are also
  checked on random inputs at 16 and 32 bits, and the adder exhaustively at
  4 bits.
- `tb_clock_zone_pipeline`: a random stream with gaps, checking a latency of
  exactly 3 cycles at 12 phases and 2 cycles at 5 phases.
- `tb_qca_adder_subtracter`: the top at its default parameters. It applies
  all 131,072 combinations of a, b and operation back to back, with random
  idle cycles, and checks every result and its arrival cycle (3 cycles). It
  also counts additions, subtractions, mode switches, carry-outs,
  subtractions with and without borrow, carries rippling through all bits,
  back-to-back results and idle cycles, and fails if any count is zero.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_qca_adder_subtracter \
          rtl/qca_pkg.sv tb/tb_qca_adder_subtracter.sv
./obj_dir/Vtb_qca_adder_subtracter
```

Use the same command with another testbench name for the other modules.

## Changing the design

- **Width:** set `N` (even). The carry chain grows by one slice per two
  bits.
- **Latency:** set `LATENCY_PHASES` to match a different layout. A count
  that is not a multiple of four rounds up to whole cycles.
- **Subtracting from `b` instead:** move `operand_xor` onto `a` in
  `qca_adder_subtracter`.
