# A 4-2 compressor whose carry-out never waits for its carry-in

A 4-2 compressor takes four bits of the same weight, plus one carry bit from
its right-hand neighbour, and squeezes them into one bit of that weight and two
bits of the next weight up:

    I1 + I2 + I3 + I4 + Cin  =  Sum + 2 * (Carry + Cout)

A row of these cells turns four partial-product rows of a parallel multiplier
into two, which is why the reduction tree of such a multiplier is built mostly
out of them. Most of the multiplier's delay is spent there.

The textbook cell is two full adders in series. Its `Cout` depends on the first
adder only, but its `Sum` and `Carry` sit behind both adders. This design
splits the two upper-weight outputs in a different way, so that each output is
a short, shallow function. It was conceived as a pass-transistor circuit:
transmission gates, plus single switches where only one logic level has to be
passed, built in 32 nm carbon-nanotube FETs. Here it is given as synthesizable
SystemVerilog. The RTL keeps the circuit's structure one sub-circuit per
module, so each module can be compared with the circuit it stands for.

## The output split

With `E` the parity of the four inputs and `F` their AND:

| output  | function                                   | depends on Cin? |
|---------|--------------------------------------------|-----------------|
| `Sum`   | `I1 ^ I2 ^ I3 ^ I4 ^ Cin`                  | yes             |
| `Cout`  | 1 when at least two of `I1..I4` are 1      | **no**          |
| `Carry` | `F \| (E & Cin & ~F)`                      | yes             |

Why this adds up. Let `k` be the number of ones among `I1..I4`:

| k | Cout | Carry | Sum     | Sum + 2(Carry+Cout) |
|---|------|-------|---------|---------------------|
| 0 | 0    | 0     | Cin     | Cin                 |
| 1 | 0    | Cin   | ~Cin    | 1 + Cin             |
| 2 | 1    | 0     | Cin     | 2 + Cin             |
| 3 | 1    | Cin   | ~Cin    | 3 + Cin             |
| 4 | 1    | 1     | Cin     | 4 + Cin             |

So `Cout` is "two or more", and `Carry` supplies the second upper-weight bit
in two cases only. One is an odd count with `Cin` set. The other is all four
inputs set, which the `F` term covers (`E` is 0 then).

Since `Cout` ignores `Cin`, a row of cells cannot ripple. Stage `j+1`'s carry-in
is final as soon as stage `j`'s own four inputs are. The longest path in a row
of any length is one `Cout` followed by one `Sum` or `Carry`.

This split is not the one used by the earlier "modified truth table" designs
the circuit improves on. For example, with `I1=I2=0` and `I3=I4=1` they put the
upper bit on `Carry`, while this cell puts it on `Cout`. Both satisfy the
weight equation. But a cell following this split is not interchangeable bit
for bit with a cell following another one, so keep one split throughout a row.

## The sub-circuits

### Sum: `sum_gen`, using `tg_mux2` and `xor_xnor`

Three pass-gate levels:

1. Two multiplexers (`tg_mux2`) compute `I1 xnor I2` (select `I2`, data `~I1`
   and `I1`) and `I3 xnor I4` (select `I4`, data `~I3` and `I3`).
2. A dual-rail XOR/XNOR gate combines them. The XOR output is the four-input
   parity `E`, because the two inversions cancel. The XNOR output is `~E`.
3. A last multiplexer, selected by `~Cin`, passes `~E` on input 0 and `E` on
   input 1. The result is `Sum = E ^ Cin`.

In the transistor circuit this is the critical path: one transmission gate,
two stacked transistors in the XOR, one transmission gate, four transistors in
total. `E` is brought out of `sum_gen` because the Carry circuit reuses it.

*Departure.* The published schematic labels the input-0 leg of the last
multiplexer `E`, and its select `~Cin`. Read literally, that would give the
complement of the five-input parity. The RTL follows the Sum equation instead:
input 0 carries `~E`. The structure is unchanged.

### Carry control: `carry_ctrl`

`F = I1 & I2 & I3 & I4`, built from the complemented inputs as
`NAND(NOR(~I1,~I2), NOR(~I3,~I4))`. That NAND gives `~F`, and an inverter gives
`F`, so both polarities can drive the pass gates downstream. The inverter is an
assumption: only the two outputs are specified.

### Carry: `carry_gen`

Two pass stages:

1. The node gets `E` while `Cin` is 1 (transmission gate), and is pulled to 0
   while `Cin` is 0 (one switch).
2. `Carry` follows that node while `F` is 0 (transmission gate), and is pulled
   to 1 while `F` is 1 (one switch).

`f` and `f_n` are both ports. The logic assumes they are complements.

### Cout: `cout_gen`

This is a multiplexer tree on `I1` and `I2`, whose leaves are functions of `I3`
and `I4`. Each leaf is a transmission gate passing `I4`, plus one switch for
the constant:

| I1 | I2 | Cout          |
|----|----|---------------|
| 0  | 0  | `I3 & I4`     |
| 0  | 1  | `I3 \| I4`    |
| 1  | x  | `I2 \| I3 \| I4` |

The schematic draws the `I3 | I4` node twice, once per branch. The RTL shares
one node. The gate polarity of each switch is not printed in the schematic.
The polarities used here are the ones that make the tree compute "two or
more", which is the function the cell is specified to have.

### The cell: `compressor_4_2`

The cell wires together `sum_gen`, `carry_ctrl`, `carry_gen` and `cout_gen`.
It is purely combinational: no clock, no reset, no state.

### The row: `compressor_chain` (top)

The row has `STAGES` cells. Stage `j` takes bit `j` of the four operands, and
its `Cout` is the `Cin` of stage `j+1`. The row computes

    A + B + C + D + cin = sum + (carry << 1) + (cout << STAGES)

The default `STAGES = 2` reproduces the two-cell setup used to measure the
critical path: inputs, then `Cout` of the first cell, then `Carry` of the
second. The input and output buffers of that setup balance electrical load
only, and are not part of the RTL. For a reduction tree, set `STAGES` to the
row width.

| port             | dir | width    | meaning                                |
|------------------|-----|----------|----------------------------------------|
| `i1 i2 i3 i4`    | in  | STAGES   | the four operands, bit j to stage j    |
| `cin`            | in  | 1        | carry into stage 0                     |
| `sum`            | out | STAGES   | weight 2^j                             |
| `carry`          | out | STAGES   | weight 2^(j+1)                         |
| `cout`           | out | 1        | Cout of the last stage, weight 2^STAGES|

## What the RTL does not carry over

The circuit's claims are transistor-level, and none of them can be checked in
RTL:

- 58 transistors;
- a critical path of four transistors;
- about 116 ps and 474 nW at 0.6 V in CNTFET 32 nm, against 134 ps and 1065 nW
  in bulk CMOS 32 nm;
- the supply and temperature sweeps;
- noise margins of 0.28 V.

The RC delay model of the Sum path (total delay about 4RC) is likewise outside
RTL. Synthesis maps these modules to ordinary gates; to get the
pass-transistor benefit you need a custom netlist. The RTL fixes the logic
function and the decomposition such a netlist must implement.

The multiplier around the compressor is not part of this design: the
partial-product generator, the reduction tree built from many rows, and the
final adder.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops early if its watchdog expires. The
expected values come from counting ones, not from the equations in the RTL.

- `tb_tg_mux2`, `tb_xor_xnor`, `tb_carry_ctrl`, `tb_carry_gen`, `tb_cout_gen`
  and `tb_sum_gen` apply every input combination.
- `tb_compressor_4_2` checks all 32 input combinations. It checks the weight
  equation, `Sum` and `Cout` individually, and that `Cout` does not change when
  only `Cin` does.
- `tb_compressor_chain` checks the row at its default size. It applies all 512
  input combinations and checks the row identity and the per-stage outputs. It
  also checks that toggling `cin` changes nothing above stage 0. It counts how
  often each mechanism occurs: `Carry` forced by four ones, `Carry` from parity
  and `Cin`, a `Cout` feeding the next stage, and a `cin` toggle. If one of
  them never occurs, the test fails.
- `tb_compressor_chain_wide` checks a 16-stage row with 20 000 random operand
  sets plus the all-zero and all-one corners.

To simulate a testbench with Verilator (run from the directory holding `rtl/`
and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb tb/tb_compressor_chain.sv \
              --top tb_compressor_chain -Mdir obj
    ./obj/Vtb_compressor_chain

To lint the top:

    verilator --lint-only -Wall -Irtl rtl/compressor_chain.sv

Every testbench runs in well under a second.
