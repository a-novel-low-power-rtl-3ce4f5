# Low-power 1-bit ALU from transfer-gate function units

This is a one-bit arithmetic logic unit meant as the slice from which wider
ALUs are built. It cuts power by cutting transistors. Most of its function
units are made of transfer gates (pass transistors) instead of complementary
pull-up and pull-down networks. Several of them use no supply or ground
connection at all. At circuit level the whole ALU is counted at 30 transistors,
against 72 for a conventional static CMOS version.

This RTL models the logic of that ALU: its eight function units, the output
multiplexer and the two carry pins. The transistor-level properties that make
it low power cannot be expressed in two-valued RTL. These are the transistor
count, the reduced output swing and the missing supply. They are described
below only so that you know what the gates stand for.

## Structure

```
          +-> full_adder  --sum--> d[0] -+
          |        \--carry---------------------------> carryout
 a, b,    +-> and_gate    ------> d[1]   |
 cin  ----+-> or_gate     ------> d[2]   |
          +-> xnor_gate   ------> d[3]   +-- mux8 --> result
          +-> xor_gate    ------> d[4]   |    ^
          +-> inverter(a) ------> d[5]   |    | sel[2:0]
          +-> multiplier  ------> d[6]   |
          +-> incrementor --sum--> d[7] -+
                   \--carry---------------------------> carryinc
```

All eight units work in parallel on every input change. Three select lines
steer one unit's output through an 8-to-1 multiplexer to `result`. The two
carries bypass the multiplexer and are always driven: `carryout` carries
A + B + CIN and `carryinc` carries A + 1. This holds even while another
function is selected, so a user who wants a carry only for the selected
function must qualify it with `sel`.

## Function table

| `sel` | name (`alu_pkg::alu_op_e`) | `result`            | note                   |
|-------|----------------------------|---------------------|------------------------|
| 000   | `OP_ADD`                   | A xor B xor CIN     | carry on `carryout`    |
| 001   | `OP_AND`                   | A and B             |                        |
| 010   | `OP_OR`                    | A or B              |                        |
| 011   | `OP_XNOR`                  | not (A xor B)       |                        |
| 100   | `OP_XOR`                   | A xor B             |                        |
| 101   | `OP_INV`                   | not A               | B and CIN unused       |
| 110   | `OP_MUL`                   | A x B (one bit)     | equal to A and B       |
| 111   | `OP_INC`                   | not A (sum of A+1)  | carry on `carryinc`    |

`carryout` = majority(A, B, CIN) and `carryinc` = A, for every `sel`.

The select codes are this design's own numbering. The original design names
three select lines but gives no code table. The codes follow the order in
which the units are drawn from top to bottom in its block diagram. To change
the numbering, edit the enum in `rtl/alu_pkg.sv`. `alu1` indexes the
multiplexer inputs by the enum, so nothing else needs to change.

## How the transfer-gate units compute

Each of these units is a 2-to-1 selection where one of the inputs also acts as
the select. The RTL writes each unit in that selection form, so the code reads
like the circuit.

- **AND** (`and_gate`): the select is tied to IN0. If IN0 = 1, IN1 passes. If
  IN0 = 0, IN0 passes, and it is 0. So the output is IN0 and IN1, from two
  transistors with no supply or ground.
- **OR** (`or_gate`): the select is tied to IN1. If IN1 = 1, IN1 passes, and
  it is 1. If IN1 = 0, IN0 passes. So the output is IN0 or IN1.
- **XOR / XNOR** (`xor_gate`, `xnor_gate`): four transistors in two
  transfer stages, both controlled by B. The XOR has a VDD connection and no
  ground. The XNOR has a ground connection and no supply. The RTL models each
  as one selection on B that passes A either unchanged or complemented. The
  exact transistor wiring is not reproduced.
- **Incrementor** (`incrementor`): adding 1 to one bit gives sum = not A and
  carry = A. A transfer gate controlled by A passes either the supply or
  ground to `carryinc`. A standard CMOS inverter makes the sum, which also
  restores a full output swing. That is four transistors, where the
  conventional two-AND-gate incrementor needs ten.
- **Inverter** (`inverter`): a plain two-transistor CMOS inverter, kept
  because it gives full swing. In this ALU it inverts A.
- **Full adder** (`full_adder`): the design reuses an existing
  multiplexer-based transfer-gate adder. It is written here in the usual
  multiplexer form: p = A xor B selects ~CIN or CIN for the sum, and CIN or A
  for the carry.
- **Multiplier** (`multiplier`): for one-bit operands the product is one
  partial-product bit, A x B, written as "B if A, else 0". Only one output
  leaves this unit.
- **Multiplexer** (`mux8`): a three-level tree of 2-to-1 selections, with
  select bit 0 at the leaves.

### What the RTL cannot show

A gate without supply and ground drives its output only through the pass
transistors. That has three effects:

- an nMOS passing 1 or a pMOS passing 0 gives a degraded level;
- there are small overshoots at the switching edges;
- with no pull-down network, such a gate cannot make a strong logic 0 of its
  own.

For these reasons the transfer-gate gates are meant to be driven by gates that
already give clean levels. The recommended arrangement puts an inverter at the
input, which gives defined levels to a series chain of three or more such
gates, and another inverter at the output to restore full swing. In this RTL every signal is an ideal 0 or 1.
Level restoration, timing and power therefore appear nowhere. Synthesising
this RTL to a standard-cell library gives ordinary static CMOS, not the
transfer-gate circuit.

## Where this RTL departs from, or adds to, the original design

- The select encoding is this design's own choice (see above).
- The inverter works on A. The original names an inverter unit with one
  input but does not say which operand feeds it.
- The multiplier, full adder and multiplexer are given only by their
  function. Their internal form is this design's choice.
- The XOR and XNOR internals are modelled as one selection each, not as the
  four-transistor circuit.
- The carries are ungated, as the block diagram draws them.
- There is no clock, register or reset, because the original has none. The
  ALU is purely combinational.
- The design is a single bit. The original presents it as the basis of a
  bit-sliced multi-bit ALU but does not define one: no width, no carry chain
  between slices, and no multi-bit meaning for the incrementor or the
  multiplier. So no multi-bit version is provided.

## Files

- `rtl/alu_pkg.sv`: the select enum `alu_op_e` and `NUM_OPS`.
- `rtl/alu1.sv`: top level, the 1-bit ALU.
- `rtl/mux8.sv`, `rtl/full_adder.sv`, `rtl/and_gate.sv`, `rtl/or_gate.sv`,
  `rtl/xor_gate.sv`, `rtl/xnor_gate.sv`, `rtl/inverter.sv`,
  `rtl/multiplier.sv`, `rtl/incrementor.sv`: the units.
- `tb/tb_<unit>.sv`: one self-checking testbench per module.

Every testbench compares the outputs with values computed independently of
the RTL. Those values come from integer arithmetic or from truth tables
written in the testbench. Each run ends with the line
`TB_RESULT checks=N failures=M`.

`tb_alu1` runs all 64 combinations of select code and operands, then 2000
random vectors. It checks `result`, `carryout` and `carryinc` on every
vector. It also counts how often each function was selected and how often
each carry pin went high while another function was selected, and it fails
if any of these never happened.

## Simulating

Verilator 5 with timing support is enough. For example, for the top level:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/alu_pkg.sv rtl/mux8.sv rtl/full_adder.sv rtl/and_gate.sv rtl/or_gate.sv \
    rtl/xor_gate.sv rtl/xnor_gate.sv rtl/inverter.sv rtl/multiplier.sv \
    rtl/incrementor.sv rtl/alu1.sv tb/tb_alu1.sv --top-module tb_alu1
./obj_dir/Vtb_alu1
```

A unit testbench needs only its own module, plus `rtl/alu_pkg.sv` when it
uses the enum:

```
verilator --binary --timing rtl/full_adder.sv tb/tb_full_adder.sv --top-module tb_full_adder
```

To lint, run `verilator --lint-only -Wall -y rtl rtl/alu_pkg.sv rtl/alu1.sv`.
It finds the unit files through `-y`. The testbenches use `$urandom`, and each one has a
watchdog that ends the run with a failure if the test hangs.
