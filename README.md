# Carry select adder without multiplexers

A carry select adder (CSLA) splits a wide addition into groups. In the usual
form, each group adds its bits twice: once assuming the carry from below is 0,
and once assuming it is 1. A multiplexer then picks one result when the real
carry arrives. This speeds the carry up, but it almost doubles the adder
hardware.

This design computes each group only once, with carry in 0. When the real
carry arrives, it is added to that result by a short chain of AND and XOR
gates. That removes the second ripple-carry adder and the multiplexer, which
saves area and power but makes the carry path somewhat slower. All of the
design is combinational: there is no clock, reset or register.

## The correction chain

Let `b` be a group's N-bit sum with carry in 0, and `b_carry` that adder's
carry out. The group's true result is `{b_carry, b} + carry`, where `carry` is
the carry from the group below. Adding a single bit is an increment, so a
ripple of AND gates and one XOR per bit is enough:

```
s[0]   = carry
x[i]   = b[i] ^ s[i]          (i = 0 .. N-1)
s[i+1] = b[i] & s[i]
cout   = b_carry ^ s[N]
```

Bit i flips exactly when the incoming carry has propagated through all the
ones below it. `s[N]` is 1 only when `b` is all ones and `carry` is 1. An
N-bit adder cannot produce an all-ones sum together with a carry out, so
`b_carry` and `s[N]` are never both 1. The final XOR therefore behaves as an
OR. A deferred assertion in `csla_group` checks this in simulation. The 4-bit case gives this function table:

| b    | x, carry = 0 | x, carry = 1 |
|------|--------------|--------------|
| 0000 | 0000         | 0001         |
| 0001 | 0001         | 0010         |
| ...  | ...          | ...          |
| 1110 | 1110         | 1111         |
| 1111 | 1111         | 0000 (carry out 1) |

This circuit is `nomux_comb`. Together with the carry-in-0 ripple-carry adder
`rca_cin0`, it forms a group, `csla_group`.

## Group layout (square-root CSLA)

The group widths grow toward the top, so each group's carry-in-0 sum is ready
about when the carry from below reaches it. The 16-bit adder is split as
follows:

| Group | Bits    | Built from                                   | Carry in |
|-------|---------|----------------------------------------------|----------|
| 1     | [1:0]   | 2-bit ripple-carry adder (`rca`)             | `cin`    |
| 2     | [3:2]   | 2-bit carry-in-0 adder + correction chain    | c1       |
| 3     | [6:4]   | 3-bit carry-in-0 adder + correction chain    | c3       |
| 4     | [10:7]  | 4-bit carry-in-0 adder + correction chain    | c6       |
| 5     | [15:11] | 5-bit carry-in-0 adder + correction chain    | c10      |

Here `cN` is the carry into bit N+1. The carry out of group 5 is the adder's
`carry` output. Each carry-in-0 adder has a half adder in bit 0 and full
adders above it.

The same design is also described at 8, 32 and 64 bits, but only the 16-bit
split is given. For other values of `WIDTH`, `csla_pkg` continues the rule
(group 1 has 2 bits, group g has g bits) and cuts the last group to fit:

- 8 = 2+2+3+1
- 32 = 2+2+3+4+5+6+7+3
- 64 = 2+2+3+4+5+6+7+8+9+10+8

That extension is this design's own choice. A different split changes delay
and area, but not the result.

### Gate counts

Count every AND, OR and inverter as one gate: an XOR is 5, a half adder 6 and
a full adder 13. On that basis, the upper groups of the 16-bit adder cost:

| Group | Width | Carry-in-0 adder | Correction chain | Total |
|-------|-------|------------------|------------------|-------|
| 2     | 2     | 19               | 17               | 36    |
| 3     | 3     | 32               | 23               | 55    |
| 4     | 4     | 45               | 29               | 74    |
| 5     | 5     | 58               | 35               | 93    |

The published figures for this structure are 36, 55 and 74 for groups 2 to
4, which match. For group 5 the published figure is 87, although the same
counting gives 93. The RTL follows the published structure (five AND gates
and six XORs in group 5), not the 87.

## Modules

| Module        | Function |
|---------------|----------|
| `csla_pkg`    | Constant functions for the group layout: `num_groups`, `group_lo`, `group_w`. |
| `half_adder`  | One-bit half adder. |
| `full_adder`  | One-bit full adder. |
| `rca`         | N-bit ripple-carry adder with carry in. This is group 1. |
| `rca_cin0`    | N-bit ripple-carry adder with carry in 0: a half adder, then full adders. |
| `nomux_comb`  | The AND/XOR correction chain above. |
| `csla_group`  | `rca_cin0` followed by `nomux_comb`. |
| `csla_nomux`  | Top level. `WIDTH` (default 16); ports `a`, `b`, `cin`, `sum`, `carry`. |

The top has the following interface. All ports are combinational:

```
module csla_nomux #(parameter int unsigned WIDTH = 16) (
  input  logic [WIDTH-1:0] a, b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             carry);   // {carry, sum} = a + b + cin
```

## What follows the published design and what does not

These parts follow the published design:

- the 16-bit group split;
- the half-adder and full-adder layout of each group;
- the bit equations of the correction chain;
- the XOR on each group's carry out;
- the top-level port names.

These are this design's own choices:

- the group split for widths other than 16;
- the gate-level form of the half and full adder (only their function is
  given);
- the internal port names of `nomux_comb` (`b_carry`, `carry_out`);
- making everything purely combinational.

Synthesis results and delays in nanoseconds depend on a cell library, so
nothing here reproduces them. The speed advantage of the square-root layout
is also not checked: it only shows up as gate delay in a timed netlist,
because the simulation is zero-delay.

## Testbenches

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

- `tb_half_adder`, `tb_full_adder`: exhaustive tests.
- `tb_rca`: exhaustive at 2 and 6 bits.
- `tb_rca_cin0`: exhaustive at 4 and 1 bits.
- `tb_nomux_comb`: all 64 inputs of the 4-bit chain, checked against
  `{b_carry, b} + carry`.
- `tb_csla_group`: exhaustive at 2, 3, 4 and 5 bits.
- `tb_csla_nomux`: the 16-bit adder at its default parameters. It applies
  directed cases and 200,000 random operand pairs. It also checks that there
  are five groups. For every upper group, it counts how often a carry of 1
  arrived, how often the carry-in-0 adder carried, and how often the AND
  chain itself produced the carry. A mechanism that never occurred counts as
  a failure. A carry rippling through all 16 bits is also required.
- `tb_csla_widths`: the 8-, 32- and 64-bit adders with 50,000 random operand
  pairs each. It includes the all-ones case (`a = b = all ones`,
  `cin = 1`, giving all ones and a carry out).

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl +libext+.sv \
    rtl/csla_pkg.sv tb/tb_csla_nomux.sv --top-module tb_csla_nomux
./obj_dir/Vtb_csla_nomux
```

To lint the design:

```
verilator --lint-only -Wall -Irtl rtl/csla_pkg.sv rtl/csla_nomux.sv -GWIDTH=64
```
