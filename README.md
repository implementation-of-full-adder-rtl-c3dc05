# Quaternary full adders: three circuit styles in SystemVerilog

A quaternary (radix-4) full adder adds two digits in 0..3 and a carry in 0..1:

    x + y + cin = 4 * cout + sum

In a voltage-mode multiple-valued circuit, each digit is one wire at 0 V, 1 V,
2 V or 3 V. One wire then carries as much as two binary wires, so there are
fewer interconnections. The cost is that the adder must tell levels apart and
switch them to its output. This RTL models three ways of building such an
adder at the logic level:

| adder | idea | module |
|---|---|---|
| MIN/MAX adder | two quaternary half adders made of MIN, MAX and inverter gates; a MAX gate merges their carries | `qfa_proposed` |
| Type I | decode each operand into four one-hot lines; add the carry in to one operand's code ("pre-addition"); a barrel shifter of pass-transistor pairs picks the output level | `qfa_type1` |
| Type II | encode each operand into two binary lines, decode those into four code lines, and let the codes steer pass-transistor sum and carry blocks | `qfa_type2` |

All three compute the same function. The top level, `qfa_top`, puts them side
by side, and each adder has its own ports. Everything is combinational, with
no clock and no reset. The outputs follow the inputs in the same simulation
step.

The model captures what each circuit decides: which line is active, and
which supply level reaches the output. It has no voltages, thresholds,
transistor counts, power or delay. Those are the properties the circuit
styles are usually compared on, and this RTL cannot compare them.

## How signals are represented

`qlogic_pkg` defines the shared types:

- `qdigit_t` (2 bits) is one quaternary wire. Its value is the voltage level,
  0..3.
- `qcode_t` (4 bits) is a group of four code lines. A code line only ever
  sits at 0 V or 3 V, so each line is one bit, with 1 standing for 3 V. Line
  `k` is high when the encoded digit is `k`.
- A carry is a single `logic` bit. It is 0 or 1, which is also the voltage
  level (0 V or 1 V) of the carry wire.

A pass-transistor network drives one output wire from many paths. Exactly one
path conducts at any time, so the shared wire is modelled as the OR of what
the conducting paths carry.

The one-hot rule is checked in the RTL. The sum and carry blocks of Type I
and Type II each hold an assertion, and it fails the simulation if either
input code does not have exactly one active line (`qlogic_pkg::is_onehot`).

The down literal circuit `dlc #(K)` is the level detector used throughout.
Its output is high when the input level is below `K`. DLC1, DLC2 and DLC3 are
its instances with `K` = 1, 2 and 3.

## The MIN/MAX adder (`qfa_proposed`)

    (s1, c1)  = QHA(x, y)
    (sum, c2) = QHA(s1, cin)
    cout      = MAX(c1, c2)

`c1` and `c2` are never both 1. When `x + y >= 4`, `s1` is at most 2, so
`s1 + cin < 4`. MAX therefore acts as an OR of the two carries.

The half adder `qha` uses only the three fundamental gates: MIN (`qmin`),
MAX (`qmax`) and the inverter `qinv` (`y = 3 - x`). Its arrangement is the
textbook sum-of-products form of multiple-valued logic:

1. `q_literals` makes the four literals of each input. `J_k(x)` is 3 when
   `x == k` and 0 otherwise. They are built from DLC1-DLC3, inverters and
   MIN gates: `J_0 = DLC1`, `J_1 = MIN(DLC2, INV DLC1)`,
   `J_2 = MIN(DLC3, INV DLC2)`, `J_3 = INV DLC3`.
2. For each of the 16 input pairs `(i, k)`, `MIN(J_i(a), J_k(b))` is 3
   exactly when `a == i` and `b == k`. MIN-ing it with the constant level
   `(i+k) mod 4` (or `(i+k) / 4` for the carry) gives a term that is either
   0 or the table entry.
3. A chain of 16 MAX gates merges the terms.

The circuit style names these gates but does not give their arrangement, so
this construction is this design's own.

## Type I: one-hot codes and carry pre-addition (`qfa_type1`)

This adder takes the most explaining.

**Decoding.** `t1_onehot_enc` turns a level into four one-hot lines. It uses
three DLCs, two XORs and one inverter:
`H0 = DLC1`, `H1 = DLC1 ^ DLC2`, `H2 = DLC2 ^ DLC3`, `H3 = ~DLC3`.

**Pre-addition.** Operand Y goes through `t1_onehot_preadd` instead. It
decodes the same way, but when `cin = 1` every line moves up one place, and
line 3 wraps round to line 0. The sum block then sees `(y + cin) mod 4` and
never needs a third input. Each output line is a 2:1 choice between the
plain line and its lower neighbour, steered by `cin` and its complement.

| Y | code, cin = 0 | code, cin = 1 |
|---|---|---|
| 0 | B0 | B1 |
| 1 | B1 | B2 |
| 2 | B2 | B3 |
| 3 | B3 | B0 |

**Sum block (barrel shifter).** `t1_sum_block` is a 4x4 grid of series
switch pairs. The pair on lines `Ai` and `Bk` connects supply level
`(i + k) mod 4` to SUM:

|        | GND | Vdd/3 | 2Vdd/3 | Vdd |
|--------|-----|-------|--------|-----|
| A0 row | B0  | B1    | B2     | B3  |
| A1 row | B3  | B0    | B1     | B2  |
| A2 row | B2  | B3    | B0     | B1  |
| A3 row | B1  | B2    | B3     | B0  |

**Carry block.** `t1_carry_block` passes a carry when the pre-added code
line of B, gated by the A lines, shows `A + B >= 4`:

- B1 when A3
- B2 when A2 or A3
- B3 when A1, A2 or A3
- B0 never

Pre-addition has a catch: `y = 3` with `cin = 1` lands on line B0, and that
carry would be lost. A fifth path carries it instead. This path is the plain
(not pre-added) "Y is 3" line gated by `cin`, and an OR gate adds it in. That
is why `t1_onehot_preadd` also brings out its plain code, `h_raw`.

## Type II: binary encoding and code lines (`qfa_type2`)

- `t2_encoder` splits a level into two binary lines:
  - `xp = DLC1 xor DLC3`, high for levels 1 and 2.
  - `xq` passes the level through two binary inverters in series. It is high
    for levels 2 and 3.

  The pair `(xq, xp)` is therefore a Gray code: 00, 01, 11, 10.
- `t2_code_gen` decodes the pair back into four code lines. It uses two
  inverters and four AND gates: `H0 = ~p&~q`, `H1 = p&~q`, `H2 = p&q`,
  `H3 = ~p&q`.
- In `t2_sum_block`, lines `Hx_i` and `Hy_k` connect level
  `(i + k + cin) mod 4` to the output.
- In `t2_carry_block`, they pass carry 1 when `i + k + cin >= 4`.

## Top level (`qfa_top`)

| ports | adder |
|---|---|
| `p_x`, `p_y` (`qdigit_t`), `p_cin` → `p_sum`, `p_cout` | MIN/MAX adder |
| `t1_x`, `t1_y`, `t1_cin` → `t1_sum`, `t1_cout` | Type I |
| `t2_x`, `t2_y`, `t2_cin` → `t2_sum`, `t2_cout` | Type II |

The top has no parameters. To add numbers of more than one digit, chain
digit slices so that each `cout` drives the next slice's `cin`.

## What follows the circuit descriptions and what is this design's choice

Taken from the circuit descriptions:

- the three adder structures and their block split
- the Type I code tables and the pre-addition
- the barrel-shifter grid
- the gating pattern of the Type I carry block and its OR-gate path for Y = 3
- the parts lists of the two encoders (which DLCs, XORs and inverters)
- the four-AND code generator
- the sum and carry truth tables

This design's own choices:

- **Representation.** Levels are 2-bit digits, code lines and carries are
  single bits, and wired pass-transistor outputs are ORs.
- **Gates.** The DLC switching rule (high below K) and the inverter
  (`3 - x`) are the usual multiple-valued definitions.
- **Gate wiring.** The Type I decoder and the Type II encoder and code
  generator are wired so that they produce the tables above. Only the parts
  lists are given for them.
- **Half adder insides.** The MIN/MAX sum-of-products form inside `qha` is
  this design's own.
- **Type II carry in.** The circuit gives the Type II sum and carry tables
  without a carry in. Here the carry in is fed to both blocks: it moves the
  sum up one level and counts towards the carry. With `cin = 0` the blocks
  give exactly the stated tables.
- **Carry width.** Carries are 1-bit on all three adders, so any adder's
  `cout` can drive any adder's `cin`.

The supply rails themselves (0 V, 1 V, 2 V, 3 V) are not modelled. Each
becomes the constant digit it stands for.

## Simulating

Every testbench in `tb/` checks its outputs against values it computes
itself. Each ends by printing `TB_RESULT checks=N failures=M`. For example,
to run the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/qlogic_pkg.sv \
        tb/tb_qfa_top.sv --top-module tb_qfa_top -Mdir obj_top
    ./obj_top/Vtb_qfa_top

Swap the testbench name to run any other. Verilator finds the modules the
testbench uses in `rtl/` by their file names. The package must be given
first.

What the testbenches cover:

- **Unit testbenches** (`tb_<module>`) are exhaustive: every input level,
  every pair of code lines, and all 32 `(x, y, cin)` combinations for the
  adders.
- **`tb_qfa_top`** applies all 32 combinations to the three adders at once
  and also checks that they agree with each other. It then uses each adder
  as a digit slice for 200 additions of random 8-digit (16-bit) numbers, and
  compares the results with binary addition. One of these additions is an
  all-threes operand with carry in 1, a full-length carry chain.
- **Mechanism counts.** `tb_qfa_top` also counts how often each mechanism
  occurs and fails if any never does: Type I pre-addition and its OR-gate
  carry path, a carry from either half adder, every Type II code line, and a
  carry out of each adder.

## Files

- `rtl/qlogic_pkg.sv`: shared types
- `rtl/dlc.sv`, `rtl/qmin.sv`, `rtl/qmax.sv`, `rtl/qinv.sv`: fundamental
  gates
- `rtl/q_literals.sv`, `rtl/qha.sv`, `rtl/qfa_proposed.sv`: MIN/MAX adder
- `rtl/t1_*.sv`, `rtl/qfa_type1.sv`: Type I adder
- `rtl/t2_*.sv`, `rtl/qfa_type2.sv`: Type II adder
- `rtl/qfa_top.sv`: top level
- `tb/tb_*.sv`: one self-checking testbench per module, plus `tb_qfa_top`
