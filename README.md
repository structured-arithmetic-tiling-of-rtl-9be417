# Structured arithmetic tiles: digit-set adders without carry propagation

This RTL builds adders and small multipliers from a fixed set of tiny
*operator tiles*. Each tile takes a few digits of one weight, and sometimes
a neighbour weight, and puts the same value back out in fewer wires. The
method is Robertson's theory of decomposition as used in structured
arithmetic tiling. It describes every number as a weighted sum of small
*digit sets*. It then rewrites that sum, tile by tile, until no redundant
information is left. A redundant carry-generator's carry never depends on a
neighbouring tile, so adding a row of ternary digits takes a fixed number of
tile levels, whatever the word length.

The main design is **Input-Level-2**, a radix-16 digit-slice adder from a
variable-precision processor. It adds two digits in the range -10..+10 and a
weight-4 digit in -1..+1 into a result in -24..+24, using nine tiles in five
levels. Next to it sits a **three-bit unsigned adder**, the method's
introductory example. The top also holds one tile of each remaining operator
family: inverse operators, conditional complementers and elementary
multipliers.

Everything is combinational. There are no clocks, resets or handshakes.

## Digit sets and how they are coded

A digit set is a run of consecutive integers that includes 0. Two numbers
describe it: δ, the diminished cardinality (size minus one), and ω, the
offset (how far its smallest element lies below zero). The superscript in
the names below is ω.

| name | values   | wires | code used in this RTL |
|------|----------|-------|------------------------|
| a^0  | {0, 1}   | 1     | bit v means v |
| a^1  | {-1, 0}  | 1     | bit v means v - 1 |
| b^0  | {0, 1, 2}  | g, e | 2g + e (g = e = 1 never occurs) |
| b^2  | {-2, -1, 0} | g, e | 2g + e - 2 (g = e = 1 never occurs) |
| b^1  | {-1, 0, 1} | g, e | e = 0: zero; e = 1: -1 if g = 1, +1 if g = 0 |

`g` and `e` are Robertson's "Greek" and "English" variables, and
`sat_pkg::tern_t` is the struct `{g, e}`. A weighted sum such as
`8a^1 + 4b^0 + 2a^1 + b^0` is a number. Its δ is the weighted sum of the
digit δs (8+8+2+2 = 20) and its ω the weighted sum of the offsets
(8+2 = 10), so it covers -10..+10.

**Why the codes matter.** For a^0, a^1, b^0 and b^2 the wires hold the
*offset code*, value + ω. A tile's equation is balanced in ω
(`ω_in = ω_out`), so the offsets cancel and the same gates serve every
offset. HA0 and HA2 are one circuit, and so are CG0, CG1a, CG2b and CG3,
and RCG0 and RCG4. b^1 is different: zero has two codes, and
tiles that take or give a b^1 digit need their own gates. `sat_pkg` has
three helpers for this:

* `b1_to_code`: turns a b^1 digit into its offset code (+1→2, 0→1, -1→0).
* `code_to_b1`: turns an offset code back into a b^1 digit.
* `code_mirror`: maps code k to 2 - k. This negates a value while swapping
  ω = 0 and ω = 2.

The wire-level code is not spelled out with the published equations. The
assignment above is this design's, chosen to match as many of the printed
gate equations as possible. See *Departures* below.

## The operator tiles

Each family is one module. A parameter of enum type (from `sat_pkg`) selects
the named operator. In every set-equation the value on the left equals the
value on the right for all legal inputs, and the testbenches check exactly
this.

| module | operators | set-equation shape | what it does |
|--------|-----------|--------------------|--------------|
| `sat_half_adder` | HA0, HA1, HA2 | b ⇐ a + a | two bits into one ternary digit, no loss |
| `sat_carry_gen` | CG0, CG1a, CG1b, CG2a, CG2b, CG3 | 2a + a ⇐ b + a | ternary + bit into carry + bit; loses information |
| `sat_rcg` | RCG0, RCG1, RCG2a–d, RCG3, RCG4 | 2a + b ⇐ b + b | ternary + ternary into carry + ternary; the carry depends only on the two inputs |
| `sat_inv_half_adder` | IHA0–2 | a + a ⇐ b | splits a ternary digit |
| `sat_inv_carry_gen` | ICG0–3 | b + a ⇐ 2a + a | moves a carry back down as a ternary digit |
| `sat_inv_rcg` | IRCG0–4 | b + b ⇐ 2a + b | the same for a ternary digit; IRCG2a turns a radix-4 digit d^2 = 2a^1 + b^0 into two b^1 digits |
| `sat_cond_comp` | CC2, CC4 | b^1 ⇐ ±b^1, d^2 ⇐ ±d^2 | negates when `sigma` = 1 (subtraction by adding the complement) |
| `sat_mpy_bin` | MPY1.0a, 1.0b, 1.1 | a ⇐ a · a | one-bit products |
| `sat_mpy_tern` | MPY2.0a, 2.0b, 2.1a, 2.1b, 2.1c, 2.2a, 2.2b | b ⇐ b · a (2.1c: b^1 · b^1) | ternary-by-bit products |
| `sat_mpy_tern2` | MPY4.0a, 4.0b, 4.4a, 4.2a, 4.2b, 4.2c | 2a + b ⇐ b · b | ternary-by-ternary products; MPY4.2a is the b^1-by-d^2 multiplier |

Each file's header lists the exact equation of every variant and its logic.
Some choices are free:

* **Redundant carry.** A sum of 2 can go out as carry 1 with digit 0, or as
  carry 0 with digit 2. The RCG carries follow the published carry
  equations. RCG0 and RCG4 carry when either input is 2. RCG2c carries
  when its b^2 input is 2 (code), or is 1 and the other input is nonzero;
  RCG2d does the same keyed on its b^0 input. RCG1 carries when the b^0
  input is 2, or is 1 and the b^1 input is +1. RCG3 carries when the b^2
  input is 2 (code) or the b^1 input is +1. RCG2a and
  RCG2b carry when the first input is +1, or when it is 0 and the second is
  +1. The residual digit is worked out from the carry.
* **Multiplier zero.** The b^1 multipliers (MPY4.2x) code a zero product as
  carry 1 (value 0 for a^1) with digit 0.
* **Port order.** Ports are ordered as the set-equation writes its operands.
  Exceptions are noted in the headers: for HA1, `a1` is the a^1 digit; for
  RCG1 and RCG3, `x2` is the b^1 digit; for IRCGs, `b1` is the copied digit
  and `b2` is built from the carry.

## Input-Level-2

```
16b^1 + (8a^1 + 4a^0 + 2a^0 + b^0)  <=  4b^1 + (8a^1 + 4b^0 + 2a^1 + b^0)
                                            + (8a^1 + 4b^0 + 2a^1 + b^0)
```

Both sides have δ = 48 and ω = 24, so the result is exact and needs no
carry-in or carry-out. The `m4` input (4b^1) is 0 for addition and
subtraction. The multiplication step uses it to bring in one more digit.
Tiles, by level (weights in brackets):

```
level 1   HA2[8](x.a8,y.a8)   RCG1[4](x.b4,m4)   HA2[2](x.a2,y.a2)   RCG0[1](x.b1,y.b1)
             |8b^2              |8a^0  |4b^1        |2b^2              |2a^0    |b^0 -> r.b1
level 2   CG2b[8](8b^2,8a^0)  RCG1[4](y.b4,4b^1)  CG2b[2](2b^2,2a^0)
             |16a^1 |8a^0       |8a^0  |4b^1        |4a^1   |2a^0 -> r.a2
level 3   HA0[8](8a^0,8a^0)   CG2a[4](4b^1,4a^1)
             |8b^0              |8a^1  |4a^0 -> r.a4
level 4   CG1a[8](8b^0,8a^1)
             |16a^0  |8a^1 -> r.a8
level 5   HA1[16](16a^1,16a^0) -> r.b16
```

The slowest path runs from the weight-1 digits through RCG0, CG2b (weight
2), CG2a (weight 4) and CG1a (weight 8) to HA1 (weight 16): five tiles. The
two operands can be swapped; `x.b4` enters the first RCG1 and `y.b4` the
second. Operands and result are packed structs, `il2_operand_t` and
`il2_result_t`, in `sat_pkg`.

An assertion (`assert final`, checked once the inputs settle) reports an
operand digit that carries the unused b^0 code g = e = 1. The tiles would
read such a code as a wrong value.

## Three-bit adder

`sat_add3` adds two N-bit unsigned numbers (N = 3 by default) and a weight-1
bit `cin`. Two 3-bit numbers have δ = 14 and a 4-bit sum has δ = 15, so the
equation only balances with one extra a^0 input. That input is the
"mythical" input: tie it to 0 for plain addition, or use it as a carry-in.
Each weight has one HA0 and one CG0, and the carry ripples through them.
This decomposition is this design's choice. The source example stops at the
balanced set-equation.

## Top level

`sat_top` holds Input-Level-2 (`il2_*`), the three-bit adder (`add3_*`) and
seven stand-alone tile slots (`iha_*`, `icg_*`, `ircg_*`, `cc_*`, `mpy1_*`,
`mpy2_*`, `mpy4_*`). Each slot has its own ports and a parameter that
selects the operator. The defaults are IHA0, ICG0, IRCG0, CC4, MPY1.0a,
MPY2.0a and MPY4.2a. The slots exist because the larger arrays these tiles
were meant for (the processor's multiplier levels) are not specified in
enough detail to build.

## Departures from the published equations

The set-equations are the specification. This RTL follows the published
gate equations wherever they satisfy the set-equations under the code
above. Elsewhere, the gates were derived from the set-equation:

* **HA1 and IHA1.** The b^1 output is g = NOT a^1, e = XNOR(a^1, a^0)
  (printed: g = a^1, e = XOR). IHA1's a^1 output is NOT g.
* **CG1b and CG2a.** The carry is the printed one. The sum bit is an XNOR
  (printed: XOR).
* **Redundant carry-generators.** The residual ternary digits were derived
  from the carry rules above.
* **Unbalanced set-equations, rebalanced.** RCG1 is built as
  2a^0 + b^1 ⇐ b^0 + b^1, RCG2d as 2a^0 + b^2 ⇐ b^0 + b^2, RCG3 as
  2a^1 + b^1 ⇐ b^2 + b^1, IRCG4 as b^2 + b^2 ⇐ 2a^1 + b^2, and MPY4.4a as
  2a^1 + b^2 ⇐ b^0 · b^2.
* **Inverse operators with a b^1 output.** They give ±1 as g = NOT carry,
  e = 1.
* **Inverters added.** CC4, MPY1.0b, MPY1.1, MPY2.0b, MPY2.1b, MPY2.2a,
  MPY2.2b and MPY4.x have inverters that the value arithmetic requires.
* **Circuit count.** This RTL has 10 distinct adding circuits: 2 half-adder,
  2 carry-generator and 6 redundant carry-generator circuits. The method
  counts 11 physical tiles for its 17 adding operators.

The testbenches check every variant by value over all legal inputs, so
these corrections are verified to be arithmetically exact. They have not
been compared with the original silicon.

## Not modelled

The method is mainly a layout discipline. None of the following has a logic
function of its own, so none is in this RTL:

* the wiring grid, with its power and ground busses;
* the NMOS tile set (inverted-L carry tiles) and the CMOS tile set;
* the connection tiles and the tile modifiers;
* the "fanout" circuits, which are rewiring only;
* the area figures;
* the rest of the variable-precision processor;
* the decomposition CAD software.

A grounded tile input, a "mythical" input, appears in RTL as a constant 0
on a port.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and then calls `$finish`. `tb_sat_pkg`
decodes digit codes into integers straight from the table above,
independently of the tiles. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/sat_pkg.sv tb/tb_sat_pkg.sv tb/tb_sat_top.sv --top-module tb_sat_top
./obj_dir/Vtb_sat_top
```

| testbench | covers |
|-----------|--------|
| `tb_sat_top` | whole top at default parameters: all 5184 legal Input-Level-2 inputs, all 128 three-bit-adder inputs, every slot input |
| `tb_input_level2` | Input-Level-2 exhaustively; checks that the full range -24..+24 is reached and that both zero codes of `m4` are used |
| `tb_sat_add3` | three-bit adder, with `cin` as mythical input and as carry-in |
| `tb_sat_half_adder`, `tb_sat_carry_gen`, `tb_sat_rcg`, `tb_sat_inv_*`, `tb_sat_cond_comp`, `tb_sat_mpy_*` | every variant of each family, over every legal input |

The tests also count the events each module exists for: carries, carry-in
use, complementing, and negative, zero and positive products. A count that
stays at zero is a failure. Each run takes well under a second.

To add a tile variant, extend its enum in `sat_pkg`. Then add a branch to
the family module and a row of offsets to the family testbench's `W` table.
