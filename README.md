# Signed-binary complex ±1 multiplier (CDMA PN scrambler)

A CDMA scrambler multiplies each complex sample `a + jb` by a complex
pseudonoise chip `PN_re + jPN_im` whose parts are +1 or −1. The product

    A + jB = (a + jb)(PN_re + jPN_im)

needs no multiplier: each output part is always one of `a+b`, `−(a+b)`,
`a−b` or `−(a−b)`, and for every chip exactly one sum function and one
difference function are needed.

| PN_re | PN_im | A        | B        |
|-------|-------|----------|----------|
| +1    | +1    | a − b    | a + b    |
| +1    | −1    | a + b    | −(a − b) |
| −1    | +1    | −(a + b) | a − b    |
| −1    | −1    | −(a − b) | −(a + b) |

A straightforward circuit adds and then negates, which puts two carry chains
in series. This design needs only one carry-propagate adder per output. It
rewrites the operands as a signed-binary number, which can be negated and
incremented without carries. The one adder then converts that number back
to two's complement, and all sign-dependent work happens before it, in one or
two gate levels.

The RTL follows the scheme of B. D. Andreev, E. L. Titlebaum and
E. G. Friedman, "Transformations of Signed-Binary Number Representations for
Efficient VLSI Arithmetic". Where that paper leaves a detail open, this
design's choice is marked below.

## Number representations

* **Initial-sum digits** `y_i = a_i + b_i ∈ {0, 1, 2}`: the bitwise sum of
  two operands. No carries are involved, and `Σ y_i 2^i = a + b`.
* **Signed-binary (SB) digits** `x_i ∈ {−1, 0, +1}`. On wires, each digit is a
  sign-magnitude pair `{sign, magn}` (`sb_pkg::sb_digit_t`): `magn = 1` for a
  non-zero digit and `sign = 1` for a negative one.
* The mapping `x_i = 1 − y_i` links the two. For N-bit operands, read as
  unsigned numbers a′ and b′:

      a′ + b′ = 2^N − 1 − T_x(x)          T_x(x) = Σ x_i 2^i

  In sign-magnitude form, `magn_i = XNOR(a_i, b_i)` and `sign_i = a_i AND b_i`.
* **Negating an SB number** means flipping every sign bit, with no carry.
  After the flip, a zero digit can carry `sign = 1, magn = 0`. That pair
  still means zero (see the converter).

## The two branches

**Sum branch** (`sb_sum_prelogic`). From the relation above,
`−(a+b) ≡ T_x(x) + 1` and `a+b ≡ −(T_x(x) + 1)` (mod 2^N). The prelogic
forms the SB number `T_x(x)+1` directly from `a` and `b`. It absorbs the +1
with a carry-free transfer rule:

* digit 0: `x_0 + 1 = 2·t_1 + d_0`. Here `t_1 = [x_0 ≥ 0]`, and `d_0 = −1` exactly
  when `x_0 = 0`.
* digit i ≥ 1: each `x_{i−1} = +1` becomes a transfer `t_i = 1` plus a local −1.
  So `d_i = w_i + t_i`, where `w_i = −1` if `x_i ≠ 0` and `w_i = 0` otherwise.
  The result is always in {−1, 0, +1}.

Every output digit depends on at most two neighbouring bit pairs and takes
two gate levels.

**Difference branch** (`sb_diff_prelogic`). With `y_i = a_i + NOT b_i`,
`x_i = 1 − y_i` gives `a−b ≡ −T_x(x)` and `−(a−b) ≡ T_x(x)` (mod 2^N).
No +1 is needed, so this branch has one gate level:
`magn_i = a_i XOR b_i`, `sign_i = a_i AND NOT b_i`.

**Sign control.** In each branch, the PN code only decides whether the SB
signs are flipped before conversion:

| branch | signs flipped when | result with flip | result without |
|--------|--------------------|------------------|----------------|
| sum    | PN_re = +1         | a + b            | −(a + b)       |
| diff   | PN_im = +1         | a − b            | −(a − b)       |

Two 2:1 multiplexers then route the results: the sum goes to B when
`PN_re = PN_im` and to A otherwise.

## SB → two's-complement conversion (`sb_to_tc`, `sb_cla`)

This is the only carry-propagating part, and the least obvious one.

1. **Back to initial-sum form.** Each (possibly sign-flipped) digit D_i is
   read as `y_i = 1 − D_i` and fed to a carry-lookahead adder as
   `G_i = sign_i`, `P_i = NOT magn_i`:
   * −1 becomes G = 1 (y = 2);
   * 0 becomes P = 1 (y = 1);
   * +1 becomes kill (y = 0).

   A zero digit whose sign was flipped arrives as G = P = 1. The adder
   lets propagate win (`sb_cla` masks `g` with `NOT p`), so the pair behaves
   as an ordinary zero.
2. **Add with carry-in 0.** The adder forms `Y = Σ y_i 2^i = 2^N − 1 − D`.
3. **Invert the N sum bits.** `NOT Y` (mod 2^N) is `D mod 2^N`, the low N bits
   of the result.
4. **Set the sign bit N.** The operands are two's complement: their sign bits
   weigh −2^(N−1). Also, the sum branch drops digit N of `T_x(x)+1`. Together,
   these move the true result away from D by a multiple of 2^N. The prelogic
   supplies the parity of that multiple as `msb_fix`: `a_{N−1} AND b_{N−1}`
   for the sum branch and `a_{N−1} XOR b_{N−1}` for the difference branch.
   The adder's carry out is 1 exactly when D < 0, and the sign bit is

       r_N = carry_out XOR msb_fix

   The paper sets this bit with a carry-like formula on the operand sign bits
   (its eq. 11, "inverting the propagated carry"). Writing it as carry-out XOR
   a sign-bit term is this design's own formulation. It was checked against
   integer arithmetic for every 8-bit operand pair and all four functions.

The carry network is a Kogge-Stone parallel-prefix tree with ⌈log2 N⌉
levels. The paper only asks for a carry-lookahead adder; the prefix structure
is this design's choice.

### Worked example (a = −101, b = −23, N = 8)

* `T_x(x)+1` has digits −1 at positions 7 and 2, so its value is −132.
* Signs kept: G = `10000100`, P = `01111011`. The adder gives Y = 387, which
  is 131 in its 8 sum bits, with carry out 1. Inverting the sum bits gives
  `01111100`. The sign bit is `1 XOR (1 AND 1) = 0`, so the result is
  `−(a+b) = +124`.
* Signs flipped: the result is `a+b = 1_10000100 = −124`.
* The difference branch gives `a−b = −78` and `−(a−b) = +78` in the same way.

## Interface and timing

`pn_scrambler #(N = 8)`: the whole datapath is combinational, with no clock
and no reset.

| port     | dir | width | meaning                                 |
|----------|-----|-------|-----------------------------------------|
| `a`      | in  | N     | real part of the sample, two's complement |
| `b`      | in  | N     | imaginary part                          |
| `pn_re`  | in  | 1     | real PN chip: 0 = +1, 1 = −1            |
| `pn_im`  | in  | 1     | imaginary PN chip: 0 = +1, 1 = −1       |
| `out_re` | out | N+1   | A, two's complement                     |
| `out_im` | out | N+1   | B, two's complement                     |

The critical path runs through the prelogic (1–2 gates), the sign-flip XOR,
the prefix adder, the sum-bit XOR and inversion, and the output multiplexer.
The PN inputs reach the adders only through one XOR per digit. The design
has no pipeline registers. A receiver would normally register the inputs
and outputs around it.

Only one result falls outside the (N+1)-bit range:
`−(a+b) = +2^N` for `a = b = −2^(N−1)`. It wraps to −2^N, and no overflow
flag is raised.

## Files

| file | content |
|------|---------|
| `rtl/sb_pkg.sv` | digit type, PN wire encoding |
| `rtl/sb_sum_prelogic.sv` | a, b → `T_x(x)+1` (two gate levels) |
| `rtl/sb_diff_prelogic.sv` | a, b → x of a + NOT b (one gate level) |
| `rtl/sb_cla.sv` | parallel-prefix carry network, propagate-dominant |
| `rtl/sb_to_tc.sv` | sign flip, G-P mapping, adder, inversion, sign bit |
| `rtl/pn_scrambler.sv` | top: two branches and output routing |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Verification

Each testbench compares the design against integer arithmetic computed in
the testbench and ends with a `TB_RESULT checks=… failures=…` line.

* `tb_sb_sum_prelogic` and `tb_sb_diff_prelogic` test all 65 536 operand
  pairs. They check the digit values, the transfer rule and the absence of
  the sign=1/magn=0 pair, plus the hand-worked digit strings of the two
  examples.
* `tb_sb_cla` tests every g/p/cin combination at 8 bits and random vectors
  at 13 bits, against a bit-serial reference.
* `tb_sb_to_tc` applies random SB numbers, including sign-flipped zero
  digits, with both `inv` and `msb_fix` values.
* `tb_pn_scrambler` runs the top at its default size: every operand pair
  with every PN code (262 144 vectors), plus the two worked examples
  (−101, −23) and (−82, 62). It counts each mechanism and fails if one never
  occurs:
  * each PN code;
  * sign flip on and off in each branch;
  * both output routings;
  * G-P = 11 reaching each adder;
  * the sign-bit correction in each branch;
  * the wrapped overflow.
* `tb_pn_scrambler_sizes` tests N = 4 and N = 5 exhaustively, and N = 16 and
  N = 31 with random and extreme operands.

To run one testbench with Verilator:

    verilator --binary --timing -Irtl -Itb rtl/sb_pkg.sv tb/tb_pn_scrambler.sv \
        --top tb_pn_scrambler -Mdir obj_tb && ./obj_tb/Vtb_pn_scrambler

Each testbench takes well under a second.

## Where this departs from or goes beyond the paper

* **Operand width.** N = 8 is a default chosen here. The paper keeps N
  general; its worked examples use 8-bit operands. Any N ≥ 2 elaborates.
* **Sign bit.** The sign bit is formed as carry-out XOR `msb_fix` (see
  above). Digit N of `T_x(x)+1` is not built, as the paper also allows.
* **Printed equation and example.** The paper's printed equation for the
  digit magnitudes of the +1 prelogic gives two forms that disagree. The
  XOR form is used: it reproduces the worked digit strings. One printed
  operand string in the second example disagrees with its stated value 62;
  the value is used.
* **Not built.** Three things the paper mentions are left out:
  * the alternative a+b realisation without the +1 prelogic;
  * the alternative digit mapping `y_i = 1 + x_i` and the other mappings
    between digit sets;
  * the conventional adder-based scrambler that the paper compares against.
* **Own choices.** The PN wire encoding, the output multiplexers, the
  combinational (unregistered) interface and the wrap on the single overflow
  case are this design's choices.
