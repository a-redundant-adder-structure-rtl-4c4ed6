# Double carry-save adder for 6-input-LUT FPGAs

A carry-save adder avoids carry propagation by keeping a sum as two binary
vectors, Z = S + C. Adding two such numbers means adding four bits per column,
which takes two levels of (3,2) counters, and so two LUT levels on an FPGA.

This design widens the redundant form to **three** vectors per number:

    Z = Z^a + Z^b + Z^c

Each digit position i then holds three bits, all of weight 2^i, so a digit is
worth 0..3. Adding two such numbers puts six bits of equal weight in each
column. A **(6,3) counter** adds six bits and is a function of exactly six
inputs, so each of its three output bits fits in one 6-input LUT. The whole
addition is one row of these counters with no signal running between columns.
Its delay is one LUT, whatever the word length.

The RTL follows the structure described in the article *A Redundant Adder
Structure Suitable for the New Generation Reconfigurable FPGA Architectures*.
It is not by that article's authors. The sections "What follows the source"
and "Design choices" below say where this RTL goes beyond it.

## The number format

An N-digit double carry-save (DCS) number is the packed array
`logic [2:0][N-1:0]`:

| index | name | comes from |
|-------|------|-----------|
| 0 | Z^a | counter output bit s0, not shifted |
| 1 | Z^b | counter output bit s1, shifted up one digit |
| 2 | Z^c | counter output bit s2, shifted up two digits |

The number's value is `z[0] + z[1] + z[2]`. A DCS number has many encodings.
To turn a binary number B into DCS form, put it in Z^a and set Z^b and Z^c to
zero. `dcs_pkg` names the indices (`PART_A`, `PART_B`, `PART_C`). It also holds
the default size (`DCS_N_DEFAULT = 24`) and the operation enum (`OP_ADD`,
`OP_SUB`).

All the arithmetic is **modulo 2^N**. Two's-complement operands therefore work
unchanged. The subtractor depends on this.

## Addition in one counter level (`dcs_add`)

For Z = X + Y, column i holds six bits of weight 2^i:
`x[0][i], x[1][i], x[2][i], y[0][i], y[1][i], y[2][i]`. A `counter_6_3`
counts them and returns the count as bits s0, s1, s2, with weights 2^i,
2^(i+1) and 2^(i+2). `counter_row_6_3` places one counter per column. Each of
the three output vectors is then put back at its weight:

    Z^a = S0            Z^b = S1 << 1          Z^c = S2 << 2

This gives a DCS number again, with every digit in 0..3. The shifts leave
three positions empty: Z^b[0], Z^c[0] and Z^c[1]. The adder fills them with 0.

Three counter bits would land above digit N-1. They leave on `cout`:

| bit | source | weight |
|-----|--------|--------|
| `cout[0]` | s1 of digit N-1 | 2^N |
| `cout[1]` | s2 of digit N-2 | 2^N |
| `cout[2]` | s2 of digit N-1 | 2^(N+1) |

So `X + Y = Z + 2^N*(cout[0]+cout[1]) + 2^(N+1)*cout[2]`. For modular
arithmetic, ignore `cout`.

The adder does not care what the six input vectors mean. If you feed six
ordinary binary operands in place of the three vectors of X and the three of
Y, `z` is their sum in DCS form. That is the six-operand reduction done by one
counter row. N must be at least 2.

## Subtraction (`dcs_sub`)

For Z = X - Y, the adder's counter row is used with every bit of Y inverted.
Inverting one N-bit vector V gives 2^N - 1 - V. Inverting all three vectors
of Y therefore gives -Y - 3 (mod 2^N), and the constant **3** has to be added
back. It costs no logic: the two ones go into the positions that the shift
leaves empty, Z^c[0] (weight 1) and Z^c[1] (weight 2). The delay is the same
single counter level as addition. `cout` has the same weights as in
`dcs_add`, now for `X + ~Y + 3`.

## Four-operand tree (`dcs_tree4`)

`S = (A + B) + (C + D)` uses two `dcs_add` in a first level and one in a
second level: two LUT levels from operands to result. A conventional
carry-save tree takes four LUT levels for the same job, because each
carry-save addition takes two. The article reports 374 MHz against 254 MHz
for this arrangement at 24 bits. With `op = OP_SUB`, the root is a `dcs_sub`
and `S = (A + B) - (C + D)`. A 2:1 multiplexer after the two roots picks the
result.

## Getting a binary result (`dcs_to_bin`)

Carries have to propagate only when an ordinary binary value is needed.
`dcs_to_bin` computes `Z^a + Z^b + Z^c` with:

- one carry-save row (`csa_row`, built from `full_adder` cells), which reduces
  the three vectors to two;
- a carry-propagate adder (`ripple_carry_adder`), which adds those two.

The result is modulo 2^N. An FPGA tool maps the ripple chain onto its
dedicated carry logic.

## The top level (`dcs_top`)

`dcs_top` wraps the tree between registers, so the tree is a complete
register-to-register path:

| edge | what happens |
|------|-------------|
| 0 | `in_valid` high: `op` and `a`..`d` are sampled into the input registers |
| 1 | the tree result is clocked into `sum`; it comes out as `sum_valid` |
| 2 | `sum` is converted and clocked into `bin`; it comes out as `bin_valid` |

A new operation may enter every cycle. There is no back-pressure. `rst_n` is
synchronous and active low, and clears the valid flags and all registers. An
assertion checks that every `sum_valid` is followed by `bin_valid`.

Ports:

- `clk`, `rst_n`, `in_valid`
- `op` (`dcs_op_e`)
- `a`, `b`, `c`, `d`: `logic [2:0][N-1:0]` each
- `sum_valid`, `sum` (DCS)
- `bin_valid`, `bin`: `logic [N-1:0]`

The only parameter is `N` (digits, default 24).

## Module hierarchy

    dcs_top
    ├── dcs_tree4
    │   ├── dcs_add ×3 ── counter_row_6_3 ── counter_6_3 ×N
    │   └── dcs_sub     ── counter_row_6_3 ── counter_6_3 ×N
    └── dcs_to_bin
        ├── csa_row            ── full_adder ×N
        └── ripple_carry_adder ── full_adder ×N

`dcs_pkg` is shared by all of them. Every module's parameter has a default.

## What follows the source

- The three-vector representation, and the 0/1/2-digit shifts of the counter
  outputs.
- The (6,3) counter.
- The single-level adder.
- The inverted-subtrahend subtractor with the constant 3. The two constant
  ones are drawn in the two lowest digit positions.
- The two-level four-operand tree.
- The full adder, the carry-save row and the ripple-carry chain used in the
  conversion.
- The 24-bit default size.

## Design choices

The source does not specify the following; they belong to this RTL.

- Arithmetic is modulo 2^N, and the three overflow bits are brought out on
  `cout`.
- Both constant ones of the subtractor go into Z^c. Only their total of 3
  matters.
- The `OP_SUB` root in the tree is an addition, so that the subtractor is part
  of the datapath. With `OP_ADD`, the tree is the plain four-operand adder.
- The conversion is one carry-save row plus a ripple-carry adder.
- All the registers, valid flags, reset and latencies of `dcs_top`.
- The counter is written as a bit count, not as a 64-entry table. Synthesis
  produces the same truth table.

Not included:

- The conventional carry-save adder built from two rows of (3,2) counters
  (a (4,2) compressor). It appears in the source only as the baseline.
- The carry-propagate adder used as a stand-alone baseline. The ripple adder
  here serves only for the conversion.
- No timing or LUT-count figure from the source has been reproduced. Those
  depend on the FPGA and its tools.

## Idle outputs you will see in synthesis

- `dcs_add` outputs Z^b[0] and Z^c[1:0] are constant 0, and the same positions
  in `dcs_sub` are constant 0, 1 and 1. This is part of the format, not a
  defect.
- `csa_row` output `c[0]` is wired straight to `cin`.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module with integer arithmetic done in the testbench, and
prints `TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog.

- `tb_counter_6_3`, `tb_full_adder`: exhaustive. The full adder is checked
  against its truth table.
- `tb_counter_row_6_3`: the operand sum is compared with `S0 + 2*S1 + 4*S2`,
  and each column is checked.
- `tb_dcs_add`, `tb_dcs_sub`: 24-digit random and corner operands, plus all
  4096 operand pairs at N = 2. The exact identity with `cout` is checked, not
  only the value mod 2^N.
- `tb_dcs_tree4`: both operations, random operands.
- `tb_csa_row`, `tb_ripple_carry_adder`, `tb_dcs_to_bin`: random and corner
  operands.
- `tb_dcs_top`: 5000 operations at the default size with no parameter
  overrides. Adds and subtracts are mixed, with idle cycles in between. The
  test checks both results and their exact latencies (2 and 3 cycles). It
  counts how often each situation occurred: add, subtract, back-to-back
  operations, idle cycles, modular wrap-around, negative differences, and
  results with a nonzero counter "fours" bit. A situation that never occurs
  counts as a failure.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/dcs_pkg.sv \
        tb/tb_dcs_top.sv --top-module tb_dcs_top -o sim
    ./obj_dir/sim

The RTL passes `verilator --lint-only -Wall` with no warnings other than
unused package constants. To change the word length, override `N` on
`dcs_top`, or `N`/`W` on the leaf modules.
