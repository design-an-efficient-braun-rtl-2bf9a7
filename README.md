# Braun array multiplier with Kogge-Stone adder rows

A Braun array multiplier forms all partial products of two unsigned numbers
with AND gates and sums them in a regular grid of full adders, one row of
adders per partial-product row. In this design each of those rows of full
adders is replaced by a Kogge-Stone parallel prefix adder (KSA), so that the
carry inside a row is resolved by a logarithmic prefix tree instead of
travelling from cell to cell. The main configuration is a 4 x 4 multiplier
with an 8-bit product, built from 16 AND gates and three 4-bit KSAs. The
circuit is purely combinational: no clock, no reset, no handshake.

The same logic has been proposed in three transistor-level styles:
pass-transistor carry cells, NMOS gates with complementary (CMOS) inverters,
and PMOS gates with complementary inverters. Of the three, the NMOS style was
found to have the lowest area and power. These are ways of building the gates
from transistors. They do not change the logic function, so the RTL here
describes that function once. It says nothing about which style is used.

## How the multiplier sums its rows

`braun_mult` (parameter `N`, default 4) computes `p = a * b` as follows.

1. `braun_pp_array` makes the rows `pp[j] = a & {N{b[j]}}`. Row `j` has weight `2**j`.
2. Bit 0 of the product is `pp[0][0]`. The rest of row 0, shifted right by one place, is the first running sum: `acc[0] = {0, pp[0][N-1:1]}`.
3. For each row `j = 1 .. N-1`, one N-bit KSA adds `acc[j-1] + pp[j]`, with its carry-in tied to 0. Bit 0 of that sum is final and becomes product bit `j`. The other bits of the sum, with the adder's carry-out as the new top bit, form `acc[j]`. That is the running sum shifted right by one place, lined up with the next row.
4. The last running sum, `acc[N-1]`, gives the upper half of the product, `p[2N-1:N]`.

Worked example, `a = 1101` (13) and `b = 1001` (9):

| step   | adds        | sum     | product bit | next running sum |
|--------|-------------|---------|-------------|------------------|
| row 0  | (pp0=1101)  |         | p0 = 1      | 0110             |
| row 1  | 0110 + 0000 | 0_0110  | p1 = 0      | 0011             |
| row 2  | 0011 + 0000 | 0_0011  | p2 = 1      | 0001             |
| row 3  | 0001 + 1101 | 0_1110  | p3 = 0      | 0111 = p7..p4    |

This gives `p = 0111_0101` = 117.

**Timing.** The rows are in series. Each row's carry-out becomes the top bit
of the next row's operand, so the critical path passes through all N-1
adders. Inside a row, the path is: the per-bit g/p gates, the carry-in cell,
log2(N) prefix levels, and the sum XOR. Low product bits settle earlier than
high ones. Seen from a clocked design, the latency is zero cycles: register
the operands and the product around it as the timing requires.

## The Kogge-Stone adder (`ksa`)

`ksa` (parameter `W`, default 4) computes `{cout, s} = a + b + cin` in three
stages:

* **Per-bit generate and propagate.** `g = a & b` and `p = a ^ b`. The XOR
  form of propagate is used so that the same signal also gives the sum bit.
* **Prefix tree.** The carry-in is first merged into bit 0 by one carry GP
  cell. There it acts as a group that generates but does not propagate.
  Then come `ceil(log2 W)` levels. At level `l`, every position `i >= 2**l`
  merges with position `i - 2**l`. The other positions pass through
  unchanged. After the last level, position `i` holds the generate of bits
  `i..0` including the carry-in, which is the carry into bit `i+1`.
* **Sum.** `s[i] = p[i] ^ carry[i]` with `carry[0] = cin`, and
  `cout = carry[W]`.

Each level is its own generate block with its own `prev`/`next` arrays,
which keeps the tree free of false combinational loops in lint.
Reference vector: `1101 + 0101 + 1` gives `s = 0011`, `cout = 1`.

## The carry GP cell (`ksa_gp_cell`)

This is the prefix operator of the tree. It merges a more significant group
`hi` with the adjacent less significant group `lo`:
`g = hi.g | hi.p & lo.g` and `p = hi.p & lo.p`. Its OR gate is the gate that
the pass-transistor style replaces with a pass-transistor network. The
generate/propagate pair is the packed struct `ksa_pkg::gp_t`. The package
also holds the per-bit function `gp_bit`.

## Partial products (`braun_pp_array`)

There are N x N AND gates, with output `pp[j][i] = a[i] & b[j]`. In the
transistor-level styles each AND is a NAND followed by an inverter. The
port is an unpacked array of N packed rows.

## What follows the original design and what is this design's choice

These follow the original design:

* the 4-bit operand size;
* the Kogge-Stone adder in place of the full adders;
* the AND-gate partial products;
* the two reference vectors above.

These are choices made here, because the original does not specify them:

* **Row structure.** One N-bit KSA per partial-product row, with the carry-out feeding the next row.
* **Carry-in.** The way it enters the prefix tree: one extra GP cell on bit 0.
* **Encoding.** Unsigned operands.
* **Parameters.** `N` and `W` are parameters. The multiplier needs `N >= 2`.

Not represented at all:

* the three transistor-level circuit styles;
* their device counts, power and layout sizes. For the 4-bit KSA these are 96 to 164 transistors and about 12 to 39 uW. For the 4 x 4 multiplier they are 448 to 552 transistors and about 0.19 to 0.22 mW.

## Verification

Every testbench checks itself, ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_ksa_gp_cell`      | all 16 input combinations of the GP cell |
| `tb_ksa`              | all 512 inputs of the 4-bit adder, including the reference vector; random and all-propagate operands at 7 and 16 bits |
| `tb_braun_pp_array`   | all 256 operand pairs, each row checked |
| `tb_braun_mult`       | the 4 x 4 multiplier at default parameters: the reference vector bit by bit, then all 256 operand pairs. It counts, for each adder row, how often that row produces a carry-out, and how often a carry has to cross the prefix tree. It fails if any of these never happens. |
| `tb_braun_mult_sizes` | N = 2 and 3 exhaustively, N = 8 exhaustively (65,536 pairs), N = 16 with random operands |

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_braun_mult \
        rtl/ksa_pkg.sv rtl/ksa_gp_cell.sv rtl/ksa.sv rtl/braun_pp_array.sv \
        rtl/braun_mult.sv tb/tb_braun_mult.sv
    ./obj_dir/Vtb_braun_mult

List `rtl/ksa_pkg.sv` first: the other files import it. All testbenches run
in well under a second.

## Files

* `rtl/ksa_pkg.sv`: the `gp_t` type and the per-bit generate/propagate function
* `rtl/ksa_gp_cell.sv`: the carry GP (prefix) cell
* `rtl/ksa.sv`: the W-bit Kogge-Stone adder with carry-in and carry-out
* `rtl/braun_pp_array.sv`: the AND-gate partial products
* `rtl/braun_mult.sv`: the top level, the N x N multiplier
* `tb/`: one testbench per module, plus `tb_braun_mult_sizes`
