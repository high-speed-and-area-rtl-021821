# Three-operand adder with a carry-prefix network

Several kinds of modular arithmetic need the sum of three binary numbers in one step. Examples
are some pseudorandom bit generators and cryptographic datapaths. The textbook way to get it is
a carry-save adder: a row of full adders reduces the three operands to two. A ripple-carry adder
then adds those two, and its carry chain grows linearly with the width. This design keeps the
cheap carry-save row but follows it with a parallel-prefix carry network. The carry into every
bit then comes from a tree about log2(N) cells deep instead of a chain N cells long. The
carry-save pair is turned directly into the prefix network's generate/propagate inputs, so no
separate two-operand adder is built.

The RTL is purely combinational. It has no clock, no register and no reset:

    {cout, s} = a + b + c + cin        a, b, c : N bits,   s : N+1 bits,   cout : 1 bit

By default N = 4. That is the width of the published reference adder, which was a 4-bit
transistor-level design. The code is parameterised and has been checked at widths from 1 to 32.

## The four stages

```
 a,b,c ──► [1] bit addition ──S',cy──► [2] base logic ──G,P──► [3] PG prefix ──G(i:0)──► [4] sum ──► s, cout
            N full adders              N+1 saltire cells        black + grey cells        N+1 XORs
                                        ▲ cin
```

1. **Bit addition** (`toa_bit_addition`, made of `toa_full_adder`). Each bit position is an
   independent full adder with `S'_i = a_i ^ b_i ^ c_i` and `cy_i = maj(a_i, b_i, c_i)`. Then
   `a + b + c = S' + 2·cy`. There is no carry between positions.
2. **Base logic** (`toa_base_logic`, made of `toa_base_cell`). `S'_i` and `cy_(i-1)` have the
   same weight 2^i. One "saltire" cell per weight forms their bit propagate and generate:
   `P_i = S'_i ^ cy_(i-1)` and `G_i = S'_i & cy_(i-1)`. The external carry `cin` takes the
   place of `cy_(-1)` in cell 0. There are **N+1** cells, not N, because the top carry
   `cy_(N-1)` has weight 2^N and no S' bit beside it. Cell N therefore sees S' = 0, which
   gives `P_N = cy_(N-1)` and `G_N = 0`. After this stage the problem is an ordinary
   two-operand carry computation over N+1 positions.
3. **PG logic** (`toa_pg_logic`, made of `toa_black_cell` and `toa_grey_cell`). This is a
   prefix network that computes `G_(i:0)`, the carry out of bit i, for every position. It is
   described in the next section.
4. **Sum logic** (`toa_sum_logic`). `S_0 = P_0`, `S_i = P_i ^ G_(i-1:0)` and
   `cout = G_(N:0)`.

The stages chain in the top module `three_operand_adder`.

## The prefix network

This network is the only part of the design with real structure. Both cell types apply the
usual prefix operator to a more significant group `(i:k)` and the adjoining lower group
`(k-1:j)`:

| cell  | outputs | logic |
|-------|---------|-------|
| black | `G(i:j)`, `P(i:j)` | `G(i:k) \| P(i:k)&G(k-1:j)`, `P(i:k)&P(k-1:j)` (2 AND, 1 OR) |
| grey  | `G(i:0)` only      | `G(i:k) \| P(i:k)&G(k-1:0)` (1 AND, 1 OR) |

A grey cell is used wherever the merged group reaches bit 0. From that point only the carry
matters, and the group propagate is never used again.

The tree has the Han-Carlson shape:

* **Odd positions**, levels k = 1 … K. At distance D = 2^(k-1), odd position i merges with
  position i−D, but only while its own group does not yet reach bit 0 (that is, while i ≥ D).
  K is the smallest number of levels that brings the highest odd position down to bit 0:
  `toa_pkg::hc_odd_levels(N+1)`.
* **Even positions**, one final row. Each even position i ≥ 2 merges with the finished carry
  `G(i-1:0)` of its odd neighbour in a grey cell. Position 0 is `G_0` itself.

For the default N = 4 there are five positions (0 to 4). The tree is exactly the one of the
reference 4-bit adder: one black cell and four grey cells in three levels.

```
level 1:  pos 3  black  (G3,P3) o (G2,P2)        -> G3:2, P3:2
          pos 1  grey   (G1,P1) o G0             -> G1:0
level 2:  pos 3  grey   (G3:2,P3:2) o G1:0       -> G3:0
level 3:  pos 2  grey   (G2,P2) o G1:0           -> G2:0
          pos 4  grey   (G4,P4) o G3:0           -> G4:0 = cout
```

Outputs: `s0 = P0`, `s1 = P1^G0`, `s2 = P2^G1:0`, `s3 = P3^G2:0`, `s4 = P4^G3:0`.

The total depth is one full adder, one saltire cell, K+1 prefix cells and one XOR. K+1 is 3 for
N = 4, 5 for N = 16 and 6 for N = 32. Half of the positions skip the Kogge-Stone levels, which
is how Han-Carlson trades one extra level for about half the cells of Kogge-Stone. Cells are
instantiated with `generate` loops, and each cell's hierarchical name tells its level and
position (`g_lvl[k].g_pos[i]`, `g_out[i]`).

## Files

| file | module | role |
|------|--------|------|
| `rtl/toa_pkg.sv` | package | default width, prefix-tree level functions |
| `rtl/toa_full_adder.sv` | `toa_full_adder` | F cell |
| `rtl/toa_bit_addition.sv` | `toa_bit_addition #(N)` | stage 1 |
| `rtl/toa_base_cell.sv` | `toa_base_cell` | saltire cell |
| `rtl/toa_base_logic.sv` | `toa_base_logic #(N)` | stage 2 |
| `rtl/toa_black_cell.sv`, `rtl/toa_grey_cell.sv` | cells | prefix operators |
| `rtl/toa_pg_logic.sv` | `toa_pg_logic #(N)` | stage 3 |
| `rtl/toa_sum_logic.sv` | `toa_sum_logic #(N)` | stage 4 |
| `rtl/three_operand_adder.sv` | `three_operand_adder #(N)` | top |

Top ports: `a`, `b`, `c` are `[N-1:0]`; `cin` is 1 bit; `s` is `[N:0]`; `cout` is 1 bit. The
result is valid one combinational delay after the inputs change. To use it in a clocked
design, register the inputs or the outputs outside this module.

## Where this RTL departs from, or adds to, the reference design

* **The grey cell.** The reference names grey cells and places them, but draws only the black
  cell's gates. The grey cell here is the generate half of the black cell.
* **Sum bit S_N.** The reference drawing of the 4-bit adder shows only S0…S3 and Cout. Its
  equations define S_i for i up to N, and without S4 the result would be wrong for any sum with bit 4 set,
  16 for example. S4 is built.
* **The top base cell.** The reference gives N+1 base cells and draws the top one fed by the
  last carry alone. Tying its S' input to 0 is this design's reading of that. As a result, some
  outputs are plain wires: G_N is constant 0, P_N equals cy_(N-1), S_0 equals P_0 and cout
  equals G_(N:0). Synthesis will report these, and they are intended.
* **Full-adder carry.** The carry is `b·c + (b⊕c)·a`, which equals the majority function. It
  reuses the b⊕c term that the sum needs.
* **Other widths.** The reference shows only the 4-bit tree. The odd/even rule above is the
  natural Han-Carlson extension, and it is this design's own.
* **Buffers.** The reference schematic places what are taken to be buffers between cells. They have no logic
  function and are not modelled.
* **Figures not reproduced.** The reference characterises its 4-bit adder at transistor level:
  "4 levels", 2426 nodes, 547 gates and 0.2445 µW average power. Those numbers belong to that
  circuit and cannot be checked from RTL. The "4 levels" may count the base logic together
  with the three prefix levels built here.

## Verification

Each testbench is self-checking. It computes the expected values independently of the RTL,
mostly as integer arithmetic, and ends with a `TB_RESULT checks=… failures=…` line. Each also
has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_three_operand_adder` | default 4-bit top, no parameter override, all 8192 values of (a, b, c, cin) against the integer sum. It also counts and requires: cin = 1, a carry out, a carry into the top base cell, a carry generated at bit 0 and propagated to bit N, and the black cell's propagate path |
| `tb_three_operand_adder_widths` | N = 1, 2, 3, 5, 8, 16, 31, 32 with random and all-ones operands (uses `tb_toa_width_lane`) |
| `tb_toa_pg_logic` | prefix network against a ripple-carry reference: exhaustive at N = 4 and for small widths, random up to N = 31 (uses `tb_pg_lane`) |
| `tb_toa_full_adder`, `tb_toa_base_cell`, `tb_toa_black_cell`, `tb_toa_grey_cell` | exhaustive truth tables |
| `tb_toa_bit_addition`, `tb_toa_base_logic`, `tb_toa_sum_logic` | exhaustive at N = 4 |

Each testbench has also been shown to fail on a deliberately broken copy of its module, for
example a wrong carry gate, a mis-wired carry shift, or a missing propagate term.

Running one testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb rtl/toa_pkg.sv \
          tb/tb_three_operand_adder.sv --top-module tb_three_operand_adder -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run any other one. The package must be listed
first. All of them finish in well under a second.

## Changing the width

Set `N` on `three_operand_adder`. Every stage and the prefix tree follow from it, and no other
setting exists. To check that the tree comes out as expected for a new width, add that width
to `tb_three_operand_adder_widths` and `tb_toa_pg_logic`. Any N ≥ 1 is legal. Widths above 32
work in the RTL, but the width testbench's 64-bit integer reference limits it to N ≤ 61.
