# Three-operand adder with a Ladner-Fischer carry network

Linear congruential pseudorandom bit generators and many cryptographic
datapaths keep computing `a + b + c (mod 2^n)`. The obvious way to do this is
two two-operand adders in a row, which puts two carry-propagation chains on
the critical path. A plain carry-save adder followed by a ripple adder avoids
that but leaves one long ripple chain. This design reduces the three operands
to two with one row of full adders. It then resolves all carries with a
single logarithmic-depth parallel-prefix network, the Ladner-Fischer
(divide-and-conquer) tree. That leaves one carry network of `ceil(log2(n+1))`
levels, which is 7 levels at the default `n = 64`.

The adder is purely combinational: there is no clock, no register and no
reset. It returns the full `n+2`-bit sum of `a + b + c + cin`. Its low `n`
bits are the modulo-`2^n` result that a generator needs.

## The four phases

| phase | module | what it computes, per bit position |
|---|---|---|
| 1. bit addition | `tpa_bit_addition` | `S'_i = a_i ^ b_i ^ c_i`, `cy_i = maj(a_i, b_i, c_i)`, for i = 0..n-1 |
| 2. base logic | `tpa_base_logic` (n+1 × `saltire_cell`) | `G_i = S'_i & cy_(i-1)`, `P_i = S'_i ^ cy_(i-1)`, for i = 0..n |
| 3. PG (prefix) logic | `lf_prefix_tree` (`pg_black_cell`, `pg_grey_cell`) | `G(i:0)`, the carry out of every position i |
| 4. sum logic | `tpa_sum_logic` | `S_0 = P_0`, `S_i = P_i ^ G(i-1:0)`, `Cout = G(n:0)` |

Phase 1 is an ordinary carry-save row. Its outputs satisfy
`a + b + c = S' + 2·cy`. The carry `cy_i` has weight `2^(i+1)`, so it belongs
to the position to its left.

Phase 2 aligns the two vectors. At each position i, a half adder (the
"saltire" cell) combines `S'_i` with `cy_(i-1)`. At position 0 the partner is
the carry-in `cin`, so the carry-in costs no extra hardware. At position n
there is no `S'_n`, so that cell is fed a 0 and gives `G_n = 0` and
`P_n = cy_(n-1)`. This is why the network has n+1 positions, not n.
Because every pair comes from a half adder, `G_i` and `P_i` are never both 1.
The value being added is now exactly `Σ 2^i (P_i + 2·G_i)`: an ordinary
two-operand carry problem.

Phases 3 and 4 are an ordinary parallel-prefix adder over those n+1
positions. The top result bit is the carry out of position n. So the result
has n+2 bits, which is just enough for `3·(2^n − 1) + 1`.

## The Ladner-Fischer network

This is the part that needs the most care. The prefix operator `o` merges
the (generate, propagate) pair of a more significant span `(i:k)` with the
adjacent less significant span `(k-1:j)`:

    G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
    P(i:j) = P(i:k) & P(k-1:j)

A **black cell** (`pg_black_cell`) computes both outputs. A **grey cell**
(`pg_grey_cell`) computes only `G`. It is used when the merged span reaches
bit 0, because `G(i:0)` is then the final carry and its `P` is never needed.
`tpa_pkg::pg_combine` holds the operator as a function.

The tree is built level by level. Number the levels `k = 0, 1, …` and cut
the positions into blocks of `2^(k+1)`. At level k, every position in the
**upper half** of a block is merged with the **top position of the lower
half**. That position already covers the span from the block's start, so
after the merge every position covers its whole `2^(k+1)` block. Positions
in a lower half pass through unchanged. After `ceil(log2 W)` levels the
block is the whole word, and every position holds `G(i:0)`.

For 8 positions (`i←[j]` means position i is merged with partner j):

    level 0 (blocks of 2): 1←[0]  3←[2]  5←[4]  7←[6]
    level 1 (blocks of 4): 2,3←[1]        6,7←[5]
    level 2 (blocks of 8): 4,5,6,7←[3]

At the default width the network has W = 65 positions (n = 64, plus the top
position):

| level | block | black cells | grey cells |
|---|---|---|---|
| 0 | 2 | 31 | 1 |
| 1 | 4 | 30 | 2 |
| 2 | 8 | 28 | 4 |
| 3 | 16 | 24 | 8 |
| 4 | 32 | 16 | 16 |
| 5 | 64 | 0 | 32 |
| 6 | 128 | 0 | 1 |

That makes 129 black and 64 grey cells in 7 levels, i.e. `log2(n) + 1`
levels for n = 64. The cost of the minimal depth is fan-out. At level 5,
position 31 drives the 32 positions 32..63 and is also passed on itself, a
fan-out of `n/2 + 1 = 33`. The fan-out doubles at every level. A synthesis
tool buffers these nets, and their wire load dominates the delay in
practice. The 65th position costs a whole extra level, but only one cell
(position 64 merged with position 63).

The structure is generated from `W` alone. The partner of position i at
level k is `(i >> (k+1) << (k+1)) + 2^k − 1`. The cell is grey when that
block starts at 0. Any width from 1 upward works.

## Interface

`lf_three_operand_adder #(parameter int unsigned N = 64)`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b`, `c` | in | N | operands |
| `cin` | in | 1 | carry-in, added at bit 0 |
| `sum` | out | N+2 | `a + b + c + cin`; `sum[N+1]` is Cout, `sum[N-1:0]` the modulo-2^N sum |
| `s1`, `c1` | out | N | carry-save sum `S'` and carry `cy` (phase 1) |
| `p`, `g` | out | N+1 | bit-level propagate and generate (phase 2) |
| `carry` | out | N+1 | `carry[i] = G(i:0)`, the carry out of position i (phase 3) |

`s1`, `c1`, `p`, `g` and `carry` are for observation and debugging. Leave
them unconnected if you do not need them: they are nets that `sum` needs
anyway, so they add no logic. The whole path from inputs to `sum` is
combinational. To use the adder in a clocked datapath, register its inputs
and outputs around it.

The sub-blocks can be used on their own. `lf_prefix_tree #(W)` is a general
W-position carry network (`g_in`, `p_in` → `g_out = G(i:0)`). Together with a
generate/propagate stage and `tpa_sum_logic` it makes a two-operand
Ladner-Fischer adder.

## Where this RTL departs from, or goes beyond, the original description

- **Which tree.** The original describes its "Ladner-Fischer" network by its
  behaviour: divide and conquer over 2-, 4-, 8-, 16-bit groups, `log2 n`
  levels, and a maximum fan-out of `n/2 + 1`. Some textbooks call this
  structure the Sklansky tree and reserve "Ladner-Fischer" for a sparser
  variant: the same tree on odd positions plus one extra level for the even
  ones. This RTL builds the structure as described (the dense one).
- **Top base-logic cell.** There are n+1 base cells but only n carry-save
  outputs. Feeding `S'_n = 0` to the top cell is this design's reading; it is
  the only one that gives the correct sum.
- **Three-operand vs. two cascaded adders.** The original text also mentions
  building the three-operand sum from two Ladner-Fischer two-operand adders.
  Its reference simulation, however, shows the four-phase signals (`s1`,
  `c1`, `p`, `g`) and a 66-bit sum, so the four-phase form is built here.
- **Reference simulation.** The published 64-bit reference run lists the top
  12 bits of each vector. The listed a, b, c, s1, c1, p and g agree with this
  RTL exactly, and `tb_lf_three_operand_adder_reference` checks them.
  - The run also lists a vector called `x`. It equals `p | g` in every listed
    bit, and its purpose is not described, so it is not reproduced here.
  - The listed sum bits cannot be the top bits of `a + b + c` for any carry
    from the unlisted lower bits. This RTL follows the arithmetic.
- **Timing and area.** The original reports an FPGA area and delay for its
  adder. They came from one vendor's synthesis of the authors' own Verilog
  and are not reproduced here. This RTL has no device-specific code.
- **Not included.** The pseudorandom generator that motivates the adder (a
  dual-coupled linear congruential generator built from four modulo-2^n
  three-operand adders, two comparators and four multiplexers) is only
  mentioned as an application. Its recurrences are not given, so it is not
  part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/tpa_pkg.sv` | default width, `pg_t` (G,P) struct, prefix operator `pg_combine` |
| `rtl/tpa_bit_addition.sv` | phase 1, carry-save row |
| `rtl/saltire_cell.sv`, `rtl/tpa_base_logic.sv` | phase 2 |
| `rtl/pg_black_cell.sv`, `rtl/pg_grey_cell.sv`, `rtl/lf_prefix_tree.sv` | phase 3 |
| `rtl/tpa_sum_logic.sv` | phase 4 |
| `rtl/lf_three_operand_adder.sv` | top |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops by itself. A watchdog ends it with
a failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb_saltire_cell`, `tb_pg_black_cell`, `tb_pg_grey_cell` | cells, exhaustively |
| `tb_tpa_bit_addition`, `tb_tpa_base_logic`, `tb_tpa_sum_logic` | each phase at 64 bits, bit by bit and by value |
| `tb_lf_prefix_tree` | the network against a ripple-carry reference, at W = 65, 1, 2, 3, 5, 8, 17, 32; exhaustive up to W = 8 |
| `tb_lf_three_operand_adder` | the full adder at its default 64 bits: 6,000+ directed and random vectors, every output port against an independent model. It also counts carry-in use, carry-out, bit N set, a carry through all 65 positions, and a carry-save carry out of the top bit, and fails if any never occurs. |
| `tb_lf_three_operand_adder_widths` | N = 1..4, exhaustively (all operands and carry-in) |
| `tb_lf_three_operand_adder_reference` | the published 64-bit reference vector (listed bits) |

To run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
        rtl/tpa_pkg.sv tb/tb_lf_three_operand_adder.sv \
        --top-module tb_lf_three_operand_adder -o sim
    ./obj_dir/sim

All of them pass, and each takes well under a second. Each testbench was
also run against a copy of its module with one deliberate fault, such as a
dropped majority term, an OR in place of an XOR, a prefix partner off by
one, or the carry-in disconnected. Every such fault was detected.
