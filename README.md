# Multi-operand binary tree adder built from reversible Peres gates

This design adds many unsigned operands at once, eight 32-bit words by
default. It uses a balanced binary tree of two-operand ripple carry adders
(RCAs). Every full adder in those RCAs is a reversible cell made of two
Peres gates. A ripple carry adder is the smallest and lowest-energy two-operand
adder, so a tree of them suits designs where area and energy matter more than
raw speed. Montgomery modular multiplication in cryptographic hardware is one
such case: its inner loop is a multi-operand addition. A reversible gate
neither creates nor destroys information, which is why reversible logic is of
interest for low-dissipation circuits.

The RTL is plain synthesizable SystemVerilog. It is purely combinational,
with no clock and no reset.

## The building blocks, bottom-up

### Peres gate (`rtl/peres_gate.sv`)

The Peres gate is a 3-input, 3-output reversible gate:

| A | B | C | P = A | Q = A xor B | R = AB xor C |
|---|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 | 0 |
| 0 | 0 | 1 | 0 | 0 | 1 |
| 0 | 1 | 0 | 0 | 1 | 0 |
| 0 | 1 | 1 | 0 | 1 | 1 |
| 1 | 0 | 0 | 1 | 1 | 0 |
| 1 | 0 | 1 | 1 | 1 | 1 |
| 1 | 1 | 0 | 1 | 0 | 1 |
| 1 | 1 | 1 | 1 | 0 | 0 |

The eight output rows are all different, so the mapping is a permutation and
the inputs can be recovered from the outputs. Both Q and R are exclusive-ORs:
Q is A xor B, and R is (A and B) xor C.

### Reversible full adder (`rtl/peres_full_adder.sv`)

Two Peres gates in cascade make one full adder:

```
          +---------+ P = A ------------------------------> G1 (garbage)
  A ----->|         | Q = A xor B --+      +---------+ P --> G2 = A xor B (garbage)
  B ----->| Peres 1 |               +----->|         | Q --> S    = A xor B xor Cin
  0 ----->|         | R = AB ---+   Cin -->| Peres 2 |
          +---------+           +--------->|         | R --> Cout = (A xor B)Cin xor AB
```

The first gate's constant input is 0, so its R output is just AB. The second
gate takes A xor B on its A input, Cin on its B input and AB on its C input.
Its Q output is then the sum, and its R output is the carry: the carry is
propagate-and-Cin xor generate. Seen from outside, the pair is one 4-in/4-out
reversible cell (A, B, 0, Cin in; G1, G2, S, Cout out), and it is the node
cell of the tree. G1 and G2 are "garbage" outputs. They exist only to keep the
cell reversible and carry no result.

### Ripple carry adder (`rtl/peres_rca.sv`)

`WIDTH` full adders chained LSB to MSB, each one's Cout driving the next one's
Cin. The garbage outputs stay inside the module and are unused, so a linter
reports them as unused signals. The longest path is the carry chain,
`WIDTH` carry stages long, and each stage is one AND-XOR level of the second
Peres gate.

## The tree (`rtl/peres_bta.sv`)

This is the hardest part to picture. With K operands, level 0 splits them into
K/2 pairs and adds every pair in parallel. Level 1 pairs up those sums, and so
on. The operand count halves at every level, so the tree has ceil(log2 K)
levels. For the default K = 8:

```
level 0:   op0+op1   op2+op3   op4+op5   op6+op7     4 RCAs, 32 bits wide
               \       /          \       /
level 1:        s01+s23            s45+s67           2 RCAs, 33 bits wide
                      \            /
level 2:               final sum                     1 RCA,  34 bits wide  -> 35-bit sum
```

**Bit growth.** Each adder at level l is `OPERAND_WIDTH + l` bits wide, and
its carry-out becomes the MSB of its result. The final sum is therefore
`OPERAND_WIDTH + ceil(log2 K)` bits wide (35 bits by default) and is always
exact. All adder carry-ins are 0.

**Operand counts that are not a power of two.** The operands are padded with
zero leaves up to the next power of two. The adders that see only zeros then
reduce to constants in synthesis.

**Timing.** A carry leaving bit 0 of a level-0 adder does not wait for the
whole level to settle. The low bits of a level arrive first, so the next level
starts rippling behind them. The critical path is therefore roughly
`OPERAND_WIDTH + levels` carry stages, not `levels x OPERAND_WIDTH`. The tree
has no registers. To get throughput, add registers between levels: the
`g_level[l].vout` arrays are the natural cut points.

### Interface

| Port | Direction | Width | Meaning |
|---|---|---|---|
| `operands` | input | `[OPERAND_WIDTH-1:0] operands [NUM_OPERANDS]` | unsigned operands |
| `sum` | output | `OPERAND_WIDTH + ceil(log2 NUM_OPERANDS)` | exact unsigned sum |

| Parameter | Default | Notes |
|---|---|---|
| `NUM_OPERANDS` | 8 | any value of 2 or more |
| `OPERAND_WIDTH` | 32 | any value of 1 or more |

The defaults and the width and level helper functions (`tree_levels`,
`tree_leaves`, `sum_width`) are in `rtl/bta_pkg.sv`.

## How closely this follows the original design, and where it departs

Taken from the original design:
- the Peres gate function and truth table;
- the two-Peres-gate full adder and its wiring;
- a ripple carry adder as the node adder;
- the binary-tree organisation with log2 K levels;
- eight operands.

Choices made here, where the original is silent or unclear:
- **Operand width.** The tree diagram is drawn for 4-bit operands. The
  reference simulation uses 32-bit operands. The default follows the
  simulation, and a testbench also runs the 4-bit tree.
- **Sum width.** The reference simulation shows a 32-bit sum. Here the sum is
  full precision: 35 bits for eight 32-bit operands. Its low 32 bits equal a
  truncated 32-bit sum.
- **Tree wiring.** The structure diagram groups bit i of four operands into
  one cell and ends with two separate outputs, which does not form one sum.
  The tree here follows the written description: operands are added
  pairwise, level by level, to a single result.
- **RCA insides.** The internal chain of the RCA is not drawn. It is the plain
  ripple of the full-adder cells.
- **Encoding and unspecified corners.** Unsigned operands, carry-ins of 0,
  zero padding, and no clock, reset or pipelining are all this design's own
  choices.
- **Not included.** The AOI/OAI alternating-cell RCA was the comparison
  baseline, not part of this design, so it is not included. A fault-tolerant
  voter circuit is mentioned only by name and is not included either.
- **Quantum cost.** This RTL is ordinary Boolean logic. "Quantum cost"
  (4 per Peres gate, 8 per full adder) has no counterpart in it, and
  synthesis will merge the gates freely.

For reference, the original reports an FPGA implementation of the proposed
tree at 430 LUTs, 0.81 mW and 24.024 ns. The comparison baseline took 443 LUTs,
0.84 mW and 62.102 ns. The device and operand size behind these numbers are not
stated, and these results were not reproduced here.

## Verification

Each testbench is self-checking. It compares the design with values worked
out independently: a truth table written out row by row, or software
arithmetic. It ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb/tb_peres_gate.sv` | all 8 input patterns against the truth table; checks that the outputs are a permutation |
| `tb/tb_peres_full_adder.sv` | all 8 input patterns; sum, carry and both garbage outputs |
| `tb/tb_peres_rca.sv` | 32-bit: corner cases (full-width carry ripple, all ones) and 2000 random vectors; 4-bit: exhaustive |
| `tb/tb_peres_bta.sv` | the default 8 x 32-bit tree end to end (see below) |
| `tb/tb_peres_bta_sizes.sv` | 8 x 4-bit (the drawn configuration), 5 x 8-bit (zero-padded tree) and 2 x 16-bit trees, random plus maxima |
| `tb/tb_bta_pkg.sv` | the level, leaf and width helpers |

`tb_peres_bta` does the following:
- It replays the reference operand sets: 10, 20, ..., 80, which sum to 360.
  Then it sets operand c to 44 and operand g to 97, which gives 401.
- It runs extreme operand sets, each operand alone, and 3000 random sets.
- It counts three events and fails if any of them never occurs:
  - a level-0 pair whose sum carries out of 32 bits;
  - a carry rippling across a whole 32-bit adder;
  - a total that needs the bits above bit 31.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/bta_pkg.sv rtl/peres_gate.sv rtl/peres_full_adder.sv \
    rtl/peres_rca.sv rtl/peres_bta.sv tb/tb_peres_bta.sv \
    --top-module tb_peres_bta
./obj_dir/Vtb_peres_bta
```

For other sizes, change `NUM_OPERANDS` and `OPERAND_WIDTH` on the
`peres_bta` instance. The port widths follow from them through `bta_pkg`.
