# Higher-radix Kogge-Stone parallel prefix adders

A binary adder's speed is decided by how fast the carry into each bit can be
computed. A Kogge-Stone adder computes every carry with a prefix network of
depth log2(n) built from two-input "prefix cells". This design replaces those
two-input cells with three- and four-input cells (PP3, PP4). Each cell then
combines 3 or 4 groups at once, so the network needs only log3(n) or log4(n)
levels. For 64 bits, the radix-4 network has **3 levels instead of 6**. It
also has **171 cells instead of 321**. The Kogge-Stone property of small fan-out
is kept: no node output drives more than `RADIX` nodes.

The RTL has two 64-bit adders side by side. One is a radix-4 Kogge-Stone adder
(KS4-64) and the other is a radix-3 one (KS3-64). Both are generated by one
parameterised adder.

## The three stages

`ks_adder` computes `{cout, sum} = a + b` in three stages. Everything is
combinational. There is no clock and no reset, and the result is valid one
propagation delay after the operands.

1. **Pre-processing** (`pre_cell`, one per bit) is a half adder:
   `g_i = a_i & b_i` and `p_i = a_i ^ b_i`.
2. **Prefix network** (`ks_prefix_network`) computes `G_{i:0}` for every bit
   `i`. This is the carry out of bit `i`.
3. **Post-processing** (`post_cell`, one per bit) computes
   `s_i = p_i ^ G_{i-1:0}`, with the carry into bit 0 equal to 0.

The adder has no carry input. `cout` is `G_{WIDTH-1:0}`. The group propagates
`P_{i:0}` are computed by the network and available on its `p_pfx` port, but
the adder does not use them.

## Prefix cells

A range of bits has a pair (G, P). G is 1 when the range generates a carry
out. P is 1 when the range passes an incoming carry through. Adjacent ranges
combine with the associative operator `(G,P)_hi • (G,P)_lo = (G_hi + P_hi·G_lo, P_hi·P_lo)`.
The cells apply this operator to 2, 3 or 4 adjacent ranges. In each cell,
input index 0 is the least significant range.

| cell       | generate                                   | propagate       |
|------------|--------------------------------------------|-----------------|
| `pp2_cell` | G1 + P1·G0                                 | P1·P0           |
| `pp3_cell` | G2 + P2·(G1 + P1·G0)                       | P2·P1·P0        |
| `pp4_cell` | G3 + P3·(G2 + P2·(G1 + P1·G0))             | P3·P2·P1·P0     |

In full-custom CMOS, each PP3/PP4 generate is a single complex gate with an
output inverter. Such a PP4 is only about 1.2 times slower than a PP2, but it
replaces two levels of PP2s. This is where the speed gain comes from. In the
RTL the cells are plain Boolean expressions, and mapping them to gates is left
to synthesis.

## Network construction (the part to read carefully)

`ks_prefix_network #(WIDTH, RADIX)` has `LEVELS = ceil(log_RADIX WIDTH)`
levels, with one node per bit at every level. The span at level `k` is
`RADIX**k`. Node `i` at level `k` takes the outputs of the previous level at
bits

    i, i - span, i - 2·span, ..., i - (RADIX-1)·span

and keeps only those with an index of 0 or more. The number of inputs kept,
`min(RADIX, i/span + 1)`, decides what the node is:

* 1 input: a **dummy** position, which is a plain wire;
* 2, 3 or 4 inputs: a **PP2**, **PP3** or **PP4** cell.

After level `k`, node `i` covers bits `i` down to `max(0, i - RADIX**(k+1) + 1)`.
After the last level, node `i` therefore covers `i:0`. The rule is written
once, as `hrks_pkg::cell_fanin`. The generate loops use it, and so do
`hrks_pkg::cell_count` and `hrks_pkg::max_fanout`, which the testbench uses to
check the structure.

The resulting cell counts for 64 bits:

| configuration | levels | PP4 | PP3 | PP2 | total cells |
|---------------|--------|-----|-----|-----|-------------|
| radix 4       | 3      | 129 | 21  | 21  | 171         |
| radix 3       | 4      | –   | 176 | 40  | 216         |
| radix 2       | 6      | –   | –   | 321 | 321         |

For example, at radix 4 the first level (span 1) has node 0 as a dummy, node 1
as a PP2, node 2 as a PP3 and nodes 3–63 as PP4s. The second level (span 4) has
nodes 0–3 as dummies, 4–7 as PP2s, 8–11 as PP3s and 12–63 as PP4s. The third
level (span 16) has 16 nodes of each kind. At 16 bits, the radix-4 network has
2 levels and the radix-3 network has 3.

`RADIX` must be 2, 3 or 4, because PP4 is the largest cell. An immediate
assertion reports any other value. Radix 2 is the classic Kogge-Stone network.
It is supported because the same rule produces it, but the top level does not
use it.

## Files and hierarchy

```
hrks_top                      two independent 64-bit adders
├── u_ks4 : ks_adder #(.RADIX(4))
└── u_ks3 : ks_adder #(.RADIX(3))
        ├── pre_cell           x WIDTH
        ├── ks_prefix_network
        │     └── pp2_cell / pp3_cell / pp4_cell  (per node, see above)
        └── post_cell          x WIDTH
hrks_pkg                      ipow, num_levels, cell_fanin, cell_count,
                              node_fanout, max_fanout
```

`hrks_top` has the ports `a4, b4 → sum4, cout4` for the radix-4 adder and
`a3, b3 → sum3, cout3` for the radix-3 adder. Its parameter is `WIDTH`
(default 64). `ks_adder` and `ks_prefix_network` have the parameters `WIDTH`
(default 64) and `RADIX` (default 4).

## Design choices not fixed by the architecture

* **Half-adder pre-processing.** The propagate is `a ^ b`, not `a | b`. With
  the XOR form, the single post-processing XOR gives the sum directly.
* **No carry-in.** The carry equations start from `G_{i:0}`, with no carry-in
  term. A carry-in could be added as an extra generate at position −1.
* **Carry out.** `cout` is brought out because the network computes it anyway.
* **Dummy positions are wires.** No buffers are inserted to balance fan-out.
  The physical design could add them.
* **Delay figures are not modelled.** The speed claims rest on transistor-level
  delays of the complex gates: about 3.98 ns for radix 4 against 5.89 ns for
  radix 2, in a 0.8 µm, 3.3 V process. RTL simulation has no such delays. What
  the RTL does carry over is the logic depth and the cell counts.
* Not built: the Sklansky and ripple-carry adders. They are reference points
  for comparison, not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                | what it checks |
|--------------------------|----------------|
| `tb_pre_cell`, `tb_post_cell` | all input combinations |
| `tb_pp2_cell`, `tb_pp3_cell`, `tb_pp4_cell` | all 2^(2N) input combinations, against a serial scan of the groups |
| `tb_ks_prefix_network`   | 64-bit radix 4/3/2 and 16-bit radix 4/3 networks, against a bit-serial prefix scan (directed carry chains at every bit, plus 20,000 random and long-propagate vectors); depth, cell counts and largest fan-out (= radix) against the table above |
| `tb_ks_adder`            | 64- and 16-bit adders, radix 4 and 3, against a WIDTH+1-bit reference sum (corner cases, carry runs of every length, 20,000 random operand pairs) |
| `tb_hrks_top`            | the top level at its default size (no overrides), with 50,000+ random and directed operand pairs per adder. It counts, and requires at least once, each of these: a carry out, no carry at all, a carry run of the full 64 bits, and a carry run at least as long as the span of every level of each network |

To simulate with Verilator (the package goes first):

```
verilator --binary --timing --assert -Irtl rtl/hrks_pkg.sv tb/tb_hrks_top.sv --top-module tb_hrks_top
./obj_dir/Vtb_hrks_top
```

Replace `tb_hrks_top` with any other testbench name. For lint, use
`verilator --lint-only -Wall -Irtl rtl/hrks_pkg.sv rtl/hrks_top.sv`.
