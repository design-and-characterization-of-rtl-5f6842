# Carry-tree adders and an on-chip delay test circuit

A ripple-carry adder's delay grows linearly with its width. A parallel-prefix
("carry-tree") adder computes all carries with a tree of about log2(N) levels.
On an ASIC the tree wins easily. On an FPGA it does not: the ripple-carry adder
runs on the dedicated fast carry chain, while every tree cell costs a LUT and
general routing.

This RTL has three carry-tree adders and the circuit used to measure their
delay on an FPGA:

* a **Kogge-Stone adder**: a full tree with minimal depth and fan-out;
* a **sparse Kogge-Stone adder**: a Kogge-Stone tree that computes only every
  fourth carry, with 4-bit ripple-carry blocks finishing the sum;
* a **spanning-tree carry-lookahead adder**: the same hybrid idea, but with a
  cheaper spanning tree that has an extra logic level on some carries;
* a **test circuit**: a pattern ROM drives all three adders, and an output
  multiplexer behind each adder can bypass it. Measuring the output delay with
  and without the adder isolates the adder's own delay.

All adders are parameterised by `WIDTH`, a power of two. The adders default to
16 bits. The test circuit defaults to 128 bits, the widest size built in the
FPGA study these structures come from.

## The carry operator

Every bit of `a + b` is one of three kinds. It can *generate* a carry
(`g = a & b`), *propagate* an incoming one (`p = a ^ b`), or kill it. A span of
bits is described the same way by a pair (G, P). Two adjacent spans, left (more
significant) and right, combine as:

    (gL, pL) o (gR, pR) = (gL | pL & gR,  pL & pR)

The operator is associative, so the prefix G[i:0] can be built with any
bracketing. That choice of bracketing is what separates one adder family from
another. G[i:0] is the carry into bit i+1. The sum bit is then
`sum[i] = p[i] ^ G[i-1:0]`.

* `black_cell` computes the full pair.
* `gray_cell` computes only the G half. It is used where the span already
  reaches bit 0, since then only the carry is still needed.
* `pg_gen` produces the per-bit (g, p) pairs. It folds the carry-in into bit 0:
  `g[0] = a0 b0 | p0 cin`. This lets every tree treat the carry-in as part of
  bit 0.

`p` is XOR, not OR. As a result, a bit is never (1,1). The test pattern below
relies on that.

The cells are separate modules on purpose. If synthesis keeps the hierarchy,
each cell maps to one LUT and the tree's structure survives into the netlist.
That matters for the delay test. Without it, FPGA synthesis repacks the logic
and the measured path is no longer the tree.

## The three trees

| adder | carry network | cells (N = 16) | cell levels to last carry (N = 16) | general depth |
|---|---|---|---|---|
| `kogge_stone_adder` | Kogge-Stone over all N bits | 49 | 4 | log2 N |
| `sparse_kogge_stone_adder` | 4-bit groups, then Kogge-Stone over N/4 groups | 17 | 4, then a 4-bit ripple | 2 + log2(N/4) |
| `spanning_tree_adder` | 4-bit groups, then Brent-Kung over N/4 groups | 16 | 5, then a 4-bit ripple | 2 + 2 log2(N/4) - 1 |

**Kogge-Stone.** At level k (distance d = 2^k), position i joins position i-d:

* for i < d, the position passes through unchanged;
* for d <= i < 2d, a gray cell is used, because the result now reaches bit 0;
* otherwise, a black cell is used.

After log2 N levels every position holds its final carry. No cell drives more
than two others.

**Sparse Kogge-Stone.** `group_gp4` combines each 4-bit group into one (G, P)
pair, using two levels of black cells. A Kogge-Stone tree over the N/4 groups
then gives the carry into each group. Each group's `ripple_carry_adder`
(4 bits) adds with that carry. `cout` is the carry out of the top ripple block.

**Spanning tree.** It uses the same 4-bit groups and ripple blocks. The group
carries come from a Brent-Kung tree with two sweeps:

* **Up-sweep.** At level k, group j with (j+1) mod 2d == 0 joins group j-d.
* **Down-sweep.** For d = N/16 down to 1, group j with (j+1) mod 2d == d and
  j > d joins the finished prefix at j-d.

This tree has about 2·N/4 cells instead of (N/4)·log2(N/4). However, the carries
finished in the down-sweep pass through extra levels. At 16 bits the carry into
bits 12..15 needs one more cell level than in the sparse Kogge-Stone adder, and
the gap grows with width. This extra stage is the structural reason spanning-
tree adders measure slower at large widths.

The sparse and spanning-tree adders keep only the general ideas described for
these adders: a simplified prefix network, finished by 4-bit ripple-carry
blocks. The exact cell placement in both trees is this RTL's own construction.
For the spanning tree, that construction is the Brent-Kung form.

## Worst-case test pattern

Finding the critical path of a synthesized tree directly is hard. Instead the
inputs can be chosen so that every cell toggles. Restrict every bit to either
(g,p) = (1,0) ("true") or (0,1) ("false"). Then the carry operator behaves like
OR on these two values:

| left | right | result |
|---|---|---|
| (0,1) | (0,1) | (0,1) |
| (0,1) | (1,0) | (1,0) |
| (1,0) | (0,1) | (1,0) |
| (1,0) | (1,0) | (1,0) |

If every input is false, every cell outputs false. If every input is true,
every cell outputs true. So alternating between the two vectors flips every
cell of every tree on every step, and the slowest path is always exercised:

* all bits generate: `a = b = 1...1`, `cin = 1`;
* all bits propagate: `a = 1...1`, `b = 0`, `cin = 0`.

## Test circuit (`adder_test_circuit`)

```
          +---------+   a,b,cin   +-------------------+   {cout,sum}   +-----+
 counter->| pattern |--+--------->| kogge_stone_adder |--------------->| mux |--> ks_out
          |   ROM   |  |          +-------------------+      {cin,a} ->|     |
          +---------+  +--------->| sparse KS adder   |--------------->| mux |--> sks_out
                       |          +-------------------+      {cin,a} ->|     |
                       +--------->| spanning-tree     |--------------->| mux |--> st_out
                                  +-------------------+      {cin,a} ->|     |
                                        include_adder (board switch) --+-----+
```

* **Address counter.** It counts 0 .. DEPTH-1 and wraps. `rst_n` is an
  active-low synchronous reset.
* **`pattern_rom`.** DEPTH words (default 16) of `{cin, b, a}`, with a
  synchronous read like an FPGA block RAM.
  * The lower half holds the worst-case pair, alternating.
  * The upper half holds pseudo-random words. They come from a 32-bit xorshift
    generator (`x ^= x<<13; x ^= x>>17; x ^= x<<5`) seeded with
    `32'h2545F491 ^ address`, filling the word 32 bits at a time from the least
    significant end.
  * The contents are computed at elaboration. There is no data file.
* **`bypass_mux`, one per adder.**
  * `include_adder = 1`: the outputs are the adder's `{cout, sum}`.
  * `include_adder = 0`: the outputs are the ROM word `{cin, a}`.
  * Subtracting the delay in bypass mode from the delay in adder mode cancels
    the ROM, the multiplexer, on-chip routing and the cabling to the analyser.
* **Timing.** The vector addressed in cycle t is on the adder inputs after the
  next edge. `vec_addr` gives the address of the vector now being added, which
  can be used to trigger a logic analyser. The first edge after reset presents
  word 0. The outputs are combinational from the ROM register, so the measured
  delay is clock-to-output.

The delay itself is measured with an external logic analyser at the output
pins. That instrument is not part of the RTL.

## Expected delays on an FPGA

Published Spartan-3E measurements of these structures found the following:

* The ripple-carry adder, running on the fast carry chain, is fastest up to
  64–128 bits.
* The sparse Kogge-Stone adder is about as fast as the full Kogge-Stone adder.
* The spanning-tree adder falls behind at large widths.

The delays follow two simple models (N = 2^n):

    t_KS  = (n + 2)·Δ_LUT + ρ_KS(n)        ρ_KS: routing delay, grows with n
    t_RCA = (N - 2)·Δ_MUX + τ_RCA

The Spartan-3E values are Δ_LUT = 0.612 ns, Δ_MUX = 0.051 ns and
τ_RCA = 1.715 ns. With a routing term fitted to the 4–128-bit results, the
models predict that the Kogge-Stone adder overtakes the ripple-carry adder
near 256 bits: about 11.5 ns against 14.7 ns. These figures describe FPGA
implementations and cannot be reproduced by simulating this RTL.

## How far to trust it, and departures

Everything below is verified at the RTL level, with zero-delay, two-state
simulation:

* all four adders match `a + b + cin` at widths 2/4 to 128 bits, on directed
  carry-chain cases and random vectors;
* the cells are checked exhaustively;
* the test circuit is checked cycle by cycle at its full 128-bit default, and
  at widths 4, 16, 32, 64 and 128 side by side.

Delay is not modelled, so the speed ordering of the trees is an argument from
structure, not a simulation result.

These are this RTL's own choices:

* the carry-in, and the way it is folded into bit 0;
* XOR propagate;
* the cell placement of the sparse and spanning trees;
* the ROM depth, its random half and its synchronous read;
* the address counter and its reset;
* the bypass word `{cin, a}` and the select polarity.

The ripple-carry and carry-skip adders are comparison baselines, and the test
circuit leaves them out. `ripple_carry_adder` is parameterised and works at any
width, but it is instantiated only as the 4-bit sum block. A carry-skip adder
is not provided.

At `WIDTH = 4` the sparse and spanning-tree adders reduce to a single ripple
block. Their group tree is then unused, and a lint tool reports it as unused
logic.

## Files

| file | contents |
|---|---|
| `rtl/prefix_pkg.sv` | `gp_t` (g,p) struct and a width-check helper |
| `rtl/black_cell.sv`, `rtl/gray_cell.sv` | carry operator cells |
| `rtl/pg_gen.sv` | per-bit generate/propagate with the carry-in folded into bit 0 |
| `rtl/group_gp4.sv` | 4-bit group (G,P) |
| `rtl/ripple_carry_adder.sv` | ripple-carry adder (4-bit sum blocks) |
| `rtl/kogge_stone_adder.sv` | Kogge-Stone adder |
| `rtl/sparse_kogge_stone_adder.sv` | sparse Kogge-Stone adder |
| `rtl/spanning_tree_adder.sv` | spanning-tree carry-lookahead adder |
| `rtl/pattern_rom.sv` | test-vector ROM |
| `rtl/bypass_mux.sv` | output bypass multiplexer |
| `rtl/adder_test_circuit.sv` | top level: the test circuit |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_table2_widths.sv` | the test circuit at 4, 16, 32, 64 and 128 bits at once |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
From the project root, for example:

```
verilator --binary --timing --assert rtl/prefix_pkg.sv tb/tb_adder_test_circuit.sv \
    -y rtl --top-module tb_adder_test_circuit -Mdir obj_top
./obj_top/Vtb_adder_test_circuit
```

Replace the testbench name to run another. `tb_adder_test_circuit` runs the
top level at its default parameters (128 bits, 16-word ROM). It also counts how
often each mechanism was exercised: adder path, bypass path, worst-case toggle,
random vectors, carry out and address wrap.

To build a different width, set `WIDTH` on the adder or on
`adder_test_circuit`. It must be a power of two: at least 4 for the hybrid
adders and the test circuit, and at least 2 for the Kogge-Stone adder. Any other
value stops elaboration with an error.
