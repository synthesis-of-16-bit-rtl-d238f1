# A 16-bit parallel acyclic adder, ten gates deep

This is a combinational 16-bit binary adder built only from 2-input AND and
OR gates and inverters. Its longest path from an input to a sum bit is
**10 gates**. In the usual prefix adders (Kogge-Stone, Knowles, Ling, Sklansky,
Han-Carlson, Ladner-Fischer, Brent-Kung) every bit's carry comes out of the
same prefix network. The "acyclic" approach does otherwise:

* **Fix the depth first.** The target is 10 levels of 2-input gates. Each
  sum bit ends in an XOR that is three gates deep, so every carry must be
  ready at level 7.
* **Ripple the low bits.** A plain ripple carry is cheap (two gates per
  bit) and, for the first few bits, still meets the level-7 deadline. So the
  low bits ripple.
* **Compute the rest in parallel,** using just enough lookahead for each
  remaining bit to make the same deadline. Where even that is too slow,
  precompute both possible sums and let the late carry pick one with a
  multiplexer.

The result is 10 levels deep with 240 gates. The published 16-bit prefix
circuits this method is compared with are 11 to 16 levels deep. Kogge-Stone
and Knowles take 256 elements at 11 levels, and Ling 281. Six of those prefix
adders are included here (`ppa_prefix_adder`), built from the same elements,
so the comparison can be rerun.

## How depth and size are counted

Everything is expressed in 2-input elements:

| element | built as | elements | levels (input → output) |
|---|---|---|---|
| AND, OR, inverter | itself | 1 | 1 |
| XOR (`paa_xor2`) | `(a \| b) & ~(a & b)` | 4 | 3 |
| 2-to-1 MUX (`paa_mux2`) | `sel & d1 \| ~sel & d0` | 4 | 3 from `sel`, 2 from data |

Per bit, the adder forms `g = a & b` (generate), `t = a | b` (the carry
condition: a carry into the bit passes when `t = 1`) and the half sum
`h = t & ~g`. The half sum is the XOR of `a` and `b`, and it reuses `g` and `t`.
These are ready at levels 1, 1 and 3.

## The bit partition and its timing

The core of the design is the level at which each signal becomes valid:

| bits | how the sum is formed | carry used | carry ready at | sum ready at |
|---|---|---|---|---|
| 0 | `h0` | – | – | 3 |
| 1 | `g0 ? ~h1 : h1` (MUX) | `g0` | 1 | 6 |
| 2 | `H1 ? (h2 ^ t1) : h2`, `H1 = g1 \| g0` | Ling pseudo-carry `H1` | 2 | 8 |
| 3 | full adder, `p3 ^ c2` | `c2` (ripple, two OR-AND cells) | 5 | 8 |
| 4 | `h4 ^ c3` | `c3 = g3 \| p3 & c2` (ripple) | 7 | 10 |
| 5..12 | `h[i] ^ c[i-1]` | `c[k] = G[k:5] \| T[k:5] & c4` | ≤ 7 | 10 |
| 13..15 | `c12 ? x1 : x0` (interval) | `c12` as MUX select | 7 | 10 |
| carry out | `G[15:13] \| T[15:13] & c12` | `c12` | – | 9 |

Reading the table:

* **Bits 0..2** form a 3-bit adder (`paa_adder3`) for neighbouring bits. Bit 2
  uses Ling's trick. The true carry into bit 2 is `c1 = t1 & (g1 | g0)`, so
  the sum is `h2` when `H1 = g1 | g0` is 0 and `h2 ^ t1` when it is 1. The
  multiplexer waits only for the one-gate `H1`, not for `c1`.
* **Bits 3 and 4** continue the ripple. Bit 3 is an ordinary full adder
  (`paa_full_adder`); its carry `c3` arrives at level 7, the latest a final
  XOR can accept, so bit 4 is the last bit that ripples.
* **Bits 5..12** take an anchor carry, `c4 = G[4:0]`, from a 5-bit lookahead
  tree (level 5). Each carry `c5..c12` joins a group term of the bits above
  bit 4 to that anchor with one AND-OR cell. The group terms span at most
  8 bits and are ready by level 6, so every join lands at level 7.
* **Bits 13..15** would need carries spanning 14 and 15 bits. The trees in
  this design cannot deliver those by level 7 (a 13-bit group is the largest
  that fits in 6 levels). Those three bits therefore form an **interval**
  (`paa_interval`). For each bit both sums are prepared in advance: `x0`
  assuming no carry into bit 13, and `x1` assuming one. `c12`, ready at
  level 7, then selects between them. The select passes through three
  levels: inverter, AND, OR.

## The lookahead tree (`paa_group_gen`)

A group of N bits has a generate `G` (it produces a carry on its own) and a
propagate `T` (it passes a carry through). The tree splits the group into an
upper part of K bits and a lower part of N−K bits and joins them with the
AND-OR carry cell: `G = G_hi | T_hi & G_lo`, `T = T_hi & T_lo`. The `G` path
gains two levels per join and the `T` path one. Because of that asymmetry,
the best split is not the half. It is Fibonacci-like: a deep upper part over a
shallow lower part. A small dynamic programme in `paa_pkg::gg_plan` picks
the split with the least `G` depth. The resulting depths, counted from the
per-bit `g`/`t`, are:

| span N | 1 | 2 | 3 | 4–5 | 6–8 | 9–13 | 14–16 |
|---|---|---|---|---|---|---|---|
| levels of `G` | 0 | 2 | 3 | 4 | 5 | 6 | 7 |

The 2N−1 nodes of the tree are laid out flat in preorder. A node of span m
has its upper child at `id + 1` and its lower child at `id + 2K`, and
`paa_pkg::gg_node` gives each node's span and lowest bit. So one generate
loop builds any N, with no recursive module instantiation.

Feed `t[0]` in place of `g[0]` and the same tree gives the carry out for a
carry in of 1. The interval uses this to form its `x1` candidates.

## The prefix adders it is compared with (`ppa_prefix_adder`)

`ppa_prefix_adder` is an ordinary parallel prefix adder. Its network is chosen
by the `TOPO` parameter. It uses the same per-bit `g`, `t`, `h`, the same
AND-OR cell and the same four-element XOR as `paa16`, so depths and sizes
compare like for like. Each stage either passes a bit's `(G, P)` pair on, or
combines it with a lower node `j`: `G = G_i | P_i & G_j`, `P = P_i & P_j`.
`paa_pkg::ppa_src` gives `j` for every stage and bit:

| `TOPO` | stages (16 bit) | node `j` combined with bit `i` at stage `s` |
|---|---|---|
| `PT_KOGGE_STONE` | 4 | `i − 2^s` |
| `PT_KNOWLES` | 4 | as Kogge-Stone, but the last stage pairs bits: `(i − 8) \| 1` |
| `PT_SKLANSKY` | 4 | when bit `s` of `i` is set: the top of the lower half of its block |
| `PT_HAN_CARLSON` | 5 | `i − 1` on odd bits, Kogge-Stone on odd bits, then `i − 1` on even bits |
| `PT_LADNER_FISCHER` | 5 | the same, with Sklansky in place of Kogge-Stone |
| `PT_BRENT_KUNG` | 7 | up-sweep tree `i − 2^s`, then the down-sweep fills the gaps |

`paa_pkg::ppa_covers` checks that every bit ends with its full carry, and
`ppa_depth` counts the adder's depth. With the same Yosys flow as below, the
16-bit versions measure:

| adder | depth | elements | published depth | published elements |
|---|---|---|---|---|
| acyclic, `paa16` | **10** | 240 | 10 | 221 |
| Kogge-Stone | 11 | 256 | 11 | 256 |
| Knowles [2,1,1,1] | 12 | 256 | 11 | 256 |
| Sklansky | 12 | 205 | 12 | 204 |
| Han-Carlson | 13 | 205 | 13 | 205 |
| Ladner-Fischer | 14 | 190 | 14 | 190 |
| Brent-Kung | 16 | 187 | 16 | 187 |
| Ling | not built | | 11 | 281 |

Every prefix adder is at least one level deeper than the acyclic adder. The
ones that are cheaper (Sklansky and below) are two to six levels deeper. The
Knowles network here has fanout 2 on its last stage. Its paired bits then take a
carry group that is one level later, so it lands one level deeper than the
published figure. The published Knowles wiring is not known. The Ling adder
depends on a restructured carry equation that is not given, so it is left
out.

## Transitive-carry cells

The carry of one bit can be written two ways, and both are provided:

* `paa_carry_andor`: `c_out = g | p & c_in`. Used in the full adder and for
  every join in the lookahead trees.
* `paa_carry_orand`: `c_out = t & (g | c_in)` with `t = a | b`. This equals
  the first form because `g` implies `t`. Chained (`paa_carry_seq`), it gives
  the sequential two-bit carry of the 3-bit adder: four gates, four levels.

`paa_full_adder` also reports the carry status of its bit: kill
(`a = b = 0`), generate (`a = b = 1`) or propagate (`a ≠ b`). Its
`MUX_CARRY` parameter switches its carry from the AND-OR cell (10 elements in
all) to a multiplexer, `Cout = P ? Cin : A`. That version is 9 elements when
the multiplexer is counted as a single element, 12 with it expanded into
gates as here.

## Interfaces

| module | ports | parameters |
|---|---|---|
| `paa16` (top) | `a[15:0]`, `b[15:0]` in; `s[15:0]`, `cout` out | none |
| `paa_adder3` | `a[2:0]`, `b[2:0]` in; `s[2:0]`, `cout` out | – |
| `paa_full_adder` | `a`, `b`, `cin` in; `s`, `cout`, `g`, `p`, `k`, `status` out | `MUX_CARRY` (0) |
| `paa_interval` | `g`, `t`, `h` `[N-1:0]`, `c_in` in; `s[N-1:0]` out | `N` (3) |
| `paa_group_gen` | `g`, `t` `[N-1:0]` in; `gg`, `tt` out | `N` (16) |
| `paa_carry_seq` | `g`, `t` `[N-1:0]`, `c_in` in; `c[N-1:0]` out | `N` (2) |
| `paa_carry_andor`, `paa_carry_orand` | `g`, `p`/`t`, `c_in` in; `c_out` out | – |
| `paa_xor2`, `paa_mux2` | 1-bit elements | – |
| `ppa_prefix_adder` | `a`, `b` `[N-1:0]` in; `s[N-1:0]`, `cout` out | `N` (16, power of two ≥ 4), `TOPO` (`PT_KOGGE_STONE`) |

`paa_pkg` holds the width, the bit partition (`SEQ_BITS`, `ANCHOR`, `IV_LO`,
`IV_BITS`), the carry-status enum and the split functions. It also holds the
depth rule of acyclic adders, `paa_depth_protocol(n) = 2·log2(n) + 2`. By
that rule an 8-bit adder is 8 levels deep and each doubling of the width adds
two: 10 at 16 bits, 12 at 32 bits, 24 at 2048 bits. `paa16` checks at
elaboration that its partition tiles the word and that its depth budget
matches the rule.

Everything is combinational. There is no clock, no reset and no carry in.

## What is original and what is this design's own

The method fixes these points: a 16-bit width; no carry in (the lowest sum is
simply `a0 ^ b0`); a depth of 10 two-input elements, with the XOR at four
elements and three levels; the ripple-then-parallel organisation; and the
AND-OR and OR-AND carry cells, the sequential two-bit carry, the XOR/MUX
structure for neighbouring bits and the two-XOR-one-MUX structure for an
interval. The full adder and its carry-status table also follow it.

The original 16-bit circuit is characterised here by its depth and its
element counts: 15 XOR, 80 AND, 61 OR and 20 inverters, 221 elements. Its
gate-level wiring is not reproduced. The following are this design's own,
chosen to meet the same depth:

* where the ripple stops (bit 4), the anchor carry `c4`, and the interval
  at bits 13..15;
* the lookahead trees and their Fibonacci-like splits;
* the carry out, which the original does not show as a port;
* the internal form of the XOR and the multiplexer;
* the last element of bits 1, 2 and 13..15 being a multiplexer. The original
  ends every sum bit in an XOR.

The prefix adders it is compared with are built in their textbook form (see
above), not from the published drawings. The Ling adder is not built.

The depth matches the original: 10. The size does not: **240 elements
(131 AND, 74 OR, 35 inverters) against 221**. That is still fewer than the
256 and 281 elements quoted for the Kogge-Stone/Knowles and Ling circuits,
but the original reaches the same depth with 19 fewer elements, by a
structure not reproduced here. The size counts identical gates once, as a
hand-drawn circuit would. A synthesis tool that restructures logic will
report different numbers.

## Checking it

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* The cells and `paa_adder3` are checked exhaustively against truth tables
  and integer sums.
* `paa_group_gen` is checked at spans 1, 2, 3, 5, 10 and 16: exhaustively
  over the low five bits, then on long propagate chains and 20,000 random
  pairs. Its `G` output with and without a carry in, and its `T` output, are
  compared with integer sums.
* `paa_interval` is checked exhaustively at 3 and 6 bits, with 5 bits
  covered by the same loop.
* `tb_paa16` runs the top at its only size. It covers the worked example
  `0110101100 + 0010010100 = 1001000000` and corner cases. It runs every
  pair of 8-bit operands in three byte positions, then 20 million random
  pairs: about 20 million checks in a few seconds. It also counts how often
  each mechanism was exercised: carry out of the 3-bit adder, ripple carry
  into bit 4, middle carries taken through the anchor `c4`, the interval
  selected with carry 0 and 1, carry out, and a carry running from bit 0 to
  bit 15. It fails if any of these never happened. It also checks the depth
  rule `paa_depth_protocol` from 8 to 2048 bits.
* `tb_paa_group_gen` also checks the planned tree depth for every span from
  1 to 16 against the table above.
* `tb_ppa_prefix_adder` builds all six prefix adders at 16 bits next to
  `paa16`. Three of them are also built at 8 and 32 bits. Every adder is
  checked against integer sums on corner cases, every pair of 8-bit operands
  in two byte positions, and 300,000 random pairs. It checks each network's
  coverage and depth, and that each one is deeper than the acyclic adder.

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/paa_pkg.sv tb/tb_paa16.sv \
          --top-module tb_paa16 && ./obj_dir/Vtb_paa16
```

Replace `tb_paa16` with any other testbench name to run that one.

The depth and size above can be reproduced with Yosys and its slang front
end. The flow flattens the design and maps it to single gates without
restructuring. It merges only identical gates:

```sh
yosys -m slang -p "read_slang rtl/*.sv --top paa16; hierarchy -top paa16; proc; \
  flatten; chformal -remove; opt_clean -purge; techmap; opt_merge; \
  opt_clean -purge; stat; ltp -noff"
```

`ltp` reports the longest path in gates (10). `stat` gives the gate counts.
For a prefix adder use `--top ppa_prefix_adder -G TOPO=0` (0 to 5 in the order
of the table above) and `hierarchy -top ppa_prefix_adder`.

## Changing it

* To try another partition, edit `SEQ_BITS`, `ANCHOR`, `IV_LO` and `IV_BITS`
  in `paa_pkg`. The elaboration checks reject a partition that leaves bits
  out. They do not check depth: rerun the Yosys flow. The rule to respect is
  that every carry feeding a final XOR must be ready at level 7, and an
  interval's select at level 7.
* `paa_group_gen`, `paa_interval` and `paa_carry_seq` are generic in `N` and
  can be reused for other widths. `paa16` itself is laid out for 16 bits.
