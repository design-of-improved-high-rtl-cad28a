# Ling parallel-prefix adder

A parallel-prefix adder works out every carry of an N-bit addition at the same time, using a
tree of small "carry operator" cells. The Ling variant makes that tree cheaper. It does not
compute the true carry `c_i` into each bit. It computes a *pseudo-carry* `H`, which needs one
propagate term fewer at every node. The final AND that turns `H` back into a carry is moved into
the sum cell. There it only drives the select input of a multiplexer, off the critical path.

This repository has a synthesizable SystemVerilog version of such an adder. It is built from
three gate-level cell types and a Kogge-Stone tree. The default width is 32 bits.

## The arithmetic

For bit `i` with operand bits `a_i` and `b_i`:

| signal | formula | meaning |
|---|---|---|
| `d_i` | `a_i ^ b_i` | half-sum |
| `g_i` | `a_i & b_i` | generate |
| `p_i` | `a_i \| b_i` | propagate in its OR form (also called "transmit") |

The ordinary carry is `c_{i+1} = g_i | p_i g_{i-1} | p_i p_{i-1} g_{i-2} | ...`. Every term
contains `p_i`, and `g_i` already implies `p_i`, so `p_i` can be factored out:

    c_{i+1} = p_i & H_i,     H_i = g_i | c_i
            = g_i | p_{i-1} g_{i-1} | p_{i-1} p_{i-2} g_{i-2} | ...

This factoring needs the OR-form propagate. With the XOR form, `g_i` does not imply `p_i`.

`H_i` has the same shape as a carry, but each propagate index is shifted down by one. Feed
position `i` of an ordinary prefix tree with the pair `(g_i, p_{i-1})`, and the tree's group
generate at position `i` is exactly `H_i`. No special Ling operator is needed. The carry cell
is the standard one:

    g = (p_hi & g_lo) | g_hi
    p =  p_hi & p_lo

The sum bit needs the true carry `c_i = p_{i-1} & H_{i-1}`:

    S_i = d_i ^ (p_{i-1} & H_{i-1}) = H_{i-1} ? (d_i ^ p_{i-1}) : d_i

The XOR `d_i ^ p_{i-1}` is ready long before the tree finishes. The late signal `H_{i-1}` only
selects between two values that are already settled.

**Carry-in and carry-out.** The carry-in enters in two places:

- it is ORed into the generate of bit 0 at the tree input, so `H_0 = g_0 | cin`;
- the bit-0 sum cell sees `H_{-1} = cin` and `p_{-1} = 1`, so `S_0 = d_0 ^ cin`.

The carry-out is `cout = p_{N-1} & H_{N-1}`.

## Structure

```
 a,b ──► ling_pre_cell ×N ──d,g,p──┐
                                   │ (g_i, p_{i-1}), bit 0: (g_0|cin, 1)
                                   ▼
                          ling_prefix_tree (Kogge-Stone, ceil(log2 N) levels)
                                   │ H_i
                                   ▼
          ling_sum_cell ×N : S_i = H_{i-1} ? d_i^p_{i-1} : d_i       cout = p_{N-1} & H_{N-1}
```

| module | role |
|---|---|
| `ling_adder` | top level. Ports: `a[N-1:0]`, `b[N-1:0]`, `cin` in; `sum[N-1:0]`, `cout` out. Parameter `N` (default 32, minimum 2). |
| `ling_pre_cell` | pre-processing cell: `d`, `g`, `p` of one bit. |
| `ling_prefix_tree` | Kogge-Stone network of `ling_carry_cell`. At level `k`, position `i >= 2^k` combines with position `i-2^k`. Lower positions pass their pair through unchanged. |
| `ling_carry_cell` | two-input carry operator (two AND gates, one OR gate). |
| `ling_sum_cell` | post-processing cell: XOR followed by a 2:1 mux selected by `H_{i-1}`. |
| `ling_xor_cell` | XOR built from two inverters, two AND gates and one OR gate. Used in the pre-cell and the sum cell. |
| `ling_pkg` | `gp_t` (a generate/propagate pair) and the helpers `ks_levels()` and `ks_cells()`. |

Cell counts follow from the Kogge-Stone shape. Level `k` has `N - 2^k` carry cells.

| N | pre-cells | carry cells | sum cells | tree levels |
|---|---|---|---|---|
| 4 | 4 | 5 | 4 | 2 |
| 8 | 8 | 17 | 8 | 3 |
| 32 | 32 | 129 | 32 | 5 |

The 8-bit row (8 / 17 / 8) is the cell budget of the original 8-bit design, and the 4-bit row
matches its 4-bit schematic. Any `N >= 2` works, including widths that are not a power of two.

**Timing.** The adder is purely combinational: no clock and no registers. The critical path runs:

1. through one pre-cell,
2. through `ceil(log2 N)` carry cells,
3. into the select input of one multiplexer.

## Design choices and departures

- **Valency.** Every tree node has two inputs (valency 2). Higher-valency nodes would combine
  three or four groups in one cell and give a shallower tree. They are not provided, because no
  cell structure for them was available to follow.
- **How H is formed.** Feeding the tree with `(g_i, p_{i-1})` pairs is one way to make a standard
  prefix tree produce Ling pseudo-carries. Other Ling formulations pair bits (for example
  `g_i | g_{i-1}` with `p_{i-1} p_{i-2}`) and give a different tree. The sums are the same, but
  the gate count and depth differ.
- **Carry-in and carry-out** are handled as described above. Both are choices of this
  implementation.
- **Gate-level cells.** The cells are written as explicit gates to mirror the schematics. Any
  synthesis tool will remap them anyway.
- **Not included:**
  - the Kogge-Stone and Ladner-Fischer adders that the Ling adder was compared against;
  - the lookup-table multiplier that the design was said to be combined with. It was only named,
    with no structure given.
- **No process results.** The original transistor counts, delays and power numbers depend on
  the schematic and the process. This RTL cannot reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_ling_xor_cell`, `tb_ling_pre_cell`, `tb_ling_carry_cell`, `tb_ling_sum_cell` | exhaustive truth tables, with expected values derived from what each cell means (for example, the sum cell against `d ^ (p & H)`) |
| `tb_ling_prefix_tree` | tree against a bit-serial evaluation of the same prefix: exhaustive at 4 and 5 bits, 20,000 random vectors at 32 bits, and the 4- and 8-bit cell counts |
| `tb_ling_adder` | adder against integer addition: exhaustive at 4, 5 and 8 bits including carry-in; the worked example `1001 + 1100 = 1_0101`; 50,000+ random and directed vectors at 32 bits |
| `tb_ling_adder_full` | the default 32-bit adder with no parameter overrides: corner cases and 100,000 random vectors |

`tb_ling_adder` also counts how often each mechanism occurs at 32 bits, and fails if any of them
never does:

- a carry-out;
- a carry-in that changes the sum;
- a carry that runs from `cin` through all 32 bits;
- `H_{i-1} = 1` with `p_{i-1} = 0`, where the sum cell must *not* flip the bit;
- `H_{i-1} = 1` with `p_{i-1} = 1`, where it must.

All testbenches pass. Each one was also run against a deliberately broken copy of its module,
and it reported failures.

## Simulating

With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/ling_pkg.sv tb/tb_ling_adder.sv \
          --top-module tb_ling_adder -Mdir obj_adder
./obj_adder/Vtb_ling_adder
```

Replace `tb_ling_adder` with any other testbench name. Verilator finds the modules in `rtl/`
through `-Irtl`. To use the adder at another width, instantiate `ling_adder #(.N(16))`.
