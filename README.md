# Urdhwa multiplier with XOR-XNOR 4:2 compressors

An unsigned 8 x 8 combinational multiplier. It forms its partial products the
Urdhwa Tiryagbhyam ("vertically and crosswise") way: every bit product whose
indices add up to k goes to product column k, and all columns are summed at the
same time. The column sums are made by carry-save compressors, not by chains of
adders. The design's main idea is the compressor cell. In the 4:2 compressor,
most of the XOR gates of the textbook two-full-adder version are replaced by
2:1 multiplexers. An XOR-XNOR cell provides true and complement rails, and
these drive the multiplexers as selects and as data. A 7:2 compressor built
from two of these 4:2 cells does most of the column reduction.

Everything is combinational. There is no clock and no reset, so the product `p`
follows the operands `a` and `b` after the propagation delay.

## Cells

| module | function |
|---|---|
| `xor_xnor` | `x = a ^ b`, `xn = ~(a ^ b)` |
| `mux2` | `y = s ? d1 : d0` |
| `half_adder` | `a + b = s + 2*co` |
| `full_adder` | `a + b + c = s + 2*co` |
| `compressor_4to2` | `x1+x2+x3+x4+cin = sum + 2*(carry + cout)` |
| `compressor_7to2` | `x[0]+...+x[6]+cin1+cin2 = sum + 2*carry + 4*(cout1 + cout2)` |
| `cpa_ripple` | `W`-bit ripple-carry adder, `(a + b) mod 2^W` |
| `urdhwa_multiplier` | `p = a * b`, top level, parameter `N` (default 8) |

## The XOR-XNOR 4:2 compressor

With `p = x1^x2` and `q = x3^x4` (each with its complement from a `xor_xnor`
cell), five multiplexers compute:

```
cout  = p ? x3 : x1          // x1 and x2 agree -> their common value, else x3
t     = q ? ~p : p           // x1^x2^x3^x4
tn    = q ?  p : ~p          // its complement
carry = t ? cin : x4
sum   = cin ? tn : t         // parity of all five inputs
```

`cout` depends only on `x1..x3`, never on `cin`. A row of these cells chained
`cout -> cin` from each column to the next therefore has no carry ripple: each
`cin` settles one cell delay after its neighbour's inputs do. The `sum`
multiplexer has `cin` as its select, so the select can be ready before the
parity rails arrive.

The complement `tn` comes from a second multiplexer fed with the opposite rails.
The reference circuit shows four multiplexers and leaves out how `sum` gets
the inverted parity. That fifth multiplexer is this design's own choice. The
XNOR rail of the `x3`/`x4` cell is not used.

## The 7:2 compressor, and where it departs

Nine bits of one column go in: seven operand bits and two carry-ins. They are
handled by two 4:2 compressors, one half adder and two full adders:

```
R = 4:2(x0, x1, x2, x3, cin=cin1)  -> S1, C1 (carry), C2 (cout)
L = 4:2(x4, x5, x6, 0,  cin=cin2)  -> S2, C21 (carry), C22 (cout)
HA(S1, S2)       -> sum,  S3        weights 1, 2
FA(S3, C1, C21)  -> K,    C3        weights 2, 4
FA(K,  C2, C22)  -> carry, cout2    weights 2, 4
cout1 = C3                          weight 4
```

In the reference design, the last full adder adds `C3` to `C2` and `C22`, and
`K` is the carry output. But `C3` is worth twice as much as the two compressor
carry-outs. Wired that way, the cell gives a wrong column sum for 256 of its
512 input combinations (`tb_compressor_7to2` detects it). Here the last full
adder takes `K` instead, and `C3` leaves the cell directly. The cell count
stays the same, and the cell is exact. The cost is that both carry-outs have
weight 4: in a row of 7:2 cells, `cout1`/`cout2` of column k feed
`cin1`/`cin2` of column k+2, not k+1. The carry-outs depend on the carry-ins
(through `S1`, `S2`, `S3`). So a 7:2 row has a carry path that steps two
columns per cell, which the 4:2 row does not have.

## How the multiplier uses them

For operand width `N` there are `2N` columns. Column k holds the bit products
`a[k-i] & b[i]`, one per row `i`.

1. **7:2 stage.** Each column has one `compressor_7to2`. It takes rows
   `b[0]..b[6]`. Its `sum` stays in column k, its `carry` goes to column k+1,
   and `cout1`/`cout2` go to column k+2.
2. **4:2 stage.** Each column has one `compressor_4to2`. It takes the column's
   7:2 `sum`, the 7:2 `carry` arriving from column k-1 and the row-`b[7]` bit,
   and its `x4` is tied to 0. Its `sum` stays in column k, and its `carry` and
   `cout` go to column k+1.
3. **Final adder.** `cpa_ripple` adds the two remaining rows.

Bits pushed above column `2N-1` are dropped. This is safe because the product
always fits in `2N` bits and each stage is exact modulo `2^(2N)`. The 7:2 stage
takes up to seven rows and the 4:2 stage one more, so `N` may be 2 to 8. Any
other value stops elaboration with an error.

The reference material defines the cells but not the multiplier's wiring, its
operand width or its final adder. The two-stage arrangement, the ripple-carry
final adder and `N = 8` are this design's choices. All of them are simple ones.
The design is not tuned for delay, so it will not reproduce any published gate
count or path delay. After coarse synthesis it has about 450 single-bit gates
and multiplexers.

## Not included

* The full-adder-based and XOR-gate-based 4:2 compressors. These are the
  baselines the XOR-XNOR cell is measured against, and no multiplier variant
  here uses them.
* Signed operands, pipelining and registers. None are part of the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_xor_xnor`, `tb_mux2`, `tb_half_adder`, `tb_full_adder` | all input combinations against the truth table |
| `tb_compressor_4to2` | all 32 inputs: column identity, sum parity, `carry`/`cout` equations, `cout` independent of `cin` |
| `tb_compressor_7to2` | all 512 inputs: column identity and sum parity |
| `tb_urdhwa_multiplier` | all 65,536 operand pairs at the default `N = 8` against `a * b`; also counts how often the 7:2 carry-ins, both 7:2 carry-outs together, the 4:2 carry chain, the `b[7]` row and final-adder carries were used, and fails if any never happened |
| `tb_urdhwa_multiplier_widths` | all operand pairs at `N = 2..7` |

All of them pass. The top-level test runs in well under a second.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_urdhwa_multiplier tb/tb_urdhwa_multiplier.sv
./obj_dir/Vtb_urdhwa_multiplier
```

To change the width, set `N` on `urdhwa_multiplier`. The product port widens
to `2N` bits. Widths above 8 would need another compressor stage in
`urdhwa_multiplier.sv`, for example a second 7:2 row.
