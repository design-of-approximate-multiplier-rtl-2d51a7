# Truncated array multiplier TM(n, k)

An approximate unsigned multiplier that trades a bounded, one-sided error for
a smaller and faster circuit. The k least significant bits of both n-bit
operands are thrown away before multiplying, so only an (n-k) x (n-k)
multiplier has to be built:

    p = ((a >> k) * (b >> k)) << 2k

The 2k low bits of the 2n-bit product are then always zero, and the product
never exceeds the exact one. The largest error, reached at
a = b = 2^n - 1, is

    WCE(n, k) = (2^k - 1) * (2^(n+1) - 2^k - 1)

For the default n = 8, k = 2 this is 1521 out of a full-scale product of
65025. Over all 65,536 operand pairs the error rate is 93.2 % and the mean
error distance is 380.25. k = 0 gives an exact multiplier.

## Structure

The multiplier is purely combinational. It works in the three usual stages
of an array multiplier, applied to the m = n - k kept bits:

1. **Partial product generation.** m x m AND gates form a[j] & b[i].
2. **Partial product reduction** (`csa_array`). This is an m x m array of full
   adders in carry-save form.
3. **Final addition** (`cla_adder`). A single m-bit carry look-ahead adder
   merges the array's saved sums and carries.

```
 a[n-1:k] ─┐                          ┌─ p_low (m bits) ──────────────┐
           ├─ csa_array (m x m FAs) ──┤                               ├─ {high, low} << 2k ─ p
 b[n-1:k] ─┘                          └─ sum_vec, carry_vec ─ cla_adder ─ high (m bits) ┘
```

### The carry-save array

Cell (i, j), for row i and column j, is a full adder with three inputs:

- the partial product a[j]·b[i], of weight 2^(i+j);
- the sum of cell (i-1, j+1), the diagonal neighbour in the row above;
- the carry of cell (i-1, j), directly above.

The sum of cell (i, j) has weight 2^(i+j) and its carry has weight
2^(i+j+1). So every input of a cell has the same weight, and no carry moves
sideways within a row. The delay through the array grows with the number of
rows, not with the number of cells. Row 0 is fed zeros in place of a row
above, which leaves it as plain AND gates after synthesis.

The rightmost sum of each row is a finished product bit, p[i]. After the last
row, two m-bit vectors of weight 2^m remain:

- `sum_vec[j]` is the sum of cell (m-1, j+1), and bit m-1 is always 0;
- `carry_vec[j]` is the carry of cell (m-1, j); bit m-1 is always 0 as well,
  because the leftmost column never receives a carry.

It follows that `a*b = ((sum_vec + carry_vec) << m) + p_low`.

### The merging adder

The merging adder is a carry look-ahead adder, not a ripple-carry one. Each
bit forms a generate g = x&y and a propagate p = x^y. Each carry is built
directly as a flat sum of products:

    c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]...p[0]cin

so no carry waits for the carry below it. This is a single level of
look-ahead with no groups, which is adequate at the widths used here (6 bits
by default). For much wider operands, a blocked or multi-level look-ahead
would be the natural change. The adder's carry out is never needed and is
left open, because an m x m product always fits in 2m bits.

## Modules

| file | module | what it is |
|---|---|---|
| `rtl/tam.sv` | `tam #(N=8, K=2)` | top: truncation, array, merging adder; ports `a[N-1:0]`, `b[N-1:0]`, `p[2N-1:0]` |
| `rtl/csa_array.sv` | `csa_array #(M=6)` | m x m carry-save array with partial-product generation |
| `rtl/cla_adder.sv` | `cla_adder #(W=6)` | W-bit carry look-ahead adder with carry in and carry out |
| `rtl/full_adder.sv` | `full_adder` | one-bit full adder, the array cell |

`K` can be set to any value from 0 to N-1. An elaboration-time assertion
rejects K >= N.

## Timing

There is no clock, register or handshake: `p` follows `a` and `b` after the
array-plus-adder delay. To use the multiplier in a clocked datapath, register
its inputs and output around it. The critical path runs down the m rows of
the array and then through the look-ahead adder.

## Choices made here

- **Width.** n = 8 is the reference size. The 5-bit array is the small worked
  example, and the testbenches cover it too.
- **Truncation depth.** The default k = 2 is a choice, not a fixed value of
  the design. Every k is verified for n = 5 and n = 8.
- **Operand type.** The operands are unsigned. Signed operands are not
  supported.
- **Merging adder.** The merging adder is the carry look-ahead variant. A
  ripple-carry merge is the slower alternative and is not included.
- **Array wiring.** The exact wiring of the array is the standard carry-save
  arrangement described above.

## Verification

Each testbench checks itself and prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | covers |
|---|---|
| `tb/full_adder_tb.sv` | all 8 input combinations |
| `tb/cla_adder_tb.sv` | the 6-bit adder over all x, y, cin; the 16-bit adder over 20,000 random vectors, including full-width propagate |
| `tb/csa_array_tb.sv` | m = 6 and m = 3 over all operand pairs; checks `p_low` and that the saved vectors reconstruct a*b |
| `tb/tam_tb.sv` | default `tam` (n = 8, k = 2) over all 65,536 pairs against `((a>>k)*(b>>k))<<2k`; low bits zero, one-sided error, worst case equal to WCE; prints error rate and mean error distance |
| `tb/tam_configs_tb.sv` | every configuration k = 0..4 at n = 5 and k = 0..7 at n = 8, exhaustive; checks the measured worst-case error against the WCE formula for each |

To run one testbench with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        --top-module tam_tb tb/tam_tb.sv
    ./obj_dir/Vtam_tb

Each testbench takes well under a second.

The `tam` lint reports unused input bits `a[K-1:0]` and `b[K-1:0]`, and an
empty `cout` pin. Both are intended: the unused bits are the truncation, and
the empty pin is explained under the merging adder.
