# Bit-sliced 32 x 32 unsigned multiplier

This design multiplies two unsigned 32-bit integers by working on 4-bit
slices. Each operand is cut into eight 4-bit slices. Every pair of slices is
multiplied by a small 4 x 4 Wallace-tree multiplier. Slice products of the same
weight are then summed by chains of Kogge-Stone adders. Each column sum gives one
4-bit slice of the 64-bit product, and passes its upper bits on as the carry
into the next column.

The top level, `bitslice_mult32`, uses this slice structure at its interface
too. Operand slices go in one pair per cycle, least significant pair first.
Product slices come out one per cycle, least significant slice first. The whole
array is also available as a plain combinational multiplier, `multiplier32bit`
(`A[31:0]`, `B[31:0]` in, `P[63:0]` out).

Slice-by-slice processing sits between two extremes. A bit-serial multiplier is
cheap but slow. A full-word parallel datapath is fast but costly. The slice
approach was proposed for rapid single-flux-quantum (RSFQ) superconducting
logic, where every gate is clocked. This RTL is the logic function of that
design, written as ordinary synchronous CMOS-style SystemVerilog.

## Slice arithmetic

Write `A = sum a_i 16^i` and `B = sum b_j 16^j`, for i, j = 0..7. Then

    A * B = sum_k 16^k * C_k,   where C_k = sum_{i+j=k} a_i * b_j,   k = 0..14

Each `a_i * b_j` is at most 225 and takes 8 bits. Column `k` holds
`min(k+1, 15-k)` of these products: one in column 0, up to eight in column 7,
and one again in column 14.

The product slices come out of a carry-save-like sweep from low to high:

    S_0 = C_0
    S_k = C_k + (S_{k-1} >> 4)
    P_k = S_k mod 16                  (k = 0..14)
    P_15 = S_14 >> 4                  (at most 4 bits, because A*B < 2^64)

The largest column sum is `S_7 <= 8*225 + 104 = 1904`. That is why 11-bit
adders are enough at 32 bits. At 16 bits the largest is 944, so 10 bits are
enough. At 8 bits it is 464, so 9 bits are needed. `bitslice_pkg::col_sum_width`
computes this bound. `multiplier32bit` refuses to elaborate if `KS_W` is too
narrow.

The property the serial top relies on is simple. `P_k` depends only on the
slices `a_0..a_k` and `b_0..b_k`.

## The 4 x 4 Wallace multiplier (`wallace4`)

The 16 bit products `a[i] & b[j]` are reduced column by column. A full adder
takes three bits of one weight. A half adder takes two. Every carry goes one
column to the left:

| column | adders | output |
|---|---|---|
| 0 | none | p0 = a0b0 |
| 1 | HA(a1b0, a0b1) | p1 |
| 2 | FA(a2b0, a1b1, a0b2); HA(sum, carry from col 1) | p2 |
| 3 | FA(a3b0, a2b1, a1b2); FA(sum, a0b3, FA carry from col 2); HA(sum, HA carry from col 2) | p3 |
| 4 | FA(a3b1, a2b2, a1b3); FA(sum, two carries from col 3); HA(sum, third carry) | p4 |
| 5 | FA(a3b2, a2b3, carry); FA(sum, two carries) | p5 |
| 6 | FA(a3b3, two carries from col 5) | p6, and its carry is p7 |

That is eight full adders and four half adders, with no final carry-propagate
adder. The first row of adders, with its grouping of bit products, matches the
source block diagram. The lower rows are this design's own wiring. The source
diagram routes a carry back into its own column, which does not produce a correct
sum, so it was not copied literally. Every one of the 256 input pairs is checked.

## Column adders (`kogge_stone_adder`, `multiplier32bit`)

`kogge_stone_adder #(WIDTH)` is a standard parallel-prefix adder. Its
log2(WIDTH) levels combine (generate, propagate) pairs at distances 1, 2, 4, 8.
The carry-in is folded into the generate of bit 0. The multiplier always ties
the carry-in to 0.

`multiplier32bit` instantiates one `wallace4` per slice pair, 64 in all. Each
column then gets a chain of `KS_W`-bit adders:

1. The first adder adds the products with the two highest a-slice indices,
   for example `a3*b0 + a2*b1` in column 3.
2. Each further adder brings in the next product, with a falling a-slice index.
3. The last adder adds `S_{k-1} >> 4` from the column below.

Column 0 has no adder. At 32 bits there are 63 adders. This is a ripple across
columns: the critical path runs through every column's carry adder. There are
no pipeline registers.

## Slice-serial top (`bitslice_mult32`)

```
clk, rst_n                 synchronous, active-low reset
in_valid, in_ready         a pair (a_slice, b_slice) is taken when both are high
a_slice[3:0], b_slice[3:0] operand slice k, k = 0..7 in order
out_valid                  p_slice holds product slice p_index
p_slice[3:0], p_index[3:0]
out_last                   P_15 is on p_slice
```

Accepted slices are written into two 32-bit operand registers. Slice 0 of an
operation clears both registers. The combinational array always multiplies the
registers. Because `P_k` only needs slices 0..k, it is already correct in the
cycle after pair k is taken, so the top outputs it then. After the eighth pair,
`in_ready` drops for the drain. `P_8..P_15` then come out on consecutive
cycles.

`in_ready` goes high again in the cycle that shows `P_15`. A new operation can
therefore follow back to back, one every 16 cycles. Gaps in `in_valid` while
loading are allowed. They delay the matching output slices, and `out_valid` is
low during a gap.

Timing with no gaps: `P_0` comes one cycle after the first pair is taken, and
`P_15` comes 16 cycles after it. Two assertions check the drain and the order of
the output slices.

## Parameters and sizes

| module | parameter | default | note |
|---|---|---|---|
| `bitslice_mult32`, `multiplier32bit` | `WIDTH` | 32 | multiple of 4, at least 8 |
| same | `KS_W` | 11 | adder width; use 10 for WIDTH=16 and 9 for WIDTH=8 |
| `kogge_stone_adder` | `WIDTH` | 11 | at least 2 |

The source compares 4-, 8-, 16- and 32-bit versions of the scheme. The 4-bit
version is a single `wallace4`. The others are `WIDTH` = 8, 16 and 32. The
source uses 8-bit adders for the 8-bit version. Here 9 bits are needed, because
a column sum can reach 464.

At the default size, coarse synthesis reports about 8,500 word-level cells and
74 flip-flops for the top.

## Where this departs from the source description

- The source's figures of merit do not apply to this RTL. These are the gate
  counts, the 52 pipeline stages, the 10 GHz clock and the 14.6 ns latency. They
  describe an RSFQ gate-level implementation in which every gate is a pipeline
  stage. The source does not say where the stages sit, so that pipeline is not
  modelled. The RTL here is combinational between the operand registers and the
  output.
- In the source's array drawing, the carry into the top column (a7*b7) is only
  implied. The adder for it is included here.
- The source gives the slice-serial input and output order but no handshake,
  reset or cycle timing. Those are this design's own choices.
- The 4 x 4 Wallace tree is rewired below its first row, as described above.
- The source's count of Kogge-Stone adders for the 32-bit size (9) does not
  match the array as drawn, which needs 63 two-input column adders. The
  8-bit count (3) does match.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line.

- `tb_half_adder`, `tb_full_adder`, `tb_wallace4`: exhaustive.
- `tb_kogge_stone_adder`: an 8-bit instance, exhaustive including carry-in.
  An 11-bit instance, with long carry chains plus 20,000 random sums.
- `tb_multiplier32bit`: the 32-bit array, checked with:
  - the worked example 0xE507E03F * 0xAEA007F9 = 0x9C3A8678F52AD647;
  - extreme operands;
  - 20,000 random pairs, biased towards all-ones slices, which give the largest
    column sums.

  The 8-bit array is checked exhaustively, and the 16-bit array with random
  pairs.
- `tb_bitslice_mult32`: the top at its default parameters, with 300 operations.
  It checks every product slice. It also checks that `P_k` follows pair k by
  one cycle and that `P_15` follows the first pair by 16 cycles. It counts input
  gaps, input held off during the drain, and back-to-back starts, and fails if
  any of these never happens.
- `tb_table1_sizes`: the serial top at 8, 16 and 32 bits. Back-to-back random
  operations with latency checks. It uses the helper `tb/slice_serial_checker.sv`.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/bitslice_pkg.sv tb/tb_bitslice_mult32.sv --top-module tb_bitslice_mult32
./obj_dir/Vtb_bitslice_mult32
```

Replace the testbench file and top-module name to run another one. The package
must be listed first. Every testbench finishes in a few seconds.

## Files

- `rtl/bitslice_pkg.sv`: slice constants and the column-width bound.
- `rtl/half_adder.sv`, `rtl/full_adder.sv`: adder cells.
- `rtl/wallace4.sv`: the 4 x 4 Wallace multiplier.
- `rtl/kogge_stone_adder.sv`: the parallel-prefix adder.
- `rtl/multiplier32bit.sv`: the combinational slice-array multiplier.
- `rtl/bitslice_mult32.sv`: the slice-serial top.
- `tb/`: one testbench per module listed above, plus `tb_table1_sizes.sv` and
  its helper `slice_serial_checker.sv`.
