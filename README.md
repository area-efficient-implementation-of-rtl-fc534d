# Rank-tracking running median filter with BEC carry select adders

A one-dimensional median filter replaces each sample of a stream by the median of the last
N samples (N odd). It removes impulse noise, such as salt-and-pepper noise in image rows or
clicks in audio, while keeping edges sharp. A straightforward implementation re-sorts the
window every clock. This design sorts nothing. Every sample sits still in its own cell and
carries its rank in the window. When a new sample arrives, each cell adjusts its rank by
−1, 0 or +1. The median is the sample whose rank is (N+1)/2.

The rank arithmetic (the increment, the decrement and the count that ranks a new sample)
uses carry select adders in which a Binary to Excess-1 Converter (BEC) replaces the second
ripple-carry adder. This saves area.

Default configuration: window N = 5, 8-bit samples. Windows of 9 and samples of 16 bits are
set through parameters and are tested as well.

## How the window is kept

The filter has N cells c1..cN. Each cell has three registers:

| register | holds |
|---|---|
| R_i | a sample |
| P_i | that sample's rank: 1 = smallest, N = largest, 0 = cell not filled yet |
| T_i | the token |

Exactly one cell holds the token. The token moves one cell per clock around the ring
c1 → c2 → … → cN → c1. So the token cell always holds the oldest sample, and that sample is
the one that leaves the window this clock. The new sample X is written into that same cell
(first in, first out). Samples never move between cells.

During each clock, with B = the rank of the leaving sample:

* **Token cell.** Its new rank is K + 1, where K is the number of other cells whose sample
  is less than or equal to X.
* **Other cells.** Each one compares its own sample R_i with X, and its own rank P_i with B:

| case | condition | new rank |
|---|---|---|
| I   | P_i > B and R_i ≤ X | P_i − 1 (a smaller sample left, and the new one is not below) |
| II  | P_i < B and R_i > X | P_i + 1 (a larger sample left, and the new one is below) |
| III | P_i < B and R_i ≤ X | P_i |
| IV  | P_i > B and R_i > X | P_i |
| V   | P_i = B             | P_i (only while the window is still filling) |

Equal samples are ranked by age: the newer one ranks above the older one. This keeps the
ranks 1..N distinct once the window is full.

Empty cells hold sample 0 and rank 0. They count as "≤ X" when a new sample is ranked. As a
result, the first samples enter at high ranks and then move down while the window fills.
After N samples the ranks are a permutation of 1..N.

### Worked example (N = 5)

Inputs: 12 59 35 47 66 52 38 18 26. Each row shows the registers after clock t_k. At reset
the last cell holds the token and X = 0.

| clk | X | T1..T5 | R1..R5 | P1..P5 | Y |
|---|---|---|---|---|---|
| t0 | 0  | 00001 | 0 0 0 0 0 | 0 0 0 0 0 | 0 |
| t1 | 12 | 10000 | 0 0 0 0 0 | 0 0 0 0 5 | 0 |
| t2 | 59 | 01000 | 12 0 0 0 0 | 5 0 0 0 4 | 0 |
| t3 | 35 | 00100 | 12 59 0 0 0 | 4 5 0 0 3 | 0 |
| t4 | 47 | 00010 | 12 59 35 0 0 | 3 5 4 0 2 | 0 |
| t5 | 66 | 00001 | 12 59 35 47 0 | 2 5 3 4 1 | 12 |
| t6 | 52 | 10000 | 12 59 35 47 66 | 1 4 2 3 5 | 35 |
| t7 | 38 | 01000 | 52 59 35 47 66 | 3 4 1 2 5 | 47 |
| t8 | 18 | 00100 | 52 38 35 47 66 | 4 2 1 3 5 | 52 |
| t9 | 26 | 00010 | 52 38 18 47 66 | 4 2 1 3 5 | 47 |

At t6 the cell with rank 3 is c4, so Y = 47 at t7. `tb_median_filter` checks every entry of
this table.

## Timing

* There are three register stages: X, the cells, and Y.
* A sample on `x_in` at rising edge k is in X after edge k.
* It is in its cell, with all ranks settled, after edge k+1.
* The median of the window that includes it is on `y_out` after edge k+2.
* The filter produces one median per clock. It has no valid, enable or stall signals.
* While the window fills, `y_out` shows the sample that currently has rank (N+1)/2. If no
  cell has that rank yet, it shows 0.
* Reset is asynchronous and active low. It clears X, Y, all samples and all ranks, and gives
  the token to cell N, so the first sample lands in c1.

## Block structure

```
median_filter          X and Y registers, ring of cells, shared rank logic
├── median_cell ×N     R_i (enabled by T_i), P_i, T_i, and the "P_i == (N+1)/2" comparator
│   └── rank_gen       comparators F = R_i≤X, G = P_i>B, E = P_i==B; A_i = F & ~T_i;
│       │              4:1 mux {A, P_i−1, P_i+1, P_i}
│       ├── rank_ctrl  mux select: s1 = T | F&G,  s0 = T | ~E&~F&~G
│       └── csla_bec ×2  P_i + 1 and P_i + (2^PW − 1), the two's complement of 1
├── rank_sel           B = OR_i (P_i AND T_i): rank of the token cell
├── rank_cal           A = 1 + number of A_i flags, as a chain of csla_bec adders
└── median_sel         y = OR_i (R_i AND [P_i == (N+1)/2])
```

`median_pkg` holds the defaults and `rank_width(N) = ceil(log2(N+1))`. That width is 3 bits
for N = 5 and 4 bits for N = 9.

### The BEC carry select adder (`csla_bec`, `bec`)

A carry select adder computes the upper part of a sum twice, once for carry-in 0 and once
for carry-in 1. The carry from the lower part then selects one result. Here the carry-in-1
result is not computed by a second adder. Instead, a BEC adds 1 to the carry-in-0 result:

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[i-1] & … & b[0])
```

For a W-bit adder:

* bit 0 is a half adder, and its carry is the select;
* bits W−1..1 form a ripple-carry adder (a half adder, then full adders) with carry-in 0;
* a W-bit BEC produces the carry-in-1 result, including the carry out;
* a 2W:W multiplexer picks the result.

At W = 3 this is exactly the rank adder for a 5-sample window. The adder has no carry input.
Ranks never go below 0 or above N in use, so the carry outputs are left unused.

## Where this departs from, or adds to, the original description

* The description says what RankCal and MedianSel do but not how they are built.
  * RankCal is a chain of N BEC carry select adders that adds one flag at a time, starting
    from 1. This is the simplest form. A tree would be shorter in delay.
  * MedianSel is an AND-OR one-hot multiplexer.
* Left open by the description and chosen here:
  * the reset style;
  * the rank width;
  * how the carry select adder is generalised beyond 3 bits;
  * the absence of a valid signal.
* The drawing of the top level shows further lines from each cell into MedianSel. They are
  not explained, and only the rank comparison is used.
* The reported latency ("w" clocks) is not defined further. This design has the two-stage
  timing given above, which reproduces the worked example.
* The area, power and delay figures of the original 180 nm synthesis are not reproduced
  here.
* A concurrent assertion in `median_filter` checks that exactly one cell holds the token.
  This is an addition.

## Verification

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_median_filter` | Default size (no parameter override). Replays the worked example register by register. Then 3000 random samples (full range, many equal values, salt-and-pepper) against a sorted reference, at the exact two-clock latency. Checks that the ranks form a permutation that orders the samples. Counts each rank update case (token, I–V, token wrap) and fails if any never occurs. |
| `tb_median_workloads` | Windows 5 and 9 at 8 and 16 bits, 12 000 samples each. Inputs are synthetic image rows with salt-and-pepper noise and synthetic tones with impulses. Every median is compared with a sorted reference (`median_stream_ref`), and the test checks that impulses are removed. |
| `tb_median_cell` | One cell against a register-level model, with random inputs. |
| `tb_rank_gen` | All combinations of 3-bit sample, X, rank, token and B. |
| `tb_rank_ctrl` | All input combinations that can occur. |
| `tb_rank_sel`, `tb_rank_cal`, `tb_median_sel` | Windows 5 and 9, exhaustive or random. |
| `tb_csla_bec`, `tb_bec` | Exhaustive at 3 and 4 bits (`tb_csla_bec`), at 3 and 5 bits (`tb_bec`), plus random 8-bit additions. |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/median_pkg.sv \
    tb/tb_median_filter.sv --top-module tb_median_filter -Mdir obj
./obj/Vtb_median_filter
```

Each testbench runs in well under a second.

## Changing the size

* `median_filter #(.N(9), .WIDTH(16))` gives a 9-sample, 16-bit filter. N must be odd and at
  least 3. Everything else, including the rank width and adder widths, follows from N and
  WIDTH.
* The logic grows linearly in N, apart from the rank count.
* The critical path runs through all N comparators, the rank count chain, the rank adders
  and the 4:1 mux.
