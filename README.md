# Carry select adders with an excess-1 converter and with a memo table

A ripple carry adder (RCA) is slow because the carry must pass through every bit in turn.
A carry select adder (CSLA) splits the word into groups. Each group computes its result twice
ahead of time, once for carry in 0 and once for carry in 1. When the real carry arrives, a
2:1 mux picks one of the two results. The carry then passes through one mux per group instead
of one full adder per bit.

The classic CSLA pays for this with a second RCA in every group. This RTL has two 64-bit
adders, each of which removes that second RCA in its own way:

* **BEC adder** (`csla64_bec`). Each group keeps one RCA with carry in 0. A *binary to
  excess-1 converter* (BEC) turns that result into the carry-in-1 result by adding one. A BEC
  is an incrementer made of XOR gates and an AND chain, with no full adders.
* **Memo-table adder** (`csla64_memo`). Each 4-bit group looks both results up in a table
  that holds every possible addition of two 4-bit operands. The group then has no adder at all.

Both adders are purely combinational: there is no clock, no reset and no latency in cycles.
They compute `{cout, sum} = a + b + cin` over 64 bits. They also bring out the carries between
their 16-bit slices as `c1`, `c2` and `c3`.

## The 16-bit BEC slice: groups of growing width

`csla16_bec` is the core of the BEC adder. It splits 16 bits into five groups, and each group
is one bit wider than the group below it, or the same width:

| bits  | RCA (carry in 0) | BEC    | mux selects between | select signal          |
|-------|------------------|--------|---------------------|------------------------|
| 1:0   | 2-bit, fed by `cin` | none | none              | none                   |
| 3:2   | 2-bit            | 3-bit  | two 3-bit `{carry,sum}` | carry out of bits 1:0  |
| 6:4   | 3-bit            | 4-bit  | two 4-bit           | carry out of bits 3:2  |
| 10:7  | 4-bit            | 5-bit  | two 5-bit           | carry out of bits 6:4  |
| 15:11 | 5-bit            | 6-bit  | two 6-bit           | carry out of bits 10:7 |

The groups grow because of timing. A group's RCA and BEC start as soon as `a` and `b` are
valid, and do not wait for the carry. The carry reaches a higher group later, because it has
passed through more muxes on the way. So a higher group can afford a longer RCA and still have
both results ready when its select arrives. The critical path is the 2-bit RCA at the bottom
followed by four muxes.

Each group above the lowest one is a `csla_bec_group #(W)`:

```
r0 = {carry, sum} of a + b          (W-bit RCA, carry in 0, W+1 bits wide)
r1 = r0 + 1                         (W+1-bit BEC)
{cout, sum} = cin ? r1 : r0
```

The BEC must be one bit wider than the RCA. Adding one can carry out of the group even when
`a + b` alone does not, as in `1111 + 0000 + 1`. That extra bit becomes the group's carry out.

The BEC (`bec #(W)`) computes `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[0] & ... & b[i-1])`.
Bit i toggles exactly when all the bits below it are ones. This is the same rule as a binary
counter.

## The memo-table slice

`memo_table #(W)` holds one entry for every pair of W-bit operands, addressed by `{a, b}`.
Each entry holds two (W+1)-bit results side by side: `a + b` and `a + b + 1`. The table is
read-only. It is filled once at elaboration by a function that computes exactly those two sums
for each address. No file is read. For W = 4 the table has 256 entries of 10 bits.

`csla4_memo` reads the entry for its operands and uses `cin` to pick one of the two results.
`csla16_memo` chains four of these 4-bit slices: each slice's carry out selects the next
slice's result. Inside a 16-bit slice, the carry path is therefore four muxes long, and it
contains no adder.

This costs storage. Each 4-bit slice needs a 2,560-bit table, so a 64-bit adder needs
16 tables and 40,960 bits in total. Synthesis keeps these as ROMs (memory cells). The table
grows as 2^(2W), which is why the slices are kept at 4 bits.

## From 16 to 64 bits

`csla64_bec` and `csla64_memo` both cascade four 16-bit slices. The carry out of slice k is
the carry in of slice k+1, so the carry ripples from slice to slice. The carries between
slices come out as ports:

| port   | carry out of |
|--------|--------------|
| `c1`   | bits 15:0    |
| `c2`   | bits 31:16   |
| `c3`   | bits 47:32   |
| `cout` | bits 63:48   |

`csla_top` places the two 64-bit adders side by side. They are alternatives, not parts of one
datapath. Each adder has its own operands and results: ports prefixed `bec_` belong to one
adder and ports prefixed `memo_` to the other.

## Files

| file                     | module / contents                                       |
|--------------------------|---------------------------------------------------------|
| `rtl/csla_pkg.sv`        | shared sizes: 64-bit word, 16-bit slice, 4-bit memo slice |
| `rtl/full_adder.sv`      | one-bit full adder                                      |
| `rtl/rca.sv`             | W-bit ripple carry adder (default W = 4)                |
| `rtl/bec.sv`             | W-bit excess-1 converter (default W = 5)                |
| `rtl/csla_bec_group.sv`  | RCA + BEC + mux group (default W = 4)                   |
| `rtl/csla16_bec.sv`      | 16-bit BEC slice, groups 2/2/3/4/5                      |
| `rtl/csla64_bec.sv`      | 64-bit BEC adder                                        |
| `rtl/memo_table.sv`      | read-only table of `a+b`, `a+b+1` (default W = 4)       |
| `rtl/csla4_memo.sv`      | table + mux slice (default W = 4)                       |
| `rtl/csla16_memo.sv`     | 16-bit memo-table slice                                 |
| `rtl/csla64_memo.sv`     | 64-bit memo-table adder                                 |
| `rtl/csla_top.sv`        | both 64-bit adders side by side                         |
| `tb/tb_<module>.sv`      | one self-checking testbench per module above            |

## Verification

Each testbench compares the outputs with sums that the testbench computes itself in wider
arithmetic. Each one ends by printing `TB_RESULT checks=N failures=M`.

* `rca`, `bec`, `csla_bec_group`, `memo_table` and `csla4_memo` are tested exhaustively over
  all inputs. The narrow modules are tested at more than one width.
* The 16-bit slices get corner cases and 200,000 random vectors. The 64-bit adders get corner
  cases and 100,000 random vectors. These testbenches also count how often the carry into
  each group boundary was 0 and how often it was 1, so that both mux inputs are exercised.
* All 64-bit testbenches apply the vector `4f367da48432890a + 1f2e4f367da48432 + 1`. The
  expected result is `sum = 6e64ccdb01d70d3d`, `c1 = 1`, `c2 = 1`, `c3 = 0`, `cout = 0`.
* `tb_csla_top` runs both adders at full size. Half of its vectors give the two adders
  different operands, to show that their ports are independent. It fails unless each of these
  happened with both carry values:
  - the BEC path was selected in a group;
  - the carry-in-1 table entry was selected in a 4-bit slice;
  - a carry passed between 16-bit slices;
  - the adder overflowed out of bit 63.

To run one testbench with Verilator (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv tb/tb_csla_top.sv \
          --top-module tb_csla_top -o sim && ./obj_dir/sim
```

Every testbench finishes in well under a second.

## Where this RTL departs from, or adds to, its source

* **The memo table is complete and read-only.** The source describes memoization, meaning
  stored earlier inputs and outputs are reused when they come up again. It also says the
  table replaces the RCA's computation. A table that is filled while it runs would need both
  an adder to compute missing entries and a clock. This RTL stores every result in advance
  instead, so each lookup hits.
* **The gates inside the BEC, RCA and full adder are the textbook forms.** The source names
  these cells and gives their widths, but does not draw their gates.
* **How the slices are joined.** The 4-bit memo slices are chained by their carries, and so
  are the 16-bit slices of both adders. The source shows four 16-bit instances for the 64-bit
  adder. It does not say how the 4-bit memo slices are joined.
* **The group widths are the source's own.** The 2/2/3/4/5 split is used as drawn. A
  square-root sizing rule is mentioned in general terms, but it is not applied.
* **The reference vector's sum.** The source's published simulation of the BEC adder lists
  `sum = 6e64ccda01d60d3c` for the vector above. That value is what each 16-bit slice gives
  with carry in 0, and it differs from `a + b + cin` in bits 0, 16 and 32. Its `c1`, `c2`,
  `c3` and `cout` agree with this RTL. This RTL produces the arithmetic sum,
  `6e64ccdb01d70d3d`.
* **Timing is not reproduced.** The source compares the delays of the longest combinational
  paths on an FPGA flow (16 bit: about 6.4 ns with BEC and 8.1 ns with the memo table; 64 bit:
  about 6.8 ns and 19.5 ns). This RTL is independent of any technology, and those numbers
  depend on the target device and tools.
* **Not included:** the conventional two-RCA carry select adder, which the source uses only
  as a baseline.

## Changing it

* To change the word length, change `WORD_W` in `csla_pkg`, keeping it a multiple of
  `SLICE_W`. Both 64-bit modules bring out exactly `c1..c3`, so with other than four slices,
  edit those assignments too.
* To change a BEC group's width, edit the instance list in `csla16_bec`. The BEC is always
  `W+1` bits for a `W`-bit RCA.
* To change the memo slice width, change `MEMO_W`. The table size grows as
  `2^(2W) x 2(W+1)` bits, so 8-bit slices would already need about 1.2 Mbit per slice.
