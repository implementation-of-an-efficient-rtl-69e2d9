# 16-bit square-root carry-select adder with binary-to-excess-1 converters

A ripple carry adder is slow because every bit waits for the carry of the bit below it. A
carry-select adder cuts the word into groups and computes each group twice in parallel, once
assuming a carry-in of 0 and once assuming 1; when the real carry arrives a multiplexer picks
the right answer, so the carry crosses each group through one mux instead of a chain of full
adders. The price is a second ripple adder per group.

This design removes most of that price. In each group only the carry-in-0 ripple adder is
kept. The carry-in-1 result is the carry-in-0 result plus one, and adding one needs no full
adders: a *binary to excess-1 converter* (BEC) does it with an inverter, a chain of ANDs and
some XORs. The groups grow in width toward the top of the word (the "square-root" sizing), so
that each group's local result is ready at about the time the carry from below reaches its
mux. The adder is combinational, written at gate level from AND, OR and inverter (AOI) gates so
that its gate count can be read straight off the source.

## The five groups

```
 bits     15:11            10:7             6:4              3:2            1:0
        +---------+      +---------+      +---------+      +---------+    +---------+
 a,b -->| 5-b RCA |      | 4-b RCA |      | 3-b RCA |      | 2-b RCA |    | 2-b RCA |<-- cin
        | (ci=0)  |      | (ci=0)  |      | (ci=0)  |      | (ci=0)  |    |  (FAs)  |
        +----+----+      +----+----+      +----+----+      +----+----+    +----+----+
         6   |  6-b BEC   5   |  5-b BEC   4   |  4-b BEC   3   |  3-b BEC   |    |
             v     v          v     v          v     v          v     v     |    |
          [ 12:6 mux ]<-c10-[ 10:5 mux ]<-c6-[ 8:4 mux ]<-c3-[ 6:3 mux ]<-c1-+    |
             |    |              |               |               |              |
           cout sum[15:11]   sum[10:7]        sum[6:4]        sum[3:2]       sum[1:0]
```

| group | bits  | ripple adder (carry-in 0) | converter | mux   | carry out |
|-------|-------|---------------------------|-----------|-------|-----------|
| 1     | 1:0   | 2 full adders, fed by `cin` | none    | none  | c1        |
| 2     | 3:2   | half adder + 1 full adder | 3-bit     | 6:3   | c3        |
| 3     | 6:4   | half adder + 2 full adders | 4-bit    | 8:4   | c6        |
| 4     | 10:7  | half adder + 3 full adders | 5-bit    | 10:5  | c10       |
| 5     | 15:11 | half adder + 4 full adders | 6-bit    | 12:6  | cout      |

Group 1 is a plain 2-bit ripple adder that takes the external carry-in. Each of the other
groups is one `csla_group` instance.

## How one group works

For an N-bit group with operand slices `a`, `b`:

1. The ripple adder computes `{c, r} = a + b` with its carry-in tied to 0. Because that
   carry-in is a constant, its lowest cell is a half adder.
2. The (N+1)-bit word `{c, r}` goes to the mux's 0 input. It also goes through an (N+1)-bit
   converter, which produces `{c, r} + 1`, and that goes to the mux's 1 input.
3. The carry from the group below drives the mux select. The mux output is
   `{cout, s} = a + b + cin`.

The converter must be one bit wider than the group because it increments the carry together
with the sum. When `r` is all ones and `c` is 0, the increment turns `0 11..1` into `1 00..0`,
so the group passes an incoming carry through to its output. That is the carry-propagate
case. A carry the group makes by itself shows up as `c = 1` on both mux inputs. The
converter's own wrap-around (all ones to all zeros) never happens inside a group: `a + b` of
two N-bit numbers is at most `1 11..10`.

The converter for width N is

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])     for i = 1 .. N-1
```

The AND prefix is a chain of 2-input ANDs, so the converter costs 1 inverter, N-1 XORs and
N-2 ANDs.

## Gate cost

Every cell is built only from 2-input AND, 2-input OR and inverters. Counting each as one
unit of area gives the following costs. These are the `AOI_GATES` localparams in each module,
and `csla_pkg` holds the formulas.

| cell | gates | built as |
|------|-------|----------|
| XOR (`xor_aoi`) | 5 | `a&~b \| ~a&b` |
| 2:1 mux (`mux2_aoi`) | 4 | `d0&~sel \| d1&sel` |
| half adder | 6 | XOR + AND |
| full adder | 13 | 2 XOR + 2 AND + OR |
| N-bit converter | 1 + 5(N-1) + (N-2) | see above |
| N-bit group | HA + (N-1) FA + (N+1)-bit converter + (N+1) mux cells | |

Group 2 costs 13 + 6 + 12 + 12 = 43 gates. A conventional carry-select group of the same size
costs 57 gates, because it needs two ripple adders and the same 6:3 mux. The whole 16-bit
adder costs 26 + 43 + 66 + 89 + 112 = 336 gates. The saving grows with group width, because a
converter bit (about 6 gates) is much cheaper than a full adder (13). The cost is some extra
delay: the converter sits between the ripple adder and the mux.

Synthesis of the flattened adder reports 318 AND/OR/NOT cells. The difference from 336 is
logic that the optimiser shares or removes.

## Timing

The adder has no clock, no registers and no reset. Both results of a group are formed in
parallel with the lower groups. The path that decides the delay therefore runs from `cin`
through the two carry stages of group 1, and then through one mux per group: c1 → c3 → c6 →
c10 → cout. In the unit-gate model, with each AOI gate as one unit of delay, the cells here
have these depths:

- XOR: 3 levels.
- 2:1 mux: 3 levels from `sel`.
- Full adder carry from `ci`: 2 levels.
- Full adder sum: 6 levels.

## Where this implementation makes its own choices

- The gate arrangements of the 2:1 mux, the half adder and the full adder are not given at
  gate level. The cells here are the simplest AOI forms that have the standard unit-gate
  areas (4, 6 and 13).
- The same standard tables quote the full adder at 5 gate delays. This full adder's sum path
  is 6 levels deep, because its two XORs are in series. Its area matches the table; its sum
  delay is one level more.
- Only the 16-bit group split (2, 2, 3, 4, 5) is defined. This adder therefore has a fixed
  width. An 8-bit addition can run on it with zero-extended operands; the 8-bit sum and carry
  come out on `sum[8:0]`. For 32 or 64 bits you must choose a new group split. Give each
  group a `csla_group #(.N(width))` and chain the carries.
- The conventional square-root carry-select adder, which uses two ripple adders per group, is
  the point of comparison only. It is not included.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/csla_pkg.sv` | `csla_pkg` | unit-gate cost constants and formulas |
| `rtl/xor_aoi.sv` | `xor_aoi` | AOI XOR |
| `rtl/mux2_aoi.sv` | `mux2_aoi` | AOI 2:1 mux |
| `rtl/half_adder.sv` | `half_adder` | half adder |
| `rtl/full_adder.sv` | `full_adder` | full adder |
| `rtl/rca.sv` | `rca #(N, HAS_CIN)` | N-bit ripple adder; `HAS_CIN=0` ties the carry-in to 0 and uses a half adder in bit 0 |
| `rtl/bec.sv` | `bec #(N)` | N-bit binary to excess-1 converter |
| `rtl/mux_2n_n.sv` | `mux_2n_n #(N)` | 2N:N word mux |
| `rtl/bec_mux.sv` | `bec_mux #(N)` | converter + mux: `s = b + cin` |
| `rtl/csla_group.sv` | `csla_group #(N)` | one carry-select group |
| `rtl/msqrt_csla16.sv` | `msqrt_csla16` | the 16-bit adder (top) |

Ports of the top: `a[15:0]`, `b[15:0]`, `cin` in; `sum[15:0]`, `cout` out, with
`{cout, sum} = a + b + cin`.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each testbench compares the
outputs with results the simulator computes by itself and prints
`TB_RESULT checks=N failures=M`.

- The cells, the converter (3 to 6 bits), the ripple adders (2 to 5 bits) and the groups (2 to
  5 bits) are checked exhaustively over all their inputs.
- The converter test includes the wrap from 1111 to 0000.
- `tb_msqrt_csla16` checks the full adder with these inputs:
  - directed corner cases: zero, all ones, a carry rippling through all 16 bits, and a carry
    entering at each group boundary;
  - 200,000 random operand pairs with a random carry-in;
  - every pair of zero-extended 8-bit operands, with both carry-in values.
- From the operands, `tb_msqrt_csla16` also counts, for each of groups 2 to 5:
  - how often the mux picked the incremented word;
  - how often it picked the direct word;
  - how often the group generated a carry by itself;
  - how often a carry passed through the group via the converter.

  The test fails if any of these counts is zero.
- The testbenches also check the gate-count formulas: 43 gates for group 2 and 336 gates for
  the whole adder.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv tb/tb_msqrt_csla16.sv \
          --top-module tb_msqrt_csla16 -Mdir obj_top -o sim
./obj_top/sim
```

To run another block's test, replace `msqrt_csla16` with that block's module name. The top's
testbench takes well under a second.
