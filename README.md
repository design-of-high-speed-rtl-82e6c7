# 32-bit carry select adders with BEC-1 and Kogge-Stone groups

A ripple carry adder is slow because each bit waits for the carry of the bit below. A **carry
select adder (CSLA)** avoids the wait. It cuts the word into groups and computes each group's
result twice, once assuming carry-in 0 and once assuming carry-in 1. Both results are ready
before the real carry arrives, and the real carry then only picks one of them with a
multiplexer. So the critical path crosses one mux per group instead of one full adder per bit.

The classic CSLA pays for this with two ripple adders per group. This RTL builds the two
variants proposed in "Design of High Speed and Low Power Carry Select Adder". Each one replaces
one of the two adders in every group:

- **`csla_bec32`**, the main design. A ripple adder computes the carry-in-0 result. A
  **Binary to Excess-1 Converter (BEC-1)** then adds one to that result to form the carry-in-1
  result. The converter is a chain of ANDs and XORs, much smaller than a second adder. The
  source reports this variant as the best for both power and delay.
- **`csla_ks32`**. The carry-in-0 adder of every group is a **Kogge-Stone** parallel prefix
  adder. The carry-in-1 adder is still a ripple adder.

Both adders compute `{cout, sum} = a + b + cin` on 32-bit operands. Both are purely
combinational: there is no clock, no reset and no state.

## Group partition

Both adders use the same eight groups, from bit 0 upwards. The partition comes from the
published architecture, and it is held in `csla_pkg::GROUP_W`:

| group | bits    | width | carry-in-0 adder (BEC / KS) | carry-in-1 path (BEC / KS) | mux (inputs:outputs) |
|-------|---------|-------|-----------------------------|----------------------------|----------------------|
| 0     | [1:0]   | 2     | RCA / KS, fed by `cin`      | none                       | none                 |
| 1     | [3:2]   | 2     | RCA / KS                    | 3-bit BEC / 2-bit RCA      | 6:3                  |
| 2     | [6:4]   | 3     | RCA / KS                    | 4-bit BEC / 3-bit RCA      | 8:4                  |
| 3     | [10:7]  | 4     | RCA / KS                    | 5-bit BEC / 4-bit RCA      | 10:5                 |
| 4     | [15:11] | 5     | RCA / KS                    | 6-bit BEC / 5-bit RCA      | 12:6                 |
| 5     | [21:16] | 6     | RCA / KS                    | 7-bit BEC / 6-bit RCA      | 14:7                 |
| 6     | [28:22] | 7     | RCA / KS                    | 8-bit BEC / 7-bit RCA      | 16:8                 |
| 7     | [31:29] | 3     | RCA / KS                    | 4-bit BEC / 3-bit RCA      | 8:4                  |

- Group widths grow by one from group to group. A wider group therefore has more time to
  compute its two results while the select carry climbs through the muxes below it.
- The top group takes the three bits that remain.
- Each mux passes `WIDTH+1` bits, the group's sum bits plus its carry. Its select is the carry
  out of the group below.
- The carry out of group 7 is `cout`.
- The published design describes the lowest group as an adder fed with 0. Here it is fed by the
  adder's carry in, as the published simulation results also show. A carry in of 1 raises the
  sum by one.

## The BEC-1 converter, and why it can produce the carry

`bec` adds one modulo 2^W: `X0 = ~B0` and `Xi = Bi ^ (B0 & ... & B(i-1))`. The ANDs form a
chain. Each AND takes the output of the previous one and one more input bit. That gives one AND
and one XOR per bit, against a full adder per bit for a second ripple adder.

A group must produce a carry as well as a sum for carry-in 1. In `csla_group_bec` the converter
is one bit wider than the group. It takes the whole carry-in-0 result `{c0, s0}` and returns
`{c1, s1} = {c0, s0} + 1`:

- This is exactly `a + b + 1`.
- It can never wrap, because `a + b` is at most `2^(W+1) - 2`.
- So the converter's top bit is the correct carry for carry-in 1, and the mux selects the
  carry with the sum.

The published figures label the converters by the group's sum width ("2 BEC", "3 BEC", ...).
Including the carry bit in the converter is this design's reading of how the carry-in-1 carry
is formed.

## The Kogge-Stone group adder

`ks_adder` works in three steps:

1. **Stage 0.** It forms per-bit propagate `P = A ^ B` and generate `G = A & B`. The carry in is
   folded into bit 0 as `G0 = A0 B0 | (A0 ^ B0) Cin`.
2. **Prefix stages.** There are `ceil(log2 W)` of them. Stage `k` combines each bit `i` with bit
   `i - 2^(k-1)`:

   ```
   P = P_i & P_(i-d)
   G = G_i | (G_(i-d) & P_i)
   ```

   Bits with no partner below pass their pair on unchanged.
3. **Sum stage.** After the last prefix stage, `G_i` is the carry out of bit `i`. The sum is
   `S_i = P_i ^ C_(i-1)`, with `C_(-1) = Cin`.

Each node drives at most two others. The groups here are at most 7 bits wide, so one group
needs at most three prefix stages. The default `WIDTH = 4` is the two-stage structure of the
published design. Where the carry in enters bit 0 is this design's choice.

## Modules

| file | what it is |
|------|------------|
| `rtl/csla_pkg.sv` | group count, group widths, `group_lsb()`, `CSLA_WIDTH` (32) |
| `rtl/rca.sv` | W-bit ripple carry adder from textbook full adders |
| `rtl/bec.sv` | W-bit binary to excess-1 converter (default 4) |
| `rtl/ks_adder.sv` | W-bit Kogge-Stone adder with carry in (default 4) |
| `rtl/csla_mux.sv` | W 2:1 muxes on one select (default 3, the "6:3" mux) |
| `rtl/csla_group_bec.sv` | RCA(cin=0) + (W+1)-bit BEC + mux |
| `rtl/csla_group_ks.sv` | KS(cin=0) + RCA(cin=1) + mux |
| `rtl/csla_bec32.sv` | 32-bit CSLA with BEC-1, the main design |
| `rtl/csla_ks32.sv` | 32-bit CSLA with Kogge-Stone group adders |
| `rtl/csla_top.sv` | both adders side by side: `bec_a/bec_b/bec_cin -> bec_sum/bec_cout`, `ks_a/ks_b/ks_cin -> ks_sum/ks_cout` |

The two adders in `csla_top` share no signals. Use either one on its own by instantiating
`csla_bec32` or `csla_ks32`.

## How far it follows the published design

These parts follow the published design:

- the BEC equations and their 4-bit truth table;
- the Kogge-Stone cell equations and the position of the carry in;
- the eight-group partition;
- which adder sits in which row of each variant;
- the mux sizes.

These points are interpretation or departure:

- **Group count.** The prose speaks of five groups. The architecture drawings show eight, and
  eight are built.
- **Group connections.** The drawings show arrows between neighbouring carry-in-0 adders. A
  ripple connection there would defeat carry selection, so each carry-in-0 adder gets a
  constant 0. The select carry passes only through the muxes, as the text describes ("the
  selection lines are the carry-in bits").
- **Lowest group.** It takes the external carry in, and the width of the BEC carry path is
  this design's own (see above).
- **Full adder.** Its gates are not specified, so the textbook form is used.
- **Not built.** The regular CSLA with two ripple adders per group, and the 4-bit introductory
  CSLA, are only the baseline of the comparison.
- **Power and delay.** The published figures came from vendor FPGA synthesis and power tools.
  They are 24.768 W / 12.91 ns for the regular CSLA, 24.167 W / 12.73 ns for the Kogge-Stone
  variant and 23.299 W / 11.459 ns for BEC-1. They are not reproduced and nothing here checks
  them.
- **Internal carries.** The published waveforms also show internal carries `c1`..`c15`. Their
  mapping to bit positions is not given, so they are not matched.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

**Unit tests.**

- `tb_bec` checks the 4-bit truth table rows and tests widths 4, 5 and 8 exhaustively.
- `tb_rca` and `tb_ks_adder` test widths 1, 4 and 7 exhaustively, with both carry-in values.
- `tb_csla_mux` tests the 6:3 mux exhaustively and the 16:8 mux on random data.
- The group testbenches test widths 2, 4 and 7 exhaustively with both select values. They also
  confirm that the carry-in-1 path alone produced a group carry out.

**32-bit adders.** `tb_csla_bec32` and `tb_csla_ks32` run the published simulation vector:
`A = 32'hF86ABEAB` and `B = 32'hCCCCCCCC` give `S = 32'hC5378B77` with `Cout = 1` for carry
in 0, and `32'hC5378B78` for carry in 1. They then run these cases:

- corner cases;
- for every bit, a carry that starts at bit 0 and stops at that bit;
- 200,000 random vectors.

They also count, for each select group, how often its carry-in-0 and carry-in-1 results were
the correct ones. The test fails if a group never needed both.

**Top level.** `tb_csla_top` exercises `csla_top` at its default size. It feeds the BEC-1
adder `(a, b, cin)` and the Kogge-Stone adder the different operands `(b, ~a, ~cin)`, so that
crossed wiring shows. It runs 100,000 random vectors plus the reference vector on each adder.
It fails unless each of these happened at least once:

- every group of each adder selected both of its results;
- a carry ran from bit 0 through all eight groups to `cout`;
- `cout` was 1;
- `cin` was 1.

Each test takes well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/csla_pkg.sv tb/tb_csla_top.sv --top-module tb_csla_top
./obj_dir/Vtb_csla_top
```

Replace `tb_csla_top` with any other testbench name to run that test instead.

## Changing it

- **Different partition or width.** Edit `GROUP_W` (and `NUM_GROUPS`) in `csla_pkg`.
  `CSLA_WIDTH` and the group offsets follow automatically, and both adders pick up the change.
  The testbenches for the 32-bit adders assume 32 bits.
- **Block widths.** `bec`, `rca`, `ks_adder`, `csla_mux` and both group modules take any
  `WIDTH` of 1 or more.
