# Partial-product reducing MAC unit

A multiply-accumulate (MAC) unit computes `acc <= acc + a*b` once per clock.
Its slow part is the multiplier, and most of that is the adders that sum the
partial products. This design cuts the number of partial-product rows by a
quarter before any row adder sees them. In a 4 x 4 multiplier two half adders
(two AND and two XOR gates) turn the four shifted rows into three. That removes
one of the three row adders. The rows that are left are summed with
Kogge-Stone parallel-prefix adders. A last Kogge-Stone adder adds the product
into the accumulator register.

The default configuration is an unsigned 8 x 8 multiplier with a 20-bit
accumulator. The operand width is a parameter: any `N >= 4` elaborates, and
16, 32 and 64 bits are simulated.

## Block structure

```
          a[N-1:0]  b[N-1:0]
              |        |
      +-------v--------v----------------------------------+
      | ppr_multiplier                                     |
      |   N AND rows --> pp_group_reduce (per 4 rows) -->  |
      |   3*(N/4) rows --> chain of ks_adder (2N bits)     |
      +-------------------------+--------------------------+
                                | product[2N-1:0]
             clear ? 0 : acc    |
                   |            |
               +---v------------v---+
               | ks_adder (ACC_W)   |
               +---------+----------+
                         | acc_next
               +---------v----------+
               | acc_reg (ACC_W)    |<-- in_valid (load enable)
               +---------+----------+
                         | acc
```

| Module            | File                     | Role |
|-------------------|--------------------------|------|
| `mac_unit`        | `rtl/mac_unit.sv`        | top: multiplier, accumulate adder, accumulator register, valid flag |
| `ppr_multiplier`  | `rtl/ppr_multiplier.sv`  | N x N unsigned multiplier with reduced partial products |
| `pp_group_reduce` | `rtl/pp_group_reduce.sv` | rearranges four partial-product rows into three |
| `ks_adder`        | `rtl/ks_adder.sv`        | W-bit Kogge-Stone adder with carry in and carry out |
| `acc_reg`         | `rtl/acc_reg.sv`         | accumulator register with load enable and reset |
| `mac_pkg`         | `rtl/mac_pkg.sv`         | default sizes and the row-count function |

## Four partial products into three

Stack the four rows of a 4 x 4 product, `r_i = a & {4{b[i]}}` shifted left by
`i`. Count the bits in each column:

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|--------|---|---|---|---|---|---|---|
| bits   | 1 | 2 | 3 | 4 | 3 | 2 | 1 |

Only column 3 holds four bits. Every other column already fits in three rows.
`pp_group_reduce` fixes column 3 as follows:

1. A half adder on `r0[3]` and `r3[0]` leaves one sum bit in column 3. Its
   carry goes to column 4.
2. Column 4 now holds four bits (`r1[3]`, `r2[2]`, `r3[1]` and the carry).
   A second half adder on `r3[1]` and the carry brings it back to three. Its
   carry goes to column 5.
3. Column 5 then holds `r2[3]`, `r3[2]` and that carry: three bits.

The result is three rows `s0`, `s1` and `s2`, each `N+3` bits wide, with
`s0 + s1 + s2 == r0 + 2*r1 + 4*r2 + 8*r3`. In these rows:

- `r1` and `r2` pass through unchanged into `s1` and `s2`.
- `s0` holds `r0`, the adder sums and the last carry.
- The top two bits of `r3` fill the free high end of `s1`.

The two half adders are exactly the four extra gates. The three rows need two
row adders instead of three.

For wider operands each column from 3 to N-1 holds four bits, plus the carry
coming up from below. Each of these columns gets a full adder instead of a
half adder: on `r0[c]`, `r3[c-3]` and the carry. Column N then gets the
second half adder. A group of four N-bit rows therefore costs 2 half adders
and N-4 full adders.

## The multiplier: groups of four and a chain of row adders

`ppr_multiplier` splits the N partial products into groups of four:
`b[3:0]`, `b[7:4]` and so on. Each complete group goes through one
`pp_group_reduce`, and its three rows are shifted left by `4g`. If N is not a
multiple of four, the 1 to 3 rows left over are used as they are. The number
of rows that remain is `mac_pkg::reduced_rows(N) = 3*(N/4) + N%4`:

| N  | AND rows | rows after reduction | row adders (2N bits) |
|----|----------|----------------------|----------------------|
| 4  | 4        | 3                    | 2                    |
| 8  | 8        | 6                    | 5                    |
| 16 | 16       | 12                   | 11                   |
| 64 | 64       | 48                   | 47                   |

The rows are summed one after another, like the row adders of an array
multiplier: `acc[k] = acc[k-1] + row[k]`. Each step is a 2N-bit `ks_adder`.
This linear chain is what makes a removed row shorten the critical path.
A tree of adders, or a carry-save tree, would be faster still at large N, but
it is not the structure described here.

## Kogge-Stone adder

`ks_adder` is the textbook Kogge-Stone parallel-prefix network:

1. Each bit forms generate `a&b` and propagate `a^b`.
2. The carry in is folded into the generate of bit 0.
3. `$clog2(W)` prefix levels follow. At level `l`, bit `i` merges with bit
   `i - 2^l`: `G = G_i | P_i & G_(i-2^l)` and `P = P_i & P_(i-2^l)`.
4. After the last level, `G` of bit `i` is the carry out of bit `i`. The sum
   is `p ^ {G[W-2:0], cin}`.

The prefix is written as one `always_comb` loop. Within each level the bits
are updated from the top down, so each bit reads its lower neighbour's value
from the previous level.

## MAC timing and control

- **Operation.** With `in_valid` high at a rising edge, `acc` takes
  `acc + a*b`. If `clear` is also high, `acc` takes `a*b` instead, which
  starts a new sum. With `in_valid` low, `acc` holds.
- **Timing.** Multiplier, row adders and accumulate adder form one
  combinational path. The unit accepts one operation per clock and never
  stalls. The result is in `acc` one edge later, and `out_valid` is high for
  that one cycle. An assertion in `mac_unit` checks this one-cycle latency.
- **Product output.** `product` is the combinational `a*b` of the current
  inputs.
- **Overflow.** The accumulator has `ACC_W = 2N+4` bits and wraps modulo
  `2^ACC_W`. Sixteen full-scale products fit before a wrap can occur.
  Overflow is not flagged.
- **Reset.** `rst_n` is asynchronous and active low. It clears `acc` and
  `out_valid`.

## Parameters

| Module            | Parameter | Default | Meaning |
|-------------------|-----------|---------|---------|
| `mac_unit`        | `N`       | 8       | operand width |
| `mac_unit`        | `ACC_W`   | 2N+4    | accumulator width, at least 2N |
| `ppr_multiplier`  | `N`       | 8       | operand width, at least 4 |
| `pp_group_reduce` | `N`       | 4       | row width, at least 4 |
| `ks_adder`        | `W`       | 16      | adder width, at least 2 |
| `acc_reg`         | `W`       | 20      | register width |

At the defaults, coarse synthesis gives about 760 word-level cells and 21
flip-flops for `mac_unit`.

## What is specified and what is chosen here

These parts follow the design description:

- the three sub-units: multiplier, adder and accumulator register;
- the reduction of four partial products to three with two AND and two XOR
  gates in the 4 x 4 case, which saves one row adder;
- the Kogge-Stone adder as the adder of the unit;
- the 8 x 8 size as the main configuration.

These parts are this implementation's own choices:

- **Half-adder inputs.** The exact bits that feed the two half adders.
  Any choice that removes the fourth bit from column 3 gives the same count.
- **Wider operands.** Applying the reduction to every group of four rows when
  N > 4, with full adders in columns 4 to N-1.
- **Row summing.** The linear chain of row adders, and using a Kogge-Stone
  adder for each row.
- **Operands.** Unsigned integers only. Neither signed nor floating-point
  operands are handled.
- **Accumulator.** The width, the wrap-around, the `in_valid`/`clear`
  controls, the valid flag, and the asynchronous reset.
- **No pipelining.** The whole multiply-accumulate is one combinational path.

The unit was compared against other designs, which are not included: array
and radix-4 Booth multipliers, and Han-Carlson, Brent-Kung, Ladner-Fischer,
carry look-ahead, conditional-sum and carry-skip adders. The delay, power and
area figures quoted for the design (for example 2.342 ns for 8 x 8 in a
180 nm process) come from gate-level synthesis. RTL simulation cannot check
them.

## Verification

Every testbench checks itself. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench            | What it checks |
|----------------------|----------------|
| `tb_ks_adder`        | 16- and 13-bit adders: corner cases and 20,000 random sums against `a+b+cin` |
| `tb_pp_group_reduce` | 4 x 4: all 2^16 row combinations. 8-bit rows: 50,000 random cases. In both, the three rows sum to the weighted four |
| `tb_ppr_multiplier`  | 8 x 8, 4 x 4 and 6 x 6: exhaustive. 16 x 16: random |
| `tb_acc_reg`         | reset, load, hold, and an asynchronous reset between edges |
| `tb_mac_unit`        | default size, end to end (details below) |
| `tb_mac_unit_widths` | 16 x 16, 32 x 32 and 64 x 64 MAC units, 4,000 random operations each, checked with wide integer arithmetic |

`tb_mac_unit` first runs a 16-term dot product that starts with `clear`.
It then runs 20,000 random operations with gaps and clears, and one
asynchronous reset in the middle. After every edge it checks `acc`,
`product` and the one-cycle `out_valid` latency. It also counts how often
each mechanism occurred and fails if any count is zero:

- accumulate;
- clear;
- idle hold;
- accumulator wrap;
- reset;
- a carry out of the column-3 half adder.

Each testbench was also run against a copy of its module with one deliberate
fault, and it failed every time. The faults were:

- a missing prefix level;
- a dropped half-adder carry;
- a row left out of the sum;
- an ignored load enable;
- an ignored `clear`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mac_pkg.sv tb/tb_mac_unit.sv --top-module tb_mac_unit -o sim
./obj_dir/sim
```

Replace `tb_mac_unit` with any other testbench name. `tb_mac_unit_widths`
builds three MAC units, including a 64 x 64 one. Verilator takes about half a
minute to compile it, and it runs in a few seconds. For a lint check of the
RTL alone, run `verilator --lint-only -Wall -Irtl -y rtl rtl/mac_pkg.sv
rtl/mac_unit.sv`.

To change the size, set `N` (and `ACC_W` if needed) on `mac_unit`. Each
module checks its minimum width during elaboration.
