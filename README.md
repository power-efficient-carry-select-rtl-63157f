# 16-bit carry select adder with binary-to-excess-1 converters

A carry select adder avoids waiting for a long carry chain. It splits the
operands into groups and computes each upper group twice in parallel, once as
if its carry in were 0 and once as if it were 1. When the real carry arrives
from below, a multiplexer picks the right result. The classic version pays for
this with a second ripple carry adder per group.

This design removes that second adder. Each group's ripple adder runs with a
carry in of 0. A small **binary to excess-1 converter (BEC)** then adds one to
that result, which is exactly what the group would have produced with a carry
in of 1. A BEC needs one inverter plus an XOR and an AND per bit, much less
than a chain of full adders, so the adder gets smaller and uses less power. It
gets only slightly slower. The groups grow in width from the least
significant end (square-root sizing). That way each group's local result is
ready about when its select carry arrives.

## Group layout

The 16 bits form five groups, least significant first:

| group | bits  | ripple adder (cin = 0) | BEC    | multiplexer | select carry |
|-------|-------|------------------------|--------|-------------|--------------|
| 0     | 1:0   | 2-bit, real `cin`      | –      | –           | –            |
| 1     | 3:2   | 2-bit → `ws1`, `wc1`   | 3-bit → `we1` | 6:3  | `wmc0`       |
| 2     | 6:4   | 3-bit → `ws2`, `wc2`   | 4-bit → `we2` | 8:4  | `wmc1`       |
| 3     | 10:7  | 4-bit → `ws3`, `wc3`   | 5-bit → `we3` | 10:5 | `wmc2`       |
| 4     | 15:11 | 5-bit → `ws4`, `wc4`   | 6-bit → `we4` | 12:6 | `wmc3`       |

Group 0 is an ordinary 2-bit ripple adder fed with the adder's carry in. Its
carry out is `wmc0`. Each upper group k works like this:

* Its ripple adder, with carry in tied to 0, produces the sum `wsk` and the
  carry `wck`.
* The BEC is one bit wider than the group. It takes `{wck, wsk}` and returns
  `wek = {wck, wsk} + 1`, which is the group's `{carry, sum}` for a carry in
  of 1.
* The multiplexer picks `{wck, wsk}` when the carry from the group below is 0
  and `wek` when it is 1. Its output is the group's sum bits plus its carry
  out: `wmck` for groups 1 to 3, and the adder's `carry` for group 4.

The net names above are the ones used inside `csla16_modified`. A testbench
can probe them.

## The excess-1 converter

The BEC computes `x = b + 1` modulo 2^W without a carry chain:

    x[0] = ~b[0]
    x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])

The AND terms are built as a running chain (`all_ones` in `bec.sv`). The top
output bit is the group's carry for a carry in of 1. When the carry-in-0 result
of a group is all ones, the +1 wraps it into that carry bit. This is how an
incoming carry passes through a group whose bits all propagate.

## Worked example

With a = 51873 (0xCAA1), b = 5418 (0x152A) and cin = 0:

| net | value  | meaning                                   |
|-----|--------|-------------------------------------------|
| ws1 | 10     | bits 3:2: 00 + 10                         |
| we1 | 011    | {0,10} + 1                                |
| ws2 | 100    | bits 6:4: 010 + 010                       |
| we2 | 0101   |                                           |
| ws3 | 1111   | bits 10:7: 0101 + 1010                    |
| we3 | 10000  | would carry out if a carry came in        |
| ws4 | 11011  | bits 15:11: 11001 + 00010                 |
| we4 | 011100 |                                           |

Every select carry (`wmc0`–`wmc3`) is 0, so all groups take their ripple
results. The outputs are sum = 57291 (0xDFCB) and carry = 0. The top-level
testbench checks this vector net by net.

## Timing and cost

The design is purely combinational: no clock, no reset, no registers. The
result is valid one propagation delay after the operands change. Two paths compete for the longest delay. One is local to the widest group: a
5-bit ripple, its 6-bit BEC, then the 12:6 multiplexer. The other is the
select chain: the 2-bit ripple of group 0, then four multiplexer stages. The
growing group widths keep these two paths roughly balanced. Compared with a carry select adder
that uses a second carry-in-1 ripple adder, each group swaps W full adders for
a (W+1)-bit BEC. That is the source of the area and power saving.

## Modules

| file                  | module            | role                                              |
|-----------------------|-------------------|---------------------------------------------------|
| `rtl/full_adder.sv`   | `full_adder`      | one-bit full adder                                |
| `rtl/rca.sv`          | `rca`             | WIDTH-bit ripple adder from full adders (default 2) |
| `rtl/bec.sv`          | `bec`             | WIDTH-bit +1 converter (default 3)                |
| `rtl/csla_mux.sv`     | `csla_mux`        | 2·WIDTH:WIDTH group multiplexer (default 3, i.e. 6:3) |
| `rtl/csla16_modified.sv` | `csla16_modified` | the 16-bit adder (top)                        |

Top-level ports: `a[15:0]`, `b[15:0]`, `cin` in; `sum[15:0]`, `carry` out.

## Where this RTL makes its own choices

* **Group split.** The 2/2/3/4/5 split comes from the published example's
  internal net widths and checks out against its printed values. It is not
  stated as a rule. The top therefore has no width parameter. Building an
  8-, 32- or 64-bit variant means writing a new group split by hand.
* **Gate-level forms.** The full adder uses the textbook XOR/majority
  equations. The BEC uses the inverter/XOR/AND-chain form above. Both are
  standard choices. A synthesis tool will restructure them anyway.
* **Multiplexer polarity.** Select = 1 picks the BEC (carry-in-1) result.
* **Carry-out source.** The adder's carry out is the top bit of the last
  multiplexer.
* **Parameter defaults.** `rca`, `bec` and `csla_mux` are parameterised
  generics. Their defaults are the smallest widths the 16-bit adder
  instantiates.
* **Not included.** Wider hierarchical adders (32/64 bits) and any
  multiplier are not part of this RTL. Neither is any transistor-level
  optimisation behind the area and power figures: at RTL the design is a
  netlist of full adders, BECs and multiplexers, and its savings show only
  after gate-level synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

* `full_adder_tb`: all 8 input combinations.
* `rca_tb`: exhaustive at widths 2, 3, 4 and 5, both carry-in values.
* `bec_tb`: exhaustive at widths 3 to 6, including the all-ones wrap.
* `csla_mux_tb`: random inputs, both selects, at all four widths.
* `csla16_modified_tb`: the worked example with all internal nets, then
  corner patterns (0, all ones, alternating bits, carries that ripple across
  each group boundary), 2,000 8-bit additions and 20,000 random 16-bit
  additions. Each result is checked against `a + b + cin`, and each internal
  select carry against the carry computed from the operands. The testbench
  also counts how often each multiplexer picked each input. It counts how
  often a BEC wrap carried an incoming carry through a group, and how often
  carry in and carry out were 1. A mechanism that never occurred counts as a
  failure.

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb tb/csla16_modified_tb.sv \
        --top-module csla16_modified_tb -Mdir obj
    ./obj/Vcsla16_modified_tb

The full 16-bit run takes well under a second.
