# Square-root carry select adder with combinational logic blocks

A ripple carry adder is small but slow: the carry has to walk through every
bit. A carry select adder cuts the word into groups and computes each group's
sum ahead of time for both possible carries in, so that when the real carry
arrives only a multiplexer stands between it and the result. In the
*square-root* arrangement the groups grow from the bottom of the word to the
top (2, 2, 3, 4, 5 bits for 16 bits), because higher groups have more time
before their carry arrives; the delay then grows roughly with the square root
of the word length.

The classic carry select adder pays for this with a second adder per group.
This design replaces that second adder by a small **combinational logic block
(CLB)** that derives the carry-in-1 result from the carry-in-0 result, and
builds every cell from a four-gate XOR, so that the whole 16-bit adder needs
fewer simple gates. It also produces each group's carry out inside the CLB, so
the carry chain does not pass through the multiplexers.

The RTL is purely combinational: `{cout, sum} = a + b + cin`, no clock, no
reset, no registers.

## Group layout

For the default `WIDTH = 16`:

| group | bits      | carry-in-0 adder | CLB           | mux  | carry in | carry out |
|-------|-----------|------------------|---------------|------|----------|-----------|
| 1     | `[1:0]`   | 2 full adders, fed by `cin` (no select) | – | –  | `cin`    | C1        |
| 2     | `[3:2]`   | 1 HAM + 1 FAM    | 3 bits        | 4:2  | C1       | C4        |
| 3     | `[6:4]`   | 1 HAM + 2 FAM    | 4 bits        | 6:3  | C4       | C8        |
| 4     | `[10:7]`  | 1 HAM + 3 FAM    | 5 bits        | 8:4  | C8       | C13       |
| 5     | `[15:11]` | 1 HAM + 4 FAM    | 6 bits        | 10:5 | C13      | `cout`    |

A CLB of "N+1 bits" handles an N-bit group: N sum bits plus the group carry.

Inside a group (`csla_group`):

```
 a,b ──► rca0 (carry in 0) ──sum0──┬──────────────► mux d0
                          └─c0──┐  └─► clb ─sum1──► mux d1 ──► sum
                                └────► clb ────────────────► cout
 carry from group below ─────────────► clb (AND input), mux select
```

## The cells

All cells are written gate by gate, so a netlist view shows the intended
structure.

* **xorm** – XOR from four gates: `y = (a | b) & ~(a & b)`.
* **ham** – half adder that reuses the XOR's internal `a & b` as its carry:
  `carry = a & b`, `sum = (a | b) & ~carry`. Four gates, no separate carry gate.
* **fam** – full adder from two `ham`s in series (`a+b`, then `+cin`) and one
  gate joining the two half-adder carries. The two carries can never both be 1,
  so this gate must be an OR (an XOR would also work). Nine gates.
* **rca** – ripple adder of `fam` cells with a carry in (group 1).
* **rca0** – ripple adder for a carry in of 0: a `ham` at bit 0, `fam` cells
  above it (groups 2 and up).
* **sel_mux** – per-bit 2:1 selection of the carry-in-0 or carry-in-1 sum.

## The combinational logic block

This block is the main idea of the design. Given the group's carry-in-0 result
`{c, s}` (`s` is N bits wide) and the carry `cin` from the group below, it produces:

1. **`x = s + 1`**, the sum the group would have had with a carry in of 1.
   This is an incrementer: bit 0 is `~s[0]`, and a chain of N-1 half adders
   adds the running carry `k` into each higher bit (`k[0] = s[0]`,
   `k[i] = s[i] & k[i-1]`). It depends only on `s`, so it is ready long before
   `cin` arrives.
2. **The group carry out**, `cout = c XOR (k[N-1] AND cin)`. The group passes a
   carry out either because its own addition overflowed (`c`) or because a
   carry came in and the whole sum was ones (`k[N-1] & cin`). Both cannot
   happen at once: the largest N-bit sum `a + b` is `2^(N+1) - 2`, so when
   `c = 1` the low bits `s` are never all ones. That makes XOR equal to OR,
   and the four-gate `xorm` can be used.

Because `cin` goes into the carry out through only one AND and one XOR, the
carry chain from group to group is AND–XOR per group. The multiplexers only
deliver sum bits and are off the carry path.

## Other word lengths

`WIDTH` can be changed. Group `g = 0` has 2 bits and group `g >= 1` has `g+1`
bits; if the last group would go past the top of the word, it is cut down to
the bits that are left (see `csla_pkg.sv`). This gives:

| WIDTH | group sizes                  |
|-------|------------------------------|
| 8     | 2, 2, 3, 1                   |
| 16    | 2, 2, 3, 4, 5                |
| 32    | 2, 2, 3, 4, 5, 6, 7, 3       |
| 64    | 2, 2, 3, 4, 5, 6, 7, 8, 9, 10, 8 |

Only the 16-bit split comes from the design. The rule for other widths is a
choice made here, and a different split may time better. A 1-bit group is
legal: its `rca0` is a single half adder and its CLB is just the inverter,
AND and XOR.

## Cost

At 16 bits the cells add up to 188 two-input gates and inverters, plus 14 bits
of 2:1 mux: group 1 has 18, then 23, 36, 49 and 62 (FAM = 9, HAM = 4, XORM = 4,
one NOT and one AND per CLB). If a mux bit counts as 4 gates, the total is 244.
A published count of 238 for this structure uses 59 gates for group 4. The
per-cell numbers give 49 + 16 = 65 for that group, and this RTL builds exactly
those cells. After generic synthesis (yosys) the 16-bit adder is 88 AND, 54 OR
and 46 NOT cells plus 14 mux bits, matching the 188 figure.

## Where this RTL makes its own choices

* **Carry in.** The adder has a `cin` port feeding group 1, whose two bits are
  full adders. The 16-bit block diagram draws no carry in, but the gate counts
  of the first group (two full adders, no half adder) need one. Tie `cin` to 0
  for a plain `a + b`.
* **Full-adder merge gate.** It is written as an OR, which is the gate the
  adder needs to be correct. An AND would make the carry always 0.
* **Mux internals.** These are not specified. Each mux is a per-bit
  `sel ? d1 : d0`.
* **Widths other than 16.** The group-size rule is described above.
* **Timing.** The adder has no clock and no pipeline. Gate-delay arrival times
  for the group carries (7, 11, 15, 19 and 23 gate delays for C1 to `cout`)
  are a property of a gate-level implementation. They are not modelled.

## Files

| file | contents |
|------|----------|
| `rtl/sqrt_csla_clb.sv` | top: `a`, `b`, `cin` → `sum`, `cout`; parameter `WIDTH` (16) |
| `rtl/csla_pkg.sv`      | group layout functions |
| `rtl/csla_group.sv`    | one carry select group (rca0 + clb + sel_mux) |
| `rtl/clb.sv`           | incrementer and group carry out |
| `rtl/rca.sv`, `rtl/rca0.sv` | ripple adders with and without carry in |
| `rtl/fam.sv`, `rtl/ham.sv`, `rtl/xorm.sv` | the gate-level cells |
| `rtl/sel_mux.sv`       | 2N:N select |
| `tb/tb_*.sv`           | one self-checking testbench per module, plus `tb_sqrt_csla_widths.sv` |

## Verification

Each testbench compares the outputs with results that it works out on its own,
using plain integer addition. At the end it prints
`TB_RESULT checks=<n> failures=<m>`.

* The cells, ripple adders, CLB and groups are tested exhaustively, at every
  group size used at 16 bits.
* `tb_sqrt_csla_clb` runs the 16-bit adder at its default parameters. It applies
  corner values, 200 000 random words and 200 000 long-carry words, where `b`
  is nearly `~a`. For each select group it counts four cases from the operands:
  the carry in was 0, the carry in was 1, the group generated a carry, and an
  incoming carry propagated right through the group via the CLB. If any count
  stays at zero, the test fails.
* `tb_sqrt_csla_widths` tests the 8-bit adder exhaustively, and the 32-bit and
  64-bit adders with corner values, random words and long-carry words.

Each testbench was also run against a copy of its module with one deliberate
bug, and each one reported failures.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/csla_pkg.sv tb/tb_sqrt_csla_clb.sv \
          --top-module tb_sqrt_csla_clb
./obj_dir/Vtb_sqrt_csla_clb
```

Any other testbench runs the same way: name its file and its top module.
The package file comes first so that its functions are known before the
top is elaborated.
