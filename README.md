# 16-bit carry select adder with ZFCLOT groups

A carry select adder (CSLA) speeds up addition by working out each block of
sum bits ahead of time for both values of the incoming carry. The slow
ripple of the carry then only has to *choose* between the two prepared
results. A classic CSLA pays for this with area: every block holds two
ripple carry adders, one for carry 0 and one for carry 1.

This design saves most of that second adder. Each 2-bit group adds its
operands only once, assuming a carry in of 0 (the "RCA 0"). A small
correction circuit, the **ZFCLOT** (zero-finding logic built with logic
optimisation), turns that result into the result for a carry in of 1 by
adding one to it. The ZFCLOT is built from NAND gates and OR-AND-INVERT
(OAI) cells, which cost less area and power than the XOR/AND half adders a
second adder would need. The price is delay: the group carry now passes
through the ZFCLOT logic, so the design trades speed for area and power.

The RTL is purely combinational: `{cout, sum} = a + b + cin`, valid one
propagation delay after the inputs change. There is no clock and no reset.

## Group structure

The 16 operand bits are split into eight 2-bit groups, called Module 0 to
Module 7:

```
 cin ──► Module 0: rca2 ──carry[1]──► Module 1 ──carry[2]──► ... Module 7 ──► cout
         (2 full adders)              (rca2_0 + zfclot + mux2)
```

| Group | Bits | Contents |
|---|---|---|
| Module 0 | 1:0 | `rca2`: two full adders in a ripple, taking the external `cin` |
| Module 1 to 7 | 2k+1:2k | `rca2_0` (half adder + full adder, carry in 0), `zfclot`, `mux2` |

Inside Modules 1 to 7 (`csla_zfclot.sv`, `g_module[k]`):

```
 a[2k+1:2k], b[2k+1:2k] ──► rca2_0 ──{c1, su}──┬──────────────► mux2 d0
                                               └──► zfclot ───► mux2 d1 ──► {carry[k+1], sum[2k+1:2k]}
 carry[k] ─────────────────────────────────────────► zfclot.cp, mux2.sel
```

All RCA 0 additions start at once, because none needs a carry. Only the
group carry moves from group to group. It passes through one ZFCLOT carry
cell and one multiplexer per group.

## How the ZFCLOT works

The RCA 0 of a group delivers three bits, `{c1, s1[1], s1[0]}`. This is the
sum of two 2-bit numbers, so it lies between 0 and 6. The ZFCLOT adds the
incoming carry `cp` to it. The value 7 can never occur, so the increment never
overflows three bits. This removes a term that a general incrementer would
need.

| Output | Function | Gates in `zfclot.sv` |
|---|---|---|
| `s[0]` (S(n-1)) | `s1[0] ^ cp` | one XOR |
| `s[1]` (S(n)) | `s1[1] ^ (s1[0] & cp)` | `n1 = NAND(s1[0], cp)`, then `OAI(s1[1], n1, NAND(s1[1], n1))` |
| `c` (C) | `c1 \| (s1[1] & s1[0] & cp)` | `OAI(NOT s1[1], n1, NOT c1)`, where each NOT is a NAND with both inputs tied |

The OAI cell (`oai_logic.sv`) computes `o = ~((x | y) & z)`. With
`z = NAND(x, y)` it yields XNOR(x, y), and feeding it `n1` (the inverted
increment carry) turns that into the XOR the high sum bit needs. The carry
OAI is De Morgan's form of `c1 OR (s1[1] AND increment carry)`.

The operation of the ZFCLOT and its signal names (CP, C1, S1, S, C) come from
the source design. Its gate types are NAND gates and OAI cells, plus an XOR
on the low bit. The exact wiring of the gates shown above is this
implementation's own. It was chosen to give the function with those gate
types; it is not a copy of a published netlist.

## Where the multiplexer sits

The source design says only that the RCA, RCA 0 and ZFCLOT parts are joined
"with a 2:1 multiplexer". Here each group's `mux2` is selected by the
incoming carry. It passes the RCA 0 result when the carry is 0 and the
ZFCLOT result when it is 1. The ZFCLOT's `cp` input is fed by the same carry.
When the carry is 0 the ZFCLOT output equals the RCA 0 output, so the
multiplexer never changes the arithmetic. It only decides which of two
equal or correct paths drives the group output. Connecting `zfclot.cp` to a
constant 1 instead makes this a conventional "precompute both, then select"
CSLA. That is the one-line change to try if you want the carry chain to see
only multiplexers. It does not follow the source design, which drives the
ZFCLOT's CP input with the previous carry.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/csla_pkg.sv` | package | `GROUP_W = 2`, struct `group_res_t` {carry, 2 sum bits} |
| `rtl/full_adder.sv` | `full_adder` | 1-bit full adder |
| `rtl/half_adder.sv` | `half_adder` | 1-bit half adder |
| `rtl/rca2.sv` | `rca2` | 2-bit RCA with carry in (Module 0) |
| `rtl/rca2_0.sv` | `rca2_0` | 2-bit RCA with carry in 0 |
| `rtl/oai_logic.sv` | `oai_logic` | OR-AND-INVERT cell |
| `rtl/zfclot.sv` | `zfclot` | +CP correction of an RCA 0 result |
| `rtl/mux2.sv` | `mux2` | 2:1 multiplexer, `WIDTH` bits (default 3) |
| `rtl/csla_zfclot.sv` | `csla_zfclot` | top: the whole adder, parameter `WIDTH` (default 16) |

Top-level ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin` in; `sum[WIDTH-1:0]`,
`cout` out. `WIDTH` must be even and at least 4. An elaboration-time
assertion checks this.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and stops with a watchdog if the
test hangs.

* `full_adder`, `half_adder`, `rca2`, `rca2_0`, `oai_logic`: all input
  combinations, compared with integer arithmetic.
* `rca2` also checks the reference point Cin = 1, A = 0, B = 1, which must
  give sum = 2 and Cout = 0.
* `zfclot`: every RCA 0 value from 0 to 6, with both carries.
* `zfclot` also checks the reference point S1 = 2'b10, C1 = 1, CP = 0, which
  must give S = 2'b10 and C = 1.
* `mux2`: random words with both select values.
* `tb_csla_zfclot`: the 16-bit adder at its default size. It checks directed
  corners (`FFFF + 0 + 1`, `FFFF + FFFF + 1`, and others) and all inputs of
  the two lowest groups. It then checks 200,000 random additions, for
  200,519 checks in all.
* `tb_csla_zfclot` also counts how often each path was taken:
  * a group taking the RCA 0 path;
  * a group taking the ZFCLOT path;
  * the ZFCLOT itself generating the group carry;
  * a carry rippling from `cin` through all eight groups;
  * a carry out.

  A path that never occurs counts as a failure. The whole run takes well
  under a second.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_csla_zfclot.sv \
    --top-module tb_csla_zfclot -Mdir obj && obj/Vtb_csla_zfclot
```

## Departures and limits

* **Gate level.** The source design maps the adder onto a 45 nm standard-cell
  library and reports area, power and delay for it. This RTL is
  technology-independent. Synthesis will re-map the NAND/OAI structure of the
  ZFCLOT as it sees fit. The RTL says nothing about the published area and
  power figures, and none of them were reproduced.
* **Full and half adders** are written as behavioural equations. The source
  design takes the full adder from the cell library and does not give its
  gates.
* **Module 0.** One passage of the source design places both an RCA and an
  RCA 0 in Module 0. Its module table and the group description give Module 0
  only the RCA with carry in, and Modules 1 to 7 the RCA 0 and ZFCLOT. This
  implementation follows the table.
* **Multiplexer placement and width** are this implementation's reading; see
  above.
* **Delay.** Nothing is registered, so there is no latency in cycles. The
  critical path runs from `cin` through Module 0 and then, for each group,
  through one ZFCLOT carry cell and one multiplexer.
