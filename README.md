# 16-bit carry select adder with binary-to-excess-1 converters

A carry select adder (CSLA) beats the ripple of a plain adder by computing
each block of sum bits twice, once for an incoming carry of 0 and once for
an incoming carry of 1, and letting the real carry pick one when it
arrives. The price is area: the classic form needs two ripple carry adders
(RCAs) per block. This design keeps the zero-carry RCA and replaces the
carry-in-one RCA by a **binary-to-excess-1 converter (BEC)**, a small
circuit that adds one to the zero-carry result. Since
`a + b + 1 = (a + b) + 1`, the two candidates are the same as before, but
the incrementer costs far fewer gates than a second adder.

The adder here is 16 bits wide, non-uniform (groups grow towards the
most significant end) and purely combinational:
`{cout, sum} = a + b + cin`.

## The group partition and the carry chain

```
 bits   [15:11]      [10:7]       [6:4]        [3:2]        [1:0]
        group 5      group 4      group 3      group 2      group 1
        5-bit RCA0   4-bit RCA0   3-bit RCA0   2-bit RCA0   2-bit RCA
        6-bit BEC    5-bit BEC    4-bit BEC    3-bit BEC    (cin)
        12:6 mux     10:5 mux     8:4 mux      6:3 mux
 cout <----------- c10 <------- c6 <-------- c3 <-------- c1
                   car4         car3         car2         car1
```

* **Group 1** (bits 1:0) is an ordinary 2-bit RCA fed by `cin`.
* **Groups 2 to 5** (2, 3, 4 and 5 bits) each hold:
  * an n-bit RCA with its carry in fixed at 0 (`RCA0`). Because that carry
    is a constant, its lowest cell is a half adder, with full adders above it;
  * an (n+1)-bit BEC that takes `{carry, sum}` of that RCA and adds one.
    The carry has to be part of the converter's input because
    `a + b + 1` can carry out of the group even when `a + b` does not
    (when the group's bits add to all ones);
  * a 2:1 multiplexer of width n+1 (the "6:3", "8:4", "10:5" and "12:6"
    muxes). The carry out of the group below is its select: 0 passes the
    RCA result, 1 passes the BEC result. The selected word is the group's
    sum and carry out.

The carry never ripples through a group. It only passes one mux per group,
while all groups compute their two candidates in parallel.

### Why the groups grow

In the unit-gate model the design is costed in (every AND, OR and NOT
counts one unit of delay and one unit of area), a full adder takes 6 units,
a half adder 3, a 2:1 mux 3 and an XOR 3. The carry out of group 1 is
ready at 7. The select then reaches groups 3, 4 and 5 at 13, 16 and 19,
and each of those groups' BEC outputs is ready before its select (a wider
group has more time). Only in group 2 is the local result later than the
select: its carry candidate is ready at 10, so its carry out leaves at 13.
The last sum bits and `cout` settle at 22 units. The same model counts 43
gates for group 2 (half adder 6, full adder 13, one NOT, one AND and two
XORs in the BEC, 3 mux bits at 4 each).

These figures describe gate-level timing. They are not modelled or checked
by the RTL, which leaves gate choice to synthesis. Published FPGA results
for this 16-bit structure are 4.44 ns and 32 LUTs, against 5.42 ns and 34
LUTs for the dual-RCA version.

## The excess-1 converter

For an N-bit input `b`, the BEC outputs `x = b + 1 mod 2^N`:

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])      for i > 0
```

The AND terms are built as a chain, one two-input AND per bit. An N-bit
converter therefore needs one inverter, N-1 XORs and N-2 ANDs. Examples for
4 bits: 0000 -> 0001, 0001 -> 0010, 1110 -> 1111, 1111 -> 0000. Inside a
group the all-ones input cannot occur, because two n-bit numbers sum to at
most 2^(n+1) - 2.

## Modules

| file | module | role |
|---|---|---|
| `rtl/csla_pkg.sv` | `csla_pkg` | group widths `GROUP_W = '{2,2,3,4,5}`, `NUM_GROUPS`, `WIDTH` (16), `group_lsb()` |
| `rtl/csla_bec16.sv` | `csla_bec16` | top: group 1 RCA plus four `csla_group`s, carry chain |
| `rtl/csla_group.sv` | `csla_group #(N)` | one carry-select group: half adder + `rca #(N-1)`, `bec #(N+1)`, `mux2 #(N+1)` |
| `rtl/bec.sv` | `bec #(N)` | binary to excess-1 converter |
| `rtl/rca.sv` | `rca #(N)` | N-bit ripple carry adder with carry in |
| `rtl/mux2.sv` | `mux2 #(W)` | W-bit 2:1 mux, `y = sel ? d1 : d0` |
| `rtl/full_adder.sv` | `full_adder` | 1-bit full adder |
| `rtl/half_adder.sv` | `half_adder` | 1-bit half adder |

### Top-level ports (`csla_bec16`)

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | 16 | operands |
| `cin` | in | 1 | carry into bit 0 |
| `sum` | out | 16 | `(a + b + cin) mod 2^16` |
| `cout` | out | 1 | carry out of bit 15 |
| `car1` .. `car4` | out | 1 | carries out of groups 1 to 4, i.e. into bits 2, 4, 7 and 11 |

There is no clock, reset or handshake. The outputs follow the inputs after
the combinational delay.

## Where this RTL makes its own choices

* The full adder, half adder and 2:1 mux are specified in the source design
  only by their function and gate cost. Here they are written in their
  ordinary form (`s = a^b^c`, majority carry; `sel ? d1 : d0`).
* The source design has four fixed converters (3, 4, 5 and 6 bits) whose
  ports split the sum and carry into separate pins. Here one parameterized
  `bec` takes `{carry, sum}` as one word.
* The gate-level views of the synthesized source design start each group's
  zero-carry adder with a full adder whose carry input is tied low. Its
  architecture drawings and gate counts instead use a half adder there.
  This RTL follows the half adder; both compute the same function.
* The partition is a package table and the groups are generated from it.
  The `car1..car4` ports, however, assume exactly five groups.
* Only the 16-bit adder is built. The approach is also reported at 8, 32
  and 64 bits, but no group partition is given for those widths. A wider
  adder needs a longer `GROUP_W` table, and the `car` ports must be
  reworked. An 8-bit sum can be taken from this adder with zero-extended
  operands (`sum[7:0]`, carry in `sum[8]`).
* The dual-RCA carry select adder that this design improves on is not
  included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_half_adder`, `tb_full_adder` | exhaustive truth tables |
| `tb_rca` | exhaustive at 1, 2 and 4 bits against `a + b + cin` |
| `tb_bec` | exhaustive at 3, 4, 5 and 6 bits against `b + 1`, plus the four end rows of the 4-bit table |
| `tb_mux2` | random words, both select values, 4 and 6 bits |
| `tb_csla_group` | exhaustive at 2, 3, 4 and 5 bits, both carries in. Requires the case where the BEC alone produces the carry out |
| `tb_csla_bec16` | the full 16-bit adder; details below |
| `tb_csla_bec16_add8` | 8-bit workload: all 131,072 8-bit sums with carry in, zero-extended, on the 16-bit adder |

`tb_csla_bec16` runs these vectors:
* the published reference vector `a = 0x90FB`, `b = 0x557A`, `cin = 0`,
  expected `sum = 0xE675`, `cout = 0`, `car1..car4 = 1,1,1,0`;
* corner cases;
* all combinations of the two low groups and `cin`;
* 200,000 random operand pairs.

It compares `{cout, sum}` and the four group carries with integer
arithmetic. For each of groups 2 to 5 it counts how often the mux selected
the BEC result, how often it selected the RCA result, and how often the
carry out came from the BEC alone (the group's bits add to all ones and its
carry in is 1). Each of these must happen at least once, and so must a carry
running the full 16 bits. The adder has no smaller configuration, so this
testbench runs at full size.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl --top-module tb_csla_bec16 \
    rtl/csla_pkg.sv tb/tb_csla_bec16.sv
./obj_dir/Vtb_csla_bec16
```

Replace `tb_csla_bec16` to run another testbench. `-y rtl` lets Verilator
find each module by its file name. The package must be named explicitly,
because it is imported rather than instantiated. `-Wno-fatal` keeps the
testbenches' width warnings from stopping the build; they come from
integer reference arithmetic.
