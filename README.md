# 64-bit Vedic multiply-accumulate unit with square-root carry-select adders

A multiply-accumulate (MAC) unit computes `acc <= acc + a*b` once per clock. It
is the core operation of filters, FFTs and dot products. This design does that
for 64-bit unsigned operands. Two ideas make it up:

* **Vedic multiplication (Urdhva-Tiryakbhyam, "vertically and crosswise").** An
  N x N product is split into four N/2 x N/2 products of the operand halves.
  Three N-bit additions then merge them. The split repeats down to 2 x 2
  multipliers, which are just four AND terms and two half adders. All partial
  products are formed in parallel.
* **Square-root carry-select adder (SQRT CSLA).** Every addition in the design,
  inside the multiplier and in the accumulator, uses a carry-select adder. It
  is split into groups of growing size (2, 2, 3, 4, 5, ... bits). Each group
  works out its result for a carry in of 0 and for a carry in of 1, and the
  real carry only has to pick one. The groups are "reduced complexity": the
  carry-in-1 result is not computed by a second adder. It comes from the
  carry-in-0 half adder outputs through one inverter and one XOR per bit.

The multiplier and the accumulation adder form a single combinational path
into a 128-bit accumulator register. No pipelining is used.

## Block hierarchy

```
vedic_mac                      MAC: multiplier + accumulation adder + register
├── vedic_mult  #(N=64)        Vedic multiplier tree
│   ├── vedic_2x2  (x1024)     2x2 leaves
│   │   └── half_adder (x2)
│   └── vedic_combine #(S)     tree nodes, S = 4, 8, 16, 32, 64
│       └── sqrt_csla #(S) x3  the node's three adders
└── sqrt_csla   #(128)         accumulation adder
    sqrt_csla  = rca #(2) + csla_group #(2), #(3), #(4), ...
    csla_group = one half_adder + two 2:1 muxes per bit
```

`mac_pkg` holds the elaboration-time functions shared by these modules: the
group partition of the adder and the bus layout of the multiplier tree.

## The Vedic multiplier tree (`vedic_mult`, `vedic_combine`)

Split the operands into halves of H = N/2 bits, `a = {aH, aL}` and
`b = {bH, bL}`. The four sub-products are

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH      (N bits each)
```

and `vedic_combine` merges them with three N-bit adders:

```
adder 1:  {c1, m1} = q1 + q2                        crosswise terms
adder 2:  {c2, m2} = m1 + q0[N-1:H]                 add high half of q0
adder 3:  hi       = q3 + {c1|c2, m2[N-1:H]}        add q3 and the carries
p = { hi , m2[H-1:0] , q0[H-1:0] }                  2N bits
```

Product bits `[H-1:0]` come straight from q0. Bits `[N+H-1:H]` come from the
low half of adder 2. The top N bits come from adder 3.

**The c1/c2 detail.** Both carries weigh 2^(N+H). The usual block diagram of
this multiplier feeds only c1 into adder 3 and leaves c2 unconnected. That is
wrong for some operands. For a 4x4 multiply with a = 11 and b = 15, c1 = 0 and
c2 = 1. Dropping c2 gives 101 instead of 165. The sum q1 + q2 + q0[N-1:H] is
below 2^(N+1), so c1 and c2 are never both 1. Their OR is therefore their sum,
and that OR goes into the single bit position. The carry out of adder 3 is
always 0 and is left unused. Verilator reports it as an unused signal. An
immediate assertion in `vedic_combine` checks in simulation that c1 and c2
are never both 1.

**How the tree is coded.** `vedic_mult` is not a self-instantiating module. It
is a generate loop over levels:

* Level 1 holds (N/2)^2 `vedic_2x2` instances, with pp(i,j) = `a[2i+:2] * b[2j+:2]`.
* Level k (chunks of S = 2^k bits, M = N/S chunks per operand) holds M^2
  `vedic_combine #(S)` nodes.
* Node (i,j) takes the level k-1 products (2i,2j), (2i+1,2j), (2i,2j+1) and
  (2i+1,2j+1) as q0, q1, q2 and q3.

All products sit in one packed bus `pp`. Level k starts at
`vedic_level_base(N,k) = sum over j<k of 2N^2/2^j`. Product (i,j) of that
level sits at offset `(i*M + j) * 2S`. Every bit of `pp` is driven once and
read once, except the last level, which is the output `p`. For N = 64 the
tree has 1024 leaves and 341 nodes. That makes 1023 adders of 4 to 64 bits.

## The square-root carry-select adder (`sqrt_csla`, `csla_group`, `rca`)

**Group partition.** For 16 bits the groups are

```
bits   [1:0]   [3:2]    [6:4]    [10:7]   [15:11]
       2b RCA  group 2  group 3  group 4  group 5
cin -> ------> c0 ----> c1 ----> c2 ----> c3 ----> cout
```

The first group is a ripple carry adder that takes the external carry in.
Each later group takes the carry out of the group below. Group g (g >= 1) has
g+1 bits and starts at bit `2 + (g-1)(g+2)/2`. Other widths continue this
sequence, and the last group is truncated to end at the width. For example:

* 4 bits: groups of 2, 2.
* 8 bits: groups of 2, 2, 3, 1.
* 128 bits: groups of 2, 2, 3, ..., 15 and a last group of 7.

This rule for widths other than 16 is this design's own extension.

**Inside a group** (`csla_group`), per bit i:

```
half adder:   s = a ^ b,   c = a & b         result for carry in 0
derived:      s' = ~s,     c' = c ^ s        result for carry in 1 (c' = a | b)
select:       sum[i]  = sel[i] ? s' : s
              sel[i+1] = sel[i] ? c' : c      sel[0] = group carry in
```

The selected carry of one bit is the select of the next, and the last one is
the group's carry out. This replaces the older CSLA groups, which used a
second ripple adder or a binary-to-excess-1 converter. The carry still
passes through one mux per bit inside a group. The design's gain is in gate
count, not in the length of the carry path.

## The MAC (`vedic_mac`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, rising edge |
| `rst_n`   | in  | 1     | asynchronous, active-low reset; clears `acc` and `acc_cout` |
| `en`      | in  | 1     | do a MAC on this edge; otherwise hold |
| `clr`     | in  | 1     | with `en`: `acc <= a*b` (start a new sum) |
| `a`, `b`  | in  | N     | unsigned operands |
| `acc`     | out | ACC_W | accumulator register |
| `acc_cout`| out | 1     | carry out of the accumulation adder at the last update |

Parameters: `N = 64` (operand width, a power of two) and `ACC_W = 2*N`
(accumulator width, at least 2N).

**Timing.** Set `a`, `b`, `en` and `clr` before a rising edge. After that edge,
`acc` holds the new sum. That gives one MAC per cycle and one cycle of
latency. The accumulator wraps modulo 2^ACC_W. `acc_cout` shows whether the
last update wrapped. For long dot products with guard bits, set `ACC_W`
larger than 2N.

**Departures from the source description and own choices:**

* The source gives the 64-bit size, the Vedic decomposition and the SQRT CSLA
  with its group structure.
* It does not describe the accumulator register, its width, reset, enable,
  clear or carry flag. All of these are this design's choices.
* Operands are unsigned. No signed mode is described.
* The source draws the multiplier with ripple carry adders. The proposed unit
  replaces every one of them with the SQRT CSLA, and so does this design.
* The c1/c2 carry fix above is this design's.
* The baselines the design is compared against are not included: the ripple
  carry MAC, the Booth and Wallace-tree multipliers, the carry-save adder and
  the BEC-based carry-select adder.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
SystemVerilog's built-in `+` and `*`:

| testbench          | what it covers |
|--------------------|----------------|
| `tb_rca`           | exhaustive at 2 and 7 bits |
| `tb_csla_group`    | exhaustive at 2, 3, 4 and 5 bits |
| `tb_sqrt_csla`     | carry-chain corners and random operands at 16 and 128 bits |
| `tb_vedic_2x2`     | exhaustive |
| `tb_vedic_combine` | exhaustive at N=4, random at N=16, and checks that both the c1 and the c2 case occur |
| `tb_vedic_mult`    | exhaustive at N=4 and N=8, corners and random at N=16 and N=64 |
| `tb_vedic_mac`     | end to end at the default parameters (N=64, ACC_W=128), see below |

`tb_vedic_mac` runs 40 random dot products. Idle cycles are mixed in, and
each update is checked on the cycle it should appear. It also runs:

* a known small dot product,
* an all-ones sequence that wraps the accumulator,
* a reset in the middle of a sum.

It counts loads, accumulations, holds, wraps and resets, and fails if any of
them never happened. Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

The design's delay has not been measured, and neither its area nor its power.
The source compares these on an FPGA; its numbers are not reproduced here.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/mac_pkg.sv tb/tb_vedic_mac.sv -y rtl +libext+.sv \
    --top-module tb_vedic_mac -Mdir obj_mac
./obj_mac/Vtb_vedic_mac
```

Swap `tb_vedic_mac` for any other testbench name. `mac_pkg.sv` must be read
first. The other modules are found in `rtl/` by name. The full 64-bit MAC
testbench builds in about a minute and runs in well under a second.

To lint one module: `verilator --lint-only -Wall rtl/*.sv --top-module <name>`.

## Changing it

* **Operand width:** set `N` on `vedic_mac` or `vedic_mult`. It must be a power
  of two; anything else stops elaboration with an error.
* **Adder width:** set `WIDTH` on `sqrt_csla`. Any width from 1 up works.
* **Group sizes:** change `csla_group_start` in `mac_pkg`. `csla_num_groups`
  and `csla_group_size` follow from it.
* **Pipelining:** to pipeline the multiplier, add registers on the `pp` bus
  between levels in `vedic_mult`. Each level is one generate iteration.
