# Square-root carry-select adders with a four-gate XOR

This RTL implements three square-root carry-select adders (CSLA). In all three, every XOR
gate is the same *modified XOR*:

    y = (a OR b) AND NOT(a AND b)

This gate takes four gates: one OR and one AND in the first level, one inverter and a final
AND. An XOR written as sum-of-products (`a·b' + a'·b`) needs five. The modified form also
computes `a AND b` inside itself. A half adder built on it can therefore take its carry
from that internal AND, so it needs one XOR gate and no AND gate. Adders are mostly XORs
and half adders, so this saves area and power throughout the adder. The design follows the
published paper *Low-Power and Area-Efficient Square-Root Carry Select Adders using
Modified XOR Gate*. That paper applies the gate to three known CSLA structures:

| adder | module | how a group gets its "carry-in = 1" result |
|---|---|---|
| conventional sqrt CSLA | `sqrt_csla_conv` | a second ripple-carry adder |
| BEC based sqrt CSLA | `sqrt_csla_bec` | adds 1 to the carry-in-0 result with a binary-to-excess-1 converter |
| OLB (optimized logic based) sqrt CSLA | `sqrt_csla_olb` | shares half sums and builds two short carry chains |

`csla_top` places all three side by side. They are alternatives, not parts of one
datapath. Each has its own `a`, `b`, `cin`, `sum` and `cout` ports (prefixes `conv_`,
`bec_` and `olb_`).

## The modified XOR and what is built from it

```
mod_xor      y = (a|b) & ~(a&b),   ab = a&b           4 gates
half_adder   sum = mod_xor.y, cout = mod_xor.ab       4 gates
full_adder   two half adders + OR of their carries    9 gates
```

`mod_xor` has a second output, `ab`, which exposes the internal AND term. Every
structure above it reuses that term in some way:

* **Half adder.** The carry is `ab`.
* **Full adder.** It is two half adders: `p = a^b, g = a&b`, then `sum = p^cin,
  t = p&cin`, then `cout = g|t`.
* **Excess-1 converter (`bec`).** Bit *k* of `x + 1` is `x[k] ^ (x[0]&…&x[k-1])`. The AND
  of the lower bits is exactly the `ab` output of the previous bit's modified XOR, so the
  increment chain needs no extra AND gates.

## Square-root grouping

A `WIDTH`-bit adder has two parts:

1. A 2-bit ripple-carry adder on bits `[1:0]`, fed by `cin`.
2. Carry-select groups above it. Their sizes grow towards the MSB.

Each group computes its result for both possible carry-ins while the carry is still
rippling below it. When the real carry arrives, the group only has to select. The critical
path therefore crosses one selection stage per group instead of one full adder per bit.
`csla_pkg` holds the group table for the five supported widths:

| WIDTH | RCA | groups (LSB to MSB) | group boundaries |
|---|---|---|---|
| 4  | 2 | 2 | 2 |
| 8  | 2 | 2, 4 | 2, 4 |
| 16 | 2 | 2, 3, 4, 5 | 2, 4, 7, 11 |
| 32 | 2 | 2, 3, 4, 6, 7, 8 | 2, 4, 7, 11, 17, 24 |
| 64 | 2 | 2, 3, 4, 5, 6, 7, 8, 8, 9, 10 | 2, 4, 7, 11, 16, 22, 29, 37, 45, 54 |

The published 32-bit grouping has no 5-bit group; it is kept as published (its sizes
still add up to 32). Any other `WIDTH` fails at elaboration with an `$error`. The default
is 64, the largest size the design was evaluated at.

## The three kinds of group

All groups have the same ports: `a`, `b` and `cin` in, `sum` and `cout` out, and a
parameter `N` (2 to 10 in the adders).

### Conventional group (`csla_group`)

The group has three parts:

* `rca` with `CIN_MODE = CIN_ZERO`. Bit 0 is a half adder.
* `rca` with `CIN_MODE = CIN_ONE`. Bit 0 is a full adder whose carry input is tied to 1.
  This keeps the published gate count; synthesis simplifies it.
* `csla_mux`, an (N+1)-bit 2:1 multiplexer. It picks `{cout, sum}` of one adder, selected
  by `cin`.

### BEC group (`bec_csla_group`)

This group has one `CIN_ZERO` ripple-carry adder. Its (N+1)-bit result `{cout0, sum0}`
feeds `bec`, which produces `{cout0, sum0} + 1`, the carry-in-1 result. The multiplexer
then selects as above. This removes the second adder, but the carry-in-1 path becomes the
adder followed by the increment chain.

### OLB group (`olb_csla_group`)

This is the least obvious structure. It never builds a full adder. It has five sub-blocks
(index `j` = bit within the group; `c0[j]`, `c_0[j]`, `c_1[j]` and `c[j]` are carries
*out of* bit `j`):

| sub-block | equation | cost per bit |
|---|---|---|
| `olb_hsg_hcg` half sum / half carry | `s0[j] = a[j]^b[j]`, `c0[j] = a[j]&b[j]` | one modified XOR (the carry comes free) |
| `olb_cg0` carries if cin = 0 | `c_0[0] = c0[0]`; `c_0[j] = c0[j] \| (s0[j] & c_0[j-1])` | AND + OR (bit 0: none) |
| `olb_cg1` carries if cin = 1 | `c_1[0] = c0[0] \| s0[0]`; `c_1[j] = c0[j] \| (s0[j] & c_1[j-1])` | AND + OR (bit 0: OR) |
| `olb_fcg` final carries | `c[j] = c_0[j] \| (c_1[j] & cin)` | AND + OR |
| `olb_fsg` final sums | `sum[0] = s0[0]^cin`; `sum[j] = s0[j]^c[j-1]` | one modified XOR |

`olb_fcg` needs no multiplexer. A carry that appears with carry-in 0 also appears with
carry-in 1, so `c_0 | (c_1 & cin)` is the same as selecting between `c_1` and `c_0` with
`cin`. The group's carry-out is `c[N-1]`.

## Gate counts

The published gate table counts every gate, with each multiplexer bit as four gates. The
per-group counts are: 2-bit RCA 18; conventional group 22N − 1; BEC group 17N; OLB group
14N − 3. Adding these over the grouping gives:

| WIDTH | conventional | BEC | OLB |
|---|---|---|---|
| 4  | 61   | 52   | 43  |
| 8  | 148  | 120  | 96  |
| 16 | 322  | 256  | 202 |
| 32 | 672  | 528  | 420 |
| 64 | 1372 | 1072 | 856 |

The RTL is written gate by gate, so a coarse synthesis without technology mapping keeps
this structure. A yosys `synth -run :fine` run gives these cell counts:

* **OLB:** exactly the table (43, 96, 202, 420, 856 cells).
* **BEC:** 41, 90, 188, 390, 794. These equal the table once each group's multiplexer is
  counted as one cell instead of four gates per bit.
* **Conventional:** 39, 88, 186, 396, 816. These are lower than the table because synthesis
  simplifies the constant-1 full adders.

The published area, delay and power figures come from a 45 nm standard-cell flow and are
not reproduced here.

## Interface and timing

Each adder has these ports:

```
input  logic [WIDTH-1:0] a, b
input  logic             cin
output logic [WIDTH-1:0] sum
output logic             cout        // {cout, sum} = a + b + cin
```

Everything is combinational. There is no clock, reset or handshake. Put registers around
an adder if you need a pipelined unit.

## Files

| file | content |
|---|---|
| `rtl/csla_pkg.sv` | `cin_mode_e`, `RCA_BITS`, group-table functions `num_groups`, `group_size`, `group_lsb`, `width_supported` |
| `rtl/mod_xor.sv`, `half_adder.sv`, `full_adder.sv` | gate-level cells |
| `rtl/rca.sv` | N-bit ripple-carry adder; `CIN_MODE` = `CIN_PORT` / `CIN_ZERO` / `CIN_ONE` |
| `rtl/csla_mux.sv` | (N+1)-bit 2:1 group multiplexer |
| `rtl/csla_group.sv`, `bec.sv`, `bec_csla_group.sv` | conventional and BEC groups |
| `rtl/olb_*.sv` | OLB sub-blocks and `olb_csla_group` |
| `rtl/sqrt_csla_conv.sv`, `sqrt_csla_bec.sv`, `sqrt_csla_olb.sv` | the three adders |
| `rtl/csla_top.sv` | the three adders side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test of the 64-bit top:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/csla_pkg.sv tb/tb_csla_top.sv --top-module tb_csla_top -o sim
./obj_dir/sim
```

Replace `tb_csla_top` with any other `tb_<module>` to test that module. Expected values
always come from SystemVerilog's own `+` on the operands, never from the design's
structure. Coverage by testbench:

* **Cells, multiplexer and excess-1 converter.** Tested exhaustively (`bec` for N = 1..10).
* **`rca`.** Exhaustive for N = 1..6 in all three carry-in modes.
* **Group and OLB sub-block testbenches.** They instantiate N = 2..10. Each runs every
  combination of the low five bits and 20 000 random vectors.
* **Adder testbenches.** They run all five widths on corner cases, random operands and
  near-complementary operands, which give long carry runs.
* **`tb_csla_top`.** It runs the default 64-bit build and gives each adder a staggered copy
  of the stimulus, so a miswired top is caught. It also counts how often each mechanism
  happens and fails if any count is zero:
  * each of the 10 groups selecting its carry-in-0 result;
  * each group selecting its carry-in-1 result;
  * a carry crossing each whole group;
  * a carry rippling from `cin` to `cout`;
  * a carry-out of 1.

## Choices not fixed by the source design

* **Multiplexer.** Its gate structure is not published. `csla_mux` is a plain
  `sel ? d1 : d0`.
* **Full adder.** It is built as two half adders plus an OR. This is the structure that
  gives the published 9-gate full adder and the 18-gate 2-bit RCA.
* **Group sizes for BEC and OLB.** The grouping table is published for the conventional
  adder. The BEC and OLB adders use the same table, which is what the 16-bit diagrams of
  all three show.
* **Top level.** There is no published top that combines the three adders. `csla_top` is
  only a side-by-side wrapper.
* **Excluded baselines.** The baseline adders built with the five-gate XOR were used only
  for comparison and are not included.
* **Sizes.** Only the five published sizes are supported, because other widths have no
  published group table. To add one, extend the `case` statements in `csla_pkg`. The
  group sizes must add up to `WIDTH − 2`.
