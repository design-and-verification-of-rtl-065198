# Kogge-Stone carry select adder (16 bit)

A carry select adder splits the operands into groups and computes every group's
sum twice, once as if the carry into the group were 0 and once as if it were 1.
When the real carry arrives, a multiplexer picks the right result. The carry
then passes only one multiplexer per group instead of rippling through every
bit.

This design is a 16-bit carry select adder with two changes from the textbook
form:

* **No second adder per group.** The carry-in-1 result is the carry-in-0 result
  plus one. A *binary to excess-1 converter* (BEC) forms it from the first
  result. A BEC is a chain of XOR/AND gates and is much smaller than an adder.
* **Kogge-Stone group adders.** Each group adder is a Kogge-Stone parallel
  prefix adder, not a ripple carry adder. Its carries settle in log2(width)
  operator levels instead of one full-adder delay per bit.

The whole adder is combinational. It has no clock, no reset and no state.

```
{cout, sum[15:0]} = a[15:0] + b[15:0] + cin
```

## Group layout

The groups grow towards the most significant end. The carry reaches a high
group late, so that group has time to settle a wider adder.

| group | bits    | group adder  | BEC   | multiplexer | select signal          |
|-------|---------|--------------|-------|-------------|------------------------|
| 0     | [1:0]   | 2-bit KS     | none  | none        | none (takes `cin`)     |
| 1     | [3:2]   | 2-bit KS     | 3-bit | 6:3         | carry out of group 0   |
| 2     | [6:4]   | 3-bit KS     | 4-bit | 8:4         | carry out of group 1   |
| 3     | [10:7]  | 4-bit KS     | 5-bit | 10:5        | carry out of group 2   |
| 4     | [15:11] | 5-bit KS     | 6-bit | 12:6        | carry out of group 3   |

Group 0 is an ordinary adder that takes the external carry in. Its carry out
steers the first multiplexer.

In the multiplexer names, "6:3" means three output bits chosen from two 3-bit
words. Each word is a group's 2 sum bits plus its carry.

The carry out of every multiplexer steers the next multiplexer. The carry out
of the last multiplexer is `cout`.

## One carry select stage (`csla_group`)

For a W-bit group:

1. A W-bit Kogge-Stone adder adds the group's operand bits with carry in tied
   to 0. This gives the (W+1)-bit word `r0 = {c0, s0}`.
2. The (W+1)-bit BEC gives `r1 = r0 + 1`. Because `a + b + 1 = (a + b) + 1`,
   `r1` is exactly `{carry, sum}` with carry in 1.
3. The multiplexer outputs `r0` when the carry into the group is 0 and `r1`
   when it is 1. The top bit of the chosen word is the group's carry out.

The BEC never wraps. The largest possible `r0` is `2*(2^W - 1) = 2^(W+1) - 2`,
so `r0 + 1` always fits in W+1 bits.

BEC logic: bit 0 is inverted. Every higher bit `i` is XORed with the AND of all
bits below it:

```
x[i] = b[i] ^ (b[i-1] & ... & b[0])
```

## The Kogge-Stone adder (`ks_adder`)

The adder works in three stages.

**Pre-processing (`ks_pg_gen`).** For each bit, `p = a ^ b` (propagate) and
`g = a & b` (generate).

**Carry generation network (`ks_prefix_tree`).** The network repeatedly applies
the prefix ("dot") operator, `ks_carry_op`. It joins the pair of a higher span
with the pair of the adjacent lower span:

```
(P, G)_joined = (P_hi & P_lo,  G_hi | (P_hi & G_lo))
```

At level k (k = 0, 1, …) every position i ≥ 2^k is combined with position
i − 2^k. Positions below 2^k pass through unchanged. After ceil(log2 N) levels,
position i holds the pair over bits [i:0]. For the 16-bit default:

* level 1 forms the spans 15:14 … 1:0
* level 2 forms 15:12 … 3:0
* level 3 forms 15:8 … 7:0
* level 4 forms 15:0 … 8:0

Each node drives at most two others. This short fan-out, together with the
minimum number of levels, is what makes Kogge-Stone fast. The price is many
operator cells and long wires.

Every node is the full operator (both P and G). In the classic drawing, the
nodes whose span already reaches bit 0 only need G. A synthesis tool removes the
unused P logic.

**Post-processing (`ks_sum_gen`).** This stage turns the group pairs into
carries and sum bits:

```
c[i]   = G[i:0] | (P[i:0] & cin)           carry out of bit i
sum[i] = p[i] ^ (i == 0 ? cin : c[i-1])
cout   = c[N-1]
```

In the carry select adder, the 2-, 3-, 4- and 5-bit instances have 1, 2, 2 and
3 operator levels.

## Modules

| file                    | module           | role                                                       |
|-------------------------|------------------|------------------------------------------------------------|
| `rtl/kscsla_pkg.sv`     | `kscsla_pkg`     | group widths `'{2,2,3,4,5}`, helpers for bit offsets and total width |
| `rtl/ks_carry_op.sv`    | `ks_carry_op`    | prefix operator                                            |
| `rtl/ks_pg_gen.sv`      | `ks_pg_gen`      | bit propagate/generate (default N = 16)                    |
| `rtl/ks_prefix_tree.sv` | `ks_prefix_tree` | Kogge-Stone network (default N = 16)                       |
| `rtl/ks_sum_gen.sv`     | `ks_sum_gen`     | carries and sum bits (default N = 16)                      |
| `rtl/ks_adder.sv`       | `ks_adder`       | N-bit Kogge-Stone adder with cin/cout (default N = 16)     |
| `rtl/bec.sv`            | `bec`            | binary to excess-1 converter (default N = 3)               |
| `rtl/csla_mux.sv`       | `csla_mux`       | W-bit 2:1 multiplexer (default W = 3, the 6:3 mux)         |
| `rtl/csla_group.sv`     | `csla_group`     | one select stage: KS adder + BEC + multiplexer             |
| `rtl/ks_csla.sv`        | `ks_csla`        | top: the 16-bit carry select adder                         |

The default of 16 for the stand-alone Kogge-Stone modules is the textbook
16-bit tree. It is not a size used inside `ks_csla`.

Top ports of `ks_csla`:

| port   | dir | width | meaning     |
|--------|-----|-------|-------------|
| `a`    | in  | 16    | operand     |
| `b`    | in  | 16    | operand     |
| `cin`  | in  | 1     | carry in    |
| `sum`  | out | 16    | sum         |
| `cout` | out | 1     | carry out   |

## Design choices

These are decisions made for this RTL:

* **Carry in on group 0.** The first group takes the external carry in. The
  usual drawing of this structure shows no carry input on that adder.
* **Multiplexer polarity.** Select = 1 picks the BEC (carry-in-1) word.
* **Full operator everywhere.** The "grey" (G-only) prefix cells are not a
  separate cell type.
* **Widths that are not a power of two.** The Kogge-Stone network uses the same
  shift-by-2^k rule with ceil(log2 N) levels.
* **Group layout as a parameter.** The layout is the parameter `GROUP_W` of
  `ks_csla`, with the width derived from it. The number of groups is fixed by
  `KS_N_GROUPS` in the package. To use another group count, change the package.
  The top-level testbench assumes the 16-bit default layout.

This RTL makes no claims about timing or area. Those depend on the target
technology.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic or a bit-serial reference, not against the structure under
test.

| testbench           | what it checks                                                          |
|---------------------|-------------------------------------------------------------------------|
| `tb_ks_carry_op`    | all 16 input combinations                                               |
| `tb_ks_pg_gen`      | corner and random operands, bit by bit                                  |
| `tb_ks_prefix_tree` | 16-, 5- and 3-bit trees against a serial prefix computation            |
| `tb_ks_sum_gen`     | carries and sums from serially computed group pairs                     |
| `tb_ks_adder`       | 16 bit random; 2, 3, 4 and 5 bit exhaustive (both operands and cin)     |
| `tb_bec`            | 3 and 6 bit exhaustive                                                  |
| `tb_csla_mux`       | all 128 input combinations of the 6:3 mux                               |
| `tb_ks_csla`        | top at its defaults, ~200,000 vectors (see below)                       |

`tb_ks_csla` runs the top at its default parameters. It applies:

* directed cases: all ones, carry chains into every bit position, and the
  patterns 0xAAAA+0xCCCC and 0xEEEE+0xDDDD with both carry-in values
* random vectors, biased towards long propagate runs

It also counts how often each select group passes its adder word and its BEC
word, as well as carry-in, carry-out and a carry that travels from `cin`
through every group. A case that never occurs counts as a failure.

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl rtl/kscsla_pkg.sv tb/tb_ks_csla.sv --top-module tb_ks_csla
./obj_dir/Vtb_ks_csla
```

For another module, replace `tb_ks_csla` with its testbench name. The package
file must come first on the command line, because the top imports its types.
Lint with:

```
verilator --lint-only -Wall -Irtl rtl/kscsla_pkg.sv rtl/ks_csla.sv
```
