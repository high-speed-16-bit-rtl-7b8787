# 16-bit carry bypass adder with carry look-ahead groups

A carry bypass (carry-skip) adder cuts the operands into groups and gives each
group a multiplexer that lets the incoming carry jump over the group when every
bit of the group would only pass a carry on. In the classic form each group adds
its bits with a ripple-carry chain, so the slowest path is still the ripple
through the first and last groups. This design keeps the bypass structure but
replaces the ripple chain inside every group by a carry look-ahead unit. Carries
inside a group, and the carry that a group produces itself, then appear after a
fixed two-level logic delay instead of a bit-by-bit ripple, while carries that
only pass through a group still take the single-multiplexer bypass.

The adder is 16 bits wide, unsigned, with a carry-in and a carry-out, and is
built from four groups of four bits (bits 0-3, 4-7, 8-11, 12-15). It is purely
combinational: no clock, no reset, no registers.

## Structure

```
 a[3:0]  b[3:0]        a[7:4]  b[7:4]       ...        a[15:12] b[15:12]
    |      |              |      |                        |      |
 +--v------v--+        +--v------v--+                  +--v------v--+
 |   setup    |        |   setup    |                  |   setup    |
 | p, g, P    |        | p, g, P    |                  | p, g, P    |
 +------------+        +------------+                  +------------+
 | look-ahead |        | look-ahead |                  | look-ahead |
 |  carries   |        |  carries   |                  |  carries   |
 +------------+        +------------+                  +------------+
 |    sum     |        |    sum     |                  |    sum     |
 +------------+        +------------+                  +------------+
cin -> [mux: P ? cin : c4] -> [mux] -> ... -> [mux] -> cout
```

Each group is one `cba_stage`, which holds four parts:

| module           | does                                                                 |
|------------------|----------------------------------------------------------------------|
| `cba_setup`      | per bit `p = a ^ b` (propagate), `g = a & b` (generate); group propagate `P = &p` |
| `cba_cla`        | every carry of the group as a flat sum of products of `p`, `g` and the group carry-in |
| `cba_sum`        | `sum = p ^ c`                                                        |
| `cba_bypass_mux` | group carry-out = `P ? cin : c[4]`                                   |

`cba16` chains four stages, carry-out of group k into carry-in of group k+1.
Group width and adder width come from `cba_pkg` and are parameters (`M`,
`WIDTH`) of the modules; `WIDTH` must be a multiple of `M`.

## The look-ahead equations

For a group with carry-in `c0` the look-ahead unit forms, without any ripple,

```
c1 = g0 | p0 c0
c2 = g1 | p1 g0 | p1 p0 c0
c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
c4 = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 | p3 p2 p1 p0 c0
```

`cba_cla` generates these terms with loops for any `M`. When `P = p3 p2 p1 p0`
is 1 all `g` are 0 and `c4` equals `c0` anyway: the bypass multiplexer does not
change the result, it only shortens the path. A carry entering group 1 from
group 0 therefore reaches `cout` through at most three multiplexers when the
upper groups all propagate, and through the look-ahead of the first group that
does not propagate otherwise.

## Where this RTL comes from and what it adds

Taken from the published design: the 16-bit width, four-bit groups, the
setup / look-ahead / sum / multiplexer column per group, and the chaining of the
groups through the multiplexers. The 4-bit unit keeps the published port names
`a`, `b`, `cin`, `sum`, `cout`.

Choices of this implementation, where the source gives no detail:

- the propagate and generate definitions, the sum equation and the multiplexer
  select polarity are the standard carry-skip ones;
- the group propagate `P` is formed in the setup block;
- the flat sum-of-products look-ahead form; a gate-level netlist of the
  original 4-bit unit exists but was not reproduced, only its function;
- operands are unsigned; there is no signed-overflow flag;
- `grp_p` (one bypass select per group) is brought out on `cba_stage` and
  `cba16` for observation; it may be left unconnected.

The source's figures of merit (1.306 ns delay and 17.5 uW in a 180 nm process,
against 1.408 ns and 15.4 uW for the classic ripple-based bypass adder) belong
to its transistor-level implementation and cannot be reproduced or checked at
RTL. A synthesis tool will in any case restructure the logic; to keep the bypass
path as a real multiplexer in a netlist, the usual false-path or
keep/dont-touch constraints on `cba_bypass_mux` are needed.

## Files

- `rtl/cba_pkg.sv` – default sizes (16-bit adder, 4-bit groups)
- `rtl/cba_setup.sv`, `rtl/cba_cla.sv`, `rtl/cba_sum.sv`, `rtl/cba_bypass_mux.sv` – the parts of a group
- `rtl/cba_stage.sv` – one group
- `rtl/cba16.sv` – top level
- `tb/tb_<module>.sv` – one self-checking testbench per module

## Verification

Every testbench compares the design against values computed independently in
the testbench and ends with a line `TB_RESULT checks=N failures=M`.

- The four part testbenches and `tb_cba_stage` are exhaustive for 4-bit groups
  (up to 512 cases). The look-ahead unit is compared with a bit-by-bit ripple
  reference; the stage with the integer sum `a + b + cin`.
- `tb_cba16` runs the top at its default parameters: directed corners, 20,000
  nearly complementary operand pairs (so that several groups bypass at once) and
  20,000 random pairs, 80,000 checks in all. It counts, and fails if any never
  happens: a carry skipped across each group, a carry generated in group 0 and
  skipped through all upper groups to `cout`, a group carry-out produced by a
  look-ahead unit, and an overflow.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/cba_pkg.sv tb/tb_cba16.sv --top-module tb_cba16
./obj_dir/Vtb_cba16
```
