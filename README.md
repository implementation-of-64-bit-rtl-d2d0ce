# 64-bit square-root carry select adder with binary-to-excess-1 converters

A ripple carry adder is small, but it is slow because the carry has to pass through every bit
in turn. A carry select adder avoids that wait. It cuts the operands into groups and computes
each group's result twice, once for an incoming carry of 0 and once for 1, before that carry
arrives. When the carry does arrive, it only has to pick one of the two results through a
multiplexer. The price is area: the textbook version needs two ripple adders per group.

This adder replaces the second ripple adder of each group, the one for a carry of 1, with a
*binary to excess-1 converter* (BEC). A BEC is an incrementer. It takes the carry-in-0 result
and adds one, which is exactly the carry-in-1 result. It needs far fewer gates than a second
adder. The groups get wider towards the most significant end (a "square-root" partition), so
the work inside each group finishes at about the time its select carry arrives.

The design is purely combinational: `{cout, sum} = a + b + cin` on unsigned 64-bit operands. It
has no clock and no reset.

## Group partition

| group | bits    | width | built from                          | mux    |
|-------|---------|-------|-------------------------------------|--------|
| 0     | 1..0    | 2     | 2-bit ripple adder with `cin`       | none   |
| 1     | 3..2    | 2     | 2-bit RCA(c=0) + 3-bit BEC          | 6:3    |
| 2     | 6..4    | 3     | 3-bit RCA(c=0) + 4-bit BEC          | 8:4    |
| 3     | 10..7   | 4     | 4-bit RCA(c=0) + 5-bit BEC          | 10:5   |
| 4     | 15..11  | 5     | 5-bit RCA(c=0) + 6-bit BEC          | 12:6   |
| 5     | 21..16  | 6     |                                     | 14:7   |
| 6     | 28..22  | 7     |                                     | 16:8   |
| 7     | 36..29  | 8     |                                     | 18:9   |
| 8     | 45..37  | 9     |                                     | 20:10  |
| 9     | 55..46  | 10    |                                     | 22:11  |
| 10    | 63..56  | 8     | the 8 bits that are left            | 18:9   |

Group 0 is a plain ripple adder that takes the external carry in. Group 1 is also 2 bits wide.
Each group after that is one bit wider than the one below it, until there are too few bits left
for the next width. The remaining bits then form one last group. `csla_pkg` computes this
partition from `WIDTH` with three constant functions: `group_size`, `group_lsb` and
`num_groups`. The top module builds its groups from those functions, so the same rule gives
2,2,3,4,5 for a 16-bit adder, 2,2,3,4,5,6,7,3 for 32 bits and 2,2,3,…,15,7 for 128 bits.

Two parts of this are choices, not things the source fixes. The source sets the 2-bit first
group and multiplexer sizes that grow as (2n+2):(n+1) for an n-bit group, up to 11 outputs. The
rule for the leftover bits at the top is this design's own choice. A different partition only
changes the three functions in `csla_pkg`.

## Inside a group (`csla_group`)

For an N-bit group:

1. `rca_c0` adds the two N-bit slices with a carry in of 0. Its (N+1)-bit result
   `r0 = {carry, sum}` equals `a + b`. Bit 0 is a half adder, because that carry in is the
   constant 0. The other bits are full adders in a ripple chain.
2. `bec` with M = N+1 computes `r1 = r0 + 1`, which equals `a + b + 1`. This can never wrap:
   `a + b` is at most 2^(N+1) − 2. The BEC uses the equations
   `x[0] = ~b[0]` and `x[i] = b[i] ^ (b[0] & … & b[i-1])`. The AND terms come from a chain with
   one AND gate per bit.
3. `csla_mux` with W = N+1 is built from N+1 one-bit `mux2` cells that share one select. It
   passes `r0` when the carry from the group below is 0 and `r1` when it is 1. The top bit of
   the selected word is the group's carry out.

Steps 1 and 2 use only the group's own operand bits, so they run in parallel with the carry
chain below. The carry itself crosses each upper group through a single `mux2`, so the critical
path is roughly this:

    group 0 ripple  →  mux (group 1)  →  mux (group 2)  →  …  →  mux (last group)

The ripple adder and BEC of group g have to finish before the carry reaches group g. The
carry reaches group g after about g multiplexer delays. This is why the groups can grow by
about one bit per group. The one exception is the narrowest upper group, group 1: there the
carry from group 0 arrives before the group's RCA and BEC have finished, so group 1's output
waits on its own RCA and BEC. In every wider group the carry arrives after the RCA and BEC, so
the multiplexer sets the delay.

## Gate style

The leaf cells use AND, OR and inverter gates only. This is the unit-gate model in which
carry select adders are usually compared: each gate counts one unit of delay and one of area.

- `xor2_aoi`: `(a & ~b) | (~a & b)`
- `mux2`: `(d0 & ~s) | (d1 & s)`
- `half_adder`: AOI XOR for the sum, an AND for the carry
- `full_adder`: two AOI XORs for the sum, `(a & b) | (p & ci)` for the carry

A synthesis tool will restructure this logic anyway. The gate-level form makes the netlist
match the gate counts of the unit-gate model, and it has no other purpose. With yosys' coarse
synthesis, the 64-bit adder comes out at 674 AND, 306 OR and 370 NOT cells.

## Hierarchy

    sqrt_csla            (top, WIDTH = 64)
    ├── rca              group 0: N = 2, full adders
    │   └── full_adder ── xor2_aoi
    └── csla_group × 10  groups 1..10
        ├── rca_c0       half_adder + full_adders
        ├── bec          xor2_aoi + AND chain
        └── csla_mux     mux2 × (N+1)

`csla_pkg` holds the partition functions. Each module is in `rtl/<module>.sv`.

Ports of `sqrt_csla`:

| port   | dir | width | meaning                        |
|--------|-----|-------|--------------------------------|
| `a`    | in  | WIDTH | operand                        |
| `b`    | in  | WIDTH | operand                        |
| `cin`  | in  | 1     | carry in                       |
| `sum`  | out | WIDTH | low WIDTH bits of a + b + cin  |
| `cout` | out | 1     | carry out                      |

## Choices where the source leaves room

- **Group sizes**: chosen as described above. The largest multiplexer is read as 22:11, a
  10-bit group.
- **BEC gate equations**: the usual BEC-1 form given above.
- **XOR, multiplexer and full adder gate structures**: the common AOI forms given above.
- **Half adder in bit 0 of each carry-in-0 adder**: used because that carry in is the constant 0.
- **Interface**: unsigned operands, the carry out as a separate port, no registers. The design
  has no clock.
- **Scope**: only the proposed adder is here. The regular carry select adder, which uses two
  ripple adders per group, is the baseline it is measured against, and it is not included.
- **No figures claimed**: this RTL makes no claim about FPGA area, power or delay figures for
  the adder.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_sqrt_csla` runs the 64-bit adder at its default parameters. It applies corner operands
  (zero, all ones, alternating bits, a carry injected at every group boundary, walking ones)
  and 200,000 random operand pairs of varying bit density. It compares each result with a
  65-bit addition. From the operands alone it works out which result each group's multiplexer
  must pick, and it checks that every group picked both the ripple-adder result and the BEC
  result. It also checks that carry-out overflow and a carry rippling from bit 0 to `cout` both
  occur.
- `tb_sqrt_csla_widths` builds the adder at 16, 32 and 128 bits through `csla_width_check`
  and checks 20,000 vectors at each width.
- The leaf testbenches are exhaustive. `tb_csla_group` covers 2-, 5- and 8-bit groups for
  every input. `tb_bec` covers M = 2, 3, 6 and 12. `tb_rca_c0` covers N = 1, 5 and 10.

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv tb/tb_sqrt_csla.sv \
              --top-module tb_sqrt_csla -o sim
    ./obj_dir/sim

To run another testbench, replace the testbench file and the top module name. Each testbench
finishes in well under a second.

To change the width, override `WIDTH` on `sqrt_csla`. Any value of 2 or more works. To change
the partition, edit `group_size` in `csla_pkg`; the rest of the design follows from it.
