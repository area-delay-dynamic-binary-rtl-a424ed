# Novel ripple adder for quantum-dot cellular automata (QCA), in SystemVerilog

In quantum-dot cellular automata the only logic primitives are the
three-input majority gate (MG) and the inverter, and every majority gate on a
path costs one clock phase. The cost of an adder is therefore set by how many
majority gates the carry must pass through. A conventional ripple-carry adder
(RCA) puts two cascaded MGs per bit on the carry path. This adder keeps the
small, regular ripple structure but moves the carry across **two bit
positions per majority gate**. The worst-case path of an n-bit adder drops to
n/2 + 3 majority gates and one inverter.

This repository describes that adder at gate level (majority gates and
inverters), wraps it in a clocked unit whose latency in clock phases matches
the QCA layout, and tests both.

## The two-bit carry trick

For bit position i let `p_i = a_i | b_i` and `g_i = a_i & b_i`. In QCA both
are majority gates with one input tied: `M(a,b,1)` is OR and `M(a,b,0)` is AND.
Two positions ahead, the look-ahead carry is

    c(i+2) = g(i+1) + p(i+1) g(i) + p(i+1) p(i) c(i)

and it can be written as a single majority gate whose inputs, except the
carry, depend only on the operands:

    X_g    = M(a(i+1), b(i+1), g(i))        = g(i+1) + p(i+1) g(i)
    X_p    = M(a(i+1), b(i+1), p(i))        = g(i+1) + p(i+1) p(i)
    c(i+2) = M(X_g, X_p, c(i))

To check it, note that `M(X, Y, c) = XY + c(X + Y)`. Since `g(i)` implies
`p(i)`, `X_g X_p = X_g` and `X_g + X_p = X_p`. `X_g` and `X_p` settle while
the carry is still on its way, so an arriving carry crosses two positions in
one gate delay. The carry between the two positions is an ordinary MG,
`c(i+1) = M(p(i), g(i), c(i))`, and works alongside `c(i+2)`.

The least significant module has no carry-in (c0 = 0). It reduces to
`c1 = g0` and `c2 = M(a1, b1, g0)`, which is two cascaded gates and needs no
`p0`.

Each sum bit uses two more majority gates and inverters:

    s_i = M( ~c(i+1), M(a_i, b_i, ~c_i), c_i )

Together with the carry MG this is a full adder of three majority gates and
two inverters. Once `c(i+1)` is known, the sum adds only one inverter and two
gate delays, because `~c_i` is ready earlier. This arrangement of the sum
gates is this design's own choice. It meets the gate counts the adder is
specified with. Its correctness is checked exhaustively.

**Worst case.** A carry born at bit 0 passes two gates in the least
significant module. It then passes one gate in each of the (n-2)/2 further
modules, and finally two sum gates and an inverter. That makes n/2 + 3 MGs in
total: 19 at 32 bits, 67 at 128 bits.

## Clock phases and latency

A QCA circuit is clocked in four phases per clock cycle. A signal moves
forward by one clock zone per phase, and every cascaded MG adds one phase.
For an n-bit adder the count is:

| step | phases |
|---|---|
| operand acquisition | 1 |
| least significant module (g0, then c2) | 2 |
| one per further 2-bit module | (n-2)/2 |
| sum gates | 2 |
| **total** | **n/2 + 4** |

That gives 20 phases (5 cycles) at 32 bits and 36 phases (9 cycles) at 64
bits, the latencies the design is specified with. At the default width of
128 bits it gives 68 phases (17 cycles). The 128-bit figure follows from the
same count and was not measured on a layout.

The RTL models each clock zone as a register on `clk`, and one rising edge
is one QCA phase. The registers sit where the count above puts them:

```
edge 1         operands acquired                  (qca_adder_top)
edges 2-3      least significant module: c1, c2   (qca_carry_chain)
edge 3+k       module k (k = 1 .. N/2-1): c(2k+1), c(2k+2)
edge 4+k       sum gates of bits 2k, 2k+1         (qca_novel_adder)
edge 5+k       second sum phase; then held until edge N/2+4
edge N/2+4     all N sum bits and the carry-out leave together
```

Module k receives its operands through k+2 zones (counting acquisition), so they meet the
carry in the same phase. The finished sums of the low pairs wait in zones of
their own for the highest pair. In effect the adder is a pipeline of N/2+4
stages with roughly one majority gate per stage. Two simplifications:

- The least significant module evaluates both of its gates in its first
  phase and holds the result for the second.
- Each pair evaluates both sum gates in one phase and holds the result for
  the second.

Neither changes what comes out or when.

A register pipeline accepts a new operand pair on every phase. A QCA layout
accepts one per clock cycle. To reproduce the QCA rate, assert `in_valid`
every fourth phase.

`qca_carry_chain` and `qca_novel_adder` take a parameter `ZONED` (default 1).
With `ZONED = 0` every zone becomes a wire, which leaves the plain
combinational adder; `clk` is then unused.

## Modules

| module | what it is |
|---|---|
| `qca_pkg` | shared latency functions (`latency_phases(n) = n/2+4`, `latency_cycles`) and a reference majority function |
| `qca_maj` | three-input majority gate |
| `qca_inv` | inverter |
| `qca_2bit_module` | carries `c(i+1)`, `c(i+2)` of two positions from `c(i)` (six MGs) |
| `qca_2bit_module_lsb` | the same for positions 0 and 1 with no carry-in (two MGs) |
| `qca_carry_chain` | N/2 cascaded 2-bit modules with a zone after each; output `c[N:0]`, where `c[i]` is the carry into bit i |
| `qca_sum_block` | one sum bit from `a_i, b_i, c_i, c(i+1)` |
| `qca_novel_adder` | N-bit adder, `sum[N:0] = a + b`, carry-out on `sum[N]`; N/2+3 phases from operands to sum (0 with `ZONED = 0`) |
| `qca_phase_delay` | DEPTH clock zones (registers) of width W |
| `qca_adder_top` | clocked unit: acquisition zone, zoned adder, valid tracking |

The hierarchy is
`qca_adder_top → qca_phase_delay, qca_novel_adder → qca_carry_chain (→ qca_2bit_module_lsb, qca_2bit_module), qca_sum_block → qca_maj, qca_inv`.

### `qca_adder_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one rising edge per QCA clock phase |
| `rst_n` | in | 1 | synchronous, active low; clears the valid bits only |
| `in_valid` | in | 1 | acquire `a`, `b` at this edge |
| `a`, `b` | in | N | operands (unsigned; no carry-in) |
| `out_valid` | out | 1 | `sum` holds the result of a pair acquired N/2+4 edges earlier |
| `sum` | out | N+1 | `a + b`, carry-out on bit N |

Parameter: `N` (default 128, must be even and at least 2).

The edge that samples `in_valid` counts as phase 1. The result is on `sum`,
with `out_valid` high, after the edge of phase N/2+4. The data zones have no
reset. The valid bits mark which results are meaningful, and a reset discards
every pair in flight.

## Choices this design makes

These points are not fixed by the adder's specification:

- The arrangement of the sum gates, shown above.
- The valid/reset handshake, and modelling clock zones as registers (see
  *Clock phases and latency*).
- The default width of 128 bits. The adder is characterised at 8, 16, 32 and
  64 bits, and the 128-bit version is its largest configuration.
- The carry chain takes no carry-in. Subtraction or chaining of adders would
  need the general 2-bit module at position 0 too.
- `qca_maj` computes the majority as `x1 x2 + x0 (x1 + x2)`, which is the same
  function. The carry always enters on `x0`, so a simulator that flattens the
  chain keeps a linear-size expression. The gates themselves are unchanged.

Physical properties of the QCA layout are outside the RTL: cell counts,
area, wire crossovers and temperature robustness. The conventional ripple,
carry-flow and look-ahead adders that this adder is compared with are not
included either.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_qca_maj`, `tb_qca_inv` | exhaustive truth tables, AND/OR with a tied input |
| `tb_qca_2bit_module` | all 32 input combinations against integer addition |
| `tb_qca_2bit_module_lsb` | all 16 input combinations |
| `tb_qca_sum_block` | all 8 `a, b, c_i` with the matching `c(i+1)` |
| `tb_qca_carry_chain` | 128-bit, combinational and zoned: every carry (`(a+b) ^ a ^ b`), directed worst cases and random pairs (half with long propagate runs); zoned chain fed a pair per edge, carry pair k checked k+2 edges later |
| `tb_qca_novel_adder` | combinational 8-bit exhaustive (65536 pairs); zoned 128-bit fed a pair per edge, each sum checked 67 edges later |
| `tb_qca_phase_delay` | a 5-zone delay against a history queue; the 0-zone wire form |
| `tb_qca_adder_top` | full 128-bit unit, end to end (see below) |
| `tb_qca_adder_widths` | 8/16/32/64-bit units: results, and latencies of 8, 12, 20 and 36 phases |

`tb_qca_adder_top` runs the unit at its default parameters. It includes:

- single additions;
- a burst with a pair on every phase;
- a stream at the QCA rate of one pair per cycle;
- a reset while pairs are in flight.

A scoreboard checks every sum, carry-out and latency (68 phases). The
testbench counts the situations it covered: worst-case propagation from
bit 0 to the carry-out, carry-out set, carry-free additions, back-to-back
pairs, the one-per-cycle stream and the reset flush. It fails if any count
is zero.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/qca_pkg.sv tb/tb_qca_adder_top.sv --top-module tb_qca_adder_top -o sim
    ./obj_dir/sim

Each testbench builds in under a minute and runs in about a second.

## Changing the design

- **Width:** set `N` on `qca_adder_top` or `qca_novel_adder`. Use any even
  N ≥ 2. The latency follows as N/2+4 phases.
- **Carry-in:** replace `qca_2bit_module_lsb` in `qca_carry_chain` with a
  `qca_2bit_module` driven by the carry-in. Also feed that carry-in to the
  sum block of bit 0, which currently gets `c[0] = 0`.
- **Plain combinational adder:** instantiate `qca_novel_adder` with
  `ZONED = 0` and leave `clk` tied off.
