# 2x2 Vedic multiplier from majority gates, pipelined over QCA clock zones

This is a two-bit by two-bit multiplier. It uses the Urdhva Tiryagbhyam
("vertical and crosswise") method of Vedic arithmetic. It is built only from
three-input majority gates and inverters, which are the native logic elements
of Quantum-dot Cellular Automata (QCA). Its four stages are paced by a
four-phase clock with one clock zone per stage, the way QCA circuits are
clocked.

The RTL describes the logic and the zone-by-zone timing of such a circuit on
an ordinary clock. It is synthesizable. A parameter removes the clock zones
and leaves the plain combinational multiplier, for example to drive it from
switches and watch the product on LEDs on an FPGA board.

## Vertical and crosswise for two bits

For A = A1A0 and B = B1B0 the method forms all one-bit products at once:

| term | product | kind |
|------|---------|------|
| P0   | A0·B0   | vertical, low column |
| X1   | A1·B0   | crosswise |
| X2   | A0·B1   | crosswise |
| X3   | A1·B1   | vertical, high column |

It then adds the columns:

    P1 = X1 xor X2        C1 = X1 · X2
    P2 = C1 xor X3        P3 = C1 · X3

The product is P = {P3, P2, P1, P0}. Each column needs only a half adder: a
two-bit product never carries twice. C1 and P3 are 1 only for 3 x 3 = 9.

Reference rows that the design must reproduce:

| A x B   | P3 P2 P1 P0 |
|---------|-------------|
| 00 x 00 | 0000 |
| 01 x 01 | 0001 |
| 10 x 10 | 0100 |
| 11 x 11 | 1001 |

## Everything is a majority gate

The majority gate `M(a, b, c) = ab + bc + ca` (`qca_maj3`) outputs the value
held by at least two of its three inputs. Fixing one input to a constant
gives the two-input gates:

- `qca_and2`: AND(a, b) = M(a, b, 0)
- `qca_or2`: OR(a, b) = M(a, b, 1)

`qca_inv` is the inverter. In a QCA layout it is a geometric arrangement of
cells; as logic it is a plain complement.

**XOR is the subtle part.** `qca_xor2` uses three majority gates and two
inverters:

    a xor b = M( M(a, b', 0), M(a', b, 0), 1 )

The two inner gates, each with a 0 input, form the terms a·b' and a'·b. The
outer gate, with a 1 input, ORs them.

A form that often circulates puts the constants the other way round:
M(M(a', b, 1), M(a, b', 1), 0). That form computes (a'+b)(a+b'), which is
**XNOR**. With it, 01 x 01 would give P1 = 1, which is wrong. This design
keeps the same gate count and places the constants so that the result is XOR.
The testbench `tb_qca_xor2` tells the two apart.

Putting it together:

- `vedic_pp_gen` holds the four AND gates.
- `qca_half_adder` is an XOR plus a majority-gate AND. It is used twice: once
  for (X1, X2) giving (P1, C1), and once for (C1, X3) giving (P2, P3).

The whole datapath has 4 + 2 × (3 + 1) = 12 majority gates and 4 inverters.
Synthesis folds them into ordinary gates; the majority structure is kept in
the module hierarchy, where each gate instance can be seen.

## Four clock zones

In QCA, each region of cells ("clock zone") goes through four phases:

1. **switch**: the cells take on the value of their inputs.
2. **hold**: the cells keep it while the next zone reads it.
3. **release** and 4. **relax**: the cells are emptied.

Each zone runs one phase behind the zone before it, so a value moves forward
one zone per phase. `qca_clock_4phase` models this on a normal clock:

- One `clk` cycle is one phase.
- A 2-bit counter is the phase of zone 0, and zone k is in phase (counter − k) mod 4.
- `zone_latch[k]` is high during zone k's switch phase. Zone k's register
  loads on the edge that ends that phase and keeps its value for the next
  four cycles.

The multiplier puts one stage in each zone:

| zone | stage | register contents |
|------|-------|-------------------|
| 0 | partial product generation | P0, X1, X2, X3 |
| 1 | cross-product addition | P0, P1, C1, X3 |
| 2 | carry generation | P0, P1, P2, P3 |
| 3 | output cells | P |

### Timing (ZONED = 1, the default)

```
cycle (phase of zone 0)   S   H   R   X   S   H   R   X   S
in_sample                 1   0   0   0   1   0   0   0   1
zone 0 loads              ^               ^               ^
zone 1 loads                  ^               ^
zone 2 loads                      ^               ^
zone 3 loads (p changes)              ^               ^
```

- `a` and `b` are sampled on the edge that ends a cycle in which `in_sample`
  is high. At all other times the inputs are ignored.
- The product of that pair appears on `p` three edges later, after the edge
  where zone 3 loads. Counted from the sampling edge, that is four phases, or
  one full QCA clock period.
- `p` then holds for four cycles, until the next product replaces it.
- One pair is accepted every four cycles.
- `p_valid` is low after reset and rises once the first sampled pair reaches
  zone 3. After that it stays high.
- `rst_n` is asynchronous and active low. It clears every zone register and
  puts zone 0 in its switch phase.

### Without zones (ZONED = 0)

All zone registers become wires, so `p = a * b` within the same cycle. In this
form `p_valid` and `in_sample` are constantly high. The phase counter still
runs, so `zone_phase` keeps its meaning.

## Interface of `vedic_mult_2x2_qca`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | phase clock, one cycle per QCA phase |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `a` | in | 2 | A1 A0 |
| `b` | in | 2 | B1 B0 |
| `p` | out | 4 | P3 P2 P1 P0 |
| `p_valid` | out | 1 | `p` holds the product of a sampled pair |
| `in_sample` | out | 1 | `a` and `b` are taken on the coming edge |
| `zone_phase` | out | 4 × `qca_phase_e` | current phase of each zone |

| parameter | default | meaning |
|-----------|---------|---------|
| `ZONED` | 1 | 1: four clock zones; 0: combinational |

`qca_pkg` holds the shared definitions:

- the phase enum `qca_phase_e`
- the zone count `NUM_ZONES = 4`
- the stage structs `pp_t` (partial products) and `cross_t` (output of the cross-product zone)

## Where this design makes its own choices

The arithmetic and the gate-level construction (majority AND/OR, inverters,
three-gate XOR, two half adders) follow the published description of the
multiplier. That description says only that a four-phase clock drives the
circuit and that each stage is in a different clock zone. The following are
choices made here:

- There are four zones, one per stage, with the output cells as the fourth zone.
- The phases are named and ordered switch, hold, release, relax. This is the
  standard QCA convention.
- One phase is one cycle of an ordinary clock.
- A zone is modelled as a register that loads at the end of its switch phase.
  This models QCA timing; it does not claim that a QCA layout has flip-flops.
- The handshake signals `in_sample` and `p_valid` are added, as is the reset
  behaviour.
- The XOR constants are placed as explained above.
- The adder unit is built from the two half adders the equations call for.
  No carry-save or ripple-carry structure is built beyond them.

Not modelled:

- the physical QCA layout: cells, wires, crossings, polarisation levels
- energy dissipation, reported in the picowatt range for the QCA layout
- the FPGA board's switches and LEDs; `a`, `b` and `p` are where they attach

Larger multipliers (4×4, 8×8) are mentioned as future extensions and are not
part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values computed independently, by counting ones or
multiplying integers. Each testbench prints one line,
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_qca_maj3`, `tb_qca_inv`, `tb_qca_and2`, `tb_qca_or2`, `tb_qca_xor2` | exhaustive truth tables |
| `tb_qca_half_adder` | {carry, sum} = a + b for all four pairs |
| `tb_vedic_pp_gen` | all 16 pairs: each partial product, and their weighted sum equals a·b |
| `tb_qca_clock_4phase` | phase order of all four zones, the one-phase offset between zones, latch strobes, reset in mid-period |
| `tb_vedic_mult_2x2_qca` | end to end at default parameters (see below) |
| `tb_vedic_mult_2x2_comb` | `ZONED = 0`: all 16 pairs give `p = a·b` in the same cycle |

`tb_vedic_mult_2x2_qca` applies the following pairs:

- the four reference rows
- all 16 pairs
- random pairs

Between sampling edges it drives random values on `a` and `b`, which the
design must ignore. It checks that:

- each product appears exactly three edges after its sampling edge, and not
  one edge earlier
- `p_valid` stays low until the first product arrives
- a reset in mid-stream clears the pipeline
- every zone latched at least once
- the carries C1 and P3 were exercised

## Simulating

Run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/qca_pkg.sv \
          tb/tb_vedic_mult_2x2_qca.sv --top-module tb_vedic_mult_2x2_qca
./obj_dir/Vtb_vedic_mult_2x2_qca
```

Replace the testbench file and top-module name to run any other testbench.
`-y rtl` lets verilator find each module in `rtl/<name>.sv`. Each testbench
finishes in well under a second.

## Files

- `rtl/qca_pkg.sv`: phase enum, zone count, stage structs
- `rtl/qca_maj3.sv`, `rtl/qca_inv.sv`: the two primitives
- `rtl/qca_and2.sv`, `rtl/qca_or2.sv`, `rtl/qca_xor2.sv`: gates built from majority gates
- `rtl/qca_half_adder.sv`: XOR sum, majority carry
- `rtl/vedic_pp_gen.sv`: the four partial products
- `rtl/qca_clock_4phase.sv`: four-phase zone controller
- `rtl/vedic_mult_2x2_qca.sv`: the multiplier (top)
- `tb/tb_*.sv`: one testbench per module, plus the combinational variant
