# Ling-Naffziger 8-bit adder in dual-rail domino style

This is an 8-bit carry-propagate adder built as a valency-4 parallel-prefix
tree on Ling's pseudo-carry, in the style of Naffziger's high-speed adder. It
was designed as a dual-rail domino circuit, so the RTL models that too. Every
internal signal is a pair of rails that are both low while the clock is low
(precharge). Exactly one rail of each pair rises while the clock is high
(evaluate). The adder completes one add per clock cycle. The circuit the
design targets was simulated at 333 MHz (a 3 ns cycle) in a 1.5 µm CMOS
process, using about four FO4 delays for a full add. The RTL is the logic of
that circuit. It does not model delays, transistor sizes or power.

## The main idea: adding with a pseudo-carry

A conventional prefix adder computes the carry out of each bit:

    c[i] = g[i] | t[i] & c[i-1],   g = a & b,  t = a | b

Ling's trick is to compute a *pseudo-carry* instead:

    H[i] = g[i] | c[i-1]           so that  c[i] = t[i] & H[i]

For a 4-bit group the pseudo-carry needs one product term less than the
group carry:

    c(3:0) = g3 | t3 g2 | t3 t2 g1 | t3 t2 t1 g0
    H(3:0) = g3 |    g2 |    t2 g1 |    t2 t1 g0

In domino logic, fewer and narrower terms make for a faster first level. The
missing `t[i]` is put back for free at the very end, in the sum:

    s[i] = d[i] ^ c[i-1] = H[i-1] ? (d[i] ^ t[i-1]) : d[i],   d = a ^ b

Groups combine recursively with a group transmit `I` shifted down one bit:

    H(hi:lo) = H(hi) | I(hi) & H(lo),   I(j+3:j) = t[j+2] t[j+1] t[j] t[j-1]

## Datapath

The adder is split into 4-bit sections. Each bit and section passes through
these logic levels:

| level | module            | per       | what it forms |
|-------|-------------------|-----------|---------------|
| 1     | `dr_encode`       | operand   | dual-rail operand bits, empty while `clk` is low |
| 2     | `gpk_cell`        | bit       | `g = a&b`, `t = a\|b` (false rail = kill `~a&~b`), `d = a^b` |
| 3     | `ling_hi4`        | section   | group `H` and `I`, valency 4, one gate level |
| 4     | `ling_hi_combine` | section>0 | `H`/`I` from bit 0 up to the top of the section |
| 5     | `pseudo_carry4`   | section   | pseudo-carries into bits 1..3, once for each value of the incoming `H` |
| 6     | `sum_select`      | bit       | picks the pseudo-carry with the incoming `H`, then forms Ling's sum |
| 7     | latch in `ling_adder` | —     | holds the result through precharge |

Levels 3 and 5 run side by side. Inside a section starting at bit `j`, the
pseudo-carry into bit `j+k` is `Hl[k] | Il[k] & Hin`, where `Hin = H(j-1:0)`
comes from below. `pseudo_carry4` does not wait for `Hin`. It produces
`h0 = Hl` (for `Hin = 0`) and `h1 = Hl | Il` (for `Hin = 1`):

    Hl[1] = g[j]                              Il[1] = t[j-1]
    Hl[2] = g[j+1] | g[j]                     Il[2] = t[j] t[j-1]
    Hl[3] = g[j+2] | g[j+1] | t[j+1] g[j]     Il[3] = t[j+1] t[j] t[j-1]

The late-arriving `Hin` only steers a multiplexer in `sum_select`. The same
`pseudo_carry4` cell serves bits 0..2 of the lower section and bits 4..6 of
the upper one. The pseudo-carry into a section's own lowest bit is `Hin`
itself.

In the 8-bit adder the lower section's `H(3:0)` goes straight to the upper
section's sum select gates. The single combine cell forms `H(7:0)`, and the
carry out is `t[7] & H(7:0)`. There is no carry-in. The lowest "bit below"
transmit `t[-1]` and the lowest section's `Hin` are dual-rail constant 0.

## Dual-rail domino, as modelled

`ling_pkg` defines the rail pair `dr_t` (`t` = value is 1, `f` = value is 0)
and the gate functions. No function inverts a rail. Inversion is a swap of
the rails, and every output rail is an AND/OR of input rails. A domino gate
can only rise, and that is what this models. It is also why an all-empty
input gives an all-empty output, so the whole core precharges through its
inputs.

`dr_encode` ANDs each operand rail with `clk`, so the inputs are low during
precharge. The domino gates in the design are unfooted (no clocked pull-down
transistor), and unfooted gates need exactly this. The constants (`DR_ZERO`,
`DR_ONE`) are used only where an empty neighbouring input still empties the
result.

## Timing

- `a` and `b` are registered at the rising edge of `clk`.
- While `clk` is high the core evaluates. The output latch is transparent, so
  `sum`/`cout` show the new result in that same high phase.
- While `clk` is low the core precharges, and the latch holds the result
  until the next rising edge.

One add per cycle, with the result valid from the high phase after the
operands are sampled. The output is a latch, not a flip-flop on the falling
edge, because precharge begins on that same edge. Synthesis therefore reports
9 latch bits (`sum` and `cout`), and they are intended. The concurrent
assertion `a_evaluated` checks, at each falling edge, that every output pair
has evaluated (exactly one rail high). `rst_n` is an asynchronous active-low
clear of the operand register and the latch.

## Parameters and wider adders

`ling_adder #(.WIDTH(8))`: the default of 8 is the design. `WIDTH` may be any
multiple of 4. Wider adders chain one `ling_hi_combine` per extra section, so
section `m` receives `H(4m-1:0)`. That chain gives the right logic, but its
depth grows linearly. Larger fast adders use a log-depth valency-4 tree over
the groups instead. The 16- and 32-bit sizes are only estimated for this
design (4.6 ns and 7.0 ns in the 1.5 µm process). They are tested here for
function only.

## Files

- `rtl/ling_pkg.sv`: rail type and gate functions
- `rtl/dr_encode.sv`, `rtl/gpk_cell.sv`, `rtl/ling_hi4.sv`,
  `rtl/ling_hi_combine.sv`, `rtl/pseudo_carry4.sv`, `rtl/sum_select.sv`: the
  cells
- `rtl/ling_adder.sv`: top level
- `tb/tb_<module>.sv`: one self-checking testbench per cell and for the
  package. Each cell's test is exhaustive over its valid dual-rail inputs,
  plus a precharge (empty-in, empty-out) check.
- `tb/tb_ling_adder.sv`: every one of the 65,536 operand pairs at the default
  width, one per cycle. It checks the sum and carry, when the result appears
  and is held, and that precharge empties all output rails. It also counts
  that each mechanism happens: precharge, carry out, an incoming section
  pseudo-carry, that pseudo-carry choosing between differing precomputed
  values, a carry through all 8 bits, and a pseudo-carry of 1 whose real
  carry is 0.
- `tb/tb_ling_adder_wide.sv`: 16- and 32-bit instances with directed and
  random operands.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_ling_adder \
        rtl/ling_pkg.sv tb/tb_ling_adder.sv
    ./obj_dir/Vtb_ling_adder

Replace `tb_ling_adder` with any other testbench name. The other modules are
found through `-Irtl`. The full 8-bit sweep runs in well under a second. Lint
the RTL with `verilator --lint-only -Wall -Irtl rtl/ling_pkg.sv rtl/ling_adder.sv`.
Two warnings remain and are expected. `DR_EMPTY` is used only by the
testbenches. The group transmit `I` of the topmost span has no consumer.

## How far to trust it, and where it departs

- The logic is checked exhaustively: every cell over all its inputs, and the
  8-bit adder over all operand pairs. The 16/32-bit configurations are
  checked on 20,000 random and directed pairs.
- Circuit-level properties are not modelled: the transistor count (640),
  delay (3 ns), power (200 mW at 5 V), footing and device widths. The domino
  behaviour is modelled only as logic: monotonic rails, precharge to empty,
  and a completion check.
- The following are choices of this RTL, not part of the circuit it follows:
  the register/latch placement, the reset, the absence of a carry-in, the
  carry-out output, where the half sum `d` is formed (in `gpk_cell`), and the
  serial combine chain for widths above 8.
- Exactly what each of the seven logic levels does is reconstructed from
  Ling's equations and Naffziger's structure. The split into modules above
  reflects that reconstruction.
- Low-voltage-swing (LVS) logic, mentioned for later adders, is a different
  analog circuit family and is not part of this design.
