# One enable for clock gating and run-time power gating

Clock gating stops the clock of a register whose inputs equal its stored value.
While that clock is stopped, every gate that is fed only by that register does
the same computation on the same inputs again and again. It does no useful
work, but it still leaks. This design uses the clock enable that the
clock-gating logic already produces as the sleep signal of a power switch
under that logic. The stopped register and the logic behind it go idle
together. Dynamic power is saved on the clock, and active leakage is saved in
the logic.

The RTL builds this scheme on a small example circuit. It has five flip-flops,
A to E. Flip-flop A runs on the free clock. Flip-flops B to E are clock gated.
The cone of gates a to g depends only on B to E, so it sits behind a footer
switch. Two holders keep its outputs valid for the always-on gates h and i.

```
            ff_d[0] ──► A ───────────────────────────────────────────┐
                        ▲ clk                                        ▼
 ff_d[4:1] ─┬─► B C D E ─► pg_cone (a..g) ─► footer ─► holder ─► i = A ^ g ─► out_i
            │     ▲ gclk     (power gated)   switch  ─► holder ─► h = b & PI ─► out_h
            │     │                            ▲ sleep     ▲ hold
            └─► XOR/OR ─► en ─► latch L ─┬─► AND ─► gclk    │
                            (bsc_enable) │  (clock_gate)    │
                                         └─► sleep = !en_latched ─┘
```

## Bus-specific clock gating (`bsc_enable`, `clock_gate`, `pbsc_register`)

A register only needs a clock edge when at least one bit would change. Each
gated flip-flop has an XOR that compares its D input with its Q output. An OR
of all these XORs gives the enable `en`. When `en` is 0, a clock edge would
only reload the values the flip-flops already hold, so the edge is dropped.
This is the classic XOR-based scheme, called bus-specific clock gating (BSC).

Gating every bit of a register is not always the best choice. A bit that
toggles often keeps the enable high, and its XOR then costs power for nothing.
The partial form (PBSC) gates only a chosen subset of bits. The others stay on
the free clock. `pbsc_register` takes the subset as the `GATED` bit mask. The
mask is fixed when the design is made, from the signal activity expected in
use. With every bit set, the module is plain BSC. The default, `N = 5` and
`GATED = 5'b11110`, is the example circuit: bit 0 is A, and bits 1 to 4 are
B to E.

The gated clock comes from a latch and an AND gate (`clock_gate`). The latch is
transparent while `clk` is low and holds while `clk` is high. So `en` must be
settled by the rising edge, and any change in the high phase cannot shorten or
split a clock pulse. The insides of this cell are this design's choice. The
circuit only calls for a latch "L" in front of the gate that makes the gated
clock.

A gated register always holds the same values as an ungated one: an edge is
dropped only when it would change nothing. The testbenches check this against a
plain register modelled in the testbench.

## Run-time power gating driven by the clock enable

The logic fed only by the gated flip-flops is found by tracing forward from
their outputs. In the example this is `pg_cone`, gates a to g. Gate i is not
part of it, because it also reads the ungated flip-flop A. Gate h is not part
of it either, because it reads the primary input PI.

The cone is connected to ground through a high-Vth footer transistor
(`footer_switch`). Its sleep input is `sleep = !en_latched`. Since `en_latched`
is the enable held by the latch, the cone sleeps exactly while its flip-flops
get no clock. The timing is the subtle part:

| clock phase | what happens |
|---|---|
| low, before the edge | Some input of B to E differs from its flip-flop, so `en` and `en_latched` go to 1 and `sleep` falls. After the wake-up delay, `vgnd_ok` rises and the holders open. The cone still computes the old value. |
| rising edge | B to E load their new values on `gclk`. |
| high | The latch holds, so `en_latched` stays 1. The cone evaluates the new values, and the open holders pass them on. |
| next low | If the inputs are now unchanged, `en` falls and `sleep` rises. The holders close on the new value, and the footer turns off. |

The cone therefore has half a clock period after the edge to settle before it
is switched off. The footer's wake-up time must fit into the low phase in
which the enable rises. With the default 10 ns clock used in the testbenches,
that is 5 ns each, against a wake-up time of 2 ns.

A holder (`holder`) is a transparent latch on each cone output that leaves the
power-gated region. The two such outputs are g, which feeds gate i, and b,
which feeds gate h. The holder is closed by `hold = sleep | !vgnd_ok`. It
closes as soon as sleep is requested, and it stays closed until the virtual
ground has been pulled down again. The always-on logic therefore never sees
the floating value. Only `sleep` drives the holders in the source circuit; the
`!vgnd_ok` term is this design's own.

Reset clears B to E asynchronously, without a gated clock edge. The cone must
then be powered so that the holders pick up the cleared state. For this reason
`sleep` is forced to 0 while `rst_n` is low. Keep `rst_n` low for longer than
the wake-up time. This rule, and the reset itself, are this design's
additions.

## The footer switch model

The footer is a transistor, so `footer_switch.sv` is a behavioural model that
cannot be synthesised. It has these ports:

- `sleep`: the gate of the footer.
- `cells_out`: the value the cone computes.
- `vgnd_ok`: 1 while the virtual ground is clamped.
- `domain_out`: the value the cone actually drives.

`vgnd_ok` rises `T_WAKE` (2 ns) after `sleep` falls, and falls `T_SLEEP` (1 ns)
after `sleep` rises. If `sleep` changes back before the delay runs out, the
pending change is cancelled. While `vgnd_ok` is 0, `domain_out` is
`FLOAT_VALUE`, all ones by default, which stands for a virtual ground that has
drifted up to VDD. All three numbers are this design's choices. For a real
process, replace the model with the power-switch cell and the isolation cells
of the library.

A stacked sleep transistor (two or more footers in series) would leak even
less. A header switch between VDD and a virtual VDD is another option. Neither
changes the logic, and neither is modelled beyond this single footer.

## The example cone and output gates

Only the names of the example's gates and their wiring are given, not their
functions. The functions below are this design's choices, except that i is an
XOR:

```
a = ~B        b = ~E
c = a & C     d = C & D     e = D & b
f = c | d | e               g = ~f
i = A ^ held(g)             h = held(b) & PI
```

To study another circuit, change `pg_cone` and the two output gates in
`cg_rtpg_top`. The mechanism stays the same.

## Files

| file | contents |
|---|---|
| `rtl/bsc_enable.sv` | XOR compare and OR reduction, parameter `N` |
| `rtl/clock_gate.sv` | latch and AND gated-clock cell |
| `rtl/pbsc_register.sv` | partially gated register, parameters `N`, `GATED` |
| `rtl/holder.sv` | output holder, parameter `W` |
| `rtl/pg_cone.sv` | power-gated gates a to g of the example |
| `rtl/footer_switch.sv` | behavioural footer and floating-output model |
| `rtl/cg_rtpg_top.sv` | the example circuit, and the top module |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top `cg_rtpg_top` has these ports:

- Inputs: `clk`, `rst_n` (active low, asynchronous), `ff_d[4:0]` (bit 0 is A),
  and `pi`.
- Outputs: `out_i` and `out_h`.
- Observation outputs: `en`, `gclk`, `sleep` and `vgnd_ok`.

All files use `timescale 1ns/1ps`.

## Verification

Each testbench compares the module against values it works out itself. It
prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

- `tb_bsc_enable` and `tb_pg_cone` run every input combination. The expected
  cone outputs come from a hand-written truth table.
- `tb_clock_gate` changes the enable at random points in both clock phases. It
  checks that gated pulses occur only when the enable was 1 at the end of the
  low phase, and that a change during the high phase never reaches `gclk`.
- `tb_pbsc_register` runs the default PBSC register and a fully gated 4-bit BSC
  register next to a plain register. It checks that every cycle gives the same
  values, and that there are exactly as many gated-clock pulses as cycles that
  bring new data.
- `tb_holder` and `tb_footer_switch` check the holding behaviour, and the
  wake-up and shut-off timing, including cancelled requests.
- `tb_cg_rtpg_top` runs the top with its defaults for 500 cycles of random
  data. The gated bits change in about one cycle in three. It checks the
  following:
  - `out_i` and `out_h` in both clock phases.
  - `gclk` against the cycles that bring new data.
  - That the cone is asleep in the high phase of every cycle without an
    update.
  - That the gating never loses an update.

  It counts gated cycles, updates, sleep entries, wake-ups, and samples where a
  holder masked a floating output. It fails if any of these never happen. It
  also sorts each cycle of each gated flip-flop into one of four operation
  classes: clock and data toggle, clock only, data only, or neither. This
  classification is the usual basis for estimating flip-flop power. A typical
  run gives about 344, 332, 0 and 1324.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_cg_rtpg_top \
    tb/tb_cg_rtpg_top.sv rtl/*.sv
./obj_dir/Vtb_cg_rtpg_top
```

## What is not here

- Choosing which flip-flops to gate is a design-time optimisation based on
  signal activity. Its result is the `GATED` mask, not a circuit.
- Deciding whether power gating pays off for a given cone is also a
  design-time question. It is an energy comparison against the average idle
  time, and it is not hardware either.
- The power and leakage savings of the scheme, and those of a stacked footer,
  are transistor-level measurements. This RTL cannot reproduce them. It only
  reproduces the logical behaviour: which clock edges are dropped, when the
  logic sleeps, and that its outputs stay valid.
