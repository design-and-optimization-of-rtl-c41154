# Reversible-logic T flip-flop and 4-bit ripple up/down counter

A reversible gate has as many outputs as inputs, and its outputs determine its inputs uniquely.
No information is erased, so in principle no switching energy has to be lost as heat.
This design builds a sequential circuit entirely from two such gates, Feynman and Fredkin:

- a negative-edge-triggered T flip-flop, made of five gates;
- a 4-bit asynchronous (ripple) up/down counter, made of four of those flip-flops and three more Feynman gates.

The flip-flop has no conventional storage element. Each of its two latches is a Fredkin gate that
is used as a multiplexer and feeds its own output back to itself through a Feynman gate. The RTL
keeps that gate-level structure, so gate counts, garbage outputs and constant inputs can be read
directly off the code.

## The two gates

| gate | inputs | outputs | quantum cost |
|---|---|---|---|
| Feynman (`feynman_gate`) | A, B | P = A, Q = A xor B | 1 |
| Fredkin (`fredkin_gate`) | A, B, C | P = A, Q = A'B xor AC, R = AB xor A'C | 5 |

The Feynman gate has two uses. With B tied to 0 it copies A onto two wires. Reversible logic forbids
plain fan-out, so this is how one signal reaches two places. With B connected to a signal, its Q
output is the XOR of the two inputs.

The Fredkin gate swaps B and C when A is 1. Viewed from the Q output, it is a 2:1 multiplexer:
Q = C when A = 1 and Q = B when A = 0. R is the other input, and P passes A on, for use as a
clock further down the chain.

Both modules are purely combinational. A transistor-level realisation of each gate exists
(pass-transistor style; the Fredkin gate can be built with four transistors). The RTL models only the
logic function.

## The T flip-flop (`rev_tff`)

```
          clk ──► Fredkin M ──P (clk copy)──────────► Fredkin S ──P──► clk_out (garbage)
  d_next ───C──►  Q = clk ? C : B ─► Feynman(B=0)  ─P──B►  Q = clk ? C : B ─► Feynman(B=0) ─P─► Feynman(A, B=t)
      ▲   m_fb ─B─►                    │Q                  s_fb ─C─►             │Q                │P ──► q
      │          R ──► g1              └──► m_fb          R ──► g2               └──► s_fb         │Q
      └────────────────────────────────────────────────────────────────────────────────────────────┘
                                                                          d_next = q xor t
```

- **Master latch.** Fredkin M has A = clk, C = the new data `d_next` and B = its own value, fed back.
  While clk is 1, its Q follows `d_next`. While clk is 0, Q holds.
- **Slave latch.** Fredkin S has A = clk (taken from M's P output), B = the master's value and
  C = its own value, fed back. While clk is 0, its Q follows the master. While clk is 1, Q holds.
- **Toggle gate.** A Feynman gate with A = q and B = t outputs q on P and `q xor t` on Q.
  `q xor t` is the master's data.

The master is open while the clock is high, and the slave is open while it is low. So the output
takes the value `q xor t` at the falling edge of clk. With t = 1 it toggles; with t = 0 it holds. Only
the value of t at the falling edge matters.

The cell has:
- 5 gates (2 Fredkin, 3 Feynman);
- quantum cost 2·5 + 3·1 = 13;
- 2 constant inputs (the two 0s);
- 3 garbage outputs: `g1` and `g2` (the Fredkin R outputs) and `clk_out` (S's P output).

**Timing and simulation.** The latches are combinational loops, and zero-delay simulation handles
them correctly:
- At the falling edge, the master closes in the same time step as the slave opens. The master's
  held value is the data it was already passing.
- `d_next` changes only after q changes, and by then the master is closed.

Lint and synthesis tools report the loops, two per flip-flop, and find no flip-flop cells. This is
expected for this circuit. A synthesis flow would need to treat the loops as latches, or you would
replace them with `always_latch` storage if you do not need the gate-level form.

**No reset.** The circuit has no reset input. It powers up in whatever state its loops settle to.

## The ripple up/down counter (`rev_async_counter`, top)

```
 clk ─► TFF0 ─q─► FG ─P─► count[0]
                  │Q = count[0] xor up_down
                  └──► TFF1 ─q─► FG ─P─► count[1]
                                 └──► TFF2 ─q─► FG ─P─► count[2]
                                                └──► TFF3 ─q─► count[3]
 enable ─► t of every TFF
```

Each stage is a `rev_tff` with t = `enable`. Stage 0 is clocked by `clk`. Each following stage is
clocked by the Feynman gate's output `previous bit xor up_down`. The flip-flops act on falling edges,
so:

- **up_down = 0 (count up).** Stage i+1 toggles when bit i falls from 1 to 0. That is a carry, and
  the count goes up by one per falling edge of clk.
- **up_down = 1 (count down).** Stage i+1 sees the inverted bit, so it toggles when bit i rises from
  0 to 1. That is a borrow, and the count goes down by one.
- **enable = 0.** Every stage holds.

Both directions wrap modulo 2^WIDTH. `count[0]` is the stage driven by `clk`, the least significant
bit. The direction encoding is named in `rev_counter_pkg::count_dir_e` (`COUNT_UP` = 0, `COUNT_DOWN` = 1).

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 4 | number of stages (bits) |

Ports: `clk`, `enable`, `up_down` in; `count[WIDTH-1:0]` out; `garbage[WIDTH-1:0]` out. The
garbage outputs are each stage's clock copy. For stage 0 that is `clk` itself.

At the default width the counter has:
- 4·5 + 3 = 23 gates;
- quantum cost 4·13 + 3 = 55;
- 8 constant inputs;
- 12 garbage outputs. Four of them, the clock copies, are ports. The other eight are the flip-flops'
  internal `g1`/`g2`, left unconnected.

### Rules for driving it

- **Count timing.** The count changes on the falling edge of `clk`. In a real circuit the carry then
  ripples stage by stage, and the upper bits settle one gate-delay chain later. In this zero-delay
  model the ripple completes in the same time step.
- **When to change `enable`.** Each stage samples `enable` at its own clock edge, so change `enable`
  only while `clk` is high.
- **When to change `up_down`.** Changing `up_down` flips every inter-stage clock at once. With
  `enable` = 1, that is itself a falling edge for some stages, and the count jumps to a value that
  depends on its bits. With `enable` = 0, nothing toggles. **Switch direction only while `enable` is
  0**, and the count is kept. This hazard is a property of the ripple structure, not of the RTL.
- **No reset or load.** The starting value is whatever the flip-flops power up in.

## What is taken from the published design and what is chosen here

Taken from it:
- the gate equations;
- the gate types and counts of the flip-flop (2 Fredkin + 3 Feynman, 2 constant inputs, 3 garbage
  outputs) and its negative-edge behaviour;
- the counter's stage chain, with enable on every T input and an `output xor up/down` Feynman gate
  clocking the next stage;
- the 4-bit width.

Chosen here:
- **Fredkin pins.** Which pin of each Fredkin gate carries data and which carries feedback. It is
  chosen so that the master is open with the clock high and the slave with it low, which is what
  makes the flip-flop act on the falling edge.
- **Bit order.** The stage driven by `clk` is bit 0.
- **Direction encoding.** Low = up, high = down. This is what the structure does with the Feynman
  gate's B input on the direction line.
- **No reset.** None was added.

The original description of the counter also states 4 garbage outputs and 4 constant inputs. Its own
cost table gives 12 and 8. The costs listed above follow from the structure, and they agree with the
table.

Not included: a second T flip-flop built from two 4x4 Sayem gates and a Feynman gate, which served
only as the baseline for the cost and power comparison. The power figures (measured at transistor
level in a 180 nm process) cannot be reproduced from RTL.

## Files

| file | contents |
|---|---|
| `rtl/rev_counter_pkg.sv` | direction enum |
| `rtl/feynman_gate.sv` | Feynman gate |
| `rtl/fredkin_gate.sv` | Fredkin gate |
| `rtl/rev_tff.sv` | reversible T flip-flop |
| `rtl/rev_async_counter.sv` | the counter (top) |
| `tb/tb_feynman_gate.sv`, `tb/tb_fredkin_gate.sv` | exhaustive truth-table and reversibility checks |
| `tb/tb_rev_tff.sv` | 200 cycles of random t: toggles at falling edges, no change at rising edges or while the clock is low |
| `tb/tb_rev_async_counter.sv` | counter at default width: up and down counting through both wraps, hold, direction switches while held, random enable, garbage = stage clocks |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rev_async_counter \
  -Irtl -Itb rtl/rev_counter_pkg.sv rtl/feynman_gate.sv rtl/fredkin_gate.sv \
  rtl/rev_tff.sv rtl/rev_async_counter.sv tb/tb_rev_async_counter.sv
./obj_dir/Vtb_rev_async_counter
```

Verilator warns `UNOPTFLAT` for the latch loops in `rev_tff`. The warning is expected, and the
simulation converges. The flip-flop and counter have no reset, so the testbenches take the power-up
value as their reference and check every step relative to it.

The testbenches were run with Verilator's two-state random initialisation (`+verilator+rand+reset+2`,
seed 1).
