# Pulsed-latch shift register

A shift register normally uses one master-slave flip-flop per bit. A flip-flop
is really two latches. A *pulsed latch* is one latch written by a short clock
pulse, so it needs about half the transistors and half the clock load. The
catch is that a plain chain of pulsed latches sharing one pulse does not shift.
While the pulse is high, every latch is transparent at once, so a bit can run
through several stages in one pulse.

This design makes pulsed latches shift correctly by giving each latch its own
pulse and firing the pulses in reverse order: the last latch is written first
and the first latch last. Each latch therefore takes its neighbour's *old*
value, and its own input stays still while it is open. Reverse-ordered pulses
across all N bits would need N delayed clocks. To avoid that, the register is
cut into sections of K bits. Each section has one extra *temporary latch*, and
all sections share the same K+1 pulses. The default is N = 16 and K = 4: four
sections of five latches each, driven by five pulsed clocks.

## Structure

```
                 clk ──► delayed_pulsed_clock_gen ──► CLK_pulse<T>, CLK_pulse<K..1>
                                                       (shared by every section)
 in ─► [ section 0: Q1 Q2 Q3 Q4 | T ] ─► [ section 1: Q5 .. Q8 | T ] ─► ... ─► shift_out
```

| module | role |
|---|---|
| `ssaspl_latch` | storage cell: a static sense-amplifier latch with differential data in and out |
| `sub_shift_register` | one section: K data latches in series plus the temporary latch |
| `clock_pulse_circuit` | one stage of the pulse generator: one pulse per rising edge, plus a delayed copy of the clock for the next stage |
| `delayed_pulsed_clock_gen` | K+1 chained clock-pulse stages |
| `pulsed_latch_shift_register` | top level: N/K sections and one generator |

## How one shift works

Take section 1 (bits Q1..Q4 and temporary latch T1) and section 2 (Q5..Q8 and
T2). Each rising edge of `clk` produces five pulses, one after another:

1. `CLK_pulse<T>`: every temporary latch copies the last bit of its section
   (T1 ← Q4, T2 ← Q8, ...).
2. `CLK_pulse<4>`: Q4 ← Q3, Q8 ← Q7, ...
3. `CLK_pulse<3>`: Q3 ← Q2, ...
4. `CLK_pulse<2>`: Q2 ← Q1, ...
5. `CLK_pulse<1>`: Q1 ← `in`, Q5 ← T1, Q9 ← T2, ...

The sections cannot interfere. The first latch of a section reads the
temporary latch of the section before it, and that latch was written in step 1
and does not change again. Without the temporary latch, Q5 would read Q4 in
step 5, after Q4 had already taken its new value, and the bit would move two
places. After step 5 every bit has moved exactly one place. `shift_out` (the
last section's temporary latch) then holds the bit that left Q16.

Because each latch is written only after the latch it feeds, no latch input
changes while that latch is open. That is the whole timing argument. It holds
only if the pulses never overlap. An assertion in `delayed_pulsed_clock_gen`
checks this in simulation.

## The pulse generator

Each `clock_pulse_circuit` takes a clock and passes it through a delay element
and two inverters. The node between the inverters is the delayed clock,
inverted. An AND gate combines that node with the undelayed clock. The result
is a pulse that starts at the rising edge and lasts exactly one delay. A
falling edge produces no pulse. The output of the second inverter is the
delayed clock, which drives the next stage. So stage *j* produces its pulse
*j* delays after the edge:

| reference periods after the `clk` edge | pulse high |
|---|---|
| 0 .. DELAY-1 | `CLK_pulse<T>` |
| DELAY .. 2·DELAY-1 | `CLK_pulse<K>` |
| ... | ... |
| K·DELAY .. (K+1)·DELAY-1 | `CLK_pulse<1>` |

Each pulse comes from an AND of two copies of the clock, not from a long
inverter chain. Its width is therefore set by one delay element, not by the
rise and fall times of the whole chain, so the pulses can be very narrow.

### The delay element is synchronous here

In silicon the delay element is an analog inverter delay. This RTL has no
analog delays. Each delay element is instead a chain of `DELAY` flip-flops
clocked by a faster reference clock, `clk_fast`. As a result:

* The pulse width and the spacing between pulses are both `DELAY` periods of
  `clk_fast`. Each pulse falls in the same reference period in which the next
  one rises. The pulses touch but never overlap.
* `clk` must be synchronous to `clk_fast`: it must change just after a rising
  edge of `clk_fast`. It must stay high for at least `DELAY` periods and low
  for at least `DELAY` periods. Its period must be at least `(K+1)·DELAY`
  periods, or a new pulse sequence starts before the last one has finished.
* `rst_n` clears the delay flip-flops asynchronously. Without the clear, the
  generator could emit a spurious pulse at power-up. The latches themselves
  have no reset. They hold unknown values until N+1 bits have been shifted
  in.

The pulses are AND gates on `clk` itself, so they are gated clocks. Synthesis
and timing analysis must treat `clk_pulse_t` and `clk_pulse` as generated
clocks, and the latches as level-sensitive elements.

## The latch cell

`ssaspl_latch` models a 7-transistor cell. Two cross-coupled inverters hold Q
and Qb. Under them sit three NMOS transistors: one gated by the pulsed clock
(the only clocked transistor, so the clock load is tiny), one gated by D on
the Qb side, and one gated by Db on the Q side. During the pulse, D=1 pulls Qb
low, which sets Q to 1; Db=1 pulls Q low, which sets Q to 0. Each cell takes
both rails from the previous cell, so the whole chain is differential. Only
the serial input `in` is single-ended; it is split into a pair with an
inverter.

In RTL the cell is an `always_latch` that is transparent while the pulse is
high. If both rails are equal, which is not a legal input, the cell keeps its
value. Synthesis maps it to one D latch. The transistor-level trade-offs
(ratioed pull-down strength, 7 transistors against 16–22 for flip-flops) do
not appear in a logic model.

## Interface of the top level

| port | dir | width | meaning |
|---|---|---|---|
| `clk_fast` | in | 1 | reference clock for the delay elements |
| `rst_n` | in | 1 | asynchronous active-low clear of the pulse generator |
| `clk` | in | 1 | shift clock: one shift per rising edge |
| `in` | in | 1 | serial input; must be stable from K·DELAY to (K+1)·DELAY reference periods after the `clk` edge |
| `q` | out | N | contents; `q[0]` is the newest bit, `q[N-1]` the oldest |
| `shift_out` | out | 1 | the bit that left `q[N-1]` in the last shift |
| `clk_pulse_t`, `clk_pulse` | out | 1, K | the pulsed clocks, for observation (`clk_pulse[i]` = `CLK_pulse<i+1>`) |

Parameters: `N` (16), `K` (4), `DELAY` (1). `N` must be a multiple of `K`;
elaboration stops with an error otherwise. A shift is complete
`(K+1)·DELAY` reference periods after the `clk` edge. Up to then `q` shows the
intermediate states listed above. Sample `q` only after the last pulse, or at
any time while `clk` is idle.

## Choosing K

Larger sections need fewer temporary latches (N/K of them) but more pulsed
clocks and more pulse stages (K+1), and the shift takes longer ((K+1) delays).
K = 4 is the size used for the 16-bit register. The testbenches also run
K = 3 with N = 24.

## Where this RTL departs from the circuit it models

* The analog delay elements are flip-flop chains on `clk_fast`, as described
  above. This adds a second clock and a synchronous-timing requirement on
  `clk` that the analog circuit does not have.
* The clock buffers after each AND gate are plain wires.
* The latch is a behavioural logic model of a transistor cell. Area and power
  are not modelled. The 16-bit register's reported savings over a flip-flop
  register (52% area, 44% power) are properties of the transistor
  implementation and cannot be checked at this level.
* Adding the single-ended-to-differential input inverter, exposing the last
  section's temporary latch as `shift_out`, the parallel output `q`, and the
  reset of the generator are this design's own choices.
* The other flip-flop and latch cells that the cell was chosen over
  (transmission-gate, PowerPC-style, push-pull, hybrid-latch and similar) are
  not included. They were only compared against.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    tb/tb_pulsed_latch_shift_register.sv --top-module tb_pulsed_latch_shift_register
./obj_dir/Vtb_pulsed_latch_shift_register +verilator+rand+reset+2
```

Randomised reset values (`+verilator+rand+reset+2`) are recommended: they
show that nothing depends on a latch's power-up value.

| testbench | what it checks |
|---|---|
| `tb_ssaspl_latch` | transparency, hold, and illegal equal rails, against a reference bit |
| `tb_clock_pulse_circuit` | DELAY = 1 and 3: delayed clock and pulse in every period; one pulse of exactly DELAY periods per rising edge |
| `tb_delayed_pulsed_clock_gen` | K = 4/DELAY = 1 and K = 3/DELAY = 2: which pulse is high in every period after each edge, with random clock period and duty cycle |
| `tb_sub_shift_register` | the testbench drives the pulse sequence itself; the state is compared after every single pulse |
| `tb_pulsed_latch_shift_register` | default size, end to end (see below) |
| `tb_pulsed_latch_shift_register_k3` | the same checks at N = 24, K = 3, DELAY = 2 |

The end-to-end testbenches apply 400 random bits at random clock periods,
about 40% of them at the minimum period. They compare the register in every
reference period with a latch-by-latch model of the pulse schedule. After each
completed shift they compare it again with the history of applied bits. They
also count every pulsed clock, temporary-latch captures, hand-overs of 0 and
of 1 between sections, both values at `shift_out`, and shifts at the minimum
period. A run fails if any of these never happens.
