# Self-managing power management unit

A power management unit (PMU) produces the control signals for power switches,
isolation cells and supply-level selection in other parts of a chip. In a large
system the PMU's own state machines leak a lot, even though power states change
only rarely, perhaps once in billions of cycles. This design is a PMU state
machine that manages its own power. Between state changes its next-state logic
is powered down and its state clock is stopped. Only the state flip-flops, a
comparator and a clock-gating latch stay powered.

The design has three parts:

1. **The state is the control word.** The flip-flops hold the power domain's
   control signals `{SW[1:0], ISO}` directly, and no output logic follows them.
   They keep driving the domain with nothing else powered.
2. **A comparator decides when to sleep.** No extra state machine controls
   power-down. When the requested state equals the current state, nothing has
   to change:
   - the transition logic is switched off;
   - the state clock is gated off.
3. **No isolation is needed between the sleeping logic and the flip-flops.**
   A flip-flop samples its data input only on a clock edge, and no edge arrives
   while the logic is off. So the floating outputs of the unpowered logic never
   reach the state.

## The managed power domain and its states

The PMU controls one power domain. The domain has four long-term states that
can be requested, and any of them may follow any other. There is also one
internal state, Isolation. Every path into or out of Off passes through it, so
the domain's inputs and outputs are isolated before its supply is cut and stay
isolated until it is powered again. Isolation cannot be requested.

| State        | Code `{SW,ISO}` | SW | ISO | Requestable |
|--------------|-----------------|----|-----|-------------|
| Off          | `111`           | 11 | 1   | yes         |
| Isolation    | `101`           | 10 | 1   | no          |
| Low voltage  | `100`           | 10 | 0   | yes         |
| Normal       | `010`           | 01 | 0   | yes         |
| High voltage | `000`           | 00 | 0   | yes         |

The next-state function (`pmu_transition_logic`):

| Current \ request | Off (111) | Low (100) | Normal (010) | High (000) |
|-------------------|-----------|-----------|--------------|------------|
| Off               | Off       | Isolation | Isolation    | Isolation  |
| Isolation         | Off       | Low       | Normal       | High       |
| Low / Normal / High | Isolation | Low     | Normal       | High       |

Moves between the three active states take one step. Entering or leaving Off
takes two steps, through Isolation. The other four request codes (`101`, `001`,
`011`, `110`) are not defined by the state table. In this design they hold the
state. The top has an assertion that flags them.

## Sleep, wake-up and the gated clock

`pmu_sleep_handler` compares `state` with `req_state`. The comparator output
passes through a latch that is transparent while `clk` is low:

- the inverted latch output is `sleep`, which drives the power switches of the
  transition logic;
- the same latched enable, ANDed with `clk`, is the state clock `gclk`
  (`pmu_clock_gate`).

Because the latch is closed while `clk` is high, a change of the enable during
the high phase cannot cut a clock pulse short or create a new one.

With the default parameters, a request that changes just after a rising edge
works like this:

```
clk        _|‾|_|‾|_|‾|_|‾|_
req_state  ==X Low==========        (state was High)
sleep      ‾‾‾‾\___/‾‾‾‾‾‾‾        falls in the low phase, rises once state = req
gclk       _______|‾|______        one pulse: High -> Low
```

A direct transition completes on the first rising edge after the request. A
transition into or out of Off completes on the second: `sleep` stays low for
both steps, and `gclk` pulses twice. A request that changes during a transition
is taken into account at the next edge. For example, a request that moves away
from Off while the PMU is in Isolation on its way to Off sends the PMU straight
to the new state.

### Wake-up wait (`WAKE_CYCLES`, `RAMP_NS`)

A real power switch needs time to bring up the supply of the logic it feeds.
The design therefore allows a wake-up wait of a few clock cycles before the
first state edge.

- `WAKE_CYCLES` (default 0) makes the sleep handler add a small counter. The
  counter is cleared while the logic sleeps, and it holds the clock-gate
  enable low for `WAKE_CYCLES` cycles after `sleep` falls. Every transition
  then takes `WAKE_CYCLES` cycles longer. The second step through Isolation
  does not wait again, because the logic stayed powered.
- `RAMP_NS` (default 0) is the power-up time of the behavioural power-switch
  model.

The design is correct when `WAKE_CYCLES` clock periods cover the ramp. Measure
the ramp from the clock's falling edge, where `sleep` falls, to the rising edge
that clocks the state. The assertion `a_clock_only_when_powered` in the top
fires when a state edge arrives while the supply is still down.

With `WAKE_CYCLES = 0`, the counter and the extra latch reduce to the same
latch as the clock gate. This is the plain latch-plus-AND-gate arrangement.

## Modules

| Module | Kind | Role |
|--------|------|------|
| `pmu_pkg` | package | `pstate_e` state encoding, `pctrl_t` control struct, `is_request()` |
| `pmu_self_managing` | top | wires the parts below; assertions |
| `pmu_transition_logic` | combinational | next-state function; the power-gated part |
| `pmu_state_register` | 3 flip-flops on `gclk`, async reset to Off | holds the state, which is the control word |
| `pmu_sleep_handler` | comparator, sleep latch, optional wake counter | makes `sleep` and `gclk` |
| `pmu_clock_gate` | latch + AND | glitch-free clock gate |
| `pmu_power_switch` | behavioural model | supply of the transition logic; outputs float while it is off |

Top-level ports of `pmu_self_managing`:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | asynchronous, active low; state goes to Off |
| `req_state` | in | 3 (`pstate_e`) | requested state: Off, Low, Normal or High |
| `state` | out | 3 (`pstate_e`) | current state = `{sw, iso}` |
| `sw` | out | 2 | supply / power-switch control of the managed domain |
| `iso` | out | 1 | isolation enable of the managed domain |
| `sleep` | out | 1 | 1 while the transition logic is off and the state clock is stopped |

The managed domain's power switches, supply-level selection and isolation cells
are outside this design. So are any monitors that decide which power state to
request. The PMU's interface to them is `sw`/`iso` and `req_state`.

## The power-switch model

In the transition logic, every gate has its own built-in power switch
(fine-grained gating). A single switch for the whole block would also work
(coarse-grained gating). A power switch is a transistor, not a logic function,
so `pmu_power_switch` is a behavioural model and is not meant for synthesis:

- while the supply is down, it replaces the logic's outputs with a new random
  value on every change, to show that the nets are floating;
- it drops the supply as soon as `sleep` rises;
- it raises the supply `RAMP_NS` after `sleep` falls. A ramp that `sleep`
  interrupts is abandoned.

For an implementation, replace it with real switch cells (or power intent that
describes them) driven by `sleep`. The other modules are synthesizable. The
random values are how the testbenches show that the state never picks up what
the sleeping logic drives.

## Where this design makes its own choices

- **Reset.** An asynchronous reset to Off, in which every control is at its
  safe value. Reset behaviour is not specified by the state tables.
- **Undefined request codes** hold the state and trip an assertion.
- **Next-state logic** is written as a `case` statement, not as a fixed gate
  netlist. Gate mapping is left to synthesis.
- **Wake-up wait and switch ramp** are parameters that default to zero, the
  instantaneous case.
- **Lint.** The latches in `pmu_clock_gate` and `pmu_sleep_handler` are
  intended, and lint tools report them. With `WAKE_CYCLES = 0`, the sleep
  handler's `rst_n` is unused. Lint also notes that the top's assertions
  sample `rst_n` synchronously while the register uses it asynchronously.
- **One domain only.** A PMU for several domains would have one such state
  machine per domain, but that is not designed here.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
one has a watchdog that counts a failure and stops the run if it hangs. Run from
the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_pmu_self_managing -y rtl -y tb +libext+.sv \
  rtl/pmu_pkg.sv tb/tb_pmu_self_managing.sv
./obj_dir/Vtb_pmu_self_managing
```

Replace the testbench name to run another one. Each testbench compares against
values worked out independently of the RTL:

| Testbench | Checks |
|-----------|--------|
| `tb_pmu_transition_logic` | all 64 (state, request) code pairs against the state table written out row by row |
| `tb_pmu_state_register` | reset, loading on `gclk` edges only, holding while the input changes without an edge, the control struct |
| `tb_pmu_clock_gate` | enable changed in both clock phases: a pulse follows exactly when the enable was high in the low phase; `gclk` rises only with `clk` |
| `tb_pmu_sleep_handler` | `sleep` and `gclk` per cycle against a cycle model, for `WAKE_CYCLES` 0 and 3 |
| `tb_pmu_power_switch` | pass-through when powered; floating when off; ramp timing and aborted ramps |
| `tb_pmu_self_managing` | default parameters, end to end (details below) |
| `tb_pmu_self_managing_wake` | the same run with a 25 ns ramp and `WAKE_CYCLES = 3` at a 10 ns clock |

`tb_pmu_self_managing` checks the state, the controls and `sleep` every cycle
against a reference model. It also checks the latency of every transition:

- 1 cycle for a direct transition;
- 2 cycles through Isolation;
- `WAKE_CYCLES` more in the wake variant.

The run has these phases:

- It makes all twelve transitions between the four long-term states, each
  followed by an idle period.
- It changes the request while the PMU is in Isolation.
- It runs about 3000 random requests, some of which change every cycle.
- It resets the PMU during operation.

It counts each mechanism: idle periods, wake-ups, direct and via-Isolation
transitions, redirected requests, cycles in which the sleeping logic floated
while the state held, and the reset. A mechanism that never happened counts as
a failure.
