# A DEVS simulator whose model lives in partially reconfigurable FPGA areas

This RTL runs a discrete-event (DEVS) simulation in hardware, and the model can
change its own structure while it runs. Each atomic component of the model is
a small state machine that sits in a reconfigurable area of an FPGA. When the
model adds or removes a component, the platform loads a partial bitstream into
an area. When it changes a connection, the platform rewrites one register in
the receiving component. The formalism behind it is PRDEVS, a DEVS extension
for models whose structure changes during simulation. The hardware follows the
published PRDEVS FPGA platform. Where that description stops, the choices are
this design's own, and they are listed below.

The model is flat: there are no coupled components below the top level. Every
component is an atomic model in exactly one area, and every area holds zero or
one component.

The repository contains the platform plus the example model it was shown
with:

- **generator1** emits a coin every 2 time units.
- **generator2** emits a coin every 3 time units.
- **counter** counts coins. At 10 coins it replaces generator1 with generator2.
  At 20 coins it swaps back.

## Block structure

```
                 +--------------------- coordinator ----------------------+
                 |  static_coordinator            dynamic_coordinator     |
                 |  (cycle scheduling)   <---->   (SC calls, tables)      |---- prc_trigger / prc_bitstream_id
                 +---------+-------------------------------+--------------+<--- prc_done   (vendor PR controller,
                           | control bus                   | SC bus                          outside this RTL)
      =====================+===============================+========== multi-bus
           |                 |                 |                 comm_bus (broadcast, one message per clock)
   +-------+--------+ +------+---------+
   | reconfigurable | | reconfigurable |  ... N_AREAS areas
   | area 1         | | area 2         |
   |  decoupler     | |  decoupler     |  <- area_config: what the PR controller loaded
   |  component     | |  component     |
   |  + comm blocks | |  + comm blocks |
   +----------------+ +----------------+
```

| Module | Role |
|---|---|
| `prdevs_top` | Static platform: coordinator, communication bus and `N_AREAS` areas, wired as the multi-bus |
| `coordinator` | Wrapper around the static and dynamic coordinators |
| `static_coordinator` | Starts each simulation cycle and collects every component's next event time |
| `dynamic_coordinator` | Runs addComponent, removeComponent, addConnection and removeConnection. Holds the bitstream and occupation tables |
| `comm_bus` | Round-robin arbiter and broadcast of one message per clock |
| `reconfigurable_area` | One area: the loaded component behind a decoupler |
| `decoupler` | Forces an area's outputs to zero while the area is reconfigured |
| `generator_component` | Atomic generator with parameter `PERIOD` (2 or 3) |
| `counter_component` | Atomic counter. It makes the structure-change calls |
| `comm_input_block` | Per input port: connection register, sender filter and one-message buffer |
| `comm_output_block` | Per component: output port multiplexer and bus request |
| `rr_arbiter` | Round-robin arbiter shared by the three buses |
| `prdevs_pkg` | Widths, enums and the bus structs |

## The simulation cycle (control bus)

DEVS time moves from one event to the next. This is the hardest part of the
design to follow, so here is one cycle in order:

1. The static coordinator raises `step` for one clock. Together with it, it
   drives `tn_min`, the time of this cycle. `tn_min` stays on the bus until
   the next step.
2. Each component compares its own next event time `tn_i` with `tn_min`.
   - If they are equal, the component is *imminent*: it emits its outputs or
     makes its structure-change call, then takes its internal transition.
   - A component with an external transition checks its input buffer whatever
     its time.
3. The component then holds `stepped` high, with its new `tn` and `tn_valid`,
   until it sees `ack_stepped`. `tn_valid = 0` means the next event time is
   infinite.
4. Reports from different areas can arrive in the same clock. A round-robin
   arbiter accepts one per clock and acknowledges it in that clock. The value
   goes into a table with one entry per area.
5. The cycle ends when the number of occupied areas that have reported equals
   the number of components. The coordinator then reads the table, one entry
   per clock, and takes the smallest valid `tn`. That value starts the next
   cycle.
6. If no entry is valid, every component is passive and `halted` rises. `run`
   low holds the scheduler between cycles.

Timing at the default size (two areas):

- A non-imminent component reports 2 clocks after `step`.
- A generator that emits, with the bus free, reports 3 clocks after `step`.
- From the last `ack_stepped` to the next `step` takes `N_AREAS + 3` clocks:
  the acknowledge, the completion check, one clock per table entry and the
  decision.

Components with time advance 0 need several cycles at the same simulation
time. The counter does this in its swap phases. Each such cycle costs the same
handshake.

## Messages arrive one cycle late

A message is broadcast on the communication bus with the full identifier of
its sender: component id and port id. The input communication block of each
input port keeps the identifier of the output port it is connected to. It
stores a message only when the sender matches.

The receiver reads its buffer when its branch runs in the next step, never in
the same one. The receiver may already have reported `stepped` when the
message arrives. The message therefore waits in the buffer and is handled in
the following simulation cycle.

This differs from textbook DEVS. Take a coin sent at time `t` to a counter
with infinite `tn`. The counter counts it at the next event time of the whole
model, not at `t`. The example trace below shows this.

The input buffer holds one message. `input_read` clears it. A message that
arrives while the buffer is still full replaces the older one and pulses
`overrun`. That rule is this design's choice. The example never overruns.

## Structure changes (SC bus)

A component requests a structure change by holding `sc_req` until it sees
`sc_done`. The request carries `sc`, `sc_type`, `comp_type`, `compo_id_1`,
`port_id_1`, `compo_id_2` and `port_id_2`. While the call runs, the
component's simulation step stays open. The coordinator cannot start another
cycle before the change is complete.

### Connections

addConnection and removeConnection are not checked against any table. The
dynamic coordinator broadcasts `update_connection`, `out_id` and `in_id` for
one clock. For a removal, `out_id` is 0. The input block whose own full id
equals `in_id` overwrites its connection register. Both calls return
`compo_id_2`.

### Components

addComponent and removeComponent use two tables in the dynamic coordinator.

The **bitstream table** gives a bitstream for each pair of area and component
type:

| area | generator1 | generator2 | counter | blank |
|---|---|---|---|---|
| 1 | 12 | 21 | 34 | 01 |
| 2 | 13 | 22 | 31 | 02 |
| n > 2 | 64 + 4(n-1) + 1 | 64 + 4(n-1) + 2 | 64 + 4(n-1) + 3 | 64 + 4(n-1) |

The rows for areas 1 and 2 are fixed numbers of the original platform. The
formula for further areas is this design's choice.

The **occupation table** records, for each area, whether it is occupied, the
type of its component and the component's id.

**addComponent(type)**:

- It picks the lowest-numbered free area.
- It decouples the area, holds it in reset and sends the bitstream to the
  partial reconfiguration (PR) controller with `prc_trigger`.
- On `prc_done` it releases the area, records the next free id (3, 4, …) in
  the occupation table and returns that id.
- If no area is free, it returns 0.

**removeComponent(id)**:

- It looks the id up in the occupation table.
- It loads the blank bitstream of that area the same way.
- It clears the table entry and returns the id.
- If the id is unknown, it returns 0.

The vendor's PR controller is not part of this RTL. `prdevs_top` brings out its
handshake: `prc_trigger`, `prc_bitstream_id` and `prc_done`. It also takes
`area_config` as an input: the component type the controller has actually
loaded into each area. On hardware, that input is the state of the fabric. In
simulation, a model of the controller drives it (`tb/prc_model.sv`).

### Components created in mid-cycle

A component that comes out of reset does not wait for a step. It takes the
`tn_min` on the bus as its creation time, computes `tn = tn_min + ta(s0)` and
reports it at once.

The dynamic coordinator pulses `area_loaded` for the new area. That clears the
area's entry in the static coordinator's table, so the current cycle cannot
close before the new component has reported.

The same rule starts the simulation. After reset `tn_min` is 0, and every
component in the initial model reports its first event time. The first
`step` waits until all have reported and until the dynamic coordinator has
broadcast the model's initial connections (generator1.EVENT → counter.EVENT).

## Components as state machines

Each component runs a low-level state machine around its DEVS phases:

```
INIT --> END_STEP --ack--> WAIT_STEP --step--> BEGIN_STEP --> (branch of the current DEVS phase) --> END_STEP
```

The branches are:

- **Internal transition**: if `tn_i == tn_min`, take the transition and
  update `tn_i`. Otherwise go straight to END_STEP.
- **External transition**: if `input_available`, pulse `input_read` and take
  the transition.
- **Output**: if imminent, hold `output_available` until `output_written`.
  The output comes before any internal transition of the same phase.
- **Structure change**: if imminent, hold `sc` until `sc_done`, then take the
  internal transition.

`generator_component` has one phase. When imminent, it emits EVENT = 1 and
sets `tn_i = tn_min + PERIOD`.

`counter_component` has phases s0 to s9:

| phase | time advance | on | action | next |
|---|---|---|---|---|
| s0 | ∞ | coin | count += 1, remember the sender | s1 |
| s1 | 0 | — | — | s2 if count = 10, s6 if count = 20, else s0 |
| s2 / s6 | 0 | — | removeConnection(sender.EVENT → self.EVENT) | s3 / s7 |
| s3 / s7 | 0 | — | removeComponent(sender) | s4 / s8 |
| s4 / s8 | 0 | — | addComponent(generator2 / generator1); the returned id becomes the sender | s5 / s9 |
| s5 / s9 | 0 | — | addConnection(sender.EVENT → self.EVENT) | s0 |

The swaps happen at exactly 10 and 20 coins, once each. After 20 coins the
counter only counts. The reference model was described in words as changing
the generator "every ten" units, but its transition function branches on 10
and 20 only. The transition function is what is built here.

## The example run

With the default parameters, the platform produces the trace below. The
end-to-end testbench checks it. Times are simulation time units, not clocks.

| sim time | event |
|---|---|
| 2, 4, … | generator1 (id 1) emits. Coin *k*, sent at 2*k*, is counted at 2*k*+2 |
| 22 | count = 10. In cycles at time 22: disconnect, remove generator1 (bitstream 01), add generator2 in area 1 (bitstream 21, id 3), connect |
| 25 | count = 11. This is the coin generator1 sent at 22, still in the buffer. generator2 (created at 22) emits for the first time |
| 25 + 3*j* | count = 11 + *j* |
| 52 | count = 20. Swap back: bitstreams 01 and 12; generator1 gets id 4 and its first event at 54 |
| 54 + 2*i* | count = 21 + *i*, for example count = 29 at 70 |

## Modelling partial reconfiguration

`reconfigurable_area` contains one instance of every component type in the
library. Only the type selected by `loaded_type` is out of reset, and only its
outputs reach the decoupler. A blank area drives nothing.

This is a simulation model of what one area can become. It is not how an area
is built on the device: there, each type is a separate partial bitstream of
the same region. Synthesizing `reconfigurable_area` as it stands gives all
library types side by side. To implement on a device, keep the component
modules as the reconfigurable modules and make the area a black-box partition
with the same ports.

The decoupler forces the area's control report, bus request and SC call to
zero while `decouple` is high. Signals going into the area are left alone,
since the component is held in reset at the same time.

## Parameters and widths

| name | default | where | meaning |
|---|---|---|---|
| `N_AREAS` | 2 | top, coordinators | number of reconfigurable areas |
| `PERIOD` | 2 / 3 | generator | time advance of generator1 / generator2 |
| `SWAP1_COUNT`, `SWAP2_COUNT` | 10, 20 | counter, area | coin counts that trigger the swaps |
| `TN_W` | 32 | package | simulation time width |
| `COMP_ID_W`, `PORT_ID_W` | 8, 4 | package | component id (0 = none) and port id |
| `VALUE_W` | 8 | package | message payload |
| `BS_ID_W` | 8 | package | bitstream id |

The two areas, the periods, the swap counts and the bitstream numbers come
from the original platform. The widths are this design's choice.

To use more areas, set `N_AREAS` on the top. The initial model stays in areas
1 and 2, and the extra areas start blank.

## Simulating

Each testbench is self-checking and prints one line,
`TB_RESULT checks=N failures=M`. The package must come first on the command
line. From the repository root, run:

```
verilator --binary --timing --assert -Irtl -Itb rtl/prdevs_pkg.sv tb/tb_prdevs_top.sv \
          --top-module tb_prdevs_top -o sim
./obj_dir/sim
```

`tb_prdevs_top` runs the whole example at default parameters, up to count 29
at time 70. It takes under a second. It checks:

- the count against the trace above, at every change;
- the order of the four bitstreams;
- the ids in the occupation table and the counter's final connection;
- that every message comes from a generator at one of its own emission times.

It also counts how often each mechanism occurs and fails if one never does:

- simultaneous `stepped` reports;
- infinite `tn` reports;
- messages held over to the next cycle;
- decoupling;
- both kinds of reconfiguration;
- both kinds of connection change.

The other testbenches, `tb/tb_<module>.sv`, test one module each.
`tb/prc_model.sv` is the behavioural PR controller. It decodes the bitstream
ids with its own copy of the table and answers after `DELAY` clocks.

## Departures and limits

- **Vendor IP.** The PR controller and the bitstreams are outside the RTL.
  Reconfiguration is modelled by the `area_config` input.
- **Context transfer is not built.** PRDEVS can save and restore a
  component's state variables. The platform only sketched this, as packets of
  a fixed size sent over the SC bus, and left it out.
- **Ports and hierarchy.** There is no addPort or removePort and no coupled
  components, as in the original platform. addComponent places every new
  component at the top level.
- **Confluent transitions.** There is no choice between external and internal
  transitions. The original platform lets the modeller pick one of the two.
  Neither example component can have both pending at once, so none is
  implemented.
- **No modelling-error checks.** Connection calls are not checked. A failed
  addComponent or removeComponent returns id 0, and the caller is not told
  anything more.
- **This design's choices.** The following are not specified by the original
  platform and were chosen here:
  - the exact handshakes and their timing;
  - round-robin arbitration on all three buses;
  - lowest-free-area placement;
  - sequential id allocation;
  - the creation-time report of new components;
  - the broadcast of the initial connections;
  - the overrun policy of the input buffer;
  - asynchronous active-low reset.
- **Timing of the model.** Because messages are consumed in the cycle after
  they are sent, event times differ from an ideal DEVS simulator (see the
  example trace). This follows the platform's cycle structure.
