# Generalized Railroad Crossing controller, as synchronous RTL

A railroad crossing I lies inside a larger region R. Trains run through R on
several tracks, in both directions, and a sensor reports when each train enters
R. A gate at the crossing must meet two requirements:

* **Safety** – whenever a train is in the crossing, the gate is down.
* **Utility** – when no train has been around for a while, the gate is up
  (a gate that simply stays down is safe but useless).

This RTL is a hardware rendering of a published solution that was written as a
synchronous reactive program (ESTEREL) and proved correct by exhaustive
state-space search. The system is a set of small processes running in
lock-step: one model per track, a gate model and a controller. Two run-time
observers watch the requirements. Everything is parameterized. The defaults are
the published configuration: 3 tracks, trains that spend 6 reactions in R before
the crossing and 4 in it, a gate that needs 4 reactions to travel, and a utility
window of 5 reactions.

## One reaction per clock cycle

The original program follows the synchronous model. Time is a sequence of
*reactions*. In each reaction the inputs are read, every process reacts
instantly, and a signal that any process emits is seen by all of them in that
same reaction. The RTL keeps this exactly:

* one rising edge of `clk` ends one reaction;
* a signal is *present* in a reaction when its wire is 1 during that cycle;
* all outputs are combinational functions of the registered state and of the
  present inputs. A train arriving in cycle *k* therefore shows `IN_R`, makes
  the controller emit `LOWER` and starts the gate falling, all in cycle *k*;
* a signal emitted by several tracks is the OR of their outputs (broadcast).

The combinational path runs from `approach` through the track, the broadcast
OR and the controller into the gate's next-state logic. It is a few gates deep
and has no loops.

## Blocks

| Module | Role |
|---|---|
| `grc_pkg` | shared types (`track_sig_t`, `gate_state_t`) and default constants |
| `grc_track` | model of one track and the train on it |
| `grc_gate` | model of the gate: DOWN, GOING_UP, UP, GOING_DOWN |
| `grc_controller` | LOWER if any train is in R or I, else RAISE |
| `grc_system` | N tracks + controller + gate, with broadcast of the train signals |
| `grc_safety_monitor` | observer of "IN_I implies DOWN" |
| `grc_utility_monitor` | observer of "5 quiet reactions imply UP" |
| `grc_main` | top: `grc_system` with both observers |

### Track (`grc_track`)

A track reacts to `approach` only while it is empty. When it accepts a train in
reaction *k* it emits the following:

| reaction | signals |
|---|---|
| k | ENTER_R, IN_R |
| k+1 … k+T_R−1 | IN_R |
| k+T_R | ENTER_I, IN_I |
| k+T_R+1 … k+T_R+T_I−1 | IN_I |
| k+T_R+T_I | EXIT; the track is free again in this same reaction |

An `approach` that arrives in the EXIT reaction starts the next train at once,
so trains can follow each other with no gap. An `approach` that arrives while
the track is busy is ignored. The state is a single phase counter (0 = empty);
`busy` is 1 when the track will not accept a train.

Each train is deliberately a worst case: it always takes exactly T_R reactions
to reach the crossing and T_I to clear it.

### Gate (`grc_gate`)

This block has the most subtle timing in the design. The gate emits exactly one
of `up`, `down`, `going_up` and `going_down` in every reaction. It starts down
after reset.

* **DOWN** + RAISE → GOING_UP in the same reaction; the travel counter starts.
* **GOING_UP**: in the T_GATE-th reaction after the rise began, the timer fires
  and the gate shows **UP** in that reaction. If LOWER arrives at any point
  before then, including the reaction in which the timer fires, the gate shows
  GOING_DOWN in that reaction, with a fresh counter. A partial rise does not
  shorten the fall.
* **UP** + LOWER → GOING_DOWN in the same reaction.
* **GOING_DOWN** mirrors GOING_UP, with RAISE as the reversing command.

With a steady command the gate therefore shows the moving state for T_GATE
reactions and the end state in the next one. For example, with RAISE held from
reset it shows GOING_UP in reactions 0–3 and UP from reaction 4.

RAISE and LOWER must never be present together. An assertion checks this. The
controller guarantees it, because it emits exactly one of them in every
reaction.

### Controller (`grc_controller`)

`lower_cmd = in_r | in_i`, `raise_cmd = ~lower_cmd`, combinationally. The
command is held for as long as it applies. The original work also sketches a
controller that issues each command only once per change, for actuators that
dislike repeated commands. That variant is not included here.

### Requirement observers

`grc_safety_monitor` flags a reaction where `IN_I` is present and `DOWN` is absent.

`grc_utility_monitor` implements the bounded "ensures" form of the utility
requirement:

    (quiet now and in each of the previous XI2−1 reactions) → UP
    where quiet = not (IN_R or IN_I)

It keeps a saturating count of the quiet reactions in a row. "Previous" is
false before the first reaction, so after reset XI2 real reactions must pass
before the window can be full. The utility requirement in its general form
refers to the future: the gate may be down no earlier than ξ₁ before a train
enters I. Following the original solution, `IN_R` stands in for that. The gate starts
falling in the very reaction a train enters R, which is at least as strict.

Each observer has a combinational `violated`/`sat` pair for the present
reaction, a sticky `ever_violated` flag and a saturating 16-bit
`n_violations` counter. The flag and the counter are additions of this design.

## Why the defaults are safe, and how tight they are

* **Safety margin.** A train enters R in reaction *k*, and so does LOWER. The
  gate, whether up or rising, is DOWN by reaction *k*+T_GATE = *k*+4. The train
  reaches the crossing at *k*+T_R = *k*+6. The design is safe whenever
  T_R ≥ T_GATE. The margin at the defaults is 2 reactions.
* **Utility margin.** The last train's EXIT reaction is the first quiet one.
  RAISE starts the rise in that reaction and UP appears T_GATE reactions later,
  in the (T_GATE+1)-th quiet reaction. The utility requirement holds whenever
  XI2 ≥ T_GATE+1. At the defaults (5 = 4+1) there is no slack.
* With trains shorter than the gate travel (T_R+T_I < T_GATE), a train can
  leave while the gate is still falling, so RAISE turns a fall around. At the
  defaults this never happens.

`tb/grc_bounds_tb.sv` demonstrates all of these cases.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…` line.

| Testbench | What it shows |
|---|---|
| `grc_track_tb` | time-stamp reference model; APPROACH→ENTER_I = T_R and APPROACH→EXIT = T_R+T_I in cycles; back-to-back and ignored approaches |
| `grc_gate_tb` | hand-worked sequences (rise in 4, reversal in the same reaction, command winning over the firing timer) and 8000 random commands against a reference |
| `grc_controller_tb` | exhaustive |
| `grc_safety_monitor_tb`, `grc_utility_monitor_tb` | verdicts, window fill after reset, flag and counter |
| `grc_system_tb` | every per-track and broadcast signal, both commands and the gate against the reference model `tb/grc_ref_pkg.sv`, with dense and sparse random traffic |
| `grc_main_tb` | end to end at the defaults: latencies (DOWN 4 after APPROACH, ENTER_I 6, EXIT 10, UP 4 after EXIT, first UP in reaction 4 after reset); 30 000 random reactions against the reference; observers silent; every mechanism counted and required to occur |
| `grc_bounds_tb` | five timing configurations on one input stream: the defaults, T_R = T_GATE (still safe), T_R < T_GATE (safety fails), XI2 < T_GATE+1 (utility fails), and 2-reaction trains (falls reversed). The observers must fire exactly when the reference says so |
| `grc_reach_tb` | exhaustive breadth-first search over all reachable states of `grc_main` at the defaults, with every APPROACH combination from every state |

The exhaustive search finds 1460 reachable states and 11 680 transitions. In all
of them both requirements hold and the gate signals are one-hot. Adding the
observers does not add any reachable state. The compiled form of the original
program has 1468 states and shows the same insensitivity to the property
models. The two numbers count different encodings, so they are not expected to
match exactly. The same holds per process. The search reaches 10 gate states
(DOWN, UP and 4 counter values in each moving state) and 11 phases per track.
The compiled program has 11 and 12, one more in each case. That is consistent
with the compiled program having a separate start-up state, which the reset
state makes unnecessary here.

To run a testbench with plain Verilator (5.x), from the repository root:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/grc_pkg.sv tb/grc_ref_pkg.sv rtl/grc_*.sv tb/grc_main_tb.sv \
      --top-module grc_main_tb -Mdir obj_main
    ./obj_main/Vgrc_main_tb

Change the testbench file and `--top-module` to run the others. `grc_bounds_tb`
also needs `tb/grc_bounds_case.sv`. Each testbench runs in well under a second.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_TRACKS` | 3 | tracks, one train per track at a time |
| `T_R` | 6 | reactions a train spends in R before the crossing (≥ 1) |
| `T_I` | 4 | reactions a train spends in the crossing (≥ 1) |
| `T_GATE` | 4 | reactions of gate travel, either way (≥ 1) |
| `XI2` | 5 | utility window, in reactions (≥ 1) |

`grc_reach_tb` reads the internal state by hierarchical name and assumes 3
tracks. The other testbenches set their sizes in local parameters at the top
of each file.

## Departures and choices

* Reset (asynchronous, active low) puts every track in the empty state, the gate
  DOWN and the observers at zero. The original program simply starts in that
  state.
* Signal encodings, counter widths and the observers' flag and counter are
  choices of this design. The observers run as logic alongside the design
  instead of inside a model checker.
* The gate model is kept as published: a reversal restarts the full travel
  time, and the gate never arrives early. Both are worst cases. A more realistic
  gate is a possible extension, not part of this RTL.
* Only the controller that holds its command is built, not the variant that
  issues each command once.
