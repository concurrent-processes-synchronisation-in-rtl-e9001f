# Reactor logic controller: three ways to synchronise overlapping processes

A small chemical plant measures out two substances, lets them react in a
stirred vessel, pours the product into a wagon and sends the wagon away to be
emptied. Its discrete controller is a good example of a hard case for
hierarchical state machines (statecharts): three activities run at the same
time but neither start nor end together. Filling the reactor, stirring it and
moving the wagon to the loading point overlap, so they cannot be put in
neatly nested, independent regions. Something has to tell one region that
another has reached a given point.

This repository holds the same controller in three synthesizable forms:

| module            | form                                                           | state flip-flops |
|-------------------|----------------------------------------------------------------|------------------|
| `reactor_pn_ctrl` | Petri net, one flip-flop per place                             | 16               |
| `reactor_gv_ctrl` | statechart; regions synchronised by a global variable `z1`     | 22               |
| `reactor_ss_ctrl` | statechart; regions synchronised by two UML *synch states*     | 22 + 2           |

`reactor_top` runs all three side by side on one sensor bus, so that their
behaviour can be compared.

## The plant and one technological cycle

Sensors (inputs `x`, type `sensors_t`) and actuators (outputs `y`, type
`actuators_t`) are defined in `reactor_pkg`:

| signal | meaning                                | signal | meaning                                 |
|--------|----------------------------------------|--------|-----------------------------------------|
| x0     | start button                           | y1, y2 | fill scale MV1 / MV2 from its container |
| x1, x3 | scale MV1 / MV2 full                   | y3, y4 | empty scale MV1 / MV2 into reactor R    |
| x2, x4 | scale MV1 / MV2 not empty              | y5     | empty reactor R into the wagon          |
| x5     | reactor level above the stirrer sensor | y6     | empty the wagon                         |
| x6     | reactor not empty                      | y7     | stirrer (agitator) on                   |
| x7     | wagon at the left (loading) end        | y8     | wagon moves right                       |
| x8     | wagon at the right end                 | y9     | wagon moves left                        |
| x9     | wagon not empty                        |        |                                         |

A cycle runs like this:

1. `x0` starts it. Both scales are filled (`y1`, `y2`). At the same time the
   wagon starts moving left (`y9`).
2. Each scale stops filling when it is full (`x1`, `x3`). When both are full,
   both are emptied into the reactor (`y3`, `y4`) until empty (`!x2`, `!x4`).
3. The stirrer turns on whenever the reactor level is above `x5` and turns off
   when it drops below again. This runs for the rest of the reaction.
4. The reactor may be emptied into the wagon (`y5`) only when both scales are
   empty **and** the wagon stands at the left end (`x7`). This is the first
   synchronisation point.
5. The wagon may move right (`y8`) only when the reactor is empty (`!x6`).
   This is the second synchronisation point.
6. At the right end (`x8`) the wagon is emptied (`y6`) until `!x9`. The
   controller is then ready for the next start.

## Form 1: the Petri net (`reactor_pn_ctrl`)

Sixteen places hold tokens. A transition fires when all its input places hold
a token and its condition on the sensors is true. It then takes those tokens
and puts one into each of its output places. A place's actuator is on while
the place holds a token. Place 1 alone is marked after reset.

```
t1  1 & x0       -> 2 (y1), 3 (y2), 6 (y9)      fork: three processes start
t2  2 & x1       -> 4
t3  3 & x3       -> 5
t4  4 & 5        -> 8, 9 (y3), 10 (y4)          join + fork
t5  8 & x5 & x6  -> 7 (y7)                      stirrer on
t6  7 & !x5      -> 8                           stirrer off
t7  9 & !x2      -> 11
t8  10 & !x4     -> 12
t9  6 & x7       -> 13                          wagon arrived left
t10 11 & 12 & 13 -> 14 (y5)                     join: scales empty AND wagon left
t11 8 & 14 & !x6 -> 15 (y8)                     join: stirrer idle AND reactor empty
t12 15 & x8      -> 16 (y6)
t13 16 & !x9     -> 1
```

In a Petri net the overlap is easy to express: a join transition (t10, t11)
simply has input places in several processes. Each place is one flip-flop.
Every enabled transition fires at the same clock edge. This is safe because
the net never holds two tokens in one place, and no two transitions ever
compete for the same token: t5 and t11 share place 8, but need `x6` and `!x6`.
With this synchronous firing, 29 markings can be reached.

## Form 2: statechart with a global variable (`reactor_gv_ctrl`)

```
WaitingForStart --t1:x0--> Process --t11--> WagonRight(y8) --t12:x8-->
  EmptyingWagon(y6) --t13:!x9--> WaitingForStart

Process = [ Substrates || WagonReturn ]
  Substrates:  Preparations --t4--> Reaction --t15:!x6--> (final)
    Preparations = [ FillingMV1(y1) --t2:x1--> (final)
                  || FillingMV2(y2) --t3:x3--> (final) ]
    Reaction = [ StirringControl || AgentsDispensing ]
      StirringControl:  Waiting --t5:x5&x6--> Stirring(y7)
                        Stirring --t6:!x5&x6--> Waiting
      AgentsDispensing: EmptyingScales --t10:z1--> EmptyingReactor(y5)
                        --t14:!x6--> (final)
        EmptyingScales = [ EmptyingMV1(y3) --t7:!x2--> (final)
                        || EmptyingMV2(y4) --t8:!x4--> (final) ]
  WagonReturn:  WagonLeft(y9) --t9:x7--> WagonWaiting (do: z1)
```

The wagon's trip to the left lives in its own region, WagonReturn, next to
the filling and reaction process. When the wagon arrives, WagonWaiting
broadcasts `z1` for as long as it is active. The completion transition t10
out of EmptyingScales is guarded by `z1`. So the reactor cannot be emptied
before the wagon is in place, whichever of the two finishes first. The
return of the wagon is outside Process: t11 leaves Process only after
Substrates has reached its final state, which needs an empty reactor.

In hardware, `z1` is just a decode of the WagonWaiting flip-flop. It costs
nothing extra, but the regions are no longer independent: correct behaviour
now depends on a signal that crosses region borders. The transitions t9 and
t11 look as if they could conflict. They never can: t11 needs Substrates to
be done, which needs t10, which needs `z1`, which means t9 has already fired.
An assertion in the module checks this. With random sensor values the
module reaches exactly **32 global states** (distinct sets of active
states), the reachable-state count reported for this statechart. The
testbench checks that number.

## Form 3: statechart with synch states (`reactor_ss_ctrl`, `synch_state`)

```
WaitingForStart --t1:x0--> Process --t15--> WaitingForStart

Process = [ Substrates || Wagon ]
  Substrates: Preparations --t4--> Reaction            (as above)
    AgentsDispensing: EmptyingScales --t10 (join S1)--> EmptyingReactor(y5)
                      --t11:!x6 (fork S2)--> (final)
  Wagon: WagonLeft(y9) --t9:x7 (fork S1)--> WagonWaiting --t12 (join S2)-->
         WagonRight(y8) --t13:x8--> EmptyingWagon(y6) --t14:!x9--> (final)
```

Here the whole wagon trip is one region, and the two synchronisation points
become two *synch states*, S1 and S2, on the border between the regions.
A synch state works like a one-place buffer for a token:

- a **fork** transition in the source region fires and puts a token in;
- a **join** transition in the target region fires only while a token is
  present, and takes it out.

S1 carries "wagon is at the left end" from the Wagon region to the join t10.
S2 carries "reactor is empty" from the fork t11 back to the join t12. Unlike
`z1`, no state is read across the border. Only a token passes, and the
diagram stays modular. `synch_state` is one flip-flop
(`full <= full & ~take | put`). It has assertions against a join on an empty
synch state and against a second token arriving before the first is used.
Both synch states are cleared when Process is left.

## From statechart to flip-flops

The two statechart modules follow the same rules. These rules carry most of
the meaning, so they are listed here:

- **One flip-flop per state.** Compound states (Process, Preparations,
  Reaction, EmptyingScales) and final states each have a flip-flop too. The
  state vector is a packed struct (`gv_state_t`, `ss_state_t`) with one bit
  per state, so a waveform shows the active configuration directly. This is
  one-hot per state. A denser hierarchical encoding would save a few
  flip-flops but is harder to read.
- **Entering a compound state** also enters the default state of each of its
  regions. For example, t1 sets Process, Preparations, FillingMV1, FillingMV2
  and WagonLeft.
- **Leaving a compound state** clears every state inside it. Each next-state
  equation is ANDed with the negation of every transition that leaves one of
  its ancestors.
- **Final states block exits.** A transition out of a compound state, whether
  it has no condition (t4, t11 in form 2, t15 in form 3) or has one (t10,
  t15 in form 2), is enabled only when the final states inside are active.
  Regions with no final state are simply cut off. For example, StirringControl
  is abandoned wherever it is when Reaction (form 2) or Process (form 3) is
  left.
- **One step per clock.** Every enabled transition fires at the same rising
  edge. The diagrams are conflict-free, so no priority logic is needed.
- **Moore outputs.** A do-activity is on while its state is active. It is
  decoded from the state flip-flops with no logic after the registers other
  than a wire.

Timing is therefore simple. An actuator changes one clock edge after the
sensor change that triggers it. A transition that needs another's result
(`z1`, a synch-state token) fires one clock after it at the earliest.

## Co-simulation top (`reactor_top`)

The top feeds one sensor bus `x` to all three controllers and brings out each
actuator bus (`y_pn`, `y_gv`, `y_ss`), state vector and fired-transition
vector. The input `sel` (`SEL_PN`, `SEL_GV`, `SEL_SS`) chooses which
controller drives the main output `y` towards the plant. The two others
follow the same sensors, so you can watch the three forms side by side. They
do not match cycle for cycle. The statecharts need one or two extra steps
where they pass through final states: t14 then t15 then t11 in form 2,
against the single t11 of the Petri net. All three complete every cycle
together. The selector is a convenience of this design. A real FPGA would
hold only one of the three forms.

Reset (`rst`) is synchronous and active high. The sensors are assumed to be
already synchronised to `clk`. No synchronisers are included.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `reactor_pn_ctrl_tb`: compares the controller every clock against a
  table-driven Petri-net interpreter under random sensors. It checks that
  every transition fires and that all 29 reachable markings are visited. It
  then runs six closed-loop cycles against a plant model.
- `reactor_gv_ctrl_tb`, `reactor_ss_ctrl_tb`: compare the controllers against
  reference models written with one enumerated variable per region. The synch
  states in the reference are unbounded counters, which must never exceed
  one. They check the 32 (gv) and 35 (ss) reachable configurations. Closed-loop
  runs vary the plant timing so that both orders occur: wagon first, and
  scales first.
- `synch_state_tb`: random fork, join and clear requests against a token
  counter.
- `reactor_top_tb`: runs the whole top at its only size. For each `sel`
  setting it runs six plant cycles, and it counts every mechanism: fork,
  joins, stirrer on and off, both synchronisation orders, the `z1`
  broadcast, tokens waiting in S1 and S2, and the exits by t15. It fails if
  any mechanism never happened.

`tb/reactor_plant_model.sv` is a behavioural model of the plant, used only by
the testbenches. Levels change by one unit per clock. It also counts spills,
meaning pouring into a wagon that is not at the loading point.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module reactor_top_tb rtl/reactor_pkg.sv tb/reactor_top_tb.sv
./obj_dir/Vreactor_top_tb
```

Replace the top module and file name to run another testbench. To lint the
synthesizable code: `verilator --lint-only -Wall -Irtl -y rtl rtl/reactor_pkg.sv rtl/reactor_top.sv`.
This lints without warnings. Linting a single controller on its own reports only the unused reset constant of the other statechart.

## Size

After generic synthesis, `reactor_gv_ctrl` has 22 flip-flops and about 140
simple gates. The published FPGA implementation of this form used 23
flip-flops and 60 four-input LUTs, with a hierarchical state encoding that is
not reproduced here. `reactor_pn_ctrl` has 16 flip-flops and
`reactor_ss_ctrl` has 24. The whole top has 62 flip-flops.

## Where this RTL departs from its source, or fills gaps

- **Sensor names.** The prose gives the wagon's right-end sensor as `x9`. The
  net and the plant drawing use `x8` for the right end and `x9` for the
  wagon's emptiness. The RTL follows the latter.
- **Valve of place 14.** One sentence calls the valve of place 14 `y6`. The
  net assigns `y5` to place 14 and `y6` to place 16. The RTL follows the net.
- **Global-variable statechart.** One sentence says the `z1`-guarded t10
  activates EmptyingWagon, and that WagonWaiting switches on `y5`. The
  diagram has t10 entering EmptyingReactor (`y5`) and WagonWaiting producing
  `z1`. The RTL follows the diagram.
- **Synch-state statechart.** The prose names the fork that signals "reactor
  empty" as t6. In the diagram t6 is the stirrer-off transition and the fork
  is t11 (`!x6`). The RTL follows the diagram.
- **The stirrer-off condition** is `!x5` in the Petri net and `!x5 & x6` in
  both statecharts. Each module keeps its own form's condition.
- **Own choices.** Not fixed by the source:
  - t15 of the synch-state form needs both the Wagon and the AgentsDispensing
    final states;
  - the synch states have a bound of one token and are cleared on exit;
  - the state encoding, the clocking and reset, and the `sel` multiplexer.
- **Not built.** Three small textbook examples show the same synchronisation
  pattern as Petri net, global variable and synch state. They print no
  conditions and no initial states. All three mechanisms appear in full in
  the reactor controllers. The physical plant exists only as a testbench
  model.
