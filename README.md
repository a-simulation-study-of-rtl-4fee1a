# Gate-level elevator controller for an eight-storey building

This is a controller for one elevator car, written as plain digital logic with no processor and no
stored program. The car's position is a 3-bit floor number (ground floor `000` to 7th floor `111`).
The controller moves that number up or down by one floor at a time, and only towards floors that
have a pending call. It follows a collective-control ("sweep") policy:

* the car keeps its direction as long as calls remain ahead of it;
* it stops at every called floor on the way and stands there while the call is served;
* it turns round once no call is left ahead;
* with no calls at all it stays where it is, and its stored direction flips back and forth, so it
  is ready to take a call from either side.

The RTL is modelled on a published TTL design for an eight-storey building. That design was built
from adders written as gates, gate multiplexers, 74194 shift registers used as holding registers,
one 7485 magnitude comparator per floor and one 74190 counter per floor used as a call flip-flop.
The same split into sub-circuits is kept here, one SystemVerilog module per sub-circuit. A few
places where the original circuit would not work as described were changed; they are listed under
"Departures from the original circuit" below.

## The two halves

```
                      +---------------------- floor_stepper ----------------------+
                      |  floor_q --> up_counter ---> i+1 --+                      |
                      |     |                              MUX#1 --+              |
                      |     +-----> down_counter --> i-1 --+  (dir) |             |
                      |     |                                     MUX#2 (move) -->+--> next_floor
                      |     +------------------------------------> i             |
   step_tick -------->|  floor register   <---- next_floor  (load on step_tick)  |
   sample_tick ------>|  comparator register <---- floor_q  (load on sample_tick)|
                      +------------------------------|---------------------------+
                                                     | cmp_floor
                      +----------------------- call_logic ------------------------+
   call_sw[7:0] ----->|  per floor f: floor_comparator(f) -> above/below/here      |
                      |               call_memory(f)     -> call[f]               |
                      |               call_distance_checker: position AND call    |
                      |  mux_selector_gen: OR over floors -> move, dir, dir memory |
                      +------------------------------------------------------------+
```

**Stepping half (`floor_stepper`).** The floor register holds the present floor `i`. Two small
combinational blocks form `i+1` (`up_counter`) and `i-1` (`down_counter`), written bit by bit as
ripple carry and borrow chains. MUX#1 picks one of them according to the direction bit. MUX#2 picks
between staying at `i` and taking the MUX#1 result according to the move bit. On each step pulse
the floor register loads the MUX#2 output. This is the whole motion model: the car advances by at
most one floor per step pulse. A second register copies the present floor on every sample pulse
and feeds it to the comparators.

**Call half (`call_logic`).** There is one slice per floor:

* `floor_comparator` compares the floor's fixed number with the present floor. It reports whether
  the floor is *above*, *below* or *here*, built from the single-bit greater/less/equal gate
  equations.
* `call_memory` is the floor's call bit (see below).
* `call_distance_checker` ANDs the call bit with the three position bits. The result answers "is
  there a call above / below / here at this floor?".

`mux_selector_gen` ORs those answers across all floors and turns them into the two multiplexer
selects.

## Deciding whether to move and which way

This is the heart of the controller. All of it is in `mux_selector_gen`.

| call here | call above | call below | move (MUX#2) | direction (MUX#1) |
|:---------:|:----------:|:----------:|:------------:|:------------------|
| 1         | x          | x          | 0 (stand and serve) | keep stored direction |
| 0         | 1          | 0          | 1            | up                 |
| 0         | 0          | 1          | 1            | down               |
| 0         | 1          | 1          | 1            | keep stored direction |
| 0         | 0          | 0          | 0            | reverse stored direction |

The direction decision (`dir_sel`) is combinational and drives MUX#1 at once. It is also written
into a one-bit holding register (`dir_q`) on every sample pulse. That stored bit is what "keep"
and "reverse" refer to. Some consequences:

* Calls on both sides never make the car change direction. It finishes the side it is heading
  for and only then turns round, because from then on calls lie on one side only.
* Calls at 2 and 7 that arrive together while the car serves floor 5 on its way up are served 7
  first, then 2. A call at 6 that arrives while the car is at 4 going down is served after 2.
* An idle car does not move. Its direction bit flips on every sample pulse. The first call to
  appear sets the direction outright, because it lies on one side only.
* While the car stands at a called floor, the direction is frozen. Calls that arrive during the
  stop therefore cannot turn the car round before the stop ends.

## Call memory: setting and flushing a call

Each floor's call bit is a flip-flop. The XOR of the floor's *here* (A=B) output and its call
switch enables it. While the XOR is high, the bit loads the switch level:

| car at floor | switch | XOR | call bit afterwards |
|:------------:|:------:|:---:|:--------------------|
| 0            | 1      | 1   | 1 – call registered |
| 0            | 0      | 0   | held                |
| 1            | 0      | 1   | 0 – call flushed (served) |
| 1            | 1      | 0   | held                |

So a press away from the car registers a call, and the car standing at the floor clears it. A
press at the floor where the car already stands registers nothing. A switch held down while the
car arrives delays the flush until it is released.

Between the XOR inputs and the flip-flop sits a delay line of `FLUSH_DELAY` sample pulses. This
is the serving time. Because the call stays pending for that long after the car arrives, the *call
here* row of the table above keeps the car standing. With the defaults the car spends two step
periods (20 s) at a served floor and one (10 s) at every floor it passes. A press shorter than one
sample pulse is remembered until the next pulse, so no press is lost. The same delay also postpones
registering a call by `FLUSH_DELAY` sample pulses.

## Timing

All registers run on one clock, `clk`. `pulse_gen` divides it into two one-cycle enables:

* `sample_tick` comes every `SAMPLE_DIV` cycles: 1 s at the default 1000 cycles and an assumed
  1 kHz clock. It loads the comparator register and the direction memory, and it advances the
  serving delay.
* `step_tick` comes on every `STEP_SAMPLES`-th sample pulse: 10 s by default. It always coincides
  with a sample pulse, and it loads the floor register.

After the floor register changes, the comparators see the new floor at the next sample pulse. At
the default sizes, the car gets from the ground floor to a call at floor 5 in 5 steps. The call
is then flushed 10 sample pulses after the comparators see floor 5, and the car leaves on the
following step pulse.

## Departures from the original circuit

* **Comparator input.** The original text sends the MUX#2 output (the *next* floor) to the
  comparators, while also calling it the present floor. Comparing against the next floor would
  flush a call one floor early and stop the car short of it. Here the comparator register copies
  the present floor.
* **Move select.** The original combines "call above" and "call below" with an AND gate, but
  describes the result as "a call above *or* below". An AND would never let the car go to a single
  call, so an OR is used. In addition, the move select is held low while a call is pending at the
  car's floor. Without this the car would not stop at called floors.
* **Call flip-flop.** The original uses the lowest bit of a 74190 counter, which toggles on every
  XOR pulse. That would invent a call at every floor the car passes without stopping. Here the bit
  loads the switch level while the XOR is high, which reproduces the original truth table exactly.
* **Direction memory.** The original mentions both a counter bit and a 74194 register for this.
  A register is used, written every sample pulse with the decision from the table above.
* **Holding registers.** Of the 74194 only the parallel-load and hold modes are used, so only
  those are built (`storage_reg`). The slow register clocks are clock enables on one system clock.
* **Counter wrap-around.** `up_counter` wraps 7 to 0 and `down_counter` wraps 0 to 7. These rows
  are outside the original truth tables and are never selected.
* **Own choices.** The clock frequency (1 kHz), the serving delay (10 sample pulses), the reset
  (synchronous, active low, to the ground floor heading up) and the one-cycle press capture are
  not specified by the original design.
* **Left out.** The call switches and indicator LEDs are not built. The switches are the `call_sw`
  inputs, and the signals the LEDs showed are outputs of `elevator_top`.

## Files

| file | contents |
|------|----------|
| `rtl/elevator_pkg.sv` | default floor count, `dir_e` (0 = down, 1 = up), `floor_rel_t` {above, below, here} |
| `rtl/up_counter.sv`, `rtl/down_counter.sv` | i+1 and i-1 as ripple gate chains |
| `rtl/floor_mux.sv` | 2:1 floor multiplexer (used as MUX#1 and MUX#2) |
| `rtl/storage_reg.sv` | load/hold register |
| `rtl/floor_comparator.sv` | position of one fixed floor relative to the car |
| `rtl/call_memory.sv` | one floor's call bit with serving delay |
| `rtl/call_distance_checker.sv` | call bit AND position |
| `rtl/mux_selector_gen.sv` | OR trees, move/direction logic, direction register |
| `rtl/pulse_gen.sv` | sample and step pulses |
| `rtl/floor_stepper.sv` | stepping half |
| `rtl/call_logic.sv` | call half |
| `rtl/elevator_top.sv` | complete controller |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_elevator_top.sv` | end-to-end test at a fast time scale |
| `tb/tb_elevator_full.sv` | the same scenario at the default parameters |
| `tb/tb_elevator_scaled.sv` | the controller with 16 and with 6 floors |
| `tb/elevator_scenario.svh` | scenario and monitor shared by the two end-to-end tests |

### Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_FLOORS` | 8 | floors served; the floor number is `$clog2(N_FLOORS)` bits |
| `SAMPLE_DIV` | 1000 | clock cycles per sample pulse |
| `STEP_SAMPLES` | 10 | sample pulses per floor step |
| `FLUSH_DELAY` | 10 | serving delay in sample pulses (0 = flush on the next clock) |
| `INIT_FLOOR` | 0 | floor after reset |
| `INIT_DIR` | `DIR_UP` | direction after reset |

`N_FLOORS` can be changed, since every block is written for a general floor count. Eight floors
are the default. Sixteen floors and six floors (which leaves unused floor codes) have also been
simulated. With a floor count that leaves unused codes, an assertion in `floor_stepper` checks
that the floor register never holds one.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends the simulation. It also has a
watchdog that counts a failure if the test hangs. For example:

```
verilator --binary --timing --assert -Irtl -I. rtl/elevator_pkg.sv \
    tb/tb_elevator_top.sv -y rtl --top-module tb_elevator_top -o sim
./obj_dir/sim
```

Run this from the directory that holds `rtl/` and `tb/`: the end-to-end tests include
`tb/elevator_scenario.svh` by that path. For a unit test, replace `tb_elevator_top` with
`tb_<module>`.

The end-to-end scenario goes through these steps:

1. The car idles at the ground floor.
2. A call at 5.
3. Calls at 2 and 7 while 5 is being served.
4. A call at 6 as the car passes 4 going down.

It checks the following:

* the service order is 5, 7, 2, 6;
* the car climbs 11 floors and descends 5 in total;
* the floor changes only on a step pulse, and by one floor;
* a call is flushed only with the car at that floor;
* the car never stands still with calls pending unless it is serving one.

It also counts how often each mechanism occurred and fails if any never did: moving up, moving
down, passing a floor, serving, standing while serving, keeping the direction with calls on both
sides, turning round, and idle direction sweeping. It also checks the rate. A floor the car only passes must be left exactly one step period after
arrival. A served floor must be left exactly two step periods after arrival (for the default
serving delay). `tb_elevator_full` runs the same scenario at the default parameters, about 300,000
clock cycles, in well under a second.

## How far to trust it

Every module has its own testbench, checked against values worked out independently of the RTL:

* exhaustive tables for the counters, multiplexer, comparators and AND stage;
* reference models run on random stimulus for the registers, selector logic, stepping loop and
  call half;
* timed sequences for the call memory and pulse generator.

For each module, a deliberately broken copy has been shown to fail its testbench. The design is
small: about 200 flip-flops at the defaults, most of them in the serving-delay lines.

Not verified: floor counts other than 6, 8 and 16, and behaviour when several switches are held down for
long periods. The timing constants are design choices, not measured requirements.
