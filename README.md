# Four-way traffic light controller

A synchronous controller for a four-road intersection. It gives green to one road at a
time, in the fixed order north, east, south, west, and puts a yellow "safe" phase between
every two greens. The two main roads (north and south) get longer greens than the side
roads (east and west). Each road also has a vehicle sensor. When a road has green but its
sensor sees no vehicle, the controller cuts that green short so the intersection is not
held for an empty road.

The whole controller is an eight-state machine, a unit counter and some decoding. It
needs 8 flip-flops at the default settings.

## The signal cycle

| State | North  | East   | South  | West   | Length (units) |
|-------|--------|--------|--------|--------|----------------|
| S0    | green  | red    | red    | red    | 16             |
| S1    | yellow | yellow | red    | red    | 4              |
| S2    | red    | green  | red    | red    | 8              |
| S3    | red    | yellow | yellow | red    | 4              |
| S4    | red    | red    | green  | red    | 16             |
| S5    | red    | red    | yellow | yellow | 4              |
| S6    | red    | red    | red    | green  | 8              |
| S7    | yellow | red    | red    | yellow | 4              |

After S7 the machine returns to S0. With every road busy, a full cycle takes
16+4+8+4+16+4+8+4 = 64 units.

Each yellow state shows yellow on two roads at once. One is the road whose green has just
ended. The other is the road whose green comes next. All other roads are red. Only one
road is ever green. A road always passes through yellow between green and red.

States are binary encoded: S*n* is the 3-bit value *n*. The even states are green states.
State S2k gives green to road k, in the order N, E, S, W.

## Time units

The machine does not count clock cycles directly. It counts *units*, and a unit is
`UNIT_CYCLES` clock cycles:

* `UNIT_CYCLES = 1` (the default): the lengths above are clock cycles, and a cycle takes
  64 clocks.
* `UNIT_CYCLES = 10_000_000` at a 10 MHz clock: the lengths are seconds, giving a 16 s
  main green, an 8 s side green, 4 s yellows and a 64 s cycle. This is the timing intended
  for a real intersection. The clock is expected to run at up to 10 MHz.

The default uses clock cycles so that a simulation of a whole cycle is short. A deployment
sets `UNIT_CYCLES` to the clock rate in Hz. The prescaler then needs ceil(log2(UNIT_CYCLES))
extra flip-flops: 24 for 10 MHz.

The state lengths are the parameters `T_MAIN` (S0, S4), `T_SIDE` (S2, S6) and `T_YELLOW`
(the odd states). The unit counter is 5 bits wide (`tlc_pkg::COUNT_W`), so no length may
exceed 32. An elaboration-time assertion in `tlc_fsm` checks this.

## How a state ends

`state_timer` counts the whole units spent in the current state. `tlc_fsm` raises
`advance` in the last clock cycle of a state, and the state and the timer both change at
the next edge. The next state therefore starts with a count of 0. A state ends for one of
two reasons:

1. **Time up.** The timer is in the state's last unit (`count == length-1`) and `tick`
   marks the last cycle of that unit.
2. **Empty road (early end).** The state is a green state and the sensor of the road that
   has green is low. The green then ends at the next clock edge, whatever the count.

Yellow states always run for their full length, even when every sensor is low. Skipping
a green therefore costs one clock of green followed by the full yellow. With no traffic
anywhere, the controller cycles through the four yellow states with one-clock greens in
between.

The sensor inputs are used as they arrive, sampled at the clock edge. They are not
synchronised or debounced. A sensor that is not already synchronous to `clk` needs a
two-flop synchroniser in front of the controller.

## Outputs

Each road has one group of displays, and all three displays of a road (one per turning
direction) show the same colour. Each road gets two forms of output:

* `x_lights[1:0]` is a code: 1 green, 2 yellow, 3 red. Code 0 is never driven.
* `x_lamps[2:0]` is `{red, yellow, green}`, one-hot, for driving lamps directly.

`state[2:0]` and `count[4:0]` are brought out for observation. Every output is a
registered value passed only through combinational decoding.

Reset (`rst`) is synchronous and active high. It puts the machine in S0 with a count of
0, so north green comes first.

## Modules

| File | Contents |
|------|----------|
| `rtl/tlc_pkg.sv` | state, light-code and lights-struct types, default lengths, helpers |
| `rtl/state_timer.sv` | unit counter with optional prescaler; `clear` restarts it |
| `rtl/tlc_fsm.sv` | state register and next-state logic, including the early-end rule |
| `rtl/light_decoder.sv` | the table above, from state to four light codes |
| `rtl/lamp_driver.sv` | light code to one-hot lamp enables |
| `rtl/traffic_light_controller.sv` | top level; also holds the safety assertions |

The top level carries these concurrent assertions:

* never more than one road on green;
* a green never goes straight to red;
* an early end happens only while a road is green.

## Simulation

Each testbench checks against its own reference model and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv -Irtl \
  --top-module tb_traffic_light_controller rtl/tlc_pkg.sv tb/tb_traffic_light_controller.sv
./obj_dir/Vtb_traffic_light_controller
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_traffic_light_controller` | Whole design at the default parameters. It runs three all-busy cycles and checks the 64-clock period. It then runs 3000 cycles of random sensors and four mid-cycle resets. State, count, codes and lamps are compared every cycle. It counts early ends per road, every yellow state and the resets, and fails if any of them never happened. |
| `tb_tlc_seconds` | Top at `UNIT_CYCLES = 10_000_000` with a 10 MHz clock. It checks S0–S3 as 16 s, 4 s, 8 s and 4 s, and their 32 s total. S4–S7 repeat these lengths. This run simulates 320 M clocks and takes about two minutes. |
| `tb_tlc_fsm` | FSM alone, with the testbench acting as the timer. It uses random ticks and random sensors, and includes a reset. |
| `tb_state_timer` | Counter with `UNIT_CYCLES` of 1 and 3, random clears, and 5-bit wrap. |
| `tb_light_decoder` | All eight rows of the table. |
| `tb_lamp_driver` | All four codes. |

## Design choices and departures

* **Vehicle-sensor rule.** The original specification asks for vehicle detection on every
  road but does not say how a sensor reading should change the cycle. The early-end rule
  above is this design's own. Other rules are possible, such as skipping an empty road's
  green entirely or stretching a busy road's green. Any of them would be a change to
  the `early_end` expression in `tlc_fsm`.
* **Clock cycles vs seconds.** The original specification gives the state lengths both as
  clock cycles and as seconds. The default follows clock cycles, and `UNIT_CYCLES` gives seconds.
* **Moore outputs.** The lights depend only on the current state. The sensors affect only
  when a state ends.
* **Reset.** The reset is synchronous. Its polarity and its target state (S0) are this
  design's choices.
* **Port count.** An earlier FPGA build of this controller reported 27 I/O pins and 23
  flip-flops. This RTL has 22 port bits without the lamp enables, 34 with them, and 8
  flip-flops. What made up the earlier counts is not known, so they were not matched.
* **Idle output.** At `UNIT_CYCLES = 1`, `state_timer`'s `tick` output is constant 1. This
  is intended: every clock then ends a unit.
