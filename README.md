# Ten-wire TDR pulse source for pilot-cable fault location

Time-domain reflectometry (TDR) finds a fault in a cable by sending a short
pulse into one end and timing the echo. A break, a short, water ingress or a
crimp changes the line impedance; part of the pulse is reflected there and
arrives back at the injection point after the round trip time `t`. With the
propagation velocity `vp` of the cable, the distance to the mismatch is

    D = t * vp

The polarity of the echo tells the fault type: an open end or break reflects
with the same polarity as the pulse, a short to ground or to the return
conductor reflects with the opposite polarity.

This RTL is the digital half of such an instrument for a multi-core pilot
cable (the signalling cable laid alongside power lines). It generates the
test pulse from a 50 MHz FPGA clock and steps it through ten wires of the
cable, one pulse per wire, so an oscilloscope connected at the injection
point can record the incident pulse and its echo for each wire in turn. The
echo is captured and timed by the oscilloscope; there is no capture logic in
the FPGA.

```
             +-----------------+  pulse   +------------+  output_dmux[9:0]
  MClk ----->| pulse_generator |----+---->| demux_1to16|------------------> wires 0..9
  SeqReset ->|  160 ns / 2560ns|    |     +------------+
             +-----------------+    |           ^ Sel[3:0]
                                    |  falling  |
                                    +--edge---->+ decade_counter (0..9)
                                    |
                                    +------------------------> output_cable
                                    +------------------------> output_reff1
```

## Pulse timing: two cascaded counters

`pulse_generator` builds the waveform from two counters on the 20 ns clock:

| counter  | width  | counts  | one full count lasts |
|----------|--------|---------|----------------------|
| divider  | 16 bit | 0 .. 7  | 8 x 20 ns = 160 ns (one *slot*) |
| slot     | 5 bit  | 0 .. 15 | 16 x 160 ns = 2560 ns (one *period*) |

The slot counter advances when the divider wraps. The output is high exactly
while the slot counter is 0. Each period therefore contains one 160 ns pulse
followed by 15 empty slots, 15 x 160 ns = 2400 ns of silence:

```
cycle     0       8                                              128     136
          ________                                               ________
pulse  __|        |_____________________________________________|        |___
          <160 ns> <------------------ 2400 ns ---------------->
slot       0        1   2   3  ...                        15      0
```

The pulse width is chosen longer than the longest round trip expected on the
cable (100 ns for the 10 m cable in the reference measurements below), so the
echo arrives while the pulse is still high and shows up as a step on its
plateau. The long gap lets every echo die out before the next pulse.

The output is a combinational decode of the slot-counter register
(`count == 0`), so it changes one clock-to-output delay after a rising clock
edge. It is not re-registered.

`DivLast` and `CntLast` set the two terminal counts; the pulse is
`(DivLast+1)` clocks wide and repeats every `(DivLast+1)*(CntLast+1)` clocks.

### Reset behaviour

`SeqReset` (called `Master_Reset2` inside the generator) is a *run* input:
high runs, low stops. Low asynchronously loads both counters with their
terminal counts (7 and 15), which makes the output low. The first rising clock
edge after `SeqReset` rises wraps both counters to 0 and starts a full-width
pulse. Loading the terminal counts, rather than clearing the counters to
zero, is what keeps the output low while the source is stopped.

## Wire scanning: keeping each pulse on one wire

`demux_1to16` routes the pulse to output `Sel` and holds every other output
low. It has sixteen outputs, but only 0..9 have decoders, because the select
comes from `decade_counter`, a 4-bit counter that runs 0, 1, ..., 9, 0, ...
Outputs 10..15 are driven low and are not brought out of the top level.

The select must not change during a pulse, or the pulse would be split
between two wires. `tdr_top` registers the pulse once (`pulse_q`) and forms a
one-cycle strobe on its falling edge, `advance = pulse_q & ~pulse`, which is
the counter's enable. The select therefore steps one clock after each pulse
ends and is stable for the whole of the next pulse:

| pulse number after reset | 0 | 1 | ... | 9 | 10 | 11 | ... |
|--------------------------|---|---|-----|---|----|----|-----|
| wire (`output_dmux` bit) | 0 | 1 | ... | 9 | 0  | 1  | ... |

A full sweep of the ten wires takes 10 x 2560 ns = 25.6 us. Reset returns the
select to wire 0.

The demultiplexer is purely combinational and carries an immediate assertion
that at most one output is ever high.

## Top-level pins

| pin               | dir | meaning |
|-------------------|-----|---------|
| `MClk`            | in  | 50 MHz clock |
| `SeqReset`        | in  | run (1) / stop and reset (0), asynchronous |
| `output_dmux[9:0]`| out | pulse for wires 0..9, one wire per pulse |
| `output_cable`    | out | every pulse, unsteered |
| `output_reff1`    | out | every pulse, unsteered |

`output_cable` and `output_reff1` are two copies of the undivided pulse
train. The reference design does not spell out their use; going by the names,
one drives a single cable directly and the other is the oscilloscope's
reference and trigger channel.

All logic is in the `MClk` domain. The outputs are logic levels; the analog
front end that drives the cable (pulse amplitude, source impedance) is outside
this design.

## Using it to locate a fault

Trigger the oscilloscope on `output_reff1` and probe the injection point of
the wire under test. Measure the time from the rising edge of the pulse to the
step on its plateau, and apply `D = t * vp`. The reference measurements, on a
cable with `vp = 0.0995 m/ns`:

| cable          | echo time | D = t * vp | actual length to mismatch |
|----------------|-----------|------------|---------------------------|
| healthy        | 100 ns    | 9.95 m     | 10 m (far end) |
| faulty cable 1 | 36 ns     | 3.582 m    | 3.6 m |
| faulty cable 2 | 51 ns     | 5.07 m     | 5 m |

All three echoes fall inside the 160 ns pulse. A cable with a round trip
longer than the pulse width needs a wider pulse (larger `DivLast`). A round
trip longer than the period needs a longer period (larger `CntLast`), or the
echo of one pulse will overlap the next.

## Where this RTL departs from the reference design

* **Counter clock.** In the reference design the decade counter is clocked
  directly by the pulse. Here it runs on `MClk` with a count enable derived
  from the pulse's falling edge, which keeps the design in one clock domain
  and guarantees the select is settled before the next pulse. The standalone
  `decade_counter` still counts every clock when `en` is tied high.
* **Counter output latches.** The reference decade counter passes its count
  through output latches; here the output comes straight from the register.
* **Unused demultiplexer outputs.** The reference design leaves outputs
  10..15 undriven (high impedance); here they are driven low.
* **Pulse-generator reset value.** Both counters are reset to their terminal
  counts, not to zero, so the output is low in reset (see above).
* **Names.** Ports keep the reference pin names (`MClk`, `SeqReset`,
  `Output_Pulse2`, `Input_dmux`, `Sel`, `output_dc`, ...); module names are
  descriptive.

## Files

| file | contents |
|------|----------|
| `rtl/tdr_pkg.sv` | shared constants: clock period, counter widths and terminal counts, demux size |
| `rtl/pulse_generator.sv` | two-counter pulse generator |
| `rtl/decade_counter.sv` | modulo-10 counter with enable and asynchronous reset |
| `rtl/demux_1to16.sv` | 1:16 demultiplexer, outputs 0..9 decoded |
| `rtl/tdr_top.sv` | top level: the three blocks and the select-advance strobe |
| `tb/pulse_generator_tb.sv` | cycle-by-cycle check of the pulse against a reference, 160 ns / 2400 ns edge timing, mid-pulse reset |
| `tb/decade_counter_tb.sv` | free-running and random-enable sequences, wrap, asynchronous reset |
| `tb/demux_1to16_tb.sv` | exhaustive over select and input |
| `tb/tdr_top_tb.sv` | full-size end-to-end run: 25 pulses over all ten wires, wrap 9 to 0, mid-pulse reset and restart at wire 0 |
| `tb/pilot_cable_model.sv` | behavioural wire model (round-trip delay, reflection coefficient), testbench use only |
| `tb/tdr_cable_workload_tb.sv` | the three reference cables on wires 0..2, timed as an oscilloscope would, distance checked within 1 % |

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. They run at the default parameters, and each
takes well under a second.

## Simulating

With Verilator 5 (two-state simulation; the testbenches need `--timing`):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/tdr_pkg.sv tb/tdr_top_tb.sv \
    --top-module tdr_top_tb -o sim
./obj_dir/sim
```

Replace `tdr_top_tb` with any other testbench name. Lint the RTL alone with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/tdr_pkg.sv rtl/tdr_top.sv`.

## Changing it

* Pulse width and period: `DivLast`, `CntLast` on `tdr_top` (or the package
  defaults). Width is `(DivLast+1)` clocks, period `(DivLast+1)*(CntLast+1)`.
* Number of wires: `UsedOutputs` on `tdr_top`, up to 16. The decade counter
  then wraps at `UsedOutputs-1`.
* Another clock frequency: all timing is in clock cycles; recompute
  `DivLast` for the wanted pulse width. The testbenches assume 20 ns.
