# DME analog-distance simulator

An airborne DME (distance measuring equipment) tells an area-navigation
computer how far the aircraft is from a ground station by sending it a pair of
pulses, P1 and P2. The time between their leading edges is

    spacing = 50 us + 12.359 us x distance in nautical miles

12.359 us is the two-way radio propagation time over one nautical mile, 50 us
the standard ground-station delay. The pair repeats 5 to 30 times a second.

This design produces that pulse pair on a test bench, so a navigation computer
can be tested without a DME. It has two modes:

* **Static.** The distance is set on four thumbwheel decades, 000.0 to
  999.9 nm in 0.1 nm steps.
* **Dynamic.** The aircraft "flies" toward or away from the station. The
  distance changes in 0.01 nm steps at a selected ground speed: 0 to 420 knots
  in 60 kt steps, or twice that with the X2 switch (up to 840 kt). Flying
  inbound through zero turns the aircraft outbound, which simulates passing
  over the station.

Five seven-segment digits show the distance being sent, to 0.01 nm.

The RTL is a synchronous SystemVerilog version of a discrete 7400-series TTL
design from 1974. It keeps that design's partitioning, counters, division
ratios and programming tables. The sections below note each place where it
differs.

## Main idea: one clock period per hundredth of a mile

The converter clock is 8.09127 MHz. One period, 123.59 ns, is the propagation
time for 0.01 nm. A five-decade BCD counter is loaded with the distance in
hundredths of a mile, D. It counts down one step per clock after a fixed
delay. Its borrow out of zero ends the pulse pair. So the spacing is a fixed
number of clocks plus exactly D. The distance is never converted to binary and
there is no multiplication. The dynamic mode needs only a second counter, in
the same BCD format, that steps up or down at the selected speed.

## Structure

```
 thumbwheels ──────────────┬──────────────────────────────┐
                           │                              │ A
 rate selector, X2,   ┌────▼──────────── range_generator ─┐ │   output_mux   decoder_drivers
 pushbuttons ────────►│ rate_control  ÷100 / ÷50          │ └──►(4 decades)──►(5 digits, blanking)──► seg_n
                      │ prog_input_logic + prog_divider   │ B ─►    │
 clk_rate 140 kHz ───►│ io_latch  (inbound/outbound)      ├─────────┤ hundredths
                      │ range_counter (000.00..999.99)    │         │
                      └───────────────────────────────────┘   distance (20 bits BCD)
                                                                   │ bus_sync
 clk_dme 8.09127 MHz ─────────────────────────────────► pulse_pair_converter
                                                        prf_p1_gen → delay_50us → distance_counter_p2
                                                                   └── p1, p2, pp_out = p1 | p2
```

| File | Role |
|---|---|
| `dme_pkg.sv` | BCD digit, five-decade distance struct `dist_t`, thumbwheel struct `thumb_t`, rate selector enum `rate_pos_e`, segment vector |
| `dme_simulator.sv` | top: the three sections, reset synchronisers, clock-domain crossing |
| `range_generator.sv` | dynamic distance: input synchronisers, rate chain, latch, range counter |
| `rate_control.sv` | gate and ÷100 (X1) or ÷50 (X2) prescaler, 140 kHz → 1.4 / 2.8 kHz |
| `prog_input_logic.sv` | rate selector position → 12 program bits |
| `prog_divider.sv` | 12-stage shift-register divider, ÷120 … ÷840 |
| `io_latch.sv` | inbound/outbound latch, steers rate pulses up or down, drives the lamps |
| `range_counter.sv` | five-decade up/down BCD counter, preset, zero detection |
| `output_mux.sv` | thumbwheels or range counter for the four upper decades |
| `bcd_7seg_decoder.sv`, `decoder_drivers.sv` | display decoders with leading-zero blanking |
| `pulse_pair_converter.sv` | P1/P2 generation |
| `prf_p1_gen.sv` | 25 Hz repetition counter, sequence flip-flop, P1 one-shot |
| `delay_50us.sv` | 400-clock delay before the distance count starts |
| `distance_counter_p2.sv` | BCD down counter and P2 one-shot |
| `one_shot.sv`, `sync_2ff.sv`, `reset_sync.sv`, `bus_sync.sv` | helpers |

## The rate chain

This is the least obvious part of the design.

A 0.01 nm step at 60 kt comes every 0.6 s, i.e. at 5/3 Hz. The seven speeds
need 5/3, 10/3, 5, 20/3, 25/3, 10 and 35/3 Hz. 140 kHz is the lowest crystal
frequency that divides into all of them, and into their doubles, as whole
numbers. The division is done in two stages:

1. `rate_control` divides by 100, or by 50 when X2 is set. It uses a ÷2 stage,
   a 70 kHz / 140 kHz selector, a ÷5 stage and a ÷10 stage, so the output is
   1.4 kHz or 2.8 kHz. Its enable is off in the digital-distance and 0 kt
   positions, which stops the rate clock.
2. `prog_divider` divides that by 50400 / knots:

| rate (X1) | rate (X2) | divisor | program P1..P12 |
|---|---|---|---|
| 60 kt | 120 kt | 840 | 1101 0011 1100 |
| 120 kt | 240 kt | 420 | 0111 0111 0001 |
| 180 kt | 360 kt | 280 | 1000 0101 1110 |
| 240 kt | 480 kt | 210 | 0000 0001 1111 |
| 300 kt | 600 kt | 168 | 1000 1111 1110 |
| 360 kt | 720 kt | 140 | 1010 1100 0000 |
| 420 kt | 840 kt | 120 | 1011 0001 1000 |

Above 420 kt only even multiples of 60 kt can be selected (480, 600, 720,
840 kt). This is a property of the single 9-position rotary switch plus the X2
toggle, and the original design has it too.

**How the divider works.** It is a 12-stage shift register. Each input pulse
shifts it from P1 toward P12. The exclusive OR of stages P5, P8, P9 and P12 is
fed back into P1. Without loading, that feedback steps through all 4095
non-zero states before repeating. The all-ones state occurs once per cycle and
is the output. On the input pulse after it, the register loads the program
instead of shifting. The divisor is therefore the number of states from the
program to all ones, counting both. Any divisor from 2 to 4095 is possible.
The programs in the table above are not binary numbers: each is the state that
lies the right number of steps before all ones.

Three 4-bit shift-register counter chips built this divider in the original.
Their internal feedback taps were not published with the design. The taps used
here are the only XOR feedback that reproduces every row of the original
programming table, including the divide-by-2 and divide-by-4094 entries.
`prog_input_logic` stores the seven program words as a case table. The
original built them from OR gates on the switch lines; the function is the
same.

## Range counter and station passage

`range_counter` has five BCD decades, 000.00 to 999.99 nm. Carry and borrow
ripple through the decades within one clock.

* **Preset** loads the four thumbwheel decades and clears the hundredths. It
  is a level: the counter reloads on every clock while the button is held.
* In the digital-distance position the hundredths decade is held at zero. So
  the static output is exactly the thumbwheel value, and the hundredths decade
  needs no multiplexer.
* A count-down pulse at 000.00 does not count. Instead it produces
  `zero_dst`, the borrow out of the hundreds decade. That pulse sets the latch
  to outbound, so the next pulse counts up to 000.01. Passing the station
  therefore costs one rate period. The original did the same; `zero_dst` is
  also brought out, because the navigation computer's bearing must flip by
  180° at that moment.
* Counting up past 999.99 wraps to 000.00. The original does not say what
  happens here.

`io_latch` is set to outbound by its pushbutton or by `zero_dst`, and to
inbound by its pushbutton. Outbound wins if both are requested. Reset selects
outbound.

## Pulse pair timing

One sequence, in 8.09127 MHz clocks counted from the rise of P1:

```
clock     0        57              400               401+D      401+D+57
P1       _|‾‾‾‾‾‾‾‾|_____________________________________________________
pp_seq   _|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____________
counter   load D while P1 .. hold .. | D, D-1, ... 0, borrow
P2       ______________________________________________|‾‾‾‾‾‾‾‾‾|___
```

* Every `PRF_DIV` = 323651 clocks (24.9999 Hz), `prf_p1_gen` sets the sequence
  flip-flop `pp_seq` and starts a 57-clock (7.04 us) P1.
* `delay_50us` counts 400 clocks with `pp_seq` high and then enables the count.
* `distance_counter_p2` loads D while P1 is high. It then counts down once per
  clock. Its borrow one count after zero starts the 57-clock P2, and P2 clears
  `pp_seq`.

P2 therefore rises **401 + D clocks** after P1. The standard asks for
404.56 + D clocks, because 50 us is 404.56 clocks. The output thus reads
0.036 nm short at every distance, well inside a ±0.1 nm goal. The original
hardware comes to about −0.03 nm, with scatter from asynchronous oscillators
and gate delays. Here the offset is deterministic. On top of it comes the
crystal tolerance: 0.005 % of the distance.

The longest spacing, at 999.99 nm, is 100400 clocks (12.4 ms), well within
the 40 ms repetition period.

`pp_out` is P1 OR P2, the logic-level pulse pair. The original drove it
through a 7406 open-collector inverter pulled up to 14 V, to get 12 V pulses
into a 12 kΩ load. That analog output stage, the two crystal oscillators, the
switches, the lamps and the incandescent displays are not part of the RTL.
They become ports and clocks.

## Clocks, reset and synchronisation

The original design is asynchronous TTL. It has ripple clocks and one-shots,
and the pushbutton and switch levels go straight into the counters. This
version is fully synchronous. The changes are:

* **Two clock domains.** `clk_rate` (140 kHz) runs everything in
  `range_generator`. `clk_dme` (8.09127 MHz) runs `pulse_pair_converter`. The
  multiplexer and display decoders are combinational.
* **Distance crossing.** The displayed distance goes into the fast domain
  through `bus_sync`. This is a two-flop synchroniser on every bit, plus a
  compare that accepts a value only when two successive samples agree. The
  source changes at most once per 140 kHz period, so this is safe. It adds
  3–4 fast clocks of lag. A step that falls in that window reaches the next
  pulse pair one PRF period later.
* **Inputs.** The rate selector, X2 and the three pushbuttons pass two-flop
  synchronisers in the rate domain. The thumbwheels are only used through
  `bus_sync` or during preset. There is no debouncing, which the set/reset
  behaviour of the latch and preset tolerates.
* **Reset.** `rst_n` is asynchronous and active low, with a synchronous
  release in each domain. It clears every counter and puts the latch outbound.
  The original had no reset.
* **Rate clock.** The rate clock is a one-clock enable pulse, not a
  square wave.
* **PRF oscillator.** The repetition oscillator counts the distance clock
  instead of being a free-running multivibrator. This removes the original's
  half-clock jitter between P1 and the count.

## Top-level interface (`dme_simulator`)

| Port | Dir | Meaning |
|---|---|---|
| `clk_rate`, `clk_dme` | in | 140 kHz and 8.09127 MHz clocks |
| `rst_n` | in | asynchronous reset, active low |
| `thumb` (`thumb_t`) | in | thumbwheel BCD: hundreds, tens, units, tenths |
| `rate_pos` (`rate_pos_e`) | in | `RATE_DIGITAL`, `RATE_0KT`, `RATE_60KT` … `RATE_420KT` |
| `rate_x2` | in | rate multiplier, 1 = ×2 |
| `pb_inbound`, `pb_outbound`, `pb_preset` | in | pushbuttons, active high |
| `seg_n[5]` | out | segments {a..g}, 0 = lit; `[4]` hundreds … `[0]` hundredths |
| `lamp_inbound`, `lamp_outbound` | out | direction lamps, active high |
| `distance` (`dist_t`) | out | distance being sent, five BCD decades |
| `zero_dst` | out | one-`clk_rate` pulse at station passage |
| `p1`, `p2`, `pp_out`, `pp_seq` | out | the pulses, their OR, and the sequence window |

The top has three parameters: `PRF_DIV` (323651), `PULSE_W` (57) and
`DELAY_COUNT` (400). Every other number is fixed by the rate tables above.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each compares the module against an independent reference and ends with
`TB_RESULT checks=N failures=M`:

* `tb_bcd_7seg_decoder`: every code, blanking on and off, against
  segment-letter glyphs.
* `tb_prog_input_logic`: each program, run through a separate shift-register
  model, divides by 50400 / knots.
* `tb_prog_divider`: the seven rate programs plus the ÷2 and ÷4094 table rows,
  with irregular input pulses.
* `tb_rate_control`: 100 or 50 enabled clocks per output, also with random
  gating.
* `tb_range_counter`: 3000 random up / down / preset operations against an
  integer model, including the zero stop and the 999.99 wrap.
* `tb_range_generator`: clocks per 0.01 nm step at every rate, direction,
  station passage, 0 kt stop and hundredths hold.
* `tb_prf_p1_gen`, `tb_delay_50us`, `tb_distance_counter_p2`,
  `tb_pulse_pair_converter`: PRF period, pulse widths, the 400-clock delay,
  and spacing = 401 + D for D from 0 to 99999.
* `tb_dme_simulator`: end to end at the default parameters and real clock
  frequencies. It runs a static 012.3 nm (display and blanking), a preset to
  000.1 nm, inbound at 840 kt through zero, the automatic turn outbound,
  420 kt ×1 and a 0 kt stop. It checks all 21 pulse pairs against the
  displayed distance and counts each mechanism.
* `tb_static_accuracy`: measures the real-time spacing at 0.0 to 999.9 nm
  and converts it back to a distance. The error is −0.036 nm everywhere.
* `tb_rate_accuracy`: measures the real-time step interval at all 14
  speeds. Each reproduces its selected speed exactly.

The RTL also has concurrent assertions. They check that the counter is never
told to count up and down at once, that the range counter holds valid BCD,
that P1 lies inside `pp_seq`, and that the distance count never runs out
while P1 is still loading it. Run with `--assert` to enable them.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/dme_pkg.sv \
    tb/tb_dme_simulator.sv --top-module tb_dme_simulator -o sim
./obj_dir/sim
```

The end-to-end test simulates about 0.9 s of real time, and takes a few
seconds. `tb_rate_accuracy` simulates about 5 s and takes roughly 20 s.

## Limits

* The one-shot widths are exact clock counts. The original's were RC-timed,
  7 ± 3 us.
* The display has no decimal point.
* The lamp outputs are logic levels, not lamp drivers.
* What the counter does above 999.99 nm, and with simultaneous pushbuttons,
  is this design's choice.
* The program words reproduce the original table, not its gate-level
  minimisation.
