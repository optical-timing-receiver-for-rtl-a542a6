# SBET: a picosecond event-timing digitizer for laser ranging

This is the logic of a multiple-stop event timer built for satellite laser
ranging. Once a mission starts, it runs as a clock. It counts 20 ns periods
of a 50 MHz reference for up to about 130 days. Every accepted event is
stamped with its time since the mission start, in steps of
20 ns / 1024 = 19.53 ps. Events include a laser start, an echo stop, or a
calibration marker.

Every event passes through the same single channel, so any drift affects
all events alike and cancels in the differences. A stop is accepted only
inside an aperture that the host sets: a range delay after the start,
followed by an open window. A stop caught in that aperture is tagged. The
host reads each 60-bit result over a CAMAC dataway.

The sub-clock fraction of each event is measured by an analog **tandem
interpolator**. This repository does not include it. The RTL sends it the
stretcher busy, clear and power-on lines and gets back three clock-aligned
pulses, T1, T2 and T3. Everything else is synchronous logic on one 50 MHz
clock:
- the counters that turn those pulses into picoseconds
- the mission clock
- the range and aperture counters
- the event and buffer registers
- the CAMAC command logic
- the frequency divider and the calibrator

## How an event time is formed

Take a mission start at time `a` and a later event at time `k`. Each one
gets three numbers.

1. **Whole clock periods.** T1 rises on the second clock edge after the
   event. The mission counter counts clocks from the mission start's T1 to
   the event's T1.
2. **Coarse fraction.** The time from the event to its T1 (one to two clock
   periods) is stretched 32 times by the coarse stretcher. Its length is
   counted in clock periods, giving the *coarse count* `N` in units of T0/32.
   T2 marks the end of the coarse count.
3. **Fine fraction.** The part of the coarse discharge that falls short of a
   whole clock is stretched 32 times again, giving the *fine count* in units
   of T0/1024. T3 falls at its end.

The time of the event relative to the mission start is then

    D = 1024·M + 32·(N_start − N_event) + (F_event − F_start) + C

Here M is the mission count, N are coarse counts, F are fine counts, and C
is a constant. The design never subtracts explicitly: the subtraction
happens in the counters themselves.

- At the mission start, the first strobe of the auxiliary counter (see
  below) copies the *complement* of the coarse count into the Coarse
  Register. It copies the fine count itself into the Fine Register. Both
  registers keep these values for the whole mission.
- Every Event Clear loads the Coarse Register back into the Coarse Counter
  and the complement of the Fine Register into the Fine Counter.
- The next event's coarse pulses are counted on top of `~N_start`. The
  counter output is inverted on its way to the Adder, which gives
  `N_start − N_event`. The fine pulses are counted on top of `~F_start`,
  which gives `F_event − F_start − 1`.
- The Adder (`adder.sv`) joins these with the low two mission-count bits
  and produces bits 6–12 of the word. It passes a carry into the mission
  count above.

**Signed adder: a departure from the original logic.** Both differences can
be negative. In the original arrangement they are added as unsigned 7-bit
numbers. That adds four clock periods whenever the event's coarse count
exceeds the mission start's, and the fine term can wrap in the same way.
This design reads both 7-bit values as two's complement and sign-extends
them. Their magnitude is always below 50. The Adder can therefore carry +1
into bit 13, or borrow 1 from it (`ad13`, `ad13_borrow`), and the Event
Register applies it to the mission count bits. With this change every event
comes out right to ±2 LSB.

**Constant offset.** With the reference interpolator model, a later event's
word is

    D = 1024 · (t_event − t_mission) / 20 ns − 1025     (±2 LSB)

The −1025 is the pipeline constant C. It cancels in the difference between
any two events, which is the quantity a ranging system uses.

**Mission start word.** The mission start is also stored and read out. Its
word is not zero: it holds the mission's own phase constant, which varies
from mission to mission over about 1024 LSB. It is useful for relating the
divider outputs to the mission, not as a time.

### The auxiliary counter keeps the mission clock running

While an event is processed, its mission count must stay frozen until it
has been copied. The mission clock itself must not lose a count.
`aux_mission_counter.sv` solves this as follows:

1. On the Auxiliary Counter Start, which is T1 before T2, the mission train
   is steered into an 8-bit Auxiliary Counter (AC). The mission counter
   holds still.
2. At the AC's 128th count (2.56 µs) the Event Register is strobed. At the
   same moment, one count is added to binary 19 of the mission counter. That
   single count is worth the 256 clocks the mission counter misses during
   the event. For the first event of a mission, this strobe also loads the
   Coarse and Fine Registers.
3. At the 256th count (5.12 µs) the train goes back to the mission counter,
   which is now exactly right, and Mission Counter Ready is raised.

Mission Clear presets the whole 49-bit mission count to all ones, which is
−1.

## The 60-bit event word

| Bits (D1 = bit 0) | Content |
|---|---|
| D1–D5 | fine count Fc1–Fc5 |
| D6–D12 | Adder output: fine Fc6–Fc7 + coarse + Mc11–Mc12 |
| D13–D59 | mission count Mc13–Mc59, plus the Adder carry or borrow |
| D60 | stop tag: the event was a stop accepted inside the aperture |

`D1–D59` is a 59-bit count of 19.53 ps steps. 2^59 × 19.53 ps is 130.3 days.
The host reads the word on R1–R16 with F(0)A(0), F(0)A(1), F(0)A(2) and
F(0)A(3); the last sub-address carries D49–D60. It uses F(2) instead of F(0)
on the last read to free the buffer.

## Event flow and dead time

| Clocks after the event | What happens |
|---|---|
| 0 | stretcher Busy latch set, asynchronously, by the accepting gate |
| 1–2 | T1 on the 2nd clock edge; the AC takes the mission train |
| +16…48 | coarse train (T1 to T2) |
| +16…48 | fine train (T2 to the fall of T3) |
| 129 | Event Register strobe; +256 counts added to the mission count |
| 257 | Mission Counter Ready |
| +1 | Buffer Register strobe if the buffer is free; LAM set |
| +1 | Event Clear: interpolator, Busy, and counters reloaded for the next event |

The dead time is therefore about 262 clocks, or 5.24 µs.

If the Buffer Register is still full (LAM not yet cleared), the event waits
in the Event Register. The EVENT light is then on and the inputs stay busy.
The event moves as soon as the host frees the buffer with F(2)A(3)S2 or
F(10)A(0)S2, or by EXT. CLEAR or the BUFFER CLEAR button. While the button is
held, the buffer stays clear and the event waits. When the button is
released, the event moves.

## Range and aperture

`range_enable_counter.sv` holds three things:
- a 24-bit Range Counter
- a 12-bit Enable Counter
- the RC/EC Register, which keeps a copy of both

The host loads them with F(16)A(0) and F(16)A(1). S1 loads only the
register. S2 loads the register and the counter.

The T1 of an event starts the count-down, one step per 20 ns. When the
Range Counter reaches zero, STOP ENABLED (and GATE OUT) rises and the
Enable Counter counts the aperture down. When it ends, both counters reload
from the RC/EC Register, so the same aperture follows the next start
without host traffic.

A stop that arrives while STOP ENABLED is high is accepted and tagged in
D60. A stop enabled instead by the one-shot F(26)A(7) command is not
tagged. Loading zero into both counters turns the aperture off.

## CAMAC commands

The three stations share the dataway. X and Q are active high and ORed
between the stations. S1 and S2 are one-clock pulses on `clk`.

| Station | Command | Action |
|---|---|---|
| Clock | F(26)A(0)S1 / F(24)A(0)S1 / Z·S1 | start / stop and clear the frequency divider |
| Stretcher | F(26)A(0)S1 / F(24)A(0)S1 / Z·S1 | power on / stand-by / power on |
| Stretcher | F(25)A(0)S1 | start the mission from the computer |
| Stretcher | F(27)A(0) | Q = Power On latch |
| Logic 3 | F(0)A(0–3), F(2)A(0–3) | read D1–D16, D17–D32, D33–D48, D49–D60 |
| Logic 3 | F(2)A(3)S2, F(10)A(0)S2 | clear LAM, free the buffer |
| Logic 3 | F(2)A(7)S2, Z·S2 | Mission Clear |
| Logic 3 | F(8)A(0) | Q = LAM latch AND LAM enable |
| Logic 3 | F(16)A(0)/A(1), S1 or S2 | load range / enable (W1–W24) |
| Logic 3 | F(26)/F(24) A(0)S2 | LAM enable on / off |
| Logic 3 | F(26)/F(24) A(1)S1 | Time Readout latch (enables Mission Start input) |
| Logic 3 | F(24)/F(26) A(2)S1 | Mission Enable gate input needed / not needed |
| Logic 3 | F(26)/F(24) A(3)S1 | Mission Enable: accept one mission start |
| Logic 3 | F(24)/F(26) A(4)S1, A(6)S1 | Start / Stop Gate input needed / not needed |
| Logic 3 | F(26)/F(24) A(5)S1, A(7)S1 | accept one start / one stop event |
| — | C·S2 | clear LAM, stretcher, Event and Buffer Registers; the mission keeps running |

The rear-panel switch of Logic 3 has three positions:
- **NEUTRAL**: normal operation.
- **ENA**: the Mission Start input is always open. Every later pulse there is an event of the same mission.
- **TEST**: a stop watch. The first pulse starts a mission, the next is an event, then a Mission Clear follows automatically.

Shorting the auto-clear pins (`auto_buffer_clear`) dumps every event as
soon as it reaches the buffer.

The MISSION CLEAR input clears the mission, the LAM latch and both
registers. EXT. CLEAR and the BUFFER CLEAR button only free the buffer: the
buffer then counts as empty and takes the next event, but its old contents
are not zeroed.

## Clock, divider and calibrator

`freq_divider.sv` derives phase-locked outputs from the 50 MHz clock:

| Output | Frequency |
|---|---|
| f12 | 5 MHz |
| f13 | 1.25 MHz |
| f8 | 128 Hz |
| f9 | 64 Hz |
| f10 | 8 Hz |
| f11 | 1 Hz |
| f11s / MISSION START | 1 Hz, one clock wide |

All stages are held at zero while the divider is off. All outputs therefore
rise together on the first clock after F(26)A(0)S1. Wiring MISSION START to
the Mission Start input starts the mission in a known phase with every
output.

`calibrator.sv` gives marker pulses every 2^(3n−1) reference periods for
switch positions n = 1–10, from 80 ns up to 10.7 s at 50 MHz. Position 11
is the optional 2^32 range (85.9 s), and 0 is off. START, STOP and SYNC all
carry the same marker.

## Files

| File | Contents |
|---|---|
| `rtl/sbet_pkg.sv` | widths, CAMAC function codes, switch enums |
| `rtl/sbet_digitizer.sv` | top level; the interpolator lines are ports |
| `rtl/stretcher_control.sv` | input gates, Busy latch, Power On latch, stretcher CAMAC decoding |
| `rtl/control_logic.sv` | Mission, Event Enable, Range, Coarse, Fine and End-of-Conversion latches; the trains |
| `rtl/range_enable_counter.sv` | range and aperture counters and their register |
| `rtl/coarse_counter.sv`, `rtl/fine_counter.sv` | coarse and fine counters and registers |
| `rtl/aux_mission_counter.sv` | Auxiliary Counter, Mission Counter 1, event strobes |
| `rtl/mission_counter2.sv` | mission count bits 20–59 |
| `rtl/adder.sv` | signed low-word adder |
| `rtl/event_register.sv`, `rtl/buffer_register.sv` | the two 60-bit registers |
| `rtl/led_display.sv` | front-panel LED groups |
| `rtl/camac_logic.sv` | Logic 3: command latches, LAM, event hand-off, Mission Clear, read mux, modes |
| `rtl/freq_divider.sv`, `rtl/calibrator.sv` | Clock and Calibrator module |
| `tb/tandem_interpolator_model.sv` | timing model of the analog interpolator, used only in simulation |

## The analog interpolator interface

`tb/tandem_interpolator_model.sv` documents what the logic expects from the
interpolator:
- On a rise of `interp_busy`, T1 goes high just after the second clock edge.
- T2 and T3 go high together just after a later edge. The number of clocks
  from T1 to T2 is the coarse count.
- T3 falls at an arbitrary time. The number of clocks from T2 to that fall
  is the fine count.
- All three drop after a clock in which `interp_clear` is high.

Each stretcher starts charging half a clock period (10 ns) after its start
signal, so each count stays between 16 and 48. The signed adder relies on
these counts staying well inside ±63.

## Verification

Each module has a self-checking testbench, `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
To build and run one with Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/sbet_pkg.sv \
        tb/sbet_digitizer_tb.sv --top-module sbet_digitizer_tb -o sim && ./obj_dir/sim

**End-to-end test.** `sbet_digitizer_tb` runs the top at full size with no
parameter overrides, in about 1 s of simulated time (about a minute of
Verilator run time). Every event time is
random to 1 ps. Each word is compared with the true time to ±2 LSB. The
test covers:
- missions started from the panel and by F(25)
- start events, with LAM and F(8) checked
- stretcher stand-by
- four range/aperture cycles with tagged stops, three of them after the automatic reload
- the buffer-full hold and its release
- the BUFFER CLEAR button
- C·S2
- TEST and ENA modes
- calibrator markers, exact to the LSB
- a rate test and an interval test (below)
- a mission started by the divider's own MISSION START output; the next
  1 Hz pulse must read exactly 50,000,000 clock periods

It counts how often each of these happens. A mechanism that never occurs
counts as a failure.

**Rate and interval tests.**
- Rate: markers come every 5.12 µs with the buffer dumped automatically.
  This is shorter than the dead time, so every second marker is recorded,
  10.24 µs apart.
- Interval: uncorrelated pulses come 32.768 µs apart in TEST mode. Every
  interval reads 1677720–1677723 LSB (the exact value is 1677721.6),
  whatever the phase of the mission start.

**Short divider test.** `freq_divider_tb` uses two /5 stages instead of
seven, to keep its run short. All other testbenches use the default sizes,
or check the same rule at a small and a large size.

## Choices where the original is silent, and limits

- **Clocking.** Everything is synchronous to one clock. The original latches
  are clocked set/reset flip-flops, with reset taking priority. The one
  exception is the stretcher Busy latch: it is set asynchronously so that
  the event time is not quantised.
- **Registered control.** Mission Clear is registered, so it comes one clock
  after its cause. Event Clear comes one clock after the buffer strobe.
- **Divider and calibrator.** They are synchronous counters with clock
  enables. The 5 ns MISSION START spike is one clock wide here. f8 has an
  odd period (5^7 f1 periods) and is high for its first (5^7+1)/2.
- **Calibrator switch.** The 32-bit counter is held at zero while the switch
  is off. Position 11 stands for the optional range K.
- **Range reload.** The reload from the RC/EC Register happens when the
  aperture closes. Range and aperture both count down once per clock.
- **Stop tag.** The tag is set when Busy rises while STOP ENABLED is high.
- **Not in the RTL.**
  - the analog parts: oscillator and shaping, both stretchers and their
    synchros, and the switched supply of the stretcher
  - the CAMAC crate controller and the host

  Their connections are ports of the top.
- **Accuracy.** The logic is exact: its error against the interpolator
  model is at most ±2 LSB, from the 7-bit quantisation. Jitter, linearity
  and temperature drift belong to the analog interpolator and are not
  modelled.
