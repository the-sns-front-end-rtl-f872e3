# Pulsed-cavity LLRF controller in one 40 MHz FPGA

This is synthesizable SystemVerilog for the digital part of a low-level RF
(LLRF) controller. It holds the field of a 402.5 MHz buncher cavity at a
set amplitude and phase during 1 ms beam pulses. The cavity probe signal is
mixed down to a 50 MHz IF and sampled at 40 MS/s. The FPGA compares each
sample with a set point and applies a complex proportional gain, an integral
gain and a feed-forward waveform. The result goes out through a dual 12-bit
DAC to a vector modulator in front of the RF amplifier. A small host
computer reads and writes everything through a 64K x 16 register window
between pulses.

The design is modelled on the FPGA controller of the SNS Front End MEBT
rebuncher cavities built at LBNL (Virtex-class Spartan-II, 40 MHz, a single
signal-processing clock domain). The structure of the feedback data path
follows that system's published block diagram register for register. Its
widths are 12-bit ADC, a 10-bit error, 11-bit proportional products, a
16-bit integrator, a 512 x 8 feed-forward table and 512 x 16 trace
buffers. The host register map, the pulse sequencer, the self-checks and
many widths and scalings were not published; they are this design's own.
Each is marked as such in the source comments.

## The central idea: never separate I and Q

With a 50 MHz IF sampled at 40 MS/s, the phase advances 450° = 90° (mod
360°) per sample. Four consecutive samples of a steady phasor `I + jQ`
are therefore

    I,  Q,  -I,  -Q,  I,  Q, ...

The 10 MHz reference marks where this period of four starts. The data path
works on this interleaved stream directly. It never demodulates into
separate I and Q channels. Three tricks make that possible:

1. **Set point and offset.** The set point is applied the same way. A
   multiplexer picks `Iset`, `Qset`, `-Iset` or `-Qset` according to the
   phase, and the difference is saturated to 10 bits (`err1`). Over one
   period of four the signal sums to zero, so the sum of four samples
   (`cum`) is four times the ADC offset. `avg = cum/4` is subtracted from
   every sample. This is updated only while the RF is off (auto-offset).
   Without it, the loop would still hold the field: the sign flip below
   turns a constant offset into a ±offset×gain square wave at 10 MHz on
   the drive, and the cavity filters that out. The offset correction
   removes this ripple. In the end-to-end test, a 20 LSB offset gives a
   41 LSB step between successive DAC words without the correction, and
   1 LSB with it.

2. **Complex gain with two real multipliers.** Let `e(n)` be the error
   stream and `kA`, `kB` two real coefficients. Then

       p(n) = kA * e(n) + kB * e(n-1)

   gives, at the four phases,

       phase 0:  kA*I  - kB*Q   =  Re{(kA + j kB)(I + jQ)}
       phase 1:  kA*Q  + kB*I   =  Im{...}
       phase 2: -kA*I  + kB*Q   = -Re{...}
       phase 3: -kA*Q  - kB*I   = -Im{...}

   This is the complex product, still in the `I, Q, -I, -Q` pattern. A
   complex gain (an amplitude and a loop phase) costs two multipliers, not
   four.

3. **The 10 MHz sign flip.** The output must be `I, Q, I, Q` so the DAC
   can split it into two channels. An XOR with the sign in phases 2 and 3
   does this. `loop_sign` inverts the flip, which reverses the loop
   polarity. It is a plain XOR, so a flipped value `v` becomes `-v-1` (one's
   complement). The stream then has a bias of at most 1 LSB, which is below
   the noise.

After the flip the stream is `I, Q, I, Q` with a period of two. The
integrator has **two registers in its loop** (`int1`, `int2`), so its
feedback path is two clocks long. The I samples therefore accumulate only
I, and the Q samples only Q: two integrators in one.

The feed-forward table is added *inside* the integrator loop, so its
8-bit entries are *increments*. The integrator turns a short table of
slopes into a smooth 16-bit drive waveform. With feedback disabled, the
controller becomes a programmable pulse generator.

## Data path (`llrf_datapath`)

```
adc ─► samp ─┬──────────────────────────────► trace buffer 0
             ├─► cum (4-sample sum) ─► avg
             └─(−)─ setp(phase) + avg
                 └─► sat10 ─► err1 ─► err2
                              │        │
                            kA*·     kB*·        (loadable multipliers)
                              └──(+)───┘
                                  sat10 ─► XOR flip, feedback enable ─► err3 ─────────────┐
                                                                          │               │
                                                                        KI*·              │
                                                           int2 ─(+)─► int1 ─(+ ff)─► sat16/clear ─► int2
                                                                                          │
                                                             dout = sat12(err3 + int2>>>4) ◄┘
```

| register | content |
|---|---|
| `samp` | input latch of the ADC word |
| `cum`, `avg` | 4-sample sum restarted at phase 0; `avg = cum>>>2`, loaded while `offset_en` |
| `err1` | `sat10(samp - (setp + avg))` |
| `err2` | `err1` one clock earlier (the neighbouring I or Q sample) |
| `err3` | `fb_en ? sat10(kA*err1 + kB*err2) ^ flip : 0` |
| `int1` | `int2 + (int_en ? KI*err3 : 0)` |
| `int2` | `clear ? 0 : sat16(int1 + ff)` |
| `dout` | `sat12(err3 + int2 >>> 4)` |

**Latency.** An ADC word presented in clock *t* is in `dout` after the
fourth clock edge (`samp`, `err1`, `err3`, `dout`). The DAC interface
then adds one or two clocks to pair I with Q. ADC word to DAC register
therefore takes 5 to 6 clocks, 125 to 150 ns. The original system budgets
250 ns for ADC, FPGA and DAC together. It quotes a total loop delay of
1.1 µs, of which 680 ns are cables and the 20 kW amplifier.

**Scaling** (own choices). Errors and proportional outputs count in DAC
LSBs. A coefficient of 256 is a gain of 1.0: the products are
`(k*e) >>> 8`, and 10-bit coefficients give a gain range of ±2. `int2`
carries 4 fractional bits relative to the DAC LSB. Each time a table
entry is played (every second clock for its channel) it therefore adds
1/16 DAC LSB per unit to the drive.

## Loadable constant-coefficient multipliers (`dkcm`)

FPGA constant multipliers ("KCM") store the multiples of the constant in
look-up tables. If the tables are writable, the constant can change at run
time. `dkcm` keeps a 16-entry table `0*k … 15*k` and forms
`x*k` as three look-ups for input bits [3:0], [7:4] and [9:8], shifted by
0, 4 and 8, minus `k<<10` when the sign bit is set. No hardware multiplier
is used. A `load` pulse rebuilds the table by repeated addition, one entry
per clock. For those 16 clocks `busy` is high and the output is forced to
0. Coefficients are meant to change between pulses. The host writes
`KPA`/`KPB`/`KI`, and each write starts a reload in the 40 MHz domain.

## Pulse sequence and the host (`timing_fsm`, `host_interface`)

The external RF gate is the trigger. The same gate also cuts the RF output
in hardware, outside this logic. The sequencer has three states:

* **IDLE**: waiting. The integrator is held at zero. While the ADCs are
  awake, the offset estimate is updated (`quiet`).
* **PULSE**: the gate is high. Feedback, integration and feed-forward
  run. The four trace recorders start at the trigger. A gate longer than
  `MAX_PULSE` (65535 clocks, 1.64 ms) ends the pulse and is flagged.
* **TAIL**: `TAIL` clocks after the gate falls, so the recorders can
  still capture the decay. At its end, the end-of-pulse interrupt `irq`
  rises.

The host software exchanges its data during the gap (about 15 ms at 60 Hz)
and then writes `HANDSHAKE`, which drops `irq`. A trigger that arrives
while `irq` is still high means the software did not keep up. It latches
a *handshake error*. Latched errors are collected in `ERRORS`, which is
read-and-clear. A read returns each error once, and an event in the same
clock as the read is kept for the next read.

ADC power saving: with `WAKE` ≠ 0 the ADCs sleep (`adc_pdn`) from the
interrupt until `WAKE`×64 clocks after the last trigger. The converters
need about 40 µs to wake, so `WAKE` is set to the expected pulse period
minus that margin.

### Register map (16-bit words)

| address | name | access | content |
|---|---|---|---|
| 0x0000 | CTRL | r/w | bit0 run, 1 feedback enable, 2 integrate enable, 3 loop sign, 4 offset tracking, 5 feed-forward enable |
| 0x0001 / 0x0002 | ISET / QSET | r/w | set point, signed 12 bit |
| 0x0003 / 0x0004 | KPA / KPB | r/w | complex proportional gain kA + j kB, signed 10 bit, 256 = 1.0 |
| 0x0005 | KI | r/w | integral gain, signed 10 bit |
| 0x0006 | FF_DWELL | r/w | each feed-forward pair is used for (dwell+1) sample pairs |
| 0x0007 / 0x0008 | TR_DECIM / TR_DELAY | r/w | trace: store every (decim+1)-th sample, starting `delay` samples after the trigger |
| 0x0009 | TAIL | r/w | clocks recorded after the gate falls |
| 0x000A | WAKE | r/w | ADC wake time after a trigger, in 64-clock units; 0 = never sleep |
| 0x000B | TRIG_MAX | r/w | trigger watchdog: longest allowed time between triggers, in 64-clock units; 0 = off |
| 0x0010 | STATUS | r | bit0 irq, 1 multiplier reload busy, 2 sync locked, 3 ADCs asleep |
| 0x0011 | ERRORS | r, clears | bit0 integrator saturated, 1 missed handshake, 2 gate too long, 3 sync lost, 4 40 MHz clock lost, 5 trigger missing or erratic |
| 0x0012 | HANDSHAKE | w | software has finished with this pulse |
| 0x0013 | PULSES | r | pulses since reset |
| 0x1000–0x17FF | TRACE0..3 | r | four 512-word trace buffers (probe, forward, reflected, spare) |
| 0x2000–0x21FF | FF | r/w | feed-forward table: even address = I increment, odd = Q increment |

Bus timing: `h_wr` or `h_rd` is a one-clock strobe on `h_clk`.
`h_rdata` is valid during the following clock.

## Buffers

* `trace_buffer` (512 x 16, one per ADC): sign-extended raw samples. The
  defaults (no delay, no decimation) cover the first 12.8 µs after the
  trigger. That suits a leading-edge record, such as the ~500 points a
  detuning fit of the reflected wave uses. `TR_DECIM = 78` spreads the 512
  words over a full 1 ms pulse.
* `ff_buffer` (512 x 8): 256 I/Q increment pairs. Each pair is played for
  (dwell+1) sample pairs, and the last pair is held. `FF_DWELL = 78`
  stretches the table over 1 ms. Playback always starts on an I entry, so
  both channels see every pair equally often wherever the trigger falls in
  the 10 MHz cycle.

Both have a write or read port on the host clock and the other port on the
40 MHz clock. The host accesses them only between pulses. Together with the
multiplier tables this is about 4.6 kB of RAM. The original FPGA could hold
6 kB.

## Clocks and self-checks

The signal processing runs in one 40 MHz domain. The register file runs on
the 25 MHz host bus clock. Configuration registers are used across the
boundary without synchronisers: they change only between pulses, and the
handshake confirms that the host kept to that. Single events cross with
two-flop toggle synchronisers (`toggle_sync`): reloads, the handshake,
and the error events. The status levels pass two flops.

* `sync_monitor` derives the phase of each sample from the 10 MHz
  reference. It flags an edge at the wrong place or no edge within 8
  clocks. `SYNC_ALIGN` (parameter of `llrf_top`) sets which phase the
  sample after a sync edge has. It depends on the board and its cabling.
* `clock_monitor` measures the 40 MHz clock in host clocks: a divided
  toggle must change every 7 to 13 host clocks (nominally 10).
* The timing state machine checks the gate length and the handshake. It
  also watches the trigger. No trigger within `TRIG_MAX`×64 clocks of the
  previous one is a missing trigger; it is reported once per gap. A gate
  edge while the previous pulse is still in its tail is an erratic trigger;
  it is reported and ignored.
  The data path reports integrator saturation, at most once per pulse.

## Top level (`llrf_top`)

`llrf_top` has four ADC inputs. ADC 0 (cavity probe) drives the loop.
ADCs 1–3 (forward, reflected, spare) are only recorded. The top also
carries the 10 MHz sync, the RF gate, the DAC pair with its write strobe,
ADC power-down, the interrupt and the host bus. Feedback, integration and
feed-forward are enabled only in PULSE. The integrator is cleared outside
it.

## What is not here

The analog and bought parts are outside this RTL: ADCs, DAC, IF mixers,
LO amplifier, vector modulator, PIN-diode RF switch, clock distribution,
amplifier and cavity. So are the host computer and its software, including
the detuning fit and the stepper-motor tuner loop. The testbench models the
loop outside the FPGA with a single-pole cavity (`tb/cavity_model.sv`).
The original system also had a JTAG path from the host for loading the
FPGA. Here that is a property of the board, not logic.

## Departures and own choices, in one place

* All addresses, control bits and the bus protocol are invented. The
  original had a 64K x 16 window, but its map was not published.
* Coefficient width (10 bit) and scaling, `cum/4`, the output weight of
  `int2` (>>>4), and the saturation of the proportional sum to 10 bits
  are own choices. The drawing gives only the register widths.
* The one's-complement XOR flip is kept as drawn, not replaced by a true
  negation.
* The sequencer states, tail, gate limit, ADC sleep timing, sync, clock
  and trigger check methods and the feed-forward pair layout and dwell are own choices.
* The spare fourth ADC channel is only recorded.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. For example, the whole system:

```
verilator --binary --timing -Wno-fatal --top-module tb_llrf_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/llrf_pkg.sv tb/tb_llrf_top.sv
./obj_dir/Vtb_llrf_top
```

Any other block works the same way with its `tb_<block>.sv`. The package
`rtl/llrf_pkg.sv` must come first.

| testbench | what it shows |
|---|---|
| `tb_llrf_top` | Closed loop through the cavity model at default sizes, with a 20-LSB ADC offset. The field settles to 998.5/1000 at −0.09° with 1 LSB of drive ripple. It stays within 1 % / 1° under a beam-loading step. Traces match the ADC words exactly. The open-loop feed-forward waveform reaches the integral of the table. Missed handshake, sync loss, integrator saturation, over-long gate and a stopped 40 MHz clock, a gate glitch in the tail and a missing trigger are each flagged. ADCs sleep and wake on time. Every mechanism is counted. |
| `tb_llrf_pulse_1ms` | Two whole 1 ms pulses at default sizes. Closed loop with a chopped beam (650 ns in every 950 ns): the field stays within 0.8 % and 0.1° outside the 50 µs after the beam comes on. A trace decimated by 79 covers the pulse and matches the ADC words. A feed-forward ramp with `FF_DWELL = 78` runs for the whole pulse and then holds. |
| `tb_llrf_datapath` | A clock-by-clock arithmetic reference model, with real multiplies and random stimulus, gains and control changes. Offset cancellation, the complex gain product and the 4-clock latency. Separate I/Q feed-forward ramps. |
| `tb_dkcm` | Table multiply against a true multiply, corners included; 16-clock reload. |
| `tb_trace_buffer`, `tb_ff_buffer` | Recorded words against the sample schedule; playback against a pointer model, starting on I or on Q. |
| `tb_timing_fsm`, `tb_host_interface` | Trigger latency, pulse and tail lengths, interrupt and handshake, trigger watchdog, error latching and read-and-clear, register read-back. |
| `tb_sync_monitor`, `tb_clock_monitor`, `tb_toggle_sync`, `tb_dac_interface` | Phase tracking and fault detection, clock-rate window, event crossing, I/Q pairing at 20 MS/s. |

Each system test simulates about 0.1 million 40 MHz clocks, which takes
well under a second in Verilator.
