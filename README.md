# Beam charge and RF phase monitor firmware

This FPGA logic measures how much electron charge passes four points of an
injector chain: the linac-to-booster transfer line (TL1), the booster (SY), the
booster-to-storage-ring transfer line (TL2) and the storage ring (SR). A
stripline pickup at each point gives a signal at the 352.2 MHz accelerating
frequency. A narrow band-pass filter stretches each bunch's signal in time.
Four 12-bit ADCs then sample it at 108 MHz. The logic demodulates each signal
and integrates it over a programmable time window placed after a timing pulse.
The size of the integrated vector is proportional to the charge that passed.
Ratios between locations give the transfer efficiencies. Two engines can measure
at the same instant, so the logic can also give the RF phase of the booster beam
relative to the storage ring beam.

The design follows the charge monitor built at the ESRF on a commercial BPM
electronics (Libera Electron, Virtex-II Pro FPGA). This repository has a
SystemVerilog model of that firmware's structure. The widths, encodings,
handshakes and the address map are this design's own choices. They are listed
under "Where this design departs or fills gaps" below.

## Signal chain

```
 adc[0..3] ──► channel mux ──► × gain ──► mixer ──► integrator ──► CORDIC ──► result
 (12 bit)      (per row)      (0..15)     ▲          ▲ window        amp, phase
                                          │          │
                               nco (shared by both engines)   window_gen ◄── trig_timebase
```

* **Undersampling.** 352.2 MHz sampled at 108 MHz aliases to 352.2 − 3·108 =
  28.2 MHz. The analog front end removes the other images. The logic only sees a
  tone near 28 MHz whose amplitude follows the beam.
* **Local oscillator (`nco`).** A 32-bit phase accumulator drives a 1024-entry
  quarter-wave sine table. The phase is used to 12 bits, giving under 0.05° of
  truncation error, and the amplitude is 16 bits. The frequency word is a
  register. Its reset value is 28.0315 MHz at a 108 MHz clock. The oscillator is
  deliberately *not* locked to the beam. It only has to be within a few kHz of
  the IF, so the demodulated vector turns slowly, and over a window of a few µs that costs
  almost nothing. The absolute phase of one measurement therefore means
  nothing. Both engines share the one oscillator, so the *difference* of two
  simultaneous measurements is the true beam phase difference.
* **Mixer (`iq_mixer`).** I = x·cos, Q = −x·sin, scaled by 2⁻¹⁵ and rounded to
  nearest. Truncating instead would add −½ LSB to every I and Q sample. Over a
  window that sums to a fixed offset vector of N/2 LSB, and the amplitude error it
  causes depends on the beam's phase. That is harmless for one charge
  measurement, but it spoils the small differences that efficiencies are made of.
* **Integrator (`iq_integrator`).** 40-bit sums that cannot overflow for any
  window the 24-bit timebase can express.
* **Amplitude/phase (`cordic_vec`).** An iterative vectoring CORDIC: 20
  iterations, one per clock, with 8 guard bits. The CORDIC gain is removed by a
  single constant multiplication. Phase is atan2(Q, I) with 65536 units per turn.

For a tone of amplitude A (ADC counts) present for all N samples of a window,
with gain G, the amplitude result is about A·G·N/2. Turning that into coulombs
needs the cable losses and pickup geometry. The original system calibrated
against a current transformer on the storage ring. That calibration is done by
software and is not part of this logic.

**Accuracy limit: the double-frequency term.** Mixing also makes a component at
f_IF + f_LO ≈ 2·f_IF. At 28 MHz / 108 MHz this is close to half the sample rate,
so a plain integrator rejects it poorly. Its leftover depends on where the
window starts and is at most about 1/(N·sin(2π·f_IF/f_s)) of the amplitude. For
windows of a few hundred samples this is a few per mille. One charge measurement
hardly notices it, but a storage-ring charge *increase* of a few percent, taken
as the difference of two such windows, does. There are two remedies. You can
use longer windows. Or you can choose window lengths N and an oscillator
frequency f for which 2·f·N/f_s is an integer. For example, f = 316/1216 · f_s =
28.066 MHz with N = 608: the leftover then cancels over the window.

## Measurement schedule, engines and timing

This part needs the most care when you use the design.

**Triggers.** `trig_timebase` takes two asynchronous pulses: the linac trigger,
which starts an injection cycle, and the booster extraction pulse. Each passes a
two-flop synchroniser and a rising-edge detector. For each source it keeps a
saturating 24-bit count of clocks since the pulse: 155 ms at 108 MHz. It also
keeps a flag saying whether the pulse has occurred in the current cycle. A
linac pulse clears the extraction flag. Time 0 is the third clock after the
pulse's rising edge is sampled.

**Table rows.** The host writes a list of measurements into `msmt_table`. Each
row holds:

| field  | bits | meaning |
|--------|------|---------|
| trig   | 1    | 0 = time from linac trigger, 1 = time from extraction |
| sig    | 2    | ADC channel: 0 TL1, 1 SY, 2 TL2, 3 SR |
| dsp    | 1    | engine that runs it |
| gain   | 4    | integer factor applied to the sample |
| start  | 24   | window opens at this time (clocks) |
| stop   | 24   | window closes at this time (clocks) |
| fe_set | 1    | apply this row's front-end setting when it is set up |
| switch, att1, att2 | 4 + 2·20 | crossbar switch and the two attenuators (5 bits per channel) |

The window integrates exactly the samples taken while the selected time runs
from `start` to `stop − 1`. A window of 0.19–2.18 µs is therefore start = 21,
stop = 235 (µs × 108, rounded).

**Sequencer (`msmt_sequencer`).** On each linac trigger, if enabled, it walks
rows 0 … NUM−1 in order. For each row it waits until the named engine is idle,
then hands the row over. An engine that gets its row early waits for its
selected trigger and start time. An engine therefore runs its rows one after
another, so **rows must be listed so that each engine's windows follow one
another in time**. Between two windows on the same engine there must be room
for the CORDIC and the hand-over: about CORDIC_ITER + 10 clocks, roughly 0.3 µs.
The reference schedule that this design was checked with alternates rows
between the engines. It measures the booster and the storage ring together on
engines 1 and 0, and the transfer lines shortly after their trigger.

* If an engine receives its row after the row's start time has passed, the
  window opens at once (shortened). The result and STATUS then carry a **late**
  flag.
* If a linac trigger arrives before the previous pass has finished, it is
  ignored and STATUS shows **overrun**.
* When both engines offer a result in the same clock, engine 0 is written
  first.
* When every row has been handed out and both engines are idle again, the cycle
  counter increments and `cycle_done` pulses.
* **Front end.** The crossbar switch and attenuator outputs follow the SWITCH,
  ATT1 and ATT2 registers. A row with `fe_set` replaces them with its own
  setting from the clock after the row is handed out. That setting holds until
  another such row is handed out or the pass ends. The front end is shared by
  both engines, so change it only where no window of the other engine is open.

**Latencies.** Trigger edge to time 0: 3 clocks. End of window (time = stop) to
result offered: CORDIC_ITER + 5 clocks, and one more clock until it is in the
result buffer. Host reads return data one clock after the address.

## Host interface

The host uses a synchronous word bus: `host_addr` (12 bit), `host_we`,
`host_wdata`, `host_rdata` (32 bit, one clock read latency).

| address       | name    | contents |
|---------------|---------|----------|
| 0x000         | CTRL    | [0] enable |
| 0x001         | NUM     | rows per cycle, 0..256 (larger values are clamped) |
| 0x002         | NCO     | oscillator increment, f = NCO / 2³² · f_clk (reset 1114762738 = 28.0315 MHz) |
| 0x003         | SWITCH  | [3:0] RF crossbar switch setting to the front end (reset 12) |
| 0x004 / 0x005 | ATT1 / ATT2 | two RF attenuators, 5 bits per channel, A in [4:0] … D in [19:15] (reset 10) |
| 0x006         | CYCLES  | completed injection cycles (read only) |
| 0x007         | STATUS  | [0] busy [1] overrun [2] late [3] front end set by a row; any write clears [2:1] |
| 0x400 + 4r    | row r word 0 | [31] trig [30:29] sig [28] dsp [27:24] gain [23:0] start |
| 0x401 + 4r    | row r word 1 | [23:0] stop |
| 0x402 + 4r    | row r word 2 | [31] fe_set [23:4] att1 [3:0] switch |
| 0x403 + 4r    | row r word 3 | [19:0] att2 |
| 0x800 + 8r + w | result of row r | w = 0/1 I low/high, 2/3 Q low/high (sign-extended), 4/5 amplitude low/high, 6 [31] late [15:0] phase, 7 number of the cycle that produced it |

The table RAM has no reset. Write all four words of every row you run.

A result stays in its row until a later cycle overwrites it. Word 7 tells the
host which cycle a result belongs to. Read the results after each `cycle_done`.

## Files

| module | role |
|--------|------|
| `charge_pkg` | sizes, row/result structs, address map, reset values |
| `charge_top` | top level; ports: `adc`, two trigger pulses, host bus, front-end controls |
| `trig_timebase`, `nco`, `msmt_table`, `msmt_sequencer`, `result_buffer`, `host_regs` | one instance each |
| `dsp_eng` | two instances, each containing `iq_mixer`, `window_gen`, `iq_integrator`, `cordic_vec` |

Each `rtl/` file starts with a description of its function, interface and
timing. `tb/tb_<module>.sv` is a self-checking testbench for each module. Each
one prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert rtl/charge_pkg.sv rtl/*.sv tb/tb_charge_top.sv \
          --top-module tb_charge_top -Mdir obj && obj/Vtb_charge_top
```

(Verilator ignores the duplicate `charge_pkg.sv`; listing it first only makes
sure the package is read before its users.) Swap in another testbench name to
run a unit test.

`tb_charge_top` runs the whole design at its default sizes. It drives the ADCs
with a beam model: a tone 2 kHz off the oscillator frequency per channel, with
its own phase, gated by when beam is present at each location. It loads a
16-row schedule for one injection cycle in 16-bunch mode:

* booster and storage ring windows from 2.96 µs to 38.8 ms after the linac
  trigger;
* TL2 and storage ring windows up to 37 ms after an extraction placed 50 ms
  after the linac trigger.

It runs about 9.4 million clocks, about 10 s. It reads every result back over
the host bus and checks three things against its own reference:

* each amplitude, within 0.5 %;
* the booster-minus-storage-ring phase of the five simultaneous pairs, within
  1.5°;
* the cycle tags.

A second, short cycle forces a late arm, an overrun and two results in the same
clock. One of its rows carries its own front-end setting. The test checks that
the outputs take that setting and return to the registers afterwards.

`tb_injection_series` runs 41 injection cycles in 16-bunch mode with the schedule
compressed in time. The extraction pulse comes 20 µs after the linac trigger. The
injected charge, the transfer efficiencies and the booster phase vary from cycle
to cycle, and the linac stops after cycle 33. After every cycle the testbench
reads the results as a control system would and checks:

* the storage-ring charge rises with each injection and then stays flat;
* the TL1→booster and TL2→storage-ring efficiencies computed from the results,
  within 2 %;
* the booster-minus-storage-ring phase, within 1.5°;
* the cycle tag of every result.

It sets the oscillator to 28.066 MHz, as explained under the accuracy limit above.

The unit testbenches compare against independent models: real-valued
sin/cos/atan2/sqrt, sample-by-sample integrals, and table and engine models.
They also check the latencies stated above.

## Where this design departs or fills gaps

* **Sequencer.** The original firmware sets up each measurement with a small
  soft processor running an assembler program. That program is not available.
  Here a hardwired state machine does the same work: it reads rows, sets the
  trigger, delays, gain and channel, and hands the row to an engine. Anything
  the original program did beyond that is not modelled.
* **Crossbar and attenuators.** The original processor set them for each
  measurement. When it applied them is not known. Here a row may carry its own
  setting, applied when the row is handed out. Otherwise the global registers
  apply.
* **IF frequency.** Descriptions of the original system give both 27 MHz and
  28.0315 MHz for the IF and oscillator. Undersampling arithmetic gives 28.2 MHz.
  The oscillator frequency is a register in any case. Its reset value is
  28.0315 MHz.
* **Channel numbering.** The row's channel field selects an ADC. Which pickup
  reaches which ADC depends on the front end's crossbar setting. The reference
  values here assume the setting that maps TL1, SY, TL2 and SR to ADCs 0–3.
* **Own choices:** the 256-row table depth, 24-bit times, 4-bit integer gain,
  the 16-bit quarter-wave oscillator, rounding in the mixer, the CORDIC for
  amplitude/phase, the late/overrun flags, the
  result layout and cycle tag, and the address map.
* **Trigger extraction time** in the testbench (50 ms after the linac trigger)
  is an assumption. It only needs to come after the last linac-timed window of
  engine 1.
* **Not included:** the analog front end (filters, gain, crossbar switch,
  attenuators, ADCs); the pickups; the BPM's embedded computer and network link,
  which serve the shared memory (represented by the host bus); a storage-ring
  cross-talk correction whose function is not known; and a data plot over a
  programmable time range in the original control application, whose data
  source is not known (no capture buffer is built for it).
