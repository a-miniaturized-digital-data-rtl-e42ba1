# Airborne magnetometer survey data acquisition chassis in SystemVerilog

An aircraft flying a magnetic survey carries a magnetometer and several other
instruments: a clock, a doppler navigator, shaft-position encoders on the
navigation receivers, a radio altimeter and frequency counters. This design
collects a reading from up to sixteen such sources at regular intervals. It
writes each reading as five decimal digits to an incremental magnetic tape
recorder, tagging each reading with the number of the source it came from. The
same readings go to displays, a strip-chart pen and the survey camera's data
lamps, so that film, chart and tape can be matched afterwards.

The RTL is a synchronous re-creation of a 1960s chassis built from discrete
micrologic (decade counters, flip-flops and NOR gates). Nearly everything runs
from one 1 MHz clock, the frequency standard that also keeps time of day.
Parameters default to the original's numbers, so the top level simulates real
time: one simulated second is one million clock cycles.

## Blocks at a glance

| Part | Module | What it does |
|---|---|---|
| Clock | `digital_clock` | 1 MHz → 100 kPPS → 10 kPPS → 1000/100/10/2/1 PPS. Keeps HH:MM:SS time of day, with synchronisation and set-time modes. |
| Time code | `time_code_control`, `time_code_sr` | Every even two minutes, signals the hours and minutes on the chart pen. |
| Rates | `mrc_rate_gen` | Scan rate, recording rate (RR), camera rate, block length and inter-record gap (IRG). |
| Sequencer | `pulse_sequence_timer` | Steps through the gates. Generates Transfer, Shift, Strobe, identifier and End-of-Gate (EOG). |
| Gate selection | `ptu_control` | Decodes the gate number. Applies each gate's selector switch (read / read-if-tested / wait / ignore). Generates the monitor read pulse. |
| Gates | `interface_gate` ×16 | Test flip-flop plus the gate that puts the source's 20 bits on the bus. |
| Registers | `data_shift_register` | Direct-monitor register (6 characters) and tape-monitor register (5 characters). |
| Tape monitor | `tape_monitor_control` | Rebuilds words from the recorder's read-back. |
| D/A monitors | `da_converter` ×2 | Latches two adjacent digits and forms the level that a resistor ladder would output. |
| Voltmeter | `dvm_ramp` | Ramp-compare converter with a 10-bit counter and octal output. |
| Counters | `hs_counter` ×3 (`hs_counter_control`, `hs_counter_decades`) | 8-digit frequency counters: 0.1 s settling time, then a 1 ms … 10 s count window. |
| Tracking filters | `pltf_divider` ×2 | ÷512 / ÷256 divider and phase-comparator gate of the frequency multiplier. |
| Shaft encoders | `datex_decoder` ×2 | Datex reflected decimal code → BCD. |
| Top | `magdas_top` | Wires it all up. Sources with no logic of their own are ports. |

Shared types are in `magdas_pkg`: the 20-bit `gate_word_t`, `bcd_t`, and the
switch-position enums.

## Gate assignment

| Gate | Source | Gate | Source |
|---|---|---|---|
| 0 | date (thumbwheels, port) | 8 | time of day: units of hours, tens and units of minutes, tens and units of seconds |
| 1 | flight line number (thumbwheels, port) | 9, 10 | shaft encoders 1, 2 |
| 2 / 3 | counter 1, digits 10^0–10^4 / 10^5–10^7 | 11 | shaft position 3 (port) |
| 4 / 5 | counter 2 (tracking filter 1) | 12, 13, 14 | doppler miles, mile increment, drift (ports) |
| 6 / 7 | counter 3 (tracking filter 2) | 15 | voltmeter (radio altimeter) |

Gates 0 and 1 have their Test flip-flops set by the inter-record gap. With their
selectors at READ/TEST, date and line number are therefore written once at the
start of every data block.

## The recording sequence (the heart of the design)

Three pulse streams drive the recording:

- **Scan pulses** start a pass over the gates. The source is 100 PPS from the
  clock ÷ 5 ÷ N (N = 3..10, so 0.15–0.50 s), doppler distance pulses ÷ 5 ÷ N,
  or a push button. A scan pulse is refused while the recorder is writing an
  inter-record gap.
- **Recording-rate (RR) pulses** advance the sequence one step. The source is
  1000 PPS ÷ M (M = 2..10, so 500–100 PPS), a free-running external
  multivibrator, or a push button.
- **Strobes** tell the recorder to write the character currently at the
  register's output.

Counter B holds the gate number. Counter A counts the characters of the
current gate. On each RR pulse the sequencer looks at the current gate:

| Gate state on this RR | What happens |
|---|---|
| selector says *read*, or a TEST position with the Test flip-flop set | **Transfer**: the gate's 20 bits and the gate number are loaded into the 24-bit direct-monitor register. Counter A becomes 1. |
| gate already open, counter A = 1..4 | **Shift**: the register moves one 4-bit character towards the output. |
| gate already open, counter A = 5 | **Shift** that brings the gate number to the output. It is flagged as the identifier character. |
| selector IGNORE, or READ/TEST with no test | **Ignore**: EOG is given at once and counter B advances. |
| selector WAIT/TEST with no test | nothing: the sequence waits at this gate. |

Timing:

- Every Transfer and Shift is followed one cycle later by a Strobe.
- The Strobe of the identifier character is accompanied by EOG, which advances
  counter B.
- A read gate therefore costs 6 RR pulses and 6 characters: digits 10^0,
  10^1, 10^2, 10^3, 10^4, then the gate number.
- An ignored gate costs 1 RR pulse.
- After gate 15 the sequencer stops until the next scan pulse.
- A new scan pulse restarts at gate 0 at any time. If the RR rate is too low
  for the chosen scan rate, later gates are never reached. (96 RR pulses are
  needed for a full scan, so 0.77 s at 125 PPS.)

Recorder character (7 tracks, `rec_char`) = `{C, B, A, 8, 4, 2, 1}`:
- 8-4-2-1 is the register's output character;
- B marks the gate-identifier character;
- A is unused;
- C is odd parity over the other six.

Block length: a counter counts scan pulses. When 2^k scans have been taken
(k = 0..8, so blocks of 1 to 256 scans), the EOG of gate 15 arms a flag, and
the *next* RR pulse fires the IRG pulse. Waiting for that RR pulse means the gap
never cuts into the last character. The IRG:
- tells the recorder to space the tape;
- resets the block counter;
- sets the Test flip-flops of gates 0 and 1.

Camera: it fires on every K-th scan (K = 1..10) for 1 ms (`CAM_PULSE`). The
navigator's button fires an extra frame and lights the frame-marker lamp for
that frame. The marker lamp is the "8" lamp of the tens-of-seconds digit in the
time code, which never reaches 8.

## Monitors: reading back what was written

- **Direct monitor.** `ptu_sel` picks one gate. One cycle after that gate's
  Transfer, `da_read` latches two adjacent digits of the register into a D/A
  monitor.
- **Tape monitor.** The recorder reports each character it has read back with
  a flux-check-complete pulse (`rec_fcc`, plus `rec_rd_char` and `rec_rd_b`).
  `tape_monitor_control` does three things in successive cycles:
  1. it buffers the character;
  2. if the character is an identifier equal to `tm_gate_sel`, it samples the
     5-character register, which at that moment holds the gate's five digits;
  3. it shifts the character into the register.

  What the tape D/A and any display show is therefore what actually reached
  the tape.
- **D/A level.** The range switch `range` = r picks digits (10^r, 10^(r+1)).
  The output `level` = (10·hi + lo)·10^r is the number a resistor ladder would
  convert. The ladder itself is analog and is not modelled.

## Time of day and the time code

`digital_clock` divides as follows:
- 1 MHz by `PRE_DIV` (10) gives 100 kPPS.
- A synchronising divider normally divides by 10.
- While the operator holds ADVANCE or RETARD (FAST or SLOW), the
  synchronising divider divides by 4, 8, 12 or 16 instead. Seconds then run
  at 2.5, 1.25, 0.83 or 0.625 times normal speed until the clock lines up
  with a radio time signal.
- Decade stages then give 1000, 100 and 10 PPS, ÷5 gives 2 PPS and ÷2 gives
  1 PPS.

In SET mode the 1 PPS path to the display counter is opened, and the set-time
buttons feed it 10 000, 1000, 100, 10 or 1 PPS.

`time_code_control` writes the time on the strip chart:
- At every even minute, hours and minutes (14 bits: 2 + 4 + 4 + 4) are loaded
  into `time_code_sr`.
- One bit is put on the pen every 4 s, most significant first. A 1 holds the
  pen for 2 s; a 0 gives a 0.1 s blip.
- From 110 s to 120 s the pen is held down (the long dash) to mark the coming
  two-minute point.

## Voltmeter

`dvm_ramp` works as follows:
1. A start pulse clears a 10-bit counter.
2. The counter counts at 1 MHz. Its value (`ramp_code`) drives an external
   ladder.
3. It stops when the comparator (`ramp_reached`) says the ramp has reached the
   input, or at 1023, where `overrange` is flagged.
4. The result is latched with the polarity (`vin_neg`).

The gate word holds four octal digits, so every bit is used (0–1023 = 0–1777
octal) while staying readable on decimal displays. Digit 10^4 is the sign
(1 = negative). With a 1 mV-per-count ladder the full scale is 1.023 V. In the
top level the voltmeter starts on every scan pulse and on its button.

## High speed counters and clock domains

Each counter consists of:
- a control card (`hs_counter_control`) on the 1 MHz clock;
- eight BCD decades (`hs_counter_decades`) clocked by the *measured* signal.

A measurement goes like this:
1. The initiate source is 2 PPS, 1 PPS, an external free-running pulse, every
   scan pulse, or the button. The button works in every position.
2. The control card waits 0.1 s for input transients to die away.
3. It opens the gate for 1 ms, 10 ms, 100 ms, 200 ms, 1 s or 10 s.

The wait and the count window both come from one timing counter, a chain of
decades on the 1 MHz clock with taps at 1 ms, 10 ms, 100 ms, 1 s and 10 s. It
is cleared at the initiate, when the gate opens and when it closes. The first
100 ms tap ends the wait. The gate closes at the tap chosen by the count-time
switch. 200 ms has no tap of its own: a divide-by-two stage counts 100 ms taps,
and only while the gate is open, so the gate closes at every second one. The
first three decades are merged into one divide-by-`CYC_PER_MS` stage. That
parameter, 1000 by default, lets a testbench shorten all the timing together.
An initiate during the wait restarts it. One during the count is ignored, so a
count is never cut short.

The clock-domain crossing works as follows:
- The gate crosses into the signal domain through a 2-flip-flop synchroniser.
- The first signal edge that sees the gate open loads 1. Later edges
  increment the count.
- When the gate closes, the count is copied to a hold register and a toggle
  flips.
- The toggle crosses back through two flip-flops. The clock domain then copies
  the hold register into `count_q` and pulses `new_count`.

The previous result stays readable, and recordable, until the new one is
complete. The count is exact to the signal edges seen inside the
(synchronised) gate, which is ±1 count with respect to the true gate.

An initiate during the settling wait restarts the wait. An initiate while
the gate is open is ignored, so that a scan-initiated counter never records a
truncated count.

Counters 2 and 3 count the outputs of the two tracking filters' multivibrators
(`vcm_clk`). `pltf_divider` is the digital part of each tracking filter: a
÷512 chain (÷256 with `div256`) clocked by the multivibrator. Its output `f2`
is compared with the input `f1` by the NOR gate `f3`. The multivibrator,
filter and amplifier that close the loop are analog and are outside this RTL.

## Shaft encoders (Datex code)

Each decade of the encoder has four brushes A B C D. Digits 0..9 appear as
ABCD = 0001, 0011, 0010, 0110, 0100, 1100, 1110, 1010, 1011, 1001. These are
decoded to 8-4-2-1 by
`1 = A(C' + B'D') + A'C(B + D)`, `2 = CD'`, `4 = AD' + BC'`, `8 = AD`.

The code is *reflected*:
- units read 9 − d whenever the tens digit is odd;
- tens read 9 − d whenever the hundreds digit is odd;
- the 10^3 / 10^4 pair works the same way.

Since code(9 − d) differs from code(d) only in the A brush, the correction is
A XOR (least significant bit of the decade above, already corrected). The
decoder therefore works from the 10^2 and 10^4 decades downwards.

In automatic mode the corrected digits are latched every 10 cycles (100 000
times a second). In manual mode they are latched only on the navigator's
button, so a receiver that is being tuned never puts nonsense on tape.

## Where this departs from the original, and how far to trust it

- **Synchronous throughout.** The one-shot multivibrators become one-cycle
  strobes on the 1 MHz clock. External pulses (buttons, doppler, recorder
  signals) are assumed to arrive as clean one-cycle strobes; add
  synchronisers and debouncers in front if they do not.
- **Reconstructed logic.** Some logic was not available in detail and is
  rebuilt from its described behaviour:
  - the time-code control;
  - the voltmeter's sign handling;
  - the counters' input and display logic;
  - the D/A ladders.

  The interfaces of those blocks are the original's. Their insides are this
  design's own.
- **Design choices not taken from the original:**
  - the parity bit is generated in the chassis;
  - the voltmeter is started by every scan;
  - counters ignore a second initiate while counting;
  - the counters' first three timing decades are merged into one
    divide-by-1000 stage;
  - the split of the counter digits between the two gates;
  - the switch encodings;
  - the camera pulse width (1 ms);
  - the length of a zero's blip on the pen.
- **Not built.** The following are outside the RTL, and their signals are
  ports of `magdas_top`:
  - analog parts: mixers and filters, the tracking filters' multivibrator and
    amplifier, the voltmeter's ladder, comparators and source multiplexer,
    the D/A ladders;
  - level converters;
  - nixie tubes and lamps;
  - the thumbwheel and doppler data cards;
  - the tape recorder itself.

  The encoder polarity (count-up direction) switches are not built either.
- **Scan rate versus recording rate.** At the original's example settings
  (0.4 s scans, 125 PPS recording rate) only about 8 gates can be read per
  scan. Reading all sixteen needs a higher RR rate (≥ 250 PPS) or slower
  scans.
- **Counter overflow.** 8 digits hold 30.72 MHz × 1 s. The 10 s count time
  overflows above about 10 MHz.

Every module has a self-checking testbench whose expected values are computed
independently in the testbench, and each testbench has been shown to fail on a
deliberately broken copy of its module. The end-to-end test records about 400
gate readings, checks every character on the decoded tape, and passes.

## Simulating

Everything needs Verilator 5 with `--timing`; testbenches use `$urandom` only.
A block test, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_datex_decoder \
  -y rtl -y tb +libext+.sv -Irtl rtl/magdas_pkg.sv tb/tb_datex_decoder.sv
./obj_dir/Vtb_datex_decoder
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>`, and a watchdog
stops a hung run. Testbenches that would run for simulated seconds override
the time-related parameters (settling time, cycles per millisecond, clock
pre-divider, camera pulse width).

`tb_magdas_top` runs the top level with all defaults and flies about seven
seconds of survey. That is about 7 million clock cycles, roughly 40 s of
simulation time. It does the following:
- sets and synchronises the clock, reaching a two-minute mark so the time
  code starts;
- scans from the clock, the doppler and by hand;
- uses all three RR sources;
- writes blocks of two scans separated by gaps;
- exercises every selector position;
- reads the three counters, the two encoders (automatic and manual) and the
  voltmeter with both polarities;
- fires the camera, including a manual frame with its marker.

A behavioural recorder model, `tb/tape_recorder_model.sv`, writes and reads
back each character. The testbench decodes the tape and compares every word
with the source, checks the tape monitor and D/A outputs against it, and
counts each mechanism. A mechanism that never happens is a failure.

Only `magdas_top`'s dependencies are needed for synthesis (all files in `rtl/`).
The divider chain in `pltf_divider` and the decades in `hs_counter_decades` are
clocked by their own signal clocks, so constrain them as separate clock
domains.
