# DSSS power-line transceiver for automotive control

A car's 12 V supply wiring already reaches every lamp and motor. This design
sends short control words over that wire instead of over a separate bus. The
line is noisy: ignition pulses, switching converters and motor brushes all
couple into it. So every data bit is spread over the 11-chip Barker code
`00011101101` (direct-sequence spread spectrum, DSSS) before it is put on the
line. The receiver despreads by correlation. It recovers the chip clock
digitally, with no PLL: it picks one of three sampling phases of a fast
clock and rotates between them.

One transmission is a burst of 75 bits: a 42-bit preamble, then a 32-bit
control word, then one fill bit. The receiver hands the word to a backend
that drives power switches. The backend controls a buck converter's target
voltage, two LEDs (dimming, flashing, on-time) and two motors (PWM speed).

Everything here is synthesizable SystemVerilog. The analog parts are outside
the RTL: the capacitive coupling, the filter, the Schmitt trigger, the power
stages and the loads. At the top level, `tx_out` and `rx_in` are the two
ends of the line.

```
 clk_tx domain (1 clock per chip)          clk_rx domain (6 clocks per chip)
 +-----------------------------+           +-------------------------------------------+
 | dsss_tx                     |  tx_out   | dsss_rx                                   |
 |  preamble_counter ---+      | --------> |  cdr --data_valid/data_bit--> seq_detector|
 |  serializer ---- mux +-XOR--|  (line)   |   |                              | Get     |
 |  barker_gen ---------+      |  rx_in    |   |                       timing_control  |
 +-----------------------------+           |   +--------------------> deserializer     |
                                           +-------------------------------|-----------+
                                                                           | word[4:0]
                                                                     backend_ctrl
                                                                     (4 x ds_dpwm)
```

## Rates

The code and the loop rules come from the source design. So do the
preamble length, the word length, the thresholds and the size of the
confidence counter. Its FPGA build ran at 260 kHz chip rate, which gives
260/11 = 23.6 kHz data rate, from a 50 MHz board clock. Here the receiver
runs at 6 clocks per chip. At 50 MHz / 32 = 1.5625 MHz that is a 260.4 kHz
chip rate. `FCLK_HZ` on `plc_top` and `backend_ctrl` must be set to the
receiver clock frequency, because the LED flash periods are counted from it.
The transmitter needs one clock per chip. The two clocks are independent,
and the receiver tracks any offset between them.

## Transmitter (`dsss_tx`)

- **`barker_gen`**: an 11-bit rotating register preset to the code. `chip`
  is the current chip. `last` marks the final chip of a bit period, and
  `dsss_tx` uses it as the bit clock. `chip_next` and `last_next` look one
  chip ahead; only the receiver uses them.
- **`preamble_counter`**: a 7-bit bit counter. Counts 1..75 form one burst
  and 0 means idle. Until count 41 the preamble bit is the counter's LSB,
  giving 1,0,1,0,…. A flag set at count 41 then holds the bit high, so the
  preamble ends in `…1011`. The counter also times the serializer. The
  holding register loads at the boundary into bit 40. The shift chain loads
  at the boundary into bit 43, and from there on the output mux takes data.
- **`serializer`**: a holding register plus a 32-bit shift chain. The MSB is
  sent first, and 1s fill in behind it.
- The mux output is XORed with the chip. Between bursts `tx_out` is low.
  `start` is accepted only while the transmitter is idle. It is held until
  the next bit boundary, and a `start` during a burst is ignored.

## Receiver clock and data recovery (`cdr`)

This is the heart of the design and the hardest part to follow.

### Three phases from one clock

`johnson_clkgen` is a 3-bit Johnson counter on the 6x clock. It produces
three square waves at chip rate, 1/3 chip apart: Ph0 = j0, Ph1 = j2,
Ph2 = ~j1. The one-hot state `sel` of `phase_control_fsm` (C0/C1/C2) says
which of them is Ph+, the early sampling phase. The next one in rotation
order is Php (punctual), and the one after that is Ph− (late).

A multiplexed clock would glitch whenever the selection changes. That is the
race problem the source design handles with delay cells. Here nothing is
ever clocked by a derived phase. `phase_rotator` turns the selected rising
edges into one-cycle strobes in the 6x clock domain:

- `tick_e` (Ph+) is the selected rising edge. It is blocked for `GUARD = 3`
  cycles after the previous one.
- `tick_p` is 2 cycles later.
- `tick_m` is 4 cycles later.

A chip therefore normally lasts 6 cycles. When `sel` steps right after a
tick, one chip becomes 8 cycles long (the phase is delayed by 1/3 chip) or
4 cycles long (advanced by 1/3 chip). The guard is what keeps the short chip
at 4 cycles rather than 2.

`tick_e` clocks the local `barker_gen`, so the local code follows every
rotation.

### Three correlators

`correlator` instances sample `rx_in` on `tick_e`, `tick_p` and `tick_m`.
`rx_in` first passes a 2-flop synchronizer. Each correlator XORs the sample
with the local chip and counts the ones in a 4-bit accumulator. At the
code's last chip it dumps the count X (0..11) and restarts.

- X is 0 or 11 when the code is aligned and the bit is 0 or 1, and about 5
  or 6 when the code is misaligned.
- `abs_value` maps X to |2X−11|. The threshold detector asks whether that
  value is above 3.
- The early correlator is sampled at the moment its chip begins, so it
  reads `chip_next` / `last_next`.
- The data decision is X > 6 on the punctual correlator.

### Acquisition

`phase_shift_fsm` watches the punctual threshold once per bit. It is the
three-state Mealy machine of the source design: two passes in a row set
`select` (locked), and two fails in a row clear it. While unlocked, every
bit period requests one lead step. That delays the local code by 1/3 chip.
A full search of 11 chips therefore takes 33 steps, and it fits inside the
42-bit preamble.

### Tracking

While locked, the early and late threshold results of each bit drive a
continuous-type confidence counter (`confidence_counter`, N = 3):

| early | late | request |
|-------|------|---------|
| fails | passes | R: the data drifted late. Delay the phase (`lead_OV`). |
| passes | fails | L: the data drifted early. Advance the phase (`lag_OV`). |
| otherwise | | no request; the counter holds |

Three R requests in a row give an overflow, and so do three L requests. An
opposite request returns the counter to the centre. The counter is cleared
while unlocked.

`lead_OV` steps the phase FSM C0→C1→C2→C0. `lag_OV` steps it C0→C2→C1→C0.
A request waits in a pending register until the next `tick_e` and is applied
there. `rot_lead`, `rot_lag` and `acq_step` report each applied step.

At most one step is made every 3 bits. That is 1/3 chip per 33 chips, a
tracking range of about ±10,000 ppm. The source design evaluates ±1000 ppm
and 3250 ppm.

## Frame synchronization (`dsss_rx`)

- **`seq_detector`**: an overlapping Mealy detector for `1011` on the
  recovered bits. It raises `get` for one cycle.
- **`timing_control`**: on `get` it opens the frame window (`send`) and
  counts 32 recovered bits. Then it pulses `load` and closes the window.
- **`deserializer`**: shifts while `send` is high and copies the word to
  `ctrl` on `load`. `frame_valid` pulses with each new word.

Loss of lock clears both the detector and an open window. The last data
bits plus the fill bit can form `1011` again after a word. That late window
is abandoned when the line goes idle and the receiver drops lock. It never
produces a frame.

## Backend (`backend_ctrl`, `ds_dpwm`)

The low 5 bits of each received word select one of 32 functions:

| code | function |
|------|----------|
| 0–3 | buck target 1.5 / 3 / 5 / 9 V (`buck_vsel`) |
| 4–6, 14–16 | PMOS / NMOS LED dimming 20 / 50 / 80 % |
| 7–10, 17–20 | PMOS / NMOS LED flashing 6 / 3 / 1.5 / 0.75 Hz |
| 11–13, 21–23 | PMOS / NMOS LED on-time 20 / 50 / 80 % of the flash period |
| 24, 28 | motor s2, s3: PMOS on, NMOS off |
| 29–31, 25–27 | motor s2, s3: PMOS off, NMOS PWM 20 / 50 / 80 % |

- A code changes only the setting it names.
- Each LED gate is its flash window ANDed with its dimming PWM.
- Dimming and motor speed use `ds_dpwm`, a first-order delta-sigma PWM. An
  8-bit duty is split into 6 MSBs, which set the on-time within a 64-cycle
  period, and 2 LSBs, which accumulate and add one cycle when they carry.
  20/50/80 % are duty words 51/128/205.
- The buck converter's regulation loop is analog and not modelled here.
  `buck_vsel` is its target selection.

## Where this design departs from the source design or fills gaps

- **Phase rotation**: the source design picks a sampling clock from three
  phases through a multiplexer and adds delay cells against races. Here
  everything runs on one clock, and the phases are enable strobes (see
  above). Behaviour seen from outside is the same: 1/3-chip steps.
- **Rotation direction**: the source is inconsistent here. One passage says
  data that runs faster than the receiver clock rotates C1→C2→C0. Its
  hardware chapter, and its 3250 ppm experiment with a fast transmitter,
  show `lag_OV` and the rotation S0→S2→S1. This design follows the second,
  as explained under Tracking.
- **Preamble counter**: 7 bits wide, where the source has 6 bits, so that
  one counter spans the whole 75-bit burst. The source says the mux and
  serializer controls rise "at 43 and 40". This is read as: the holding
  register loads at 40, and the mux takes data from bit 43.
- **Bit order**: MSB first, with 1s after the word. The source does not say.
- **Clear inputs**: on `seq_detector`, `timing_control` and
  `confidence_counter`, all driven by loss of lock. Also added: the input
  synchronizer, the look-ahead outputs of `barker_gen`, and the pending
  register for rotation requests.
- **Backend**: the reset state is an assumption. LEDs and motors are off
  and the buck target is code 0. Dimming is full and flashing steady until
  a code sets them, and the on-time starts at 50 %. The duty words and the
  ΔΣ-DPWM widths (6 + 2 bits) are this design's own. The source names the
  modulator but does not give its insides.
- **Jitter**: `tb_cdr_jitter` moves every chip edge by uniform
  deterministic jitter of 0.55 UI peak to peak, where one UI is one chip.
  It adds Gaussian random jitter with σ = 0.04 UI, which is about 0.55 UI
  peak to peak at 14σ. It runs first at the nominal rate, then 1000 ppm
  fast. Lock holds and no bit is lost. The σ reading of a peak-to-peak
  random-jitter figure is this design's.

## Size

After coarse synthesis, `plc_top` is about 460 word-level cells and 413
flip-flop bits. The receiver is about 220 cells and 150 flip-flops. The
backend takes most of the rest, mainly in its two 32-bit flash counters.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog. The
end-to-end test uses `plc_top` at its default parameters. It builds and runs
in a few seconds:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/dsss_pkg.sv tb/tb_plc_top.sv --top-module tb_plc_top -Wno-fatal -o sim
./obj_dir/sim
```

The `--timescale 1ns/1ps` matters. The testbenches build clock offsets of a
few thousand ppm from fractional-nanosecond delays, so without it those
offsets are rounded away.

`tb_plc_top` does the following:

- It connects the RTL transmitter to the receiver through a random line
  delay.
- It clocks the transmitter at 0, +3250 and −3250 ppm against the receiver.
- It sends eight bursts and checks that each produces exactly one correct
  word. It also checks that each burst is 75 bits long.
- It checks the buck selection, an LED flash period and on-window, and a
  motor PWM duty.
- It counts how often each mechanism happened: acquisition steps, locks,
  lock releases, sync detections, frames, tracking advances and delays,
  buck changes, flashing, dimming and motor PWM. A mechanism that never
  happens counts as a failure.

`tb_cdr` drives the CDR alone with a PRBS7 stream from an ideal spread
source. It checks acquisition within 33 steps, bit-exact recovery, and
tracking at ±3000 ppm in both directions. `tb_cdr_jitter` runs the same
checks with jittered chip edges.

With `verilator --lint-only -Wall` the RTL gives only two kinds of warning.
Some are unused signals: look-ahead and observation outputs that a
particular parent does not use, and package constants when the package is
linted alone. The others are `SYNCASYNCNET` notes: the reset is both an
asynchronous reset and the `disable iff` condition of the embedded
assertions.
