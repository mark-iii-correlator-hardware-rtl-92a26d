# Mark III VLBI correlator module in SystemVerilog

In very-long-baseline interferometry, two radio telescopes far apart record the
same source on magnetic tape, each against its own atomic clock. The tapes are
brought together and played back, and the two bit streams are cross-correlated.
Two tape drives never start at exactly the same place. The geometric delay between
the stations also changes all the time, and so does the fringe phase that
the Earth's rotation puts on one signal relative to the other. A correlator
module has to absorb all three while it processes at tape speed (4 Mbit/s per
track).

This RTL is one such module. It takes one X track and one Y track and does the following:

* It decodes both tape formats: frame sync, parity, and the time words.
* It buffers Y in a 4000-bit memory so the X side can read Y at any offset within
  a 1 ms window.
* It multiplies X by a three-level quadrature model of the fringe phase.
* It correlates X against Y at 8 complex lags. It can instead give 16 real lags of one
  stream's autocorrelation.
* It tracks the changing delay within a period by shifting Y one bit at a time.
  Each shift comes with a 90° jump of the phase model. This is the "fractional-bit
  correction" trick described below.
* It extracts phase-calibration tones from both streams. It counts flags and parity
  errors. It latches the Y bit count at the period start, so the host can work out
  how far apart the tape drives are.
* It talks to a host through a CAMAC dataway and a 64 × 24-bit buffer. Parameters
  and results are double-buffered, so the host only needs to service the module once
  per integration period (5 ms to 2.56 s, in whole frames).

A full system is a rack of six identical crates with fifteen modules each. Every
crate sees all 28 tracks of the four tape drives. Modules 1–14 each serve one track
pair, and module 15 "floats" to any pair. The RTL includes this rack-level wiring.
The host computer, its CAMAC branch driver, the crate controllers, the tape drives
and the software are outside it.

## Files

| file | block |
|---|---|
| `rtl/mk3_pkg.sv` | constants, parameter-word structs, the parity and CRC-12 functions |
| `rtl/correlator_rack.sv` | top: six crates on the same tape signals, one dataway each |
| `rtl/correlator_crate.sv` | fifteen modules, the track distribution, the crate dataway |
| `rtl/correlator_module.sv` | one module: wires everything below |
| `rtl/input_select.sv` | picks the X or Y track (data and clock) out of 8 inputs |
| `rtl/frame_decoder.sv` | sync search and flywheel, parity, header, CRC (one each for X and Y) |
| `rtl/test_generator.sv` | 23-bit LFSR that replaces the decoded data in test mode |
| `rtl/x_bit_counter.sv` | bit and record counts in the period; makes BOPP |
| `rtl/gate_store.sv` | T1 and dT/T2 gate times |
| `rtl/fringe_rate_generator.sv` | phase, rate and acceleration; three-level cos/sin |
| `rtl/mode_selector.sv` | ±90°·n phase jumps and the pulsar window |
| `rtl/rotation_blanking.sv` | X·cos′, X·sin′ and their blank signals |
| `rtl/y_bit_counter.sv`, `rtl/y_buffer_memory.sv`, `rtl/bit_offset_counter.sv` | the Y buffer: write side, dual-clock memory, read side |
| `rtl/latch_count.sv` | Y bit count captured at BOPP (crosses the clock domain in Gray code) |
| `rtl/programmable_delay.sv` | 0–15 bit delay of Y, stepped at the shift instants |
| `rtl/correlator.sv` | 8 complex or 16 real lags, 23-bit accumulators |
| `rtl/pcal_generator.sv`, `rtl/pcal_detector.sv` | phase-cal reference and the two detectors |
| `rtl/error_counters.sv` | flag and ones counts of X and Y′ |
| `rtl/camac_decode.sv`, `rtl/module_control.sv`, `rtl/camac_buffer.sv`, `rtl/scanner.sv` | host interface |
| `rtl/pulse_sync.sv` | toggle synchronizer for single-cycle events |
| `tb/tape_source.sv` | model of one reproduced tape track, with injectable faults |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb_correlator_module` and `tb_correlator_rack` are end to end |
| `tb/tb_long_period.sv` | the 2 s and 2.56 s integration periods |
| `tb/tb_spectral_line.sv` | two modules staggered in delay to give 16 complex lags |

## Tape frames and the decoder

Each track carries frames of 2500 bytes. Each byte is 8 data bits, MSB first,
followed by an odd-parity bit. That gives 22500 tape bits, which decode to 20000
data bits, or 5 ms at 4 Mbit/s. The 20-byte header at the start of the frame holds:

* 64 auxiliary bits;
* a 32-bit sync word of all ones;
* 52 time bits;
* a 12-bit CRC (x^12+x^11+x^3+x^2+x+1) over the previous 148 bits.

This layout is the module's assumption. It is the natural reading of a 5 ms frame,
but nothing else in the design depends on it beyond `mk3_pkg`.

Looking for sync, the decoder waits for a zero followed by 36 ones: the parity bit
of the last aux byte, then 32 sync ones with their four parity bits, which are
ones because the bytes are all ones. For that the last aux byte must have odd
weight. The encoder in `tb/tape_source.sv` makes sure it does. Once locked, the decoder
flywheels. It checks the sync word in every frame and drops lock after two bad
ones. Its output lags the tape by one byte, so a whole byte can be flagged:

* header bytes are flagged;
* bytes with a parity error are flagged and counted;
* everything flagged is left out of every accumulation.

`bor` marks the first decoded bit of each frame. `twr` marks the point where the
time word and CRC result are valid.

## The Y buffer and the bit offset

The Y decoder, the Y bit counter and the buffer's write port run on the Y track's
clock. Everything else runs on the X track's clock. Y is written at address
(bit-in-frame mod 4000), and 20000 is exactly 5 × 4000, so the address restarts
at every Y frame. X reads at (X bit-in-frame + offset) mod 4000. The 12-bit
offset is loaded from the host at each period start. Choosing the offset is the
host's job. It knows the tape time of both drives from the time words, and it
knows the Y bit count latched at BOPP (word `R_LATCH`). From these it keeps the
offset such that the bit it reads is the one that was written up to 4000 bits
ago. The buffer keeps one flag per 8 bits, the byte flag from the decoder. The
read is registered, which is why the X side has a second pipeline stage.

The count latched at BOPP crosses the clock domain in Gray code. If the sample
is taken close to a Y frame wrap, it can be a few bits stale.

## Fringe rotation and fractional-bit correction

The phase register has 24 bits (2π/2^24 per step) plus 4 fraction bits. The rate
is a 25-bit signed number in units of 2^-28 cycle per bit. At 4 Mbit/s that is
14.9 mHz per unit, and about ±250 kHz in all. `rate_shift` multiplies the rate by
2^0..2^7, trading resolution for range. The acceleration is added to the rate at
every bit, in units of 2^-24 of a rate step.

The phase maps onto three levels. The circle is divided into 16 sectors:

* cos is +1 for |θ| < 67.5°;
* cos is 0 (blanked) from 67.5° to 112.5°;
* cos is −1 beyond that;
* sin is the same function shifted by 90°.

The thresholds are this design's choice.

The model delay is in general a fraction of a bit away from the delay the buffer
and programmable delay actually apply. When it drifts by a whole bit, the next step
is this:

1. At a gate time (T1, then every dT bits), the programmable delay moves Y by one
   bit (`delay_down` gives the direction).
2. At the same bit, the mode selector rotates the quadrature signals by a further
   ±90° (`jump_neg` gives the sign).

The recorded band runs from 0 to half the bit rate, so its centre is at a quarter
of the bit rate. A one-bit step shifts the phase at the band centre by a quarter
cycle, and the 90° jump makes up for it there. Up to 15 steps are allowed per period.
The delay starts at tap 0 at every period start, or at tap 15 when stepping
down. The host reloads the buffer offset to set the whole-bit delay. Status word
`R_STAT` reports the shift count and tap at the period end.

Pulsar mode (`pulsar`) reuses the two gate times as a window. Only bits with
T1 ≤ bit-in-period < T2 reach the correlator, and the delay does not step.

## Pipeline and clocks

Stage 1, on each X bit: decoder output, test generator, X bit counter, buffer read
address.

Stage 2, one X clock later, when the buffer data is out: the X bit, its flag, BOPP
and the bit-in-period count. Everything downstream works on this stage: gates,
rotation, delay, correlator, phase cal, error counters, latch and scanner.

BOPP is made at the X frame start that follows the last frame of a period.
At BOPP each unit does two things on the same clock:

* it copies its counts to result registers and restarts with that bit;
* it takes its new parameters from the words the host wrote during the period.

The scanner then writes the 44 result words into the buffer, one per clock, and
raises the LAM. The host has the whole next period to read them.

Clock-domain crossings are these:

* Y → X: the dual-clock buffer, the Gray-coded bit count, toggle synchronizers
  for Y `twr`, and a 2-flop synchronizer for Y lock.
* X → Y: init.
* Dataway → X: the CAMAC strobes pass 2-flop synchronizers. So a dataway cycle
  must last several X clocks, and X must be running for the host to reach the
  module.

`rst` must be held for a few cycles of both track clocks. CAMAC Z·S2 initialises
the module in the same way.

## Crates and the rack

Within a crate, module k (1–14) gets tracks 2k−1 and 2k of each drive on its eight
inputs: input 2d is drive d's odd track and input 2d+1 its even track. With its
X and Y selects, a module can therefore correlate either track of its pair
between any two drives. Module 15 gets one extra track pair from each drive. The
drive's electronics choose which tracks those are, so this module can stand in for
any pair.

Two set-ups use the 84 track-pair modules:

* 3 baselines × 28 tracks: crates 2b−1 and 2b take the odd and even tracks of
  baseline b.
* 6 baselines × 14 tracks: crate b takes baseline b.

For spectral-line work, the host gives modules on the same track pair staggered
buffer offsets, so that together they cover many lags. For example, 60 modules
give 480 complex lags.

Each crate has its own dataway. F, A, W and the strobes are shared by the crate's
modules. N and L are one per station. R, X and Q are wired-OR, which works because
a station that is not addressed drives zeros.

## Host interface

The CAMAC address is {F[1:0], A[3:0]}, a word in the 64-word buffer.

| function | action |
|---|---|
| F0–F3 | read word (Q=1) |
| F16–F19 | write word (parameter words 0–6 only; others answer Q=0) |
| F8 | test LAM (Q = LAM) |
| F10 | clear LAM |
| F24 / F26 | disable / enable LAM |
| C·S2 | clear LAM |
| Z·S2 | initialise |

Parameter words. They take effect at the next BOPP, and the host writes all 7,
about 21 bytes:

| word | contents |
|---|---|
| 0 | start phase (24 bits, a full circle) |
| 1 | rate, low 24 bits (the sign is bit 23 of word 3) |
| 2 | acceleration, signed |
| 3 | `rate_sign[23]`, `test_en[20]`, `jump_neg[19]`, `delay_down[18]`, `pulsar[17]`, `auto_y[16]`, `auto_mode[15]`, `rate_shift[14:12]`, `bit_offset[11:0]` |
| 4 | T1 (bit in period) |
| 5 | dT (normal mode) or T2 (pulsar mode) |
| 6 | `pcal_quad0[23:22]`, `pcal_qlen-1[21:10]` (bits per quarter period), `nrec-1[9:0]` (frames per period) |

Result words, starting at word 8:

| offset | contents |
|---|---|
| 0–7, 8–15 | real and imaginary agreement counts, lags 0–7 (auto mode: lags 0–7 and 8–15) |
| 16, 17 | bits entering the real and imaginary lag 0 |
| 18–20, 21–23 | X and Y phase cal: cos count, sin count, bits |
| 24–27 | X flagged bits, Y′ flagged bits, X ones, Y′ ones |
| 28, 29 | X and Y parity errors |
| 30 | Y bit count latched at BOPP |
| 31 | status: 23/22 X/Y header seen, 21/20 X/Y CRC error, 9/8 X/Y lock, 7:4 shifts, 3:0 tap |
| 32–37, 38–43 | X and Y: time (3 words) then aux (3 words), MSB word first, from the first header of the period |

The counts are agreements, not ±1 sums. A lag's correlation coefficient is
2·count/n − 1, where n is word 16 or 17. The phase-cal counts work the same way. The
23-bit counters hold a 2 s period at 4 Mbit/s, but they wrap in the longest (512-frame,
2.56 s) periods.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a stuck run. With plain Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/mk3_pkg.sv tb/tb_correlator_module.sv --top-module tb_correlator_module
    ./obj_dir/Vtb_correlator_module

Put any `tb_<block>` in place of `tb_correlator_module`. `tb_correlator_module` runs one module at its
default sizes. Two `tape_source` models stand in for the drives, with a Y
offset, a parity error and a CRC error injected into given frames, and the
testbench acts as the CAMAC host. It runs seven periods:

* plain cross-correlation;
* delay stepping;
* a 90° start phase;
* a pulsar window;
* a nonzero fringe rate;
* auto-correlation;
* test-generator mode.

It checks the counts read back over the dataway against what each set-up
implies. The peak must sit at the lag the buffer offset sets, real or imaginary
as the phase dictates. The blanked fraction, the exact size of a pulsar window,
flag counts, time words and the latched Y count are checked too. It also counts how often each mechanism
happened and fails if any never did. The block testbenches check against
independent models with random stimulus. The run takes under a second.

`tb_correlator_rack` runs the whole rack of 90 modules at full size. Three track
pairs carry data: an odd pair, an even pair, and one crate's floating pair. The
same modes as above are run on three modules in different crates, each through
its own crate's dataway. It also checks that a dataway cycle with no station
addressed reads as zero with no Q or X. It takes a few seconds, after a build of under a minute.

`tb_long_period` runs the two longest periods on the full-size module. It uses 400 frames
(2 s), where the peak lag holds exactly 400 × 19840 agreements, and 512 frames
(2.56 s), where the same counts come back modulo 2^23. It also checks that the
interval between LAMs is exactly the period length in X clocks. It takes under a minute.

`tb_spectral_line` puts two modules on the same track pair and one dataway, with
buffer offsets 8 bits apart. Their 16 combined lags must show the peak at the one
lag where the true delay lies, which is beyond the 8 lags of either module.

## Departures and limits

* The tape frame layout, the sync rule, the CRC polynomial, the CAMAC function
  codes, the parameter-word packing and the result map are this design's. Only
  their existence and rough sizes are given by the module description.
* The three-level thresholds, the widths of the acceleration and phase-cal
  registers, the test-generator polynomial and what the error counters count
  are also this design's choices.
* The results come to 44 words (132 bytes) against about 114 bytes in the
  original design. The difference is the time/aux and status words.
* The period length is 1 to 512 frames (up to 2.56 s). The block diagram's
  "up to 2 s" is treated as the practical limit set by the 23-bit accumulators.
* The phase-rate resolution is 14.9 mHz (4 MHz / 2^28).
* The delay and phase-jump directions are set per period by the host.
* The floating module's inputs are modelled as one track pair per drive and per
  crate. The dataway is modelled as plain shared wires. The crate controller and the
  branch highway are not modelled.
* Spectral-line set-ups rely on the host staggering the buffer offsets. Only the
  two-module case is simulated.
