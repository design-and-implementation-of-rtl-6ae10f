# Wideband CDMA base-station channel card demodulator

This is synthesizable SystemVerilog for the reverse-link receiver of a
base-station channel card. The air interface is a wideband direct-sequence CDMA
link (3.6864 Mcps, 5 MHz, QPSK spreading with short and long PN codes, and a
continuous pilot). The receiver finds each mobile's multipath components, locks
a rake finger onto each one, demodulates two code channels coherently, and
combines the fingers. The combined symbols go into a dual-port RAM for the
deinterleaver. Once per 1.25 ms power control group the receiver also decides
whether the mobile should raise or lower its power.

Everything above the symbol RAM is not part of this RTL: the controller DSP,
its software deinterleaver, the Viterbi decoder and the glue logic. They are
reached through ports.

## Signal flow

```
 6 x 4-bit I/Q (2 antennas x 3 sectors, 8 samples/chip, 29.4912 MHz)
        |
  timing_gen  ---- data selector (received / loop-back), chip, PCG (1.25 ms),
        |          frame (20 ms) and PN-epoch (2^15 chips) strobes
        +---------------------------+
        |                           |
  searcher x NUM_SRCH          finger x 4 (each with its own data_mapper)
   2 x data_mapper               NCO -> decimator + pn_gen
   pn_gen                        el_correlator -> loop_filter -> NCO
   16 x srch_correlator          walsh_correlator x 3 (pilot, DCCH, FCH/SCH)
   2 x srch_sorter               d * conj(pilot)  -> soft symbols
   DSP bus + irq                 lock_detector (pilot energy) -> irq
                                    |
                      deskew_combiner x 2 (DCCH, FCH/SCH)
                                    |
                      dpram (symbols to the DSP)     power_control -> pc_bit
                      demod_cpu_if (finger registers, interrupts, counters)
```

`channel_card` is the top and wires the blocks as shown. One package,
`wcdma_pkg`, holds the shared constants, the soft-symbol and finger
configuration structs, and the complex despreading function.

## Codes and sample format

* **Samples.** A 4-bit ADC code `c` becomes the odd value `2c-15` (-15..15)
  in `data_mapper`. The mapper also selects one of the six antenna/sector
  inputs (`sel = antenna*3 + sector`). Its output is registered.
* **Short PN.** The I and Q short codes use the IS-95 polynomials in Galois
  form, plus one inserted zero chip per period, so each period is exactly
  2^15 chips. The PN epoch strobe marks chip 0.
* **Long code.** A 42-stage LFSR. Its output is the parity of the state bits
  chosen by a 42-bit mask, which is the per-mobile code offset. It is XORed
  into both the I and the Q chip.
* **Despreading.** The complex despreader computes `(x_i + j x_q)` times the
  conjugate of `(c_i + j c_q)`, with chips mapped as 0 -> +1 and 1 -> -1.
* **Walsh chips.** Walsh chip k of code w is `parity(w & k)` (Hadamard
  order). A channel of length 2^L chips uses the lower L bits of the chip
  index. The pilot is Walsh 0.
* **Symbol numbers.** A finger numbers each symbol from its own chip index
  (chip index >> L). This number (mod 8) travels with the soft symbol and is
  what the combiner uses to align the fingers.

## Code acquisition (`searcher`)

Each searcher checks code phases one after another (a serial search) over a
window of half-chip offsets. It has 16 correlators in two groups of eight.
Each group has its own data mapper, so one group can watch antenna 0 while the
other watches antenna 1.

The received samples are cut to two per chip and fed into an eight-stage
half-chip delay line. Correlator j correlates the local code with the sample
j half chips old, so one 128-chip dwell tests eight neighbouring offsets at
once.

After a dwell:

* The eight energies (I² + Q²) of each group pass, one per clock, into that
  group's `srch_sorter`, which keeps the four largest energies and their
  offsets.
* The PN generator is held for eight half-chip ticks, which moves the local
  code eight half chips later for the next dwell.
* When the window is covered, `irq` goes high.

There is no threshold test and no verification dwell; the DSP reads the
sorted list and decides. The DSP should treat the list as candidates, not as
answers. With the traffic channels 6 dB above the pilot, a 128-chip dwell over
random data produces sidelobes of 30-45 % of a path's peak energy even
without noise, so a weak path can be outranked. Entries one half chip apart are
usually the same path. A robust procedure, and the one the top-level test
uses, is: drop neighbours of a stronger entry, start a finger on each
remaining candidate, and keep only the fingers whose lock detector locks.

Searcher registers (8-bit address, 16-bit data, read data one clock after
`cs && !we`):

| addr | access | meaning |
|------|--------|---------|
| 0x00 | W bit0 / R | start at the next PN epoch / `{irq, busy}` |
| 0x01 | RW | input select, group 0 in [2:0], group 1 in [6:4] |
| 0x02 | RW | window in half chips (multiple of 8) |
| 0x03-0x05 | RW | long-code mask [15:0], [31:16], [41:32] |
| 0x06 | W | clear irq |
| 0x10+16g+4k | R | group g, rank k: offset; +1 energy[15:0]; +2 energy[27:16] |

**Offset convention.** This convention is the part you need in order to use
the searcher with the fingers. Suppose the searcher reports offset `o` (in half
chips). Chip 0 of that path then starts `4*o - 30` samples after the epoch
strobe, within one half chip. The constant 30 is the pipeline delay of the
mapper, the delay line and the PN generator.

To start a finger on that path inside `channel_card`, write its offset
register with `4*o - 35`. That value puts the finger's on-time sample in the
middle of the chip, allowing for the finger's own data-mapper stage.

## Rake finger (`finger`)

**Chip timing.** A 16-bit phase accumulator (`nco`) runs at the sample clock
and steps by 2^16/8 plus a signed correction. Each carry is a chip strobe.
On a strobe:

* the current sample is the on-time sample, used for demodulation;
* the PN generator advances.

Half a chip (four clocks) later, the next sample is taken as the tracking
sample.

**Early/late correlation.** `el_correlator` correlates the tracking sample
twice, over 256 chips:

* with the next chip: the early correlator;
* with the current chip: the late correlator.

So the early and late correlators share one sample stream, half a chip away
from the demodulation samples.

**Tracking loop.** `loop_filter` computes `(early - late) >> 19` (the
finger's setting), limits it to ±16, and holds it as the NCO correction until
the next pair of energies. This is a first-order loop: it moves the chip
strobe until the early and late energies balance.

**Start-up.**

1. Writing 'start' arms the finger.
2. At the next epoch it waits `cfg.offset` clocks.
3. It then restarts its PN generator at chip 0 and restarts the NCO.

**Demodulation.** Three `walsh_correlator`s integrate the on-time samples:

* the pilot, over 2^`log2_plt` chips;
* the DCCH and the FCH/SCH, each over its own symbol length with its own
  Walsh code.

The pilot sum divided by its length, with two fraction bits kept (units of
1/4), is the phase estimate `p`. Each data
symbol `d` becomes `d * conj(p)`, shifted right by `sym_shift` and
saturated to 8 bits. This applies the phase correction and the
maximal-ratio weight in one step.

**Lock detection.** `|p|^2` goes to `lock_detector`, in units of 1/16
because of the two fraction bits of `p`, so that weak paths still give a
usable number. After four estimates
above the threshold the finger is declared locked. After eight below it, the
finger is declared unlocked. Every change raises an interrupt.

**Round trip delay.** Each finger counts the clocks from the system PN epoch
to the on-time sample of its own chip 0, and latches the count every time it
passes chip 0. That happens right after start-up and then once per 8.9 ms PN
period. Because the count follows the tracking loop, the DSP can read each
path's current delay in samples. Right after start-up the count equals the
programmed offset plus 10 (OSR + 2).

Finger registers (`demod_cpu_if`, base `16*f` for finger f):

| offset | meaning |
|--------|---------|
| +0 | W bit0 start, bit1 stop; R `{irq flag, running, locked}` |
| +1, +2 | code offset in samples, [15:0] and [17:16] |
| +3 | DCCH `{log2 length[11:8], Walsh[7:0]}` |
| +4 | FCH/SCH `{log2 length[11:8], Walsh[7:0]}` |
| +5 | `{track_en[12], sym_shift[11:8], log2_plt[3:0]}` |
| +6..+8 | long-code mask |
| +9 | lock threshold (pilot energy) |
| +10 | R loop-filter output |
| +11, +12 | R round trip delay in samples, [15:0] and [17:16] |
| 0x40 | combining / power-control enable per finger |
| 0x41 | R lock-change flags; W clears the flags written as 1 |
| 0x42, 0x43 | R DPRAM write pointers (DCCH, FCH/SCH) |
| 0x44, 0x45 | R forced combines, late symbols dropped |
| 0x46 | R power-control set point in use |

## Deskewing and combining (`deskew_combiner`)

Each path has a different delay, so the fingers deliver the same symbol at
different times. There is one combiner per code channel. Inside it, each
finger has an eight-entry buffer indexed by the symbol number, and a symbol
is written to the slot with its number.

**Normal read.** The read pointer advances when every enabled finger has
filled the current slot. The combiner then outputs the sum.

Two rules stop a failing finger from stalling the others:

* **Forced read.** If some finger has already written the slot four symbols
  ahead of the read pointer, the current slot is combined with whatever it
  holds, and `forced` pulses.
* **Late symbol.** A symbol more than four slots ahead of the read pointer
  is dropped, and `late` pulses.

The delay between paths is therefore compensated without a separate delay
register, because each finger's symbol numbers come from its own code
timing. The limit is that paths must be less than four symbols apart. At 64
chips per symbol that is 256 chips, about 69 µs, far beyond normal multipath
spreads. At very short symbols (a few chips) the limit becomes real.

The combined DCCH symbols are written to DPRAM words 0..511 and the FCH/SCH
symbols to words 512..1023. Each region is a ring, and each word is
`{re[7:0], im[7:0]}`. When both channels complete in the same clock, the
FCH/SCH word is held one clock.

## Power control (`power_control`)

Over each power control group, the unit sums two quantities over the pilot
estimates of the enabled fingers:

* `S = sum |p|^2`, the signal-plus-noise energy;
* `2N = sum |p(k) - p(k-1)|^2`, twice the noise energy, assuming the channel
  holds still between estimates.

At the group strobe it commands "down" (`pc_bit = 1`) when
`(2S - 2N) * 16 > setpoint * 2N`, and "up" otherwise. The set point is a
linear ratio with four fraction bits. It already contains the scale from
pilot SNR to Eb/N0. A new set point arrives through `sp_valid` and takes
effect at the next 20 ms frame strobe. Puncturing the bit into the forward
link belongs to the modulator and is not included.

## Timing (`timing_gen`)

The timing generator counts samples, chips, groups, frames and PN periods
from the system clock.

* A 20 ms reference pulse restarts the chip, group and frame counters.
* A 2 s reference pulse also restarts the PN epoch. Two seconds hold a
  whole number of 2^15-chip periods and of frames.
* `resync` pulses when a reference pulse finds a counter out of step.
* The `loopback` input switches all receivers to the loop-back samples.

## Where this design departs from its source, and why

* **Short PN period.** The source gives a 26.667 ms short-code period
  (98304 chips at this chip rate) but no sequence of that length. The RTL
  uses the standard 2^15-chip short codes (8.9 ms). `EPOCH_LEN` in
  `timing_gen` and the chip-index width in the package must change together
  if a longer sequence is defined.
* **Pilot.** The source's summary table says the reverse-link pilot is time
  multiplexed with power control bits, while its text says the reverse link
  uses a continuous pilot. The RTL follows the continuous pilot. The test
  stimulus puts the pilot on I and the data channels on Q.
* **Not specified by the source, so chosen here:**
  * the tracking loop (a first-order loop, gains, 256-chip integration);
  * the lock detector rule;
  * the Eb/N0 estimator;
  * the pilot averaging (a plain block average, with no filtering across
    blocks);
  * the combiner's forced-read and late-drop rules;
  * every register map, width and the DPRAM layout.
* **Deskewing.** Symbols are aligned by the symbol number each finger
  carries. The round-trip delay is measured and can be read, but the buffers
  do not use it. The result is the same, within the four-symbol skew limit
  above.
* **Searcher decision.** There is no detection threshold, verification or
  peak exclusion; the DSP chooses among the four best offsets per group. A
  strong sidelobe can therefore take one of the four places.
* **Not included:** the DSP and its software (deinterleaving, path
  selection), the Viterbi decoder, the control EPLD, external memories, the
  ADC and the RF/IF units, the forward-link modulator, and the RSSI and status
  inputs.

## Simulating

Every testbench in `tb/` checks its results itself and ends with the line
`TB_RESULT checks=<n> failures=<m>`. The shared stimulus model is
`tb/tb_model_pkg.sv`. It builds the short codes by the same recurrences,
creates the spread pilot, DCCH and FCH signals with a chosen delay, phase and
noise, and quantizes them like the 4-bit ADC.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_finger -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/wcdma_pkg.sv tb/tb_model_pkg.sv tb/tb_finger.sv
./obj_dir/Vtb_finger
```

Substitute any testbench name. The testbenches are:

* one per block: `tb_data_mapper`, `tb_pn_gen`, `tb_srch_correlator`,
  `tb_srch_sorter`, `tb_searcher`, `tb_nco`, `tb_loop_filter`,
  `tb_el_correlator`, `tb_walsh_correlator`, `tb_finger`, `tb_lock_detector`,
  `tb_demod_cpu_if`, `tb_deskew_combiner`, `tb_dpram`, `tb_power_control`,
  `tb_timing_gen`;
* `tb_finger_rates`, which runs one finger at 128-, 16- and 4-chip symbols
  (the speech-class rate up to the highest data rate) with two code
  channels and checks every symbol;
* `tb_channel_card`, for the whole card.

`tb_channel_card` runs the top at its default sizes. The stimulus follows the
power ratio of the original measurements: the pilot is 6 dB below each of the
two traffic channels. There are two paths on antenna 0 (amplitudes 0.6 and
0.4) and one on antenna 1. The test then:

* searches both antennas and checks that the real paths are among the
  candidates;
* verifies each candidate with a finger, and checks that exactly the fingers
  on real paths lock (one finger starts a sample off, so its tracking loop
  must act);
* checks that the round-trip delays read from two fingers differ by the
  difference of their path delays;
* combines the locked fingers, reads the DCCH and FCH symbols back from the
  DPRAM, and compares them with the transmitted bits;
* drives the power-control commands both ways, switches the set point at a
  frame, forces a timing resync, and checks that the fingers lose lock in
  loop-back.

It counts every mechanism and fails on any that never happened. It covers
about 41 ms of signal and takes about 20 s.

## Trust and limits

* The blocks are checked against independent models in the testbenches:
  bit-exact for the codes, the mapper, the sorter, the NCO, the loop filter,
  the RAM and the register file, and statistically (symbol decisions, energy
  ratios) for the correlators, the finger and the searcher.
* Each testbench was also run against a deliberately broken copy of its
  block and reported failures.
* Detection probability against Ec/N0 and BER against Eb/N0 have not been
  measured. The tests run at high SNR.
* Data rates are set only through the Walsh length (1 to 256 chips). The
  DPRAM ring of 512 symbols per channel must be emptied by the DSP in time;
  at the highest rates that is every half millisecond or so.
