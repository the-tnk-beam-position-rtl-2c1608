# Digital processing for a switched-electrode beam position monitor

This is the signal-processing FPGA of a beam position monitor (BPM) for a
2 GeV electron storage ring whose beam goes round at F0 = 2.59 MHz
(RF 181.3 MHz = 70·F0). Four button electrodes pick up the passing beam. An RF
front end (band-pass filters, a GaAs switch array that swaps the four buttons
among four analog channels, and a heterodyne receiver) turns each button signal
into an intermediate frequency (IF) near 10·F0. One 14-bit ADC per channel
samples that IF near 40·F0. The FPGA measures the amplitude of each channel's
IF once per turn (turn-by-turn data). It also sums those values over many turns
into slow-acquisition (SA) data at about 10 Hz, for slow orbit feedback. The results go
over VME to the crate controller. The beam position is formed from the four
amplitudes in software, outside this design.

The RTL here covers the FPGA only. The RF parts, switches, PLLs, DDS and ADC
chips are analog or vendor parts, and they are not modelled.

## Frequency plan and why the detector output is DC

Every frequency in the system is tied to F0:

| signal | frequency |
|---|---|
| pickup signal used | 140·F0 (362.6 MHz, the 2nd RF harmonic) |
| heterodyne (LO) | 130·F0 + ΔF1 |
| IF after mixing | 10·F0 − ΔF1 (about 26 MHz) |
| ADC sample rate fs | 40·F0 + ΔF2 (about 103.6 MHz) |
| DDS reference for both PLLs | 35·F0 + ΔFs |

ΔF1 and ΔF2 are a few kHz. The small offsets stop the result from depending
on signal phase and fill pattern, and they spread ADC nonlinearity. As a
result, the IF seen by the ADC sits just off fs/4:

    f_IF / fs = (10·F0 − ΔF1) / (40·F0 + ΔF2)

The NCO is set to exactly this ratio, so multiplying by its cosine and sine
moves the IF to DC. The NCO frequency word is `round(f_IF / fs · 2^32)`, written
over VME. The testbenches use ΔF1 = 3 kHz and ΔF2 = 5 kHz, which gives the word
0x3FFD4FC7, just below 2^30. Software must compute the word from the
actual offsets. The reset value is exactly 2^30 (ΔF1 = ΔF2 = 0).

The FPGA clock is the ADC sample clock, and every block takes one sample per
clock.

## The chain, stage by stage

Each channel runs the same chain (`bpm_dsp_channel`). All four channels share
one NCO and one turn marker, so they always work on the same samples.

```
ADC (14b) -> BPF -> x cos -> turn LPF -> Uc -.
                 \-> x sin -> turn LPF -> Us -+-> Uc^2+Us^2 -> accumulator -> SA
                                              (turn-by-turn)   (N turns)
```

| stage | module | what it does | output width |
|---|---|---|---|
| band-pass | `bpm_bpf` | y[n] = x[n] − x[n−2]. Zeros at DC and fs/2, gain 2 at fs/4 | 15 |
| NCO | `bpm_nco` | 32-bit phase accumulator; 1024×16 cosine table computed at elaboration; sine read a quarter table earlier | 16 |
| detector | `bpm_mixer` | x·cos and x·sin, floored by 2^15 | 15 |
| turn LPF | `bpm_turn_lpf` | integrate over one turn, output the sum, restart (integrate-and-dump) | 23 |
| turn marker | `bpm_turn_timer` | counter over SPT samples (default 40); marks the last sample of each turn | – |
| sum of squares | `bpm_sumsq` | Uc² + Us², full precision | 46 |
| SA accumulator | `bpm_sa_acc` | sums N turn values (default 259 000 = 10 Hz), outputs the sum, restarts | 68 |

No stage can overflow, even with SPT = 255 and full-scale input. The widths in
`bpm_pkg` are sized for that worst case, and the SA width covers the largest
turn count the register allows (2^22 − 1).

**Why integrate over exactly one turn.** The beam signal repeats every turn.
A boxcar of exactly one turn has nulls at every revolution harmonic, so fill
pattern ripple and the detector's 2·f_IF product (near fs/2, which also falls
on a null for 40 samples) cancel within one turn. Since fs is 40·F0 + ΔF2, a
40-sample window is short of a true turn by only ΔF2/fs (about 5·10⁻⁵).

**What the numbers mean.** A sine of amplitude A ADC codes at the IF gives a
filtered amplitude of 2A, and a detector DC level of about A per sample. Over
a 40-sample turn this gives

    Uc² + Us² ≈ (40·A)²

whatever the signal's phase. An SA value is N times that. The result is the
square of the amplitude: position software takes square roots before forming
differences over sums. Because squares are summed, an SA value averages power over the turns, not
amplitude. That follows the chain as given (the sum of squares is
accumulated), and it is not a choice made here.

## Timing

From the clock on which a channel's ADC input carries the last sample of a
turn:

| event | clocks later |
|---|---|
| filter output registered | 1 |
| detector output registered (turn marker delayed to match) | 2 |
| Uc, Us valid | 3 |
| Uc² + Us² valid (turn-by-turn) | 4 |
| SA value valid (on the last turn of a period) | 5 |
| turn-by-turn / SA visible in VME registers | 5 / 6 |

The NCO starts at phase 0 after reset. Its outputs are registered, and they
meet the filtered sample of the previous clock in the detector. That fixed
phase offset does not matter, because the sum of squares ignores phase.

## VME interface

`bpm_vme_slave` is a minimal A24/D32 slave:

- It handles single transfers only: no block transfers, no interrupts, and no
  address-modifier decoding.
- AS*, DS* and WRITE* pass through two-stage synchronisers.
- A cycle is accepted when both strobes are seen low and A23..A7 match
  `BASE_ADDR` (default 0x100000).
- DTACK* is asserted about 3 clocks later. It is held until DS* is seen high
  again.
- `vme_data_oe` marks when read data is driven, for an external transceiver.

| byte offset | register | access |
|---|---|---|
| 0x00 | ID, 0x42504D34 | R |
| 0x04 | NCO frequency word (reset 0x40000000) | R/W |
| 0x08 | samples per turn, 8 bits (reset 40) | R/W |
| 0x0C | turns per SA value, 22 bits (reset 259000) | R/W |
| 0x10 | SA sequence count, +1 per SA value | R |
| 0x20 + 16·c + 4·w | SA value of channel c, 32-bit word w = 0,1,2 (low first) | R |
| 0x60 + 8·c + 4·w | turn-by-turn value of channel c, word w = 0,1 (low first) | R |

All four channels' result registers update on the same clock. A multi-word
value is consistent if the SA sequence count reads the same before and after
the words are read.

If you change the samples-per-turn or turns-per-SA register, the change takes
effect on the running turn or period. If the new value is below the running
count, the turn or period ends on the next sample. So the first value after a
change may be short, and software should discard it.

## How far to trust it, and where it departs from the source design

These parts follow the published system description:

- the chain order BPF → cos/sin detector → LPF → Uc² + Us² per turn →
  accumulation over a set number of turns;
- four 14-bit channels;
- an NCO slightly off 10·F0;
- about 40 samples per turn;
- the 10 Hz SA rate;
- reporting over VME.

These are this design's own choices. The source names the stage but does not
describe how it works inside.

- **Band-pass filter.** Two-tap difference. A longer filter would be sharper,
  at the cost of more logic.
- **LPF.** One-turn integrate-and-dump.
- **NCO.** A 32-bit accumulator with a 10-bit, 16-bit-wide table.
- **Turn timing.** Taken from a free-running sample counter. There is no
  revolution-marker input, so turn boundaries are not aligned to injection.
  A first-turn measurement would need a trigger input, which is not built.
- **Register interface.** The whole VME protocol subset and the register map.
- **Widths and scaling.** All internal widths, and the floor scaling in the
  detector.
- **Reset.** Asynchronous active-low reset, which clears every register.

These parts are not built:

- control of the switch array (the switching sequence and its timing are not
  given);
- setting of the programmable-gain amplifier;
- programming of the DDS and PLLs;
- any turn-by-turn buffer memory (only the latest turn value is held);
- an injection trigger for first-turn capture;
- the position calculation and calibration, which belong to the VME
  controller's software.

The testbenches check every stage bit-exactly against models written
independently in the testbench. They also check the whole module against the
ideal (SPT·A)² with 1 % tolerance. One of them is the full-size run: a complete
259 000-turn SA period at default settings (10.36 M clocks).

## Files

`rtl/`:

- `bpm_pkg.sv`: sizes, types, register indices
- `bpm_bpf.sv`, `bpm_nco.sv`, `bpm_mixer.sv`, `bpm_turn_lpf.sv`,
  `bpm_turn_timer.sv`, `bpm_sumsq.sv`, `bpm_sa_acc.sv`: the stages
- `bpm_dsp_channel.sv`: one channel
- `bpm_vme_slave.sv`: register interface
- `bpm_fpga.sv`: top; 4 channels, NCO, turn timer, VME

`tb/`:

- `tb_<module>.sv`: one self-checking testbench per module
- `tb_bpm_fpga.sv`: end to end. It imitates a test stand with one channel
  3 dB down, changes the turn length mid-run and checks every mechanism.
- `tb_bpm_fpga_full.sv`: one full 10 Hz SA period at default settings.
- `tb_bpm_fpga_phase.sv`: position against signal phase and against slow
  phase modulation. With one channel 3 dB down and K = 20 mm, the chain's own
  phase dependence is about 0.6 µm peak to peak, well under the 5 µm the
  system is specified for.
- `tb_vme_master.sv`: VME master model used by the top-level tests.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bpm_fpga \
    -y rtl -y tb +libext+.sv rtl/bpm_pkg.sv tb/tb_bpm_fpga.sv
./obj_dir/Vtb_bpm_fpga
```

Replace the top module name to run any other testbench. The full-size test
takes about 10 s. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/bpm_pkg.sv rtl/bpm_fpga.sv`.

To change sizes, edit `bpm_pkg.sv`. `LUT_AW` and `LUT_W` set the NCO's
spurious level. `SPT_W` and `TURNS_W` set the largest turn length and SA
period. The dependent widths follow automatically.
