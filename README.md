# FONT5 intra-train beam feedback — FPGA logic

A linear collider brings two beams into collision at a spot a few nanometres
high, and magnet vibrations move the beams by more than that. The ILC beam
arrives in long trains of bunches, a few hundred nanoseconds apart. That spacing
leaves time to measure where one bunch went and to deflect the bunches after it.
The FONT5 prototype did this in the ATF2 extraction line at KEK. The ATF train
has three bunches, 140–154 ns apart. A beam position monitor (BPM) measures
bunch 1, and a fast kicker corrects bunches 2 and 3 before they arrive.

This repository is the digital part of that system: the logic of the feedback
board's FPGA. Analogue processors turn each stripline BPM into a *sum* signal,
which is proportional to the bunch charge, and a *difference* signal, which is
proportional to charge × offset. The board digitises these on 9 channels. Each
of its 2 outputs drives a kicker amplifier through a DAC. Two loops are
closed:

| loop | BPM (sum, diff ADC channels) | kicker (DAC) |
|------|------------------------------|--------------|
| 0    | P2 (2, 3)                    | K1 (`dac[0]`) |
| 1    | P3 (4, 5)                    | K2 (`dac[1]`) |

A third BPM, P1 (channels 0 and 1), only witnesses the incoming beam.
Channels 6–8 are spare. They are sampled and passed to the acquisition
outputs.

## The signal chain

```
trig ─► timing_ctrl ──strobe/bunch──► peak_sampler (9 ch) ──► DAQ outputs
           │   └─drive_en──► amp_en            │
           │                                   ├─ P2 sum/diff ─► fb_loop 0 ─► dac[0]
           └─train_start (clears delay loops)  └─ P3 sum/diff ─► fb_loop 1 ─► dac[1]

fb_loop:  charge_norm ──pos──► gain_lut ──corr──► delay_loop ──acc──► gated DAC register
          (diff × 1/sum)       (RAM table)        (accumulator)       (fb_on, drive_en)
```

All logic runs on one clock: 357 MHz (2.80 ns), derived from the accelerator
master oscillator and so locked to the beam. The ADC words arrive on this
clock, one per channel per cycle.

### Timing of one bunch

| cycle after the bunch's strobe | event |
|---|---|
| 0 | `strobe` high; ADC words captured at the end of this cycle |
| 1 | `smp_valid`; samples held on `smp` |
| 2 | reciprocal of the sum read from its table |
| 3 | `pos_valid`: position = diff × reciprocal |
| 4 | `corr_valid`: correction read from the gain table |
| 5 | `acc_valid`: correction added to the delay-loop accumulator |
| 6 | new code on `dac` (`STROBE_TO_DAC` = 6 cycles = 16.8 ns) |

A new bunch can enter every cycle, so the bunch spacing is not limited by
the pipeline. The bunch spacing is 50–55 cycles, so each correction is on the
DAC long before the next bunch. The whole loop's latency goal is about
140 ns, and 130–133 ns was measured on the two loops. That figure also
counts the analogue processor, the converters, the cables, and the
amplifier's 35 ns rise. The digital part
is the 16.8 ns above. The DAC-side latency and the kick's flight time are
outside this logic.

## Charge normalisation

The difference signal scales with the bunch charge, so the position is
diff/sum. A divider would be slow, so the board stores the reciprocal of the
sum in a RAM table (`recip_rom`) and multiplies (`charge_norm`):

* The address is the top 10 bits of the 13-bit positive sum. Address `a`
  covers sums `8a … 8a+7`.
* The entry is the reciprocal of the bin centre, `round(2^25 / (2a+1))`, as
  25 bits. In floating-point terms, `diff × entry / 2^27` is diff/sum.
* `pos = saturate((diff × entry) >>> 14)` is diff/sum as a 14-bit Q1.13
  number: 8191 means diff = sum.
* Binning the sum costs at most 4/sum relative error, about 0.1 % for a
  typical sum of 4000 counts.
* A zero or negative sum reads entry 0, so the position is 0 and no
  correction is made when no beam is present.

The table is computed at elaboration by an `initial` loop, the usual way to
initialise an FPGA block RAM. Changing `RECIP_AW` or `RECIP_FRAC` in
`font5_pkg` resizes it. `SH` follows automatically.

## Gain table

The gain stage is a table too (`gain_lut`, 1024 × 14 bits). The control
system can write any response curve into it between trains, through `gain_we`,
`gain_loop`, `gain_waddr` and `gain_wdata`. It is addressed by the top 10
bits of the position, read as a signed number `v`. At start-up it holds
linear negative feedback at a normalised gain of 1.0:
`lut[v] = -(GAIN_Q8 × v × 16) / 256`, with `GAIN_Q8 = 256`. One DAC unit then
cancels one position unit. This scale stands for the kicker's real
calibration, which a real installation folds into the table. The beam tests
scanned the gain from about 0.3 to 1.7. The best jitter reduction came near
1, at a gain equal to the bunch-to-bunch correlation.

## The delay loop: why an accumulator

The BPM sits downstream of its kicker. Bunch 2 therefore reaches the BPM
already corrected by the kick computed from bunch 1, and what the BPM
measures is only the error that remains. If bunch 3 got only a correction
computed from bunch 2's measurement, the kick from bunch 1 would be lost.
So the drive must be the sum of all corrections so far:

```
acc(k) = acc(k-1) + G(pos(k))        (dl_on = 1, the delay loop)
acc(k) = G(pos(k))                   (dl_on = 0, loop opened for comparison)
```

`delay_loop` clears the accumulator at each train start. It saturates at the
14-bit DAC range and pulses `sat` when it does. Take correlated bunches
(offsets y1, y2, y3) at unity gain:

* bunch 2 arrives at the BPM at y2 − y1;
* with the delay loop, bunch 3 arrives at y3 − y2;
* without the delay loop, bunch 3 arrives at y3 − (y2 − y1).

`font5_top_tb` checks all three.

## Trigger and train sequencing

`timing_ctrl` acts on a rising edge of the pre-beam trigger `trig`. The
settings are in `tcfg`, counted in clock cycles. Cycle 0 is the one in which
`train_start` is high.

* `amp_en` (drive enable) is high for cycles 0 … `window_len`−1.
* Strobe k is high in cycle `first_delay + 1 + k·spacing`, for
  k = 0 … `n_bunches`−1. The strobe instant is meant to sit on the peak of
  the BPM processor's output.
* A trigger edge during a train or an open window is ignored and flagged on
  `trig_ignored`.

The counters are 20 bits wide, up to 1 048 575 cycles (2.9 ms). The bunch
count is 16 bits. So the same logic sequences the 3-bunch ATF train, the
20- and 60-bunch trains planned for ATF2, and ILC-length trains of 3000
bunches at 300 ns or 6000 at 150 ns. An ILC-length train is longer than
the amplifier's 10 µs pulse, but the logic does not limit it.

## Switches per loop (`lctrl[l]`)

* `fb_on = 0`: the DAC is held at 0. Positions are still measured and brought
  out, which gives the feedback-off jitter.
* `dl_on = 0`: the delay loop is open, as described above.

The DAC register is also held at 0 whenever the drive window is closed.

## Ports of `font5_top`

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 357 MHz clock, asynchronous active-low reset |
| `trig` | in | 1 | pre-beam trigger |
| `tcfg` | in | `timing_cfg_t` | `first_delay`, `spacing`, `n_bunches`, `window_len` |
| `lctrl[2]` | in | `loop_ctrl_t` | `fb_on`, `dl_on` per loop |
| `adc[9]` | in | `adc_t` (14-bit signed) | ADC words |
| `gain_we`, `gain_loop`, `gain_waddr`, `gain_wdata` | in | 1, 1, 10, 14 | gain table write port |
| `dac[2]` | out | `dac_t` (14-bit signed) | kicker drive codes |
| `amp_en` | out | 1 | amplifier drive enable |
| `train_start`, `trig_ignored`, `busy` | out | 1 | sequencer status |
| `smp_valid`, `smp_bunch`, `smp[9]` | out | 1, 16, 14 | peak samples of all channels |
| `pos_valid`, `pos[2]` | out | 2, 14 | normalised positions |
| `corr_valid`, `corr[2]` | out | 2, 14 | corrections from the gain table |
| `acc_valid`, `sat` | out | 2, 2 | accumulator update, saturation |

The data-acquisition system's interface is not specified, so these outputs
are plain per-bunch strobes and values.

## Files

| file | contents |
|---|---|
| `rtl/font5_pkg.sv` | widths, channel map, latencies, `timing_cfg_t`, `loop_ctrl_t`, `sat_s()` |
| `rtl/timing_ctrl.sv` | trigger, drive window, bunch strobes |
| `rtl/peak_sampler.sv` | 9-channel sample-and-hold at the strobe |
| `rtl/recip_rom.sv` | reciprocal-of-sum table |
| `rtl/charge_norm.sv` | diff × 1/sum |
| `rtl/gain_lut.sv` | writable gain table |
| `rtl/delay_loop.sv` | saturating accumulator |
| `rtl/fb_loop.sv` | one BPM-to-kicker loop |
| `rtl/font5_top.sv` | the board logic |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/font5_model_pkg.sv` | reference arithmetic shared by the loop-level testbenches |
| `tb/font5_gainscan_tb.sv` | gain-scan experiment with both loops |

Memory: 2 × (1024 × 25 reciprocal + 1024 × 14 gain) bits: two 36 kb and two
18 kb block RAMs of a Virtex-5 class FPGA. Logic: 2 multipliers of 14 × 26 bits and
about 400 flip-flops.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself. For
example, with Verilator 5:

```
verilator --binary --timing --assert --top-module font5_top_tb \
  -y rtl -y tb +libext+.sv rtl/font5_pkg.sv tb/font5_model_pkg.sv tb/font5_top_tb.sv
./obj_dir/Vfont5_top_tb
```

Unit testbenches need only `rtl/font5_pkg.sv` and their own file. All run at
the default sizes in well under a minute.

* `font5_top_tb` closes the loops around a simple beam model. The kicker's
  DAC code adds to the offset the next bunch shows at the BPM, and the
  sums differ per BPM. The testbench checks:
  * every sample;
  * every DAC code, against a reference model, exactly 6 cycles after its
    strobe and not earlier;
  * the DAC at zero when feedback is off or the window is closed;
  * the corrected offsets of bunches 2 and 3;
  * that feedback cuts the bunch-2 jitter.

  It makes each mechanism happen and counts it: retrigger, feedback off,
  open delay loop, gain rewrite, saturation (from a wrong-sign table),
  no-beam bunch, window gating, and 20-, 60- and 3000-bunch trains.
* `font5_gainscan_tb` repeats the beam-test experiment. It scans the gain of
  both loops (0.3–1.7) with Gaussian bunch jitter, using a bunch-2/1
  correlation of 0.96 at P2 and 0.92 at P3, and records two things. The
  first is the bunch-2 rms, which is checked against the rms of y2 − g·y1
  from the same draws. The second is the residual 2–1 correlation. The
  minimum falls near g = correlation, where the correlation crosses zero.

## What is specified and what is chosen here

Taken from the system description:

* the 357 MHz beam-locked clock that also clocks the ADCs;
* 9 inputs and 2 outputs;
* loops P2→K1 and P3→K2, with P1 as a witness;
* sampling at the signal peak;
* charge normalisation by a RAM table of the reciprocal of the sum;
* the gain as a RAM lookup table;
* the delay loop as an accumulator;
* a pre-beam trigger enabling the amplifier drive;
* train formats of 3 bunches at 140–154 ns, with 20, 60 and ILC-length
  trains foreseen.

Chosen here, because the description does not give them:

* all word widths: 14-bit ADC, DAC and position;
* the channel order;
* the table sizes and scaling;
* how the sample instant is programmed (delay, spacing and count in cycles);
* the gain-table write port and its start-up contents, including the
  negative sign;
* clearing the accumulator at the train start, and its saturation;
* the `dl_on` and `fb_on` switches, and holding the DAC at zero outside the
  window;
* the 6-cycle pipeline;
* ignoring a retrigger.

Departures and limits:

* The DAC codes are presented on the 357 MHz clock. The DACs are rated to
  210 MHz, and any rate conversion or clock crossing on the DAC side is
  left to the board.
* The peak is taken as a single sample at a programmed instant. There is no
  peak search or averaging.
* The kicker-to-BPM calibration is folded into the gain table and is not
  modelled.

Not part of this logic: the analogue BPM processor (hybrid, filters, 714 MHz
down-mixer), the ADCs and DACs, the kicker amplifiers, the stripline BPMs and
kickers, the clock source, and the acquisition system.
