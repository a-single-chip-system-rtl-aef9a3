# Single-chip ECG feature extractor: QRS detection, RR interval, heart rate

This design reads an ECG signal in real time and produces three features:

- a pulse for every QRS complex (heartbeat);
- the RR interval, which is the time between two beats, in milliseconds;
- the heart rate in beats per minute.

The detector does not use a matched filter or a trained model. It applies a
three-level integer Haar wavelet transform to the signal. It then looks, in
each detail band, for the mark a QRS complex leaves there: a large negative
peak, a zero crossing and a large positive peak, in that order. Each band has
its own adaptive thresholds. Counters turn the detected beats into RR interval
and heart rate.

The only settings are the clock rate (`CLK_HZ`, 50 MHz) and the sampling rate
(`FS_HZ`, 800 Hz). Every other time constant is derived from these two.

The published design this follows was built on an FPGA. It reports about 97.5 %
detection accuracy on ten MIT-BIH arrhythmia records, and about 16 ms between
the R peak and the output pulse. The synthetic-ECG test here measures the same
16 ms mean delay. The accuracy figure has not been reproduced, because no
recorded ECG data is included.

## Signal path

```
 TLC2543 ──► adc_controller ──► haar_dwt ──┬─ D1 (400 Hz) ─► level_qrs_detector ─ Pulse_1 ─┐
 (12-bit,       800 Hz,          3 levels  ├─ D2 (200 Hz) ─► level_qrs_detector ─ Pulse_2 ─┼─ OR ─► final_pulse_generator ─► Pulse_for_QRS
  serial)       12-bit codes               └─ D3 (100 Hz) ─► level_qrs_detector ─ Pulse_3 ─┘                │ Short_pulse
                                                                                                            ▼
                                                        seven_seg_display ◄── HR ◄── rr_hr_calculator ──► RR_int ──► rs232_tx
```

All modules run on the single system clock. Data moves with one-clock
`valid` strobes: 800 per second out of the converter, then 400, 200 and 100
per second out of the three wavelet levels. Nothing in the design needs more
than one clock per sample, so the 50 MHz clock leaves plenty of slack. The
clock rate matters only because the pulse lengths and the RR counters are
measured in clock cycles.

## Wavelet front end (`haar_dwt`, `haar_stage`)

The 12-bit converter code is offset binary. Inverting its MSB gives a signed
value centred on zero. Each `haar_stage` pairs up consecutive inputs
`x0, x1` and outputs:

```
A = floor((x0 + x1) / 2)     approximation: feeds the next level
D = x0 - x1                  detail: goes to that level's detector
```

So each level runs at half the rate of the one before. `x0 - x1` can need 13
bits. It is saturated to 12 bits, so every coefficient stays 12 bits wide.

A QRS complex is steep on both sides:

- the rising R edge gives a strongly negative `D`;
- the falling edge gives a strongly positive `D`;
- `D` crosses zero at the R peak.

Slower waves (P, T, baseline wander) give small `D` values. Levels 1 to 3 cover
the band where most QRS energy lies. Deeper levels would mostly carry motion
and baseline artefacts.

## Finding a QRS complex in one band (`level_qrs_detector`)

Each level has five sub-blocks. This part of the design has the most detail.

### Adaptive thresholds (`threshold_tracker`)

The detail stream is cut into one-second windows. A window is `NC` samples:
400, 200 or 100, depending on the level. Within a window, the tracker keeps
the largest value (the maximum tracker) or the smallest value (the minimum
tracker). At the end of the window this extreme is pushed into a four-deep
history, REG1 to REG4. The threshold is

```
T = 5/8 × (REG1 + REG2 + REG3 + REG4) / 4
```

It is computed with shifts and one add, rounding down. So `T_p` is 5/8 of the
typical QRS positive peak over the last four seconds, and `T_n` is the same for
the negative peak. The thresholds follow slow changes in amplitude without any
setting.

The window extreme restarts from zero every second. As a result, a second with
no beat pulls the thresholds down only partly.

### Local maximum and minimum (`local_max_detector`, `local_min_detector`)

Three registers hold the last three coefficients:

- REG5 = `D(n)`
- REG6 = `D(n-1)`
- REG7 = `D(n-2)`

After each sample:

```
maximum:  REG7 < REG6  and  REG6 > T_p  and  REG5 < REG6
minimum:  REG7 > REG6  and  REG6 < T_n  and  REG5 > REG6
```

A strict peak is needed. A flat top of two equal values is not reported.

### Zero crossing (`zero_cross_detector`)

The detector compares sign bits only. A crossing is reported when `D(n-1)` is
negative and `D(n)` is not. This is the crossing that comes between the
negative and positive lobes of a QRS complex.

The output is delayed by one clock. This gives it the same latency as the
min/max detectors, so events found on the same sample arrive together.

### Sequence check (`qrs_fsm`)

```
ADAPT ──(5 s of samples)──► MIN_SRCH ──min──► ZC_SRCH ──zc──► MAX_SRCH ──max──► MIN_SRCH
                                │                                  ▲          (qrs_detected)
                                └──────── min and zc together ─────┘
```

- **ADAPT** lasts 5 s after reset, counted as `5 × NC` level samples. In that
  time the threshold history fills. Both outputs stay low. When ADAPT ends,
  `enable_measuring` goes high.
- **MIN_SRCH, ZC_SRCH, MAX_SRCH** wait for their own event and ignore the
  other two.
- A maximum in MAX_SRCH gives a one-clock `qrs_detected`.
- A minimum that lies just before the zero (minimum and crossing reported in
  the same clock) goes straight to MAX_SRCH.
- No state has a time-out.

### Output pulse (`pulse_generator`)

`qrs_detected` is stretched into `Pulse_i`, 30 ms long. A new trigger
restarts the pulse.

## Combining the levels (OR gate, `final_pulse_generator`)

The three `Pulse_i` signals are ORed. A beat seen on any level counts. The
pulses of one beat normally overlap into a single `OR_gate_pulse`, because the
levels find the beat a few milliseconds apart.

`final_pulse_generator` handles each rising edge of `OR_gate_pulse`:

- If at least 200 ms have passed since the previous rising edge, it starts the
  20 ms `Pulse_for_QRS` (a chip output) and gives the one-clock
  `Short_pulse`.
- Otherwise it refuses the edge and reports it on `rejected`.

200 ms is taken as the shortest possible RR interval. The gap is measured
between rising edges, including refused ones. The first edge after reset is
always accepted.

## RR interval and heart rate (`rr_hr_calculator`)

The block has four counters, two latch registers and a shift:

| Counter | Counts | Action |
|---|---|---|
| C1 | clocks, 0 … `CLK_HZ/1000 − 1` | its overflow is the 1 ms tick |
| C2 | ms since the last beat | `Short_pulse` copies it into `RR_int[10:0]` and clears it |
| C3 | ms, 0 … 14 999 | its overflow copies `C4 << 2` into `HR[8:0]` and clears C4 |
| C4 | beats (`Short_pulse`) | — |

Since 60 s = 4 × 15 s, four times the beats in a 15 s window is the rate per
minute. This makes `HR[1:0]` always zero. HR updates every 15 s in steps of
4 beats/min. `RR_int` updates at every beat with 1 ms resolution.

All counters are held at zero until `enable_measuring` rises. So the first
`RR_int` after adaptation is measured from that moment. C2 saturates at
2047 ms and C4 at 127.

## Peripherals

These three blocks are only named in the published design. Their details are
this design's own.

- **`adc_controller`** drives a TLC2543 serial 12-bit converter. Once per
  1/fs, and only after the converter's EOC is high, it:
  - pulls `cs_n` low;
  - runs 12 I/O clocks at `CLK_HZ / (2·SCLK_HALF)`, which is 3.125 MHz;
  - shifts out the command word: channel `CHANNEL`, 12-bit, MSB first,
    unipolar;
  - shifts in the 12 result bits on the rising edges.

  The converter returns the previous conversion, so samples lag by one
  period.
- **`rs232_tx`** sends each new RR value as two 8N1 characters at `BAUD`
  (115200). The high byte `{5'b0, rr[10:8]}` goes first, then `rr[7:0]`. A
  value that arrives during a frame is dropped. That cannot happen at real
  heart rates.
- **`seven_seg_display`** converts HR to three BCD digits with
  shift-and-add-3. It drives three active-low `{g,f,e,d,c,b,a}` digit outputs.

## Top level and parameters (`ecg_feature_extractor`)

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock; all ms timing is derived from it |
| `FS_HZ` | 800 | sampling rate; must be a multiple of 8 (gives `NC` = 400/200/100) |
| `BAUD` | 115 200 | serial rate for RR values |
| `SCLK_HALF` | 8 | converter I/O clock half-period in system clocks |

`enable_measuring` is the AND of the three levels' adaptation flags. Besides
the outputs already named, the top brings out:

- `Pulse_1..3`, as `pulse_level`;
- `rr_valid` and `hr_valid` strobes;
- the numeric `rr_int` and `hr`.

Shared types and the ms-to-cycles helper are in `ecg_pkg`. Coefficients are
of type `coef_t` (12-bit signed). Every register has an active-low
asynchronous reset, `rst_n`.

## What is filled in beyond the published description

The published design describes the detection chain and the RR/HR counters
closely. It gives the converter interface, the serial link and the display
only by name. These choices are this design's own:

- offset-binary to two's complement conversion, and saturation of `D` to
  12 bits;
- thresholds rounded down, and the window extreme reset to zero each second;
- detector outputs as registered one-clock pulses, with the zero-crossing
  output delayed to line up with the others;
- the state machine going from MIN_SRCH straight to MAX_SRCH when a minimum
  and a crossing coincide; no time-outs;
- retriggerable 30 ms pulses; the 200 ms gap measured between rising edges,
  including refused edges;
- RR/HR counters that saturate, and a first RR value measured from the end of
  adaptation;
- `enable_measuring` as the AND of the three levels;
- the converter command word, I/O clock rate and EOC handling;
- the serial frame format and baud rate;
- the display coding and polarity.

The published design was written in VHDL for an FPGA, with its own A/D, RS232
and display modules. This is a new SystemVerilog description of the same
architecture, not a translation.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Checks |
|---|---|
| `tb_haar_dwt` | all three levels against a reference model, including saturation; output counts |
| `tb_local_max_detector`, `tb_local_min_detector` | every detection, its value and latency, and the threshold after every sample, against a reference model |
| `tb_zero_cross_detector` | every crossing and its timing |
| `tb_qrs_fsm` | adaptation length; valid and invalid event orders |
| `tb_pulse_generator` | pulse length; retrigger |
| `tb_level_qrs_detector` | synthetic QRS-shaped detail stream: one pulse per large complex, none for small ones or during adaptation, 30 ms length, latency, threshold level |
| `tb_final_pulse_generator` | accept/refuse decisions at 100, 150, 199.9, 200, 210 and 600 ms gaps; pulse lengths |
| `tb_rr_hr_calculator` | RR values, HR per 15 s window, saturation, hold while disabled |
| `tb_rs232_tx` | decoded characters, bit timing, drop while busy |
| `tb_seven_seg_display` | every value 0…511 |
| `tb_adc_controller` | against the converter model `tlc2543_model`: sample values, 1/fs spacing, command word, I/O clock shape |
| `tb_ecg_feature_extractor` | end to end, at `CLK_HZ` = 200 kHz (see below) |
| `tb_ecg_full` | end to end with every default (50 MHz) |
| `tb_ecg_noise` | 60 s of harder synthetic ECG at 200 kHz, scored for accuracy (see below) |

The end-to-end tests share `ecg_tb_checker`. It generates a synthetic ECG:

- beats every 750 ms (80 beats/min);
- each beat has a Gaussian R wave, an S dip and a T wave, plus noise;
- one premature beat comes 150 ms after a normal one.

The checker feeds this signal through the converter model and checks:

- no output during adaptation;
- exactly one 20 ms `Pulse_for_QRS` per normal beat, within 60 ms of the R
  peak;
- the premature beat is refused by the 200 ms rule;
- RR = 750 ± 12 ms;
- HR = 80 ± 4 after the first 15 s window;
- the display digits;
- every RR value decoded from the serial line.

It also counts each mechanism: A/D frames, end of adaptation, detections per
level, overlap of level pulses, refusals, RR and HR latches, serial frames and
display updates. A mechanism that never happened counts as a failure.

At 200 kHz the reduced test covers 21 s of ECG in a few seconds of simulation.
The full-size test runs at 50 MHz. It stops after the second RR value, about
5.9 s of ECG or 3·10⁸ clocks, which takes a few minutes. The 15 s heart-rate
window at 50 MHz (about 10⁹ clocks) is covered only by the reduced-clock test.
The design's timing scales exactly with `CLK_HZ`, so the reduced test behaves
the same in milliseconds.

`tb_ecg_noise` uses a harder signal:

- R amplitudes vary between 1000 and 1800 codes;
- RR intervals vary between 600 and 1000 ms;
- the baseline wanders by ±300 codes at 0.3 Hz and drifts by ±150 codes;
- there is ±15 codes of noise.

It scores the output as accuracy = 1 − (false + missed) / beats. The test fails
below 95 %. Typical runs give 98.5–100 %, about one missed beat in 67. The
missed beats are low-amplitude beats right after tall ones: their wavelet
peaks stay below 5/8 of the recent average on every level. This is a property
of the threshold rule, not a fault.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_ecg_feature_extractor rtl/ecg_pkg.sv tb/tb_ecg_feature_extractor.sv
./obj_dir/Vtb_ecg_feature_extractor
```

Replace the top module and file to run any other testbench.

## Limits

- Detection quality was checked only on synthetic beats. Wide or inverted
  QRS complexes and real arrhythmia recordings were not simulated. A beat
  much smaller than the last few (below about 5/8 of their peak slope) is
  missed. The state
  machine has no time-out: after a minimum with no matching maximum, it waits
  for the next beat's maximum.
- HR changes only every 15 s and in steps of 4 beats/min. This is inherent to
  the counter method.
- `hr[1:0]` are constant zero, and the approximation outputs of the last
  wavelet level are unused. Synthesis reports these as idle bits.
