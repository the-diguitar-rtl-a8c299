# DiGuitar: real-time guitar-to-MIDI converter in SystemVerilog

An electric guitar produces one analog waveform; a synthesizer or a recording
program wants MIDI: "key 45 pressed", "key 45 released". This design bridges the
two in hardware. It samples the guitar, finds the pitch of the note being played
with a bank of per-note period detectors (a low-pass FIR followed by an
autocorrelator), and sends NOTE_ON / NOTE_OFF messages on a 31,250-baud MIDI line,
fast enough that a player does not notice the delay (54–59 ms for the lowest
notes, 26 ms for the highest in simulation).

It covers the whole playable range of a standard-tuned guitar, E2 (MIDI key 40,
82.4 Hz) to C#6 (key 85, 1108.7 Hz): 46 notes, one note at a time. Everything
runs in a single 100 MHz clock domain and uses one multiplier per filter and per
detector.

The RTL is a re-implementation of the DiGuitar student project (an FPGA design
built around the Xilinx XADC and FIR Compiler IP). The architecture, rates,
detector table, debounce lengths and MIDI format follow that design; the
filters, which were vendor IP there, are written out here, and the places where
this RTL departs from the original are listed in
[Departures from the original design](#departures-from-the-original-design).

## Signal path

```
adc_data ──► 8-bit signed sample (30 kHz)
               │
     ┌─────────┼───────────┬────────────┬────────────┐
     ▼         ▼           ▼            ▼            │
 antialias  antialias   antialias   antialias        │  81-tap low-pass,
 500 Hz     750 Hz      1 kHz       2 kHz            │  all fed at 30 kHz
     │         │           │            │            │
  read at   read at     read at     read at          │  decimation by the
  3.75 kHz  7.5 kHz     15 kHz      30 kHz           │  sample triggers
     ▼         ▼           ▼            ▼
  octave    octave      octave      octave            12 note detectors each
  decoder 1 decoder 2   decoder 3   decoder 4
  E2..Eb3   E3..Eb4     E4..Eb5     E5..C#6
     └────┬────┴───────────┴────────────┘
          ▼ 46 note lines (key 40 + index)
     note decoder  (lowest note wins, updated at 3.75 kHz)
          ▼
     MIDI transmitter (31,250 baud) ──► inverted pin ──► line driver
```

| Module | Role |
|---|---|
| `diguitar_top` | Wires everything; ADC word to signed sample; pin inversion; LEDs |
| `sample_clock_gen` | One-cycle trigger every `COUNT` clocks (3333 / 6666 / 13332 / 26664) |
| `antialias_fir` | Per-octave 81-tap Blackman-Harris low-pass, 9-bit output |
| `octave_decoder` | Twelve `freq_detector`s, bit 0 = E … bit 11 = Eb |
| `freq_detector` | `note_fir` → `autocorrelator` → `debouncer` for one note |
| `note_fir` | 125-tap harmonic-stop low-pass for one note |
| `autocorrelator` | 2.5-period buffer, serial autocorrelation, peak test |
| `debouncer` | AND of the last `DB_LENGTH` decisions |
| `note_decoder` | Keeps the lowest detected note |
| `midi_tx` | Scans the 46 note lines and sends 3-byte messages |
| `lowpass_fir` | Shared single-multiplier symmetric FIR engine |
| `diguitar_pkg` | Types, note table, sample counts, coefficient functions |

## One decoder, four octaves

The key trick is octave folding. A note one octave up has exactly twice the
frequency. If the octave-2 decoder samples at twice the rate of the octave-1
decoder, then E3 (164.8 Hz at 7.5 kHz) produces exactly the same sample sequence
as E2 (82.4 Hz at 3.75 kHz): 45.5 samples per period. So all four
`octave_decoder` instances are identical. They are tuned once, for E2 … Eb3 at
3.75 kHz, and fed at 3.75, 7.5, 15 and 30 kHz. Only the debounce length differs
(80, 160, 320, 640 samples), so that each octave waits about 21 ms.

The four rates come from four counters on the 100 MHz clock. Each count is
exactly twice the previous one (3333, 6666, 13332, 26664), and the counters
leave reset together. So every 3.75 kHz trigger coincides with a 7.5, a 15 and a
30 kHz trigger, and the octaves stay in phase. (100 MHz / 3333 is really
30.003 kHz; the error is far below a semitone.)

Before an octave decoder throws away samples, its input must be free of
anything above its new Nyquist frequency. That is the job of the four
`antialias_fir`s. All of them run at the full 30 kHz. Each is read only on its
octave's trigger: octave 1 keeps one output in eight. The cutoffs are 500 Hz,
750 Hz, 1 kHz and 2 kHz. Each is an 81-tap windowed sinc with a Blackman-Harris
window and 12-bit taps. Octave 4 is not decimated at all; its filter still
matters, because it keeps octave 4's samples delayed by the same amount as the
other three.

## How a note is detected

Each of the 48 detectors answers one question: is the signal periodic with
this note's period? The period is `SC_LEN` samples at 3.75 kHz, from 46 for E
down to 24 for Eb. A detector has three stages.

**1. Harmonic-stop filter (`note_fir`).** A guitar string produces strong
harmonics. A periodic signal at 2·f0 is also periodic at f0's period, because
two of its cycles fit exactly. Each detector therefore first low-pass filters
its input with a 125-tap FIR. The filter passes f0 (≤ 0.8 dB loss) and removes
2·f0 and above (≥ 49 dB). This design uses a Hamming window with the cutoff at
1.35·f0. At 3.75 kHz the filter delays the signal by 62 samples, about 16.5 ms.

**2. Autocorrelator.** Filtered samples are shifted into a buffer of 2.5
periods (`2*SC_LEN + SC_LEN/2` entries, newest first). After each new sample,
the newest period is the template. The block slides the template along the
older samples and computes, one multiply-accumulate per clock:

```
acc(offset) = Σ_{i=0}^{SC_LEN-1} buf[i] · buf[SC_LEN/2 + offset + i],   offset = 0 … SC_LEN-1
```

So it tests every lag from half a period to 1.5 periods. The offset with the
largest sum is the peak; on a tie the first one wins. The peak lag
(`SC_LEN/2 + offset`) is the measured period. The note is declared present if:

- the per-note `PEAK_MASK` has a 1 at the peak offset, meaning the period is
  within a sample or two of the note's period; and
- the peak sum is at least `DB_THRESHOLD`, which is 0 here.

Starting the lag range at half a period has a useful side effect. A signal an
octave above the note already peaks at offset 0, one short period. That offset
is never in the mask, so the detector rejects the octave above even without
the filter.

Silence is rejected as well. Input that rounds to zero gives all-zero sums, and
the first-maximum rule then picks offset 0.

**3. Debouncer.** The raw yes/no decision is shifted into a `DB_LENGTH`-bit
register. The detector reports the note only while every bit is 1. It turns
on after 21 ms of consistent decisions and turns off on the first "no".

### Per-sample timing

The whole job must finish before the next sample trigger:

| step | cycles (E, `SC_LEN` = 46) |
|---|---|
| request to `note_fir` | 2 |
| FIR (63 symmetric coefficient pairs + output register) | 64 |
| autocorrelation: 46 offsets × (46 products + 1 compare) | 2162 |
| decision | 1 |
| **total** | **≈ 2233** |

Octave 4 gets a new sample every 3333 cycles, so the slowest detector fits with
about a third to spare. An assertion in `autocorrelator` fires if a trigger
arrives while the detector is still busy. Shorter notes finish sooner; Eb needs
about 670 cycles.

### The note table

| note | E | F | F# | G | G# | A | Bb | B | C | C# | D | Eb |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| `SC_LEN` | 46 | 43 | 41 | 38 | 36 | 34 | 32 | 30 | 29 | 27 | 26 | 24 |
| accepted lags | 45–48 | 42–45 | 40–42 | 38–40 | 36–38 | 34–36 | 32–34 | 30–32 | 28–30 | 27–28 | 25–28 | 24–25 |

The masks are in `diguitar_pkg::PEAK_MASK_TABLE`; bit k means lag `SC_LEN/2 + k`.
Neighbouring ranges overlap. A's range includes lag 36, which is G#'s period,
so a detector often also fires for the semitone above the note actually played.
The note decoder removes that second detection (next section). It can still
show up briefly at note onset, as described below.

## From detections to MIDI

**Note decoder.** The 46 debounced lines are ordered low to high: octave 1's
twelve bits, then octave 2's, then octave 3's, then the ten lowest bits of
octave 4 (up to C#6). The note decoder keeps only the lowest set bit, so the
fundamental wins over its harmonics and over the semitone above. It runs on the
3.75 kHz trigger, in two register stages. A change at its input reaches its
output on the second trigger, 267–533 µs later.

**MIDI transmitter.** While idle, `midi_tx` checks one note line per clock,
cycling 0…45. It compares each line with the value it last sent for that note.
On a change it sends three bytes:

- status: 0x91 for NOTE_ON, 0x81 for NOTE_OFF (channel nibble 1)
- key: 40 + line index
- velocity: 64

Each byte is sent UART-style: start bit 0, eight data bits LSB first, stop bit
1. Each bit lasts 3200 clocks (31,250 baud), so one message takes 0.96 ms.
Scanning resumes after the message. If several lines change together, they are
sent one after another in scan order. The top inverts the serial output
(`midi_tx` idles low), because the external single-transistor line driver
inverts it again.

**Onset transient.** When a note starts, the detector for the semitone above
(step 2 above) often completes its debounce a few milliseconds before the
played note's own detector. Its buffer is shorter, so it fills sooner. The
output then briefly carries NOTE_ON for the key above, then NOTE_ON for the
right key, then NOTE_OFF for the key above. In the end-to-end simulation this
happened once: A2 gave key 46 on at 70.8 ms, key 45 on at 79.9 ms and key 46 off
at 80.8 ms. The original design has the same overlapping table.

## Interface of `diguitar_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 100 MHz clock |
| `rst` | in | 1 | synchronous, active-high reset (a push button on the board) |
| `adc_data` | in | 16 | ADC conversion result, offset binary, 0.5 V input = mid-scale |
| `adc_ready` | in | 1 | one-cycle strobe: `adc_data` is new |
| `midi_tx` | out | 1 | inverted MIDI serial data, to the transistor line driver |
| `led` | out | 16 | [11:0] octave-1 detections, [12..14] octaves 2..4 report a note, [15] MIDI message in progress |

The analog parts are outside this RTL and connect to these ports:

- guitar preamplifier: buffer, ×4 gain, +0.5 V offset, diode clamp to the
  ADC's 0–1 V range;
- the ADC itself (the FPGA's on-chip XADC);
- the MIDI line driver.

Only the top 8 bits of `adc_data` are used. Its MSB is inverted, which turns
the offset-binary word into a two's-complement sample centred on 0.5 V. The
sample is registered on `adc_ready`, and any conversion rate well above 30 kHz
works.

Top parameters: `SAMPLE_COUNT` = 3333 (clocks per 30 kHz sample),
`DEBOUNCE_OCT1` = 80 (doubled for each higher octave) and `MIDI_DIVISOR` = 3200
(clocks per MIDI bit). To use a clock other than 100 MHz, scale `SAMPLE_COUNT`
and `MIDI_DIVISOR`. Keep `SAMPLE_COUNT` above about 2300 clocks, or the E
detectors of octave 4 cannot finish (see the timing table).

## Coefficients

No coefficient tables are stored. `lowpass_fir` computes its taps at
elaboration from `NTAPS`, `CUTOFF` (cutoff / sample rate) and `WINDOW`, using
the constant functions in `diguitar_pkg`:

```
h[k] = w[k] · sin(2π·fc·(k−M)) / (π·(k−M)),   M = (N−1)/2,   h[M] = 2·fc
c[k] = round( h[k] / Σh · 4096 )        (12-bit signed, unity DC gain)
```

`w` is Blackman-Harris (0.35875 − 0.48829 cos t + 0.14128 cos 2t − 0.01168 cos
3t, t = 2πk/(N−1)) for the anti-alias filters, and Hamming (0.54 − 0.46 cos t)
for the note filters. The filter sums `(x[k] + x[N−1−k])·c[k]` over the
symmetric pairs, one per clock. It divides by 4096, rounding halves towards
zero, and saturates to the output width.

## Departures from the original design

- **Peak masks of E and D widened by one lag.** The ideal periods at 3.75 kHz
  are 45.5 (E2) and 25.5 (D3) samples. The original masks accept only lags
  46–48 and 26–28. In simulation the E peak alternated between lags 45 and 46,
  and E2 was never reported. Both masks now also accept the lag below. All
  other masks are unchanged.
- **Filters written out.** The original used vendor FIR IP. Only its settings
  and one octave's taps are known, so the anti-alias taps are recomputed with
  the same recipe: Blackman-Harris window, 81 taps, the same cutoffs, 12-bit
  taps. The harmonic-stop filters keep the original length (125 taps) but
  their window and cutoff are this design's own choice.
- **Unity filter gain and saturation.** The original IP halved the signal and
  the top level compensated by keeping the low 8 of 9 output bits. Here the
  filters have unity gain, and the top saturates 9 bits to 8 instead of
  wrapping.
- **Latency of the anti-alias filters** is 42 cycles instead of the IP's 50.
  It does not matter at these rates.
- **Reset reaches every block.** The original left the octave decoders and
  note decoder without reset.
- **ADC word registered on `adc_ready`.** The original used the ADC output
  combinationally.
- **MIDI bit timing exact.** Every bit lasts exactly `DIVISOR` clocks; the
  original counter made each bit one clock longer.
- **Two figures in the original description disagree with its code.** The
  text gives the E2 buffer as 113 samples; the code's sizing rule
  (`2*SC_LEN + SC_LEN/2`) gives 115, which is used here. A code comment puts
  the octave-4 filter's passband at about 1.3 kHz; the text's 2 kHz cutoff is
  used here.
- **Additions:** the `busy` outputs, the autocorrelator's `peak_offset` and
  `peak_value` outputs (used for observation) and `led[15:12]`.

The correlation threshold is 0, as in the original; its tuned values were
never enabled. Raising `DB_THRESHOLD` rejects weak or noisy input. Note
velocity is fixed at 64, and only one note at a time is supported.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a watchdog limit. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_diguitar_top \
    rtl/diguitar_pkg.sv rtl/*.sv tb/tb_diguitar_top.sv -o sim
./obj_dir/sim
```

Put `rtl/diguitar_pkg.sv` first so the package is compiled before its users.
To run another testbench, replace `tb_diguitar_top` with its name.

| testbench | what it establishes |
|---|---|
| `tb_diguitar_top` | Full design at default parameters with an ADC model (1 MS/s) and a MIDI receiver; about 0.5 s of audio, about 2 minutes of simulation. Tones played: A2; A3 together with E5; E4; E5. Checks that each produces NOTE_ON then NOTE_OFF for the right key, with onset-to-NOTE_ON latency under 75 ms (measured 58.9 / 35.4 / 32.1 / 27.2 ms). Checks that only the lower key of the pair is sent, and that every octave, all four triggers, the lowest-note suppression and a debouncer rejection occur. |
| `tb_latency_extremes` | Full design at default parameters, the two ends of the range: E2 (key 40), F2 (key 41), C#6 (key 85). Measured onset-to-NOTE_ON latency 53.8, 58.4 and 26.1 ms; checks all are under 75 ms and that C#6 is fastest. About 2 minutes. |
| `tb_octave_decoder` | All twelve notes E2…Eb3 (fundamental plus 2nd and 3rd harmonic): each note is the lowest bit reported; silence gives nothing. |
| `tb_freq_detector` | E and A detectors: each fires on its own note within 280 samples (E2: 57.6 ms) and stays quiet for the octave above, the semitone above or below, and silence. |
| `tb_autocorrelator` | Peak offset, peak value and decision equal an independent model on tones and noise; exact cycle count; the threshold rejects a weak tone. |
| `tb_antialias_fir`, `tb_note_fir` | Bit-exact against a reference convolution with independently computed taps; exact latency (42 / 64); pass-band and stop-band amplitude. |
| `tb_debouncer`, `tb_note_decoder`, `tb_sample_clock_gen`, `tb_midi_tx` | Against reference models; periods, trigger alignment, 3200-clock bits and 30-bit messages. |

## Limits and trust

- Detection was verified only on synthetic tones: a fundamental with two
  harmonics, no noise, no pitch bend, no decay. A real guitar will need
  tuning of `DB_THRESHOLD`, and perhaps of the masks, the way the original was
  tuned on hardware.
- Chords are not supported. The lowest detected note wins.
- Two bits of octave 4 (D6 and Eb6) are computed but not connected. They are
  above the range of the intended guitar.
- The synthesized design has roughly 8,500 word-level cells and 21,600
  flip-flops. Most of the flip-flops are the 48 sample buffers and 48 FIR
  delay lines.
