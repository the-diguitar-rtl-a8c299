// diguitar_pkg: types, constants and coefficient generators shared by the
// guitar-to-MIDI converter.
//
// The converter samples a guitar at 30 kHz, low-pass filters it once per
// octave and decimates to 30 / 15 / 7.5 / 3.75 kHz. Because each octave runs
// at twice the rate of the one below, one table of twelve note detectors
// (E..Eb of the lowest guitar octave at 3.75 kHz) serves all four octaves.
// This package holds that table (autocorrelation period in samples and the
// mask of peak positions accepted for each note), the sample-clock counts,
// and constant functions that compute the FIR coefficients at elaboration
// time, so no coefficient table has to be stored in a file.
//
// FIR coefficients are windowed-sinc low-pass taps:
//   h[k] = w[k] * sin(2*pi*fc*(k-M)) / (pi*(k-M)),  M = (N-1)/2,  h[M] = 2*fc
// with fc the cutoff divided by the sample rate, normalised so that
// sum(h) = 1 (unity DC gain) and rounded to integers c[k] = round(h[k]*2^12).
// The anti-alias filters use a Blackman-Harris window, the per-note
// harmonic-stop filters a Hamming window (this design's choice; its
// transition band is narrow enough to pass f0 and stop 2*f0 with 125 taps).
package diguitar_pkg;

  typedef logic signed [7:0] sample_t;     // 8-bit two's-complement audio sample
  typedef logic [11:0]       octave_vec_t; // one bit per note E..Eb of an octave

  localparam int NUM_NOTES   = 46;         // E2 (MIDI 40) .. C#6 (MIDI 85)
  localparam int CLK_HZ      = 100_000_000;
  localparam int COUNT_30K   = 3333;       // 100 MHz / 3333 = 30.003 kHz
  localparam int COEF_FRAC   = 12;         // fixed-point scale of FIR taps
  localparam int COEF_W      = 12;         // signed coefficient width

  typedef enum logic [0:0] {WIN_BLACKMAN_HARRIS, WIN_HAMMING} window_e;

  // Samples per period of each note of the lowest octave at 3.75 kHz
  // (E2 = 82.41 Hz -> 46 samples ... Eb3 = 155.56 Hz -> 24 samples).
  localparam int SC_LEN_TABLE [12] = '{46, 43, 41, 38, 36, 34, 32, 30, 29, 27, 26, 24};

  // Autocorrelation offsets (lag = SC_LEN/2 + offset) whose peak counts as
  // this note. All entries are the original tuning except E and D, whose
  // ideal periods (45.5 and 25.5 samples) lie half a sample below the lags
  // the original masks accept, so the peak falls on the lag below as often
  // as not: E (originally offsets 23..25, 64'd58720256) is widened by offset
  // 22 (lag 45) and D (originally 13..15, 64'd57344) by offset 12 (lag 25).
  // Neighbouring masks overlap (A accepts lag 36, the period of G#), so a
  // decoder may also flag the semitone above a note; the note decoder keeps
  // the lowest.
  localparam logic [63:0] PEAK_MASK_TABLE [12] = '{
    64'd62914560, 64'd31457280, 64'd7340032, 64'd3670016,
    64'd1835008,  64'd917504,   64'd458752,  64'd229376,
    64'd114688,   64'd49152,    64'd61440,   64'd12288};

  // Fundamental of each note of the lowest octave, in Hz.
  localparam real NOTE_HZ_TABLE [12] = '{82.41, 87.31, 92.50, 98.00, 103.83, 110.00,
                                         116.54, 123.47, 130.81, 138.59, 146.83, 155.56};

  // Anti-alias cutoff of each octave at the 30 kHz input rate, in Hz.
  localparam real AA_CUTOFF_HZ_TABLE [4] = '{500.0, 750.0, 1000.0, 2000.0};

  localparam real PI = 3.14159265358979323846;

  // Un-normalised windowed-sinc tap k of an n-tap low-pass filter with
  // cutoff fc (fraction of the sample rate).
  function automatic real lowpass_tap(int n, int k, real fc, window_e win);
    real x, w, h, t;
    x = real'(k) - real'(n - 1) / 2.0;
    t = 2.0 * PI * real'(k) / real'(n - 1);
    if (win == WIN_HAMMING)
      w = 0.54 - 0.46 * $cos(t);
    else
      w = 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
    if (x == 0.0)
      h = 2.0 * fc;
    else
      h = $sin(2.0 * PI * fc * x) / (PI * x);
    return w * h;
  endfunction

  // Round to nearest integer, halves away from zero.
  function automatic int round_real(real v);
    return (v >= 0.0) ? int'($rtoi(v + 0.5)) : -int'($rtoi(-v + 0.5));
  endfunction

endpackage
