// octave_decoder: detects which of the twelve notes E, F, F#, G, G#, A, Bb,
// B, C, C#, D, Eb of one octave are sounding.
//
// Twelve freq_detector instances run in parallel on the same sample stream;
// bit i of note_detected is note i (bit 0 = E, bit 5 = A, bit 11 = Eb). The
// detectors are tuned to the lowest guitar octave sampled at 3.75 kHz; the
// same decoder detects higher octaves when it is fed samples at 7.5, 15 or 30
// kHz, because doubling the sample rate makes a note an octave up look like
// the tuned one. DEBOUNCE_CYCLES, the debounce length in samples, is set
// per octave by the top level so that all octaves debounce for about 21 ms.
module octave_decoder
  import diguitar_pkg::*;
#(
  parameter int DEBOUNCE_CYCLES = 83
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sample_clk,
  input  sample_t     in_sample,
  output octave_vec_t note_detected
);
  for (genvar n = 0; n < 12; n++) begin : g_note
    freq_detector #(
      .NOTE     (n),
      .DB_LENGTH(DEBOUNCE_CYCLES)
    ) u_det (
      .clk, .rst, .sample_clk, .in_sample,
      .note_detected(note_detected[n])
    );
  end

endmodule
