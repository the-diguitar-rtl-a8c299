// diguitar_top: real-time guitar-to-MIDI converter.
//
// Data flow, all in the 100 MHz clock domain:
//   ADC word -> 8-bit signed sample -> four anti-alias FIRs at 30 kHz ->
//   decimated to 3.75 / 7.5 / 15 / 30 kHz -> four identical octave decoders
//   -> 46 note lines (E2 .. C#6) -> note decoder (lowest note wins) ->
//   MIDI transmitter -> inverted serial pin.
//
// The ADC word (adc_data, captured when adc_ready pulses) is reduced to its
// top 8 bits with the MSB inverted, which turns the offset-binary reading
// centred on mid-scale into a signed two's-complement sample. Four
// sample_clock_gen counters make one-cycle triggers at 30, 15, 7.5 and 3.75
// kHz; since their periods are exact multiples and they leave reset together
// the triggers stay aligned. Every anti-alias FIR filters the 30 kHz stream;
// octave decoder k reads its FIR's latest output on its own, slower trigger
// (decimation). The FIR output is saturated from 9 to 8 bits. Octave 1
// (E2..Eb3) runs at 3.75 kHz with an 80-sample debounce, octave 2 at 7.5 kHz
// (160), octave 3 at 15 kHz (320), octave 4 at 30 kHz (640): about 21 ms
// each. The 46 note lines are octave 1's twelve bits, then octave 2, octave
// 3 and the ten lowest bits of octave 4 (up to C#6, the highest fret); line i
// is MIDI key 40 + i.
//
// Ports: clk is the 100 MHz clock, rst a synchronous active-high reset.
// midi_tx is the MIDI serial output, inverted (idle low) for the transistor
// line driver. led[11:0] shows octave 1's detections, led[15:12] the three
// higher octaves' "any note" flags and MIDI activity.
//
// The structure, rates, debounce lengths, note mapping and pin inversion
// follow the original design. Registering the ADC word on adc_ready,
// saturating (rather than wrapping) the FIR outputs and the use of led[15:12]
// are this design's choices.
module diguitar_top
  import diguitar_pkg::*;
#(
  parameter int SAMPLE_COUNT  = COUNT_30K, // 100 MHz cycles per 30 kHz sample
  parameter int DEBOUNCE_OCT1 = 80,                      // debounce samples, octave 1
  parameter int MIDI_DIVISOR  = 3200                     // 100 MHz cycles per MIDI bit
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] adc_data,
  input  logic        adc_ready,
  output logic        midi_tx,
  output logic [15:0] led
);
  // ---------------------------------------------------------------- ADC
  sample_t adc_sample;

  always_ff @(posedge clk) begin
    if (rst)
      adc_sample <= '0;
    else if (adc_ready)
      adc_sample <= {~adc_data[15], adc_data[14:8]};
  end

  // ---------------------------------------------------- sample triggers
  logic [3:0] trig;   // [0] 3.75 kHz, [1] 7.5 kHz, [2] 15 kHz, [3] 30 kHz

  for (genvar o = 0; o < 4; o++) begin : g_clk
    sample_clock_gen #(.COUNT(SAMPLE_COUNT << (3 - o))) u_gen (
      .clk, .rst, .trigger(trig[o])
    );
  end

  // ------------------------------------ anti-alias filters and decoders
  octave_vec_t        oct_notes [4];
  logic signed [8:0]  fir_out   [4];
  sample_t            oct_sample[4];
  logic [3:0]         fir_valid, fir_busy;

  for (genvar o = 0; o < 4; o++) begin : g_oct
    antialias_fir #(.OCTAVE(o + 1)) u_aa (
      .clk, .rst,
      .in_valid  (trig[3]),
      .in_sample (adc_sample),
      .out_valid (fir_valid[o]),
      .out_sample(fir_out[o]),
      .busy      (fir_busy[o])
    );

    assign oct_sample[o] = (fir_out[o] >  9'sd127)  ? 8'sd127  :
                           (fir_out[o] < -9'sd128)  ? -8'sd128 : fir_out[o][7:0];

    octave_decoder #(.DEBOUNCE_CYCLES(DEBOUNCE_OCT1 << o)) u_dec (
      .clk, .rst,
      .sample_clk   (trig[o]),
      .in_sample    (oct_sample[o]),
      .note_detected(oct_notes[o])
    );
  end

  // ------------------------------------------------ note decoder, MIDI
  logic [NUM_NOTES-1:0] decoder_in, decoder_out;
  logic                 midi_data, midi_busy;

  assign decoder_in = {oct_notes[3][9:0], oct_notes[2], oct_notes[1], oct_notes[0]};

  note_decoder #(.MAXINDEX(NUM_NOTES - 1)) u_note (
    .clk, .rst, .trig(trig[0]), .pitches_in(decoder_in), .notes_out(decoder_out)
  );

  midi_tx #(.DIVISOR(MIDI_DIVISOR)) u_midi (
    .clk, .rst, .notes_in(decoder_out), .data_out(midi_data), .busy(midi_busy)
  );

  assign midi_tx = ~midi_data;

  assign led = {midi_busy, |oct_notes[3], |oct_notes[2], |oct_notes[1], oct_notes[0]};

endmodule
