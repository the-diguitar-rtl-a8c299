// note_decoder: keeps only the lowest note that the octave decoders report.
//
// A guitar note sounds its fundamental together with harmonics, which the
// higher detectors may also report; for single-note playing the lowest
// detection is the note. On every trig (the 3.75 kHz trigger of the slowest
// octave) the decoder registers pitches_in, and registers onto notes_out the
// lowest set bit of the previously registered vector (all other bits
// cleared). Both stages are synchronised to the slowest octave so that a
// harmonic seen a little before its fundamental does not flash through.
// Latency: a change on pitches_in reaches notes_out on the second trig.
module note_decoder #(
  parameter int MAXINDEX = 45   // number of notes minus one
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              trig,
  input  logic [MAXINDEX:0] pitches_in,
  output logic [MAXINDEX:0] notes_out
);
  logic [MAXINDEX:0] in_reg;
  logic [MAXINDEX:0] lowest;

  // lowest set bit of in_reg: x & -x
  assign lowest = in_reg & (~in_reg + 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_reg    <= '0;
      notes_out <= '0;
    end else if (trig) begin
      in_reg    <= pitches_in;
      notes_out <= lowest;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(notes_out))
    else $error("note_decoder: more than one note on the output");

endmodule
