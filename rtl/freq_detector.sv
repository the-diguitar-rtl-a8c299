// freq_detector: decides whether one note is sounding, from the samples of
// one octave.
//
// Three stages in series: a 125-tap harmonic-stop FIR (note_fir) that keeps
// the note's fundamental and removes its harmonics, an autocorrelator that
// measures the period of the filtered signal and compares it with the note's
// period, and a debouncer that requires DB_LENGTH consecutive positive
// decisions. The note's period (SC_LEN) and accepted peak positions
// (PEAK_MASK) come from the table in diguitar_pkg, indexed by NOTE; the
// threshold on the correlation peak is 0, as in the original design.
//
// Interface: sample_clk is the octave's one-cycle sample trigger and
// in_sample the octave's sample; note_detected is the debounced decision,
// updated about 2,200 cycles after each trigger.
module freq_detector
  import diguitar_pkg::*;
#(
  parameter int NOTE      = 0,    // 0 = E .. 11 = Eb
  parameter int DB_LENGTH = 83
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_clk,
  input  sample_t in_sample,
  output logic    note_detected
);
  sample_t            fir_sample, fir_result;
  logic               fir_start, fir_done, fir_busy;
  logic               det_valid, det, ac_busy;
  logic [5:0]         peak_offset;
  logic signed [31:0] peak_value;

  autocorrelator #(
    .SC_LEN      (SC_LEN_TABLE[NOTE]),
    .PEAK_MASK   (PEAK_MASK_TABLE[NOTE]),
    .DB_THRESHOLD(0)
  ) u_ac (
    .clk, .rst, .sample_clk, .in_sample,
    .fir_sample, .fir_start, .fir_result, .fir_done,
    .det_valid, .det, .peak_offset, .peak_value, .busy(ac_busy)
  );

  note_fir #(.NOTE(NOTE)) u_fir (
    .clk, .rst, .start(fir_start), .data_in(fir_sample),
    .done(fir_done), .data_out(fir_result), .busy(fir_busy)
  );

  debouncer #(.DB_LENGTH(DB_LENGTH)) u_db (
    .clk, .rst, .in_valid(det_valid), .in_bit(det), .out_bit(note_detected)
  );

endmodule
