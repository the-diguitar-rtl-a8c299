// note_fir: harmonic-stop filter in front of one note's autocorrelator.
//
// A 125-tap low-pass FIR that lets the note's fundamental f0 through and
// removes its harmonics (2*f0 and up), so that the autocorrelator of a note
// does not fire on the note an octave above it. The filter is designed for
// the lowest octave (sample rate 3.75 kHz); because every octave decoder
// samples at twice the rate of the one below, the same taps serve all four
// octaves. The 125-tap length is taken from the original design; the window
// (Hamming) and cutoff (1.35 * f0, which gives better than 49 dB rejection
// at 2*f0 for every note) are this design's own choice.
//
// Interface: start/data_in request one output; done pulses 64 cycles later
// with the 8-bit signed data_out (saturated, unity DC gain).
module note_fir
  import diguitar_pkg::*;
#(
  parameter int  NOTE      = 0,      // 0 = E .. 11 = Eb
  parameter int  NTAPS     = 125,
  parameter real BASE_FS   = 3750.0, // sample rate the taps are designed for
  parameter real CUT_RATIO = 1.35    // cutoff as a multiple of f0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  sample_t data_in,
  output logic    done,
  output sample_t data_out,
  output logic    busy       // filtering in progress
);
  localparam real CUTOFF = CUT_RATIO * NOTE_HZ_TABLE[NOTE] / BASE_FS;

  lowpass_fir #(
    .NTAPS (NTAPS),
    .CUTOFF(CUTOFF),
    .WINDOW(WIN_HAMMING),
    .OUT_W (8)
  ) u_fir (
    .clk, .rst, .in_valid(start), .in_sample(data_in),
    .out_valid(done), .out_sample(data_out), .busy
  );

  initial assert (NOTE >= 0 && NOTE <= 11) else $error("note_fir: NOTE must be 0..11");

endmodule
