// antialias_fir: the low-pass filter placed in front of one octave decoder.
//
// All four filters run on the 30 kHz sample stream. Each passes the notes of
// its octave and removes what would alias once the octave decoder reads it
// at its own, lower rate: cutoffs are 500 Hz (octave 1, read at 3.75 kHz),
// 750 Hz (octave 2, 7.5 kHz), 1 kHz (octave 3, 15 kHz) and 2 kHz (octave 4,
// 30 kHz). Each is an 81-tap Blackman-Harris windowed-sinc design with 12-bit
// coefficients and a 9-bit signed output, as specified for the original
// filters; the coefficients are computed at elaboration, not read from a
// table.
//
// Interface: in_valid/in_sample at the 30 kHz rate; out_valid pulses 42
// cycles later with out_sample (unity DC gain). The filter is idle again
// well before the next 30 kHz sample (3333 cycles).
module antialias_fir
  import diguitar_pkg::*;
#(
  parameter int OCTAVE = 1,       // 1 (lowest) .. 4
  parameter int NTAPS  = 81,
  parameter int FS_HZ  = 30000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  sample_t           in_sample,
  output logic              out_valid,
  output logic signed [8:0] out_sample,
  output logic              busy        // filtering in progress
);
  localparam real CUTOFF = AA_CUTOFF_HZ_TABLE[OCTAVE-1] / real'(FS_HZ);

  lowpass_fir #(
    .NTAPS (NTAPS),
    .CUTOFF(CUTOFF),
    .WINDOW(WIN_BLACKMAN_HARRIS),
    .OUT_W (9)
  ) u_fir (
    .clk, .rst, .in_valid, .in_sample, .out_valid, .out_sample, .busy
  );

  initial assert (OCTAVE >= 1 && OCTAVE <= 4) else $error("antialias_fir: OCTAVE must be 1..4");

endmodule
