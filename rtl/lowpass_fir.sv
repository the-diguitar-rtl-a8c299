// lowpass_fir: linear-phase low-pass FIR filter with one multiplier, used for
// both the per-octave anti-alias filters and the per-note harmonic-stop
// filters.
//
// How it works: each in_valid pushes the sample into an NTAPS-deep delay
// line. The filter is symmetric, so the engine then walks the (NTAPS+1)/2
// coefficient pairs, one per clock: it adds the two samples that share a
// coefficient, multiplies once and accumulates. The sum is scaled down by
// 2^COEF_FRAC with symmetric rounding to zero (halves round towards zero)
// and saturated to OUT_W bits.
//
// Coefficients are computed at elaboration from NTAPS, CUTOFF (cutoff
// divided by the sample rate) and WINDOW with the windowed-sinc formula in
// diguitar_pkg, normalised to unity DC gain and quantised to 12-bit signed
// integers scaled by 2^12.
//
// Timing: in_valid must only arrive while busy is low. out_valid pulses for
// one cycle exactly (NTAPS+1)/2 + 1 cycles after the in_valid cycle (42 for
// 81 taps, 64 for 125 taps); out_sample holds its value until the next
// result. The single multiply-accumulate and the symmetric coefficient pairs
// mirror the FIR compiler settings the filters were specified with (one DSP,
// 41 cycles per output for 81 taps); the exact latency is this design's.
module lowpass_fir
  import diguitar_pkg::*;
#(
  parameter int      NTAPS  = 81,
  parameter real     CUTOFF = 500.0 / 30000.0,
  parameter window_e WINDOW = WIN_BLACKMAN_HARRIS,
  parameter int      OUT_W  = 9
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  sample_t                 in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sample,
  output logic                    busy
);
  localparam int NSYM  = (NTAPS + 1) / 2;
  localparam int ACC_W = 32;
  localparam int K_W   = $clog2(NTAPS);   // wide enough to index the delay line

  typedef int coef_t [NTAPS];

  function automatic coef_t make_coefs();
    coef_t c;
    real   raw [NTAPS];
    real   sum;
    sum = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      raw[k] = lowpass_tap(NTAPS, k, CUTOFF, WINDOW);
      sum += raw[k];
    end
    for (int k = 0; k < NTAPS; k++)
      c[k] = round_real(raw[k] / sum * real'(1 << COEF_FRAC));
    return c;
  endfunction

  localparam coef_t COEF = make_coefs();

  sample_t                   dline [NTAPS];
  logic [K_W-1:0]            k;
  logic                      fin;
  logic signed [ACC_W-1:0]   acc;
  logic signed [8:0]         pre_sum;
  logic signed [COEF_W-1:0]  coef_k;
  logic signed [ACC_W-1:0]   rounded;

  // Pre-adder: the two samples that share coefficient k (the centre tap
  // of an odd-length filter has no partner).
  always_comb begin
    if (32'(k) == NTAPS - 1 - 32'(k))
      pre_sum = 9'(dline[k]);
    else
      pre_sum = 9'(dline[k]) + 9'(dline[NTAPS-1-32'(k)]);
    coef_k = COEF_W'(COEF[k]);
  end

  // Scale by 2^-COEF_FRAC, rounding halves towards zero.
  always_comb begin
    if (acc >= 0)
      rounded = (acc + ACC_W'((1 << (COEF_FRAC - 1)) - 1)) >>> COEF_FRAC;
    else
      rounded = -((-acc + ACC_W'((1 << (COEF_FRAC - 1)) - 1)) >>> COEF_FRAC);
  end

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(1 << (OUT_W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS; i++) dline[i] <= '0;
      k          <= '0;
      busy       <= 1'b0;
      fin        <= 1'b0;
      acc        <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      fin       <= 1'b0;
      if (in_valid && !busy) begin
        dline[0] <= in_sample;
        for (int i = 1; i < NTAPS; i++) dline[i] <= dline[i-1];
        k    <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc + ACC_W'(pre_sum) * ACC_W'(coef_k);
        k   <= k + 1'b1;
        if (32'(k) == NSYM - 1) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end
      if (fin) begin
        out_valid  <= 1'b1;
        out_sample <= (rounded > OUT_MAX) ? OUT_W'(OUT_MAX) :
                      (rounded < OUT_MIN) ? OUT_W'(OUT_MIN) : OUT_W'(rounded);
      end
    end
  end

  // A new sample must not arrive while the previous one is being filtered.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("lowpass_fir: input sample arrived while busy");

endmodule
