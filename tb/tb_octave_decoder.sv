// tb_octave_decoder: plays every note of the lowest guitar octave into one
// octave decoder and checks that exactly that note's bit is reported.
//
// Samples are taken at 3.75 kHz with a trigger every 2300 clocks. Each of
// the twelve notes E2 .. Eb3 is played as a guitar-like tone (fundamental
// with second and third harmonics) for 260 samples, followed by silence.
// The debounce is shortened to 20 samples to keep the run short. Expected:
// for the last 40 samples of note n, bit n is set (bit 0 = E, bit 5 = A)
// and no bit other than n and n+1 (the semitone above, whose accepted lags
// overlap note n's period; the note decoder removes it), and all zeros after
// 150 samples of silence.
module tb_octave_decoder;
  import diguitar_pkg::*;

  localparam int  SPERIOD = 2300;
  localparam real FS      = 3750.0;
  localparam real M_PI    = 3.14159265358979323846;
  localparam real F0 [12] = '{82.41, 87.31, 92.50, 98.00, 103.83, 110.00,
                              116.54, 123.47, 130.81, 138.59, 146.83, 155.56};

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        sample_clk = 1'b0;
  sample_t     in_sample = '0;
  octave_vec_t note_detected;

  int checks = 0, failures = 0, n_neighbour = 0;

  always #5 clk = ~clk;

  octave_decoder #(.DEBOUNCE_CYCLES(20)) dut (.clk, .rst, .sample_clk, .in_sample, .note_detected);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  task automatic push(int v);
    @(posedge clk);
    sample_clk <= 1'b1;
    in_sample  <= 8'(v);
    @(posedge clk);
    sample_clk <= 1'b0;
    repeat (SPERIOD - 2) @(posedge clk);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 12; n++) begin
      int  good;
      real t;
      good = 0;
      for (int s = 0; s < 260; s++) begin
        t = s / FS;
        push(int'($rtoi(60.0 * $sin(2 * M_PI * F0[n] * t) + 30.0 * $sin(4 * M_PI * F0[n] * t + 0.7) +
                        15.0 * $sin(6 * M_PI * F0[n] * t + 1.3))));
        // lowest set bit is the note; only the semitone above may join it
        if (s >= 220 && note_detected[n] && (note_detected & ~octave_vec_t'(3 << n)) == '0) good++;
      end
      check(good == 40, $sformatf("note %0d: only %0d of 40 final samples reported it as lowest (last %03h)",
                                  n, good, note_detected));
      if (note_detected[n] && n < 11 && note_detected[n+1]) n_neighbour++;
      for (int s = 0; s < 150; s++) push(0);
      check(note_detected == '0, $sformatf("note %0d: silence not reported as silence (%03h)", n, note_detected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
