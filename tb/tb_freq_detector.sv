// tb_freq_detector: checks two complete note detectors, E (NOTE 0) and A
// (NOTE 5), at their default 83-sample debounce.
//
// Guitar-like tones (fundamental plus second and third harmonics, peak
// about 105) are sampled at 3.75 kHz, the rate of the lowest octave decoder;
// a sample trigger comes every 2300 clocks, the shortest period that still
// leaves the E detector (the slowest) time to finish. The expected answers
// are musical, not computed by a model of the block:
//   E2 (82.41 Hz)  -> E on, A off
//   A2 (110 Hz)    -> A on, E off
//   E3, A3 (one octave up) and Bb2, F2 (one semitone off) -> both off
//   silence        -> both off
// The detector must settle within 280 samples of a tone's start (75 ms,
// the latency target of the converter), stay steady for the last 100
// samples of each 400-sample tone, and turn off again when the tone stops.
module tb_freq_detector;
  import diguitar_pkg::sample_t;

  localparam int  SPERIOD = 2300;
  localparam real FS      = 3750.0;
  localparam real M_PI    = 3.14159265358979323846;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       sample_clk = 1'b0;
  sample_t    in_sample = '0;
  logic [1:0] note_detected;     // [0] E, [1] A

  int checks = 0, failures = 0;
  int onset [2];

  always #5 clk = ~clk;

  freq_detector #(.NOTE(0)) dut_e (.clk, .rst, .sample_clk, .in_sample, .note_detected(note_detected[0]));
  freq_detector #(.NOTE(5)) dut_a (.clk, .rst, .sample_clk, .in_sample, .note_detected(note_detected[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
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

  // play a tone (f = 0: silence) and check the two outputs
  task automatic play(string name, real f, logic [1:0] expect_on);
    for (int u = 0; u < 2; u++) onset[u] = -1;
    for (int s = 0; s < 400; s++) begin
      real t = s / FS;
      int  v = (f == 0.0) ? 0 :
               int'($rtoi(60.0 * $sin(2 * M_PI * f * t) + 30.0 * $sin(4 * M_PI * f * t + 0.7) +
                          15.0 * $sin(6 * M_PI * f * t + 1.3)));
      push(v);
      for (int u = 0; u < 2; u++) begin
        if (note_detected[u] == expect_on[u] && onset[u] < 0) onset[u] = s;
        if (note_detected[u] != expect_on[u]) onset[u] = -1;
      end
    end
    for (int u = 0; u < 2; u++) begin
      check(onset[u] >= 0 && onset[u] <= 280,
            $sformatf("%s: detector %s settled to %0b after %0d samples", name, u ? "A" : "E",
                      expect_on[u], onset[u]));
      if (expect_on[u]) $display("%s: %s detected after %0d samples (%0.1f ms)", name, u ? "A" : "E",
                                 onset[u], onset[u] * 1000.0 / FS);
    end
  endtask

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    play("silence", 0.0,    2'b00);
    play("E2",      82.41,  2'b01);
    play("silence", 0.0,    2'b00);
    play("A2",      110.0,  2'b10);
    play("E3",      164.81, 2'b00);
    play("A3",      220.0,  2'b00);
    play("Bb2",     116.54, 2'b00);
    play("F2",      87.31,  2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
