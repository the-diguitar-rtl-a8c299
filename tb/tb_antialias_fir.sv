// tb_antialias_fir: checks the four per-octave anti-alias filters.
//
// All four filters (cutoffs 500, 750, 1000, 2000 Hz at 30 kHz) get the same
// input stream. The testbench builds its own reference: 81 Blackman-Harris
// windowed-sinc taps per octave, normalised to unity gain and rounded to
// 1/4096, applied as a plain 81-term convolution, scaled with round-half-
// towards-zero and saturated to 9 bits. Checks:
//   * every output equals the reference, on random input;
//   * out_valid comes exactly 42 cycles after in_valid (41 coefficient pairs
//     plus one output register) and is one cycle long;
//   * a full-scale tone at the top note of the octave passes (amplitude kept
//     within 20 %) and a tone at the Nyquist frequency of the octave's
//     decimated rate is removed (amplitude at most 2 LSB).
module tb_antialias_fir;
  import diguitar_pkg::sample_t;

  localparam int  NT      = 81;
  localparam int  PERIOD  = 60;          // clocks between input samples
  localparam real FS      = 30000.0;
  localparam real M_PI    = 3.14159265358979323846;
  localparam real CUT  [4] = '{500.0, 750.0, 1000.0, 2000.0};
  localparam real FPASS[4] = '{155.56, 311.13, 622.25, 1108.73};
  localparam real FSTOP[4] = '{1875.0, 3750.0, 7500.0, 14000.0};

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              in_valid = 1'b0;
  sample_t           in_sample = '0;
  logic [3:0]        out_valid, busy;
  logic signed [8:0] out_sample [4];

  int checks = 0, failures = 0;
  int ref_c [4][NT];
  int hist [NT];          // hist[0] newest
  int expected [4];
  int maxabs [4];
  bit measuring = 0;
  int lat [4];

  always #5 clk = ~clk;

  for (genvar o = 0; o < 4; o++) begin : g_dut
    antialias_fir #(.OCTAVE(o + 1)) dut (
      .clk, .rst, .in_valid, .in_sample,
      .out_valid(out_valid[o]), .out_sample(out_sample[o]), .busy(busy[o])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void make_ref();
    real raw [NT];
    real s, x, t, w;
    for (int o = 0; o < 4; o++) begin
      s = 0.0;
      for (int k = 0; k < NT; k++) begin
        x = k - (NT - 1) / 2.0;
        t = 2.0 * M_PI * k / (NT - 1);
        w = 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2 * t) - 0.01168 * $cos(3 * t);
        raw[k] = w * ((x == 0.0) ? 2.0 * CUT[o] / FS : $sin(2.0 * M_PI * CUT[o] / FS * x) / (M_PI * x));
        s += raw[k];
      end
      for (int k = 0; k < NT; k++) begin
        real v = raw[k] / s * 4096.0;
        ref_c[o][k] = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    end
  endfunction

  function automatic int ref_out(int o);
    longint acc = 0;
    int q;
    for (int k = 0; k < NT; k++) acc += longint'(hist[k]) * ref_c[o][k];
    if (acc >= 0) q = int'((acc + 2047) >>> 12);
    else          q = -int'((-acc + 2047) >>> 12);
    if (q > 255) q = 255;
    if (q < -256) q = -256;
    return q;
  endfunction

  // feed one sample and check latency and value
  task automatic push(int v);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int o = 0; o < 4; o++) expected[o] = ref_out(o);
    @(posedge clk);
    in_valid  <= 1'b1;
    in_sample <= 8'(v);
    @(posedge clk);
    in_valid  <= 1'b0;
    for (int o = 0; o < 4; o++) lat[o] = -1;
    for (int c = 1; c < PERIOD; c++) begin
      @(negedge clk);
      for (int o = 0; o < 4; o++) if (out_valid[o]) begin
        check(lat[o] == -1, "out_valid is a single pulse");
        lat[o] = c - 1;   // clock edges after the edge that took in_valid
      end
      @(posedge clk);
    end
    for (int o = 0; o < 4; o++) begin
      check(lat[o] == 42, $sformatf("octave %0d latency %0d, expected 42", o + 1, lat[o]));
      if (!measuring)
        check(int'(out_sample[o]) == expected[o],
              $sformatf("octave %0d output %0d, reference %0d", o + 1, out_sample[o], expected[o]));
      else if (maxabs[o] < ((out_sample[o] < 0) ? -int'(out_sample[o]) : int'(out_sample[o])))
        maxabs[o] = (out_sample[o] < 0) ? -int'(out_sample[o]) : int'(out_sample[o]);
    end
  endtask

  // run a tone of frequency f (per octave: f[o]) through filter o only matters
  task automatic tone(int o, real f);
    for (int n = 0; n < 200; n++) push(int'($rtoi(120.0 * $sin(2.0 * M_PI * f * n / FS))));
    measuring = 1;
    for (int i = 0; i < 4; i++) maxabs[i] = 0;
    for (int n = 200; n < 500; n++) push(int'($rtoi(120.0 * $sin(2.0 * M_PI * f * n / FS))));
    measuring = 0;
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_ref();
    for (int k = 0; k < NT; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // random input, exact comparison
    for (int n = 0; n < 300; n++) push(int'($urandom_range(255)) - 128);
    // extreme values
    for (int n = 0; n < 100; n++) push((n % 2) ? 127 : -128);
    for (int n = 0; n < 100; n++) push(-128);
    // pass and stop band
    for (int o = 0; o < 4; o++) begin
      tone(o, FPASS[o]);
      check(maxabs[o] >= 96 && maxabs[o] <= 130,
            $sformatf("octave %0d passes %0.0f Hz (amplitude %0d of 120)", o + 1, FPASS[o], maxabs[o]));
      tone(o, FSTOP[o]);
      check(maxabs[o] <= 2,
            $sformatf("octave %0d stops %0.0f Hz (amplitude %0d)", o + 1, FSTOP[o], maxabs[o]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
