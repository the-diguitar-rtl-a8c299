// tb_note_fir: checks the twelve per-note harmonic-stop filters.
//
// All twelve note filters (E .. Eb, designed for 3.75 kHz) get the same
// input. The testbench computes its own reference taps (125-tap Hamming
// windowed sinc, cutoff 1.35 * f0, unity gain, rounded to 1/4096), applies
// them as a plain convolution with round-half-towards-zero scaling and 8-bit
// saturation, and checks:
//   * every output equals the reference, on random input;
//   * done comes exactly 64 cycles after start (63 coefficient pairs plus
//     one output register);
//   * each filter passes a tone at its own fundamental (amplitude within
//     20 %) and removes a tone at twice it (at most 1 LSB left).
module tb_note_fir;
  import diguitar_pkg::sample_t;

  localparam int  NT     = 125;
  localparam int  PERIOD = 80;
  localparam real FS     = 3750.0;
  localparam real M_PI   = 3.14159265358979323846;
  localparam real F0 [12] = '{82.41, 87.31, 92.50, 98.00, 103.83, 110.00,
                              116.54, 123.47, 130.81, 138.59, 146.83, 155.56};

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  sample_t    data_in = '0;
  logic [11:0] done, busy;
  sample_t    data_out [12];

  int checks = 0, failures = 0;
  int ref_c [12][NT];
  int hist [NT];
  int expected [12];
  int maxabs [12];
  int lat [12];
  bit measuring = 0;

  always #5 clk = ~clk;

  for (genvar n = 0; n < 12; n++) begin : g_dut
    note_fir #(.NOTE(n)) dut (
      .clk, .rst, .start, .data_in,
      .done(done[n]), .data_out(data_out[n]), .busy(busy[n])
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
    real s, x, fc, w;
    for (int n = 0; n < 12; n++) begin
      s  = 0.0;
      fc = 1.35 * F0[n] / FS;
      for (int k = 0; k < NT; k++) begin
        x = k - (NT - 1) / 2.0;
        w = 0.54 - 0.46 * $cos(2.0 * M_PI * k / (NT - 1));
        raw[k] = w * ((x == 0.0) ? 2.0 * fc : $sin(2.0 * M_PI * fc * x) / (M_PI * x));
        s += raw[k];
      end
      for (int k = 0; k < NT; k++) begin
        real v = raw[k] / s * 4096.0;
        ref_c[n][k] = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    end
  endfunction

  function automatic int ref_out(int n);
    longint acc = 0;
    int q;
    for (int k = 0; k < NT; k++) acc += longint'(hist[k]) * ref_c[n][k];
    if (acc >= 0) q = int'((acc + 2047) >>> 12);
    else          q = -int'((-acc + 2047) >>> 12);
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  task automatic push(int v);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int n = 0; n < 12; n++) expected[n] = ref_out(n);
    @(posedge clk);
    start   <= 1'b1;
    data_in <= 8'(v);
    @(posedge clk);
    start   <= 1'b0;
    for (int n = 0; n < 12; n++) lat[n] = -1;
    for (int c = 1; c < PERIOD; c++) begin
      @(negedge clk);
      for (int n = 0; n < 12; n++) if (done[n]) begin
        check(lat[n] == -1, "done is a single pulse");
        lat[n] = c - 1;
      end
      @(posedge clk);
    end
    for (int n = 0; n < 12; n++) begin
      int a;
      check(lat[n] == 64, $sformatf("note %0d latency %0d, expected 64", n, lat[n]));
      a = (data_out[n] < 0) ? -int'(data_out[n]) : int'(data_out[n]);
      if (!measuring)
        check(int'(data_out[n]) == expected[n],
              $sformatf("note %0d output %0d, reference %0d", n, data_out[n], expected[n]));
      else if (a > maxabs[n]) maxabs[n] = a;
    end
  endtask

  // tone at f for settling, then measure the peak output of every filter
  task automatic tone(real f);
    for (int i = 0; i < 12; i++) maxabs[i] = 0;
    for (int s = 0; s < 130; s++) push(int'($rtoi(100.0 * $sin(2.0 * M_PI * f * s / FS))));
    measuring = 1;
    for (int s = 130; s < 230; s++) push(int'($rtoi(100.0 * $sin(2.0 * M_PI * f * s / FS))));
    measuring = 0;
  endtask

  initial begin
    repeat (8_000_000) @(posedge clk);
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
    for (int s = 0; s < 300; s++) push(int'($urandom_range(255)) - 128);
    for (int s = 0; s < 130; s++) push(127);
    for (int n = 0; n < 12; n += 3) begin
      tone(F0[n]);
      check(maxabs[n] >= 80 && maxabs[n] <= 110,
            $sformatf("note %0d passes its fundamental (amplitude %0d of 100)", n, maxabs[n]));
      tone(2.0 * F0[n]);
      check(maxabs[n] <= 1,
            $sformatf("note %0d stops its second harmonic (amplitude %0d)", n, maxabs[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
