// tb_autocorrelator: checks the period detector of one note.
//
// Two autocorrelators run side by side on the same sample stream: one with
// the parameters of E (SC_LEN 46, threshold 0) and one with those of Eb
// (SC_LEN 24) and a correlation threshold of 20000. Each gets a small model
// of its harmonic-stop FIR that returns the sample unchanged 64 cycles after
// fir_start. The testbench keeps its own copy of each sample buffer and
// computes the full autocorrelation, its first maximum and the mask and
// threshold decision. Checks, for every decision:
//   * peak offset, peak value and det equal the reference;
//   * det_valid rises exactly SC_LEN*(SC_LEN+1)+2 cycles after fir_done and
//     the whole job ends within one 30 kHz sample period (3333 cycles);
//   * det is seen high and low for each unit, and the Eb unit rejects a
//     weak Eb tone through the threshold alone.
module tb_autocorrelator;
  import diguitar_pkg::sample_t;

  localparam int  SPERIOD = 2600;     // clocks between sample triggers
  localparam int  FIR_LAT = 64;
  localparam real M_PI    = 3.14159265358979323846;
  localparam int  SC  [2] = '{46, 24};
  localparam logic [63:0] MASK [2] = '{64'd58720256, 64'd12288};
  localparam int  THR [2] = '{0, 20000};

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  logic    sample_clk = 1'b0;
  sample_t in_sample = '0;

  sample_t            fir_sample [2], fir_result [2];
  logic [1:0]         fir_start, fir_done, det_valid, det, busy;
  logic [5:0]         peak_offset [2];
  logic signed [31:0] peak_value [2];

  int checks = 0, failures = 0;
  int hist [2][120];
  int n_det1 [2], n_det0 [2], n_thr_reject;
  int t_done [2];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  autocorrelator #(.SC_LEN(46), .PEAK_MASK(64'd58720256), .DB_THRESHOLD(0)) dut_e (
    .clk, .rst, .sample_clk, .in_sample,
    .fir_sample(fir_sample[0]), .fir_start(fir_start[0]), .fir_result(fir_result[0]), .fir_done(fir_done[0]),
    .det_valid(det_valid[0]), .det(det[0]), .peak_offset(peak_offset[0]), .peak_value(peak_value[0]), .busy(busy[0]));

  autocorrelator #(.SC_LEN(24), .PEAK_MASK(64'd12288), .DB_THRESHOLD(20000)) dut_eb (
    .clk, .rst, .sample_clk, .in_sample,
    .fir_sample(fir_sample[1]), .fir_start(fir_start[1]), .fir_result(fir_result[1]), .fir_done(fir_done[1]),
    .det_valid(det_valid[1]), .det(det[1]), .peak_offset(peak_offset[1]), .peak_value(peak_value[1]), .busy(busy[1]));

  // FIR stand-in: returns its input FIR_LAT cycles after fir_start
  for (genvar u = 0; u < 2; u++) begin : g_fir
    int      cnt = 0;
    sample_t held;
    always_ff @(posedge clk) begin
      fir_done[u] <= 1'b0;
      if (fir_start[u]) begin
        held <= fir_sample[u];
        cnt  <= FIR_LAT - 1;
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) begin
          fir_done[u]   <= 1'b1;
          fir_result[u] <= held;
        end
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // reference decision of unit u after the newest sample was added
  task automatic verify(int u);
    longint best = -64'sd2147483648;
    int     best_off = 0;
    int     half = SC[u] / 2;
    bit     exp_det;
    for (int off = 0; off < SC[u]; off++) begin
      longint acc = 0;
      for (int i = 0; i < SC[u]; i++) acc += hist[u][i] * hist[u][half + off + i];
      if (acc > best) begin best = acc; best_off = off; end
    end
    exp_det = MASK[u][best_off] && (best >= THR[u]);
    check(int'(peak_offset[u]) == best_off, $sformatf("unit %0d peak offset %0d, reference %0d", u, peak_offset[u], best_off));
    check(longint'(peak_value[u]) == best, $sformatf("unit %0d peak value %0d, reference %0d", u, peak_value[u], best));
    check(det[u] == exp_det, $sformatf("unit %0d decision %0b, reference %0b", u, det[u], exp_det));
    if (det[u]) n_det1[u]++; else n_det0[u]++;
    if (u == 1 && MASK[1][best_off] && best < THR[1]) n_thr_reject++;
  endtask

  // one sample through both units
  task automatic push(int v);
    int t0;
    bit got [2];
    for (int u = 0; u < 2; u++) begin
      for (int k = 119; k > 0; k--) hist[u][k] = hist[u][k-1];
      hist[u][0] = v;
      got[u] = 0;
    end
    @(posedge clk);
    sample_clk <= 1'b1;
    in_sample  <= 8'(v);
    @(posedge clk);
    sample_clk <= 1'b0;
    t0 = cyc;
    for (int c = 0; c < SPERIOD; c++) begin
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        if (fir_done[u]) t_done[u] = cyc;
        if (det_valid[u]) begin
          check(cyc - t_done[u] == SC[u] * (SC[u] + 1) + 2,
                $sformatf("unit %0d: %0d cycles from fir_done to det_valid", u, cyc - t_done[u]));
          check(cyc - t0 + 1 < 3333, "decision within one 30 kHz sample period");
          verify(u);
          got[u] = 1;
        end
      end
    end
    for (int u = 0; u < 2; u++) check(got[u], $sformatf("unit %0d produced a decision", u));
  endtask

  task automatic tone(real period, real amp, int count);
    for (int s = 0; s < count; s++) push(int'($rtoi(amp * $sin(2.0 * M_PI * s / period))));
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      n_det1[u] = 0; n_det0[u] = 0; t_done[u] = 0;
      for (int k = 0; k < 120; k++) hist[u][k] = 0;
    end
    n_thr_reject = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    tone(45.5, 100.0, 140);    // E2 period: E unit fires
    tone(40.5, 100.0, 120);    // F#2: nobody
    tone(24.1, 100.0, 80);     // Eb3: Eb unit fires
    tone(24.1, 15.0, 80);      // weak Eb3: rejected by the threshold
    for (int s = 0; s < 60; s++) push(int'($urandom_range(255)) - 128);
    check(n_det1[0] > 20 && n_det0[0] > 20, "E unit decided both ways");
    check(n_det1[1] > 20 && n_det0[1] > 20, "Eb unit decided both ways");
    check(n_thr_reject > 20, "threshold rejected a weak tone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
