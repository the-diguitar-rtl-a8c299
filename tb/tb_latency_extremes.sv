// tb_latency_extremes: detection latency at the two ends of the guitar's
// range, with the full design at its default parameters.
//
// The lowest notes take longest to detect: their detectors need 2.5 long
// periods in the buffer plus a 62-sample filter delay at only 3.75 kHz. The
// highest notes are detected in the 30 kHz octave and are limited mostly by
// the 21 ms debounce. This testbench plays E2 (82.41 Hz, key 40), F2 (87.31
// Hz, key 41) and C#6 (1108.73 Hz, key 85), each followed by silence, through
// the same ADC model and MIDI receiver as tb_diguitar_top, and checks:
//   * NOTE_ON for the right key (the semitone above may flash on first, as
//     explained in tb_diguitar_top) and NOTE_OFF after the release;
//   * onset-to-NOTE_ON latency under the 75 ms target for every note, and
//     C#6 faster than E2 and F2.
module tb_latency_extremes;
  localparam real M_PI = 3.14159265358979323846;
  localparam int  DIV  = 3200;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] adc_data = 16'h8000;
  logic        adc_ready = 1'b0;
  logic        midi_tx;
  logic [15:0] led;

  int checks = 0, failures = 0;
  longint cyc = 0;
  real f_a = 0.0, f_b = 0.0;      // frequencies currently sounding (0 = off)
  int  n_on = 0, n_off = 0, n_suppress = 0, n_reject = 0, n_transient = 0;
  int  n_trig [4];
  int  n_oct [4];
  longint onset_cyc = 0;
  longint on_lat_cyc = -1;
  longint lat [3];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  diguitar_top dut (.clk, .rst, .adc_data, .adc_ready, .midi_tx, .led);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (at %0.1f ms)", what, cyc / 1.0e5);
    end
  endtask

  function automatic real guitar(real f, real t);
    if (f == 0.0) return 0.0;
    return 45.0 * $sin(2 * M_PI * f * t) + 22.0 * $sin(4 * M_PI * f * t + 0.7) +
           11.0 * $sin(6 * M_PI * f * t + 1.3);
  endfunction

  // ADC model: one conversion per microsecond, top byte offset binary
  always @(posedge clk) begin
    adc_ready <= 1'b0;
    if (cyc % 100 == 0) begin
      real t, v;
      int  code;
      t = cyc * 1.0e-8;
      v = guitar(f_a, t) + guitar(f_b, t);
      code = int'($rtoi(v * 256.0 + 32768.0)) + int'($urandom_range(63));
      if (code > 65535) code = 65535;
      if (code < 0) code = 0;
      adc_data  <= 16'(code);
      adc_ready <= 1'b1;
    end
  end

  // MIDI receiver on the inverted pin
  byte unsigned rx [$];
  initial begin
    @(negedge rst);
    forever begin
      byte unsigned b;
      @(posedge midi_tx);                      // start bit (pin is inverted)
      repeat (DIV / 2) @(negedge clk);
      check(midi_tx == 1'b1, "start bit");
      b = 0;
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(negedge clk);
        b[k] = ~midi_tx;
      end
      repeat (DIV) @(negedge clk);
      check(midi_tx == 1'b0, "stop bit");
      rx.push_back(b);
    end
  end

  // message checker: the target key must come on; the key a semitone above
  // may come on briefly first (its detector shares the target's period and
  // fills its shorter buffer sooner) and must go off again
  bit sounding [128];
  int target = -1;
  always @(posedge clk) begin
    if (rx.size() >= 3) begin
      byte unsigned st, key, vel;
      st  = rx.pop_front();
      key = rx.pop_front();
      vel = rx.pop_front();
      $display("%0.1f ms: MIDI %02h %0d %0d", cyc / 1.0e5, st, key, vel);
      check(vel == 8'd64, "velocity 64");
      if (st == 8'h91) begin
        n_on++;
        check(!sounding[key], $sformatf("NOTE_ON %0d for a sounding key", key));
        check(int'(key) == target || int'(key) == target + 1,
              $sformatf("NOTE_ON %0d while playing key %0d", key, target));
        if (int'(key) == target + 1) n_transient++;
        if (int'(key) == target && on_lat_cyc < 0) on_lat_cyc = cyc - onset_cyc - 30 * DIV;
        sounding[key] = 1'b1;
      end else begin
        check(st == 8'h81, $sformatf("status byte %02h", st));
        n_off++;
        check(sounding[key], $sformatf("NOTE_OFF %0d for a silent key", key));
        sounding[key] = 1'b0;
      end
    end
  end

  // mechanism counters
  always @(posedge clk) begin
    for (int o = 0; o < 4; o++) if (dut.trig[o]) n_trig[o]++;
    if (dut.trig[0] && $countones(dut.u_note.in_reg) > 1) n_suppress++;
  end
  for (genvar o = 0; o < 4; o++) begin : g_mon_oct
    always @(posedge clk) if (dut.trig[o] && dut.oct_notes[o] != '0) n_oct[o]++;
    for (genvar n = 0; n < 12; n++) begin : g_mon_note
      // a run of positive raw decisions that ends before the debouncer fires
      int run = 0;
      always @(posedge clk) begin
        if (dut.g_oct[o].u_dec.g_note[n].u_det.det_valid) begin
          if (dut.g_oct[o].u_dec.g_note[n].u_det.det) run <= run + 1;
          else begin
            if (run > 0 && !dut.g_oct[o].u_dec.g_note[n].u_det.note_detected) n_reject++;
            run <= 0;
          end
        end
      end
    end
  end

  task automatic wait_ms(real ms);
    repeat (longint'(ms * 1.0e5)) @(posedge clk);
  endtask

  function automatic int n_sounding();
    int c = 0;
    for (int k = 0; k < 128; k++) c += int'(sounding[k]);
    return c;
  endfunction

  task automatic note(string name, real fa, real fb, int key, real ms);
    f_a = fa; f_b = fb;
    target     = key;
    onset_cyc  = cyc;
    on_lat_cyc = -1;
    wait_ms(ms);
    check(sounding[key] && n_sounding() == 1,
          $sformatf("%s: key %0d should be the only sounding key", name, key));
    if (on_lat_cyc >= 0) begin
      $display("%s: key %0d detected %0.1f ms after onset", name, key, on_lat_cyc / 1.0e5);
      check(on_lat_cyc < 75 * 100_000, $sformatf("%s: detection latency above 75 ms", name));
    end
    f_a = 0.0; f_b = 0.0;
    wait_ms(45.0);
    check(n_sounding() == 0, $sformatf("%s: notes still sounding after release", name));
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin n_trig[o] = 0; n_oct[o] = 0; end
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait_ms(20.0);
    check(n_on == 0 && n_off == 0 && rx.size() == 0, "silence sends nothing");
    note("E2",  82.41,   0.0, 40, 95.0);
    lat[0] = on_lat_cyc;
    note("F2",  87.31,   0.0, 41, 95.0);
    lat[1] = on_lat_cyc;
    note("C#6", 1108.73, 0.0, 85, 60.0);
    lat[2] = on_lat_cyc;
    check(n_on == n_off && n_on >= 3, $sformatf("%0d NOTE_ON and %0d NOTE_OFF messages", n_on, n_off));
    check(lat[2] > 0 && lat[2] < lat[0] && lat[2] < lat[1], "C#6 is detected faster than E2 and F2");
    check(n_oct[0] > 0 && n_oct[3] > 0, "octave decoders 1 and 4 reported notes");
    $display("latency: E2 %0.1f ms, F2 %0.1f ms, C#6 %0.1f ms", lat[0] / 1.0e5, lat[1] / 1.0e5, lat[2] / 1.0e5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
