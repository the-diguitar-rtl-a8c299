// tb_diguitar_top: end-to-end test of the guitar-to-MIDI converter at its
// default parameters (100 MHz clock, 30 / 15 / 7.5 / 3.75 kHz sampling,
// ~21 ms debounce, 31,250 baud MIDI).
//
// An ADC model delivers a new 16-bit offset-binary conversion every 100
// clocks (1 MS/s) of an analog signal made of guitar-like tones
// (fundamental, 2nd and 3rd harmonic). A MIDI receiver on the inverted
// midi_tx pin decodes three-byte messages. The sequence:
//   silence                      -> nothing sent
//   A2  (110 Hz, key 45)         -> NOTE_ON 45 within 75 ms, then NOTE_OFF
//   A3 + E5 together (keys 57, 76) -> only the lower, NOTE_ON 57, then OFF
//   E4  (329.6 Hz, key 64)       -> NOTE_ON 64, then NOTE_OFF
//   E5  (659 Hz, key 76)         -> NOTE_ON 76, then NOTE_OFF
// Each tone lasts 70-90 ms and is followed by 45 ms of silence. Messages
// must have status 0x91/0x81 and velocity 64. While a key is played, only it
// and the key a semitone above may be turned on: the semitone above can
// flash on for a few milliseconds at the onset, because its detector accepts
// the played note's period too and its shorter buffer fills first; the
// note decoder then switches to the lower key. At the end of each tone the
// played key must be the only one sounding, and after the silence none. Mechanisms counted (each must happen at least
// once): note on, note off, each octave decoder reporting a note, the note
// decoder suppressing a higher detection, a debouncer rejecting a short run
// of positive decisions, and each of the four sample triggers.
module tb_diguitar_top;
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
    repeat (100_000_000) @(posedge clk);
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
    note("A2",      110.0,  0.0,    45, 90.0);
    note("A3 + E5", 220.0,  659.26, 57, 70.0);
    note("E4",      329.63, 0.0,    64, 70.0);
    note("E5",      659.26, 0.0,    76, 70.0);
    check(n_on == n_off && n_on >= 4, $sformatf("%0d NOTE_ON and %0d NOTE_OFF messages", n_on, n_off));
    for (int o = 0; o < 4; o++) begin
      check(n_trig[o] > 0, $sformatf("sample trigger %0d fired", o));
      check(n_oct[o] > 0, $sformatf("octave decoder %0d reported a note", o + 1));
    end
    check(n_suppress > 0, "note decoder suppressed a higher detection");
    check(n_reject > 0, "a debouncer rejected a short detection");
    $display("mechanisms: semitone-above transients %0d", n_transient);
    $display("mechanisms: on %0d off %0d suppress %0d reject %0d oct %0d/%0d/%0d/%0d trig %0d/%0d/%0d/%0d",
             n_on, n_off, n_suppress, n_reject, n_oct[0], n_oct[1], n_oct[2], n_oct[3],
             n_trig[0], n_trig[1], n_trig[2], n_trig[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
