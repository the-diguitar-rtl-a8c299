// tb_note_decoder: checks the lowest-note selector (46 notes).
//
// Random detection vectors, often with several bits set (a fundamental plus
// harmonics), are applied; trig pulses every 50 cycles, as a scaled-down
// 3.75 kHz trigger. The testbench's own model registers the input on each
// trig and outputs the lowest set bit of the vector registered at the
// previous trig. Checks after each trig that notes_out matches the model,
// that it changes only on trig, and counts how often a higher detection
// was suppressed.
module tb_note_decoder;
  localparam int N = 46;
  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          trig = 1'b0;
  logic [N-1:0]  pitches_in = '0;
  logic [N-1:0]  notes_out;
  logic [N-1:0]  model_in, model_out, hold;
  int checks = 0, failures = 0, suppressed = 0;

  always #5 clk = ~clk;

  note_decoder dut (.clk, .rst, .trig, .pitches_in, .notes_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] lowest_of(logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return N'(1) << i;
    return '0;
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_in = '0; model_out = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] v;
      // a fundamental with a few harmonics, sometimes silence
      v = '0;
      if ($urandom_range(7) != 0) begin
        int f = $urandom_range(N - 1);
        v[f] = 1'b1;
        if (f + 12 < N && $urandom_range(1)) v[f+12] = 1'b1;
        if (f + 19 < N && $urandom_range(1)) v[f+19] = 1'b1;
        if ($urandom_range(3) == 0) v[$urandom_range(N - 1)] = 1'b1;
      end
      for (int c = 0; c < 49; c++) begin
        @(posedge clk);
        pitches_in <= (c == 10) ? v : pitches_in;
        trig <= 1'b0;
      end
      hold = notes_out;
      check(notes_out == model_out, "output holds between triggers");
      @(posedge clk);
      trig <= 1'b1;
      @(posedge clk);
      trig <= 1'b0;
      model_out = lowest_of(model_in);
      if ($countones(model_in) > 1) suppressed++;
      model_in  = pitches_in;
      @(negedge clk);
      check(notes_out == model_out,
            $sformatf("trigger %0d: out %h, expected %h", t, notes_out, model_out));
      check($countones(notes_out) <= 1, "at most one note out");
    end
    check(suppressed > 100, "higher detections were suppressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
