// tb_midi_tx: checks the MIDI transmitter at its default 31,250 baud
// (3200 clocks per bit at 100 MHz).
//
// A UART receiver in the testbench samples data_out in the middle of each
// bit and checks the start and stop bits, measures every bit's length, and
// decodes three-byte messages. Note lines are switched on and off, one at a
// time and several at once; the testbench keeps its own list of expected
// messages (status 0x91 / 0x81, key 40 + note, velocity 64) and checks that
// each arrives, in the transmitter's scan order, and that nothing else is
// sent. The line must idle high.
module tb_midi_tx;
  localparam int DIV = 3200;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [45:0] notes_in = '0;
  logic        data_out, busy;
  int checks = 0, failures = 0;
  byte unsigned rx [$];
  int exp_q [$];            // expected messages: {status, key, vel} packed
  int n_on = 0, n_off = 0;

  always #5 clk = ~clk;

  midi_tx dut (.clk, .rst, .notes_in, .data_out, .busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // UART receiver: bit lengths and framing
  initial begin
    @(negedge rst);
    forever begin
      byte unsigned b;
      @(negedge data_out);
      // sample every bit in its middle, on falling clock edges
      repeat (DIV / 2) @(negedge clk);
      check(data_out == 1'b0, "start bit is low in its middle");
      b = 0;
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(negedge clk);
        b[k] = data_out;
      end
      repeat (DIV) @(negedge clk);
      check(data_out == 1'b1, "stop bit is high");
      rx.push_back(b);
    end
  end

  // turn collected bytes into messages and compare
  always @(posedge clk) begin
    if (rx.size() >= 3) begin
      int m, e;
      m = {8'h00, rx[0], rx[1], rx[2]};
      void'(rx.pop_front()); void'(rx.pop_front()); void'(rx.pop_front());
      if (exp_q.size() == 0) begin
        check(0, $sformatf("unexpected message %h", m));
      end else begin
        e = exp_q.pop_front();
        check(m == e, $sformatf("message %h, expected %h", m, e));
        if (m[23:20] == 4'h9) n_on++; else n_off++;
      end
    end
  end

  task automatic set_notes(logic [45:0] v);
    // expected messages in scan order, starting from wherever the scan is;
    // the test only changes notes while the line is idle and waits long
    // enough, so order is by index starting after the scan pointer
    logic [45:0] diff;
    int start;
    diff  = v ^ notes_in;
    start = int'(dut.cur);
    for (int j = 0; j < 46; j++) begin
      int i = (start + j) % 46;
      if (diff[i]) exp_q.push_back({8'h00, v[i] ? 8'h91 : 8'h81, 8'(40 + i), 8'd64});
    end
    notes_in <= v;
  endtask

  task automatic wait_quiet();
    int quiet = 0;
    while (quiet < 200) begin
      @(posedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
    repeat (DIV) @(posedge clk);
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // message duration: busy stays high exactly 30 bit times
  initial begin
    @(negedge rst);
    forever begin
      int t;
      @(posedge busy);
      t = 0;
      @(negedge clk);
      while (busy) begin @(negedge clk); t++; end
      check(t == 30 * DIV, $sformatf("message took %0d clocks, expected %0d", t, 30 * DIV));
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (500) @(posedge clk);
    check(data_out == 1'b1 && !busy, "idle line is high");
    @(posedge clk); set_notes(46'h1 << 5);          wait_quiet();   // A2 on
    @(posedge clk); set_notes(46'h0);                wait_quiet();   // A2 off
    @(posedge clk); set_notes(46'h1 << 45);         wait_quiet();   // C#6 on
    @(posedge clk); set_notes((46'h1 << 0) | (46'h1 << 45) | (46'h1 << 20)); wait_quiet();
    @(posedge clk); set_notes(46'h0);                wait_quiet();
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0 && rx.size() == 0, "all expected messages received");
    check(n_on == 4 && n_off == 4, $sformatf("%0d note-on and %0d note-off messages", n_on, n_off));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
