// tb_sample_clock_gen: checks the sample-rate trigger generator.
//
// Runs the four counts used by the converter (3333, 6666, 13332, 26664)
// side by side, as the top level does, and checks that each trigger is a
// single-cycle pulse exactly COUNT cycles after the previous one, that the
// first one comes in the first cycle after reset, and that every slower
// trigger coincides with a trigger of each faster one. A second reset in
// mid-count must restart the period.
module tb_sample_clock_gen;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [3:0] trig;
  int         checks = 0, failures = 0;
  int         last [4];
  int         seen [4];
  int         cyc = 0;
  localparam int COUNTS [4] = '{26664, 13332, 6666, 3333};

  always #5 clk = ~clk;

  for (genvar o = 0; o < 4; o++) begin : g_dut
    sample_clock_gen #(.COUNT(COUNTS[o])) dut (.clk, .rst, .trigger(trig[o]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin last[o] = -1; seen[o] = 0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // the cycle right after reset is released must carry every trigger
    @(negedge clk);
    check(trig == 4'hF, "all triggers at first cycle after reset");
    // run four periods of the slowest trigger
    while (cyc < 4 * 26664 + 10) begin
      @(negedge clk);
      for (int o = 0; o < 4; o++) begin
        if (trig[o]) begin
          if (last[o] >= 0) check(cyc - last[o] == COUNTS[o], $sformatf("period of trigger %0d", o));
          last[o] = cyc;
          seen[o]++;
        end
      end
      // alignment: a slow trigger always comes with the faster ones
      for (int o = 0; o < 3; o++)
        if (trig[o]) check(trig[o+1], $sformatf("trigger %0d aligned with trigger %0d", o, o + 1));
      cyc++;
    end
    check(seen[0] == 4 || seen[0] == 5, "number of 3.75 kHz triggers");
    check(seen[3] >= 32, "number of 30 kHz triggers");
    // reset in the middle of a period restarts the count
    repeat (1000) @(posedge clk);
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(trig == 4'hF, "triggers restart after a second reset");
    for (int i = 1; i < 3333; i++) begin
      @(negedge clk);
      if (trig[3]) check(0, "30 kHz trigger early after reset");
    end
    @(negedge clk);
    check(trig[3], "30 kHz trigger 3333 cycles after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
