// tb_debouncer: checks the AND-of-history debouncer at its default length
// (83 decisions) and at length 5.
//
// A reference history is kept in the testbench. Random decision streams with
// long runs of ones are applied; after every in_valid the output must equal
// "the last DB_LENGTH inputs were all one". Checks also that the output
// rises only on the DB_LENGTH-th consecutive one, falls on the first zero,
// ignores in_bit while in_valid is low, and clears on reset.
module tb_debouncer;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0, in_bit = 1'b0;
  logic [1:0] out_bit;
  int checks = 0, failures = 0;
  int ones = 0;              // consecutive ones so far
  int rises [2];
  localparam int LEN [2] = '{83, 5};

  always #5 clk = ~clk;

  debouncer                 dut_def   (.clk, .rst, .in_valid, .in_bit, .out_bit(out_bit[0]));
  debouncer #(.DB_LENGTH(5)) dut_short (.clk, .rst, .in_valid, .in_bit, .out_bit(out_bit[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic step(bit v, bit valid);
    logic [1:0] prev_out;
    prev_out = out_bit;
    @(posedge clk);
    in_valid <= valid;
    in_bit   <= v;
    @(posedge clk);
    in_valid <= 1'b0;
    in_bit   <= ~v;         // must be ignored
    @(negedge clk);
    if (valid) ones = v ? ones + 1 : 0;
    for (int u = 0; u < 2; u++) begin
      check(out_bit[u] == (ones >= LEN[u]), $sformatf("len %0d: output %0b after %0d ones", LEN[u], out_bit[u], ones));
      if (out_bit[u] && !prev_out[u]) begin
        rises[u]++;
        check(ones == LEN[u], "output rises on exactly the DB_LENGTH-th one");
      end
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
    rises[0] = 0; rises[1] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(out_bit == 2'b00, "outputs low after reset");
    for (int i = 0; i < 90; i++) step(1, 1);
    for (int i = 0; i < 20; i++) step(1, 0);     // no valid: nothing changes
    step(0, 1);
    for (int b = 0; b < 40; b++) begin
      int len = $urandom_range(100);
      for (int i = 0; i < len; i++) step(1, ($urandom_range(3) != 0));
      step(0, 1);
    end
    for (int i = 0; i < 90; i++) step(1, 1);
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    ones = 0;
    check(out_bit == 2'b00, "outputs cleared by reset");
    check(rises[0] >= 2 && rises[1] >= 10, "both debouncers turned on several times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
