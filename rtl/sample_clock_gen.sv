// sample_clock_gen: sample-rate trigger generator.
//
// A 16-bit counter runs from 0 to COUNT-1 and wraps; trigger is high for the
// one cycle in which the counter is 0, so it pulses exactly once every COUNT
// clock cycles, starting in the first cycle after reset. From the 100 MHz
// clock, COUNT = 3333, 6666, 13332 and 26664 give 30, 15, 7.5 and 3.75 kHz.
// Since each count is exactly twice the one before and all generators leave
// reset together, every slow trigger coincides with a trigger of each faster
// one. This counter and its wrap rule follow the original design.
module sample_clock_gen #(
  parameter int unsigned COUNT = 3333   // clock cycles between triggers, 2..65535
) (
  input  logic clk,
  input  logic rst,
  output logic trigger
);
  logic [15:0] counter;

  assign trigger = (counter == '0);

  always_ff @(posedge clk) begin
    if (rst)
      counter <= '0;
    else if (counter >= 16'(COUNT - 1))
      counter <= '0;
    else
      counter <= counter + 1'b1;
  end

  initial assert (COUNT >= 2 && COUNT <= 65535) else $error("sample_clock_gen: COUNT must fit 16 bits");

endmodule
