// debouncer: accepts a note only when it was seen on every one of the last
// DB_LENGTH decisions.
//
// Each in_valid shifts in_bit into a DB_LENGTH-bit shift register; out_bit is
// the AND of all of its bits, so a note turns on only after DB_LENGTH
// consecutive positive decisions and turns off on the first negative one.
// With one decision per sample, DB_LENGTH = 80 at 3.75 kHz (and 160, 320, 640
// at the faster octaves) is about 21 ms. The shift register cleared by reset
// follows the original design. Interface: out_bit is registered-data
// combinational (AND of the register), updated the cycle after in_valid.
module debouncer #(
  parameter int DB_LENGTH = 83
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_bit
);
  logic [DB_LENGTH-1:0] history;

  assign out_bit = &history;

  always_ff @(posedge clk) begin
    if (rst)
      history <= '0;
    else if (in_valid)
      history <= {history[DB_LENGTH-2:0], in_bit};
  end

  initial assert (DB_LENGTH >= 2) else $error("debouncer: DB_LENGTH must be at least 2");

endmodule
