// midi_tx: MIDI transmitter that turns 46 note lines into NOTE_ON / NOTE_OFF
// messages.
//
// While idle it visits one note line per clock (0, 1, ... 45, 0, ...) and
// compares it with the value it last sent for that note. On a 0->1 change it
// sends NOTE_ON, on a 1->0 change NOTE_OFF, as a three-byte message: status
// (0x9<CHAN> or 0x8<CHAN>), key (KEY_BASE + note index, so note 0 is MIDI key
// 40 = E2) and a fixed velocity. Each byte is framed UART-style (start bit 0,
// eight data bits LSB first, stop bit 1); the 30 bits are held for DIVISOR
// clock cycles each, 31,250 baud from 100 MHz. After the last stop bit the
// scan resumes with the next note. data_out idles high; the board-level
// inversion for the transistor line driver is done by the top level.
// Message format, baud divisor, channel 1, key base 40 and velocity 64 follow
// the original design; the exact bit timing and the busy output are this
// design's.
module midi_tx
  import diguitar_pkg::*;
#(
  parameter int       DIVISOR   = 3200,   // clock cycles per bit
  parameter int       N_NOTES   = NUM_NOTES,
  parameter logic [3:0] CHAN    = 4'd1,
  parameter logic [7:0] KEY_BASE = 8'd40,
  parameter logic [7:0] VELOCITY = 8'd64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_NOTES-1:0] notes_in,
  output logic               data_out,
  output logic               busy
);
  localparam logic [3:0] NOTE_ON  = 4'h9;
  localparam logic [3:0] NOTE_OFF = 4'h8;
  localparam int         NOTE_W   = $clog2(N_NOTES);

  logic [29:0]        frame;      // bit 0 goes out first
  logic [4:0]         bit_idx;
  logic [31:0]        bit_cnt;
  logic [NOTE_W-1:0]  cur;
  logic [N_NOTES-1:0] notes_sent;
  logic [7:0]         status_byte, key_byte;

  always_comb begin
    status_byte = {notes_in[cur] ? NOTE_ON : NOTE_OFF, CHAN};
    key_byte    = KEY_BASE + 8'(cur);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      frame      <= '1;
      bit_idx    <= '0;
      bit_cnt    <= '0;
      cur        <= '0;
      notes_sent <= '0;
      busy       <= 1'b0;
      data_out   <= 1'b1;
    end else if (!busy) begin
      data_out <= 1'b1;
      cur      <= (32'(cur) >= N_NOTES - 1) ? '0 : cur + 1'b1;
      if (notes_in[cur] != notes_sent[cur]) begin
        notes_sent[cur] <= notes_in[cur];
        frame    <= {1'b1, VELOCITY, 1'b0, 1'b1, key_byte, 1'b0, 1'b1, status_byte, 1'b0};
        bit_idx  <= '0;
        bit_cnt  <= '0;
        busy     <= 1'b1;
        data_out <= 1'b0;           // start bit of the status byte
      end
    end else begin
      if (bit_cnt >= 32'(DIVISOR - 1)) begin
        bit_cnt <= '0;
        if (bit_idx == 5'd29) begin
          busy     <= 1'b0;
          data_out <= 1'b1;
        end else begin
          bit_idx  <= bit_idx + 1'b1;
          data_out <= frame[bit_idx + 1'b1];
        end
      end else begin
        bit_cnt <= bit_cnt + 1;
      end
    end
  end

endmodule
