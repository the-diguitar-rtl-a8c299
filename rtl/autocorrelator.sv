// autocorrelator: period detector at the heart of one note detector.
//
// On every sample trigger it sends the incoming sample to its harmonic-stop
// FIR (fir_start / fir_sample) and waits for the filtered value (fir_done /
// fir_result). The filtered sample is shifted into a buffer that holds 2.5
// periods of the note (BUF_LEN = 2*SC_LEN + SC_LEN/2 samples, newest at index
// 0). The newest period, buf[0 .. SC_LEN-1], is then used as a template and
// correlated with the buffer at lags SC_LEN/2 + offset for offset = 0 ..
// SC_LEN-1:
//     acc(offset) = sum_{i<SC_LEN} buf[i] * buf[SC_LEN/2 + offset + i]
// one product per clock. The offset with the largest sum (the first one on a
// tie) is the peak. The note counts as present when PEAK_MASK has a one at
// the peak offset, i.e. the measured period is within a sample or two of the
// note's period, and the peak sum is at least DB_THRESHOLD. That raw
// decision is presented on det with a one-cycle det_valid.
//
// Timing: one sample costs 2 + (FIR latency) + SC_LEN*(SC_LEN+1) + 1
// cycles, 2,233 for E (SC_LEN 46) with the 125-tap FIR, which fits in the
// 3,333 cycles between 30 kHz samples. The sequencing, buffer, template
// and lag range, mask and threshold test follow the original design; the
// ports that expose the peak are additions for observation.
module autocorrelator
  import diguitar_pkg::*;
#(
  parameter int          SC_LEN       = 46,            // samples per note period
  parameter logic [63:0] PEAK_MASK    = 64'd58720256,  // accepted peak offsets
  parameter int signed   DB_THRESHOLD = 0              // minimum peak sum
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_clk,   // one-cycle sample trigger
  input  sample_t            in_sample,
  // harmonic-stop FIR handshake
  output sample_t            fir_sample,
  output logic               fir_start,
  input  sample_t            fir_result,
  input  logic               fir_done,
  // decision
  output logic               det_valid,
  output logic               det,
  output logic [5:0]         peak_offset,
  output logic signed [31:0] peak_value,
  output logic               busy
);
  localparam int HALF    = SC_LEN / 2;
  localparam int BUF_LEN = 2 * SC_LEN + HALF;

  typedef enum logic [1:0] {ST_IDLE, ST_WAIT_FIR, ST_RUN_AC, ST_DECIDE} state_e;

  state_e             state;
  sample_t            ac_buf [BUF_LEN];
  logic [5:0]         idx;        // position within the template
  logic [5:0]         offset;     // lag offset being correlated
  logic signed [31:0] acc;
  logic signed [15:0] product;
  logic [7:0]         lag_pos;

  always_comb begin
    lag_pos = 8'(HALF) + 8'(offset) + 8'(idx);
    product = ac_buf[idx] * ac_buf[lag_pos];
  end

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_IDLE;
      for (int i = 0; i < BUF_LEN; i++) ac_buf[i] <= '0;
      idx         <= '0;
      offset      <= '0;
      acc         <= '0;
      peak_value  <= '0;
      peak_offset <= '0;
      fir_sample  <= '0;
      fir_start   <= 1'b0;
      det_valid   <= 1'b0;
      det         <= 1'b0;
    end else begin
      det_valid <= 1'b0;
      if (sample_clk) begin
        fir_sample <= in_sample;
        fir_start  <= 1'b1;
        state      <= ST_WAIT_FIR;
      end else begin
        case (state)
          ST_WAIT_FIR: begin
            fir_start <= 1'b0;
            if (fir_done) begin
              ac_buf[0] <= fir_result;
              for (int i = 1; i < BUF_LEN; i++) ac_buf[i] <= ac_buf[i-1];
              idx        <= '0;
              offset     <= '0;
              acc        <= '0;
              peak_value <= 32'sh8000_0000;   // most negative value
              state      <= ST_RUN_AC;
            end
          end
          ST_RUN_AC: begin
            if (32'(idx) < SC_LEN) begin
              acc <= acc + 32'(product);
              idx <= idx + 1'b1;
            end else begin
              if (acc > peak_value) begin
                peak_value  <= acc;
                peak_offset <= offset;
              end
              idx    <= '0;
              offset <= offset + 1'b1;
              acc    <= '0;
              if (32'(offset) >= SC_LEN - 1) state <= ST_DECIDE;
            end
          end
          ST_DECIDE: begin
            det_valid <= 1'b1;
            det       <= PEAK_MASK[peak_offset] && (peak_value >= DB_THRESHOLD);
            state     <= ST_IDLE;
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // The whole computation has to finish before the next sample trigger.
  a_in_time: assert property (@(posedge clk) disable iff (rst) sample_clk |-> state == ST_IDLE)
    else $error("autocorrelator: sample trigger arrived before the previous sample was processed");

  initial assert (SC_LEN >= 2 && SC_LEN <= 60) else $error("autocorrelator: SC_LEN out of range");

endmodule
