// threshold_alarm: the fire alarm.
//
// Reads the stored temperature sample, then the stored gas sample, from the
// sample store (read port A, one cycle read latency) in a fixed two-phase
// loop and compares each with a threshold held in the device. A channel is
// "over" when its stored sample is strictly greater than its threshold; the
// alarm is on while either channel is over. Channels whose word has never been
// written count as not over.
//
// Specified: temperature first, then gas; alarm when either stored value is
// greater than its stored threshold. Own choices: the channel numbers and
// threshold values (parameters), and that the alarm clears again once both
// values are back at or below their thresholds.
//
// Timing: each channel's flag is refreshed every 2 cycles; a new stored value
// shows on alarm within 4 cycles of being written.
module threshold_alarm
  import daq_pkg::*;
#(
  parameter chan_t   TEMP_CH     = 3'd0,
  parameter chan_t   GAS_CH      = 3'd1,
  parameter sample_t TEMP_THRESH = 8'd128,
  parameter sample_t GAS_THRESH  = 8'd128
) (
  input  logic    clk,
  input  logic    rst_n,
  output chan_t   rd_addr,
  input  sample_t rd_data,
  input  logic    rd_valid,
  output logic    temp_over,
  output logic    gas_over,
  output logic    alarm
);
  typedef enum logic {CHK_TEMP, CHK_GAS} phase_e;
  phase_e phase;     // channel addressed this cycle
  phase_e phase_q;   // channel whose data arrives this cycle

  assign rd_addr = (phase == CHK_TEMP) ? TEMP_CH : GAS_CH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= CHK_TEMP;
      phase_q   <= CHK_TEMP;
      temp_over <= 1'b0;
      gas_over  <= 1'b0;
    end else begin
      phase   <= (phase == CHK_TEMP) ? CHK_GAS : CHK_TEMP;
      phase_q <= phase;
      // phase_q lags phase by one cycle, matching the read latency
      if (phase_q == CHK_TEMP) temp_over <= rd_valid && (rd_data > TEMP_THRESH);
      else                     gas_over  <= rd_valid && (rd_data > GAS_THRESH);
    end
  end

  assign alarm = temp_over | gas_over;
endmodule
