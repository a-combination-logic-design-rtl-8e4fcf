// mac_timer: the one counter shared by the IFS, backoff and ACK/CTS timers.
//
// Only one of these timers is ever running, so a single down-counter
// serves all three. `start` loads `load_us` (microseconds) and the mode:
//   TM_IFS     - SIFS/DIFS, counts every microsecond tick
//   TM_BACKOFF - random backoff, counts only while `medium_idle` is high
//                and holds its value while the medium is busy
//   TM_RSP     - ACK/CTS timeout, counts every microsecond tick
// `expired` pulses for one cycle when the count reaches zero (also when
// started with zero, one cycle after the start); `running` is high from
// the start until then. `stop` abandons the count; `count` shows the
// value left, so a backoff can be saved and resumed later.
// Sharing one counter follows the revised design; the 16-bit width is
// this design's choice (it covers the largest 802.11 backoff of
// 1023 x 20 us).
module mac_timer
  import mac_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         us_tick,
  input  logic         start,
  input  tmode_e       mode,
  input  logic [W-1:0] load_us,
  input  logic         stop,
  input  logic         medium_idle,
  output logic         running,
  output logic         expired,
  output logic [W-1:0] count
);
  tmode_e mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
      expired <= 1'b0;
      mode_q  <= TM_IFS;
    end else begin
      expired <= 1'b0;
      if (start) begin
        count   <= load_us;
        mode_q  <= mode;
        running <= 1'b1;
      end else if (stop) begin
        running <= 1'b0;
      end else if (running) begin
        if (count == '0) begin
          running <= 1'b0;
          expired <= 1'b1;
        end else if (us_tick && (mode_q != TM_BACKOFF || medium_idle)) begin
          count <= count - 1'b1;
        end
      end
    end
  end
endmodule
