// us_tick: microsecond time base for the MAC timers.
//
// All 802.11 timing is in microseconds, while the controller may run from
// any system clock between 11 and 44 MHz. A programmable divider counts
// `div` system clocks (div = clock frequency in MHz) and pulses `tick`
// for one cycle at the end of each microsecond. A div of 0 or 1 ticks
// every cycle. The register width and the restart on a change of `div`
// are this design's choices.
module us_tick #(
  parameter int unsigned DIV_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,   // system clocks per microsecond
  output logic             tick
);
  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + 1'b1 >= div) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
