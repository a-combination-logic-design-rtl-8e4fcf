// nav_timer: network allocation vector (virtual carrier sense).
//
// `load` with `dur` (the 16-bit Duration field, in microseconds, of a
// frame addressed to another station) replaces the current value only if
// it is larger. The load is given at the end of the received frame, so
// the countdown starts after its last byte, as the design requires. The
// value then drops by one per microsecond tick; `busy` is high while it
// is non-zero. Durations with bit 15 set are not time values in 802.11
// and are ignored. `clear` empties it.
module nav_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        us_tick,
  input  logic        load,
  input  logic [15:0] dur,
  input  logic        clear,
  output logic        busy,
  output logic [15:0] nav
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      nav <= '0;
    else if (clear)
      nav <= '0;
    else if (load && !dur[15] && dur > nav)
      nav <= dur;
    else if (us_tick && nav != '0)
      nav <= nav - 1'b1;
  end
  assign busy = (nav != '0);
endmodule
