// backoff_gen: exponentially growing contention window and random
// backoff draw for the DCF.
//
// The window starts at CW_MIN (31) and becomes 2*CW+1 on each `retry`,
// saturating at CW_MAX (1023); `reset_cw` (after a success or when a
// frame is dropped) returns it to CW_MIN. A free-running 16-bit Galois
// LFSR (x^16+x^14+x^13+x^11+1) advances every cycle; `slots` is its low
// bits masked by the window, so it is uniform over 0..CW because CW+1 is
// a power of two. `backoff_us` is slots x SLOT_US. The window sizes are
// the DSSS values of IEEE 802.11; the LFSR is this design's choice.
module backoff_gen
  import mac_pkg::*;
#(
  parameter int unsigned CW_MIN = 31,
  parameter int unsigned CW_MAX = 1023,
  parameter logic [15:0] SEED   = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        retry,
  input  logic        reset_cw,
  output logic [9:0]  cw,
  output logic [9:0]  slots,
  output logic [15:0] backoff_us
);
  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= SEED;
      cw   <= 10'(CW_MIN);
    end else begin
      lfsr <= lfsr[0] ? ((lfsr >> 1) ^ 16'hB400) : (lfsr >> 1);
      if (reset_cw)
        cw <= 10'(CW_MIN);
      else if (retry)
        cw <= (cw >= 10'(CW_MAX >> 1)) ? 10'(CW_MAX) : {cw[8:0], 1'b1};
    end
  end

  assign slots      = lfsr[9:0] & cw;
  assign backoff_us = 16'(slots) * 16'(SLOT_US);
endmodule
