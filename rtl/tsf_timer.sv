// tsf_timer: timing synchronization function timer.
//
// A 64-bit microsecond counter kept by the controller itself. When a
// Beacon with a good FCS arrives (`bcn_rx`, timestamp `bcn_ts`):
//   - an access point (`is_ap`) keeps its own time;
//   - a station in an ad hoc BSS (`is_ibss`) adopts the timestamp only
//     if it is later than its own TSF;
//   - a station in an infrastructure BSS always adopts it.
// Target beacon transmission times come from a TU counter (1 TU =
// 1024 us): `tbtt` pulses every `bcn_int` TUs. In an ad hoc BSS the ATIM
// window `atim_active` is high for `atim_win` TUs after each TBTT.
// The adoption rules follow IEEE 802.11; counting TBTTs in TUs from
// enable time rather than from TSF = 0 is this design's simplification.
module tsf_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        us_tick,
  input  logic        enable,
  input  logic        is_ap,
  input  logic        is_ibss,
  input  logic [15:0] bcn_int,   // TUs
  input  logic [7:0]  atim_win,  // TUs
  input  logic        bcn_rx,
  input  logic [63:0] bcn_ts,
  output logic [63:0] tsf,
  output logic        tbtt,
  output logic        atim_active,
  output logic        adopted
);
  logic [9:0]  us_in_tu;
  logic [15:0] tu_left;
  logic [7:0]  atim_left;
  logic        tu_end;

  assign tu_end = us_tick && (us_in_tu == 10'd1023);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsf <= '0; us_in_tu <= '0; tu_left <= '0; atim_left <= '0;
      tbtt <= 1'b0; atim_active <= 1'b0; adopted <= 1'b0;
    end else begin
      tbtt    <= 1'b0;
      adopted <= 1'b0;
      if (bcn_rx && !is_ap && (!is_ibss || bcn_ts > tsf)) begin
        tsf     <= bcn_ts;
        adopted <= 1'b1;
      end else if (us_tick) begin
        tsf <= tsf + 64'd1;
      end
      if (!enable) begin
        us_in_tu    <= '0;
        tu_left     <= bcn_int;
        atim_active <= 1'b0;
      end else if (us_tick) begin
        us_in_tu <= us_in_tu + 10'd1;
        if (tu_end) begin
          if (tu_left <= 16'd1) begin
            tu_left     <= bcn_int;
            tbtt        <= 1'b1;
            atim_left   <= atim_win;
            atim_active <= is_ibss && (atim_win != '0);
          end else begin
            tu_left <= tu_left - 16'd1;
            if (atim_left <= 8'd1) atim_active <= 1'b0;
            if (atim_left != '0) atim_left <= atim_left - 8'd1;
          end
        end
      end
    end
  end
endmodule
