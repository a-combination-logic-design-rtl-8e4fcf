`timescale 1ns/1ps
// tb_tsf_timer: checks that the TSF counts microsecond ticks, that TBTT
// comes every bcn_int x 1024 ticks, that the ATIM window lasts atim_win
// TUs in an ad hoc BSS, and the Beacon adoption rules: an access point
// keeps its time, an ad hoc station takes only a later timestamp, an
// infrastructure station always takes it.
module tb_tsf_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic us_tick, enable, is_ap, is_ibss, bcn_rx, tbtt, atim_active, adopted;
  logic [15:0] bcn_int;
  logic [7:0]  atim_win;
  logic [63:0] bcn_ts, tsf;
  int checks = 0, failures = 0;

  tsf_timer dut (.clk, .rst_n, .us_tick, .enable, .is_ap, .is_ibss, .bcn_int, .atim_win,
                 .bcn_rx, .bcn_ts, .tsf, .tbtt, .atim_active, .adopted);

  assign us_tick = 1'b1;   // one microsecond per clock for speed

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic beacon(input logic [63:0] ts);
    @(negedge clk); bcn_rx = 1; bcn_ts = ts; @(negedge clk); bcn_rx = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_last, t0;
    int n, aw;
    logic [63:0] t_prev;
    enable = 0; is_ap = 0; is_ibss = 1; bcn_int = 3; atim_win = 1; bcn_rx = 0; bcn_ts = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    t0 = tsf;
    repeat (100) @(negedge clk);
    chk(tsf - t0 == 100, $sformatf("TSF advanced %0d in 100 us", tsf - t0));
    enable = 1;
    // TBTT spacing and ATIM window
    n = 0; t_last = -1; aw = 0;
    for (longint c = 0; c < 3 * 3 * 1024 + 10; c++) begin
      @(posedge clk); #1;
      if (atim_active) aw++;
      if (tbtt) begin
        if (t_last >= 0) chk(c - t_last == 3 * 1024, $sformatf("TBTT spacing %0d", c - t_last));
        t_last = c; n++;
      end
    end
    chk(n == 3, $sformatf("three TBTTs (%0d)", n));
    // two whole windows and the first few microseconds of the third
    chk(aw >= 2 * 1024 + 8 && aw <= 2 * 1024 + 12, $sformatf("ATIM windows of 1 TU (%0d us total)", aw));
    // ad hoc adoption
    t_prev = tsf;
    beacon(t_prev - 500);
    chk(tsf >= t_prev && tsf < t_prev + 10, "ad hoc: earlier timestamp ignored");
    beacon(64'd5_000_000);
    chk(tsf >= 64'd5_000_000 && tsf < 64'd5_000_010, "ad hoc: later timestamp adopted");
    // infrastructure station: always adopts
    is_ibss = 0;
    beacon(64'd1000);
    chk(tsf >= 64'd1000 && tsf < 64'd1010, "station: timestamp adopted");
    // access point: keeps its own
    is_ap = 1;
    t_prev = tsf;
    beacon(64'd99);
    chk(tsf >= t_prev, "AP: keeps its TSF");
    // no ATIM window outside an ad hoc BSS
    is_ap = 0; aw = 0;
    repeat (2 * 1024) @(posedge clk);   // let a window already open close
    repeat (4 * 1024) begin @(posedge clk); #1 if (atim_active) aw++; end
    chk(aw == 0, "no ATIM window in an infrastructure BSS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
