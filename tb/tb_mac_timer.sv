`timescale 1ns/1ps
// tb_mac_timer: checks the shared counter in its three uses: an IFS
// count expires after exactly the loaded number of microsecond ticks; a
// backoff count does not move while the medium is busy and resumes
// after; an ACK timeout can be stopped before it expires; a zero load
// expires at once.
module tb_mac_timer;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic us_tick, start, stop, medium_idle, running, expired;
  tmode_e mode;
  logic [15:0] load_us, count;
  int checks = 0, failures = 0;
  int ph = 0;

  mac_timer dut (.clk, .rst_n, .us_tick, .start, .mode, .load_us, .stop,
                 .medium_idle, .running, .expired, .count);

  // one tick every 4 clocks
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
  end
  assign us_tick = (ph == 3);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic go(input tmode_e m, input int v);
    @(negedge clk); start = 1; mode = m; load_us = 16'(v);
    @(negedge clk); start = 0;
  endtask

  // count ticks until expiry
  task automatic run_ticks(output int ticks, output int cycles);
    ticks = 0; cycles = 0;
    while (!expired && cycles < 100000) begin
      @(posedge clk); cycles++;
      if (us_tick && running) ticks++;
      #1;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, c, held;
    start = 0; stop = 0; medium_idle = 1; mode = TM_IFS; load_us = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // IFS counts: SIFS and DIFS
    for (int i = 0; i < 3; i++) begin
      int v;
      v = (i == 0) ? 10 : (i == 1) ? 50 : 1;
      go(TM_IFS, v);
      chk(running, "running after start");
      run_ticks(t, c);
      chk(expired, "expired");
      chk(t == v || t == v + 1, $sformatf("IFS %0d took %0d ticks", v, t));
      chk(c >= 4 * (v - 1) && c <= 4 * (v + 1) + 2, $sformatf("IFS %0d took %0d cycles", v, c));
      @(posedge clk); #1;
      chk(!expired && !running, "expired is one pulse");
    end
    // backoff freezes while busy
    go(TM_BACKOFF, 30);
    repeat (40) @(posedge clk);
    medium_idle = 0;
    #1 held = int'(count);
    repeat (100) @(posedge clk);
    #1 chk(int'(count) == held, $sformatf("backoff held at %0d while busy (now %0d)", held, count));
    chk(!expired && running, "no expiry while busy");
    medium_idle = 1;
    run_ticks(t, c);
    chk(expired, "backoff expired after the medium cleared");
    chk(c >= 4 * (held - 1) && c <= 4 * (held + 1) + 2, $sformatf("resumed count %0d took %0d cycles", held, c));
    // IFS ignores the medium
    medium_idle = 0;
    go(TM_IFS, 5);
    run_ticks(t, c);
    chk(expired && c <= 4 * 6 + 2, "IFS counts while busy");
    medium_idle = 1;
    // ACK timeout stopped
    go(TM_RSP, 20);
    repeat (30) @(posedge clk);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    repeat (200) begin @(posedge clk); #1 if (expired) chk(0, "stopped timer expired"); end
    chk(!running, "stopped");
    // zero load
    go(TM_RSP, 0);
    run_ticks(t, c);
    chk(expired && c <= 2, $sformatf("zero load expires at once (%0d)", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
