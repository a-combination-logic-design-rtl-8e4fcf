`timescale 1ns/1ps
// tb_nav_timer: checks that the NAV takes a Duration only when it is
// larger than the value left, counts down one per microsecond tick to
// zero, ignores durations with bit 15 set, and clears on request.
module tb_nav_timer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic us_tick, load, clear, busy;
  logic [15:0] dur, nav;
  int checks = 0, failures = 0;

  nav_timer dut (.clk, .rst_n, .us_tick, .load, .dur, .clear, .busy, .nav);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic ld(input int d);
    @(negedge clk); load = 1; dur = 16'(d); @(negedge clk); load = 0;
  endtask
  task automatic ticks(input int n);
    repeat (n) begin @(negedge clk); us_tick = 1; @(negedge clk); us_tick = 0; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    us_tick = 0; load = 0; clear = 0; dur = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(!busy && nav == 0, "idle after reset");
    ld(100);
    chk(busy && nav == 100, "loaded 100");
    ticks(30);
    chk(nav == 70, $sformatf("70 after 30 us (%0d)", nav));
    ld(50);
    chk(nav == 70, "smaller duration ignored");
    ld(200);
    chk(nav == 200, "larger duration taken");
    ld(32'h8123);
    chk(nav == 200, "bit 15 durations ignored");
    ticks(199);
    chk(busy && nav == 1, "one left");
    ticks(1);
    chk(!busy && nav == 0, "expired");
    ticks(3);
    chk(nav == 0, "stays at zero");
    ld(500);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(!busy, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
