`timescale 1ns/1ps
// tb_us_tick: checks that the microsecond tick comes every `div` clocks
// for the clock rates the controller supports (11, 22, 44 MHz) and a
// small divider, and that the period follows a change of `div`.
module tb_us_tick;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] div;
  logic tick;
  int checks = 0, failures = 0;

  us_tick dut (.clk, .rst_n, .div, .tick);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d);
    int last, n, c;
    div = 6'(d);
    // let the new divider settle
    repeat (2 * d + 2) @(posedge clk);
    last = -1; n = 0; c = 0;
    while (n < 6) begin
      @(posedge clk); c++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != d) begin
            failures++;
            $display("FAIL: div %0d period %0d", d, c - last);
          end
        end
        last = c; n++;
      end
    end
  endtask

  initial begin
    div = 6'd44;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(44);
    measure(11);
    measure(22);
    measure(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
