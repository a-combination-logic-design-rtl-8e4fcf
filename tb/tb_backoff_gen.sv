`timescale 1ns/1ps
// tb_backoff_gen: checks the contention window sequence 31, 63, ..., 1023
// (saturating) on retries and its return to 31, that every draw lies in
// 0..CW, that draws spread over the whole window, and that the backoff
// time is slots x 20 us.
module tb_backoff_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic retry, reset_cw;
  logic [9:0] cw, slots;
  logic [15:0] backoff_us;
  int checks = 0, failures = 0;

  backoff_gen dut (.clk, .rst_n, .retry, .reset_cw, .cw, .slots, .backoff_us);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cw, lo, hi, qbin[4];
    retry = 0; reset_cw = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    exp_cw = 31;
    for (int r = 0; r < 8; r++) begin
      chk(cw == 10'(exp_cw), $sformatf("retry %0d: cw %0d expected %0d", r, cw, exp_cw));
      // draws
      lo = 1024; hi = -1; qbin = '{0, 0, 0, 0};
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        chk(slots <= cw, "slot count inside the window");
        chk(backoff_us == 16'(slots) * 16'd20, "backoff time = slots x 20 us");
        if (int'(slots) < lo) lo = int'(slots);
        if (int'(slots) > hi) hi = int'(slots);
        qbin[slots * 4 / (cw + 1)]++;
      end
      chk(lo <= exp_cw / 8 && hi >= exp_cw - exp_cw / 8, $sformatf("cw %0d: draws span %0d..%0d", exp_cw, lo, hi));
      foreach (qbin[b]) chk(qbin[b] > 40, $sformatf("cw %0d: quarter %0d got %0d draws", exp_cw, b, qbin[b]));
      retry = 1; @(negedge clk); retry = 0;
      exp_cw = (exp_cw * 2 + 1 > 1023) ? 1023 : exp_cw * 2 + 1;
    end
    chk(cw == 10'd1023, "saturates at 1023");
    reset_cw = 1; @(negedge clk); reset_cw = 0;
    chk(cw == 10'd31, "reset to CWmin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
