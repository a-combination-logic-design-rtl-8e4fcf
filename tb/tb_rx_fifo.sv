`timescale 1ns/1ps
// tb_rx_fifo: sends random bytes as serial bits (LSB first) with random
// gaps and checks the bytes that come out; checks that `sync` realigns
// the byte boundary (keeping a bit that comes with it) and that a byte completed while the previous one was
// not popped is flagged as overflow.
module tb_rx_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync, bit_valid, rx_bit, pop, byte_valid, full, overflow;
  logic [7:0] rx_byte;
  int checks = 0, failures = 0;

  rx_fifo dut (.clk, .rst_n, .sync, .bit_valid, .rx_bit, .pop, .rx_byte, .byte_valid,
               .full, .overflow);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  byte unsigned got[$];
  logic auto_pop = 1;
  always @(posedge clk) if (rst_n && byte_valid) got.push_back(rx_byte);
  assign pop = auto_pop && byte_valid;

  task automatic send_byte(input logic [7:0] b, input bit gaps);
    for (int i = 0; i < 8; i++) begin
      if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
      bit_valid = 1; rx_bit = b[i]; @(negedge clk); bit_valid = 0;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned sent[$];
    sync = 0; bit_valid = 0; rx_bit = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      sent.push_back(8'($urandom));
      send_byte(sent[$], 1);
    end
    @(negedge clk); @(negedge clk);
    chk(got.size() == sent.size(), $sformatf("%0d bytes of %0d", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size()) chk(got[i] == sent[i], $sformatf("byte %0d", i));
    chk(!overflow, "no overflow while popped");
    // half a byte then sync: the next byte starts fresh
    got.delete();
    for (int i = 0; i < 3; i++) begin bit_valid = 1; rx_bit = 1; @(negedge clk); end
    bit_valid = 0;
    sync = 1; @(negedge clk); sync = 0;
    send_byte(8'h5A, 0);
    @(negedge clk); @(negedge clk);
    chk(got.size() == 1 && got[0] == 8'h5A, "sync realigns");
    // the first bit of a frame in the same cycle as sync is kept
    got.delete();
    for (int i = 0; i < 5; i++) begin bit_valid = 1; rx_bit = 1; @(negedge clk); end
    sync = 1; bit_valid = 1; rx_bit = 1; @(negedge clk);
    sync = 0; bit_valid = 0;
    for (int i = 1; i < 8; i++) begin bit_valid = 1; rx_bit = i[0]; @(negedge clk); end
    bit_valid = 0;
    @(negedge clk); @(negedge clk);
    chk(got.size() == 1 && got[0] == 8'hAB, "bit together with sync kept");
    // overflow
    auto_pop = 0;
    send_byte(8'h11, 0);
    send_byte(8'h22, 0);
    @(negedge clk); @(negedge clk);
    chk(overflow && full, "overflow when not popped");
    sync = 1; @(negedge clk); sync = 0;
    chk(!overflow && !full, "sync clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
