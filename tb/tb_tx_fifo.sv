`timescale 1ns/1ps
// tb_tx_fifo: pushes random bytes whenever there is space while the
// baseband takes bits at random moments, rebuilds the bytes from the
// serial bits (LSB first) and compares; checks the count of free bytes
// in every cycle, that the register holds
// at most four bytes and that a strobe on an empty register is flagged
// as underrun.
module tb_tx_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, push, space, bit_en, tx_bit, has_bit, empty, underrun;
  logic [7:0] din;
  logic [2:0] free;
  int checks = 0, failures = 0;

  tx_fifo dut (.clk, .rst_n, .clear, .push, .din, .space, .free, .bit_en, .tx_bit, .has_bit,
               .empty, .underrun);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned sent[$], got[$];
  logic [7:0] sh;
  int nb = 0, pushed = 0, bad_free = 0, held = 0;

  initial begin
    clear = 0; push = 0; bit_en = 0; din = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(empty && space && !underrun, "empty after reset");
    // fill without draining: exactly four bytes fit
    for (int i = 0; i < 5; i++) begin
      push = space; din = 8'(i + 1);
      if (space) begin sent.push_back(8'(i + 1)); pushed++; end
      @(negedge clk);
    end
    push = 0;
    chk(pushed == 4 && !space && free == 0, $sformatf("four bytes fit (%0d)", pushed));
    held = 32;
    // stream
    for (int c = 0; c < 30000; c++) begin
      push = space && (sent.size() < 600) && ($urandom_range(0, 3) == 0);
      din = 8'($urandom);
      bit_en = has_bit && ($urandom_range(0, 2) == 0);
      if (int'(free) != (32 - held) / 8) bad_free++;
      if (bit_en) held--;
      if (push) held += 8;
      if (bit_en) begin
        sh = {tx_bit, sh[7:1]}; nb++;
        if (nb == 8) begin got.push_back(sh); nb = 0; end
      end
      if (push) sent.push_back(din);
      @(negedge clk);
    end
    push = 0;
    while (has_bit) begin
      bit_en = 1; sh = {tx_bit, sh[7:1]}; nb++;
      if (nb == 8) begin got.push_back(sh); nb = 0; end
      @(negedge clk);
    end
    bit_en = 0;
    chk(got.size() == sent.size(), $sformatf("%0d bytes out of %0d", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size()) chk(got[i] == sent[i], $sformatf("byte %0d", i));
    chk(bad_free == 0, $sformatf("free byte count wrong in %0d cycles", bad_free));
    chk(empty && !underrun, "empty, no underrun");
    bit_en = 1; @(negedge clk); bit_en = 0;
    chk(underrun, "underrun flagged");
    clear = 1; @(negedge clk); clear = 0;
    chk(!underrun && empty, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
