`timescale 1ns/1ps
// tb_crc_unit: checks the CRC-32 (FCS) and CRC-16 (PLCP header)
// instances against a bit-serial reference model on random byte
// streams, the known CRC-32 of "123456789" (CBF43926), and that a stream
// followed by its own check sequence is recognised while a corrupted
// one is not.
module tb_crc_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, en;
  logic [7:0] din;
  logic [31:0] crc32, fcs32;
  logic [15:0] crc16, fcs16;
  logic ok32, ok16;
  int checks = 0, failures = 0;

  crc_unit u32 (.clk, .rst_n, .init, .en, .din, .crc(crc32), .fcs(fcs32), .check_ok(ok32));
  crc_unit #(.W(16), .POLY(16'h8408), .RESIDUE(16'hF0B8)) u16 (
    .clk, .rst_n, .init, .en, .din, .crc(crc16), .fcs(fcs16), .check_ok(ok16));

  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input int w, input logic [31:0] poly);
    logic [31:0] r;
    r = (w == 32) ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++)
        r = (r[0] ^ d[i][b]) ? ((r >> 1) ^ poly) : (r >> 1);
    return r;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic feed(input byte unsigned d[$]);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    foreach (d[i]) begin en = 1; din = d[i]; @(negedge clk); end
    en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned d[$], e[$];
    logic [31:0] r;
    init = 0; en = 0; din = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    d = '{"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    feed(d);
    chk(fcs32 == 32'hCBF43926, $sformatf("CRC-32 check value %08x", fcs32));
    chk(fcs16 == 16'h906E, $sformatf("CRC-16 (X.25) check value %04x", fcs16));
    for (int t = 0; t < 40; t++) begin
      d.delete();
      repeat ($urandom_range(1, 60)) d.push_back(8'($urandom));
      feed(d);
      r = ref_crc(d, 32, 32'hEDB88320);
      chk(crc32 == r, $sformatf("CRC-32 register %08x ref %08x", crc32, r));
      r = ref_crc(d, 16, 32'h8408);
      chk(crc16 == r[15:0], $sformatf("CRC-16 register %04x ref %04x", crc16, r[15:0]));
      // append the FCS and check the residue
      e = d;
      r = ~ref_crc(d, 32, 32'hEDB88320);
      for (int i = 0; i < 4; i++) e.push_back(r[8*i +: 8]);
      feed(e);
      chk(ok32, "CRC-32 accepts a good frame");
      e[$urandom_range(0, e.size() - 1)] ^= 8'h10;
      feed(e);
      chk(!ok32, "CRC-32 rejects a corrupted frame");
      e = d;
      r = ~ref_crc(d, 16, 32'h8408);
      e.push_back(r[7:0]); e.push_back(r[15:8]);
      feed(e);
      chk(ok16, "CRC-16 accepts a good header");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
