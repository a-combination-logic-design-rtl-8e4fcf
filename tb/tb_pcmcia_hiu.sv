`timescale 1ns/1ps
// tb_pcmcia_hiu: drives the three I/O ports as the host driver would.
// Checks reset values, register write/read-back and the configuration
// outputs, 16-bit registers taking effect on their high byte, command
// pulses, status bits with write-one-to-clear and the masked interrupt,
// read-only pointer and TSF registers, and the auto-incrementing SRAM
// window in both directions against a memory model with the ESI timing
// (grant at once, read data two cycles later).
module tb_pcmcia_hiu;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [9:0] io_addr;
  logic io_rd, io_wr, io_wait, irq;
  logic [7:0] io_wdata, io_rdata;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic enable, is_ap, is_ibss, csma_dis, bcn_en, cmd_tx, cmd_atim;
  logic [5:0] clk_div;
  logic [47:0] own_addr, bssid, atim_da;
  logic [15:0] rts_thresh, bcn_int, rx_rptr, rx_wptr;
  logic [7:0] signal, atim_win, bcn_len;
  logic [3:0] retry_limit, tx_frags;
  logic [63:0] tsf;
  logic st_rx_ok, st_rx_err, st_tx_done, st_tx_fail;
  int checks = 0, failures = 0;

  pcmcia_hiu dut (.*);

  // memory with ESI timing
  logic [7:0] mem [1024];
  logic [7:0] rd_p1, rd_p2;
  logic v_p1;
  always_comb begin
    mrsp = '0;
    mrsp.gnt = mreq.req;
    mrsp.rvalid = v_p2;
    mrsp.rdata = rd_p2;
  end
  logic v_p2;
  always @(posedge clk) begin
    v_p1 <= mreq.req && !mreq.we;
    rd_p1 <= mem[mreq.addr[9:0]];
    v_p2 <= v_p1;
    rd_p2 <= rd_p1;
    if (mreq.req && mreq.we) mem[mreq.addr[9:0]] <= mreq.wdata;
  end

  int n_cmd_tx = 0, n_cmd_atim = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_tx) n_cmd_tx++;
    if (cmd_atim) n_cmd_atim++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic io_write(input logic [9:0] port, input logic [7:0] d);
    @(negedge clk); io_addr = port; io_wdata = d; io_wr = 1;
    @(negedge clk); io_wr = 0;
    while (io_wait) @(negedge clk);
  endtask
  task automatic io_read(input logic [9:0] port, output logic [7:0] d);
    @(negedge clk); io_addr = port; io_rd = 1;
    #1 d = io_rdata;
    @(negedge clk); io_rd = 0; #1;
    while (io_wait) @(negedge clk);
  endtask
  task automatic wr(input logic [7:0] i, input logic [7:0] v);
    io_write(10'h280, i); io_write(10'h281, v);
  endtask
  task automatic rd(input logic [7:0] i, output logic [7:0] v);
    io_write(10'h280, i); io_read(10'h281, v);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    io_addr = 0; io_rd = 0; io_wr = 0; io_wdata = 0;
    rx_wptr = 16'h1234; tsf = 64'h0102030405060708;
    st_rx_ok = 0; st_rx_err = 0; st_tx_done = 0; st_tx_fail = 0;
    for (int i = 0; i < 1024; i++) mem[i] = 8'(i * 3);
    repeat (3) @(posedge clk); rst_n = 1;
    // reset values
    rd(8'h01, v); chk(v == 44, "CLK_DIV resets to 44");
    rd(8'h16, v); chk(v == 8'h0A, "SIGNAL resets to 1 Mbit/s");
    rd(8'h17, v); chk(v == 7, "retry limit 7");
    chk(rts_thresh == 2347 && bcn_int == 100 && rx_rptr == RX_BASE, "16-bit reset values");
    chk(!enable && !irq, "disabled, no interrupt");
    // configuration registers
    wr(8'h00, 8'h1F);
    chk(enable && is_ap && is_ibss && csma_dis && bcn_en, "CTRL bits");
    for (int i = 0; i < 6; i++) wr(8'h02 + 8'(i), 8'hA0 + 8'(i));
    chk(own_addr == 48'hA5A4A3A2A1A0, $sformatf("own address %012x", own_addr));
    rd(8'h04, v); chk(v == 8'hA2, "own address reads back");
    for (int i = 0; i < 6; i++) wr(8'h0E + 8'(i), 8'h30 + 8'(i));
    chk(atim_da == 48'h353433323130, "ATIM destination");
    wr(8'h14, 8'h34);
    chk(rts_thresh == 2347, "low byte alone does not change the threshold");
    wr(8'h15, 8'h01);
    chk(rts_thresh == 16'h0134, "threshold set on the high byte");
    wr(8'h1B, 8'd42); chk(bcn_len == 42, "beacon length");
    wr(8'h1C, 8'd3); chk(tx_frags == 3, "fragments");
    wr(8'h1D, 8'h01); wr(8'h1D, 8'h02);
    @(negedge clk);
    chk(n_cmd_tx == 1 && n_cmd_atim == 1, "command pulses");
    rd(8'h22, v); chk(v == 8'h34, "write pointer low");
    rd(8'h23, v); chk(v == 8'h12, "write pointer high");
    rd(8'h2B, v); chk(v == 8'h05, "TSF byte 3");
    wr(8'h24, 8'h00); wr(8'h25, 8'h20); chk(rx_rptr == 16'h2000, "read pointer");
    // status and interrupt
    @(negedge clk); st_rx_ok = 1; @(negedge clk); st_rx_ok = 0;
    rd(8'h20, v); chk(v == 8'h01, "receive status");
    chk(!irq, "masked");
    wr(8'h21, 8'h01);
    chk(irq, "interrupt when unmasked");
    @(negedge clk); st_tx_fail = 1; @(negedge clk); st_tx_fail = 0;
    rd(8'h20, v); chk(v == 8'h09, "two status bits");
    wr(8'h20, 8'h01);
    rd(8'h20, v); chk(v == 8'h08 && !irq, "write one clears only that bit");
    // SRAM window write then read back
    wr(8'h26, 8'h10); wr(8'h27, 8'h00);
    for (int i = 0; i < 8; i++) io_write(10'h282, 8'hC0 + 8'(i));
    for (int i = 0; i < 8; i++) chk(mem[16 + i] == 8'hC0 + 8'(i), $sformatf("window write %0d", i));
    wr(8'h26, 8'h0E); wr(8'h27, 8'h00);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] e;
      e = (i >= 2 && i < 10) ? 8'hC0 + 8'(i - 2) : 8'((14 + i) * 3);
      io_read(10'h282, v);
      chk(v == e, $sformatf("window read %0d: %02x expected %02x", i, v, e));
    end
    rd(8'h26, v); chk(v == 8'h1A, "window address advanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
