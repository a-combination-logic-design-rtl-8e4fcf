`timescale 1ns/1ps
// tb_mac_rate: throughput of the baseband interface of one mac_top at its
// default settings (CLK_DIV 44, i.e. a 44 MHz clock).
//
// The baseband model takes or delivers one bit every GAP clocks. For
// GAP = 4, 3, 2 and 1 the host (through the I/O ports only) loads a
// 1500-byte broadcast data frame and starts it; the testbench rebuilds
// the frame from the bits, checks PLCP CRC-16, LENGTH, FCS and every
// MPDU byte, counts the clocks from the first to the last bit, and
// requires that the TxFIFO never ran empty. It then delivers a
// 1500-byte frame addressed to the station at one bit per GAP clocks
// and checks the receive status, the ring record and that the RxFIFO
// never overflowed. The rate in bits per clock is printed with what it
// means at 11 and 44 MHz. The baseband must never have to wait for the
// MAC, so the rate must be 1 / GAP bits per clock; GAP = 1 is the
// fastest the serial port allows.
module tb_mac_rate;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------
  logic [9:0]  io_addr = 0;
  logic        io_rd = 0, io_wr = 0, io_wait, irq;
  logic [7:0]  io_wdata = 0, io_rdata;
  logic [15:0] s_addr;
  logic [7:0]  s_wd, s_rd;
  logic        s_ce, s_oe, s_we;
  logic        cca, rx_act = 0, rx_v = 0, rx_b = 0, tx_en, tx_ben, tx_bit;

  mac_top dut (
    .clk, .rst_n, .io_addr, .io_rd, .io_wr, .io_wdata, .io_rdata, .io_wait, .irq,
    .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd),
    .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we),
    .bb_cca(cca), .bb_rx_active(rx_act), .bb_rx_bit_valid(rx_v), .bb_rx_bit(rx_b),
    .bb_tx_en(tx_en), .bb_tx_bit_en(tx_ben), .bb_tx_bit(tx_bit));
  sram_model mem (
    .clk, .addr(s_addr), .wdata(s_wd), .rdata(s_rd), .ce_n(s_ce), .oe_n(s_oe), .we_n(s_we));

  assign cca = rx_act;

  // ---------------------------------------------------------------
  // baseband transmit side: one bit every `gap` clocks
  int gap = 4, bcnt = 0;
  assign tx_ben = tx_en && (bcnt == gap - 1);
  always @(posedge clk) bcnt <= (!tx_en || bcnt == gap - 1) ? 0 : bcnt + 1;

  byte unsigned cur[$], last[$];
  logic [7:0] sh;
  int   nb = 0, n_frames = 0;
  longint t_first, t_last, f_first, f_last;
  logic tx_en_q = 0, seen_under = 0, seen_ovf = 0;
  always @(posedge clk) if (rst_n) begin
    tx_en_q <= tx_en;
    if (dut.u_txfifo.underrun) seen_under <= 1;
    if (dut.u_rxfifo.overflow) seen_ovf <= 1;
    if (tx_en && !tx_en_q) begin cur.delete(); nb = 0; t_first = -1; end
    if (tx_ben) begin
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      sh = {tx_bit, sh[7:1]};
      nb++;
      if (nb == 8) begin cur.push_back(sh); nb = 0; end
    end
    if (!tx_en && tx_en_q) begin
      last = cur; f_first = t_first; f_last = t_last; n_frames++;
    end
  end

  // ---------------------------------------------------------------
  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input int w, input logic [31:0] poly);
    logic [31:0] r;
    r = (w == 32) ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++)
        r = (r[0] ^ d[i][b]) ? ((r >> 1) ^ poly) : (r >> 1);
    return r;
  endfunction

  task automatic io_write(input logic [9:0] port, input logic [7:0] d);
    @(negedge clk);
    io_addr = port; io_wdata = d; io_wr = 1;
    @(negedge clk);
    io_wr = 0;
    while (io_wait) @(negedge clk);
  endtask
  task automatic io_read(input logic [9:0] port, output logic [7:0] d);
    @(negedge clk);
    io_addr = port; io_rd = 1;
    #1 d = io_rdata;
    @(negedge clk);
    io_rd = 0;
    #1;
    while (io_wait) @(negedge clk);
  endtask
  task automatic wr_reg(input logic [7:0] idx, input logic [7:0] v);
    io_write(10'h280, idx); io_write(10'h281, v);
  endtask
  task automatic rd_reg(input logic [7:0] idx, output logic [7:0] v);
    io_write(10'h280, idx); io_read(10'h281, v);
  endtask
  task automatic win_set(input logic [15:0] a);
    wr_reg(8'h26, a[7:0]); wr_reg(8'h27, a[15:8]);
    while (io_wait) @(negedge clk);
  endtask
  task automatic wait_status(input logic [7:0] mask, input int max_cyc, output logic [7:0] st);
    longint tlim;
    tlim = cyc + longint'(max_cyc);
    st = 0;
    while ((st & mask) == 0 && cyc < tlim) begin
      rd_reg(8'h20, st);
      repeat (20) @(negedge clk);
    end
    wr_reg(8'h20, st);
  endtask

  localparam logic [47:0] OWN   = 48'h0A_00_00_00_00_02;
  localparam logic [47:0] PEER  = 48'h0B_00_00_00_00_02;
  localparam logic [47:0] BCAST = 48'hFF_FF_FF_FF_FF_FF;
  localparam int BODY = 1476;   // 24-byte header + 1476 = 1500-byte MPDU

  function automatic void make_frame(ref byte unsigned q[$], input logic [47:0] a1,
                                     input logic [47:0] a2, input int seed);
    q.delete();
    q.push_back(8'h08); q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h00);
    for (int i = 0; i < 6; i++) q.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) q.push_back(a2[8*i +: 8]);
    for (int i = 0; i < 6; i++) q.push_back(PEER[8*i +: 8]);
    q.push_back(8'(seed)); q.push_back(0);
    for (int i = 0; i < BODY; i++) q.push_back(8'(seed * 5 + i * 11 + (i >> 8)));
  endfunction

  // ---------------------------------------------------------------
  initial begin
    byte unsigned f[$], p[$], m[$], all[$], rd[$];
    logic [7:0] st, v;
    logic [31:0] c;
    real bpc;
    int nbits;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 6; i++) wr_reg(8'h02 + 8'(i), OWN[8*i +: 8]);
    wr_reg(8'h00, 8'h01);               // enable, infrastructure station

    for (int g = 4; g >= 1; g--) begin
      // ---------------- transmit ----------------
      gap = g;
      seen_under = 0; seen_ovf = 0;
      make_frame(f, BCAST, OWN, g);
      win_set(16'h0000);
      io_write(10'h282, 8'(f.size())); io_write(10'h282, 8'(f.size() >> 8));
      foreach (f[i]) io_write(10'h282, f[i]);
      wr_reg(8'h1C, 8'h01);
      n_frames = 0;
      wr_reg(8'h1D, 8'h01);
      wait_status(8'h0C, 200000, st);
      check(st[2] && !st[3], $sformatf("gap %0d: broadcast frame done", g));
      check(n_frames == 1 && last.size() == 6 + f.size() + 4,
            $sformatf("gap %0d: one frame of %0d bytes on air (%0d)", g, 6 + f.size() + 4, last.size()));
      if (last.size() == 6 + f.size() + 4) begin
        p = last[0:5]; m = last[6:$];
        check(ref_crc(p, 16, 32'h8408) == 32'h0000F0B8 && {p[3], p[2]} == 16'(m.size()),
              $sformatf("gap %0d: PLCP header", g));
        check(ref_crc(m, 32, 32'hEDB88320) == 32'hDEBB20E3, $sformatf("gap %0d: FCS", g));
        check(m[0:f.size() - 1] == f, $sformatf("gap %0d: MPDU bytes", g));
      end
      check(!seen_under, $sformatf("gap %0d: TxFIFO never ran empty", g));
      nbits = 8 * last.size();
      bpc = real'(nbits) / real'(f_last - f_first + 1);
      $display("tx gap %0d: %0d bits in %0d clocks = %0.3f bit/clock = %0.1f Mbit/s at 44 MHz, %0.1f at 11 MHz",
               g, nbits, f_last - f_first + 1, bpc, bpc * 44.0, bpc * 11.0);
      check(f_last - f_first + 1 == longint'(g) * (longint'(nbits) - 1) + 1,
            $sformatf("gap %0d: baseband never waited for the MAC", g));

      // ---------------- receive ----------------
      make_frame(f, OWN, PEER, 100 + g);
      m = f;
      c = ~ref_crc(m, 32, 32'hEDB88320);
      for (int i = 0; i < 4; i++) m.push_back(c[8*i +: 8]);
      p = '{8'h0A, 8'h00, 8'(m.size()), 8'(m.size() >> 8)};
      c = ~ref_crc(p, 16, 32'h8408);
      p.push_back(c[7:0]); p.push_back(c[15:8]);
      all = {p, m};
      begin
        logic [7:0] w0, w1;
        logic [15:0] wp;
        rd_reg(8'h22, w0); rd_reg(8'h23, w1); wp = {w1, w0};
        @(posedge clk); rx_act <= 1;
        foreach (all[i])
          for (int b = 0; b < 8; b++) begin
            rx_v <= 1; rx_b <= all[i][b];
            @(posedge clk);
            if (g > 1) begin rx_v <= 0; repeat (g - 1) @(posedge clk); end
          end
        rx_v <= 0;
        repeat (3) @(posedge clk);
        rx_act <= 0;
        wait_status(8'h03, 200000, st);
        check(st[0] && !st[1], $sformatf("gap %0d: frame received", g));
        check(!seen_ovf, $sformatf("gap %0d: RxFIFO never overflowed", g));
        win_set(wp);
        rd.delete();
        for (int i = 0; i < f.size() + 2; i++) begin io_read(10'h282, v); rd.push_back(v); end
        check({rd[1], rd[0]} == 16'(f.size()) && rd[2:$] == f,
              $sformatf("gap %0d: ring record holds the frame", g));
        rd_reg(8'h22, w0); rd_reg(8'h23, w1);
        wr_reg(8'h24, w0); wr_reg(8'h25, w1);   // free the ring
        $display("rx gap %0d: %0d bits delivered at %0.3f bit/clock = %0.1f Mbit/s at 44 MHz",
                 g, 8 * all.size(), 1.0 / g, 44.0 / g);
      end
      repeat (3000) @(negedge clk);   // let the ACK go out
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
