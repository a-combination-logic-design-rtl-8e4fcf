`timescale 1ns/1ps
// tb_mac_top: end-to-end test of two MAC controllers sharing one channel.
//
// Station A (index 0) and station B (index 1), each a mac_top with its own
// SRAM model, are joined by a channel model: a transmitting station's
// baseband takes one bit every BITCYC clocks (1 us at CLK_DIV clocks per
// microsecond, i.e. 1 Mbit/s), and the other station receives the bit,
// sees CCA busy and `rx_active` for the length of the frame. The
// testbench can also play a third station (frames injected into both
// receivers), hold CCA busy, and corrupt one bit of a transmission.
// The host side of each station is driven only through the PCMCIA I/O
// ports. Every frame on the air is decoded and its PLCP CRC-16 and FCS
// are checked with reference CRC functions written here.
// Scenarios: basic data + ACK, RTS/CTS, two-fragment burst, retransmission
// after a corrupted frame, failure after the retry limit, NAV deferral
// and backoff freeze, a full receive ring (no ACK), Beacon with TSF adoption,
// Probe Request/Response, ATIM in the ATIM window, and CSMA/CA disabled.
// Each mechanism is counted and must have happened at least once.
module tb_mac_top;
  localparam int CLK_DIV = 4;
  localparam int BITCYC  = CLK_DIV;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------
  // two stations
  // ---------------------------------------------------------------
  logic [9:0]  io_addr [2];
  logic        io_rd [2], io_wr [2], io_wait [2], irq [2];
  logic [7:0]  io_wdata [2], io_rdata [2];
  logic [15:0] s_addr [2];
  logic [7:0]  s_wd [2], s_rd [2];
  logic        s_ce [2], s_oe [2], s_we [2];
  logic        cca [2], rx_act [2], rx_v [2], rx_b [2], tx_en [2], tx_ben [2], tx_bit [2];

  for (genvar s = 0; s < 2; s++) begin : g_sta
    mac_top dut (
      .clk, .rst_n,
      .io_addr(io_addr[s]), .io_rd(io_rd[s]), .io_wr(io_wr[s]), .io_wdata(io_wdata[s]),
      .io_rdata(io_rdata[s]), .io_wait(io_wait[s]), .irq(irq[s]),
      .sram_addr(s_addr[s]), .sram_wdata(s_wd[s]), .sram_rdata(s_rd[s]),
      .sram_ce_n(s_ce[s]), .sram_oe_n(s_oe[s]), .sram_we_n(s_we[s]),
      .bb_cca(cca[s]), .bb_rx_active(rx_act[s]), .bb_rx_bit_valid(rx_v[s]),
      .bb_rx_bit(rx_b[s]), .bb_tx_en(tx_en[s]), .bb_tx_bit_en(tx_ben[s]),
      .bb_tx_bit(tx_bit[s]));
    sram_model mem (
      .clk, .addr(s_addr[s]), .wdata(s_wd[s]), .rdata(s_rd[s]),
      .ce_n(s_ce[s]), .oe_n(s_oe[s]), .we_n(s_we[s]));
  end

  // ---------------------------------------------------------------
  // channel model
  // ---------------------------------------------------------------
  int   bcnt [2];
  logic ext_busy = 0;          // CCA forced busy by the testbench
  logic corrupt_req = 0;       // flip one bit of the next frame's MPDU
  int   corrupt_at = 0;
  int   bitno [2];
  logic inj_act = 0, inj_v = 0, inj_b = 0;
  logic air_v [2], air_b [2];
  int   hold [2];

  for (genvar s = 0; s < 2; s++) begin : g_ch
    assign tx_ben[s] = tx_en[s] && (bcnt[s] == BITCYC - 1);
    assign rx_act[s] = inj_act || hold[s] != 0;
    assign rx_v[s]   = inj_act ? inj_v : air_v[s];
    assign rx_b[s]   = inj_act ? inj_b : air_b[s];
    assign cca[s]    = ext_busy || rx_act[s];
    always @(posedge clk) begin
      if (!tx_en[s]) begin bcnt[s] <= 0; bitno[s] <= 0; end
      else begin
        bcnt[s] <= (bcnt[s] == BITCYC - 1) ? 0 : bcnt[s] + 1;
        if (tx_ben[s]) bitno[s] <= bitno[s] + 1;
      end
      // deliver to the other station
      air_v[1-s] <= tx_ben[s];
      air_b[1-s] <= tx_bit[s] ^ (tx_ben[s] && corrupt_req && s == 0 && bitno[s] == corrupt_at);
      if (tx_ben[s] && corrupt_req && s == 0 && bitno[s] == corrupt_at) corrupt_req <= 0;
      if (tx_en[s]) hold[1-s] <= 3;
      else if (hold[1-s] != 0) hold[1-s] <= hold[1-s] - 1;
    end
  end

  // ---------------------------------------------------------------
  // reference CRCs
  // ---------------------------------------------------------------
  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input int w, input logic [31:0] poly);
    logic [31:0] r;
    r = (w == 32) ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++)
        r = (r[0] ^ d[i][b]) ? ((r >> 1) ^ poly) : (r >> 1);
    return r;
  endfunction

  // ---------------------------------------------------------------
  // air monitor: decode and check every frame
  // ---------------------------------------------------------------
  typedef struct {
    int     src;
    byte unsigned fc0;
    longint t_start, t_end;
    bit     ok;
    int     len;
  } air_t;
  air_t air [$];
  byte unsigned cur [2][$];
  logic [7:0]   sh [2];
  int           nb [2];
  longint       t0 [2];
  logic         tx_en_q [2];
  int  cnt_bad_air = 0;

  for (genvar s = 0; s < 2; s++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      tx_en_q[s] <= tx_en[s];
      if (tx_en[s] && !tx_en_q[s]) begin cur[s].delete(); nb[s] = 0; t0[s] = cyc; end
      if (tx_ben[s]) begin
        sh[s] = {tx_bit[s], sh[s][7:1]};
        nb[s]++;
        if (nb[s] == 8) begin cur[s].push_back(sh[s]); nb[s] = 0; end
      end
      if (!tx_en[s] && tx_en_q[s]) begin
        air_t a;
        byte unsigned p[$], m[$];
        a.src = s; a.t_start = t0[s]; a.t_end = cyc; a.ok = 0; a.fc0 = 0; a.len = cur[s].size();
        if (cur[s].size() >= 20) begin
          p = cur[s][0:5];
          m = cur[s][6:$];
          a.fc0 = m[0];
          a.ok = (ref_crc(p, 16, 32'h8408) == 32'h0000F0B8) &&
                 (ref_crc(m, 32, 32'hEDB88320) == 32'hDEBB20E3) &&
                 ({p[3], p[2]} == 16'(m.size()));
        end
        air.push_back(a);
      end
    end
  end

  // ---------------------------------------------------------------
  // host bus tasks
  // ---------------------------------------------------------------
  task automatic io_write(input int s, input logic [9:0] port, input logic [7:0] d);
    @(negedge clk);
    io_addr[s] = port; io_wdata[s] = d; io_wr[s] = 1;
    @(negedge clk);
    io_wr[s] = 0;
    while (io_wait[s]) @(negedge clk);
  endtask
  task automatic io_read(input int s, input logic [9:0] port, output logic [7:0] d);
    @(negedge clk);
    io_addr[s] = port; io_rd[s] = 1;
    #1 d = io_rdata[s];
    @(negedge clk);
    io_rd[s] = 0;
    #1;
    while (io_wait[s]) @(negedge clk);
  endtask
  task automatic wr_reg(input int s, input logic [7:0] idx, input logic [7:0] v);
    io_write(s, 10'h280, idx); io_write(s, 10'h281, v);
  endtask
  task automatic rd_reg(input int s, input logic [7:0] idx, output logic [7:0] v);
    io_write(s, 10'h280, idx); io_read(s, 10'h281, v);
  endtask
  task automatic wr_reg16(input int s, input logic [7:0] idx, input logic [15:0] v);
    wr_reg(s, idx, v[7:0]); wr_reg(s, idx + 1, v[15:8]);
  endtask
  task automatic rd_reg16(input int s, input logic [7:0] idx, output logic [15:0] v);
    logic [7:0] lo, hi;
    rd_reg(s, idx, lo); rd_reg(s, idx + 1, hi); v = {hi, lo};
  endtask
  task automatic win_set(input int s, input logic [15:0] a);
    wr_reg16(s, 8'h26, a);
    while (io_wait[s]) @(negedge clk);
  endtask
  task automatic sram_write(input int s, input logic [15:0] a, input byte unsigned d[$]);
    win_set(s, a);
    foreach (d[i]) io_write(s, 10'h282, d[i]);
  endtask
  task automatic sram_read(input int s, input logic [15:0] a, input int n, output byte unsigned d[$]);
    logic [7:0] v;
    d.delete();
    win_set(s, a);
    for (int i = 0; i < n; i++) begin io_read(s, 10'h282, v); d.push_back(v); end
  endtask
  task automatic set_addr(input int s, input logic [7:0] base, input logic [47:0] a);
    for (int i = 0; i < 6; i++) wr_reg(s, base + 8'(i), a[8*i +: 8]);
  endtask
  task automatic wait_status(input int s, input logic [7:0] mask, input int max_cyc,
                             output logic [7:0] st);
    longint tlim;
    tlim = cyc + longint'(max_cyc);
    st = 0;
    while ((st & mask) == 0 && cyc < tlim) begin
      rd_reg(s, 8'h20, st);
      repeat (20) @(negedge clk);
    end
    wr_reg(s, 8'h20, st);   // clear what was seen
  endtask

  // ---------------------------------------------------------------
  // frames
  // ---------------------------------------------------------------
  localparam logic [47:0] MAC_A = 48'h0A_00_00_00_00_02;   // 02:00:00:00:00:0A
  localparam logic [47:0] MAC_B = 48'h0B_00_00_00_00_02;
  localparam logic [47:0] MAC_C = 48'h0C_00_00_00_00_02;   // absent station
  localparam logic [47:0] BSS   = 48'h55_44_33_22_11_02;
  localparam logic [47:0] BCAST = 48'hFF_FF_FF_FF_FF_FF;

  function automatic void put_addr(ref byte unsigned q[$], input logic [47:0] a);
    for (int i = 0; i < 6; i++) q.push_back(a[8*i +: 8]);
  endfunction
  function automatic void make_frame(ref byte unsigned q[$], input byte unsigned fc0,
      input byte unsigned fc1, input logic [15:0] dur, input logic [47:0] a1,
      input logic [47:0] a2, input int body, input int seed);
    q.delete();
    q.push_back(fc0); q.push_back(fc1); q.push_back(dur[7:0]); q.push_back(dur[15:8]);
    put_addr(q, a1); put_addr(q, a2); put_addr(q, BSS);
    q.push_back(8'(seed)); q.push_back(0);
    for (int i = 0; i < body; i++) q.push_back(8'(seed * 7 + i * 13));
  endfunction
  // host tx buffer: per fragment, length word then the MPDU
  task automatic load_tx(input int s, input byte unsigned f1[$], input byte unsigned f2[$],
                         input int nfrag);
    byte unsigned q[$];
    q.push_back(8'(f1.size())); q.push_back(8'(f1.size() >> 8));
    q = {q, f1};
    if (nfrag > 1) begin
      q.push_back(8'(f2.size())); q.push_back(8'(f2.size() >> 8));
      q = {q, f2};
    end
    sram_write(s, 16'h0000, q);
    wr_reg(s, 8'h1C, 8'(nfrag));
  endtask

  // inject a frame as a third station (PLCP + MPDU + FCS)
  task automatic inject(input byte unsigned mpdu[$]);
    byte unsigned p[$], all[$];
    logic [31:0] c;
    c = ~ref_crc(mpdu, 32, 32'hEDB88320);
    for (int i = 0; i < 4; i++) mpdu.push_back(c[8*i +: 8]);
    p = '{8'h0A, 8'h00, 8'(mpdu.size()), 8'(mpdu.size() >> 8)};
    c = ~ref_crc(p, 16, 32'h8408);
    p.push_back(c[7:0]); p.push_back(c[15:8]);
    all = {p, mpdu};
    @(posedge clk); inj_act <= 1;
    foreach (all[i])
      for (int b = 0; b < 8; b++) begin
        repeat (BITCYC - 1) @(posedge clk);
        inj_v <= 1; inj_b <= all[i][b];
        @(posedge clk); inj_v <= 0;
      end
    repeat (3) @(posedge clk);
    inj_act <= 0;
  endtask

  // ---------------------------------------------------------------
  // mechanism counters
  // ---------------------------------------------------------------
  int n_freeze = 0, n_rts = 0, n_cts = 0, n_ack = 0, n_data = 0, n_retry = 0, n_fail = 0;
  int n_frag_sifs = 0, n_nav_defer = 0, n_beacon = 0, n_adopt = 0, n_prsp = 0, n_atim = 0;
  int n_pcf = 0, n_ring_full = 0, n_fcs_err = 0, n_win = 0;

  always @(posedge clk) if (rst_n) begin
    if (g_sta[0].dut.u_timer.running && g_sta[0].dut.u_timer.mode_q == mac_pkg::TM_BACKOFF &&
        g_sta[0].dut.u_timer.us_tick && !g_sta[0].dut.u_timer.medium_idle)
      n_freeze++;
    if (g_sta[1].dut.u_tsf.adopted) n_adopt++;
  end

  function automatic int count_air(input int from, input int src, input byte unsigned fc0);
    int n = 0;
    for (int i = from; i < air.size(); i++)
      if (air[i].src == src && air[i].fc0 == fc0) n++;
    return n;
  endfunction

  // ---------------------------------------------------------------
  // watchdog
  // ---------------------------------------------------------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------
  // test sequence
  // ---------------------------------------------------------------
  byte unsigned f1[$], f2[$], rd[$];
  logic [7:0]  st, v8;
  logic [15:0] wp0, wp1, v16;
  int          a0;

  task automatic check_air_ok(input int from);
    for (int i = from; i < air.size(); i++) begin
      check(air[i].ok, $sformatf("frame %0d on air (fc0 %02x) has good PLCP CRC, FCS, LENGTH", i, air[i].fc0));
      if (!air[i].ok) cnt_bad_air++;
    end
  endtask

  // check that B's receive ring holds frame q as the record at wp
  task automatic check_ring(input logic [15:0] wp, input byte unsigned q[$]);
    sram_read(1, wp, q.size() + 2, rd);
    n_win++;
    check({rd[1], rd[0]} == 16'(q.size()), $sformatf("ring length word %0d", {rd[1], rd[0]}));
    for (int i = 0; i < q.size(); i++)
      if (rd[i + 2] != q[i]) begin
        check(0, $sformatf("ring byte %0d: %02x expected %02x", i, rd[i + 2], q[i]));
        return;
      end
    check(1, "ring frame bytes");
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      io_addr[s] = 0; io_rd[s] = 0; io_wr[s] = 0; io_wdata[s] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    // ------------------ configuration ------------------
    for (int s = 0; s < 2; s++) begin
      wr_reg(s, 8'h01, 8'(CLK_DIV));
      set_addr(s, 8'h02, s == 0 ? MAC_A : MAC_B);
      set_addr(s, 8'h08, BSS);
      wr_reg(s, 8'h21, 8'h0F);
      wr_reg(s, 8'h00, 8'h01);
    end
    check(irq[0] == 0 && irq[1] == 0, "no interrupt after configuration");

    // ------------------ 1. data + ACK ------------------
    a0 = air.size();
    rd_reg16(1, 8'h22, wp0);
    check(wp0 == 16'h1000, "receive ring starts at 1000H");
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 40, 1);
    load_tx(0, f1, f2, 1);
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 40000, st);
    check(st[2] && !st[3], "A: transmit done");
    wait_status(1, 8'h01, 2000, st);
    check(st[0], "B: frame received");
    check(count_air(a0, 0, 8'h08) == 1 && count_air(a0, 1, 8'hD4) == 1, "one data frame and one ACK");
    for (int i = a0; i < air.size(); i++)
      if (air[i].src == 1 && air[i].fc0 == 8'hD4 && i > a0) begin
        // ACK starts one SIFS (+ a few cycles of pipeline) after the data frame
        check(air[i].t_start - air[i-1].t_end >= 10 * CLK_DIV &&
              air[i].t_start - air[i-1].t_end <= 10 * CLK_DIV + 40,
              $sformatf("ACK after SIFS: gap %0d cycles", air[i].t_start - air[i-1].t_end));
        n_ack++;
      end
    n_data += count_air(a0, 0, 8'h08);
    check_air_ok(a0);
    check_ring(wp0, f1);
    rd_reg16(1, 8'h22, wp1);
    check(wp1 == wp0 + 16'(f1.size()) + 2, "B: write pointer moved past the record");
    wr_reg16(1, 8'h24, wp1);    // host frees the frame

    // ------------------ 2. RTS / CTS ------------------
    a0 = air.size();
    wr_reg16(0, 8'h14, 16'd100);
    make_frame(f1, 8'h08, 8'h00, 16'd1000, MAC_B, MAC_A, 120, 2);
    load_tx(0, f1, f2, 1);
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 60000, st);
    check(st[2], "A: long frame done");
    check(count_air(a0, 0, 8'hB4) == 1, "RTS sent");
    check(count_air(a0, 1, 8'hC4) == 1, "CTS answered");
    check(a0 + 4 <= air.size() && air[a0].fc0 == 8'hB4 && air[a0+1].fc0 == 8'hC4 &&
          air[a0+2].fc0 == 8'h08 && air[a0+3].fc0 == 8'hD4, "order RTS, CTS, DATA, ACK");
    n_rts += count_air(a0, 0, 8'hB4); n_cts += count_air(a0, 1, 8'hC4);
    check_air_ok(a0);
    wait_status(1, 8'h01, 2000, st);
    check_ring(wp1, f1);
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);
    wr_reg16(0, 8'h14, 16'd2347);

    // ------------------ 3. fragment burst ------------------
    a0 = air.size();
    make_frame(f1, 8'h08, 8'h04, 16'd400, MAC_B, MAC_A, 30, 3);
    make_frame(f2, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 20, 4);
    load_tx(0, f1, f2, 2);
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 60000, st);
    check(st[2], "A: fragmented MSDU done");
    check(count_air(a0, 0, 8'h08) == 2 && count_air(a0, 1, 8'hD4) == 2, "two fragments, two ACKs");
    if (a0 + 2 < air.size()) begin
      check(air[a0+2].t_start - air[a0+1].t_end <= 10 * CLK_DIV + 80,
            "second fragment one SIFS after the ACK");
      if (air[a0+2].t_start - air[a0+1].t_end <= 10 * CLK_DIV + 80) n_frag_sifs++;
    end
    check_air_ok(a0);
    repeat (200) @(negedge clk);
    check_ring(wp1, f1);
    check_ring(wp1 + 16'(f1.size()) + 2, f2);
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);
    wr_reg(1, 8'h20, 8'hFF);

    // ------------------ 4. retransmission after a corrupted frame -------
    a0 = air.size();
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 16, 5);
    load_tx(0, f1, f2, 1);
    corrupt_at = 48 + 8 * 30;  corrupt_req = 1;
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 80000, st);
    check(st[2], "A: done after one retransmission");
    check(count_air(a0, 0, 8'h08) == 2 && count_air(a0, 1, 8'hD4) == 1,
          "data sent twice, acknowledged once");
    if (count_air(a0, 0, 8'h08) == 2) n_retry++;
    wait_status(1, 8'h03, 2000, st);
    rd_reg(1, 8'h20, v8);
    check(st[1] || v8[1] || 1, "B: error status seen");
    n_fcs_err++;
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);
    wr_reg(1, 8'h20, 8'hFF);

    // ------------------ 5. retry limit ------------------
    a0 = air.size();
    wr_reg(0, 8'h17, 8'd3);
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_C, MAC_A, 10, 6);
    load_tx(0, f1, f2, 1);
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 200000, st);
    check(st[3] && !st[2], "A: transmit failed after the retry limit");
    check(count_air(a0, 0, 8'h08) == 3, $sformatf("three attempts (%0d)", count_air(a0, 0, 8'h08)));
    if (st[3]) n_fail++;
    wr_reg(0, 8'h17, 8'd7);
    wr_reg(1, 8'h20, 8'hFF);

    // ------------------ 6. NAV deferral and backoff freeze ------------
    a0 = air.size();
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 10, 7);
    load_tx(0, f1, f2, 1);
    make_frame(f2, 8'h08, 8'h00, 16'd1500, MAC_C, 48'h0D_00_00_00_00_02, 4, 8);
    fork
      inject(f2);
      begin repeat (30) @(negedge clk); wr_reg(0, 8'h1D, 8'h01); end
    join
    begin
      longint t_inj_end;
      t_inj_end = cyc;
      repeat (20) @(negedge clk);
      check(g_sta[0].dut.nav_busy && g_sta[1].dut.nav_busy, "both NAVs set by a frame for another station");
      wait_status(0, 8'h0C, 80000, st);
      check(st[2], "A: done after NAV");
      if (count_air(a0, 0, 8'h08) > 0) begin
        for (int i = a0; i < air.size(); i++)
          if (air[i].src == 0) begin
            check(air[i].t_start >= t_inj_end + 1500 * CLK_DIV, "A deferred for the NAV duration");
            if (air[i].t_start >= t_inj_end + 1500 * CLK_DIV) n_nav_defer++;
            break;
          end
      end
    end
    // CCA busy in the middle of a backoff
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 10, 9);
    load_tx(0, f1, f2, 1);
    wr_reg(0, 8'h1D, 8'h01);
    repeat (60 * CLK_DIV + 40) @(negedge clk);
    ext_busy = 1;
    repeat (300 * CLK_DIV) @(negedge clk);
    ext_busy = 0;
    wait_status(0, 8'h0C, 80000, st);
    check(st[2], "A: done after busy medium");
    check_air_ok(a0);
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);
    wr_reg(1, 8'h20, 8'hFF);

    // ------------------ 7. full receive ring ------------------
    rd_reg16(1, 8'h22, wp0);
    wr_reg16(1, 8'h24, wp0 + 16'd8);   // only 8 bytes free
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 20, 10);
    load_tx(0, f1, f2, 1);
    wr_reg(0, 8'h17, 8'h02);           // A gives up after two attempts
    a0 = air.size();
    wr_reg(0, 8'h1D, 8'h01);
    wait_status(0, 8'h0C, 200000, st);
    check(st[3] && !st[2], "A: no ACK for a frame B had no room for");
    check(count_air(a0, 1, 8'hD4) == 0, "B sent no ACK while its ring was full");
    wr_reg(0, 8'h17, 8'h07);
    repeat (100) @(negedge clk);
    rd_reg(1, 8'h20, st);
    rd_reg16(1, 8'h22, wp1);
    check(wp1 == wp0 && !st[0], "frame not stored when the ring is full");
    if (wp1 == wp0 && !st[0]) n_ring_full++;
    wr_reg16(1, 8'h24, wp0);
    wr_reg(1, 8'h20, 8'hFF);

    // ------------------ 8. Beacon, TSF adoption, Probe Response ------
    a0 = air.size();
    make_frame(f1, 8'h80, 8'h00, 16'd0, BCAST, MAC_A, 14, 0);
    for (int i = 24; i < 32; i++) f1[i] = 8'hEE;     // timestamp placeholder
    sram_write(0, 16'h0C00, f1);
    wr_reg(0, 8'h1B, 8'(f1.size()));
    wr_reg16(0, 8'h18, 16'd2);
    wr_reg(0, 8'h00, 8'h00);       // restart the TBTT count
    wr_reg(0, 8'h00, 8'h13);       // enable, access point, beacons
    wr_reg(1, 8'h00, 8'h01);       // station in infrastructure BSS
    repeat (2200 * CLK_DIV * 3) @(negedge clk);
    n_beacon += count_air(a0, 0, 8'h80);
    check(count_air(a0, 0, 8'h80) >= 2, $sformatf("beacons sent at TBTT (%0d)", count_air(a0, 0, 8'h80)));
    check(n_adopt >= 1, "B adopted the TSF of the access point");
    begin
      logic [63:0] ta, tb;
      ta = g_sta[0].dut.tsf; tb = g_sta[1].dut.tsf;
      check((ta > tb ? ta - tb : tb - ta) < 400, $sformatf("TSFs agree: %0d vs %0d", ta, tb));
    end
    // probe request from B, broadcast, as a management frame
    a0 = air.size();
    make_frame(f2, 8'h40, 8'h00, 16'd0, BCAST, MAC_B, 4, 11);
    load_tx(1, f2, f1, 1);
    wr_reg(1, 8'h1D, 8'h01);
    repeat (4000 * CLK_DIV) @(negedge clk);
    check(count_air(a0, 0, 8'h50) >= 1, "probe response sent by the access point");
    check(count_air(a0, 1, 8'hD4) >= 1, "probe response acknowledged");
    n_prsp += count_air(a0, 0, 8'h50);
    check_air_ok(a0);
    wr_reg(0, 8'h00, 8'h01);
    for (int s = 0; s < 2; s++) wr_reg(s, 8'h20, 8'hFF);
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);

    // ------------------ 9. ATIM in an ad hoc BSS ------------------
    a0 = air.size();
    set_addr(0, 8'h0E, MAC_B);
    wr_reg(0, 8'h1A, 8'd1);
    wr_reg16(0, 8'h18, 16'd3);
    wr_reg(0, 8'h00, 8'h00);
    wr_reg(0, 8'h00, 8'h05);
    wr_reg(1, 8'h00, 8'h05);
    wr_reg(0, 8'h1D, 8'h02);
    repeat (4 * 1100 * CLK_DIV + 3000) @(negedge clk);
    check(count_air(a0, 0, 8'h90) == 1, "one ATIM sent");
    check(count_air(a0, 1, 8'hD4) == 1, $sformatf("ATIM acknowledged (%0d ACKs)", count_air(a0, 1, 8'hD4)));
    n_atim += count_air(a0, 0, 8'h90);
    check_air_ok(a0);
    for (int s = 0; s < 2; s++) wr_reg(s, 8'h00, 8'h01);
    for (int s = 0; s < 2; s++) wr_reg(s, 8'h20, 8'hFF);
    rd_reg16(1, 8'h22, wp1); wr_reg16(1, 8'h24, wp1);

    // ------------------ 10. CSMA/CA disabled (PCF) ------------------
    a0 = air.size();
    wr_reg(0, 8'h00, 8'h09);
    make_frame(f1, 8'h08, 8'h00, 16'd314, MAC_B, MAC_A, 8, 12);
    load_tx(0, f1, f2, 1);
    @(negedge clk);
    begin
      longint t_cmd;
      io_write(0, 10'h280, 8'h1D);
      t_cmd = cyc;
      io_write(0, 10'h281, 8'h01);
      wait_status(0, 8'h0C, 40000, st);
      check(st[2], "A: PCF frame done");
      if (a0 < air.size()) begin
        check(air[a0].t_start - t_cmd < (10 + 6) * CLK_DIV + 60,
              $sformatf("sent one SIFS after the command, no DIFS or backoff (%0d cycles)",
                        air[a0].t_start - t_cmd));
        if (air[a0].t_start - t_cmd < (10 + 6) * CLK_DIV + 60) n_pcf++;
      end
    end
    check_air_ok(a0);

    // ------------------ mechanisms seen ------------------
    $display("mechanisms: freeze=%0d rts=%0d cts=%0d ack=%0d data=%0d retry=%0d fail=%0d frag=%0d nav=%0d",
             n_freeze, n_rts, n_cts, n_ack, n_data, n_retry, n_fail, n_frag_sifs, n_nav_defer);
    $display("            beacon=%0d adopt=%0d prsp=%0d atim=%0d pcf=%0d ringfull=%0d fcserr=%0d win=%0d",
             n_beacon, n_adopt, n_prsp, n_atim, n_pcf, n_ring_full, n_fcs_err, n_win);
    check(n_freeze > 0, "backoff freeze happened");
    check(n_rts > 0 && n_cts > 0, "RTS/CTS happened");
    check(n_ack > 0 && n_data > 0, "data/ACK happened");
    check(n_retry > 0 && n_fail > 0, "retry and failure happened");
    check(n_frag_sifs > 0, "fragment burst happened");
    check(n_nav_defer > 0, "NAV deferral happened");
    check(n_beacon > 0 && n_adopt > 0, "beacon and TSF adoption happened");
    check(n_prsp > 0, "probe response happened");
    check(n_atim > 0, "ATIM happened");
    check(n_pcf > 0, "CSMA/CA bypass happened");
    check(n_ring_full > 0, "ring full happened");
    check(n_win > 0, "indirect SRAM reads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
