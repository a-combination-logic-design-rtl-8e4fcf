`timescale 1ns/1ps
// tb_tx_fsm: the transmit machine with the units it drives (shared
// timer, backoff generator, microsecond tick, TxFIFO) and a memory with
// the ESI timing. The baseband is modelled as taking one bit per
// microsecond; every transmitted frame is rebuilt from the serial bits
// and compared byte for byte with a frame built here (PLCP header with
// CRC-16, MPDU, CRC-32). The receiver is played by pulsing `rx_done`
// with a frame summary. Checked: a data frame after DIFS + backoff and
// its completion on ACK; deferral while CCA is busy; retransmission and
// failure at the retry limit; RTS with its Duration, then data one SIFS
// after the CTS; ACK and CTS replies one SIFS after the received frame,
// with their Durations; a Beacon from the template with the TSF inserted.
module tb_tx_fsm;
  import mac_pkg::*;
  localparam int DIV = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // configuration and stimulus
  logic enable = 1, is_ap = 0, is_ibss = 0, csma_dis = 0, bcn_en = 0;
  localparam logic [47:0] ME = 48'h0A0000000002, PEER = 48'h0B0000000002, BSS = 48'h112233445502;
  logic [15:0] rts_thresh = 16'd2347;
  logic [7:0]  signal = SIG_1M, bcn_len = 0;
  logic [3:0]  retry_limit = 4'd7, tx_frags = 4'd1;
  logic cmd_tx = 0, cmd_atim = 0, tbtt = 0, atim_active = 0, rx_done = 0, rx_busy = 0;
  logic cca = 0, nav_busy = 0;
  logic [63:0] tsf = 64'h1122334455667788;
  rx_info_t rx_info;
  logic tx_done, tx_fail, busy;
  // internal connections
  logic tm_start, tm_stop, tm_running, tm_expired, bo_retry, bo_reset, tick;
  tmode_e tm_mode;
  logic [15:0] tm_load, tm_count, bo_us;
  logic [9:0] cw, slots;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic [2:0] fifo_free;
  logic fifo_push, fifo_space, fifo_empty, bb_tx_en, has_bit, tx_bit, underrun, bit_en;
  logic [7:0] fifo_din;
  int checks = 0, failures = 0;

  tx_fsm dut (.clk, .rst_n, .enable, .is_ap, .is_ibss, .csma_dis, .bcn_en, .own_addr(ME),
    .bssid(BSS), .atim_da(PEER), .rts_thresh, .signal, .retry_limit, .bcn_len, .cmd_tx,
    .tx_frags, .cmd_atim, .tx_done, .tx_fail, .busy, .tbtt, .atim_active, .tsf, .rx_done,
    .rx_info, .rx_busy, .cca, .nav_busy, .tm_start, .tm_mode, .tm_load, .tm_stop,
    .tm_expired, .tm_count, .bo_us, .bo_retry, .bo_reset, .mreq, .mrsp, .fifo_push,
    .fifo_din, .fifo_space, .fifo_free, .fifo_empty, .bb_tx_en);
  us_tick u_tick (.clk, .rst_n, .div(6'(DIV)), .tick);
  mac_timer u_tm (.clk, .rst_n, .us_tick(tick), .start(tm_start), .mode(tm_mode),
    .load_us(tm_load), .stop(tm_stop), .medium_idle(!cca && !nav_busy && !rx_busy),
    .running(tm_running), .expired(tm_expired), .count(tm_count));
  backoff_gen u_bo (.clk, .rst_n, .retry(bo_retry), .reset_cw(bo_reset), .cw, .slots,
    .backoff_us(bo_us));
  tx_fifo u_fifo (.clk, .rst_n, .clear(!bb_tx_en && !fifo_push), .push(fifo_push),
    .din(fifo_din), .space(fifo_space), .free(fifo_free), .bit_en, .tx_bit, .has_bit, .empty(fifo_empty),
    .underrun);

  // memory with ESI timing
  logic [7:0] mem [4096];
  logic v1, v2;
  logic [7:0] d1, d2;
  always_comb begin mrsp = '0; mrsp.gnt = mreq.req; mrsp.rvalid = v2; mrsp.rdata = d2; end
  always @(posedge clk) begin
    v1 <= mreq.req && !mreq.we; d1 <= mem[mreq.addr[11:0]]; v2 <= v1; d2 <= d1;
  end

  // baseband: one bit per microsecond, frames captured
  int bc = 0;
  assign bit_en = bb_tx_en && (bc == DIV - 1);
  always @(posedge clk) bc <= bb_tx_en ? (bc + 1) % DIV : 0;
  byte unsigned cur[$], frames[$][$];
  longint f_start[$], f_end[$];
  logic [7:0] sh; int nb = 0; logic en_q = 0;
  always @(posedge clk) if (rst_n) begin
    en_q <= bb_tx_en;
    if (bb_tx_en && !en_q) begin cur.delete(); nb = 0; f_start.push_back(cyc); end
    if (bit_en) begin
      sh = {tx_bit, sh[7:1]}; nb++;
      if (nb == 8) begin cur.push_back(sh); nb = 0; end
    end
    if (!bb_tx_en && en_q) begin frames.push_back(cur); f_end.push_back(cyc); end
  end

  int n_done = 0, n_fail = 0;
  always @(posedge clk) if (rst_n) begin if (tx_done) n_done++; if (tx_fail) n_fail++; end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input int w, input logic [31:0] poly);
    logic [31:0] r;
    r = (w == 32) ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++)
        r = (r[0] ^ d[i][b]) ? ((r >> 1) ^ poly) : (r >> 1);
    return r;
  endfunction
  // expected air bytes for an MPDU
  function automatic void air_of(input byte unsigned m[$], output byte unsigned all[$]);
    byte unsigned p[$];
    logic [31:0] c;
    c = ~ref_crc(m, 32, 32'hEDB88320);
    for (int i = 0; i < 4; i++) m.push_back(c[8*i +: 8]);
    p = '{signal, 8'h00, 8'(m.size()), 8'(m.size() >> 8)};
    c = ~ref_crc(p, 16, 32'h8408);
    p.push_back(c[7:0]); p.push_back(c[15:8]);
    all = {p, m};
  endfunction
  task automatic cmp_frame(input int idx, input byte unsigned m[$], input string what);
    byte unsigned e[$];
    air_of(m, e);
    if (idx >= frames.size()) begin chk(0, {what, ": not sent"}); return; end
    chk(frames[idx].size() == e.size(), $sformatf("%s: %0d bytes, expected %0d", what, frames[idx].size(), e.size()));
    foreach (e[i]) if (i < frames[idx].size() && frames[idx][i] != e[i]) begin
      chk(0, $sformatf("%s: byte %0d is %02x, expected %02x", what, i, frames[idx][i], e[i]));
      return;
    end
    chk(1, what);
  endtask
  function automatic void put_addr(ref byte unsigned q[$], input logic [47:0] a);
    for (int i = 0; i < 6; i++) q.push_back(a[8*i +: 8]);
  endfunction
  task automatic give_rx(input ftype_e t, input logic [3:0] st, input logic [15:0] dur,
                         input bit more);
    @(negedge clk);
    rx_info = '0; rx_info.ftype = t; rx_info.subtype = st; rx_info.to_us = 1;
    rx_info.fcs_ok = 1; rx_info.dur = dur; rx_info.ta = PEER; rx_info.more_frag = more;
    rx_done = 1; @(negedge clk); rx_done = 0;
  endtask
  task automatic wait_frames(input int n, input int max);
    int c = 0;
    while (frames.size() < n && c < max) begin @(negedge clk); c++; end
  endtask
  task automatic pulse_cmd();
    @(negedge clk); cmd_tx = 1; @(negedge clk); cmd_tx = 0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned data[$], m[$];
  localparam int ACK_US = 112 + 192;

  initial begin
    longint t0;
    int f0;
    rx_info = '0;
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    // data frame in the transmit buffer
    data = '{8'h08, 8'h00, 8'h3A, 8'h01};
    put_addr(data, PEER); put_addr(data, ME); put_addr(data, BSS);
    data.push_back(8'h10); data.push_back(8'h00);
    for (int i = 0; i < 20; i++) data.push_back(8'(i * 11));
    mem[0] = 8'(data.size()); mem[1] = 0;
    foreach (data[i]) mem[2 + i] = data[i];
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- 1. data frame, DIFS + backoff, ACK ----
    t0 = cyc + 1;
    pulse_cmd();
    wait_frames(1, 20000);
    cmp_frame(0, data, "data frame");
    chk(f_start[0] - t0 >= longint'(DIFS_US) * DIV && f_start[0] - t0 <= (longint'(DIFS_US) + 31 * SLOT_US) * DIV + 40,
        $sformatf("sent %0d cycles after the command (DIFS + backoff)", f_start[0] - t0));
    repeat ((SIFS_US + ACK_US) * DIV) @(negedge clk);
    give_rx(FT_CTRL, ST_ACK, 0, 0);
    repeat (5) @(negedge clk);
    chk(n_done == 1 && !busy, "done on ACK");

    // ---- 2. CCA busy at the command: defer ----
    cca = 1;
    pulse_cmd();
    repeat (2000) @(negedge clk);
    chk(frames.size() == 1, "nothing sent while CCA busy");
    t0 = cyc; cca = 0;
    wait_frames(2, 20000);
    chk(frames.size() == 2 && f_start[1] - t0 >= DIFS_US * DIV, "sent DIFS or more after CCA cleared");
    repeat ((SIFS_US + ACK_US) * DIV) @(negedge clk);
    give_rx(FT_CTRL, ST_ACK, 0, 0);
    repeat (5) @(negedge clk);
    chk(n_done == 2, "second frame done");

    // ---- 3. no ACK: retries until the limit ----
    retry_limit = 3;
    f0 = frames.size();
    pulse_cmd();
    t0 = cyc;
    while (n_fail == 0 && cyc - t0 < 200000) @(negedge clk);
    chk(n_fail == 1 && n_done == 2, "failure reported after the retry limit");
    chk(frames.size() - f0 == 3, $sformatf("three attempts (%0d)", frames.size() - f0));
    for (int i = f0; i < frames.size(); i++) cmp_frame(i, data, "retransmitted frame");
    if (frames.size() - f0 >= 2)
      chk(f_start[f0 + 1] - f_end[f0] >= (longint'(SIFS_US) + longint'(ACK_US) + 10 + longint'(DIFS_US)) * DIV,
          "retry after the ACK timeout and DIFS");
    retry_limit = 7;

    // ---- 4. RTS / CTS / data ----
    rts_thresh = 16'd20;
    f0 = frames.size();
    pulse_cmd();
    wait_frames(f0 + 1, 20000);
    m = '{8'hB4, 8'h00};
    begin
      logic [15:0] d;
      d = 16'(3 * SIFS_US + 2 * ACK_US + 192 + (data.size() + 4) * 8);
      m.push_back(d[7:0]); m.push_back(d[15:8]);
    end
    put_addr(m, PEER); put_addr(m, ME);
    cmp_frame(f0, m, "RTS with Duration");
    repeat ((SIFS_US + ACK_US) * DIV) @(negedge clk);
    give_rx(FT_CTRL, ST_CTS, 16'd500, 0);
    t0 = cyc;
    wait_frames(f0 + 2, 20000);
    cmp_frame(f0 + 1, data, "data after CTS");
    chk(f_start[f0 + 1] - t0 >= SIFS_US * DIV && f_start[f0 + 1] - t0 <= SIFS_US * DIV + 20,
        $sformatf("data one SIFS after CTS (%0d cycles)", f_start[f0 + 1] - t0));
    repeat ((SIFS_US + ACK_US) * DIV) @(negedge clk);
    give_rx(FT_CTRL, ST_ACK, 0, 0);
    repeat (5) @(negedge clk);
    chk(n_done == 3, "RTS-protected frame done");
    rts_thresh = 16'd2347;

    // ---- 5. ACK reply with Duration for a fragment ----
    f0 = frames.size();
    give_rx(FT_DATA, 4'd0, 16'd1000, 1);
    t0 = cyc;
    wait_frames(f0 + 1, 5000);
    m = '{8'hD4, 8'h00};
    begin
      logic [15:0] d;
      d = 16'(1000 - SIFS_US - ACK_US);
      m.push_back(d[7:0]); m.push_back(d[15:8]);
    end
    put_addr(m, PEER);
    cmp_frame(f0, m, "ACK reply");
    chk(f_start[f0] - t0 >= SIFS_US * DIV && f_start[f0] - t0 <= SIFS_US * DIV + 20,
        $sformatf("ACK one SIFS after the frame (%0d cycles)", f_start[f0] - t0));

    // ---- 6. CTS reply ----
    repeat (50) @(negedge clk);
    f0 = frames.size();
    give_rx(FT_CTRL, ST_RTS, 16'd800, 0);
    wait_frames(f0 + 1, 5000);
    m = '{8'hC4, 8'h00};
    begin
      logic [15:0] d;
      d = 16'(800 - SIFS_US - ACK_US);
      m.push_back(d[7:0]); m.push_back(d[15:8]);
    end
    put_addr(m, PEER);
    cmp_frame(f0, m, "CTS reply");

    // ---- 7. Beacon from the template with the TSF inserted ----
    repeat (50) @(negedge clk);
    m = '{8'h80, 8'h00, 8'h00, 8'h00};
    put_addr(m, 48'hFFFFFFFFFFFF); put_addr(m, ME); put_addr(m, BSS);
    m.push_back(0); m.push_back(0);
    for (int i = 0; i < 8; i++) m.push_back(8'hEE);
    m.push_back(8'h64); m.push_back(8'h00);
    foreach (m[i]) mem[32'h0C00 + i] = m[i];
    bcn_len = 8'(m.size());
    is_ap = 1; bcn_en = 1;
    f0 = frames.size();
    @(negedge clk); tbtt = 1; @(negedge clk); tbtt = 0;
    wait_frames(f0 + 1, 20000);
    for (int i = 0; i < 8; i++) m[24 + i] = tsf[8*i +: 8];
    cmp_frame(f0, m, "beacon with timestamp");
    repeat (200) @(negedge clk);
    chk(!busy && frames.size() == f0 + 1, "beacon needs no ACK");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
