`timescale 1ns/1ps
// tb_rx_fsm: feeds received frames byte by byte (as the RxFIFO delivers
// them) and checks what the receive machine does with each: storage of
// good data/management frames in the ring (length word + MPDU without
// FCS, wrapping at the ring end), the frame summary for the TxFSM, NAV
// loads for frames addressed elsewhere, Beacon timestamps, deletion of
// frames with a bad FCS, a bad PLCP CRC or a wrong protocol version,
// control frames not stored, and the ring-full case. The ring is made
// 96 bytes long here so that wrapping happens.
module tb_rx_fsm;
  import mac_pkg::*;
  localparam logic [15:0] LO = 16'h1000, HI = 16'h105F;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 1, rx_active, byte_valid, fifo_pop, busy, rx_done, st_rx_ok, st_rx_err;
  logic nav_load, bcn_rx;
  logic [7:0] rx_byte;
  logic [15:0] rptr, wptr, nav_dur;
  logic [47:0] own_addr;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  rx_info_t info;
  int checks = 0, failures = 0;

  rx_fsm #(.RING_LO(LO), .RING_HI(HI)) dut (.*);

  logic [7:0] mem [logic [15:0]];
  always_comb begin mrsp = '0; mrsp.gnt = mreq.req; end
  always @(posedge clk) if (mreq.req && mreq.we) mem[mreq.addr] = mreq.wdata;

  int n_done = 0, n_ok = 0, n_err = 0, n_nav = 0, n_bcn = 0;
  rx_info_t last;
  logic [15:0] last_nav;
  always @(posedge clk) if (rst_n) begin
    if (rx_done) begin n_done++; last = info; end
    if (st_rx_ok) n_ok++;
    if (st_rx_err) n_err++;
    if (nav_load) begin n_nav++; last_nav = nav_dur; end
    if (bcn_rx) n_bcn++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] ref_crc(input byte unsigned d[$], input int w, input logic [31:0] poly);
    logic [31:0] r;
    r = (w == 32) ? 32'hFFFFFFFF : 32'h0000FFFF;
    foreach (d[i])
      for (int b = 0; b < 8; b++)
        r = (r[0] ^ d[i][b]) ? ((r >> 1) ^ poly) : (r >> 1);
    return r;
  endfunction

  localparam logic [47:0] ME = 48'h665544332210, OTHER = 48'h0C0000000002;

  function automatic void mk(ref byte unsigned q[$], input byte unsigned fc0, input logic [47:0] a1,
                             input logic [15:0] dur, input int body);
    q.delete();
    q = '{fc0, 8'h00, dur[7:0], dur[15:8]};
    for (int i = 0; i < 6; i++) q.push_back(a1[8*i +: 8]);
    for (int i = 0; i < 6; i++) q.push_back(OTHER[8*i +: 8]);
    if (body >= 0) begin
      for (int i = 0; i < 8; i++) q.push_back(8'h77);
      for (int i = 0; i < body; i++) q.push_back(8'($urandom));
    end
  endfunction

  // send PLCP + MPDU + FCS; bad = 1 corrupts the FCS, 2 the PLCP CRC
  task automatic send(input byte unsigned m[$], input int bad);
    byte unsigned p[$], all[$];
    logic [31:0] c;
    c = ~ref_crc(m, 32, 32'hEDB88320);
    if (bad == 1) c ^= 32'h100;
    for (int i = 0; i < 4; i++) m.push_back(c[8*i +: 8]);
    p = '{8'h0A, 8'h00, 8'(m.size()), 8'(m.size() >> 8)};
    c = ~ref_crc(p, 16, 32'h8408);
    if (bad == 2) c ^= 32'h1;
    p.push_back(c[7:0]); p.push_back(c[15:8]);
    all = {p, m};
    @(negedge clk); rx_active = 1;
    foreach (all[i]) begin
      repeat (7) @(negedge clk);
      byte_valid = 1; rx_byte = all[i];
      @(negedge clk); byte_valid = 0;
    end
    repeat (3) @(negedge clk);
    rx_active = 0;
    repeat (10) @(negedge clk);
  endtask

  task automatic check_record(input logic [15:0] at, input byte unsigned m[$]);
    logic [15:0] a;
    a = at;
    chk(mem[a] == 8'(m.size()), $sformatf("length low %0d expected %0d", mem[a], m.size()));
    a = (a == HI) ? LO : a + 1;
    chk(mem[a] == 8'(m.size() >> 8), "length high");
    foreach (m[i]) begin
      a = (a == HI) ? LO : a + 1;
      if (mem[a] != m[i]) begin chk(0, $sformatf("stored byte %0d", i)); return; end
    end
    chk(1, "stored bytes");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned m[$];
    logic [15:0] w0;
    int d0, o0, e0, n0;
    own_addr = ME; rptr = LO; rx_active = 0; byte_valid = 0; rx_byte = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1. data to us
    mk(m, 8'h08, ME, 16'd314, 10);
    w0 = wptr; send(m, 0);
    chk(n_done == 1 && n_ok == 1 && n_err == 0, "data for us: done and stored");
    chk(last.ftype == FT_DATA && last.to_us && !last.group && last.fcs_ok && last.dur == 314 &&
        last.ta == OTHER, $sformatf("summary of a data frame: %0d %0d %0d %0d %0d %012x", last.ftype, last.to_us, last.group, last.fcs_ok, last.dur, last.ta));
    chk(n_nav == 0, "no NAV for our own frame");
    check_record(w0, m);
    chk(wptr == w0 + 16'(m.size()) + 2, "write pointer past the record");
    rptr = wptr;
    // 2. frame for someone else: NAV, not stored
    mk(m, 8'h08, OTHER, 16'd777, 4);
    w0 = wptr; o0 = n_ok; send(m, 0);
    chk(n_nav == 1 && last_nav == 777, "NAV loaded with the Duration");
    chk(!last.to_us && n_ok == o0 && wptr == w0, "not stored");
    // 3. bad FCS
    mk(m, 8'h08, ME, 16'd10, 6);
    e0 = n_err; o0 = n_ok; send(m, 1);
    chk(n_err == e0 + 1 && n_ok == o0 && wptr == w0 && !last.fcs_ok, "bad FCS deleted");
    // 4. bad PLCP CRC: aborted before any summary
    d0 = n_done; e0 = n_err; send(m, 2);
    chk(n_done == d0 && n_err == e0 + 1, "bad PLCP header aborted");
    // 5. wrong protocol version
    mk(m, 8'h09, ME, 16'd10, 6);
    d0 = n_done; e0 = n_err; send(m, 0);
    chk(n_done == d0 && n_err == e0 + 1 && wptr == w0, "protocol version checked");
    // 6. Beacon (group): stored, timestamp passed on, wraps the ring
    mk(m, 8'h80, 48'hFFFFFFFFFFFF, 16'd0, 12);
    for (int i = 0; i < 8; i++) m[16 + i] = 8'h00;    // sequence control + address 3
    for (int i = 0; i < 8; i++) m[24 + i] = 8'(i + 1);
    // pad to 40 bytes
    while (m.size() < 40) m.push_back(8'h5A);
    n0 = n_bcn; o0 = n_ok; send(m, 0);
    chk(n_bcn == n0 + 1 && last.group && last.ftype == FT_MGMT && last.subtype == ST_BEACON,
        "beacon recognised");
    chk(last.timestamp == 64'h0807060504030201, $sformatf("timestamp %016x", last.timestamp));
    chk(n_ok == o0 + 1, "beacon stored");
    check_record(w0, m);
    rptr = wptr;
    w0 = wptr;
    // 7. second beacon crosses the ring end
    send(m, 0);
    chk(wptr < w0, "ring wrapped");
    check_record(w0, m);
    rptr = wptr;
    // 8. ACK for us: summary but not stored
    mk(m, 8'hD4, ME, 16'd0, -1);
    m = m[0:9];
    w0 = wptr; o0 = n_ok; d0 = n_done; send(m, 0);
    chk(n_done == d0 + 1 && last.ftype == FT_CTRL && last.subtype == ST_ACK && last.to_us,
        "ACK summary");
    chk(n_ok == o0 && wptr == w0, "control frames not stored");
    // 9. ring full
    rptr = (wptr + 16'd20 > HI) ? wptr + 16'd20 - 16'd96 : wptr + 16'd20;
    mk(m, 8'h08, ME, 16'd314, 10);
    o0 = n_ok; send(m, 0);
    chk(n_ok == o0 && wptr == w0, "frame dropped when the ring is full");
    chk(last.fcs_ok && last.to_us, "still reported to the TxFSM (for the ACK)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
