`timescale 1ns/1ps
// tb_esi: three requesters (receive, transmit, host) issue random reads
// and writes at random times against the SRAM model. A reference memory
// in the testbench predicts every read. Checks: read data, read latency
// of two cycles after the grant, one grant per cycle, the receive port
// winning over transmit, and both winning over the host.
module tb_esi;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t req [3];
  mem_rsp_t rsp [3];
  logic [15:0] sa;
  logic [7:0] swd, srd;
  logic sce, soe, swe;
  int checks = 0, failures = 0;

  esi dut (.clk, .rst_n, .rx_req(req[0]), .rx_rsp(rsp[0]), .tx_req(req[1]), .tx_rsp(rsp[1]),
           .host_req(req[2]), .host_rsp(rsp[2]), .sram_addr(sa), .sram_wdata(swd),
           .sram_rdata(srd), .sram_ce_n(sce), .sram_oe_n(soe), .sram_we_n(swe));
  sram_model mem (.clk, .addr(sa), .wdata(swd), .rdata(srd), .ce_n(sce), .oe_n(soe), .we_n(swe));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [7:0] refm [logic [15:0]];
  int n_prio = 0;

  // per-port requester: random accesses on 32 addresses
  for (genvar p = 0; p < 3; p++) begin : g_p
    logic [7:0] exp_q [$];
    longint gnt_t [$];
    longint cyc = 0;
    int n_rd = 0;
    always @(posedge clk) cyc <= cyc + 1;
    initial begin
      req[p] = '0;
      wait (rst_n);
      repeat (400) begin
        @(negedge clk);
        if ($urandom_range(0, 2) == 0) begin
          req[p].req = 1; req[p].we = 1'($urandom_range(0, 1));
          req[p].addr = 16'(p * 64 + $urandom_range(0, 31));
          req[p].wdata = 8'($urandom);
          #1;
          while (!rsp[p].gnt) begin @(negedge clk); #1; end
          // grant seen this cycle: predict
          if (req[p].we) refm[req[p].addr] = req[p].wdata;
          else begin
            exp_q.push_back(refm.exists(req[p].addr) ? refm[req[p].addr] : 8'h00);
            gnt_t.push_back(cyc);
          end
          @(negedge clk);
          req[p] = '0;
        end
      end
      repeat (5) @(negedge clk);
      chk(exp_q.size() == 0, $sformatf("port %0d: all reads returned", p));
    end
    always @(posedge clk) if (rst_n && rsp[p].rvalid) begin
      chk(exp_q.size() > 0, "read data expected");
      if (exp_q.size() > 0) begin
        chk(rsp[p].rdata == exp_q[0], $sformatf("port %0d read %02x expected %02x", p, rsp[p].rdata, exp_q[0]));
        chk(cyc - gnt_t[0] == 2, $sformatf("port %0d latency %0d", p, cyc - gnt_t[0]));
        void'(exp_q.pop_front()); void'(gnt_t.pop_front());
        n_rd++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    chk(int'(rsp[0].gnt) + int'(rsp[1].gnt) + int'(rsp[2].gnt) <= 1, "one grant per cycle");
    if (req[0].req) chk(rsp[0].gnt, "receive port always granted");
    if (req[1].req && !req[0].req) chk(rsp[1].gnt, "transmit port granted over host");
    if (req[2].req && (req[0].req || req[1].req)) begin
      chk(!rsp[2].gnt, "host waits for receive/transmit"); n_prio++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5000) @(posedge clk);
    chk(n_prio > 0, "host was held back at least once");
    chk(g_p[0].n_rd > 10 && g_p[2].n_rd > 10, "reads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
