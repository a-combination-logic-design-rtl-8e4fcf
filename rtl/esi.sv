// esi: external SRAM interface.
//
// Three requesters share one asynchronous 64K x 8 SRAM: the receive path
// (RxFIFO to SRAM), the transmit path (SRAM to TxFIFO) and the host
// interface (host reads and writes). The receive and transmit flows have
// priority over the host flows, as the design requires; between the two
// the receiver wins, because its bytes cannot wait (this order is a
// choice of this design). Each port holds `req` with `we`, `addr`,
// `wdata` until it sees `gnt` (same cycle). The granted access drives
// the SRAM pins for the next cycle; read data is registered at the end
// of that cycle and returned with `rvalid` two cycles after `gnt`. One
// access can start every cycle.
module esi
  import mac_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mem_req_t      rx_req,
  output mem_rsp_t      rx_rsp,
  input  mem_req_t      tx_req,
  output mem_rsp_t      tx_rsp,
  input  mem_req_t      host_req,
  output mem_rsp_t      host_rsp,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [7:0]    sram_wdata,
  input  logic [7:0]    sram_rdata,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n
);
  typedef enum logic [1:0] {P_NONE, P_RX, P_TX, P_HOST} port_e;

  port_e    sel, cyc1_port;
  mem_req_t g;
  logic     cyc1_rd;
  port_e    cyc2_port;
  logic [7:0] rdata_q;

  always_comb begin
    if (rx_req.req)        begin sel = P_RX;   g = rx_req;   end
    else if (tx_req.req)   begin sel = P_TX;   g = tx_req;   end
    else if (host_req.req) begin sel = P_HOST; g = host_req; end
    else                   begin sel = P_NONE; g = '0;       end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_wdata <= '0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      cyc1_port  <= P_NONE;
      cyc1_rd    <= 1'b0;
      cyc2_port  <= P_NONE;
      rdata_q    <= '0;
    end else begin
      sram_addr  <= g.addr[AW-1:0];
      sram_wdata <= g.wdata;
      sram_ce_n  <= (sel == P_NONE);
      sram_oe_n  <= (sel == P_NONE) || g.we;
      sram_we_n  <= (sel == P_NONE) || !g.we;
      cyc1_port  <= sel;
      cyc1_rd    <= (sel != P_NONE) && !g.we;
      cyc2_port  <= cyc1_rd ? cyc1_port : P_NONE;
      rdata_q    <= sram_rdata;
    end
  end

  always_comb begin
    rx_rsp   = '0;
    tx_rsp   = '0;
    host_rsp = '0;
    rx_rsp.gnt   = (sel == P_RX);
    tx_rsp.gnt   = (sel == P_TX);
    host_rsp.gnt = (sel == P_HOST);
    rx_rsp.rdata   = rdata_q;
    tx_rsp.rdata   = rdata_q;
    host_rsp.rdata = rdata_q;
    rx_rsp.rvalid   = (cyc2_port == P_RX);
    tx_rsp.rvalid   = (cyc2_port == P_TX);
    host_rsp.rvalid = (cyc2_port == P_HOST);
  end
endmodule
