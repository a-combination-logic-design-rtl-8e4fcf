// pcmcia_hiu: host interface unit (PCMCIA I/O card side).
//
// The host sees three I/O ports:
//   280H  index   selects one of the internal registers below
//   281H  data    reads / writes the selected register
//   282H  window  reads / writes the SRAM byte at the window address,
//                 which then advances by one (indirect, auto-incrementing
//                 access to the whole 64K x 8 SRAM)
// Internal registers (index: meaning, reset value):
//   00 CTRL  [0] enable [1] access point [2] ad hoc [3] CSMA/CA off (PCF)
//            [4] Beacon/Probe Response generation           00
//   01 CLK_DIV system clocks per microsecond                   44
//   02-07 own MAC address, 08-0D BSSID, 0E-13 ATIM destination
//   14/15 RTS threshold (MPDU + FCS octets)                  2347
//   16 SIGNAL (rate code)  0A     17 retry limit              7
//   18/19 beacon interval (TU) 100   1A ATIM window (TU)      0
//   1B beacon template length   0    1C number of fragments   1
//   1D command (write): [0] send data frame(s) [1] send ATIM
//   20 status (write 1 to clear): [0] frame received [1] receive error
//                                 [2] transmit done  [3] transmit failed
//   21 interrupt mask    22/23 receive ring write pointer (read only)
//   24/25 receive ring read pointer   26/27 window address
//   28-2F TSF timer, least significant byte first (read only)
// Sixteen-bit registers take effect when their high byte is written (the
// low byte is held until then). `irq` is high while any unmasked status
// bit is set. The bus is modelled as synchronous one-cycle `io_rd` /
// `io_wr` strobes; `io_wait` (the card's WAIT#) is high while a window
// access is still going to the SRAM, and the next window access must wait
// for it to drop. A window read returns the byte fetched ahead of time,
// so the first read after setting the address is valid once `io_wait` is
// low. The port addresses are the document's; the register map and the
// window mechanism are this design's.
module pcmcia_hiu
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host I/O bus
  input  logic [9:0]  io_addr,
  input  logic        io_rd,
  input  logic        io_wr,
  input  logic [7:0]  io_wdata,
  output logic [7:0]  io_rdata,
  output logic        io_wait,
  output logic        irq,
  // SRAM through the ESI
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // configuration out
  output logic        enable,
  output logic        is_ap,
  output logic        is_ibss,
  output logic        csma_dis,
  output logic        bcn_en,
  output logic [5:0]  clk_div,
  output logic [47:0] own_addr,
  output logic [47:0] bssid,
  output logic [47:0] atim_da,
  output logic [15:0] rts_thresh,
  output logic [7:0]  signal,
  output logic [3:0]  retry_limit,
  output logic [15:0] bcn_int,
  output logic [7:0]  atim_win,
  output logic [7:0]  bcn_len,
  output logic [3:0]  tx_frags,
  output logic        cmd_tx,
  output logic        cmd_atim,
  output logic [15:0] rx_rptr,
  // status in
  input  logic [15:0] rx_wptr,
  input  logic [63:0] tsf,
  input  logic        st_rx_ok,
  input  logic        st_rx_err,
  input  logic        st_tx_done,
  input  logic        st_tx_fail
);
  localparam logic [9:0] P_INDEX = 10'h280;
  localparam logic [9:0] P_DATA  = 10'h281;
  localparam logic [9:0] P_WIN   = 10'h282;

  logic [7:0]  index, ctrl, status, int_mask, lo_hold, win_data;
  logic [15:0] win_addr;
  logic        win_fetch, win_write, win_out;
  logic [7:0]  win_wdata;

  assign enable   = ctrl[0];
  assign is_ap    = ctrl[1];
  assign is_ibss  = ctrl[2];
  assign csma_dis = ctrl[3];
  assign bcn_en   = ctrl[4];
  assign irq      = |(status & int_mask);
  assign io_wait  = win_fetch || win_write || win_out;

  // register read mux
  logic [7:0] reg_rd;
  always_comb begin
    reg_rd = 8'h00;
    case (index) inside
      8'h00: reg_rd = ctrl;
      8'h01: reg_rd = {2'b00, clk_div};
      [8'h02:8'h07]: reg_rd = own_addr[8*(index-8'h02) +: 8];
      [8'h08:8'h0D]: reg_rd = bssid[8*(index-8'h08) +: 8];
      [8'h0E:8'h13]: reg_rd = atim_da[8*(index-8'h0E) +: 8];
      8'h14: reg_rd = rts_thresh[7:0];
      8'h15: reg_rd = rts_thresh[15:8];
      8'h16: reg_rd = signal;
      8'h17: reg_rd = {4'd0, retry_limit};
      8'h18: reg_rd = bcn_int[7:0];
      8'h19: reg_rd = bcn_int[15:8];
      8'h1A: reg_rd = atim_win;
      8'h1B: reg_rd = bcn_len;
      8'h1C: reg_rd = {4'd0, tx_frags};
      8'h20: reg_rd = status;
      8'h21: reg_rd = int_mask;
      8'h22: reg_rd = rx_wptr[7:0];
      8'h23: reg_rd = rx_wptr[15:8];
      8'h24: reg_rd = rx_rptr[7:0];
      8'h25: reg_rd = rx_rptr[15:8];
      8'h26: reg_rd = win_addr[7:0];
      8'h27: reg_rd = win_addr[15:8];
      [8'h28:8'h2F]: reg_rd = tsf[8*(index-8'h28) +: 8];
      default: reg_rd = 8'h00;
    endcase
  end

  always_comb begin
    case (io_addr)
      P_INDEX: io_rdata = index;
      P_DATA:  io_rdata = reg_rd;
      P_WIN:   io_rdata = win_data;
      default: io_rdata = 8'h00;
    endcase
  end

  // SRAM window port
  always_comb begin
    mreq       = '0;
    mreq.req   = (win_fetch || win_write) && !win_out;
    mreq.we    = win_write;
    mreq.addr  = win_addr;
    mreq.wdata = win_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      index <= '0; ctrl <= '0; status <= '0; int_mask <= '0; lo_hold <= '0;
      clk_div <= 6'd44; own_addr <= '0; bssid <= '0; atim_da <= '0;
      rts_thresh <= 16'd2347; signal <= SIG_1M; retry_limit <= 4'd7;
      bcn_int <= 16'd100; atim_win <= '0; bcn_len <= '0; tx_frags <= 4'd1;
      cmd_tx <= 1'b0; cmd_atim <= 1'b0; rx_rptr <= RX_BASE;
      win_addr <= '0; win_data <= '0; win_fetch <= 1'b0; win_write <= 1'b0;
      win_out <= 1'b0; win_wdata <= '0;
    end else begin
      cmd_tx   <= 1'b0;
      cmd_atim <= 1'b0;
      // status bits are set by events and cleared by writing ones
      status <= status | {4'd0, st_tx_fail, st_tx_done, st_rx_err, st_rx_ok};

      // window traffic
      if (mreq.req && mrsp.gnt) begin
        if (win_write) begin
          win_write <= 1'b0;
          win_addr  <= win_addr + 16'd1;
          win_fetch <= 1'b1;               // refresh the read-ahead byte
        end else begin
          win_out <= 1'b1;
        end
      end
      if (mrsp.rvalid) begin
        win_out   <= 1'b0;
        win_fetch <= 1'b0;
        win_data  <= mrsp.rdata;
      end

      if (io_wr) begin
        case (io_addr)
          P_INDEX: index <= io_wdata;
          P_WIN: begin
            win_write <= 1'b1;
            win_wdata <= io_wdata;
            win_fetch <= 1'b0;
          end
          P_DATA: begin
            case (index) inside
              8'h00: ctrl <= io_wdata;
              8'h01: clk_div <= io_wdata[5:0];
              [8'h02:8'h07]: own_addr[8*(index-8'h02) +: 8] <= io_wdata;
              [8'h08:8'h0D]: bssid[8*(index-8'h08) +: 8] <= io_wdata;
              [8'h0E:8'h13]: atim_da[8*(index-8'h0E) +: 8] <= io_wdata;
              8'h14, 8'h18, 8'h22, 8'h24, 8'h26: lo_hold <= io_wdata;
              8'h15: rts_thresh <= {io_wdata, lo_hold};
              8'h16: signal <= io_wdata;
              8'h17: retry_limit <= io_wdata[3:0];
              8'h19: bcn_int <= {io_wdata, lo_hold};
              8'h1A: atim_win <= io_wdata;
              8'h1B: bcn_len <= io_wdata;
              8'h1C: tx_frags <= io_wdata[3:0];
              8'h1D: begin cmd_tx <= io_wdata[0]; cmd_atim <= io_wdata[1]; end
              8'h20: status <= (status & ~io_wdata) |
                               {4'd0, st_tx_fail, st_tx_done, st_rx_err, st_rx_ok};
              8'h21: int_mask <= io_wdata;
              8'h25: rx_rptr <= {io_wdata, lo_hold};
              8'h27: begin
                win_addr  <= {io_wdata, lo_hold};
                win_fetch <= 1'b1;
              end
              default: ;
            endcase
          end
          default: ;
        endcase
      end else if (io_rd && io_addr == P_WIN) begin
        win_addr  <= win_addr + 16'd1;
        win_fetch <= 1'b1;
      end
    end
  end
endmodule
