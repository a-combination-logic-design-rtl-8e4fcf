// mac_top: IEEE 802.11 MAC controller built entirely from logic, with no
// embedded processor.
//
// Units and their connections:
//   pcmcia_hiu  host I/O ports 280H-282H, registers, interrupt
//   esi         arbiter onto the external 64K x 8 SRAM
//   rx_fifo     serial-to-byte receive FIFO (one byte)
//   rx_fsm      frame checks, storage in the SRAM receive ring
//   tx_fsm      DCF, RTS/CTS, ACK/CTS replies, Beacon/ATIM/Probe Response
//   tx_fifo     32-bit byte-to-serial transmit register
//   mac_timer   the single counter shared by IFS, backoff and ACK/CTS
//   backoff_gen contention window and random slot count
//   nav_timer   virtual carrier sense
//   tsf_timer   TSF, TBTT and ATIM window
//   us_tick     microsecond base for any clock from 11 to 44 MHz
// Baseband port: serial, one bit per strobe in each direction. The
// baseband raises `bb_rx_active` for the length of a received frame and
// gives each bit with `bb_rx_bit_valid`; `bb_cca` is its clear channel
// assessment (1 = busy). For transmission the MAC raises `bb_tx_en` and
// the baseband takes one bit per `bb_tx_bit_en` from `bb_tx_bit`.
// Host bus: see pcmcia_hiu. SRAM pins: see esi (asynchronous SRAM,
// active-low enables).
module mac_top
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host (PCMCIA I/O)
  input  logic [9:0]  io_addr,
  input  logic        io_rd,
  input  logic        io_wr,
  input  logic [7:0]  io_wdata,
  output logic [7:0]  io_rdata,
  output logic        io_wait,
  output logic        irq,
  // external SRAM
  output logic [15:0] sram_addr,
  output logic [7:0]  sram_wdata,
  input  logic [7:0]  sram_rdata,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  // baseband
  input  logic        bb_cca,
  input  logic        bb_rx_active,
  input  logic        bb_rx_bit_valid,
  input  logic        bb_rx_bit,
  output logic        bb_tx_en,
  input  logic        bb_tx_bit_en,
  output logic        bb_tx_bit
);
  // configuration
  logic        enable, is_ap, is_ibss, csma_dis, bcn_en;
  logic [5:0]  clk_div;
  logic [47:0] own_addr, bssid, atim_da;
  logic [15:0] rts_thresh, bcn_int, rx_rptr, rx_wptr;
  logic [7:0]  signal, atim_win, bcn_len;
  logic [3:0]  retry_limit, tx_frags;
  logic        cmd_tx, cmd_atim;

  // SRAM ports
  mem_req_t rx_req, tx_req, host_req;
  mem_rsp_t rx_rsp, tx_rsp, host_rsp;

  // events
  logic        st_rx_ok, st_rx_err, tx_done, tx_fail;
  logic        tick, tbtt, atim_active, tsf_adopted;
  logic [63:0] tsf;
  logic        rx_done, rx_busy, nav_load, nav_busy, bcn_rx;
  logic [15:0] nav_dur, nav_val;
  rx_info_t    rx_info;

  pcmcia_hiu u_hiu (
    .clk, .rst_n, .io_addr, .io_rd, .io_wr, .io_wdata, .io_rdata, .io_wait, .irq,
    .mreq(host_req), .mrsp(host_rsp),
    .enable, .is_ap, .is_ibss, .csma_dis, .bcn_en, .clk_div, .own_addr, .bssid,
    .atim_da, .rts_thresh, .signal, .retry_limit, .bcn_int, .atim_win, .bcn_len,
    .tx_frags, .cmd_tx, .cmd_atim, .rx_rptr,
    .rx_wptr, .tsf, .st_rx_ok, .st_rx_err, .st_tx_done(tx_done), .st_tx_fail(tx_fail));

  esi u_esi (
    .clk, .rst_n, .rx_req, .rx_rsp, .tx_req, .tx_rsp, .host_req, .host_rsp,
    .sram_addr, .sram_wdata, .sram_rdata, .sram_ce_n, .sram_oe_n, .sram_we_n);

  us_tick u_tick (.clk, .rst_n, .div(clk_div), .tick);

  // ---------------- receive path ----------------
  logic       rx_active_q, rxf_valid, rxf_pop, rxf_full, rxf_ovf;
  logic [7:0] rxf_byte;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_active_q <= 1'b0;
    else        rx_active_q <= bb_rx_active;

  rx_fifo u_rxfifo (
    .clk, .rst_n, .sync(bb_rx_active && !rx_active_q),
    .bit_valid(bb_rx_bit_valid && !bb_tx_en), .rx_bit(bb_rx_bit),
    .pop(rxf_pop), .rx_byte(rxf_byte), .byte_valid(rxf_valid),
    .full(rxf_full), .overflow(rxf_ovf));

  rx_fsm u_rx (
    .clk, .rst_n, .enable, .own_addr,
    .rx_active(bb_rx_active && !bb_tx_en), .byte_valid(rxf_valid), .rx_byte(rxf_byte),
    .fifo_pop(rxf_pop), .busy(rx_busy),
    .mreq(rx_req), .mrsp(rx_rsp), .rptr(rx_rptr), .wptr(rx_wptr),
    .rx_done, .info(rx_info), .st_rx_ok, .st_rx_err, .nav_load, .nav_dur, .bcn_rx);

  nav_timer u_nav (
    .clk, .rst_n, .us_tick(tick), .load(nav_load), .dur(nav_dur),
    .clear(!enable), .busy(nav_busy), .nav(nav_val));

  tsf_timer u_tsf (
    .clk, .rst_n, .us_tick(tick), .enable, .is_ap, .is_ibss, .bcn_int, .atim_win,
    .bcn_rx, .bcn_ts(rx_info.timestamp), .tsf, .tbtt, .atim_active,
    .adopted(tsf_adopted));

  // ---------------- timers ----------------
  logic        tm_start, tm_stop, tm_running, tm_expired;
  tmode_e      tm_mode;
  logic [15:0] tm_load, tm_count;
  logic        bo_retry, bo_reset;
  logic [9:0]  bo_cw, bo_slots;
  logic [15:0] bo_us;

  mac_timer u_timer (
    .clk, .rst_n, .us_tick(tick), .start(tm_start), .mode(tm_mode), .load_us(tm_load),
    .stop(tm_stop), .medium_idle(!bb_cca && !nav_busy && !rx_busy),
    .running(tm_running), .expired(tm_expired), .count(tm_count));

  backoff_gen u_bo (
    .clk, .rst_n, .retry(bo_retry), .reset_cw(bo_reset),
    .cw(bo_cw), .slots(bo_slots), .backoff_us(bo_us));

  // ---------------- transmit path ----------------
  logic       txf_push, txf_space, txf_empty, txf_has, txf_under;
  logic [2:0] txf_free;
  logic [7:0] txf_din;
  logic       tx_busy;

  tx_fsm u_tx (
    .clk, .rst_n, .enable, .is_ap, .is_ibss, .csma_dis, .bcn_en, .own_addr, .bssid,
    .atim_da, .rts_thresh, .signal, .retry_limit, .bcn_len,
    .cmd_tx, .tx_frags, .cmd_atim, .tx_done, .tx_fail, .busy(tx_busy),
    .tbtt, .atim_active, .tsf,
    .rx_done, .rx_info, .rx_busy,
    .cca(bb_cca), .nav_busy,
    .tm_start, .tm_mode, .tm_load, .tm_stop, .tm_expired, .tm_count,
    .bo_us, .bo_retry, .bo_reset,
    .mreq(tx_req), .mrsp(tx_rsp),
    .fifo_push(txf_push), .fifo_din(txf_din), .fifo_space(txf_space), .fifo_free(txf_free),
    .fifo_empty(txf_empty), .bb_tx_en);

  tx_fifo u_txfifo (
    .clk, .rst_n, .clear(!bb_tx_en && !txf_push), .push(txf_push), .din(txf_din),
    .space(txf_space), .free(txf_free), .bit_en(bb_tx_bit_en && bb_tx_en), .tx_bit(bb_tx_bit),
    .has_bit(txf_has), .empty(txf_empty), .underrun(txf_under));
endmodule
