// rx_fsm: reception finite-state machine.
//
// Works on the bytes assembled by the one-byte RxFIFO while the baseband
// holds `rx_active`. A received frame is the 6-byte PLCP header (SIGNAL,
// SERVICE, LENGTH low/high, CRC-16 low/high) followed by LENGTH bytes of
// MPDU, the last four being the CRC-32 FCS. The machine
//   1. checks the PLCP CRC-16 and aborts the frame if it fails;
//   2. checks the protocol version (frame control bits 1:0 = 0) and aborts
//      the frame otherwise;
//   3. decodes type and subtype and tests Address 1 for our own address or
//      a group (multicast/broadcast) address;
//   4. writes the MPDU without FCS into the receive ring of the SRAM,
//      consecutively, behind a 2-byte length word (low byte first);
//   5. checks the CRC-32 at the end. A data or management frame for us
//      or a group, with a good FCS and room in the ring, is committed:
//      the length word is written, the write pointer `wptr` moves past
//      it and `st_rx_ok` pulses. Otherwise the bytes are left behind
//      unreferenced, which deletes the frame, and a bad CRC or an abort
//      pulses `st_rx_err`.
// At the end of each frame whose checks passed up to the FCS, `rx_done`
// pulses with `info` (type, addresses, Duration, timestamp) for the
// TxFSM (with `no_room` set when the ring could not take the frame, so
// that it is not acknowledged); `nav_load` passes the Duration of a good frame addressed to
// another station to the NAV, and `bcn_rx` passes a good Beacon's
// timestamp to the TSF timer. Control frames are handled in hardware and
// not stored. The ring runs from RING_LO to RING_HI; the host frees space
// by advancing `rptr`, and the ring is full when a write would reach it.
// The ring layout, the length word and the bit-serial framing are this
// design's choices; the checks and the deletion of bad frames follow the
// document.
module rx_fsm
  import mac_pkg::*;
#(
  parameter logic [15:0] RING_LO = RX_BASE,
  parameter logic [15:0] RING_HI = RX_LAST,
  parameter int unsigned MAX_MPDU = 2346
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [47:0] own_addr,
  // baseband / RxFIFO
  input  logic        rx_active,
  input  logic        byte_valid,
  input  logic [7:0]  rx_byte,
  output logic        fifo_pop,
  output logic        busy,
  // SRAM through the ESI
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // receive ring
  input  logic [15:0] rptr,
  output logic [15:0] wptr,
  // results
  output logic        rx_done,
  output rx_info_t    info,
  output logic        st_rx_ok,
  output logic        st_rx_err,
  output logic        nav_load,
  output logic [15:0] nav_dur,
  output logic        bcn_rx
);
  typedef enum logic [2:0] {
    R_IDLE, R_PLCP, R_PCHK, R_MPDU, R_FCHK, R_LEN0, R_LEN1, R_SKIP
  } rstate_e;

  rstate_e     st;
  logic [11:0] idx;
  logic [11:0] mlen;     // MPDU length incl. FCS, from the PLCP header
  logic [15:0] rec;      // start of the record being written
  logic [15:0] waddr;    // next data address
  logic        no_room;
  logic        wpend;
  logic [15:0] wpend_addr;
  logic [7:0]  wpend_data;
  logic        rx_active_q;

  // CRC units
  logic        c16_init, c16_en, c16_ok;
  logic        c32_init, c32_en, c32_ok;
  logic [15:0] c16_crc, c16_fcs;
  logic [31:0] c32_crc, c32_fcs;

  crc_unit #(.W(16), .POLY(16'h8408), .RESIDUE(16'hF0B8)) u_crc16 (
    .clk, .rst_n, .init(c16_init), .en(c16_en), .din(rx_byte),
    .crc(c16_crc), .fcs(c16_fcs), .check_ok(c16_ok));
  crc_unit u_crc32 (
    .clk, .rst_n, .init(c32_init), .en(c32_en), .din(rx_byte),
    .crc(c32_crc), .fcs(c32_fcs), .check_ok(c32_ok));

  function automatic logic [15:0] ring_inc(input logic [15:0] a);
    return (a == RING_HI) ? RING_LO : a + 16'd1;
  endfunction

  assign c16_init = (st == R_IDLE);
  assign c32_init = (st == R_IDLE);
  assign c16_en   = (st == R_PLCP) && byte_valid;
  assign c32_en   = (st == R_MPDU) && byte_valid;
  assign fifo_pop = byte_valid;
  assign busy     = (st != R_IDLE) || rx_active;

  always_comb begin
    mreq       = '0;
    mreq.req   = wpend;
    mreq.we    = 1'b1;
    mreq.addr  = wpend_addr;
    mreq.wdata = wpend_data;
  end

  logic storable;
  assign storable = (info.ftype == FT_DATA || info.ftype == FT_MGMT) &&
                    (info.to_us || info.group) && !no_room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; idx <= '0; mlen <= '0; rec <= RING_LO; waddr <= RING_LO;
      wptr <= RING_LO; no_room <= 1'b0; wpend <= 1'b0; wpend_addr <= '0;
      wpend_data <= '0; info <= '0; rx_done <= 1'b0; st_rx_ok <= 1'b0;
      st_rx_err <= 1'b0; nav_load <= 1'b0; nav_dur <= '0; bcn_rx <= 1'b0;
      rx_active_q <= 1'b0;
    end else begin
      rx_done   <= 1'b0;
      st_rx_ok  <= 1'b0;
      st_rx_err <= 1'b0;
      nav_load  <= 1'b0;
      bcn_rx    <= 1'b0;
      rx_active_q <= rx_active;
      if (wpend && mrsp.gnt) wpend <= 1'b0;

      case (st)
        R_IDLE: begin
          idx <= '0;
          if (enable && rx_active && !rx_active_q) st <= R_PLCP;
        end
        R_PLCP: begin
          if (byte_valid) begin
            if (idx == 12'd2) mlen[7:0]  <= rx_byte;
            if (idx == 12'd3) mlen[11:8] <= rx_byte[3:0];
            idx <= idx + 12'd1;
            if (idx == 12'd5) st <= R_PCHK;
          end else if (!rx_active) begin
            st <= R_IDLE; st_rx_err <= 1'b1;
          end
        end
        R_PCHK: begin
          idx     <= '0;
          info    <= '0;
          rec     <= wptr;
          waddr   <= ring_inc(ring_inc(wptr));
          no_room <= (ring_inc(wptr) == rptr) || (ring_inc(ring_inc(wptr)) == rptr);
          if (!c16_ok || mlen < 12'd14 || mlen > 12'(MAX_MPDU + 4)) begin
            st <= R_SKIP; st_rx_err <= 1'b1;
          end else begin
            st <= R_MPDU;
          end
        end
        R_MPDU: begin
          if (byte_valid) begin
            idx <= idx + 12'd1;
            // header fields
            case (idx)
              12'd0: begin
                info.ftype   <= ftype_e'(rx_byte[3:2]);
                info.subtype <= rx_byte[7:4];
                if (rx_byte[1:0] != 2'b00) begin
                  st <= R_SKIP; st_rx_err <= 1'b1;
                end
              end
              12'd1: info.more_frag  <= rx_byte[2];
              12'd2: info.dur[7:0]   <= rx_byte;
              12'd3: info.dur[15:8]  <= rx_byte;
              12'd4: begin
                info.group <= rx_byte[0];
                info.to_us <= (rx_byte == own_addr[7:0]);
              end
              12'd5, 12'd6, 12'd7, 12'd8, 12'd9:
                if (rx_byte != own_addr[8*(idx-12'd4) +: 8]) info.to_us <= 1'b0;
              default: ;
            endcase
            if (idx >= 12'd10 && idx <= 12'd15)
              info.ta[8*(idx-12'd10) +: 8] <= rx_byte;
            if (idx >= 12'd24 && idx <= 12'd31)
              info.timestamp[8*(idx-12'd24) +: 8] <= rx_byte;
            // storage of the MPDU without its FCS
            if (idx < mlen - 12'd4) begin
              wpend      <= 1'b1;
              wpend_addr <= waddr;
              wpend_data <= rx_byte;
              waddr      <= ring_inc(waddr);
              if (ring_inc(waddr) == rptr) no_room <= 1'b1;
            end
            if (idx == mlen - 12'd1) st <= R_FCHK;
          end else if (!rx_active) begin
            st <= R_IDLE; st_rx_err <= 1'b1;
          end
        end
        R_FCHK: begin
          info.fcs_ok  <= c32_ok;
          info.no_room <= no_room;
          rx_done     <= 1'b1;
          if (!c32_ok) begin
            st_rx_err <= 1'b1;
            st        <= R_SKIP;
          end else begin
            if (!info.to_us) begin
              nav_load <= 1'b1;
              nav_dur  <= info.dur;
            end
            if (info.ftype == FT_MGMT && info.subtype == ST_BEACON) bcn_rx <= 1'b1;
            st <= storable ? R_LEN0 : R_SKIP;
          end
        end
        R_LEN0: if (!wpend) begin
          wpend      <= 1'b1;
          wpend_addr <= rec;
          wpend_data <= 8'(mlen - 12'd4);
          st         <= R_LEN1;
        end
        R_LEN1: if (!wpend) begin
          wpend      <= 1'b1;
          wpend_addr <= ring_inc(rec);
          wpend_data <= {4'd0, 4'((mlen - 12'd4) >> 8)};
          wptr       <= waddr;
          st_rx_ok   <= 1'b1;
          st         <= R_SKIP;
        end
        R_SKIP: if (!rx_active) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
