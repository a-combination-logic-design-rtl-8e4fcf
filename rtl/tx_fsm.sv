// tx_fsm: transmission finite-state machine, with the control frame
// handler and the hardware handling of Beacon, ATIM and Probe Response.
//
// Jobs, in order of priority when the machine is idle:
//   response  ACK to a good data/management frame for us that the receive
//             ring could store, CTS to an RTS
//             for us while the NAV is clear; sent one SIFS after the
//             received frame, without contention (may interrupt a
//             contention in progress, whose backoff is saved and resumed)
//   beacon    at each TBTT, for an access point or an ad hoc station with
//             `bcn_en`; the frame is the template at BCN_BASE with the
//             TSF written into the timestamp field (MPDU bytes 24-31); in
//             an ad hoc BSS a Beacon received first cancels it
//   ATIM      requested by `cmd_atim`, sent during the ATIM window to
//             `atim_da`: a 24-byte header built in hardware
//   probe rsp answer to a Probe Request, made from the beacon template
//             with the subtype and Address 1 replaced
//   data      `cmd_tx`: `tx_frags` fragments stored one after another at
//             TXBUF_BASE, each as a 2-byte length (MPDU without FCS) and
//             the MPDU written by the host
// Contention (DCF): wait for an idle medium (no CCA, NAV clear, nothing
// being received), DIFS, then a random backoff drawn from the contention
// window, counted only while the medium is idle; at zero the frame goes
// out if the medium is idle, otherwise DIFS is waited again. With
// `csma_dis` (PCF operation) only a SIFS is waited. A unicast data
// fragment longer than `rts_thresh` (MPDU + FCS) opens with RTS, then
// waits for CTS; later fragments follow one SIFS after the ACK of the
// previous one, without contention or RTS. A missing CTS or ACK doubles
// the window and retries up to `retry_limit` attempts, then `tx_fail`
// pulses; success pulses `tx_done` (data jobs).
// Every frame is sent as PLCP header (SIGNAL, SERVICE 0, LENGTH = MPDU
// octets incl. FCS, CRC-16) + MPDU + CRC-32, byte by byte into the
// 32-bit TxFIFO; `bb_tx_en` rises once the first byte is in the FIFO and
// falls in the cycle its last bit has been taken, so a baseband taking
// one bit per clock never finds it empty at either end. SRAM reads are
// issued ahead, as many as there are free bytes in the TxFIFO, so that
// the SRAM path can deliver a byte per cycle.
// ACK/CTS timeouts are SIFS + ACK air time at `signal` + 10 us.
// The DCF, RTS/CTS, fragment burst, response and timer sharing follow the
// document; frame layouts and timing values follow IEEE 802.11 (DSSS);
// the job order, SRAM layout and the PCF register behaviour are this
// design's own.
module tx_fsm
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        enable,
  input  logic        is_ap,
  input  logic        is_ibss,
  input  logic        csma_dis,
  input  logic        bcn_en,
  input  logic [47:0] own_addr,
  input  logic [47:0] bssid,
  input  logic [47:0] atim_da,
  input  logic [15:0] rts_thresh,
  input  logic [7:0]  signal,
  input  logic [3:0]  retry_limit,
  input  logic [7:0]  bcn_len,
  // host commands and status
  input  logic        cmd_tx,
  input  logic [3:0]  tx_frags,
  input  logic        cmd_atim,
  output logic        tx_done,
  output logic        tx_fail,
  output logic        busy,
  // TSF
  input  logic        tbtt,
  input  logic        atim_active,
  input  logic [63:0] tsf,
  // receiver
  input  logic        rx_done,
  input  rx_info_t    rx_info,
  input  logic        rx_busy,
  // medium
  input  logic        cca,
  input  logic        nav_busy,
  // shared timer
  output logic        tm_start,
  output tmode_e      tm_mode,
  output logic [15:0] tm_load,
  output logic        tm_stop,
  input  logic        tm_expired,
  input  logic [15:0] tm_count,
  // backoff generator
  input  logic [15:0] bo_us,
  output logic        bo_retry,
  output logic        bo_reset,
  // SRAM through the ESI
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // TxFIFO and baseband
  output logic        fifo_push,
  output logic [7:0]  fifo_din,
  input  logic        fifo_space,
  input  logic [2:0]  fifo_free,
  input  logic        fifo_empty,
  output logic        bb_tx_en
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_CWAIT, S_CDIFS, S_CBO, S_PIFS, S_RSIFS,
    S_SEND, S_DRAIN, S_WCTS, S_WACK, S_SIFS
  } state_e;
  typedef enum logic [2:0] {J_NONE, J_DATA, J_BCN, J_ATIM, J_PRSP} job_e;
  typedef enum logic [2:0] {F_RTS, F_CTS, F_ACK, F_DATA, F_BCN, F_PRSP, F_ATIM} frame_e;

  state_e st;
  job_e   job;
  frame_e fk;

  // pending work
  logic        data_pend, bcn_pend, atim_pend, prsp_pend, rsp_pend, rsp_cts;
  logic [47:0] rsp_ra, prsp_da;
  logic [15:0] rsp_dur;
  // data job
  logic [15:0] buf_ptr;
  logic [3:0]  frag_left;
  logic        first_frag;
  logic [11:0] data_len;
  logic [47:0] data_ra;
  logic [3:0]  ld_idx;
  logic        ld_out;
  // retry and backoff
  logic [3:0]  retry_cnt;
  logic [15:0] bo_save;
  logic        bo_resume, bo_skip;
  // frame being sent
  logic [11:0] k, mpdu_len;
  logic        tx_on;      // a frame is being sent
  logic [2:0]  rd_cnt;     // SRAM reads granted, data not yet returned
  logic [11:0] rq_j;       // MPDU index of the next SRAM read
  logic [15:0] frm_base, frm_dur;
  logic [47:0] frm_a1;
  logic [63:0] tsf_snap;

  logic medium_idle;
  assign medium_idle = !cca && !nav_busy && !rx_busy;
  assign busy = (st != S_IDLE);

  // ---------------------------------------------------------------
  // CRC units for the frame being sent
  // ---------------------------------------------------------------
  logic        c16_en, c32_en, crc_init;
  logic [15:0] c16_fcs, c16_crc;
  logic [31:0] c32_fcs, c32_crc;
  logic        c16_ok, c32_ok;

  crc_unit #(.W(16), .POLY(16'h8408), .RESIDUE(16'hF0B8)) u_crc16 (
    .clk, .rst_n, .init(crc_init), .en(c16_en), .din(fifo_din),
    .crc(c16_crc), .fcs(c16_fcs), .check_ok(c16_ok));
  crc_unit u_crc32 (
    .clk, .rst_n, .init(crc_init), .en(c32_en), .din(fifo_din),
    .crc(c32_crc), .fcs(c32_fcs), .check_ok(c32_ok));

  // ---------------------------------------------------------------
  // Byte k of the frame being sent
  // ---------------------------------------------------------------
  logic [11:0] j;          // MPDU byte index
  logic        in_mpdu, from_sram;
  logic [7:0]  gen_byte, sram_byte;
  logic [11:0] plcp_len;

  assign j        = k - 12'd6;
  assign plcp_len = mpdu_len + 12'd4;
  assign in_mpdu  = (k >= 12'd6) && (k < mpdu_len + 12'd6);
  assign from_sram = in_mpdu && (fk == F_DATA || fk == F_BCN || fk == F_PRSP);

  always_comb begin
    gen_byte = 8'h00;
    if (k < 12'd6) begin
      case (k[2:0])
        3'd0: gen_byte = signal;
        3'd2: gen_byte = plcp_len[7:0];
        3'd3: gen_byte = {4'd0, plcp_len[11:8]};
        3'd4: gen_byte = c16_fcs[7:0];
        3'd5: gen_byte = c16_fcs[15:8];
        default: gen_byte = 8'h00;
      endcase
    end else if (in_mpdu) begin
      if (j == 12'd0)
        case (fk)
          F_RTS:   gen_byte = fc0(FT_CTRL, ST_RTS);
          F_CTS:   gen_byte = fc0(FT_CTRL, ST_CTS);
          F_ACK:   gen_byte = fc0(FT_CTRL, ST_ACK);
          default: gen_byte = fc0(FT_MGMT, ST_ATIM);
        endcase
      else if (j == 12'd2) gen_byte = frm_dur[7:0];
      else if (j == 12'd3) gen_byte = frm_dur[15:8];
      else if (j >= 12'd4 && j <= 12'd9)   gen_byte = frm_a1[8*(j-12'd4) +: 8];
      else if (j >= 12'd10 && j <= 12'd15) gen_byte = own_addr[8*(j-12'd10) +: 8];
      else if (j >= 12'd16 && j <= 12'd21) gen_byte = bssid[8*(j-12'd16) +: 8];
    end else begin
      gen_byte = c32_fcs[8*(k - mpdu_len - 12'd6) +: 8];
    end
  end

  // SRAM bytes, with the fields the controller fills in
  always_comb begin
    sram_byte = mrsp.rdata;
    if (fk == F_PRSP && j == 12'd0) sram_byte = fc0(FT_MGMT, ST_PROBE_RSP);
    if (fk == F_PRSP && j >= 12'd4 && j <= 12'd9) sram_byte = frm_a1[8*(j-12'd4) +: 8];
    if ((fk == F_BCN || fk == F_PRSP) && j >= 12'd24 && j <= 12'd31)
      sram_byte = tsf_snap[8*(j-12'd24) +: 8];
  end

  logic push_now;
  always_comb begin
    push_now = 1'b0;
    // SRAM bytes are pushed as they return (room was reserved when the
    // read was issued); generated bytes whenever there is room
    if (st == S_SEND)
      push_now = from_sram ? (rd_cnt != 3'd0 && mrsp.rvalid) : fifo_space;
  end
  assign fifo_push = push_now;
  assign bb_tx_en  = tx_on && !(fifo_empty && ((st == S_SEND && k == '0) || st == S_DRAIN));
  assign fifo_din  = from_sram ? sram_byte : gen_byte;
  assign c16_en    = push_now && (k < 12'd4);
  assign c32_en    = push_now && in_mpdu;
  assign crc_init  = (st != S_SEND);

  // SRAM reads: length/address load and frame bytes
  always_comb begin
    mreq = '0;
    if (st == S_LOAD && !ld_out) begin
      mreq.req  = 1'b1;
      mreq.addr = buf_ptr + ((ld_idx < 4'd2) ? 16'(ld_idx) : 16'(ld_idx) + 16'd4);
    end else if (st == S_SEND && from_sram && rq_j < mpdu_len && rd_cnt < fifo_free) begin
      // reads run ahead of the bytes pushed, as far as the free TxFIFO
      // bytes allow, so that one byte can be delivered every cycle
      mreq.req  = 1'b1;
      mreq.addr = frm_base + 16'(rq_j);
    end
  end

  // ---------------------------------------------------------------
  // Durations and timeouts
  // ---------------------------------------------------------------
  logic [15:0] ack_us, rsp_timeout;
  assign ack_us      = airtime_us(12'(ACK_BYTES), signal);
  assign rsp_timeout = 16'(SIFS_US) + ack_us + 16'(ACK_EXTRA_US);

  function automatic logic [15:0] sat_sub(input logic [15:0] a, input logic [15:0] b);
    return (a > b) ? a - b : 16'd0;
  endfunction

  logic in_contention;
  assign in_contention = (st == S_CWAIT || st == S_CDIFS || st == S_CBO || st == S_PIFS);

  // ---------------------------------------------------------------
  // Main machine
  // ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; job <= J_NONE; fk <= F_DATA;
      data_pend <= 1'b0; bcn_pend <= 1'b0; atim_pend <= 1'b0; prsp_pend <= 1'b0;
      rsp_pend <= 1'b0; rsp_cts <= 1'b0; rsp_ra <= '0; prsp_da <= '0; rsp_dur <= '0;
      buf_ptr <= TXBUF_BASE; frag_left <= '0; first_frag <= 1'b0; data_len <= '0;
      data_ra <= '0; ld_idx <= '0; ld_out <= 1'b0;
      retry_cnt <= '0; bo_save <= '0; bo_resume <= 1'b0; bo_skip <= 1'b0;
      k <= '0; mpdu_len <= '0; rd_cnt <= '0; rq_j <= '0; frm_base <= '0; frm_dur <= '0;
      frm_a1 <= '0; tsf_snap <= '0;
      tm_start <= 1'b0; tm_mode <= TM_IFS; tm_load <= '0; tm_stop <= 1'b0;
      bo_retry <= 1'b0; bo_reset <= 1'b0; tx_done <= 1'b0; tx_fail <= 1'b0;
      tx_on <= 1'b0;
    end else begin
      tm_start <= 1'b0; tm_stop <= 1'b0; bo_retry <= 1'b0; bo_reset <= 1'b0;
      tx_done <= 1'b0; tx_fail <= 1'b0;

      // ---- requests ----
      if (cmd_tx && !data_pend && tx_frags != '0) begin
        data_pend <= 1'b1; frag_left <= tx_frags; buf_ptr <= TXBUF_BASE;
        first_frag <= 1'b1;
      end
      if (cmd_atim) atim_pend <= 1'b1;
      if (tbtt && enable && bcn_en && (is_ap || is_ibss)) bcn_pend <= 1'b1;
      else if (!bcn_en && job != J_BCN) bcn_pend <= 1'b0;
      if (rx_done && rx_info.fcs_ok && enable) begin
        // no ACK for a frame the full receive ring had to drop: the
        // sender will retry it
        if (rx_info.to_us && (rx_info.ftype == FT_DATA || rx_info.ftype == FT_MGMT) &&
            !rx_info.no_room) begin
          rsp_pend <= 1'b1; rsp_cts <= 1'b0; rsp_ra <= rx_info.ta;
          rsp_dur  <= rx_info.more_frag ? sat_sub(rx_info.dur, 16'(SIFS_US) + ack_us) : 16'd0;
        end
        if (rx_info.to_us && rx_info.ftype == FT_CTRL && rx_info.subtype == ST_RTS && !nav_busy) begin
          rsp_pend <= 1'b1; rsp_cts <= 1'b1; rsp_ra <= rx_info.ta;
          rsp_dur  <= sat_sub(rx_info.dur, 16'(SIFS_US) + ack_us);
        end
        if (rx_info.ftype == FT_MGMT && rx_info.subtype == ST_PROBE_REQ &&
            (rx_info.to_us || rx_info.group) && (is_ap || is_ibss) && bcn_en) begin
          prsp_pend <= 1'b1; prsp_da <= rx_info.ta;
        end
        // in an ad hoc BSS the first Beacon of the interval wins
        if (is_ibss && rx_info.ftype == FT_MGMT && rx_info.subtype == ST_BEACON) begin
          bcn_pend <= 1'b0;
          if (job == J_BCN && in_contention) begin
            tm_stop <= 1'b1; st <= S_IDLE; job <= J_NONE;
          end
        end
      end

      case (st)
        // ---------------------------------------------------------
        S_IDLE: begin
          if (!enable) begin
            data_pend <= 1'b0; bcn_pend <= 1'b0; atim_pend <= 1'b0;
            prsp_pend <= 1'b0; rsp_pend <= 1'b0;
          end else if (rsp_pend) begin
            tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'(SIFS_US);
            st <= S_RSIFS;
          end else if (job != J_NONE) begin
            st <= S_CWAIT;                       // resume an interrupted job
          end else if (bcn_pend) begin
            job <= J_BCN; retry_cnt <= '0; st <= S_CWAIT;
          end else if (atim_pend && atim_active) begin
            job <= J_ATIM; retry_cnt <= '0; st <= S_CWAIT;
          end else if (prsp_pend) begin
            job <= J_PRSP; retry_cnt <= '0; st <= S_CWAIT;
          end else if (data_pend) begin
            job <= J_DATA; retry_cnt <= '0; ld_idx <= '0; ld_out <= 1'b0;
            st <= S_LOAD;
          end
        end
        // ---------------------------------------------------------
        S_LOAD: begin    // fragment length and Address 1
          if (mreq.req && mrsp.gnt) ld_out <= 1'b1;
          if (mrsp.rvalid) begin
            ld_out <= 1'b0;
            ld_idx <= ld_idx + 4'd1;
            if (ld_idx == 4'd0) data_len[7:0]  <= mrsp.rdata;
            else if (ld_idx == 4'd1) data_len[11:8] <= mrsp.rdata[3:0];
            else data_ra[8*(ld_idx-4'd2) +: 8] <= mrsp.rdata;
            if (ld_idx == 4'd7) st <= first_frag ? S_CWAIT : S_SIFS;
            if (ld_idx == 4'd7 && !first_frag) begin
              tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'(SIFS_US);
            end
          end
        end
        // ---------------------------------------------------------
        S_CWAIT: begin
          if (rsp_pend) st <= S_IDLE;
          else if (job == J_ATIM && !atim_active) begin
            job <= J_NONE; st <= S_IDLE;           // window closed, keep request
          end else if (csma_dis) begin
            tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'(SIFS_US);
            st <= S_PIFS;
          end else if (medium_idle) begin
            tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'(DIFS_US);
            st <= S_CDIFS;
          end
        end
        S_CDIFS: begin
          if (rsp_pend) begin
            tm_stop <= 1'b1; st <= S_IDLE;
          end else if (!medium_idle) begin
            tm_stop <= 1'b1; st <= S_CWAIT;
          end else if (tm_expired) begin
            tm_start <= 1'b1; tm_mode <= TM_BACKOFF;
            tm_load  <= bo_skip ? 16'd0 : (bo_resume ? bo_save : bo_us);
            bo_resume <= 1'b0; bo_skip <= 1'b0;
            st <= S_CBO;
          end
        end
        S_CBO: begin
          if (rsp_pend) begin
            tm_stop <= 1'b1; bo_save <= tm_count; bo_resume <= 1'b1; st <= S_IDLE;
          end else if (tm_expired) begin
            if (medium_idle) begin
              st <= S_SEND; k <= '0; rd_cnt <= '0; rq_j <= '0;
              tx_on <= 1'b1;
              tsf_snap <= tsf;
              case (job)
                J_BCN: begin
                  fk <= F_BCN; mpdu_len <= 12'(bcn_len); frm_base <= BCN_BASE;
                  frm_dur <= '0;
                end
                J_PRSP: begin
                  fk <= F_PRSP; mpdu_len <= 12'(bcn_len); frm_base <= BCN_BASE;
                  frm_a1 <= prsp_da;
                end
                J_ATIM: begin
                  fk <= F_ATIM; mpdu_len <= 12'd24; frm_a1 <= atim_da;
                  frm_dur <= atim_da[0] ? 16'd0 : 16'(SIFS_US) + ack_us;
                end
                default: begin
                  if (first_frag && !data_ra[0] && {4'd0, data_len} + 16'd4 > rts_thresh) begin
                    fk <= F_RTS; mpdu_len <= 12'(RTS_BYTES - 4); frm_a1 <= data_ra;
                    frm_dur <= 16'(3 * SIFS_US) + ack_us + ack_us +
                               airtime_us(data_len + 12'd4, signal);
                  end else begin
                    fk <= F_DATA; mpdu_len <= data_len; frm_base <= buf_ptr + 16'd2;
                  end
                end
              endcase
            end else begin
              bo_skip <= 1'b1; st <= S_CWAIT;
            end
          end
        end
        S_PIFS: begin
          if (tm_expired) begin
            // PCF: no backoff, straight to the frame once SIFS has passed
            st <= S_CBO; tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'd0;
          end
        end
        // ---------------------------------------------------------
        S_RSIFS: begin
          if (tm_expired) begin
            st <= S_SEND; k <= '0; rd_cnt <= '0; rq_j <= '0; tx_on <= 1'b1;
            fk <= rsp_cts ? F_CTS : F_ACK;
            mpdu_len <= 12'(ACK_BYTES - 4);
            frm_a1 <= rsp_ra; frm_dur <= rsp_dur;
            rsp_pend <= 1'b0;
          end
        end
        S_SIFS: begin    // next fragment, or data after CTS
          if (tm_expired) begin
            st <= S_SEND; k <= '0; rd_cnt <= '0; rq_j <= '0; tx_on <= 1'b1;
            fk <= F_DATA; mpdu_len <= data_len; frm_base <= buf_ptr + 16'd2;
          end
        end
        // ---------------------------------------------------------
        S_SEND: begin
          if (mreq.req && mrsp.gnt) rq_j <= rq_j + 12'd1;
          rd_cnt <= rd_cnt + 3'((mreq.req && mrsp.gnt) ? 1 : 0)
                           - 3'((from_sram && push_now) ? 1 : 0);
          if (push_now) begin
            k <= k + 12'd1;
            if (k == mpdu_len + 12'd9) st <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (fifo_empty) begin
            tx_on <= 1'b0;
            case (fk)
              F_ACK, F_CTS: st <= S_IDLE;
              F_RTS: begin
                tm_start <= 1'b1; tm_mode <= TM_RSP; tm_load <= rsp_timeout;
                st <= S_WCTS;
              end
              F_BCN: begin
                bcn_pend <= 1'b0; job <= J_NONE; bo_reset <= 1'b1; st <= S_IDLE;
              end
              default: begin
                // group-addressed frames are not acknowledged: a zero wait
                tm_start <= 1'b1; tm_mode <= TM_RSP;
                tm_load  <= ((fk == F_DATA) ? data_ra[0] : frm_a1[0]) ? 16'd0 : rsp_timeout;
                st <= S_WACK;
              end
            endcase
          end
        end
        // ---------------------------------------------------------
        S_WCTS: begin
          if (rx_done && rx_info.fcs_ok && rx_info.to_us &&
              rx_info.ftype == FT_CTRL && rx_info.subtype == ST_CTS) begin
            tm_start <= 1'b1; tm_mode <= TM_IFS; tm_load <= 16'(SIFS_US);
            st <= S_SIFS;
          end else if (tm_expired) begin
            retry_cnt <= retry_cnt + 4'd1;
            bo_retry  <= 1'b1;
            if (retry_cnt + 4'd1 >= retry_limit) begin
              tx_fail <= 1'b1; data_pend <= 1'b0; job <= J_NONE; bo_reset <= 1'b1;
            end
            st <= S_IDLE;
          end
        end
        S_WACK: begin
          logic acked;
          acked = (rx_done && rx_info.fcs_ok && rx_info.to_us &&
                   rx_info.ftype == FT_CTRL && rx_info.subtype == ST_ACK) ||
                  (tm_expired && ((fk == F_DATA) ? data_ra[0] : frm_a1[0]));
          if (acked) begin
            retry_cnt <= '0;
            bo_reset  <= 1'b1;
            case (job)
              J_DATA: begin
                if (frag_left > 4'd1) begin
                  frag_left  <= frag_left - 4'd1;
                  first_frag <= 1'b0;
                  buf_ptr    <= buf_ptr + 16'd2 + 16'(data_len);
                  ld_idx <= '0; ld_out <= 1'b0;
                  st <= S_LOAD;
                end else begin
                  data_pend <= 1'b0; tx_done <= 1'b1; job <= J_NONE; st <= S_IDLE;
                end
              end
              J_ATIM: begin atim_pend <= 1'b0; job <= J_NONE; st <= S_IDLE; end
              default: begin prsp_pend <= 1'b0; job <= J_NONE; st <= S_IDLE; end
            endcase
          end else if (tm_expired) begin
            retry_cnt <= retry_cnt + 4'd1;
            bo_retry  <= 1'b1;
            if (retry_cnt + 4'd1 >= retry_limit) begin
              bo_reset <= 1'b1; job <= J_NONE;
              case (job)
                J_DATA:  begin tx_fail <= 1'b1; data_pend <= 1'b0; end
                J_ATIM:  atim_pend <= 1'b0;
                default: prsp_pend <= 1'b0;
              endcase
            end
            // a later fragment is retried with contention but no RTS
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
