// mac_pkg: types, frame constants and timing helpers shared by the
// IEEE 802.11 MAC controller blocks.
//
// The frame-control codes are those of IEEE 802.11-1999. The timing
// constants are the DSSS PHY values (microseconds): SIFS 10, slot 20,
// DIFS = SIFS + 2 slots = 50, and a 192 us long PLCP preamble+header.
// Byte-to-airtime conversion uses the SIGNAL field rate code (units of
// 100 kbit/s), since the ACK/CTS timeouts depend on the SIGNAL field.
package mac_pkg;

  // ---------------------------------------------------------------
  // 802.11 frame control
  // ---------------------------------------------------------------
  typedef enum logic [1:0] {
    FT_MGMT = 2'b00,
    FT_CTRL = 2'b01,
    FT_DATA = 2'b10,
    FT_RSVD = 2'b11
  } ftype_e;

  localparam logic [3:0] ST_PROBE_REQ  = 4'b0100;
  localparam logic [3:0] ST_PROBE_RSP  = 4'b0101;
  localparam logic [3:0] ST_BEACON     = 4'b1000;
  localparam logic [3:0] ST_ATIM       = 4'b1001;
  localparam logic [3:0] ST_RTS        = 4'b1011;
  localparam logic [3:0] ST_CTS        = 4'b1100;
  localparam logic [3:0] ST_ACK        = 4'b1101;

  // First frame-control byte: subtype[7:4], type[3:2], version[1:0]
  function automatic logic [7:0] fc0(input ftype_e t, input logic [3:0] st);
    return {st, t, 2'b00};
  endfunction

  // ---------------------------------------------------------------
  // DSSS timing (microseconds)
  // ---------------------------------------------------------------
  localparam int unsigned SIFS_US   = 10;
  localparam int unsigned SLOT_US   = 20;
  localparam int unsigned DIFS_US   = SIFS_US + 2 * SLOT_US;
  localparam int unsigned PLCP_US   = 192;
  localparam int unsigned ACK_EXTRA_US = 10;   // margin added to the ACK time
  localparam int unsigned ACK_BYTES = 14;      // ACK and CTS MPDU incl. FCS
  localparam int unsigned RTS_BYTES = 20;

  // SIGNAL field codes (rate in 100 kbit/s)
  localparam logic [7:0] SIG_1M  = 8'h0A;
  localparam logic [7:0] SIG_2M  = 8'h14;
  localparam logic [7:0] SIG_5M5 = 8'h37;
  localparam logic [7:0] SIG_11M = 8'h6E;

  // Air time of an MPDU of `bytes` octets (incl. FCS) at rate `sig`,
  // including the PLCP preamble and header. 5.5 and 11 Mbit/s use a
  // fixed-point reciprocal (x/1024) rounded up.
  function automatic logic [15:0] airtime_us(input logic [11:0] bytes,
                                             input logic [7:0]  sig);
    logic [23:0] t;
    case (sig)
      SIG_2M:  t = 24'(bytes) * 24'd4;
      SIG_5M5: t = (24'(bytes) * 24'd1490 + 24'd1023) >> 10;
      SIG_11M: t = (24'(bytes) * 24'd745 + 24'd1023) >> 10;
      default: t = 24'(bytes) * 24'd8;
    endcase
    return 16'(t + 24'(PLCP_US));
  endfunction

  // ---------------------------------------------------------------
  // SRAM access port (one per ESI requester)
  // ---------------------------------------------------------------
  typedef struct packed {
    logic        req;
    logic        we;
    logic [15:0] addr;
    logic [7:0]  wdata;
  } mem_req_t;

  typedef struct packed {
    logic       gnt;     // request accepted this cycle
    logic       rvalid;  // read data valid (cycle after gnt)
    logic [7:0] rdata;
  } mem_rsp_t;

  // ---------------------------------------------------------------
  // Received-frame summary, RxFSM -> TxFSM / HIU
  // ---------------------------------------------------------------
  typedef struct packed {
    ftype_e       ftype;
    logic [3:0]   subtype;
    logic         to_us;      // Address 1 equals our address
    logic         group;      // Address 1 is a group address
    logic         more_frag;
    logic         fcs_ok;
    logic         no_room;    // the receive ring had no room for it
    logic [15:0]  dur;
    logic [47:0]  ta;         // Address 2
    logic [63:0]  timestamp;  // Beacon / Probe Response timestamp
  } rx_info_t;

  // Shared timer modes
  typedef enum logic [1:0] {
    TM_IFS     = 2'd0,  // counts every microsecond
    TM_BACKOFF = 2'd1,  // counts only while the medium is idle
    TM_RSP     = 2'd2   // ACK/CTS timeout, counts every microsecond
  } tmode_e;

  // SRAM map (64K x 8)
  localparam logic [15:0] TXBUF_BASE = 16'h0000;  // data frames to send
  localparam logic [15:0] BCN_BASE   = 16'h0C00;  // Beacon template
  localparam logic [15:0] RX_BASE    = 16'h1000;  // receive ring start
  localparam logic [15:0] RX_LAST    = 16'hFFFF;  // receive ring end

endpackage
