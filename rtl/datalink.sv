// Data link layer of one CusComNet transceiver lane (full duplex).
//
// Moves whole packets across one node-to-node cable and checks them at every
// hop, not only at the final destination. Following the published design,
// the sender first synchronises the channel (SYNC), sends the packet between
// SOF and EOF symbols, then sends its CRC; the receiver compares that CRC
// with its own and either confirms the frame or asks for it again. The
// synchronisation period and the acknowledgement timeout are parameters.
// Error statistics (CRC failures, retransmissions, timeouts, damaged
// characters) are counted so that the state of each cable can be observed.
//
// Frame on the link (16-bit words, K = control word):
//   SYNC(K) SOF(K) header  payload[0..len-1]  EOF(K)  CRC[31:16]  CRC[15:0]
// The CRC covers the header and payload words.
//
// Own choices, where the published design gives no detail:
//  * Stop-and-wait: one unacknowledged frame per direction. ACK and NAK are
//    single control words sent on the opposite direction of the same cable.
//    They may be slipped in between any two words of an outgoing frame (the
//    frame pauses for that cycle); the receiver takes control words out of
//    the stream wherever they appear.
//  * A frame is refused with NAK when its CRC fails, when it is cut short or
//    too long, or when the packet switch has no room to take it (rx_ready
//    low). NAK or a timeout makes the sender repeat the frame. A lost ACK
//    therefore repeats a frame that already went through; the copy is removed
//    at its destination by the packet identifier (see pktif).
//  * A SYNC word is also sent when the line has been idle for SYNC_PERIOD
//    cycles, so that the receiver's word alignment is refreshed.
//
// Interface: tx_valid/tx_ready hand a packet to the sender (taken when
// tx_ready, held until acknowledged). rx_valid is a one-cycle offer made only
// when rx_ready is high (the frame is NAKed otherwise), so a packet moves on
// every cycle rx_valid is high. The link words go to and come from GTPIF.
module datalink
  import cuscomnet_pkg::*;
#(
  parameter int unsigned SYNC_PERIOD = 1024, // cycles between idle-time SYNCs
  parameter int unsigned ACK_TIMEOUT = 256   // cycles to wait for ACK/NAK
) (
  input  logic    clk,
  input  logic    rst_n,
  // packets to send
  input  logic    tx_valid,
  output logic    tx_ready,
  input  packet_t tx_pkt,
  // packets received
  output logic    rx_valid,
  input  logic    rx_ready,
  output packet_t rx_pkt,
  // link words (via GTPIF)
  output word_t   tx_word,
  output logic    tx_k,
  input  word_t   rx_word,
  input  logic    rx_k,
  input  logic    rx_kerr,
  // status
  output logic        link_up,     // a SYNC has been received
  output logic [15:0] crc_errors,  // frames refused for a bad CRC or framing
  output logic [15:0] busy_naks,   // good frames refused for lack of room
  output logic [15:0] retransmits, // frames sent again (NAK or timeout)
  output logic [15:0] timeouts,    // of which after a timeout
  output logic [15:0] kchar_errors // words with a damaged K flag
);

  localparam int unsigned IDX_W = $clog2(MAX_WORDS + 1);
  localparam int unsigned SC_W  = $clog2(SYNC_PERIOD + 1);
  localparam int unsigned TO_W  = $clog2(ACK_TIMEOUT + 1);

  // ------------------------------------------------------------------
  // Transmit side
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    T_IDLE, T_SOF, T_HDR, T_DATA, T_EOF, T_CRC_HI, T_CRC_LO, T_WAIT
  } tx_state_e;

  tx_state_e          ts;
  packet_t            buf_pkt;
  logic               buf_valid;
  logic [IDX_W-1:0]   tidx;
  logic [SC_W-1:0]    sync_cnt;
  logic [TO_W-1:0]    to_cnt;
  logic               resp_pend, resp_nak;   // ACK/NAK waiting to be sent
  logic               send_resp;             // this cycle carries ACK/NAK
  logic               tcrc_init, tcrc_en;
  logic [31:0]        tcrc;
  logic               ack_seen, nak_seen;    // from the receive side
  logic               rsp_req, rsp_req_nak;  // from the receive side
  word_t              tw;
  logic               tk;
  logic               sync_due;

  assign tx_ready  = !buf_valid;
  assign send_resp = resp_pend;
  assign sync_due  = (sync_cnt >= SC_W'(SYNC_PERIOD - 1));

  crc32 #(.DW(WORD_W)) u_tx_crc (
    .clk, .rst_n, .init(tcrc_init), .en(tcrc_en), .data(tw), .crc(tcrc)
  );

  always_comb begin
    tw        = W_IDLE;
    tk        = 1'b1;
    tcrc_init = 1'b0;
    tcrc_en   = 1'b0;
    if (send_resp) begin
      tw = resp_nak ? W_NAK : W_ACK;
    end else begin
      unique case (ts)
        T_IDLE:   if (buf_valid || sync_due) tw = W_SYNC;
        T_SOF:    begin tw = W_SOF; tcrc_init = 1'b1; end
        T_HDR:    begin tw = buf_pkt.hdr; tk = 1'b0; tcrc_en = 1'b1; end
        T_DATA:   begin tw = buf_pkt.data[tidx[LEN_W-1:0]]; tk = 1'b0; tcrc_en = 1'b1; end
        T_EOF:    tw = W_EOF;
        T_CRC_HI: begin tw = tcrc[31:16]; tk = 1'b0; end
        T_CRC_LO: begin tw = tcrc[15:0];  tk = 1'b0; end
        T_WAIT:   if (sync_due) tw = W_SYNC;
        default:  tw = W_IDLE;
      endcase
    end
  end

  assign tx_word = tw;
  assign tx_k    = tk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts          <= T_IDLE;
      buf_valid   <= 1'b0;
      buf_pkt     <= '0;
      tidx        <= '0;
      sync_cnt    <= '0;
      to_cnt      <= '0;
      resp_pend   <= 1'b0;
      resp_nak    <= 1'b0;
      retransmits <= '0;
      timeouts    <= '0;
    end else begin
      // sync interval counter
      if (tk && tw == W_SYNC) sync_cnt <= '0;
      else if (!sync_due)     sync_cnt <= sync_cnt + 1'b1;

      // response to the far sender; a new request replaces nothing pending
      // (frames are far longer than one response slot)
      if (rsp_req) begin
        resp_pend <= 1'b1;
        resp_nak  <= rsp_req_nak;
      end else if (send_resp) begin
        resp_pend <= 1'b0;
      end

      if (tx_valid && tx_ready) begin
        buf_pkt   <= tx_pkt;
        buf_valid <= 1'b1;
      end

      if (!send_resp) begin
        unique case (ts)
          T_IDLE:   if (buf_valid) ts <= T_SOF;
          T_SOF:    ts <= T_HDR;
          T_HDR:    begin
                      tidx <= '0;
                      ts   <= (buf_pkt.len == 0) ? T_EOF : T_DATA;
                    end
          T_DATA:   begin
                      tidx <= tidx + 1'b1;
                      if (tidx + 1'b1 == IDX_W'(buf_pkt.len)) ts <= T_EOF;
                    end
          T_EOF:    ts <= T_CRC_HI;
          T_CRC_HI: ts <= T_CRC_LO;
          T_CRC_LO: begin ts <= T_WAIT; to_cnt <= '0; end
          T_WAIT:   ;
          default:  ts <= T_IDLE;
        endcase
      end

      // acknowledgement wait runs whether or not a response slot is used
      if (ts == T_WAIT) begin
        if (ack_seen) begin
          buf_valid <= 1'b0;
          ts        <= T_IDLE;
        end else if (nak_seen) begin
          retransmits <= retransmits + 1'b1;
          ts          <= T_IDLE;
        end else if (to_cnt >= TO_W'(ACK_TIMEOUT - 1)) begin
          retransmits <= retransmits + 1'b1;
          timeouts    <= timeouts + 1'b1;
          ts          <= T_IDLE;
        end else begin
          to_cnt <= to_cnt + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Receive side
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {
    R_IDLE, R_HDR, R_DATA, R_CRC_HI, R_CRC_LO
  } rx_state_e;

  rx_state_e        rs;
  logic [IDX_W-1:0] ridx;
  logic [15:0]      crc_hi;
  logic             rcrc_init, rcrc_en;
  logic [31:0]      rcrc;
  logic             frame_bad;   // framing error inside a frame
  logic             frame_end;   // last CRC word arrives this cycle
  logic             crc_ok;

  crc32 #(.DW(WORD_W)) u_rx_crc (
    .clk, .rst_n, .init(rcrc_init), .en(rcrc_en), .data(rx_word), .crc(rcrc)
  );

  always_comb begin
    ack_seen  = rx_k && !rx_kerr && rx_word == W_ACK;
    nak_seen  = rx_k && !rx_kerr && rx_word == W_NAK;
    rcrc_init = rx_k && !rx_kerr && rx_word == W_SOF;
    rcrc_en   = !rx_k && !rx_kerr && (rs == R_HDR || (rs == R_DATA && ridx < IDX_W'(MAX_WORDS)));
    frame_end = !rx_k && !rx_kerr && rs == R_CRC_LO;
    crc_ok    = {crc_hi, rx_word} == rcrc;
    // anything in a frame that does not belong there: a damaged word, an
    // unexpected control word, EOF before the header, too many words
    frame_bad = 1'b0;
    if (rs != R_IDLE) begin
      if (rx_kerr)
        frame_bad = 1'b1;
      else if (rx_k && !(rx_word inside {W_IDLE, W_SYNC, W_ACK, W_NAK, W_SOF, W_EOF}))
        frame_bad = 1'b1;
      else if (rx_k && rx_word == W_EOF && rs != R_DATA)
        frame_bad = 1'b1;
      else if (!rx_k && rs == R_DATA && ridx >= IDX_W'(MAX_WORDS))
        frame_bad = 1'b1;
    end
    rx_valid    = frame_end && crc_ok && rx_ready;
    rsp_req     = frame_end || frame_bad;
    rsp_req_nak = frame_bad || !crc_ok || !rx_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs           <= R_IDLE;
      ridx         <= '0;
      crc_hi       <= '0;
      rx_pkt       <= '0;
      link_up      <= 1'b0;
      crc_errors   <= '0;
      busy_naks    <= '0;
      kchar_errors <= '0;
    end else begin
      if (rx_kerr) kchar_errors <= kchar_errors + 1'b1;
      if (rx_k && !rx_kerr && rx_word == W_SYNC) link_up <= 1'b1;

      if (frame_bad) begin
        crc_errors <= crc_errors + 1'b1;
        rs         <= R_IDLE;
      end else if (rx_k && !rx_kerr && rx_word == W_SOF) begin
        rs   <= R_HDR;
        ridx <= '0;
      end else if (rx_k && !rx_kerr && rx_word == W_EOF) begin
        if (rs == R_DATA) begin
          rx_pkt.len <= LEN_W'(ridx);
          rs         <= R_CRC_HI;
        end
      end else if (!rx_k && !rx_kerr) begin
        unique case (rs)
          R_IDLE:   ;
          R_HDR:    begin rx_pkt.hdr <= rx_word; rs <= R_DATA; end
          R_DATA:   begin
                      rx_pkt.data[ridx[LEN_W-1:0]] <= rx_word;
                      ridx <= ridx + 1'b1;
                    end
          R_CRC_HI: begin crc_hi <= rx_word; rs <= R_CRC_LO; end
          R_CRC_LO: begin
                      rs <= R_IDLE;
                      if (!crc_ok)        crc_errors <= crc_errors + 1'b1;
                      else if (!rx_ready) busy_naks  <= busy_naks + 1'b1;
                    end
          default:  rs <= R_IDLE;
        endcase
      end
    end
  end

  // a packet is only offered complete and checked
  assert property (@(posedge clk) disable iff (!rst_n) rx_valid |-> rx_ready);
  // the sender never changes the packet it holds before it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   buf_valid && !(ts == T_WAIT && ack_seen) |=> buf_valid && $stable(buf_pkt));

endmodule
