// fb_if: the Futurebus interface logic of one board.
//
// Two independent state machines, each a master of the board's BIP.
//
// Transmit: when the BIP's active send queue holds a packet the transmitter
// requests the bus. Once granted it reads the packet word by word from the
// head of the send queue and drives it onto the bus; reading is pipelined so
// that the next word is fetched from the BIP while the current one waits for
// the slave's ready. A packet that was taken is returned to the free stack; a
// packet refused with nak (the receiver had no empty frame) is moved to the
// other send queue to be sent again, and the bus is released. Packets are
// sent end to end in one bus tenure, up to MAX_TENURE packets.
//
// Receive: the receiver claims an empty frame from the free stack ahead of
// time. An address word naming this board is accepted only if such a frame is
// held (otherwise nak). The board field of the address word is replaced by
// the sending board's number, and each word is written into the frame; the
// last one routes the packet to the local PE or IMU input queue.
//
// The transmitter only ever reads the BIP, so the write-data and write-enable
// fields of tx_req are constant zero.
//
// The pipelining, resend queue and board-field rewrite follow the document;
// the tenure limit, the one-word receive buffer and the handshakes are this
// design's own.
module fb_if
  import grip_pkg::*;
#(
  parameter int MAX_TENURE = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic [4:0] board_id,
  output fb_out_t  fo,
  input  fb_in_t   fi,
  input  logic     bus_ready,      // answer of the current slave
  input  logic     bus_nak,
  output logic     s_ready,        // this board's answer as slave
  output logic     s_nak,
  input  logic     send_pending,
  output bip_req_t tx_req,
  input  bip_rsp_t tx_rsp,
  output bip_req_t rx_req,
  input  bip_rsp_t rx_rsp,
  output logic     ev_nak,
  output logic     ev_tx_pkt,
  output logic     ev_rx_pkt,
  output logic     ev_burst
);
  // ---------------- transmit ----------------
  typedef enum logic [1:0] {R_CLAIM, R_READY, R_WRITE} rst_e;
  rst_e rst;
  logic   frame_ok, rx_active, rbuf_full;
  word_t  rbuf;
  logic [7:0] widx;
  logic   rx_ready, rx_nak;
  typedef enum logic [1:0] {T_IDLE, T_WAITG, T_SEND, T_END} tst_e;
  typedef enum logic [1:0] {P_IDLE, P_FETCH, P_END} pst_e;
  tst_e tst;
  pst_e pst;
  word_t cur, nxt;
  logic  cur_full, nxt_full, cur_first, nxt_first, fetched_last, naked, sent_ok;
  logic [7:0] fidx;
  logic [7:0] npk;

  wire granted = fi.gnt_valid && fi.master == board_id;
  wire my_xfer = granted && fo.valid;
  wire took    = my_xfer && bus_ready;
  wire refused = my_xfer && bus_nak;

  always_comb begin
    tx_req = '0;
    tx_req.src = SRC_SENDQ;
    if (pst == P_FETCH) begin
      tx_req.go  = 1'b1;
      tx_req.dst = DST_KEEP;
      tx_req.sub = fidx;
    end else if (pst == P_END) begin
      tx_req.go  = 1'b1;
      tx_req.dst = naked ? DST_RESEND : DST_FREE;
    end
  end

  always_comb begin
    fo = '0;
    fo.req   = (tst != T_IDLE);
    fo.valid = (tst == T_SEND) && granted && cur_full && !naked;
    fo.first = cur_first;
    fo.data  = cur;
  end
  assign s_ready = rx_ready;
  assign s_nak   = rx_nak;

  assign ev_nak    = refused;
  assign ev_tx_pkt = took && !cur[WORD_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_IDLE; pst <= P_IDLE; cur <= '0; nxt <= '0; cur_full <= 1'b0; nxt_full <= 1'b0;
      cur_first <= 1'b0; nxt_first <= 1'b0; fetched_last <= 1'b0; naked <= 1'b0;
      sent_ok <= 1'b0; fidx <= '0; npk <= '0; ev_burst <= 1'b0;
    end else begin
      ev_burst <= 1'b0;
      unique case (tst)
        T_IDLE: if (send_pending) begin tst <= T_WAITG; npk <= '0; end
        T_WAITG: if (granted) begin
          tst <= T_SEND; fidx <= '0; fetched_last <= 1'b0; naked <= 1'b0; sent_ok <= 1'b0;
          cur_full <= 1'b0; nxt_full <= 1'b0;
        end
        T_SEND: begin
          // bus side
          if (took) begin
            cur_full <= 1'b0;
            if (!cur[WORD_W-1]) sent_ok <= 1'b1;
          end
          if (refused) naked <= 1'b1;
          if ((!cur_full || took) && nxt_full) begin
            cur <= nxt; cur_first <= nxt_first; cur_full <= 1'b1; nxt_full <= 1'b0;
          end
          // BIP side
          unique case (pst)
            P_IDLE: if (!naked && !refused && !fetched_last && !nxt_full) pst <= P_FETCH;
            P_FETCH: if (tx_rsp.done) begin
              pst <= P_IDLE;
              if (!tx_rsp.fail) begin
                nxt <= tx_rsp.rdata; nxt_full <= 1'b1; nxt_first <= (fidx == 8'd0);
                fidx <= fidx + 1'b1;
                if (!tx_rsp.rdata[WORD_W-1]) fetched_last <= 1'b1;
              end
            end
            default: pst <= P_IDLE;
          endcase
          if ((naked || sent_ok) && pst == P_IDLE) begin
            tst <= T_END; pst <= P_END;
          end
        end
        T_END: if (tx_rsp.done) begin
          pst <= P_IDLE;
          npk <= npk + 1'b1;
          if (!naked && send_pending && int'(npk) + 1 < MAX_TENURE) begin
            tst <= T_SEND; fidx <= '0; fetched_last <= 1'b0; sent_ok <= 1'b0;
            cur_full <= 1'b0; nxt_full <= 1'b0; ev_burst <= 1'b1;
          end else tst <= T_IDLE;
        end
        default: tst <= T_IDLE;
      endcase
    end
  end

  // ---------------- receive ----------------

  wire addr_me = fi.valid && fi.first && fi.data[25:21] == board_id;
  wire data_me = fi.valid && !fi.first && rx_active;
  assign rx_nak   = addr_me && (!frame_ok || rx_active || rbuf_full);
  assign rx_ready = (addr_me && !rx_nak) || (data_me && !rbuf_full);
  assign ev_rx_pkt = rx_ready && !fi.data[WORD_W-1];

  always_comb begin
    rx_req = '0;
    if (rst == R_CLAIM) begin
      rx_req.go  = 1'b1;
      rx_req.src = SRC_FREE;
      rx_req.dst = DST_TEMP;
    end else if (rst == R_WRITE) begin
      rx_req.go    = 1'b1;
      rx_req.src   = SRC_TEMP;
      rx_req.dst   = rbuf[WORD_W-1] ? DST_KEEP : DST_LOCAL;
      rx_req.sub   = widx;
      rx_req.we    = 1'b1;
      rx_req.wdata = rbuf;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst <= R_CLAIM; frame_ok <= 1'b0; rx_active <= 1'b0; rbuf_full <= 1'b0;
      rbuf <= '0; widx <= '0;
    end else begin
      if (rx_ready) begin
        rbuf_full <= 1'b1;
        rbuf      <= fi.data;
        if (fi.first) begin
          rbuf[25:21] <= fi.master;   // board field now names the sender
          rx_active   <= 1'b1;
        end
        if (!fi.data[WORD_W-1]) rx_active <= 1'b0;
      end
      unique case (rst)
        R_CLAIM: if (rx_rsp.done) begin
          rst <= R_READY;
          frame_ok <= !rx_rsp.fail;
        end
        R_READY: begin
          if (!frame_ok) rst <= R_CLAIM;
          else if (rbuf_full) rst <= R_WRITE;
        end
        R_WRITE: if (rx_rsp.done) begin
          rbuf_full <= 1'b0;
          if (!rbuf[WORD_W-1]) begin
            widx <= '0; frame_ok <= 1'b0; rst <= R_CLAIM;
          end else begin
            widx <= widx + 1'b1; rst <= R_READY;
          end
        end
        default: rst <= R_CLAIM;
      endcase
    end
  end
endmodule
