// bip_imu_if: the interface between a board's BIP and its IMU.
//
// Input side: a latch holds the next word of the packet at the head of the
// IMU's input queue, fetched ahead of time so the IMU never waits for a BIP
// cycle when the word is already there. in_valid says the latch is full;
// in_rd (one clock) takes the word. After the last word of a packet (bit 33
// clear) is fetched, the frame is handed back to the free stack.
//
// Mouth-open: when the IMU queue is empty the fetcher waits with its "mouth
// open", watching the BIP's buffer writes. An address word written for the
// IMU (by the Futurebus receiver, or by a local PE naming this board) is
// caught into the latch as it goes by. It is offered to the IMU once that
// frame reaches the head of the IMU queue; if another packet gets there
// first, the caught word is dropped and the head is read normally.
//
// Output side: the IMU hands one word at a time (out_wr while out_ready); the
// first word claims a frame from the free stack, each word is written at the
// next sub-packet address and the last word sends the packet (DST_ROUTE).
// Output operations take precedence over prefetch reads on the one BIP port.
// The prefetch and mouth-open behaviour follow the document; the handshake
// and the choice of what counts as an IMU-bound write are this design's own.
module bip_imu_if
  import grip_pkg::*;
#(
  parameter int FRAME_LOG2 = 8,
  parameter int PAW        = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  board_id,
  // IMU side
  output logic        in_valid,
  output word_t       in_data,
  input  logic        in_rd,
  output logic        out_ready,
  input  logic        out_wr,
  input  word_t       out_data,
  // BIP side
  output bip_req_t    req,
  input  bip_rsp_t    rsp,
  input  logic        imu_pending,
  input  logic [PAW-1:0] imu_head,
  input  logic        snp_we,
  input  logic [2:0]  snp_master,
  input  logic [PAW-1:0] snp_pkt,
  input  logic [FRAME_LOG2-1:0] snp_sub,
  input  word_t       snp_data,
  output logic        ev_mouth_catch
);
  typedef enum logic [2:0] {B_IDLE, B_OUT, B_RD, B_FREE} bst_e;
  bst_e bst;

  word_t lat;
  logic  lat_full;
  logic  caught;                // latch holds a word caught from a snooped write
  logic [PAW-1:0] caught_pkt;
  logic [FRAME_LOG2-1:0] idx;   // next word of the input packet to fetch
  logic  need_free;

  word_t olat;
  logic  olat_full;
  logic [FRAME_LOG2-1:0] oidx;

  addr_word_t saw;
  assign saw = addr_word_t'(snp_data);
  wire imu_bound = (snp_master == 3'(M_FBRX)) ||
                   (snp_master <= 3'd3 && saw.board == board_id);
  wire mouth_open = !imu_pending && !lat_full && idx == '0 && !need_free;
  wire catch_now  = mouth_open && snp_we && snp_sub == '0 && saw.opcode != 5'd0 && imu_bound;

  assign in_valid  = lat_full && (!caught || (imu_pending && imu_head == caught_pkt));
  assign in_data   = lat;
  assign out_ready = !olat_full;
  assign ev_mouth_catch = catch_now;

  wire olast = !olat[WORD_W-1];
  always_comb begin
    req = '0;
    unique case (bst)
      B_OUT: begin
        req.go    = 1'b1;
        req.src   = (oidx == '0) ? SRC_FREE : SRC_TEMP;
        req.dst   = olast ? DST_ROUTE : DST_TEMP;
        req.sub   = SUB_W'(oidx);
        req.we    = 1'b1;
        req.wdata = olat;
      end
      B_RD: begin
        req.go  = 1'b1;
        req.src = SRC_INQ;
        req.dst = DST_KEEP;
        req.sub = SUB_W'(idx);
      end
      B_FREE: begin
        req.go  = 1'b1;
        req.src = SRC_INQ;
        req.dst = DST_FREE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; lat <= '0; lat_full <= 1'b0; caught <= 1'b0; caught_pkt <= '0;
      idx <= '0; need_free <= 1'b0; olat <= '0; olat_full <= 1'b0; oidx <= '0;
    end else begin
      if (out_wr && !olat_full) begin
        olat <= out_data; olat_full <= 1'b1;
      end
      if (in_rd && in_valid) begin
        lat_full <= 1'b0; caught <= 1'b0;
      end
      // a caught word whose frame is overtaken by another packet is dropped
      if (lat_full && caught && imu_pending && imu_head != caught_pkt) begin
        lat_full <= 1'b0; caught <= 1'b0; idx <= '0; need_free <= 1'b0;
      end
      if (catch_now) begin
        lat <= snp_data; lat_full <= 1'b1; caught <= 1'b1; caught_pkt <= snp_pkt;
        if (snp_data[WORD_W-1]) idx <= FRAME_LOG2'(1);
        else need_free <= 1'b1;
      end
      unique case (bst)
        B_IDLE: begin
          if (olat_full) bst <= B_OUT;
          else if (need_free && imu_pending && (!caught || imu_head == caught_pkt)) bst <= B_FREE;
          else if (!lat_full && imu_pending && !need_free && !catch_now &&
                   !(in_rd && in_valid)) bst <= B_RD;
        end
        B_OUT: if (rsp.done) begin
          bst <= B_IDLE;
          if (!rsp.fail) begin
            olat_full <= 1'b0;
            oidx <= olast ? '0 : oidx + 1'b1;
          end
        end
        B_RD: if (rsp.done) begin
          bst <= B_IDLE;
          if (!rsp.fail) begin
            lat <= rsp.rdata; lat_full <= 1'b1; caught <= 1'b0;
            if (!rsp.rdata[WORD_W-1]) begin idx <= '0; need_free <= 1'b1; end
            else idx <= idx + 1'b1;
          end
        end
        B_FREE: if (rsp.done) begin
          bst <= B_IDLE;
          need_free <= 1'b0;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end
endmodule
