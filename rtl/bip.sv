// bip: the Bus Interface Processor, the "post office" of a GRIP board.
//
// Holds a buffer memory of BUF_WORDS 34-bit words cut into 2**FRAME_LOG2-word
// packet frames; a word's address is {frame number, sub-packet address}. Frame
// numbers (packet addresses) circulate between a free stack, input queues for
// PE0..PE3 and the IMU, two send queues (SendA/SendB) and a temporary store.
// Packet data never moves: only its frame number does.
//
// Masters (PE0..3, IMU interface, Futurebus transmit and receive) present a
// bip_req_t with go held high; an arbiter grants one at a time, round robin,
// and the BIP answers with done for one clock (the Go/Done handshake). In one
// operation the BIP takes a frame number from src, reads or writes the word
// at {frame, sub} and then moves the frame number as dst says, so a one-word
// packet is claimed, written and sent in a single operation. DST_ROUTE sends a
// packet to a local input queue when the address word names this board
// (opcode 0: the PE named, else the IMU) and to the active send queue
// otherwise; DST_LOCAL routes received packets to a local queue. When the
// active send queue is empty and the other is not, the two swap roles.
//
// Timing: with no other master waiting, done comes in the fourth clock after
// go is raised (the fifth when routing has to read the address word back
// from the buffer). Read data comes with done.
// The document's BIP is asynchronous and built of PALs; this one is
// synchronous, with a round-robin arbiter, one temporary-store entry per
// master and its own src/dst request encoding, all choices of this design.
module bip
  import grip_pkg::*;
#(
  parameter int BUF_WORDS  = 8192,
  parameter int FRAME_LOG2 = 8,
  localparam int PAW = $clog2(BUF_WORDS) - FRAME_LOG2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  board_id,
  input  bip_req_t    req [NMASTERS],
  output bip_rsp_t    rsp [NMASTERS],
  // status
  output logic [4:0]  inq_pending,     // PE0..3, IMU input queue not empty
  output logic [PAW-1:0] imu_head,     // frame at the head of the IMU queue
  output logic        send_pending,    // active send queue not empty
  output logic        free_empty,
  // every buffer write, for the IMU prefetch logic
  output logic        snp_we,
  output logic [2:0]  snp_master,
  output logic [PAW-1:0] snp_pkt,
  output logic [FRAME_LOG2-1:0] snp_sub,
  output word_t       snp_data,
  // event counters' strobes
  output logic        ev_swap,
  output logic        ev_local,
  output logic        ev_remote
);
  localparam int NFR = 1 << PAW;

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_CAP, S_RT, S_DONE} st_e;
  st_e st;

  word_t buf_mem [BUF_WORDS];
  word_t rdq, rdata_hold;

  logic [2:0] mid, rr;
  bip_req_t   r;
  logic       fail_r;
  logic [PAW-1:0] pa_r;
  logic       act;                       // 0: SendA active, 1: SendB active
  logic [PAW-1:0] temp [NMASTERS];
  logic [NMASTERS-1:0] tvalid;

  // queues
  logic [NQUEUES-1:0] q_push, q_pop, q_empty;
  logic [PAW-1:0] q_din [NQUEUES];
  logic [PAW-1:0] q_head [NQUEUES];
  for (genvar q = 0; q < NQUEUES; q++) begin : g_q
    bip_queue #(.DEPTH(NFR), .AW(PAW)) u_q (
      .clk, .rst_n, .push(q_push[q]), .din(q_din[q]), .pop(q_pop[q]),
      .head(q_head[q]), .empty(q_empty[q]), .full(), .count());
  end

  logic fs_push, fs_pop, fs_empty;
  logic [PAW-1:0] fs_din, fs_top;
  bip_free_stack #(.DEPTH(NFR), .AW(PAW)) u_fs (
    .clk, .rst_n, .push(fs_push), .din(fs_din), .pop(fs_pop),
    .top(fs_top), .empty(fs_empty), .count());

  assign inq_pending  = ~q_empty[4:0];
  assign imu_head     = q_head[Q_IMU];
  assign send_pending = !q_empty[act ? Q_SENDB : Q_SENDA];
  assign free_empty   = fs_empty;

  wire [2:0] q_act   = act ? 3'(Q_SENDB) : 3'(Q_SENDA);
  wire [2:0] q_other = act ? 3'(Q_SENDA) : 3'(Q_SENDB);

  // round-robin pick among requesting masters
  logic       any_go;
  logic [2:0] pick;
  always_comb begin
    any_go = 1'b0;
    pick   = '0;
    for (int k = 1; k <= NMASTERS; k++) begin
      int m;
      m = (int'(rr) + k) % NMASTERS;
      if (!any_go && req[m].go) begin
        any_go = 1'b1;
        pick   = 3'(m);
      end
    end
  end

  // packet address named by the request's src
  logic           src_ok;
  logic [PAW-1:0] src_pa;
  always_comb begin
    src_ok = 1'b0;
    src_pa = '0;
    unique case (r.src)
      SRC_FREE:  begin src_ok = !fs_empty;    src_pa = fs_top;    end
      SRC_TEMP:  begin src_ok = tvalid[mid];  src_pa = temp[mid]; end
      SRC_INQ:   begin src_ok = (mid <= 3'(Q_IMU)) && !q_empty[mid]; src_pa = q_head[mid]; end
      SRC_SENDQ: begin src_ok = !q_empty[q_act]; src_pa = q_head[q_act]; end
    endcase
  end

  function automatic logic [2:0] route_q(input word_t w, input logic local_only,
                                         input logic [4:0] me, input logic [2:0] sendq);
    addr_word_t aw;
    aw = addr_word_t'(w);
    if (local_only || aw.board == me) return (aw.opcode == 5'd0) ? {1'b0, aw.pe} : 3'(Q_IMU);
    return sendq;
  endfunction

  wire need_route = (r.dst == DST_ROUTE) || (r.dst == DST_LOCAL);
  wire w0_now     = r.we && (r.sub[FRAME_LOG2-1:0] == '0);

  always_comb begin
    q_push = '0; q_pop = '0; fs_push = 1'b0; fs_pop = 1'b0; fs_din = src_pa;
    for (int q = 0; q < NQUEUES; q++) q_din[q] = src_pa;
    ev_local = 1'b0; ev_remote = 1'b0;
    if (st == S_EXEC && src_ok) begin
      if (r.src == SRC_FREE && r.dst != DST_FREE) fs_pop = 1'b1;
      // leaving the source
      if (r.dst == DST_FREE || r.dst == DST_RESEND || need_route) begin
        if (r.src == SRC_INQ)   q_pop[mid]   = 1'b1;
        if (r.src == SRC_SENDQ) q_pop[q_act] = 1'b1;
      end
      if (r.dst == DST_FREE && r.src != SRC_FREE) fs_push = 1'b1;
      if (r.dst == DST_RESEND) q_push[q_other] = 1'b1;
      if (need_route && w0_now) begin
        q_push[route_q(r.wdata, r.dst == DST_LOCAL, board_id, q_act)] = 1'b1;
        ev_local  = (route_q(r.wdata, r.dst == DST_LOCAL, board_id, q_act) != q_act);
        ev_remote = !ev_local;
      end
    end
    if (st == S_RT) begin
      for (int q = 0; q < NQUEUES; q++) q_din[q] = pa_r;
      q_push[route_q(rdq, r.dst == DST_LOCAL, board_id, q_act)] = 1'b1;
      ev_local  = (route_q(rdq, r.dst == DST_LOCAL, board_id, q_act) != q_act);
      ev_remote = !ev_local;
    end
  end

  always_comb begin
    for (int m = 0; m < NMASTERS; m++) begin
      rsp[m].done  = (st == S_DONE) && (mid == 3'(m));
      rsp[m].fail  = fail_r;
      rsp[m].rdata = rdata_hold;
    end
  end

  assign snp_we     = (st == S_EXEC) && src_ok && r.we;
  assign snp_master = mid;
  assign snp_pkt    = src_pa;
  assign snp_sub    = r.sub[FRAME_LOG2-1:0];
  assign snp_data   = r.wdata;

  // buffer memory: one access per clock, synchronous read
  always_ff @(posedge clk) begin
    if (st == S_EXEC && src_ok) begin
      if (r.we) buf_mem[{src_pa, r.sub[FRAME_LOG2-1:0]}] <= r.wdata;
      else      rdq <= buf_mem[{src_pa, r.sub[FRAME_LOG2-1:0]}];
    end else if (st == S_CAP) begin
      rdq <= buf_mem[{pa_r, {FRAME_LOG2{1'b0}}}];
    end
  end

  assign ev_swap = (st == S_IDLE) && q_empty[q_act] && !q_empty[q_other];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; mid <= '0; rr <= 3'(NMASTERS-1); r <= '0; fail_r <= 1'b0;
      pa_r <= '0; act <= 1'b0; tvalid <= '0; rdata_hold <= '0;
      for (int m = 0; m < NMASTERS; m++) temp[m] <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (ev_swap) act <= ~act;
          else if (any_go) begin
            mid <= pick; rr <= pick; r <= req[pick]; st <= S_EXEC;
          end
        end
        S_EXEC: begin
          fail_r <= !src_ok;
          pa_r   <= src_pa;
          if (src_ok) begin
            if (r.dst == DST_TEMP || (r.dst == DST_KEEP && r.src == SRC_FREE)) begin
              temp[mid] <= src_pa; tvalid[mid] <= 1'b1;
            end
            if (r.src == SRC_TEMP && r.dst != DST_KEEP && r.dst != DST_TEMP)
              tvalid[mid] <= 1'b0;
          end
          st <= S_CAP;
        end
        S_CAP: begin
          rdata_hold <= rdq;
          st <= (!fail_r && need_route && !w0_now) ? S_RT : S_DONE;
        end
        S_RT:   st <= S_DONE;
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // Go/Done rule: a master keeps go high until it sees done.
  for (genvar m = 0; m < NMASTERS; m++) begin : g_hs
    a_go_held: assert property (@(posedge clk) disable iff (!rst_n)
        (st != S_IDLE && mid == 3'(m) && st != S_DONE) |-> req[m].go)
      else $error("bip: master %0d dropped go before done", m);
  end
endmodule
