// grip_board: one GRIP board.
//
// Four Processing Elements and one Intelligent Memory Unit share the board's
// internal bus to its Bus Interface Processor, which connects them with each
// other and, through the Futurebus interface logic, with the other boards.
// The PEs (68020 processors) are not part of this RTL: their BIP request and
// response ports, and the status of their input queues, are board ports.
// The IMU's RAM pins and the load port that stands in for the diagnostics bus
// are ports too. BIP masters: PE0..3, the IMU interface, Futurebus transmit,
// Futurebus receive. board_id is the board's slot number on the backplane.
module grip_board
  import grip_pkg::*;
#(
  parameter int BUF_WORDS  = 8192,
  parameter int FRAME_LOG2 = 8,
  parameter int NREGS      = 4096,
  parameter int CS_WORDS   = 8192,
  parameter int MAX_TENURE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  board_id,
  // PEs
  input  bip_req_t    pe_req [NPE],
  output bip_rsp_t    pe_rsp [NPE],
  output logic [NPE-1:0] pe_pending,
  // Futurebus
  output fb_out_t     fo,
  input  fb_in_t      fi,
  input  logic        bus_ready,
  input  logic        bus_nak,
  output logic        s_ready,
  output logic        s_nak,
  // IMU RAM pins
  output logic        ras_n,
  output logic        cs_n,
  output logic        we_n,
  output logic [10:0] addr,
  output logic [MEM_W-1:0] d,
  output logic        d_par,
  input  logic [MEM_W-1:0] q,
  input  logic        q_par,
  // diagnostics load port and control
  input  logic        imu_run,
  input  logic        ld_cs_we,
  input  logic        ld_jr_we,
  input  logic        ld_reg_we,
  input  logic [12:0] ld_addr,
  input  logic [125:0] ld_data,
  output logic        par_err,
  output board_ev_t   ev
);
  localparam int PAW = $clog2(BUF_WORDS) - FRAME_LOG2;

  bip_req_t req [NMASTERS];
  bip_rsp_t rsp [NMASTERS];
  logic [4:0] inq_pending;
  logic [PAW-1:0] imu_head;
  logic send_pending, snp_we;
  logic [2:0] snp_master;
  logic [PAW-1:0] snp_pkt;
  logic [FRAME_LOG2-1:0] snp_sub;
  word_t snp_data;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    assign req[p]    = pe_req[p];
    assign pe_rsp[p] = rsp[p];
  end
  assign pe_pending = inq_pending[NPE-1:0];

  bip #(.BUF_WORDS(BUF_WORDS), .FRAME_LOG2(FRAME_LOG2)) u_bip (
    .clk, .rst_n, .board_id, .req, .rsp, .inq_pending, .imu_head, .send_pending,
    .free_empty(), .snp_we, .snp_master, .snp_pkt, .snp_sub, .snp_data,
    .ev_swap(ev.swap), .ev_local(ev.route_local), .ev_remote(ev.route_remote));

  logic  in_valid, in_rd, out_ready, out_wr;
  word_t in_data, out_data;

  bip_imu_if #(.FRAME_LOG2(FRAME_LOG2), .PAW(PAW)) u_imuif (
    .clk, .rst_n, .board_id, .in_valid, .in_data, .in_rd, .out_ready, .out_wr, .out_data,
    .req(req[M_IMU]), .rsp(rsp[M_IMU]), .imu_pending(inq_pending[Q_IMU]), .imu_head,
    .snp_we, .snp_master, .snp_pkt, .snp_sub, .snp_data, .ev_mouth_catch(ev.mouth));

  fb_if #(.MAX_TENURE(MAX_TENURE)) u_fb (
    .clk, .rst_n, .board_id, .fo, .fi, .bus_ready, .bus_nak, .s_ready, .s_nak, .send_pending,
    .tx_req(req[M_FBTX]), .tx_rsp(rsp[M_FBTX]), .rx_req(req[M_FBRX]), .rx_rsp(rsp[M_FBRX]),
    .ev_nak(ev.nak), .ev_tx_pkt(ev.tx_pkt), .ev_rx_pkt(ev.rx_pkt), .ev_burst(ev.burst));

  imu #(.NREGS(NREGS), .CS_WORDS(CS_WORDS)) u_imu (
    .clk, .rst_n, .run(imu_run), .in_valid, .in_data, .in_rd, .out_ready, .out_wr, .out_data,
    .ras_n, .cs_n, .we_n, .addr, .d, .d_par, .q, .q_par,
    .ld_cs_we, .ld_jr_we, .ld_reg_we, .ld_addr, .ld_data,
    .par_err, .m_out(), .g_out(), .ev_refresh(ev.refresh), .ev_bip_stall(ev.imu_stall), .ev_tick());
endmodule
