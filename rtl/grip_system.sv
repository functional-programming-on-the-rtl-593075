// grip_system: a GRIP machine, NBOARDS identical boards on one Futurebus.
//
// Each board (grip_board) carries four PEs, one IMU and a Bus Interface
// Processor; boards exchange packets over the backplane (futurebus). Board b
// sits in slot b and answers to board address b. Everything outside the
// RTL is brought out per board: the PEs' BIP ports, the IMUs' RAM pins and a
// load port (standing in for the diagnostics bus) that writes a board's
// control store, Jump RAM or register bank, selected by ld_board. The
// document allows up to 21 boards on a half-metre bus, the default here.
module grip_system
  import grip_pkg::*;
#(
  parameter int NBOARDS    = 21,
  parameter int BUF_WORDS  = 8192,
  parameter int FRAME_LOG2 = 8,
  parameter int NREGS      = 4096,
  parameter int CS_WORDS   = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bip_req_t    pe_req [NBOARDS][NPE],
  output bip_rsp_t    pe_rsp [NBOARDS][NPE],
  output logic [NPE-1:0] pe_pending [NBOARDS],
  output logic        ras_n [NBOARDS],
  output logic        cs_n  [NBOARDS],
  output logic        we_n  [NBOARDS],
  output logic [10:0] addr  [NBOARDS],
  output logic [MEM_W-1:0] d [NBOARDS],
  output logic        d_par [NBOARDS],
  input  logic [MEM_W-1:0] q [NBOARDS],
  input  logic        q_par [NBOARDS],
  input  logic [NBOARDS-1:0] imu_run,
  input  logic [4:0]  ld_board,
  input  logic        ld_cs_we,
  input  logic        ld_jr_we,
  input  logic        ld_reg_we,
  input  logic [12:0] ld_addr,
  input  logic [125:0] ld_data,
  output logic [NBOARDS-1:0] par_err,
  output board_ev_t   ev [NBOARDS],
  output logic        ev_handover
);
  fb_out_t fo [NBOARDS];
  fb_in_t  fi;
  logic    s_ready [NBOARDS];
  logic    s_nak [NBOARDS];
  logic    bus_ready, bus_nak;

  futurebus #(.NBOARDS(NBOARDS)) u_bus (.clk, .rst_n, .fo, .s_ready, .s_nak, .fi, .bus_ready, .bus_nak,
                                           .ev_handover);

  for (genvar b = 0; b < NBOARDS; b++) begin : g_board
    wire sel = (ld_board == 5'(b));
    grip_board #(.BUF_WORDS(BUF_WORDS), .FRAME_LOG2(FRAME_LOG2), .NREGS(NREGS),
                 .CS_WORDS(CS_WORDS)) u_board (
      .clk, .rst_n, .board_id(5'(b)), .pe_req(pe_req[b]), .pe_rsp(pe_rsp[b]),
      .pe_pending(pe_pending[b]), .fo(fo[b]), .fi, .bus_ready, .bus_nak,
      .s_ready(s_ready[b]), .s_nak(s_nak[b]),
      .ras_n(ras_n[b]), .cs_n(cs_n[b]), .we_n(we_n[b]), .addr(addr[b]), .d(d[b]),
      .d_par(d_par[b]), .q(q[b]), .q_par(q_par[b]), .imu_run(imu_run[b]),
      .ld_cs_we(ld_cs_we && sel), .ld_jr_we(ld_jr_we && sel), .ld_reg_we(ld_reg_we && sel),
      .ld_addr, .ld_data, .par_err(par_err[b]), .ev(ev[b]));
  end
endmodule
