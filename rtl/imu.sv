// imu: an Intelligent Memory Unit, the microprogrammed engine that holds a
// board's share of the graph in dynamic RAM and performs structured graph
// operations on request packets.
//
// It joins the control section (imu_control: control store, Jump RAM,
// sequencer, CC and J latches, tick/tock timing), the data section
// (imu_datapath: main multiplexer with M and G, register bank), the
// half-speed 2901-style ALU (imu_alu) and the RAM control (imu_dram_ctrl).
// The RAM chips themselves are outside: their pins are ports.
//
// clk is the sub-tick clock; a tick is three clocks and a control cycle two
// ticks. The whole IMU holds still (no tick starts) while run is low, while a
// refresh is in progress, or when the tick about to start reads a word from
// the BIP input latch that is not there yet or writes a word to the BIP
// output latch that is still full. A word read from the BIP is taken at the
// end of the tick that selects it; a word written to the BIP is G as it stands
// during that tick.
//
// Condition inputs of the CC mux (the rest read 0): 0 true, 1 ALU zero,
// 2 carry, 3 sign, 4 overflow, 5 BIP input word ready, 6 BIP output free,
// 7 G pointer bit, 8 M pointer bit, 9 parity error, 10 G is a last word.
// That assignment is this design's own.
module imu
  import grip_pkg::*;
#(
  parameter int NREGS        = 4096,
  parameter int CS_WORDS     = 8192,
  parameter int REF_INTERVAL = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // BIP interface
  input  logic        in_valid,
  input  word_t       in_data,
  output logic        in_rd,
  input  logic        out_ready,
  output logic        out_wr,
  output word_t       out_data,
  // dynamic RAM pins
  output logic        ras_n,
  output logic        cs_n,
  output logic        we_n,
  output logic [10:0] addr,
  output logic [MEM_W-1:0] d,
  output logic        d_par,
  input  logic [MEM_W-1:0] q,
  input  logic        q_par,
  // load port (diagnostics)
  input  logic        ld_cs_we,
  input  logic        ld_jr_we,
  input  logic        ld_reg_we,
  input  logic [12:0] ld_addr,
  input  logic [125:0] ld_data,
  // status
  output logic        par_err,
  output logic [MEM_W-1:0] m_out,
  output logic [MEM_W-1:0] g_out,
  output logic        ev_refresh,
  output logic        ev_bip_stall,
  output logic        ev_tick
);
  tick_t  tk;
  cycle_t cyc;
  logic [4:0] jval;
  logic [1:0] st;
  logic phase, tick_start, tick_end, cyc_end, active;
  logic [MEM_W-1:0] m, g;
  logic [31:0] alu_y;
  logic alu_c, alu_z, alu_s, alu_v;
  logic ref_hold;
  logic [31:0] cc_in;

  wire at_start  = (st == 2'd0) && !active;
  assign ev_bip_stall = run && at_start && !ref_hold &&
                        ((tk.bip_rd && !in_valid) || (tk.bip_wr && !out_ready));
  wire hold = !run || ref_hold || ev_bip_stall;
  assign ev_tick = tick_start;

  always_comb begin
    cc_in = '0;
    cc_in[CC_TRUE]   = 1'b1;
    cc_in[CC_ZERO]   = alu_z;
    cc_in[CC_CARRY]  = alu_c;
    cc_in[CC_SIGN]   = alu_s;
    cc_in[CC_OVR]    = alu_v;
    cc_in[CC_BIPIN]  = in_valid;
    cc_in[CC_BIPOUT] = out_ready;
    cc_in[CC_GPTR]   = g[32];
    cc_in[CC_MPTR]   = m[32];
    cc_in[CC_PARERR] = par_err;
    cc_in[CC_GLAST]  = !g[WORD_W-1];
  end

  imu_control #(.CS_WORDS(CS_WORDS)) u_ctl (
    .clk, .rst_n, .hold, .cc_in, .mem_tag(q[39:35]), .g_tag(g[39:35]), .g_flags(g[30:26]),
    .tk, .cyc, .jval, .st, .phase, .tick_start, .active, .tick_end, .cyc_end, .upc_addr(),
    .ld_cs_we, .ld_jr_we, .ld_addr, .ld_data);

  imu_datapath #(.NREGS(NREGS)) u_dp (
    .clk, .rst_n, .tick_end, .tk, .alu_y, .bip_in(in_data), .dram_q(q), .jval, .m, .g,
    .ld_we(ld_reg_we), .ld_addr(ld_addr[$clog2(NREGS)-1:0]), .ld_data(ld_data[MEM_W-1:0]));

  imu_alu #(.W(32), .NREGS(64)) u_alu (
    .clk, .rst_n, .cyc_end, .i(cyc.alu_i), .a_addr(cyc.alu_a), .b_addr(cyc.alu_b),
    .cin(cyc.alu_cin), .d(g[31:0]), .y(alu_y), .cout(alu_c), .zero(alu_z), .sign(alu_s),
    .ovr(alu_v));

  imu_dram_ctrl #(.REF_INTERVAL(REF_INTERVAL)) u_dram (
    .clk, .rst_n, .tick_start, .tick_end, .st, .active, .tk, .m,
    .check(tk.m_sel == MX_DRAM || tk.g_sel == MX_DRAM), .q, .q_par,
    .ras_n, .cs_n, .we_n, .addr, .d, .d_par, .hold(ref_hold), .par_err, .ev_refresh);

  assign in_rd    = tick_end && tk.bip_rd;
  assign out_wr   = tick_end && tk.bip_wr;
  assign out_data = g[WORD_W-1:0];
  assign m_out    = m;
  assign g_out    = g;
endmodule
