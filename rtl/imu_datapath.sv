// imu_datapath: the IMU data section around the main data multiplexer.
//
// The multiplexer has two registered 40-bit outputs, M and G. In every tick
// each of them can independently be loaded from one of five inputs (register
// bank, ALU, word from the BIP, the replicated 5-bit J-mux constant, the
// dynamic RAM output), from the other register, held, or (M_SWAP) loaded with
// its own two 20-bit halves exchanged, which is how the RAM row and column
// addresses are presented in turn. With merge set, only the bits selected by
// the register-bank word (used as a mask) are taken from the chosen input;
// the rest are kept. So a field of up to 5 bits can be put anywhere in M or
// G with a constant and a mask register.
//
// The register bank has NREGS 40-bit words and a single port: in a tick it is
// either read (as an input or mask) or written from G, not both. M drives the
// RAM address and data; G drives the ALU, the register bank write and the
// BIP output. M and G load at tick_end; a register write happens at tick_end.
// The ALU result enters on bits 31..0 with the top 8 bits zero; a BIP word
// enters on bits 33..0. Those two placements and the exact set of
// multiplexer codes are this design's choices; the rest follows the document.
module imu_datapath
  import grip_pkg::*;
#(
  parameter int NREGS = 4096,
  localparam int RAW  = $clog2(NREGS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick_end,
  input  tick_t       tk,
  input  logic [31:0] alu_y,
  input  word_t       bip_in,
  input  logic [MEM_W-1:0] dram_q,
  input  logic [4:0]  jval,
  output logic [MEM_W-1:0] m,
  output logic [MEM_W-1:0] g,
  // load port for the register bank
  input  logic        ld_we,
  input  logic [RAW-1:0] ld_addr,
  input  logic [MEM_W-1:0] ld_data
);
  logic [MEM_W-1:0] regs [NREGS];
  logic [MEM_W-1:0] regq, mnext, gnext;

  assign regq = regs[tk.reg_addr[RAW-1:0]];

  function automatic logic [MEM_W-1:0] pick(input mux_sel_e s, input logic [MEM_W-1:0] self,
      input logic [MEM_W-1:0] other, input logic [MEM_W-1:0] rq, input logic [31:0] ay,
      input word_t bw, input logic [4:0] jv, input logic [MEM_W-1:0] dq);
    unique case (s)
      MX_HOLD:  return self;
      MX_REG:   return rq;
      MX_ALU:   return {8'h00, ay};
      MX_BIP:   return {6'h00, bw};
      MX_CONST: return {8{jv}};
      MX_DRAM:  return dq;
      MX_OTHER: return other;
      default:  return {self[19:0], self[39:20]};
    endcase
  endfunction

  always_comb begin
    mnext = pick(tk.m_sel, m, g, regq, alu_y, bip_in, jval, dram_q);
    gnext = pick(tk.g_sel, g, m, regq, alu_y, bip_in, jval, dram_q);
    if (tk.m_merge) mnext = (m & ~regq) | (mnext & regq);
    if (tk.g_merge) gnext = (g & ~regq) | (gnext & regq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m <= '0; g <= '0;
    end else if (tick_end) begin
      m <= mnext; g <= gnext;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_we) regs[ld_addr] <= ld_data;
    else if (tick_end && tk.reg_we) regs[tk.reg_addr[RAW-1:0]] <= g;
  end

  // single port: a tick that writes the bank cannot also read it
  a_single_port: assert property (@(posedge clk) disable iff (!rst_n)
      (tick_end && tk.reg_we) |-> !(tk.m_sel == MX_REG || tk.g_sel == MX_REG || tk.m_merge || tk.g_merge))
    else $error("imu_datapath: register bank read and written in one tick");
endmodule
