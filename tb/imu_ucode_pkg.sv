// imu_ucode_pkg: microinstruction builders and a request-serving IMU
// microprogram used by the IMU, board and system testbenches.
//
// Request packets served (word 1 is a RAM word address, row in bits 10..0
// and column in bits 30..20):
//   opcode 1 READ : [addr word][address]         -> reply [header][word]
//   opcode 2 WRITE: [addr word][address][data]   -> reply [header] (one word)
//   opcode 3 CHASE: [addr word][address]         -> follow words whose pointer
//                   bit (32) is set, using each as the next address; reply
//                   [header][first word without the pointer bit]
// The reply header is the request's address word with its opcode cleared: it
// already names the requesting board and PE. Dispatch is a 32-way jump on
// the opcode field of G (the J mux "G flags" input) through Jump RAM page
// DISPATCH_PAGE; every other Jump RAM page holds its own page number in
// location 0, so that jumps with J forced to zero go where the
// microinstruction says.
// Register bank: 1 = opcode-field mask, 2 = bit 33 ("more") mask, 3 = scratch.
package imu_ucode_pkg;
  import grip_pkg::*;

  localparam logic [7:0] DISPATCH_PAGE = 8'hF0;
  localparam int A_IDLE = 0, A_READ = 'h10, A_WRITE = 'h20, A_CHASE = 'h30, A_CDONE = 'h34;

  function automatic tick_t tp(mux_sel_e m = MX_HOLD, logic mm = 0, mux_sel_e g = MX_HOLD,
      logic gm = 0, int ra = 0, logic rwe = 0, logic [2:0] ras = 0, logic [2:0] cs = 0,
      logic we = 0, jsel_e js = JS_CONST, logic [4:0] jc = 0, logic rd = 0, logic wr = 0);
    tick_t t;
    t = '0;
    t.m_sel = m; t.m_merge = mm; t.g_sel = g; t.g_merge = gm; t.reg_addr = 12'(ra);
    t.reg_we = rwe; t.ras = ras; t.cs = cs; t.we = we; t.jsel = js; t.jconst = jc;
    t.bip_rd = rd; t.bip_wr = wr;
    return t;
  endfunction

  // sequencing: jump target a (13 bits) through the identity Jump RAM pages
  function automatic cycle_t cp(logic [3:0] op = S_CONT, int a = 0, int ccs = CC_TRUE,
      logic pol = 0, jmode_e jm = JM_ZERO, logic [7:0] page = 8'h00, logic use_page = 0);
    cycle_t c;
    c = '0;
    c.seq_op = op; c.cc_sel = 5'(ccs); c.cc_pol = pol; c.jmode = jm;
    c.jpage = use_page ? page : 8'(a);
    c.addr_hi = 5'(a >> 8);
    c.alu_i = 9'o100;  // NOP destination, keeps the ALU registers
    return c;
  endfunction

  function automatic uinstr_t ui(cycle_t c, tick_t t0, tick_t t1);
    uinstr_t u;
    u.cyc = c; u.tick = t0; u.tock = t1;
    return u;
  endfunction

  // the server program, as (address, microinstruction) pairs
  typedef struct { int a; uinstr_t u; } cs_entry_t;

  function automatic void server(ref cs_entry_t prog [$]);
    prog.delete();
    // 0: read the address word into G; J latch takes its opcode field
    prog.push_back('{A_IDLE, ui(cp(),
        tp(.g(MX_BIP), .rd(1)), tp(.js(JS_GFLAGS)))});
    // 1: dispatch on the opcode; read the RAM address into M; clear the
    //    opcode in G to make the reply header; CC latch = 0 for CHASE
    prog.push_back('{1, ui(cp(.op(S_JMAP), .a(0), .jm(JM_LATCH), .page(DISPATCH_PAGE),
        .use_page(1), .ccs(CC_TRUE), .pol(1)),
        tp(.m(MX_BIP), .rd(1)), tp(.g(MX_CONST), .gm(1), .ra(1), .jc(0)))});
    // READ
    prog.push_back('{A_READ, ui(cp(),
        tp(.m(MX_SWAP), .ras(3'b111)), tp(.ras(3'b111), .cs(3'b111)))});
    prog.push_back('{A_READ + 1, ui(cp(),
        tp(.m(MX_DRAM), .ras(3'b001), .cs(3'b111), .wr(1)), tp(.g(MX_OTHER)))});
    prog.push_back('{A_READ + 2, ui(cp(.op(S_JMAP), .a(A_IDLE)),
        tp(.g(MX_CONST), .gm(1), .ra(2), .jc(0)), tp(.wr(1)))});
    // WRITE
    prog.push_back('{A_WRITE, ui(cp(),
        tp(.ra(3), .rwe(1)), tp(.g(MX_BIP), .rd(1)))});
    prog.push_back('{A_WRITE + 1, ui(cp(),
        tp(.m(MX_SWAP), .ras(3'b111)), tp(.m(MX_OTHER), .ras(3'b111), .cs(3'b111)))});
    prog.push_back('{A_WRITE + 2, ui(cp(),
        tp(.ras(3'b111), .cs(3'b111), .we(1)), tp(.g(MX_REG), .ra(3)))});
    prog.push_back('{A_WRITE + 3, ui(cp(.op(S_JMAP), .a(A_IDLE)),
        tp(.g(MX_CONST), .gm(1), .ra(2), .jc(0)), tp(.wr(1)))});
    // CHASE: one access per control cycle pair; the pointer test of a word
    // is latched at the end of the cycle that loads it and used by the next
    prog.push_back('{A_CHASE, ui(cp(.op(S_CJP), .a(A_CDONE)),
        tp(.m(MX_SWAP), .ras(3'b111)), tp(.ras(3'b111), .cs(3'b111)))});
    prog.push_back('{A_CHASE + 1, ui(cp(.op(S_JMAP), .a(A_CHASE), .ccs(CC_MPTR), .pol(1)),
        tp(.m(MX_DRAM), .ras(3'b001), .cs(3'b111)), tp())});
    // done: undo the swap of the access started speculatively, send the reply
    prog.push_back('{A_CDONE, ui(cp(),
        tp(.m(MX_SWAP)), tp(.wr(1)))});
    prog.push_back('{A_CDONE + 1, ui(cp(),
        tp(.g(MX_OTHER)), tp(.g(MX_CONST), .gm(1), .ra(2), .jc(0)))});
    prog.push_back('{A_CDONE + 2, ui(cp(.op(S_JMAP), .a(A_IDLE)),
        tp(.wr(1)), tp())});
  endfunction

  // Jump RAM contents: identity in location 0 of each page; dispatch table
  function automatic logic [7:0] jram_word(int a);
    if (a[12:5] == DISPATCH_PAGE && a[4:0] == 1) return 8'(A_READ);
    if (a[12:5] == DISPATCH_PAGE && a[4:0] == 2) return 8'(A_WRITE);
    if (a[12:5] == DISPATCH_PAGE && a[4:0] == 3) return 8'(A_CHASE);
    if (a[4:0] == 0) return a[12:5];
    return 8'h00;
  endfunction

  function automatic logic [39:0] reg_word(int r);
    case (r)
      1: return 40'h00_7C00_0000;   // bits 30..26
      2: return 40'h02_0000_0000;   // bit 33
      default: return 40'h0;
    endcase
  endfunction

  // RAM word address <-> the layout the IMU puts on M
  function automatic logic [39:0] ram_addr(logic [21:0] a);
    logic [39:0] w;
    w = '0;
    w[10:0]  = a[21:11];  // row
    w[30:20] = a[10:0];   // column
    return w;
  endfunction
endpackage
