// tb_imu_datapath: drives tick parts directly and checks M and G after each
// tick against values worked out here: every multiplexer input, loading M
// and G from each other in the same tick, the half swap, masked merges
// (a 5-bit constant placed in a field), register bank writes from G and the
// fact that nothing changes between tick ends; then 2000 random tick parts,
// with register writes in ticks that do not read the bank, against a model
// of M, G and eight registers.
module tb_imu_datapath;
  import grip_pkg::*;
  logic clk = 0, rst_n = 0, tick_end = 0, ld_we = 0;
  tick_t tk;
  logic [31:0] alu_y;
  word_t bip_in;
  logic [39:0] dram_q, m, g, ld_data;
  logic [4:0] jval;
  logic [11:0] ld_addr;
  int checks = 0, failures = 0;

  imu_datapath #(.NREGS(4096)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic tick(input tick_t t);
    @(negedge clk); tk = t; tick_end = 1;
    @(negedge clk); tick_end = 0; tk = '0;
  endtask

  function automatic tick_t mk(mux_sel_e ms, logic mm, mux_sel_e gs, logic gm, int ra, logic we);
    tick_t t;
    t = '0; t.m_sel = ms; t.m_merge = mm; t.g_sel = gs; t.g_merge = gm;
    t.reg_addr = 12'(ra); t.reg_we = we;
    return t;
  endfunction

  initial begin
    logic [39:0] em, eg, mask, r7;
    logic [39:0] sh [8];
    tk = '0; alu_y = 0; bip_in = 0; dram_q = 0; jval = 0; ld_addr = 0; ld_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load register 7 and 100 through the load port
    r7 = 40'h12_3456_789A;
    @(negedge clk); ld_we = 1; ld_addr = 7; ld_data = r7;
    @(negedge clk); ld_addr = 100; ld_data = 40'h00_7C00_0000;
    @(negedge clk); ld_we = 0;
    // M <- REG 7, G <- DRAM
    dram_q = 40'hAB_CDEF_0123;
    tick(mk(MX_REG, 0, MX_DRAM, 0, 7, 0));
    chk(m == r7 && g == 40'hAB_CDEF_0123, "REG and DRAM inputs");
    // swap M halves, G <- ALU
    alu_y = 32'hFEDC_BA98;
    em = {m[19:0], m[39:20]};
    tick(mk(MX_SWAP, 0, MX_ALU, 0, 0, 0));
    chk(m == em && g == 40'h00_FEDC_BA98, "swap and ALU input");
    // exchange M and G in one tick
    em = g; eg = m;
    tick(mk(MX_OTHER, 0, MX_OTHER, 0, 0, 0));
    chk(m == em && g == eg, "M and G exchanged");
    // constant replicated, BIP word
    jval = 5'b10110; bip_in = 34'h3_0000_0005;
    tick(mk(MX_CONST, 0, MX_BIP, 0, 0, 0));
    chk(m == {8{5'b10110}} && g == 40'h03_0000_0005, "CONST and BIP inputs");
    // merge constant 9 into bits 30..26 of G under the mask in register 100
    jval = 5'd9; mask = 40'h00_7C00_0000;
    eg = (g & ~mask) | ({8{5'd9}} & mask);
    em = m;
    tick(mk(MX_HOLD, 0, MX_CONST, 1, 100, 0));
    chk(g == eg && g[30:26] == 5'b10100 && m == em, "masked merge into G (rotated constant)");
    // write G into register 55, read it back into M
    tick(mk(MX_HOLD, 0, MX_HOLD, 0, 55, 1));
    tick(mk(MX_REG, 0, MX_HOLD, 0, 55, 0));
    chk(m == eg, "register bank write from G");
    // merge into M from DRAM
    dram_q = 40'hFF_FFFF_FFFF;
    em = (m & ~mask) | (dram_q & mask);
    tick(mk(MX_DRAM, 1, MX_HOLD, 0, 100, 0));
    chk(m == em, "masked merge into M");
    // nothing moves without tick_end
    em = m; eg = g;
    @(negedge clk); tk = mk(MX_CONST, 0, MX_CONST, 0, 0, 0);
    repeat (3) @(negedge clk);
    chk(m == em && g == eg, "holds between ticks");
    tk = '0;
    // random sequences against a model, including register bank writes
    // (only in ticks that do not read the bank, as the single port requires)
    for (int k = 0; k < 8; k++) sh[k] = dut.regs[k];
    for (int k = 0; k < 2000; k++) begin
      tick_t t;
      logic [39:0] rq, sm, sg;
      t = mk(mux_sel_e'($urandom), 1'($urandom), mux_sel_e'($urandom), 1'($urandom),
             $urandom_range(0, 7), 0);
      if (t.m_sel != MX_REG && t.g_sel != MX_REG && !t.m_merge && !t.g_merge)
        t.reg_we = 1'($urandom);
      alu_y = $urandom; bip_in = {$urandom, 2'($urandom)}; dram_q = {$urandom, 8'($urandom)};
      jval = 5'($urandom);
      rq = sh[t.reg_addr[2:0]];
      case (t.m_sel)
        MX_HOLD: sm = m; MX_REG: sm = rq; MX_ALU: sm = {8'h0, alu_y}; MX_BIP: sm = {6'h0, bip_in};
        MX_CONST: sm = {8{jval}}; MX_DRAM: sm = dram_q; MX_OTHER: sm = g; default: sm = {m[19:0], m[39:20]};
      endcase
      case (t.g_sel)
        MX_HOLD: sg = g; MX_REG: sg = rq; MX_ALU: sg = {8'h0, alu_y}; MX_BIP: sg = {6'h0, bip_in};
        MX_CONST: sg = {8{jval}}; MX_DRAM: sg = dram_q; MX_OTHER: sg = m; default: sg = {g[19:0], g[39:20]};
      endcase
      em = t.m_merge ? ((m & ~rq) | (sm & rq)) : sm;
      eg = t.g_merge ? ((g & ~rq) | (sg & rq)) : sg;
      if (t.reg_we) sh[t.reg_addr[2:0]] = g;
      tick(t);
      chk(m == em && g == eg, $sformatf("random %0d", k));
    end
    for (int k = 0; k < 8; k++) begin
      tick(mk(MX_REG, 0, MX_HOLD, 0, k, 0));
      chk(m == sh[k], $sformatf("register %0d after random writes", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
