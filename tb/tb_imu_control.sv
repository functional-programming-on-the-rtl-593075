// tb_imu_control: loads a small microprogram and Jump RAM and follows the
// addresses executed (each instruction carries its own address in a field).
// Covers plain jumps through the identity Jump RAM pages, a 32-way jump on
// a J value set by the previous instruction, 16-way jumps with the top J
// bit forced low and high, conditional branches on the CC latch (set by the
// previous instruction, with polarity), subroutine call and return, JZ,
// the 3-clock tick and 6-clock cycle, and hold delaying a tick.
module tb_imu_control;
  import grip_pkg::*;
  import imu_ucode_pkg::*;
  logic clk = 0, rst_n = 0, hold = 1;
  logic [31:0] cc_in = 0;
  tick_t tk;
  cycle_t cyc;
  logic [4:0] jval;
  logic [1:0] st;
  logic phase, tick_start, active, tick_end, cyc_end;
  logic [15:0] upc_addr;
  logic ld_cs_we = 0, ld_jr_we = 0;
  logic [12:0] ld_addr = 0;
  logic [125:0] ld_data = 0;
  int checks = 0, failures = 0;

  imu_control #(.CS_WORDS(8192)) dut (.clk, .rst_n, .hold, .cc_in, .mem_tag(5'd0), .g_tag(5'd0),
    .g_flags(5'd0), .tk, .cyc, .jval, .st, .phase, .tick_start, .active, .tick_end, .cyc_end,
    .upc_addr, .ld_cs_we, .ld_jr_we, .ld_addr, .ld_data);
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

  function automatic uinstr_t I(int a, cycle_t c, int jc = 0, int ccs = CC_TRUE, bit pol = 0);
    c.cc_sel = 5'(ccs); c.cc_pol = pol;
    return ui(c, tp(.ra(a)), tp(.ra(a), .js(JS_CONST), .jc(5'(jc))));
  endfunction

  task automatic ld(int a, logic [125:0] v, bit jr);
    @(negedge clk);
    ld_addr = 13'(a); ld_data = v; ld_cs_we = !jr; ld_jr_we = jr;
    @(negedge clk); ld_cs_we = 0; ld_jr_we = 0;
  endtask

  int trace [$];
  int starts [$];
  always @(posedge clk) if (rst_n && tick_start) begin
    starts.push_back($time / 10);
    if (!phase) trace.push_back(int'(tk.reg_addr));
  end

  initial begin
    int exp [] = '{0, 1, 'h40, 'h41, 'h160, 'h70, 'h80, 'h81, 'hA0, 'h82, 'h30, 0, 1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 256; p++) ld(p * 32, 126'(p), 1);
    ld('h20 * 32 + 5, 126'('h60), 1);
    ld('h21 * 32 + 3, 126'('h70), 1);
    ld('h21 * 32 + 18, 126'('h30), 1);
    ld(0,     I(0,     cp()), 0);
    ld(1,     I(1,     cp(.op(S_JMAP), .a('h40))), 0);
    ld('h40,  I('h40,  cp(), 5), 0);
    ld('h41,  I('h41,  cp(.op(S_JMAP), .a('h100), .jm(JM_LATCH), .page(8'h20), .use_page(1)), 5'h13), 0);
    ld('h160, I('h160, cp(.op(S_JMAP), .a(0), .jm(JM_MSB0), .page(8'h21), .use_page(1)), 0, 12, 0), 0);
    ld('h70,  I('h70,  cp(.op(S_CJP), .a('h80)), 0, 12, 1), 0);
    ld('h80,  I('h80,  cp(.op(S_CJP), .a('h90))), 0);
    ld('h81,  I('h81,  cp(.op(S_CJS), .a('hA0))), 0);
    ld('hA0,  I('hA0,  cp(.op(S_CRTN)), 2), 0);
    ld('h82,  I('h82,  cp(.op(S_JMAP), .a(0), .jm(JM_MSB1), .page(8'h21), .use_page(1))), 0);
    ld('h30,  I('h30,  cp(.op(S_JZ))), 0);
    ld('h90,  I('h90,  cp(.op(S_JZ))), 0);
    cc_in[0] = 1; cc_in[12] = 1;
    @(negedge clk); hold = 0;
    // one control cycle: the reset instruction (JZ) fetches address 0
    while (trace.size() < 2 * exp.size() + 2) @(posedge clk);
    hold = 1;
    // the first traced instruction is the reset one; find 0 and compare
    while (trace.size() > 0 && trace[0] != 0) void'(trace.pop_front());
    while (trace.size() > 0 && trace[0] == 0 && trace.size() > 1 && trace[1] == 0) void'(trace.pop_front());
    foreach (exp[k]) chk(trace.size() > k && trace[k] == exp[k],
        $sformatf("step %0d: %h expected %h", k, (trace.size() > k) ? trace[k] : -1, exp[k]));
    for (int k = 1; k < 10; k++) chk(starts[k] - starts[k - 1] == 3, "tick every 3 clocks");
    // hold delays the next tick start by its length
    starts.delete();
    repeat (10) @(negedge clk);
    hold = 0;
    while (starts.size() < 1) @(posedge clk);
    chk(starts.size() == 1, "tick started once hold dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
