// tb_imu_sequencer: drives random 2910 instructions, conditions and branch
// addresses and compares the next address, and later the stack and counter
// behaviour, with a reference model kept in the testbench. Also checks that
// 33 nested calls return in order and that a counted loop runs d+1 times.
module tb_imu_sequencer;
  import grip_pkg::*;
  logic clk = 0, rst_n = 0, en, cc, stack_full, stack_empty;
  logic [3:0] op;
  logic [15:0] d, y;
  int checks = 0, failures = 0;

  imu_sequencer #(.AW(16), .STACK_DEPTH(33)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model
  logic [15:0] m_pc, m_r;
  logic [15:0] m_stk [$];

  function automatic logic [15:0] m_tos();
    return (m_stk.size() == 0) ? 16'h0 : m_stk[$];
  endfunction

  task automatic step(input logic [3:0] o, input logic c, input logic [15:0] dd);
    logic [15:0] ey;
    bit ps, pp, cl, ld, dc;
    op = o; cc = c; d = dd; en = 1;
    ps = 0; pp = 0; cl = 0; ld = 0; dc = 0; ey = m_pc;
    case (o)
      S_JZ: begin ey = 0; cl = 1; end
      S_CJS: if (c) begin ey = dd; ps = 1; end
      S_JMAP: ey = dd;
      S_CJP, S_CJV: if (c) ey = dd;
      S_PUSH: begin ps = 1; ld = c; end
      S_JSRP: begin ey = c ? dd : m_r; ps = 1; end
      S_JRP: ey = c ? dd : m_r;
      S_RFCT: if (m_r != 0) begin ey = m_tos(); dc = 1; end else pp = 1;
      S_RPCT: if (m_r != 0) begin ey = dd; dc = 1; end
      S_CRTN: if (c) begin ey = m_tos(); pp = 1; end
      S_CJPP: if (c) begin ey = dd; pp = 1; end
      S_LDCT: ld = 1;
      S_LOOP: if (c) pp = 1; else ey = m_tos();
      S_CONT: ;
      S_TWB: if (m_r != 0) begin dc = 1; if (c) pp = 1; else ey = m_tos(); end
             else begin pp = 1; if (!c) ey = dd; end
      default: ;
    endcase
    #1;
    chk(y == ey, $sformatf("op %0d cc %0d: y %h expected %h", o, c, y, ey));
    @(posedge clk); #1;
    if (cl) m_stk.delete();
    else if (ps) begin if (m_stk.size() == 33) m_stk[$] = m_pc; else m_stk.push_back(m_pc); end
    else if (pp && m_stk.size() > 0) void'(m_stk.pop_back());
    if (ld) m_r = dd; else if (dc) m_r = m_r - 1;
    m_pc = ey + 1;
    chk(stack_empty == (m_stk.size() == 0), "empty flag");
    chk(stack_full == (m_stk.size() == 33), "full flag");
  endtask

  initial begin
    int n;
    en = 0; op = S_CONT; cc = 0; d = 0;
    m_pc = 0; m_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // 33 nested calls then 33 returns
    for (int k = 0; k < 33; k++) step(S_CJS, 1, 16'(100 * (k + 1)));
    chk(stack_full, "stack full after 33 calls");
    for (int k = 0; k < 33; k++) begin
      step(S_CRTN, 1, 0);
      // y now shows where the following return would go
      chk(y == ((k < 31) ? 16'(100 * (31 - k) + 1) : 16'h0), $sformatf("return %0d to %h", k, y));
    end
    // counted loop: LDCT 5, then RPCT to 0x40 runs until r = 0
    step(S_LDCT, 0, 16'd5);
    n = 0;
    do begin step(S_RPCT, 0, 16'h40); n++; end while (y == 16'h40);
    chk(n == 5, $sformatf("RPCT taken %0d times", n));
    // random instructions
    for (int k = 0; k < 5000; k++) begin
      logic [3:0] o;
      o = 4'($urandom);
      if (o == S_JZ && ($urandom % 8) != 0) o = S_CONT;
      step(o, 1'($urandom), 16'($urandom_range(0, 40)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
