// tb_imu_alu: checks the 2901-style ALU: register loads through D, every
// source pair and function against arithmetic worked out in the testbench,
// the Q register, shifts, flags, and that results are written only at the
// end of a control cycle.
module tb_imu_alu;
  logic clk = 0, rst_n = 0, cyc_end, cin, cout, zero, sign, ovr;
  logic [8:0] i;
  logic [5:0] a_addr, b_addr;
  logic [31:0] d, y;
  int checks = 0, failures = 0;
  logic [31:0] regs [64];
  logic [31:0] q;

  imu_alu #(.W(32), .NREGS(64)) dut (.*);
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

  task automatic op(input logic [2:0] dst, input logic [2:0] fn, input logic [2:0] srcs,
                    input logic [5:0] aa, input logic [5:0] bb, input logic [31:0] dd, input logic c);
    logic [31:0] r, s, f, ey;
    logic [32:0] sm;
    logic ec;
    i = {dst, fn, srcs}; a_addr = aa; b_addr = bb; d = dd; cin = c; cyc_end = 1;
    case (srcs)
      0: begin r = regs[aa]; s = q; end
      1: begin r = regs[aa]; s = regs[bb]; end
      2: begin r = 0; s = q; end
      3: begin r = 0; s = regs[bb]; end
      4: begin r = 0; s = regs[aa]; end
      5: begin r = dd; s = regs[aa]; end
      6: begin r = dd; s = q; end
      default: begin r = dd; s = 0; end
    endcase
    sm = 0;
    case (fn)
      0: sm = 33'(r) + 33'(s) + 33'(c);
      1: sm = 33'(s) - 33'(r) - 33'(!c) + 33'h1_0000_0000;
      2: sm = 33'(r) - 33'(s) - 33'(!c) + 33'h1_0000_0000;
      default: ;
    endcase
    case (fn)
      0, 1, 2: f = sm[31:0];
      3: f = r | s; 4: f = r & s; 5: f = ~r & s; 6: f = r ^ s; default: f = ~(r ^ s);
    endcase
    ec = (fn <= 2) ? sm[32] : 1'b0;
    ey = (dst == 2) ? regs[aa] : f;
    #1;
    chk(y == ey, $sformatf("i=%o y=%h exp %h", i, y, ey));
    chk(zero == (f == 0), "zero flag");
    chk(sign == f[31], "sign flag");
    chk(cout == ec, $sformatf("carry i=%o", i));
    @(posedge clk); #1;
    case (dst)
      0: q = f;
      2, 3: regs[bb] = f;
      4: begin regs[bb] = f >> 1; q = q >> 1; end
      5: regs[bb] = f >> 1;
      6: begin regs[bb] = f << 1; q = q << 1; end
      7: regs[bb] = f << 1;
      default: ;
    endcase
  endtask

  initial begin
    cyc_end = 0; i = 0; a_addr = 0; b_addr = 0; d = 0; cin = 0;
    q = 0;
    for (int k = 0; k < 64; k++) regs[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // load registers through D (source D0, function OR with 0, dest RAMF)
    for (int k = 0; k < 64; k++) op(3, 3, 7, 0, 6'(k), $urandom, 0);
    // nothing is written without cyc_end
    i = {3'd3, 3'd3, 3'd7}; b_addr = 5; d = 32'hdead_beef; cyc_end = 0;
    @(posedge clk); #1;
    i = {3'd1, 3'd3, 3'd4}; a_addr = 5; #1;
    chk(y == regs[5], "no write without cyc_end");
    // overflow: 0x7fffffff + 1
    op(3, 3, 7, 0, 1, 32'h7fff_ffff, 0);
    op(3, 3, 7, 0, 2, 32'h1, 0);
    i = {3'd1, 3'd0, 3'd1}; a_addr = 1; b_addr = 2; cin = 0; cyc_end = 0; #1;
    chk(ovr && y == 32'h8000_0000, "overflow");
    for (int k = 0; k < 3000; k++)
      op(3'($urandom), 3'($urandom), 3'($urandom), 6'($urandom), 6'($urandom), $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
