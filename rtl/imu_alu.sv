// imu_alu: the IMU's 32-bit ALU, built in the original from two quad-2901
// bit-slice parts with a dual-ported bank of 64 registers.
//
// It follows the classic 2901 organisation: two register-file read ports A and
// B, a Q register, a 9-bit instruction I8..I0 choosing the operand pair
// (I2..I0: AQ, AB, ZQ, ZB, ZA, DA, DQ, D0), the function (I5..I3: R+S, S-R,
// R-S, OR, AND, NOT-R AND S, XOR, XNOR) and the destination with optional
// shifts (I8..I6: QREG, NOP, RAMA, RAMF, RAMQD, RAMD, RAMQU, RAMU). Its only
// data input D is the G register; Y goes back to the main multiplexer.
// Flags: carry out, F = 0, sign (F31) and overflow.
//
// The ALU cycles at half the tick rate: registers and Q are written at the
// end of a control cycle (cyc_end), and the programmer keeps D stable for both
// ticks. Shift inputs are 0. The 2901 instruction set is standard knowledge,
// not spelled out in the document; 64 registers and 32 bits are the document's.
module imu_alu #(
  parameter int W     = 32,
  parameter int NREGS = 64,
  localparam int RAW  = $clog2(NREGS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cyc_end,
  input  logic [8:0]     i,
  input  logic [RAW-1:0] a_addr,
  input  logic [RAW-1:0] b_addr,
  input  logic           cin,
  input  logic [W-1:0]   d,
  output logic [W-1:0]   y,
  output logic           cout,
  output logic           zero,
  output logic           sign,
  output logic           ovr
);
  logic [W-1:0] rf [NREGS];
  logic [W-1:0] q;
  logic [W-1:0] a, b, rr, ss, f;
  logic [W:0]   sum;

  assign a = rf[a_addr];
  assign b = rf[b_addr];

  always_comb begin
    unique case (i[2:0])
      3'd0: begin rr = a;  ss = q; end
      3'd1: begin rr = a;  ss = b; end
      3'd2: begin rr = '0; ss = q; end
      3'd3: begin rr = '0; ss = b; end
      3'd4: begin rr = '0; ss = a; end
      3'd5: begin rr = d;  ss = a; end
      3'd6: begin rr = d;  ss = q; end
      default: begin rr = d; ss = '0; end
    endcase
    sum = '0;
    unique case (i[5:3])
      3'd0: sum = {1'b0, rr} + {1'b0, ss} + (W+1)'(cin);
      3'd1: sum = {1'b0, ss} + {1'b0, ~rr} + (W+1)'(cin);
      3'd2: sum = {1'b0, rr} + {1'b0, ~ss} + (W+1)'(cin);
      default: sum = '0;
    endcase
    unique case (i[5:3])
      3'd0, 3'd1, 3'd2: f = sum[W-1:0];
      3'd3: f = rr | ss;
      3'd4: f = rr & ss;
      3'd5: f = ~rr & ss;
      3'd6: f = rr ^ ss;
      default: f = ~(rr ^ ss);
    endcase
  end

  // flags from the arithmetic operand signs
  logic [W-1:0] opa, opb;
  always_comb begin
    opa = rr; opb = ss;
    if (i[5:3] == 3'd1) opa = ~rr;
    if (i[5:3] == 3'd2) opb = ~ss;
  end
  assign cout = (i[5:3] <= 3'd2) ? sum[W] : 1'b0;
  assign zero = (f == '0);
  assign sign = f[W-1];
  assign ovr  = (i[5:3] <= 3'd2) ? ((opa[W-1] == opb[W-1]) && (f[W-1] != opa[W-1])) : 1'b0;

  assign y = (i[8:6] == 3'd2) ? a : f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      for (int k = 0; k < NREGS; k++) rf[k] <= '0;
    end else if (cyc_end) begin
      unique case (i[8:6])
        3'd0: q <= f;
        3'd1: ;
        3'd2, 3'd3: rf[b_addr] <= f;
        3'd4: begin rf[b_addr] <= {1'b0, f[W-1:1]}; q <= {1'b0, q[W-1:1]}; end
        3'd5: rf[b_addr] <= {1'b0, f[W-1:1]};
        3'd6: begin rf[b_addr] <= {f[W-2:0], 1'b0}; q <= {q[W-2:0], 1'b0}; end
        default: rf[b_addr] <= {f[W-2:0], 1'b0};
      endcase
    end
  end
endmodule
