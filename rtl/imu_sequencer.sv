// imu_sequencer: microprogram sequencer of the IMU control section, an
// extended 2910 with a 33-deep subroutine stack and a 16-bit address path.
//
// Each control cycle it takes a 4-bit instruction, the latched condition
// (cc = 1 means pass) and a branch address d, and produces the next
// microinstruction address y combinationally. On en (the end of a control
// cycle) it updates its microprogram counter (upc = y + 1), its register/
// counter r and its stack. The 16 instructions are those of the 2910:
// JZ, CJS, JMAP, CJP, PUSH, JSRP, CJV, JRP, RFCT, RPCT, CRTN, CJPP, LDCT,
// LOOP, CONT, TWB. The map and vector sources of the original part are the
// same d input here. A push onto a full stack overwrites the top entry, a pop
// of an empty stack leaves it empty. The stack depth and width follow the
// document; the instruction behaviour is the standard 2910's.
module imu_sequencer
  import grip_pkg::*;
#(
  parameter int AW          = 16,
  parameter int STACK_DEPTH = 33
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [3:0]    op,
  input  logic          cc,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] y,
  output logic          stack_full,
  output logic          stack_empty
);
  localparam int SPW = $clog2(STACK_DEPTH + 1);
  logic [AW-1:0] upc, r, tos;
  logic [AW-1:0] stk [STACK_DEPTH];
  logic [SPW-1:0] sp;          // number of entries

  assign stack_empty = (sp == '0);
  assign stack_full  = (sp == SPW'(STACK_DEPTH));
  assign tos = stack_empty ? '0 : stk[sp - 1'b1];
  wire rz = (r == '0);

  logic push, pop, clr, ld_r, dec_r;
  always_comb begin
    y = upc; push = 1'b0; pop = 1'b0; clr = 1'b0; ld_r = 1'b0; dec_r = 1'b0;
    unique case (op)
      S_JZ:   begin y = '0; clr = 1'b1; end
      S_CJS:  if (cc) begin y = d; push = 1'b1; end
      S_JMAP: y = d;
      S_CJP:  if (cc) y = d;
      S_PUSH: begin push = 1'b1; ld_r = cc; end
      S_JSRP: begin y = cc ? d : r; push = 1'b1; end
      S_CJV:  if (cc) y = d;
      S_JRP:  y = cc ? d : r;
      S_RFCT: if (!rz) begin y = tos; dec_r = 1'b1; end else pop = 1'b1;
      S_RPCT: if (!rz) begin y = d; dec_r = 1'b1; end
      S_CRTN: if (cc) begin y = tos; pop = 1'b1; end
      S_CJPP: if (cc) begin y = d; pop = 1'b1; end
      S_LDCT: ld_r = 1'b1;
      S_LOOP: if (cc) pop = 1'b1; else y = tos;
      S_CONT: ;
      default: begin // TWB
        if (!rz) begin
          dec_r = 1'b1;
          if (cc) pop = 1'b1; else y = tos;
        end else begin
          pop = 1'b1;
          if (!cc) y = d;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= '0; r <= '0; sp <= '0;
    end else if (en) begin
      upc <= y + 1'b1;
      if (ld_r) r <= d;
      else if (dec_r) r <= r - 1'b1;
      if (clr) sp <= '0;
      else if (push) begin
        if (stack_full) stk[sp - 1'b1] <= upc;
        else begin stk[sp] <= upc; sp <= sp + 1'b1; end
      end else if (pop && !stack_empty) sp <= sp - 1'b1;
    end
  end
endmodule
