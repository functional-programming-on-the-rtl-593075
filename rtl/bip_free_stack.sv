// bip_free_stack: last-in first-out stack of empty packet frame numbers.
//
// At reset it holds every frame, 0..DEPTH-1, with frame 0 on top. A master of
// the BIP claims a frame by popping it and the BIP pushes a frame back once
// its packet has been sent or consumed. Order does not matter for free frames,
// so a stack (cheaper than a queue) is used, as in the document. top is valid
// whenever empty is low. A push and a pop in the same clock replace the top.
module bip_free_stack #(
  parameter int DEPTH = 32,
  parameter int AW    = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] din,
  input  logic          pop,
  output logic [AW-1:0] top,
  output logic          empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int CW = $clog2(DEPTH+1);
  logic [AW-1:0] mem [DEPTH];

  assign empty = (count == 0);
  assign top   = empty ? '0 : mem[AW'(count - 1'b1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= AW'(DEPTH - 1 - i);
      count <= CW'(DEPTH);
    end else begin
      if (pop && !empty && push)       mem[AW'(count - 1'b1)] <= din;
      else if (pop && !empty)          count <= count - 1'b1;
      else if (push && count != CW'(DEPTH)) begin
        mem[AW'(count)] <= din;
        count <= count + 1'b1;
      end
    end
  end

  a_pop: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("bip_free_stack: pop when empty");
  a_push: assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && count == CW'(DEPTH)))
    else $error("bip_free_stack: push when full");
endmodule
