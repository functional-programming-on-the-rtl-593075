// bip_queue: first-in first-out queue of packet addresses.
//
// The BIP keeps one of these for the input of each PE and of the IMU, and two
// (SendA, SendB) for packets awaiting the Futurebus. It holds packet frame
// numbers, never packet data. It must be a true FIFO so that packets from one
// sender to one recipient stay in order. The depth defaults to the number of
// packet frames, so a queue can never overflow: every frame is in at most one
// queue. A push and a pop may happen in the same clock. head is valid whenever
// empty is low (first-word fall-through). Reset empties it.
module bip_queue #(
  parameter int DEPTH = 32,
  parameter int AW    = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] din,
  input  logic          pop,
  output logic [AW-1:0] head,
  output logic          empty,
  output logic          full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);
  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] rd, wr;

  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));
  assign head  = mem[rd];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (push && !full) wr <= inc(wr);
      if (pop && !empty) rd <= inc(rd);
      count <= count + ((push && !full) ? CW'(1) : CW'(0)) - ((pop && !empty) ? CW'(1) : CW'(0));
    end
  end

  always_ff @(posedge clk) if (push && !full) mem[wr] <= din;

  // A pop of an empty queue or a push into a full one is a BIP sequencing error.
  a_pop: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("bip_queue: pop when empty");
  a_push: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("bip_queue: push when full");
endmodule
