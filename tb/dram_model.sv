// dram_model: behavioural model of the IMU's static-column dynamic RAM
// (not synthesizable logic; the RAM chips are bought-in parts).
//
// Multiplexed 11-bit address: the row is latched when RAS goes active, the
// column when CS goes active while RAS is active. With RAS and CS active, q
// shows the addressed word; with WE also active, the word on d (and its
// parity bit) is written. Words never written read as zero with parity 0.
// Storage is sparse, so the full 4M-word address space costs only what is
// used. All pins are sampled on the rising edge of clk (the sub-tick clock).
module dram_model (
  input  logic        clk,
  input  logic        ras_n,
  input  logic        cs_n,
  input  logic        we_n,
  input  logic [10:0] addr,
  input  logic [39:0] d,
  input  logic        d_par,
  output logic [39:0] q,
  output logic        q_par
);
  logic [40:0] mem [int];
  logic [10:0] row, col;
  logic        ras_q = 1'b1, cs_q = 1'b1;
  int          writes = 0, reads = 0;

  function automatic logic [40:0] rd(input logic [21:0] a);
    return mem.exists(int'(a)) ? mem[int'(a)] : 41'h0;
  endfunction

  always @(posedge clk) begin
    ras_q <= ras_n;
    cs_q  <= cs_n;
    if (ras_q && !ras_n) row <= addr;
    if (cs_q && !cs_n && !ras_n) begin col <= addr; reads++; end
    if (!we_n && !cs_n && !ras_n) begin
      mem[int'({row, col})] = {d_par, d};
      writes++;
    end
  end

  assign {q_par, q} = !cs_n ? rd({row, col}) : 41'h0;
endmodule
