// imu_control: the IMU control section.
//
// A control store of CS_WORDS 126-bit microinstructions feeds a
// microinstruction register. Each microinstruction has a cycle part, which
// controls sequencing (and the half-speed ALU), and a tick part and a tock
// part of identical format, which control the data section in the first and
// second tick of the control cycle. The control section cycles once every two
// ticks; a tick is three sub-ticks of clk.
//
// Branching is pipelined by one level: at the end of each cycle the CC latch
// takes the condition chosen by the CC mux (32 inputs, optionally inverted)
// and the J latch takes the 5-bit J mux value of the tock part; the next
// instruction branches on them. The J latch (forced to zero, or with its
// top bit forced low or high, as the instruction asks) forms the low 5 bits of
// the Jump RAM address, the instruction's 8-bit page the rest. The Jump RAM's
// 8-bit output together with 5 more instruction bits is the branch address
// given to the 2910-style sequencer. That gives 32-way jumps within a
// 256-word page, 16-way jumps with the top J bit forced, and plain jumps with
// J forced to zero when location 0 of the page holds the page number.
//
// Timing: st counts sub-ticks 0..2. A tick starts at sub-tick 0 unless hold is
// high (refresh, a BIP wait, or run low), in which case it waits. tick_end
// marks the last sub-tick of a tick and cyc_end the last sub-tick of a tock.
// Control store and Jump RAM are loaded through the ld_* port (standing in for
// the diagnostics bus). The field layout of the microinstruction is this
// design's own: the document gives the width, the three parts and the jump
// scheme but not the encoding.
module imu_control
  import grip_pkg::*;
#(
  parameter int CS_WORDS = 8192,
  parameter int UI_W     = 126,
  localparam int CSAW    = $clog2(CS_WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  // conditions and J sources
  input  logic [31:0] cc_in,
  input  logic [4:0]  mem_tag,
  input  logic [4:0]  g_tag,
  input  logic [4:0]  g_flags,
  // to the data section
  output tick_t       tk,           // part in force for the current tick
  output cycle_t      cyc,
  output logic [4:0]  jval,         // J mux output (Constant input)
  output logic [1:0]  st,
  output logic        phase,        // 0: tick, 1: tock
  output logic        tick_start,
  output logic        active,       // a tick is in progress
  output logic        tick_end,
  output logic        cyc_end,
  output logic [15:0] upc_addr,     // address of the next microinstruction
  // load port
  input  logic        ld_cs_we,
  input  logic        ld_jr_we,
  input  logic [12:0] ld_addr,
  input  logic [UI_W-1:0] ld_data
);
  logic [UI_W-1:0] cs [CS_WORDS];
  logic [7:0]      jram [8192];
  uinstr_t         uir;
  logic            cc_lat;
  logic [4:0]      j_lat, j_eff;
  logic [15:0]     y;
  logic [7:0]      jram_q;

  assign cyc = uir.cyc;
  assign tk  = phase ? uir.tock : uir.tick;

  // sub-tick timing
  assign tick_start = (st == 2'd0) && !active && !hold;
  assign tick_end   = (st == 2'd2);
  assign cyc_end    = tick_end && phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '0; phase <= 1'b0; active <= 1'b0;
    end else begin
      if (tick_start) begin active <= 1'b1; st <= 2'd1; end
      else if (active && st == 2'd1) st <= 2'd2;
      else if (tick_end) begin st <= 2'd0; active <= 1'b0; phase <= ~phase; end
    end
  end

  // J mux
  always_comb begin
    unique case (tk.jsel)
      JS_CONST:  jval = tk.jconst;
      JS_MEMTAG: jval = mem_tag;
      JS_GTAG:   jval = g_tag;
      default:   jval = g_flags;
    endcase
  end

  always_comb begin
    unique case (cyc.jmode)
      JM_LATCH: j_eff = j_lat;
      JM_ZERO:  j_eff = '0;
      JM_MSB0:  j_eff = {1'b0, j_lat[3:0]};
      default:  j_eff = {1'b1, j_lat[3:0]};
    endcase
  end
  assign jram_q = jram[{cyc.jpage, j_eff}];

  imu_sequencer #(.AW(16), .STACK_DEPTH(33)) u_seq (
    .clk, .rst_n, .en(cyc_end), .op(cyc.seq_op), .cc(cc_lat),
    .d({3'b000, cyc.addr_hi, jram_q}), .y, .stack_full(), .stack_empty());
  assign upc_addr = y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uir <= '0; cc_lat <= 1'b0; j_lat <= '0;
    end else if (cyc_end) begin
      uir    <= uinstr_t'(cs[y[CSAW-1:0]]);
      cc_lat <= cc_in[cyc.cc_sel] ^ cyc.cc_pol;
      j_lat  <= jval;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_cs_we) cs[ld_addr[CSAW-1:0]] <= ld_data;
    if (ld_jr_we) jram[ld_addr] <= ld_data[7:0];
  end
endmodule
