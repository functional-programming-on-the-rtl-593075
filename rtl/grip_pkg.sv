// grip_pkg: types and constants shared by the GRIP board.
//
// Packet words are 34 bits: bit 33 is the word-flag bit (1 on every word of a
// packet but the last, 0 on the last word), bits 32..0 are data. The first
// word of a packet is the address word:
//   [32:31] PE address, [30:26] opcode, [25:21] board address, [20:0] other info.
// Opcode 0 sends the packet to a PE, any other opcode to the board's IMU.
// These field positions follow the document's packet format table.
//
// IMU memory words are 40 bits: [39:33] tag, [32] pointer bit, [31:0] field.
// A pointer field holds [31:26] flags, [25:21] board address, [20:0] cell address.
//
// BIP (Bus Interface Processor) master requests: each master names where the
// packet address comes from (src), the sub-packet address, an optional data
// write and what happens to the packet address afterwards (dst). The encodings
// of src/dst are this design's own.
package grip_pkg;

  localparam int WORD_W   = 34;
  localparam int SUB_W    = 8;
  localparam int BOARD_W  = 5;
  localparam int MEM_W    = 40;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic       more;      // 1: another word follows, 0: last word
    logic [1:0] pe;
    logic [4:0] opcode;
    logic [4:0] board;
    logic [20:0] info;
  } addr_word_t;

  // BIP master numbering: PEs 0..3, then IMU, Futurebus transmit, receive.
  localparam int NPE      = 4;
  localparam int M_IMU    = 4;
  localparam int M_FBTX   = 5;
  localparam int M_FBRX   = 6;
  localparam int NMASTERS = 7;

  // BIP queue numbering: input queues of PE0..3 and IMU, then SendA, SendB.
  localparam int Q_IMU   = 4;
  localparam int Q_SENDA = 5;
  localparam int Q_SENDB = 6;
  localparam int NQUEUES = 7;

  typedef enum logic [1:0] {
    SRC_FREE  = 2'd0,  // pop a frame off the free stack
    SRC_TEMP  = 2'd1,  // the master's temporary-store entry
    SRC_INQ   = 2'd2,  // head of the master's own input queue
    SRC_SENDQ = 2'd3   // head of the active send queue (transmitter)
  } bip_src_e;

  typedef enum logic [2:0] {
    DST_KEEP   = 3'd0, // leave the packet address where it is
    DST_TEMP   = 3'd1, // put it in the master's temporary store
    DST_ROUTE  = 3'd2, // route by the address word: local queue or send queue
    DST_LOCAL  = 3'd3, // route to a local input queue (received packets)
    DST_FREE   = 3'd4, // return the frame to the free stack
    DST_RESEND = 3'd5  // move it to the other send queue (receiver had no frame)
  } bip_dst_e;

  typedef struct packed {
    logic         go;
    bip_src_e     src;
    bip_dst_e     dst;
    logic [SUB_W-1:0] sub;
    logic         we;
    word_t        wdata;
  } bip_req_t;

  typedef struct packed {
    logic  done;
    logic  fail;     // no packet address available from src
    word_t rdata;
  } bip_rsp_t;

  // Futurebus signals driven by one board as master.
  typedef struct packed {
    logic  req;      // wants bus mastership
    logic  valid;    // master: word on the bus
    logic  first;    // master: this word is an address word
    word_t data;
  } fb_out_t;

  // Futurebus signals seen by every board.
  typedef struct packed {
    logic [4:0] master;  // board number of the current master
    logic  gnt_valid;
    logic  valid;
    logic  first;
    word_t data;
  } fb_in_t;
  // The slave's answer (ready: word taken, nak: no empty frame) travels on
  // separate signals, not in these structs.

  // ---- IMU microinstruction -------------------------------------------------
  // 126 bits = 48-bit cycle part + two 39-bit data-section parts (tick, tock).
  typedef enum logic [2:0] {
    MX_HOLD  = 3'd0, MX_REG = 3'd1, MX_ALU = 3'd2, MX_BIP = 3'd3,
    MX_CONST = 3'd4, MX_DRAM = 3'd5, MX_OTHER = 3'd6, MX_SWAP = 3'd7
  } mux_sel_e;

  typedef enum logic [1:0] {
    JS_CONST = 2'd0, JS_MEMTAG = 2'd1, JS_GTAG = 2'd2, JS_GFLAGS = 2'd3
  } jsel_e;

  typedef struct packed {       // 39 bits
    mux_sel_e   m_sel;
    logic       m_merge;        // merge source into M under register mask
    mux_sel_e   g_sel;
    logic       g_merge;
    logic [11:0] reg_addr;
    logic       reg_we;         // write G into the register bank
    logic [2:0] ras;            // per sub-tick, 1 = RAS active
    logic [2:0] cs;             // per sub-tick, 1 = CS active
    logic       we;             // WE active in the middle sub-tick
    jsel_e      jsel;
    logic [4:0] jconst;
    logic       bip_rd;         // take the word in the BIP input latch
    logic       bip_wr;         // hand G to the BIP output latch
    logic [1:0] spare;
  } tick_t;

  typedef enum logic [1:0] {
    JM_LATCH = 2'd0, JM_ZERO = 2'd1, JM_MSB0 = 2'd2, JM_MSB1 = 2'd3
  } jmode_e;

  typedef struct packed {       // 48 bits
    logic [3:0] seq_op;         // 2910 instruction
    logic [4:0] cc_sel;
    logic       cc_pol;         // invert the selected condition
    logic [7:0] jpage;          // Jump RAM page
    logic [4:0] addr_hi;        // upper 5 bits of the branch address
    jmode_e     jmode;
    logic [8:0] alu_i;          // 2901 instruction I8..I0
    logic [5:0] alu_a;
    logic [5:0] alu_b;
    logic       alu_cin;
    logic       spare;
  } cycle_t;

  typedef struct packed {
    cycle_t cyc;
    tick_t  tick;
    tick_t  tock;
  } uinstr_t;

  // 2910 instructions
  localparam logic [3:0] S_JZ=4'd0, S_CJS=4'd1, S_JMAP=4'd2, S_CJP=4'd3, S_PUSH=4'd4,
    S_JSRP=4'd5, S_CJV=4'd6, S_JRP=4'd7, S_RFCT=4'd8, S_RPCT=4'd9, S_CRTN=4'd10,
    S_CJPP=4'd11, S_LDCT=4'd12, S_LOOP=4'd13, S_CONT=4'd14, S_TWB=4'd15;

  // CC mux inputs
  localparam int CC_TRUE=0, CC_ZERO=1, CC_CARRY=2, CC_SIGN=3, CC_OVR=4,
    CC_BIPIN=5, CC_BIPOUT=6, CC_GPTR=7, CC_MPTR=8, CC_PARERR=9, CC_GLAST=10;

  // One-clock strobes of the mechanisms a board exercises, for monitoring.
  typedef struct packed {
    logic swap;        // SendA/SendB changed roles
    logic route_local; // packet routed to a queue on its own board
    logic route_remote;// packet routed to the send queue
    logic mouth;       // mouth-open catch of an IMU address word
    logic nak;         // a packet was refused for want of a frame
    logic tx_pkt;      // packet sent over the Futurebus
    logic rx_pkt;      // packet received from the Futurebus
    logic burst;       // further packet sent in the same bus tenure
    logic refresh;     // RAM refresh started
    logic imu_stall;   // IMU held waiting for the BIP
  } board_ev_t;

  function automatic logic par40(input logic [MEM_W-1:0] d);
    return ^d;
  endfunction

endpackage
