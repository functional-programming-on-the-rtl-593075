// futurebus: the backplane shared by the GRIP boards.
//
// A simplified synchronous model of the packet-switched bus protocol: boards
// raise req for mastership; the arbiter picks the next master round robin
// while the current one is still transferring, so the handover costs one
// clock. The master keeps req high for as long as it wants the bus and may
// send several packets end to end. A packet's first word (first = 1) is its
// address word; the board whose number is in its board field [25:21] becomes
// the slave for the rest of the packet. Each word moves on a valid/ready
// handshake (the two-edge block transfer of the real bus). The slave answers
// the address word with nak instead of ready when it has no empty packet
// frame; an address word naming an absent board is also refused with nak.
// Every board sees the master's board number, which receivers use to rewrite
// the board field of incoming address words.
// Electrical details, distributed arbitration and the real Futurebus signal
// set are not modelled; the handshake and arbitration here are this design's.
module futurebus
  import grip_pkg::*;
#(
  parameter int NBOARDS = 21
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fb_out_t fo [NBOARDS],
  input  logic    s_ready [NBOARDS],
  input  logic    s_nak [NBOARDS],
  output fb_in_t  fi,
  output logic    bus_ready,
  output logic    bus_nak,
  output logic    ev_handover
);
  logic [4:0] master, next;
  logic       gv, any;
  logic [4:0] sel_r, sel;

  always_comb begin
    any  = 1'b0;
    next = master;
    for (int k = 1; k <= NBOARDS; k++) begin
      int b;
      b = (int'(master) + k) % NBOARDS;
      if (!any && fo[b].req) begin
        any  = 1'b1;
        next = 5'(b);
      end
    end
  end

  wire holding = gv && fo[master].req;
  assign ev_handover = !holding && any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master <= '0; gv <= 1'b0; sel_r <= '0;
    end else begin
      if (!holding) begin
        gv <= any;
        if (any) master <= next;
      end
      if (fi.valid && fi.first) sel_r <= sel;
    end
  end

  wire present = int'(sel) < NBOARDS;
  always_comb begin
    fi.master    = master;
    fi.gnt_valid = gv;
    fi.valid     = gv && fo[master].valid;
    fi.first     = gv && fo[master].first;
    fi.data      = fo[master].data;
  end
  assign sel       = fi.first ? fi.data[25:21] : sel_r;
  assign bus_ready = present ? s_ready[sel] : 1'b0;
  assign bus_nak   = present ? s_nak[sel]   : fi.first;

  a_ready_nak: assert property (@(posedge clk) disable iff (!rst_n) !(bus_ready && bus_nak))
    else $error("futurebus: ready and nak together");
endmodule
