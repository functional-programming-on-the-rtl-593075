// tb_futurebus: three scripted boards on the backplane. Checks that only one
// master holds the bus, that a master keeps it while it requests, round-robin
// handover, that the slave is chosen by the address word's board field and
// held for the packet, that its ready/nak reach the master, and that an
// absent board is refused.
module tb_futurebus;
  import grip_pkg::*;
  localparam int NB = 3;
  logic clk = 0, rst_n = 0;
  fb_out_t fo [NB];
  logic s_ready [NB], s_nak [NB];
  fb_in_t fi;
  logic bus_ready, bus_nak, ev_handover;
  int checks = 0, failures = 0, n_hand = 0;

  futurebus #(.NBOARDS(NB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) n_hand += int'(ev_handover);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin fo[b] = '0; s_ready[b] = 0; s_nak[b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // boards 1 and 2 request together
    @(negedge clk); fo[1].req = 1; fo[2].req = 1;
    @(negedge clk);
    chk(fi.gnt_valid && fi.master == 1, $sformatf("first grant %0d", fi.master));
    repeat (3) begin @(negedge clk); chk(fi.master == 1, "master keeps the bus"); end
    // board 1 sends an address word to board 2, slave 2 ready, slave 0 nak
    fo[1].valid = 1; fo[1].first = 1; fo[1].data = 34'h2_0040_0000 | (34'd2 << 21);
    s_ready[2] = 1; s_nak[0] = 1; #1;
    chk(fi.valid && fi.first && bus_ready && !bus_nak, "slave 2 answers the address word");
    @(negedge clk);
    fo[1].first = 0; fo[1].data = 34'h0_0000_0001; s_ready[2] = 0; #1;
    chk(!bus_ready && !bus_nak, "slave held for the data word, not ready yet");
    s_ready[2] = 1; #1;
    chk(bus_ready, "slave 2 ready for data");
    @(negedge clk); fo[1] = '0; s_ready[2] = 0; s_nak[0] = 0;
    @(negedge clk);
    chk(fi.master == 2 && fi.gnt_valid, "handover to board 2");
    // board 2 addresses board 0, which refuses
    fo[2].valid = 1; fo[2].first = 1; fo[2].data = 34'h2_0000_0000; s_nak[0] = 1; #1;
    chk(bus_nak && !bus_ready, "nak from board 0");
    s_nak[0] = 0;
    // absent board 7
    fo[2].data = 34'h2_0000_0000 | (34'd7 << 21); #1;
    chk(bus_nak, "absent board refused");
    @(negedge clk); fo[2] = '0;
    @(negedge clk); @(negedge clk);
    chk(!fi.gnt_valid, "bus idle");
    // board 0 then board 1 both request while 2 holds: order 0, 1
    fo[2].req = 1; @(negedge clk); @(negedge clk);
    fo[0].req = 1; fo[1].req = 1; @(negedge clk);
    chk(fi.master == 2, "holder not pre-empted");
    fo[2].req = 0; @(negedge clk);
    chk(fi.master == 0, "next in round robin after 2 is 0");
    fo[0].req = 0; @(negedge clk);
    chk(fi.master == 1, "then 1");
    chk(n_hand >= 4, "handovers counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
