// tb_grip_board: one board (slot 0) on a two-slot backplane whose other slot
// is played by the testbench. Scripted PEs and a behavioural RAM surround
// the board; the request-serving microprogram is loaded into its IMU.
// Checks: PE to PE on the board (and the 4-clock latency of a one-word
// send), WRITE and READ requests to the board's own IMU with replies back to
// the asking PE, a packet for the other slot leaving on the bus (refused
// once with nak, then resent and taken), and a packet from the other slot
// reaching a PE with the board field rewritten to the sender's slot. At the
// end the board's event counts (local and remote routes, nak, packets in and
// out, mouth-open catches, refresh) must match what the traffic implies.
module tb_grip_board;
  import grip_pkg::*;
  import imu_ucode_pkg::*;
  logic clk = 0, rst_n = 0;
  bip_req_t pe_req [NPE];
  bip_rsp_t pe_rsp [NPE];
  logic [NPE-1:0] pe_pending;
  fb_out_t fo [2];
  fb_in_t fi;
  logic bus_ready, bus_nak, ev_handover;
  logic s_ready [2], s_nak [2];
  logic ras_n, cs_n, we_n, d_par, q_par, par_err, imu_run = 0;
  logic [10:0] addr;
  logic [MEM_W-1:0] d, q;
  logic ld_cs_we = 0, ld_jr_we = 0, ld_reg_we = 0;
  logic [12:0] ld_addr = 0;
  logic [125:0] ld_data = 0;
  board_ev_t ev;
  int checks = 0, failures = 0;

  grip_board dut (.clk, .rst_n, .board_id(5'd0), .pe_req, .pe_rsp, .pe_pending, .fo(fo[0]), .fi,
    .bus_ready, .bus_nak, .s_ready(s_ready[0]), .s_nak(s_nak[0]), .ras_n, .cs_n, .we_n, .addr,
    .d, .d_par, .q, .q_par, .imu_run, .ld_cs_we, .ld_jr_we, .ld_reg_we, .ld_addr, .ld_data,
    .par_err, .ev);
  futurebus #(.NBOARDS(2)) u_bus (.clk, .rst_n, .fo, .s_ready, .s_nak, .fi, .bus_ready, .bus_nak,
    .ev_handover);
  dram_model u_mem (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_local = 0, n_remote = 0, n_mouth = 0, n_nak = 0, n_tx = 0, n_rx = 0, n_refresh = 0;
  always @(posedge clk) if (rst_n) begin
    n_local += int'(ev.route_local); n_remote += int'(ev.route_remote); n_mouth += int'(ev.mouth);
    n_nak += int'(ev.nak); n_tx += int'(ev.tx_pkt); n_rx += int'(ev.rx_pkt);
    n_refresh += int'(ev.refresh);
  end

  // slot 1 as a slave: refuses the first address word offered, then takes all
  word_t got1 [$];
  int    naks_left = 1;
  logic  sel1 = 0;
  always_comb begin
    s_ready[1] = !(fi.first && naks_left > 0);
    s_nak[1]   = fi.first && naks_left > 0;
  end
  always @(posedge clk) if (rst_n && fi.valid) begin
    if (fi.first && fi.data[25:21] == 5'd1) begin
      if (naks_left > 0) naks_left--;
      else begin got1.push_back(fi.data); sel1 = 1; end
    end else if (fi.first) sel1 = 0;
    else if (sel1 && bus_ready) got1.push_back(fi.data);
  end

  // slot 1 as a master: sends one packet, word by word on the handshake
  task automatic tx1(input word_t w [$]);
    fo[1] = '0;
    @(negedge clk); fo[1].req = 1;
    while (!(fi.gnt_valid && fi.master == 5'd1)) @(negedge clk);
    foreach (w[k]) begin
      fo[1].valid = 1; fo[1].first = (k == 0); fo[1].data = w[k];
      do @(posedge clk); while (!bus_ready);
      @(negedge clk);
    end
    fo[1] = '0;
  endtask

  task automatic op(input int p, input bip_src_e s, input bip_dst_e dd, input int sub,
                    input logic we, input word_t wd, output word_t rd, output logic fl,
                    output int lat);
    @(negedge clk);
    pe_req[p].go = 1; pe_req[p].src = s; pe_req[p].dst = dd;
    pe_req[p].sub = 8'(sub); pe_req[p].we = we; pe_req[p].wdata = wd;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!pe_rsp[p].done);
    rd = pe_rsp[p].rdata; fl = pe_rsp[p].fail;
    @(negedge clk); pe_req[p] = '0;
  endtask

  task automatic send(input int p, input word_t w [$]);
    word_t rd; logic fl; int lat;
    op(p, SRC_FREE, (w.size() == 1) ? DST_ROUTE : DST_TEMP, 0, 1, w[0], rd, fl, lat);
    for (int k = 1; k < w.size(); k++)
      op(p, SRC_TEMP, (k == w.size() - 1) ? DST_ROUTE : DST_KEEP, k, 1, w[k], rd, fl, lat);
  endtask

  task automatic recv(input int p, output word_t w [$]);
    word_t rd; logic fl; int k, lat, t;
    w.delete();
    t = 0;
    while (!pe_pending[p] && t < 20000) begin @(posedge clk); t++; end
    if (!pe_pending[p]) return;
    k = 0;
    do begin
      op(p, SRC_INQ, DST_KEEP, k, 0, '0, rd, fl, lat);
      w.push_back(rd); k++;
    end while (rd[33] && k < 256);
    op(p, SRC_INQ, DST_FREE, k - 1, 0, '0, rd, fl, lat);
  endtask

  function automatic word_t aw(int brd, int opc, int pe, bit more, int info);
    addr_word_t a;
    a.more = more; a.pe = 2'(pe); a.opcode = 5'(opc); a.board = 5'(brd); a.info = 21'(info);
    return word_t'(a);
  endfunction

  initial begin
    cs_entry_t prog [$];
    word_t r [$];
    word_t rd; logic fl; int lat;
    for (int p = 0; p < NPE; p++) pe_req[p] = '0;
    fo[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    server(prog);
    foreach (prog[k]) begin
      @(negedge clk); ld_cs_we = 1; ld_addr = 13'(prog[k].a); ld_data = prog[k].u;
    end
    @(negedge clk); ld_cs_we = 0;
    for (int k = 0; k < 8192; k++) begin
      @(negedge clk); ld_jr_we = 1; ld_addr = 13'(k); ld_data = 126'(jram_word(k));
    end
    @(negedge clk); ld_jr_we = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ld_reg_we = 1; ld_addr = 13'(k); ld_data = 126'(reg_word(k));
    end
    @(negedge clk); ld_reg_we = 0; imu_run = 1;

    // PE0 -> PE3, one word, one operation
    op(0, SRC_FREE, DST_ROUTE, 0, 1, aw(0, 0, 3, 0, 77), rd, fl, lat);
    chk(!fl && lat == 4, $sformatf("one-word send latency %0d", lat));
    chk(pe_pending == 4'b1000, "PE3 has a packet");
    recv(3, r);
    chk(r.size() == 1 && r[0] == aw(0, 0, 3, 0, 77), "PE3 got it");

    // WRITE and READ through the board's IMU
    send(1, '{aw(0, 2, 1, 1, 5), word_t'(ram_addr(22'h0ABCD)) | 34'h2_0000_0000, 34'h1_0F0F_0F0F});
    recv(1, r);
    chk(r.size() == 1 && r[0] == aw(0, 0, 1, 0, 5), $sformatf("write reply %h", r.size() ? r[0] : 0));
    chk(u_mem.mem.exists(int'(22'h0ABCD)) && u_mem.mem[int'(22'h0ABCD)][33:0] == 34'h1_0F0F_0F0F,
        "word in RAM");
    send(2, '{aw(0, 1, 2, 1, 6), word_t'(ram_addr(22'h0ABCD))});
    recv(2, r);
    chk(r.size() == 2 && r[0] == aw(0, 0, 2, 1, 6) && r[1] == 34'h1_0F0F_0F0F,
        $sformatf("read reply %h", r.size() > 1 ? r[1] : 0));

    // packet to slot 1: refused once, resent, delivered intact
    send(0, '{aw(1, 0, 2, 1, 8), 34'h2_0000_0001, 34'h0_0000_0002});
    for (int t = 0; t < 2000 && got1.size() < 3; t++) @(posedge clk);
    chk(got1.size() == 3 && got1[0] == aw(1, 0, 2, 1, 8) && got1[2] == 34'h0_0000_0002,
        $sformatf("slot 1 got %0d words", got1.size()));
    chk(naks_left == 0, "nak was given");

    // packet from slot 1 to PE2: board field becomes 1
    tx1('{aw(0, 0, 2, 1, 9), 34'h0_0000_4321});
    recv(2, r);
    chk(r.size() == 2 && r[0] == aw(1, 0, 2, 1, 9) && r[1] == 34'h0_0000_4321,
        $sformatf("received from slot 1: %h", r.size() ? r[0] : 0));
    // board events: 3 PE packets + 2 IMU replies + 1 received packet routed
    // locally, one packet sent remotely after one nak, the IMU's two request
    // address words caught as the PEs wrote them, refresh while running
    chk(n_local == 6, $sformatf("local routes %0d", n_local));
    chk(n_remote == 1 && n_tx == 1 && n_nak == 1, $sformatf("remote %0d tx %0d nak %0d", n_remote, n_tx, n_nak));
    chk(n_rx == 1, $sformatf("received %0d", n_rx));
    chk(n_mouth == 2, $sformatf("mouth-open catches %0d", n_mouth));
    chk(n_refresh > 0 && !par_err, "refresh ran, no parity error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
