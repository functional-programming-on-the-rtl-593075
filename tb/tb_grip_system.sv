// tb_grip_system: end-to-end test of the whole machine at its full size
// (21 boards, default parameters). The 84 PEs are replaced by scripted
// masters on the BIP ports and each IMU has a behavioural RAM. The
// request-serving microprogram is loaded into every IMU through the load
// port, then the test runs traffic that makes every mechanism happen:
//   - PE to PE on the same board (local routing by the BIP)
//   - PE to PE on another board (send queue, bus transfer, board field
//     rewrite, routing at the receiver)
//   - PE to its own board's IMU and to remote IMUs: WRITE, READ and a
//     pointer chase, with the replies routed back to the asking PE
//   - many boards sending to one board at once (arbitration handovers,
//     bursts, receiver frame shortage -> nak -> resend and queue swap)
//   - the IMU input latch catching a packet's address word as it is
//     written (mouth open), IMU waits on the BIP, RAM refresh
//   - a RAM word with a bad parity bit, seen by the IMU's parity checker
// Each mechanism is counted from the boards' event outputs; a mechanism
// that never happens is a failure. Data are checked against a model.
module tb_grip_system;
  import grip_pkg::*;
  import imu_ucode_pkg::*;
  localparam int NB = 21;
  logic clk = 0, rst_n = 0;
  bip_req_t pe_req [NB][NPE];
  bip_rsp_t pe_rsp [NB][NPE];
  logic [NPE-1:0] pe_pending [NB];
  logic ras_n [NB], cs_n [NB], we_n [NB], d_par [NB], q_par [NB];
  logic [10:0] addr [NB];
  logic [MEM_W-1:0] d [NB], q [NB];
  logic [NB-1:0] imu_run = '0, par_err;
  logic [4:0] ld_board = 0;
  logic ld_cs_we = 0, ld_jr_we = 0, ld_reg_we = 0;
  logic [12:0] ld_addr = 0;
  logic [125:0] ld_data = 0;
  board_ev_t ev [NB];
  logic ev_handover;
  int checks = 0, failures = 0, n_done = 0;
  logic [NB-1:0] par_prev = '0;

  grip_system u_sys (.*);
  for (genvar b = 0; b < NB; b++) begin : g_mem
    dram_model u_mem (.clk, .ras_n(ras_n[b]), .cs_n(cs_n[b]), .we_n(we_n[b]), .addr(addr[b]),
                      .d(d[b]), .d_par(d_par[b]), .q(q[b]), .q_par(q_par[b]));
  end
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_swap, n_local, n_remote, n_mouth, n_nak, n_tx, n_rx, n_burst, n_refresh, n_stall,
      n_hand, n_par;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      n_swap += int'(ev[b].swap);       n_local += int'(ev[b].route_local);
      n_remote += int'(ev[b].route_remote); n_mouth += int'(ev[b].mouth);
      n_nak += int'(ev[b].nak);         n_tx += int'(ev[b].tx_pkt);
      n_rx += int'(ev[b].rx_pkt);       n_burst += int'(ev[b].burst);
      n_refresh += int'(ev[b].refresh); n_stall += int'(ev[b].imu_stall);
      n_par += int'(par_err[b] && !par_prev[b]);
    end
    n_hand += int'(ev_handover);
    par_prev <= par_err;
  end

  // ---- scripted PE: one BIP operation
  task automatic op(input int b, input int p, input bip_src_e s, input bip_dst_e dd,
                    input int sub, input logic we, input word_t wd, output word_t rd,
                    output logic fl);
    @(negedge clk);
    pe_req[b][p].go = 1; pe_req[b][p].src = s; pe_req[b][p].dst = dd;
    pe_req[b][p].sub = 8'(sub); pe_req[b][p].we = we; pe_req[b][p].wdata = wd;
    do @(posedge clk); while (!pe_rsp[b][p].done);
    rd = pe_rsp[b][p].rdata; fl = pe_rsp[b][p].fail;
    @(negedge clk); pe_req[b][p] = '0;
  endtask

  // send a packet: first operation claims a free frame (retry while none)
  task automatic send(input int b, input int p, input word_t w [$]);
    word_t rd; logic fl;
    do begin
      op(b, p, SRC_FREE, (w.size() == 1) ? DST_ROUTE : DST_TEMP, 0, 1, w[0], rd, fl);
      if (fl) repeat (20) @(posedge clk);
    end while (fl);
    for (int k = 1; k < w.size(); k++)
      op(b, p, SRC_TEMP, (k == w.size() - 1) ? DST_ROUTE : DST_KEEP, k, 1, w[k], rd, fl);
  endtask

  // receive one packet (waits up to 5000 clocks for it), frees the frame
  task automatic recv(input int b, input int p, output word_t w [$]);
    word_t rd; logic fl; int k, t;
    w.delete();
    t = 0;
    while (!pe_pending[b][p] && t < 5000) begin @(posedge clk); t++; end
    if (!pe_pending[b][p]) begin
      chk(0, $sformatf("no packet for PE %0d.%0d", b, p));
      return;
    end
    k = 0;
    do begin
      op(b, p, SRC_INQ, DST_KEEP, k, 0, '0, rd, fl);
      w.push_back(rd); k++;
    end while (rd[33] && k < 256);
    op(b, p, SRC_INQ, DST_FREE, k - 1, 0, '0, rd, fl);
  endtask

  function automatic word_t aw(int brd, int opc, int pe, bit more, int info);
    addr_word_t a;
    a.more = more; a.pe = 2'(pe); a.opcode = 5'(opc); a.board = 5'(brd); a.info = 21'(info);
    return word_t'(a);
  endfunction

  // IMU requests from PE (b,p) to the IMU on board t
  task automatic imu_write(int b, int p, int t, logic [21:0] a, word_t v);
    word_t r [$];
    send(b, p, '{aw(t, 2, p, 1, b * 4 + p), word_t'(ram_addr(a)) | 34'h2_0000_0000, v});
    recv(b, p, r);
    // the receiving BIP puts the sending board's number in the board field
    chk(r.size() == 1 && r[0] == aw(t, 0, p, 0, b * 4 + p),
        $sformatf("write reply to %0d.%0d from IMU %0d: %h", b, p, t, r[0]));
  endtask
  task automatic imu_read(int b, int p, int t, logic [21:0] a, output word_t v, input int opc = 1);
    word_t r [$];
    send(b, p, '{aw(t, opc, p, 1, b * 4 + p), word_t'(ram_addr(a))});
    recv(b, p, r);
    chk(r.size() == 2 && r[0] == aw(t, 0, p, 1, b * 4 + p),
        $sformatf("read reply to %0d.%0d from IMU %0d: %h", b, p, t, r[0]));
    v = (r.size() > 1) ? r[1] : '0;
  endtask

  task automatic load_all();
    cs_entry_t prog [$];
    server(prog);
    for (int b = 0; b < NB; b++) begin
      ld_board = 5'(b);
      foreach (prog[k]) begin
        @(negedge clk); ld_cs_we = 1; ld_addr = 13'(prog[k].a); ld_data = prog[k].u;
      end
      @(negedge clk); ld_cs_we = 0;
      // the Jump RAM entries the microprogram uses: location 0 of every
      // page (plain jumps) and the opcode dispatch page
      for (int k = 0; k < 8192; k++)
        if (k % 32 == 0 || k / 32 == DISPATCH_PAGE) begin
          @(negedge clk); ld_jr_we = 1; ld_addr = 13'(k); ld_data = 126'(jram_word(k));
        end
      @(negedge clk); ld_jr_we = 0;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); ld_reg_we = 1; ld_addr = 13'(k); ld_data = 126'(reg_word(k));
      end
      @(negedge clk); ld_reg_we = 0;
    end
  endtask

  initial begin
    word_t r [$];
    word_t v;
    for (int b = 0; b < NB; b++) for (int p = 0; p < NPE; p++) pe_req[b][p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_all();
    imu_run = '1;

    // 1. PE to PE on one board
    send(0, 0, '{aw(0, 0, 1, 1, 7), 34'h2_0000_00AA, 34'h0_0000_00BB});
    recv(0, 1, r);
    chk(r.size() == 3 && r[0] == aw(0, 0, 1, 1, 7) && r[2] == 34'h0_0000_00BB, "local PE packet");

    // 2. PE to PE across the bus: board field becomes the sender's board
    send(0, 2, '{aw(20, 0, 1, 1, 9), 34'h0_0000_1234});
    recv(20, 1, r);
    chk(r.size() == 2 && r[0] == aw(0, 0, 1, 1, 9) && r[1] == 34'h0_0000_1234,
        $sformatf("remote PE packet %h", r[0]));
    // and a reply straight back using the rewritten address word
    send(20, 1, '{aw(0, 0, 2, 0, 10)});
    recv(0, 2, r);
    chk(r.size() == 1 && r[0] == aw(20, 0, 2, 0, 10), "remote reply");

    // 3. IMU requests, local and remote, checked against the RAM models
    imu_write(4, 0, 4, 22'h000123, 34'h0_1357_9BDF);
    imu_read(4, 1, 4, 22'h000123, v);
    chk(v == 34'h0_1357_9BDF, $sformatf("local IMU read %h", v));
    imu_write(3, 2, 17, 22'h3ABCDE, 34'h1_2222_3333);
    chk(g_mem[17].u_mem.mem.exists(int'(22'h3ABCDE)), "word written into board 17's RAM");
    imu_read(11, 3, 17, 22'h3ABCDE, v);
    chk(v == 34'h1_2222_3333, $sformatf("remote IMU read %h", v));

    // 4. pointer chase in board 5's IMU for a PE on board 6
    begin
      logic [21:0] pp [5];
      for (int k = 0; k < 5; k++) pp[k] = 22'(k * 70001 + 5);
      for (int k = 0; k < 4; k++) begin
        logic [39:0] cw;
        cw = ram_addr(pp[k + 1]); cw[32] = 1'b1; cw[39:35] = 5'h11;
        g_mem[5].u_mem.mem[int'(pp[k])] = {^cw, cw};
      end
      g_mem[5].u_mem.mem[int'(pp[4])] = {^40'h00_0000_CAFE, 40'h00_0000_CAFE};
      imu_read(6, 0, 5, pp[0], v, 3);
      chk(v == 34'h0_0000_CAFE, $sformatf("pointer chase %h", v));
    end

    // 5. all boards at once: every PE0 sends four packets to board 9's PE3,
    //    which does not read until 40 have arrived: board 9 runs out of
    //    frames, refuses packets, and the senders retry
    fork
      for (int b = 0; b < NB; b++) if (b != 9) begin
        automatic int bb = b;
        fork
          begin
            for (int k = 0; k < 4; k++)
              send(bb, 0, '{aw(9, 0, 3, 1, bb * 16 + k), 34'h0_0000_0000 | 34'(bb * 16 + k)});
            n_done++;
          end
        join_none
      end
      begin
        int got [int];
        repeat (4000) @(posedge clk);
        for (int k = 0; k < 80; k++) begin
          recv(9, 3, r);
          if (r.size() == 2) got[int'(r[1])] = 1;
        end
        chk(got.num() == 80, $sformatf("%0d of 80 packets arrived at board 9", got.num()));
      end
    join
    wait (n_done == NB - 1);

    // 6. many PEs to one IMU at once (queueing at the IMU, BIP waits)
    fork
      for (int b = 0; b < 8; b++) begin
        automatic int bb = b;
        fork begin
          word_t vv;
          imu_write(bb, 1, 12, 22'(bb * 3 + 1), 34'(bb * 1111));
          imu_read(bb, 2, 12, 22'(bb * 3 + 1), vv);
          chk(vv == 34'(bb * 1111), $sformatf("board %0d via IMU 12: %h", bb, vv));
          n_done++;
        end join_none
      end
    join
    wait (n_done == NB - 1 + 8);

    chk(par_err == 0, "no parity errors from good data");
    // 7. a RAM word with bad parity, read by board 7's IMU (the flag stays set)
    g_mem[7].u_mem.mem[int'(22'h00777)] = {1'b1, 40'h00_0000_0000};
    imu_read(7, 3, 7, 22'h00777, v);

    chk(par_err == NB'(1) << 7, "parity error flagged on board 7 only");
    // let refresh run
    repeat (2000) @(posedge clk);

    $display("clocks run: %0d", $time / 10);
    $display("events: swap=%0d local=%0d remote=%0d mouth=%0d nak=%0d tx=%0d rx=%0d burst=%0d refresh=%0d imu_stall=%0d handover=%0d parity=%0d",
             n_swap, n_local, n_remote, n_mouth, n_nak, n_tx, n_rx, n_burst, n_refresh, n_stall,
             n_hand, n_par);
    chk(n_swap > 0, "send queue swap happened");
    chk(n_local > 0, "local routing happened");
    chk(n_remote > 0, "remote routing happened");
    chk(n_mouth > 0, "mouth-open catch happened");
    chk(n_nak > 0, "nak happened");
    chk(n_tx > 0 && n_tx == n_rx, $sformatf("bus packets tx=%0d rx=%0d", n_tx, n_rx));
    chk(n_burst > 0, "multi-word burst happened");
    chk(n_refresh > 0, "refresh happened");
    chk(n_stall > 0, "IMU waited on the BIP");
    chk(n_hand > 0, "bus handover happened");
    chk(n_par > 0, "parity error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
