// tb_fb_if: two boards, each a BIP with its Futurebus interface logic, on a
// two-slot backplane. PEs are scripted. Checks that packets cross the bus
// intact and in order, with the board field replaced by the sender's number;
// that several packets go in one bus tenure; that a receiver with no empty
// frame refuses a packet, which is resent and delivered once frames free up.
module tb_fb_if;
  import grip_pkg::*;
  localparam int NB = 2;
  logic clk = 0, rst_n = 0;
  bip_req_t req [NB][NMASTERS];
  bip_rsp_t rsp [NB][NMASTERS];
  bip_req_t tbreq [NB][NMASTERS];
  bip_req_t txq [NB], rxq [NB];
  fb_out_t fo [NB];
  fb_in_t fi;
  logic s_ready [NB], s_nak [NB];
  logic bus_ready, bus_nak;
  logic [4:0] inq_pending [NB];
  logic send_pending [NB], free_empty [NB];
  logic ev_nak [NB], ev_tx [NB], ev_rx [NB], ev_burst [NB];
  int checks = 0, failures = 0, n_nak = 0, n_burst = 0, n_tx = 0;

  futurebus #(.NBOARDS(NB)) u_bus (.clk, .rst_n, .fo, .s_ready, .s_nak, .fi, .bus_ready,
    .bus_nak, .ev_handover());
  for (genvar b = 0; b < NB; b++) begin : g_b
    always_comb begin
      req[b] = tbreq[b];
      req[b][M_FBTX] = txq[b];
      req[b][M_FBRX] = rxq[b];
    end
    bip #(.BUF_WORDS(8192), .FRAME_LOG2(8)) u_bip (.clk, .rst_n, .board_id(5'(b)),
      .req(req[b]), .rsp(rsp[b]), .inq_pending(inq_pending[b]), .imu_head(),
      .send_pending(send_pending[b]), .free_empty(free_empty[b]), .snp_we(), .snp_master(),
      .snp_pkt(), .snp_sub(), .snp_data(), .ev_swap(), .ev_local(), .ev_remote());
    fb_if #(.MAX_TENURE(4)) dut (.clk, .rst_n, .board_id(5'(b)), .fo(fo[b]), .fi, .bus_ready,
      .bus_nak, .s_ready(s_ready[b]), .s_nak(s_nak[b]), .send_pending(send_pending[b]),
      .tx_req(txq[b]), .tx_rsp(rsp[b][M_FBTX]), .rx_req(rxq[b]), .rx_rsp(rsp[b][M_FBRX]),
      .ev_nak(ev_nak[b]), .ev_tx_pkt(ev_tx[b]), .ev_rx_pkt(ev_rx[b]), .ev_burst(ev_burst[b]));
  end
  always #5 clk = ~clk;
  always @(posedge clk) for (int b = 0; b < NB; b++) begin
    n_nak += int'(ev_nak[b]); n_burst += int'(ev_burst[b]); n_tx += int'(ev_tx[b]);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic op(input int b, input int m, input bip_src_e s, input bip_dst_e dd, input int sub,
                    input logic we, input word_t wd, output word_t rd, output logic fl);
    @(negedge clk);
    tbreq[b][m].go = 1; tbreq[b][m].src = s; tbreq[b][m].dst = dd; tbreq[b][m].sub = 8'(sub);
    tbreq[b][m].we = we; tbreq[b][m].wdata = wd;
    do @(posedge clk); while (!rsp[b][m].done);
    rd = rsp[b][m].rdata; fl = rsp[b][m].fail;
    @(negedge clk); tbreq[b][m] = '0;
  endtask

  function automatic word_t aw(int brd, int opc, int pe, bit more, int info);
    addr_word_t a;
    a.more = more; a.pe = 2'(pe); a.opcode = 5'(opc); a.board = 5'(brd); a.info = 21'(info);
    return word_t'(a);
  endfunction

  task automatic send3(input int from, input int to, input int pe, input int tag);
    word_t rd; logic fl;
    op(from, 0, SRC_FREE, DST_TEMP, 0, 1, aw(to, 0, pe, 1, tag), rd, fl);
    op(from, 0, SRC_TEMP, DST_KEEP, 1, 1, word_t'(34'h2_0000_0000 | tag), rd, fl);
    op(from, 0, SRC_TEMP, DST_ROUTE, 2, 1, word_t'(tag + 1), rd, fl);
  endtask

  task automatic recv3(input int b, input int pe, input int from, input int tag);
    word_t rd; logic fl; int t;
    t = 0;
    while (!inq_pending[b][pe] && t < 5000) begin @(posedge clk); t++; end
    op(b, pe, SRC_INQ, DST_KEEP, 0, 0, '0, rd, fl);
    chk(!fl && rd == aw(from, 0, pe, 1, tag), $sformatf("address word %h, board field = sender", rd));
    op(b, pe, SRC_INQ, DST_KEEP, 1, 0, '0, rd, fl);
    chk(rd == word_t'(34'h2_0000_0000 | tag), "word 1");
    op(b, pe, SRC_INQ, DST_FREE, 2, 0, '0, rd, fl);
    chk(rd == word_t'(tag + 1), "word 2");
  endtask

  initial begin
    word_t rd; logic fl; int n;
    for (int b = 0; b < NB; b++) for (int m = 0; m < NMASTERS; m++) tbreq[b][m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // 1. four packets board 0 -> board 1 PE2, queued before the bus is won
    for (int k = 0; k < 4; k++) send3(0, 1, 2, 16 * k);
    for (int k = 0; k < 4; k++) recv3(1, 2, 0, 16 * k);
    chk(n_tx == 4, $sformatf("%0d packets sent", n_tx));
    chk(n_burst > 0, "several packets in one tenure");

    // 2. fill board 1 with local packets until it has no free frame
    n = 0;
    do begin
      op(1, 3, SRC_FREE, DST_ROUTE, 0, 1, aw(1, 0, 3, 0, n), rd, fl);
      n++;
    end while (!fl);
    send3(0, 1, 1, 200);
    n = 0;
    while (n_nak == 0 && n < 3000) begin @(posedge clk); n++; end
    chk(n_nak > 0, "packet refused for want of a frame");
    // free board 1's frames; the refused packet gets through on a resend
    while (inq_pending[1][3]) op(1, 3, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl);
    recv3(1, 1, 0, 200);

    // 3. traffic the other way
    send3(1, 0, 0, 300);
    recv3(0, 0, 1, 300);
    $display("naks=%0d bursts=%0d sent=%0d", n_nak, n_burst, n_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
