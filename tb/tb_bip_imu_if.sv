// tb_bip_imu_if: a BIP plus the BIP/IMU interface, with PE, receiver and IMU
// sides scripted. Checks prefetched reading of a local packet, the
// mouth-open catch of a word written by the receiver (offered only once the
// packet is queued), a caught word overtaken by another packet, and packets
// written by the IMU reaching a PE.
module tb_bip_imu_if;
  import grip_pkg::*;
  logic clk = 0, rst_n = 0;
  bip_req_t req [NMASTERS];
  bip_rsp_t rsp [NMASTERS];
  bip_req_t tbreq [NMASTERS];
  logic [4:0] inq_pending, imu_head, snp_pkt;
  logic send_pending, free_empty, snp_we;
  logic [2:0] snp_master;
  logic [7:0] snp_sub;
  word_t snp_data, in_data, out_data;
  logic in_valid, in_rd, out_ready, out_wr, ev_mouth;
  int checks = 0, failures = 0, n_mouth = 0;

  always_comb begin
    req = tbreq;
    req[M_IMU] = ifreq;
  end
  bip_req_t ifreq;
  bip #(.BUF_WORDS(8192), .FRAME_LOG2(8)) u_bip (.clk, .rst_n, .board_id(5'd2), .req, .rsp,
    .inq_pending, .imu_head, .send_pending, .free_empty, .snp_we, .snp_master, .snp_pkt,
    .snp_sub, .snp_data, .ev_swap(), .ev_local(), .ev_remote());
  bip_imu_if #(.FRAME_LOG2(8), .PAW(5)) dut (.clk, .rst_n, .board_id(5'd2), .in_valid, .in_data,
    .in_rd, .out_ready, .out_wr, .out_data, .req(ifreq), .rsp(rsp[M_IMU]),
    .imu_pending(inq_pending[4]), .imu_head, .snp_we, .snp_master, .snp_pkt, .snp_sub,
    .snp_data, .ev_mouth_catch(ev_mouth));
  always #5 clk = ~clk;
  always @(posedge clk) n_mouth += int'(ev_mouth);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic op(input int m, input bip_src_e s, input bip_dst_e dd, input int sub,
                    input logic we, input word_t wd, output word_t rd);
    @(negedge clk);
    tbreq[m].go = 1; tbreq[m].src = s; tbreq[m].dst = dd; tbreq[m].sub = 8'(sub);
    tbreq[m].we = we; tbreq[m].wdata = wd;
    do @(posedge clk); while (!rsp[m].done);
    rd = rsp[m].rdata;
    @(negedge clk); tbreq[m] = '0;
  endtask

  task automatic imu_take(input word_t exp, input string what);
    int t;
    t = 0;
    @(negedge clk);
    while (!in_valid && t < 500) begin @(negedge clk); t++; end
    chk(in_valid && in_data == exp, $sformatf("%s: %h vs %h", what, in_data, exp));
    in_rd = 1; @(negedge clk); in_rd = 0;
  endtask

  function automatic word_t aw(int brd, int opc, int pe, bit more, int info);
    addr_word_t a;
    a.more = more; a.pe = 2'(pe); a.opcode = 5'(opc); a.board = 5'(brd); a.info = 21'(info);
    return word_t'(a);
  endfunction

  initial begin
    word_t rd;
    for (int m = 0; m < NMASTERS; m++) tbreq[m] = '0;
    in_rd = 0; out_wr = 0; out_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. local 3-word packet from PE0 to the IMU
    op(0, SRC_FREE, DST_TEMP, 0, 1, aw(2, 4, 0, 1, 5), rd);
    op(0, SRC_TEMP, DST_KEEP, 1, 1, 34'h2_0000_00AA, rd);
    op(0, SRC_TEMP, DST_ROUTE, 2, 1, 34'h0_0000_00BB, rd);
    imu_take(aw(2, 4, 0, 1, 5), "local word 0");
    imu_take(34'h2_0000_00AA, "local word 1");
    imu_take(34'h0_0000_00BB, "local word 2");
    repeat (20) @(posedge clk);
    chk(!inq_pending[4] && !in_valid, "frame released");

    chk(n_mouth == 1, "local address word caught too");
    // 2. mouth open: receiver writes word 0 while the IMU queue is empty
    op(M_FBRX, SRC_FREE, DST_TEMP, 0, 0, '0, rd);
    op(M_FBRX, SRC_TEMP, DST_KEEP, 0, 1, aw(7, 9, 1, 1, 6), rd);
    chk(n_mouth == 2, "address word caught");
    repeat (10) @(posedge clk);
    chk(!in_valid, "not offered before the packet is queued");
    op(M_FBRX, SRC_TEMP, DST_LOCAL, 1, 1, 34'h0_0000_00CC, rd);
    imu_take(aw(7, 9, 1, 1, 6), "caught word");
    imu_take(34'h0_0000_00CC, "word after catch");

    // 3. caught word overtaken by a local packet
    repeat (20) @(posedge clk);
    op(M_FBRX, SRC_FREE, DST_TEMP, 0, 0, '0, rd);
    op(M_FBRX, SRC_TEMP, DST_KEEP, 0, 1, aw(8, 3, 2, 1, 7), rd);
    chk(n_mouth == 3, "second catch");
    op(1, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 6, 1, 0, 8), rd);
    op(M_FBRX, SRC_TEMP, DST_LOCAL, 1, 1, 34'h0_0000_00DD, rd);
    imu_take(aw(2, 6, 1, 0, 8), "overtaking packet first");
    imu_take(aw(8, 3, 2, 1, 7), "then the caught packet");
    imu_take(34'h0_0000_00DD, "its last word");

    // 4. the IMU sends a 2-word packet to PE1 on this board
    @(negedge clk);
    chk(out_ready, "output latch free");
    out_data = aw(2, 0, 1, 1, 9); out_wr = 1; @(negedge clk); out_wr = 0;
    while (!out_ready) @(negedge clk);
    out_data = 34'h0_0000_00EE; out_wr = 1; @(negedge clk); out_wr = 0;
    repeat (30) @(posedge clk);
    chk(inq_pending[1], "PE1 has the IMU's packet");
    op(1, SRC_INQ, DST_KEEP, 0, 0, '0, rd);
    chk(rd == aw(2, 0, 1, 1, 9), "IMU packet word 0");
    op(1, SRC_INQ, DST_FREE, 1, 0, '0, rd);
    chk(rd == 34'h0_0000_00EE, "IMU packet word 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
