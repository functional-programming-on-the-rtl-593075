// tb_bip: exercises the Bus Interface Processor through its master ports:
// one-operation local packets, packets built in stages in the temporary
// store and routed by reading the address word back, send queue and resend
// swap, per-sender ordering, running out of free frames, operation latency
// and round-robin arbitration between simultaneous masters.
module tb_bip;
  import grip_pkg::*;
  logic clk = 0, rst_n = 0;
  bip_req_t req [NMASTERS];
  bip_rsp_t rsp [NMASTERS];
  logic [4:0] inq_pending;
  logic [4:0] imu_head, snp_pkt;
  logic send_pending, free_empty, snp_we, ev_swap, ev_local, ev_remote;
  logic [2:0] snp_master;
  logic [7:0] snp_sub;
  word_t snp_data;
  int checks = 0, failures = 0, n_swap = 0, n_snoop = 0;

  bip #(.BUF_WORDS(8192), .FRAME_LOG2(8)) dut (.clk, .rst_n, .board_id(5'd2), .req, .rsp,
    .inq_pending, .imu_head, .send_pending, .free_empty, .snp_we, .snp_master, .snp_pkt,
    .snp_sub, .snp_data, .ev_swap, .ev_local, .ev_remote);
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
  always @(posedge clk) begin n_swap += int'(ev_swap); n_snoop += int'(snp_we); end

  task automatic op(input int m, input bip_src_e s, input bip_dst_e dd, input int sub,
                    input logic we, input word_t wd, output word_t rd, output logic fl,
                    output int lat);
    @(negedge clk);
    req[m].go = 1; req[m].src = s; req[m].dst = dd; req[m].sub = 8'(sub);
    req[m].we = we; req[m].wdata = wd;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!rsp[m].done);
    rd = rsp[m].rdata; fl = rsp[m].fail;
    @(negedge clk); req[m] = '0;
  endtask

  function automatic word_t aw(int brd, int opc, int pe, bit more, int info);
    addr_word_t a;
    a.more = more; a.pe = 2'(pe); a.opcode = 5'(opc); a.board = 5'(brd); a.info = 21'(info);
    return word_t'(a);
  endfunction

  initial begin
    word_t rd; logic fl; int lat, n;
    for (int m = 0; m < NMASTERS; m++) req[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(!free_empty && inq_pending == 0 && !send_pending, "reset state");

    // 1. one-word packet PE0 -> PE1 in one operation
    op(0, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 0, 1, 0, 11), rd, fl, lat);
    chk(!fl && lat == 4, $sformatf("one-op send, latency %0d", lat));
    chk(inq_pending == 5'b00010, "PE1 queue has it");
    op(1, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    chk(rd == aw(2, 0, 1, 0, 11), "PE1 reads it");
    chk(inq_pending == 0, "PE1 queue empty again");

    // 2. four-word packet to the IMU, built in stages, routed at the last word
    op(2, SRC_FREE, DST_TEMP, 0, 1, aw(2, 5, 2, 1, 99), rd, fl, lat);
    for (int k = 1; k < 3; k++) op(2, SRC_TEMP, DST_KEEP, k, 1, word_t'(34'h2_0000_0000 | k), rd, fl, lat);
    op(2, SRC_TEMP, DST_ROUTE, 3, 1, word_t'(34'h0_0000_0003), rd, fl, lat);
    chk(lat == 5, $sformatf("route with address read, latency %0d", lat));
    chk(inq_pending == 5'b10000, "IMU queue has it");
    for (int k = 0; k < 4; k++) begin
      op(M_IMU, SRC_INQ, (k == 3) ? DST_FREE : DST_KEEP, k, 0, '0, rd, fl, lat);
      chk(rd == ((k == 0) ? aw(2, 5, 2, 1, 99) : word_t'((k < 3 ? 34'h2_0000_0000 : 0) | k)),
          $sformatf("IMU word %0d = %h", k, rd));
    end
    chk(inq_pending == 0, "IMU queue empty");

    // 3. remote packet, refused once (resend, swap), then sent
    op(3, SRC_FREE, DST_ROUTE, 0, 1, aw(9, 4, 3, 0, 5), rd, fl, lat);
    chk(send_pending && inq_pending == 0, "queued for the bus");
    op(M_FBTX, SRC_SENDQ, DST_KEEP, 0, 0, '0, rd, fl, lat);
    chk(rd == aw(9, 4, 3, 0, 5), "transmitter reads it");
    op(M_FBTX, SRC_SENDQ, DST_RESEND, 0, 0, '0, rd, fl, lat);
    repeat (3) @(posedge clk);
    chk(n_swap == 1 && send_pending, "send queues swapped");
    op(M_FBTX, SRC_SENDQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    repeat (3) @(posedge clk);
    chk(!send_pending, "sent");

    // 4. order kept: three packets PE0 -> PE1
    for (int k = 0; k < 3; k++) op(0, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 0, 1, 0, 100 + k), rd, fl, lat);
    for (int k = 0; k < 3; k++) begin
      op(1, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
      chk(rd == aw(2, 0, 1, 0, 100 + k), $sformatf("order %0d", k));
    end

    // 5. running out of frames: exactly 32 packets fit
    n = 0;
    for (int k = 0; k < 34; k++) begin
      op(0, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 0, 3, 0, k), rd, fl, lat);
      if (!fl) n++;
    end
    chk(n == 32 && free_empty, $sformatf("%0d frames", n));
    op(3, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    chk(!free_empty && rd == aw(2, 0, 3, 0, 0), "frame returned");
    for (int k = 1; k < 32; k++) op(3, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    op(3, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    chk(fl, "empty queue read fails");

    // 6. two masters at once: both served, one after the other
    fork
      begin word_t r1; logic f1; int l1; op(0, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 0, 2, 0, 1), r1, f1, l1); end
      begin word_t r2; logic f2; int l2; op(1, SRC_FREE, DST_ROUTE, 0, 1, aw(2, 0, 2, 0, 2), r2, f2, l2);
            chk(l2 > 3, "second master waited"); end
    join
    op(2, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    chk(rd[20:0] == 1, "lower-numbered master first");
    op(2, SRC_INQ, DST_FREE, 0, 0, '0, rd, fl, lat);
    chk(rd[20:0] == 2, "then the other");
    chk(n_snoop > 0, "writes visible on the snoop port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
