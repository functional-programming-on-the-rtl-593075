// tb_imu: runs the request-serving microprogram on one IMU with a RAM model
// and a scripted BIP. Checks WRITE/READ round trips and reply headers, a
// pointer chase, the three-tick RAM read (RAS active to data in M), the
// tick count of a READ, parity error detection, BIP-wait stalls and refresh.
module tb_imu;
  import grip_pkg::*;
  import imu_ucode_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic in_valid, in_rd, out_ready, out_wr;
  word_t in_data, out_data;
  logic ras_n, cs_n, we_n, d_par, q_par, par_err, ev_refresh, ev_bip_stall, ev_tick;
  logic [10:0] addr;
  logic [39:0] d, q, m_out, g_out;
  logic ld_cs_we = 0, ld_jr_we = 0, ld_reg_we = 0;
  logic [12:0] ld_addr = 0;
  logic [125:0] ld_data = 0;
  int checks = 0, failures = 0;
  int n_refresh = 0, n_stall = 0, n_tick = 0;

  imu #(.REF_INTERVAL(60)) dut (.*);
  dram_model u_mem (.clk, .ras_n, .cs_n, .we_n, .addr, .d, .d_par, .q, .q_par);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_refresh += int'(ev_refresh);
    n_stall   += int'(ev_bip_stall);
    n_tick    += int'(ev_tick);
  end

  // scripted BIP: input words with optional gaps, output collected
  word_t inq [$];
  word_t outq [$];
  int    gap = 0, gap_left = 0;
  assign in_valid  = (inq.size() > 0) && gap_left == 0;
  assign in_data   = (inq.size() > 0) ? inq[0] : '0;
  assign out_ready = 1'b1;
  always @(posedge clk) begin
    if (in_rd && in_valid) begin void'(inq.pop_front()); gap_left <= gap; end
    else if (gap_left > 0) gap_left <= gap_left - 1;
    if (out_wr) outq.push_back(out_data);
  end

  function automatic word_t aw(logic [4:0] op, logic [4:0] brd, logic [1:0] pe, logic more);
    addr_word_t a;
    a.more = more; a.pe = pe; a.opcode = op; a.board = brd; a.info = 21'h1234;
    return word_t'(a);
  endfunction

  task automatic wait_out(int n);
    int t;
    t = 0;
    while (outq.size() < n && t < 20000) begin @(posedge clk); t++; end
    chk(outq.size() >= n, "reply arrived");
  endtask

  logic [39:0] image [int];

  initial begin
    cs_entry_t prog [$];
    int t_ras, t_m, t0, t1, r0, ticks0;
    logic [21:0] a;
    word_t w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load control store, Jump RAM, register bank
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
    @(negedge clk); ld_reg_we = 0; run = 1;

    // WRITE then READ at several addresses
    for (int k = 0; k < 12; k++) begin
      a = 22'($urandom);
      w = word_t'({1'b0, 33'($urandom)} | 34'(k));
      image[int'(a)] = {6'h0, w};
      gap = (k % 3 == 0) ? 7 : 0;
      outq.delete();
      inq.push_back(aw(2, 5'd7, 2'(k), 1));
      inq.push_back(word_t'(ram_addr(a)) | 34'h2_0000_0000);
      inq.push_back(w);
      wait_out(1);
      chk(outq[0] == aw(0, 5'd7, 2'(k), 0), $sformatf("write reply header %h", outq[0]));
      chk(u_mem.mem.exists(int'(a)) && u_mem.mem[int'(a)][39:0] == {6'h0, w}, "RAM written");
    end
    gap = 0;
    foreach (image[ai]) begin
      outq.delete();
      inq.push_back(aw(1, 5'd3, 2'd1, 1));
      inq.push_back(word_t'(ram_addr(22'(ai))));
      wait_out(2);
      chk(outq[0] == aw(0, 5'd3, 2'd1, 1), "read reply header");
      chk(outq[1] == word_t'(image[ai][33:0]), $sformatf("read data %h vs %h", outq[1], image[ai]));
    end

    // timing of one READ: RAS active to the word in M = 3 ticks = 9 clocks,
    // address word taken to data word sent = 9 ticks
    outq.delete();
    a = 22'h12345;
    u_mem.mem[int'(a)] = {1'b0, 40'h00_1111_2222};
    u_mem.mem[int'(a)][40] = ^u_mem.mem[int'(a)][39:0];
    inq.push_back(aw(1, 5'd3, 2'd2, 1));
    inq.push_back(word_t'(ram_addr(a)));
    while (!(in_rd && in_valid)) @(posedge clk);
    ticks0 = n_tick; r0 = n_refresh;
    while (ras_n) @(posedge clk);
    t_ras = $time / 10;
    while (m_out != 40'h00_1111_2222) @(posedge clk);
    t_m = $time / 10;
    if (n_refresh == r0) chk(t_m - t_ras == 9, $sformatf("RAS to data %0d clocks", t_m - t_ras));
    while (outq.size() < 2) @(posedge clk);
    if (n_refresh == r0) chk(n_tick - ticks0 == 9, $sformatf("READ took %0d ticks", n_tick - ticks0));

    // pointer chase over 6 words
    begin
      logic [21:0] p [7];
      for (int k = 0; k < 7; k++) p[k] = 22'(k * 4099 + 77);
      for (int k = 0; k < 6; k++) begin
        logic [39:0] v;
        v = ram_addr(p[k + 1]); v[32] = 1'b1; v[39:35] = 5'h11;
        u_mem.mem[int'(p[k])] = {^v, v};
      end
      u_mem.mem[int'(p[6])] = {^40'h00_0000_BEEF, 40'h00_0000_BEEF};
      outq.delete();
      inq.push_back(aw(3, 5'd9, 2'd3, 1));
      inq.push_back(word_t'(ram_addr(p[0])));
      wait_out(2);
      chk(outq[0] == aw(0, 5'd9, 2'd3, 1), "chase reply header");
      chk(outq[1] == 34'h0_0000_BEEF, $sformatf("chase result %h", outq[1]));
    end

    // parity error
    chk(!par_err, "no parity error yet");
    a = 22'h0ABCD;
    u_mem.mem[int'(a)] = {1'b0, 40'h00_0000_0001};   // wrong parity
    outq.delete();
    inq.push_back(aw(1, 5'd3, 2'd1, 1));
    inq.push_back(word_t'(ram_addr(a)));
    wait_out(2);
    chk(par_err, "parity error detected");

    chk(n_refresh > 0, $sformatf("refreshes %0d", n_refresh));
    chk(n_stall > 0, $sformatf("BIP stalls %0d", n_stall));
    $display("refresh=%0d stall=%0d ticks=%0d", n_refresh, n_stall, n_tick);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
