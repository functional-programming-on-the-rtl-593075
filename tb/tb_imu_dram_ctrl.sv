// tb_imu_dram_ctrl: runs ticks of random RAS/CS/WE patterns and checks each
// sub-tick's pin levels against the pattern bits, that WE is only ever active
// in the middle sub-tick, the address pins, refresh (due every 3*REF_INTERVAL
// clocks, deferred while RAS was left active, RAS-only on successive rows,
// holding the IMU for REF_SUBTICKS sub-ticks) and the parity check.
module tb_imu_dram_ctrl;
  import grip_pkg::*;
  localparam int RI = 20;
  logic clk = 0, rst_n = 0, tick_start, tick_end, active, check, q_par;
  logic [1:0] st;
  tick_t tk;
  logic [39:0] m, q, d;
  logic ras_n, cs_n, we_n, d_par, hold, par_err, ev_refresh;
  logic [10:0] addr;
  int checks = 0, failures = 0, n_ref = 0, n_ticks = 0, hold_clks = 0;

  imu_dram_ctrl #(.REF_INTERVAL(RI), .REF_SUBTICKS(6)) dut (.*);
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

  // sub-tick timing as the control section makes it
  assign tick_start = (st == 0) && !active && !hold;
  assign tick_end   = (st == 2);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin st <= 0; active <= 0; end
    else if (tick_start) begin st <= 1; active <= 1; end
    else if (active && st == 1) st <= 2;
    else if (tick_end) begin st <= 0; active <= 0; end

  logic [10:0] last_ref_row;
  logic        seen_ref = 0;
  always @(posedge clk) if (rst_n) begin
    n_ref += int'(ev_refresh);
    hold_clks += int'(hold);
    if (!we_n) chk(active && st == 1, "WE only in the middle sub-tick");
    if (dut.in_ref && !ras_n && dut.ref_st == 0) begin
      if (seen_ref) chk(addr == last_ref_row + 1, "refresh rows in sequence");
      last_ref_row = addr; seen_ref = 1;
    end
  end

  initial begin
    tick_t t;
    int n_ref_at;
    tk = '0; m = 0; q = 0; q_par = 0; check = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      t = '0;
      t.ras = 3'($urandom); t.cs = 3'($urandom); t.we = 1'($urandom);
      if (k >= 200 && k < 260) t.ras = 3'b100;   // RAS left active: refresh must wait
      m = {$urandom, 8'($urandom)};
      @(negedge clk);
      tk = t;
      #1;
      while (!tick_start) begin @(negedge clk); #1; end
      for (int s = 0; s < 3; s++) begin
        chk(ras_n == !t.ras[s], $sformatf("RAS sub-tick %0d", s));
        chk(cs_n == !t.cs[s], $sformatf("CS sub-tick %0d", s));
        chk(we_n == !(t.we && s == 1), "WE level");
        chk(addr == m[10:0] && d == m && d_par == ^m, "address and data pins");
        if (s < 2) begin @(negedge clk); #1; end
      end
      n_ticks++;
      if (k == 201) n_ref_at = n_ref;
      if (k == 259) chk(n_ref == n_ref_at, $sformatf("refresh deferred while RAS held: %0d", n_ref));
    end
    chk(n_ref >= 15, $sformatf("refreshes %0d in %0d ticks", n_ref, n_ticks));
    chk(hold_clks == 7 * n_ref || hold_clks == 7 * n_ref - 6 || dut.in_ref,
        $sformatf("hold time %0d for %0d refreshes", hold_clks, n_ref));
    // parity: a word with a wrong parity bit sets par_err
    @(negedge clk);
    chk(!par_err, "no parity error yet");
    tk = '0; q = 40'h00_0000_0003; q_par = 0; check = 1;
    while (!tick_end) @(negedge clk);
    @(negedge clk);
    chk(!par_err, "good parity accepted");
    q = 40'h00_0000_0007; q_par = 0;
    while (!tick_end) @(negedge clk);
    @(negedge clk);
    chk(par_err, "bad parity detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
