// tb_bip_queue: random pushes and pops against a reference queue; checks
// order, empty/full flags, count and simultaneous push and pop.
module tb_bip_queue;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [4:0] din, head;
  logic [5:0] count;
  int checks = 0, failures = 0;
  logic [4:0] model [$];

  bip_queue #(.DEPTH(32), .AW(5)) dut (.*);
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

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == 32), "full");
      chk(int'(count) == model.size(), "count");
      if (model.size() > 0) chk(head == model[0], $sformatf("head %0d vs %0d", head, model[0]));
      // phases: fill up, drain, then mixed
      if (i < 40)       begin push = 1; pop = 0; end
      else if (i < 80)  begin push = 0; pop = 1; end
      else begin push = $urandom_range(0, 1); pop = $urandom_range(0, 1); end
      if (model.size() == 32) push = 0;
      if (model.size() == 0) pop = 0;
      din = 5'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
