// tb_bip_free_stack: checks the reset contents (every frame, 0 on top), then
// random pushes and pops against a reference stack.
module tb_bip_free_stack;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty;
  logic [4:0] din, top;
  logic [5:0] count;
  int checks = 0, failures = 0;
  logic [4:0] model [$];

  bip_free_stack #(.DEPTH(32), .AW(5)) dut (.*);
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
    for (int i = 31; i >= 0; i--) model.push_back(5'(i));   // back = top
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(int'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      if (model.size() > 0) chk(top == model[$], $sformatf("top %0d vs %0d", top, model[$]));
      if (i < 40)      begin push = 0; pop = 1; end
      else if (i < 80) begin push = 1; pop = 0; end
      else begin push = $urandom_range(0, 1); pop = $urandom_range(0, 1); end
      if (model.size() == 32) push = 0;
      if (model.size() == 0) pop = 0;
      din = 5'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_back());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
