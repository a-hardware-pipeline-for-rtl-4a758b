// tb_eval_stack: checks the shift-register stack against a queue model with
// random pushes and pops: top must always be the last value pushed and not yet
// popped, count must equal the model's depth, and pushing onto a full stack or
// popping an empty one must set overflow / underflow until clear.
module tb_eval_stack;
  import plga_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0, overflow, underflow;
  fix_t din = '0, top;
  logic [3:0] count;
  eval_stack #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .push, .pop, .din, .top,
    .count, .overflow, .underflow);

  int checks = 0, failures = 0;
  fix_t model[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(top == model[$], "top of stack");
      check(!overflow && !underflow, "no error flags in legal use");
      push = 0; pop = 0;
      if (($urandom % 2 == 0 && model.size() < DEPTH) || model.size() == 0) begin
        push = 1; din = fix_t'({$urandom, $urandom});
      end else pop = 1;
      @(posedge clk); #1;
      if (push) model.push_back(din);
      else void'(model.pop_back());
    end
    @(negedge clk);
    push = 0; pop = 0;
    while (model.size() < DEPTH) begin
      @(negedge clk) push = 1; din = fix_t'($urandom);
      @(posedge clk); #1 model.push_back(din);
    end
    @(negedge clk) push = 1;
    @(negedge clk) push = 0;
    check(overflow && int'(count) == DEPTH, "overflow on full stack");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(!overflow && count == '0, "clear");
    pop = 1;
    @(negedge clk) pop = 0;
    check(underflow && count == '0, "underflow on empty stack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
