// tb_pool_fifo: checks the population pool against a queue model.  Random pushes
// and pair pops (also in the same cycle) must return the entries in write order,
// count must follow the model, pair_avail must be set exactly when two entries are
// stored, and a push into a full pool must set overflow and be dropped.
module tb_pool_fifo;
  localparam int DEPTH = 8, W = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop2 = 0, pair_avail, full, overflow;
  logic [W-1:0] push_data = '0, rd0, rd1;
  logic [3:0] count;
  pool_fifo #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .push, .push_data, .pop2,
    .rd_data0(rd0), .rd_data1(rd1), .pair_avail, .count, .full, .overflow);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(pair_avail == (q.size() >= 2), "pair_avail");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() >= 2) check(rd0 == q[0] && rd1 == q[1], "read data order");
      push      = ($urandom % 100) < 55 && q.size() < DEPTH;
      pop2      = ($urandom % 100) < 30 && q.size() >= 2;
      push_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop2) begin void'(q.pop_front()); void'(q.pop_front()); end
      if (push) q.push_back(push_data);
    end
    @(negedge clk);
    push = 0; pop2 = 0;
    check(!overflow, "no overflow in normal use");
    // fill up and push once more
    while (q.size() < DEPTH) begin
      @(negedge clk); push = 1; push_data = W'($urandom);
      @(posedge clk); #1 q.push_back(push_data);
    end
    @(negedge clk); push = 1; push_data = '1;
    @(posedge clk); #1;
    @(negedge clk); push = 0;
    check(overflow, "overflow flag on push into full pool");
    check(int'(count) == DEPTH, "count stays at depth");
    check(rd0 == q[0], "data kept after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
