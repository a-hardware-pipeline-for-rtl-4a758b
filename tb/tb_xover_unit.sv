// tb_xover_unit: checks the crossover unit on random parent pairs.  Each pair
// leaves one cycle after it is taken.  An uncrossed pair must come out unchanged; a
// crossed pair must be the two single-point children for the reported cut point,
// which must lie in 1..CW-1.  The crossover rate over 3000 pairs must be within
// 0.04 of Pc = 0.6, and a pair must be held while out_ready is low.
module tb_xover_unit;
  localparam int CW = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, crossed;
  logic [CW-1:0] in_a = '0, in_b = '0, out_a, out_b;
  logic [5:0] cut;
  xover_unit #(.CW(CW), .PC(0.6)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_a, .in_b,
    .out_valid, .out_ready, .out_a, .out_b, .crossed, .cut);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int nx;
    nx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [CW-1:0] a, b, m;
      logic c;
      int ct;
      @(negedge clk);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      in_valid = 1; in_a = a; in_b = b;
      #1;
      check(in_ready, "ready");
      c = crossed; ct = int'(cut);
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "one-cycle latency");
      if (c) begin
        nx++;
        check(ct >= 1 && ct <= CW - 1, "cut point range");
        m = (CW'(1) << ct) - 1;
        check(out_a == ((a & ~m) | (b & m)) && out_b == ((b & ~m) | (a & m)),
              $sformatf("children for cut %0d", ct));
      end else begin
        check(out_a == a && out_b == b, "uncrossed pair unchanged");
      end
    end
    begin
      real rate;
      rate = real'(nx) / 3000.0;
      check(rate > 0.56 && rate < 0.64, $sformatf("crossover rate %f", rate));
    end
    // hold
    @(negedge clk);
    out_ready = 0; in_valid = 1; in_a = '1; in_b = '0;
    @(posedge clk); #1;
    begin
      logic [CW-1:0] ha, hb;
      ha = out_a; hb = out_b;
      in_a = '0; in_b = '1;
      #1 check(!in_ready, "not ready while held");
      repeat (3) @(posedge clk);
      #1 check(out_valid && out_a == ha && out_b == hb, "pair held");
    end
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
