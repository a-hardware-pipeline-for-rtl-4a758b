// tb_mut_stage: checks the mutation stage (4 pairs of units, 100-bit chromosomes,
// 25 bits per cycle).  Pairs are offered as fast as the stage takes them and the
// output is drained with random stalls.  Every input chromosome must come out
// exactly once (matched to the nearest chromosome in Hamming distance),
// the number of flipped bits must equal the sum of the reported flips, the flip
// rate must be within 0.01 of Pm = 0.05, the first result must appear m + 1 = 5
// cycles after its pair is taken, and all eight units must be busy at some point
// (the stage then refuses new pairs).
module tb_mut_stage;
  localparam int CW = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [CW-1:0] in_a = '0, in_b = '0, out_data;
  logic [15:0] flips;
  logic [7:0] busy_units;
  mut_stage #(.CW(CW), .NM_PAIRS(4), .BPC(25), .PM(0.05)) dut (.clk, .rst_n, .in_valid,
    .in_ready, .in_a, .in_b, .out_valid, .out_ready, .out_data, .flips, .busy_units);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NPAIR = 600;
  logic [CW-1:0] sent [2*NPAIR];
  int  seen [2*NPAIR];
  bit  issued [2*NPAIR];
  longint flip_sum = 0, dist_sum = 0;
  int  nout = 0, max_busy = 0, refused = 0;
  int  t_take = -1, t_first = -1, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    flip_sum += flips;
    if (int'(busy_units) > max_busy) max_busy = int'(busy_units);
    if (in_valid && !in_ready) refused++;
    if (in_valid && in_ready && t_take < 0) t_take = cyc;
    if (in_valid && in_ready) begin
      for (int i = 0; i < 2*NPAIR; i++) if (!issued[i] && sent[i] == in_a) begin issued[i] = 1; issued[i+1] = 1; break; end
    end
    if (out_valid && t_first < 0) t_first = cyc;
    if (out_valid && out_ready) begin
      // match against the chromosomes still inside the stage: the nearest one in
      // Hamming distance (random 100-bit words differ in about 50 bits, a mutation
      // changes about 5)
      int best, bd, d;
      best = -1; bd = CW + 1;
      for (int i = 0; i < 2*NPAIR; i++) begin
        if (issued[i] && seen[i] == 0) begin
          d = 0;
          for (int b = 0; b < CW; b++) d += int'(out_data[b] != sent[i][b]);
          if (d < bd) begin bd = d; best = i; end
        end
      end
      if (best >= 0 && bd < 25) begin
        seen[best]++;
        dist_sum += bd;
      end else check(0, "unknown chromosome");
      nout++;
    end
    out_ready <= ($urandom % 100) < 40;
  end

  function automatic logic [CW-1:0] mk(int num);
    logic [CW-1:0] c;
    c = {$urandom, $urandom, $urandom, $urandom};
    c[11:0] = 12'(num);
    return c;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPAIR; p++) begin
      sent[2*p] = mk(2*p); sent[2*p+1] = mk(2*p+1);
      @(negedge clk);
      in_valid = 1; in_a = sent[2*p]; in_b = sent[2*p+1];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    repeat (300) @(posedge clk);
    check(nout == 2*NPAIR, $sformatf("outputs %0d", nout));
    for (int i = 0; i < 2*NPAIR; i++) check(seen[i] == 1, $sformatf("chromosome %0d seen %0d times", i, seen[i]));
    check(flip_sum == dist_sum, $sformatf("flip count %0d vs changed bits %0d", flip_sum, dist_sum));
    begin
      real rate;
      rate = real'(dist_sum) / real'(2*NPAIR*CW);
      check(rate > 0.04 && rate < 0.06, $sformatf("flip rate %f", rate));
    end
    check(t_first - t_take == 5, $sformatf("first result after %0d cycles", t_first - t_take));
    check(max_busy == 8, "all units busy at some point");
    check(refused > 0, "stage refused a pair when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
