// tb_eval_stage: checks the parallel evaluation stage with its twelve units.  A
// stream of 200 random chromosomes is offered as fast as the stage takes them,
// with the sphere-based test program, and the output is drained with random
// stalls.  Every chromosome must come back exactly once with the right fitness;
// all twelve units must be busy at some point, and the stage must then refuse new
// input.  The division counter must count one division per chromosome.
module tb_eval_stage;
  import plga_pkg::*;
  import tb_ref_pkg::*;
  localparam int NV = 4, PL = 64, NE = 12, N = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  entry_t prog [PL];
  logic [6:0] prog_len = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_err;
  logic [NV*GENE_W-1:0] in_chrom = '0, out_chrom;
  fix_t out_fit;
  logic [7:0] busy_units, ops_add, ops_sub, ops_mul, ops_div;
  eval_stage #(.NVAR(NV), .NE(NE), .PF_LEN(PL)) dut (.clk, .rst_n, .prog, .prog_len,
    .in_valid, .in_ready, .in_chrom, .out_valid, .out_ready, .out_chrom, .out_fit,
    .out_err, .busy_units, .ops_add, .ops_sub, .ops_mul, .ops_div);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [NV*GENE_W-1:0] sent [N];
  int seen [N];
  int nout = 0, max_busy = 0, refused = 0, ndiv = 0;

  always @(posedge clk) if (rst_n) begin
    if (int'(busy_units) > max_busy) max_busy = int'(busy_units);
    if (in_valid && !in_ready) refused++;
    ndiv += ops_div;
    if (out_valid && out_ready) begin
      int id;
      real r;
      id = int'(out_chrom[11:0]);
      if (id < N && out_chrom == sent[id]) begin
        seen[id]++;
        r = half_neg_sphere(out_chrom, NV);
        check(fix2real(out_fit) - r < 1e-5 && r - fix2real(out_fit) < 1e-5,
              $sformatf("fitness %f expected %f", fix2real(out_fit), r));
        check(!out_err, "no error");
      end else check(0, "unknown chromosome");
      nout++;
    end
    out_ready <= ($urandom % 100) < 50;
  end

  initial begin
    int len;
    for (int i = 0; i < PL; i++) prog[i] = '0;
    len = sphere_prog(NV, prog);
    prog_len = 7'(len);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      sent[i] = {$urandom, $urandom, $urandom, $urandom};
      sent[i][11:0] = 12'(i);
      @(negedge clk);
      in_valid = 1; in_chrom = sent[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    repeat (1000) @(posedge clk);
    check(nout == N, $sformatf("outputs %0d", nout));
    for (int i = 0; i < N; i++) check(seen[i] == 1, $sformatf("chromosome %0d seen %0d times", i, seen[i]));
    check(max_busy == NE, $sformatf("at most %0d units busy", max_busy));
    check(refused > 0, "stage refused input when all units were busy");
    check(ndiv == N, $sformatf("%0d divisions", ndiv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
