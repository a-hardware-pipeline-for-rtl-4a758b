// tb_plga_workloads: runs the benchmark functions that the evaluation unit's four
// operators (+ - * /) can express through the complete pipeline, with the default
// population (50), 10-variable chromosomes and at most 400 generations each:
//   1. sphere f1 = sum x_i^2, 10 variables, stopping value 0.005 (stop_en): the
//      run must end early with a best fitness of at least -0.005;
//   2. sphere f1, 3 variables, 400 generations;
//   3. Rosenbrock f4 = sum 100 (x_(i+1) - x_i^2)^2 + (x_i - 1)^2, 3 variables;
//   4. Schwefel f7 = sum_i (sum_(j<=i) x_j)^2, 5 variables.
// The fitness is -f (the pipeline maximises).  For every run every chromosome that
// enters the pool must carry -f of its genes (real-number reference, tolerance
// 1e-3 + 1e-5 |f|), the best fitness must end above the best of the initial
// population, and no evaluation error may occur.  The functions with cos, exp,
// sqrt, |x|, max or integer parts cannot be written with these operators.
module tb_plga_workloads;
  import plga_pkg::*;
  import tb_ref_pkg::*;

  localparam int NV = 10;
  localparam int CW = NV * GENE_W;
  localparam int G  = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  entry_t prog_data = '0;
  logic [6:0] prog_len = '0;
  logic init_valid = 0, init_ready;
  logic [CW-1:0] init_chrom = '0;
  logic stop_en = 0;
  fix_t stop_fit = '0;
  logic [1:0] mode;
  logic done, eval_error, push_valid, ev_sel, ev_xover, ev_crossed;
  logic ev_eval_stall, ev_pool_wait, ev_gen, ev_tstep;
  logic [31:0] gen, temp;
  logic [CW-1:0] best_x, push_chrom;
  fix_t best_f, push_fit;
  logic [6:0] pool_count;
  sel_outcome_e ev_sel_a, ev_sel_b;
  logic [15:0] ev_flips;
  logic [7:0] ev_ops_div;

  plga_top #(.G_MAX(G)) dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .prog_len,
    .init_valid, .init_ready, .init_chrom, .stop_en, .stop_fit,
    .mode, .done, .gen, .temp, .best_x, .best_f, .pool_count, .eval_error,
    .push_valid, .push_chrom, .push_fit, .ev_sel, .ev_sel_a, .ev_sel_b,
    .ev_xover, .ev_crossed, .ev_flips, .ev_eval_stall, .ev_pool_wait,
    .ev_gen, .ev_tstep, .ev_ops_div
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int func = 1, dim = 10;

  function automatic real xv(logic [CW-1:0] c, int i);  // i is 1-based
    return gene_val(c[(i-1)*GENE_W +: GENE_W]);
  endfunction

  function automatic real fref(logic [CW-1:0] c);
    real s, p;
    s = 0.0;
    if (func == 1) for (int i = 1; i <= dim; i++) s += xv(c, i) * xv(c, i);
    if (func == 4) for (int i = 1; i < dim; i++) begin
      p = xv(c, i+1) - xv(c, i) * xv(c, i);
      s += 100.0 * p * p + (xv(c, i) - 1.0) * (xv(c, i) - 1.0);
    end
    if (func == 7) for (int i = 1; i <= dim; i++) begin
      p = 0.0;
      for (int j = 1; j <= i; j++) p += xv(c, j);
      s += p * p;
    end
    return -s;
  endfunction

  entry_t q [$];
  function automatic void v(int i); q.push_back(pf_var(i - 1)); endfunction
  function automatic void k(real r); q.push_back(pf_num(to_fix(r))); endfunction
  function automatic void o(op_e x); q.push_back(pf_op(x)); endfunction

  // postfix program of -f:  0 <f> -
  function automatic void build();
    q.delete();
    k(0.0);
    if (func == 1) for (int i = 1; i <= dim; i++) begin
      v(i); v(i); o(OP_MUL); if (i > 1) o(OP_ADD);
    end
    if (func == 4) for (int i = 1; i < dim; i++) begin
      repeat (2) begin v(i+1); v(i); v(i); o(OP_MUL); o(OP_SUB); end
      o(OP_MUL); k(100.0); o(OP_MUL);
      repeat (2) begin v(i); k(1.0); o(OP_SUB); end
      o(OP_MUL); o(OP_ADD);
      if (i > 1) o(OP_ADD);
    end
    if (func == 7) for (int i = 1; i <= dim; i++) begin
      repeat (2) begin v(1); for (int j = 2; j <= i; j++) begin v(j); o(OP_ADD); end end
      o(OP_MUL); if (i > 1) o(OP_ADD);
    end
    o(OP_SUB);
  endfunction

  real init_best;
  bit  running = 0;
  always @(posedge clk) if (rst_n && running && push_valid) begin
    real r, e;
    r = fref(push_chrom);
    e = fix2real(push_fit) - r;
    if (e < 0) e = -e;
    check(e < 1.0e-3 + 1.0e-5 * (r < 0 ? -r : r),
          $sformatf("f%0d: pool write %f expected %f", func, fix2real(push_fit), r));
    if (mode == 2'd0 && r > init_best) init_best = r;
  end

  task automatic run(int f, int d, bit use_stop, real stop_value);
    func = f; dim = d;
    build();
    init_best = -1.0e30;
    rst_n = 0;
    stop_en = use_stop; stop_fit = to_fix(-stop_value);
    repeat (3) @(posedge clk);
    rst_n = 1; running = 1;
    @(posedge clk);
    foreach (q[i]) begin
      prog_we <= 1; prog_addr <= 6'(i); prog_data <= q[i];
      @(posedge clk);
    end
    prog_we <= 0; prog_len <= 7'(q.size());
    @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      init_valid <= 1;
      for (int w = 0; w < (CW + 31) / 32; w++) init_chrom[w*32 +: 32] <= $urandom;
      @(posedge clk);
      while (!init_ready) @(posedge clk);
    end
    init_valid <= 0;
    wait (done);
    repeat (3000) @(posedge clk);
    running = 0;
    $display("f%0d dim %0d: %0d entries, %0d generations, best f = %g (initial best %g)",
             f, d, q.size(), gen, -fix2real(best_f), -init_best);
    check(!eval_error, $sformatf("f%0d: evaluation error", f));
    check(fix2real(best_f) > init_best, $sformatf("f%0d: no improvement", f));
    check(int'(pool_count) == 50, $sformatf("f%0d: pool holds %0d", f, pool_count));
    if (use_stop) begin
      check(gen < 32'(G), $sformatf("f%0d: stopping value not reached in %0d generations", f, G));
      check(fix2real(best_f) >= -stop_value, $sformatf("f%0d: stopped above the stopping value", f));
    end else begin
      check(gen == 32'(G), $sformatf("f%0d: %0d generations", f, gen));
    end
  endtask

  initial begin
    run(1, 10, 1, 0.005);
    run(1, 3, 0, 0.0);
    run(4, 3, 0, 0.0);
    run(7, 5, 0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400_000_000);
    check(0, "watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
