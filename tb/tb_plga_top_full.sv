// tb_plga_top_full: end-to-end test of the PLGA pipeline (every parameter at its default: population 50, 2000 generations,
// 10 variables; with 50 chromosomes and room for 24 in flight the pool never runs
// dry, so selection waiting for the pool is not expected here (the reduced test
// covers it)).
// It writes the postfix program of fitness = -(x1^2+..+xn^2)/2, loads a random
// initial population, lets the pipeline run until it reports DONE and checks:
//  * every chromosome entering the pool carries the fitness of its genes
//    (reference computed with real numbers, tolerance 1e-4), without error flag;
//  * the best fitness never decreases and always belongs to the best chromosome;
//  * the run ends after exactly G generations, with the pool full again;
//  * the temperature followed T0 (1-alpha)^k.
// It counts how often each mechanism happened: the INIT->RUN switch, the three
// selection outcomes (better, accepted by probability, replaced by the best),
// crossed and uncrossed pairs, mutation flips, evaluation-stage backpressure,
// selection waiting for the pool, generation ends, temperature steps and
// divisions; a mechanism that never happened counts as a failure.
module tb_plga_top_full;
  import plga_pkg::*;
  import tb_ref_pkg::*;

  localparam int POP = 50;
  localparam int G   = 2000;
  localparam int NV  = 10;
  localparam int CW  = NV * GENE_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  entry_t prog_data = '0;
  logic [6:0] prog_len = '0;
  logic init_valid = 0, init_ready;
  logic [CW-1:0] init_chrom = '0;
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

  plga_top  dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .prog_len,
    .init_valid, .init_ready, .init_chrom,
    .stop_en(1'b0), .stop_fit('0),
    .mode, .done, .gen, .temp, .best_x, .best_f, .pool_count, .eval_error,
    .push_valid, .push_chrom, .push_fit, .ev_sel, .ev_sel_a, .ev_sel_b,
    .ev_xover, .ev_crossed, .ev_flips, .ev_eval_stall, .ev_pool_wait,
    .ev_gen, .ev_tstep, .ev_ops_div
  );

  int checks = 0, failures = 0;
  longint n_better = 0, n_accept = 0, n_reject = 0, n_cross = 0, n_nocross = 0;
  longint n_flips = 0, n_stall = 0, n_wait = 0, n_gen = 0, n_tstep = 0, n_div = 0;
  longint n_push = 0, n_switch = 0, cycles = 0;
  real prev_best = -1.0e30;
  real max_push_err = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("run: %0d cycles, %0d pool writes, best fitness %f", cycles, n_push, fix2real(best_f));
    $display("events: better=%0d accept=%0d reject=%0d crossed=%0d uncrossed=%0d flips=%0d",
             n_better, n_accept, n_reject, n_cross, n_nocross, n_flips);
    $display("events: eval_stall=%0d pool_wait=%0d gens=%0d tsteps=%0d divs=%0d switch=%0d",
             n_stall, n_wait, n_gen, n_tstep, n_div, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // event counting and per-cycle checks
  logic [1:0] mode_q = 2'd0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    mode_q <= mode;
    if (mode_q == 2'd0 && mode == 2'd1) n_switch++;
    if (ev_sel) begin
      n_better += (ev_sel_a == SEL_BETTER) + (ev_sel_b == SEL_BETTER);
      n_accept += (ev_sel_a == SEL_ACCEPT) + (ev_sel_b == SEL_ACCEPT);
      n_reject += (ev_sel_a == SEL_REJECT) + (ev_sel_b == SEL_REJECT);
    end
    if (ev_xover) begin
      if (ev_crossed) n_cross++; else n_nocross++;
    end
    n_flips += ev_flips;
    n_stall += ev_eval_stall;
    n_wait  += ev_pool_wait;
    n_gen   += ev_gen;
    n_tstep += ev_tstep;
    n_div   += ev_ops_div;
    if (push_valid) begin
      real r, e;
      n_push++;
      r = half_neg_sphere(push_chrom, NV);
      e = fix2real(push_fit) - r;
      if (e < 0) e = -e;
      if (e > max_push_err) max_push_err = e;
      check(e < 1.0e-4, $sformatf("pool write fitness %f, expected %f", fix2real(push_fit), r));
    end
    if (mode != 2'd0) begin
      real b;
      b = fix2real(best_f);
      if (b < prev_best) check(0, "best fitness decreased");
      prev_best = b;
    end
  end

  entry_t p [64];
  int n;
  initial begin
    n = sphere_prog(NV, p);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < n; i++) begin
      prog_we <= 1; prog_addr <= 6'(i); prog_data <= p[i];
      @(posedge clk);
    end
    prog_we  <= 0;
    prog_len <= 7'(n);
    @(posedge clk);
    for (int i = 0; i < POP; i++) begin
      init_valid <= 1;
      for (int w = 0; w < (CW + 31) / 32; w++) init_chrom[w*32 +: 32] <= $urandom;
      @(posedge clk);
      while (!init_ready) @(posedge clk);
    end
    init_valid <= 0;
    wait (done);
    // let the chromosomes still in flight land in the pool
    repeat (4000) @(posedge clk);
    check(gen == 32'(G), $sformatf("generations %0d, expected %0d", gen, G));
    check(int'(pool_count) == POP, $sformatf("pool holds %0d, expected %0d", pool_count, POP));
    check(!eval_error, "evaluation error flag");
    check(n_push == longint'(POP) * (G + 1), $sformatf("pool writes %0d", n_push));
    check(n_tstep == 100, $sformatf("temperature steps %0d", n_tstep));
    begin
      real texp, tgot;
      texp = 50.0 * (0.95 ** real'(n_tstep));
      tgot = real'(temp) / 65536.0;
      check((tgot - texp) < 0.01 * texp && (texp - tgot) < 0.01 * texp,
            $sformatf("temperature %f, expected %f", tgot, texp));
    end
    check((fix2real(best_f) - half_neg_sphere(best_x, NV)) < 1.0e-4 &&
          (half_neg_sphere(best_x, NV) - fix2real(best_f)) < 1.0e-4, "best fitness belongs to best chromosome");
    check(n_switch == 1, "INIT->RUN switch");
    check(n_better > 0, "selection: better chromosome never seen");
    check(n_accept > 0, "selection: probabilistic acceptance never seen");
    check(n_reject > 0, "selection: replacement by best never seen");
    check(n_cross > 0, "crossover never applied");
    check(n_nocross > 0, "pair never passed without crossover");
    check(n_flips > 0, "mutation never flipped a bit");
    check(n_stall > 0, "evaluation backpressure never happened");
    check(n_gen == G, "generation ends");
    check(n_tstep > 0, "temperature never lowered");
    check(n_div > 0, "division never executed");
    finish_tb();
  end

  initial begin
    #(64'd800_000_000);
    check(0, "watchdog expired");
    finish_tb();
  end
endmodule
