// plga_top: hardware pipeline for function optimisation with the pipelined genetic
// algorithm (PLGA).
//
// The four operations of a genetic algorithm form a ring of pipeline stages:
//   population pool -> selection (S1, S2) -> crossover (C) -> mutation (M1..M8)
//   -> evaluation (E1..E12) -> population pool
// This works because the stochastic selection judges each chromosome against the
// best fitness seen so far only, not against the whole evaluated generation, so
// selection of one pair can start while other children are still being evaluated.
// The multiplicities (2 selection units, 1 crossover unit, 4 pairs of mutation
// units, 6 pairs of evaluation units) are those of the document's example pipeline
// with s = 1, m = 4, e = 6.
//
// Operation:
//  1. The host writes the objective function, in postfix form, with prog_we /
//     prog_addr / prog_data, and holds prog_len.  The function computes the
//     fitness, which is maximised.
//  2. INIT mode: the host sends POP_SIZE chromosomes on init_valid/init_chrom.
//     They go straight to the evaluation stage, and the evaluated initial
//     population fills the pool.
//  3. RUN mode starts by itself once the whole initial population sits in the
//     pool.  Whenever the pool holds two chromosomes, a pair is taken, selected,
//     crossed, mutated and evaluated, and the children return to the pool.  Every
//     POP_SIZE selected chromosomes close a generation; the temperature schedule
//     then counts g and lowers T.
//  4. DONE mode after G_MAX generations, or when stop_en is set and the best
//     fitness reaches stop_fit.  No new pairs are taken; chromosomes in flight
//     still land in the pool.  best_x/best_f hold the best chromosome of the run.
// Stalls need no central control: each stage has a valid/ready handshake, so a
// busy evaluation stage holds the mutation units, which hold the crossover unit and
// the selection stage.  The pool can never overflow, since exactly POP_SIZE
// chromosomes circulate.
//
// The ev_* and push_* outputs report events (one-cycle pulses or per-cycle counts)
// for observation.  The handshakes, the INIT/RUN/DONE sequencing, the fixed-point
// formats and the postfix buffer of 64 entries are this design's choices;
// POP_SIZE = 50, G_MAX = 2000, T0 = 50, alpha = 0.05, Pc = 0.6, Pm = 0.05, 25-bit
// genes and NVAR = 10 variables (the dimension of the document's main runs) are the
// document's.  With 10 variables one mutation unit needs 10 cycles, so the four
// pairs of mutation units of the example pipeline give a reduced pipeline
// (reduction factor 10/4 at that stage); the evaluation stage is slower still.
module plga_top
  import plga_pkg::*;
#(
  parameter int  POP_SIZE    = 50,
  parameter int  G_MAX       = 2000,
  parameter int  NVAR        = 10,
  parameter int  NM_PAIRS    = 4,
  parameter int  NE          = 12,
  parameter int  PF_LEN      = 64,
  parameter int  STACK_DEPTH = 16,
  parameter int  POOL_DEPTH  = 64,
  parameter int  MUT_BPC     = 25,
  parameter real T0          = 50.0,
  parameter real ALPHA       = 0.05,
  parameter real PC          = 0.6,
  parameter real PM          = 0.05,
  localparam int CW          = NVAR * GENE_W,
  localparam int PAW         = $clog2(PF_LEN)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // objective function program
  input  logic                        prog_we,
  input  logic [PAW-1:0]              prog_addr,
  input  entry_t                      prog_data,
  input  logic [$clog2(PF_LEN+1)-1:0] prog_len,
  // initial population
  input  logic                        init_valid,
  output logic                        init_ready,
  input  logic [CW-1:0]               init_chrom,
  // termination on a fitness value
  input  logic                        stop_en,
  input  fix_t                        stop_fit,
  // status
  output logic [1:0]                  mode,        // 0 INIT, 1 RUN, 2 DONE
  output logic                        done,
  output logic [31:0]                 gen,
  output logic [31:0]                 temp,        // T, unsigned Q16.16
  output logic [CW-1:0]               best_x,
  output fix_t                        best_f,
  output logic [$clog2(POOL_DEPTH+1)-1:0] pool_count,
  output logic                        eval_error,  // sticky
  // events
  output logic                        push_valid,  // a chromosome enters the pool
  output logic [CW-1:0]               push_chrom,
  output fix_t                        push_fit,
  output logic                        ev_sel,      // a pair is selected
  output sel_outcome_e                ev_sel_a,
  output sel_outcome_e                ev_sel_b,
  output logic                        ev_xover,    // a pair enters crossover
  output logic                        ev_crossed,  // ... and is crossed
  output logic [15:0]                 ev_flips,
  output logic                        ev_eval_stall, // mutation results wait for E
  output logic                        ev_pool_wait,  // selection waits for the pool
  output logic                        ev_gen,
  output logic                        ev_tstep,
  output logic [7:0]                  ev_ops_div
);

  typedef enum logic [1:0] {M_INIT = 2'd0, M_RUN = 2'd1, M_DONE = 2'd2} mode_e;
  mode_e state;

  // ---------------- objective function store ----------------
  entry_t prog [PF_LEN];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < PF_LEN; i++) prog[i] <= '0;
    else if (prog_we) prog[prog_addr] <= prog_data;
  end

  // ---------------- population pool ----------------
  localparam int PW = CW + DATA_W;
  logic          pool_push, pool_pop2, pool_pair, pool_full, pool_ovf;
  logic [PW-1:0] pool_d0, pool_d1;

  pool_fifo #(.DEPTH(POOL_DEPTH), .W(PW)) u_pool (
    .clk, .rst_n,
    .push(pool_push), .push_data({push_chrom, push_fit}),
    .pop2(pool_pop2), .rd_data0(pool_d0), .rd_data1(pool_d1),
    .pair_avail(pool_pair), .count(pool_count), .full(pool_full), .overflow(pool_ovf)
  );

  // ---------------- temperature / generation ----------------
  logic [31:0] inv_temp;
  logic [7:0]  k;
  logic        sched_done;
  temp_sched #(.G_MAX(G_MAX), .T0(T0), .ALPHA(ALPHA)) u_sched (
    .clk, .rst_n, .gen_tick(ev_gen), .gen, .k, .temp, .inv_temp,
    .t_step(ev_tstep), .done(sched_done)
  );

  // ---------------- selection ----------------
  logic          sel_in_valid, sel_in_ready, sel_out_valid, sel_out_ready;
  logic [CW-1:0] sel_a, sel_b;

  assign sel_in_valid = (state == M_RUN) && pool_pair;
  assign pool_pop2    = sel_in_valid && sel_in_ready;

  sel_stage #(.CW(CW)) u_sel (
    .clk, .rst_n,
    .in_valid(sel_in_valid), .in_ready(sel_in_ready),
    .xa(pool_d0[PW-1 -: CW]), .fa(pool_d0[DATA_W-1:0]),
    .xb(pool_d1[PW-1 -: CW]), .fb(pool_d1[DATA_W-1:0]),
    .inv_temp,
    .out_valid(sel_out_valid), .out_ready(sel_out_ready),
    .out_a(sel_a), .out_b(sel_b),
    .take(ev_sel), .outcome_a(ev_sel_a), .outcome_b(ev_sel_b),
    .best_x, .best_f
  );

  // ---------------- crossover ----------------
  logic          xo_out_valid, xo_out_ready;
  logic [CW-1:0] xo_a, xo_b;
  logic [$clog2(CW)-1:0] xo_cut;

  xover_unit #(.CW(CW), .PC(PC)) u_xover (
    .clk, .rst_n,
    .in_valid(sel_out_valid), .in_ready(sel_out_ready),
    .in_a(sel_a), .in_b(sel_b),
    .out_valid(xo_out_valid), .out_ready(xo_out_ready),
    .out_a(xo_a), .out_b(xo_b),
    .crossed(ev_crossed), .cut(xo_cut)
  );
  assign ev_xover = sel_out_valid && sel_out_ready;

  // ---------------- mutation ----------------
  logic          mu_out_valid, mu_out_ready;
  logic [CW-1:0] mu_out;
  logic [7:0]    mu_busy;

  mut_stage #(.CW(CW), .NM_PAIRS(NM_PAIRS), .BPC(MUT_BPC), .PM(PM)) u_mut (
    .clk, .rst_n,
    .in_valid(xo_out_valid), .in_ready(xo_out_ready),
    .in_a(xo_a), .in_b(xo_b),
    .out_valid(mu_out_valid), .out_ready(mu_out_ready), .out_data(mu_out),
    .flips(ev_flips), .busy_units(mu_busy)
  );

  // ---------------- evaluation ----------------
  logic          ev_in_valid, ev_in_ready, ev_out_err;
  logic [CW-1:0] ev_in_chrom;
  logic [7:0]    ev_busy, ops_add, ops_sub, ops_mul;
  logic [$clog2(POP_SIZE+1)-1:0] init_cnt;

  always_comb begin
    if (state == M_INIT) begin
      ev_in_valid  = init_valid && (init_cnt < ($clog2(POP_SIZE+1))'(POP_SIZE));
      ev_in_chrom  = init_chrom;
      mu_out_ready = 1'b0;
    end else begin
      ev_in_valid  = mu_out_valid;
      ev_in_chrom  = mu_out;
      mu_out_ready = ev_in_ready;
    end
  end
  assign init_ready    = (state == M_INIT) && (init_cnt < ($clog2(POP_SIZE+1))'(POP_SIZE)) && ev_in_ready;
  assign ev_eval_stall = (state != M_INIT) && mu_out_valid && !ev_in_ready;
  assign ev_pool_wait  = (state == M_RUN) && !pool_pair && sel_in_ready;

  eval_stage #(.NVAR(NVAR), .NE(NE), .PF_LEN(PF_LEN), .STACK_DEPTH(STACK_DEPTH)) u_eval (
    .clk, .rst_n, .prog, .prog_len,
    .in_valid(ev_in_valid), .in_ready(ev_in_ready), .in_chrom(ev_in_chrom),
    .out_valid(push_valid), .out_ready(!pool_full),
    .out_chrom(push_chrom), .out_fit(push_fit), .out_err(ev_out_err),
    .busy_units(ev_busy), .ops_add, .ops_sub, .ops_mul, .ops_div(ev_ops_div)
  );
  assign pool_push = push_valid && !pool_full;

  // ---------------- sequencing ----------------
  logic [$clog2(POP_SIZE+1)-1:0] sel_cnt;
  logic stop_hit;

  assign stop_hit = stop_en && (best_f >= stop_fit);
  assign ev_gen   = pool_pop2 && (int'(sel_cnt) + 2 >= POP_SIZE);
  assign mode     = state;
  assign done     = (state == M_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_INIT;
      init_cnt   <= '0;
      sel_cnt    <= '0;
      eval_error <= 1'b0;
    end else begin
      if (ev_in_valid && ev_in_ready && state == M_INIT) init_cnt <= init_cnt + 1'b1;
      if (pool_push && ev_out_err) eval_error <= 1'b1;
      if (pool_ovf) eval_error <= 1'b1;
      if (pool_pop2) sel_cnt <= ev_gen ? '0 : sel_cnt + 2'd2;
      unique case (state)
        M_INIT: if (int'(init_cnt) == POP_SIZE && int'(pool_count) == POP_SIZE) state <= M_RUN;
        M_RUN:  if (sched_done || stop_hit) state <= M_DONE;
        default: ;
      endcase
    end
  end

endmodule
