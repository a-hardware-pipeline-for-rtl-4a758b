// sel_stage: the selection stage, two stochastic selection units S1 and S2 side by
// side so that a pair of parents is ready for the crossover unit every cycle, as
// the document asks.  Both units share one best-so-far register (x_max, f_max): S1
// judges the first candidate against it, S2 judges the second against the best as
// S1 left it, and the register then takes S2's result.  The best register is kept
// across generations (the document carries f_max from generation g-1 into g), so
// it also holds the elite chromosome of the run.  After reset f_max is the most
// negative number, so the first candidate always becomes the best.
//
// Interface: a candidate pair (xa,fa),(xb,fb) is taken when in_valid && in_ready.
// The selected pair appears one cycle later in the output register (out_valid,
// out_a, out_b) and is held until out_ready.  inv_temp is 1/T (unsigned Q16.16).
// outcome_a/outcome_b and take pulse in the cycle a pair is taken.  best_x/best_f
// is the best chromosome seen so far.
module sel_stage
  import plga_pkg::*;
#(
  parameter int          CW   = 250,
  parameter logic [31:0] SEED = 32'h5E1E_C7ED
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [CW-1:0] xa,
  input  fix_t          fa,
  input  logic [CW-1:0] xb,
  input  fix_t          fb,
  input  logic [31:0]   inv_temp,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [CW-1:0] out_a,
  output logic [CW-1:0] out_b,
  output logic          take,
  output sel_outcome_e  outcome_a,
  output sel_outcome_e  outcome_b,
  output logic [CW-1:0] best_x,
  output fix_t          best_f
);

  logic [31:0]     rnd;
  logic [CW-1:0]   sa_x, sb_x, xmax1, xmax2;
  fix_t            sa_f, sb_f, fmax1, fmax2;
  logic [PROB_W:0] prob_a, prob_b;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  rng_xorshift #(.N_WORDS(1), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(take), .rnd
  );

  sel_unit #(.CW(CW)) u_s1 (
    .x(xa), .fx(fa), .xmax(best_x), .fmax(best_f), .inv_temp,
    .p1(rnd[15:0]), .sel_x(sa_x), .sel_f(sa_f),
    .new_xmax(xmax1), .new_fmax(fmax1), .outcome(outcome_a), .prob(prob_a)
  );

  sel_unit #(.CW(CW)) u_s2 (
    .x(xb), .fx(fb), .xmax(xmax1), .fmax(fmax1), .inv_temp,
    .p1(rnd[31:16]), .sel_x(sb_x), .sel_f(sb_f),
    .new_xmax(xmax2), .new_fmax(fmax2), .outcome(outcome_b), .prob(prob_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
      best_x    <= '0;
      best_f    <= {1'b1, {(DATA_W-1){1'b0}}};
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_a     <= sa_x;
        out_b     <= sb_x;
        best_x    <= xmax2;
        best_f    <= fmax2;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_a) && $stable(out_b));

endmodule
