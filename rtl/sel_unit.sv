// sel_unit: one stochastic selection unit (S1 or S2 of the pipeline), purely
// combinational.  It implements the document's selection function
//
//   Sel(x) = x      if f_x >  f_max
//          = x      if f_x <= f_max and P >  P1
//          = x_max  if f_x <= f_max and P <= P1,   P = exp(-(f_max - f_x)/T)
//
// where P1 is a uniform random number in [0,1) (here p1/65536).  The Boltzmann
// probability is computed in fixed point as follows (this design's method):
// d = (f_max - f_x) * (1/T); y = d * log2(e); P = 2^-y, split into an integer part
// n (a right shift) and a fraction looked up in a 32-entry table of
// round(65536 * 2^(-i/32)), i = 0..31.  The table is built at elaboration from that
// formula.  Truncating y to 1/32 makes P at most about 2 % too large.  A candidate
// that beats f_max replaces the best pair (x_max, f_max) at once, as in the
// document's example, where f_max follows every better chromosome that is met.
//
// Interface: x/fx the candidate, xmax/fmax the current best, inv_temp = 1/T as
// unsigned Q16.16, p1 the random number.  sel_x/sel_f is what goes on, and
// new_xmax/new_fmax the best after this candidate.  prob is P in Q1.16.
module sel_unit
  import plga_pkg::*;
#(
  parameter int CW = 250
) (
  input  logic [CW-1:0]     x,
  input  fix_t              fx,
  input  logic [CW-1:0]     xmax,
  input  fix_t              fmax,
  input  logic [31:0]       inv_temp,
  input  logic [PROB_W-1:0] p1,
  output logic [CW-1:0]     sel_x,
  output fix_t              sel_f,
  output logic [CW-1:0]     new_xmax,
  output fix_t              new_fmax,
  output sel_outcome_e      outcome,
  output logic [PROB_W:0]   prob
);

  localparam logic [16:0] LOG2E_Q16 = 17'd94548;  // log2(e) * 65536

  logic [PROB_W:0] exp2_tab [32];
  for (genvar i = 0; i < 32; i++) begin : g_tab
    assign exp2_tab[i] = (PROB_W+1)'($rtoi(65536.0 * (2.0 ** (-real'(i) / 32.0)) + 0.5));
  end

  logic signed [DATA_W:0] diff;
  logic [127:0]           d_scaled, y;
  logic [127:0]           n;
  logic [4:0]             fi;
  logic                   better;

  always_comb begin
    better   = (fx > fmax);
    diff     = (DATA_W+1)'(fmax) - (DATA_W+1)'(fx);
    // d = diff / T in the FRAC format, y = d * log2(e)
    d_scaled = (128'(unsigned'(diff)) * 128'(inv_temp)) >> 16;
    y        = (d_scaled * 128'(LOG2E_Q16)) >> 16;
    n        = y >> FRAC;
    fi       = y[FRAC-1 -: 5];
    if (better)            prob = (PROB_W+1)'(1 << PROB_W);
    else if (n > 128'd16)  prob = '0;
    else                   prob = exp2_tab[fi] >> n[4:0];

    if (better) begin
      outcome  = SEL_BETTER;
      sel_x    = x;
      sel_f    = fx;
      new_xmax = x;
      new_fmax = fx;
    end else if (prob > (PROB_W+1)'(p1)) begin
      outcome  = SEL_ACCEPT;
      sel_x    = x;
      sel_f    = fx;
      new_xmax = xmax;
      new_fmax = fmax;
    end else begin
      outcome  = SEL_REJECT;
      sel_x    = xmax;
      sel_f    = fmax;
      new_xmax = xmax;
      new_fmax = fmax;
    end
  end

endmodule
