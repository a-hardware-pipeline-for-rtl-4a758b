// xover_unit: the crossover unit C.  With probability PC (0.6 in the document's
// runs) the two selected parents exchange their tails at one random cut point;
// otherwise they pass unchanged.  The document only says that crossover on binary
// chromosomes mixes the features of two mates and happens with a probability;
// single-point crossover is this design's choice.  The cut point c is uniform in
// 1..CW-1 and the children are
//   child_a = {a[CW-1:c], b[c-1:0]},  child_b = {b[CW-1:c], a[c-1:0]}.
// The decision uses a 16-bit random number r: crossover happens when r < PC*65536.
//
// Interface: valid/ready on both sides; a pair is taken when in_valid && in_ready
// and leaves from the output register one cycle later (one crossover per cycle,
// the one-cycle crossover time is the pipeline's T-cycle).  crossed/cut tell, in
// the cycle a pair is taken, whether a crossover happened and where.
module xover_unit #(
  parameter int          CW   = 250,
  parameter real         PC   = 0.6,
  parameter logic [31:0] SEED = 32'hC0FF_EE11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [CW-1:0]         in_a,
  input  logic [CW-1:0]         in_b,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [CW-1:0]         out_a,
  output logic [CW-1:0]         out_b,
  output logic                  crossed,
  output logic [$clog2(CW)-1:0] cut
);

  localparam logic [16:0] PC_TH = 17'($rtoi(PC * 65536.0 + 0.5));

  logic [63:0]   rnd;
  logic          take;
  logic [CW-1:0] mask;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  rng_xorshift #(.N_WORDS(2), .SEED(SEED)) u_rng (.clk, .rst_n, .en(take), .rnd);

  assign crossed = (17'(rnd[15:0]) < PC_TH);
  assign cut     = ($clog2(CW))'(1 + (rnd[63:32] % 32'(CW - 1)));
  assign mask    = (CW'(1) << cut) - CW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
    end else if (take) begin
      out_valid <= 1'b1;
      out_a     <= crossed ? ((in_a & ~mask) | (in_b & mask)) : in_a;
      out_b     <= crossed ? ((in_b & ~mask) | (in_a & mask)) : in_b;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
