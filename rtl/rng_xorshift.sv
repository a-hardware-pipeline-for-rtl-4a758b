// rng_xorshift: pseudo-random bit source for the selection, crossover and mutation
// units.  N_WORDS independent 32-bit xorshift generators (x ^= x<<13; x ^= x>>17;
// x ^= x<<5) each give one 32-bit word per enabled cycle; rnd is their
// concatenation.  The generators are seeded at reset from SEED and the word index,
// never with zero.  The document only asks for random numbers (P1 = random[0,1) and
// the crossover and mutation probabilities); the generator type is this design's
// choice.  rnd is valid in every cycle and advances on the clock edge when en is 1.
module rng_xorshift #(
  parameter int          N_WORDS = 1,
  parameter logic [31:0] SEED    = 32'h1234_5678
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic [32*N_WORDS-1:0]  rnd
);

  logic [31:0] st [N_WORDS];

  function automatic logic [31:0] step(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  for (genvar i = 0; i < N_WORDS; i++) begin : g_word
    localparam logic [31:0] S0 = SEED ^ (32'h9E37_79B9 * 32'(i + 1));
    localparam logic [31:0] S  = (S0 == 32'd0) ? 32'h0BAD_5EED : S0;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  st[i] <= S;
      else if (en) st[i] <= step(st[i]);
    end
    assign rnd[32*i +: 32] = st[i];
  end

endmodule
