// chrom_value_buf: chromosome-value buffer with its associative mapper.  The
// buffer keeps a chromosome in two forms, as in the document: the symbolic
// (binary) genes X = x_1..x_n and their numeric values V = v_1..v_n.  Each 25-bit
// gene b is decoded when the chromosome is loaded, as
//   v = LO + b * (HI - LO) / (2^25 - 1)
// in fixed point (fix_t), the linear map onto the variable range [-5.12, 5.12]
// that all the document's benchmark functions use.  The associative mapper then
// replaces a variable symbol (TAG_VAR entry, payload i) in the postfix stream by
// the numeric operand v_(i+1) (TAG_NUM entry); any other entry passes unchanged.
// Gene i sits at bits [i*25 +: 25] of the chromosome.  The linear decoding and the
// entry format are this design's choices.
//
// Interface: load/genes writes the buffer at the clock edge; values can be read
// from the next cycle.  sym_in -> sym_out is combinational; bad_sym flags a
// variable symbol whose index is NVAR or more (it maps to 0).
module chrom_value_buf
  import plga_pkg::*;
#(
  parameter int  NVAR = 10,
  parameter real LO   = -5.12,
  parameter real HI   = 5.12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [NVAR*GENE_W-1:0] genes,
  input  entry_t                 sym_in,
  output entry_t                 sym_out,
  output logic                   bad_sym,
  output logic [NVAR*GENE_W-1:0] x_buf,
  output fix_t                   v_buf [NVAR]
);

  // v = LO + (b * K) >> GENE_W,  K = (HI - LO) * 2^FRAC * 2^GENE_W / (2^GENE_W - 1)
  localparam longint K     = longint'((HI - LO) * (2.0 ** (FRAC + GENE_W)) / ((2.0 ** GENE_W) - 1.0));
  localparam fix_t   LO_FX = fix_t'(longint'(LO * (2.0 ** FRAC)));

  function automatic fix_t decode(logic [GENE_W-1:0] b);
    logic [127:0] p;
    p = 128'(b) * 128'(K);
    return LO_FX + fix_t'(p >> GENE_W);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_buf <= '0;
      for (int i = 0; i < NVAR; i++) v_buf[i] <= '0;
    end else if (load) begin
      x_buf <= genes;
      for (int i = 0; i < NVAR; i++) v_buf[i] <= decode(genes[i*GENE_W +: GENE_W]);
    end
  end

  // associative mapper
  logic [DATA_W-1:0] idx;
  assign idx = sym_in[DATA_W-1:0];

  always_comb begin
    sym_out = sym_in;
    bad_sym = 1'b0;
    if (tag_e'(sym_in[ENTRY_W-1 -: 2]) == TAG_VAR) begin
      sym_out = pf_num('0);
      if (idx >= DATA_W'(NVAR)) bad_sym = 1'b1;
      else                      sym_out = pf_num(v_buf[int'(idx)]);
    end
  end

endmodule
