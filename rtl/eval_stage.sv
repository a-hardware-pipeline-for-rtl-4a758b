// eval_stage: the evaluation stage, NE evaluation units in parallel (twelve, E1..
// E12, in the document's example pipeline).  Evaluation is the slowest operation,
// so several units work on different chromosomes at once.  A chromosome goes to
// the lowest-numbered idle unit; finished results leave one per cycle through a
// round-robin arbiter, so children may reach the population pool in a different
// order than they entered (the pool does not care about order).  All units run the
// same postfix expression.  The dispatch and arbitration scheme is this design's
// choice.
//
// Interface: in_valid/in_ready with in_chrom; out_valid/out_ready with out_chrom,
// out_fit, out_err.  busy_units counts units not idle; ops_* count operator
// results pushed in the cycle (per operator kind) by all units together.
module eval_stage
  import plga_pkg::*;
#(
  parameter int NVAR        = 10,
  parameter int NE          = 12,
  parameter int PF_LEN      = 64,
  parameter int STACK_DEPTH = 16,
  parameter int D1          = 1,
  parameter int D2          = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  entry_t                      prog [PF_LEN],
  input  logic [$clog2(PF_LEN+1)-1:0] prog_len,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [NVAR*GENE_W-1:0]      in_chrom,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [NVAR*GENE_W-1:0]      out_chrom,
  output fix_t                        out_fit,
  output logic                        out_err,
  output logic [7:0]                  busy_units,
  output logic [7:0]                  ops_add,
  output logic [7:0]                  ops_sub,
  output logic [7:0]                  ops_mul,
  output logic [7:0]                  ops_div
);

  localparam int CW = NVAR * GENE_W;
  localparam int IW = (NE > 1) ? $clog2(NE) : 1;

  logic          u_in_valid  [NE];
  logic          u_in_ready  [NE];
  logic          u_out_valid [NE];
  logic          u_out_ready [NE];
  logic [CW-1:0] u_chrom     [NE];
  fix_t          u_fit       [NE];
  logic          u_err       [NE];
  logic          u_op_fire   [NE];
  op_e           u_op_code   [NE];

  // dispatch to the lowest idle unit
  int sel;
  always_comb begin
    sel = -1;
    for (int u = NE - 1; u >= 0; u--) if (u_in_ready[u]) sel = u;
  end

  always_comb begin
    for (int u = 0; u < NE; u++) u_in_valid[u] = in_valid && (sel == u);
  end
  assign in_ready = (sel >= 0);

  for (genvar u = 0; u < NE; u++) begin : g_unit
    eval_unit #(.NVAR(NVAR), .PF_LEN(PF_LEN), .STACK_DEPTH(STACK_DEPTH), .D1(D1), .D2(D2)) u_eval (
      .clk, .rst_n, .prog, .prog_len,
      .in_valid (u_in_valid[u]),
      .in_ready (u_in_ready[u]),
      .in_chrom,
      .out_valid(u_out_valid[u]),
      .out_ready(u_out_ready[u]),
      .out_chrom(u_chrom[u]),
      .out_fit  (u_fit[u]),
      .out_err  (u_err[u]),
      .op_fire  (u_op_fire[u]),
      .op_code  (u_op_code[u])
    );
  end

  // round-robin collection
  logic [IW-1:0] rr, grant;
  logic          any;
  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = 0; k < NE; k++) begin
      if (!any && u_out_valid[(int'(rr) + k) % NE]) begin
        any   = 1'b1;
        grant = IW'((int'(rr) + k) % NE);
      end
    end
  end

  always_comb begin
    for (int u = 0; u < NE; u++) u_out_ready[u] = any && out_ready && (grant == IW'(u));
  end

  assign out_valid = any;
  assign out_chrom = u_chrom[grant];
  assign out_fit   = u_fit[grant];
  assign out_err   = u_err[grant];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                rr <= '0;
    else if (any && out_ready) rr <= (int'(grant) == NE - 1) ? '0 : grant + 1'b1;
  end

  always_comb begin
    busy_units = '0;
    ops_add = '0; ops_sub = '0; ops_mul = '0; ops_div = '0;
    for (int u = 0; u < NE; u++) begin
      busy_units += 8'(!u_in_ready[u]);
      if (u_op_fire[u]) begin
        unique case (u_op_code[u])
          OP_ADD: ops_add += 8'd1;
          OP_SUB: ops_sub += 8'd1;
          OP_MUL: ops_mul += 8'd1;
          OP_DIV: ops_div += 8'd1;
          default: ;
        endcase
      end
    end
  end

endmodule
