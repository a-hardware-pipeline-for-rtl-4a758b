// plga_pkg: constants and types shared by the pipelined genetic algorithm (PLGA)
// hardware.
//
// Numbers inside the evaluation units are signed fixed point with DATA_W bits of
// which FRAC are fraction bits (Q23.24 by default).  The postfix expression that an
// evaluation unit runs is a list of ENTRY_W-bit entries: a 2-bit tag followed by a
// DATA_W-bit payload.  A tag tells a numeric constant, a chromosome variable symbol
// (payload = variable index) and one of the four operators + - * / apart.  Keeping
// operators under their own tag means a numeric operand can never be mistaken for an
// operator code by the comparator.  Genes are 25-bit binary codes, the width used
// for every benchmark function; the fixed-point format and the entry encoding are
// this design's own choices.
package plga_pkg;

  localparam int GENE_W  = 25;        // bits per coded variable
  localparam int DATA_W  = 48;        // fixed-point word in the evaluation unit
  localparam int FRAC    = 24;        // fraction bits of that word
  localparam int ENTRY_W = DATA_W + 2; // postfix entry: tag + payload
  localparam int PROB_W  = 16;        // probabilities are unsigned Q0.16

  typedef logic signed [DATA_W-1:0] fix_t;

  typedef enum logic [1:0] {
    TAG_NUM = 2'b00,   // numeric operand, payload is a fix_t
    TAG_VAR = 2'b01,   // chromosome symbol x_i, payload is i (0-based)
    TAG_OP  = 2'b10,   // operator, payload[1:0] is an op_e
    TAG_RSV = 2'b11
  } tag_e;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } op_e;

  typedef logic [ENTRY_W-1:0] entry_t;

  // Selection outcome of one stochastic selection unit.
  typedef enum logic [1:0] {
    SEL_BETTER = 2'd0,  // f_x > f_max: taken, becomes the new best
    SEL_ACCEPT = 2'd1,  // f_x <= f_max but P > P1: taken
    SEL_REJECT = 2'd2   // f_x <= f_max and P <= P1: replaced by x_max
  } sel_outcome_e;

  function automatic entry_t pf_num(fix_t v);
    return {TAG_NUM, v};
  endfunction

  function automatic entry_t pf_var(int idx);
    return {TAG_VAR, DATA_W'(idx)};
  endfunction

  function automatic entry_t pf_op(op_e op);
    return {TAG_OP, {(DATA_W-2){1'b0}}, op};
  endfunction

  // Real number to fix_t (for constants and testbenches).
  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * (2.0 ** FRAC)));
  endfunction

endpackage
