// op_detect: the comparator that tells operators from operands in the postfix
// stream.  As in the document, the current m-bit entry is compared with each of
// the four operator codes (+ - * /) by a multi-input XOR (bitwise) followed by an
// OR of the XOR outputs: an OR output is 0 exactly when the entry equals that
// operator.  An AND of the four OR outputs is 1 for an operand (push) and 0 for an
// operator (pop).  The one-hot match vector is encoded into the operator number for
// the arithmetic unit.  The operator codes are the package's TAG_OP entries.
// Purely combinational.
module op_detect
  import plga_pkg::*;
(
  input  entry_t     entry,
  output logic       is_operand,
  output logic [3:0] match,     // one-hot: + - * /
  output op_e        op
);

  logic [3:0] or_out;

  for (genvar i = 0; i < 4; i++) begin : g_cmp
    localparam entry_t CODE = {TAG_OP, {(DATA_W-2){1'b0}}, 2'(i)};
    assign or_out[i] = |(entry ^ CODE);
    assign match[i]  = ~or_out[i];
  end

  assign is_operand = &or_out;

  always_comb begin
    unique case (1'b1)
      match[1]: op = OP_SUB;
      match[2]: op = OP_MUL;
      match[3]: op = OP_DIV;
      default:  op = OP_ADD;
    endcase
  end

endmodule
