// tb_op_detect: checks the operator/operand comparator.  The four operator entries
// must give is_operand = 0 with the right one-hot match and operator number.
// Numeric operands (including ones whose payload equals an operator code) and
// variable symbols must give is_operand = 1 and no match.
module tb_op_detect;
  import plga_pkg::*;
  entry_t entry = '0;
  logic is_operand;
  logic [3:0] match;
  op_e op;
  op_detect dut (.entry, .is_operand, .match, .op);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      entry = pf_op(op_e'(i));
      #1;
      check(!is_operand, $sformatf("operator %0d seen as operand", i));
      check(match == 4'(1 << i), $sformatf("match for operator %0d: %b", i, match));
      check(op == op_e'(i), $sformatf("operator number %0d", i));
    end
    for (int i = 0; i < 4; i++) begin
      entry = pf_num(fix_t'(i));
      #1 check(is_operand && match == 4'b0, "small numeric operand");
      entry = pf_var(i);
      #1 check(is_operand && match == 4'b0, "variable symbol");
    end
    for (int i = 0; i < 500; i++) begin
      entry = {2'($urandom % 2), 16'($urandom), 32'($urandom)};
      #1 check(is_operand && match == 4'b0, "random operand");
      entry = {TAG_OP, 46'({$urandom, $urandom} | 64'h4), 2'($urandom)};
      #1 check(is_operand, "unknown operator code is not an operator");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
