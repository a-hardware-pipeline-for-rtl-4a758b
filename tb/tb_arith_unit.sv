// tb_arith_unit: checks the arithmetic unit against real-number results for random
// operands: + - * within 1e-6 and / within 1e-6 relative.  Addition, subtraction
// and multiplication must finish one cycle after start, division
// DATA_W + FRAC + 2 = 74 cycles after start.  Division by zero must set div_zero.
module tb_arith_unit;
  import plga_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, div_zero;
  op_e op = OP_ADD;
  fix_t a = '0, b = '0, result;
  arith_unit dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .result, .div_zero);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      real ra, rb, re, rg, tol;
      int lat;
      ra = (real'($urandom % 200000) - 100000.0) / 1000.0;
      rb = (real'($urandom % 200000) - 100000.0) / 1000.0;
      if (rb < 0.01 && rb > -0.01) rb = 1.5;
      @(negedge clk);
      op = op_e'(i % 4); a = to_fix(ra); b = to_fix(rb); start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      case (op)
        OP_ADD: re = fix2real(a) + fix2real(b);
        OP_SUB: re = fix2real(a) - fix2real(b);
        OP_MUL: re = fix2real(a) * fix2real(b);
        default: re = fix2real(a) / fix2real(b);
      endcase
      rg = fix2real(result);
      tol = 1.0e-6 * (re < 0 ? -re : re) + 1.0e-6;
      check(rg - re <= tol && re - rg <= tol, $sformatf("op %0d: %f vs %f", op, rg, re));
      check(lat == ((op == OP_DIV) ? DATA_W + FRAC + 2 : 1), $sformatf("op %0d latency %0d", op, lat));
      check(!div_zero, "no div_zero");
    end
    @(negedge clk);
    op = OP_DIV; a = to_fix(-3.0); b = '0; start = 1;
    @(negedge clk) start = 0;
    check(done && div_zero && result[DATA_W-1], "division by zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
