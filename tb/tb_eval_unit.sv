// tb_eval_unit: checks the postfix evaluation unit.
//  * The sphere-based test function (0 x1 x1 * ... - 2 /) on random chromosomes
//    against a real-number reference.
//  * Random well-formed postfix expressions over the four variables, constants and
//    all four operators, evaluated by a real-number stack machine in the
//    testbench (division only by operands of magnitude 0.5 or more).
//  * The evaluation time: 1 cycle per operand, D1 + 2 per + - *, D1 + 75 per
//    division (DATA_W + FRAC + 2 in the divider), 1 cycle to finish.
//  * A malformed expression (an operator with one operand on the stack) must set
//    out_err, and a result must be held while out_ready is low.
module tb_eval_unit;
  import plga_pkg::*;
  import tb_ref_pkg::*;
  localparam int NV = 4, PL = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  entry_t prog [PL];
  logic [6:0] prog_len = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_err, op_fire;
  logic [NV*GENE_W-1:0] in_chrom = '0, out_chrom;
  fix_t out_fit;
  op_e op_code;
  eval_unit #(.NVAR(NV), .PF_LEN(PL), .STACK_DEPTH(16)) dut (.clk, .rst_n, .prog, .prog_len,
    .in_valid, .in_ready, .in_chrom, .out_valid, .out_ready, .out_chrom, .out_fit,
    .out_err, .op_fire, .op_code);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int n_opnd, n_op, n_div;

  // run one evaluation, return fitness, error flag and cycle count
  task automatic run(input logic [NV*GENE_W-1:0] c, output real f, output logic err, output int cyc);
    @(negedge clk);
    in_valid = 1; in_chrom = c;
    @(posedge clk); #1;
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(posedge clk); #1; cyc++; end
    f = fix2real(out_fit); err = out_err;
    check(out_chrom == c, "chromosome returned with its fitness");
    repeat (2) @(posedge clk);
    #1 check(out_valid && fix2real(out_fit) == f, "result held");
    @(negedge clk) out_ready = 1;
    @(negedge clk) out_ready = 0;
  endtask

  // random postfix expression and its real-number value
  function automatic real rand_expr(logic [NV*GENE_W-1:0] c, output int len);
    real st [$];
    int n;
    n = 0; n_opnd = 0; n_op = 0; n_div = 0;
    for (int i = 0; i < 12; i++) prog[i] = '0;
    while (n < 25) begin
      bit want_op;
      want_op = (st.size() >= 2) && (($urandom % 2) == 0 || st.size() > 4 || n > 20);
      if (n > 20 && st.size() < 2) break;
      if (!want_op) begin
        if ($urandom % 3 == 0) begin
          real k;
          k = real'($urandom % 800) / 100.0 - 4.0;
          prog[n++] = pf_num(to_fix(k)); st.push_back(fix2real(to_fix(k)));
        end else begin
          int v;
          v = $urandom % NV;
          prog[n++] = pf_var(v); st.push_back(gene_val(c[v*GENE_W +: GENE_W]));
        end
        n_opnd++;
      end else begin
        real x, y, r;
        op_e o;
        y = st.pop_back(); x = st.pop_back();
        o = op_e'($urandom % 4);
        if (o == OP_DIV && (y < 0.5 && y > -0.5)) o = OP_SUB;
        case (o)
          OP_ADD: r = x + y;
          OP_SUB: r = x - y;
          OP_MUL: r = x * y;
          default: r = x / y;
        endcase
        prog[n++] = pf_op(o); st.push_back(r);
        n_op++; if (o == OP_DIV) n_div++;
      end
    end
    while (st.size() > 1) begin
      real x, y;
      y = st.pop_back(); x = st.pop_back();
      prog[n++] = pf_op(OP_ADD); st.push_back(x + y); n_op++;
    end
    len = n;
    return st[0];
  endfunction

  initial begin
    real f, r, tol;
    logic err;
    int cyc, len;
    for (int i = 0; i < PL; i++) prog[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // sphere-based program
    len = sphere_prog(NV, prog);
    prog_len = 7'(len);
    for (int t = 0; t < 50; t++) begin
      logic [NV*GENE_W-1:0] c;
      c = {$urandom, $urandom, $urandom, $urandom};
      run(c, f, err, cyc);
      r = half_neg_sphere(c, NV);
      check(f - r < 1e-5 && r - f < 1e-5, $sformatf("sphere %f expected %f", f, r));
      check(!err, "no error");
      // 10 operands, 8 of + - *, 1 division
      check(cyc == 10 + 8 * 3 + 76 + 1, $sformatf("sphere program took %0d cycles", cyc));
    end

    // random expressions
    for (int t = 0; t < 300; t++) begin
      logic [NV*GENE_W-1:0] c;
      c = {$urandom, $urandom, $urandom, $urandom};
      r = rand_expr(c, len);
      prog_len = 7'(len);
      run(c, f, err, cyc);
      tol = 1e-4 * (r < 0 ? -r : r) + 1e-4;
      check(f - r <= tol && r - f <= tol, $sformatf("expression %0d: %f expected %f", t, f, r));
      if (r < 1.0e6 && r > -1.0e6) check(!err, "no error");
      check(cyc == n_opnd + 3 * (n_op - n_div) + 76 * n_div + 1,
            $sformatf("expression took %0d cycles", cyc));
    end

    // malformed: x1 +
    prog[0] = pf_var(0); prog[1] = pf_op(OP_ADD); prog_len = 7'd2;
    run('0, f, err, cyc);
    check(err, "stack underflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
