// tb_chrom_value_buf: checks gene decoding and symbol substitution.  After a random
// chromosome is loaded, v_i must be -5.12 + b_i * 10.24 / (2^25 - 1) within 1e-6,
// including the two ends of the range; a variable symbol must be replaced by the
// numeric entry of its value, numbers and operators must pass unchanged, and an
// index beyond the last variable must raise bad_sym.
module tb_chrom_value_buf;
  import plga_pkg::*;
  import tb_ref_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, bad_sym;
  logic [NV*GENE_W-1:0] genes = '0, x_buf;
  entry_t sym_in = '0, sym_out;
  fix_t v_buf [NV];
  chrom_value_buf #(.NVAR(NV)) dut (.clk, .rst_n, .load, .genes, .sym_in, .sym_out,
    .bad_sym, .x_buf, .v_buf);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      genes = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) genes = '0;
      if (t == 1) genes = '1;
      load = 1;
      @(negedge clk) load = 0;
      check(x_buf == genes, "symbolic chromosome stored");
      for (int i = 0; i < NV; i++) begin
        real ve, vg;
        ve = gene_val(genes[i*GENE_W +: GENE_W]);
        vg = fix2real(v_buf[i]);
        check(vg - ve < 1e-6 && ve - vg < 1e-6, $sformatf("v%0d %f expected %f", i, vg, ve));
        sym_in = pf_var(i);
        #1 check(sym_out == pf_num(v_buf[i]) && !bad_sym, "variable symbol mapped");
      end
      sym_in = pf_num(fix_t'($urandom));
      #1 check(sym_out == sym_in && !bad_sym, "number passes");
      sym_in = pf_op(op_e'($urandom % 4));
      #1 check(sym_out == sym_in && !bad_sym, "operator passes");
      sym_in = pf_var(NV + int'($urandom % 5));
      #1 check(bad_sym, "bad variable index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
