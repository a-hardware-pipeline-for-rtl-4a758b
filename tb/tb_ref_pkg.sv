// tb_ref_pkg: reference arithmetic for the testbenches, written with real numbers
// independently of the RTL: gene decoding onto [-5.12, 5.12], fixed-point
// conversion and the test objective function used end to end (up to 10
// variables),
//   fitness(x) = (0 - (x1^2 + x2^2 + ... + xn^2)) / 2
// (half the negated sphere function, so that the optimiser maximises it and all
// four operators of the evaluation unit are used).
package tb_ref_pkg;
  import plga_pkg::*;

  function automatic real gene_val(logic [GENE_W-1:0] b);
    return -5.12 + real'(b) * 10.24 / ((2.0 ** GENE_W) - 1.0);
  endfunction

  function automatic real fix2real(fix_t v);
    return real'(longint'(v)) / (2.0 ** FRAC);
  endfunction

  function automatic real half_neg_sphere(logic [10*GENE_W-1:0] c, int nvar);
    real s;
    s = 0.0;
    for (int i = 0; i < nvar; i++) begin
      real v;
      v = gene_val(c[i*GENE_W +: GENE_W]);
      s += v * v;
    end
    return (0.0 - s) / 2.0;
  endfunction

  // Postfix program of half_neg_sphere for nvar variables:
  //   0 x1 x1 * x2 x2 * + ... xn xn * + - 2 /
  function automatic int sphere_prog(int nvar, ref entry_t p [64]);
    int n;
    n = 0;
    p[n++] = pf_num(to_fix(0.0));
    for (int i = 0; i < nvar; i++) begin
      p[n++] = pf_var(i);
      p[n++] = pf_var(i);
      p[n++] = pf_op(OP_MUL);
      if (i > 0) p[n++] = pf_op(OP_ADD);
    end
    p[n++] = pf_op(OP_SUB);
    p[n++] = pf_num(to_fix(2.0));
    p[n++] = pf_op(OP_DIV);
    return n;
  endfunction
endpackage
