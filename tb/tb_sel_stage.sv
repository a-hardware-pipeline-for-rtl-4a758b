// tb_sel_stage: checks the two stochastic selection units and their shared best
// register.
//  * Single unit: for random fitness gaps d and temperatures T the probability P
//    must be within 0.025 of exp(-d/T) (real-number reference), and the decision
//    must follow P > P1 for the given P1.
//  * The selection sequence of the document's six-chromosome example (fitness 45,
//    48, 35, 43, 55, 12): chromosomes better than the best so far are taken and
//    become the best; the others are either taken or replaced by the best one.
//  * Acceptance rate: with a fixed gap d the share of accepted candidates must be
//    within 0.03 of exp(-d/T) for several d.
//  * The output register holds its pair while out_ready is low.
module tb_sel_stage;
  import plga_pkg::*;
  localparam int CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 1, take;
  logic [CW-1:0] xa = '0, xb = '0, out_a, out_b, best_x;
  fix_t fa = '0, fb = '0, best_f;
  logic [31:0] inv_temp = 32'(65536 / 50);
  sel_outcome_e oa, ob;

  sel_stage #(.CW(CW)) dut (.clk, .rst_n, .in_valid, .in_ready, .xa, .fa, .xb, .fb,
    .inv_temp, .out_valid, .out_ready, .out_a, .out_b, .take, .outcome_a(oa),
    .outcome_b(ob), .best_x, .best_f);

  // a lone unit for the probability checks
  logic [CW-1:0] u_x = '0, u_xmax = '0, u_selx, u_nxmax;
  fix_t u_fx = '0, u_fmax = '0, u_self, u_nfmax;
  logic [31:0] u_invt = '0;
  logic [15:0] u_p1 = '0;
  sel_outcome_e u_out;
  logic [16:0] u_prob;
  sel_unit #(.CW(CW)) u_unit (.x(u_x), .fx(u_fx), .xmax(u_xmax), .fmax(u_fmax),
    .inv_temp(u_invt), .p1(u_p1), .sel_x(u_selx), .sel_f(u_self), .new_xmax(u_nxmax),
    .new_fmax(u_nfmax), .outcome(u_out), .prob(u_prob));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // send one pair, return the outputs
  task automatic send(input logic [CW-1:0] a, input real fra, input logic [CW-1:0] b,
                      input real frb, output sel_outcome_e r_oa, output sel_outcome_e r_ob,
                      output logic [CW-1:0] r_a, output logic [CW-1:0] r_b);
    @(negedge clk);
    in_valid = 1; xa = a; xb = b; fa = to_fix(fra); fb = to_fix(frb);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    r_oa = oa; r_ob = ob;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid, "output valid one cycle after take");
    r_a = out_a; r_b = out_b;
  endtask

  real tab_f [6] = '{45.0, 48.0, 35.0, 43.0, 55.0, 12.0};

  initial begin
    sel_outcome_e r1, r2;
    logic [CW-1:0] c1, c2;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- single unit: probability and decision ----
    for (int i = 0; i < 400; i++) begin
      real d, t, pe, pg;
      d = real'($urandom % 10000) / 100.0;
      t = 0.3 + real'($urandom % 1000) / 10.0;
      u_fmax = to_fix(20.0); u_fx = to_fix(20.0 - d);
      u_x = CW'(1); u_xmax = CW'(2);
      u_invt = 32'($rtoi(65536.0 / t));
      u_p1 = 16'($urandom);
      #1;
      pe = $exp(-d / t);
      pg = real'(u_prob) / 65536.0;
      check(pg - pe < 0.025 && pe - pg < 0.025, $sformatf("P %f expected %f", pg, pe));
      if (pe > real'(u_p1) / 65536.0 + 0.03) check(u_out == SEL_ACCEPT && u_selx == u_x, "accept when P > P1");
      if (pe < real'(u_p1) / 65536.0 - 0.03) check(u_out == SEL_REJECT && u_selx == u_xmax, "reject when P <= P1");
      check(u_nfmax == u_fmax, "best unchanged by a worse candidate");
    end
    u_fx = to_fix(21.0); #1;
    check(u_out == SEL_BETTER && u_nfmax == u_fx && u_nxmax == u_x && u_selx == u_x, "better candidate");

    // ---- the six-chromosome example ----
    inv_temp = 32'(65536 / 50);
    begin
      logic [CW-1:0] bestc;
      real bestv;
      bestv = -1.0e30;
      for (int p = 0; p < 3; p++) begin
        sel_outcome_e exp_o [2];
        logic [CW-1:0] got [2];
        send(CW'(2*p), tab_f[2*p], CW'(2*p+1), tab_f[2*p+1], r1, r2, c1, c2);
        got[0] = c1; got[1] = c2;
        for (int j = 0; j < 2; j++) begin
          int idx;
          sel_outcome_e o;
          idx = 2*p + j;
          o = (j == 0) ? r1 : r2;
          if (tab_f[idx] > bestv) begin
            check(o == SEL_BETTER && got[j] == CW'(idx), $sformatf("chromosome %0d must be taken as better", idx));
            bestv = tab_f[idx]; bestc = CW'(idx);
          end else if (o == SEL_ACCEPT) begin
            check(got[j] == CW'(idx), $sformatf("chromosome %0d accepted", idx));
          end else begin
            check(o == SEL_REJECT && got[j] == bestc, $sformatf("chromosome %0d replaced by best", idx));
          end
        end
      end
      check(best_x == CW'(4) && best_f == to_fix(55.0), "best after the example is chromosome 4 (55.0)");
    end

    // ---- acceptance rate ----
    for (int s = 0; s < 3; s++) begin
      real d, pe, rate;
      int acc, n;
      d = (s == 0) ? 5.0 : (s == 1) ? 20.0 : 60.0;   // T = 50
      acc = 0; n = 0;
      for (int i = 0; i < 1500; i++) begin
        send(CW'(100), 55.0 - d, CW'(101), 55.0 - d, r1, r2, c1, c2);
        acc += (r1 == SEL_ACCEPT) + (r2 == SEL_ACCEPT);
        n += 2;
        check((r1 == SEL_ACCEPT) == (c1 == CW'(100)), "pair member a follows its outcome");
      end
      rate = real'(acc) / real'(n);
      pe = $exp(-d / 50.0);
      check(rate - pe < 0.03 && pe - rate < 0.03, $sformatf("acceptance %f expected %f", rate, pe));
    end

    // ---- hold while not ready ----
    repeat (2) @(posedge clk);
    out_ready = 0;
    send(CW'(7), 0.0, CW'(8), 0.0, r1, r2, c1, c2);
    @(negedge clk);
    in_valid = 1;
    #1 check(!in_ready, "stage full while output is held");
    repeat (3) @(posedge clk);
    #1 check(out_valid && out_a == c1 && out_b == c2, "pair held");
    in_valid = 0; out_ready = 1;

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
