// tb_temp_sched: checks the annealing schedule T = T0 (1 - alpha)^k with
// k = floor(100 g / G) for a short run of G = 40 generations (k goes up by 2.5 per
// generation), and 1/T, against real-number references.  It also checks that done
// rises after exactly G generation ticks and that further ticks change nothing.
module tb_temp_sched;
  localparam int G = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic gen_tick = 0, t_step, done;
  logic [31:0] gen, temp, inv_temp;
  logic [7:0] k;
  temp_sched #(.G_MAX(G), .T0(50.0), .ALPHA(0.05)) dut (.clk, .rst_n, .gen_tick,
    .gen, .k, .temp, .inv_temp, .t_step, .done);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  function automatic bit near(real a, real b, real rel);
    real d;
    d = a - b; if (d < 0) d = -d;
    return d <= rel * (b < 0 ? -b : b) + 1.0e-4;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(near(real'(temp) / 65536.0, 50.0, 1e-4), "T0");
    check(near(real'(inv_temp) / 65536.0, 0.02, 1e-2), "1/T0");
    for (int g = 1; g <= G + 3; g++) begin
      @(negedge clk) gen_tick = 1;
      @(negedge clk) gen_tick = 0;
      repeat (6) @(negedge clk);
      begin
        int ge, ke;
        real te;
        ge = (g > G) ? G : g;
        ke = (ge * 100) / G;
        te = 50.0 * (0.95 ** real'(ke));
        check(int'(gen) == ge, $sformatf("gen %0d expected %0d", gen, ge));
        check(int'(k) == ke, $sformatf("k %0d expected %0d", k, ke));
        check(near(real'(temp) / 65536.0, te, 5e-3), $sformatf("T %f expected %f", real'(temp) / 65536.0, te));
        check(near(real'(inv_temp) / 65536.0, 1.0 / te, 1e-2), "1/T");
        check(done == (ge >= G), "done");
      end
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
