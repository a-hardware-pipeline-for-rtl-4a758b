// temp_sched: generation counter and annealing temperature of the stochastic
// selection.  The document lowers the temperature as T = T0 (1 - alpha)^k with
// k = 100 g / G, g the generation and G its maximum, so T takes 100 steps over a
// run.  This unit keeps g, k and T, plus 1/T, which is what the selection units
// need (they multiply by 1/T instead of dividing by T; that is this design's
// choice).  k is tracked without a divider: every finished generation adds 100 to
// an accumulator, and each cycle in which the accumulator holds G or more, G is
// taken off, k goes up by one and T is multiplied by (1 - alpha), 1/T by
// 1/(1 - alpha).  Both are unsigned Q16.16.
//
// Interface: gen_tick is a one-cycle pulse at the end of a generation.  gen counts
// them; done is 1 once gen has reached G_MAX.  t_step pulses when T is lowered.
// T0 = 50, alpha = 0.05 and G = 2000 are the values used in the document's runs.
module temp_sched #(
  parameter int  G_MAX = 2000,
  parameter real T0    = 50.0,
  parameter real ALPHA = 0.05
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gen_tick,
  output logic [31:0] gen,
  output logic [7:0]  k,
  output logic [31:0] temp,     // T,   unsigned Q16.16
  output logic [31:0] inv_temp, // 1/T, unsigned Q16.16
  output logic        t_step,
  output logic        done
);

  localparam logic [31:0] T0_Q     = 32'($rtoi(T0 * 65536.0 + 0.5));
  localparam logic [31:0] INVT0_Q  = 32'($rtoi(65536.0 / T0 + 0.5));
  localparam logic [31:0] DECAY_Q  = 32'($rtoi((1.0 - ALPHA) * 65536.0 + 0.5));
  localparam logic [31:0] GROW_Q   = 32'($rtoi(65536.0 / (1.0 - ALPHA) + 0.5));

  logic [31:0] acc;
  logic [63:0] t_prod, it_prod;

  assign t_step  = (acc >= 32'(G_MAX)) && (k < 8'd100);
  assign t_prod  = 64'(temp) * 64'(DECAY_Q);
  assign it_prod = 64'(inv_temp) * 64'(GROW_Q);
  assign done    = (gen >= 32'(G_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen      <= '0;
      acc      <= '0;
      k        <= '0;
      temp     <= T0_Q;
      inv_temp <= INVT0_Q;
    end else begin
      if (gen_tick && !done) gen <= gen + 1'b1;
      acc <= acc + ((gen_tick && !done) ? 32'd100 : 32'd0) - (t_step ? 32'(G_MAX) : 32'd0);
      if (t_step) begin
        k        <= k + 1'b1;
        temp     <= 32'(t_prod >> 16);
        inv_temp <= (it_prod[63:48] != 0) ? 32'hFFFF_FFFF : 32'(it_prod >> 16);
      end
    end
  end

endmodule
