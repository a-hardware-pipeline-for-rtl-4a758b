// mut_stage: the mutation stage, NM_PAIRS pairs of mutation units in parallel (four
// pairs, M1..M8, in the document's example pipeline).  A mutation takes m T-cycles,
// so m pairs of units let a new pair of children enter every T-cycle.  A crossed
// pair goes to the lowest-numbered pair of units that are both idle; both children
// are then mutated side by side.  Finished children leave one per cycle through a
// round-robin arbiter, since the evaluation stage takes one chromosome at a time.
// The dispatch and arbitration scheme is this design's choice.
//
// Interface: in_valid/in_ready with a pair in_a/in_b; out_valid/out_ready with one
// chromosome out_data.  flips is the number of bits flipped by all units in the
// cycle; busy_units the number of units not idle.
module mut_stage #(
  parameter int          CW       = 250,
  parameter int          NM_PAIRS = 4,
  parameter int          BPC      = 25,
  parameter real         PM       = 0.05,
  parameter logic [31:0] SEED     = 32'h3A7E_0001
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [CW-1:0]         in_a,
  input  logic [CW-1:0]         in_b,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [CW-1:0]         out_data,
  output logic [15:0]           flips,
  output logic [7:0]            busy_units
);

  localparam int NU = 2 * NM_PAIRS;
  localparam int FW = $clog2(BPC + 1);

  logic          u_in_valid  [NU];
  logic          u_in_ready  [NU];
  logic          u_out_valid [NU];
  logic          u_out_ready [NU];
  logic [CW-1:0] u_out_data  [NU];
  logic [FW-1:0] u_flips     [NU];

  // ---- dispatch: lowest pair whose two units are idle ----
  logic [NM_PAIRS-1:0] pair_free;
  int                  sel_pair;

  always_comb begin
    sel_pair = -1;
    for (int p = NM_PAIRS - 1; p >= 0; p--) begin
      pair_free[p] = u_in_ready[2*p] && u_in_ready[2*p+1];
      if (pair_free[p]) sel_pair = p;
    end
  end

  always_comb begin
    for (int u = 0; u < NU; u++) u_in_valid[u] = in_valid && (sel_pair == u / 2);
  end
  assign in_ready = (sel_pair >= 0);

  for (genvar u = 0; u < NU; u++) begin : g_unit
    mut_unit #(.CW(CW), .BPC(BPC), .PM(PM), .SEED(SEED + 32'(u) * 32'h0101_0101)) u_mut (
      .clk, .rst_n,
      .in_valid (u_in_valid[u]),
      .in_ready (u_in_ready[u]),
      .in_data  ((u % 2 == 0) ? in_a : in_b),
      .out_valid(u_out_valid[u]),
      .out_ready(u_out_ready[u]),
      .out_data (u_out_data[u]),
      .flips    (u_flips[u])
    );
  end

  // ---- output: round robin over finished units ----
  logic [$clog2(NU)-1:0] rr, grant;
  logic                  any;

  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = 0; k < NU; k++) begin
      if (!any && u_out_valid[(int'(rr) + k) % NU]) begin
        any   = 1'b1;
        grant = ($clog2(NU))'((int'(rr) + k) % NU);
      end
    end
  end

  always_comb begin
    for (int u = 0; u < NU; u++) u_out_ready[u] = any && out_ready && (grant == ($clog2(NU))'(u));
  end

  assign out_valid = any;
  assign out_data  = u_out_data[grant];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      rr <= '0;
    else if (any && out_ready)       rr <= (int'(grant) == NU - 1) ? '0 : grant + 1'b1;
  end

  always_comb begin
    flips      = '0;
    busy_units = '0;
    for (int u = 0; u < NU; u++) begin
      flips      += 16'(u_flips[u]);
      busy_units += 8'(!u_in_ready[u]);
    end
  end

endmodule
