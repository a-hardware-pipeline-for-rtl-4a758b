// mut_unit: one mutation unit (one of M1..M8).  Every bit of the chromosome is
// flipped with probability PM (0.05 in the document's runs), the usual mutation of
// a binary chromosome.  The unit handles BPC bits per clock, so one chromosome
// takes ceil(CW/BPC) cycles.  With one 25-bit gene per clock a mutation takes as
// many T-cycles as the function has variables, as in the document's table of
// stage times (m = 3, 5, 10 for 3, 5, 10 variables).  The chunk size and the
// random source (an 8-bit random number per bit, flip when below round(PM*256))
// are this design's choices.
//
// Interface: in_valid/in_ready takes a chromosome when the unit is idle; after the
// mutation cycles out_valid rises and out_data is held until out_ready.  flips is
// the number of bits flipped in the current cycle.
module mut_unit #(
  parameter int          CW   = 250,
  parameter int          BPC  = 25,
  parameter real         PM   = 0.05,
  parameter logic [31:0] SEED = 32'h0DD_BA11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [CW-1:0]            in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [CW-1:0]            out_data,
  output logic [$clog2(BPC+1)-1:0] flips
);

  localparam int          NCH   = (CW + BPC - 1) / BPC;
  localparam int          NW    = (BPC * 8 + 31) / 32;
  localparam logic [8:0]  PM_TH = 9'($rtoi(PM * 256.0 + 0.5));

  typedef enum logic [1:0] {IDLE, BUSY, DONE} state_e;
  state_e state;

  logic [32*NW-1:0]          rnd;
  logic [$clog2(NCH+1)-1:0]  chunk;
  logic [BPC-1:0]            flip_mask;
  logic [NCH*BPC-1:0]        work, work_next;

  rng_xorshift #(.N_WORDS(NW), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(state == BUSY), .rnd
  );

  always_comb begin
    flips = '0;
    for (int i = 0; i < BPC; i++) begin
      flip_mask[i] = (state == BUSY) && (9'(rnd[8*i +: 8]) < PM_TH)
                     && ((int'(chunk) * BPC + i) < CW);
      flips += ($clog2(BPC+1))'(flip_mask[i]);
    end
    work_next = work;
    work_next[int'(chunk)*BPC +: BPC] = work[int'(chunk)*BPC +: BPC] ^ flip_mask;
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign out_data  = work[CW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      chunk <= '0;
      work  <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          work  <= (NCH*BPC)'(in_data);
          chunk <= '0;
          state <= BUSY;
        end
        BUSY: begin
          work <= work_next;
          if (int'(chunk) == NCH - 1) state <= DONE;
          else                        chunk <= chunk + 1'b1;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
