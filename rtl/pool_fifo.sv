// pool_fifo: the population pool.  Evaluated chromosomes, each stored together
// with its fitness, wait here until the selection stage takes them.  The document
// keeps the evaluated chromosomes in a buffer organised as a FIFO and feeds them
// back to selection; the port shapes are this design's choice: one entry can be
// written per cycle (children leave the evaluation stage one at a time) and two
// entries are read together (the two selection units S1 and S2 each take one).
//
// Interface: push/push_data write one entry (ignored when full, flagged by
// overflow).  rd_data0 is the oldest entry and rd_data1 the one after it; both are
// valid when pair_avail is 1, and pop2 removes both at the clock edge.  count is
// the number of stored entries.  Reads are combinational from the array, writes
// take effect at the next edge; a push and a pop2 in the same cycle are allowed.
module pool_fifo #(
  parameter int DEPTH = 64,
  parameter int W     = 148
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  input  logic                       pop2,
  output logic [W-1:0]               rd_data0,
  output logic [W-1:0]               rd_data1,
  output logic                       pair_avail,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       overflow
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr, rd_ptr1;
  logic          do_push, do_pop;

  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign pair_avail = (count >= 2);
  assign do_push    = push && !full;
  assign do_pop     = pop2 && pair_avail;
  assign rd_ptr1    = (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
  assign rd_data0   = mem[rd_ptr];
  assign rd_data1   = mem[rd_ptr1];

  function automatic logic [AW-1:0] adv(logic [AW-1:0] p, int n);
    int s;
    s = int'(p) + n;
    if (s >= DEPTH) s -= DEPTH;
    return AW'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= adv(wr_ptr, 1);
      if (do_pop)  rd_ptr <= adv(rd_ptr, 2);
      count <= count + ($clog2(DEPTH+1))'(do_push) - (do_pop ? ($clog2(DEPTH+1))'(2) : '0);
      if (push && full) overflow <= 1'b1;
    end
  end

  // A pop of two entries is only meaningful when two are stored.
  a_pop_legal: assert property (@(posedge clk) disable iff (!rst_n) pop2 |-> pair_avail);

endmodule
