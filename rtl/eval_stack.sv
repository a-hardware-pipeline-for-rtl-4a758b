// eval_stack: the operand stack of an evaluation unit.  As in the document it is a
// left/right shift register together with an up/down counter (the top pointer):
// the top of the stack is always the leftmost cell, cell 0.  A push shifts every
// cell one place to the right, writes the new value into cell 0 and counts up; a
// pop shifts every cell one place to the left (the old top leaves as the popped
// value) and counts down.
//
// Interface: push with din, or pop, one per cycle (both at once is a usage error,
// checked by an assertion); clear empties the stack.  top is cell 0 and count the
// top pointer.  overflow / underflow latch a push onto a full stack or a pop from
// an empty one until clear.  Updates happen on the clock edge.
module eval_stack
  import plga_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic                       pop,
  input  fix_t                       din,
  output fix_t                       top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  output logic                       underflow
);

  fix_t sr [DEPTH];

  assign top = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (clear) begin
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (push) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      if (count == ($clog2(DEPTH+1))'(DEPTH)) overflow <= 1'b1;
      else                                    count    <= count + 1'b1;
    end else if (pop) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= '0;
      if (count == '0) underflow <= 1'b1;
      else             count     <= count - 1'b1;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
