// arith_unit: the arithmetic unit of an evaluation unit, with the four operators
// the document shows (+, -, *, /) on signed fixed-point numbers (fix_t, FRAC
// fraction bits).  Addition, subtraction and multiplication finish one cycle after
// start.  Division is a restoring divider on the magnitudes that produces one
// quotient bit per cycle (done DATA_W + FRAC + 2 cycles after start), then fixes the sign.  The
// document does not give the unit's insides; these are the simplest choices.
// Results wrap on overflow; the product is truncated to FRAC fraction bits.  A
// division by zero returns the largest magnitude with the dividend's sign and sets
// div_zero.
//
// Interface: pulse start with a, b and op; done pulses for one cycle with result
// (a op b) valid from then until the next start.  busy is 1 in between.
module arith_unit
  import plga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  op_e  op,
  input  fix_t a,
  input  fix_t b,
  output logic busy,
  output logic done,
  output fix_t result,
  output logic div_zero
);

  localparam int NW = DATA_W + FRAC;   // dividend width (a << FRAC)

  logic [2*DATA_W-1:0] prod;
  logic [NW-1:0]       dividend, quot;
  logic [DATA_W:0]     rem, rem_sh;
  logic [DATA_W-1:0]   divisor;
  logic [$clog2(NW+1)-1:0] bitn;
  logic                neg, dividing;

  assign prod = (2*DATA_W)'(a) * (2*DATA_W)'(b);
  assign busy = dividing;

  always_comb rem_sh = {rem[DATA_W-1:0], dividend[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      result   <= '0;
      div_zero <= 1'b0;
      dividing <= 1'b0;
      dividend <= '0;
      quot     <= '0;
      rem      <= '0;
      divisor  <= '0;
      bitn     <= '0;
      neg      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        div_zero <= 1'b0;
        unique case (op)
          OP_ADD: begin result <= a + b; done <= 1'b1; end
          OP_SUB: begin result <= a - b; done <= 1'b1; end
          OP_MUL: begin result <= fix_t'(prod >>> FRAC); done <= 1'b1; end
          OP_DIV: begin
            if (b == '0) begin
              result   <= a[DATA_W-1] ? {1'b1, {(DATA_W-1){1'b0}}} : {1'b0, {(DATA_W-1){1'b1}}};
              div_zero <= 1'b1;
              done     <= 1'b1;
            end else begin
              dividing <= 1'b1;
              neg      <= a[DATA_W-1] ^ b[DATA_W-1];
              dividend <= NW'(unsigned'(a[DATA_W-1] ? -a : a)) << FRAC;
              divisor  <= b[DATA_W-1] ? -b : b;
              rem      <= '0;
              quot     <= '0;
              bitn     <= '0;
            end
          end
          default: ;
        endcase
      end else if (dividing) begin
        if (int'(bitn) < NW) begin
          // one restoring-division step per cycle
          dividend <= dividend << 1;
          if (rem_sh >= {1'b0, divisor}) begin
            rem  <= rem_sh - {1'b0, divisor};
            quot <= {quot[NW-2:0], 1'b1};
          end else begin
            rem  <= rem_sh;
            quot <= {quot[NW-2:0], 1'b0};
          end
          bitn <= bitn + 1'b1;
        end else begin
          dividing <= 1'b0;
          done     <= 1'b1;
          result   <= neg ? -fix_t'(quot) : fix_t'(quot);
        end
      end
    end
  end

endmodule
