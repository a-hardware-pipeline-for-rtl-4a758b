// eval_unit: a general-purpose fitness evaluation unit (one of E1..E12), a small
// stack machine that runs the objective function written in postfix form.
//
// How it works (the structure follows the document's evaluation unit):
//  * The postfix expression (up to PF_LEN entries, shared by all units and loaded
//    by the host) is copied into the postfix string buffer, a right-shift register
//    whose rightmost cell (index 0) is the current symbol.
//  * The chromosome goes into the chromosome-value buffer; its associative mapper
//    substitutes the numeric value of a variable symbol as it reaches the
//    rightmost cell.
//  * The comparator (op_detect) decides operand or operator.  An operand is pushed
//    onto the stack (top pointer up) and the postfix buffer shifts.  An operator
//    pops the right operand, waits d1 cycles, pops the left operand while starting
//    the arithmetic unit, waits at least d2 cycles and until the arithmetic unit is
//    done, then pushes the result (top pointer up) and shifts the postfix buffer.
//  * When all prog_len entries are used the result is the top of the stack.
// Cycle counts: 1 per operand, D1 + 2 per + - * (with D2 = 1), D1 + DATA_W + FRAC
// + 3 per division, plus 1 to finish after the last entry.  D1 = D2 = 1 and the handshake
// are this design's choices; the document only names the two delays.
//
// Interface: prog/prog_len is the expression.  in_valid/in_ready takes a
// chromosome when idle.  out_valid rises with out_chrom (the chromosome), out_fit
// (the value of the expression) and out_err (stack overflow or underflow, a stack
// not holding exactly one value at the end, an unknown variable or a division by
// zero), held until out_ready.  op_fire pulses with op_code when an operator's
// result is pushed.
module eval_unit
  import plga_pkg::*;
#(
  parameter int NVAR        = 10,
  parameter int PF_LEN      = 64,
  parameter int STACK_DEPTH = 16,
  parameter int D1          = 1,
  parameter int D2          = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  entry_t                    prog [PF_LEN],
  input  logic [$clog2(PF_LEN+1)-1:0] prog_len,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [NVAR*GENE_W-1:0]    in_chrom,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [NVAR*GENE_W-1:0]    out_chrom,
  output fix_t                      out_fit,
  output logic                      out_err,
  output logic                      op_fire,
  output op_e                       op_code
);

  typedef enum logic [2:0] {IDLE, FETCH, WAIT1, COMPUTE, FINISH} state_e;
  state_e state;

  entry_t pf [PF_LEN];
  logic [$clog2(PF_LEN+1)-1:0] remaining;
  logic [7:0]  dcnt;
  fix_t        b_r;
  op_e         op_r;
  logic        ar_done_seen, err_r;

  // chromosome-value buffer + associative mapper
  entry_t sym;
  logic   bad_sym;
  fix_t   v_buf [NVAR];
  chrom_value_buf #(.NVAR(NVAR)) u_cvb (
    .clk, .rst_n,
    .load   (state == IDLE && in_valid),
    .genes  (in_chrom),
    .sym_in (pf[0]),
    .sym_out(sym),
    .bad_sym,
    .x_buf  (out_chrom),
    .v_buf
  );

  // comparator
  logic       is_operand;
  logic [3:0] match;
  op_e        op_now;
  op_detect u_cmp (.entry(sym), .is_operand, .match, .op(op_now));

  // stack and top pointer
  logic s_push, s_pop, s_ovf, s_udf;
  fix_t s_din, s_top;
  logic [$clog2(STACK_DEPTH+1)-1:0] s_count;
  eval_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .clear    (state == IDLE),
    .push     (s_push),
    .pop      (s_pop),
    .din      (s_din),
    .top      (s_top),
    .count    (s_count),
    .overflow (s_ovf),
    .underflow(s_udf)
  );

  // arithmetic unit
  logic ar_start, ar_busy, ar_done, ar_div0;
  fix_t ar_res;
  arith_unit u_alu (
    .clk, .rst_n,
    .start(ar_start), .op(op_r), .a(s_top), .b(b_r),
    .busy(ar_busy), .done(ar_done), .result(ar_res), .div_zero(ar_div0)
  );

  logic fetch_go, compute_go;
  assign fetch_go   = (state == FETCH) && (remaining != '0);
  assign compute_go = (state == COMPUTE) && (dcnt == '0) && (ar_done || ar_done_seen);

  always_comb begin
    s_push   = 1'b0;
    s_pop    = 1'b0;
    s_din    = sym[DATA_W-1:0];
    ar_start = 1'b0;
    if (fetch_go) begin
      if (is_operand) s_push = 1'b1;
      else            s_pop  = 1'b1;         // first pop: right operand
    end
    if (state == WAIT1 && dcnt == '0) begin
      s_pop    = 1'b1;                       // second pop: left operand
      ar_start = 1'b1;
    end
    if (compute_go) begin
      s_push = 1'b1;
      s_din  = ar_res;
    end
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == FINISH);
  assign out_fit   = s_top;
  assign out_err   = err_r || s_ovf || s_udf || (s_count != 1);
  assign op_fire   = compute_go;
  assign op_code   = op_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      remaining    <= '0;
      dcnt         <= '0;
      b_r          <= '0;
      op_r         <= OP_ADD;
      ar_done_seen <= 1'b0;
      err_r        <= 1'b0;
      for (int i = 0; i < PF_LEN; i++) pf[i] <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          for (int i = 0; i < PF_LEN; i++) pf[i] <= prog[i];
          remaining <= prog_len;
          err_r     <= 1'b0;
          state     <= FETCH;
        end
        FETCH: begin
          if (remaining == '0) begin
            state <= FINISH;
          end else begin
            if (bad_sym) err_r <= 1'b1;
            if (is_operand) begin
              for (int i = 0; i < PF_LEN - 1; i++) pf[i] <= pf[i+1];
              pf[PF_LEN-1] <= '0;
              remaining    <= remaining - 1'b1;
            end else begin
              b_r   <= s_top;
              op_r  <= op_now;
              dcnt  <= 8'(D1 - 1);
              state <= WAIT1;
            end
          end
        end
        WAIT1: begin
          if (dcnt == '0) begin
            dcnt         <= 8'(D2 - 1);
            ar_done_seen <= 1'b0;
            state        <= COMPUTE;
          end else begin
            dcnt <= dcnt - 1'b1;
          end
        end
        COMPUTE: begin
          if (dcnt != '0) dcnt <= dcnt - 1'b1;
          if (ar_done) begin
            ar_done_seen <= 1'b1;
            if (ar_div0) err_r <= 1'b1;
          end
          if (compute_go) begin
            for (int i = 0; i < PF_LEN - 1; i++) pf[i] <= pf[i+1];
            pf[PF_LEN-1] <= '0;
            remaining    <= remaining - 1'b1;
            state        <= FETCH;
          end
        end
        FINISH: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) ar_start |-> !ar_busy);

endmodule
