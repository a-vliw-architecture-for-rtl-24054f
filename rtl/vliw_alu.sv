// vliw_alu: the one-cycle unit of the VLIW LNS processor.
//
// It executes the chunk3 operation Rd <- Rd op Rs: integer add, subtract,
// add-with-carry, subtract-with-borrow, AND, OR, XOR, rotate right, MOV and
// MOVPC, and the cheap LNS operations multiply and divide (an add or subtract
// of the logarithms), plus the unary LNS operations square, square root,
// reciprocal (negated logarithm; the reciprocal of zero saturates to the
// largest magnitude) and absolute value, which read Rs.  All sixteen codes
// are used.  It also computes the single status flag:
//   AND, OR         -> 0
//   ADD, ADC        -> carry out
//   SUB             -> (signed) Rd < Rs
//   SBB             -> borrow out (equals (unsigned) Rd < Rs when flag was 0)
//   XOR             -> Rd == Rs
//   LDIV            -> (LNS value) Rd < Rs
//   MOVPC           -> cleared
//   LMUL, MOV, ROR and the unary LNS operations leave it alone.
// The operation list and flag rules follow the published instruction tables
// and text; the unary operations are named in the text only, square in one
// list and reciprocal and absolute value in another, and all are provided.
// The opcode numbering, the choice of Rs as the operand of the unary
// operations, the rotate amount (Rs[4:0]), the borrow of SBB including the
// incoming flag, and MOVPC storing the address of the next instruction are
// this design's choices.
//
// Interface: purely combinational.  `a` is the value of Rd, `b` the value of
// Rs (the immediate when Rs is R0), `pc_next` the address of the following
// instruction.  `wr` says that Rd is written, `flag_we` that the flag is.
module vliw_alu
  import lns_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    flag,
  input  word_t   pc_next,
  output word_t   result,
  output logic    wr,
  output logic    flag_out,
  output logic    flag_we,
  output logic    movpc
);

  logic [32:0] sum;
  logic signed [LOGW-1:0] lb;

  always_comb begin
    result   = '0;
    wr       = 1'b1;
    flag_out = flag;
    flag_we  = 1'b0;
    movpc    = 1'b0;
    sum      = '0;
    lb       = signed'(b[LOGW-1:0]);
    unique case (op)
      ALU_LMUL: result = lns_mul(a, b, 1'b0);
      ALU_LDIV: begin
        result   = lns_mul(a, b, 1'b1);
        flag_out = lns_lt(a, b);
        flag_we  = 1'b1;
      end
      ALU_ADD: begin
        sum      = {1'b0, a} + {1'b0, b};
        result   = sum[31:0];
        flag_out = sum[32];
        flag_we  = 1'b1;
      end
      ALU_ADC: begin
        sum      = {1'b0, a} + {1'b0, b} + 33'(flag);
        result   = sum[31:0];
        flag_out = sum[32];
        flag_we  = 1'b1;
      end
      ALU_SUB: begin
        result   = a - b;
        flag_out = signed'(a) < signed'(b);
        flag_we  = 1'b1;
      end
      ALU_SBB: begin
        sum      = {1'b0, a} - {1'b0, b} - 33'(flag);
        result   = sum[31:0];
        flag_out = sum[32];
        flag_we  = 1'b1;
      end
      ALU_AND: begin
        result  = a & b;
        flag_out = 1'b0;
        flag_we = 1'b1;
      end
      ALU_OR: begin
        result  = a | b;
        flag_out = 1'b0;
        flag_we = 1'b1;
      end
      ALU_XOR: begin
        result   = a ^ b;
        flag_out = (a == b);
        flag_we  = 1'b1;
      end
      ALU_ROR: result = (a >> b[4:0]) | (a << (6'd32 - {1'b0, b[4:0]}));
      ALU_MOVPC: begin
        result   = pc_next;
        flag_out = 1'b0;
        flag_we  = 1'b1;
        movpc    = 1'b1;
      end
      ALU_MOV:    result = b;
      ALU_LSQRT:  result = lns_is_zero(b) ? LNS_ZERO : {1'b0, LOGW'(lb >>> 1)};
      ALU_LRECIP: result = lns_is_zero(b) ? {b[31], LOG_MAX} : {b[31], LOGW'(-lb)};
      ALU_LABS:   result = {1'b0, b[LOGW-1:0]};
      ALU_LSQR:   result = lns_mul(b, b, 1'b0);
    endcase
  end

endmodule
