// alu: the processor's 32-bit arithmetic and logic unit.
//
// Purely combinational. Operand `a` is either a register value or the
// immediate data field (the execute unit chooses), operand `b` is always a
// register value. The 64-bit output `y` carries:
//   - the full 64-bit product for multiply,
//   - the 32-bit sum/difference with the carry (add, increment) or borrow
//     (subtract, decrement) in bit 32,
//   - the 32-bit value zero-extended for every other operation.
// The operation list follows the original instruction table. The carry
// and borrow in bit 32, and NOT acting on the first source only, are this
// design's own choices; the original design gives neither.
module alu
  import risc_pkg::*;
(
  input  opcode_t op,
  input  word_t   a,
  input  word_t   b,
  output result_t y
);

  logic [XLEN:0] sum;    // a + b or a + 1, with carry
  logic [XLEN:0] diff;   // a - b or a - 1, with borrow

  always_comb begin
    sum  = {1'b0, a} + {1'b0, (op == OP_INC) ? word_t'(1) : b};
    diff = {1'b0, a} - {1'b0, (op == OP_DEC) ? word_t'(1) : b};
    unique case (op)
      OP_READ_DATA,
      OP_READ_REG,
      OP_MOVE,
      OP_LOAD:   y = {{(RLEN-XLEN){1'b0}}, a};
      OP_ADD,
      OP_INC:    y = {{(RLEN-XLEN-1){1'b0}}, sum};
      OP_SUB,
      OP_DEC:    y = {{(RLEN-XLEN-1){1'b0}}, diff};
      OP_MUL:    y = RLEN'(a) * RLEN'(b);
      OP_CLEAR:  y = '0;
      OP_NOT:    y = {{(RLEN-XLEN){1'b0}}, ~a};
      OP_AND:    y = {{(RLEN-XLEN){1'b0}}, a & b};
      OP_OR:     y = {{(RLEN-XLEN){1'b0}}, a | b};
      OP_NAND:   y = {{(RLEN-XLEN){1'b0}}, ~(a & b)};
      OP_NOR:    y = {{(RLEN-XLEN){1'b0}}, ~(a | b)};
      OP_XOR:    y = {{(RLEN-XLEN){1'b0}}, a ^ b};
      default:   y = '0;
    endcase
  end

endmodule
