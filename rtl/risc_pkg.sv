// risc_pkg: widths, opcodes and the stored instruction word shared by the
// 32-bit four-stage RISC processor.
//
// The instruction set has sixteen operations selected by a 4-bit opcode;
// registers are addressed with 3 bits (eight registers of 32 bits); the data
// path is 32 bits wide and the result bus 64 bits wide, so a full product of
// two 32-bit operands fits. These numbers and the opcode table follow the
// original design. The enum names are this design's own labels.
package risc_pkg;

  localparam int unsigned XLEN   = 32;  // data path width
  localparam int unsigned RLEN   = 64;  // result bus width
  localparam int unsigned NREGS  = 8;   // general-purpose registers
  localparam int unsigned RAW    = 3;   // register address width
  localparam int unsigned OPW    = 4;   // opcode width

  typedef logic [RAW-1:0]  reg_addr_t;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [RLEN-1:0] result_t;

  // Opcode map (4 bits, 16 instructions).
  typedef enum logic [OPW-1:0] {
    OP_READ_DATA = 4'b0000,  // result <= data
    OP_READ_REG  = 4'b0001,  // result <= R[source1]
    OP_MOVE      = 4'b0010,  // R[source2] <= R[source1]
    OP_ADD       = 4'b0011,  // R[dest] <= R[s1] + R[s2]
    OP_SUB       = 4'b0100,  // R[dest] <= R[s1] - R[s2]
    OP_INC       = 4'b0101,  // R[dest] <= data + 1
    OP_DEC       = 4'b0110,  // R[dest] <= data - 1
    OP_MUL       = 4'b0111,  // R[dest] <= R[s1] * R[s2] (64-bit result)
    OP_CLEAR     = 4'b1000,  // R[dest] <= 0
    OP_LOAD      = 4'b1001,  // R[dest] <= data
    OP_NOT       = 4'b1010,  // R[dest] <= ~R[s1]
    OP_AND       = 4'b1011,
    OP_OR        = 4'b1100,
    OP_NAND      = 4'b1101,
    OP_NOR       = 4'b1110,
    OP_XOR       = 4'b1111
  } opcode_t;

  // Operand fields of one instruction, as held in the data memory.
  typedef struct packed {
    reg_addr_t source1;
    reg_addr_t source2;
    reg_addr_t destination;
    word_t     data;
  } operands_t;

  localparam int unsigned OPERANDS_W = $bits(operands_t);  // 41

  // Instructions that write a register.
  function automatic logic writes_reg(opcode_t op);
    return !(op inside {OP_READ_DATA, OP_READ_REG});
  endfunction

  // Instructions whose first ALU operand is the immediate data field.
  function automatic logic uses_data(opcode_t op);
    return op inside {OP_READ_DATA, OP_INC, OP_DEC, OP_LOAD};
  endfunction

endpackage
