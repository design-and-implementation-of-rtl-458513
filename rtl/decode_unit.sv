// decode_unit: second pipeline stage of the processor.
//
// Registers the fetched instruction into the d_* outputs for the execute
// unit, in the same cycle in which the internal register unit reads the two
// source registers, so d_* and r_source*_data reach the execute unit
// together. The decoding done here is the choice of write-back register:
// MOVE (0010) copies source1 into source2, so d_destination is set to
// f_source2 for it; every other opcode keeps f_destination. Whether an
// instruction writes a register at all is decided in the execute unit.
// The stage boundary and signal names follow the original
// micro-architecture; the MOVE remapping follows the original instruction table.
// Latency: one clock. Active-low synchronous reset to opcode 0000 (a bubble
// that writes no register).
module decode_unit
  import risc_pkg::*;
(
  input  logic      clk,
  input  logic      reset_n,
  input  opcode_t   f_instr,
  input  reg_addr_t f_source1,
  input  reg_addr_t f_source2,
  input  reg_addr_t f_destination,
  input  word_t     f_data,
  output opcode_t   d_instr,
  output reg_addr_t d_source1,
  output reg_addr_t d_source2,
  output reg_addr_t d_destination,
  output word_t     d_data
);

  reg_addr_t dest_n;

  always_comb begin
    dest_n = (f_instr == OP_MOVE) ? f_source2 : f_destination;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      d_instr       <= OP_READ_DATA;
      d_source1     <= '0;
      d_source2     <= '0;
      d_destination <= '0;
      d_data        <= '0;
    end else begin
      d_instr       <= f_instr;
      d_source1     <= f_source1;
      d_source2     <= f_source2;
      d_destination <= dest_n;
      d_data        <= f_data;
    end
  end

endmodule
