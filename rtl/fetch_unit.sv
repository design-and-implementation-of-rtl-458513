// fetch_unit: first pipeline stage of the processor.
//
// On every rising clock edge it captures the opcode from the instruction
// memory and the operand fields (source1, source2, destination, data) from
// the data memory into the f_* registers, which feed the decode unit and,
// for the two source addresses, the internal register unit. One instruction
// is taken per cycle; there is no stall. Signal names follow the
// original micro-architecture. The active-low synchronous reset clears the
// registers, which turns the stage into opcode 0000 (read data into result)
// with data 0: a harmless bubble that writes no register. The reset style is
// this design's choice.
module fetch_unit
  import risc_pkg::*;
(
  input  logic      clk,
  input  logic      reset_n,
  input  opcode_t   instr,
  input  reg_addr_t source1,
  input  reg_addr_t source2,
  input  reg_addr_t destination,
  input  word_t     data,
  output opcode_t   f_instr,
  output reg_addr_t f_source1,
  output reg_addr_t f_source2,
  output reg_addr_t f_destination,
  output word_t     f_data
);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      f_instr       <= OP_READ_DATA;
      f_source1     <= '0;
      f_source2     <= '0;
      f_destination <= '0;
      f_data        <= '0;
    end else begin
      f_instr       <= instr;
      f_source1     <= source1;
      f_source2     <= source2;
      f_destination <= destination;
      f_data        <= data;
    end
  end

endmodule
