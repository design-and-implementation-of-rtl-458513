// data_memory: store for the operand fields of each instruction.
//
// DEPTH words of 41 bits, each holding {source1[2:0], source2[2:0],
// destination[2:0], data[31:0]} for the instruction at the same address of
// the instruction memory. Read is asynchronous at addr, which comes from the
// instruction memory's sequencer; a write port (we, waddr, wdata) loads the
// program. The field list and widths follow the original top-level architecture;
// the word layout, the shared address and DEPTH are this design's
// choices.
module data_memory
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  operands_t     wdata,
  input  logic [AW-1:0] addr,
  output reg_addr_t     source1,
  output reg_addr_t     source2,
  output reg_addr_t     destination,
  output word_t         data
);

  operands_t mem [DEPTH];
  operands_t rd;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rd          = mem[addr];
  assign source1     = rd.source1;
  assign source2     = rd.source2;
  assign destination = rd.destination;
  assign data        = rd.data;

endmodule
