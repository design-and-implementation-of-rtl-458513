// risc_top: the complete 32-bit four-stage pipelined RISC system.
//
// Harvard organisation: the instruction memory supplies the 4-bit opcode,
// the data memory the operand fields (source1, source2, destination, data)
// of the same instruction, and the pipelined processor executes one
// instruction per clock, returning a 64-bit result and the jump request
// that steps the instruction memory's address. Both memories are loaded
// through their write ports (imem_*, dmem_*) while reset_n is low; after
// reset_n rises, the instruction at address 0 is fetched on the first edge
// and its result appears on `result` after the third. `pc` and `bypass`
// are observation outputs. The three-block structure and the result, jump,
// clk and reset_n signals follow the original top-level architecture; the
// load ports and DEPTH are this design's choices.
module risc_top
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  imem_we,
  input  logic [AW-1:0]         imem_waddr,
  input  logic [3:0]            imem_wdata,
  input  logic                  dmem_we,
  input  logic [AW-1:0]         dmem_waddr,
  input  logic [OPERANDS_W-1:0] dmem_wdata,
  output logic [RLEN-1:0]       result,
  output logic                  jump,
  output logic [AW-1:0]         pc,
  output logic [3:0]            bypass
);

  logic [3:0] instr;
  reg_addr_t  source1, source2, destination;
  word_t      data;

  instruction_memory #(.DEPTH(DEPTH)) u_imem (
    .clk, .reset_n, .jump,
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata),
    .instr,
    .addr  (pc)
  );

  data_memory #(.DEPTH(DEPTH)) u_dmem (
    .clk,
    .we    (dmem_we),
    .waddr (dmem_waddr),
    .wdata (operands_t'(dmem_wdata)),
    .addr  (pc),
    .source1, .source2, .destination, .data
  );

  pipelined_processor u_cpu (
    .clk, .reset_n,
    .instr, .source1, .source2, .destination, .data,
    .jump, .result, .bypass
  );

endmodule
