// instruction_memory: program store for the 4-bit opcodes.
//
// DEPTH words of 4 bits. An address sequencer inside the memory selects the
// word presented on instr (asynchronous read, so the fetch unit's register
// is the only stage of delay). The sequencer clears to 0 on reset and steps
// by one on every rising edge at which the processor's jump request is high,
// wrapping after the last word. The same address goes to the data memory so
// the two halves of an instruction stay together. A write port (we, waddr,
// wdata) loads the program; it is independent of the read side.
// The processor described has no program counter of its own and leaves the
// sequencing of the instruction memory unstated; the sequencer, the load
// port and DEPTH are this design's choices.
module instruction_memory
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          reset_n,
  input  logic          jump,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [3:0]    wdata,
  output logic [3:0]    instr,
  output logic [AW-1:0] addr
);

  logic [3:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!reset_n)  addr <= '0;
    else if (jump) addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
  end

  assign instr = mem[addr];

endmodule
