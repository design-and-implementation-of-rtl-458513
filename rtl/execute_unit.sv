// execute_unit: third pipeline stage of the processor.
//
// Takes the decoded instruction (d_*) and the two register values read by
// the internal register unit (r_source*_data), picks the ALU operands and
// registers the ALU output on the rising edge into:
//   - result        the 64-bit result bus of the processor,
//   - e_data        the low 32 bits, written back into the register file,
//   - e_destination the register to write,
//   - e_store       high when the opcode writes a register (all but 0000, 0001).
// The write-back happens in the internal register unit one clock later, so
// a value produced here is not yet in the register file when the next
// instruction's operands were read. A forwarding path therefore replaces a
// register operand with e_data when it names the register that the previous
// instruction is about to write (fwd_s1/fwd_s2 report when that happens).
// Operand a is the immediate data field for opcodes 0000, 0101, 0110, 1001
// and R[source1] otherwise; operand b is R[source2].
//
// jump is the advance request to the instruction memory. The original design
// routes it from the processor back to the instruction memory but does not
// define it and has no branch instruction; here it is high in every cycle in
// which the pipeline runs (reset_n high). The pipeline never stalls, so
// one instruction enters and one leaves every clock.
//
// The signal names follow the original micro-architecture; the operand
// selection, the forwarding path and the meaning of jump are this design's.
module execute_unit
  import risc_pkg::*;
(
  input  logic      clk,
  input  logic      reset_n,
  input  opcode_t   d_instr,
  input  reg_addr_t d_source1,
  input  reg_addr_t d_source2,
  input  reg_addr_t d_destination,
  input  word_t     d_data,
  input  word_t     r_source1_data,
  input  word_t     r_source2_data,
  output result_t   result,
  output logic      jump,
  output word_t     e_data,
  output reg_addr_t e_destination,
  output logic      e_store,
  output logic      fwd_s1,
  output logic      fwd_s2
);

  word_t   s1_val, s2_val, a, b;
  result_t y;

  always_comb begin
    fwd_s1 = e_store && (e_destination == d_source1);
    fwd_s2 = e_store && (e_destination == d_source2);
    s1_val = fwd_s1 ? e_data : r_source1_data;
    s2_val = fwd_s2 ? e_data : r_source2_data;
    a      = uses_data(d_instr) ? d_data : s1_val;
    b      = s2_val;
    jump   = reset_n;
  end

  alu u_alu (
    .op (d_instr),
    .a  (a),
    .b  (b),
    .y  (y)
  );

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      result        <= '0;
      e_data        <= '0;
      e_destination <= '0;
      e_store       <= 1'b0;
    end else begin
      result        <= y;
      e_data        <= y[XLEN-1:0];
      e_destination <= d_destination;
      e_store       <= writes_reg(d_instr);
    end
  end

endmodule
