// pipelined_processor: the four-unit pipelined core.
//
// Fetch, decode, internal register unit and execute are wired as in the
// original micro-architecture:
//   fetch     registers instr/source1/source2/destination/data  -> f_*
//   decode    registers f_* -> d_*; at the same edge the internal register
//             unit reads R[f_source1], R[f_source2] -> r_source*_data
//   execute   computes on d_* and r_source*_data -> result, e_data,
//             e_destination, e_store
//   write     the internal register unit stores e_data at e_destination
// An instruction presented at the inputs before clock edge k appears on
// `result` after edge k+2 and its register write lands at edge k+3. One
// instruction is accepted and one completed every clock. Read-after-write
// hazards are covered by two bypasses (see execute_unit and
// internal_register_unit), so no stall exists. All units share clk and the
// active-low synchronous reset. The bypass strobes are brought out only for
// observation.
module pipelined_processor
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic [3:0] instr,
  input  reg_addr_t  source1,
  input  reg_addr_t  source2,
  input  reg_addr_t  destination,
  input  word_t      data,
  output logic       jump,
  output result_t    result,
  output logic [3:0] bypass      // {ex s2, ex s1, regfile s2, regfile s1}
);

  opcode_t   f_instr, d_instr;
  reg_addr_t f_source1, f_source2, f_destination;
  reg_addr_t d_source1, d_source2, d_destination;
  word_t     f_data, d_data;
  word_t     r_source1_data, r_source2_data;
  word_t     e_data;
  reg_addr_t e_destination;
  logic      e_store;
  logic      rf_byp1, rf_byp2, ex_fwd1, ex_fwd2;

  fetch_unit u_fetch (
    .clk, .reset_n,
    .instr       (opcode_t'(instr)),
    .source1, .source2, .destination, .data,
    .f_instr, .f_source1, .f_source2, .f_destination, .f_data
  );

  decode_unit u_decode (
    .clk, .reset_n,
    .f_instr, .f_source1, .f_source2, .f_destination, .f_data,
    .d_instr, .d_source1, .d_source2, .d_destination, .d_data
  );

  internal_register_unit u_regs (
    .clk, .reset_n,
    .f_source1, .f_source2,
    .e_data, .e_destination, .e_store,
    .r_source1_data, .r_source2_data,
    .bypass_s1 (rf_byp1),
    .bypass_s2 (rf_byp2)
  );

  execute_unit u_execute (
    .clk, .reset_n,
    .d_instr, .d_source1, .d_source2, .d_destination, .d_data,
    .r_source1_data, .r_source2_data,
    .result, .jump,
    .e_data, .e_destination, .e_store,
    .fwd_s1 (ex_fwd1),
    .fwd_s2 (ex_fwd2)
  );

  assign bypass = {ex_fwd2, ex_fwd1, rf_byp2, rf_byp1};

endmodule
