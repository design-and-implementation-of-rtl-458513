// risc_ref_pkg: instruction-level reference model used by the testbenches.
//
// Written from the instruction table independently of the RTL: it works on
// plain integers and bit vectors, with its own opcode numbers, and keeps an
// architectural register file. ref_result gives the 64-bit result bus value
// of one instruction; ref_step executes one instruction on a register array.
package risc_ref_pkg;

  typedef logic [31:0] u32;
  typedef logic [63:0] u64;

  function automatic u64 ref_result(logic [3:0] op, u32 r1, u32 r2, u32 d);
    logic [32:0] t;
    case (op)
      4'h0: return {32'h0, d};
      4'h1: return {32'h0, r1};
      4'h2: return {32'h0, r1};
      4'h3: begin t = {1'b0, r1} + {1'b0, r2}; return {31'h0, t}; end
      4'h4: begin t = {1'b0, r1} - {1'b0, r2}; return {31'h0, t}; end
      4'h5: begin t = {1'b0, d} + 33'd1;       return {31'h0, t}; end
      4'h6: begin t = {1'b0, d} - 33'd1;       return {31'h0, t}; end
      4'h7: return {32'h0, r1} * {32'h0, r2};
      4'h8: return 64'h0;
      4'h9: return {32'h0, d};
      4'hA: return {32'h0, ~r1};
      4'hB: return {32'h0, r1 & r2};
      4'hC: return {32'h0, r1 | r2};
      4'hD: return {32'h0, ~(r1 & r2)};
      4'hE: return {32'h0, ~(r1 | r2)};
      default: return {32'h0, r1 ^ r2};
    endcase
  endfunction

  // Execute one instruction on regs; returns the result bus value.
  function automatic u64 ref_step(ref u32 regs[8], input logic [3:0] op,
                                  input logic [2:0] s1, input logic [2:0] s2,
                                  input logic [2:0] dst, input u32 d);
    u64 r;
    r = ref_result(op, regs[s1], regs[s2], d);
    if (op == 4'h2)      regs[s2]  = r[31:0];
    else if (op >= 4'h3) regs[dst] = r[31:0];
    return r;
  endfunction

endpackage
