// tb_execute_unit: drives decoded instructions and register values into the
// execute unit and checks result, e_data, e_destination and e_store one
// clock later, including the forwarding of the previous instruction's
// e_data into either operand, and the jump request.
module tb_execute_unit;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  logic clk = 0, reset_n = 0;
  opcode_t d_instr;
  reg_addr_t d_source1, d_source2, d_destination, e_destination;
  word_t d_data, r_source1_data, r_source2_data, e_data;
  result_t result;
  logic jump, e_store, fwd_s1, fwd_s2;
  int checks = 0, failures = 0, fwd_count = 0;

  always #5 clk = ~clk;

  execute_unit dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev_data; logic [2:0] prev_dst; logic prev_store;
    d_instr = OP_ADD; d_source1 = 0; d_source2 = 0; d_destination = 1; d_data = 0;
    r_source1_data = 7; r_source2_data = 9;
    #1;
    checks++; if (jump !== 0) failures++;
    @(posedge clk); #1;
    checks++;
    if (result !== 0 || e_store !== 0) failures++;
    reset_n = 1;
    #1; checks++; if (jump !== 1) failures++;
    prev_store = 0; prev_data = 0; prev_dst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] o; logic [31:0] v1, v2; u64 exp;
      o = 4'($urandom);
      d_instr = opcode_t'(o);
      d_source1 = 3'($urandom); d_source2 = 3'($urandom);
      d_destination = 3'($urandom); d_data = $urandom;
      r_source1_data = $urandom; r_source2_data = $urandom;
      if (i % 3 == 0) d_source1 = prev_dst;
      if (i % 5 == 0) d_source2 = prev_dst;
      v1 = (prev_store && d_source1 == prev_dst) ? prev_data : r_source1_data;
      v2 = (prev_store && d_source2 == prev_dst) ? prev_data : r_source2_data;
      if (prev_store && (d_source1 == prev_dst || d_source2 == prev_dst)) fwd_count++;
      exp = ref_result(o, v1, v2, d_data);
      @(posedge clk); #1;
      checks++;
      if (result !== exp || e_data !== exp[31:0] || e_destination !== d_destination ||
          e_store !== (o >= 4'h2)) begin
        failures++;
        $display("FAIL i=%0d op=%b result=%h exp=%h store=%b", i, o, result, exp, e_store);
      end
      prev_store = (o >= 4'h2); prev_data = exp[31:0]; prev_dst = d_destination;
    end
    checks++;
    if (fwd_count == 0) failures++;
    $display("forwarded operands: %0d", fwd_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
