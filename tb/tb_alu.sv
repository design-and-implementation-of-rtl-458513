// tb_alu: exercises every ALU operation with random and corner operands and
// compares the 64-bit output with the reference model.
module tb_alu;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  opcode_t op;
  word_t   a, b;
  result_t y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  task automatic check(input logic [3:0] o, input word_t aa, input word_t bb);
    u64 exp;
    op = opcode_t'(o); a = aa; b = bb;
    #1;
    // the ALU's operand a is the data field for the immediate opcodes
    exp = ref_result(o, aa, bb, aa);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h y=%h exp=%h", o, aa, bb, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      check(4'(o), 32'hFFFF_FFFF, 32'hFFFF_FFFF);
      check(4'(o), 32'h0, 32'h1);
      check(4'(o), 32'h8000_0000, 32'h8000_0000);
      for (int i = 0; i < 200; i++) check(4'(o), $urandom, $urandom);
    end
    // spot values worked out by hand
    op = OP_MUL; a = 32'hFFFF_FFFF; b = 32'h2; #1;
    checks++; if (y !== 64'h1_FFFF_FFFE) failures++;
    op = OP_ADD; a = 32'hFFFF_FFFF; b = 32'h1; #1;
    checks++; if (y !== 64'h1_0000_0000) failures++;
    op = OP_SUB; a = 32'h0; b = 32'h1; #1;
    checks++; if (y !== 64'h1_FFFF_FFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
