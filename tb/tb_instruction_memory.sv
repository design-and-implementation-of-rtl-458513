// tb_instruction_memory: loads a program through the write port, then
// checks that the sequencer starts at 0 after reset, steps only while jump
// is high, presents the stored opcode and wraps after the last word.
module tb_instruction_memory;
  localparam int DEPTH = 16;
  logic clk = 0, reset_n = 0, jump = 0, we = 0;
  logic [3:0] waddr, wdata, instr, addr;
  logic [3:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instruction_memory #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_addr;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 4'($urandom);
      we = 1; waddr = 4'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    @(posedge clk); #1;
    checks++; if (addr !== 0 || instr !== model[0]) failures++;
    reset_n = 1;
    exp_addr = 0;
    for (int i = 0; i < 200; i++) begin
      jump = (i % 4 != 3);
      @(posedge clk); #1;
      if (jump) exp_addr = (exp_addr + 1) % DEPTH;
      checks++;
      if (addr !== 4'(exp_addr) || instr !== model[exp_addr]) begin
        failures++;
        $display("FAIL i=%0d addr=%0d exp=%0d", i, addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
