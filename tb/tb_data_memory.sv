// tb_data_memory: fills the memory with random operand words and reads
// every address back field by field.
module tb_data_memory;
  import risc_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, we = 0;
  logic [4:0] waddr, addr;
  operands_t wdata;
  reg_addr_t source1, source2, destination;
  word_t data;
  logic [40:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_memory #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = {9'($urandom), 32'($urandom)};
      we = 1; waddr = 5'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < DEPTH; i++) begin
        addr = 5'((i * 7 + r) % DEPTH); #1;
        checks++;
        if ({source1, source2, destination, data} !== model[addr]) begin
          failures++;
          $display("FAIL addr=%0d", addr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
