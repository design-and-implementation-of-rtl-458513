// tb_single_load: the single-instruction run used to demonstrate the
// pipeline: one LOAD (opcode 1001) with register fields 000 and a 32-bit
// immediate, stepped through fetch, decode, execute and write-back of the
// full system. It checks the stage registers at each edge after reset
// release, the 64-bit result, and that register 0 holds the value after the
// write-back edge (read back by a following READ_REG, opcode 0001).
module tb_single_load;
  logic clk = 0, reset_n = 0;
  logic imem_we = 0, dmem_we = 0;
  logic [7:0] imem_waddr = 0, dmem_waddr = 0, pc;
  logic [3:0] imem_wdata = 0, bypass;
  logic [40:0] dmem_wdata = 0;
  logic [63:0] result;
  logic jump;
  int checks = 0, failures = 0;
  localparam logic [31:0] VALUE = 32'h5EED_C0DE;

  always #5 clk = ~clk;

  risc_top dut (.*);

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // word 0: LOAD R0 <= VALUE; word 1: READ_REG R0; rest: READ_DATA 0
    for (int i = 0; i < 256; i++) begin
      imem_we = 1; imem_waddr = 8'(i);
      imem_wdata = (i == 0) ? 4'b1001 : (i == 1) ? 4'b0001 : 4'b0000;
      dmem_we = 1; dmem_waddr = 8'(i);
      dmem_wdata = (i == 0) ? {9'b000_000_000, VALUE} : '0;
      @(posedge clk); #1;
    end
    imem_we = 0; dmem_we = 0;
    reset_n = 1;
    @(posedge clk); #1;   // edge 1: fetch
    expect_true(dut.u_cpu.f_instr == 4'b1001 && dut.u_cpu.f_data == VALUE, "fetch");
    expect_true(pc == 1, "address stepped");
    @(posedge clk); #1;   // edge 2: decode
    expect_true(dut.u_cpu.d_instr == 4'b1001 && dut.u_cpu.d_destination == 0 &&
                dut.u_cpu.d_data == VALUE, "decode");
    @(posedge clk); #1;   // edge 3: execute
    expect_true(result == {32'h0, VALUE}, "result of LOAD");
    expect_true(dut.u_cpu.e_store && dut.u_cpu.e_data == VALUE, "write-back request");
    @(posedge clk); #1;   // edge 4: write-back; READ_REG executes with forwarding
    expect_true(dut.u_cpu.u_regs.regs[0] == VALUE, "R0 written");
    expect_true(result == {32'h0, VALUE}, "READ_REG returns R0");
    @(posedge clk); #1;
    expect_true(result == 64'h0, "READ_DATA 0 after");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
