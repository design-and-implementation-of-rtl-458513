// tb_fetch_unit: checks that the fetch registers capture all five fields
// with one clock of latency and clear on reset.
module tb_fetch_unit;
  import risc_pkg::*;

  logic clk = 0, reset_n = 0;
  opcode_t instr, f_instr;
  reg_addr_t source1, source2, destination, f_source1, f_source2, f_destination;
  word_t data, f_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fetch_unit dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = opcode_t'(4'hF); source1 = 3'h7; source2 = 3'h7; destination = 3'h7; data = '1;
    @(posedge clk); #1;
    checks++;
    if ({f_instr, f_source1, f_source2, f_destination, f_data} !== '0) failures++;
    reset_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [44:0] v;
      v = {4'($urandom), 3'($urandom), 3'($urandom), 3'($urandom), 32'($urandom)};
      {instr, source1, source2, destination, data} = v;
      @(posedge clk); #1;
      // change the inputs after the edge: outputs must hold the captured value
      {instr, source1, source2, destination, data} = ~v;
      #1;
      checks++;
      if ({f_instr, f_source1, f_source2, f_destination, f_data} !== v) begin
        failures++;
        $display("FAIL %h got %h", v, {f_instr, f_source1, f_source2, f_destination, f_data});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
