// tb_decode_unit: checks the one-clock decode register, the write-back
// register remapping for MOVE and the reset state.
module tb_decode_unit;
  import risc_pkg::*;

  logic clk = 0, reset_n = 0;
  opcode_t f_instr, d_instr;
  reg_addr_t f_source1, f_source2, f_destination, d_source1, d_source2, d_destination;
  word_t f_data, d_data;
  int checks = 0, failures = 0, moves = 0;

  always #5 clk = ~clk;

  decode_unit dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_instr = OP_XOR; f_source1 = 1; f_source2 = 2; f_destination = 3; f_data = 5;
    @(posedge clk); #1;
    checks++;
    if (d_instr !== OP_READ_DATA || d_destination !== 0 || d_data !== 0) failures++;
    reset_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [3:0] o; logic [2:0] s1, s2, ds; logic [31:0] dd; logic [2:0] exp_dst;
      o = 4'($urandom); s1 = 3'($urandom); s2 = 3'($urandom); ds = 3'($urandom); dd = $urandom;
      if (i % 4 == 0) o = 4'b0010;
      f_instr = opcode_t'(o); f_source1 = s1; f_source2 = s2; f_destination = ds; f_data = dd;
      exp_dst = (o == 4'b0010) ? s2 : ds;
      if (o == 4'b0010) moves++;
      @(posedge clk); #1;
      checks++;
      if (d_instr !== o || d_source1 !== s1 || d_source2 !== s2 ||
          d_destination !== exp_dst || d_data !== dd) begin
        failures++;
        $display("FAIL op=%b s1=%0d s2=%0d ds=%0d: got dst=%0d", o, s1, s2, ds, d_destination);
      end
    end
    checks++;
    if (moves == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
