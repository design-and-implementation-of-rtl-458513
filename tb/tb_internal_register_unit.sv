// tb_internal_register_unit: random writes and reads against a model of
// eight registers. Checks the registered read latency, the write-through
// bypass when a read meets a write to the same register, and reset to zero.
module tb_internal_register_unit;
  import risc_pkg::*;

  logic clk = 0, reset_n = 0;
  reg_addr_t f_source1, f_source2, e_destination;
  word_t e_data, r_source1_data, r_source2_data;
  logic e_store, bypass_s1, bypass_s2;
  int checks = 0, failures = 0, bypasses = 0;
  logic [31:0] model [8];

  always #5 clk = ~clk;

  internal_register_unit dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_store = 1; e_destination = 3; e_data = 32'hDEAD; f_source1 = 3; f_source2 = 3;
    @(posedge clk); #1;
    reset_n = 1; e_store = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    for (int i = 0; i < 8; i++) begin
      f_source1 = 3'(i); f_source2 = 3'(7 - i);
      @(posedge clk); #1;
      checks++;
      if (r_source1_data !== 0 || r_source2_data !== 0) failures++;
    end
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] exp1, exp2;
      e_store = 1'($urandom_range(0, 1));
      e_destination = 3'($urandom); e_data = $urandom;
      f_source1 = 3'($urandom); f_source2 = 3'($urandom);
      if (i % 5 == 0) f_source1 = e_destination;
      if (i % 7 == 0) f_source2 = e_destination;
      exp1 = (e_store && f_source1 == e_destination) ? e_data : model[f_source1];
      exp2 = (e_store && f_source2 == e_destination) ? e_data : model[f_source2];
      if (e_store && (f_source1 == e_destination || f_source2 == e_destination)) bypasses++;
      if (e_store) model[e_destination] = e_data;
      @(posedge clk); #1;
      checks++;
      if (r_source1_data !== exp1 || r_source2_data !== exp2) begin
        failures++;
        $display("FAIL i=%0d r1=%h exp %h r2=%h exp %h", i, r_source1_data, exp1, r_source2_data, exp2);
      end
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("write-through bypasses: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
