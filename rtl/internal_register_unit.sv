// internal_register_unit: the eight 32-bit general-purpose registers.
//
// Two read ports are addressed by the fetch stage's f_source1/f_source2 and
// are registered, so r_source1_data/r_source2_data are valid one clock later,
// aligned with the decode stage's d_* outputs at the execute unit. One write
// port takes the execute unit's e_data/e_destination/e_store and writes on
// the rising edge. When a read addresses the register being written in the
// same cycle, the read returns the new value (write-through bypass): this is
// how an instruction two places behind a producer sees its result. The
// register count and width, and the e_*/r_* signal names, follow the
// original design; the registered read, the
// bypass and the reset-to-zero of all registers are this design's choices.
module internal_register_unit
  import risc_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic      clk,
  input  logic      reset_n,
  input  reg_addr_t f_source1,
  input  reg_addr_t f_source2,
  input  word_t     e_data,
  input  reg_addr_t e_destination,
  input  logic      e_store,
  output word_t     r_source1_data,
  output word_t     r_source2_data,
  output logic      bypass_s1,      // write-through used on port 1 this cycle
  output logic      bypass_s2       // write-through used on port 2 this cycle
);

  word_t regs [N];

  always_comb begin
    bypass_s1 = e_store && (e_destination == f_source1);
    bypass_s2 = e_store && (e_destination == f_source2);
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
      r_source1_data <= '0;
      r_source2_data <= '0;
    end else begin
      if (e_store) regs[e_destination] <= e_data;
      r_source1_data <= bypass_s1 ? e_data : regs[f_source1];
      r_source2_data <= bypass_s2 ? e_data : regs[f_source2];
    end
  end

  // A write must name one of the N registers.
  a_dest_in_range: assert property (@(posedge clk) disable iff (!reset_n)
                                    e_store |-> (int'(e_destination) < N));

endmodule
