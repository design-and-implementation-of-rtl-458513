// tb_pipelined_processor: streams random instructions into the core, one per
// clock, and checks the result bus against the reference model with the
// core's latency: an instruction applied before edge k shows its result
// after edge k+2. Dependent back-to-back instructions are made frequent so
// both bypass paths are used; each bypass must be seen at least once.
module tb_pipelined_processor;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  localparam int N = 3000;
  logic clk = 0, reset_n = 0;
  logic [3:0] instr;
  reg_addr_t source1, source2, destination;
  word_t data;
  logic jump;
  result_t result;
  logic [3:0] bypass;
  int checks = 0, failures = 0;
  int byp_count [4];
  u32 regs [8];
  u64 expq [$];

  always #5 clk = ~clk;

  pipelined_processor dut (.*);

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (reset_n) for (int j = 0; j < 4; j++) if (bypass[j]) byp_count[j]++;

  initial begin
    logic [2:0] last_dst;
    for (int j = 0; j < 8; j++) regs[j] = 0;
    instr = 0; source1 = 0; source2 = 0; destination = 0; data = 0;
    repeat (2) @(posedge clk);
    #1 reset_n = 1;
    checks++; if (jump !== 1) failures++;
    last_dst = 0;
    for (int i = 0; i < N + 2; i++) begin
      if (i < N) begin
        instr = 4'($urandom);
        if (i < 16) instr = 4'b1001;          // start with loads
        source1 = 3'($urandom); source2 = 3'($urandom);
        destination = 3'($urandom); data = $urandom;
        if (i % 3 == 1) source1 = last_dst;
        if (i % 4 == 2) source2 = last_dst;
        last_dst = (instr == 4'b0010) ? source2 : destination;
        expq.push_back(ref_step(regs, instr, source1, source2, destination, data));
      end else begin
        instr = 0; data = 0;                  // drain with non-writing ops
      end
      @(posedge clk); #1;
      if (i >= 2) begin
        u64 exp;
        exp = expq.pop_front();
        checks++;
        if (result !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL instr#%0d result=%h exp=%h", i - 2, result, exp);
        end
      end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (byp_count[j] == 0) begin failures++; $display("bypass %0d never used", j); end
    end
    $display("bypass counts rf1=%0d rf2=%0d ex1=%0d ex2=%0d",
             byp_count[0], byp_count[1], byp_count[2], byp_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
