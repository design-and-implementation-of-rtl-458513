// tb_risc_top: end-to-end test of the whole system at its default size.
//
// Loads a full program (every word of both memories) through the load
// ports while reset is held, releases reset and checks the 64-bit result
// of every instruction against the reference model, in order, one per
// clock, with the system's latency of three edges from reset release to the
// first result. The program starts with register loads, then a directed
// part (every opcode, carry and borrow, a product wider than 32 bits,
// back-to-back and one-apart dependences, a MOVE feeding the next
// instruction) and random instructions after that. The run continues past
// the last word so the address sequencer wraps and re-executes the program
// on the evolved register state. Every mechanism is counted and must occur:
// all 16 opcodes, both operand forwards in the execute stage, both
// write-through reads in the register file, a carry, a borrow, a product
// above 32 bits and the address wrap.
module tb_risc_top;
  import risc_ref_pkg::*;

  localparam int DEPTH = 256;
  localparam int RUN   = DEPTH + 64;        // instructions executed

  logic clk = 0, reset_n = 0;
  logic imem_we = 0, dmem_we = 0;
  logic [7:0] imem_waddr, dmem_waddr, pc;
  logic [3:0] imem_wdata, bypass;
  logic [40:0] dmem_wdata;
  logic [63:0] result;
  logic jump;

  int checks = 0, failures = 0;
  int op_seen [16];
  int byp_count [4];
  int carries = 0, borrows = 0, wide_products = 0, wraps = 0;
  logic [3:0]  p_op  [DEPTH];
  logic [2:0]  p_s1  [DEPTH], p_s2 [DEPTH], p_ds [DEPTH];
  logic [31:0] p_d   [DEPTH];
  u32 regs [8];

  always #5 clk = ~clk;

  risc_top dut (.*);

  initial begin
    repeat (2 * DEPTH + RUN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (reset_n) begin
    for (int j = 0; j < 4; j++) if (bypass[j]) byp_count[j]++;
    if (pc == 8'(DEPTH - 1) && jump) wraps++;
  end

  task automatic put(int a, logic [3:0] op, int s1, int s2, int ds, logic [31:0] d);
    p_op[a] = op; p_s1[a] = 3'(s1); p_s2[a] = 3'(s2); p_ds[a] = 3'(ds); p_d[a] = d;
  endtask

  initial begin
    int a;
    // --- program ---------------------------------------------------------
    for (int r = 0; r < 8; r++) put(r, 4'h9, 0, 0, r, $urandom);   // load R0..R7
    a = 8;
    put(a++, 4'h9, 0, 0, 1, 32'hFFFF_FFF0);   // R1 = FFFFFFF0
    put(a++, 4'h9, 0, 0, 2, 32'h0000_0020);   // R2 = 20
    put(a++, 4'h3, 1, 2, 3, 0);               // R3 = R1+R2 (carry, both fwd/rf)
    put(a++, 4'h4, 2, 3, 4, 0);               // R4 = R2-R3 (borrow, ex fwd s2)
    put(a++, 4'h7, 1, 1, 5, 0);               // R5 = R1*R1 (wide product)
    put(a++, 4'h2, 5, 6, 0, 0);               // R6 = R5    (MOVE)
    put(a++, 4'hB, 6, 4, 7, 0);               // R7 = R6&R4 (uses MOVE result)
    put(a++, 4'h0, 0, 0, 0, 32'h1234_5678);   // result = data
    put(a++, 4'h1, 7, 0, 0, 0);               // result = R7
    put(a++, 4'h5, 0, 0, 1, 32'hFFFF_FFFF);   // R1 = data+1 (carry)
    put(a++, 4'h6, 0, 0, 2, 32'h0);           // R2 = data-1 (borrow)
    put(a++, 4'h8, 0, 0, 3, 0);               // R3 = 0
    put(a++, 4'hA, 2, 0, 4, 0);               // R4 = ~R2
    put(a++, 4'hC, 4, 3, 5, 0);               // R5 = R4|R3
    put(a++, 4'hD, 5, 4, 6, 0);               // R6 = ~(R5&R4)
    put(a++, 4'hE, 6, 5, 7, 0);               // R7 = ~(R6|R5)
    put(a++, 4'hF, 7, 1, 0, 0);               // R0 = R7^R1
    while (a < DEPTH) begin
      logic [2:0] prev;
      prev = (p_op[a-1] == 4'h2) ? p_s2[a-1] : p_ds[a-1];
      put(a, 4'($urandom), $urandom_range(0, 7), $urandom_range(0, 7),
          $urandom_range(0, 7), $urandom);
      if (a % 3 == 0) p_s1[a] = prev;
      if (a % 5 == 0) p_s2[a] = prev;
      a++;
    end
    // --- load through the write ports, reset held -------------------------
    for (int i = 0; i < DEPTH; i++) begin
      imem_we = 1; imem_waddr = 8'(i); imem_wdata = p_op[i];
      dmem_we = 1; dmem_waddr = 8'(i); dmem_wdata = {p_s1[i], p_s2[i], p_ds[i], p_d[i]};
      @(posedge clk); #1;
    end
    imem_we = 0; dmem_we = 0;
    checks++; if (jump !== 0 || pc !== 0) failures++;
    for (int j = 0; j < 8; j++) regs[j] = 0;
    // --- run ------------------------------------------------------------
    reset_n = 1;
    #1; checks++; if (jump !== 1) failures++;
    repeat (2) @(posedge clk);
    for (int n = 0; n < RUN; n++) begin
      int i; u64 exp;
      i = n % DEPTH;
      exp = ref_step(regs, p_op[i], p_s1[i], p_s2[i], p_ds[i], p_d[i]);
      op_seen[p_op[i]]++;
      if ((p_op[i] == 4'h3 || p_op[i] == 4'h5) && exp[32]) carries++;
      if ((p_op[i] == 4'h4 || p_op[i] == 4'h6) && exp[32]) borrows++;
      if (p_op[i] == 4'h7 && exp[63:32] != 0) wide_products++;
      @(posedge clk); #1;
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL instr#%0d op=%b result=%h exp=%h", n, p_op[i], result, exp);
      end
    end
    // --- mechanism coverage --------------------------------------------
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("opcode %b never executed", 4'(o)); end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (byp_count[j] == 0) begin failures++; $display("bypass %0d never used", j); end
    end
    checks++; if (carries == 0)       begin failures++; $display("no carry"); end
    checks++; if (borrows == 0)       begin failures++; $display("no borrow"); end
    checks++; if (wide_products == 0) begin failures++; $display("no wide product"); end
    checks++; if (wraps == 0)         begin failures++; $display("no address wrap"); end
    $display("bypass rf1=%0d rf2=%0d ex1=%0d ex2=%0d carries=%0d borrows=%0d wide=%0d wraps=%0d",
             byp_count[0], byp_count[1], byp_count[2], byp_count[3],
             carries, borrows, wide_products, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
