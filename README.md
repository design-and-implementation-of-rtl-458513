# 32-bit four-stage pipelined RISC processor

A small 32-bit RISC core with sixteen instructions, eight 32-bit registers and a
64-bit result bus, built as a Harvard system: one memory holds the 4-bit opcode
of each instruction and a second memory holds that instruction's operand fields
(two source registers, a destination register and a 32-bit immediate). The core
is a four-stage pipeline (fetch, decode with register read, execute, register
write-back) that accepts one instruction and completes one instruction every
clock, with no stall. It targets small FPGAs: the original implementation ran
at 12 MHz on a Spartan-3E XC3S250E.

## System structure

```
   +--------------------+   instr[3:0]          +----------------------------+
   | instruction_memory |---------------------->|                            |
   |   (sequencer)      |<------- jump ---------|    pipelined_processor     |---> result[63:0]
   +--------------------+                       |                            |
             | shared address                   |  fetch -> decode ------+   |
             v                                  |    |                   v   |
   +--------------------+   source1, source2,   |    +-> register --> execute|
   |    data_memory     |-- destination, data ->|        unit  <-----+       |
   +--------------------+                       |        (write-back)        |
                                                +----------------------------+
```

`risc_top` contains the two memories and the core. Both memories share one
address, produced by a sequencer inside `instruction_memory`, so word *i* of
the instruction memory and word *i* of the data memory together form
instruction *i*. The core has no program counter and no branch instruction:
programs run straight through, and the sequencer wraps to address 0 after the
last word. The core's `jump` output tells the sequencer to step. Because the
core never stalls, `jump` is high in every cycle out of reset.

Programs are loaded through the memories' write ports (`imem_we/waddr/wdata`
and `dmem_we/waddr/wdata` on `risc_top`) while `reset_n` is low. A data-memory
word is 41 bits: `{source1[2:0], source2[2:0], destination[2:0], data[31:0]}`.

## Instruction set

| opcode | mnemonic (this RTL) | effect | `result` |
|---|---|---|---|
| 0000 | `OP_READ_DATA` | none (no register write) | `data` |
| 0001 | `OP_READ_REG`  | none (no register write) | `R[s1]` |
| 0010 | `OP_MOVE`  | `R[s2] = R[s1]` | `R[s1]` |
| 0011 | `OP_ADD`   | `R[d] = R[s1] + R[s2]` | sum, carry in bit 32 |
| 0100 | `OP_SUB`   | `R[d] = R[s1] - R[s2]` | difference, borrow in bit 32 |
| 0101 | `OP_INC`   | `R[d] = data + 1` | sum, carry in bit 32 |
| 0110 | `OP_DEC`   | `R[d] = data - 1` | difference, borrow in bit 32 |
| 0111 | `OP_MUL`   | `R[d] = low 32 bits of R[s1] * R[s2]` | full 64-bit product |
| 1000 | `OP_CLEAR` | `R[d] = 0` | 0 |
| 1001 | `OP_LOAD`  | `R[d] = data` | `data` |
| 1010 | `OP_NOT`   | `R[d] = ~R[s1]` | same, zero-extended |
| 1011 | `OP_AND`   | `R[d] = R[s1] & R[s2]` | same, zero-extended |
| 1100 | `OP_OR`    | `R[d] = R[s1] \| R[s2]` | same, zero-extended |
| 1101 | `OP_NAND`  | `R[d] = ~(R[s1] & R[s2])` | same, zero-extended |
| 1110 | `OP_NOR`   | `R[d] = ~(R[s1] \| R[s2])` | same, zero-extended |
| 1111 | `OP_XOR`   | `R[d] = R[s1] ^ R[s2]` | same, zero-extended |

The register written back is always the low 32 bits of `result`. There are no
flags, no division, no floating point and no load/store to the data memory.
The opcode list is the original design's. The rest is this implementation's
reading of it:
- the carry and borrow in bit 32;
- NOT using only `source1`, although the original wording names two sources;
- increment and decrement working on the immediate `data` field, not on a
  register.

## Pipeline and timing

| edge after the instruction reaches the core | what happens |
|---|---|
| k   | **fetch**: `instr`, `source1`, `source2`, `destination`, `data` are registered as `f_*` |
| k+1 | **decode**: `f_*` are registered as `d_*`. MOVE has its write-back register changed to `source2`. In parallel, the **internal register unit** reads `R[f_source1]` and `R[f_source2]` into `r_source1_data`/`r_source2_data` |
| k+2 | **execute**: the ALU result is registered onto `result` and, as `e_data`/`e_destination`/`e_store`, sent back to the register unit |
| k+3 | **write-back**: the register unit stores `e_data` |

In `risc_top`, the instruction at address 0 is fetched on the first rising
edge with `reset_n` high. Its result is on `result` after the third edge, and
one new result follows on every edge after that.

### Why there are two bypasses

An instruction's registers are read two edges before the instruction ahead of
it has written its result. The core covers both gaps without stalling:

1. **Execute-stage forwarding** (`execute_unit`). If the instruction in
   execute names, as a source, the register that the previous instruction is
   writing (`e_store` and `e_destination` match), the operand is taken from
   `e_data` and the value read from the register file is ignored.
2. **Register-file write-through** (`internal_register_unit`). If a read
   address equals the register being written in the same cycle, the read
   returns the data being written. This serves the instruction two places
   behind the producer.

An instruction three or more places behind reads the register file normally.
Forwarding takes priority over the register-file value because it is the
newer one. Both bypasses are reported on the `bypass` output of the core and
of `risc_top` (bits: execute source 2, execute source 1, register-file port 2,
register-file port 1). That output is for observation only.

## Reset

`reset_n` is active low and synchronous, and it reaches every unit. It:
- clears all eight registers;
- fills the pipeline with opcode 0000 with `data` = 0, which writes no
  register;
- returns the sequencer to address 0;
- holds `jump` low.

The memory contents are not reset.

## Modules

| file | role |
|---|---|
| `rtl/risc_pkg.sv` | widths, `opcode_t`, the operand-word struct, helper functions |
| `rtl/risc_top.sv` | system top: memories plus core |
| `rtl/instruction_memory.sv` | opcode store with address sequencer and load port |
| `rtl/data_memory.sv` | operand-field store with load port |
| `rtl/pipelined_processor.sv` | the core: four units wired together |
| `rtl/fetch_unit.sv`, `rtl/decode_unit.sv`, `rtl/execute_unit.sv`, `rtl/internal_register_unit.sv` | the pipeline units |
| `rtl/alu.sv` | 32-bit ALU with 64-bit output |

Parameters: `DEPTH` (words per memory, default 256) on `risc_top` and both
memories, and `N` (registers, default 8) on `internal_register_unit`. The
register address is fixed at 3 bits, so `N` should stay 8.

## Where this RTL is its own design

The original design fixes the following:
- the block structure (three top blocks, four pipeline units);
- the names of the signals between them;
- the opcode table, the field widths and the 64-bit result;
- one instruction per clock.

It does not give the following, which were chosen here:
- memory depth, read timing, word layout and the way programs are loaded;
- the shared address sequencer and the meaning of `jump`. The original shows
  `jump` going from the core to the instruction memory but never defines it;
- the registered register-file read and the two bypass paths;
- the immediate path. The original also draws the fetched `data` going straight
  into the register unit. Here immediates reach a register only through the
  execute stage, so that connection is not built;
- carry and borrow in bit 32, and the one-operand NOT;
- the reset behaviour.

One figure does not carry over. The original's FPGA resource report lists a
single 18x18 hardware multiplier. That is too small for a full 32x32 product in
one cycle, and the original does not say how its multiply was built. This RTL
computes the full 64-bit product in the execute stage, so on a Spartan-3E it
would take more multiplier blocks, or a longer clock period, than that report
shows.

The board-level parts of the original system are not part of this RTL:
- a character-LCD driver that showed results;
- DIP switches used as inputs;
- the FPGA board itself.

Their behaviour was not specified in enough detail to write.

## Simulation

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/risc_ref_pkg.sv` is an instruction-level reference model that the
testbenches share. It was written separately from the RTL.

`tb_risc_top` is the end-to-end test at full size (DEPTH = 256). It loads both
memories completely and runs 320 instructions, which includes wrapping past
the end of the program. It checks every result against the model. It also
requires that each of the following happens at least once:
- all 16 opcodes;
- each of the four bypass cases;
- a carry and a borrow;
- a product wider than 32 bits;
- the address wrap.

`tb_single_load` steps a single LOAD instruction through the full system. It
checks the fetch, decode, execute and write-back registers one edge at a time.

To run the end-to-end test with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/risc_ref_pkg.sv tb/tb_risc_top.sv --top-module tb_risc_top
./obj_dir/Vtb_risc_top
```

Replace `tb_risc_top` with `tb_<module>` to run another unit's testbench.
