# MIPS-lite single-cycle processor

This is a processor in which every instruction takes exactly one clock cycle.
During that one long cycle the instruction is fetched, its registers are read,
the ALU computes, the data memory is accessed and the result is written back.
The register file, the data memory and the program counter all change on the
rising edge that ends the cycle. The cycle has to be as long as the slowest
instruction, a load, whose path runs through both memories, the register file
and the ALU.

It runs a six-instruction subset of MIPS, which is enough to show every part of
a processor's datapath:

| instruction        | effect                                             | next PC                          |
|--------------------|----------------------------------------------------|----------------------------------|
| `addu rd,rs,rt`    | R[rd] = R[rs] + R[rt]                              | PC+4                             |
| `subu rd,rs,rt`    | R[rd] = R[rs] - R[rt]                              | PC+4                             |
| `ori  rt,rs,imm16` | R[rt] = R[rs] \| ZeroExt(imm16)                    | PC+4                             |
| `lw   rt,imm16(rs)`| R[rt] = MEM[R[rs] + SignExt(imm16)]                | PC+4                             |
| `sw   rt,imm16(rs)`| MEM[R[rs] + SignExt(imm16)] = R[rt]                | PC+4                             |
| `beq  rs,rt,imm16` | none                                               | R[rs]==R[rt] ? PC+4+SignExt(imm16)*4 : PC+4 |

Instructions use the MIPS R format (op 31:26, rs 25:21, rt 20:16, rd 15:11,
shamt 10:6, funct 5:0) and I format (op, rs, rt, imm16 in bits 15:0).
Encodings are the standard MIPS ones: R-type op `0x00` with funct `0x21` (ADDU)
or `0x23` (SUBU), ORI `0x0d`, LW `0x23`, SW `0x2b`, BEQ `0x04`.

## Datapath

```
           +-----------------------------------------------+
           |  ifetch_unit                                  |
           |   PC --+--> inst_memory --> instruction ------+--> op, funct --> controller
           |        +--> +4 --+--------------+             |                   ^  |
           |                  +--> + <-- SignExt(imm16)<<2 |                   |  | control
           |                  nPC_sel mux --> PC           |                   |  | points
           +-----------------------------------------------+                 Equal
   rs -> Ra, rt -> Rb,  RegDst mux: rd/rt -> Rw                               |
   regfile busA ---------------------------------> alu A                     |
   regfile busB --+--> ALUSrc mux --------------> alu B  --> result ---------+
                  |    (busB / extender(imm16, ExtOp))        |
                  +-----------------------> data_memory Data In, Adr = result
   MemtoReg mux (result / memory output) --> busW --> regfile
```

The same hardware serves all six instructions; only the control points
change:

| instr | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|:------:|:-----:|:-----:|:------:|:------:|:-----:|:--------:|:-------:|
| ADDU  | 1 (rd) | 1 | -          | 0 (busB) | add | 0 | 0 (ALU) | 0 |
| SUBU  | 1 (rd) | 1 | -          | 0 (busB) | sub | 0 | 0 (ALU) | 0 |
| ORI   | 0 (rt) | 1 | 0 (zero)   | 1 (imm)  | or  | 0 | 0 (ALU) | 0 |
| LW    | 0 (rt) | 1 | 1 (sign)   | 1 (imm)  | add | 0 | 1 (mem) | 0 |
| SW    | -      | 0 | 1 (sign)   | 1 (imm)  | add | 1 | -       | 0 |
| BEQ   | -      | 0 | -          | 0 (busB) | sub | 0 | -       | Equal |

A dash is a don't-care. The RTL sets each one to 0, except that R-type decoding
sets RegDst = 1 even for an unknown funct.

Some points need care:

* **Which register is written.** R-type instructions name their destination
  in `rd`, but I-type instructions put it in `rt`. Since `rt` is also the
  second source field, the register file always reads `rt` on busB. The RegDst
  mux picks only the write address.
* **Branch comparison.** BEQ does not need a comparator of its own. The
  controller sets the ALU to subtract, and the ALU's `equal` output reports a
  zero result. The controller turns that into `nPC_sel` in the same cycle. So
  the controller looks only at opcode, funct and Equal.
* **Branch target.** The offset counts words. It is sign extended, shifted
  left by two and added to PC+4, not to PC. A dedicated adder does this in
  the fetch unit, in parallel with the ALU.
* **Timing within the cycle.** Both memories and the register file read
  combinationally: an address on the input gives data after an access time,
  with no clock involved. Only writes use the clock. So a value written in one
  cycle can be read back in the next, and nothing inside the cycle has to be
  forwarded.

## Modules

| file | role |
|------|------|
| `mips_lite_pkg.sv` | widths, opcode/funct enums, `aluctr_e`, the `ctrl_t` control word |
| `mips_lite_cpu.sv` | top: wires the fetch unit, controller, register file, extender, ALU and data memory |
| `controller.sv` | combinational decode of op/funct/Equal into `ctrl_t` (table above) |
| `ifetch_unit.sv` | PC register, PC+4 adder, branch adder, nPC_sel mux, instruction memory |
| `inst_memory.sv` | read-only, combinational-read instruction store (1024 words) |
| `data_memory.sv` | combinational read, clocked write data memory (1024 words) |
| `regfile.sv` | 32 x 32 register file, two read ports and one write port, r0 = 0 |
| `register_en.sv` | N-bit register with write enable and synchronous reset (used for the PC) |
| `alu.sv` | add / sub / or plus the `equal` (result == 0) flag |
| `addsub.sv`, `full_adder.sv` | ripple adder-subtractor: N full adders, with XOR gates on B acting as a conditional inverter |
| `adder.sv`, `mux2.sv`, `extender.sv` | the combinational building blocks |

The ALU subtracts the classic way: `addsub` XORs every B bit with the `sub`
line and feeds `sub` in as the carry into bit 0, giving A + ~B + 1.

## Interface of the top

`mips_lite_cpu #(IMEM_WORDS=1024, DMEM_WORDS=1024, IMEM_INIT="")`

* `clk` is the clock. `rst` is a synchronous, active-high reset: it sets the PC
  to 0 and blocks register and memory writes while it is asserted.
* The outputs are for observation. Each cycle they show the PC and instruction,
  the register write (`reg_we`, `reg_waddr`, `reg_wdata`) and the memory write
  (`mem_we`, `mem_addr`, `mem_wdata`) that happen at the end of that cycle.
* Memories use byte addresses of 32-bit words. Bits 1:0 are ignored and
  bits 11:2 pick the word, so higher address bits wrap around. Only whole-word
  loads and stores exist.
* The program goes into the instruction memory before reset is released.
  `IMEM_INIT` can name a `$readmemh` file with one word per line. Otherwise
  the environment writes the array `u_ifu.u_imem.mem` directly, as the
  testbench does. Registers 1 to 31 and the data memory have no reset.

## How far it can be trusted, and where it goes beyond the source

The datapath, the instruction semantics and the single-cycle timing follow the
original design closely. The following are this implementation's own choices:

* the opcode and funct values (standard MIPS), and the `ALUctr` encoding
  (add = 0, sub = 1, or = 2);
* the control table above. The original design names the control points but
  leaves their settings to be derived, and they were derived from each
  instruction's register transfer;
* unknown opcodes and funct codes act as no-ops;
* register 0 reads as zero and ignores writes, as in MIPS;
* the 1024-word size of each memory, the synchronous reset to PC = 0, and the
  observation ports;
* the PC register is written every cycle. There is no stall or PC write enable.

Left out on purpose: the multi-cycle and pipelined variants, `jal` and other
jumps, and the AND and set-less-than ALU operations of the full MIPS ALU. The
design does not define shamt and ignores it. There is no overflow trap.

In synthesis the instruction memory has no contents unless `IMEM_INIT` is
given, so a synthesis tool may treat the fetched instruction as constant.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_lite_pkg.sv \
    tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, changing the top module name.

`tb_mips_lite_cpu` runs the whole processor at its default sizes. It assembles
a program of three parts:

* a loop that stores a 12-element array;
* a loop that loads the array back with a negative offset, sums it and stores
  the sum;
* 300 random instructions with forward branches, ending in a
  `beq $0,$0,-1` halt loop.

An instruction-level model in the testbench runs the same program. Every cycle
the test compares the processor's PC, register write and memory write with the
model, which also checks the one-instruction-per-cycle timing. At the end it
compares the sum and the whole register file.

The test also counts how often each of these happened, and fails if any never
did:

* each instruction type;
* taken, not-taken and backward branches;
* loads of previously stored data;
* negative offsets;
* zero-extended immediates with bit 15 set;
* a write to r0.

A run takes about 460 cycles and well under a second.

The unit testbenches cover:

* the extender: exhaustively, every 16-bit immediate in both modes;
* the adders and the ALU: with random operands;
* the register file, the memories and the register: against model arrays;
* the fetch unit: with random branch offsets;
* the controller: against the table above.
