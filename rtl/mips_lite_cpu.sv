// mips_lite_cpu: a single-cycle processor for the MIPS-lite subset
// (ADDU, SUBU, ORI, LW, SW, BEQ).
//
// Every instruction completes in one long clock cycle: in that cycle the
// instruction is fetched at the PC, its register operands are read, the ALU
// executes, the data memory is read or written and the result is written
// back; the register file, the data memory and the PC all update on the same
// rising edge that ends the cycle. The datapath is the classic one:
//
//   fetch unit   PC, PC+4 adder, branch adder, nPC_sel mux, instruction memory
//   decode       Rs -> Ra, Rt -> Rb, RegDst mux picks Rd or Rt as Rw
//   execute      extender (ExtOp), ALUSrc mux (busB or immediate), ALU
//   memory       data memory addressed by the ALU result, Data In = busB
//   write back   MemtoReg mux picks the ALU result or the memory output
//
// and the controller derives every control point from opcode, funct and the
// ALU's Equal flag. Mux input numbering (RegDst: 1 = Rd; ALUSrc: 1 =
// immediate; MemtoReg: 1 = memory) follows the datapath drawings; memory
// depths, the reset PC of 0 and the observation outputs are this design's
// choices.
//
// Ports: clk, rst (synchronous, active high; the PC goes to 0). The rest are
// outputs that expose each cycle's architectural effects for observation:
// the PC and instruction, the register write (reg_we, reg_waddr,
// reg_wdata) and the data memory write (mem_we, mem_addr, mem_wdata).
// The memories hold no reset; the program is placed in the instruction
// memory before reset is released (or read from IMEM_INIT).
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter string       IMEM_INIT  = ""
) (
  input  logic              clk,
  input  logic              rst,
  output logic [XLEN-1:0]   pc,
  output logic [XLEN-1:0]   instr,
  output logic              reg_we,
  output logic [REG_AW-1:0] reg_waddr,
  output logic [XLEN-1:0]   reg_wdata,
  output logic              mem_we,
  output logic [XLEN-1:0]   mem_addr,
  output logic [XLEN-1:0]   mem_wdata
);

  rtype_t          f;
  ctrl_t           ctrl;
  logic [15:0]     imm16;
  logic [REG_AW-1:0] rw;
  logic [XLEN-1:0] busA, busB, busW, imm32, alu_b, alu_out, dmem_out;
  logic            equal;

  assign f     = rtype_t'(instr);
  assign imm16 = instr[15:0];

  ifetch_unit #(.IMEM_WORDS(IMEM_WORDS), .IMEM_INIT(IMEM_INIT)) u_ifu (
    .clk        (clk),
    .rst        (rst),
    .npc_sel    (ctrl.nPC_sel),
    .imm16      (imm16),
    .pc         (pc),
    .instruction(instr)
  );

  controller u_ctrl (
    .op   (f.op),
    .funct(f.funct),
    .equal(equal),
    .ctrl (ctrl)
  );

  mux2 #(.N(REG_AW)) u_regdst_mux (
    .a  (f.rt),
    .b  (f.rd),
    .sel(ctrl.RegDst),
    .y  (rw)
  );

  regfile u_rf (
    .clk   (clk),
    .reg_wr(ctrl.RegWr & ~rst),
    .rw    (rw),
    .ra    (f.rs),
    .rb    (f.rt),
    .busW  (busW),
    .busA  (busA),
    .busB  (busB)
  );

  extender u_ext (
    .imm16 (imm16),
    .ext_op(ctrl.ExtOp),
    .imm32 (imm32)
  );

  mux2 #(.N(XLEN)) u_alusrc_mux (
    .a  (busB),
    .b  (imm32),
    .sel(ctrl.ALUSrc),
    .y  (alu_b)
  );

  alu u_alu (
    .a      (busA),
    .b      (alu_b),
    .alu_ctr(ctrl.ALUctr),
    .result (alu_out),
    .equal  (equal)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .wr_en   (ctrl.MemWr & ~rst),
    .adr     (alu_out),
    .data_in (busB),
    .data_out(dmem_out)
  );

  mux2 #(.N(XLEN)) u_memtoreg_mux (
    .a  (alu_out),
    .b  (dmem_out),
    .sel(ctrl.MemtoReg),
    .y  (busW)
  );

  assign reg_we    = ctrl.RegWr & ~rst;
  assign reg_waddr = rw;
  assign reg_wdata = busW;
  assign mem_we    = ctrl.MemWr & ~rst;
  assign mem_addr  = alu_out;
  assign mem_wdata = busB;

endmodule
