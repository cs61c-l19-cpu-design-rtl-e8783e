// mips_lite_pkg: types and constants shared by the single-cycle MIPS-lite
// processor.
//
// The processor runs six instructions: ADDU and SUBU (R-type), ORI, LW, SW
// and BEQ (I-type). The field layout below (op 31:26, rs 25:21, rt 20:16,
// rd 15:11, shamt 10:6, funct 5:0, imm16 15:0) is the MIPS format. The
// opcode and funct values are the standard MIPS ones. The ALUctr encoding
// and the layout of the control word are this design's own choices.
package mips_lite_pkg;

  localparam int unsigned XLEN     = 32;  // data path and instruction width
  localparam int unsigned NREGS    = 32;  // general purpose registers
  localparam int unsigned REG_AW   = 5;   // register specifier width

  // Primary opcodes (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // funct field (bits 5:0) of the R-type instructions
  typedef enum logic [5:0] {
    FN_ADDU = 6'h21,
    FN_SUBU = 6'h23
  } funct_e;

  // ALU operation select
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } aluctr_e;

  // Decoded instruction fields
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } rtype_t;

  // Control points of the datapath
  typedef struct packed {
    logic    nPC_sel;   // 1: PC <- PC+4+SignExt(imm16)*4
    logic    RegWr;     // register file write enable
    logic    RegDst;    // 1: write Rd, 0: write Rt
    logic    ExtOp;     // 1: sign extend imm16, 0: zero extend
    logic    ALUSrc;    // 1: ALU B input is the extended immediate, 0: busB
    aluctr_e ALUctr;    // ALU operation
    logic    MemWr;     // data memory write enable
    logic    MemtoReg;  // 1: write back the memory output, 0: the ALU result
  } ctrl_t;

endpackage
