// ifetch_unit: program counter, next address logic and instruction memory.
//
// Every cycle the unit reads the instruction at the PC and, on the rising
// edge of clk, loads the PC with the next address. One adder forms PC+4;
// a second adder adds to PC+4 the 16-bit branch offset, sign extended and
// shifted left by two (the offset counts words). nPC_sel picks the result:
// 0 gives PC+4 (sequential code), 1 the branch target
// PC+4+SignExt(imm16)*4. The PC is written every cycle; the reset to
// RESET_PC (0) is this design's choice.
//
// Ports: clk, rst (synchronous, active high), npc_sel, imm16 (the offset
// field of the current instruction), pc and instruction (32 bits).
module ifetch_unit
  import mips_lite_pkg::*;
#(
  parameter int unsigned     IMEM_WORDS = 1024,
  parameter string           IMEM_INIT  = "",
  parameter logic [XLEN-1:0] RESET_PC   = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            npc_sel,
  input  logic [15:0]     imm16,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] instruction
);

  logic [XLEN-1:0] pc_plus4, pc_branch, pc_next, pc_ext;
  logic            unused_c4, unused_cb;

  register_en #(.N(XLEN), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk),
    .rst(rst),
    .we (1'b1),
    .d  (pc_next),
    .q  (pc)
  );

  // sequential address
  adder #(.N(XLEN)) u_add4 (
    .a   (pc),
    .b   (XLEN'(4)),
    .cin (1'b0),
    .sum (pc_plus4),
    .cout(unused_c4)
  );

  // branch offset: sign extended word offset, shifted to a byte offset
  assign pc_ext = {{(XLEN-18){imm16[15]}}, imm16, 2'b00};

  adder #(.N(XLEN)) u_add_br (
    .a   (pc_plus4),
    .b   (pc_ext),
    .cin (1'b0),
    .sum (pc_branch),
    .cout(unused_cb)
  );

  mux2 #(.N(XLEN)) u_npc_mux (
    .a  (pc_plus4),
    .b  (pc_branch),
    .sel(npc_sel),
    .y  (pc_next)
  );

  inst_memory #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .adr        (pc),
    .instruction(instruction)
  );

endmodule
