// controller: main control of the single-cycle MIPS-lite processor.
//
// Purely combinational: it looks only at the opcode, the funct field and
// the ALU's Equal flag and sets every control point of the datapath for the
// whole cycle.
//
//   instr  RegDst RegWr ExtOp ALUSrc ALUctr MemWr MemtoReg nPC_sel
//   ADDU     1     1     0     0     add     0      0        0
//   SUBU     1     1     0     0     sub     0      0        0
//   ORI      0     1     0     1     or      0      0        0
//   LW       0     1     1     1     add     0      1        0
//   SW       0     0     1     1     add     1      0        0
//   BEQ      0     0     1     0     sub     0      0      Equal
//
// The settings follow from the register transfer of each instruction; the
// values of the don't-care entries, and the treatment of any other opcode
// or funct as a no-op that writes nothing and falls through to PC+4, are
// this design's choices.
//
// Ports: op, funct (6 bits each), equal, ctrl (all control points).
module controller
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{nPC_sel: 1'b0, RegWr: 1'b0, RegDst: 1'b0, ExtOp: 1'b0,
             ALUSrc: 1'b0, ALUctr: ALU_ADD, MemWr: 1'b0, MemtoReg: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        ctrl.RegDst = 1'b1;
        unique case (funct)
          FN_ADDU: begin ctrl.RegWr = 1'b1; ctrl.ALUctr = ALU_ADD; end
          FN_SUBU: begin ctrl.RegWr = 1'b1; ctrl.ALUctr = ALU_SUB; end
          default: ;
        endcase
      end
      OP_ORI: begin
        ctrl.RegWr  = 1'b1;
        ctrl.ALUSrc = 1'b1;
        ctrl.ALUctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.RegWr    = 1'b1;
        ctrl.ExtOp    = 1'b1;
        ctrl.ALUSrc   = 1'b1;
        ctrl.MemtoReg = 1'b1;
      end
      OP_SW: begin
        ctrl.ExtOp  = 1'b1;
        ctrl.ALUSrc = 1'b1;
        ctrl.MemWr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ExtOp   = 1'b1;
        ctrl.ALUctr  = ALU_SUB;
        ctrl.nPC_sel = equal;
      end
      default: ;
    endcase
  end

endmodule
