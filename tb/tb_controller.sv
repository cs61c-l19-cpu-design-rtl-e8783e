// tb_controller: self-checking test of the main control. For each of the
// six instructions, with Equal both 0 and 1, the control word is compared
// with the expected settings written out here as a table; an unknown opcode
// and an unknown funct must write nothing and not branch.
module tb_controller;
  import mips_lite_pkg::*;
  logic [5:0] op, funct;
  logic equal;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  controller dut (.op(op), .funct(funct), .equal(equal), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exp: {nPC_sel, RegWr, RegDst, ExtOp, ALUSrc, MemWr, MemtoReg}, ALUctr;
  // care_dst / care_ext mark fields that matter for this instruction
  task automatic expect_ctrl(string nm, logic [5:0] top, logic [5:0] tfn, logic teq,
                             logic npc, logic regwr, logic regdst, logic extop,
                             logic alusrc, aluctr_e aluctr, logic memwr, logic m2r,
                             logic care_dst, logic care_ext, logic care_alu);
    op = top; funct = tfn; equal = teq;
    #1;
    checks++;
    if (ctrl.nPC_sel !== npc || ctrl.RegWr !== regwr || ctrl.MemWr !== memwr ||
        (care_dst && ctrl.RegDst !== regdst) || (care_ext && ctrl.ExtOp !== extop) ||
        (care_alu && (ctrl.ALUSrc !== alusrc || ctrl.ALUctr !== aluctr)) ||
        (regwr && ctrl.MemtoReg !== m2r)) begin
      failures++;
      $display("FAIL %s eq=%b: got %p", nm, teq, ctrl);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      //          name    op      funct   eq       npc     wr dst ext src alu      mw m2r  cd ce ca
      expect_ctrl("ADDU", 6'h00, 6'h21, 1'(e), 1'b0,    1, 1, 0, 0, ALU_ADD, 0, 0,   1, 0, 1);
      expect_ctrl("SUBU", 6'h00, 6'h23, 1'(e), 1'b0,    1, 1, 0, 0, ALU_SUB, 0, 0,   1, 0, 1);
      expect_ctrl("ORI",  6'h0d, 6'h3f, 1'(e), 1'b0,    1, 0, 0, 1, ALU_OR,  0, 0,   1, 1, 1);
      expect_ctrl("LW",   6'h23, 6'h00, 1'(e), 1'b0,    1, 0, 1, 1, ALU_ADD, 0, 1,   1, 1, 1);
      expect_ctrl("SW",   6'h2b, 6'h00, 1'(e), 1'b0,    0, 0, 1, 1, ALU_ADD, 1, 0,   0, 1, 1);
      expect_ctrl("BEQ",  6'h04, 6'h00, 1'(e), 1'(e),   0, 0, 1, 0, ALU_SUB, 0, 0,   0, 0, 1);
      expect_ctrl("bad op",    6'h3e, 6'h21, 1'(e), 1'b0, 0, 0, 0, 0, ALU_ADD, 0, 0, 0, 0, 0);
      expect_ctrl("bad funct", 6'h00, 6'h20, 1'(e), 1'b0, 0, 0, 0, 0, ALU_ADD, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
