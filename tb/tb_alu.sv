// tb_alu: self-checking test of the MIPS-lite ALU. For add, subtract and OR
// it compares the result with integer arithmetic, and checks that Equal is
// 1 exactly when the result is zero; with subtract this is the A == B test
// of BEQ, exercised with equal and unequal operand pairs.
module tb_alu;
  import mips_lite_pkg::*;
  logic [31:0] a, b, result, exp;
  aluctr_e ctr;
  logic equal;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .equal(equal));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input aluctr_e tc);
    a = ta; b = tb_; ctr = tc;
    #1;
    case (tc)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || equal !== (exp == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h got %h eq=%b exp %h", tc.name(), ta, tb_, result, equal, exp);
    end
  endtask

  initial begin
    logic [31:0] r;
    check_one(0, 0, ALU_OR);
    check_one(32'h1234_5678, 32'h1234_5678, ALU_SUB);
    check_one(32'h1234_5678, 32'h1234_5679, ALU_SUB);
    check_one(32'hffff_ffff, 1, ALU_ADD);
    check_one(32'h8000_0000, 32'h0000_ffff, ALU_OR);
    for (int i = 0; i < 3000; i++) begin
      r = $urandom;
      check_one(r, (i % 3 == 0) ? r : $urandom, aluctr_e'(i % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
