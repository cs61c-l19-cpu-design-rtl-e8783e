// tb_extender: exhaustive self-checking test of the immediate extender:
// every 16-bit immediate, with sign extension (ExtOp=1) and zero extension
// (ExtOp=0), compared with SystemVerilog's own signed/unsigned widening.
module tb_extender;
  logic [15:0] imm16;
  logic ext_op;
  logic [31:0] imm32, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++) begin
      for (int v = 0; v < 65536; v++) begin
        imm16 = 16'(v); ext_op = 1'(op);
        #1;
        exp = op ? 32'(signed'(imm16)) : 32'(imm16);
        checks++;
        if (imm32 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h op=%0d got %h exp %h", imm16, op, imm32, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
