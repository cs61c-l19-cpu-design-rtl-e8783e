// tb_ifetch_unit: self-checking test of the instruction fetch unit.
// The instruction memory is filled with a pattern. After reset the PC must
// be 0; then each cycle nPC_sel and a random branch offset are driven and
// the next PC is compared with a model: PC+4 when nPC_sel = 0 and
// PC+4+SignExt(imm16)*4 when it is 1. The fetched word must match the
// pattern at the PC. One instruction address is taken per clock.
module tb_ifetch_unit;
  localparam int WORDS = 1024;
  logic clk = 0, rst, npc_sel;
  logic [15:0] imm16;
  logic [31:0] pc, instruction, model_pc;
  int checks = 0, failures = 0;
  int taken = 0;

  ifetch_unit dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .imm16(imm16),
                   .pc(pc), .instruction(instruction));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'hC0DE_0000 ^ (32'(i) * 32'h0001_0003);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (pc !== model_pc || instruction !== pattern(int'(model_pc[11:2]))) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h exp %h instr=%h", pc, model_pc, instruction);
    end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) dut.u_imem.mem[i] = pattern(i);
    rst = 1; npc_sel = 0; imm16 = 0;
    @(posedge clk); #1;
    rst = 0;
    model_pc = 0;
    check_state();
    for (int i = 0; i < 5000; i++) begin
      npc_sel = ($urandom % 3) == 0;
      imm16 = 16'($urandom);
      @(posedge clk);
      if (npc_sel) begin
        model_pc = model_pc + 4 + {{14{imm16[15]}}, imm16, 2'b00};
        taken++;
      end else
        model_pc = model_pc + 4;
      #1;
      check_state();
    end
    checks++;
    if (taken == 0) begin failures++; $display("FAIL no branch taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
