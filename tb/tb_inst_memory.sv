// tb_inst_memory: self-checking test of the read-only instruction memory.
// Places a pattern in the array (word i holds a value computed from i),
// then reads every word by its byte address, with and without the low two
// address bits set, and compares with the pattern.
module tb_inst_memory;
  localparam int WORDS = 1024;
  logic [31:0] adr, instruction;
  int checks = 0, failures = 0;

  inst_memory dut (.adr(adr), .instruction(instruction));

  function automatic logic [31:0] pattern(int i);
    return (32'(i) * 32'h9E37_79B9) ^ 32'h5A5A_0000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) dut.mem[i] = pattern(i);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < WORDS; i++) begin
        adr = (32'(i) << 2) | (pass ? 32'(i % 4) : 32'd0);
        #1;
        checks++;
        if (instruction !== pattern(i)) begin
          failures++;
          if (failures < 10) $display("FAIL adr=%h got %h exp %h", adr, instruction, pattern(i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
