// tb_regfile: self-checking test of the 32 x 32 register file.
// First writes every register with a known value, then runs random cycles
// of one write (with random RegWr) and two reads. The reads are compared
// with a model array: combinational reads see the old value until the
// rising edge, writes take effect only with RegWr = 1, and register 0 always
// reads zero.
module tb_regfile;
  logic clk = 0, reg_wr;
  logic [4:0] rw, ra, rb;
  logic [31:0] busW, busA, busB;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .reg_wr(reg_wr), .rw(rw), .ra(ra), .rb(rb),
               .busW(busW), .busA(busA), .busB(busB));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    logic [31:0] ea, eb;
    ea = (ra == 0) ? 32'h0 : model[ra];
    eb = (rb == 0) ? 32'h0 : model[rb];
    checks++;
    if (busA !== ea || busB !== eb) begin
      failures++;
      if (failures < 10) $display("FAIL ra=%0d busA=%h exp %h  rb=%0d busB=%h exp %h",
                                  ra, busA, ea, rb, busB, eb);
    end
  endtask

  initial begin
    reg_wr = 0; rw = 0; ra = 0; rb = 0; busW = 0;
    for (int r = 0; r < 32; r++) begin
      reg_wr = 1; rw = 5'(r); busW = 32'hA000_0000 + 32'(r) * 32'h0101;
      @(posedge clk);
      model[r] = busW;
      #1;
    end
    reg_wr = 0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r);
      #1; check_reads();
    end
    for (int i = 0; i < 4000; i++) begin
      reg_wr = 1'($urandom); rw = 5'($urandom); busW = $urandom;
      ra = (i % 4 == 0) ? rw : 5'($urandom); rb = 5'($urandom);
      #1; check_reads();          // before the edge: old contents
      @(posedge clk);
      if (reg_wr) model[rw] = busW;
      #1; check_reads();          // after the edge: new contents
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
