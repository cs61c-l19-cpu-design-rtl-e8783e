// tb_data_memory: self-checking test of the idealized data memory at its
// default depth of 1024 words. Fills every word, then runs random cycles of
// reads and writes, checking the combinational read against a model before
// and after each clock edge: a word changes only on an edge with wr_en = 1,
// and the two low address bits do not select anything.
module tb_data_memory;
  localparam int WORDS = 1024;
  logic clk = 0, wr_en;
  logic [31:0] adr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory dut (.clk(clk), .wr_en(wr_en), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read();
    checks++;
    if (dout !== model[adr[11:2]]) begin
      failures++;
      if (failures < 10) $display("FAIL adr=%h dout=%h exp %h", adr, dout, model[adr[11:2]]);
    end
  endtask

  initial begin
    wr_en = 1;
    for (int w = 0; w < WORDS; w++) begin
      adr = 32'(w) << 2; din = $urandom;
      @(posedge clk);
      model[w] = din;
      #1;
    end
    wr_en = 0;
    for (int w = 0; w < WORDS; w++) begin
      adr = (32'(w) << 2) | 32'($urandom % 4);
      #1; check_read();
    end
    for (int i = 0; i < 5000; i++) begin
      wr_en = ($urandom % 2) == 0;
      adr = $urandom % (WORDS * 4);
      din = $urandom;
      #1; check_read();
      @(posedge clk);
      if (wr_en) model[adr[11:2]] = din;
      #1; check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
