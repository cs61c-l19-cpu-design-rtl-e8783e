// tb_register_en: self-checking test of the register with write enable.
// Drives random data and write enables for many clock edges and checks that
// the output follows the input only on edges where write enable was 1, and
// holds otherwise; also checks the synchronous reset value.
module tb_register_en;
  localparam logic [31:0] RV = 32'h0040_0000;
  logic clk = 0, rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register_en #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset q=%h", q); end
    model = RV;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      d = $urandom; we = ($urandom % 3) == 0;
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h exp %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
