// tb_adder: self-checking test of the 32-bit adder with carry in and carry
// out, against integer arithmetic on corner cases and random operands.
module tb_adder;
  logic [31:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  adder #(.N(32)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    longint unsigned full;
    a = ta; b = tb_; cin = tc;
    #1;
    full = longint'(ta) + longint'(tb_) + longint'(tc);
    checks++;
    if (sum !== full[31:0] || cout !== full[32]) begin
      failures++;
      $display("FAIL %h+%h+%b got %b_%h", ta, tb_, tc, cout, sum);
    end
  endtask

  initial begin
    check_one(32'hffff_ffff, 0, 1);
    check_one(32'hffff_ffff, 32'hffff_ffff, 1);
    check_one(32'h0000_0ffc, 4, 0);
    for (int i = 0; i < 3000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
