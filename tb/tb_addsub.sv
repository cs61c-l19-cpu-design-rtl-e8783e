// tb_addsub: self-checking test of the ripple adder-subtractor.
// Applies corner cases and random operands in both modes at the default
// width of 32 bits and compares sum, carry out and signed overflow with
// values computed here from plain integer arithmetic.
module tb_addsub;
  localparam int N = 32;
  logic [N-1:0] a, b, s;
  logic sub, cout, ovf;
  int checks = 0, failures = 0;

  addsub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout), .ovf(ovf));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tsub);
    logic [N:0] full;
    logic [N-1:0] exp_s;
    logic exp_c, exp_v;
    a = ta; b = tb_; sub = tsub;
    #1;
    if (tsub) full = {1'b0, ta} + {1'b0, ~tb_} + 1'b1;
    else      full = {1'b0, ta} + {1'b0, tb_};
    exp_s = full[N-1:0];
    exp_c = full[N];
    if (tsub) exp_v = (ta[N-1] != tb_[N-1]) && (exp_s[N-1] != ta[N-1]);
    else      exp_v = (ta[N-1] == tb_[N-1]) && (exp_s[N-1] != ta[N-1]);
    checks++;
    if (s !== exp_s || cout !== exp_c || ovf !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h sub=%b: got s=%h c=%b v=%b exp s=%h c=%b v=%b",
                 ta, tb_, tsub, s, cout, ovf, exp_s, exp_c, exp_v);
    end
  endtask

  initial begin
    check_one('0, '0, 0);
    check_one('0, '0, 1);
    check_one('1, 1, 0);
    check_one(0, 1, 1);
    check_one(32'h7fff_ffff, 1, 0);
    check_one(32'h8000_0000, 1, 1);
    check_one(32'h8000_0000, 32'h8000_0000, 0);
    check_one(32'd5, 32'd5, 1);
    for (int i = 0; i < 5000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
