// adder: N-bit adder with CarryIn and CarryOut, the combinational building
// block used for the two program counter adders.
// {CarryOut, Sum} = A + B + CarryIn. Purely combinational.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};

endmodule
