// mux2: N-bit two-to-one multiplexer, y = sel ? b : a.
// Input a is the "0" input and b the "1" input. Purely combinational.
module mux2 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sel,
  output logic [N-1:0] y
);

  assign y = sel ? b : a;

endmodule
