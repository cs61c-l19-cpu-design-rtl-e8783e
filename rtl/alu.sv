// alu: the 32-bit ALU of the MIPS-lite datapath.
//
// It performs the three operations the instruction subset needs, selected by
// ALUctr: add (ADDU, and the address sum of LW and SW), subtract (SUBU, and
// the comparison of BEQ) and bitwise OR (ORI). Add and subtract share one
// ripple adder-subtractor whose XOR gates invert B for subtraction. The
// Equal output tests the result for zero, so with ALUctr = subtract it is
// 1 exactly when A == B. The ALUctr code values are this design's choice.
// Overflow is not reported: the unsigned instructions ignore it.
//
// Ports: a, b (32 bits), alu_ctr, result (32 bits), equal.
// Purely combinational.
module alu
  import mips_lite_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  aluctr_e         alu_ctr,
  output logic [XLEN-1:0] result,
  output logic            equal
);

  logic [XLEN-1:0] sum;
  logic            unused_cout, unused_ovf;

  addsub #(.N(XLEN)) u_addsub (
    .a   (a),
    .b   (b),
    .sub (alu_ctr == ALU_SUB),
    .s   (sum),
    .cout(unused_cout),
    .ovf (unused_ovf)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      default:          result = sum;
    endcase
  end

  assign equal = (result == '0);

endmodule
