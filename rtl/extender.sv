// extender: widens the 16-bit immediate to 32 bits.
// ExtOp = 1 copies bit 15 into bits 31:16 (sign extension, for LW, SW and
// BEQ); ExtOp = 0 fills them with zeros (zero extension, for ORI).
// Purely combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);

  assign imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
