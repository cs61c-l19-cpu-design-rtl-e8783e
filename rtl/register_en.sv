// register_en: N-bit register with a Write Enable input.
//
// Like a D flip-flop, but N bits wide: while WriteEnable is 0 the output
// holds its value; while it is 1 the output takes DataIn on the rising edge
// of clk. A synchronous reset that loads RESET_VALUE is added by this design
// (the building block as described has none) so that the program counter
// built from it starts at a known address.
//
// Ports: clk, rst (synchronous, active high), we, d (N bits), q (N bits).
// Timing: q changes only right after a rising edge of clk.
module register_en #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
