// regfile: the 32 x 32-bit general purpose register file.
//
// Two read ports and one write port. ra selects the register driven on
// busA and rb the one driven on busB; reads are combinational, so a bus is
// valid one access time after its register number. rw selects the register
// that takes busW on the rising edge of clk when reg_wr is 1; the clock
// matters only for writes. As in MIPS, register 0 always reads as zero and
// writes to it are dropped (this design's choice; a plain 32-entry array is
// the alternative). The other registers are not reset.
//
// Ports: clk, reg_wr, rw, ra, rb (5 bits), busW, busA, busB (32 bits).
module regfile
  import mips_lite_pkg::*;
(
  input  logic              clk,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] rw,
  input  logic [REG_AW-1:0] ra,
  input  logic [REG_AW-1:0] rb,
  input  logic [XLEN-1:0]   busW,
  output logic [XLEN-1:0]   busA,
  output logic [XLEN-1:0]   busB
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reg_wr && rw != '0) regs[rw] <= busW;
  end

  assign busA = (ra == '0) ? '0 : regs[ra];
  assign busB = (rb == '0) ? '0 : regs[rb];

endmodule
