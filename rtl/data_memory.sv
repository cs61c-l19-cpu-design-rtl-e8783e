// data_memory: idealized data memory for loads and stores.
//
// One input bus (data_in), one output bus (data_out), an address and a write
// enable. The address selects the word put on data_out; the read is
// combinational, valid one access time after the address. When wr_en is 1
// the addressed word takes data_in on the rising edge of clk; the clock
// matters only for writes. Addresses are byte addresses of 32-bit words:
// bits 1:0 are ignored and bits DEPTH_LOG2+1:2 index the array, so higher
// addresses wrap. The depth (1024 words) is this design's choice.
//
// Ports: clk, wr_en, adr (32 bits), data_in, data_out (32 bits).
module data_memory
  import mips_lite_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [XLEN-1:0] adr,
  input  logic [XLEN-1:0] data_in,
  output logic [XLEN-1:0] data_out
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   idx;

  assign idx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[idx] <= data_in;
  end

  assign data_out = mem[idx];

endmodule
