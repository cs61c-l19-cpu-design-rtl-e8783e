// inst_memory: idealized instruction memory, read only.
//
// The byte address adr selects the 32-bit instruction word put on
// instruction; the read is combinational. Bits 1:0 of the address are
// ignored and bits DEPTH_LOG2+1:2 index the array, so higher addresses wrap.
// The processor never writes it: the program is placed in it from outside,
// either from the hex file named by INIT_FILE (one word per line) or by the
// environment before reset. The depth (1024 words) is this design's choice.
//
// Ports: adr (32 bits), instruction (32 bits).
module inst_memory
  import mips_lite_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [XLEN-1:0] adr,
  output logic [XLEN-1:0] instruction
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign instruction = mem[adr[AW+1:2]];

endmodule
