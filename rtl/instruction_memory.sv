// instruction_memory: program ROM of the processor, DEPTH 32-bit words.
// Combinational read of the word at addr (the PC's word address). Contents
// come from a hex file given by INIT_FILE (one 32-bit word per line,
// $readmemh format); words the file does not set read as 0, which is
// sll r0, r0, 0, a no-op. A 256-word depth is this design's choice.
module instruction_memory #(
  parameter int    DEPTH     = 256,
  parameter string INIT_FILE = "rtl/program.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [31:0]              instr
);

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign instr = rom[addr];

endmodule
