// data_memory: data RAM of the processor, 256 words of 16 bits.
// Word-addressed: addr is the low bits of the ALU result, so lw/sw offsets
// count words. Read is combinational (the single-cycle datapath needs the
// data in the same cycle); a write happens at the rising clock edge when we
// is 1. Contents are initialised from INIT_FILE ($readmemh, one word per
// line, "@addr" lines allowed); all other words start at 0. The size and the
// preloaded values are those of the reference data memory; combinational
// read and the port names are this design's choices.
module data_memory
  import mips_pkg::*;
#(
  parameter int    DEPTH     = 256,
  parameter int    W         = DATA_W,
  parameter string INIT_FILE = "rtl/dmemory.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
