// register_file: the eight 16-bit general-purpose registers.
// Two combinational read ports and one write port written at the rising
// clock edge when we is 1. Register 0 always reads as zero and ignores
// writes, as in MIPS (the sample program uses R0 as a zero base address).
// A synchronous reset clears all registers. Eight registers of the datapath
// width are the processor's specification; the zero register and the reset
// are this design's choices.
module register_file
  import mips_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra1,
  input  logic [$clog2(N)-1:0] ra2,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
