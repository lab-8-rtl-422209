// pc_unit: program counter and next-PC logic of the single-cycle processor.
// The PC holds a byte address and advances by 4 each cycle (the "ADD" with
// constant 4 in the datapath). The branch target is PC+4 plus the
// sign-extended offset shifted left by 2 ("Shift Left 2" and the second
// adder); it is taken when Branch and the ALU's Zero are both 1 (beq) or
// when BranchNE is 1 and Zero is 0 (bne). j/jal load {PC+4[high], target,
// 00}; jr loads a register value. hold freezes the PC (used while the FPU
// works on a floating-point instruction). A synchronous reset sets the PC
// to 0. The adders, shift, AND gate and mux follow the reference single-cycle datapath; the
// jump paths, the hold input and the reset are this design's additions for
// the expanded instruction set and the multi-cycle FPU.
module pc_unit
  import mips_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         hold,
  input  logic         branch,
  input  logic         branch_ne,
  input  logic         zero,
  input  logic [W-1:0] imm,          // sign-extended Instruction[15:0]
  input  logic         jump,
  input  logic [25:0]  jump_target,  // Instruction[25:0]
  input  logic         jr,
  input  logic [W-1:0] jr_target,    // Read Data 1
  output logic [W-1:0] pc,
  output logic [W-1:0] pc_plus4
);

  logic [W-1:0] branch_target, jump_addr, next_pc;
  logic         take_branch;

  always_comb begin
    pc_plus4      = pc + W'(4);
    branch_target = pc_plus4 + (imm << 2);
    take_branch   = (branch & zero) | (branch_ne & ~zero);
    jump_addr     = {jump_target[W-3:0], 2'b00};
    if (jr)               next_pc = jr_target;
    else if (jump)        next_pc = jump_addr;
    else if (take_branch) next_pc = branch_target;
    else                  next_pc = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (!hold) pc <= next_pc;
  end

endmodule
