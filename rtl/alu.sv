// alu: integer ALU of the 16-bit MIPS datapath.
// Combinational. Operands a (Read Data 1) and b (Read Data 2 or the
// immediate, chosen by ALUSrc) and a shift amount (Instruction[10:6]); the
// operation comes from the ALU control. Operations: add, subtract, and, or,
// set-on-less-than (signed), shift b left or right logically by shamt, and
// pass b (for lui). zero is 1 when the result is 0 and drives the branch
// decision. Addition and subtraction wrap; add/addu and sub/subu behave the
// same because the processor raises no overflow exception (its
// specification mentions none). The set of operations is the one the
// instruction set needs; the encoding is this design's own.
module alu
  import mips_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   shamt,
  input  alu_op_e      op,
  output logic [W-1:0] result,
  output logic         zero
);

  always_comb begin
    unique case (op)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_SLT:   result = W'($signed(a) < $signed(b));
      ALU_SLL:   result = b << shamt;
      ALU_SRL:   result = b >> shamt;
      ALU_PASSB: result = b;
      default:   result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
