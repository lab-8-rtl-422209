// alu_control: decodes ALUOp from the control unit and the function field
// (Instruction[5:0]) into the integer ALU operation, the FPU opcode and two
// flags.
// Combinational. For R-type instructions (ALUOp = FUNCT) the function code
// selects add/addu, sub/subu, and, or, slt, sll, srl, jr or one of the three
// floating-point instructions. For the floating-point codes 0x10, 0x12 and
// 0x14, fp is 1 and fpu_op = funct[2:1] (00 add, 01 subtract, 10 multiply),
// which routes the result from the FPU instead of the ALU. jr is 1 for the
// jump-register function. An unknown function code performs an add whose
// result is discarded (reg_ok = 0 blocks the register write). Placing the FPU
// beside the ALU under the ALU control follows the reference single-cycle datapath; the
// signal names and encodings are this design's own.
module alu_control
  import mips_pkg::*;
  import fp16_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [5:0]  funct,
  output alu_op_e     alu_sel,
  output fpu_op_e     fpu_op,
  output logic        fp,
  output logic        jr,
  output logic        reg_ok
);

  always_comb begin
    alu_sel = ALU_ADD;
    fpu_op  = fpu_op_e'(funct[2:1]);
    fp      = 1'b0;
    jr      = 1'b0;
    reg_ok  = 1'b1;
    unique case (alu_op)
      ALUOP_ADD: alu_sel = ALU_ADD;
      ALUOP_SUB: alu_sel = ALU_SUB;
      ALUOP_LUI: alu_sel = ALU_PASSB;
      ALUOP_FUNCT: begin
        case (funct)
          F_ADD, F_ADDU: alu_sel = ALU_ADD;
          F_SUB, F_SUBU: alu_sel = ALU_SUB;
          F_AND:         alu_sel = ALU_AND;
          F_OR:          alu_sel = ALU_OR;
          F_SLT:         alu_sel = ALU_SLT;
          F_SLL:         alu_sel = ALU_SLL;
          F_SRL:         alu_sel = ALU_SRL;
          F_JR:          begin jr = 1'b1; reg_ok = 1'b0; end
          F_FPADD, F_FPSUB, F_FPMULT: fp = 1'b1;
          default:       reg_ok = 1'b0;
        endcase
      end
      default: ;
    endcase
  end

endmodule
