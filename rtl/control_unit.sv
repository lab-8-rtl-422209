// control_unit: main decoder of the single-cycle MIPS processor.
// Combinational. From the opcode (Instruction[31:26]) it produces the
// control signals of the reference single-cycle datapath - RegDst, Branch, MemRead,
// MemtoReg, ALUOp, MemWrite, ALUSrc, RegWrite - plus branch-on-not-equal,
// jump and link for the expanded instruction set (bne, j, jal). Opcodes
// that are not in the instruction set write nothing and do not branch.
// Which opcodes exist comes from the instruction set table; the signal
// values follow the textbook single-cycle MIPS control.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, branch: 1'b0, branch_ne: 1'b0, mem_read: 1'b0,
             mem_to_reg: 1'b0, alu_op: ALUOP_ADD, mem_write: 1'b0,
             alu_src: 1'b0, reg_write: 1'b0, jump: 1'b0, link: 1'b0};
    case (opcode)
      OP_RTYPE: begin ctrl.reg_dst = 1'b1; ctrl.alu_op = ALUOP_FUNCT; ctrl.reg_write = 1'b1; end
      OP_ADDI:  begin ctrl.alu_src = 1'b1; ctrl.reg_write = 1'b1; end
      OP_LUI:   begin ctrl.alu_src = 1'b1; ctrl.alu_op = ALUOP_LUI; ctrl.reg_write = 1'b1; end
      OP_LW:    begin ctrl.alu_src = 1'b1; ctrl.mem_read = 1'b1; ctrl.mem_to_reg = 1'b1;
                      ctrl.reg_write = 1'b1; end
      OP_SW:    begin ctrl.alu_src = 1'b1; ctrl.mem_write = 1'b1; end
      OP_BEQ:   begin ctrl.branch = 1'b1; ctrl.alu_op = ALUOP_SUB; end
      OP_BNE:   begin ctrl.branch_ne = 1'b1; ctrl.alu_op = ALUOP_SUB; end
      OP_J:     ctrl.jump = 1'b1;
      OP_JAL:   begin ctrl.jump = 1'b1; ctrl.link = 1'b1; ctrl.reg_write = 1'b1; end
      default:  ;
    endcase
  end

endmodule
