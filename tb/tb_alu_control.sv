// tb_alu_control: checks the decode of every ALUOp value and every function
// code against a table written from the instruction set: ALU operation, FP
// flag and FPU opcode for FPadd/FPsub/FPmult, jr, and the write block for
// unknown function codes.
module tb_alu_control;
  import mips_pkg::*;
  import fp16_pkg::*;
  aluop_e  alu_op;
  logic [5:0] funct;
  alu_op_e alu_sel;
  fpu_op_e fpu_op;
  logic fp, jr, reg_ok;
  int checks = 0, failures = 0;

  alu_control dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dec(string n, alu_op_e s, logic f, logic [1:0] fo, logic j, logic ok);
    checks++;
    if (alu_sel !== s || fp !== f || jr !== j || reg_ok !== ok || (f && fpu_op !== fpu_op_e'(fo))) begin
      failures++;
      $display("FAIL %s aluop=%0d funct=%h: sel=%0d fp=%b op=%0d jr=%b ok=%b", n, alu_op, funct,
               alu_sel, fp, fpu_op, jr, reg_ok);
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      funct = 6'(f);
      alu_op = ALUOP_ADD;   #1; expect_dec("addr", ALU_ADD, 0, 0, 0, 1);
      alu_op = ALUOP_SUB;   #1; expect_dec("branch", ALU_SUB, 0, 0, 0, 1);
      alu_op = ALUOP_LUI;   #1; expect_dec("lui", ALU_PASSB, 0, 0, 0, 1);
      alu_op = ALUOP_FUNCT; #1;
      case (f)
        'h20, 'h21: expect_dec("add", ALU_ADD, 0, 0, 0, 1);
        'h22, 'h23: expect_dec("sub", ALU_SUB, 0, 0, 0, 1);
        'h24: expect_dec("and", ALU_AND, 0, 0, 0, 1);
        'h25: expect_dec("or",  ALU_OR,  0, 0, 0, 1);
        'h2A: expect_dec("slt", ALU_SLT, 0, 0, 0, 1);
        'h00: expect_dec("sll", ALU_SLL, 0, 0, 0, 1);
        'h02: expect_dec("srl", ALU_SRL, 0, 0, 0, 1);
        'h08: expect_dec("jr",  ALU_ADD, 0, 0, 1, 0);
        'h10: expect_dec("fpadd",  ALU_ADD, 1, 2'b00, 0, 1);
        'h12: expect_dec("fpsub",  ALU_ADD, 1, 2'b01, 0, 1);
        'h14: expect_dec("fpmult", ALU_ADD, 1, 2'b10, 0, 1);
        default: expect_dec("unknown", ALU_ADD, 0, 0, 0, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
