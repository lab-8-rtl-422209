// tb_control_unit: checks the control word for every one of the 64 opcodes
// against the expected single-cycle MIPS control table (R-type, addi, lui,
// lw, sw, beq, bne, j, jal; everything else inert).
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl, want;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      opcode = 6'(o);
      // fields: reg_dst branch branch_ne mem_read mem_to_reg alu_op mem_write alu_src reg_write jump link
      case (o)
        'h00: want = '{1,0,0,0,0,ALUOP_FUNCT,0,0,1,0,0};
        'h08: want = '{0,0,0,0,0,ALUOP_ADD,0,1,1,0,0};
        'h0F: want = '{0,0,0,0,0,ALUOP_LUI,0,1,1,0,0};
        'h23: want = '{0,0,0,1,1,ALUOP_ADD,0,1,1,0,0};
        'h2B: want = '{0,0,0,0,0,ALUOP_ADD,1,1,0,0,0};
        'h04: want = '{0,1,0,0,0,ALUOP_SUB,0,0,0,0,0};
        'h05: want = '{0,0,1,0,0,ALUOP_SUB,0,0,0,0,0};
        'h02: want = '{0,0,0,0,0,ALUOP_ADD,0,0,0,1,0};
        'h03: want = '{0,0,0,0,0,ALUOP_ADD,0,0,1,1,1};
        default: want = '{0,0,0,0,0,ALUOP_ADD,0,0,0,0,0};
      endcase
      #1;
      checks++;
      if (ctrl !== want) begin
        failures++;
        $display("FAIL opcode %h: got %b expected %b", o, ctrl, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
