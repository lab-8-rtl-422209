// tb_alu: checks every ALU operation on random and edge operands against
// expressions computed in the testbench, including the zero flag and signed
// set-on-less-than.
module tb_alu;
  import mips_pkg::*;
  logic [15:0] a, b, result;
  logic [4:0]  shamt;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(alu_op_e o, logic [15:0] x, logic [15:0] y, logic [4:0] s);
    int sx, sy;
    sx = int'($signed(x)); sy = int'($signed(y));
    case (o)
      ALU_ADD:   return 16'(int'(x) + int'(y));
      ALU_SUB:   return 16'(int'(x) - int'(y));
      ALU_AND:   return x & y;
      ALU_OR:    return x | y;
      ALU_SLT:   return (sx < sy) ? 16'd1 : 16'd0;
      ALU_SLL:   return (s > 15) ? 16'd0 : 16'(int'(y) * (1 << s));
      ALU_SRL:   return (s > 15) ? 16'd0 : 16'(int'(y) / (1 << s));
      default:   return y;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 4000; k++) begin
      op = alu_op_e'(k % 8);
      a = (k % 17 == 0) ? 16'h8000 : 16'($urandom);
      b = (k % 13 == 0) ? a : 16'($urandom);
      shamt = 5'($urandom);
      #1;
      checks++;
      if (result !== model(op, a, b, shamt) || zero !== (model(op, a, b, shamt) == 0)) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h sh=%0d got %h/%b", op, a, b, shamt, result, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
