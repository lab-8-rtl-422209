// tb_pc_unit: drives random branch, jump, jr and hold controls and checks the
// PC after every clock against the next-PC rule: jr > jump > taken branch >
// PC+4, with hold freezing the PC, and PC+4 and the branch target computed
// in the testbench. Also checks the reset value.
module tb_pc_unit;
  logic clk = 1'b0, rst, hold, branch, branch_ne, zero, jump, jr;
  logic [15:0] imm, jr_target, pc, pc_plus4, want;
  logic [25:0] jump_target;
  int checks = 0, failures = 0;
  int n_br = 0, n_hold = 0;

  pc_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; hold = 0; branch = 0; branch_ne = 0; zero = 0; jump = 0; jr = 0;
    imm = 0; jr_target = 0; jump_target = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (pc !== 16'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      hold = ($urandom % 5 == 0);
      branch = 1'($urandom); branch_ne = 1'($urandom); zero = 1'($urandom);
      jump = ($urandom % 6 == 0); jr = ($urandom % 8 == 0);
      imm = 16'($signed(8'($urandom)));
      jr_target = 16'($urandom); jump_target = 26'($urandom);
      #1;
      checks++;
      if (pc_plus4 !== 16'(pc + 4)) begin failures++; $display("FAIL pc+4"); end
      if (hold) begin want = pc; n_hold++; end
      else if (jr) want = jr_target;
      else if (jump) want = {jump_target[13:0], 2'b00};
      else if ((branch && zero) || (branch_ne && !zero)) begin
        want = 16'(pc + 4 + 4 * int'($signed(imm))); n_br++;
      end
      else want = 16'(pc + 4);
      @(negedge clk);
      checks++;
      if (pc !== want) begin
        failures++;
        $display("FAIL pc=%h expected %h", pc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
