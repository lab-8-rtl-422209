// tb_mips_fpu_top: end-to-end test of the processor with its FPU.
// It runs tb/isa_test.hex, a program that uses every instruction of the
// instruction set: arithmetic, logic, slt, shifts, lui, lw/sw, a counted
// bne loop, a taken and a not-taken beq, j, jal/jr, a write to R0 and three
// dependent floating-point instructions issued back to back. At the end it
// compares the data-memory words the program stored with values worked out
// by hand (integer) and with the real-arithmetic model (floating point),
// checks the total cycle count (60 instructions plus the FPU stalls), checks
// that each FP instruction held the PC for exactly the FPU path length + 2
// cycles, and counts how often each mechanism happened: a mechanism that
// never happened is a failure.
module tb_mips_fpu_top;
  import fp16_pkg::*;
  import fp16_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] pc_out, write_data_out;
  logic [31:0] instruction_out;
  logic        reg_write_out, mem_write_out, fpu_stall_out;
  int checks = 0, failures = 0;

  mips_fpu_top #(.PROGRAM_FILE("tb/isa_test.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  // Mechanism counters.
  int n_fpadd = 0, n_fpsub = 0, n_fpmult = 0, n_stall_cycles = 0;
  int n_beq_taken = 0, n_beq_not = 0, n_bne_taken = 0, n_bne_not = 0;
  int n_j = 0, n_jal = 0, n_jr = 0, n_lw = 0, n_sw = 0, n_r0_write = 0;
  int cycle = 0, halt_cycle = -1, hold_len = 0;
  logic [15:0] prev_pc;
  logic [31:0] prev_instr;
  logic        started = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (fpu_stall_out) n_stall_cycles <= n_stall_cycles + 1;
      if (pc_out == 16'd224 && halt_cycle < 0) halt_cycle <= cycle;
      if (reg_write_out && instruction_out[31:26] == 6'h08 && instruction_out[20:16] == 5'd0)
        n_r0_write <= n_r0_write + 1;
      if (!fpu_stall_out) begin
        // An instruction completes in this cycle.
        case (instruction_out[31:26])
          6'h00: case (instruction_out[5:0])
                   6'h10, 6'h12, 6'h14: begin
                     int want;
                     want = int'(fpu_states(fpu_op_e'(instruction_out[2:1]))) + 2;
                     checks++;
                     if (hold_len + 1 != want) begin
                       failures++;
                       $display("FAIL FP instruction %h took %0d cycles, expected %0d",
                                instruction_out, hold_len + 1, want);
                     end
                     if (instruction_out[5:0] == 6'h10) n_fpadd <= n_fpadd + 1;
                     if (instruction_out[5:0] == 6'h12) n_fpsub <= n_fpsub + 1;
                     if (instruction_out[5:0] == 6'h14) n_fpmult <= n_fpmult + 1;
                   end
                   6'h08: n_jr <= n_jr + 1;
                   default: ;
                 endcase
          6'h02: n_j   <= n_j + 1;
          6'h03: n_jal <= n_jal + 1;
          6'h23: n_lw  <= n_lw + 1;
          6'h2B: n_sw  <= n_sw + 1;
          default: ;
        endcase
        hold_len <= 0;
      end else begin
        hold_len <= hold_len + 1;
      end
      // Branch outcome, seen from the PC one cycle later.
      if (started) begin
        if (prev_instr[31:26] == 6'h04 && prev_pc != 16'd224) begin
          if (pc_out != prev_pc + 16'd4) n_beq_taken <= n_beq_taken + 1;
          else                           n_beq_not   <= n_beq_not + 1;
        end
        if (prev_instr[31:26] == 6'h05) begin
          if (pc_out != prev_pc + 16'd4) n_bne_taken <= n_bne_taken + 1;
          else                           n_bne_not   <= n_bne_not + 1;
        end
      end
      prev_pc    <= pc_out;
      prev_instr <= instruction_out;
      started    <= 1'b1;
    end
  end

  function automatic logic [15:0] mem(int a);
    return dut.u_dmem.mem[a];
  endfunction

  logic [15:0] f_sum, f_prod, f_diff;

  initial begin
    rst = 1'b1;
    repeat (24) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (halt_cycle >= 0);
    repeat (10) @(posedge clk);
    @(negedge clk);

    check("cycles to halt", 16'(halt_cycle), 16'd74);
    check("add",  mem(32'h20), 16'h0002);
    check("sub",  mem(32'h21), 16'h0008);
    check("and",  mem(32'h22), 16'h0005);
    check("or",   mem(32'h23), 16'hFFFD);
    check("slt true",  mem(32'h24), 16'h0001);
    check("slt false", mem(32'h25), 16'h0000);
    check("sll",  mem(32'h26), 16'h0028);
    check("srl",  mem(32'h27), 16'h0FFF);
    check("lui",  mem(32'h28), 16'h1234);
    check("addu", mem(32'h29), 16'h1239);
    check("subu", mem(32'h2A), 16'hEDD1);
    check("bne loop sum", mem(32'h2B), 16'd15);
    check("beq taken skips store", mem(32'h2C), 16'h0000);
    check("beq not taken", mem(32'h2D), 16'd15);
    check("jal/jr subroutine", mem(32'h2E), 16'h0077);
    check("j skips store", mem(32'h2F), 16'h0000);
    f_sum  = ref_op(0, 16'h4980, 16'h5040);
    f_prod = ref_op(2, f_sum, 16'h5040);
    f_diff = ref_op(1, f_prod, 16'h4980);
    check("fpadd", mem(32'h30), f_sum);
    check("fpmult after fpadd", mem(32'h31), f_prod);
    check("fpsub after fpmult", mem(32'h32), f_diff);
    check("R0 stays zero", mem(32'h33), 16'h0000);
    check("link register", mem(32'h34), 16'h0088);
    check("data unchanged", mem(32'h02), 16'h4980);

    $display("mechanisms: fpadd=%0d fpsub=%0d fpmult=%0d stall_cycles=%0d beq_taken=%0d beq_not=%0d bne_taken=%0d bne_not=%0d j=%0d jal=%0d jr=%0d lw=%0d sw=%0d r0_write=%0d",
             n_fpadd, n_fpsub, n_fpmult, n_stall_cycles, n_beq_taken, n_beq_not,
             n_bne_taken, n_bne_not, n_j, n_jal, n_jr, n_lw, n_sw, n_r0_write);
    check("FPU stall cycles", 16'(n_stall_cycles), 16'd14);
    begin
      int m [14];
      m = '{n_fpadd, n_fpsub, n_fpmult, n_stall_cycles, n_beq_taken, n_beq_not,
            n_bne_taken, n_bne_not, n_j, n_jal, n_jr, n_lw, n_sw, n_r0_write};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
