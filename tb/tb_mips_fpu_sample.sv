// tb_mips_fpu_sample: the processor at its default configuration running its
// default program - the floating-point test program - on its default data
// memory image, which holds +/-11 and +/-34 at words 0x02..0x09. The program
// adds, subtracts and multiplies the four operand pairs and stores the twelve
// results at words 0x10..0x1B. The testbench compares them with the known
// result words, checks that the operands and the rest of memory are
// untouched, and checks the run length: 36 single-cycle instructions, four
// FPadd and four FPsub of 6 cycles and four FPmult of 5 cycles, 104 cycles.
module tb_mips_fpu_sample;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] pc_out, write_data_out;
  logic [31:0] instruction_out;
  logic        reg_write_out, mem_write_out, fpu_stall_out;
  int checks = 0, failures = 0;
  int cycle = 0, done_cycle = -1;

  mips_fpu_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (!rst) begin
      cycle <= cycle + 1;
      if (pc_out == 16'd192 && done_cycle < 0) done_cycle <= cycle;
    end

  // Expected results at words 0x10..0x1B: 45, 23, -23, -45 (add),
  // -23, -45, 45, 23 (subtract), 374, -374, -374, 374 (multiply).
  logic [15:0] expect_res [12] = '{16'h51A0, 16'h4DC0, 16'hCDC0, 16'hD1A0,
                                   16'hCDC0, 16'hD1A0, 16'h51A0, 16'h4DC0,
                                   16'h5DD8, 16'hDDD8, 16'hDDD8, 16'h5DD8};
  logic [15:0] operands [8] = '{16'h4980, 16'h5040, 16'hC980, 16'h5040,
                                16'h4980, 16'hD040, 16'hC980, 16'hD040};

  initial begin
    rst = 1'b1;
    repeat (24) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (done_cycle >= 0);
    @(negedge clk);
    checks++;
    if (done_cycle != 104) begin
      failures++;
      $display("FAIL program took %0d cycles, expected 104", done_cycle);
    end
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (dut.u_dmem.mem[16 + k] !== expect_res[k]) begin
        failures++;
        $display("FAIL word %h: got %h expected %h", 16 + k, dut.u_dmem.mem[16 + k], expect_res[k]);
      end
    end
    for (int k = 0; k < 256; k++) begin
      logic [15:0] want;
      if (k >= 16 && k < 28) continue;
      want = (k >= 2 && k < 10) ? operands[k - 2] : 16'h0000;
      checks++;
      if (dut.u_dmem.mem[k] !== want) begin
        failures++;
        $display("FAIL word %h changed: %h", k, dut.u_dmem.mem[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
