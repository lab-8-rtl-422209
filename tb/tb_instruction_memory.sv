// tb_instruction_memory: loads the floating-point test program and checks
// every word against the encoding of its source line (lw rt, off(r0) = 0x8C..,
// the FP R-type words, sw rt, off(r0) = 0xAC..), and that the unused words
// read as zero.
module tb_instruction_memory;
  logic [7:0]  addr;
  logic [31:0] instr;
  int checks = 0, failures = 0;

  instruction_memory dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] want;
    logic [5:0]  fn [3] = '{6'h10, 6'h12, 6'h14};
    for (int k = 0; k < 256; k++) begin
      int g, p, s;
      g = k / 16; p = (k % 16) / 4; s = k % 4;
      if (k >= 48) want = 32'h0;
      else case (s)
        0: want = {6'h23, 5'd0, 5'd2, 16'(2 + 2*p)};
        1: want = {6'h23, 5'd0, 5'd3, 16'(3 + 2*p)};
        2: want = {6'h00, 5'd2, 5'd3, 5'd1, 5'd0, fn[g]};
        default: want = {6'h2B, 5'd0, 5'd1, 16'(16 + 4*g + p)};
      endcase
      addr = 8'(k);
      #1;
      checks++;
      if (instr !== want) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", k, instr, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
