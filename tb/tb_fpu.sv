// tb_fpu: self-checking testbench of the FPU state machine.
// It runs the reference operand pairs of the sample program (+/-11 with
// +/-34), directed corner cases (zeros, cancellation, overflow, underflow,
// large exponent differences, division by zero) and random operands through
// all four opcodes, compares each result with the real-arithmetic model in
// fp16_ref_pkg, and checks that FPU_out changes exactly at the path's
// specified number of states after data_rdy, not one cycle earlier.
module tb_fpu;
  import fp16_pkg::*;
  import fp16_ref_pkg::*;

  logic        clock = 1'b0;
  logic        data_rdy;
  logic [1:0]  opcode;
  logic [15:0] A_in, B_in, FPU_out;
  int checks = 0, failures = 0;

  fpu dut (.*);

  always #5 clock = ~clock;

  initial begin : watchdog
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(int op, logic [15:0] a, logic [15:0] b);
    logic [15:0] exp_r, prev;
    int n;
    n = int'(fpu_states(fpu_op_e'(op)));
    exp_r = ref_op(op, a, b);
    @(negedge clock);
    data_rdy = 1'b1; opcode = 2'(op); A_in = a; B_in = b;
    @(negedge clock);
    data_rdy = 1'b0; A_in = $urandom; B_in = $urandom; opcode = 2'($urandom);
    prev = FPU_out;
    repeat (n - 1) @(negedge clock);
    // Edge n-1 has passed: the result must not be there yet unless equal.
    checks++;
    if (FPU_out !== prev) begin
      failures++;
      $display("FAIL latency op=%0d a=%h b=%h: output changed early", op, a, b);
    end
    @(negedge clock);
    checks++;
    if (FPU_out !== exp_r) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h expected %h", op, a, b, FPU_out, exp_r);
    end
  endtask

  logic [15:0] ta [8] = '{16'h4980, 16'h5040, 16'hC980, 16'h5040,
                          16'h4980, 16'hD040, 16'hC980, 16'hD040};
  logic [15:0] dir [12] = '{16'h0000, 16'h8000, 16'h3C00, 16'hBC00,
                            16'h7FFF, 16'hFFFF, 16'h0400, 16'h8401,
                            16'h3C01, 16'h0001, 16'h7BFF, 16'h4000};

  initial begin
    data_rdy = 1'b0; opcode = 2'b00; A_in = '0; B_in = '0;
    // Let the state machine settle from its power-up state.
    repeat (DIV_STATES + 2) @(negedge clock);
    // Sample-program operand pairs and their known results.
    for (int p = 0; p < 4; p++)
      for (int op = 0; op < 4; op++) run_op(op, ta[2*p], ta[2*p+1]);
    // Known words from the reference data: 11 + 34 = 45, 11 * 34 = 374.
    run_op(0, 16'h4980, 16'h5040); checks++; if (FPU_out !== 16'h51A0) failures++;
    run_op(2, 16'h4980, 16'h5040); checks++; if (FPU_out !== 16'h5DD8) failures++;
    run_op(1, 16'hC980, 16'h5040); checks++; if (FPU_out !== 16'hD1A0) failures++;
    // Directed corner cases.
    foreach (dir[i]) foreach (dir[j])
      for (int op = 0; op < 4; op++) run_op(op, dir[i], dir[j]);
    // x - x = 0 and values that cancel down to few bits.
    run_op(1, 16'h5040, 16'h5040);
    run_op(0, 16'h3C01, 16'hBC00);
    // Random operands, full range.
    for (int k = 0; k < 3000; k++) run_op(k % 4, 16'($urandom), 16'($urandom));
    // Random operands with close exponents (cancellation, rounding ties).
    for (int k = 0; k < 3000; k++) begin
      logic [15:0] a, b;
      a = 16'($urandom);
      b = {1'($urandom), 5'(a[14:10] + 5'($urandom_range(0, 2))), 10'($urandom)};
      run_op(k % 4, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
