// tb_data_memory: checks the preloaded image (the eight operand words at
// 0x02..0x09, zero elsewhere), then random writes and combinational reads
// against a shadow array, including that we = 0 writes nothing.
module tb_data_memory;
  logic clk = 1'b0, we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [256];
  logic [15:0] init [8] = '{16'h4980, 16'h5040, 16'hC980, 16'h5040,
                            16'h4980, 16'hD040, 16'hC980, 16'hD040};
  int checks = 0, failures = 0;

  data_memory dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wdata = '0;
    for (int k = 0; k < 256; k++) begin
      shadow[k] = (k >= 2 && k < 10) ? init[k - 2] : 16'h0;
      addr = 8'(k);
      #1;
      checks++;
      if (rdata !== shadow[k]) begin
        failures++;
        $display("FAIL init word %h: %h", k, rdata);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      addr = 8'($urandom); we = 1'($urandom); wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        $display("FAIL read %h: %h expected %h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
