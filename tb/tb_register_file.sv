// tb_register_file: random reads and writes against a shadow array; checks
// the reset, both read ports, that R0 reads zero whatever is written to it,
// and that a write with we = 0 changes nothing.
module tb_register_file;
  logic clk = 1'b0, rst, we;
  logic [2:0] ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;

  register_file dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int k = 0; k < 5000; k++) begin
      ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        $display("FAIL read r%0d=%h r%0d=%h expected %h %h", ra1, rd1, ra2, rd2, shadow[ra1], shadow[ra2]);
      end
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      @(negedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
