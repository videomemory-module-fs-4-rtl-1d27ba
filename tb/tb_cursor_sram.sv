// tb_cursor_sram: writes a pattern to all 16K bytes and reads it back
// against a reference array; checks that a read does not write.
module tb_cursor_sram;
  logic clk = 0, we_n = 1;
  logic [13:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [16384];
  int checks = 0, failures = 0;

  cursor_sram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      addr = 14'(i); wdata = 8'(i * 37 + (i >> 8)); we_n = 0;
      ref_mem[i] = wdata;
    end
    @(negedge clk) we_n = 1;
    for (int k = 0; k < 20000; k++) begin
      automatic int i = $urandom_range(0, 16383);
      addr = 14'(i); wdata = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[i]) begin failures++; $display("FAIL addr %0d", i); end
      if (k % 7 == 0) begin
        we_n = 0; ref_mem[i] = wdata;
        @(negedge clk) we_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
