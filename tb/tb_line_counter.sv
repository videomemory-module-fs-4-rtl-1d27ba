// tb_line_counter: checks that the first line after a frame start is row 0,
// that rows count up with line pulses and wrap, and that clear wins.
module tb_line_counter;
  logic clk = 0, rst = 1, clear = 0, inc = 0;
  logic [7:0] row;
  int checks = 0, failures = 0;

  line_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s row=%0d", what, row); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    clear = 1; @(negedge clk) clear = 0;
    check(row == 8'd255, "dummy row after frame start");
    for (int n = 0; n < 300; n++) begin
      inc = 1; @(negedge clk) inc = 0;
      check(row == 8'(n), "line n goes to row n");
      @(negedge clk);
      check(row == 8'(n), "row held between lines");
    end
    clear = 1; inc = 1; @(negedge clk) begin clear = 0; inc = 0; end
    check(row == 8'd255, "clear wins over inc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
