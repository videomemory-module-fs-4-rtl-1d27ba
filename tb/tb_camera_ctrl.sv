// tb_camera_ctrl: drives a short frame (EFV, ELV, EDV) and checks the dummy
// write transfer at frame start, one write transfer per line end, the line
// counter pulses, the EDV gating and the OSB frame bit.
module tb_camera_ctrl;
  logic clk = 0, rst = 1, efv = 0, elv = 0, edv = 0;
  logic wr_req, line_clr, line_inc, capture, sc_cam, osb0;
  int checks = 0, failures = 0;
  int n_wr = 0, n_clr = 0, n_inc = 0, n_sc = 0;
  localparam int LINES = 5, PIX = 16;

  camera_ctrl dut (.*);
  always #33 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    n_wr  += int'(wr_req);
    n_clr += int'(line_clr);
    n_inc += int'(line_inc);
  end
  always @(posedge sc_cam) n_sc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(osb0 == 0, "OSB 0 before frame");
    // EDV pulses outside ELV must not shift
    repeat (4) begin #20 edv = 1; #20 edv = 0; end
    efv = 1;
    repeat (5) @(negedge clk);
    check(n_wr == 1 && n_clr == 1, "dummy write transfer at frame start");
    check(osb0 == 1 && capture == 1, "OSB shows frame in progress");
    for (int l = 0; l < LINES; l++) begin
      elv = 1;
      repeat (4) @(negedge clk);
      check(n_inc == l + 1, "line counter advanced at ELV start");
      repeat (PIX) begin #20 edv = 1; #20 edv = 0; end
      elv = 0;
      repeat (5) @(negedge clk);
      check(n_wr == l + 2, "write transfer at ELV end");
    end
    check(n_sc == LINES * PIX, "EDV shifts only while ELV active");
    efv = 0;
    repeat (5) @(negedge clk);
    check(osb0 == 0 && capture == 0, "OSB clears at frame end");
    check(n_wr == LINES + 1 && n_clr == 1, "no extra requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
