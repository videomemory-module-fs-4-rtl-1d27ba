// tb_display_ctrl: checks the display-transfer request at each HSYNC rising
// edge with the row taken from the GDC address, the 7.5 MHz shift clock only
// during active display, and the mixed sync.
module tb_display_ctrl;
  logic clk = 0, rst = 1, hsync = 0, vsync = 0, blank = 1, pix_clk = 0;
  logic [13:0] gdc_addr = 0;
  logic disp_req, sc_disp, active, csync;
  logic [7:0] disp_row;
  int checks = 0, failures = 0, n_req = 0, n_sc = 0;

  display_ctrl dut (.*);
  always #33 clk = ~clk;
  always @(posedge clk) pix_clk <= ~pix_clk;
  always @(posedge clk) if (!rst) n_req += int'(disp_req);
  always @(posedge sc_disp) n_sc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int line = 0; line < 6; line++) begin
      automatic int r = $urandom_range(0, 255);
      automatic int n0 = n_req;
      gdc_addr = {1'($urandom), 8'(r), 5'd0};
      @(negedge clk) hsync = 1;
      #1;
      check(csync == 1, "csync follows hsync");
      repeat (3) @(negedge clk);
      check(n_req == n0 + 1, "one display request per line");
      check(disp_row == 8'(r), "display row from GDC address");
      hsync = 0;
      repeat (2) @(negedge clk);
      // active line of 64 clocks -> 32 shift clocks
      begin
        automatic int s0 = n_sc;
        blank = 0;
        repeat (64) @(negedge clk);
        blank = 1;
        repeat (4) @(negedge clk);
        check(n_sc - s0 == 32, "32 shift clocks in 64 active clocks");
      end
      check(n_req == n0 + 1, "no request without hsync");
    end
    vsync = 1; #1;
    check(csync == 1, "csync follows vsync");
    vsync = 0; #1;
    check(csync == 0, "csync low between syncs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
