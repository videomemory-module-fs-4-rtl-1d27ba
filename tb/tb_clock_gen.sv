// tb_clock_gen: checks the 8-phase slot counter, the 1.875 MHz slot tick
// (one per 8 clocks of 15 MHz) and the 7.5 MHz pixel clock.
module tb_clock_gen;
  logic clk = 0, rst = 1;
  logic [2:0] phase;
  logic slot_end, pix_clk, pix_ce;
  int checks = 0, failures = 0;

  clock_gen dut (.*);

  always #33 clk = ~clk;   // ~15 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slots, pix, last_slot, p0;
    slots = 0; pix = 0; last_slot = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) p0 = int'(phase);
    for (int c = 0; c < 160; c++) begin
      @(negedge clk);
      check(phase == 3'(c + 1 + p0), "phase counts modulo 8");
      check(slot_end == ((c + 1 + p0) % 8 == 7), "slot_end on phase 7");
      check(pix_clk == ((c + 1 + p0) % 2 == 1), "pix_clk half rate");
      if (slot_end) begin
        if (last_slot >= 0) check(c - last_slot == 8, "slot period 8 clocks");
        last_slot = c; slots++;
      end
      if (pix_ce) pix++;
    end
    check(slots == 20, "20 slots in 160 clocks");
    check(pix == 80, "80 pixel ticks in 160 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
