// tb_request_reg: checks latching and clearing of the four requests, that a
// coincident set and ack keeps the request, the refresh period, and random
// set/ack traffic against a reference model.
module tb_request_reg;
  import fs4_pkg::*;
  logic clk = 0, rst = 1;
  logic set_wr = 0, set_mem = 0, set_disp = 0, slot_end = 0;
  req_t ack = '0, pending;
  int checks = 0, failures = 0;

  request_reg #(.REFRESH_SLOTS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pending=%b)", what, pending); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int refs = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(pending == 4'b0000, "empty after reset");
    set_wr = 1; @(negedge clk) set_wr = 0;
    check(pending == 4'b1000, "write request latched at bit OP_WRITE");
    set_mem = 1; @(negedge clk) set_mem = 0;
    check(pending == 4'b1100, "memory request latched");
    set_disp = 1; @(negedge clk) set_disp = 0;
    check(pending == 4'b1110, "display request latched");
    repeat (3) @(negedge clk);
    check(pending == 4'b1110, "requests held");
    ack = 4'b1000; @(negedge clk) ack = '0;
    check(pending == 4'b0110, "ack clears only its bit");
    ack = 4'b0100; set_mem = 1; @(negedge clk) begin ack = '0; set_mem = 0; end
    check(pending == 4'b0110, "set and ack together keep request");
    ack = 4'b0110; @(negedge clk) ack = '0;
    check(pending == 4'b0000, "all cleared");
    // refresh every 4 slots
    for (int s = 0; s < 16; s++) begin
      repeat (7) @(negedge clk);
      slot_end = 1; @(negedge clk) slot_end = 0;
      if (pending[OP_REFRESH]) begin
        refs++;
        check(s % 4 == 3, "refresh on 4th slot");
        ack = 4'b0001; @(negedge clk) ack = '0;
      end
    end
    check(refs == 4, "4 refresh requests in 16 slots");
    // random sets and acks against a reference model (no slot ticks, so no
    // refresh requests arrive)
    begin
      req_t model;
      model = pending;
      for (int k = 0; k < 2000; k++) begin
        set_wr = 1'($urandom); set_mem = 1'($urandom); set_disp = 1'($urandom);
        ack = req_t'($urandom);
        model = (model & ~ack) | {set_wr, set_mem, set_disp, 1'b0};
        @(negedge clk);
        check(pending == model, "random set/ack matches reference");
      end
      set_wr = 0; set_mem = 0; set_disp = 0; ack = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
