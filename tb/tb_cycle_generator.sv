// tb_cycle_generator: runs each operation through a slot and compares every
// strobe, phase by phase, with the expected MB81461 cycle patterns; checks
// that one cycle is taken per slot and that requests are acknowledged only
// at slot ends.
module tb_cycle_generator;
  import fs4_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] phase = 0;
  logic slot_end, valid, mem_we, busy, rd_latch, mem_done;
  op_e op, cur_op;
  req_t grant, ack;
  vram_ctrl_t ctrl;
  int checks = 0, failures = 0;

  cycle_generator dut (.*);
  always #5 clk = ~clk;
  assign slot_end = (phase == 3'd7);
  assign grant = valid ? req_t'(1 << op) : '0;

  always_ff @(posedge clk) if (!rst) phase <= phase + 1;

  // Expected outputs seen during slot phase q (decoded one phase earlier).
  // Strings are per phase 0..7 of the decode; visible one clock later.
  function automatic string pat(string name, int o, bit we);
    case (name)
      "ras": return (o == 0) ? "10000011" : "10000011";
      "cas": return (o == 0) ? "00000111" : "11100011";
      "row": return (o == 0) ? "11111111" : "11000011";
      "troe": return (o == 3 || o == 1) ? "00011111" : (o == 2 && !we) ? "11100011" : "11111111";
      "we": return (o == 3) ? "00011111" : (o == 2 && we) ? "11000011" : "11111111";
      "lat": return (o == 2 && !we) ? "00000100" : "00000000";
      "done": return (o == 2) ? "00000010" : "00000000";
      default: return "";
    endcase
  endfunction

  function automatic bit bitat(string s, int p);
    return s[p] == "1";
  endfunction

  task automatic run_op(int o, bit we);
    // present request during the slot before, accepted at its end
    @(negedge clk);
    while (phase != 3'd7) @(negedge clk);
    valid = 1; op = op_e'(o); mem_we = we;
    #1;
    checks++;
    if (ack != req_t'(1 << o)) begin failures++; $display("FAIL ack op %0d", o); end
    @(negedge clk);
    valid = 0;
    // now phase 0 of the cycle; visible output at phase q is decode of q-1
    for (int q = 1; q <= 8; q++) begin
      int p = q - 1;
      if (q < 8) @(negedge clk); else @(negedge clk);
      checks += 7;
      if (ctrl.ras_n  != bitat(pat("ras", o, we), p))  begin failures++; $display("FAIL ras op%0d p%0d", o, p); end
      if (ctrl.cas_n  != bitat(pat("cas", o, we), p))  begin failures++; $display("FAIL cas op%0d p%0d", o, p); end
      if (o != 0 && ctrl.row != bitat(pat("row", o, we), p)) begin failures++; $display("FAIL row op%0d p%0d", o, p); end
      if (ctrl.troe_n != bitat(pat("troe", o, we), p)) begin failures++; $display("FAIL troe op%0d p%0d", o, p); end
      if (ctrl.we_n   != bitat(pat("we", o, we), p))   begin failures++; $display("FAIL we op%0d p%0d", o, p); end
      if (rd_latch    != bitat(pat("lat", o, we), p))  begin failures++; $display("FAIL lat op%0d p%0d", o, p); end
      if (mem_done    != bitat(pat("done", o, we), p)) begin failures++; $display("FAIL done op%0d p%0d", o, p); end
      if (q == 1) begin
        checks++;
        if (!busy || cur_op != op_e'(o)) begin failures++; $display("FAIL cur_op %0d", o); end
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; op = OP_REFRESH; mem_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // idle: no strobes, no ack away from slot end
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (ctrl.ras_n != 1 || ctrl.cas_n != 1 || ack != 0) begin failures++; $display("FAIL idle"); end
    end
    run_op(3, 0);
    run_op(2, 0);
    run_op(2, 1);
    run_op(1, 0);
    run_op(0, 0);
    // a request in mid-slot is not acknowledged before the slot end
    while (phase != 3'd2) @(negedge clk);
    valid = 1; op = OP_MEMORY;
    checks++;
    if (ack != 0) begin failures++; $display("FAIL ack mid-slot"); end
    valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
