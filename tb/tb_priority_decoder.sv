// tb_priority_decoder: exhaustive check of the fixed priority
// write transfer > memory operation > display transfer > refresh.
module tb_priority_decoder;
  import fs4_pkg::*;
  req_t pending, grant;
  logic valid;
  op_e op;
  int checks = 0, failures = 0;

  priority_decoder dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exp_op;
      pending = 4'(i);
      #1;
      // reference: explicit priority list
      if (i & 8)      exp_op = 3;
      else if (i & 4) exp_op = 2;
      else if (i & 2) exp_op = 1;
      else if (i & 1) exp_op = 0;
      else            exp_op = -1;
      checks++;
      if (valid != (exp_op >= 0)) begin failures++; $display("FAIL valid %b", pending); end
      if (exp_op >= 0) begin
        checks += 2;
        if (int'(op) != exp_op) begin failures++; $display("FAIL op %b -> %0d", pending, op); end
        if (grant != req_t'(1 << exp_op)) begin failures++; $display("FAIL grant %b", pending); end
      end else begin
        checks++;
        if (grant != 0) begin failures++; $display("FAIL grant idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
