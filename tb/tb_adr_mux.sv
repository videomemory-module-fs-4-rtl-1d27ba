// tb_adr_mux: random check of the row/column address for every cycle type.
module tb_adr_mux;
  import fs4_pkg::*;
  op_e op;
  logic row_sel;
  logic [15:0] pc_addr;
  logic [7:0] wr_row, disp_row, a, exp;
  int checks = 0, failures = 0;

  adr_mux dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      op = op_e'(i % 4);
      row_sel = 1'($urandom);
      pc_addr = 16'($urandom);
      wr_row = 8'($urandom);
      disp_row = 8'($urandom);
      #1;
      case (i % 4)
        2: exp = row_sel ? pc_addr[15:8] : pc_addr[7:0];
        3: exp = row_sel ? wr_row : 8'd0;
        1: exp = row_sel ? disp_row : 8'd0;
        default: exp = 8'd0;
      endcase
      checks++;
      if (a !== exp) begin
        failures++;
        $display("FAIL op=%0d row=%b a=%h exp=%h", op, row_sel, a, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
