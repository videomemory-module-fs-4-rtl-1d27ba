// adr_mux: VRAM address multiplexer.
//
// Each cycle type takes its address from a different source, as on the
// original board: a PC memory operation uses the PC address, a write
// transfer the line counter, a display transfer the row given by the
// graphics display controller, and refresh none (the VRAM counts refresh
// rows itself; zero is driven). The 16-bit PC offset is split into row
// (A15..A8, the image line) and column (A7..A0, the pixel); transfers use
// column 0 as the SAM start address. Both splits are this design's choice.
// ROW from the cycle generator selects the row or the column half.
//
// Purely combinational.
module adr_mux
  import fs4_pkg::*;
(
  input  op_e         op,
  input  logic        row_sel,
  input  logic [15:0] pc_addr,
  input  logic [7:0]  wr_row,
  input  logic [7:0]  disp_row,
  output logic [7:0]  a
);

  logic [7:0] row_a, col_a;

  always_comb begin
    unique case (op)
      OP_MEMORY:  begin row_a = pc_addr[15:8]; col_a = pc_addr[7:0]; end
      OP_WRITE:   begin row_a = wr_row;        col_a = '0;           end
      OP_DISPLAY: begin row_a = disp_row;      col_a = '0;           end
      default:    begin row_a = '0;            col_a = '0;           end
    endcase
    a = row_sel ? row_a : col_a;
  end

endmodule
