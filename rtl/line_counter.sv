// line_counter: write-transfer address generator.
//
// Gives the RAM row into which the SAM contents are copied after each camera
// line. As on the original board it counts ELV (line valid) pulses. This
// design sets it to all ones at the start of a frame (EFV) and increments it
// at each ELV rising edge, so line n of the frame is written to row n and the
// dummy write transfer issued at frame start addresses row 2^W-1, which the
// last line of a full frame overwrites.
//
// Interface: clear and inc are single-clock pulses from camera_ctrl; row is
// valid one clock after them. clear wins over inc.
module line_counter #(
  parameter int unsigned W = 8   // 256 lines per frame
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         inc,
  output logic [W-1:0] row
);

  always_ff @(posedge clk) begin
    if (rst || clear) row <= '1;
    else if (inc)     row <= row + 1'b1;
  end

endmodule
