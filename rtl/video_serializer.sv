// video_serializer: turns cursor-memory bytes into the serial cursor bit.
//
// During active display one byte of the cursor layer is loaded every eight
// pixels and shifted out MSB first at the 7.5 MHz pixel rate. The counter
// restarts at the beginning of each active line, so the first byte of a
// line is loaded at its first pixel. load marks the pixel at which the byte
// on data is taken; the GDC then moves to the next byte.
//
// Timing: pix_ce is the 7.5 MHz tick; cursor_bit changes on the clock edge
// of each tick, so the bit of a pixel is valid from the tick after load.
module video_serializer (
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_ce,
  input  logic       active,
  input  logic [7:0] data,
  output logic       load,
  output logic       cursor_bit
);

  logic [2:0] cnt;
  logic [6:0] sh;

  assign load = pix_ce & active & (cnt == 3'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      sh         <= '0;
      cursor_bit <= 1'b0;
    end else if (pix_ce) begin
      if (!active) begin
        cnt        <= '0;
        cursor_bit <= 1'b0;
      end else begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd0) begin
          cursor_bit <= data[7];
          sh         <= data[6:0];
        end else begin
          cursor_bit <= sh[6];
          sh         <= {sh[5:0], 1'b0};
        end
      end
    end
  end

endmodule
