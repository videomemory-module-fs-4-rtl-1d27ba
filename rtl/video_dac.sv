// video_dac: behavioural model of the 9-bit video DAC (an analog part).
//
// The displayed frame-buffer pixel (8 bits, 256 grey levels) and the cursor
// layer bit form a 9-bit code {cursor, pixel}, converted to a monochrome
// video level: sync tip 0 V, black/blank 0.3 V, full scale 1.0 V. The 9-bit
// width is the original module's; the code layout, with the cursor bit as
// the most significant bit so that a cursor pixel is always brighter than
// the image, and the voltage levels are this design's choice (standard
// monochrome video levels).
//
// Combinational: vout follows the inputs.
module video_dac (
  input  logic [7:0] video,
  input  logic       cursor,
  input  logic       sync,
  input  logic       blank,
  output real        vout
);

  localparam real V_BLACK = 0.3;
  localparam real V_SPAN  = 0.7;

  always_comb begin
    if (sync)       vout = 0.0;
    else if (blank) vout = V_BLACK;
    else            vout = V_BLACK + V_SPAN * real'({cursor, video}) / 511.0;
  end

endmodule
