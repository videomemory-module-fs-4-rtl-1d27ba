// clock_gen: timing generator of the frame store.
//
// The board runs from a 15 MHz crystal. All VRAM cycles are synchronous to a
// 1.875 MHz cycle clock (15 MHz / 8) and the serial video is shifted at
// 7.5 MHz (15 MHz / 2); both rates are the original module's. Here the
// 1.875 MHz clock is not a separate clock but an 8-phase counter on the
// 15 MHz clock: each period of it is one memory-cycle "slot".
//
// Interface: clk (15 MHz), rst (synchronous, active high).
//   phase    0..7, the position inside the current slot
//   slot_end high during phase 7, the last clock of a slot
//   pix_clk  7.5 MHz square wave (high on odd phases)
//   pix_ce   high for one 15 MHz clock per 7.5 MHz period (odd phases)
module clock_gen
  import fs4_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output logic [2:0] phase,
  output logic       slot_end,
  output logic       pix_clk,
  output logic       pix_ce
);

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 3'd1;
  end

  assign slot_end = (phase == 3'(PHASES - 1));
  assign pix_clk  = phase[0];
  assign pix_ce   = phase[0];

endmodule
