// display_ctrl: display-side control around the graphics display controller.
//
// The uPD7220A GDC makes the video timing (HSYNC, VSYNC, BLANK) and scans
// the cursor memory. As on the original module its address also gives the
// row of the frame buffer to be copied into the SAM by a display transfer,
// and that transfer is requested ahead of the line, here at the rising edge
// of HSYNC. In the cursor memory a 256-pixel line is 32 bytes, so the image
// row is GDC word address bits 12..5 (layer select is bit 13); that mapping
// and the choice of HSYNC as trigger are this design's own.
// During active display (BLANK low) the SAM of the displayed plane is
// shifted by a 7.5 MHz clock. Composite sync for the DAC is HSYNC OR VSYNC.
//
// All GDC inputs are taken as synchronous to the 15 MHz clock (the GDC is
// clocked from the same generator). disp_req is a one-clock pulse one clock
// after the HSYNC rising edge; disp_row is valid with it.
module display_ctrl (
  input  logic        clk,
  input  logic        rst,
  input  logic        hsync,
  input  logic        vsync,
  input  logic        blank,
  input  logic [13:0] gdc_addr,
  input  logic        pix_clk,
  output logic        disp_req,
  output logic [7:0]  disp_row,
  output logic        sc_disp,
  output logic        active,
  output logic        csync
);

  logic hs_p;

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_p     <= 1'b0;
      disp_req <= 1'b0;
      disp_row <= '0;
      active   <= 1'b0;
    end else begin
      hs_p     <= hsync;
      disp_req <= hsync & ~hs_p;
      if (hsync & ~hs_p) disp_row <= gdc_addr[12:5];
      active   <= ~blank;
    end
  end

  assign sc_disp = pix_clk & active;
  assign csync   = hsync | vsync;

endmodule
