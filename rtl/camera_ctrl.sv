// camera_ctrl: control of the image transfer from the digitizer.
//
// The digitizer sends 8-bit pixels with three strobes: EFV (frame valid,
// active for the whole frame), ELV (line valid, active for the 256 pixels of
// one line) and EDV (data valid, one pulse per pixel). As on the original
// module:
//   * the start of EFV requests a first write transfer whose only purpose is
//     to switch the SAM of the camera plane to input mode (dummy data);
//   * while ELV is active, EDV itself is the SAM shift clock and pushes each
//     pixel into the SAM;
//   * the falling edge of ELV requests the write transfer that copies the
//     full SAM into the RAM row given by the line counter;
//   * OSB bit 0 shows whether the frame is still in progress (EFV active).
// EFV and ELV are synchronised to the 15 MHz clock with two flip-flops;
// EDV is passed to the SAM as a clock, gated by the raw ELV and by the
// synchronised EFV. The line counter is cleared at EFV start and advanced at
// each ELV rising edge (see line_counter).
//
// Outputs wr_req, line_clr and line_inc are one-clock pulses, three clocks
// after the input edge at most.
module camera_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic efv,
  input  logic elv,
  input  logic edv,
  output logic wr_req,
  output logic line_clr,
  output logic line_inc,
  output logic capture,
  output logic sc_cam,
  output logic osb0
);

  logic [2:0] efv_q, elv_q;   // [0],[1] synchroniser, [2] previous value

  always_ff @(posedge clk) begin
    if (rst) begin
      efv_q <= '0;
      elv_q <= '0;
    end else begin
      efv_q <= {efv_q[1:0], efv};
      elv_q <= {elv_q[1:0], elv};
    end
  end

  logic efv_s, efv_p, elv_s, elv_p;
  assign efv_s = efv_q[1];
  assign efv_p = efv_q[2];
  assign elv_s = elv_q[1];
  assign elv_p = elv_q[2];

  assign capture  = efv_s;
  assign osb0     = efv_s;
  assign line_clr = efv_s & ~efv_p;
  assign line_inc = elv_s & ~elv_p & (efv_s | efv_p);
  assign wr_req   = line_clr | (~elv_s & elv_p & (efv_s | efv_p));
  assign sc_cam   = edv & elv & efv_s;

endmodule
