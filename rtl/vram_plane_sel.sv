// vram_plane_sel: distributes the cycle strobes and serial clocks to the
// four VRAM planes.
//
// On the original board a 74S287 PROM (256 x 4) decides which planes take
// part in a cycle. Here the PROM is a 256-entry table computed by a function:
// its address is {operation, MP, DP, WP} (8 bits) and its 4-bit word has one
// enable per plane. A PC memory operation goes to the plane MP mapped into
// PC memory, a write transfer to the camera plane WP, a display transfer to
// the displayed plane DP, and refresh to all four planes. That selection
// follows the original control word; the address layout of the PROM is this
// design's choice. An enabled plane receives RAS and CAS, the others keep
// them high. TR/OE and WE are common to all planes.
//
// The SAM ports are steered here too (this design's choice): while a frame
// is captured the WP plane gets the camera data strobe as shift clock, the
// DP plane gets the 7.5 MHz display shift clock (the camera wins if both are
// the same plane), and the SAM output of the DP plane is passed to the DAC.
//
// RAS/CAS outputs are combinational from registered inputs; the shift clocks
// are combinational from the clock sources.
module vram_plane_sel
  import fs4_pkg::*;
(
  input  op_e             op,
  input  vram_ctrl_t      ctrl,
  input  isr_t            isr,
  input  logic            capture,
  input  logic            sc_cam,
  input  logic            sc_disp,
  input  logic [3:0][7:0] sd_in,
  output logic [3:0]      ras_n,
  output logic [3:0]      cas_n,
  output logic [3:0]      sc,
  output logic [3:0]      se_n,
  output logic [7:0]      video
);

  // PROM contents: address {op[1:0], mp[1:0], dp[1:0], wp[1:0]}.
  function automatic logic [3:0] prom_word(logic [7:0] addr);
    logic [1:0] page;
    unique case (op_e'(addr[7:6]))
      OP_MEMORY:  page = addr[5:4];
      OP_DISPLAY: page = addr[3:2];
      OP_WRITE:   page = addr[1:0];
      default:    page = 2'd0;
    endcase
    if (op_e'(addr[7:6]) == OP_REFRESH) return 4'b1111;
    return 4'(4'b0001 << page);
  endfunction

  logic [3:0] prom [256];
  initial begin
    for (int i = 0; i < 256; i++) prom[i] = prom_word(8'(i));
  end

  logic [3:0] en;
  assign en = prom[{op, isr.mp, isr.dp, isr.wp}];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      ras_n[p] = ctrl.ras_n | ~en[p];
      cas_n[p] = ctrl.cas_n | ~en[p];
      if (capture && isr.wp == 2'(p)) begin
        sc[p]   = sc_cam;
        se_n[p] = 1'b1;
      end else if (isr.dp == 2'(p)) begin
        sc[p]   = sc_disp;
        se_n[p] = 1'b0;
      end else begin
        sc[p]   = 1'b0;
        se_n[p] = 1'b1;
      end
    end
  end

  assign video = sd_in[isr.dp];

endmodule
