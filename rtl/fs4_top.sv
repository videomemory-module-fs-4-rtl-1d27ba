// fs4_top: FS-4 frame store for the IBM PC XT/AT bus.
//
// Four 256 x 256 x 8-bit image planes in dual-port VRAM (each plane two
// MB81461 chips, external to this module), a 1-bit cursor layer kept by a
// uPD7220A graphics display controller (external) in a 16K x 8 memory, and
// the control logic that shares the VRAM between three masters:
//   * the camera digitizer, which streams each line into the serial access
//     memory (SAM) of the write plane and has it copied into a RAM row by a
//     write transfer;
//   * the PC, which sees the plane chosen by the control word as a 64 KB
//     memory block and is held in wait states while its cycle is run;
//   * the display, which has one RAM row copied into the SAM of the display
//     plane before each TV line (display transfer) and shifts it out at
//     7.5 MHz to a 9-bit video DAC together with the cursor bit;
// plus refresh. Requests are latched in request_reg, chosen by
// priority_decoder and executed by cycle_generator, one per 1.875 MHz slot;
// adr_mux supplies the address of each cycle type and vram_plane_sel routes
// the strobes to the chosen plane.
//
// Bidirectional buses are split into *_in / *_out (and *_oe) ports. All
// logic runs on the 15 MHz clock clk; rst is synchronous and active high.
// The VRAM pins are vram_*: RAS/CAS/SC/SE per plane, the rest shared. The
// GDC pins are gdc_*; the GDC is assumed to be clocked from clk.
module fs4_top
  import fs4_pkg::*;
#(
  parameter logic [9:0]  IO_BASE       = 10'h300,
  parameter logic [3:0]  MEM_SEG       = 4'hD,
  parameter int unsigned REFRESH_SLOTS = 16
) (
  input  logic            clk,
  input  logic            rst,
  // PC bus
  input  logic [19:0]     pc_a,
  input  logic [7:0]      pc_d_in,
  output logic [7:0]      pc_d_out,
  output logic            pc_d_oe,
  input  logic            ior_n,
  input  logic            iow_n,
  input  logic            memr_n,
  input  logic            memw_n,
  input  logic            aen,
  output logic            iochrdy,
  // graphics display controller
  output logic            gdc_rd_n,
  output logic            gdc_wr_n,
  output logic            gdc_a0,
  output logic [7:0]      gdc_d_out,
  input  logic [7:0]      gdc_d_in,
  input  logic            gdc_hsync,
  input  logic            gdc_vsync,
  input  logic            gdc_blank,
  input  logic [13:0]     gdc_addr,
  input  logic            gdc_mem_we_n,
  input  logic [7:0]      gdc_mem_wdata,
  output logic [7:0]      gdc_mem_rdata,
  output logic            gdc_load,
  // VRAM planes
  output logic [3:0]      vram_ras_n,
  output logic [3:0]      vram_cas_n,
  output logic            vram_troe_n,
  output logic            vram_we_n,
  output logic [7:0]      vram_a,
  output logic [7:0]      vram_qd_out,
  input  logic [3:0][7:0] vram_qd_in,
  output logic [3:0]      vram_sc,
  output logic [3:0]      vram_se_n,
  input  logic [3:0][7:0] vram_sd_in,
  output logic [7:0]      cam_sd,
  // digitizer connector
  input  logic [7:0]      cam_d,
  input  logic            efv,
  input  logic            elv,
  input  logic            edv,
  output logic            osb_frame,
  // video output
  output real             video_out,
  output logic            csync
);

  logic [2:0]  phase;
  logic        slot_end, pix_clk, pix_ce;
  isr_t        isr;
  logic        mem_req, mem_we, rd_latch, mem_done;
  logic [15:0] mem_addr;
  logic [7:0]  vram_rdata;
  logic        wr_req, line_clr, line_inc, capture, sc_cam, osb0;
  logic [7:0]  wr_row, disp_row, video;
  logic        disp_req, sc_disp, active, cursor_bit;
  req_t        pending, grant, ack;
  logic        valid, busy;
  op_e         op, cur_op;
  vram_ctrl_t  ctrl;

  clock_gen u_clk (
    .clk, .rst, .phase, .slot_end, .pix_clk, .pix_ce
  );

  pc_interface #(.IO_BASE(IO_BASE), .MEM_SEG(MEM_SEG)) u_if (
    .clk, .rst, .pc_a, .pc_d_in, .pc_d_out, .pc_d_oe, .ior_n, .iow_n,
    .memr_n, .memw_n, .aen, .iochrdy, .gdc_rd_n, .gdc_wr_n, .gdc_a0,
    .gdc_d_in, .gdc_d_out, .isr, .osb0, .mem_req, .mem_we, .mem_addr,
    .vram_wdata(vram_qd_out), .vram_rdata, .rd_latch, .mem_done
  );

  camera_ctrl u_cam (
    .clk, .rst, .efv, .elv, .edv, .wr_req, .line_clr, .line_inc, .capture,
    .sc_cam, .osb0
  );

  line_counter #(.W(8)) u_line (
    .clk, .rst, .clear(line_clr), .inc(line_inc), .row(wr_row)
  );

  display_ctrl u_disp (
    .clk, .rst, .hsync(gdc_hsync), .vsync(gdc_vsync), .blank(gdc_blank),
    .gdc_addr, .pix_clk, .disp_req, .disp_row, .sc_disp, .active, .csync
  );

  request_reg #(.REFRESH_SLOTS(REFRESH_SLOTS)) u_req (
    .clk, .rst, .set_wr(wr_req), .set_mem(mem_req), .set_disp(disp_req),
    .slot_end, .ack, .pending
  );

  priority_decoder u_pri (
    .pending, .valid, .op, .grant
  );

  cycle_generator u_cyc (
    .clk, .rst, .phase, .slot_end, .valid, .op, .grant, .mem_we, .ack,
    .cur_op, .busy, .ctrl, .rd_latch, .mem_done
  );

  adr_mux u_adr (
    .op(cur_op), .row_sel(ctrl.row), .pc_addr(mem_addr), .wr_row, .disp_row,
    .a(vram_a)
  );

  vram_plane_sel u_sel (
    .op(cur_op), .ctrl, .isr, .capture, .sc_cam, .sc_disp, .sd_in(vram_sd_in),
    .ras_n(vram_ras_n), .cas_n(vram_cas_n), .sc(vram_sc), .se_n(vram_se_n),
    .video
  );

  cursor_sram #(.WORDS(16384)) u_cur (
    .clk, .addr(gdc_addr), .we_n(gdc_mem_we_n), .wdata(gdc_mem_wdata),
    .rdata(gdc_mem_rdata)
  );

  video_serializer u_ser (
    .clk, .rst, .pix_ce, .active, .data(gdc_mem_rdata), .load(gdc_load),
    .cursor_bit
  );

  video_dac u_dac (
    .video, .cursor(cursor_bit), .sync(csync), .blank(!active),
    .vout(video_out)
  );

  assign vram_troe_n = ctrl.troe_n;
  assign vram_we_n   = ctrl.we_n;
  assign vram_rdata  = vram_qd_in[isr.mp];
  assign cam_sd      = cam_d;
  assign osb_frame   = osb0;

endmodule
