// tb_fs4_top: end-to-end test of the frame store at its default parameters.
//
// Four vram_model planes hang on the VRAM pins; the testbench plays the PC,
// the camera digitizer and the GDC (video timing, cursor-layer writes).
// Sequence, with the video timing running all the time:
//   1. PC writes the control word (camera plane 1, display plane 2, PC
//      plane 2) and fills rows 0-7 of plane 2 through the memory block;
//      the cursor layer is loaded with a pattern.
//   2. The camera sends a full 256 x 256 frame into plane 1 at the top
//      rate of 15 MB/s while the PC
//      keeps writing plane 2 and polls the OSB frame bit.
//   3. The PC maps plane 1 and reads the whole 64 KB back.
//   4. Display lines 0-7 of plane 2 are checked at the SAM output and the
//      cursor bit stream and DAC level are checked on the way.
//   5. The display page is switched to plane 1 and the captured image is
//      checked on the display lines 0-7.
// Counted mechanisms: dummy write transfer, line write transfers, display
// transfers, display-page switch, refresh, PC reads and writes with wait states, request
// conflicts resolved by priority. Latencies are checked: write transfer
// within 2 slots of ELV end, refresh gaps below 15.6 us, PC wait bounded.
module tb_fs4_top;
  import fs4_pkg::*;

  localparam int H_TOTAL = 960;   // 64 us line at 15 MHz
  localparam int H_SYNC  = 70;
  localparam int H_START = 200;   // first active clock
  localparam int H_ACT   = 512;   // 256 pixels at 7.5 MHz
  localparam int V_TOTAL = 40;    // short field: 40 lines

  logic clk = 0, rst = 1;
  logic [19:0] pc_a = 0;
  logic [7:0] pc_d_in = 0, pc_d_out, gdc_d_out, gdc_mem_rdata, vram_a, vram_qd_out, cam_sd;
  logic pc_d_oe, ior_n = 1, iow_n = 1, memr_n = 1, memw_n = 1, aen = 0, iochrdy;
  logic gdc_rd_n, gdc_wr_n, gdc_a0, gdc_load;
  logic [7:0] gdc_d_in = 8'hA5;
  logic gdc_hsync = 0, gdc_vsync = 0, gdc_blank = 1, gdc_mem_we_n = 1;
  logic [13:0] gdc_addr = 0;
  logic [7:0] gdc_mem_wdata = 0;
  logic [3:0] vram_ras_n, vram_cas_n, vram_sc, vram_se_n;
  logic vram_troe_n, vram_we_n;
  logic [3:0][7:0] vram_qd_in, vram_sd_in;
  logic [7:0] cam_d = 0;
  logic efv = 0, elv = 0, edv = 0, osb_frame, csync;
  real video_out;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_wait_rd = 0, n_wait_wr = 0, max_wait = 0;
  int n_disp_checked = 0, n_cursor_checked = 0, n_dac_checked = 0;
  int max_wr_lat = 0, max_ref_gap = 0;
  bit gdc_run = 0;
  int disp_check = 0;   // plane whose display output is checked, 0 = none
  int n_disp1_checked = 0;

  fs4_top dut (.*);

  for (genvar p = 0; p < 4; p++) begin : g_plane
    vram_model u_vram (
      .ras_n(vram_ras_n[p]), .cas_n(vram_cas_n[p]), .troe_n(vram_troe_n),
      .we_n(vram_we_n), .a(vram_a), .qd_in(vram_qd_out), .qd_out(vram_qd_in[p]),
      .sc(vram_sc[p]), .sd_in(cam_sd), .sd_out(vram_sd_in[p])
    );
  end

  always #33.333ns clk = ~clk;   // 15 MHz

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [7:0] cam_pix(int x, int y);
    return 8'(x * 3 + y * 7 + (x >> 2) * y);
  endfunction
  function automatic logic [7:0] pc_pix(int x, int y);
    return 8'(x ^ (y * 29) ^ 8'h3c);
  endfunction
  function automatic logic [7:0] cur_byte(int addr);
    return 8'(addr * 13 + 7);
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- mechanism monitors
  always @(posedge clk) if (!rst) begin
    if (dut.u_cyc.ack != 0 && $countones(dut.u_req.pending) > 1) begin
      n_conflict++;
      check(dut.u_cyc.ack == dut.u_pri.grant && dut.u_pri.op ==
            op_e'($clog2(int'(dut.u_req.pending) + 1) - 1), "highest pending request served");
    end
  end

  // refresh gaps on plane 0 (all planes are refreshed together)
  int last_ref = 0;
  always @(negedge vram_ras_n[0]) if (!vram_cas_n[0]) begin
    if (last_ref != 0 && cyc - last_ref > max_ref_gap) max_ref_gap = cyc - last_ref;
    last_ref = cyc;
  end

  // write-transfer latency from ELV end
  int elv_fall = 0;
  always @(negedge elv) elv_fall = cyc;
  always @(negedge vram_ras_n[1]) if (!vram_troe_n && !vram_we_n && elv_fall != 0) begin
    if (cyc - elv_fall > max_wr_lat) max_wr_lat = cyc - elv_fall;
    elv_fall = 0;
  end

  // ------------------------------------------------------------- GDC model
  // Video timing, display address at HSYNC, cursor-memory scan on load.
  int line = 0;
  initial begin
    wait (gdc_run);
    forever begin
      for (int h = 0; h < H_TOTAL; h++) begin
        @(posedge clk);
        gdc_hsync <= (h < H_SYNC);
        gdc_vsync <= (line >= V_TOTAL - 2);
        gdc_blank <= !(h >= H_START && h < H_START + H_ACT && line < 32);
        if (h == 0) gdc_addr <= {1'b0, 8'(line), 5'd0};
        else if (gdc_load) gdc_addr <= gdc_addr + 1'b1;
      end
      line = (line + 1) % V_TOTAL;
    end
  end

  // display check: pixels shifted out of plane 2's SAM on lines 0..7
  int pix_x = 0, disp_line = 0;
  logic [7:0] cur_bits_exp [$];
  always @(posedge vram_sc[2]) begin
    if (disp_check == 2 && disp_line < 8) begin
      check(vram_sd_in[2] == pc_pix(pix_x, disp_line), "displayed pixel = plane 2 contents");
      n_disp_checked++;
    end
    pix_x++;
  end
  // after the display-page switch: the captured camera image on plane 1
  int pix1_x = 0;
  always @(posedge vram_sc[1]) begin
    if (disp_check == 1 && disp_line < 8) begin
      check(vram_sd_in[1] == cam_pix(pix1_x, disp_line), "displayed pixel = captured image");
      n_disp1_checked++;
    end
    pix1_x++;
  end
  always @(posedge gdc_hsync) begin
    pix_x = 0;
    pix1_x = 0;
    disp_line = int'(gdc_addr[12:5]);
  end

  // cursor bit stream and DAC level
  int cbit = 0;
  always @(posedge clk) if (dut.pix_ce && dut.active && disp_check != 0 && disp_line < 8) begin
    #1;
    begin
      automatic int ba = disp_line * 32 + cbit / 8;
      check(dut.cursor_bit == cur_byte(ba)[7 - cbit % 8], "cursor bit from cursor layer");
      n_cursor_checked++;
      cbit = (cbit + 1) % 256;
    end
  end
  always @(posedge gdc_hsync) cbit = 0;
  always @(posedge clk) begin
    #2;
    if (disp_check != 0 && dut.active && !csync) begin
      automatic real e = 0.3 + 0.7 * real'({dut.cursor_bit, dut.video}) / 511.0;
      check(video_out > e - 1e-6 && video_out < e + 1e-6, "DAC level");
      n_dac_checked++;
    end
  end

  // ---------------------------------------------------------------- PC bus
  task automatic io_write(logic [9:0] a, logic [7:0] d);
    @(negedge clk) begin pc_a = 20'(a); pc_d_in = d; end
    @(negedge clk) iow_n = 0;
    repeat (4) @(negedge clk);
    iow_n = 1;
    @(negedge clk);
  endtask

  task automatic io_read(logic [9:0] a, output logic [7:0] d);
    @(negedge clk) pc_a = 20'(a);
    @(negedge clk) ior_n = 0;
    repeat (3) @(negedge clk);
    d = pc_d_out;
    ior_n = 1;
    @(negedge clk);
  endtask

  task automatic mem_access(logic [15:0] off, bit wr, logic [7:0] wd, output logic [7:0] rd);
    int w = 0;
    @(negedge clk) begin pc_a = {4'hD, off}; pc_d_in = wd; end
    @(negedge clk) if (wr) memw_n = 0; else memr_n = 0;
    #1;
    if (!iochrdy) begin
      if (wr) n_wait_wr++; else n_wait_rd++;
    end
    while (!iochrdy && w < 200) begin @(negedge clk); w++; end
    if (w > max_wait) max_wait = w;
    rd = pc_d_out;
    memr_n = 1; memw_n = 1;
    repeat (3) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- camera
  task automatic send_frame();
    efv = 1;
    repeat (20) @(negedge clk);
    for (int y = 0; y < 256; y++) begin
      elv = 1;
      #400ns;
      for (int x = 0; x < 256; x++) begin
        cam_d = cam_pix(x, y);
        #10ns edv = 1;      // 15 MB/s: one pixel per 66.7 ns
        #33ns edv = 0;
        #23.667ns;
      end
      #100ns elv = 0;
      #6us;
    end
    #2us efv = 0;
  endtask

  // ------------------------------------------------------------ main flow
  initial begin
    logic [7:0] d;
    int errs;
    repeat (4) @(negedge clk);
    rst = 0;
    // cursor layer contents, written by the GDC before display starts
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk) begin gdc_addr = 14'(i); gdc_mem_wdata = cur_byte(i); gdc_mem_we_n = 0; end
    end
    @(negedge clk) gdc_mem_we_n = 1;
    gdc_run = 1;

    // GDC ports
    io_read(10'h301, d);
    check(d == 8'hA5, "GDC FIFO read reaches PC");
    fork
      io_write(10'h300, 8'h4b);
      begin repeat (3) @(negedge clk); check(!gdc_wr_n && !gdc_a0 && gdc_d_out == 8'h4b, "GDC parameter write"); end
    join

    // 1. control word: WP=1 DP=2 MP=2
    io_write(10'h302, {2'd1, 2'd2, 2'd2, 2'b00});
    io_read(10'h302, d);
    check(d == 8'h00, "OSB idle before frame");
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 256; x++) mem_access({8'(y), 8'(x)}, 1, pc_pix(x, y), d);

    // 2. frame capture with concurrent PC traffic
    fork
      send_frame();
      begin
        repeat (200) @(negedge clk);
        io_read(10'h302, d);
        check(d == 8'h01, "OSB shows frame in progress");
        for (int k = 0; k < 2000; k++) begin
          automatic int x = k % 256, y = 8 + (k / 256);
          mem_access({8'(y), 8'(x)}, 1, pc_pix(x, y), d);
        end
        do io_read(10'h302, d); while (d[0]);
      end
    join
    io_read(10'h302, d);
    check(d == 8'h00, "OSB clear after frame");
    check(g_plane[1].u_vram.n_wr_xfer == 257, "257 write transfers (dummy + 256 lines)");
    check(g_plane[0].u_vram.n_wr_xfer == 0 && g_plane[2].u_vram.n_wr_xfer == 0,
          "write transfers only to camera plane");

    // 3. read the captured frame through the PC window
    io_write(10'h302, {2'd1, 2'd2, 2'd1, 2'b00});
    errs = 0;
    for (int y = 0; y < 256; y++) begin
      automatic int row_errs = 0;
      for (int x = 0; x < 256; x++) begin
        mem_access({8'(y), 8'(x)}, 0, 8'h00, d);
        if (d != cam_pix(x, y)) row_errs++;
      end
      check(row_errs == 0, "captured row read back by PC");
      errs += row_errs;
    end
    if (errs) $display("frame errors: %0d", errs);
    // plane 2 still holds what the PC wrote
    io_write(10'h302, {2'd1, 2'd2, 2'd2, 2'b00});
    errs = 0;
    for (int k = 0; k < 512; k++) begin
      mem_access({8'(k / 256 + 8), 8'(k)}, 0, 8'h00, d);
      if (d != pc_pix(k % 256, k / 256 + 8)) errs++;
    end
    check(errs == 0, "PC data in plane 2 intact");

    // 4. display check over a full field
    @(posedge gdc_vsync);
    disp_check = 2;
    @(posedge gdc_vsync);
    disp_check = 0;

    check(g_plane[1].u_vram.n_rd_xfer == 0, "no display transfer into camera plane before the switch");

    // 5. display-page switch: show the captured plane 1. Its SAM is still in
    // input mode from the capture; the first display transfer turns it round.
    io_write(10'h302, {2'd0, 2'd1, 2'd2, 2'b00});
    @(posedge gdc_vsync);
    disp_check = 1;
    @(posedge gdc_vsync);
    disp_check = 0;

    // mechanism coverage
    $display("dummy+line write transfers %0d, display transfers %0d, refresh %0d",
             g_plane[1].u_vram.n_wr_xfer, g_plane[2].u_vram.n_rd_xfer, g_plane[0].u_vram.n_refresh);
    $display("PC writes %0d, PC reads %0d, waits rd %0d wr %0d, max wait %0d clk",
             g_plane[2].u_vram.n_write, g_plane[1].u_vram.n_read, n_wait_rd, n_wait_wr, max_wait);
    $display("conflicts %0d, max write-transfer latency %0d clk, max refresh gap %0d clk",
             n_conflict, max_wr_lat, max_ref_gap);
    $display("display pixels plane 2 %0d, after page switch %0d, cursor bits %0d, DAC samples %0d",
             n_disp_checked, n_disp1_checked, n_cursor_checked, n_dac_checked);
    check(g_plane[2].u_vram.n_rd_xfer > 0, "display transfers happened");
    check(g_plane[0].u_vram.n_refresh > 0 && g_plane[0].u_vram.n_refresh == g_plane[3].u_vram.n_refresh,
          "refresh reaches all planes");
    check(n_wait_rd > 0 && n_wait_wr > 0, "PC wait states on read and write");
    check(n_conflict > 0, "request conflicts resolved");
    check(n_disp_checked == 8 * 256, "8 display lines of plane 2 checked");
    check(n_disp1_checked == 8 * 256, "8 display lines of the captured plane checked");
    check(g_plane[1].u_vram.n_rd_xfer > 0, "display transfers follow the page switch");
    check(n_cursor_checked == 2 * 8 * 256, "cursor bits checked");
    check(n_dac_checked > 0, "DAC levels checked");
    check(max_wr_lat <= 24, "write transfer within 2 slots of ELV end");
    check(max_ref_gap > 0 && max_ref_gap < 234, "refresh more often than 15.6 us");
    check(max_wait <= 40, "PC wait bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
