// tb_pc_interface: PC bus cycles against the interface: ISR write and OSB
// read, GDC port strobes and data, foreign addresses and AEN ignored, and
// memory reads/writes in the mapped block with IOCHRDY wait states until a
// modelled memory cycle completes, also with accesses close together.
module tb_pc_interface;
  import fs4_pkg::*;
  logic clk = 0, rst = 1;
  logic [19:0] pc_a = 0;
  logic [7:0] pc_d_in = 0, pc_d_out, gdc_d_in = 8'h5a, gdc_d_out, vram_rdata = 0;
  logic pc_d_oe, ior_n = 1, iow_n = 1, memr_n = 1, memw_n = 1, aen = 0, iochrdy;
  logic gdc_rd_n, gdc_wr_n, gdc_a0, osb0 = 0, mem_req, mem_we, rd_latch = 0, mem_done = 0;
  logic [15:0] mem_addr;
  logic [7:0] vram_wdata;
  isr_t isr;
  int checks = 0, failures = 0, n_req = 0, wait_clks = 0;

  pc_interface #(.IO_BASE(10'h300), .MEM_SEG(4'hD)) dut (.*);
  always #33 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // memory cycle model: answers a request 10 clocks later
  logic [7:0] vmem [65536];
  always @(posedge clk) if (mem_req) n_req++;
  initial begin
    forever begin
      @(posedge clk);
      if (mem_req) begin
        repeat (8) @(posedge clk);
        check(mem_addr == pc_a[15:0], "memory address from PC");
        if (mem_we) vmem[mem_addr] = vram_wdata;
        else begin
          vram_rdata <= vmem[mem_addr];
          rd_latch <= 1; @(posedge clk) rd_latch <= 0;
        end
        mem_done <= 1; @(posedge clk) mem_done <= 0;
      end
    end
  end

  task automatic io_write(logic [9:0] a, logic [7:0] d);
    @(negedge clk) begin pc_a = 20'(a); pc_d_in = d; end
    @(negedge clk) iow_n = 0;
    repeat (4) @(negedge clk);
    iow_n = 1;
    @(negedge clk);
  endtask

  task automatic io_read(logic [9:0] a, output logic [7:0] d, output logic oe);
    @(negedge clk) pc_a = 20'(a);
    @(negedge clk) ior_n = 0;
    repeat (3) @(negedge clk);
    d = pc_d_out; oe = pc_d_oe;
    ior_n = 1;
    @(negedge clk);
  endtask

  task automatic mem_cycle(logic [19:0] a, bit wr, logic [7:0] wd, output logic [7:0] rd,
                          input int gap = 4);
    int w = 0;
    @(negedge clk) begin pc_a = a; pc_d_in = wd; end
    @(negedge clk) if (wr) memw_n = 0; else memr_n = 0;
    #1;
    check(iochrdy == 0, "wait state starts at strobe");
    while (!iochrdy) begin @(negedge clk); w++; if (w > 100) break; end
    wait_clks = w;
    rd = pc_d_out;
    check(wr || pc_d_oe, "data driven on memory read");
    memr_n = 1; memw_n = 1;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d; logic oe;
    repeat (3) @(negedge clk);
    rst = 0;
    // ISR write at base+2
    io_write(10'h302, 8'b10_01_11_00);
    check(isr.wp == 2 && isr.dp == 1 && isr.mp == 3, "ISR fields");
    io_write(10'h30a, 8'h00);
    check(isr == 8'b10_01_11_00, "other port does not write ISR");
    aen = 1; io_write(10'h302, 8'h00); aen = 0;
    check(isr == 8'b10_01_11_00, "AEN blocks decoding");
    // OSB read
    osb0 = 1; io_read(10'h302, d, oe);
    check(oe && d == 8'h01, "OSB bit 0 set");
    osb0 = 0; io_read(10'h302, d, oe);
    check(oe && d == 8'h00, "OSB bit 0 clear");
    io_read(10'h303, d, oe);
    check(!oe, "port 3 unused");
    // GDC ports
    fork
      io_read(10'h300, d, oe);
      begin repeat (3) @(negedge clk); check(!gdc_rd_n && !gdc_a0 && gdc_wr_n, "GDC status read strobe"); end
    join
    check(oe && d == 8'h5a, "GDC data to PC");
    fork
      io_write(10'h301, 8'h6b);
      begin repeat (3) @(negedge clk); check(!gdc_wr_n && gdc_a0 && gdc_d_out == 8'h6b, "GDC command write strobe"); end
    join
    check(gdc_rd_n && gdc_wr_n, "GDC strobes idle");
    // memory block D0000-DFFFF
    for (int i = 0; i < 20; i++) begin
      automatic logic [15:0] off = 16'($urandom);
      automatic logic [7:0] v = 8'($urandom), r;
      automatic int n0 = n_req;
      mem_cycle({4'hD, off}, 1, v, r);
      check(n_req == n0 + 1, "one request per write");
      check(wait_clks >= 8, "write waits for the cycle");
      mem_cycle({4'hD, off}, 0, 8'h00, r);
      check(r == v, "read back through VRAM cycle");
      check(wait_clks >= 8, "read waits for the cycle");
    end
    // back-to-back accesses, strobe idle for 3 clocks (200 ns) in between
    for (int i = 0; i < 10; i++) begin
      automatic int n0 = n_req;
      logic [7:0] r;
      mem_cycle({4'hD, 16'(i * 77)}, 1, 8'(i), r, 1);
      check(n_req == n0 + 1 && wait_clks >= 8, "short-gap write gets its own cycle");
    end
    for (int i = 0; i < 10; i++) begin
      logic [7:0] r;
      mem_cycle({4'hD, 16'(i * 77)}, 0, 8'h00, r, 1);
      check(r == 8'(i), "short-gap read back");
    end
    begin
      automatic int n0 = n_req;
      @(negedge clk) pc_a = 20'hC1234;
      memr_n = 0; #1;
      check(iochrdy && !pc_d_oe, "other segment ignored");
      repeat (5) @(negedge clk);
      memr_n = 1;
      repeat (3) @(negedge clk);
      check(n_req == n0, "no request outside the block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
