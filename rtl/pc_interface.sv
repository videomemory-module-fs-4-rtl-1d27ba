// pc_interface: PC XT/AT bus interface of the frame store.
//
// Separates the PC bus from the module and decodes:
//   * four adjacent I/O ports at IO_BASE (set by jumper on the original
//     board). Port use, this design's own assignment of the original port
//     list:
//       base+0  read: GDC status           write: GDC parameter
//       base+1  read: GDC FIFO (data)      write: GDC command
//       base+2  read: Output Status Buffer write: Input Status Register
//       base+3  unused
//     Ports 0 and 1 follow the uPD7220A A0 convention; the GDC read and write
//     strobes are gated combinationally from IOR/IOW, as an address decoder
//     would do it.
//   * the 64 KB memory block MEM_SEG (A19..A16, jumper-set) into which the
//     plane chosen by ISR.MP is mapped. A memory read or write there raises
//     a PC-operation request and holds IOCHRDY low (wait states) until the
//     cycle generator reports the end of the cycle; read data is latched on
//     rd_latch and held on the bus until the PC ends the strobe.
// Only bit 0 of the OSB is meaningful (frame transfer in progress).
//
// IOR/IOW/MEMR/MEMW are synchronised with two flip-flops; IOCHRDY and the
// read-data enable are combinational from the bus so that the wait starts
// within the same bus cycle. A memory request is raised on the rising edge
// of the synchronised strobe. The interface re-arms one to two clocks after
// the strobe ends (first synchroniser stage), well inside the idle time
// between two PC bus cycles, so a following access always gets its own
// wait state. The ISR is written when the synchronised IOW
// becomes active. Reset clears the ISR (all pages 0).
module pc_interface
  import fs4_pkg::*;
#(
  parameter logic [9:0] IO_BASE = 10'h300,
  parameter logic [3:0] MEM_SEG = 4'hD
) (
  input  logic        clk,
  input  logic        rst,
  // PC bus
  input  logic [19:0] pc_a,
  input  logic [7:0]  pc_d_in,
  output logic [7:0]  pc_d_out,
  output logic        pc_d_oe,
  input  logic        ior_n,
  input  logic        iow_n,
  input  logic        memr_n,
  input  logic        memw_n,
  input  logic        aen,
  output logic        iochrdy,
  // GDC
  output logic        gdc_rd_n,
  output logic        gdc_wr_n,
  output logic        gdc_a0,
  input  logic [7:0]  gdc_d_in,
  output logic [7:0]  gdc_d_out,
  // control / status
  output isr_t        isr,
  input  logic        osb0,
  // PC memory operation
  output logic        mem_req,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [7:0]  vram_wdata,
  input  logic [7:0]  vram_rdata,
  input  logic        rd_latch,
  input  logic        mem_done
);

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_DONE} mstate_e;

  logic       io_hit, mem_hit, mem_strobe;
  logic [1:0] port;
  logic [2:0] iow_q;
  logic [2:0] mem_q;
  logic       mem_s;
  logic [7:0] rdata_q;
  mstate_e    mst;

  assign io_hit     = !aen && (pc_a[9:2] == IO_BASE[9:2]);
  assign mem_hit    = !aen && (pc_a[19:16] == MEM_SEG);
  assign port       = pc_a[1:0];
  assign mem_strobe = mem_hit && (!memr_n || !memw_n);

  // GDC strobes
  assign gdc_a0    = pc_a[0];
  assign gdc_rd_n  = !(io_hit && !ior_n && port[1] == 1'b0);
  assign gdc_wr_n  = !(io_hit && !iow_n && port[1] == 1'b0);
  assign gdc_d_out = pc_d_in;

  // read-data multiplexer
  always_comb begin
    pc_d_oe  = 1'b0;
    pc_d_out = '0;
    if (io_hit && !ior_n && port != 2'd3) begin
      pc_d_oe  = 1'b1;
      pc_d_out = (port == 2'd2) ? {7'd0, osb0} : gdc_d_in;
    end else if (mem_hit && !memr_n) begin
      pc_d_oe  = 1'b1;
      pc_d_out = rdata_q;
    end
  end

  // Input Status Register
  always_ff @(posedge clk) begin
    if (rst) begin
      iow_q <= '1;
      isr   <= '0;
    end else begin
      iow_q <= {iow_q[1:0], iow_n};
      if (!iow_q[1] && iow_q[2] && io_hit && port == 2'd2) isr <= isr_t'(pc_d_in);
    end
  end

  // PC memory operation with wait states
  assign mem_s      = mem_q[1];
  assign mem_addr   = pc_a[15:0];
  assign vram_wdata = pc_d_in;
  assign iochrdy    = !(mem_strobe && mst != M_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_q   <= '0;
      mst     <= M_IDLE;
      mem_req <= 1'b0;
      mem_we  <= 1'b0;
      rdata_q <= '0;
    end else begin
      mem_q   <= {mem_q[1:0], mem_strobe};
      mem_req <= 1'b0;
      if (rd_latch) rdata_q <= vram_rdata;
      unique case (mst)
        M_IDLE: if (mem_s && !mem_q[2]) begin
          mem_req <= 1'b1;
          mem_we  <= !memw_n;
          mst     <= M_WAIT;
        end
        M_WAIT: if (mem_done) mst <= M_DONE;
        M_DONE: if (!mem_q[0]) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
    end
  end

endmodule
