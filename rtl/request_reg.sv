// request_reg: the request register of the VRAM cycle arbiter.
//
// Four requests compete for the VRAM: write transfer (camera line done),
// PC memory operation, display transfer (next TV line) and refresh. Each
// request is held in a flag from the moment its source raises it until the
// cycle generator accepts it (ack, one-hot, indexed by fs4_pkg::op_e). The
// original board latches requests asynchronously; here the sources are
// already synchronous to the 15 MHz clock and a set pulse is latched on the
// next edge. If a set and an ack of the same flag coincide, the flag stays
// set so that the new request is not lost.
//
// Refresh is the lowest priority, so it is requested more often than the
// DRAM needs: every REFRESH_SLOTS memory-cycle slots (this design's choice:
// 16 slots = 8.5 us, against about 15.6 us per row for 256 rows in 4 ms).
//
// Timing: pending follows set_* one clock later; it drops one clock after ack.
module request_reg
  import fs4_pkg::*;
#(
  parameter int unsigned REFRESH_SLOTS = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic set_wr,      // write transfer request pulse
  input  logic set_mem,     // PC memory operation request pulse
  input  logic set_disp,    // display transfer request pulse
  input  logic slot_end,    // last clock of a memory-cycle slot
  input  req_t ack,         // request accepted by the cycle generator
  output req_t pending
);

  localparam int unsigned CW = $clog2(REFRESH_SLOTS + 1);

  logic [CW-1:0] ref_cnt;
  logic          set_ref;
  req_t          set_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_cnt <= '0;
    end else if (slot_end) begin
      ref_cnt <= (ref_cnt == CW'(REFRESH_SLOTS - 1)) ? '0 : ref_cnt + 1'b1;
    end
  end

  assign set_ref = slot_end && (ref_cnt == CW'(REFRESH_SLOTS - 1));

  always_comb begin
    set_v             = '0;
    set_v[OP_WRITE]   = set_wr;
    set_v[OP_MEMORY]  = set_mem;
    set_v[OP_DISPLAY] = set_disp;
    set_v[OP_REFRESH] = set_ref;
  end

  always_ff @(posedge clk) begin
    if (rst) pending <= '0;
    else     pending <= (pending & ~ack) | set_v;
  end

endmodule
