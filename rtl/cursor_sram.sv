// cursor_sram: memory of the 1-bit service (cursor) layer.
//
// 16K x 8 bits, the size of the original two 8K x 8 static RAMs: enough for
// two switchable 256 x 256 one-bit layers (8K bytes each), or other shapes
// such as 384 x 256 set up through the graphics display controller, which is
// the only master of this memory. Bit 7 of a byte is the leftmost pixel.
//
// Write: synchronous, on the clock edge while we_n is low.
// Read: asynchronous, rdata follows addr (static RAM behaviour).
module cursor_sram #(
  parameter int unsigned WORDS = 16384
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     we_n,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
