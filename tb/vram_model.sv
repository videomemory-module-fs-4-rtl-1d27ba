// vram_model: behavioural model of one frame-buffer plane, i.e. two
// MB81461-type dual-port VRAM chips side by side (64K x 8 RAM section plus a
// 256 x 8 serial access memory). Testbench use only; not synthesizable.
//
// Modelled behaviour (simplified from the dual-port DRAM conventions):
//   RAS fall with CAS already low      -> CAS-before-RAS refresh
//   RAS fall with TR/OE low            -> transfer cycle; WE low = write
//                                         transfer (SAM -> row, SAM becomes
//                                         input), WE high = read transfer
//                                         (row -> SAM, SAM becomes output)
//   otherwise                          -> RAM cycle; at CAS fall the column is
//                                         taken and the byte written (WE low)
//                                         or put on qd_out (WE high)
//   SC rising edge                     -> SAM input: stores sd_in and
//                                         advances; SAM output: advances
// The SAM pointer is set to the column address of a transfer. sd_out shows
// the SAM byte at the pointer. Counters expose how many cycles of each kind
// the plane has seen.
module vram_model (
  input  logic       ras_n,
  input  logic       cas_n,
  input  logic       troe_n,
  input  logic       we_n,
  input  logic [7:0] a,
  input  logic [7:0] qd_in,
  output logic [7:0] qd_out,
  input  logic       sc,
  input  logic [7:0] sd_in,
  output logic [7:0] sd_out
);

  logic [7:0] mem [65536];
  logic [7:0] sam [256];
  logic [7:0] row, ptr;
  bit         sam_input, cbr, xfer, xfer_wr;
  int         n_refresh, n_wr_xfer, n_rd_xfer, n_write, n_read;
  time        last_refresh;

  initial begin
    sam_input = 0; ptr = 0; qd_out = 0;
    n_refresh = 0; n_wr_xfer = 0; n_rd_xfer = 0; n_write = 0; n_read = 0;
    last_refresh = 0;
    foreach (sam[i]) sam[i] = 0;
  end

  always @(negedge ras_n) begin
    row     = a;
    cbr     = !cas_n;
    xfer    = !troe_n && cas_n;
    xfer_wr = !we_n;
    if (cbr) begin
      n_refresh++;
      last_refresh = $time;
    end
  end

  always @(negedge cas_n) begin
    if (!ras_n && !cbr) begin
      if (xfer) begin
        if (xfer_wr) begin
          for (int i = 0; i < 256; i++) mem[{row, 8'(i)}] = sam[i];
          sam_input = 1;
          n_wr_xfer++;
        end else begin
          for (int i = 0; i < 256; i++) sam[i] = mem[{row, 8'(i)}];
          sam_input = 0;
          n_rd_xfer++;
        end
        ptr = a;
      end else if (!we_n) begin
        mem[{row, a}] = qd_in;
        n_write++;
      end else begin
        qd_out = mem[{row, a}];
        n_read++;
      end
    end
  end

  always @(posedge sc) begin
    if (sam_input) sam[ptr] = sd_in;
    ptr = ptr + 1;
  end

  assign sd_out = sam[ptr];

endmodule
