// priority_decoder: fixed-priority choice among pending VRAM requests.
//
// Priority, as in the original module: write transfer (highest), PC memory
// operation, display transfer, refresh (lowest). The operation already
// running has precedence over all of them; that rule is kept by the cycle
// generator, which takes a new grant only at a slot boundary.
//
// Purely combinational. pending/grant are indexed by fs4_pkg::op_e, and
// because the op_e codes are ordered by priority the chosen operation is
// the highest set bit.
module priority_decoder
  import fs4_pkg::*;
(
  input  req_t pending,
  output logic valid,
  output op_e  op,
  output req_t grant
);

  always_comb begin
    valid = 1'b1;
    op    = OP_REFRESH;
    if      (pending[OP_WRITE])   op = OP_WRITE;
    else if (pending[OP_MEMORY])  op = OP_MEMORY;
    else if (pending[OP_DISPLAY]) op = OP_DISPLAY;
    else if (pending[OP_REFRESH]) op = OP_REFRESH;
    else                          valid = 1'b0;
    grant = valid ? req_t'(4'b0001 << op) : '0;
  end

endmodule
