// cycle_generator: VRAM cycle sequencer (the FPLA of the original board).
//
// Every 1.875 MHz period is one memory-cycle slot of 8 phases of the 15 MHz
// clock. On the last clock of a slot the generator takes the operation chosen
// by the priority decoder (if any), acknowledges its request and runs it
// during the whole next slot. A running cycle is therefore never cut short,
// which is the "executed operation has the highest priority" rule.
//
// The strobe pattern of each operation is a decode of (operation, phase), as
// an FPLA would do it, followed by output registers, so every output appears
// one 15 MHz clock after the phase it is decoded in. The pattern is this
// design's own; it follows MB81461 conventions:
//   phase          0  1  2  3  4  5  6  7
//   ROW (row addr) 1  1  0  0  0  0  1  1   (0 = column address)
//   RAS_n          1  0  0  0  0  0  1  1
//   CAS_n          1  1  1  0  0  0  1  1   (refresh: 0 0 0 0 0 1 1 1)
//   TR/OE_n        transfers: low in 0-2 (transfer selected at RAS fall)
//                  PC read:   low in 3-5 (output enable)
//   WE_n           write transfer: low in 0-2 (SAM -> RAM)
//                  PC write: low in 2-5 (early write)
//   rd_latch       PC read: phase 5     mem_done  PC operation: phase 6
// Refresh is CAS-before-RAS so the chip's own row counter is used.
//
// Interface: phase/slot_end from clock_gen; valid/op/grant from the priority
// decoder; mem_we tells a PC write from a read. ack clears the accepted
// request (combinational, during slot_end). cur_op and busy name the
// operation of the slot in progress.
module cycle_generator
  import fs4_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] phase,
  input  logic       slot_end,
  input  logic       valid,
  input  op_e        op,
  input  req_t       grant,
  input  logic       mem_we,
  output req_t       ack,
  output op_e        cur_op,
  output logic       busy,
  output vram_ctrl_t ctrl,
  output logic       rd_latch,
  output logic       mem_done
);

  vram_ctrl_t dec;
  logic       dec_latch, dec_done;

  assign ack = slot_end ? grant : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      cur_op <= OP_REFRESH;
    end else if (slot_end) begin
      busy <= valid;
      if (valid) cur_op <= op;
    end
  end

  // FPLA: (busy, cur_op, phase, mem_we) -> strobes
  always_comb begin
    dec       = CTRL_IDLE;
    dec_latch = 1'b0;
    dec_done  = 1'b0;
    if (busy) begin
      if (cur_op == OP_REFRESH) begin
        dec.cas_n = !(phase <= 3'd4);
        dec.ras_n = !(phase >= 3'd1 && phase <= 3'd5);
      end else begin
        dec.row   = (phase <= 3'd1) || (phase >= 3'd6);
        dec.ras_n = !(phase >= 3'd1 && phase <= 3'd5);
        dec.cas_n = !(phase >= 3'd3 && phase <= 3'd5);
        unique case (cur_op)
          OP_WRITE: begin
            dec.troe_n = !(phase <= 3'd2);
            dec.we_n   = !(phase <= 3'd2);
          end
          OP_DISPLAY: begin
            dec.troe_n = !(phase <= 3'd2);
          end
          OP_MEMORY: begin
            if (mem_we) dec.we_n   = !(phase >= 3'd2 && phase <= 3'd5);
            else        dec.troe_n = !(phase >= 3'd3 && phase <= 3'd5);
            dec_latch = !mem_we && (phase == 3'd5);
            dec_done  = (phase == 3'd6);
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl     <= CTRL_IDLE;
      rd_latch <= 1'b0;
      mem_done <= 1'b0;
    end else begin
      ctrl     <= dec;
      rd_latch <= dec_latch;
      mem_done <= dec_done;
    end
  end

  // Strobes never overlap a slot boundary: RAS and CAS are idle when a new
  // operation is loaded.
  a_idle_at_boundary: assert property (@(posedge clk) disable iff (rst)
    slot_end |-> (ctrl.ras_n && ctrl.cas_n));

endmodule
