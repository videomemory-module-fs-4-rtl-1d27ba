// tb_vram_plane_sel: for random control words, checks that RAS/CAS reach
// only the plane selected for the running operation (all four for refresh),
// the steering of the camera and display shift clocks, SE and the video mux.
module tb_vram_plane_sel;
  import fs4_pkg::*;
  op_e op;
  vram_ctrl_t ctrl;
  isr_t isr;
  logic capture, sc_cam, sc_disp;
  logic [3:0][7:0] sd_in;
  logic [3:0] ras_n, cas_n, sc, se_n;
  logic [7:0] video;
  int checks = 0, failures = 0;

  vram_plane_sel dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d isr=%h", what, op, isr); end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      int target;
      op = op_e'($urandom_range(0, 3));
      isr = isr_t'(8'($urandom));
      ctrl = vram_ctrl_t'(5'($urandom));
      capture = 1'($urandom);
      sc_cam = 1'($urandom);
      sc_disp = 1'($urandom);
      for (int p = 0; p < 4; p++) sd_in[p] = 8'($urandom);
      #1;
      case (op)
        OP_MEMORY:  target = isr.mp;
        OP_WRITE:   target = isr.wp;
        OP_DISPLAY: target = isr.dp;
        default:    target = -1;
      endcase
      for (int p = 0; p < 4; p++) begin
        automatic bit en = (target < 0) || (target == p);
        logic esc;
        check(ras_n[p] == (en ? ctrl.ras_n : 1'b1), "ras routing");
        check(cas_n[p] == (en ? ctrl.cas_n : 1'b1), "cas routing");
        if (capture && isr.wp == p) esc = sc_cam;
        else if (isr.dp == p)       esc = sc_disp;
        else                        esc = 1'b0;
        check(sc[p] == esc, "shift clock steering");
        check(se_n[p] == !(isr.dp == p && !(capture && isr.wp == p)), "serial enable");
      end
      check(video == sd_in[isr.dp], "video from display plane");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
