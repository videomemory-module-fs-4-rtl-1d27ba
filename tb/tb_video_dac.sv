// tb_video_dac: checks sync, blanking and the 9-bit transfer of the DAC
// model ({cursor, pixel} code, 0.3 V black to 1.0 V full scale).
module tb_video_dac;
  logic [7:0] video;
  logic cursor, sync, blank;
  real vout;
  int checks = 0, failures = 0;

  video_dac dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s vout=%f", what, vout); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  initial begin
    sync = 1; blank = 1; video = 8'hff; cursor = 1; #1;
    check(near(vout, 0.0), "sync tip");
    sync = 0; #1;
    check(near(vout, 0.3), "blank level");
    blank = 0;
    for (int c = 0; c < 512; c++) begin
      {cursor, video} = 9'(c); #1;
      check(near(vout, 0.3 + 0.7 * c / 511.0), "code level");
    end
    video = 8'hff; cursor = 0; #1;
    begin
      real white;
      white = vout;
      video = 8'h00; cursor = 1; #1;
      check(vout > white, "cursor brighter than any pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
