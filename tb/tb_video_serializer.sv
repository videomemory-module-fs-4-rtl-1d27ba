// tb_video_serializer: feeds random cursor bytes and checks the serial bit
// stream (MSB first, one byte per 8 pixels, 7.5 MHz) and that each line
// starts with a fresh byte.
module tb_video_serializer;
  logic clk = 0, rst = 1, pix_ce = 0, active = 0;
  logic [7:0] data;
  logic load, cursor_bit;
  logic [7:0] bytes [64];
  int checks = 0, failures = 0, idx = 0, nload = 0;
  bit got [$];

  video_serializer dut (.*);
  always #33 clk = ~clk;
  always @(posedge clk) pix_ce <= ~pix_ce;

  // GDC model: present the next byte, advance after load
  always @(posedge clk) if (load) begin
    nload++;
    idx <= idx + 1;
  end
  assign data = bytes[idx % 64];

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (bytes[i]) bytes[i] = 8'($urandom);
    repeat (4) @(negedge clk);
    rst = 0;
    for (int line = 0; line < 3; line++) begin
      automatic int first = idx;
      got.delete();
      while (pix_ce) @(negedge clk);
      active = 1;
      // 8 bytes = 64 pixels; sample the bit one clock after each tick
      for (int p = 0; p < 64; p++) begin
        while (!pix_ce) @(negedge clk);
        @(negedge clk);
        got.push_back(cursor_bit);
      end
      active = 0;
      repeat (6) @(negedge clk);
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (got[p] != bytes[(first + p / 8) % 64][7 - p % 8]) begin
          failures++; $display("FAIL line %0d pixel %0d", line, p);
        end
      end
      checks++;
      if (idx - first != 8) begin failures++; $display("FAIL %0d loads per line", idx - first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
