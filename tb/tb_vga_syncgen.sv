// tb_vga_syncgen: sweeps the whole 800 x 525 raster and checks the sync pulses and the
// visible area against the 640x480 at 60 Hz timing: hsync low for x in 656..751, vsync low
// for y in 490..491, video for x < 640 and y < 480.
//
// The timing is the standard 640 x 480 at 60 Hz one, not a number from the original
// report.
module tb_vga_syncgen;
  logic [9:0] x = 0, y = 0;
  logic hsync_n, vsync_n, video_on;
  int checks = 0, failures = 0;
  int hlow = 0, vlow = 0, vis = 0;

  vga_syncgen dut (.x, .y, .hsync_n, .vsync_n, .video_on);

  initial begin
    for (int yy = 0; yy < 525; yy++)
      for (int xx = 0; xx < 800; xx++) begin
        x = 10'(xx); y = 10'(yy);
        #1;
        if (yy == 0 && !hsync_n) hlow++;
        if (xx == 0 && !vsync_n) vlow++;
        if (video_on) vis++;
        checks++;
        if (hsync_n != !(xx >= 656 && xx < 752) || vsync_n != !(yy >= 490 && yy < 492) ||
            video_on != (xx < 640 && yy < 480)) begin
          failures++;
          if (failures < 10) $display("at %0d,%0d: h %0b v %0b video %0b", xx, yy, hsync_n, vsync_n, video_on);
        end
      end
    checks++;
    if (hlow != 96 || vlow != 2 || vis != 640 * 480) begin
      failures++; $display("hsync %0d vsync %0d visible %0d", hlow, vlow, vis);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
