// tb_vga_display: sets telemetry values, puts chosen pixel positions on x/y and checks the
// registered colour one clock later against glyph pixels worked out by hand: background
// blue, blank black, title white, values yellow, an active proximity warning red.
//
// The blue background follows the original report; the layout, colours and cell size
// are this design's own.
module tb_vga_display;
  import driversed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] x = 0, y = 0;
  logic video_on = 1, hs_in = 1, vs_in = 1;
  logic acc_neg = 1;
  logic [3:0] acc_ones = 7, acc_tenths = 3, vel_ones = 2, vel_tenths = 1;
  bcd3_t dist_bcd = '{hundreds: 4'd4, tens: 4'd0, ones: 4'd8};
  heading_e heading = HDG_NE;
  logic [3:0] prox_warn = 4'b1000, key = 4'hA;
  logic [2:0] rgb;
  logic hsync_n, vsync_n;
  int checks = 0, failures = 0;

  vga_display dut (.clk, .rst_n, .x, .y, .video_on, .hsync_n_in(hs_in), .vsync_n_in(vs_in),
                   .acc_neg, .acc_ones, .acc_tenths, .vel_ones, .vel_tenths, .dist_bcd,
                   .heading, .prox_warn, .key, .rgb, .hsync_n, .vsync_n);

  always #5 clk = ~clk;

  task automatic pix(int px, int py, logic [2:0] exp, string what);
    @(negedge clk); x = 10'(px); y = 10'(py);
    @(negedge clk);
    checks++;
    if (rgb != exp) begin failures++; $display("%s at (%0d,%0d): rgb %b expected %b", what, px, py, rgb, exp); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pix(0, 0, 3'b001, "background");
    pix(2, 2, 3'b001, "background");
    video_on = 0; pix(0, 0, 3'b000, "blanking"); video_on = 1;
    pix(242, 48, 3'b111, "title D lit");
    pix(240, 48, 3'b001, "title D unlit");
    pix(338, 128, 3'b110, "accel 7 lit");
    pix(336, 128, 3'b001, "accel 7 unlit");
    pix(322, 134, 3'b110, "minus sign");
    pix(370, 128, 3'b110, "accel tenths 3 lit");
    pix(356, 138, 3'b111, "accel decimal point");
    pix(358, 170, 3'b111, "velocity decimal point");
    pix(358, 202, 3'b111, "distance decimal point");
    pix(374, 160, 3'b110, "velocity 1 lit");
    pix(370, 160, 3'b001, "velocity 1 unlit");
    pix(344, 192, 3'b110, "distance 4");
    pix(342, 192, 3'b001, "distance 4 unlit");
    pix(372, 192, 3'b110, "distance 0");
    pix(388, 192, 3'b110, "distance 8");
    pix(322, 224, 3'b110, "heading N");
    pix(324, 224, 3'b001, "heading N gap");
    pix(338, 224, 3'b110, "heading E");
    pix(322, 256, 3'b100, "prox F warning");
    pix(354, 256, 3'b111, "prox L quiet");
    pix(324, 288, 3'b110, "key A");
    pix(322, 288, 3'b001, "key A gap");
    acc_neg = 0;
    pix(322, 134, 3'b001, "no minus sign");
    prox_warn = 4'b0000;
    pix(322, 256, 3'b111, "prox F quiet");
    // sync passes with one clock delay
    @(negedge clk); hs_in = 0; vs_in = 0;
    checks++;
    if (!hsync_n || !vsync_n) begin failures++; $display("sync not delayed"); end
    @(negedge clk);
    checks++;
    if (hsync_n || vsync_n) begin failures++; $display("sync not passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
