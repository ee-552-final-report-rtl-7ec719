// tb_vga_count_xy: with a 12 x 5 raster the counters must visit every position in order
// and `frame` must pulse only at the last one; at the default 800 x 525 one frame must
// take 420000 clocks.
//
// The 800 x 525 raster is the standard for 640 x 480 at 25.175 MHz, not a number
// from the original report.
module tb_vga_count_xy;
  logic clk = 0, rst_n = 0;
  logic [9:0] x, y, xd, yd;
  logic frame, frame_d;
  int checks = 0, failures = 0;

  vga_count_xy #(.H_TOTAL(12), .V_TOTAL(5)) dut (.clk, .rst_n, .x, .y, .frame);
  vga_count_xy dut_d (.clk, .rst_n, .x(xd), .y(yd), .frame(frame_d));

  always #5 clk = ~clk;

  initial begin
    int n, last;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int yy = 0; yy < 5; yy++)
        for (int xx = 0; xx < 12; xx++) begin
          checks++;
          if (x != 10'(xx) || y != 10'(yy) || frame != (xx == 11 && yy == 4)) begin
            failures++; $display("expected %0d,%0d got %0d,%0d frame %0b", xx, yy, x, y, frame);
          end
          @(negedge clk);
        end
    // default raster
    n = 0; last = -1;
    while (n < 900000) begin
      @(negedge clk); n++;
      if (frame_d) begin
        if (last >= 0) begin
          checks++;
          if (n - last != 420000) begin failures++; $display("frame length %0d", n - last); end
        end
        last = n;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
