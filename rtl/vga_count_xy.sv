// vga_count_xy: pixel position counters for the VGA refresh sequence.
//
// The screen is refreshed one pixel per clock, left to right and top to bottom. `x` counts
// the pixels of a line including the blanking interval (0 .. H_TOTAL-1) and `y` the lines
// of a frame (0 .. V_TOTAL-1). Defaults are the standard 640x480 at 60 Hz totals for the
// 25.175 MHz pixel clock (800 x 525), which the report's 25.175 MHz oscillator implies but
// does not list.
module vga_count_xy #(
  parameter int unsigned H_TOTAL = 800,
  parameter int unsigned V_TOTAL = 525
) (
  input  logic       clk,    // 25.175 MHz pixel clock
  input  logic       rst_n,  // active-low synchronous reset
  output logic [9:0] x,      // pixel column
  output logic [9:0] y,      // line
  output logic       frame   // one clock at the last pixel of a frame
);
  logic line_end;
  assign line_end = (x == 10'(H_TOTAL - 1));
  assign frame    = line_end && (y == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else begin
      x <= line_end ? '0 : x + 1'b1;
      if (line_end) y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1;
    end
  end
endmodule
