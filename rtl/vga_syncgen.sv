// vga_syncgen: horizontal and vertical sync and blanking for the VGA monitor.
//
// Decodes the pixel position from vga_count_xy into the active-low sync pulses and the
// visible-area flag. Defaults are the standard 640x480 at 60 Hz timing (front porch,
// sync width and visible size; values from the VGA standard, not from the report).
// Combinational; the display stage registers its outputs together with the colour.
module vga_syncgen #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2
) (
  input  logic [9:0] x,         // pixel column
  input  logic [9:0] y,         // line
  output logic       hsync_n,   // horizontal sync, active low
  output logic       vsync_n,   // vertical sync, active low
  output logic       video_on   // inside the visible 640x480 area
);
  assign hsync_n  = !(x >= 10'(H_VISIBLE + H_FRONT) && x < 10'(H_VISIBLE + H_FRONT + H_SYNC));
  assign vsync_n  = !(y >= 10'(V_VISIBLE + V_FRONT) && y < 10'(V_VISIBLE + V_FRONT + V_SYNC));
  assign video_on = (x < 10'(H_VISIBLE)) && (y < 10'(V_VISIBLE));
endmodule
