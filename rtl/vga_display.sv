// vga_display: text screen of the base station (background, static text, live values).
//
// The 640x480 screen is treated as 40 x 30 character cells of 16x16 pixels; each 8x8
// glyph from char_rom is drawn at double size. The background is blue. A text table
// (the report keeps it in a second ROM) gives, per cell, the title "DRIVER'S ED" and the
// labels of the telemetry lines; at the positions of the live values the character code
// is formed from the value instead (a digit d becomes code 16 + d, the position of '0' in
// the character set), so the character ROM doubles as the lookup table for the dynamic
// fields. Static text is white, values yellow, and a proximity letter (F, L, R, B) turns
// red while that sensor sees an object. Layout, colours and the double-size glyphs are
// own choices; the report gives only the mechanism.
//   Timing: x/y/sync in, RGB and sync out one clock later, all registered together.
module vga_display
  import driversed_pkg::*;
(
  input  logic       clk,           // 25.175 MHz pixel clock
  input  logic       rst_n,         // active-low synchronous reset
  input  logic [9:0] x,             // pixel column
  input  logic [9:0] y,             // line
  input  logic       video_on,      // visible area
  input  logic       hsync_n_in,    // sync from vga_syncgen
  input  logic       vsync_n_in,    // vertical sync from vga_syncgen
  input  logic       acc_neg,       // acceleration sign
  input  logic [3:0] acc_ones,      // acceleration digits (m/s^2)
  input  logic [3:0] acc_tenths,    // acceleration tenths digit
  input  logic [3:0] vel_ones,      // velocity digits (m/s)
  input  logic [3:0] vel_tenths,    // velocity tenths digit
  input  bcd3_t      dist_bcd,      // distance digits (cm = m with two decimals)
  input  heading_e   heading,       // compass heading
  input  logic [3:0] prox_warn,     // {front, left, right, back}, 1 = near
  input  logic [3:0] key,           // last keypad key
  output logic [2:0] rgb,           // {red, green, blue}
  output logic       hsync_n,       // horizontal sync, delayed one clock to line up with rgb
  output logic       vsync_n        // vertical sync, delayed one clock to line up with rgb
);
  localparam int unsigned TEXT_COL0 = 10;
  localparam int unsigned TEXT_W    = 20;
  typedef enum logic [1:0] {C_WHITE, C_VALUE, C_WARN, C_NONE} colour_e;

  logic [4:0]  crow;
  logic [5:0]  ccol;
  logic [4:0]  idx;
  logic        in_text;
  logic [7:0]  ch;        // ASCII character of this cell
  colour_e     colour;
  logic [7:0]  glyph;
  logic        pixel;
  logic [159:0] line;

  assign crow    = y[8:4];
  assign ccol    = x[9:4];
  assign in_text = (ccol >= 6'(TEXT_COL0)) && (ccol < 6'(TEXT_COL0 + TEXT_W));
  assign idx     = 5'(ccol - 6'(TEXT_COL0));

  function automatic logic [7:0] digit(input logic [3:0] d);
    return 8'h30 + {4'h0, d};
  endfunction

  function automatic logic [7:0] hexch(input logic [3:0] d);
    return (d < 4'd10) ? 8'h30 + {4'h0, d} : 8'h37 + {4'h0, d};
  endfunction

  function automatic logic [15:0] hdg_name(input heading_e h);
    unique case (h)
      HDG_N:  return "N ";
      HDG_NE: return "NE";
      HDG_E:  return "E ";
      HDG_SE: return "SE";
      HDG_S:  return "S ";
      HDG_SW: return "SW";
      HDG_W:  return "W ";
      HDG_NW: return "NW";
    endcase
  endfunction

  // Static text table, 20 characters per line.
  always_comb begin
    unique case (crow)
      5'd3:    line = "     DRIVER'S ED    ";
      5'd8:    line = "ACCEL       .  M/S2 ";
      5'd10:   line = "VELOCITY    .  M/S  ";
      5'd12:   line = "DISTANCE    .   M   ";
      5'd14:   line = "HEADING             ";
      5'd16:   line = "PROXIMITY F L R B   ";
      5'd18:   line = "KEY                 ";
      default: line = "                    ";
    endcase
  end

  // Character and colour of the current cell.
  always_comb begin
    ch     = line[8*(5'(TEXT_W - 1) - idx) +: 8];
    colour = C_WHITE;
    unique case (crow)
      5'd8: unique case (idx)
        5'd10:   begin ch = acc_neg ? "-" : " "; colour = C_VALUE; end
        5'd11:   begin ch = digit(acc_ones);     colour = C_VALUE; end
        5'd13:   begin ch = digit(acc_tenths);   colour = C_VALUE; end
        default: ;
      endcase
      5'd10: unique case (idx)
        5'd11:   begin ch = digit(vel_ones);     colour = C_VALUE; end
        5'd13:   begin ch = digit(vel_tenths);   colour = C_VALUE; end
        default: ;
      endcase
      5'd12: unique case (idx)
        5'd11:   begin ch = digit(dist_bcd.hundreds); colour = C_VALUE; end
        5'd13:   begin ch = digit(dist_bcd.tens);     colour = C_VALUE; end
        5'd14:   begin ch = digit(dist_bcd.ones);     colour = C_VALUE; end
        default: ;
      endcase
      5'd14: unique case (idx)
        5'd10:   begin ch = hdg_name(heading)[15:8]; colour = C_VALUE; end
        5'd11:   begin ch = hdg_name(heading)[7:0];  colour = C_VALUE; end
        default: ;
      endcase
      5'd16: unique case (idx)
        5'd10:   colour = prox_warn[3] ? C_WARN : C_WHITE;
        5'd12:   colour = prox_warn[2] ? C_WARN : C_WHITE;
        5'd14:   colour = prox_warn[1] ? C_WARN : C_WHITE;
        5'd16:   colour = prox_warn[0] ? C_WARN : C_WHITE;
        default: ;
      endcase
      5'd18: if (idx == 5'd10) begin ch = hexch(key); colour = C_VALUE; end
      default: ;
    endcase
    if (!in_text) begin
      ch     = " ";
      colour = C_NONE;
    end
  end

  char_rom u_rom (.code(6'(ch - 8'h20)), .row(y[3:1]), .bits(glyph));

  assign pixel = glyph[3'd7 - x[3:1]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rgb     <= '0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
    end else begin
      hsync_n <= hsync_n_in;
      vsync_n <= vsync_n_in;
      if (!video_on)  rgb <= 3'b000;
      else if (pixel) begin
        unique case (colour)
          C_VALUE: rgb <= 3'b110;
          C_WARN:  rgb <= 3'b100;
          default: rgb <= 3'b111;
        endcase
      end else        rgb <= 3'b001;
    end
  end
endmodule
