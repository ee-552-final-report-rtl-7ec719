// char_rom: character generator ROM for the VGA text display.
//
// Holds 64 glyphs of 8x8 pixels, one byte per glyph row (bit 7 = leftmost pixel). The
// character code is the ASCII code minus 0x20, so codes 0..63 cover space, punctuation,
// the digits (code 16 = '0', so a decimal digit d is shown with code 16 + d) and the
// capital letters. The glyph bitmaps (5x7 letters in the 8x8 cell) are loaded from
// rtl/char_set.hex, 512 two-digit hex lines in order code*8 + row. The report's character
// set file is not reproduced; this glyph set is an own design.
//   Read is combinational (asynchronous ROM). The contents exist only through the
// $readmemh initialisation: a synthesis flow that ignores initial blocks sees an empty
// array and reduces the outputs to constants; FPGA flows load the file into a ROM.
module char_rom (
  input  logic [5:0] code,  // character code (ASCII - 0x20)
  input  logic [2:0] row,   // glyph row 0..7
  output logic [7:0] bits   // glyph row pixels, bit 7 leftmost
);
  logic [7:0] rom [512];

  initial $readmemh("rtl/char_set.hex", rom);

  assign bits = rom[{code, row}];
endmodule
