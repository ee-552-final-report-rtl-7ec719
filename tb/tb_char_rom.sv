// tb_char_rom: checks glyph rows of a few characters against bitmaps written out here
// (5x7 glyphs in columns 1..5 of the 8x8 cell, bit 7 = leftmost): space, '0', '7', 'A',
// 'E', '-', and that row 7 of every glyph is empty.
//
// The glyph shapes are this design's own; the original only says that a character ROM
// is used.
module tb_char_rom;
  logic [5:0] code;
  logic [2:0] row;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  char_rom dut (.code, .row, .bits);

  task automatic expect_glyph(byte ch, logic [7:0] g [7]);
    for (int r = 0; r < 7; r++) begin
      code = 6'(ch - 8'h20); row = 3'(r);
      #1;
      checks++;
      if (bits != g[r]) begin failures++; $display("'%c' row %0d: %b expected %b", ch, r, bits, g[r]); end
    end
  endtask

  initial begin
    expect_glyph(" ", '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    expect_glyph("0", '{8'b0011_1000, 8'b0100_0100, 8'b0100_1100, 8'b0101_0100,
                        8'b0110_0100, 8'b0100_0100, 8'b0011_1000});
    expect_glyph("7", '{8'b0111_1100, 8'b0000_0100, 8'b0000_1000, 8'b0001_0000,
                        8'b0010_0000, 8'b0010_0000, 8'b0010_0000});
    expect_glyph("A", '{8'b0011_1000, 8'b0100_0100, 8'b0100_0100, 8'b0111_1100,
                        8'b0100_0100, 8'b0100_0100, 8'b0100_0100});
    expect_glyph("E", '{8'b0111_1100, 8'b0100_0000, 8'b0100_0000, 8'b0111_1000,
                        8'b0100_0000, 8'b0100_0000, 8'b0111_1100});
    expect_glyph("-", '{8'h00, 8'h00, 8'h00, 8'b0111_1100, 8'h00, 8'h00, 8'h00});
    for (int c = 0; c < 64; c++) begin
      code = 6'(c); row = 3'd7;
      #1;
      checks++;
      if (bits != 0) begin failures++; $display("code %0d row 7 not empty", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
