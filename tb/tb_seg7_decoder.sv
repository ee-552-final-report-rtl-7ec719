// tb_seg7_decoder: checks the segment pattern of every hex digit, given here as the lit
// segment letters of the usual 7-segment shapes.
//
// The segment order {g..a}, active high, is this design's choice.
module tb_seg7_decoder;
  logic [3:0] value;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  seg7_decoder dut (.value, .seg);

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] exp;
      exp = '0;
      for (int i = 0; i < lit[v].len(); i++) exp[lit[v][i] - "a"] = 1'b1;
      value = 4'(v);
      #1;
      checks++;
      if (seg != exp) begin failures++; $display("%h: %b expected %b", v, seg, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
