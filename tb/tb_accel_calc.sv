// tb_accel_calc: feeds x and y samples and error bytes. Only every 15th valid x sample may
// update the output, y samples and 0x7F/0xFF bytes are ignored, and the digits must equal
// 5*(T1-74) tenths of m/s^2 with sign, saturated at 9.9.
//
// The 15-sample update, the zero at 74 and the scale follow the original report; the
// 9.9 saturation and the use of only the 15th sample are this design's choices.
module tb_accel_calc;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] data = 0;
  logic negative, updated;
  logic [3:0] ones, tenths;
  int checks = 0, failures = 0, nupd = 0;

  accel_calc dut (.clk, .rst_n, .we, .data, .negative, .ones, .tenths, .updated);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && updated) nupd++;

  task automatic write(logic [7:0] b);
    @(negedge clk); data = b; we = 1;
    @(negedge clk); we = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      int t1, a, mag;
      t1 = (r < 3) ? 74 + r : $urandom_range(40, 126);
      for (int i = 0; i < 14; i++) begin
        write({1'b0, 7'($urandom_range(0, 126))});
        write({1'b1, 7'($urandom_range(0, 127))});   // y: ignored
        if (i == 5) begin write(8'h7F); write(8'hFF); end
      end
      checks++;
      if (nupd != r) begin failures++; $display("round %0d: early update", r); end
      write({1'b0, 7'(t1)});
      @(negedge clk);
      a = 5 * (t1 - 74);
      mag = a < 0 ? -a : a;
      if (mag > 99) mag = 99;
      checks++;
      if (nupd != r + 1 || ones != 4'(mag / 10) || tenths != 4'(mag % 10) ||
          negative != (a < 0)) begin
        failures++;
        $display("T1 %0d: got %s%0d.%0d expected %0d tenths", t1, negative ? "-" : "+", ones,
                 tenths, a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
