// tb_velocity_calc: every count must give 2*count cm/s and the digits of (2*count)/10
// tenths of m/s, saturated at 9.9.
//
// The conversion follows the original report's wheel and window sizes (rounded to 2);
// the digit saturation is this design's choice.
module tb_velocity_calc;
  logic clk = 0, rst_n = 0, sample_valid = 0;
  logic [7:0] sample = 0;
  logic [9:0] vel_cms;
  logic [3:0] ones, tenths;
  logic updated;
  int checks = 0, failures = 0;

  velocity_calc dut (.clk, .rst_n, .sample_valid, .sample, .vel_cms, .ones, .tenths, .updated);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      int v, dm;
      @(negedge clk); sample = 8'(i); sample_valid = 1;
      @(negedge clk); sample_valid = 0;
      checks++;
      if (!updated) begin failures++; $display("no update"); end
      v = 2 * i;
      dm = v / 10;
      if (dm > 99) dm = 99;
      checks++;
      if (vel_cms != 10'(v) || ones != 4'(dm / 10) || tenths != 4'(dm % 10)) begin
        failures++; $display("count %0d: %0d cm/s %0d.%0d", i, vel_cms, ones, tenths);
      end
      @(negedge clk); sample = 8'($urandom);
      @(negedge clk);
      checks++;
      if (vel_cms != 10'(v)) begin failures++; $display("value not held"); end
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
