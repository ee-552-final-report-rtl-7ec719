// tb_distance_calc: sends encoder bytes; only every 16th byte may be added to the total,
// the error byte 0xFF in that slot is skipped, and the digits must be total/8 cm in
// decimal (saturated at 999). The chosen byte must be passed on as the velocity sample.
//
// The every-16th rule and pulses/8 = cm follow the original report; the 999 limit is
// this design's choice.
module tb_distance_calc;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] data = 0;
  logic [15:0] total_pulses;
  driversed_pkg::bcd3_t digits;
  logic sample_valid, updated;
  logic [7:0] sample;
  int checks = 0, failures = 0;
  int total = 0, nsamp = 0;
  logic [7:0] last_sample;

  distance_calc dut (.clk, .rst_n, .we, .data, .total_pulses, .digits, .sample_valid, .sample,
                     .updated);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && sample_valid) begin nsamp++; last_sample = sample; end

  task automatic write(logic [7:0] b);
    @(negedge clk); data = b; we = 1;
    @(negedge clk); we = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 60; w++) begin
      logic [7:0] v;
      int d, exp_n;
      for (int i = 0; i < 15; i++) write(8'($urandom_range(0, 254)));
      v = (w % 7 == 3) ? 8'hFF : 8'($urandom_range(0, 254));
      exp_n = nsamp + (v != 8'hFF);
      write(v);
      if (v != 8'hFF) total += v;
      d = total / 8;
      if (d > 999) d = 999;
      checks++;
      if (total_pulses != 16'(total) || digits.hundreds != 4'(d / 100) ||
          digits.tens != 4'((d / 10) % 10) || digits.ones != 4'(d % 10)) begin
        failures++;
        $display("window %0d: total %0d digits %0d%0d%0d, expected %0d / %0d", w, total_pulses,
                 digits.hundreds, digits.tens, digits.ones, total, d);
      end
      checks++;
      if (nsamp != exp_n || (v != 8'hFF && last_sample != v)) begin
        failures++; $display("window %0d: velocity sample wrong", w);
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
