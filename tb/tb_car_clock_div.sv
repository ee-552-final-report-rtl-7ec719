// tb_car_clock_div: checks that bit_en comes every 64 clocks and cnt_en every 2 clocks.
//
// Both rates (1 MHz / 64 and 1 MHz / 2) follow the original report; using them as
// enables is this design's choice.
module tb_car_clock_div;
  logic clk = 0, rst_n = 0;
  logic bit_en, cnt_en;
  int checks = 0, failures = 0;
  int last_bit = -1, last_cnt = -1, cyc = 0, nbit = 0;

  car_clock_div dut (.clk, .rst_n, .bit_en, .cnt_en);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && bit_en) begin
      if (last_bit >= 0) begin
        checks++;
        if (cyc - last_bit != 64) begin failures++; $display("bit_en spacing %0d", cyc - last_bit); end
      end
      last_bit = cyc;
      nbit++;
    end
    if (rst_n && cnt_en) begin
      if (last_cnt >= 0) begin
        checks++;
        if (cyc - last_cnt != 2) begin failures++; $display("cnt_en spacing %0d", cyc - last_cnt); end
      end
      last_cnt = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (64 * 20) @(posedge clk);
    checks++;
    if (nbit < 19) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
